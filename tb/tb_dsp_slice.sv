// tb_dsp_slice: checks the DSP slice model with one and two B registers.
//
// Random A, D, B, PCIN and pre-adder selection every clock. The expected P
// is computed from the input history: P after clock edge c is
//   (use_preadd ? D + A : A)(captured at c-2) * B(captured at c-1-BREG)
//   + PCIN(captured at c),
// i.e. 3 clocks from A/D, BREG + 2 from B and 1 from PCIN; BCOUT after edge
// c is B captured at c-BREG+1. The pre-adder sum is wrapped to 27 bits.
module tb_dsp_slice;
  import pfir_pkg::*;
  localparam int N = 400;

  logic clk;
  initial clk = 1'b0;
  always #1 clk = ~clk;

  logic rst_n, pre;
  logic signed [DSP_A_W-1:0] a, d;
  logic signed [DSP_B_W-1:0] b, bc1, bc2;
  logic signed [DSP_P_W-1:0] pcin, p1, p2;

  dsp_slice #(.BREG(1)) u1 (.clk, .rst_n, .use_preadd(pre), .a, .d, .b, .pcin, .bcout(bc1), .p(p1));
  dsp_slice #(.BREG(2)) u2 (.clk, .rst_n, .use_preadd(pre), .a, .d, .b, .pcin, .bcout(bc2), .p(p2));

  longint ha [N], hd [N], hb [N], hp [N];
  bit     hpre [N];
  int     checks = 0, failures = 0;

  function automatic longint expect_p(int c, int breg);
    longint ad, m;
    if (c - 2 < 0 || c - 1 - breg < 0) m = 0;
    else begin
      ad = hpre[c-2] ? longint'($signed(DSP_A_W'(ha[c-2] + hd[c-2]))) : ha[c-2];
      m  = ad * hb[c-1-breg];
    end
    return longint'($signed(DSP_P_W'(m + hp[c])));
  endfunction

  task automatic check(string what, longint got, longint exp, int c);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s edge=%0d got=%0d exp=%0d", what, c, got, exp);
    end
  endtask

  initial begin
    rst_n = 0; pre = 0; a = '0; d = '0; b = '0; pcin = '0;
    for (int c = 0; c < N; c++) begin
      hpre[c] = 1'($urandom);
      ha[c] = longint'($signed(DSP_A_W'($urandom)));
      hd[c] = longint'($signed(DSP_A_W'($urandom)));
      hb[c] = longint'($signed(DSP_B_W'($urandom)));
      hp[c] = longint'($signed(DSP_P_W'({$urandom, $urandom})));
      if (c % 50 == 3) begin       // full-scale corner
        ha[c] = -(64'sd1 <<< 26); hd[c] = -(64'sd1 <<< 26); hb[c] = -(64'sd1 <<< 17);
      end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < N; c++) begin
      pre = hpre[c]; a = DSP_A_W'(ha[c]); d = DSP_A_W'(hd[c]);
      b = DSP_B_W'(hb[c]); pcin = DSP_P_W'(hp[c]);
      @(posedge clk); #1;
      check("p BREG=1", longint'(p1), expect_p(c, 1), c);
      check("p BREG=2", longint'(p2), expect_p(c, 2), c);
      check("bcout BREG=1", longint'(bc1), hb[c], c);
      if (c >= 1) check("bcout BREG=2", longint'(bc2), hb[c-1], c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
