// tb_milo_full: the parallel FIR at its default size (5 inputs, 5 outputs,
// 20 taps, systolic sub-filters), no parameter overrides.
//
// A stream of random 16-bit samples with random 18-bit coefficients is fed
// as one 5-sample block per clock; every output is compared with a
// direct-form FIR computed here. Also checked: the latency (input register,
// 4 + 2 cycles of systolic sub-filter, summing register: 8 clocks), one
// output block every clock, and the data rate of 5 samples per clock.
module tb_milo_full;
  localparam int M = 5, L = 5, NTAPS = 20, NBLK = 200, EXP_LAT = 8;

  logic clk;
  initial clk = 1'b0;
  always #1 clk = ~clk;

  logic               rst_n, in_valid, out_valid;
  logic signed [15:0] x_in  [M];
  logic signed [17:0] coef  [NTAPS];
  logic signed [50:0] y_out [L];

  milo dut (.*);

  int     checks = 0, failures = 0, out_blocks = 0, first_out = -1;
  longint xs [M*NBLK];

  function automatic longint ref_y(int s);
    longint acc = 0;
    for (int i = 0; i < NTAPS; i++)
      if (s - i >= 0) acc += longint'(coef[i]) * xs[s - i];
    return acc;
  endfunction

  initial begin
    rst_n = 0; in_valid = 0;
    foreach (x_in[k]) x_in[k] = '0;
    foreach (coef[i]) coef[i] = 18'($urandom);
    for (int s = 0; s < M*NBLK; s++) xs[s] = longint'($signed(16'($urandom)));
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < NBLK + EXP_LAT + 2; t++) begin
      automatic int tb = t - EXP_LAT + 1;
      in_valid = (t < NBLK);
      for (int k = 0; k < M; k++) x_in[k] = (t < NBLK) ? 16'(xs[M*t + M-1-k]) : '0;
      @(posedge clk); #1;
      if (out_valid) begin
        out_blocks++;
        if (first_out < 0) first_out = t;
      end
      checks++;
      if (out_valid !== (tb >= 0 && tb < NBLK)) begin
        failures++;
        $display("FAIL t=%0d out_valid=%0b", t, out_valid);
      end
      if (tb >= 0 && tb < NBLK)
        for (int l = 0; l < L; l++) begin
          automatic longint exp_y = ref_y(M*tb + M-1 - l);
          checks++;
          if (longint'(y_out[l]) != exp_y) begin
            failures++;
            if (failures < 10)
              $display("FAIL block=%0d lane=%0d got=%0d exp=%0d", tb, l, longint'(y_out[l]), exp_y);
          end
        end
    end
    // Latency: the first block (presented before edge 0) shows after edge EXP_LAT-1.
    checks++;
    if (first_out != EXP_LAT - 1) begin
      failures++;
      $display("FAIL latency: first output after %0d clocks, expected %0d", first_out + 1, EXP_LAT);
    end
    // Interval 1: NBLK blocks in, NBLK output blocks of L samples out.
    checks++;
    if (out_blocks != NBLK) begin
      failures++;
      $display("FAIL %0d output blocks for %0d input blocks", out_blocks, NBLK);
    end
    $display("samples in %0d, samples out %0d, over %0d clocks of valid data",
             M*NBLK, L*out_blocks, out_blocks);
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
