// tb_miso: checks the polyphase M-input single-output FIR at its default
// size (5 lanes, 20 taps) with systolic and with transposed sub-filters, and
// at 3 lanes / 9 taps, against a direct-form FIR reference and latency.
module tb_miso;
  import pfir_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #1 clk = ~clk;

  logic done [3];
  int   ck [3], fl [3];
  int   checks = 0, failures = 0;

  miso_harness #(.M(5), .NTAPS(20), .STRUCT(FIR_SYSTOLIC))   h0 (.clk, .done(done[0]), .checks(ck[0]), .failures(fl[0]));
  miso_harness #(.M(5), .NTAPS(20), .STRUCT(FIR_TRANSPOSED)) h1 (.clk, .done(done[1]), .checks(ck[1]), .failures(fl[1]));
  miso_harness #(.M(3), .NTAPS(9),  .STRUCT(FIR_SYSTOLIC))   h2 (.clk, .done(done[2]), .checks(ck[2]), .failures(fl[2]));

  initial begin
    #10;
    wait (done[0] && done[1] && done[2]);
    for (int i = 0; i < 3; i++) begin checks += ck[i]; failures += fl[i]; end
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
