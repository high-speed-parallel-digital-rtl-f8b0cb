// tb_fir_transposed: checks fir_transposed at 4 taps (the default) and at 1 and 7
// taps against a direct-form FIR reference, including the latency of
// 3 clocks (B, M and P registers) whatever the tap count.
module tb_fir_transposed;
  logic clk;
  initial clk = 1'b0;
  always #1 clk = ~clk;

  logic done [3];
  int   ck [3], fl [3];
  int   checks = 0, failures = 0;

  fir_transposed_harness #(.TAPS(4)) h0 (.clk, .done(done[0]), .checks(ck[0]), .failures(fl[0]));
  fir_transposed_harness #(.TAPS(1)) h1 (.clk, .done(done[1]), .checks(ck[1]), .failures(fl[1]));
  fir_transposed_harness #(.TAPS(7)) h2 (.clk, .done(done[2]), .checks(ck[2]), .failures(fl[2]));

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
