// tb_milo: end-to-end test of the parallel FIR.
//
// Four configurations run side by side, each checked sample by sample
// against a direct-form FIR reference (see milo_harness):
//   * the default 5-input 5-output filter with systolic sub-filters,
//   * the same with transposed sub-filters,
//   * 4 inputs, 2 outputs (fewer outputs than lanes),
//   * 2 inputs, 5 outputs (windows reaching two blocks back).
// Each mechanism must be seen at least once: both sub-filter structures,
// outputs using earlier blocks, outputs using blocks two back, valid gaps
// and full-scale inputs.
module tb_milo;
  import pfir_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #1 clk = ~clk;

  localparam int NH = 4;
  logic done [NH];
  int   ck [NH], fl [NH], cr [NH], dp [NH], gp [NH], ex [NH];

  milo_harness #(.M(5), .L(5), .NTAPS(20), .STRUCT(FIR_SYSTOLIC))   h0 (
    .clk, .done(done[0]), .checks(ck[0]), .failures(fl[0]), .n_cross(cr[0]),
    .n_deep(dp[0]), .n_gap(gp[0]), .n_extreme(ex[0]));
  milo_harness #(.M(5), .L(5), .NTAPS(20), .STRUCT(FIR_TRANSPOSED)) h1 (
    .clk, .done(done[1]), .checks(ck[1]), .failures(fl[1]), .n_cross(cr[1]),
    .n_deep(dp[1]), .n_gap(gp[1]), .n_extreme(ex[1]));
  milo_harness #(.M(4), .L(2), .NTAPS(12), .STRUCT(FIR_SYSTOLIC))   h2 (
    .clk, .done(done[2]), .checks(ck[2]), .failures(fl[2]), .n_cross(cr[2]),
    .n_deep(dp[2]), .n_gap(gp[2]), .n_extreme(ex[2]));
  milo_harness #(.M(2), .L(5), .NTAPS(6),  .STRUCT(FIR_TRANSPOSED)) h3 (
    .clk, .done(done[3]), .checks(ck[3]), .failures(fl[3]), .n_cross(cr[3]),
    .n_deep(dp[3]), .n_gap(gp[3]), .n_extreme(ex[3]));

  int checks, failures;

  task automatic mech(string name, int count);
    checks++;
    $display("mechanism %-22s seen %0d times", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", name);
    end
  endtask

  initial begin
    #10;
    wait (done[0] && done[1] && done[2] && done[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin checks += ck[i]; failures += fl[i]; end
    mech("systolic sub-filters", ck[0] + ck[2]);
    mech("transposed sub-filters", ck[1] + ck[3]);
    mech("previous-block window", cr[0] + cr[1] + cr[2] + cr[3]);
    mech("two-blocks-back window", dp[3]);
    mech("valid gap", gp[0] + gp[1] + gp[2] + gp[3]);
    mech("full-scale input", ex[0] + ex[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
