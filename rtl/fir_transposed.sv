// fir_transposed: transposed-form FIR filter built from a chain of dsp_slice
// instances, one per tap.
//
// y(t) = sum_{i=0}^{TAPS-1} coef[i] * x(t - LATENCY - i),  LATENCY = 3.
//
// Every slice receives the same input sample through its own B register (the
// input is broadcast). The slices are chained through their P registers:
// the first slice of the chain holds the last coefficient coef[TAPS-1] and
// adds zero, the last slice holds coef[0] and drives y. Each P register in
// the chain delays the older products by one more clock, which builds the
// tap delay line inside the adder chain. The critical path is one multiply
// and one add whatever TAPS is, and the latency is fixed, but the input
// drives TAPS slices, which limits how long the filter can be made on a real
// device. One sample in and one output out every clock.
//
// Ports: x is a signed DATA_W-bit sample, coef[] are signed COEF_W-bit
// coefficients held steady during operation, y is the 48-bit P output of the
// last slice. The coefficient order and the zero cascade input follow the
// transposed slice diagram; widths are this design's choice.
module fir_transposed
  import pfir_pkg::*;
#(
  parameter int TAPS   = 4,
  parameter int DATA_W = 16,
  parameter int COEF_W = 18
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic signed [DATA_W-1:0]  x,
  input  logic signed [COEF_W-1:0]  coef [TAPS],
  output logic signed [DSP_P_W-1:0] y
);

  initial begin
    assert (DATA_W <= DSP_B_W && COEF_W <= DSP_A_W && TAPS >= 1)
      else $fatal(1, "fir_transposed: widths exceed the DSP slice ports");
  end

  logic signed [DSP_P_W-1:0] pcasc [TAPS];
  logic signed [DSP_B_W-1:0] x_b;

  assign x_b = DSP_B_W'(x);

  // Slice j of the chain (j = 0 first) holds coef[TAPS-1-j].
  for (genvar j = 0; j < TAPS; j++) begin : g_tap
    logic signed [DSP_P_W-1:0] p_in;
    logic signed [DSP_B_W-1:0] unused_bcout;
    if (j == 0) begin : g_first
      assign p_in = '0;
    end else begin : g_next
      assign p_in = pcasc[j-1];
    end
    dsp_slice #(.BREG(1)) u_slice (
      .clk        (clk),
      .rst_n      (rst_n),
      .use_preadd (1'b0),
      .a          (DSP_A_W'(coef[TAPS-1-j])),
      .d          ('0),
      .b          (x_b),
      .pcin       (p_in),
      .bcout      (unused_bcout),
      .p          (pcasc[j])
    );
  end

  assign y = pcasc[TAPS-1];

endmodule
