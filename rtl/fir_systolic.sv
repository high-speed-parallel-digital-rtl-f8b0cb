// fir_systolic: systolic FIR filter built from a chain of dsp_slice
// instances, one per tap.
//
// y(t) = sum_{i=0}^{TAPS-1} coef[i] * x(t - LATENCY - i),  LATENCY = TAPS + 2.
//
// This is the addition-chain direct form mapped onto DSP slices. Slice i
// holds coefficient coef[i] (coef[0] in the slice that sees the input first).
// The input sample enters slice 0 through one B register; every later slice
// takes the sample from the previous slice's B cascade through two B
// registers. The partial sums run from slice to slice through the P register
// (one register per slice), slice 0 adding zero. Because the data moves two
// registers per slice while the sum moves one, each slice sees the sample
// one step older than its left neighbour, which forms the tap delay line
// with no signal driving more than one slice: the fan-out problem of the
// transposed form is gone, at the price of a latency that grows with TAPS.
// One new sample is accepted and one output produced every clock.
//
// Ports: x is a signed DATA_W-bit sample, coef[] are signed COEF_W-bit
// coefficients held steady during operation, y is the 48-bit P output of
// the last slice. The slice structure and the register placement follow the
// systolic slice diagram; the sample and coefficient widths are this
// design's choice (they must fit the 18-bit B and 27-bit A ports).
module fir_systolic
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
      else $fatal(1, "fir_systolic: widths exceed the DSP slice ports");
  end

  logic signed [DSP_B_W-1:0] bcasc [TAPS];
  logic signed [DSP_P_W-1:0] pcasc [TAPS];

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    logic signed [DSP_B_W-1:0] b_in;
    logic signed [DSP_P_W-1:0] p_in;
    if (i == 0) begin : g_first
      assign b_in = DSP_B_W'(x);
      assign p_in = '0;
    end else begin : g_next
      assign b_in = bcasc[i-1];
      assign p_in = pcasc[i-1];
    end
    dsp_slice #(.BREG(i == 0 ? 1 : 2)) u_slice (
      .clk        (clk),
      .rst_n      (rst_n),
      .use_preadd (1'b0),
      .a          (DSP_A_W'(coef[i])),
      .d          ('0),
      .b          (b_in),
      .pcin       (p_in),
      .bcout      (bcasc[i]),
      .p          (pcasc[i])
    );
  end

  assign y = pcasc[TAPS-1];

endmodule
