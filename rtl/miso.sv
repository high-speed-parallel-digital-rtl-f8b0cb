// miso: M-input single-output polyphase FIR.
//
// A filter h of NTAPS taps is split into M polyphase components
//   E_k(z) = sum_{i=0}^{NTAPS/M-1} h(i*M + k) z^-i,   k = 0..M-1,
// so that H(z) = sum_k z^-k E_k(z^M). With the input delay line of that
// decomposition removed, lane k already carries the k-step delayed stream:
// x[k] = x(n - k), where n advances by M samples every clock. Sub-filter k is
// an ordinary NTAPS/M-tap FIR on lane k running at the slow (block) clock,
// where one clock is M input samples, so its z^-1 is the z^-M of the full
// rate filter. The M sub-filter outputs are added in one registered adder:
//
//   y = sum_k sum_i h(iM+k) x(n - k - iM) = (h * x)(n),
//
// delayed by LATENCY = fir_latency(STRUCT, NTAPS/M) + 1 clocks.
// One result per clock; the input rate per lane is 1/M of the sample rate.
//
// Sub-filters are fir_systolic (default) or fir_transposed, selected by
// STRUCT. The decomposition and the summing of the branches follow the
// polyphase MISO diagram; the single registered adder, the widths and the
// full-precision output (48 + clog2(M) bits) are this design's choices.
module miso
  import pfir_pkg::*;
#(
  parameter int          M      = 5,
  parameter int          NTAPS  = 20,
  parameter int          DATA_W = 16,
  parameter int          COEF_W = 18,
  parameter fir_struct_e STRUCT = FIR_SYSTOLIC,
  parameter int          OUT_W  = DSP_P_W + $clog2(M)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] x    [M],      // x[k] = x(n - k)
  input  logic signed [COEF_W-1:0] coef [NTAPS],  // h(0) .. h(NTAPS-1)
  output logic signed [OUT_W-1:0]  y
);

  localparam int SUB_TAPS = NTAPS / M;

  initial begin
    assert (M >= 1 && NTAPS % M == 0)
      else $fatal(1, "miso: NTAPS must be a multiple of M");
  end

  logic signed [DSP_P_W-1:0] sub_y [M];

  for (genvar k = 0; k < M; k++) begin : g_phase
    logic signed [COEF_W-1:0] e_coef [SUB_TAPS];
    for (genvar i = 0; i < SUB_TAPS; i++) begin : g_c
      assign e_coef[i] = coef[i*M + k];
    end
    if (STRUCT == FIR_SYSTOLIC) begin : g_sys
      fir_systolic #(.TAPS(SUB_TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W)) u_e (
        .clk (clk), .rst_n (rst_n), .x (x[k]), .coef (e_coef), .y (sub_y[k])
      );
    end else begin : g_trn
      fir_transposed #(.TAPS(SUB_TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W)) u_e (
        .clk (clk), .rst_n (rst_n), .x (x[k]), .coef (e_coef), .y (sub_y[k])
      );
    end
  end

  logic signed [OUT_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int k = 0; k < M; k++) sum += OUT_W'(sub_y[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) y <= '0;
    else        y <= sum;
  end

endmodule
