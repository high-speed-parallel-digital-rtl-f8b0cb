// milo: M-input L-output parallel FIR, the top of the design.
//
// A sample stream too fast for one FPGA clock (GHz, bunch by bunch) arrives
// as blocks of M consecutive samples, one block per clock, so each lane only
// runs at 1/M of the sample rate. Within a block lane k holds x(n - k): lane 0
// is the newest sample n, lane M-1 the oldest. Every clock the module
// returns L consecutive outputs of the FIR filter h (NTAPS taps):
//
//   y_out[l] = y(n - l) = sum_{i=0}^{NTAPS-1} h(i) x(n - l - i),  l = 0..L-1,
//
// for the block whose newest sample is n, LATENCY clocks after that block
// was presented. With L = M the outputs form a complete output stream at
// the input sample rate, i.e. the data rate is M samples per clock.
//
// How it works: output l is produced by its own miso block (polyphase
// M-input single-output FIR). Output l needs the input bus delayed by l
// samples, x(n - l - k) for k = 0..M-1. Those samples are taken from a
// window made of the current input block (registered once) and as many
// earlier blocks as l + k can reach back into (HIST_BLOCKS blocks in all).
// So the resources grow L times, while the clock only has to reach the
// block rate.
//
// Timing: LATENCY = 1 (input register) + sub-filter latency + 1 (summing
// register) = NTAPS/M + 4 with systolic sub-filters, 5 with transposed ones;
// one block in and one block out per clock (interval 1). out_valid repeats
// in_valid LATENCY clocks later. The filter state advances every clock: the
// input is treated as a continuous stream (an ADC that never pauses), and
// in_valid is only carried along to mark which output blocks come from
// real samples. Reset (synchronous, active low) clears all state, so the
// first outputs are those of a stream preceded by zeros.
//
// The structure (L MISO copies fed by z^-l delayed input buses) and the
// 5-input 5-output configuration follow the parallel design; the tap count
// (4 taps per polyphase branch, one DSP slice chain of four), sample and
// coefficient widths, the valid tag and the reset are this design's
// choices. Coefficients are static inputs and must be held during use.
module milo
  import pfir_pkg::*;
#(
  parameter int          M      = 5,
  parameter int          L      = 5,
  parameter int          NTAPS  = 20,
  parameter int          DATA_W = 16,
  parameter int          COEF_W = 18,
  parameter fir_struct_e STRUCT = FIR_SYSTOLIC,
  parameter int          OUT_W  = DSP_P_W + $clog2(M)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_in  [M],      // x_in[k] = x(n - k)
  input  logic signed [COEF_W-1:0] coef  [NTAPS],  // h(0) .. h(NTAPS-1)
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y_out [L]       // y_out[l] = y(n - l)
);

  localparam int HIST_BLOCKS = 1 + (L - 1 + M - 1) / M;
  localparam int WIN         = HIST_BLOCKS * M;
  localparam int LATENCY     = fir_latency(STRUCT, NTAPS / M) + 2;

  initial begin
    assert (M >= 1 && L >= 1 && NTAPS % M == 0)
      else $fatal(1, "milo: NTAPS must be a multiple of M");
  end

  // Input blocks: blk_q[0] is the newest registered block, blk_q[b] the one
  // b clocks older. win[j] = x(n - j) for the newest registered sample n.
  logic signed [DATA_W-1:0] blk_q [HIST_BLOCKS][M];
  logic signed [DATA_W-1:0] win   [WIN];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < HIST_BLOCKS; b++)
        for (int k = 0; k < M; k++) blk_q[b][k] <= '0;
    end else begin
      blk_q[0] <= x_in;
      for (int b = 1; b < HIST_BLOCKS; b++) blk_q[b] <= blk_q[b-1];
    end
  end

  always_comb begin
    for (int b = 0; b < HIST_BLOCKS; b++)
      for (int k = 0; k < M; k++) win[b*M + k] = blk_q[b][k];
  end

  // Output l: the input bus delayed by l samples, into its own MISO.
  for (genvar l = 0; l < L; l++) begin : g_out
    logic signed [DATA_W-1:0] xl [M];
    for (genvar k = 0; k < M; k++) begin : g_lane
      assign xl[k] = win[l + k];
    end
    miso #(
      .M (M), .NTAPS (NTAPS), .DATA_W (DATA_W), .COEF_W (COEF_W),
      .STRUCT (STRUCT), .OUT_W (OUT_W)
    ) u_miso (
      .clk (clk), .rst_n (rst_n), .x (xl), .coef (coef), .y (y_out[l])
    );
  end

  // Valid tag, delayed to line up with the outputs.
  logic [LATENCY-1:0] vld_q;

  always_ff @(posedge clk) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[LATENCY-2:0], in_valid};
  end

  assign out_valid = vld_q[LATENCY-1];

endmodule
