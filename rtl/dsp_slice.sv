// dsp_slice: behaviour of one DSP48E2-style multiply-add slice, as used by
// the systolic and transposed FIR structures.
//
// Datapath: A (27 bit) optionally pre-added with D (27 bit), multiplied by B
// (18 bit), the 45-bit product added to the 48-bit cascade input PCIN, and the
// sum held in the P register. Registers, as drawn in the slice diagrams of
// the FIR mappings:
//   * A/D register (one stage) in front of the pre-adder,
//   * BREG stages (1 or 2) on B; BCOUT is the last of them, so a chain of
//     slices can pass the data sample along on the dedicated cascade,
//   * M register after the multiplier,
//   * P register after the post-adder; PCOUT = P.
// Latency: B -> P is BREG + 2 cycles, A/D -> P is 3 cycles, PCIN -> P is
// 1 cycle. All registers are cleared by a synchronous active-low reset and
// advance every clock (no clock enables are modelled).
//
// The pre-adder and the 27x18 / 48-bit sizes follow the DSP48E2 description;
// the post-adder only adds (P = M + PCIN): other ALU functions of the real
// slice are not modelled, since the FIR structures use none. Register
// counts on A/D, the reset style and the use_preadd control are this
// design's own choices.
module dsp_slice
  import pfir_pkg::*;
#(
  parameter int BREG = 1  // 1 or 2 B pipeline registers
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       use_preadd,  // 1: multiply (D + A), 0: multiply A
  input  logic signed [DSP_A_W-1:0]  a,
  input  logic signed [DSP_A_W-1:0]  d,
  input  logic signed [DSP_B_W-1:0]  b,
  input  logic signed [DSP_P_W-1:0]  pcin,
  output logic signed [DSP_B_W-1:0]  bcout,
  output logic signed [DSP_P_W-1:0]  p
);

  localparam int M_W = DSP_A_W + DSP_B_W;

  initial begin
    assert (BREG == 1 || BREG == 2) else $fatal(1, "dsp_slice: BREG must be 1 or 2");
  end

  logic signed [DSP_A_W-1:0] a_q, d_q;
  logic                      preadd_q;
  logic signed [DSP_B_W-1:0] b_q [BREG];
  logic signed [DSP_A_W-1:0] ad;
  logic signed [M_W-1:0]     m_q;

  // The pre-adder result is kept at 27 bits, as in the slice it models.
  always_comb ad = preadd_q ? DSP_A_W'(d_q + a_q) : a_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q      <= '0;
      d_q      <= '0;
      preadd_q <= 1'b0;
      for (int i = 0; i < BREG; i++) b_q[i] <= '0;
      m_q      <= '0;
      p        <= '0;
    end else begin
      a_q      <= a;
      d_q      <= d;
      preadd_q <= use_preadd;
      b_q[0]   <= b;
      for (int i = 1; i < BREG; i++) b_q[i] <= b_q[i-1];
      m_q      <= ad * b_q[BREG-1];
      p        <= DSP_P_W'(m_q) + pcin;
    end
  end

  assign bcout = b_q[BREG-1];

endmodule
