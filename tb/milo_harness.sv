// milo_harness: drives one milo instance with a random sample stream and
// checks every output against a direct-form FIR reference computed here.
//
// The stream is NBLK blocks of M samples; sample s of the stream sits in
// block s / M, lane M-1 - (s % M) (lane 0 newest). The reference is
//   y(s) = sum_i coef[i] * x(s - i),  x(s < 0) = 0,
// and y_out[l] of the block whose newest sample is n must equal y(n - l)
// exactly EXP_LAT clocks after that block was presented, where EXP_LAT is
// worked out from the register counts: input register, sub-filter
// (NTAPS/M + 2 systolic, 3 transposed) and the summing register.
// in_valid is dropped for a few blocks to check that out_valid follows it.
// Counted mechanisms: outputs whose input window reaches into an earlier
// block (cross), into two or more blocks back (deep), valid gaps seen at
// the output (gap), and full-scale inputs (extreme).
module milo_harness
  import pfir_pkg::*;
#(
  parameter int          M      = 5,
  parameter int          L      = 5,
  parameter int          NTAPS  = 20,
  parameter fir_struct_e STRUCT = FIR_SYSTOLIC,
  parameter int          NBLK   = 64
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_cross,
  output int   n_deep,
  output int   n_gap,
  output int   n_extreme
);
  localparam int DATA_W  = 16;
  localparam int COEF_W  = 18;
  localparam int OUT_W   = DSP_P_W + $clog2(M);
  localparam int EXP_LAT = 1 + ((STRUCT == FIR_SYSTOLIC) ? NTAPS / M + 2 : 3) + 1;

  logic                     rst_n;
  logic                     in_valid;
  logic signed [DATA_W-1:0] x_in  [M];
  logic signed [COEF_W-1:0] coef  [NTAPS];
  logic                     out_valid;
  logic signed [OUT_W-1:0]  y_out [L];

  milo #(
    .M (M), .L (L), .NTAPS (NTAPS), .DATA_W (DATA_W), .COEF_W (COEF_W),
    .STRUCT (STRUCT)
  ) dut (.*);

  longint xs [M*NBLK];
  bit     vin [NBLK];

  function automatic longint ref_y(int s);
    longint acc = 0;
    for (int i = 0; i < NTAPS; i++)
      if (s - i >= 0) acc += longint'(coef[i]) * xs[s - i];
    return acc;
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0;
    n_cross = 0; n_deep = 0; n_gap = 0; n_extreme = 0;
    rst_n = 0; in_valid = 0;
    foreach (x_in[k]) x_in[k] = '0;
    foreach (coef[i]) coef[i] = COEF_W'($urandom);
    coef[0] = -(1 <<< (COEF_W-1));                  // full-scale coefficient
    for (int s = 0; s < M*NBLK; s++) begin
      xs[s] = longint'($signed(DATA_W'($urandom)));
      if (s % 37 == 5) begin xs[s] = -(1 <<< (DATA_W-1)); n_extreme++; end
    end
    for (int t = 0; t < NBLK; t++) vin[t] = !(t % 11 == 7 || t % 11 == 8);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < NBLK + EXP_LAT + 2; t++) begin
      in_valid = (t < NBLK) ? vin[t] : 1'b0;
      for (int k = 0; k < M; k++)
        x_in[k] = (t < NBLK) ? DATA_W'(xs[M*t + M-1-k]) : '0;
      @(posedge clk); #1;
      begin
        automatic int tb = t - EXP_LAT + 1;   // block whose result is visible now
        checks++;
        if (out_valid !== ((tb >= 0 && tb < NBLK) ? vin[tb] : 1'b0)) begin
          failures++;
          $display("FAIL M=%0d L=%0d S=%0d t=%0d out_valid=%0b", M, L, STRUCT, t, out_valid);
        end
        if (tb >= 0 && tb < NBLK && !vin[tb]) n_gap++;
        if (tb >= 0 && tb < NBLK) begin
          automatic int n = M*tb + M-1;
          for (int l = 0; l < L; l++) begin
            automatic longint exp_y = ref_y(n - l);
            checks++;
            if (longint'(y_out[l]) != exp_y) begin
              failures++;
              if (failures < 10)
                $display("FAIL M=%0d L=%0d S=%0d block=%0d lane=%0d got=%0d exp=%0d",
                         M, L, STRUCT, tb, l, longint'(y_out[l]), exp_y);
            end
            if (tb > 0 && l + M - 1 >= M) n_cross++;
            if (tb > 1 && l + M - 1 >= 2*M) n_deep++;
          end
        end
      end
    end
    done = 1;
  end
endmodule
