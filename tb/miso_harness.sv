// miso_harness: drives one miso with a random stream, M samples per clock
// (lane k carries x(n - k), n advancing by M every clock), and compares its
// output with y(n) = sum_i coef[i] x(n - i) from a direct-form FIR computed
// here. The expected latency is the sub-filter's (NTAPS/M + 2 clocks
// systolic, 3 transposed) plus one clock for the summing register.
module miso_harness
  import pfir_pkg::*;
#(
  parameter int          M      = 5,
  parameter int          NTAPS  = 20,
  parameter fir_struct_e STRUCT = FIR_SYSTOLIC,
  parameter int          NBLK   = 100
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int DATA_W  = 16, COEF_W = 18, OUT_W = DSP_P_W + $clog2(M);
  localparam int EXP_LAT = ((STRUCT == FIR_SYSTOLIC) ? NTAPS / M + 2 : 3) + 1;

  logic                     rst_n;
  logic signed [DATA_W-1:0] x    [M];
  logic signed [COEF_W-1:0] coef [NTAPS];
  logic signed [OUT_W-1:0]  y;

  miso #(.M(M), .NTAPS(NTAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .STRUCT(STRUCT)) dut (.*);

  longint xs [M*(NBLK + EXP_LAT)];

  function automatic longint ref_y(int s);
    longint acc = 0;
    for (int i = 0; i < NTAPS; i++)
      if (s - i >= 0) acc += longint'(coef[i]) * xs[s - i];
    return acc;
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0;
    rst_n = 0;
    foreach (x[k]) x[k] = '0;
    foreach (coef[i]) coef[i] = COEF_W'($urandom);
    for (int s = 0; s < M*(NBLK + EXP_LAT); s++)
      xs[s] = (s >= M*NBLK) ? 0 : longint'($signed(DATA_W'($urandom)));
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < NBLK + EXP_LAT; t++) begin
      automatic int tb = t - EXP_LAT + 1;
      for (int k = 0; k < M; k++) x[k] = DATA_W'(xs[M*t + M-1-k]);
      @(posedge clk); #1;
      checks++;
      if (longint'(y) != ((tb >= 0) ? ref_y(M*tb + M-1) : 64'sd0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL M=%0d S=%0d t=%0d got=%0d exp=%0d", M, STRUCT, t, longint'(y),
                   (tb >= 0) ? ref_y(M*tb + M-1) : 64'sd0);
      end
    end
    done = 1;
  end
endmodule
