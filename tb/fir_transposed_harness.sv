// fir_transposed_harness: drives one fir_transposed of TAPS taps with random samples
// and coefficients and compares every output with a direct-form FIR
// computed here, delayed by the expected latency of 3 clocks (B, M and P registers) whatever the tap count.
module fir_transposed_harness #(
  parameter int TAPS = 4,
  parameter int N    = 300
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int DATA_W = 16, COEF_W = 18, EXP_LAT = 3;

  logic                     rst_n;
  logic signed [DATA_W-1:0] x;
  logic signed [COEF_W-1:0] coef [TAPS];
  logic signed [47:0]       y;

  fir_transposed #(.TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W)) dut (.*);

  longint xs [N + EXP_LAT];

  function automatic longint ref_y(int s);
    longint acc = 0;
    for (int i = 0; i < TAPS; i++)
      if (s - i >= 0) acc += longint'(coef[i]) * xs[s - i];
    return acc;
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0;
    rst_n = 0; x = '0;
    foreach (coef[i]) coef[i] = COEF_W'($urandom);
    for (int s = 0; s < N + EXP_LAT; s++) xs[s] = (s >= N) ? 0 : longint'($signed(DATA_W'($urandom)));
    xs[N/2] = -(64'sd1 <<< (DATA_W-1));
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < N + EXP_LAT; t++) begin
      automatic int s = t - EXP_LAT + 1;
      x = (t < N) ? DATA_W'(xs[t]) : '0;
      @(posedge clk); #1;
      checks++;
      if (longint'(y) != ((s >= 0) ? ref_y(s) : 64'sd0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL TAPS=%0d t=%0d got=%0d exp=%0d", TAPS, t, longint'(y),
                   (s >= 0) ? ref_y(s) : 64'sd0);
      end
    end
    done = 1;
  end
endmodule
