// etf_filter: digital emulation of the DAC error transfer function (ETF-hat).
//
// Each of the M element deviation sequences n_i(k) is filtered by the same FIR
//   n-hat'_i(k) = sum_j C[j] * n_i(k-j),  j = 0 .. NT-1,
// which must reproduce how an error injected by the feedback DAC in sample k
// reaches the ADC output y, including the delays of the digital path. The
// document only says that this filter emulates the ETF; its taps depend on the
// modulator. The default taps {0, 0, -2, 1} fit a second-order feed-forward
// first stage with NTF = (1 - z^-1)^2 and unity STF, whose DAC error transfer is
// -(2 z^-1 - z^-2), followed by the one-sample delay of the noise-cancellation
// logic. An overall sign or gain error of the taps is harmless: it scales the
// correlator result by the inverse amount and the correction product is
// unchanged.
//
// Timing: the output is combinational in the current input n_i(k); the NT-1
// previous inputs are held in registers that advance when en=1.
module etf_filter #(
  parameter int unsigned M     = 32,
  parameter int unsigned IN_W  = 7,
  parameter int unsigned NT    = 4,
  parameter int          C [NT] = '{0, 0, -2, 1},
  parameter int unsigned OUT_W = IN_W + 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  n_in  [M],
  output logic signed [OUT_W-1:0] n_out [M]
);
  // hist[j] holds n(k-1-j)
  logic signed [IN_W-1:0] hist [NT-1][M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NT-1; j++)
        for (int i = 0; i < M; i++) hist[j][i] <= '0;
    end else if (en) begin
      for (int i = 0; i < M; i++) hist[0][i] <= n_in[i];
      for (int j = 1; j < NT-1; j++)
        for (int i = 0; i < M; i++) hist[j][i] <= hist[j-1][i];
    end
  end

  always_comb begin
    for (int i = 0; i < M; i++) begin
      logic signed [OUT_W-1:0] acc;
      acc = OUT_W'(C[0]) * OUT_W'(n_in[i]);
      for (int j = 1; j < NT; j++)
        acc += OUT_W'(C[j]) * OUT_W'(hist[j-1][i]);
      n_out[i] = acc;
    end
  end
endmodule
