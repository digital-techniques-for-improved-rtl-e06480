// dac_correct: subtracts the estimated DAC error from the ADC output.
//
// Implements eq. (15):  z(k) = y(k) - sum_i n-hat'_i(k) * e-hat_i.
// n-hat'_i is carried scaled by M and e-hat_i has EF fractional bits more than
// y, so the sum of products is shifted right by log2(M) + EF with rounding to
// nearest before the subtraction. The product and subtraction follow the
// document; the fixed-point alignment and the saturation of z to Z_W bits are
// this design's choice.
//
// Timing: combinational.
module dac_correct #(
  parameter int unsigned M    = 32,
  parameter int unsigned Y_W  = 24,
  parameter int unsigned NE_W = 10,   // width of n-hat'_i
  parameter int unsigned E_W  = 24,
  parameter int unsigned EF   = 8,
  parameter int unsigned Z_W  = 24
) (
  input  logic signed [Y_W-1:0]  y,
  input  logic signed [NE_W-1:0] n_e [M],
  input  logic signed [E_W-1:0]  e_hat [M],
  output logic signed [Z_W-1:0]  z
);
  localparam int unsigned SH  = $clog2(M) + EF;
  localparam int unsigned S_W = NE_W + E_W + $clog2(M) + 1;

  localparam logic signed [S_W:0] ZMAX = (S_W+1)'(2 ** (Z_W - 1) - 1);
  localparam logic signed [S_W:0] ZMIN = -ZMAX - 1;

  logic signed [S_W-1:0] sum, corr_v;
  logic signed [S_W:0]   zf;

  always_comb begin
    sum = '0;
    for (int i = 0; i < M; i++) sum += S_W'(n_e[i]) * S_W'(e_hat[i]);
    corr_v = (sum + (S_W'(1) <<< (SH - 1))) >>> SH;
    zf     = (S_W+1)'(y) - (S_W+1)'(corr_v);
    if (zf > ZMAX)      z = ZMAX[Z_W-1:0];
    else if (zf < ZMIN) z = ZMIN[Z_W-1:0];
    else                z = zf[Z_W-1:0];
  end
endmodule
