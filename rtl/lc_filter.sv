// lc_filter: adaptive compensation filter L_C(z).
//
// A transversal filter on the correction input v_c,
//   v_l(k) = sum_i l_i * v_c(k-i),  i = 0 .. NTAP-1,
// whose coefficients l_i are up/down counters. When upd is high each l_i moves
// by +-GAMMA according to the sign delivered by the correlator (no move for a
// zero sign). With GAMMA equal to one coefficient LSB every update is a plain
// count, as the document recommends. The coefficients saturate at the limits
// of their L_W-bit range.
//
// From the document: six taps l_0..l_5 with a delay line, the gamma steps and
// the summation node of its hardware figure. This design's choices: L_W = 16
// bit coefficients with L_FRAC = 14 fractional bits (range about +-2), reset
// of all coefficients to zero, and a full-precision output (L_FRAC fractional
// bits relative to v_c).
//
// Timing: v_l is combinational in v_c(k); the delay line and the coefficients
// are registers, the delay line advancing when en=1.
module lc_filter
  import aqnc_pkg::*;
#(
  parameter int unsigned NT     = NTAP,
  parameter int unsigned VC_W   = 12,
  parameter int unsigned L_W    = 16,
  parameter int unsigned GAMMA  = 1,
  parameter int unsigned VL_W   = VC_W + L_W + $clog2(NTAP)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [VC_W-1:0] v_c,
  input  logic                   upd,
  input  sgn_t                   sgn [NT],
  output logic signed [VL_W-1:0] v_l,
  output logic signed [L_W-1:0]  l [NT]
);
  localparam logic signed [L_W:0] LMAX = (L_W+1)'({1'b0, {(L_W-1){1'b1}}});
  localparam logic signed [L_W:0] LMIN = -LMAX - 1;

  logic signed [VC_W-1:0] dl [NT];   // dl[i] = v_c(k-i); dl[0] is the input

  always_comb dl[0] = v_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < NT; i++) dl[i] <= '0;
    end else if (en) begin
      for (int i = 1; i < NT; i++) dl[i] <= dl[i-1];
    end
  end

  logic signed [L_W:0]   nx   [NT];
  logic signed [L_W-1:0] l_nx [NT];

  always_comb begin
    for (int i = 0; i < NT; i++) begin
      unique case (sgn[i])
        SGN_POS: nx[i] = (L_W+1)'(l[i]) + (L_W+1)'(GAMMA);
        SGN_NEG: nx[i] = (L_W+1)'(l[i]) - (L_W+1)'(GAMMA);
        default: nx[i] = (L_W+1)'(l[i]);
      endcase
      if (nx[i] > LMAX)      l_nx[i] = LMAX[L_W-1:0];
      else if (nx[i] < LMIN) l_nx[i] = LMIN[L_W-1:0];
      else                   l_nx[i] = nx[i][L_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NT; i++) l[i] <= '0;
    end else if (upd) begin
      for (int i = 0; i < NT; i++) l[i] <= l_nx[i];
    end
  end

  always_comb begin
    v_l = '0;
    for (int i = 0; i < NT; i++) v_l += VL_W'(l[i]) * VL_W'(dl[i]);
  end
endmodule
