// mash_ncl: digital noise-cancellation logic of the 2-0 MASH ADC.
//
// Combines the two stage outputs as drawn in the block diagram of the
// calibrated converter:
//   y(k) = v1(k-1) + (1/16) * (1 - z^-1)^2 v2(k)
// v1 is the first-stage level (number of ones of the thermometer word, 0..M),
// v2 the signed second-stage ADC code. The z^-1 on the first-stage path, the
// 1/16 gain and the (1 - z^-1)^2 on the second-stage path are taken from that
// diagram. This design's own reading: the second-stage ADC digitises
// 16 * (-e1) with a full scale of +-8 unit elements, so one code is
// 2^(4-N2) unit elements before the 1/16 gain and 2^-N2 after it; it is also
// taken to deliver its code one clock late, which the z^-1 on v1 matches.
//
// Output format: FY fractional bits (FY >= N2). Timing: y is combinational in
// v2(k); v1(k-1), v2(k-1) and v2(k-2) are registers that advance when en=1.
module mash_ncl #(
  parameter int unsigned M   = 32,
  parameter int unsigned N2  = 12,
  parameter int unsigned FY  = 16,
  parameter int unsigned Y_W = 24
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic [$clog2(M+1)-1:0] v1,
  input  logic signed [N2-1:0]   v2,
  output logic signed [Y_W-1:0]  y
);
  logic [$clog2(M+1)-1:0] v1_q;
  logic signed [N2-1:0]   v2_q, v2_qq;
  logic signed [N2+2:0]   d2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q  <= '0;
      v2_q  <= '0;
      v2_qq <= '0;
    end else if (en) begin
      v1_q  <= v1;
      v2_q  <= v2;
      v2_qq <= v2_q;
    end
  end

  always_comb begin
    d2 = (N2+3)'(v2) - ((N2+3)'(v2_q) <<< 1) + (N2+3)'(v2_qq);
    y  = (Y_W'(v1_q) <<< FY) + (Y_W'(d2) <<< (FY - N2));
  end
endmodule
