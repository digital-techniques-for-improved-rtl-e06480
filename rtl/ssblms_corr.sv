// ssblms_corr: block correlator of the sign-sign block LMS update (SS-BLMS).
//
// For each tap i an accumulator sums v_r(k) * (-ts(k-i)) over a block of K
// samples. Because ts is +-1 the product is an addition or a subtraction of
// v_r, selected by the delayed test-signal bit; no multiplier is needed. At the
// end of each block the sign of every sum is handed to the coefficient counters
// of L_C(z) with a one-cycle upd pulse and the accumulators restart.
//
// From the document: the -ts delay line matching the L_C(z) delay line, the
// +-v_r selection, the accumulators, the sgn() outputs and the update once per
// K samples. This design's choices: K = 256 (the document leaves the block
// length open), two's-complement accumulators wide enough for a full block,
// and the sign convention ts = 1 meaning +1.
//
// Timing: sample k is accumulated at the clock edge where en=1. After the K-th
// sample of a block, sgn and upd are registered and valid for one clock.
module ssblms_corr
  import aqnc_pkg::*;
#(
  parameter int unsigned NT    = NTAP,
  parameter int unsigned VR_W  = 32,
  parameter int unsigned K     = 256,
  parameter int unsigned ACC_W = VR_W + $clog2(K) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [VR_W-1:0] v_r,
  input  logic                   ts,
  output logic                   upd,
  output sgn_t                   sgn [NT]
);
  logic                     tsd [NT];   // tsd[i] = ts(k-i)
  logic signed [ACC_W-1:0]  acc [NT];
  logic [$clog2(K)-1:0]     cnt;
  logic                     last;

  always_comb tsd[0] = ts;
  assign last = (cnt == ($clog2(K))'(K-1));

  // block sum including the current sample; -ts(k-i) = +1 when ts(k-i) = 0
  logic signed [ACC_W-1:0] s [NT];
  always_comb
    for (int i = 0; i < NT; i++)
      s[i] = tsd[i] ? acc[i] - ACC_W'(v_r) : acc[i] + ACC_W'(v_r);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < NT; i++) tsd[i] <= 1'b0;
      for (int i = 0; i < NT; i++) begin
        acc[i] <= '0;
        sgn[i] <= SGN_ZERO;
      end
      cnt <= '0;
      upd <= 1'b0;
    end else begin
      upd <= 1'b0;
      if (en) begin
        for (int i = 1; i < NT; i++) tsd[i] <= tsd[i-1];
        cnt <= last ? '0 : cnt + 1'b1;
        for (int i = 0; i < NT; i++) begin
          if (last) begin
            acc[i] <= '0;
            sgn[i] <= (s[i] == '0) ? SGN_ZERO : (s[i] < 0 ? SGN_NEG : SGN_POS);
          end else begin
            acc[i] <= s[i];
          end
        end
        upd <= last;
      end
    end
  end

  // An update is a single-clock pulse (blocks are at least two samples long).
  if (K > 1) begin : g_chk
    a_upd_pulse: assert property (@(posedge clk) upd |=> !upd);
  end
endmodule
