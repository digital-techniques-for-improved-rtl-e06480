// aqnc_top: adaptive correction of the first-stage noise leakage of a 2-0 MASH
// ADC, using test-signal injection and the SS-BLMS algorithm.
//
// Analog errors of the first-stage integrators (finite op-amp gain, capacitor
// mismatch) let part of the first-stage quantization error leak to the MASH
// output v_m. A pseudo-random test signal ts is added at the first-stage
// quantizer, so it travels the same leakage path and also appears in the
// correction input v_c. The filter L_C(z) adds v_l = L_C(z) v_c to the output,
//   v_r = v_m + v_l,
// and the correlator adjusts the six coefficients once per K samples so that
// the test-signal content of v_r, and with it the leakage, is driven to zero.
// This runs in the background during normal conversion.
//
// Interface: ts is sent to the analog injection point; v_m and v_c are the
// uncorrected output and the correction input of the same sample, in codes of
// the second-stage ADC. v_r carries L_FRAC extra fractional bits. l exposes the
// coefficients, upd pulses after each coefficient update.
//
// From the document: the structure of the L_C(z) filter and its correlator and
// the once-per-block sign update. This design's choices: the output sum
// v_r = v_m + v_l (the sign is absorbed by the adapted coefficients, provided
// v_c carries +ts), the LFSR test signal, widths and K. TS_LAT delays the ts
// bit used by the correlator, to match the latency from the injection point
// to v_c in a given converter (0 = same sample).
module aqnc_top
  import aqnc_pkg::*;
#(
  parameter int unsigned VC_W   = 12,
  parameter int unsigned VM_W   = 16,
  parameter int unsigned L_W    = 16,
  parameter int unsigned L_FRAC = 14,
  parameter int unsigned K      = 256,
  parameter int unsigned TS_LAT = 0,
  parameter int unsigned VR_W   = VM_W + L_FRAC + 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [VM_W-1:0] v_m,
  input  logic signed [VC_W-1:0] v_c,
  output logic                   ts,
  output logic signed [VR_W-1:0] v_r,
  output logic signed [L_W-1:0]  l [NTAP],
  output logic                   upd
);
  localparam int unsigned VL_W = VC_W + L_W + $clog2(NTAP);

  logic signed [VL_W-1:0] v_l;
  sgn_t                   sgn [NTAP];
  logic                   ts_c;
  logic [TS_LAT:0]        ts_pipe;

  ts_gen u_ts (.clk(clk), .rst_n(rst_n), .en(en), .ts(ts));

  // ts_pipe[j] = ts delayed by j samples
  always_comb ts_pipe[0] = ts;
  for (genvar j = 1; j <= TS_LAT; j++) begin : g_lat
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  ts_pipe[j] <= 1'b0;
      else if (en) ts_pipe[j] <= ts_pipe[j-1];
    end
  end
  assign ts_c = ts_pipe[TS_LAT];

  lc_filter #(.NT(NTAP), .VC_W(VC_W), .L_W(L_W), .GAMMA(1), .VL_W(VL_W)) u_lc (
    .clk(clk), .rst_n(rst_n), .en(en), .v_c(v_c), .upd(upd), .sgn(sgn),
    .v_l(v_l), .l(l));

  assign v_r = (VR_W'(v_m) <<< L_FRAC) + VR_W'(v_l);

  ssblms_corr #(.NT(NTAP), .VR_W(VR_W), .K(K)) u_corr (
    .clk(clk), .rst_n(rst_n), .en(en), .v_r(v_r), .ts(ts_c), .upd(upd), .sgn(sgn));
endmodule
