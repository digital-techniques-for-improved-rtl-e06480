// dsm_dual_top: the two digital correction engines for delta-sigma ADCs, side
// by side.
//
//   * u_dac_cal (dac_cal_top): background estimation and correction of the
//     unit-element errors of the 33-level feedback DAC of a multibit MASH ADC.
//   * u_aqnc (aqnc_top): adaptive compensation of the first-stage quantization
//     noise leakage of a 2-0 MASH ADC, using an injected test signal and a
//     sign-sign block LMS update.
// The two serve different converters and share only the clock and reset; each
// has its own ports (prefix dc_ and lc_). All analog parts (modulator stages,
// quantizers, DAC, second-stage ADCs) are outside: their digital codes enter
// and the DAC selects and the test signal leave through these ports.
module dsm_dual_top
  import dac_cal_pkg::*;
  import aqnc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // DAC error calibration of the multibit MASH ADC
  input  logic                  dc_cal_en,
  input  logic                  dc_clear,
  input  logic [M_ELEM-1:0]     dc_d,
  input  logic signed [N2_W-1:0] dc_v2,
  output logic [M_ELEM-1:0]     dc_b,
  output logic signed [Y_W-1:0] dc_y,
  output logic signed [Y_W-1:0] dc_z,
  output logic signed [E_W-1:0] dc_e_hat [M_ELEM],
  // adaptive noise-leakage compensation of the 2-0 MASH ADC
  input  logic                  lc_en,
  input  logic signed [15:0]    lc_v_m,
  input  logic signed [11:0]    lc_v_c,
  output logic                  lc_ts,
  output logic signed [33:0]    lc_v_r,
  output logic signed [15:0]    lc_l [NTAP],
  output logic                  lc_upd
);
  dac_cal_top u_dac_cal (
    .clk(clk), .rst_n(rst_n), .cal_en(dc_cal_en), .clear(dc_clear),
    .d(dc_d), .v2(dc_v2), .b(dc_b), .y(dc_y), .z(dc_z), .e_hat(dc_e_hat));

  aqnc_top u_aqnc (
    .clk(clk), .rst_n(rst_n), .en(lc_en), .v_m(lc_v_m), .v_c(lc_v_c),
    .ts(lc_ts), .v_r(lc_v_r), .l(lc_l), .upd(lc_upd));
endmodule
