// dac_cal_pkg: shared constants and helpers for the multibit DAC error
// estimation and correction path.
//
// Number formats used by the path (all two's complement):
//   * y, y', z      : ADC output in units of one DAC unit element, FY fractional bits.
//   * n, n-hat', n'': element deviation sequences scaled by M, i.e. the integer
//                     M*b_i - sum(b) and filtered versions of it (no fractional bits).
//   * e-hat         : element error estimate in unit-element units with FY+EF
//                     fractional bits.
// M = 32 unit elements (33 DAC levels) follows the document's simulation set-up;
// FY, EF and the word widths are this design's own choices.
package dac_cal_pkg;
  localparam int unsigned M_ELEM  = 32;  // unit elements of the first-stage DAC
  localparam int unsigned FY      = 16;  // fractional bits of y
  localparam int unsigned EF      = 8;   // extra fractional bits of e-hat over y
  localparam int unsigned Y_W     = 24;  // width of y and z
  localparam int unsigned N2_W    = 12;  // second-stage ADC code width
  localparam int unsigned E_W     = 24;  // width of one stored error estimate

endpackage
