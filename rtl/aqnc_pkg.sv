// aqnc_pkg: shared types of the adaptive noise-leakage compensator.
//
// The block-sign update of the compensation coefficients needs a three-valued
// sign: sgn(x) is -1, 0 or +1. It is carried as an enum so that the correlator
// and the filter agree on its encoding.
package aqnc_pkg;
  typedef enum logic [1:0] {
    SGN_ZERO = 2'b00,
    SGN_POS  = 2'b01,
    SGN_NEG  = 2'b11
  } sgn_t;

  localparam int unsigned NTAP = 6;   // taps l_0 .. l_5 of L_C(z)
endpackage
