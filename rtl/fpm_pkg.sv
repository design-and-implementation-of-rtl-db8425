// fpm_pkg: formats and constants of the floating-point multiplier.
//
// The multiplier works on IEEE 754 single precision: bit 31 is the sign, bits
// 30..23 the biased exponent (bias 127) and bits 22..0 the fraction of a
// significand 1.M with a hidden leading 1. The value of a word is
// (-1)^S * 2^(E-127) * 1.M. Double precision (11-bit exponent, 52-bit
// fraction, bias 1023) is described by the same parameters.
package fpm_pkg;

  localparam int SP_EXP_W = 8;
  localparam int SP_MAN_W = 23;
  localparam int SP_BIAS  = 127;

  localparam int DP_EXP_W = 11;
  localparam int DP_MAN_W = 52;
  localparam int DP_BIAS  = 1023;

  // Field view of a single-precision word.
  typedef struct packed {
    logic                sign;
    logic [SP_EXP_W-1:0] exp;
    logic [SP_MAN_W-1:0] man;
  } float32_t;

endpackage
