// rounder: rounds the normalised mantissa by adding the first dropped bit to
// it (round to nearest, ties away from zero in magnitude).
//
// If the mantissa is all ones and the round bit is 1 the significand becomes
// 10.000...; the mantissa then wraps to zero and the exponent is incremented,
// which keeps the result normalised. That renormalisation is this design's
// choice. Combinational.
module rounder #(
  parameter int EXP_W = 8,
  parameter int MAN_W = 23
) (
  input  logic [MAN_W-1:0] man_in,     // mantissa before rounding
  input  logic             round_bit,  // bit added to the mantissa LSB
  input  logic [EXP_W-1:0] exp_in,     // normalised exponent
  output logic [MAN_W-1:0] man_out,    // rounded mantissa
  output logic [EXP_W-1:0] exp_out     // exponent after rounding
);
  logic carry;

  assign {carry, man_out} = {1'b0, man_in} + (MAN_W+1)'(round_bit);
  assign exp_out          = exp_in + EXP_W'(carry);
endmodule
