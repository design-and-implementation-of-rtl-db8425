// normalizer: brings the significand product back to the form 1.M.
//
// The product of two significands in [1, 2) lies in [1, 4), so the
// 2*(MAN_W+1)-bit product has its leading 1 in one of its two top bits.
// With the top bit set the binary point moves one place left: the mantissa is
// prod[2*MAN_W:MAN_W+1], the first dropped bit is prod[MAN_W] and the exponent
// is incremented. Otherwise the mantissa is prod[2*MAN_W-1:MAN_W], the first
// dropped bit prod[MAN_W-1] and the exponent is unchanged. For single precision
// that is bits 46..24 with bit 23, or bits 45..23 with bit 22. The leading 1
// itself is the hidden bit and is not kept. The bit selection follows the
// multiplication algorithm. Combinational.
module normalizer #(
  parameter int EXP_W = 8,
  parameter int MAN_W = 23
) (
  input  logic [2*MAN_W+1:0] prod,       // significand product
  input  logic [EXP_W-1:0]   exp_in,     // exponent after bias subtraction
  output logic [MAN_W-1:0]   man,        // mantissa before rounding
  output logic               round_bit,  // first bit below the mantissa
  output logic [EXP_W-1:0]   exp_out     // exponent of the normalised product
);
  always_comb begin
    if (prod[2*MAN_W+1]) begin
      man       = prod[2*MAN_W:MAN_W+1];
      round_bit = prod[MAN_W];
      exp_out   = exp_in + EXP_W'(1);
    end else begin
      man       = prod[2*MAN_W-1:MAN_W];
      round_bit = prod[MAN_W-1];
      exp_out   = exp_in;
    end
  end
endmodule
