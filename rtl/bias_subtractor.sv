// bias_subtractor: second half of the product exponent. Both operand
// exponents carry the bias, so their sum carries it twice; subtracting the
// bias y once leaves the biased exponent of the product.
//
// x and y are EXP_W+1-bit unsigned values; s = x - y is formed as
// x + ~y + 1 over EXP_W+2 bits, a two's-complement result whose low EXP_W bits
// are the product exponent before normalisation (its top bits show an
// exponent underflow or overflow; the multiplier does not use them).
// The 9-bit inputs and 10-bit output with its low 8 bits used follow the
// algorithm; forming the difference as x + ~y + 1 is this design's choice.
// Combinational.
module bias_subtractor #(
  parameter int EXP_W = 8
) (
  input  logic [EXP_W:0]   x,  // sum of the operand exponents
  input  logic [EXP_W:0]   y,  // bias (127 for single precision)
  output logic [EXP_W+1:0] s   // x - y
);
  assign s = {1'b0, x} + {1'b1, ~y} + (EXP_W+2)'(1);
endmodule
