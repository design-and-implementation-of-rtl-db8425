// exponent_adder: first half of the product exponent, the sum of the two
// biased operand exponents. The EXP_W+1-bit result keeps the carry, so the
// sum is exact (9 bits for single precision), matching the algorithm's
// 8 + 8 -> 9-bit exponent adder. Combinational.
module exponent_adder #(
  parameter int EXP_W = 8
) (
  input  logic [EXP_W-1:0] x,  // exponent of the multiplicand
  input  logic [EXP_W-1:0] y,  // exponent of the multiplier
  output logic [EXP_W:0]   s   // x + y
);
  assign s = {1'b0, x} + {1'b0, y};
endmodule
