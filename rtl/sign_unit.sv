// sign_unit: sign of a floating-point product, the XOR of the operand signs
// (equal signs give a positive product), as the multiplication algorithm
// prescribes. Combinational.
module sign_unit (
  input  logic a,  // sign of the multiplicand
  input  logic b,  // sign of the multiplier
  output logic s   // sign of the product
);
  assign s = a ^ b;
endmodule
