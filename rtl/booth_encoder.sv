// booth_encoder: radix-4 Booth recoding of one overlapping 3-bit group
// {y[2i+1], y[2i], y[2i-1]} of the multiplier into a digit in {-2,-1,0,+1,+2}.
//
//   group 000, 111 -> 0      001, 010 -> +1      011 -> +2
//   group 100      -> -2     101, 110 -> -1
//
// Outputs are one-hot magnitude selects (one: |digit| = 1, two: |digit| = 2)
// and neg, the group's top bit. For group 111 neg is 1 with a zero magnitude;
// the inverted zero plus the negation bit is again zero, so the product stays
// exact. Combinational.
module booth_encoder (
  input  logic [2:0] grp,
  output logic       one,
  output logic       two,
  output logic       neg
);
  assign one = grp[1] ^ grp[0];
  assign two = (grp == 3'b011) || (grp == 3'b100);
  assign neg = grp[2];
endmodule
