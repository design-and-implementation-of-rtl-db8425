// carry_select_adder: W-bit carry-select adder, the final adder of the
// Booth-Dadda multiplier.
//
// The operands are cut into blocks of BLK bits (the top block takes what is
// left). The lowest block adds with the real carry-in. Every other block is
// computed twice, once for carry-in 0 and once for carry-in 1, at the same
// time; the carry out of the block below then only selects one of the two
// results, so the carry passes each block through a multiplexer instead of a
// chain of adders. The block size is this design's choice. Combinational.
//
// Ports: s = (a + b + cin) mod 2^W, cout is the carry out of bit W-1.
module carry_select_adder #(
  parameter int W   = 48,
  parameter int BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int NB = (W + BLK - 1) / BLK;

  logic [NB:0] c;  // c[j] is the carry into block j
  assign c[0] = cin;

  for (genvar j = 0; j < NB; j++) begin : g_blk
    localparam int LO = j * BLK;
    localparam int BW = (LO + BLK <= W) ? BLK : W - LO;

    if (j == 0) begin : g_first
      assign {c[1], s[BW-1:0]} = {1'b0, a[BW-1:0]} + {1'b0, b[BW-1:0]} + BW'(cin);
    end else begin : g_sel
      logic [BW:0] r0, r1;  // block result with carry-in 0 and with carry-in 1
      assign r0 = {1'b0, a[LO+BW-1:LO]} + {1'b0, b[LO+BW-1:LO]};
      assign r1 = {1'b0, a[LO+BW-1:LO]} + {1'b0, b[LO+BW-1:LO]} + (BW+1)'(1);
      assign {c[j+1], s[LO+BW-1:LO]} = c[j] ? r1 : r0;
    end
  end

  assign cout = c[NB];

endmodule
