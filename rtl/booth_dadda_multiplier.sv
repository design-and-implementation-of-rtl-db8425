// booth_dadda_multiplier: unsigned N x N -> 2N multiplier built from a radix-4
// Booth partial-product generator, a Dadda reduction tree and a carry-select
// adder.
//
// Radix-4 Booth recoding halves the number of partial products (13 rows for
// N = 24 instead of 24), which shortens the reduction; the Dadda tree then
// reduces the rows with the fewest adders per stage (heights 9, 6, 4, 3, 2);
// the two remaining rows are added by the carry-select adder. In the
// floating-point multiplier the operands are the 24-bit significands 1.M.
// The split into these three stages follows the multiplier's published
// structure; the carry-select block size (CSA_BLK) is this design's choice.
// Combinational.
//
// Ports: p = in1 * in2.
module booth_dadda_multiplier
  import booth_dadda_pkg::*;
#(
  parameter int N       = 24,
  parameter int CSA_BLK = 4
) (
  input  logic [N-1:0]   in1,
  input  logic [N-1:0]   in2,
  output logic [2*N-1:0] p
);
  logic [mat_rows(N)-1:0][2*N-1:0] rows;
  logic [2*N-1:0]                  sum_row, carry_row;
  logic                            cout;  // dropped: the product is the sum modulo 2^(2N)

  booth_pp_generator #(.N(N)) u_pp (
    .x    (in1),
    .y    (in2),
    .rows (rows)
  );

  dadda_tree #(.N(N)) u_tree (
    .rows      (rows),
    .sum_row   (sum_row),
    .carry_row (carry_row)
  );

  carry_select_adder #(.W(2*N), .BLK(CSA_BLK)) u_csa (
    .a    (sum_row),
    .b    (carry_row),
    .cin  (1'b0),
    .s    (p),
    .cout (cout)
  );

endmodule
