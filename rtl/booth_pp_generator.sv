// booth_pp_generator: radix-4 Booth partial-product generation for an unsigned
// N x N multiplication.
//
// The multiplier y gets a 0 appended below its LSB and two 0s above its MSB;
// groups of three bits overlapping by one, taken from the LSB, are recoded by
// booth_encoder into digits in {-2..+2}. Row i is the multiplicand x times
// digit i, weighted by 4^i: N/2+1 rows instead of the N rows of a plain
// array multiplier (13 rows for N = 24).
//
// The rows are laid out as a bit matrix for the Dadda tree (the layout is in
// booth_dadda_pkg): a negative row is written as the inverted magnitude plus a
// 1 in its LSB column, collected in a separate row of negation bits, and sign
// extension is replaced by inverted sign bits plus one constant row. The
// recoding table, the negation bits and the sign-extension constant are the
// usual radix-4 choices; the padding of the multiplier follows the
// multiplication algorithm this design implements. Combinational.
//
// Ports: x, y are N-bit unsigned operands; rows[r] is row r of the matrix,
// 2N bits wide; a column bit that is not part of the matrix is 0.
module booth_pp_generator
  import booth_dadda_pkg::*;
#(
  parameter int N = 24
) (
  input  logic [N-1:0]                      x,
  input  logic [N-1:0]                      y,
  output logic [mat_rows(N)-1:0][2*N-1:0]   rows
);
  localparam int NPP = pp_count(N);
  localparam int P   = 2 * N;
  localparam logic [MAXP-1:0] KROW = const_row(N);

  // Multiplier with the appended 0 below the LSB and zero padding above the MSB.
  logic [2*NPP:0] ypad;
  assign ypad = {{(2*NPP-N){1'b0}}, y, 1'b0};

  logic [NPP-1:0] neg;

  for (genvar i = 0; i < NPP; i++) begin : g_row
    logic         one, two;
    logic [N:0]   mag;     // |digit| * x
    logic [N+3:0] ext;     // row bits from column 2i upwards

    booth_encoder u_enc (
      .grp (ypad[2*i+2:2*i]),
      .one (one),
      .two (two),
      .neg (neg[i])
    );

    assign mag = two ? {x, 1'b0} : (one ? {1'b0, x} : '0);

    if (i < NPP - 1) begin : g_signed
      // One's complement of mag when negative; f[N+1] is the row's sign.
      logic [N+1:0] f;
      assign f = {1'b0, mag} ^ {(N+2){neg[i]}};
      if (i == 0) begin : g_first
        assign ext = {~f[N+1], f[N+1], f[N+1], f[N:0]};
      end else begin : g_mid
        assign ext = {2'b00, ~f[N+1], f[N:0]};
      end
    end else begin : g_last
      // The top group's MSB is padding, so this row is never negative.
      assign ext = {3'b000, mag};
    end

    // Place the row at column 2i, dropping what lies beyond the product width.
    assign rows[i] = P'({{P{1'b0}}, ext} << (2 * i));
  end

  // Negation bits: the "+1" of each negative row's two's complement.
  always_comb begin
    rows[NPP] = '0;
    for (int i = 0; i < NPP - 1; i++) rows[NPP][2*i] = neg[i];
  end

  assign rows[NPP+1] = KROW[P-1:0];

endmodule
