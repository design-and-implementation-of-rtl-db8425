// dadda_tree: Dadda reduction of the radix-4 Booth partial-product matrix to
// two rows.
//
// The matrix (layout in booth_dadda_pkg) is turned into columns of bits. Each
// stage lowers every column to the next height of the Dadda sequence
// ..., 13, 9, 6, 4, 3, 2, using as few full and half adders as that takes:
// a column whose height plus the carries it receives from the column below
// exceeds the target by e gets floor(e/2) full adders and (e mod 2) half
// adders. For N = 24 the matrix is 13 high and the stages are 13->9->6->4->3->2.
// Sums stay in their column, carries move one column up into the next stage;
// carries out of the top column are dropped because the product fits in 2N
// bits. The adder counts and wiring are computed at elaboration from the
// matrix shape. Combinational.
//
// Ports: rows is the matrix from booth_pp_generator; sum_row + carry_row
// equals the product modulo 2^(2N).
module dadda_tree
  import booth_dadda_pkg::*;
#(
  parameter int N = 24
) (
  input  logic [mat_rows(N)-1:0][2*N-1:0] rows,
  output logic [2*N-1:0]                  sum_row,
  output logic [2*N-1:0]                  carry_row
);
  localparam int        P    = 2 * N;
  localparam int        NR   = mat_rows(N);
  localparam presence_t PR   = presence(N);
  localparam int        MH   = max_height(N, PR);
  localparam int        S    = num_stages(MH);
  localparam plan_tbl_t PLAN = dadda_plan(N, PR);
  localparam int        MAXH = (MH > 2) ? MH : 2;

  // g_lvl[s].v[c][k]: bit k of column c entering stage s; level S is the
  // two-row result. Level s > 0 holds the adders of stage s-1.
  for (genvar s = 0; s <= S; s++) begin : g_lvl
    logic [MAXH-1:0] v [P];

    if (s == 0) begin : g_init
      // Stack each column's matrix bits from row 0 up.
      for (genvar c = 0; c < P; c++) begin : g_col
        for (genvar r = 0; r < NR; r++) begin : g_row
          if (PR[r*MAXP+c]) begin : g_bit
            assign v[c][row_slot(PR, r, c)] = rows[r][c];
          end
        end
        for (genvar k = col_height(N, PR, c); k < MAXH; k++) begin : g_pad
          assign v[c][k] = 1'b0;
        end
      end
    end else begin : g_red
      // Carries out of each column's adders; the top column's are not used.
      logic [MAXH:0] cy [P];
      for (genvar c = 0; c < P; c++) begin : g_col
        localparam int H    = int'(PLAN[(s-1)*MAXP+c].height);
        localparam int NF   = int'(PLAN[(s-1)*MAXP+c].fa);
        localparam int NH   = int'(PLAN[(s-1)*MAXP+c].ha);
        localparam int CIN  = int'(PLAN[(s-1)*MAXP+c].cin);
        localparam int USED = 3 * NF + 2 * NH;     // bits taken by adders
        localparam int BASE = NF + NH + H - USED;  // first slot of incoming carries
        localparam int HOUT = BASE + CIN;          // height after the stage

        for (genvar f = 0; f < NF; f++) begin : g_fa
          full_adder u_fa (
            .a  (g_lvl[s-1].v[c][3*f]),
            .b  (g_lvl[s-1].v[c][3*f+1]),
            .ci (g_lvl[s-1].v[c][3*f+2]),
            .s  (v[c][f]),
            .co (cy[c][f])
          );
        end
        if (NH > 0) begin : g_ha
          half_adder u_ha (
            .a  (g_lvl[s-1].v[c][3*NF]),
            .b  (g_lvl[s-1].v[c][3*NF+1]),
            .s  (v[c][NF]),
            .co (cy[c][NF])
          );
        end
        for (genvar j = NF + NH; j <= MAXH; j++) begin : g_cypad
          assign cy[c][j] = 1'b0;
        end
        // Bits no adder takes pass on unchanged.
        for (genvar k = USED; k < H; k++) begin : g_pass
          assign v[c][NF+NH+k-USED] = g_lvl[s-1].v[c][k];
        end
        // Carries of column c-1 come in above them; those out of the top
        // column have nowhere to go and are dropped.
        for (genvar j = 0; j < CIN; j++) begin : g_cin
          assign v[c][BASE+j] = cy[c-1][j];
        end
        for (genvar k = HOUT; k < MAXH; k++) begin : g_pad
          assign v[c][k] = 1'b0;
        end
      end
    end
  end

  for (genvar c = 0; c < P; c++) begin : g_out
    assign sum_row[c]   = g_lvl[S].v[c][0];
    assign carry_row[c] = g_lvl[S].v[c][1];
  end

endmodule
