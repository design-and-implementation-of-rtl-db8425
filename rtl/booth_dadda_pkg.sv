// booth_dadda_pkg: elaboration-time geometry of the radix-4 Booth partial-product
// matrix and of its Dadda reduction, shared by booth_pp_generator and dadda_tree.
//
// For an unsigned N x N multiplication the multiplier is padded with a 0 below
// its LSB and with zeros above its MSB, and cut into N/2+1 overlapping 3-bit
// groups, one partial-product row each. The matrix handed from the generator to
// the tree has N/2+3 rows of 2N columns:
//   row 0            : N+1 magnitude bits, then s, s, ~s    (starts at column 0)
//   rows 1..NPP-2    : N+1 magnitude bits, then ~s          (starts at column 2i)
//   row NPP-1        : N (N even) or N+1 (N odd) magnitude bits, never negative
//   row NPP          : negation bits, bit 2i is the "+1" of row i's two's complement
//   row NPP+1        : constant that completes the sign extension of all rows
// where the magnitude bits of a negative row are inverted and s is its sign.
// Bits beyond column 2N-1 are dropped (the product fits in 2N bits).
//
// The Dadda reduction uses the heights d(0)=2, d(j+1)=floor(1.5*d(j)), so for
// N = 24 (13 rows) the stage targets are 9, 6, 4, 3, 2. In each stage a column
// whose height, plus the carries arriving from the column below in the same
// stage, exceeds the target gets floor(excess/2) full adders and (excess mod 2)
// half adders. Every function here is evaluated at elaboration only.
package booth_dadda_pkg;

  // Largest product width the functions can describe (operands up to 64 bits).
  localparam int MAXP = 128;

  // Number of Booth partial-product rows.
  function automatic int pp_count(int n);
    return n / 2 + 1;
  endfunction

  // Rows of the matrix passed from the generator to the Dadda tree.
  function automatic int mat_rows(int n);
    return pp_count(n) + 2;
  endfunction

  // Number of bits of Booth row i, counted from its starting column 2i.
  function automatic int pp_width(int n, int i);
    int npp = pp_count(n);
    if (i == npp - 1) return (n % 2 == 0) ? n : n + 1;
    if (i == 0)       return n + 4;
    return n + 2;
  endfunction

  // Constant row: minus the sum of every row's sign-extension weight, mod 2^(2n).
  function automatic logic [MAXP-1:0] const_row(int n);
    logic [MAXP-1:0] k;
    logic [MAXP-1:0] mask;
    int npp = pp_count(n);
    k = '0;
    k = k - (MAXP'(1) << (n + 3));
    for (int i = 1; i < npp - 1; i++) k = k - (MAXP'(1) << (2 * i + n + 1));
    mask = (MAXP'(1) << (2 * n)) - MAXP'(1);
    return k & mask;
  endfunction

  // Most matrix rows and reduction stages the tables can describe.
  localparam int MAXR = MAXP / 4 + 3;
  localparam int MAXS = 12;            // dadda_d(11) = 141 rows

  typedef logic [MAXR*MAXP-1:0] presence_t;   // bit r*MAXP+c: row r has a bit in column c

  // Which (row, column) positions of the initial matrix hold a bit.
  function automatic presence_t presence(int n);
    presence_t       pr;
    logic [MAXP-1:0] k;
    int              npp = pp_count(n);
    pr = '0;
    k  = const_row(n);
    for (int r = 0; r < npp; r++)
      for (int c = 2 * r; c < 2 * r + pp_width(n, r) && c < 2 * n; c++) pr[r*MAXP+c] = 1'b1;
    for (int i = 0; i < npp - 1; i++) pr[npp*MAXP+2*i] = 1'b1;
    for (int c = 0; c < 2 * n; c++) pr[(npp+1)*MAXP+c] = k[c];
    return pr;
  endfunction

  // Position of row r's bit within column c (rows stacked from row 0 up).
  function automatic int row_slot(presence_t pr, int r, int c);
    int slot = 0;
    for (int q = 0; q < r; q++) if (pr[q*MAXP+c]) slot++;
    return slot;
  endfunction

  // Height of column c of the initial matrix.
  function automatic int col_height(int n, presence_t pr, int c);
    return row_slot(pr, mat_rows(n), c);
  endfunction

  // Tallest column of the initial matrix.
  function automatic int max_height(int n, presence_t pr);
    int m = 0;
    int h;
    for (int c = 0; c < 2 * n; c++) begin
      h = col_height(n, pr, c);
      if (h > m) m = h;
    end
    return m;
  endfunction

  // Dadda height sequence 2, 3, 4, 6, 9, 13, 19, ...
  function automatic int dadda_d(int j);
    int d = 2;
    for (int q = 0; q < j; q++) d = d * 3 / 2;
    return d;
  endfunction

  // Number of reduction stages: the first j with dadda_d(j) >= tallest column.
  function automatic int num_stages(int mh);
    int j = 0;
    while (dadda_d(j) < mh) j++;
    return j;
  endfunction

  // One entry of the reduction plan, for column c entering stage s.
  typedef struct packed {
    logic [7:0] height;  // bits in the column
    logic [7:0] fa;      // full adders placed in the column
    logic [7:0] ha;      // half adders placed in the column
    logic [7:0] cin;     // carries from column c-1 that land in column c of stage s+1
  } plan_t;

  typedef plan_t [MAXS*MAXP-1:0] plan_tbl_t;  // entry s*MAXP+c

  // Dadda's rule applied stage by stage to the initial matrix. A column whose
  // height plus incoming carries exceeds the stage target by e gets
  // floor(e/2) full adders and (e mod 2) half adders. Row num_stages holds
  // the final heights (at most 2).
  function automatic plan_tbl_t dadda_plan(int n, presence_t pr);
    plan_tbl_t tbl;
    int        h  [MAXP];
    int        nh [MAXP];
    int        ns, d, ex, fa, ha, cin;
    // Entries past the last stage or column are never read and stay unset.
    for (int c = 0; c < 2 * n; c++) h[c] = col_height(n, pr, c);
    ns = num_stages(max_height(n, pr));
    for (int st = 0; st <= ns; st++) begin
      d   = (st < ns) ? dadda_d(ns - 1 - st) : 2;
      cin = 0;
      for (int c = 0; c < 2 * n; c++) begin
        ex = h[c] + cin - d;
        fa = (ex > 0) ? ex / 2 : 0;
        ha = (ex > 0) ? ex % 2 : 0;
        tbl[st*MAXP+c] = '{height: 8'(h[c]), fa: 8'(fa), ha: 8'(ha), cin: 8'(cin)};
        nh[c] = h[c] - 2 * fa - ha + cin;
        cin   = fa + ha;
      end
      for (int c = 0; c < 2 * n; c++) h[c] = nh[c];
    end
    return tbl;
  endfunction

endpackage
