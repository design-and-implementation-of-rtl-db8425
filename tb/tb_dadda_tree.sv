// tb_dadda_tree: checks the Dadda reduction on its own. Random bits are put
// into every position of the 24-bit Booth matrix (not only patterns a Booth
// generator can produce); the two output rows must add up to the sum of the
// input rows modulo 2^48. The reduction plan must have five stages with the
// target heights 9, 6, 4, 3, 2, and every column must leave with at most two
// bits.
module tb_dadda_tree;
  import booth_dadda_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int        NR   = mat_rows(24);
  localparam presence_t PR   = presence(24);
  localparam int        MH   = max_height(24, PR);
  localparam int        NS   = num_stages(MH);
  localparam plan_tbl_t PLAN = dadda_plan(24, PR);

  logic [NR-1:0][47:0] rows;
  logic [47:0]         sum_row, carry_row;

  dadda_tree dut (.rows(rows), .sum_row(sum_row), .carry_row(carry_row));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] ref_sum;
    int          tallest;
    // Plan: 13 rows high, reduced 13 -> 9 -> 6 -> 4 -> 3 -> 2.
    checks++;
    if (MH != 13 || NS != 5) begin
      failures++;
      $display("FAIL matrix height %0d, stages %0d", MH, NS);
    end
    for (int s = 1; s <= NS; s++) begin
      tallest = 0;
      for (int c = 0; c < 48; c++)
        if (int'(PLAN[s*MAXP+c].height) > tallest) tallest = int'(PLAN[s*MAXP+c].height);
      checks++;
      if (tallest != dadda_d(NS - s)) begin
        failures++;
        $display("FAIL after stage %0d the tallest column is %0d, expected %0d",
                 s - 1, tallest, dadda_d(NS - s));
      end
    end
    // Arithmetic on random matrices.
    for (int k = 0; k < 5000; k++) begin
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < 48; c++)
          rows[r][c] = PR[r*MAXP+c] ? 1'($urandom) : 1'b0;
      if (k == 0) begin
        for (int r = 0; r < NR; r++)
          for (int c = 0; c < 48; c++) rows[r][c] = PR[r*MAXP+c];
      end
      #1;
      ref_sum = '0;
      for (int r = 0; r < NR; r++) ref_sum += rows[r];
      checks++;
      if (48'(sum_row + carry_row) !== ref_sum) begin
        failures++;
        if (failures < 10) $display("FAIL reduction %h + %h != %h", sum_row, carry_row, ref_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
