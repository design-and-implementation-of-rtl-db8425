// tb_booth_pp_generator: checks the radix-4 Booth partial-product matrix.
// The matrix of a 24-bit multiplication must have 13 Booth rows (plus the
// negation and constant rows), no bit outside the positions the layout
// declares, and rows that add up to x*y modulo 2^48. A 6-bit instance is
// checked exhaustively.
module tb_booth_pp_generator;
  import booth_dadda_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NR24 = mat_rows(24);
  localparam int NR6  = mat_rows(6);
  localparam presence_t PR24 = presence(24);
  localparam presence_t PR6  = presence(6);

  logic [23:0]                x24, y24;
  logic [NR24-1:0][47:0]      rows24;
  logic [5:0]                 x6, y6;
  logic [NR6-1:0][11:0]       rows6;

  booth_pp_generator dut24 (.x(x24), .y(y24), .rows(rows24));
  booth_pp_generator #(.N(6)) dut6 (.x(x6), .y(y6), .rows(rows6));

  task automatic check24(input logic [23:0] x, input logic [23:0] y);
    logic [47:0] sum;
    bit          stray;
    x24 = x; y24 = y;
    #1;
    sum   = '0;
    stray = 1'b0;
    for (int r = 0; r < NR24; r++) begin
      sum += rows24[r];
      for (int c = 0; c < 48; c++) begin
        if (rows24[r][c] && !PR24[r*MAXP+c]) stray = 1'b1;
      end
    end
    checks++;
    if (stray) begin
      failures++;
      if (failures < 10) $display("FAIL a row has a bit outside its declared columns");
    end
    checks++;
    if (sum !== 48'(x) * 48'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL rows of %0d * %0d sum to %0d", x, y, sum);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] s6;
    checks++;
    if (pp_count(24) != 13 || NR24 != 15) begin
      failures++;
      $display("FAIL expected 13 Booth rows, got %0d", pp_count(24));
    end
    for (int i = 0; i < 64; i++) begin
      for (int j = 0; j < 64; j++) begin
        x6 = 6'(i); y6 = 6'(j);
        #1;
        s6 = '0;
        for (int r = 0; r < NR6; r++) s6 += rows6[r];
        checks++;
        if (s6 !== 12'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL 6-bit rows of %0d * %0d sum to %0d", i, j, s6);
        end
      end
    end
    check24(24'd150, 24'd150);
    check24(24'hFFFFFF, 24'hFFFFFF);
    check24(24'hAAAAAA, 24'h555555);
    check24(24'h800000, 24'hFFFFFF);
    for (int k = 0; k < 3000; k++) check24(24'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
