// tb_carry_select_adder: checks the 48-bit carry-select adder (and a 10-bit
// one whose top block is short) against '+', on carry chains through every
// block and on random operands, with both carry-in values.
module tb_carry_select_adder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [47:0] a, b, s;
  logic        cin, cout;
  logic [9:0]  a10, b10, s10;
  logic        cin10, cout10;

  carry_select_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  carry_select_adder #(.W(10), .BLK(4)) dut10 (.a(a10), .b(b10), .cin(cin10), .s(s10), .cout(cout10));

  task automatic check(input logic [47:0] x, input logic [47:0] y, input logic c);
    logic [48:0] r;
    a = x; b = y; cin = c;
    #1;
    r = {1'b0, x} + {1'b0, y} + 49'(c);
    checks++;
    if ({cout, s} !== r) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %0d = %h, expected %h", x, y, c, {cout, s}, r);
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
    check(48'hFFFF_FFFF_FFFF, 48'h0, 1'b1);
    check(48'hFFFF_FFFF_FFFF, 48'h1, 1'b0);
    check(48'hFFFF_FFFF_FFFF, 48'hFFFF_FFFF_FFFF, 1'b1);
    check(48'h0, 48'h0, 1'b0);
    check(48'h7FFF_FFFF_FFFF, 48'h0, 1'b1);
    for (int k = 0; k < 20000; k++)
      check({16'($urandom), 32'($urandom)}, {16'($urandom), 32'($urandom)}, 1'($urandom));
    for (int i = 0; i < 1024; i += 7) begin
      for (int j = 0; j < 1024; j += 3) begin
        a10 = 10'(i); b10 = 10'(j); cin10 = 1'(i + j);
        #1;
        checks++;
        if ({cout10, s10} !== 11'(i + j + ((i + j) % 2))) begin
          failures++;
          if (failures < 10) $display("FAIL 10-bit %0d + %0d", i, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
