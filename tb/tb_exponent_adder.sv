// tb_exponent_adder: exhaustive check of the 8-bit exponent adder, whose
// 9-bit sum must keep the carry.
module tb_exponent_adder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [7:0] x, y;
  logic [8:0] s;

  exponent_adder dut (.x(x), .y(y), .s(s));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        x = 8'(i); y = 8'(j);
        #1;
        checks++;
        if (s !== 9'(i + j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d = %0d", i, j, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
