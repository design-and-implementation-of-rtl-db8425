// tb_bias_subtractor: checks s = x - y as a 10-bit two's-complement value, for
// every 9-bit x with the single-precision bias 127 and for random x, y.
module tb_bias_subtractor;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [8:0] x, y;
  logic [9:0] s;

  bias_subtractor dut (.x(x), .y(y), .s(s));

  task automatic check(input int xi, input int yi);
    x = 9'(xi); y = 9'(yi);
    #1;
    checks++;
    if (s !== 10'(xi - yi)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d - %0d = %0d", xi, yi, $signed(s));
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
    for (int i = 0; i < 512; i++) check(i, 127);
    // Exponent sums of the worked examples: 131+131 and 131+132.
    check(262, 127);
    check(263, 127);
    for (int k = 0; k < 5000; k++) check(int'($urandom_range(511)), int'($urandom_range(511)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
