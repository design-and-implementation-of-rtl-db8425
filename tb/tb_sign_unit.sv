// tb_sign_unit: exhaustive check of the product sign: equal operand signs
// give a positive product, different signs a negative one.
module tb_sign_unit;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic a, b, s;

  sign_unit dut (.a(a), .b(b), .s(s));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      // Negative exactly when one operand is negative and the other is not.
      if (s !== ((i == 1) || (i == 2))) begin
        failures++;
        $display("FAIL sign(%0d, %0d) = %0d", a, b, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
