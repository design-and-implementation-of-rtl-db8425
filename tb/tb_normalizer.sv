// tb_normalizer: checks the selection of mantissa and round bit from a 48-bit
// significand product. A product with its top bit set is a significand in
// [2, 4): the field shifts by one and the exponent grows by one. Expected
// values are formed by shifting the product so its leading 1 sits at bit 47.
module tb_normalizer;
  int checks = 0, failures = 0;
  int shifted = 0, kept = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [47:0] prod;
  logic [7:0]  exp_in, exp_out;
  logic [22:0] man;
  logic        round_bit;

  normalizer dut (.prod(prod), .exp_in(exp_in), .man(man), .round_bit(round_bit), .exp_out(exp_out));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] aligned;
    logic [7:0]  e_exp;
    for (int k = 0; k < 20000; k++) begin
      // Products of two significands have bit 47 or bit 46 set.
      prod   = {16'($urandom), 32'($urandom)};
      prod[46] = prod[47] ? prod[46] : 1'b1;
      exp_in = 8'($urandom);
      #1;
      aligned = prod[47] ? prod : (prod << 1);
      e_exp   = exp_in + (prod[47] ? 8'd1 : 8'd0);
      if (prod[47]) shifted++; else kept++;
      checks++;
      if (man !== aligned[46:24] || round_bit !== aligned[23] || exp_out !== e_exp) begin
        failures++;
        if (failures < 10) $display("FAIL prod %h: man %h r %0d e %0d", prod, man, round_bit, exp_out);
      end
    end
    checks++;
    if (shifted == 0 || kept == 0) begin
      failures++;
      $display("FAIL both normalisation cases must occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
