// tb_fp_multiplier_double: the multiplier configured for IEEE 754 double
// precision (11-bit exponent, 52-bit fraction, bias 1023), which makes the
// Booth-Dadda core 53 x 53 bits. Results are compared with the simulator's
// own double-precision product of the same operands. The simulator rounds to
// nearest-even and this design rounds ties away from zero; the two can only
// differ on an exact tie, which the directed cases avoid and random
// operands almost never produce, so any mismatch is counted as a failure.
module tb_fp_multiplier_double;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [63:0] a, b, p;

  fp_multiplier #(.EXP_W(11), .MAN_W(52), .BIAS(1023)) dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [63:0] x, input logic [63:0] y);
    logic [63:0] e;
    a = x; b = y;
    #1;
    e = $realtobits($bitstoreal(x) * $bitstoreal(y));
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, e);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] x, y;
    check($realtobits(30.75), $realtobits(25.5));
    check($realtobits(20.375), $realtobits(61.0));
    check($realtobits(-2.5), $realtobits(4.0));
    check($realtobits(3.141592653589793), $realtobits(2.718281828459045));
    for (int k = 0; k < 50000; k++) begin
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      x[62:52] = 11'($urandom_range(1500, 600));
      y[62:52] = 11'($urandom_range(1500, 600));
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
