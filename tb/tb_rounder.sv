// tb_rounder: checks rounding of a 23-bit mantissa by its round bit,
// including the carry out of an all-ones mantissa, which must give a zero
// mantissa and an exponent one higher.
module tb_rounder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [22:0] man_in, man_out;
  logic        round_bit;
  logic [7:0]  exp_in, exp_out;

  rounder dut (.man_in(man_in), .round_bit(round_bit), .exp_in(exp_in), .man_out(man_out), .exp_out(exp_out));

  task automatic check(input logic [22:0] m, input logic r, input logic [7:0] e);
    longint      sig;
    logic [22:0] e_man;
    logic [7:0]  e_exp;
    man_in = m; round_bit = r; exp_in = e;
    #1;
    // Significand 1.m as an integer, rounded up by r; a result of 2.0
    // renormalises to 1.0 with the next exponent.
    sig = longint'({1'b1, m}) + longint'(r);
    if (sig == (longint'(1) << 24)) begin
      e_man = '0;
      e_exp = e + 8'd1;
    end else begin
      e_man = sig[22:0];
      e_exp = e;
    end
    checks++;
    if (man_out !== e_man || exp_out !== e_exp) begin
      failures++;
      if (failures < 10) $display("FAIL m %h r %0d e %0d -> %h %0d", m, r, e, man_out, exp_out);
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
    check(23'h7FFFFF, 1'b1, 8'd136);
    check(23'h7FFFFF, 1'b0, 8'd136);
    check(23'h0, 1'b1, 8'd1);
    check(23'h1B5C00, 1'b0, 8'd137);
    for (int k = 0; k < 20000; k++) check(23'($urandom), 1'($urandom), 8'($urandom));
    // Mantissas at and near all ones, where the rounding carry appears.
    for (int k = 0; k < 1000; k++) check(23'h7FFFFF - 23'($urandom_range(3)), 1'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
