// tb_booth_dadda_multiplier: self-checking test of the Booth-Dadda multiplier.
// An 8-bit instance is checked exhaustively and the 24-bit instance on the
// values of the published waveform (150*150, 250*50, 300*150), on corner
// values and on random operands, all against the simulator's own '*'.
module tb_booth_dadda_multiplier;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [23:0] a24, b24;
  logic [47:0] p24;

  booth_dadda_multiplier #(.N(8)) dut8 (.in1(a8), .in2(b8), .p(p8));
  booth_dadda_multiplier dut24 (.in1(a24), .in2(b24), .p(p24));

  task automatic check24(input logic [23:0] x, input logic [23:0] y);
    logic [47:0] exp_p;
    a24 = x; b24 = y;
    #1;
    exp_p = 48'(x) * 48'(y);
    checks++;
    if (p24 !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL 24-bit %0d * %0d = %0d, expected %0d", x, y, p24, exp_p);
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
    // Exhaustive 8-bit.
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (p8 !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL 8-bit %0d * %0d = %0d", i, j, p8);
        end
      end
    end
    // Waveform values of the published simulation.
    check24(24'd150, 24'd150);
    check24(24'd250, 24'd50);
    check24(24'd300, 24'd150);
    // Corners: extremes of the significand range and Booth digit patterns.
    check24(24'hFFFFFF, 24'hFFFFFF);
    check24(24'h800000, 24'h800000);
    check24(24'hFFFFFF, 24'h800000);
    check24(24'hAAAAAA, 24'h555555);
    check24(24'h555555, 24'hAAAAAA);
    check24(24'hCCCCCC, 24'h333333);
    check24(24'h0, 24'hFFFFFF);
    check24(24'h1, 24'h1);
    for (int k = 0; k < 20000; k++) check24(24'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
