// tb_fp_multiplier: end-to-end test of the single-precision multiplier at its
// default parameters.
//
// Directed cases: the two worked examples of the algorithm (30.75 * 25.5 =
// 784.125 and 20.375 * 61 = 1242.875), a negative times a positive number,
// and a rounding carry that renormalises. Random cases with exponents that
// keep the product in the normal range are checked two ways: bit-exactly
// against an integer model of the algorithm (significand product by '*',
// round half up), and against real arithmetic (error at most half a unit in
// the last place). The testbench counts how often each mechanism occurs:
// negative product, normalisation shift, no shift, rounding up, rounding
// carry; one that never occurs counts as a failure.
module tb_fp_multiplier;
  import fpm_pkg::*;
  int checks = 0, failures = 0;
  int n_neg = 0, n_shift = 0, n_noshift = 0, n_roundup = 0, n_rcarry = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  float32_t a, b, p;

  fp_multiplier dut (.a(a), .b(b), .p(p));

  // Integer model of the algorithm, also counting the mechanisms it uses.
  function automatic float32_t model(input float32_t x, input float32_t y);
    logic [47:0] prod;
    logic [22:0] man;
    logic        r;
    logic [9:0]  e;
    logic [23:0] rounded;
    prod = 48'({1'b1, x.man}) * 48'({1'b1, y.man});
    e    = 10'(x.exp) + 10'(y.exp) - 10'd127;
    if (prod[47]) begin
      man = prod[46:24]; r = prod[23]; e = e + 10'd1; n_shift++;
    end else begin
      man = prod[45:23]; r = prod[22]; n_noshift++;
    end
    if (r) n_roundup++;
    rounded = {1'b0, man} + 24'(r);
    if (rounded[23]) begin
      e = e + 10'd1; n_rcarry++;
    end
    if (x.sign ^ y.sign) n_neg++;
    return '{sign: x.sign ^ y.sign, exp: e[7:0], man: rounded[22:0]};
  endfunction

  function automatic real to_real(input float32_t x);
    real v;
    v = (1.0 + real'(x.man) / 8388608.0) * (2.0 ** (real'(x.exp) - 127.0));
    return x.sign ? -v : v;
  endfunction

  task automatic check(input float32_t x, input float32_t y);
    float32_t e;
    real      exact, got, ulp, err;
    a = x; b = y;
    #1;
    e = model(x, y);
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, model %h", x, y, p, e);
    end
    // Real-valued check, for results in the normal range.
    if (int'(x.exp) + int'(y.exp) > 130 && int'(x.exp) + int'(y.exp) < 378) begin
      exact = to_real(x) * to_real(y);
      got   = to_real(p);
      ulp   = 2.0 ** (real'(p.exp) - 150.0);
      err   = (got > exact) ? got - exact : exact - got;
      checks++;
      if (err > ulp / 2.0) begin
        failures++;
        if (failures < 10) $display("FAIL %h * %h = %h is %e off (ulp %e)", x, y, p, err, ulp);
      end
    end
  endtask

  task automatic expect_word(input float32_t x, input float32_t y, input float32_t w);
    check(x, y);
    checks++;
    if (p !== w) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, p, w);
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
    float32_t x, y;
    expect_word(32'h41F6_0000, 32'h41CC_0000, 32'h4444_0800);  // 30.75 * 25.5 = 784.125
    expect_word(32'h41A3_0000, 32'h4274_0000, 32'h449B_5C00);  // 20.375 * 61 = 1242.875
    expect_word(32'hC020_0000, 32'h4080_0000, 32'hC120_0000);  // -2.5 * 4 = -10
    expect_word(32'h3F80_0000, 32'h3F80_0000, 32'h3F80_0000);  // 1 * 1 = 1
    expect_word(32'h4000_0000, 32'hBFC0_0000, 32'hC040_0000);  // 2 * -1.5 = -3
    // The significand product 1.11...1 with round bit 1
    // rounds up to 2.0, so the mantissa wraps and the exponent goes up by one.
    expect_word(32'h3F80_03E5, 32'h3FFF_F836, 32'h4000_0000);
    // (2 - 2^-23) * (1 + 2^-23) = 2 + 2^-23 - 2^-46 rounds down to 2.
    expect_word(32'h3FFF_FFFF, 32'h3F80_0001, 32'h4000_0000);
    for (int k = 0; k < 200000; k++) begin
      x = 32'($urandom);
      y = 32'($urandom);
      x.exp = 8'($urandom_range(190, 64));
      y.exp = 8'($urandom_range(190, 64));
      check(x, y);
    end
    $display("mechanisms: negative=%0d shift=%0d noshift=%0d roundup=%0d roundcarry=%0d",
             n_neg, n_shift, n_noshift, n_roundup, n_rcarry);
    checks++;
    if (n_neg == 0 || n_shift == 0 || n_noshift == 0 || n_roundup == 0 || n_rcarry == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
