// fp_multiplier: IEEE 754 floating-point multiplier (single precision by
// default) whose significand product comes from a radix-4 Booth / Dadda
// multiplier.
//
// Datapath, all combinational:
//   sign      sign_unit               s = sa ^ sb
//   exponent  exponent_adder          ea + eb              (EXP_W+1 bits)
//             bias_subtractor         ea + eb - BIAS       (low EXP_W bits kept)
//   mantissa  booth_dadda_multiplier  1.ma * 1.mb          (2*(MAN_W+1) bits)
//             normalizer              leading 1 into place, exponent + 1 if needed
//             rounder                 add the first dropped bit
//   result    {s, exponent, mantissa}
//
// This is the plain multiplication algorithm only: zero, subnormal, infinite
// and NaN operands are treated like normal numbers (a zero exponent field still
// means a hidden 1), and an exponent that leaves the range 1..2^EXP_W-2 wraps
// modulo 2^EXP_W; no flags are raised. Rounding adds the first dropped bit
// (ties round away from zero) rather than rounding to even. Those limits come
// with the algorithm; the renormalisation after a rounding carry is this
// design's addition.
//
// Ports: a (multiplicand), b (multiplier) and p = a * b, each a
// 1+EXP_W+MAN_W-bit word {sign, biased exponent, fraction}.
module fp_multiplier #(
  parameter int EXP_W = fpm_pkg::SP_EXP_W,
  parameter int MAN_W = fpm_pkg::SP_MAN_W,
  parameter int BIAS  = fpm_pkg::SP_BIAS
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  output logic [EXP_W+MAN_W:0] p
);
  localparam int SW = MAN_W + 1;  // significand width, hidden 1 included

  // Operand fields.
  logic             sa, sb;
  logic [EXP_W-1:0] ea, eb;
  logic [MAN_W-1:0] ma, mb;
  assign {sa, ea, ma} = a;
  assign {sb, eb, mb} = b;

  // Sign.
  logic sp;
  sign_unit u_sign (.a(sa), .b(sb), .s(sp));

  // Exponent: add, then remove one bias.
  logic [EXP_W:0]   esum;
  logic [EXP_W+1:0] ebiased;
  exponent_adder #(.EXP_W(EXP_W)) u_eadd (.x(ea), .y(eb), .s(esum));
  bias_subtractor #(.EXP_W(EXP_W)) u_bias (
    .x (esum),
    .y ((EXP_W+1)'(BIAS)),
    .s (ebiased)
  );

  // Significand product with the hidden 1s appended.
  logic [2*SW-1:0] prod;
  booth_dadda_multiplier #(.N(SW)) u_mul (
    .in1 ({1'b1, ma}),
    .in2 ({1'b1, mb}),
    .p   (prod)
  );

  // Normalise and round.
  logic [MAN_W-1:0] man_n, man_r;
  logic             rbit;
  logic [EXP_W-1:0] exp_n, exp_r;
  normalizer #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_norm (
    .prod      (prod),
    .exp_in    (ebiased[EXP_W-1:0]),
    .man       (man_n),
    .round_bit (rbit),
    .exp_out   (exp_n)
  );
  rounder #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_round (
    .man_in    (man_n),
    .round_bit (rbit),
    .exp_in    (exp_n),
    .man_out   (man_r),
    .exp_out   (exp_r)
  );

  // Result word.
  assign p = {sp, exp_r, man_r};

endmodule
