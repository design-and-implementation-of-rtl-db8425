# Floating-point multiplier with a radix-4 Booth / Dadda significand multiplier

This is an IEEE 754 single-precision multiplier written as combinational
SystemVerilog. The sign and exponent paths are small. Nearly all the logic is
in the 24 × 24-bit multiplication of the two significands, so the multiplier
builds that product in three steps:

1. **Radix-4 Booth recoding.** The multiplier operand is recoded into digits
   in {−2, −1, 0, +1, +2}. This gives 13 partial products instead of 24.
2. **Dadda tree.** The 13 rows are reduced by full and half adders through
   the heights 9, 6, 4, 3 and 2, using as few adders as each stage needs.
3. **Carry-select adder.** The last two rows are added into the 48-bit
   product.

Everything around that core is the usual multiplication algorithm:

- The sign of the product is the XOR of the operand signs.
- The exponent is the sum of the biased exponents minus one bias.
- The product is normalised by at most one position.
- The mantissa is rounded by adding the first bit that is dropped.

There are no registers. One product comes out per evaluation of the
combinational logic.

## Number format and the algorithm

A single-precision word is `{sign[31], exponent[30:23], fraction[22:0]}`. Its
value is (−1)^sign × 2^(exponent − 127) × 1.fraction. The leading 1 of the
significand is not stored (the "hidden bit").

`fp_multiplier` computes `p = a * b` as follows:

| step | module | what happens |
|---|---|---|
| sign | `sign_unit` | `sa ^ sb` |
| exponent sum | `exponent_adder` | `ea + eb`, 9 bits, carry kept |
| bias removal | `bias_subtractor` | `(ea + eb) − 127`, 10-bit two's complement; the low 8 bits are used |
| significand product | `booth_dadda_multiplier` | `{1,ma} × {1,mb}`, 48 bits |
| normalisation | `normalizer` | If bit 47 is set, the product is in [2, 4): take bits 46..24, use bit 23 as the round bit, and add 1 to the exponent. Otherwise take bits 45..23 with round bit 22. |
| rounding | `rounder` | Add the round bit to the 23-bit mantissa. If that carries out (mantissa all ones), the mantissa becomes 0 and the exponent goes up by one. |
| result | `fp_multiplier` | `{sign, exponent, mantissa}` |

Worked example: 20.375 × 61.

- The operands are `0x41A30000` and `0x42740000`, with exponents 131 and 132.
- Exponent path: 131 + 132 = 263, and 263 − 127 = 136.
- The significand product has its top bit set, so the exponent becomes 137.
- The round bit is 0.
- The result is `0x449B5C00` = 1242.875.

## The significand multiplier

### Booth recoding (`booth_encoder`, `booth_pp_generator`)

The 24-bit multiplier `y` is extended as follows:

- a 0 is appended below its LSB;
- two 0s are placed above its MSB.

The extended value is then cut into 13 three-bit groups that overlap by one
bit: `{y[2i+1], y[2i], y[2i−1]}` for i = 0..12. Each group selects a multiple
of the multiplicand `x`:

| group | digit | group | digit |
|---|---|---|---|
| 000 | 0 | 100 | −2x |
| 001 | +x | 101 | −x |
| 010 | +x | 110 | −x |
| 011 | +2x | 111 | 0 (−0) |

Row i has weight 4^i. The padding matters because the operands are unsigned
significands. Without the 13th group, a significand whose top bit is 1 would
be read as a negative number. The top group is `00y23`, so it never selects a
negative multiple.

The rows are handed to the tree as a matrix of bits, not as signed numbers.
Three standard tricks keep that matrix at most 13 bits high:

- **Negation.** A negative row is written as the bit-inverted magnitude. The
  "+1" that completes the two's complement goes into a separate row of
  *negation bits*, at the row's lowest column. Group `111` inverts a zero
  magnitude and adds 1, so it still contributes 0.
- **Sign extension.** Rows are not sign-extended to 48 bits. Each row
  1..11 ends in its inverted sign bit. Row 0 ends in `s, s, ~s`. One constant
  row (bits 29, 31, …, 47 set for N = 24) holds the sum of all the
  correction terms, modulo 2^48.
- **Truncation.** Bits above column 47 are dropped. The product fits in 48
  bits, so the modulo-2^48 sum is exact.

The matrix has N/2 + 3 rows of 2N bits: the Booth rows, the negation row and
the constant row. For N = 24 the columns reach 13 bits in columns 22 and 24–27.
`booth_dadda_pkg::presence()` says which (row, column) positions hold a bit;
everything else is 0.

### Dadda reduction (`dadda_tree`, `full_adder`, `half_adder`)

Dadda's height sequence is 2, 3, 4, 6, 9, 13, … (each term is ⌊1.5 × the
previous⌋). The tree has one stage for each term below the tallest column.
For N = 24 the tallest column is 13 bits, so there are 5 stages, with targets
9, 6, 4, 3 and 2.

Within a stage the columns are processed from the LSB up. Let e be column c's
height plus the carries it receives from column c−1 in this stage, minus the
target. If e > 0, the column gets ⌊e/2⌋ full adders and (e mod 2) half
adders.

- Sums stay in the column.
- Carries go to column c+1 of the next stage.
- Bits that no adder takes pass through unchanged.

The plan is computed at elaboration by `booth_dadda_pkg::dadda_plan()`. For
each stage and column it records the height and the number of full adders,
half adders and incoming carries. `dadda_tree` turns that plan into adder
instances.

- Level s of `g_lvl` holds the bits entering stage s.
- The adders of stage s−1 live in level s and read level s−1.
- Within a column the next stage's bits are packed in this order: full-adder
  sums, the half-adder sum, pass-through bits, then the carries from below.

For N = 24 the five stages use 52, 81, 74, 43 and 46 adders. The carries out
of column 47 are dropped (see truncation above).

The tree is generic: it reduces any matrix the package describes. With
`N = 53` (double precision) there are 27 Booth rows, the matrix is 27 bits high, and the tree gets 7 stages.

### Final adder (`carry_select_adder`)

The two rows left by the tree go to a carry-select adder with 4-bit blocks.

- The lowest block adds with the real carry-in.
- Every other block computes its sum for carry-in 0 and for carry-in 1 in
  parallel. The carry from the block below picks one of the two.

`BLK` sets the block size. The carry out is not used: the product is the sum
modulo 2^48.

## What the design does not do

- **Special values.** Zero, subnormal, infinity and NaN operands go through the
  same datapath as normal numbers. An exponent field of 0 still implies a
  hidden 1, so 0 × x does not give 0.
- **Exponent range.** An exponent outside 1..254 wraps modulo 256. The top two
  bits of the bias subtractor's result show underflow and overflow, but
  nothing uses them. No exception flags exist.
- **Rounding mode.** The multiplier rounds to nearest with ties away from
  zero. IEEE round-to-nearest-even differs only when the discarded part is
  exactly one half.
- **Timing.** There is no pipelining.

For finite normal operands whose product stays in the normal range, the result
is within half an ulp of the exact product. It matches IEEE 754 bit for bit
except on exact ties.

## Source of the design and local choices

The following follow the published multiplication algorithm and the structure
of its Booth-Dadda multiplier:

- the dataflow of `fp_multiplier`, in the order sign, exponent add, bias
  subtract, significand multiply, normalise, round, concatenate;
- the 13 radix-4 partial products;
- the Dadda heights 9-6-4-3-2;
- the carry-select final adder;
- the 9-bit exponent sum and the 10-bit bias-subtractor output, with its low
  8 bits used;
- the bit selection used for normalisation and rounding.

The following are choices made for this RTL:

- the Booth recoding table, the negation bits and the sign-extension
  constant (the usual textbook forms);
- the placement of adders inside each Dadda stage;
- the 4-bit carry-select block;
- the renormalisation after a rounding carry;
- combinational timing;
- parameters for the field widths, which allow double precision.

## Modules and parameters

```
fp_multiplier            EXP_W=8, MAN_W=23, BIAS=127
├── sign_unit
├── exponent_adder       EXP_W
├── bias_subtractor      EXP_W
├── booth_dadda_multiplier  N=MAN_W+1, CSA_BLK=4
│   ├── booth_pp_generator  N
│   │   └── booth_encoder   (one per row)
│   ├── dadda_tree          N
│   │   ├── full_adder
│   │   └── half_adder
│   └── carry_select_adder  W=2N, BLK=4
├── normalizer           EXP_W, MAN_W
└── rounder              EXP_W, MAN_W
```

Packages:

- `booth_dadda_pkg` holds the matrix layout and the Dadda plan. These are
  elaboration-time functions that handle operands up to 64 bits.
- `fpm_pkg` holds the format constants and a `float32_t` struct.

For double precision, set `EXP_W=11, MAN_W=52, BIAS=1023`.

Synthesised with yosys' generic cells, the single-precision design is about
2,000 word-level cells. Almost all of them are the 1,900 cells of the Dadda
tree.

## Simulation

Each testbench checks its own results. At the end it prints
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `tb_fp_multiplier` | The two worked examples (784.125 and 1242.875), negative operands, a rounding carry, and 200,000 random products. Each is checked bit-exactly against an integer model of the algorithm and within ½ ulp of real arithmetic. It counts negative results, both normalisation cases, round-ups and rounding carries, and fails if any of them never occurs. Runs at default parameters. |
| `tb_fp_multiplier_double` | The double-precision configuration against the simulator's own `real` product. |
| `tb_booth_dadda_multiplier` | Exhaustive 8 × 8; 24 × 24 on 150·150, 250·50, 300·150, corner patterns and random operands. |
| `tb_booth_pp_generator` | That the rows sum to x·y, that no bit is outside the declared layout, that there are 13 rows, and exhaustive 6 × 6. |
| `tb_dadda_tree` | The 9-6-4-3-2 stage plan, and the reduction of random matrices. |
| `tb_carry_select_adder`, `tb_sign_unit`, `tb_exponent_adder`, `tb_bias_subtractor`, `tb_normalizer`, `tb_rounder` | Each unit against an independent expression. |

With Verilator 5, from the project root:

```
verilator --binary --timing -y rtl +libext+.sv \
    rtl/booth_dadda_pkg.sv rtl/fpm_pkg.sv tb/tb_fp_multiplier.sv \
    --top-module tb_fp_multiplier
./obj_dir/Vtb_fp_multiplier
```

Replace the testbench name to run any other testbench. Each simulation takes
under a second. To lint, run
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/*pkg.sv rtl/fp_multiplier.sv`.
Lint reports a few unused signals: the adder's carry out, the range bits of
the exponent, and the package's double-precision constants.
