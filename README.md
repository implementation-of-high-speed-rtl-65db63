# Faithfully rounded fixed-width multiplier

A fixed-width multiplier takes two N-bit operands and returns only the upper
P bits of their 2N-bit product. The usual way to save area is to leave out the
low-order partial products and then add correction logic for the error that
causes. This design needs no correction logic. It plans four steps together:
**deletion** of low partial-product bits, **tree reduction**, **truncation** of
the low columns and **rounding**. Their combined error is then below one unit in
the last place (ulp) of the result. In other words, the result is always *faithfully rounded*:

    floor(a*b / 2^(2N-P))  <=  p  <=  floor(a*b / 2^(2N-P)) + 1

and p is exact whenever a*b is a multiple of 2^(2N-P).

The main configuration is 8 x 8 -> 8 bits (N = P = 8), unsigned. For example,
0x89 * 0xA5 = 0x584D gives p = 0x59. A second, independent part of the top
level is a direct-form FIR filter whose tap multipliers are the same circuit at
16 x 16 -> 24 bits.

Everything is combinational except the filter's delay line. All RTL is
SystemVerilog-2017 and is parameterised by N and P. The adder tree is not
written out by hand: it is generated at elaboration time from a plan computed
by constant functions in `tmul_pkg`.

## Columns, ulp and the error budget

Number the partial-product (PP) columns c = 0 .. 2N-1, where column c has
weight 2^c. Bit a[i]&b[j] sits in column i+j. The result keeps columns
K .. 2N-1 with K = 2N-P, so one ulp is 2^K (256 for 8 x 8).

Three things are lost or added on the way to p:

| step | what happens | amount (8 x 8) | bound |
|---|---|---|---|
| deletion | the lowest PP bits are never formed | D in 0 .. 113 | D <= ulp/2 |
| truncation | after reduction, both rows of columns 0 .. K-3 are dropped | T in 0 .. 126 | T <= ulp/2 - 2 |
| bias | the constant ulp - 1 is added to the PP matrix | 255 | |

The final adder then produces floor((a*b - D - T + ulp - 1) / ulp). Because
0 <= D + T <= ulp - 1, the numerator lies between a*b and a*b + ulp - 1. The
quotient is therefore floor(a*b/ulp) or one more, and it is exactly a*b/ulp
when a*b is a multiple of ulp. That is the faithful-rounding bound, and it
holds by construction for every N and P the planner accepts.

The bias can be read as three separate constants: 1/4 ulp to centre the
deletion error, 1/4 ulp to centre the truncation error, and 1/2 ulp for
rounding. Added up, they make exactly one ulp. A full ulp would turn 0 * 0 into
p = 1, so one unit of column 0 is taken off. The bias is injected as a single
word of ones in columns 0 .. K-1: one extra bit in each of those columns of the
matrix. Synthesis folds those constant inputs away.

## Deletion (`pp_generation`)

Bits are deleted in order of weight, starting from column 0 and moving up. The
next bit goes only while the total deleted weight stays within ulp/2. Inside a
column, bits with the smallest multiplicand index i go first. For 8 x 8 this
removes 14 of the 64 AND gates:

| column | PP bits | deleted |
|---|---|---|
| 0 | 1 | a0b0 |
| 1 | 2 | a0b1, a1b0 |
| 2 | 3 | all |
| 3 | 4 | all |
| 4 | 5 | a0b4, a1b3, a2b2, a3b1 (a4b0 kept) |

The deleted weight is 1 + 4 + 12 + 32 + 64 = 113. The module still has a full
N x N output array: deleted positions are constant 0 and the tree never reads them.

## Reduction tree (`pp_reduction`)

The level-0 matrix holds the kept PP bits plus the bias bits. For 8 x 8 the
column heights, from column 0 upward, are 1 1 1 1 2 7 8 9 7 6 5 4 3 2 1.

Each level walks the columns from the least significant one. Before placing
adders in a column, it counts the carries that the column below will send into
the next level. It then places the fewest full adders, plus at most one half
adder, so that the column's height in the next level meets the level's target.
The targets are the Dadda numbers ..., 13, 9, 6, 4, 3, 2, starting from the
largest one below the tallest column. Inside a column, the next level holds in
order: the adders' sums, the bits passed straight down, then the carries from
the column below. These rules fix every wire, and `tmul_pkg::make_plan` records
them as a packed table of heights and adder counts.

For 8 x 8 there are four levels:

| level | target | FA | HA | carry-only |
|---|---|---|---|---|
| 1 | 6 | 6 | 3 | |
| 2 | 4 | 11 | 1 | |
| 3 | 3 | 7 | 1 | |
| 4 | 2 | 8 | 0 | 1 HC |

After the last level every column has at most two bits. Columns below K-2 are
then dropped. A last-level adder whose sum would land in a dropped column only
needs its carry. It is built as a carry-only cell: `full_carry` (FC, majority)
or `half_carry` (HC, AND). The module outputs the two rows of columns
K-2 .. 2N-1, which are P+2 bits wide.

Why both rows of the K-2 lowest columns are dropped, and not a single row of
K-1 columns: once one row is removed, the bits left in those columns could only
reach the result through a carry chain. Dropping both rows keeps the truncated
value at most 2(2^(K-2) - 1) < ulp/2 without that chain.

At 16 x 16 -> 24 (the filter's multiplier) the plan has six levels: 192 FA,
13 HA and 1 HC.

## Final adder (`ripple_carry_adder`, `trunc_mult`)

A WIDTH-bit ripple-carry adder made of `full_adder` stages adds the two rows.
In the multiplier it is P+2 bits wide (10 instead of 16). The top P sum bits
are p. The two lowest sum bits only feed the carry, and the carry out is always
0, because a*b + ulp - 1 < 2^(2N) when P >= N.

The multiplier's delay is the tree depth (four full-adder levels at 8 x 8) plus
the ripple chain of P+2 stages.

## FIR filter (`fir_filter`)

The filter is a direct-form FIR:

    y = sum over k of trunc_mult(x(n-k), C_k)

The samples and coefficients are 16 bits, and each product is a 24-bit
faithfully rounded value of x*C / 2^8. There are TAPS taps (default 8).

A chain of TAPS-1 registers forms the delay line: x enters on each rising
clk edge, and a synchronous active-low rst_n clears it. The products are
summed in a linear adder chain. The output y is combinational from x, the delay
line and the coefficients, so there is no latency. y is P + clog2(TAPS) = 27
bits wide and cannot overflow. Each product errs by less than one ulp, so y is
within TAPS ulps of the exact sum. Coefficients are input ports.

## Top level (`tmul_top`)

The multiplier (`a`, `b` -> `p`, 8 bits) and the filter (`clk`, `rst_n`, `x`,
`coef[8]` -> `y`) stand side by side, each with its own ports.

| parameter | default | meaning |
|---|---|---|
| N, P | 8, 8 | multiplier operand and result width |
| FIR_N, FIR_P | 16, 24 | filter sample/coefficient width and product width |
| TAPS | 8 | filter taps |

`trunc_mult`, `pp_generation` and `pp_reduction` accept N <= 32 and
N <= P <= 2N-2. An elaboration-time `$error` reports a size outside this range.

## Files

| file | content |
|---|---|
| `rtl/tmul_pkg.sv` | constant functions: deletion mask, bias, reduction plan |
| `rtl/pp_generation.sv` | AND array without the deleted bits |
| `rtl/pp_reduction.sv` | generated FA/HA/FC/HC tree, bias injection, truncation |
| `rtl/ripple_carry_adder.sv` | final carry-propagate adder |
| `rtl/full_adder.sv`, `half_adder.sv`, `full_carry.sv`, `half_carry.sv` | the four cells |
| `rtl/trunc_mult.sv` | the multiplier |
| `rtl/fir_filter.sv` | FIR filter built from `trunc_mult` |
| `rtl/tmul_top.sv` | top level |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal -y rtl -Irtl rtl/tmul_pkg.sv \
        tb/tmul_top_tb.sv --top-module tmul_top_tb
    obj_dir/Vtmul_top_tb

To run another testbench, replace `tmul_top_tb` with its name. Each testbench
prints `TB_RESULT checks=<n> failures=<n>` and stops on its own, with a
watchdog in case it hangs. A build of the top or of `trunc_mult_tb` takes under
a minute; each run takes less than a second.

What the tests check:

- `trunc_mult_tb`:
  - all 65,536 operand pairs at 8 x 8 against the faithful bound and the exactness rule;
  - the 0x89 * 0xA5 = 0x59 example;
  - that results are rounded both up and down;
  - 20,000 random pairs plus corner cases at 16 x 16 -> 24.
- `pp_generation_tb`: recomputes the deletion set itself and checks every PP bit for every operand pair.
- `pp_reduction_tb`: checks that the two rows carry the kept PP sum plus bias, less a truncated part of 0 .. 126.
- `fir_filter_tb`:
  - exact impulse and step responses, using coefficients that are multiples of 256;
  - 2,000 random samples within the TAPS-ulp bound;
  - reset.
- `tmul_top_tb` (default parameters):
  - the exhaustive multiplier test;
  - the filter's impulse response through every tap, random data and reset.
  - It counts deleted bits at 1, results rounded up, rounded down and exact, and the impulse reaching each tap. It fails if any of these never happens.

To try another size, change N and P on `trunc_mult` (for example
`#(.N(12), .P(12))`). The plan, tree and adder widths follow automatically;
`trunc_mult_tb` shows how to check the result.

## How far it follows the source description, and where it departs

Taken from the source description:

- the 8 x 8 size with an 8-bit result;
- the steps and their order: deletion, then reduction, truncation, rounding and a final CPA;
- the error ranges of deletion and truncation (each within half an ulp), and the 1/4, 1/4 and 1/2 ulp bias constants;
- column-wise reduction that starts from the least significant column and counts incoming carries;
- carry-only FC/HC cells;
- a ripple-carry final adder;
- the FIR structure with 16/16/24-bit widths.

This design's own choices:

- **Deletion order and the exact deleted set.** The source's figures reserve
  the top row of the low columns and mark further "unnecessary" bits; that
  refinement is not reproduced.
- **Bias.** The three constants are merged into one word of value ulp - 1, not
  exactly one ulp, so that the bound is strict.
- **Truncation shape.** Both rows of the lowest 2N-P-2 columns are dropped. The
  source drops one row of N-1 columns. As a result the final adder is P+2 bits
  wide, where the source shows P+1.
- **Adder placement.** Adders are placed with Dadda targets, so the adder
  counts differ from the source's reduction diagram. The source shows
  26 FA, 3 HA, 4 FC and 1 HC in four levels; this design uses 32 FA, 5 HA and
  1 HC, also in four levels.
- **Unsigned operands.** The source only gives unsigned examples.
- **FIR filter details:** the tap count (8), the reset, the output width and
  the purely combinational adder chain.

The source's area and power figures (582 gates, 88 mW on a Spartan-3E) are
not reproduced and cannot be checked here.
