# FIR filter with a shift-and-add multiplier block built by horizontal and vertical subexpression sharing

A filter with fixed coefficients does not need general multipliers. Every
product `c * x` can be built from shifted copies of `x` added together, one
for each nonzero digit of `c`. The shifts are wiring, so only the adders cost
area. This design takes a table of fixed coefficients and uses it to build a
transposed-form FIR filter

    y[n] = sum over k = 0 .. N-1 of c[k] * x[n-k]

Its multiplier block, which multiplies one input sample by all N
coefficients at once, is made only of adders/subtracters, hard-wired shifts
and, when vertical sharing is used, a short delay line of at most three
samples. The block is kept small by sharing
*common subexpressions* (partial products used by more than one tap), in
this order:

1. **CSD recoding.** Each coefficient is written in canonic signed digit
   form: digits are +1, 0 or -1, and no two nonzero digits are neighbours.
   This gives the fewest nonzero digits.
2. **Merging.** Zero coefficients get no adder. Taps whose final term lists
   are equal, or equal up to sign, share one product.
3. **Horizontal sharing.** Six two-digit patterns are looked for inside the
   coefficients. Each has two nonzero digits 2, 3 or 4 columns apart,
   written `[101] [10-1] [1001] [100-1] [10001] [1000-1]`, and they have the
   values 5, 3, 9, 7, 17 and 15. The most frequent pattern is extracted
   first, then the next, until no pattern occurs twice. Each pattern used is
   built once (`x*5`, `x*3`, …). Every occurrence then adds or subtracts a
   shifted copy of it. An occurrence with both digits flipped is the
   negated pattern and is subtracted.
4. **Vertical sharing.** Some nonzero digits are left over after step 3.
   Where one sits in the same column as a leftover digit of the tap `h`
   places later, the two are replaced by one term. The term is
   `x[n] + x[n-h]` if the digits have the same sign and `x[n] - x[n-h]` if
   not, and it is added into the earlier tap only. This works because in a
   transposed filter taps `h` apart see the input `h` samples apart.
   Heights 1, 2 and 3 are tried in that order. All the sums share one
   delay line, as long as the tallest pair used. A kind of pair (sum or
   difference, at one height) is used only if it lowers the cost
   `CF = 0.6 * registers + 1.0 * adders`. One pair saves one adder. Each
   kind costs one adder, plus any registers it adds to the delay line.
   Pairs are formed only between taps whose coefficient magnitude occurs
   once in the filter. A coefficient that occurs more than once is already
   a shared product, and pairing it would split the share.

All of this planning is done by SystemVerilog functions that run while the
design elaborates (`rtl/mcm_pkg.sv`). The synthesized hardware is only the
adder network the plan describes.

## How a plan becomes hardware

The plan (`mcm_pkg::plan_t`) has one row per tap and one entry per digit
column `j`. An entry can start up to three terms, each added or subtracted:

| field          | term added at column `j`                              |
|----------------|-------------------------------------------------------|
| `s_nz`, `s_neg`  | `±(x << j)`, a single leftover digit                |
| `h_pat`, `h_neg` | `±(P << j)`, where P is the output of pattern `h_pat` |
| `v_kind`, `v_h`, `v_neg`| `±((x[n] ± x[n-v_h]) << j)`, a vertical pair of height `v_h`, partner digit in tap `k+v_h` |

For horizontal patterns, `j` is the column of the pattern's lower digit.
Pattern ids 1 to 6 are 5, 3, 9, 7, 17 and 15, so an odd id is `2^L+1` and
an even id is `2^L-1`, with `L = 2 + (id-1)/2`.

Module hierarchy (all in `rtl/`):

```
mcm_fir                 top: ports clk, rst_n, en, x, y
├── mcm_block           the multiplier block
│   ├── cs_horizontal   x*(2^L±1), one per pattern the plan uses
│   ├── cs_vertical     delay line and x[n]±x[n-h], built if the plan has vertical pairs
│   └── mcm_tap_product one per distinct row: sums that row's terms
└── tfir_chain          transposed delay-and-add chain, registered output
```

`mcm_tap_product` adds its terms in one chain from the least significant
column up. A row with t terms costs t−1 adders/subtracters. `tfir_chain`
computes `z[k] = z[k+1]` (delayed one sample) `± prod[k]` and registers it.
A tap whose row is empty has no adder, only its register. A row can be
empty because the coefficient is zero, or because vertical pairs moved all
its digits into the previous tap.

**The point most likely to cause confusion:** with vertical pairs, the
block's output `prod[k]` is in general *not* `c[k]*x[n]`. It is
`sum over h of w[k][h]*x[n-h]`, with `sum over h of w[k-h][h] = c[k]`.
Only the filter output after the delay chain equals the convolution. For
the same reason the products are `WX + B + 3` bits wide. One tap can carry
digits of up to four coefficients, and a product must not wrap before the
chain sign-extends it. Likewise, a tap that
reuses a negated product receives the shared, non-negated signal, and its
chain adder subtracts it.

## Interface and timing of `mcm_fir`

| port    | dir | width                   | meaning |
|---------|-----|-------------------------|---------|
| `clk`   | in  | 1                       | clock |
| `rst_n` | in  | 1                       | asynchronous active-low reset; clears all state (past samples read as zero) |
| `en`    | in  | 1                       | sample enable; every register holds while it is low |
| `x`     | in  | `WX`                    | signed input sample, taken at a rising edge with `en` high |
| `y`     | out | `WX + B + clog2(N+1)`   | full-precision signed output; updated on the same edge that takes the sample it completes |

The filter takes at most one sample per clock. Latency is one clock: the
edge that takes `x[n]` loads `y[n]` into the output register. The
multiplier block and one chain adder make up the combinational path in
front of each register. The design has no pipelining inside the multiplier
block.

Parameters: `N` (taps, default 77, at most 256), `B` (coefficient width,
default 13, at most 15), `WX` (sample width, default 16), `SEED`, and
`COEF`. `COEF` has the packed type `mcm_pkg::coef_tab_t`, and entry k is the
16-bit signed coefficient of tap k. By default
`COEF = mcm_pkg::random_coefs(SEED, N, B)`, a random symmetric filter. It
comes from a 32-bit linear congruential generator
(`s = s*1664525 + 1013904223`) and about one tap in twelve is zero. To use
your own coefficients, pass a table:

```systemverilog
function automatic mcm_pkg::coef_tab_t my_coefs();
  mcm_pkg::coef_tab_t c = '0;
  int v [5] = '{-3, 40, 257, 40, -3};
  for (int k = 0; k < 5; k++) c[k] = v[k][15:0];
  return c;
endfunction
mcm_fir #(.N(5), .B(10), .COEF(my_coefs())) u_fir (...);
```

`mcm_pkg::plan_stats(COEF, N)` returns the number of horizontal and
vertical terms, merged and zero taps, adders/subtracters and registers. It
also gives the adder count without any sharing, for comparison. The
testbenches print these.

## What is fixed by the method and what is this design's choice

Taken from the method: the CSD form; the set of six patterns of span 3 to 5
digits and their negations; horizontal extraction first, then vertical; the
most frequent pattern extracted first, repeated until no pattern recurs;
dropping zero coefficients and merging equal ones; a transposed-form filter
with hard-wired shifts; the cost weights 1.0 per adder and 0.6 per register.

Choices of this design:

- **Pattern occurrences.** A pattern is found by a scan from the least
  significant column, and its digits are consumed as they are found.
  Occurrences are counted over distinct coefficient magnitudes. The digits
  between a pattern's two ends stay free for other terms.
- **Vertical pairs.** They are at most three samples tall, shortest first.
  They are taken greedily from tap 0 upward, and only between taps with a
  coefficient magnitude of their own. A kind is used when
  `pairs * 1.0 > 1.0 + 0.6 * (registers it adds)`. The method names a more
  elaborate vertical search, with "similar" as well as identical patterns,
  but does not define it.
- **Negated taps.** Taps equal up to sign are merged too. Their chain adder
  subtracts.
- **Not built.** The exact variant of the method is a brute-force
  permutation search over extraction orders. It runs offline and is not
  built. Oblique (diagonal) subexpressions are not used.
- **Sizes and timing.** The 16-bit samples, full-precision output,
  registered output, sample enable and asynchronous reset are not specified
  by the method.
- **Coefficients.** The default coefficients are random, like the method's
  benchmark instances, whose actual values are not available. Their sizes
  (taps × coefficient bits) are 77×13, 116×14, 138×14, 136×14, 92×13,
  142×14, 141×14, 146×13, 146×14, 142×14, 101×13, 98×13, 102×13, 105×13,
  101×13, 105×14, 143×14, 142×14, 216×13 and 144×14. The default build is
  the first of these. The others need `N` and `B` set accordingly, and all
  fit within the limits of 256 taps and 15-bit coefficients.

### Cost figures

`tb/tb_mcm_benchmarks.sv` builds all twenty sizes with random symmetric
coefficients. It reports the plan's CF at 48–52 % of that of plain CSD
multipliers with no sharing and no merging, 49.6 % on average. The default
77×13 filter (seed 1) has 136 adders/subtracters and 77 registers, against
315 adders for plain CSD. Much of this saving comes from merging the
coefficient pairs of a symmetric filter. In such a filter almost every
coefficient occurs twice, so vertical pairs are rare there. Sets with
distinct coefficients, like the hand-made test set, use them. These
figures count word-level
operators, not gates. They are not directly comparable with cost tables
computed on other coefficient sets or with other adder and register
accounting.

## Simulating

All files are SystemVerilog 2017. Each testbench prints
`TB_RESULT checks=<n> failures=<m>` and ends itself. Example with
Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/mcm_pkg.sv tb/tb_mcm_fir.sv --top-module tb_mcm_fir -o sim
./obj_dir/sim
```

| testbench | what it checks |
|-----------|----------------|
| `tb_mcm_pkg` | CSD recoding of every value from −9000 to 9000; the pattern values; for several random coefficient sets, that every plan sums back to its coefficients, that reused rows match, and that sharing lowers the adder count |
| `tb_cs_horizontal` | all six patterns against multiplication |
| `tb_cs_vertical` | `x[n]±x[n-h]` for h = 1, 2, 3 with a random sample enable |
| `tb_mcm_tap_product` | a hand-written row using every term kind and sign |
| `tb_mcm_block` | learns each tap's weights `w[k][h]` from an impulse, requires `sum over h of w[k-h][h] = c[k]`, then checks the linear model on random data |
| `tb_tfir_chain` | the chain against `sum ±prod[k][n-k]`, plus holds and reset |
| `tb_mcm_fir` | end to end, on a 15-tap set that exercises every mechanism (patterns, vertical sums and differences, a two-sample vertical pair, zero taps, equal and negated reuse) and on a 216×14 random set; full-scale inputs, enable gaps and a mid-run reset; counts each mechanism |
| `tb_mcm_fir_full` | the top at its default parameters, 1000 samples against the convolution |
| `tb_mcm_benchmarks` | all twenty benchmark sizes at once, outputs checked and costs printed (takes about two minutes to compile) |

Elaborating a plan is a loop over taps × columns × patterns. It takes
seconds even at 216 taps.
