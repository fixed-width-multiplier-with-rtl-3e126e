# Fixed-width modified Booth multiplier with a Booth-driven compensation bias

A fixed-width multiplier takes two n-bit two's-complement operands and returns
only an n-bit product: the top n bits of the (2n-1)-bit result. Dropping the
n-1 low columns before they are added saves about half of the adder cells. The
cost is accuracy. Direct truncation discards every carry those columns would
have sent upward, and that error is always in the same direction.

This design keeps the cheap structure and buys most of the accuracy back with a
very small circuit. The carry that the truncated columns would produce is
estimated from the radix-4 Booth encoder outputs, which the multiplier
computes anyway. For 8-bit operands the whole estimator is one three-input AND
gate. The maximum error drops from 4 output LSBs (direct truncation) to 1 LSB.
The mean error drops by a factor of five.

The RTL is combinational SystemVerilog. The operand width `N` is a parameter
with default 8; 10 and 12 are also supported.

## The partial-product matrix and where it is cut

Radix-4 Booth recoding turns Y into n/2 digits
`d(i) = -2*y(2i+1) + y(2i) + y(2i-1)` in {-2,-1,0,+1,+2}, with `y(-1) = 0`.
Each digit selects one partial-product row of n+1 bits, placed at column 2i:

* `0` selects nothing.
* `±X` selects X.
* `±2X` selects X shifted left by one.
* A negative digit inverts the row. The missing +1 (the correction bit `cor`)
  is added at the row's LSB column, 2i.

For n = 8 (columns 15..0; `b` = row bit, `s` = sign extension, `c` = correction bit):

```
column        15 ...  9  8  7 |  6 |  5  4  3  2  1  0
row 0          s ...  s  b  b |  b |  b  b  b  b  b  b
row 1          s ...  b  b  b |  b |  b  b  b  b
row 2          s ...  b  b  b |  b |  b  b
row 3          s ...  b  b  b |  b |
correction                    | c3 |     c2    c1    c0
               MP (kept)      |LP_major| LP_minor
```

The n-1 = 7 low columns form **LP**, the part that is cut off. The rest is
**MP**, which is added exactly. LP itself is split in two:

* **LP_major** is LP's top column (column n-2). It holds one bit from every row
  plus the last row's correction bit, n/2+1 bits in all. Its adder cells are
  kept.
* **LP_minor** is every column below that. Its adder cells are removed.

The only thing lost is the carry that LP_minor would pass into LP_major. That
carry is the quantity the design estimates.

## Estimating the LP_minor carry

LP_minor holds bits only from rows 0 .. n/2-2. A row whose digit is zero
contributes nothing. So the carry depends strongly on which of those digits are
non-zero. Let `y''(i) = 1` when digit i is non-zero (that is, the encoder's
`zero` output is low).

The estimation rule comes from an exhaustive count. For every pattern of
`y''(0..n/2-2)`, every operand pair was counted by the carry it actually
produces, and the most frequent carry was chosen. Where two carries were about
equally frequent, 0 was chosen.

| n  | estimated carry | signals |
|----|-----------------|---------|
| 8  | 1 if `y''2 & y''1 & y''0`, else 0 | CARRY1 only |
| 10 | 1 if at least three of `y''0..y''3` are set | CARRY1 only |
| 12 | 0 for up to two flags set, 1 for three or four, 2 for all five | CARRY1 = at least three set, CARRY2 = all five set |

Both CARRY signals have the weight of the LP_major column. `carry_estimator`
implements the table. Other widths are rejected at elaboration, because the
rule has only been derived for 8, 10 and 12 bits.

## Forming the compensation bias

`lp_major_adder` adds three things in the LP_major column:

1. The column's own bits.
2. The estimated carry.
3. One rounding constant of the same weight, worth half an output LSB.

The carries this sum passes into column n-1 are the **compensation bias**, with
`bias = floor((ones + CARRY1 + CARRY2 + 1) / 2)`. `mp_adder` adds the bias to MP.

The rounding constant is this implementation's choice. Estimating only the
carry that LP_minor sends into LP_major, and then dropping LP_major's own
remainder, biases every result downward. Without the constant, the 8-bit
maximum error is 1.5 LSB and the mean error is about 78 (in units of the full
product's LSB). With the constant, the error figures below come out.

## Accuracy

The error is measured as `|x*y - p*2^(n-1)|`, in units of the full product's
LSB, over all operand pairs (mean-square error = sum of squares / 2^(2n)).

| n  | design: max / mean / mean-square | direct truncation: max / mean |
|----|------------------------------------|-------------------------------|
| 8  | 128 / 38.43 / 2220.25               | 512 / 192.25 |
| 10 | 768 / 164.733 / 41122.25            | 2560 / 960.25 |
| 12 | 3072 / 682.67 / 707750.25           | 12288 / 4608.25 |

Published figures for this scheme:

* 8 bits: 128, 38.24 and 2220.5.
* 10 bits: 768, 164.733 and 4.11e4.

The 10-bit figures match exactly. The 8-bit maximum matches exactly, and the
8-bit mean and mean-square differ by less than 0.5 %.

The testbenches also recount the actual LP_minor carry histograms. They match
the published 8-bit and 10-bit tables entry for entry. They match 190 of the
192 entries of the 12-bit table. For pattern 01111 the count gives 46944 and
47728 cases with carry 0 and carry 3. The published table lists 46994 and
47678: both are 50 off, with the same row total.

## Modules

| module | role |
|--------|------|
| `fwm_pkg` | `booth_enc_t` (one, two, neg, zero, cor) and `supported_width()` |
| `booth_encoder` | one radix-4 digit: triplet → control signals |
| `booth_ppgen` | one N+1-bit partial-product row from X and the controls |
| `carry_estimator` | non-zero-digit flags → CARRY1/CARRY2 |
| `lp_major_adder` | LP_major column + estimate + rounding constant → bias |
| `mp_adder` | MP columns + bias → n-bit product |
| `fwm_booth_mult` | top: n/2 encoders and row generators wired to the three adders |

Top-level interface (`fwm_booth_mult #(N = 8)`):

* `x[N-1:0]` and `y[N-1:0]` are the operands, in two's complement.
* `p[N-1:0]` is columns n-1 .. 2n-2 of the compensated sum, which is about
  `x*y / 2^(N-1)`.

There is no clock. The output is valid one combinational settling time after
the inputs change. To pipeline the design, register the inputs and the output
around it.

## Where the RTL makes its own choices

* **Row format.** Rows are N+1 bits: X is sign-extended by one bit so that 2X
  fits. `zero` forces the whole row to 0. This matters for triplet 111, which
  sets `neg` but must give a zero row and no correction bit.
* **MP adder.** Each row is sign-extended and the MP columns are added as
  words. Synthesis is left to build the adder. A hand-built array or tree with
  sign-extension-prevention constants gives the same MP sum.
* **Overflow.** An n-bit output cannot hold the one product
  `(-2^(n-1)) * (-2^(n-1)) = 2^(2n-2)`, so it wraps to `-2^(n-1)`. No other
  input pair overflows at n = 8, 10 or 12. The testbenches check this for every
  input pair.
* **Rounding constant** in the LP_major column, as described above.
* **Sum-of-products forms** for n = 10 and n = 12. These follow directly from
  the per-pattern choices in the estimation table.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by itself.
Each one has a watchdog that counts a failure if the run hangs.

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/fwm_pkg.sv tb/fwm_ref_pkg.sv tb/tb_fwm_booth_mult.sv \
    --top-module tb_fwm_booth_mult
./obj_dir/Vtb_fwm_booth_mult
```

Swap in another testbench name to run a different test:

* `tb_fwm_booth_mult`: n = 8, all 65536 pairs. Checks every output, the 8-bit
  error figures, the 8-bit carry histogram, and that every mechanism occurs:
  each Booth digit, estimated carry 0 and 1, bias values 0..3, and the
  wrapping product.
* `tb_fwm_booth_mult_n10`: n = 10, all 2^20 pairs. Same checks as above with
  the 10-bit figures and histogram.
* `tb_fwm_booth_mult_n12`: n = 12, all 2^24 pairs (a few seconds). Checks the
  12-bit histogram and estimated carry 2.
* `tb_booth_encoder`, `tb_booth_ppgen`, `tb_carry_estimator`,
  `tb_lp_major_adder` and `tb_mp_adder`: exhaustive or random unit tests.

`tb/fwm_ref_pkg.sv` is the reference model. It rebuilds the matrix from the
Booth digits with plain integer arithmetic, without reusing the RTL, and
returns the exact product, the LP, LP_minor and LP_major sums, the flag
pattern and the expected fixed-width result.

## Changing it

* **Operand width.** Set `N` to 8, 10 or 12. Another width needs a new branch
  in `carry_estimator` and a matching rule in `fwm_ref_pkg::est_carry`. To
  derive the rule, count the LP_minor carry for every flag pattern (the
  reference model returns `lp_minor >> (n-2)`) and pick the most frequent
  value for each pattern.
* **Rounding constant.** To try the estimate without it, change the initial
  `SW'(1)` in `lp_major_adder` to `SW'(0)`. The error-figure checks will then
  fail, as intended.
