# Radix-4 Booth signed multiplier

A signed multiplier adds shifted copies of the multiplicand X, one for each bit of
the multiplier Y. Radix-4 ("modified") Booth recoding halves the number of copies.
It rewrites Y, two bits at a time, as digits in {-2, -1, 0, +1, +2}. An n-bit
multiplier then needs only n/2 partial products instead of n. Each partial product
is still cheap to form: it is 0, X or 2X, possibly negated.

This RTL is a combinational two's complement multiplier. Its default size is 8 x 8 bits
with a 16-bit product. Both operand widths are parameters.

## The recoding

Append a constant `y[-1] = 0` below the least significant bit of Y. For every even
k from 0 to n-2, look at the three bits `y[k+1] y[k] y[k-1]` and form

    z_k = -2*y[k+1] + y[k] + y[k-1]

| y[k+1] y[k] y[k-1] | z_k |
|--------------------|-----|
| 000 | 0 |
| 001 | +1 |
| 010 | +1 |
| 011 | +2 |
| 100 | -2 |
| 101 | -1 |
| 110 | -1 |
| 111 | 0 |

Then `Y = sum z_k * 2^k` holds for any two's complement Y with an even width n, so
`P = X*Y = sum (z_k * X) * 2^k`. Neighbouring triplets overlap by one bit. The sign
bit of Y is the `y[k+1]` of the top triplet, and its weight of -2 is what makes the
identity hold for negative Y.

## Forming one row without a carry chain

`booth_encoder` turns a triplet and X into an (XW+1)-bit value `pp` and one bit
`neg`, so that `z_k*X = signed(pp) + neg`:

| z_k | pp | neg |
|-----|----|-----|
| 0 | all zeros | 0 |
| +1 | X sign-extended by one bit | 0 |
| +2 | X shifted left one place | 0 |
| -1 | bitwise NOT of (X sign-extended) | 1 |
| -2 | bitwise NOT of (X shifted left) | 1 |

A negative row is left as a one's complement. The "+1" that would make it a two's
complement is not added in the row, because that would need a carry chain there.
It becomes a single bit that the final adder takes in at the row's least
significant position.

One extra bit of row width suffices even for the worst case, -2 times the most
negative X. For XW = 8 and X = -128, the value is +256, which does not fit in nine
signed bits. `pp` is nonetheless `0_1111_1111` (+255), and `neg` supplies the
last 1. The exhaustive test covers this case.

## Aligning and adding

`booth_pp_adder` sign-extends row i (the row for digit z_{2i}) to XW+YW bits and
shifts it left by 2i. It also builds one more row holding `neg[i]` at bit 2i. For
the default size there are five 16-bit rows:

    row 0   a a a a a a a a8 a7 a6 a5 a4 a3 a2 a1 a0
    row 1   b b b b b b8 b7 ... b0  0  0
    row 2   c c c c8 c7 ...  c0  0  0  0  0
    row 3   d d8 d7 ...  d0  0  0  0  0  0  0
    row 4   0 ... 0  u3  0  u2  0  u1  0  u0

The same module adds the rows modulo 2^(XW+YW), and that sum is the exact product.
The rows are fully sign-extended rather than compressed with sign-extension
constants. The adder is a plain chain of additions, and synthesis decides its
structure. A faster implementation would replace it with a carry-save tree (for
example Wallace or Dadda) and one final carry-propagate adder. Such a change does
not affect the interface.

## Modules

| File | Purpose |
|------|---------|
| `rtl/booth_pkg.sv` | `booth_digit_t` enum of the five digit values; `booth_recode()` (the table above); `booth_digit_value()` |
| `rtl/booth_encoder.sv` | one row: triplet and X to digit, `pp`, `neg` |
| `rtl/booth_pp_adder.sv` | sign extension, shifting, the `neg` correction row, and the multi-operand sum |
| `rtl/booth_mult.sv` | top: YW/2 encoders feeding the partial-product adder |

Top-level interface of `booth_mult #(XW = 8, YW = 8)`:

| Port | Dir | Width | |
|------|-----|-------|--|
| `x` | in | XW | multiplicand, two's complement |
| `y` | in | YW | multiplier, two's complement; YW must be even |
| `p` | out | XW+YW | product, two's complement, exact |

The multiplier has no clock, reset or handshake. `p` is valid one combinational
delay after the inputs change. If you need a pipelined version, add registers
around the instance or between the encoders and `booth_pp_adder`.

## Where this design goes beyond the 8 x 8 original

- The classic description builds only the 8 x 8 case. Here the multiplicand and
  multiplier widths are separate parameters, and the rows, shifts and correction
  bits are generated from them. An odd `YW` is rejected at elaboration. To use
  one, sign-extend Y by one bit first.
- The row digit is exposed as an enum output of each encoder. The top collects
  these outputs but does not use them, so lint reports `digit` as unused in
  `booth_mult`.

## Verification

Each testbench checks its results against values it computes itself and ends by
printing `TB_RESULT checks=N failures=M`.

| Testbench | What it does |
|-----------|--------------|
| `tb/booth_encoder_tb.sv` | All triplets and all X values at XW = 8 and XW = 5. Checks the digit, checks `signed(pp) + neg == z*X`, and checks that `neg` is set exactly for negative digits. |
| `tb/booth_pp_adder_tb.sv` | Random, all-ones and all-zeros rows at 8x8, 6x10 and 16x16. Compares against `sum (signed(pp_i) + neg_i) * 4^i mod 2^(XW+YW)` computed in 64-bit integers. |
| `tb/booth_mult_tb.sv` | Exhaustive run of all 65,536 operand pairs at the default 8 x 8 size. Counts each digit value used in each row and fails if one never occurs (row 0 cannot produce +2). Also requires the -2 times most-negative-X case. |
| `tb/booth_mult_wide_tb.sv` | 16x16, 12x6 and 5x10 instances. Runs every combination of the corner operands 0, 1, -1, max and min, then 100,000 random pairs. |

All four pass with zero failures. For each block, a copy with one deliberate error
was also run against its testbench, and the testbench caught it. The errors were:

- a -2 row missing its +1;
- zero extension instead of sign extension;
- `y[-1]` tied to 1.

To run a testbench with Verilator:

    verilator --binary --timing -Wall -Wno-fatal -y rtl -y tb \
        rtl/booth_pkg.sv tb/booth_mult_tb.sv --top-module booth_mult_tb -o sim
    ./obj_dir/sim

Replace `booth_mult_tb` with any other testbench name. Each run takes well under a
second.
