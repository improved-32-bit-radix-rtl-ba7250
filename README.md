# Radix-16 Booth multiplier, 32 × 32 bits

A parallel multiplier spends most of its area and delay adding partial
products. An unsigned 32 × 32 AND-array has 32 of them. This design recodes the
multiplier `y` into **radix-16 Booth digits** in the range −8…+8. That leaves
**9 partial products**, one per digit. The cost is two extra steps:

* The odd multiples 3X, 5X and 7X of the multiplicand are computed up front.
  Three adders do this, and all digits share them.
* Each digit picks its multiple with a one-hot 8:1 multiplexer. The multiple
  is complemented when the digit is negative.

The 9 partial products go into a partial-product array. Levels of exact 4:2
compressors reduce the array to two rows, and one carry-propagate adder
produces the 64-bit product.

The whole datapath is combinational. It has no clock, no reset and no
handshake. `p` is valid one combinational delay after `x` and `y` change.

```
            x ──► 3X/5X/7X adders ──┐
            │                       ▼
 y ─► 9 × [recoder ─► 8:1 one-hot mux ─► XOR] ─► partial product array
                                                 (9 rows + hot-one row)
                                                        │
                                  4:2 compressor levels  10 → 6 → 4 → 2
                                                        │
                                            final adder ─► p = x·y
```

## Interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `x`  | in  | N     | multiplicand, unsigned |
| `y`  | in  | N     | multiplier, unsigned |
| `p`  | out | 2N    | product `x*y` |

The top module is `booth16_mult` and has one parameter, `N = 32`. `N` must be
a multiple of 4, and 8, 12, 16 and 32 are tested. The number of digits is
`N/4+1` and the array has `N/4+2` rows.

## Radix-16 recoding

Digit `i` (for i = 0 … N/4) is read from the overlapping 5-bit window
`w = {y[4i+3], y[4i+2], y[4i+1], y[4i], y[4i-1]}`:

    d_i = −8·w4 + 4·w3 + 2·w2 + w1 + w0        d_i ∈ {−8 … +8}
    x·y = Σ d_i · x · 16^i

The bit below the window of digit 0 is `y[-1] = 0`. Bits above `y[N-1]` are
0, so for unsigned operands there is one more digit than `N/4`. That last
digit can only be 0 or +1: it is `y[N-1]`.

`booth16_recoder` returns a `booth_digit_t` (see `booth16_pkg`). It holds
`onehot[7:0]`, where bit k selects (k+1)·X and no bit set selects 0, and the
sign bit `neg = w4`. The window `11111` is "−0". It gives `neg = 1` with no
magnitude selected. The complemented zero plus the hot one (see below) adds up
to 0, so it needs no special case.

`booth16_pp_select` builds the eight multiples:

| multiple | source |
|---|---|
| 1X | `x` |
| 2X | `x` shifted by one |
| 3X | 3X adder |
| 4X | `x` shifted by two |
| 5X | 5X adder |
| 6X | 3X shifted by one |
| 7X | 7X adder |
| 8X | `x` shifted by three |

It ANDs each multiple with its one-hot line and ORs the results together. An
XOR row then complements the selection when `neg` is set. The partial product
is `N+4` bits wide: up to 8X needs `N+3` bits, plus a sign bit.

## Negative digits and the partial product array

This part is the easiest to get wrong when changing the design.

For a negative digit, the XOR row gives the **one's complement** of |d|·X. The
missing `+1` is the **hot-one** bit `neg`, added in the array at the digit's
lowest position, bit `4i`. That saves an incrementer per digit.

Each partial product is a signed `N+4`-bit number. Sign-extending all nine of
them to 64 bits would make tall columns of copies. Instead, `booth16_pp_array`
uses the inverted-sign-bit method:

    −s·2^(N+3)  =  (1−s)·2^(N+3) − 2^(N+3)

The array stores each row with its sign bit inverted, moved left by `4i`. All
the `−2^(N+3)` terms together make one constant,
`K = −Σ_i 2^(4i+N+3) mod 2^(2N)`, which is computed at elaboration time. The
lowest one of K is at bit N+3 and the highest hot-one bit is at bit N, so K
and the hot-one bits share one extra row without overlapping. Everything is
modulo 2^(2N), which is safe because an unsigned N×N product fits in 2N bits.

For N = 32 the result is 10 rows of 64 bits: 9 partial products plus the
hot-one/constant row. Many bits of these rows are constant, and synthesis
folds them away.

## Reduction tree

`compressor_4to2` is the exact 4:2 compressor:

    x1 + x2 + x3 + x4 + cin = sum + 2·(carry + cout)

It is built from two full adders, and `cout` does not depend on `cin`. So in
`compressor_4to2_row` (W slices, with each `cout` feeding the next slice's
`cin`) no carry ripples further than one slice. The carry leaving bit W−1 is
dropped on purpose (modulo 2^W).

`booth16_reduction_tree` takes the rows four at a time at each level:

* Each group of four goes through one compressor row and comes out as two rows.
* If one or two rows are left over, they pass to the next level unchanged.
* If three are left over, they get a zero fourth row.

For 32 bits this gives 10 → 6 → 4 → 2 rows in three compressor levels.
`booth16_final_adder` is a plain `+`, so synthesis picks the adder
architecture.

## How this differs from the original scheme

* **Array height.** The scheme this design is based on adds a small circuit
  that lowers the array height by one. A selector picks one carry out of the
  3X/5X/7X adders. Two small blocks then compute 17 correction bits from the
  low bits of `x` and the top bits of `y`, and those bits are merged into the
  array. How these bits are formed is not specified in enough detail to
  rebuild, so that circuit is **not included**. This array has the
  conventional height, `N/4+2` rows. The product is exact either way; only the
  tree depth could differ.
* **Run-time accuracy.** The scheme pairs the multiplier with dual-quality 4:2
  compressors, which can switch at run time to approximate, lower-power modes
  by power-gating part of the circuit. The approximate logic is not specified,
  and power gating and tristate buffers are circuit-level features. So **only
  the exact compressor** is provided, and the multiplier is always exact.
* **This design's own choices:**
  * unsigned operands;
  * purely combinational logic;
  * the inverted-sign-bit sign handling;
  * the one-hot encoding of the recoder lines;
  * 7X computed as 8X − X;
  * the grouping of the compressor tree;
  * the behavioural final adder.

## Size

Coarse synthesis of the flattened `booth16_mult` at N = 32 gives about 2000
word-level and bit-level cells (about 1800 single-bit AND/OR/XOR gates), and
no flip-flops. Synthesized on its own with all-variable inputs, the reduction
tree has about 3500 cells. Inside the multiplier it is smaller, because the
constant bits of the array fold away.

## Files

| file | content |
|---|---|
| `rtl/booth16_pkg.sv` | `booth_digit_t`, digit-count and width functions |
| `rtl/booth16_mult.sv` | top level |
| `rtl/booth16_odd_multiples.sv` | 3X, 5X, 7X adders |
| `rtl/booth16_recoder.sv` | radix-16 recoder |
| `rtl/booth16_pp_select.sv` | 8:1 one-hot mux and complementing XOR |
| `rtl/booth16_pp_array.sv` | row alignment, sign bits, hot ones, constant |
| `rtl/compressor_4to2.sv` | exact 4:2 compressor slice |
| `rtl/compressor_4to2_row.sv` | W-bit row of slices |
| `rtl/booth16_reduction_tree.sv` | 4:2 compressor levels |
| `rtl/booth16_final_adder.sv` | carry-propagate adder |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench checks its block against values worked out in the testbench
itself, and prints `TB_RESULT checks=<n> failures=<m>`. Each has a watchdog.

* `tb_booth16_mult` runs the default 32-bit multiplier on corner values, on
  every digit pattern in every position, and on 20 000 random pairs. It also
  counts how often each mechanism was used:
  * each magnitude 1X…8X;
  * negative digits;
  * the −0 window;
  * a top digit of +1.

  A mechanism that never occurred counts as a failure.
* `tb_booth16_mult_small` covers three reduced sizes:
  * 8 × 8, exhaustively;
  * 12 × 12, for every multiplier value (this size exercises the three-row
    case of the tree);
  * 16 × 16, at random.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl +libext+.sv \
    rtl/booth16_pkg.sv tb/tb_booth16_mult.sv --top-module tb_booth16_mult
./obj_dir/Vtb_booth16_mult
```

For another testbench, replace `tb_booth16_mult` with its name. The package
must come first on the command line.

Verilator lint (`-Wall`) reports only two unused-signal warnings. Both are in
`compressor_4to2_row`: the carry and `cout` leaving the top slice, which are
discarded on purpose.
