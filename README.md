# 32-bit multiply-accumulate unit with a redundant-binary multiplier

A multiply-accumulate (MAC) unit computes `acc <= acc + a*b` once per clock. Its speed is set
by the multiplier. This design makes the multiplier fast with **redundant-binary (RB)
arithmetic**. Partial products are added without any carry propagation, and only one
carry-propagating adder remains, at the very end.

The multiplier also needs no separate *error-correcting word*. A conventional RB Booth
multiplier needs that extra row of constants and `+1` bits. Without it, a 32 x 32 multiplier
reduces **8** RB partial-product rows in **3** carry-free stages instead of 9 rows in 4.

```
 a[31:0] ──┐
           ├─► rb_multiplier ──► product[63:0] ──► rca (64-bit ripple) ──► pipo_reg ──► acc[64:0]
 b[31:0] ──┘    (Booth + RB rows,                    ▲        carry ─────► bit 64      │
                 3 RB adder stages,                  └──────── acc[63:0] ◄────────────┘
                 RB→binary converter)
```

Everything is SystemVerilog-2017 and synthesizable. The operand width is a parameter, `N`
(default 32). Any power of two from 8 up works, and the default is the main configuration.

## Redundant-binary numbers

An RB digit is -1, 0 or +1. It is stored as two bits `(pos, neg)` with value `pos - neg`. So a
W-digit RB number is simply two W-bit vectors `P` and `M`, worth `P - M`.

Adding two RB numbers can be done column by column, with no carry chain (see
[the RB adder](#rb-adder-rbfa-rbha-rb_adder)). A difference of two binary numbers is already an
RB number for free: put one on the `pos` side and the other on the `neg` side.

All RB words here are taken modulo 2^(2N). The final product is a 2N-bit two's-complement
number, so that is enough, and bits that would fall above column 2N-1 are dropped.

## Partial product generation (`rbmppg2`)

This is the least obvious part of the design.

**Booth rows.** The multiplier `y` (signed) is radix-4 Booth recoded into N/2 digits
`d(j) = -2*y[2j+1] + y[2j] + y[2j-1]` in {-2..2}, with `y[-1] = 0`. `mbe_encoder` turns each
digit into `one`, `two` and `neg` selects. Digit j contributes `d(j)*x*4^j`. In two's complement
that row is `v = (|d|*x) ^ {neg}` plus a `+neg` bit at its least significant bit (LSB).

**Pairing (`rbbe2`).** RB row i combines Booth rows 2i and 2i+1:

* the even row's `v_e` goes on the positive side, at column 4i;
* the odd row's `v_o` is inverted and goes on the negative side, at column 4i+2, because
  `+4*v_o = -4*~v_o + constant`.

**Sign-extension folding.** Sign extension and the inversion leave constants behind. This design
folds them, together with the two sign bits `a = v_e[N]` and `b = v_o[N]`, into three columns
at the top of the row:

| row column | N | N+1 | N+2 |
|---|---|---|---|
| pos | a | a | ~a & ~b |
| neg | – | – | a & b |

These columns are worth `-a + 4*~b` (in units of 2^N). That is exactly what the sign bits and
the constants add up to, so no constant is left over. Row i then covers only columns
4i .. 4i+N+2.

**The correction bits travel to the next row.** What remains of row i's correction word is two
bits:

* `+neg_e` at column 4i;
* `-~neg_o` at column 4i+2 (the odd row's `+neg` combined with the inversion's -1).

Row i+1 starts at column 4i+4, so both of those columns are still empty in row i+1. The
generator puts the bits there: `pos[4i]` and `neg[4i+2]` of row i+1. No row is added.

**The last row (`rbbe2_last`).** No row follows the last one, so its two Booth digits are
treated as one radix-16 digit:

`e = d(N/2-2) + 4*d(N/2-1) = -8y[N-1] + 4y[N-2] + 2y[N-3] + y[N-4] + y[N-5]`, with e in -8..8.

The row is written as the difference of two multiples. It sits at column N-4 and is computed
modulo 2^(N+4):

| \|e\| | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|---|
| pos | 0 | x | 2x | 4x | 4x | 5x (RB) | 8x | 8x | 8x |
| neg | 0 | 0 | 0 | x | 0 | 5x (RB) | 2x | x | 0 |

The two sides swap when e < 0. Here x, 2x, 4x and 8x are shifts of the sign-extended `x`. The
negative side holds a magnitude, not an inverted word, so no `+1` bit is left over.

Only 5x is not a difference of two shifts. It is written straight in RB form from
`a = x` and `b = 4x`: `pos[k] = a[k-1] | b[k-1]`, `neg[k] = a[k] ^ b[k]`. This works because
`a[k] + b[k] = 2(a[k]|b[k]) - (a[k]^b[k])` in every column.

For N = 32 the resulting eight rows look like this. Row 0 covers columns 0-34. Row i (1..6)
covers 4i-4 .. 4i+34, its lowest columns being the correction bits of row i-1. Row 7 covers
24-63.

## RB adder (`rbfa`, `rbha`, `rb_adder`)

Each column of the RB adder is an `rbfa`, a 4:2 compressor fed with `(a.pos, ~a.neg, b.pos,
~b.neg)`:

* `h_out = maj(a.pos, ~a.neg, b.pos)` goes to the next column and does not depend on `h_in`;
* a full adder sums `(a.pos ^ ~a.neg ^ b.pos, ~b.neg, h_in)` into `s` and `c_out`;
* the column's result digit is `(s, ~c_in)`, where `c_in` is `c_out` of the column below.

The lowest column gets `h_in = 0` and `c_in = 1`. With those values the column sums add up to
exactly `A + B` modulo 2^W (the `-1` per digit hidden in `~neg` cancels out). Every output digit
depends on three neighbouring columns at most, so the delay does not depend on the width.

`rbha` is the same cell with a zero second digit. `rb_adder` uses it in the columns below
`B_LO`, where the caller guarantees that operand b is zero.

## Reduction tree and conversion

**`rbpp_tree`** adds neighbouring rows pairwise in `log2(N/4)` stages: 8 → 4 → 2 → 1 for N = 32.
Each adder's `B_LO` is set from the lowest column its second operand can reach (4·row - 4).

**`rb_nb_converter`** is the only carry-propagating step. It computes
`P - M = P + ~M + 1` with a hybrid parallel-prefix/carry-select adder:

* 4-bit blocks form their sum twice by rippling (block carry-in 0 and 1);
* a Kogge-Stone network over the 16 block generate/propagate pairs, with global carry-in 1,
  picks one of the two sums.

| N | RB rows | accumulation stages | with a separate correction word |
|---|---|---|---|
| 8 | 2 | 1 | 2 |
| 16 | 4 | 2 | 3 |
| 32 | 8 | 3 | 4 |
| 64 | 16 | 4 | 5 |

## MAC datapath and control (`rb_mac`, `rca`, `pipo_reg`)

The product goes to a 2N-bit ripple-carry adder (`rca`, a chain of `full_adder` cells) together
with the low 2N bits of the accumulator. `{carry, sum}` is loaded into the (2N+1)-bit
parallel-in parallel-out register `pipo_reg`. Bit 2N keeps the carry-out of the latest addition
and is not fed back.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | asynchronous reset, active low, clears `acc` |
| `clr` | in | 1 | synchronous clear at the next edge; wins over `en` |
| `en` | in | 1 | add `a*b` at the next edge |
| `a`, `b` | in | N | signed operands |
| `product` | out | 2N | `a*b`, combinational |
| `acc` | out | 2N+1 | `{carry, running sum}` |

**Timing.** The multiplier and the adder are combinational, so one MAC completes per clock.
Operands applied in a cycle are included in `acc` right after that cycle's rising edge. There
is no pipelining. The critical path runs through the Booth selects, three RB adder stages, the
converter and the 64-bit ripple adder.

`acc[2N-1:0]` is the signed sum of products modulo 2^(2N). Signed overflow is not flagged; bit
2N is a plain carry-out.

## Where this design makes its own choices

* **Signedness.** Operands are two's complement, because that is what modified Booth recoding
  multiplies.
* **Last row.** The source architecture merges the last row's correction bits by gate-level
  simplification involving the last row's two LSBs and the first row's two MSBs. It does not
  publish the equations. The radix-16 recoding of the last row above is this design's
  replacement, so the generator is seven `rbbe2` blocks plus one `rbbe2_last` rather than
  eight identical blocks. It is also correction-free and leaves row 0 untouched. It needs only multiplexers, plus one OR/XOR level for 5x.
* **Row layout and sign-extension folding.** The three top columns of each row and the column
  positions are derived here. The architecture only fixes the principle that each correction
  word moves into the next row.
* **RBFA/RBHA cells.** These are built as 4:2 compressors on the (pos, ~neg) encoding.
* **Converter.** It uses a Kogge-Stone block-carry network with 4-bit carry-select blocks. The
  architecture names a hybrid parallel-prefix/carry-select (Ling) adder but does not give its
  structure.
* **Accumulator.** The register is 65 bits: a 64-bit sum plus the carry. The architecture
  describes the register both as 64-bit and as holding a 65-bit result. The clear, enable and
  reset controls are additions.
* **Operand memory.** The operands would come from a memory, which is not part of this RTL.
  `a` and `b` are plain ports.

## Files

`rtl/`: `rb_mac_pkg` (shared type `booth_sel_t`, default width), `mbe_encoder`, `rbbe2`,
`rbbe2_last`, `rbmppg2`, `rbfa`, `rbha`, `rb_adder`, `rbpp_tree`, `rb_nb_converter`,
`rb_multiplier`, `full_adder`, `rca`, `pipo_reg`, `rb_mac` (top).

`tb/`: one self-checking testbench per module, `tb_<module>.sv` (the `full_adder` cell is covered by `tb_rca`). Each one compares against
integer arithmetic computed inside the testbench and ends with a `TB_RESULT checks=.. failures=..`
line.

* `tb_rb_mac` runs the MAC at its default size: random operands, enables and clears, a short
  dot product, operands that force carry-out, and an asynchronous reset in mid-stream. It
  counts each of these events and fails if any never happens.
* `tb_rb_multiplier_sizes` builds the multiplier at N = 8, 16, 32 and 64. It checks the stage
  counts in the table above and the products.

## Simulating

With Verilator 5:

```
verilator --binary --timing -y rtl -y tb +libext+.sv rtl/rb_mac_pkg.sv tb/tb_rb_mac.sv \
          --top-module tb_rb_mac && ./obj_dir/Vtb_rb_mac
```

Replace `tb_rb_mac` with any other testbench name. The package must be listed first; the other
modules are found through `-y`. Every testbench finishes in well under a second of simulation
time.

To change the width, set `N` on `rb_mac` or `rb_multiplier`. It must be a power of two, at
least 8.
