# Reconfigurable hierarchical Wallace tree multiplier and multi-precision Booth multiplier

This design has two array multipliers, both built from the same small set of
cells: half and full adders, 4:2 and 5:2 compressors, and a carry look-ahead
adder (CLA) made of modified full adders.

* **`wallace_mult8`**: an unsigned 8x8 Wallace tree multiplier that can also
  run as a 4x4 multiplier. Its reduction tree is split into three levels. In
  4-bit mode only the first level does any work, and the other two are held
  still so that they use no dynamic power.
* **`booth_mult_8n`**: a radix-4 Booth multiplier built from 8x8 Booth
  units, four of them at its default 16x16 size. It gives either one
  full-width product, or independent 8x8 products side by side. Operands are
  two's complement or unsigned.

The main idea behind the Wallace multiplier is *power by precision*. A narrow
multiplication should not switch the whole tree, so the tree is cut along the
lines of the 4x4 sub-products. The low-nibble product then stands on its own
and can be the whole answer.

All the arithmetic is combinational. The top level, `rwtm_top`, puts one output
register behind each multiplier.

## The three-level Wallace tree (`wallace_mult8`)

An 8x8 product is the sum of four 4x4 quadrant products:

```
a*b = aL*bL + (aH*bL + aL*bH) * 2^4 + aH*bH * 2^8      (aL = a[3:0], aH = a[7:4])
```

`pp_and_array` makes all 64 partial-product bits at once with AND gates
(`pp[j][i] = a[i] & b[j]`). They are then split among the levels:

| level | module | input | work | output |
|---|---|---|---|---|
| 1 | `wallace_level1` | 16 bits of aL*bL | a row of 4:2 compressors (4 rows to 2), then an 8-bit CLA | 8-bit aL*bL |
| 2 | `wallace_level2` | 48 bits of the other three quadrants | 12 rows of 4 bits go to 2 rows of 16 bits, in three stages of 4:2 compressors (12 to 6, 6 to 4, 4 to 2) | sum and carry rows |
| 3 | `wallace_level3` | level-1 product plus the level-2 rows | a row of full adders (3 rows to 2), then the 16-bit CLA | 16-bit a*b |

Level 1 has its own adder, so its result is already a finished 4x4 product.
This is what makes the 4-bit mode possible.

- **`prec = PREC_8BIT`**: all three levels work and `p = a*b`.
- **`prec = PREC_4BIT`**: `p = {8'b0, a[3:0]*b[3:0]}`. The upper nibbles of
  the operands are ignored.

In 4-bit mode, levels 2 and 3 are shut down by *operand isolation*. Their
inputs are ANDed with the mode bit, so they sit at zero and do not toggle
whatever the operands do. `levels_on` reports which levels are in use:
`3'b001` in 4-bit mode and `3'b111` in 8-bit mode.

Operand isolation is the logic-level stand-in for switching off the supply of
the unused levels. Real power switches, retention and wake-up sequencing
belong to the physical implementation and are not in this RTL.

## Compressors and carry-save rows

- **`compressor_4_2`** is two full adders in series. It takes five bits of one
  column (four partial-product bits and a lateral carry `cin` from the column
  to its right) and gives three: `sum` at the column's weight, and `carry` and
  `cout` at twice that weight. `cout` depends only on `x1..x3`. Chaining
  `cout` into the next column's `cin` therefore never ripples. The testbench
  checks this property directly.
- **`compressor_5_2`** is three full adders in series, with two lateral carries
  in and two out. `cout1` depends only on `x1..x3`, and `cout2` depends only on
  the first adder and `cin1`. So this row does not ripple either.
- **`csa_row_3_2`, `csa_row_4_2` and `csa_row_5_2`** are rows of W cells of
  one kind. Each row reduces 3, 4 or 5 rows of W bits to a `sum` row and a
  `carry` row. The `carry` row is already shifted to its weight, so
  `sum + carry` equals the sum of the inputs modulo 2^W. Whatever carries out
  of the top column is dropped. Every caller makes W wide enough for the
  result, or relies on modulo 2^W arithmetic for two's complement values.

## Carry look-ahead adders

`mod_full_adder` gives a bit's sum, propagate (`a^b`) and generate (`a&b`).

`cla4` works out all four carries from p, g and `cin` in two gate levels. It
also outputs the group propagate and group generate. `cla8` joins two `cla4`
blocks and `cla16` joins two `cla8` blocks. In both, the carry into the upper
half is looked ahead from the lower half's group signals (`c = G | P·cin`),
not rippled through it.

`cla16` is the final adder of both 8x8 multipliers. `booth_mult_8n` chains NB
`cla16` blocks into its final adder.

## The Booth unit (`booth_mult8`)

This is the least obvious part of the design.

**Recoding.** `booth_pp_row` turns each overlapping triplet
`(b[2k+1], b[2k], b[2k-1])` into a digit `d = -2·b[2k+1] + b[2k] + b[2k-1]`
in {-2..+2}. The digit is held in sign/magnitude form as `booth_digit_t`
`{neg, one, two}`. The triplet `111` is coded as +0, not -0. The selector
picks 0, A or 2A from the 9-bit multiplicand and inverts it when the digit is
negative. The row's value is then `$signed(row) + neg`. The `+1` (`neg`) is
added later, in the row's least significant column.

**Signed and unsigned operands.** Each operand has its own `*_signed` input.
The multiplicand is extended to 9 bits with its sign bit or with a zero.
Recoding a signed 8-bit multiplier gives four digits, so the 8 AND rows of
8 bits become 4 Booth rows of 9 bits, plus one bit of sign growth. An
unsigned multiplier needs a fifth digit, which is just `b[7]`. For a signed
multiplier the fifth digit is always 0.

**Sign extension by MSB inversion.** Each row is a 10-bit two's complement
number placed at bit offset 2k. The rows are not sign-extended to bit 15.
Instead, the top bit of each row is inverted and one constant is added for
all rows:

```
sext(row)  = {~row[9], row[8:0]} - 2^9                  (mod 2^16, per row)
SIGN_FIX   = -(2^9 + 2^11 + 2^13 + 2^15) mod 2^16 = 16'h5600
```

The fifth row's term is 2^17, which vanishes modulo 2^16. `SIGN_FIX` has
bits 9, 10, 12 and 14 set. The `neg` bits sit at bits 0, 2, 4, 6 and 8. The
two do not overlap, so they share one row.

**Reduction.** The five rows go through a row of 5:2 compressors. The
`SIGN_FIX`/`neg` row is merged with a row of full adders. `cla16` then adds
the last two rows.

The 16-bit result is correct for all four sign combinations, because every
possible product fits in 16 bits. It is two's complement whenever either
operand is signed.

## The multi-precision cascade (`booth_mult_8n`)

`booth_mult_8n #(NB)` multiplies two operands of NB bytes each. It uses an
NB×NB grid of `booth_mult8` units, where unit (i, j) multiplies byte i of `a`
by byte j of `b` at weight 2^(8(i+j)). The default, NB = 2, is a 16x16
multiplier made of four units:

| unit (i, j) | operands | weight | signedness (`tc` = two's complement) |
|---|---|---|---|
| (0, 0) | a[7:0] × b[7:0] | 2^0 | unsigned × unsigned (lane mode: `tc` × `tc`) |
| (1, 0) | a[15:8] × b[7:0] | 2^8 | `tc` × unsigned |
| (0, 1) | a[7:0] × b[15:8] | 2^8 | unsigned × `tc` |
| (1, 1) | a[15:8] × b[15:8] | 2^16 | `tc` × `tc` |

In general, only the top byte of an operand carries its sign.

- **`mode = BM_SINGLE`**: each 16-bit sub-product is extended to 16·NB bits
  and added. The extension uses the sign only if one of the unit's operands
  is signed. The sum runs through a chain of 4:2 compressor rows. Each row
  takes the running sum and carry plus two more sub-products, so NB = 2
  needs exactly one row. NB 16-bit CLAs, with the carry passed from one to
  the next, finish the addition. The result is `p = a*b`.
- **`mode = BM_LANES8`**: only the diagonal units (i = j) work. The other
  units get zero operands, and the adder is bypassed. The result is
  `p = {..., a[15:8]*b[15:8], a[7:0]*b[7:0]}`: NB independent byte products,
  each in its own 16 bits (signed when `tc` = 1).

The testbench runs NB = 2 and NB = 3. The compressor chain is linear, so its
depth grows with NB². A tree would suit large NB better.

## Top level and timing (`rwtm_top`)

`rwtm_top` has two independent groups of ports:

- **Wallace multiplier:** `wt_valid_i`, `wt_a`, `wt_b`, `wt_prec`, and on the
  output side `wt_valid_o`, `wt_p`, `wt_levels_on`.
- **Booth multiplier:** `bm_valid_i`, `bm_a`, `bm_b`, `bm_tc`, `bm_mode`, and
  on the output side `bm_valid_o`, `bm_p`. The operand width is
  8·`BM_BYTES` bits (16 by default) and the product width 16·`BM_BYTES`.

Timing works as follows:

- Operands applied together with a valid bit give their registered result on
  the next rising clock edge. The latency is one cycle, and a new operation
  can start every cycle.
- When the valid bit is low, the output registers keep their last value.
- `rst_n` is an asynchronous, active-low reset. It clears all outputs.

The shared types (`wt_prec_e`, `bm_mode_e`, `booth_digit_t`) are in
`rwtm_pkg`.

## What is specified and what was chosen here

These points follow the original description of the design:

- partial products made in parallel by AND gates
- a Wallace tree split into levels, with unused levels switched off
- 4-bit and 8-bit operation
- a CLA at the third level
- the 4:2 compressor as two full adders in series
- the cell hierarchy: half adder, full adder, 4:2 and 5:2 compressors, and a
  modified full adder, leading to 4-bit, 8-bit and 16-bit CLAs
- a 16x16 Booth multiplier built from cascaded 8x8 Booth units, which
  extends the same way to 8n×8n, with a sign extension circuit acting on the
  MSBs of each row
- Booth recoding that turns 8 rows of 8 bits into 4 rows of 9 bits

These are choices made in this design:

- **Wallace levels:** which partial products each level takes, and the
  reduction order inside levels 2 and 3. Power-off is modelled as operand
  isolation.
- **Operand signedness:** the Wallace multiplier is unsigned. The Booth units
  have per-operand signed/unsigned control, with a fifth Booth digit for an
  unsigned multiplier, so that they can be cascaded.
- **5:2 compressor:** its use (the five Booth rows) and its three-full-adder
  structure.
- **`booth_mult_8n` features:** the lane mode, and the compressor chain and
  CLA chain that add the sub-products.
- **Top level:** the two multipliers side by side, and the output registers,
  valid bits and reset.
- **Not built:** the physical side, meaning supply switches, the
  180 nm / 1.8 V cells and the placement of the blocks. Nothing about speed
  or power can be inferred from this RTL.

## Verification

Every module except the row helpers and the package has a self-checking
testbench `tb/tb_<module>.sv`. Each one compares against integer arithmetic
and prints `TB_RESULT checks=N failures=M`. Each one also has a watchdog.

Coverage is exhaustive wherever the input space allows:

- all cell patterns
- `cla4` and `cla8`
- both modes of `wallace_mult8` (65,536 operand pairs each)
- all four sign combinations of `booth_mult8`

`cla16` and `booth_mult_8n` (at NB = 2 and NB = 3) are tested with corner
cases plus random vectors.

`tb_rwtm_top` runs 20,000 mixed operations through the top level. It checks
the one-cycle latency, holding on idle cycles, and a reset in the middle of
the stream. It counts each mechanism it exercises:

- 4-bit mode and 8-bit mode
- switches between the two modes
- all four Booth mode/sign combinations
- idle cycles
- resets

A mechanism that never happens counts as a failure.

## Simulating

Verilator 5 is enough. The package must come first. For example:

```
verilator --binary --timing --assert -Irtl rtl/rwtm_pkg.sv tb/tb_rwtm_top.sv \
          --top-module tb_rwtm_top -o sim && ./obj_dir/sim
```

Replace `tb_rwtm_top` with any other testbench to test one block. `-Irtl`
lets Verilator find the modules, since each module is in `rtl/<name>.sv`.
With `-Wall`, Verilator reports a few unused-signal warnings. They come from
the top carry out of the carry-save rows, which is dropped on purpose, and
from the Booth digit output, which only the testbench reads.
