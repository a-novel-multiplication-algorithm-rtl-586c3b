# 32x32 multiplier with redundant-digit 4:2 tree and sliceable carry-skip adder

This is a combinational 32x32-bit signed multiplier organised in the classic three
steps: partial product generation, partial product reduction and final addition.
Two ideas set it apart:

* **The reduction tree adds in the digit set {0,1,2,3}.** Four binary rows are
  summed column by column into one row of radix-2 digits in {0,1,2,3}. Such a
  digit row is the same thing as a carry-save pair. A counter row built this way
  is therefore an ordinary 4:2 counter row, and it has no rippling carry. The tree
  is a regular binary tree of these rows.
* **The final adder is a 64-bit carry-skip adder with growing unit sizes** (1, 3,
  4, 5, 6, 7, 8, 9, 10 and 11 bits). It has a short carry-attract path: sum bits
  do not wait for a carry to ripple through their own unit. The adder can also be
  cut into two 32-bit, four 16-bit or eight 8-bit adders. The cut points lie
  inside the larger units. Cutting uses one gate per unit, placed off the carry
  path.

The source is synthesizable SystemVerilog (IEEE 1800-2017). It has no clock and
no state.

## Digit codings

A digit `v` in {0,1,2,3} can be held in two codings:

| value | (d,e,f) three-bit | (t,w) two-bit |
|-------|-------------------|---------------|
| 0     | 000               | 00            |
| 1     | 001 or 100        | 01            |
| 2     | 011 or 101        | 10            |
| 3     | 111               | 11            |

In the three-bit code `v = d + e + f`, and the pattern `(e,f) = (1,0)` is never
used. In the two-bit code `v = 2t + w`. A row of (t,w) digits is a carry-save
number: the w bits form one binary row, and the t bits, shifted up one place,
form the other.

`fa_tw` converts (d,e,f) to (t,w). Because e=1 implies f=1, this takes only a
few gates:

```
t = e | (d & f)        w = d ^ (f & ~e)
```

## The four-input digit adder and the 4:2 counter

`add4_def` handles one column. It adds four bits i1..i4 of that column, plus a
transfer bit `t_in` from the column below:

```
i1 + i2 + i3 + i4 + t_in = 2*t_out + d + e + f
```

Its upper half is a full adder on i1..i3, giving `t_out` (majority) and `d`
(parity). Its lower half re-codes `i4 + t_in` as `e = i4 & t_in` and
`f = i4 | t_in`. That makes `e + f` correct and rules out `(1,0)` by
construction. Since `t_out` does not depend on `t_in`, a row of these cells has
no carry chain. The longest path is the two XORs that form `d`.

`compressor42` is `add4_def` followed by `fa_tw`, with outputs `sum = w`,
`carry = t` and `cout = t_out`. This is a standard 4:2 counter:
`x1+x2+x3+x4+cin = sum + 2*(carry+cout)`. An assertion checks that the forbidden
digit pattern never appears.

## The two-operand digit adder (`cs3_adder`)

`cs3_adder` adds two {0,1,2,3} digit rows A and B, each in (t,w) code, into a
third. Each digit j goes through three steps:

1. `A_j + B_j`, in {0..6}, splits into a transfer `tA_j + tB_j` in {0,1,2},
   sent to digit j+1, and a remainder `wA_j + wB_j` in {0,1,2}.
2. The remainder plus the transfer from digit j-1 lies in {0..4}. It splits into
   a second transfer in {0,1} and a new remainder in {0,1,2}.
3. The new remainder plus the second transfer from digit j-1 is the result
   digit, in {0,1,2,3}.

Steps 2 and 3 are exactly an `add4_def` on `wA[j], wB[j], tA[j-1], tB[j-1]`,
with the second transfer as `t_in`, followed by `fa_tw`. A transfer depends only
on its own digit's bits and the first-level transfer from below. So nothing
ripples, and the addition takes the same time at any width.

## Partial products (`booth_pp_gen`, `booth_enc`)

The multiplier `b` is recoded into 16 radix-4 Booth digits, each in
{-2,-1,0,1,2}, from the overlapping bit triples `b[2k+1], b[2k], b[2k-1]`.
Row k is `digit * a`, sign-extended to 64 bits and shifted up by `2k` places.
A negative multiple is sent bit-inverted. The `+1` that completes each negation
is gathered into one extra correction row, with bit `2k` set when digit k is
negative. The 17 rows sum to the exact signed product modulo 2^64.

Operands are two's complement. Rows are fully sign-extended: the constant-heavy
upper bits fold away in synthesis, but no hand-trimmed sign-extension scheme is
used.

## Reduction tree (`wallace_tree`, `compressor42_row`, `csa_row`)

The tree works on groups of four rows, level by level, until two rows remain.
For 17 rows the levels are 17 → 9 → 5 → 3 → 2. It is a binary tree of redundant
adders:

* The first level turns each group of four binary rows into one {0,1,2,3} digit
  row, using a row of 4:2 counters. A digit row is held as the pair (w row, t row
  shifted up one place).
* Later levels add two digit rows at a time with `cs3_adder`.
* A group of four rows that mixes digit and binary rows uses a 4:2 counter row,
  which gives the same sum.
* A left-over group of three rows passes through a row of full adders.
* One or two left-over rows pass on unchanged.

All rows are kept 64 bits wide, and carries out of bit 63 are dropped. Where a
column holds constant zeros, a counter collapses to a half adder or a wire after
constant propagation.

`ROWS` and `W` are parameters, so the same module also builds smaller trees,
for example one for 12 partial products.

## Final adder (`csk_adder64`, `csk_unit`)

### Units and skip multiplexers

| unit | 1-b | 3-b | 4-b | 5-b | 6-b | 7-b | 8-b | 9-b | 10-b | 11-b |
|------|-----|-----|-----|-----|-----|-----|-----|-----|------|------|
| bits | 0 | 3:1 | 7:4 | 12:8 | 18:13 | 25:19 | 33:26 | 42:34 | 52:43 | 63:53 |
| carry in | C | NC | C | NC | C | NC | C | NC | C | NC |
| cut at bit | – | – | – | 8 | 16 | 24 | 32 | 40 | 48 | 56 |
| cut for lanes | – | – | – | 8 | 8,16 | 8 | 8,16,32 | 8 | 8,16 | 8 |

After every unit sits an **inverting** 2:1 multiplexer, controlled by the unit's
`skip_n` (the NAND of all its propagate bits):

* If every bit of the unit propagates, the unit's carry in goes straight on.
* Otherwise the unit's own carry out goes on.

Because these multiplexers invert, the carries between units alternate between
direct (C) and inverted (NC) polarity. Each odd-width unit except the 1-bit one
therefore receives an inverted carry and must return an inverted one.

### Inside a unit

* **Propagate and generate.** Each bit forms `p = a ^ b`. Where `p = 0`,
  `a = b`, so `a` itself is the bit's generate/kill value.
* **Carry chain.** There is one 2:1 multiplexer per bit: it passes the carry from
  below when `p` is 1, and otherwise takes the bit's own generate value. The
  chain multiplexers invert, so the chain alternates polarity from bit to bit.
  Every other bit feeds its generate value inverted to match. In odd-width units
  the multiplexer of the top bit does not invert, which keeps the carry out in
  the same polarity as the carry in.
* **Carry attract.** From the unit's third bit on, the carry into sum bit k comes
  from a "Mux-s". It takes the unit's carry in directly when bits 0..k-1 of the
  unit all propagate, and otherwise the chain carry `c(k-1)`. In that second case
  `c(k-1)` does not depend on the carry in. So once the unit's carry in arrives,
  every sum bit is one multiplexer and one XOR away, wherever the carry started.
  The group-propagate selects alternate between AND form (`Cs`) and NAND form
  (`NCs`). They are built by their own chain of inverting multiplexers with
  constant 0/1 inputs.

### Slicing

`{part1, part0}` selects the lane width:

| part1 part0 | lanes |
|-------------|-------|
| 0 0 | one 64-bit add |
| 1 0 | two 32-bit adds |
| 0 1 | four 16-bit adds |
| 1 1 | eight 8-bit adds |

Each unit that holds a lane boundary decodes these two lines into an active-low
enable `PAR`:

* `~(part0 & part1)` in the 5-, 7-, 9- and 11-bit units, which are cut only for
  8-bit lanes.
* `~part0` in the 6- and 10-bit units, cut for 8- and 16-bit lanes.
* `~(part0 | part1)` in the 8-bit unit, which holds the 32-bit boundary and is
  cut in every mode except 64-bit.

When `PAR` is low, three things happen at the cut bit:

* Its propagate is forced low (`pp`). No carry crosses the cut, and the unit can
  no longer be skipped.
* Its chain multiplexer takes the bit's true generate `a & b`.
* Its sum is formed with a zero carry in.

Bits below the cut still belong to the lower lane. None of this logic lies on the
carry path.

The external `cin` enters bit 0 only, so it feeds the lowest lane. All other
lanes start from a zero carry. `cout` is the carry out of bit 63, the top lane.

## Top level (`nano_mult`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b` | in | 32 | multiplicand and multiplier, two's complement |
| `op_add` | in | 1 | 0: multiply, 1: packed add |
| `x`, `y` | in | 64 | operands of the packed add |
| `cin` | in | 1 | carry in of the packed add |
| `part0`, `part1` | in | 1 | lane width of the packed add (table above) |
| `result` | out | 64 | `a*b` (signed), or the lane-wise sum `x+y` |
| `cout` | out | 1 | carry out of the final adder |

In multiply mode the final adder runs as one 64-bit adder with a zero carry in,
and `x`, `y`, `cin` and the part lines are ignored. In packed-add mode the tree
output is ignored. The design is purely combinational. A result is valid once the
inputs have propagated through all three steps; there is no latency in cycles.

Shared constants live in `nmul_pkg`: operand widths, unit sizes, bit offsets,
cut positions and decoder kinds.

## How far it follows the original architecture, and where it departs

These parts follow the published design closely:

* the digit codings, `fa_tw` and `add4_def`;
* the digit-set flow of the two-operand digit adder;
* using the (d,e,f) adder plus converter as a 4:2 counter;
* the unit sizes, inter-unit inverting multiplexers and C/NC polarity of the
  final adder;
* the internal structure of its units: chain, Mux-s, the Cs/NCs chain, and the
  `pp` cut with its NAND-generate;
* the three slice decoders.

Choices made here, where the architecture is silent:

* **Operand format.** Operands are signed two's complement, with radix-4 Booth
  digits, full sign extension and a separate negation correction row.
* **Tree layout.** The tree is a regular, row-group tree (17 rows for 32x32).
  The original drawing shows a hand-placed tree for 12 partial products using
  4:2, 3:2, full- and half-adder cells; it is not reproduced cell for cell.
* **Digit adder gates.** The gates inside the two-operand digit adder come from
  mapping its digit flow onto `add4_def` and `fa_tw`.
* **Units not drawn.** The structure of the units that are not drawn (1, 3, 5, 7,
  8, 9, 10 and 11 bits) is generalised from the 4-bit and 6-bit units: Mux-s from
  the third bit on, and the cut rule moved to the unit's cut position.
* **Lane encoding.** The numeric meaning of `{part1,part0}` is inferred from which
  decoder each unit uses.
* **Lane carries.** Upper lanes have a zero carry in, and only the top lane's
  carry out is provided.
* **Packed-add port.** The `op_add` multiplexer that opens the final adder to
  packed additions is part of this design.
* **Timing.** Delay, area and power figures of the original 70 nm
  implementation are not modelled; only the logic structure is.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_fa_tw`, `tb_full_adder`, `tb_add4_def`, `tb_compressor42` | exhaustive: value identities, forbidden digit never produced, transfer out independent of transfer in |
| `tb_cs3_adder` | the result's value against the sum of the operand values, mod 2^32; every digit-pair sum 0..6 occurs |
| `tb_booth_pp_gen` | every row against digit × multiplicand; the row sum against the signed product; all five digit values occur |
| `tb_wallace_tree` | 17-row/64-bit and 12-row/48-bit trees: output rows sum to the input rows, for random and all-ones inputs |
| `tb_csk_unit` | all ten unit configurations of the adder, in all lane modes: sums, carry out (in the unit's polarity) and `skip_n` against an arithmetic model; uses all-propagate operands to drive the carry-attract path |
| `tb_csk_adder64` | all four lane widths against lane-wise sums, including operands where a carry must cross every unit through the skip multiplexers |
| `tb_nano_mult` | full-size end to end: corner and random signed products, packed adds in every lane width, and 24x24-bit products (the 12-partial-product case); it counts each Booth digit value, skips taken, carry in and carry out, and fails if any never occurred |

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/nmul_pkg.sv tb/tb_nano_mult.sv \
          --top-module tb_nano_mult -Mdir obj_nano_mult
./obj_nano_mult/Vtb_nano_mult
```

Verilator finds the other modules through the `-I` paths, one module per file.
The full-size test runs in well under a second.

## Changing it

* `MUL_W`/`ADD_W` in `nmul_pkg` describe the 32x32/64-bit configuration. The
  final adder's unit table is tied to 64 bits, so a different product width
  needs a new unit table: `UNIT_W`, `UNIT_LSB`, `UNIT_CUT` and `UNIT_SLICE`.
* `booth_pp_gen` (`N`) and `wallace_tree` (`W`, `ROWS`) are parameterised on
  their own.
* `csk_unit` takes any width, a cut position and a decoder kind. Odd widths above
  one bit automatically expect and return inverted carries.
