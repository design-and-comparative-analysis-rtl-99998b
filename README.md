# 8x8 Vedic and Wallace tree multipliers

Two combinational 8-bit x 8-bit unsigned multipliers, built side by side from
the same three cells (AND gate, half adder, full adder), so that the two
classic ways of summing partial products can be compared on equal terms:

* **Vedic multiplier** (`vedic_8x8`): divide and conquer. Each operand is cut
  in half, four half-size multipliers form the four sub-products at once, and
  ripple carry adders sum them. The same rule is applied again inside each
  half-size multiplier, down to 2x2 cells. Small and regular, but the ripple
  adders of every level lie on the critical path.
* **Wallace tree multiplier** (`wallace_multiplier`): all 64 partial-product
  bits are formed at once and reduced by layers of full and half adders that
  work in parallel (carry-save addition), from columns eight bits high down to
  two rows; one ripple adder then adds the two rows. Faster: each layer costs
  only one full-adder delay. It holds exactly 48 full adders and 8 half adders.

Both compute `p = a * b` with 8-bit unsigned operands and a 16-bit product.
There is no clock, no reset and no handshake: the product follows the
operands after the combinational delay. `multiplier_top` instantiates both,
each with its own operand and product ports.

## The Vedic multiplier: "vertically and crosswise"

The Urdhva-Tiryagbhyam rule multiplies two numbers by forming the vertical
products (low x low, high x high) and the crosswise products (high x low,
low x high) and adding them at their weights. With `a = {aH, aL}`,
`b = {bH, bL}` split into halves of `H = W/2` bits:

```
q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH        (W bits each)
a*b = q0 + (q1 + q2) << H + q3 << W
```

Hierarchy:

```
vedic_8x8 ── 4 x vedic_4x4 ── 4 x vedic_2x2 ── 4 AND gates + 2 half adders
     │                 └── vedic_adder_stage (W=4): three 4-bit RCAs + 1 HA
     └── vedic_adder_stage (W=8): three 8-bit RCAs + 1 HA
```

The 2x2 cell: `p0 = a0b0`; a half adder adds the crosswise pair `a1b0 + a0b1`
giving `p1` and a carry; a second half adder adds that carry to `a1b1`
giving `p2` and `p3`.

### The summing stage (`vedic_adder_stage`)

This is the part to read carefully. Three W-bit ripple carry adders:

```
adder 1:  {c1, s1} = q1 + q2                          crosswise sum
adder 2:  {c2, s2} = s1 + (q0 >> H)                   add top half of q0
adder 3:  s3       = q3 + ((c1 + c2) << H) + (s2 >> H)
p = { s3, s2[H-1:0], q0[H-1:0] }
```

`c1` and `c2` both carry weight `2^(W+H)`, so a half adder merges them into a
2-bit count before adder 3. For genuine sub-products they never both fire
(with W = 8, `q1 + q2 <= 450`, so after a carry `s1 <= 194` and
`s1 + 15 < 256`), and adder 3 never carries out; its carry is exported as
`carry_out` only so the stage can be tested with arbitrary inputs, where
`{carry_out, p}` is the exact sum. The half adder keeps the stage correct for
any inputs at the cost of one cell.

## The Wallace tree: columns, layers and the adder budget

### Partial products (`partial_products`)

64 AND gates form `a[i] & b[j]` and stack each bit in column `c = i + j`
(weight `2^c`). The columns are packed from row 0: column `c` holds
`min(c+1, 15-c)` bits, heights `1 2 3 4 5 6 7 8 7 6 5 4 3 2 1 0`. Internally
every set of columns is a packed array `[2N-1:0][N-1:0]` (column, row), with
zeros above the occupied rows.

### Reduction layers (`wallace_stage`)

Layer targets follow the sequence 2, 3, 4, 6, 9, 13, ... (each term
`floor(3d/2)` of the previous term `d`), taking the terms below N from the largest
down; for N = 8 there are four layers with targets **6, 4, 3, 2**. Within a
layer, columns are handled from bit 0 upwards. A column's count is its own
bits plus the carries arriving from the column below *in the same layer*
(those carries land in the next layer). If the count is above the target,
adders are added one by one: a half adder when the count is exactly one over,
a full adder otherwise (a full adder removes two bits from its column, a half
adder one; each sends one carry to the next column).

Each output column is packed as

```
[full-adder sums][half-adder sums][bits passed through][carries from column c-1][0 ...]
```

Full adder `k` of a column takes rows `3k..3k+2`; the half adders take the
next pairs of rows. All of this is computed at elaboration time by constant
functions in `wallace_pkg` (`num_stages`, `stage_target`, `col_height`,
`fa_count`, `ha_count`, `cpa_carry_in`), so the tree is written once as
`generate` loops and scales with `N`.

Adders per layer for N = 8:

| layer | heights | full adders | half adders |
|-------|---------|-------------|-------------|
| 0 | 8 -> 6 | 3  | 3 |
| 1 | 6 -> 4 | 12 | 2 |
| 2 | 4 -> 3 | 9  | 1 |
| 3 | 3 -> 2 | 11 | 1 |
| final ripple adder | 2 -> 1 | 13 | 1 |
| **total** | | **48** | **8** |

This placement uses fewer adders (56) than the greedy rule below (72) and puts a half adder
only where a column is exactly one bit over its target. The textbook greedy
Wallace rule, which puts a full adder on every group of three bits and a
half adder on every leftover pair in every layer, also needs four layers
but, with the same ripple adder at the end, comes to 46 full adders and 26
half adders. Only the fewest-adders placement meets the count of 48 full and
8 half adders that the source gives for its Wallace multiplier, so it is the
one used here. The structure is still a Wallace tree in the sense of four
parallel carry-save layers followed by one carry-propagate adder.

### Final adder (`wallace_final_adder`)

After layer 3, column 0 holds one bit, columns 1-14 hold two and column 15
none. A ripple adder adds them: a half adder on column 1, full adders on
columns 2-14, and column 15 takes the last carry. The longest path of the
multiplier is therefore four full-adder delays through the tree plus a
13-stage carry ripple.

## Circuit-level context

The structures here come from a transistor-level study in a 45 nm process
that built each multiplier twice: in static CMOS and with a transmission-gate
style in which AND/OR gates use three transistors. Its reported results:

| | Vedic, TG | Vedic, CMOS | Wallace, TG | Wallace, CMOS |
|---|---|---|---|---|
| transistors | 2524 | 4416 | 1720 | 2752 |
| power (uW) | 53.9 | 27.72 | 34.72 | 11.27 |
| delay (ns) | 0.16 | 0.29 | 0.16 | 0.12 |

Those figures belong to the transistor circuits. This RTL models only the
logic, which is the same for both gate styles; it says nothing about
transistor count, power or delay.

## What follows the source and what is this design's own

Follows the source: the two architectures; 8-bit operands; the Vedic design
as four sub-multipliers whose results are summed by ripple carry adders; the
Wallace design as an AND array reduced by layers of full and half adders; the
Wallace total of 48 full and 8 half adders; AND gates, half adders and full
adders as the building cells.

Choices made here:

* Operands are unsigned and the product is the full 16 bits.
* Purely combinational, no registers, clock or reset.
* Vedic: sub-multipliers of half width at each level (8 -> 4 -> 2); the order
  of the three additions and the half adder merging the two carries.
* Wallace: adder placement by the fewest-adders rule (needed to meet the
  48 + 8 count), row packing inside a column, and a ripple carry-propagate
  adder at the end.
* The three-transistor transmission-gate cells are not modelled separately:
  they compute the same AND/OR functions as `and_gate` and the adders.

## Files

| file | contents |
|------|----------|
| `rtl/multiplier_top.sv` | both multipliers side by side |
| `rtl/vedic_8x8.sv`, `rtl/vedic_4x4.sv`, `rtl/vedic_2x2.sv` | Vedic hierarchy |
| `rtl/vedic_adder_stage.sv` | three-RCA summing stage, parameter `W` |
| `rtl/ripple_carry_adder.sv` | W-bit RCA of full adders |
| `rtl/wallace_multiplier.sv` | Wallace multiplier, parameter `N` (default 8) |
| `rtl/partial_products.sv` | AND array, column-stacked |
| `rtl/wallace_stage.sv` | one reduction layer, parameters `N`, `S` |
| `rtl/wallace_final_adder.sv` | ripple adder over the last two rows |
| `rtl/wallace_pkg.sv` | elaboration-time adder schedule |
| `rtl/full_adder.sv`, `rtl/half_adder.sv`, `rtl/and_gate.sv` | cells |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

`wallace_multiplier` works for other `N` too, since the schedule is computed
(it has been simulated for N from 3 to 32; the package supports N up to 64). The Vedic hierarchy is written for 8 bits only, and so is
`multiplier_top`.

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/wallace_pkg.sv \
    tb/tb_multiplier_top.sv --top-module tb_multiplier_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_multiplier_top` with any other testbench name. `wallace_pkg.sv`
must be read first because the Wallace modules import it.

What is checked:

* cells and the 8-bit RCA: exhaustively;
* `vedic_2x2`, `vedic_4x4`, `vedic_8x8`, `wallace_multiplier`: all operand
  pairs against `a * b`; the Wallace test also totals the elaborated adder
  schedule (must be 4 layers, 48 full and 8 half adders);
* `vedic_adder_stage` at W = 8 and W = 4 with random inputs, including the
  case where both first-level carries fire;
* `partial_products`: every column against an independently built array;
* `wallace_stage`: the four layers chained; each must preserve the weighted
  sum of its bits and leave no column above its target height;
* `wallace_final_adder`: random two-row inputs against their sum;
* `tb_multiplier_top`: all 65536 operand pairs through both multipliers at
  once (with different operands on each side), at the default parameters. It
  also counts how often each carry path is used (Vedic adder-1 and adder-2
  carries at both levels, the Wallace final carry into bit 15) and checks
  that the carries that cannot occur (both Vedic first-level carries at once,
  a carry out of adder 3) never do.
