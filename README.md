# 2-D bypassing array multiplier

An unsigned array multiplier spends most of its energy in a grid of
one-bit adders, and a large share of those adders add nothing: every cell
whose partial-product bit `a_k*b_j` is 0 just passes its incoming sum along.
This design switches such cells off in two dimensions at once. A zero bit
in the multiplicand idles a whole *column* of the array, and a zero bit in
the multiplier idles a *row*. A bypassed cell's adder inputs are held at 0
so it does not toggle, and a pair of 2:1 multiplexers routes the incoming
sum around it. The one case that needs care is a carry arriving from above.
Such a cell must still add, whatever its partial product. With that rule
the product is always exact.

The RTL is a parameterised `WIDTH x WIDTH` multiplier (default 4x4). It is
purely combinational and synthesizable SystemVerilog.

## Structure

```
 a, b ──► pp_gen ──pp[j][k]=a_k·b_j──► bypass_array ──p_1..p_{W-1}──────────────┐
                                         (W-1)x(W-1) bypass_adder_cell         │
                                         │ last_c, last_y                      │
                                         ▼                                     ▼
                                      merge_adder (ripple: HA, FA, FA, ...) ──► p
                                                                   p_0 = a_0·b_0
```

| module | role |
|---|---|
| `mult2d_bypass` | top: wires the three stages and assembles `p` |
| `pp_gen` | AND matrix, `pp[j][k] = a[k] & b[j]` |
| `bypass_array` | carry-save Braun array of 2-D bypassing adder cells |
| `bypass_adder_cell` | one array cell: adder, operand isolation, bypass muxes |
| `merge_adder` | final ripple-carry row (half adder, then full adders) |
| `half_adder`, `full_adder` | one-bit leaf cells |

### The Braun array

Cells are indexed `(k, j)`: `k = 0 .. W-2` is the multiplicand bit the cell
uses, and `j = 1 .. W-1` is its row, i.e. the multiplier bit. Cell `(k,j)`
has weight `2^(k+j)` and adds three things:

* its partial product `a_k*b_j`;
* the sum of cell `(k+1, j-1)`, diagonally above, which has the same weight.
  The left-most cell of a row takes `a_{W-1}*b_{j-1}` instead. In row 1 this
  input is `a_{k+1}*b_0`.
* the carry of cell `(k, j-1)`, directly above. Row 1 has no carries, so
  its cells are half adders.

The sum of cell `(0, j)` is product bit `p_j`. The last row leaves two
vectors of weight `2^(W+k)`, both `W-1` bits wide. One holds the carries of
cells `(k, W-1)`. The other holds the sums of cells `(k+1, W-1)`, with
`a_{W-1}*b_{W-1}` at the top. `merge_adder` adds the two into
`p_W .. p_{2W-1}`. For 4x4 that gives 3 half-adder cells, 6 full-adder
cells and a HA-FA-FA final row, the classic Braun layout.

## The bypass rule (read this first when changing the cell)

`bypass_adder_cell` computes

```
en       = pp | c_in          // adder enabled
bypassed = ~en
adder inputs = {pp, s_in, c_in} & en     // operand isolation
s_out    = en ? adder_sum   : s_in
c_out    = en ? adder_carry : c_in       // c_in is 0 whenever bypassed
```

Why this is exact: when `pp = 0` and `c_in = 0` the cell's true result is
`s_in + 0 + 0`. That is sum `s_in` and carry 0, which is exactly what the
muxes pass on. Nothing else may be skipped. A cell with `pp = 0` but
`c_in = 1` must produce `s_in + 1`.

How the two dimensions show up:

* **Column bypass (`a_k = 0`).** Every partial product in column `k` is 0.
  The first-row cell of that column is a half adder with `pp = 0`, so it
  makes no carry. By induction no cell in the column ever sees a carry, and
  the whole column is always bypassed.
* **Row bypass (`b_j = 0`).** Every partial product in row `j` is 0. The row
  still receives the carries that row `j-1` produced. Cells with `c_in = 1`
  stay active (the *carry-blocked* case); the rest are bypassed.

The classic row-bypassing adding cell selects its muxes with the multiplier
bit alone and passes the carry straight down. Inside a Braun array that
carry would be one bit-weight too low. Using `pp | c_in` as the select
fixes this. It also merges the row and column conditions into a single
signal per cell. Both the multiplicand and the multiplier select lines are
thus folded into `pp`, which `pp_gen` already computes.

Bypassing affects only switching activity. The function is that of a plain
Braun multiplier, and every internal sum and carry has the same value as in
the plain array. The testbenches rely on this fact.

Example, 4x4, `a = 1010b`, `b = 1001b`:

* Columns 0 and 2 (`a_0 = a_2 = 0`) are bypassed in all rows.
* Rows 1 and 2 (`b_1 = b_2 = 0`) have no partial products. Their only
  column-1 cell sees no carry, so it is bypassed too.
* In row 3, cell `(1,3)` adds `a_1*b_3 = 1`.

Only 1 of the 9 array cells switches.

## Interface and timing

`mult2d_bypass #(int unsigned WIDTH = 4)`

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | `WIDTH` | multiplicand |
| `b` | in | `WIDTH` | multiplier |
| `p` | out | `2*WIDTH` | `a * b`, unsigned |
| `cell_bypassed` | out | `[WIDTH-1:1][WIDTH-2:0]` | `cell_bypassed[j][k]` is 1 when cell `(k,j)` is bypassed |

`cell_bypassed` is only for observation: leave it open in a real design and
synthesis removes it. The block has no clock or reset. `p` is valid one
combinational delay after the operands settle. `WIDTH` must be at least 2;
elaboration stops with an error otherwise. Register the inputs and outputs
outside if the multiplier is to sit in a pipeline.

## Design choices and departures from the published scheme

* **Three-state gates become AND gates.** The original adding cell feeds its
  adder through three-state buffers that float when the cell is bypassed.
  Here the adder inputs are ANDed with the enable. This gives the same
  switching saving, needs no internal tri-state nets, and keeps the adder
  inputs at a defined value.
* **One select per cell.** The published 4x4 schematic draws the sum
  multiplexers selected by the multiplicand bits only. The 2-D rule also
  bypasses on zero multiplier bits and is blocked by carries, so the select
  here is `~(pp | c_in)`.
* **No carry gating on the last row.** The schematic shows gates driven by
  `a_0..a_2` on the last-row carries. A bypassed cell already outputs carry
  0, so those gates are left out.
* **Final row is not bypassed.** It is a plain ripple-carry adder, as drawn.
* **Unsigned operands, fully combinational, any width.** The 4x4 size is the
  published one. Generalising to `WIDTH` is this design's own, done by
  repeating the same Braun pattern. 8x8 and 16x16, the other sizes the
  technique was evaluated at, are verified in simulation.
* **Not included.** The baseline multipliers the technique was compared with
  (plain Braun, row-bypassing only, column-bypassing only) are not part of
  this RTL. Published results for 4x4 report a maximum combinational path
  delay of about 13.6 ns, against 16.7 ns for the plain Braun multiplier, on
  an FPGA flow. Those figures are not reproduced here: RTL simulation
  measures neither delay nor power.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

| testbench | what it checks |
|---|---|
| `tb_mult2d_bypass` | default 4x4, all 256 operand pairs: product, and every cell's bypass flag against an independent Braun model. Counts column bypasses, row bypasses, carry-blocked cells and additions, and fails if any never occurs. |
| `tb_mult2d_bypass_sizes` | widths 2, 3, 5, 8 and 16: corner operands plus 2000 random pairs each; product and bypass flags |
| `tb_bypass_array` | 4x4 array alone, exhaustive: `p_1..p_3`, both final-row vectors, bypass flags |
| `tb_bypass_adder_cell` | both cell variants, exhaustive |
| `tb_merge_adder`, `tb_pp_gen`, `tb_half_adder`, `tb_full_adder` | exhaustive |

The reference model shared by the multiplier testbenches is in
`tb/braun_ref_pkg.sv`. It evaluates the plain, unbypassed Braun array with
integer additions. A cell is expected to be bypassed exactly when its
partial product and its carry-in are both 0 in that model.

For the 4x4 default, the exhaustive run sees 1152 column-bypassed,
508 row-bypassed, 68 carry-blocked and 576 adding cells over all
256 × 9 cell evaluations.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    tb/braun_ref_pkg.sv tb/tb_mult2d_bypass.sv --top-module tb_mult2d_bypass
./obj_dir/Vtb_mult2d_bypass
```

Substitute any other `tb_*` name. `braun_ref_pkg.sv` is needed only by
`tb_mult2d_bypass`, `tb_mult2d_bypass_sizes` and `tb_bypass_array`. All
files pass `verilator --lint-only -Wall`.

## Changing it

* **Size.** Set `WIDTH`. The array grows as `(WIDTH-1)^2` cells, and the
  critical path runs down the array and then along the ripple row.
  The testbench reference model is limited to 16 bits
  (`braun_ref_pkg::MAXW`).
* **Cell.** To compare against a conventional array, tie `en` to 1 in
  `bypass_adder_cell`: the product is unchanged and every cell adds.
  Selecting on `pp` alone, without `c_in`, is wrong: `tb_bypass_adder_cell`
  and `tb_mult2d_bypass` both catch it.
