# A time-optimal static-CMOS parallel adder (R(n) family)

This is a 32-bit binary adder whose carry network has been chosen for speed
under a simple RC delay model of static CMOS. In such a model fan-out is not
free, but it is also not forbidden. A carry-lookahead tree does not need to
keep every fan-out at 2. It can broadcast a carry to many bits at once,
provided that a driver of the right size sits in front of the broadcast wire.
The adder belongs to a recursively defined family, **R(n)**. Each n-bit
member is made of two smaller members side by side. The split point and the
driver size of every member were picked by dynamic programming, so that the
most significant carry is ready as early as possible. The resulting 32-bit
network has 8 layers of cells.

The RTL builds that network cell for cell. It is purely combinational: two
operands `a` and `b` in, sum `s` and carry out `cout` out. There is no clock
and no carry-in.

## Datapath

```
 a, b ──► pre_condition_circuit ──► g, p ──► r_adder (R(N)) ──► G_i = carry out of bit i
                  │                                                   │
                  └────────────── p ──────────► sum_circuit ◄─────────┘
                                                     │
                                                     s        cout = G_N
```

* **Pre-condition circuit**: `g_i = a_i & b_i`, `p_i = a_i ^ b_i`.
* **Fast carry generator**: the prefix of the operator
  `(g_l,p_l) o (g_r,p_r) = (g_l | p_l&g_r, p_l&p_r)`. For every bit i it forms
  `(G_i, P_i)` over bits 1..i, and `G_i` is the carry out of bit i.
* **Sum circuit**: `s_1 = p_1`, `s_i = p_i ^ G_{i-1}`.

Bit 0 of every vector in the RTL is the least significant bit, called "bit 1"
in the descriptions below.

## The R(n) recursion

An R(n) block with n > 1 puts a left block R(n-m), the upper bits, beside a
right block R(m), the lower bits. The most significant output of R(m) is the
group (G,P) of all m low bits. It is broadcast along one horizontal wire to a
row of *black cells*, one over each column of R(n-m). Each black cell
appends the low group to the group of its own column. R(1) is a bare wire.

The split m and the driver stage count s for each n are not computed by the
hardware. They come from a table, `adder_pkg::right_width` and
`adder_pkg::driver_stages`, which is the result of the optimisation
described under "Where the split table comes from" below:

| n  | n-m | m | s | depth |     | n  | n-m | m | s | depth |
|----|-----|---|---|-------|-----|----|-----|---|---|-------|
| 2  | 1   | 1 | 0 | 1     |     | 18 | 13  | 5 | 2 | 6     |
| 3  | 1   | 2 | 0 | 2     |     | 19 | 14  | 5 | 1 | 7     |
| 4  | 2   | 2 | 0 | 2     |     | 20 | 15  | 5 | 3 | 7     |
| 5  | 3   | 2 | 1 | 3     |     | 21 | 16  | 5 | 3 | 7     |
| 6  | 4   | 2 | 1 | 3     |     | 22 | 16  | 6 | 3 | 7     |
| 7  | 5   | 2 | 2 | 4     |     | 23 | 17  | 6 | 3 | 7     |
| 8  | 5   | 3 | 1 | 4     |     | 24 | 18  | 6 | 3 | 7     |
| 9  | 6   | 3 | 1 | 4     |     | 25 | 19  | 6 | 2 | 8     |
| 10 | 7   | 3 | 2 | 5     |     | 26 | 19  | 7 | 3 | 8     |
| 11 | 8   | 3 | 2 | 5     |     | 27 | 20  | 7 | 3 | 8     |
| 12 | 8   | 4 | 2 | 5     |     | 28 | 21  | 7 | 3 | 8     |
| 13 | 9   | 4 | 2 | 5     |     | 29 | 22  | 7 | 3 | 8     |
| 14 | 10  | 4 | 1 | 6     |     | 30 | 23  | 7 | 3 | 8     |
| 15 | 10  | 5 | 2 | 6     |     | 31 | 24  | 7 | 3 | 8     |
| 16 | 11  | 5 | 2 | 6     |     | 32 | 24  | 8 | 3 | 8     |
| 17 | 12  | 5 | 2 | 6     |     |    |     |   |   |       |

The depth follows from the split and the stage count:
`depth(1) = 0`, `depth(n) = max(depth(n-m), depth(m) + s) + 1`.
The package computes it in `adder_pkg::depth`. As an example, the 32-bit
adder is R(24) beside R(8). The MSB of R(8), bit 8, drives the 24 upper
columns through a 3-stage driver, and R(24) is itself R(18) beside R(6),
broadcasting from bit 14.

## Polarity: why the cells alternate

Every static-CMOS gate inverts, so the network never restores polarity with
extra inverters. Instead, **every layer of every column holds exactly one
inverting cell**, so all signals in one layer share a polarity. With layer 0
positive-true, the outputs of odd layers are complemented and those of even
layers are positive-true. There are four kinds of cell:

| cell | module | logic | used where |
|---|---|---|---|
| black, type ba | `black_cell_ba` | `gout_n = ~(gl \| pl&gr)`, `pout_n = ~(pl&pr)` (AOI + NAND) | broadcast row whose inputs are positive-true |
| black, type bb | `black_cell_bb` | `gout = ~(gl_n & (gr_n \| pl_n))`, `pout = ~(pl_n \| pr_n)` (OAI + NOR) | broadcast row whose inputs are complemented |
| white | `white_cell` | `gout = ~gl`, `pout = ~pl` | every slot with nothing to combine |
| driver | `driver_cell` | `gout = ~gl`, `pout = ~pl` | stages of the broadcast driver |

A white cell and a driver stage have the same logic. In silicon the driver
is a scaled-up inverter. Both black cells pass their horizontal inputs
through unchanged (`gr_thru`, `pr_thru`). The broadcast therefore runs from
cell to cell along the row, which is how the layout wires it.

Polarity is what constrains the driver. Inside R(n), the left block R(n-m)
may be deeper than the right block R(m) by u layers. The broadcast column may
spend up to u of those layers on driver stages, but the broadcast must reach
the black-cell row with the polarity of the left block. So the stage count s
has the parity of u. `r_adder` lays out the cells as follows:

* The left block is padded with white layers up to the layer just below the
  broadcast row.
* The broadcast column gets `depth(n) - 1 - depth(m) - s` white layers. The
  s driver stages follow, directly under the row.
* The other right-block columns get white layers only.
* The broadcast row (layer `depth(n)`) has black cells over the left block.
  It has white cells over the right block, one of them fed by the driver
  output.
* A row whose inputs are positive-true gets ba cells; a row whose inputs are
  complemented gets bb cells. `r_adder` chooses from the parameter `IN_INV`
  (input polarity) and the layer number.

The 32-bit network has 8 layers, an even number, so its carries come out
positive-true and the sum row is plain XOR. Networks of odd depth (widths 3,
5, 6, 10-13 and 19-24) deliver complemented carries. For them the sum
circuit turns into XNOR gates (`CARRY_INV`) and the carry out is inverted.
That case lies outside the 32-bit adder and is this implementation's own
choice.

For the 5-bit adder the layout gives black cells at (layer, bit) = (1,2),
(1,4), (2,5), (3,3), (3,4) and (3,5), a driver at (2,2), and white cells
everywhere else. The driver at (2,2) feeds four cells: the three black cells
of layer 3 and the white cell above it.

## Where the split table comes from

Delay is counted in units of τ = R·C of a minimum cell driving one gate
load. A signal's time is its latest input plus τ times its fan-out. An
s-stage driver with total fan-out f, whose stages grow by the ratio
`f^(1/(s+1))`, costs `(s+1)·f^(1/(s+1))`. For a block of bits j..i, the most
significant output is ready at

```
t(i,j) = min over m of max( t(i,m+1) + 2,                  // left column through its black cell
                            t(m,j)   + load(i,m,j) )       // broadcast from the right block
load(i,m,j) = min over s in {u, u-2, ..., >= 0} of (s+1)·(i-m+1)^(1/(s+1))
u = max(0, depth(left) - depth(right))
```

The time depends only on the block width. With single bits ready at t = 0,
this gives 2τ for 2 bits, 9.29τ for 9 bits and 17.84τ for 32 bits. Where two
choices tie (n = 3, and s = 1 or 3 for n = 20), the table keeps the split
that was originally published. `tb_adder_pkg_dp` solves the recurrence again
in SystemVerilog `real` arithmetic. It checks that every table entry reaches
the optimum, that every stage count obeys the parity rule, and that the
depths match.

The RTL does not model any of this delay. Transistor sizing, driver ratios
and wire RC exist only as the structure they justify: the layer count, the
cell type of each slot and the number of driver stages.

## Files

| file | contents |
|---|---|
| `rtl/adder_pkg.sv` | split table, stage table, `depth()`, cell map `slot()` |
| `rtl/cmos_adder.sv` | top: pre-condition → R(N) → sum, parameter `N` (default 32, range 1..32) |
| `rtl/pre_condition_circuit.sv` | per-bit g, p |
| `rtl/r_adder.sv` | R(N) network as a layer-by-column cell grid, parameters `N`, `IN_INV` |
| `rtl/sum_circuit.sv` | XOR (or XNOR) row |
| `rtl/black_cell_ba.sv`, `rtl/black_cell_bb.sv` | the two black cells |
| `rtl/white_cell.sv`, `rtl/driver_cell.sv` | inverting cells |
| `rtl/multistage_driver.sv` | `STAGES` driver cells in cascade, with a tap after each stage |

`r_adder` does not instantiate itself. The R(n) recursion is unrolled at
elaboration time into a grid of `depth(N)` layers by `N` columns.
`adder_pkg::slot(n, layer, column)` walks the recursion down to the
sub-block that owns a slot. It returns what sits there: a white cell, a
black cell together with the column that broadcasts into its row, or a
driver stage with its position in the cascade. `r_adder` places one cell per
slot. A driver cascade is instantiated once, at its lowest slot, and its taps
fill the layers above. Widths above 32 stop elaboration with an error,
because the table ends at 32.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. To build and run one with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/adder_pkg.sv tb/tb_cmos_adder.sv --top-module tb_cmos_adder
./obj_dir/Vtb_cmos_adder
```

| testbench | what it shows |
|---|---|
| `tb_cmos_adder` | 32-bit adder at its default size: 20,008 additions against the simulator's `+`. It also counts five mechanisms and fails if any never occurred: overflow, a carry rippling the full 32 bits, the broadcast from bit 8, the broadcast from bit 14, and a carry stopped by a non-propagating bit. |
| `tb_cmos_adder_widths` | adder at every width 1..32, covering the odd-depth (XNOR) variants |
| `tb_r_adder` | R(n) for n = 1..32 with both input polarities, on unconstrained (g,p) pairs, against a bit-serial prefix; polarity is checked against the published layer counts. It also checks the cell map of the 5-bit network and the driver positions of the 32-bit one. |
| `tb_adder_pkg_dp` | optimality of the split table under the delay model |
| `tb_pre_condition_circuit`, `tb_sum_circuit` | the two bitwise rows |
| `tb_black_cell_ba`, `tb_black_cell_bb`, `tb_white_cell`, `tb_driver_cell`, `tb_multistage_driver` | every cell, exhaustively |

All of them finish in well under a second.

## How far to trust it, and what differs

* The logic is verified against plain integer addition at every width from
  1 to 32. The network is also verified against the prefix operator on
  arbitrary (g,p) inputs.
* The cell grid, cell types, split table and driver stage counts are the
  published design's. Four details of the layout are this implementation's
  choice, because the published description does not fix them:
  * the padding white cells on the broadcast column sit *below* the driver;
  * the broadcast is chained through the black cells' pass-through ports;
  * the recursion is laid out as a grid rather than as nested modules;
  * XNOR sum gates are used for odd-depth widths.
* No carry-in. The lowest sum bit is `p_1`, so the design is an adder, not
  an adder/subtractor.
* Timing is structural only: there are no delays in the RTL, and a
  synthesis tool will collapse the inverter pairs. The design keeps the
  published cell arrangement for reference or for a full-custom flow. It
  says nothing about the speed of a standard-cell implementation.
* Changing the delay model, for example with simulated cell and driver
  timings, changes the optimum. In that case, recompute the table with the
  recurrence above and replace the two `case` statements in `adder_pkg`.
  `r_adder` adapts to any table whose stage counts obey the parity rule.
