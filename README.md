# Word-length-configurable Baugh-Wooley multiplier modules

A coarse-grain reconfigurable array has to multiply at whatever precision the
current task needs. One option is a single fixed-size hard multiplier per
processing element (PE), which wastes area at low precision and cannot reach
high precision. The other is to build the product from the array's generic
logic, which is slow. This design takes a third way. It uses small, identical
n x n array multipliers that can each work alone or be joined with their
neighbours into one larger multiplier. The sum and carry signals at a
module's edges pass through multiplexers. Depending on the multiplexer
settings, a module either closes its edges and computes its own product, or
exchanges partial sums and carries with its neighbours as one tile of a
(m·n) x (m·n) array. The choice is made at run time.

Each module is a *modified Baugh-Wooley* two's complement array. Some cells can
negate their partial product, and the module can add correcting constants.
With these cells configured, the same hardware handles three number systems:

* unsigned: nothing negated;
* two's complement: the Baugh-Wooley cells negate, and the correcting terms
  are added;
* signed-magnitude: the magnitudes are multiplied unsigned, and the product
  sign is the XOR of the two operand signs, formed outside the array.

A small decoder in every module turns "where am I in the concatenation, which
number system" into all of the module's multiplexer selects and cell
settings. Only a short code has to be routed to each module.

The same cell scheme also exists in serial-parallel form: one row of n cells,
the multiplicand fed one bit per clock, 2n clocks per product. It is included
as a second, independent unit.

These multipliers are meant for the processing-accelerator PEs of the
3-D-SoftChip. That is a two-chip stacked system: a lower chip holds the array
of PEs, and an upper chip holds the configurable switches and buffer memory.
Only the multipliers are given here.

## Files

| file | what it is |
|---|---|
| `rtl/bw_mult_pkg.sv` | `numsys_t` (number system) and `bw_ctrl_t` (a module's control set) |
| `rtl/bw_cell.sv` | basic cell: partial product, optional negation, full adder |
| `rtl/bw_ctrl_decoder.sv` | position + number system → control set |
| `rtl/bw_array_module.sv` | NA x NB array module with edge multiplexers and its own decoder |
| `rtl/bw_superior_mult.sv` | M x M modules, joined at run time into G x G groups or used separately |
| `rtl/sp_bw_core.sv` | serial-parallel row of cells with sum/carry registers |
| `rtl/sp_bw_multiplier.sv` | serial-parallel unit with operand/control shift registers and handshake |
| `rtl/pape_multipliers.sv` | top: both units side by side |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb/*_check.sv` are parameterised helpers |

Defaults are 3 x 3 bit modules (NA = NB = 3), a 2 x 2 concatenation (M = 2)
and a 3-bit serial-parallel unit (SP_N = 3). With these defaults the parallel
part is one 6 x 6 multiplier or four 3 x 3 multipliers.

## The module array: rows of ripple adders

Inside a module, cell (i, j) multiplies multiplier bit b[i] by multiplicand bit
a[j] and has weight 2^(i+j). Each row is a ripple-carry adder. It adds its
partial products to the previous row's partial sum, shifted one place right:

```
sum input of cell (i, j)   = sum of cell (i-1, j+1)       j < NA-1
                           = ext_msb[i-1]                  j = NA-1   (MSB column)
carry input of cell (i, 0) = cin_r[i]  or 0                            (carry interface)
carry input of cell (i, j) = carry of cell (i, j-1)        j > 0
ext_msb[i]                 = carry-out of row i            (leftmost tile or alone)
                           = left_in[i]                    (otherwise)
```

Row i's column-0 sum is product bit i. After the last row, the shifted sums
and the MSB-column value are the upper product bits. For a module used alone,
therefore:

```
p = {down, sum_r}        sum_r[i] = column-0 sum of row i            (NB bits)
                         down[j]  = last-row sum of column j+1, j < NA-1
                         down[NA-1] = ext_msb[NB-1]                  (NA bits)
```

A ripple row has a nice property: a module's rows, columns and edges are a
slice of a bigger array of the same form. The only places where a module
touches the rest of a larger array are:

| edge signal | dir | width | joins to |
|---|---|---|---|
| `cin_r`   | in  | NB | right (less significant) neighbour's `cout_l`: carry into column 0 of each row |
| `cout_l`  | out | NB | left neighbour's `cin_r`: carry out of the MSB column of each row |
| `left_in` | in  | NB | left neighbour's `sum_r`: value for the MSB-column sum input of the next row |
| `sum_r`   | out | NB | right neighbour's `left_in`; in column-0 tiles, product bits |
| `top_in`  | in  | NA | the `down` of the module above: sum inputs of the top row |
| `down`    | out | NA | the `top_in` of the module below; in bottom-row tiles, product bits |

Three groups of multiplexers decide, per module, whether these edges are
open or closed:

* carry-in: `cin_r`, or 0;
* top row: `top_in`, or 0;
* MSB column: the left neighbour's `left_in`, or the module's own row carries.

## Joining modules (`bw_superior_mult`)

`grp_last` = G-1 sets the group size G at run time. It splits the M x M tiles
into aligned G x G groups, starting at tile (0, 0). Tiles left over at the
right or bottom edge, when G does not divide M, work alone. Each group is a
(G·NA) x (G·NB) multiplier, so precision grows in steps of the module size.
G = 1 gives M² independent NA x NB multipliers.

Inside a group, tile (r', c') multiplies multiplicand slice c' by multiplier
slice r'. Row 0 is at the top (least significant b slice), and column 0 is on
the right (least significant a slice). Signals flow right-to-left (carries)
and top-to-bottom (sums). A tile's position in its group, (r', c', last =
G-1), goes to its decoder. The decoder closes the edges that lie on a group
border, so no signal crosses between groups, although all tiles are always
wired to their neighbours. The group's product is collected at two of its
edges:

```
low  G·NB bits: sum_r of the group's column-0 tiles, top to bottom
high G·NA bits: down  of the group's bottom-row tiles, right to left
```

Lanes: tile (r, c) owns lane k = r·M + c. A tile working alone computes
`a_lanes[k]` x `b_lanes[k]` → `p_lanes[k]`. A group with top-right tile
(R0, C0) uses the lanes of its top row, least significant first:

```
A = {a_lanes[R0*M+C0+G-1], ..., a_lanes[R0*M+C0]}
B = {b_lanes[R0*M+C0+G-1], ..., b_lanes[R0*M+C0]}
P = {p_lanes[R0*M+C0+G-1], ..., p_lanes[R0*M+C0]}     G·(NA+NB) bits
```

The group's other lanes are ignored on input and read 0 on output. With the
default M = 2, `grp_last` = 0 gives four 3 x 3 products, and `grp_last` = 1
gives one 6 x 6 product with operands and result in lanes 1..0.

Row i of a tile depends on row i of its right neighbour and on row i-1 of its
left neighbour. There is no real loop, but whole edge vectors feed each
other in both directions. Verilator reports this as UNOPTFLAT. The warning is
harmless, and the module headers explain it.

## Sign handling and the correcting terms

This is the part that needs the most care. For a WA-bit multiplicand and a
WB-bit multiplier in two's complement:

```
P = Σ a_j b_i 2^(i+j)          (i < WB-1, j < WA-1)
  + a_(WA-1) b_(WB-1) 2^(WA+WB-2)
  - Σ a_j b_(WB-1) 2^(WB-1+j)  (j < WA-1)
  - Σ a_(WA-1) b_i 2^(WA-1+i)  (i < WB-1)
```

Replacing each subtracted partial product x by its complement, using
-x = ~x - 1, turns the two negative sums into sums of negated partial
products plus a constant:

```
P ≡ Σ (ordinary pp) + Σ ~(a_j b_(WB-1)) 2^(WB-1+j) + Σ ~(a_(WA-1) b_i) 2^(WA-1+i)
    + a_(WA-1) b_(WB-1) 2^(WA+WB-2)
    + 2^(WA-1) + 2^(WB-1) + 2^(WA+WB-1)          (mod 2^(WA+WB))
```

For square operands, the two low terms add up to the usual 2^W. No sign
extension is needed, which is why the modified Baugh-Wooley array is the
cheapest of the two's complement arrays to make configurable.

In the tiled array:

* **Negated cells.** Cells in the top multiplicand bit's column (the leftmost
  column of the leftmost tiles) and in the top multiplier bit's row (the
  bottom row of the bottom tiles) negate their partial product. The corner
  cell of the bottom-left tile lies in both, so the two negations cancel. This
  is `inv = (inv_col & j==NA-1) ^ (inv_row & i==NB-1)`.
* **2^(WA-1)** enters as a 1 on the top-row MSB sum input of the top-left tile.
  That input has weight 2^(WA-1) and is otherwise 0, because the top row has
  nothing above it.
* **2^(WB-1)** enters as a 1 on the last-row carry input of the bottom-right
  tile. That input has weight 2^(WB-1) and is otherwise 0, because the
  rightmost tiles have no right neighbour.
* **2^(WA+WB-1)** is the product MSB. Adding it modulo 2^(WA+WB) means
  inverting the final carry-out, in the bottom-left tile.

All three terms use inputs that are free in every tile shape. This is why
unequal operand widths (NA ≠ NB) work with no extra hardware.

In signed-magnitude mode, the same edge tiles clear the sign bits a[WA-1] and
b[WB-1] before the array, so the array multiplies magnitudes. The product's
top two bits are then 0. `bw_superior_mult` writes the sign,
a[WA-1] XOR b[WB-1], into the product MSB. It does this once per group
and once per tile working alone.

## The control decoder

`bw_ctrl_decoder` reads the tile row, tile column, the index of the last
row/column of the concatenation (`last`, 0 for a module used alone) and the
number system:

| control | set when | meaning |
|---|---|---|
| `cin_ext` | col ≠ 0 | take carries from the right |
| `top_ext` | row ≠ 0 | take sums from above |
| `msb_own` | col = last | feed own row carries into the MSB column |
| `inv_col` | TC and col = last | negate the MSB column |
| `inv_row` | TC and row = last | negate the bottom row |
| `mask_a` / `mask_b` | SM and col = last / row = last | clear the sign bit |
| `corr_a` | TC, row = 0, col = last | add 2^(WA-1) |
| `corr_b` | TC, row = last, col = 0 | add 2^(WB-1) |
| `corr_hi` | TC, row = last, col = last | add 2^(WA+WB-1) |

(TC = two's complement, SM = signed-magnitude.) The number-system code is
`NS_UNSIGNED` = 0, `NS_SIGNMAG` = 1, `NS_TWOSCOMP` = 2.

## Serial-parallel form (`sp_bw_core`, `sp_bw_multiplier`)

One row of N cells, one per bit of the parallel operand b. Each cell has a sum
register and a carry register. In clock t, cell i forms a_t·b_i (negated if
told to), and adds two things: the sum that cell i+1 stored in clock t-1, and
its own stored carry. Cell 0's sum is product bit t. The multiplicand is
followed by N zero bits, so 2N clocks deliver all 2N product bits.

The Baugh-Wooley configuration cannot sit in fixed cell positions here,
because the multiplicand moves through time. It is therefore supplied as
serial words, one bit per clock:

| word | bit t set (two's complement) | effect |
|---|---|---|
| `inv_lo` | t = N-1 | negate cells 0 … N-2 (the a_(N-1) b_i terms) |
| `inv_hi` | t < N-1 | negate cell N-1 (the a_j b_(N-1) terms) |
| `corr`   | t = 1 and t = N | add 1 into the top cell's free sum input: 2^N and 2^(2N-1) |

All three words are 0 for unsigned operands. `sp_bw_multiplier` holds the
multiplicand and the three words in shift registers. It loads them when it
takes `start`, then shifts them out LSB first, and shifts the product bits
into an output register.

Timing of `sp_bw_multiplier`:

```
clk edge   E0        E1 … E6 (N = 3)         after E6
start=1 ─┐ taken     busy=1, one bit per edge  done=1 for one clock, p valid
```

`start` is taken only while `busy` = 0. It may be high in the clock where
`done` is high, so products can follow each other with no gap: one product
every 2N clocks. `p` holds its value until the next product completes.
`rst_n` is an asynchronous active-low reset. Assertions check that no start
is taken while busy.

The serial-parallel unit supports square operands only. With unequal widths,
the 2^(WA-1) term would have to enter before the first clock.

## Top level (`pape_multipliers`)

The top puts the concatenable parallel array (`par_*` ports, with the group
size on `par_grp_last`) and the
serial-parallel unit (`sp_*` ports, plus `clk` and `rst_n`) side by side, each
with its own number system. The parallel array is purely combinational: a
product is valid in the same cycle as its operands and group size. In the full system, the
operands, the position codes and the results would come from and go to the
switch layer of the upper chip. Here they are plain ports.

## Simulating

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb rtl/bw_mult_pkg.sv tb/tb_pape_multipliers.sv \
  --top-module tb_pape_multipliers -o sim
./obj_dir/sim
```

Replace the testbench name for the others. What each one covers:

* `tb_bw_cell`: all 32 input combinations.
* `tb_bw_ctrl_decoder`: every position of concatenations up to 4 x 4, in
  every number system.
* `tb_bw_array_module`: 3x3, 4x4, 3x2 and 2x4 modules. Each one is checked
  alone for all operand pairs, with random values on its ignored edge inputs.
  Each one is also checked at random tile positions. There the check is that
  the module conserves weight: everything entering (partial products,
  neighbour inputs, correcting terms) equals everything leaving on its edges.
* `tb_bw_superior_mult`: these configurations, each at every group size and
  in all three number systems:
  * 2x2 tiles of 3x3: all 6 x 6 operand pairs;
  * 3x3 and 4x4 tiles of 2x2: groups with leftover tiles;
  * 2x2 tiles of 4x4: random operands;
  * 2x2 tiles of 3x2 and of 2x4: unequal widths, all operand pairs.

  Every group and every leftover tile is checked.
* `tb_sp_bw_core`: all operand pairs of 3- and 4-bit cores, unsigned and two's
  complement. The testbench itself generates the serial control words and
  checks that the product takes exactly 2N clocks.
* `tb_sp_bw_multiplier`: all operand pairs in the three number systems. It
  also checks the 2N-clock latency, back-to-back starts and that a start
  while busy is ignored.
* `tb_pape_multipliers`: the top at its default size. It runs both units at
  once with random operations, and counts each mechanism:
  * joined (group size 2) and separate (group size 1) operation in each
    number system;
  * switches between the two group sizes in both directions;
  * serial products in each number system;
  * back-to-back starts and ignored starts;
  * overlap of the two units.

  It fails if any mechanism never occurred.

To change the size, set `NA`, `NB`, `M` (parallel) and `SP_N` (serial) on
`pape_multipliers`. Modules need NA, NB ≥ 2 for the sign handling to make
sense.

## Choices made here, and what is not included

These parts follow the source scheme:

* n x n (or n1 x n2) modules built from configurable basic cells;
* multiplexer interfaces that tap carries and sums at the module edges;
* m x m concatenation into an (m·n)-bit multiplier;
* modified Baugh-Wooley sign handling for the three number systems, with an
  external XOR for the signed-magnitude sign;
* a control decoder inside each module, driven by position and number system;
* the serial-parallel variant with serial operand, control and correction
  words and 2n clocks per product.

These are choices made here:

* ripple-carry rows, rather than another array organisation;
* the exact edge-signal set and the places where the correcting terms enter;
* the position-code format and the number-system encoding;
* aligned square G x G groups (no other group shapes);
* the lane mapping of operands and products;
* the split of the serial control into three words;
* the start/busy/done handshake and the asynchronous reset.

Not included:

* the configurable switch chip (crossbar with buffer memory);
* the standard PEs (ALU, register file, instruction decoding);
* the other accelerator units (barrel shifter, accumulator/subtractor);
* the instruction RAM;
* the indium-bump inter-chip connection, which is a physical structure and
  is modelled here as plain wires between modules;
* a fully pipelined parallel array.

The design has been checked only in simulation. No timing or area figures are
given: the array is combinational, and its delay grows with M·NB ripple rows.
