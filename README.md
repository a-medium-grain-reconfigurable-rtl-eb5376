# A medium-grain reconfigurable array for DSP

This is a reconfigurable fabric for digital signal processing. Its unit of
computation is a 4-bit *cell*, which is coarser than an FPGA's 1-bit logic
block and finer than a word-wide ALU. The fabric is built to stream
fixed-point arithmetic at one operation per clock.

Each cell is a 4×4 matrix of tiny RAMs, called *elements*. Every element
holds 32 bits, in two banks of 16. The cell works in one of two modes:

* **Memory mode.** The sixteen elements together form a 128×4-bit RAM with
  separate read and write ports.
* **Mathematics mode.** Each element becomes a 4-input, 2-output lookup
  table. The elements are wired as a small carry-save array, so the cell
  computes the 8-bit result `y = a·b + c + d` from four 4-bit operands.
  The truth tables loaded into the elements decide whether each operand is
  read as unsigned or as two's complement.

Word-length operators, such as a 16-bit multiplier, a 24-bit adder, a shifter
or a dual-port memory, are built only by configuration: a block of cells is
loaded with the right truth tables and routing. Two networks carry the data:

* A **local mesh** joins every cell to its eight neighbours. It carries
  partial results and carries between the digits of one operator.
* A **global H-tree** is a fat tree whose bus doubles in width at every
  level. It carries operands and results between operators and to and from
  the outside.

Every cell and every hop is pipelined. So an n-bit operator accepts a new
operation every cycle, and its 4-bit digits enter and leave *staggered*: the
least significant digit first, then one more digit every two cycles.

The default top level, `mgr_array`, is a 32×32 array: 1024 cells, a ten-level
H-tree and an 8192-bit root bus.

## Elements and the four element functions

An element (`rtl/element.sv`) is a 32-bit RAM with two banks of 16 bits.

* **Read path.** It is combinational, with a 4-bit address `ra` and one read
  enable per bank. If neither bank is enabled, `ro` returns the pass-through
  input `ri`.
* **Write path.** It takes `wa`, `we` and `wi` and writes on the clock edge.
* **Lookup-table outputs.** The element always presents `y = bank0[ra]` and
  `z = bank1[ra]`. In mathematics mode the cell drives `ra = {d,c,b,a}`, so
  every element is a 4-input, 2-output lookup table.

In the multiply-accumulate array, each element adds one partial product bit
`a&b` to two incoming bits `c` and `d`. It produces a sum bit `y` and a
carry `z`.

With two's-complement operands, some of these bits have *negative* weight:
the top bit of a two's-complement number, and any bit derived from it. Four
truth tables cover every case (package `mgr_pkg`, `elem_lut`):

| function | relation           | used when |
|----------|--------------------|-----------|
| α        | `2z + y =  ab + c + d` | all three addends have the same sign |
| β        | `-2z + y = -ab + c - d` | `c` is the odd one out |
| γ        | `-2z + y = -ab - c + d` | `d` is the odd one out |
| δ        | `-2z + y =  ab - c - d` | the product is the odd one out |

The output `y` takes the sign of the odd addend, and `z` takes the sign of
the other two.

`mgr_pkg::cell_elem_fns` applies this rule through the whole cell:

1. It starts from which of the cell's inputs `a, b, c, d` are two's
   complement.
2. It follows the sign of every internal bit through the cell.
3. It returns the function each element needs, and the sign of each of the
   eight outputs.

For every cell format used in the signed multiply-accumulate (MAC) operator,
the low and high output nibbles come out as an unsigned low digit and a
two's-complement high digit, as a word's digits should. The testbench checks
this. `cell_cfg_word` turns the chosen functions into the 128 memory-mode
words that configure the cell.

## The parallel cell

The parallel cell is in `rtl/parallel_cell.sv`. Its control decoder is in
`rtl/cell_decoder.sv`.

**Memory mode.** Addresses are 8 bits:

* bit 7 is the read or write enable;
* bits 6:5 select the row of elements;
* bit 4 selects the bank;
* bits 3:0 are passed to every element.

The decoder turns the upper nibble into per-row bank enables. Column k stores
data bit k. Read data passes down each column, so `ro = ri` when no read is
enabled.

**Mathematics mode.** The sixteen elements form nested L-shaped ripple
chains. This is the layout of an ordinary carry-save multiplier, folded into
a square:

* Chain s (s = 1..4) has 2s-1 elements. It runs down column 4-s and then
  east along row s-1.
* The first element of a chain adds bits of `c` and `d`.
* Each later element adds one output bit of the inner chain and the carry of
  its own predecessor.
* Element (row r, column k) always forms `a[k] & b[r]`.
* The outermost chain gives `y[6:0]`, and its last carry is `y[7]`.

The worst path runs through seven elements. The same nested-chain structure
is used one level up, where cells take the place of elements to form
multi-digit multipliers.

The cell itself is combinational, apart from the write. Its one-cycle
pipeline register is in the tile.

## Tiles: the cell's interface to the networks

`rtl/cell_tile.sv` wraps one cell. Data passes through four stages.

1. **Input crossbar.** There are six input slots: `a, b, c, d` in
   mathematics mode; the `ra` and `wa` nibbles, `wi` and `ri` in memory
   mode. Each slot selects one of 19 sources:
   * one of 16 incoming mesh buses (8 directions × 2 buses);
   * one of the 2 nibbles of the H-tree leaf bus;
   * a configured constant.

   Each slot then passes through 0–7 extra delay registers, which line up
   operands that arrive at different times.
2. **Cell and cell register** (one cycle). There are eight output slots:
   `y[3:0]` (or `ro`), `y[7:4]`, and copies of the six inputs. The copies let
   a value travel on through a chain of cells.
3. **Output crossbar.** Each of the 16 outgoing mesh buses and the two
   H-tree leaf nibbles selects an output slot, or zero. It also has 0–7
   extra delay registers.
4. **Output register** (the mesh hop, one cycle).

So a cell result reaches a neighbour's input two cycles after the cell's own
operands: one cycle for the cell and one for the mesh. A multi-digit operator
therefore sends digit p of its operands 2p cycles after digit 0, and its
result digits leave in the same staggered order.

While the global `cfg` signal is high, the cell is held in memory mode, so
configuration writes go straight into the elements.

## The H-tree

The H-tree is made of `rtl/htree_switch.sv` and the recursive
`rtl/htree_node.sv`.

**Shape.** It is a binary tree over all tiles. Leaves are numbered in Morton
order: leaf-number bits alternate between column and row, column lowest. So
each level splits a square block in half, alternately across columns and
rows.

**Bus widths.** A leaf bus is 8 bits (two nibbles) in each direction. A
switch at level L joins two child buses of 8·2^(L-1) bits to a parent bus of
twice that width. The root bus is therefore as wide as all the leaves
together, and data can enter or leave at any leaf from outside the array.

**Switch settings.** Each switch has four outgoing buses:

* input path to the left child;
* input path to the right child;
* output path, lower half of the parent bus;
* output path, upper half of the parent bus.

Every 4-bit portion of every outgoing bus chooses its own source: none, the
parent's low half, the parent's high half, the left child or the right child.
This has two uses:

* Several narrow buses can merge onto one wide bus, provided no two drive
  the same portion.
* A child's output-path data can turn straight round into the input path
  ("turnaround"). Data between two cells then climbs only to their lowest
  common switch.

**Timing.** Switches at even levels are registered. That is half a cycle per
level, so `LEVELS/2` cycles each way (5 in a 32×32 array).

**Switch numbering.** Switches are numbered in heap order (root = 1, children
2i and 2i+1). The switch at level l above leaf i is `(2^LEVELS + i) >> l`.

## Configuration

The configuration port is `cfg_cmd` (`mgr_pkg::cfg_cmd_t`). It is a 52-bit
command: `valid`, `kind`, a 16-bit `unit`, a 16-bit `index` and 16-bit
`data`. The array accepts one command per cycle, and each tile or switch acts
only on commands with its own number.

| kind | unit | index | data |
|------|------|-------|------|
| `CFG_CELL_MEM` | tile `row*DIM+col` | word address 0..127 | nibble to write (a normal memory-mode write) |
| `CFG_CELL_MOD` | tile | – | bit 0: 1 = mathematics mode |
| `CFG_IN_SEL`   | tile | input slot 0..5 | `in_sel_t`: source, delay, constant |
| `CFG_OUT_SEL`  | tile | destination 0..15 mesh (`dir*2+bus`), 16..17 H-tree nibbles | `out_sel_t`: output slot + 1 (0 = zero), delay |
| `CFG_SWITCH`   | switch (heap number) | `{dest[1:0], portion[13:0]}` | `link_src_e` |

Directions are numbered N, NE, E, SE, S, SW, W, NW = 0..7. Row 0 is north.
A bus sent in direction d arrives at the neighbour as direction (d+4) mod 8.

Configuring one cell takes 128 memory words plus one mode command. Reset
clears every crossbar, switch and mode setting; it does not clear the cell
memories.

## Departures from the source architecture, and choices made here

**Where configuration data travels.**
* The architecture this follows carries configuration data down the H-tree
  itself, with the switches reverting to a default tree while `cfg` is high.
* Here, configuration uses the separate broadcast command port described
  above.
* What is kept: the global `cfg` signal, the forcing of cells into memory
  mode, and writing cells with ordinary memory writes.
* So reconfiguration time here is one cycle per command. It is not the
  H-tree-limited figure of about 184,000 cycles for a full 32×32 array.

**Not specified by the source; chosen here.**
* two mesh buses per direction;
* an 8-bit leaf bus;
* six input and eight output slots per cell;
* 0–7 delay registers per slot;
* the constant input;
* Morton leaf order;
* the memory address bit order;
* the command format;
* the exact link codes.

**Bus width.** The H-tree bus doubles at every level all the way to the
root. The source mentions capping the width after some levels to save area;
that is not done here.

**Choice of variant.** The source describes several variants of the cell and
element. This RTL builds its main one: the bit-parallel cell with static
elements, which has a one-cycle cell, a one-cycle mesh hop and half a cycle
per tree level. These variants are not built:
* the bit-serial five-element cell, with its ring-oscillator clock
  generator;
* the dynamic (precharged) element;
* the bit-level pipelined element;
* the transistor-level differential flip-flop. Every pipeline register here
  is an ordinary flip-flop.

**Operators.** Operators (multipliers, MAC units, adders, shifters, memory
units, FFT memory, floating-point units) are configurations of the array, not
RTL modules. The testbenches build two of them.

## Testbenches

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_element` | random contents of both banks read on `y`, `z` and `ro`; each read enable; `ro = ri` pass-through; writes to one bank leave the other alone; a read and a write at different addresses in the same cycle |
| `tb_cell_decoder` | every address and mode combination, against an independent model |
| `tb_parallel_cell` | memory mode: all 128 words, pass-through, a read and a write in the same cycle; mathematics mode: all 65536 operand combinations for each of the eight sign formats, against integer arithmetic |
| `tb_cell_tile` | a MAC cell fed from mesh, H-tree and constant sources, with input and output delays and an input copy, checked at the expected cycle; memory-mode reads and writes through the crossbars |
| `tb_htree_switch` | random per-portion link settings (merging and turnaround included) against a model, in registered and unregistered switches; commands for other switches ignored; reset |
| `tb_mgr_array` | end to end on a 4×4 array (details below) |
| `tb_mgr_mac16` | a 16-bit MAC operator, `Y = A·B + C + D`, on 16 cells of an 8×8 array (details below) |

`tb_mgr_array` checks two operations, value by value and at the expected
cycle:

* An 8-bit multiplier on four cells, first unsigned, then two's complement
  after the cells are rewritten.
* A lookup table read while another bank is written, routed through an
  H-tree turnaround into an adder with a constant input.

It counts every mechanism it exercises, and fails if any count is zero.

`tb_mgr_mac16` streams 48 operations unsigned, then 48 two's-complement
operations after reconfiguration. It checks every result digit and its
latency.

Each cell in this test gets its own A and B digits from the H-tree, instead
of passing them along the mesh. The digits of C and D come down from the
cells above the block. The last cell of each chain takes the inner chain's
final carry digit, which is ready two cycles early, through two input delay
registers.

The largest array simulated is 8×8. At the default 32×32 the simulator's
generated model is too large to build in reasonable time. Only the H-tree
depth, and so the H-tree latency, depends on the array size.

To run a testbench with plain Verilator from the directory holding `rtl/`
and `tb/`:

    verilator --binary --timing -Wno-fatal -Wno-lint -Wno-style \
        rtl/mgr_pkg.sv rtl/element.sv rtl/cell_decoder.sv rtl/parallel_cell.sv \
        rtl/cell_tile.sv rtl/htree_switch.sv rtl/htree_node.sv rtl/mgr_array.sv \
        tb/tb_mgr_mac16.sv --top-module tb_mgr_mac16 -o sim
    ./obj_dir/sim

The package file must come first.

## Capacity

The following sizes come from the source architecture's own mappings.

| workload | cells needed | fits in 32×32? |
|----------|--------------|----------------|
| 12-tap FIR filter (four 8×8 modules) | 256 | yes |
| one 16-bit CORDIC stage (a 4×8 block) | 32 | yes |
| 16-stage CORDIC cascade (a 16×32 block) | 512 | yes |
| 256-point radix-4 FFT | 512, plus a twiddle-factor lookup table of unstated size | yes, if the table needs at most 512 cells |
| 16-bit multiplier or MAC | (16/4)² = 16 | yes |

## Files

* `rtl/mgr_pkg.sv`: sizes, types, element truth tables, the sign-propagation
  rule, the command format.
* `rtl/element.sv`, `rtl/cell_decoder.sv`, `rtl/parallel_cell.sv`: the cell.
* `rtl/cell_tile.sv`: the crossbars, delay registers, pipeline registers and
  configuration unit.
* `rtl/htree_switch.sv`, `rtl/htree_node.sv`: the global tree.
* `rtl/mgr_array.sv`: the top level.
* `tb/`: the testbenches listed above.
