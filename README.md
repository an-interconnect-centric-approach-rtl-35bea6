# Fanout-splitting cyclic shifter

A cyclic shifter (rotator) moves every bit of an N-bit word by the same
number of places and wraps the bits that fall off one end back in at the
other. Rotators are used for squaring in normal-basis finite-field
arithmetic, for the ShiftRows step of AES, in address generators and in
CORDIC units. This RTL implements a logarithmic rotator whose cells are
**demultiplexers instead of multiplexers**. It also records the physical order
of the intermediate cells that shortens the longest wire.

```
z[j] = d[(j + sh) mod N]        (rotate right by sh)
```

The default build is 64 bits wide and uses NAND2 gates.

## Why demultiplexers

A conventional logarithmic rotator has log2(N) rows of N 2:1 multiplexers.
Row k either passes each bit straight down or takes it from 2^k places to
the left. Every bit therefore fans out to two cells of the next row. Both of
those wires toggle whenever the data toggles, including the long wrap-around
wires that a stage is not using at that moment. The shifting and
non-shifting paths are tied together, and a critical path picks up the load
of wires it does not use.

The fanout-splitting rotator turns each cell around:

```
            level k cell                         level k+1 cell
   x ──► [ DEMUX  sel ] ──stay───────────────► [ merge ] ──► next DEMUX / z
                      └──shift──► to cell (i - 2^k) mod N
```

* The **DEMUX** puts the bit on exactly one of two branch wires. `stay` goes
  to the cell of the same position on the next level. `shift` goes to the
  cell 2^k places to the right.
* The branch that is not selected sits at a fixed **rest level**, whatever
  the data does. In a shifting stage the pass-through wires are quiet. In a
  passing stage the long shift wires are quiet.
* The **merge** gate of each next-level cell combines the two branches that
  can reach it: `stay` from the same position and `shift` from 2^k places to
  its left. At most one of them is active, so the merge is a logical OR.

The gate count is the same as the MUX design, O(N log N). What changes is
the wire load on each path and how much the idle wires switch.

### Gate-level form and polarity

Each DEMUX is two 2-input gates. One gets the select and the other gets its
complement. Each merge is one 2-input gate. Two dual networks are provided
(`GATE` parameter):

| `GATE`      | DEMUX branches                              | rest level | merge  |
|-------------|---------------------------------------------|------------|--------|
| `GATE_NAND` | `stay = NAND(x, ~sel)`, `shift = NAND(x, sel)` | 1 (active low) | NAND2 |
| `GATE_NOR`  | `stay = NOR(x, sel)`,  `shift = NOR(x, ~sel)`  | 0 (carries ~x) | NOR2  |

In both networks the data between levels is in true polarity, so `z` is not
inverted. NAND suits static CMOS and NOR suits dynamic logic. The NAND
network is the default because it is the one implemented at 64 bits.

## Stages

Stage k (`fs_stage`, k = 0 … log2(N)-1) rotates by 2^k when `sh[k]` is 1.
The stages run from input to output in the order 1, 2, 4, … places. A stage
holds the DEMUX row of level k and the merge row of level k+1. Level 0 is
driven directly by `d`, and the merge row of the last stage drives `z`. So
there are 2·log2(N) gate levels from any input to any output.

## Cell order of the intermediate levels

A datapath is laid out in bit slices. The input row and the output row must
stay in bit order, but the cells of the rows in between can sit in any
physical slot. Moving them changes only the wire lengths between rows, not
the function. Choosing the slots to minimise the longest path is an
assignment problem. For one free row it is a bipartite matching. For more
rows it is solved as an integer linear program, with a sliding-window
heuristic at larger sizes.

`shifter_pkg` holds the resulting minimum-delay orders:

| N  | levels tabulated | origin                      |
|----|------------------|-----------------------------|
| 8  | 0–3              | global optimum              |
| 16 | 0–4              | global optimum              |
| 32 | 0–5              | sliding-window (suboptimal) |
| 64 | none             | natural order is used       |

Each table row lists a level from the leftmost slot (bit N-1) to the
rightmost (bit 0), with the logical cell index in each slot. For example,
level 1 of the 8-bit rotator is `6 5 4 3 7 2 1 0`: cell 7, which receives
the wrapped bit, sits next to cell 2. `cell_at(n, order, level, slot)` and
`slot_of(...)` read the tables. `fs_stage` uses them to wire the merge gate
of each output slot to the right source slots. All signals and instances
inside a stage are indexed by physical slot (`g_demux[p]`, `g_merge[q]`,
`lvl_in[p]`, `lvl_out[q]`). A relative-placement flow can therefore place
instance p in column p. With `ORDER = ORDER_LINEAR`, or for any N without a
table, every level is in natural order. At elaboration the top checks that
each table row is a permutation and that the input and output rows are in
natural order.

The orders minimise delay. Orders that trade delay for lower total switched
capacitance were also explored, but their slot tables are not given, so they
are not included.

## Modules

| file | what it is |
|------|------------|
| `rtl/shifter_pkg.sv`   | gate-style and order enums, the 8/16/32-bit order tables, `cell_at`, `slot_of`, `order_valid`, `branch_rest` |
| `rtl/fs_demux.sv`      | 1-to-2 DEMUX cell (2 gates) |
| `rtl/fs_merge.sv`      | merge gate (1 gate) |
| `rtl/fs_stage.sv`      | one shift-by-2^k stage: N DEMUXes, N merges, the select inverter |
| `rtl/demux_shifter.sv` | the rotator: log2(N) stages |

### `demux_shifter` interface

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 64 | word width, a power of two ≥ 2 |
| `GATE`    | `GATE_NAND` | `GATE_NAND` or `GATE_NOR` network |
| `ORDER`   | `ORDER_OPTIMIZED` | tabulated cell order where one exists, else natural |

| port | dir | width | meaning |
|------|-----|-------|---------|
| `d`  | in  | N       | data |
| `sh` | in  | log2(N) | rotate-right amount, binary; bit k drives stage k |
| `z`  | out | N       | `d` rotated right by `sh` |

The block is purely combinational. It has no clock, no reset and no
handshake. Register `d`/`sh` and `z` outside it if a pipelined unit is
needed. Each `fs_stage` also brings out its branch wires (`stay_w`,
`shift_w`). They are only there to observe the quiet lines, and the top
leaves them unused.

## Choices made in this RTL

The rotate direction (right), the stage order (1, 2, 4, … from the input),
the DEMUX/merge structure, the NAND and NOR networks, the 64-bit default and
the 8/16/32-bit cell orders all follow the original design. Rotations add, so
the stage order does not change the function anyway. The following points
were not fixed by the design and were chosen here:

* A plain binary shift amount. Each stage makes the complement of its select
  with a single inverter. Buffer trees for the select lines (sized to FO4 in
  a real layout) are left to synthesis.
* Which select rail drives which gate of a DEMUX: chosen so that `stay` is
  the active branch when the select is 0.
* No cell order for 64 bits, so the default build uses natural order.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=… failures=…`:

* `tb_fs_demux`, `tb_fs_merge`: exhaustive truth tables in both gate styles,
  including the rest levels.
* `tb_fs_stage`: the three stages of an 8-bit rotator in the optimised
  order, both styles. It keeps its own copy of the 8-bit order and checks the
  slot-level output, the active branch and the quiet branches.
* `tb_demux_shifter`: 8, 16 and 32 bits with the optimised orders, 8 bits in
  natural order, and 64 bits. Each is built in NAND and NOR (8-bit natural
  order: NAND only). Every shift amount is applied with random words,
  walking ones, all ones and all zeros. The "rotate right by 5" 8-bit example
  is checked bit for bit. The quiet-line property is checked in every stage.
  The test counts how often each stage shifts and passes, how often bits
  wrap, and how often quiet lines are seen. A count of zero is a failure.
  This test looks at the branch wires by hierarchical reference
  (`rot_harness`).
* `tb_demux_shifter_full`: the default 64-bit build, every shift amount.

Simulate any of them with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/shifter_pkg.sv tb/tb_demux_shifter.sv --top-module tb_demux_shifter
./obj_dir/Vtb_demux_shifter
```

All of these run in well under a second.

## What this RTL does not capture

The benefits of the design are physical: shorter critical wires, less wire
load, less switched capacitance. This RTL fixes the netlist structure and
the slot order of every cell. The delay and power gains depend on placing
the cells in those slots and routing them. The RTL cannot show them, and
synthesis may restructure the NAND/NOR gates unless they are kept, for
example with a dont-touch setting. The ILP and sliding-window search that
produce the orders are design-time software and are not included. Only
their results are.
