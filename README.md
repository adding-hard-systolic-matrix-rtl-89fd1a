# Hard systolic matrix-multiplier blocks for an FPGA fabric

Most of the arithmetic in neural-network inference is dense matrix
multiplication. Built from LUTs and DSP slices, a matrix multiplier on an FPGA
is slow and large. This design puts small matrix multipliers into the fabric
as hard blocks, in place of the DSP slices. Each block is a 4x4x4 systolic
array: it multiplies a 4 x K matrix by a K x 4 matrix. Adjacent blocks connect
directly, so a group of them can be chained into one larger systolic array
without using general-purpose logic.

The RTL here contains:

- the hard block with its operand sequencing, data skewing, processing
  elements, result write-back and the multiplexers used for composition;
- a 32 Kbit dual-port block RAM of the fabric, with selectable geometry;
- a grid of blocks with their BRAMs, which can run the blocks independently
  or composed into one multiplier.

The programmable routing and the logic blocks of the FPGA are not included.

All of it is synthesizable SystemVerilog-2017 with synchronous active-low
reset (`rst_n`). It compiles with Verilator 5 (lint clean under `-Wall`,
apart from the two unused edge signals noted below) and with the slang front
end of Yosys.

## How one block computes

The block is *output-stationary*, as in Kung's design R1:

- elements of A move left to right through the 4 x 4 grid of processing
  elements (PEs);
- elements of B move top to bottom;
- PE(i,j) keeps C(i,j) in its own accumulator.

Each cycle, a PE multiplies the A and B operands that meet there, adds the
product to its accumulator, and passes both operands on through a register.

The operands come from BRAMs:

- word `a_base + k` of the A BRAM holds **column k of A**;
- word `b_base + k` of the B BRAM holds **row k of B**;
- element i of a word sits in bits `[16i+15:16i]`.

The controller (`mm_ctrl`) reads one word of each per cycle, for k = 0..K-1.
A BRAM delivers all four elements of a word in the same cycle, but a systolic
array needs row i to start i cycles after row 0. The *setup circuit*
(`mm_setup`) delays lane i by i registers to create that skew.

### Tags: how a PE knows where a dot product starts and ends

Each A operand carries three tag bits through the array, next to its data
(`a_flit_t`):

- `vld`: the flit carries an element;
- `first`: element k = 0;
- `last`: element k = K-1.

On `first`, a PE loads the product instead of adding it. On `last`, it copies
the finished sum into a separate result register and pulses `result_vld`. The
accumulator is then free for the next product while the result waits to be
read out. B operands carry only `vld`. Each PE asserts that a valid A operand
never arrives without a valid B operand, which catches misaligned streams in
simulation.

Because the tags travel with the data, the array needs no central cycle
count. A block that receives its operands from a neighbour works without
knowing when the neighbour started.

### Write-back

PE(3,3), at the bottom right, is always the last to finish. Its `result_vld`
starts the output interface (`mm_out_if`). That interface writes C to the C
BRAM one row per cycle:

- row r goes to address `c_base + r`;
- element j of the row sits in bits `[16j+15:16j]`.

### Number format and saturation

Operands are 16-bit signed fixed point. The 16 bits follow the architecture
study; the binary point is this design's choice: Q8.8, set by
`mm_pkg::FRAC_W = 8`.

Products are accumulated in 40 bits: a 32-bit product plus 8 guard bits, so
no overflow is possible for any K the 512-word BRAMs can hold. On
write-back, each sum is shifted right by `FRAC_W` (arithmetic shift, which
truncates toward minus infinity) and clamped to [-32768, 32767].

### Timing of one block

The table counts cycles from the cycle in which `start` is high, written s.

| event | cycle |
|---|---|
| read address k | s+1+k |
| operand k at PE(0,0) | s+2+k |
| operand k at PE(i,j) | s+2+k+i+j |
| `result_vld` of PE(3,3) | s+K+2N |
| C row r written | s+K+2N+2+r |
| `done` | s+K+3N+2 |

A block accepts a new `start` only when idle, that is from the cycle after
`done`, so a block completes one product every K+3N+3 cycles: 19 cycles for
a 4x4x4 product. Products do not
overlap inside a block; that keeps the write-back simple and is a choice of
this design.

## Memory mode, neighbour mode and systolic composition

Three 2-input multiplexers (`mm_block`) select where each stream comes from
or goes to:

| select | `SRC_MEMORY` | `SRC_NEIGHBOR` |
|---|---|---|
| `a_sel` | A from this block's A BRAM, through the setup circuit | A from the east edge of the block on the left |
| `b_sel` | B from this block's B BRAM | B from the south edge of the block above |
| `c_sel` | the C port carries only this block's rows | the C port also forwards the rows of the block on the left |

The A and B streams leaving a block's east and south edges are still skewed
and still tagged. The A and B multiplexers therefore sit *after* the setup
circuits, so a neighbour's data enters the PE array directly. A row of
composed blocks then behaves exactly like one wider systolic array.

To compose an (R·4) x K x (C·4) product on an R x C grid:

- the left column reads A from its BRAMs;
- the top row reads B from its BRAMs;
- every other A and B input is in neighbour mode;
- every block except those in the left column has `c_sel = SRC_NEIGHBOR`.

**Start stagger.** A block's own BRAM operands must meet the operands that
arrive from its neighbours. Block (r,c) is therefore started (r+c)·4 cycles
after block (0,0). `mm_fabric_top` generates these delayed start pulses from
a single `start`.

**Sharing the C port.** The C rows of a grid row leave through the C BRAM of
the rightmost block. Block (r,c) finishes 4 cycles after block (r,c-1) and
writes its 4 rows in the next 4 cycles, so the rows of neighbouring blocks
use disjoint cycles. In neighbour mode the C multiplexer forwards the left
neighbour's row in any cycle in which the block writes no row of its own. The
multiplexer is combinational, so a row reaches the end of the chain in the
cycle it was produced. An assertion flags a collision.

Each block writes its tile at its own `c_base`. The usual layout is
`c_base = c·4`, which puts the tiles of a grid row side by side in one C
BRAM. A block whose right neighbour takes its C stream does not write its own
C BRAM.

A result leaves the grid within a few cycles of being computed. The grid does
not time-multiplex the blocks within one product: a larger product needs
either a larger grid or several passes, with operands reloaded between them.

## The grid top, `mm_fabric_top`

`mm_fabric_top #(N=4, ROWS=2, COLS=2)` is a ROWS x COLS grid of blocks. The
default 2 x 2 grid is the 8x8x8 example of composition.

Each block has its own A, B and C BRAM:

- port 1 of each BRAM faces the block;
- port 2 is brought out as the `a_fab_*`, `b_fab_*` and `c_fab_*` arrays, the
  side that the rest of the FPGA would use to fill and empty them.

The grid is configured per block through `cfg[r][c]` (`blk_cfg_t`: the three
selects and the three base addresses). The same grid can therefore run:

- ROWS·COLS independent 4 x K x 4 products, every block in memory mode;
- one composed product;
- any mix of these, for example independent rows.

With `start` high in cycle s, `done` is high in cycle
s + K + (ROWS+COLS+1)·4 + 3. For the 8x8x8 case that is 31 cycles. A start
while busy is ignored.

The A and B streams leaving the east and south edges of the whole grid are
not connected. Verilator reports them as unused signals; a larger grid would
continue them.

## Files

| file | what it is |
|---|---|
| `rtl/mm_pkg.sv` | widths (16-bit data, 40-bit accumulator, 9-bit address), flit and configuration types, `sat_scale` |
| `rtl/mm_pe.sv` | processing element: registered operand pass-through, tagged multiply-accumulate, result register |
| `rtl/mm_pe_array.sv` | N x N PEs with near-neighbour links and edge outputs |
| `rtl/mm_setup.sv` | systolic data setup (lane i delayed i cycles), element type as a type parameter |
| `rtl/mm_ctrl.sv` | BRAM address generation, operand tags, busy/done |
| `rtl/mm_out_if.sv` | output data interface: row-per-cycle write-back with scaling and saturation |
| `rtl/mm_core.sv` | PE array + output interface |
| `rtl/mm_block.sv` | hard building block: controller, setup circuits, mode multiplexers, core |
| `rtl/bram.sv` | 32 Kbit true dual-port RAM, geometry selected at run time by `geom` (512 x 64 down to 32768 x 1), read-first |
| `rtl/mm_fabric_top.sv` | grid of blocks with their BRAMs, start stagger, completion |

Each file opens with a description of its interface and timing.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Each has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mm_pkg.sv tb/tb_mm_fabric_top.sv --top-module tb_mm_fabric_top -o sim
./obj_dir/sim
```

Testbenches of the building blocks:

| testbench | what it checks |
|---|---|
| `tb_mm_pe` | sums, tags and pass-through of one PE |
| `tb_mm_setup` | lane delays |
| `tb_mm_ctrl` | address sequence, tag alignment, ignored start while busy |
| `tb_mm_pe_array` | all 16 dot products and the latency K+2N-2 |
| `tb_mm_out_if` | row timing, scaling and saturation |
| `tb_mm_core` | C rows against a reference, cycle-exact |
| `tb_mm_block` | memory mode, neighbour mode on A, B and C, and the timing table above |
| `tb_bram` | both ports in all seven geometries, read-first, write collisions |

End-to-end testbenches:

- **`tb_mm_fabric_top`**: the default 2 x 2 grid. It runs composed 8 x K x 8
  products for K = 4, 8 and 13, one with saturating operands, and one started
  in the cycle after `done`. It then runs four independent products. It
  checks every C element and the start-to-done latency. It also counts that
  each mechanism occurred: BRAM reads, A and B taken from a neighbour, C rows
  forwarded, saturation, K > 4, an ignored start, back-to-back starts.
- **`tb_mm_workloads`**: the matrix sizes of the architecture study, through
  the helper `tb_gemm_runner`. The helper cuts a product into tiles of the
  grid's size and checks every element. It runs:
  - 4x4x4 on one block;
  - 16x16x16 in one pass on a 4 x 4 grid;
  - 32x32x32 in 4 passes on a 4 x 4 grid (284 compute cycles), and for
    comparison on the same 256 multipliers arranged as a 2 x 2 grid of
    8x8x8 blocks (300 cycles) and as one 16x16x16 block (332 cycles);
  - 64x64x64 in 64 passes on the default grid, 5568 compute cycles;
  - 70x70x70 in 81 passes on the default grid, with zero-padded edge tiles.

Verilator's build time grows steeply with the grid size. A bench holding
16 x 16 and 18 x 18 grids, which would run 64x64x64 and 70x70x70 in one pass,
took more than 13 minutes to compile. Those grids have not been simulated.

To change the design:

- `N` changes the block size. The architecture study also compared 8x8x8,
  16x16x16 and 32x32x32 blocks and recommends 4x4x4. `N = 8` and `N = 16`
  are exercised by the workload bench, and with `N = 8` the end-to-end
  bench, with its own `N` changed to match, passes as well. Each BRAM word is `N`·16 bits
  wide and the BRAM stays at 32 Kbit, so its depth, and with it the
  largest K of one pass, shrinks as `N` grows (128 words at `N = 16`).
- `ROWS` and `COLS` change the grid.
- `FRAC_W` moves the binary point.

## Where this design goes beyond the architecture description

The architecture study fixes the dataflow and the recommended configuration:

- the systolic dataflow (inputs move, results stay);
- the 4x4x4 block size;
- 16-bit fixed point;
- 32 Kbit dual-port BRAMs;
- memory mode and neighbour mode on the A and B inputs and the C output;
- direct links between adjacent blocks.

Everything below is this design's own choice:

- **Tags and result register.** The study does not say how a PE knows where
  a dot product starts and ends.
- **BRAM word layout and sequencing.** One column of A and one row of B per
  64-bit word; one word per cycle.
- **Number format.** Q8.8 with a 40-bit accumulator; write-back shifts and
  saturates to 16 bits.
- **Setup circuit.** Realised as delay lines.
- **Position of the A/B multiplexers.** Placed after the setup circuits, so
  that neighbour data is not skewed twice.
- **Dynamic C multiplexer.** In neighbour mode it forwards the neighbour's
  rows only in cycles where the block writes none of its own. A select fixed
  by configuration alone would never let the block's own rows out.
- **Start stagger of (r+c)·4 cycles** and the grid's completion logic.
- **BRAM behaviour.** Read-first; port 1 wins a write collision. Both ports
  share one geometry, and narrow reads are returned in the low bits. The
  grid uses its BRAMs only in the 512 x 64 geometry.
- **One A, B and C BRAM per block in the grid top.** The composition example
  only shows BRAMs at the edges of the composed group; per-block BRAMs let the
  same grid also run its blocks independently.
- **No overlap between products in one block**, and products need K ≥ 1.

## What is not modelled

- **Routing.** The programmable routing of the fabric, and the switch boxes
  inside the matmul blocks, are not modelled. The study describes them only
  by architecture parameters: segment length 4, Wilton switch boxes with
  Fs = 3, and input and output connection flexibilities of 0.15 and 0.1.
  Adjacent blocks here are joined by plain wires. That matches the study's
  finding that dedicated direct links change little, and it affects timing,
  not function.
- **Logic blocks.** The LUT-based logic blocks (ten fracturable 6-LUTs per
  cluster) and the DSP slices that the blocks replace are not modelled.
- **Placement.** The placement of the blocks on the die (clustered,
  surrounded by BRAMs, or in columns) is a floorplan question.
- **Timing and area.** Nothing here reproduces the study's timing or area
  results: about 320 MHz for a fabric of 4x4x4 blocks at 40 nm, about 3x the
  clock and 1/8 the area of a DSP-slice implementation of a 64x64x64
  multiplier, and about 2.5x end-to-end speed-up on MLPerf networks. Those
  come from place-and-route experiments, not from the RTL.
