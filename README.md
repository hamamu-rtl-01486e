# Hamamu: hard matrix-multiplier blocks for an FPGA fabric

Most of the work in a neural network is matrix multiplication. On a
conventional FPGA a matrix multiplier is assembled from many DSP slices wired
together through the general routing, which costs area and clock speed. The
Hamamu architecture instead places hard **matmul blocks** in the fabric: each
block is a small systolic matrix multiplier (4x4x4 in the recommended
configuration), and neighbouring blocks can be joined through **programmable
direct interconnect** into one larger systolic multiplier without touching the
general routing.

This repository holds synthesizable SystemVerilog for that hardware: the
processing elements and their pipelined MACs (int8 and fp16), the 4x4 systolic
core, the building-block matmul with its memory/neighbour-mode muxes, the
input setup and output interface circuits, the direct links, the 20 Kbit block
RAM and a DSP slice built on the same MAC, plus a top level that composes four
blocks into an 8x8xK multiplier with its RAMs.

## The building-block matmul

A block multiplies a 4xK slice of A by a Kx4 slice of B into a 4x4 tile of C.
It reads 8 elements per cycle: one column of A (4 elements) and one row of B
(4 elements). Inside is a 4x4 grid of processing elements (PEs):

```
            B lane 0   B lane 1   B lane 2   B lane 3      (from top RAM or top neighbour)
               |          |          |          |
 A lane 0 -> PE(0,0) -> PE(0,1) -> PE(0,2) -> PE(0,3) -> A to right neighbour
 A lane 1 -> PE(1,0) -> ...                             C row streams -> output mux
 A lane 2 -> ...                                         -> right neighbour / C RAM
 A lane 3 -> PE(3,0) -> ...          ...     -> PE(3,3)
               |          |          |          |
                     B to bottom neighbour
```

Around the core (`core_matmul`) the block (`matmul_block`) has three muxes:

| path | memory mode | neighbour mode |
|------|-------------|----------------|
| A input | own input setup reading a RAM on the left | A leaving the left neighbour's core |
| B input | own input setup reading a RAM above | B leaving the top neighbour's core |
| C output | the core's results only | core's results, otherwise the left neighbour's C passed through |

The selects are configuration cells (`blk_cfg_t`), written once, like the rest
of an FPGA's configuration.

## How data moves through the core

This is the part that takes the most care to follow.

**Output stationary.** A moves left to right, B moves top to bottom, one
register per PE in each direction. PE(i,j) accumulates C[i][j] = sum over k of
A[i][k]*B[k][j] in its MAC's accumulator; the result stays there until it is
complete.

**Skew.** For A[i][k] and B[k][j] to meet in PE(i,j), A lane i must be delayed
by i cycles and B lane j by j cycles. The input setup circuit (`input_setup`)
reads RAM word k (column k of A, stored column-major; row k of B, stored
row-major) in consecutive cycles and delays lane l by l registers. PE(i,j) then
sees term k at cycle t0 + k + i + j, where t0 is the cycle in which lane 0
carries k = 0.

**Flags instead of a counter.** Each A element travels with three bits,
`{valid, first, last}` (`aflags_t`). `first` makes the MAC load rather than
add, and `last` marks the final term. Because the flags move with the data,
every PE knows when its own dot product begins and ends. No PE needs a global
counter, and this holds just as well when the PE sits deep inside a composed
array. B carries only a valid bit; an assertion checks that it always matches
A's.

**Pipelined accumulation.** The MAC is 3 stages deep for int8 and 8 for fp16.
Only the last stage (accumulate) is in a feedback loop. So a PE takes a new
product every cycle, and its accumulator holds the complete sum P cycles after
the last term entered.

**Shift-out along the rows.** When the last PE of row i (column 3) finishes,
the row's four accumulators are copied into a shift register. This register
moves the results right, one per cycle, out of the row's C port. The columns
leave in the order 3, 2, 1, 0. Row i+1 finishes one cycle after row i, so the
four row streams come out skewed by one cycle per row.

**No overlap.** A block runs one multiplication at a time. The next `start`
must wait until the previous results are out (`done`).

## Composing blocks into a larger multiplier

Blocks sit in a grid. The top-left block reads both A and B from RAMs. The
other blocks in the left column read A from a RAM and take B from the block
above. The other blocks in the top row read B from a RAM and take A from the
block on their left. Every remaining block works in neighbour mode for both A
and B. The composed array then behaves exactly like one (4TR)x(4TC) systolic
array, with two conditions:

* **One global skew.** Row 4r+i of the composed array must be delayed by 4r+i
  cycles, not by i. So each memory-mode input setup waits 4*pos cycles after
  `start`, where pos is the block's row (for A) or column (for B). pos is a
  configuration field (`row_pos`, `col_pos`).
* **C chaining.** Block (r,c+1) finishes 4 cycles after block (r,c), and a row
  shift-out takes 4 cycles. So the streams of one row of blocks never overlap.
  Each block's output mux passes its left neighbour's stream through whenever
  its own core is silent. The rightmost block therefore delivers a whole row
  of C, 4*TC results per row: 3,2,1,0 then 7,6,5,4, and so on. An assertion
  checks that the two streams never collide.

The direct links (`direct_link`) are modelled as an AND gate driven by one
configuration flip-flop. An open link reads as zero. The links are
combinational, so a neighbouring block sees data with the same one-register
spacing as a neighbouring PE.

At the right edge, `output_interface` removes the row skew (row i is delayed
by 3-i cycles). It then writes one complete column of the 4-row C slice per
cycle into a C RAM at the column's index, so C is stored column-major too.
Within each group of four, the address is the stream position with its two
low bits inverted. `done` rises after 4*TC columns have been written.

## Timing

Take `start` in cycle t, with the blocks configured for composition:

* the RAMs are first read in cycle t+2;
* PE(g,n) of the composed array gets term k in cycle t+3+k+g+n;
* the last column of C is written in cycle **t + K + 4TR + 4TC + P + 4**, and
  `done` is high from the next cycle (P = 8 for fp16, 3 for int8).

For one block with K = 4 this gives 4*4-2+P cycles from the first RAM read to
the last write. That matches the latency quoted for the architecture,
4N-2+P. For a composed N x N x N multiply, this design needs K+4TR+4TC+P+2 =
3N+P+2 cycles from the first read. For the 8x8x8 case that is 34 cycles at
fp16, against 38 from the 4N-2+P expression. The testbenches check the exact
cycle numbers given here.

## Arithmetic

`hamamu_pkg` selects the precision with `PREC` (`PREC_INT8` or `PREC_FP16`).
One build supports one precision, as in the architecture.

* **int8** (`mac_int8`, 3 stages): signed 8x8 products, 32-bit accumulator,
  no saturation.
* **fp16** (`mac_fp16`, 8 stages): IEEE binary16. Each product is rounded to
  fp16, then added into an fp16 accumulator, rounding to nearest even at every
  step. Subnormal inputs and results are flushed to zero. NaN inputs, Inf*0
  and Inf-Inf give the quiet NaN 0x7E00, and overflow gives Inf. Stage 2
  computes the rounded product, stages 3-7 are retiming registers, and stage 8
  accumulates.

The pipeline depths (3 and 8) come from the architecture. The stage split,
the accumulator widths and the rounding and subnormal rules are this design's
own choices.

## Memories, DSP slices and the top level

`bram` is the fabric's 20 Kbit RAM in simple dual-port mode. The width is a
parameter and the depth is 20480/WIDTH. Reads have one cycle of latency, and
a read of the word being written returns the old data. With fp16 the A, B and
C words are 64 bits wide (320 words), so K can be up to 320.

`dsp_slice` has multiplier, adder and MAC modes, kept in a configuration cell.
It wraps the same MAC as the PEs, so DSP-based and matmul-based designs share
one arithmetic core.

`hamamu_top` (parameters `PREC`, `TR`, `TC`, `N_DSP`; defaults fp16, 2, 2, 2)
instantiates TR x TC blocks with their neighbour wiring. It also has one A RAM
per block row, one B RAM per block column, one output interface and C RAM per
block row, and `N_DSP` independent DSP slices. In a real device the RAM ports
facing the rest of the fabric would be driven by soft logic. Here they are
top-level ports:

* A is written as word k = {A[4r+3][k], ..., A[4r][k]} into the A RAM of
  block row r.
* B is written as word k = {B[k][4c+3], ..., B[k][4c]} into the B RAM of
  block column c.
* C is read as word j = {C[4r+3][j], ..., C[4r][j]} from the C RAM of block
  row r.

Configure the blocks for composition as follows: `a_nbr = (c>0)`,
`b_nbr = (r>0)`, `c_chain = (c>0)`, `row_pos = r`, `col_pos = c`. Then write
the RAMs, set `k_len`, pulse `start` and wait for `done`. The 4-bit position
fields allow arrays of up to 16x16 blocks (a 64x64xK multiplier).

## What is not here

* **Soft logic.** The logic blocks, the general routing (switch and connection
  boxes), the CPUs, the memory and I/O controllers, the analog parts and the
  clocking are ordinary FPGA resources, not part of this RTL. So are the
  adders that a parallel (non-systolic) composition of blocks would need.
* **Physical aspects.** The floorplan of the blocks is not part of the RTL.
  The architecture studies three placements: columns of matmuls
  ("columnar"), matmuls surrounded by RAMs and logic ("surround"), and
  columns of matmuls mixed with DSP columns ("hybrid"). It also places switch
  boxes inside a matmul's square footprint, with pins spread around its edge.
  None of this is RTL either.
* **Directions not used.** The architecture provides direct links to all four
  neighbours. Only the three directions the systolic dataflow uses are built:
  A from the left, B from the top, C from the left.
* **RAM modes.** The RAM's single-port mode is not modelled, and its width is
  chosen when building, not when configuring.
* **Default size.** The default composed size is the 8x8x8 arrangement of
  four blocks. Larger evaluated sizes (16x16 up to 64x64, or 36x36 for a
  35x35x35 problem) need `TR`/`TC` raised, and the RTL supports that. The
  16x16 array (4x4 blocks) is simulated; the larger ones are not, only to
  keep simulation builds short.

## Simulating

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`. The
testbenches use `--timing` delays. For example, the end-to-end test at the
default size:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/hamamu_pkg.sv tb/tb_fp16_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/tb_hamamu_top.sv --top-module tb_hamamu_top -o sim
./obj_dir/sim
```

The other benches are built the same way, with their own top module:

| testbench | checks |
|-----------|--------|
| `tb_mac_int8`, `tb_mac_fp16` | random dot products, products and sums against reference arithmetic; exact latency (3 / 8) |
| `tb_pe` | accumulated value, `done` latency, forwarding of A, flags and B |
| `tb_core_matmul` | 4x4xK fp16 products for several K, shift-out order, the cycle each row starts |
| `tb_input_setup` | address sequence, position delay, lane skew and flags, busy, start ignored while busy |
| `tb_output_interface` | de-skew, column addresses, write timing, done |
| `tb_direct_link`, `tb_bram`, `tb_dsp_slice` | configuration cell; RAM read/write semantics and depth; the three DSP modes in both precisions |
| `tb_matmul_block` | two int8 blocks as a 4x8xK multiplier (neighbour mode, C chaining), then reconfigured as a lone block |
| `tb_hamamu_top` | default top: 8x8x8 and 8x8x(9..48) fp16 multiplies end to end through the RAM ports, last-write cycle, DSP modes; fails if any of memory mode, neighbour mode, C pass-through, accumulator restart or a DSP mode was never used |
| `tb_hamamu_workloads` | a 16x16 array of 4x4 blocks: 16x16x16, 8x8x8 and 13x13x13 fp16 multiplies in a row, the smaller ones zero-padded, unused results checked to be zero, last-write cycle |

The fp16 reference (`tb/tb_fp16_pkg.sv`) works on `real` values, separately
from the RTL's bit-level arithmetic. It rounds the exact product or sum of two
fp16 numbers with the same rules as the hardware.
