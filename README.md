# Blocked Floyd-Warshall tile kernel for all-pairs shortest paths

This is the FPGA side of an all-pairs shortest-paths (APSP) accelerator. The
host keeps the N x N distance matrix of a directed graph in its own memory and
runs the blocked Floyd-Warshall (FW) algorithm. It splits the matrix into
B x B tiles and sends sets of tiles to the FPGA. The kernel updates each tile
with all B iterations of the FW outer loop belonging to the current round.

The kernel is a linear array of B processing elements (PEs). PE r performs
iteration k = r, d[i][j] = min(d[i][j], d[i][r] + d[r][j]), for every element
of the tile. Each PE has L operators, one adder and one comparator each, so it
handles L elements per clock. With the defaults B = 32, L = 4 and 16-bit
distances there are 128 operators. A 64-bit beat of 4 elements enters every
cycle.

```
 host memory <-> fw_io_engine -> fw_global_ctrl -> PE0 -> PE1 -> ... -> PE(B-1)
 (source/dest     (read FIFO,      (tags each beat)   (each PE: pivot row p1,  |
  buffers)         result FIFO)                         pivot column p2)       |
                        ^------------------------------------ results --------+
 host registers <-> fw_regs (addresses, lengths, tile kind, start, done)
```

## Tiles, rounds and the four tile kinds

For a matrix of T x T tiles, the blocked algorithm runs T rounds. Round t uses
the pivot rows and columns t*B .. t*B+B-1. A tile is updated with pivot rows,
taken from the tile in block-row t, and pivot columns, taken from the tile in
block-column t. The tile kinds differ in where those come from:

| kind (`tile_kind_e`) | tile | pivot rows from | pivot columns from |
|---|---|---|---|
| `TILE_SELF` (0) | the diagonal tile (t,t) | itself, computed | itself, computed |
| `TILE_ROW_DEP` (1) | tiles (i,t) of block-column t | diagonal tile, final | itself, computed |
| `TILE_COL_DEP` (2) | tiles (t,j) of block-row t | itself, computed | diagonal tile, final |
| `TILE_DOUBLY` (3) | all other tiles (i,j) | tile (t,j), final | tile (i,t), final |

Each round, the host processes the self-dependent tile first. Next come the
row-dependent and column-dependent tiles, in either order, and last the
doubly-dependent ones. Each group is one request, or several requests of at
most k tiles each. All tiles of one request have the same kind.

A graph whose node count is not a multiple of B is padded with extra nodes
whose distances are all infinity. The all-ones code (65535) means infinity.
The adders saturate, so infinity plus anything stays infinity. Padded nodes
therefore stay disconnected and never shorten a real path. A true shortest
distance of 65535 or more also reads as unreachable.

## The tile stream: how the pivots are computed on the fly

This section covers the part that is hardest to follow. A PE can only update
element (i,j) once it holds pivot row r and pivot column r in the state they
have at iteration r, after iterations 0..r-1. For a doubly-dependent tile they
are just copies of other tiles. For the other kinds they have to be computed,
and they change as the iterations go on. The kernel therefore works in two
passes over a stream of 3*B segments per tile. Each segment holds B elements
and takes B/L beats:

```
pivot row 0, pivot col 0, pivot row 1, pivot col 1, ..., pivot row B-1, pivot col B-1,
tile row 0, tile row 1, ..., tile row B-1
```

Pivot row m holds the elements of row m of the pivot-row source tile. Pivot
column m holds column m of the pivot-column source tile, listed top to bottom.
For a self-dependent tile all three sources are the tile itself. So the source
buffer holds 3*B*B elements per tile, and B*B come back.

When segment m reaches PE r, one of three things happens:

* **m == r**: PE r copies the segment into p1 (row) or p2 (column). PEs
  0..r-1 have already applied their iterations to it, so it holds exactly
  what iteration r needs.
* **m > r**: PE r relaxes the segment with iteration r. This happens only if
  the tile kind computes that kind of segment: rows for self- and
  column-dependent tiles, columns for self- and row-dependent tiles. Row m,
  element j becomes min(x, p2[m] + p1[j]). Column m, element i becomes
  min(x, p2[i] + p1[m]).
* **m < r**: the segment passes unchanged, because no later PE needs it.

Rows and columns alternate in the stream. So when row m or column m reaches
PE r < m, PE r already holds both its pivot row and its pivot column in full.
In the second pass the tile rows flow through. PE r turns element (i,j) into
min(x, p2[i] + p1[j]). What leaves PE B-1 is the updated tile, and the pivot
segments are dropped there. The result equals

```
for k in 0..B-1: for i, j: C[i][j] = min(C[i][j], Q[i][k] + R[k][j])
```

Here Q is the pivot-column source and R is the pivot-row source. Q is C itself
for self- and row-dependent tiles, and R is C itself for self- and
column-dependent tiles. This is the blocked FW update.

Each beat carries a tag (`tag_t`: valid, segment kind, index, beat number and
the two "compute rows / compute columns" flags). `fw_global_ctrl` creates the
tag from two counters, and the tag travels with the data through the PEs. A
tile's stream has fully passed PE r before the next tile's pivot row r
arrives. So tiles follow each other without gaps, and one set of p1/p2
registers per PE is enough.

## Host interface

Registers are 64 bits wide and addressed by index (`fw_pkg`):

| index | name | meaning |
|---|---|---|
| 0 | SRC_ADDR | byte address of the source buffer |
| 1 | SRC_WORDS | source length in 8-byte beats, k * 3*B*B/L |
| 2 | DST_WORDS | destination length in beats, k * B*B/L |
| 3 | TILE_KIND | `tile_kind_e` of all tiles in the request |
| 4 | DST_ADDR | byte address of the destination buffer; **writing it starts the request** |
| 5 | STATUS | bit 0 done, bit 1 busy, bits 63:32 tiles taken in |

Writing DST_ADDR produces a one-cycle `start` in the next cycle. The done bit
is cleared by the next start. A pending start already reads as busy and not
done, so the host cannot mistake the previous request's done bit for the new
one.

The memory side is a generic stand-in for the host link:

* Reads: `rd_req_valid/ready/addr`. Data comes back in request order on
  `rd_rsp_valid/rd_rsp_data` with no back-pressure. The I/O engine keeps no
  more reads outstanding than its 16-entry input FIFO can hold.
* Writes: `wr_valid/ready/addr/data`.
* Element e of a beat sits in bits 16e+15:16e. Addresses go up by 8 per beat.

## Timing

* Each tile occupies the input stream for 3*B*B/L cycles: 768 at the default
  size. Two thirds of that time carries pivot rows and columns. Reads,
  compute and writes overlap, and consecutive tiles of one request overlap in
  the array.
* The array's latency is B cycles, one per PE. Add a few cycles for the
  control register and the FIFOs.
* Measured in simulation, with a memory that delivers one beat per cycle:
  * One 32x32 tile takes 808 cycles, which is 4.75 us at 170 MHz.
  * One 16x16 tile takes 216 cycles (1.27 us).
  * One 8x8 tile takes 64 cycles (0.38 us).
  * A 256-node graph (512 tile computations in 40 requests) takes 771 cycles
    per tile, which is 4.53 us at 170 MHz.
* If the result FIFO fills because writes are not accepted, the whole array
  and the global control stall together (`en` low). Nothing is lost, and the
  stream continues when the FIFO drains.

## Modules

| file | role |
|---|---|
| `rtl/fw_pkg.sv` | tag and tile-kind types, register map |
| `rtl/fw_operator.sv` | saturating add + compare, one per lane |
| `rtl/fw_pe.sv` | one PE: p1/p2 storage, pivot capture, L operators, one register stage |
| `rtl/fw_pe_array.sv` | the chain of B PEs |
| `rtl/fw_global_ctrl.sv` | stream position counters, tags, tile counter |
| `rtl/fw_io_engine.sv` | reads from the source buffer, writes to the destination buffer, done |
| `rtl/fw_fifo.sv` | synchronous FIFO used by the I/O engine |
| `rtl/fw_regs.sv` | host registers and start pulse |
| `rtl/fw_accel_top.sv` | top level: parameters B, L, W (element width), AW (address width) |

B must be a multiple of L and at most 256. Each PE stores 2*B*W bits. The
default array therefore has 32 kbit of pivot storage and about 2,900
flip-flops in total.

## What follows the source design and what is this design's own

These parts follow the source design:

* a linear array of B PEs, each doing one FW iteration with L add/compare
  operators
* pivot row and column stored in each PE
* the two-pass organisation: pivots first, then the streamed update
* the global PE control
* an I/O engine that feeds the first PE and takes results from the last
* four tile kinds, and one kind per request
* 3*B*B elements in and B*B out per tile
* start by writing the destination address, and a polled done bit
* B = 32, L = 4, 16-bit distances, padding with infinity

These are this design's own choices:

* the order of segments in the stream and the scheme by which PEs compute
  their pivots in the first pass
* the tag format
* saturating unsigned arithmetic
* the register map
* the read/write request protocol that stands in for the vendor host link
* FIFO depths
* stalling the whole array on back-pressure
* one register stage per PE

Not part of the RTL:

* the host processor and its software: the blocked driver, the change of the
  matrix to a tile-contiguous layout, and overlapping tile copies with
  computation using two alternating buffers
* the host link and its transport core
* the QDR SRAM banks on the FPGA module, which this kernel does not use
* the clock source

The testbenches model the host and the communication buffer in SystemVerilog.

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fw_pkg.sv \
          tb/fw_accel_top_tb.sv --top-module fw_accel_top_tb -Mdir obj
./obj/Vfw_accel_top_tb
```

| testbench | what it runs |
|---|---|
| `fw_accel_top_tb` | Default size. A random 90-node graph padded to 96 nodes (3x3 tiles), the complete blocked algorithm through the register interface, with random memory latency, input bubbles and write back-pressure that stalls the array. The whole matrix is compared with plain FW, and the cycle count of one 4-tile request is checked. Each tile kind, multi-tile requests, stalls, bubbles and padding must occur. |
| `fw_apsp_256_tb` | Default size. A 256-node graph, 512 tile computations, doubly-dependent tiles in chunks of 32. Checks the result and the total kernel cycles. |
| `fw_tile_latency_tb` | One tile each on kernels built with B = 8, 16 and 32 (helper `fw_tile_run`). Checks the results and the cycle bounds. |
| `fw_pe_array_tb` | B = 8, L = 2. Twelve tiles of mixed kinds back to back, with bubbles and stalls, against the blocked FW update. Also checks the B-cycle latency. |
| `fw_pe_tb` | One PE (B = 8, L = 2, position 3) beat by beat, for all four kinds, and holding still while stalled. |
| `fw_global_ctrl_tb` | The tag sequence for two requests, with gaps and stalls. |
| `fw_io_engine_tb` | Read ordering, write addresses and data, done and busy, and restart, against a random-latency memory. |
| `fw_regs_tb` | Register read-back, the start pulse and STATUS. |
| `fw_operator_tb` | Corner cases (infinity, overflow) and 5,000 random operand sets. |

All of them pass, and each finishes in seconds.

## Limits

* Distances are unsigned. Negative edge weights are not supported.
* The kernel assumes the host lays out the stream as described. It does not
  check that SRC_WORDS and DST_WORDS agree with each other. A request ends
  when DST_WORDS beats have been written.
* The host-link interface is generic. Connecting to a real transport core
  needs an adapter that keeps read responses in order.
