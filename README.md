# Pipelined hierarchical block matching: U and B architectures in SystemVerilog

Hierarchical block matching estimates a dense motion field between two video
frames in several passes. A coarse pass uses big blocks on a sparse grid to
find large motions cheaply. Each finer pass starts from the coarser result,
interpolated to a denser grid, and only searches a small neighbourhood around
it. This design builds three such passes as a three-stage hardware pipeline:

| layer | search range p | block n x n | grid step s | cycles per vector E = (n+1)(2p+1)+2n |
|------:|---------------:|------------:|------------:|----------------------------------:|
| 1     | ±7             | 64          | 8           | 1103 |
| 2     | ±3             | 28          | 4           | 259  |
| 3     | ±1             | 12          | 2           | 63   |

Stage *i* receives the vector field of layer *i-1* one vector at a time. For
each grid point it does three things:

- fetches the search area and the reference block from external frame
  memories;
- runs a full search to find an update *u*, and outputs *d(i) = d(i-1) + u*;
- bilinearly interpolates its field to the next, twice-denser grid.

Stage 3's output is one vector per pixel. The stages overlap in time: as soon
as stage 1 has produced enough of its field, stage 2 starts on it. The whole
difficulty is in keeping vectors flowing in an order that every stage can
consume without holding whole fields.

The pipeline is built twice. The two builds differ in the order in which the
grid is visited:

- **U architecture (`hbma_u_top`)**: every line of the grid is scanned left to
  right (raster order). Each stage double-buffers its block memories: one
  buffer feeds the search while the other is filled with the next point's
  whole block.
- **B architecture (`hbma_b_top`)**: lines alternate direction, left to right
  then right to left (bidirectional order). Consecutive blocks therefore
  always overlap. Each stage keeps one *wraparound* memory and fetches only
  the part of the next block it does not yet hold. That is why its external
  ports are much narrower: 8/24/16 bits against 48/40/32 bits for the search
  areas.

`hbma_top` instantiates both side by side on one `start`. Each pipeline has
its own output stream and its own frame-memory ports, so the two can be run
on the same frames and compared.

## Data conventions

- Pixels are 8-bit luminance values (`pixel_t`).
- Vectors are `mvec_t`, two signed 8-bit components `x` and `y`. Both types
  are in `hbma_pkg`.
- Frames are `FW` pixels per line by `FH` lines. The default is 288 x 352, the
  video-conference format.
- Grid point (gx, gy) of a layer with step s sits on pixel (gx·s, gy·s).
- Its reference block starts at (gx·s − n/2, gy·s − n/2). Its search area
  starts p pixels further up and left, displaced by the incoming vector.
- Any pixel outside the frame reads as the nearest border pixel. The
  address units clamp the coordinates.
- The search keeps the first minimum of the sum of absolute differences,
  scanning the vertical offset in the outer loop.
- Interpolation: horizontal, vertical and centre averages use arithmetic
  right shifts (floor). The last column and last line of a field are copies
  of their neighbours.

The vector field enters stage 1 as zeros, one per layer-1 grid point, from a
seed counter in the top.

## Timing model and flow control

Everything runs on one clock. Vectors move between stages, and inside a
stage, over valid/ready pairs. The original scheme gives each stage a clock
four times faster than the one before. That clock generator is not part of
this design; valid/ready stalls replace it.

A stage spends E + 3 clocks per vector:

- E clocks in the estimation unit, exactly, from `start` to `done`;
- one clock for the update adder;
- one clock for the result register;
- one clock for the hand-over to the next block.

Stage 3 sets the pace of the whole pipeline: (FW/2)(FH/2) vectors of 66
clocks each. At the defaults, a full frame runs through the U pipeline in
1.84 M clocks, including pipeline fill, and through the B pipeline in
1.85 M clocks. With the 34.4 ns clock that the original analysis requires for
this format (30 frames/s, every second frame processed), that is 63 ms per
frame, within the 66.7 ms budget. On the test frames the B pipeline fetches
2.6 M search-area pixels where whole blocks would take 21.9 M, about 12 %.

External frame memories are not part of the design. Every stage has, per
frame, PIX address lanes (`*_x`, `*_y`, `*_v`) and expects the addressed
pixel on `*_pix` in the same clock. The testbenches model the memories as
combinational lookups.

## The estimation unit

`estimation_unit` is an N × (2P+1) array of absolute-difference cells. Each
clock it receives one row of the (N+2P)-wide search area and one row of the
reference block, both broadcast to the array. It sums a whole vertical offset
in N clocks, then compares in one more clock. After the last offset there is
a 2N-clock tail. Together this gives the original latency
E = (N+1)(2P+1)+2N exactly. The unit requests rows with `pm_row`/`cm_row`;
the data is expected one clock later, as from a synchronous RAM. The cell
structure is this design's own. Only the latency and the unit's role are
inherited.

## U stage (`u_stage`)

- **Memories.** PM-A/PM-B hold search areas and CM-A/CM-B hold reference
  blocks. Each is an `nmodule_mem`: one RAM module per column. The input
  logic writes PIX pixels per clock in raster order. The output logic reads
  one row from every module at once.
- **Switches.** Two `mem_switch_2to1` banks pick the buffer the search reads.
- **Addressing.** Two `ext_addr_unit`s generate the clamped raster addresses
  of the block being prefetched.
- **Double buffering.** While the estimation unit works on buffer A, the
  next grid point's blocks are loaded into B. At the original port widths
  (6 and 4 pixels per clock for layer 1) the loading fits inside E, so it
  never stalls the search.

### U interpolation unit (`u_interp_unit`)

Vectors arrive in raster order. To interpolate between line y and line y+1,
the unit must still have line y when line y+1 arrives. The estimated vectors
pass through a chain of latches, R1 → R2 → LA1 (W−1 long) → R3, so that:

- R1 and R2 hold the newest vector and its left neighbour (d1, d2);
- R3 and the end of LA1 hold the two vectors directly above them (d4, d3).

`u_interpolator` turns these four into:

- `da`: the horizontal average of the upper pair;
- `dc`: the vertical average;
- `db`: the centre average.

Each arrival yields two vectors for the upper output line and two for the
line between. They go to two FIFOs, LA3 (upper line) and LA2 (middle line).
The latch-array controller toggles `ctl` every 2W outputs, so the field
leaves line by line in raster order. `ctl` starts at 1, meaning LA3 goes
first. After the last input line the unit replays that line against itself
to produce the replicated bottom rows.

## B stage (`b_stage`)

### Wraparound memories

PM holds α × α pixels with α = n + 2p + s + p_{i−1}, where p_{i−1} is the
previous layer's search range. CM holds γ × γ with γ = n + s + p_{i−1}.
Frame pixel (X, Y) always lives in module X mod α, row Y mod α. So a block
may sit anywhere: it simply wraps around both edges of the array.

`b_fetch_unit` fetches, line by line, only the pixels of the new block B
that are missing from the previous block A:

- a line outside A's lines is fetched whole;
- otherwise only the columns B has to the right of A (or to the left) are
  fetched.

Each pixel is written at its own frame coordinate. The overlap is never
moved.

The read side works in two steps:

1. All α modules deliver the same frame row.
2. An MGCN (multistage generalized cube network, `mgcn_switch`) rotates the
   modules so that the block's first column lands on the estimation unit's
   port 0.

The rotator's box settings are found by destination-tag routing. A register
holds them, loaded once per block when the search starts.

The rotator is not α lines wide. It is the next power of two at or above
α + (n+2p) − 1, with input p driven by module p mod α. The wider network
makes the rotation a plain shift without a modulo, at the cost of a larger
switch. This is this design's choice.

### When the next block may be fetched

Two blocks can coexist in the memory only if their origins differ by at most
α − (n+2p) in each direction (γ − n for CM). The original sizing argument
takes for granted that neighbouring vectors differ by at most p_{i−1}. After
the updates accumulate, nothing enforces that. So the stage checks it:

- If the next block fits, it is fetched while the search on the current
  block runs.
- If it does not fit, the fetch waits until the search is over. The
  `fit_wait` output marks those clocks.

The first block of every frame is fetched whole, after the previous search
ends. This keeps the results correct for any vector field. Only throughput
suffers when motion is wild.

### B interpolation unit (`b_interp_unit`)

With alternating scan directions, the line above the current vector was
scanned the other way. The input latches (`b_input_latch`) have two groups:

- group A: latch RA and stack ISA, for rightward lines;
- group B: latch RB and stack ISB, for leftward lines.

The line being scanned pushes into its group's stack. The previous line's
stack pops in exactly the order the current line needs it. One extra latch,
PL, keeps the vector above d2. PL is this design's addition.

`b_interpolator` forms the same three averages. The unit then writes the
current line's values into output queue OQ1 and the in-between line's values
into OQ2 (`vec_oq`). Each queue is read first-in-first-out or
last-in-first-out depending on the direction the line was produced in, so
that every output line leaves in its proper direction: even lines rightward,
odd lines leftward. The field therefore stays in bidirectional order from
stage to stage.

At the ends of a line the interpolator inputs are substituted
(d2 := d1, d3 := d4). At the right edge of the frame this produces the
replicated column. At the end of a leftward line it lets the leftmost
vector and its vertical average be emitted, since no further vector follows.

The unit takes no input while it sends out a finished pair of lines. A
4W-vector FIFO after it lets that happen at one vector per clock. This buffer
is this design's addition for single-clock operation. Without it, the next
stage's slow reading would stall the search.

## Departures from the original design

- A single clock with valid/ready flow control replaces the per-stage
  clocks, which are 4× faster each stage.
- The estimation unit's internal cell structure is this design's. The
  original reuses an earlier systolic array. The latency E is kept exactly.
- Border handling, rounding, tie-breaking, vector width and block placement
  on the grid are not specified in the original. The choices are listed
  above.
- B architecture:
  - the scan is horizontal only;
  - the rotator is wider than α;
  - the "fit" check and fallback are added;
  - latch PL and the stage output buffer are added;
  - both output queues switch between first-in-first-out and
    last-in-first-out reading, where the original switches only OQ1. Here
    every output line is sent whole, in its own direction, so the middle line
    must be reversed too. Both queues hold 2W vectors; the original gives OQ2
    one more.
- Both architectures are in one top so that a single top holds every block.

## Files

| file | content |
|---|---|
| `rtl/hbma_pkg.sv` | types, widths, `vec_add`, `eu_cycles` |
| `rtl/hbma_top.sv` | both pipelines side by side |
| `rtl/hbma_u_top.sv`, `rtl/u_stage.sv` | U pipeline and stage |
| `rtl/nmodule_mem.sv`, `rtl/mem_switch_2to1.sv`, `rtl/ext_addr_unit.sv` | U memories, switches, address units |
| `rtl/u_interp_unit.sv`, `rtl/u_interpolator.sv`, `rtl/vec_fifo.sv` | U interpolation unit |
| `rtl/hbma_b_top.sv`, `rtl/b_stage.sv` | B pipeline and stage |
| `rtl/wrap_mem.sv`, `rtl/mgcn_switch.sv`, `rtl/b_fetch_unit.sv` | B memories, rotator, fetch unit |
| `rtl/b_interp_unit.sv`, `rtl/b_input_latch.sv`, `rtl/b_interpolator.sv`, `rtl/vec_oq.sv` | B interpolation unit |
| `rtl/estimation_unit.sv`, `rtl/update_adder.sv` | shared by both stages |
| `tb/tb_hbma_model_pkg.sv` | reference model: test frames, full search, interpolation |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself,
also on a watchdog. Example: the end-to-end run of both pipelines at full
size, about 1.5 minutes to build and a few minutes to run:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/hbma_pkg.sv tb/tb_hbma_model_pkg.sv $(ls rtl/*.sv | grep -v hbma_pkg) \
  tb/tb_hbma_top.sv --top-module tb_hbma_top -Mdir obj_top -o sim
./obj_top/sim
```

For a single module, list `rtl/hbma_pkg.sv`, the reference model package (if
the testbench imports it), the module and its submodules, and the testbench.
The small end-to-end tests, `tb_hbma_u_top` and `tb_hbma_b_top`, run on a
32 × 32 frame in under a second.

The test frames are generated, not read: a hashed texture, and a copy of it
shifted by a global motion. The reference model runs the same layered search
and interpolation in plain SystemVerilog. The end-to-end tests compare every
output vector. They also count each mechanism and require it to occur at
least once:

- double-buffer overlap;
- latch-array switching;
- last-line replay;
- border fetches;
- output back-pressure;
- in B, additionally: partial fetches (reuse of the overlap),
  last-in-first-out queue reads, and clocks spent waiting because two blocks
  did not fit.

## Changing sizes

All layer parameters (`N1..N3`, `P1..P3`, `S1..S3`), the port widths and the
frame size are parameters of the tops. Other formats need FW and FH set
accordingly:

- 480 × 512: stage 3 then needs about 4.1 M clocks per frame;
- 960 × 1408: about 22 M clocks per frame.

The frame size fixes the line latches (FW/s vectors) and the address widths.
FW must be a multiple of 8. The B memories and rotators grow with α and γ.
Nothing else needs changing.
