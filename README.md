# Liquid simulator: a cellular-automaton water engine in RTL

This is the FPGA half of an interactive 2-D water toy. A host processor loads a
map of walls, moves a brush with the mouse and says "step"; the FPGA holds the
whole world in on-chip RAM, advances the physics and draws it on a VGA monitor.
The world is a 64 x 64 grid. Each cell holds one number, its liquid volume,
plus a wall flag. There are no particles, velocities or global solver. Every
tick, each cell looks only at itself and its four neighbours and decides how
much water to pass down, left, right and up. That locality lets one pipelined
datapath finish one cell per clock.

The design targets a Cyclone V SoC board (an ARM host talking over an
Avalon-MM bus, M10K block RAM, 18x18 multipliers). The RTL is plain
SystemVerilog with inferred RAMs and no vendor primitives.

## The rules

Liquid is stored as an 18-bit unsigned Q2.16 number (1.0 = 65536). Six
constants drive the rules. They are compile-time values in `rtl/lps_pkg.sv`:

| constant        | value | Q.16 code | role                                        |
|-----------------|-------|-----------|---------------------------------------------|
| MaxLiquid       | 1.0   | 65536     | what a cell holds without pressure          |
| MinLiquid       | 0.005 | 328       | below this a cell counts as empty           |
| MaxCompression  | 0.25  | 16384     | extra a cell may hold per cell of depth     |
| MinFlow         | 0.005 | 328       | smaller flows are dropped                   |
| MaxFlow         | 4.0   | 262144    | cap on one flow                             |
| FlowSpeed       | 1.0   | 65536     | damping multiplier, (0, 1]                  |

0.005 is not exactly representable, so it is rounded to 328 LSB (0.0050049).
4.0 needs a 19th bit, so all arithmetic runs in 24-bit signed words with 16
fraction bits (`fx_t`). Only the stored field is 18 bits.

A Blank (non-wall) cell that holds more than MinLiquid runs four rules in a
fixed order. Here `r` is what the cell still holds after the rules before it:

1. **Down.** `V(r, d_below) - d_below`, where V is the equilibrium amount the
   lower of two stacked cells should hold, given the pair's total `s`:
   MaxLiquid if `s <= 1`; `(1 + 0.25 s) / 1.25` if `s < 2.25`; otherwise
   `(s + 0.25) / 2`. This is what lets a deep column press its bottom cells
   above 1.0.
2. **Left** `(r - d_left) / 4`, then **right** `(r - d_right) / 3`. The
   unequal divisors copy the model the rules were validated against, and give
   still pools a slight rightward drift. `DIV_L` and `DIV_R` are parameters:
   set both to 4 for a symmetric spread.
3. **Up.** `r - V(r, d_above)`: water pushed out by pressure.

Each raw flow below MinFlow becomes zero. The rest is clamped to
`min(MaxFlow, r)` and then multiplied by FlowSpeed. Flows only go into Blank
neighbours. Cells outside the grid behave as walls. The rules are the
`lps_cell_eval` module, which is purely combinational. V is the `lps_vfunc`
module, used once for rule 1 and once for rule 3, so both fit in the same
clock. The divisions by constants are multiplications by reciprocals rounded
up. They are exact for /4, and within one LSB for /3 and for V's /1.25.

## One tick = two sweeps

The grid must change as if every cell had seen the same snapshot. So a tick
is split into two raster-order sweeps over the whole grid:

* **Evaluate.** Compute every flow and add it into a per-cell scratch array
  called **Diffs**: minus at the sender, plus at the receiver. The cell memory
  is only read.
* **Commit.** For each cell, `Liquid + Diffs` is written back, and the Diffs
  entry is cleared. Results below MinLiquid become 0, results above the Q2.16
  range saturate, and wall cells hold nothing.

### How evaluate reaches one cell per clock (`lps_particle_ctrl`)

This is the least obvious part of the design. A cell needs five words and a
block RAM gives one per clock. Likewise, five Diffs entries change per cell,
but a RAM can take one write per clock. Both problems are solved by
streaming:

* The cell RAM and the Line Memory (walls) are read at address `t` on clock
  `t`. The words go into a shift register `win` of `2W+1` cells. When cell `e`
  sits at `win[W]`, its neighbours are already in fixed slots: below
  `win[0]`, right `win[W-1]`, left `win[W+1]`, above `win[2W]`. A neighbour
  that falls across a row edge or the grid edge is replaced by a wall, based
  on the centre's (x, y) counters.
* A second shift register `acc` of `2W+1` signed sums moves in step with
  `win`. `acc[k]` holds the partial Diffs of cell `e + W - k`. Each clock,
  the four flows of `e` are added into the slots of `e`, `e-1`, `e+1` and
  `e+W`. The up-flow is added to the oldest slot, cell `e-W`. That slot then
  leaves the register: nothing can add to cell `e-W` any more, so its sum is
  final and is written to the Diffs RAM, once.

An evaluate sweep takes `W*H + 2W + 2` clocks: the cells plus filling and
draining the window. A commit sweep takes `W*H + 1` clocks. At 64 x 64 a full
tick keeps the engine busy for 8323 clocks. The window costs about 129 x
(20 + 24) flip-flops.

### Settling and falling streams (commit)

The cell word also carries display and optimisation flags:

* `SettleCount` counts ticks in which the cell's liquid did not change. At
  `SETTLE_LIMIT` (10) the cell becomes `Settled`. Any change clears both.
  A Settled cell skips the rules. One exception: it still runs them while one
  of its Blank neighbours is not Settled. That wakes a still pool when water
  next to it moves, or when a brush edits it (brushed cells are un-settled).
* `isDownFlowing` is set when the cell and the cell above it both hold water
  after the commit. A one-row buffer of "has water" bits from the row above
  provides this.

## Memory organisation

| memory       | depth x width | contents                                   | ports                            |
|--------------|---------------|--------------------------------------------|----------------------------------|
| Particle Mem | 4096 x 32     | cell words (layout below)                  | 1 write, 2 read (engine/host, VGA) |
| Diffs        | 4096 x 24     | signed Q.16 partial flows                  | 1 write, 1 read                  |
| Line Memory  | 4096 x 1      | wall map used by physics and renderer      | 1 write, 2 read                  |

A memory with two read ports is built as two copies of `lps_ram` that share
the write port, the way FPGA tools replicate such a RAM. The cell word, also
the host's view of GRID_MEM:

| bits    | field         | meaning                                   |
|---------|---------------|-------------------------------------------|
| [0]     | CellType      | 0 blank, 1 solid; written by the host     |
| [18:1]  | Liquid        | Q2.16 volume                              |
| [19]    | Settled       | cell is still                             |
| [23:20] | SettleCount   | unchanged-tick counter                    |
| [24]    | isDownFlowing | falling-stream flag for the renderer      |
| [31:25] | reserved      | kept unchanged by every sweep except clear|

The physics takes walls from the **Line Memory**, not from the CellType bits.
The host writes CellType into GRID_MEM, then issues LOAD_MAP to copy the bits
across. The draw-wall brush writes both.

Total storage at 64 x 64 is 2 x 131072 + 98304 + 2 x 4096 = 368,640 bits,
about 36 M10K blocks of the 397 on a 5CSEA5. That is more than the ~20 blocks
you would estimate without the renderer's RAM copies and the wider Diffs
words. Multipliers: two for V (its 0.25 factor is a shift) and one for /3.
The FlowSpeed multiply folds away while FlowSpeed = 1.0.

## Host interface (`lps_global_ctrl`)

The host sees a 32-bit slave. The signals are `chipselect`, a single `rw`
line (1 = write), a 16-bit byte address, writedata and readdata.
`waitrequest` is added. Reads return data on the clock after they are
accepted.

| offset | register   | fields |
|--------|------------|--------|
| 0x0000 | CTRL       | write-one pulses: [0] step one tick, [1] soft reset (clear liquid), [2] LOAD_MAP, [3] acknowledge DONE, [4] apply brush |
| 0x0004 | STATUS     | [0] BUSY, [1] DONE (sticky until acknowledged), [2] MAP_READY, [4:3] phase 0 idle / 1 evaluate / 2 commit / 3 waiting for vblank, [31:16] free-running clock counter for debugging |
| 0x0008 | GRID_SIZE  | [15:0] width, [31:16] height (read-only, from the parameters) |
| 0x000C | MOUSE_POS  | [15:0] x, [31:16] y in cells |
| 0x0010 | BRUSH_CFG  | [1:0] tool (00 none, 01 add water, 10 erase, 11 wall), [15:8] radius, [31:16] amount (Q0.16) |
| 0x0014 | STEP_CFG   | [0] AUTO_RUN, [1] FRAME_LOCK, [15:8] STEPS_PER_FRAME |
| 0x0018 | TICK_COUNT | completed ticks |
| 0x0040 | VGA_CTRL   | [0] video on (reset 1), [1] hide liquid, [2] debug view |
| 0x1000-0x4FFC | GRID_MEM | cell (x, y) at `0x1000 + 4*(y*64 + x)` |

How the controller behaves:

* **Scheduling.** A tick starts on a step pulse, or whenever the engine is
  free if AUTO_RUN is set. With FRAME_LOCK, the controller waits for the start
  of vertical blanking, then runs STEPS_PER_FRAME ticks for auto-run (0 counts
  as 1), or the single requested tick. Clearing AUTO_RUN abandons the wait;
  clearing FRAME_LOCK ends it at once. A tick takes 8323 clocks and vertical
  blanking lasts 72,000 clocks at a 50 MHz clock, so up to 8 ticks fit in one
  blanking interval.
* **Queued pulses.** Pulses that arrive during a sweep are remembered. When
  the engine is free they are served in the order soft reset, LOAD_MAP,
  brush, step. BUSY stays high while any is pending, so polling it after a
  command cannot miss the work.
* **GRID_MEM stalls.** GRID_MEM accesses are stalled with `waitrequest`
  while a sweep owns the memory. Register accesses never stall.
* **Brush.** The brush edits every cell with `dx^2 + dy^2 <= radius^2`
  around MOUSE_POS, as one sweep of `W*H + 1` clocks. Add water saturates
  and skips walls. Erase zeroes the liquid. Wall sets CellType and the Line
  Memory bit.
* **Soft reset.** Clears the liquid state of every cell, DONE and TICK_COUNT.
  Configuration and walls are kept.

A host session looks like this:

1. Write the map into GRID_MEM.
2. Pulse LOAD_MAP and wait for MAP_READY.
3. Write MOUSE_POS, BRUSH_CFG and VGA_CTRL whenever needed.
4. Pulse step, or enable AUTO_RUN.
5. Poll DONE or TICK_COUNT.

## Rendering (`lps_vga`)

The renderer produces 640 x 480 at 60 Hz (800 x 525 total, negative syncs)
with 8 bits per colour. The pixel clock is `clk / CLK_DIV`: 25 MHz from
50 MHz by default. Each cell is a 7 x 7 square in the top-left 448 x 448
pixels. Colours:

* Walls are grey 0x808080.
* Water is blue `96 + Liquid/512`, saturating at 255.
* A falling stream (isDownFlowing and not Settled) is drawn at full blue.
* The debug view adds red for Settled and green for isDownFlowing.

`vblank` goes to the controller for frame locking. Colour and syncs leave
together, two pixels after the pixel counter.

## What is this design's own choice

The rules, constants, two-pass update, Diffs buffer, cell word layout,
register map and block structure come from the original design. These
points were left open and were filled in here:

* The streaming window and partial-sum register that give one cell per clock.
* Walls at the grid edge.
* Saturation above the Q2.16 range.
* The settle threshold (10) and the neighbour wake-up of Settled cells.
* The brush shape.
* The MOUSE_POS packing, the queue order of pulses, `waitrequest`, and
  GRID_SIZE being read-only.
* VGA timing, scale and colours. "Hide liquid" is presentation only.
* Single clock domain; RAM contents start at zero; reset does not clear RAMs.
* 24-bit internal arithmetic and the reciprocal-multiply divisions.

The design describes V as a single shared block for rules 1 and 3. It is
instantiated twice here so the pipeline keeps its one-cell-per-clock rate.
The evaluate datapath is combinational between the window registers. A
pipeline stage would have to be added if timing at the target clock demands
it.

Not in the RTL: the host software (mouse handling, map loading), the bus
interconnect, the mouse and the monitor. Of the optional debug fields in the upper STATUS
bits, only one is built: a 16-bit counter in [31:16]. It counts clocks since
hardware reset and wraps around. Bits [15:5] read 0.

## How far it is verified

The accelerator's testbench covers both divisor settings, 4/3 and 4/4.
Each testbench checks against values computed independently: exact-division
integer models of the rules in `tb/lps_ref_pkg.sv`, array models of the RAMs,
and timing worked out from the sync parameters. The end-to-end test
`tb/tb_lps_top.sv` runs the full 64 x 64 design with default parameters,
using only bus accesses:

* 30 ticks, each compared cell by cell with the model, started from the
  grid read back before the tick. Liquid may differ by up to 12 LSB because
  of the reciprocal rounding. The flags must match exactly wherever the
  liquid does. Rounding can move a flow across the MinFlow cut-off, or a
  new level across the MinLiquid cut-off. The model flags such cells and
  their neighbours. For those cells alone it allows a difference of up to
  MinLiquid + 12 LSB and skips the flag comparison.
* A half-full cell trapped in a walled cup. It must stay unchanged and
  become Settled.
* Each of the three brush tools.
* A stalled GRID_MEM read.
* Frame-locked auto-run with two ticks per frame.
* The debug view and a soft reset.
* The exact busy-clock count of every tick.

The testbench also fails if any mechanism never happens: flows in all four
directions, compression above 1.0, MinLiquid clamping, settling, falling
streams, walls, water and flags on screen.

Not verified: timing closure on the FPGA, and long-run agreement with the
original reference model (the comparison is per tick, with a small tolerance).

## Files and simulation

`rtl/`:

* `lps_pkg.sv`: types, constants, register map.
* `lps_ram.sv`: inferred RAM.
* `lps_vfunc.sv`: the V function.
* `lps_cell_eval.sv`: the flow rules.
* `lps_particle_ctrl.sv`: the sweep engine.
* `lps_particle_block.sv`: the engine with its memories.
* `lps_line_block.sv`: the Line Memory.
* `lps_vga.sv`: the renderer.
* `lps_global_ctrl.sv`: registers and tick FSM.
* `lps_top.sv`: the top level.

`tb/` holds one self-checking testbench per block (`tb_<module>.sv`) plus the
reference package. Each prints `TB_RESULT checks=N failures=M`. To run one
with Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/lps_pkg.sv tb/lps_ref_pkg.sv rtl/*.sv tb/tb_lps_top.sv \
      --top-module tb_lps_top -o sim && ./obj_dir/sim

The full-size end-to-end run takes a few seconds.

Parameters: `GRID_W` and `GRID_H` (64; they must be at least 2), `DIV_L` and
`DIV_R` (4 and 3), `CELL_PX` (7) and `CLK_DIV` (2) on `lps_top`. The VGA timing
parameters are on `lps_vga`. The algorithm constants and `SETTLE_LIMIT` are in
`lps_pkg`. GRID_MEM occupies 0x1000 upwards, so 64 x 64 is the largest grid
that fits the 16-bit address.
