# Modular capacitive touchpads: FPGA controller

A touch surface built from identical square tiles. Each tile, a *sensor block*, carries a
4 x 4 grid of capacitive pads, a small microcontroller and one connector on each of its
four edges. Tiles snap together edge to edge in any arrangement and any orientation, and
one edge of one tile plugs into the FPGA board. The RTL here lets user logic read every
pad by its (x, y) position in the assembled surface. It finds which tiles are present,
works out where each one sits and how it is turned, measures every pad, and keeps a
pad-by-position image up to date. User logic never has to know how the tiles were laid
down.

The top level, `touchpad_demo`, wraps the controller (`touchpads`) with three example
applications:
- a VGA view of the surface;
- a ten-key number pad that sends key states over a serial line to a USB-keyboard
  microcontroller;
- a one-button threshold calibration.

## The sensor block and what the FPGA sees

All blocks share these lines through their edge connectors:
- an I2C bus (SCL, SDA);
- one reset line (MCLR, active low);
- two *sense rails*.

The only lines that are *not* shared are the neighbor-detect pins. On each edge a block
has one output and one input, and they cross over to the block (or FPGA) on the other
side. This is how position is discovered.

Each pad is part of an RC square-wave oscillator. There are two oscillators per block,
one for each rail, and each reaches 8 of the 16 pads through an 8-way analog
multiplexer. Untouched, an oscillator runs near 100 kHz. A finger adds capacitance and
lowers the frequency. A tristate buffer connects a block's oscillators to the shared
rails only when the FPGA asks, so exactly one block drives the rails at a time.

The microcontroller on each block has its own 7-bit I2C address and understands one-byte
commands:

| byte         | meaning                                          |
|--------------|--------------------------------------------------|
| `0110_0000`  | neighbor-detect outputs on (all four edges)      |
| `0100_0000`  | neighbor-detect outputs off                      |
| `11_bbb_aaa` | rail-2 multiplexer = bbb, rail-1 multiplexer = aaa |
| `0000_0011`  | both oscillators onto the sense rails            |
| `0000_0000`  | both oscillators off the rails                   |

A one-byte read returns the four neighbor-detect inputs as `{left, top, right, bottom,
0000}`. The microcontroller firmware, the oscillators and the board are outside this
RTL. The testbenches model them (`tb/sensor_block_model.sv`).

A reading is the number of rising edges seen on a rail during a fixed window. The window
is 75 000 clocks (750 us) at 100 MHz, so an untouched pad reads about 75. **Lower means
touched.**

## Controller operation (`touchpads`)

A sequencing FSM on the 100 MHz clock runs these steps after reset:

1. **Reset the blocks.** MCLR is held low for `MCLR_CYCLES` clocks.
2. **Scan** (`i2c_commands`, `SCAN_ADDRESSES`). Every bus address from 1 to 127 is
   probed with a harmless write. Each address that acknowledges gets the next *internal
   address* 0, 1, 2, ..., up to 2^N blocks. From here on everything refers to blocks by
   internal address. The command layer translates back to bus addresses.
3. **Map** (`xy_mapping`, described below). This builds the table that says which block
   sits at each grid cell and how it is turned.
4. **Poll** (`polling`). For each block the rails go on. Then for each of the 8
   multiplexer settings the rails are measured, one pad per rail at the same time, by two
   `cap_sense` counters. The rails go off at the end. Readings land in the *sensor
   state RAM* at address `{block, rail, select}`.
5. **Rebuild the XY image** (`make_xy_status_bram`). This walks every coordinate
   (x, y). It asks `coordinate_translation` which `{block, pad}` is there, reads that
   reading, and writes it, or 0 where there is no pad, into two dual-clock RAMs
   addressed by `{x, y}`.
6. **Idle.** A rising `mode` (or a pulse that arrived while busy) starts steps 4-5
   again. While `mode` is held high the controller polls continuously. `rescan_trig`
   restarts from step 2. If no block answers the scan, the FSM goes straight to idle.

Command port sharing: `i2c_commands` runs one command at a time. Its `done` output is
high while idle. A client pulses `start`, waits for `done` to fall, then waits for it to
rise. The scan step, `xy_mapping` and `polling` own the port in turn; the FSM selects
the owner by state.

### Finding the layout (`xy_mapping`)

This is the subtle part of the design.

**Adjacency.** For every block A in turn:
- A's neighbor-detect outputs are switched on.
- Every other block is read with `SENSE_NEIGHBORS`.
- A block that sees A on its edge e records "A is on my edge e".
- A's outputs are switched off again.

Then the FPGA drives its own neighbor-detect pin, and every block is read once more. The
block that sees it is the *root*, and the edge where it sees the FPGA fixes the root's
orientation. If no block sees the FPGA, `map_error` is raised.

**Orientation convention.**
- Edges of a block are numbered clockwise from its top: top 0, right 1, bottom 2,
  left 3.
- A block turned r quarter turns clockwise has its local edge e facing world direction
  `(e + r) mod 4`, where direction 0 is up (+Y) and 1 is right (+X).
- The FPGA is taken to be above the root, so the root's rotation is `(0 - e_fpga) mod 4`.

**Walk.** The root is placed at (0, 0). Then, repeatedly, every placed block's
neighbours are placed:
- A neighbour on local edge e of a block with rotation r lies in world direction
  `d = (e + r) mod 4`, one cell over.
- If the neighbour touches back with its own edge e', its rotation is
  `(d + 2 - e') mod 4`.

Positions are signed (N+1 bits). Blocks that cannot be reached from the root are left
out.

**Normalise.** The walk finds the minimum X and Y. Each placed block is written as
`{valid, rotation, block}` at grid cell `(X - Xmin, Y - Ymin)` into the translation
table. The surface bounds become `(Xmax - Xmin, Ymax - Ymin)`.

### From a coordinate to a pad (`coordinate_translation`)

The translation table is double-buffered. Mapping writes the back frame, and `set` swaps
the frames, so a rescan never shows a half-built table. A user pad coordinate is handled
in four steps:
1. It is first mirrored according to `XY_QUADRANT`:
   - 1: origin at the bottom left;
   - 2: x mirrored;
   - 3: both mirrored;
   - 4: y mirrored, so the origin is at the top left as on a VGA screen (the default).
2. Its upper bits pick the grid cell, which gives the block and its rotation.
3. Its two low bits give the position (u, v) inside the block, with v counting up.
4. The block's rotation is undone by r steps of `(u, v) -> (3 - v, u)`.

In an unturned block, pad number = `{3 - v, u}`. So rail 1 serves the upper two rows,
rail 2 the lower two, and the multiplexer select is `{row bit, u}`. The result is the
sensor state RAM address `{block, pad}`, one clock after the request.

### Crossing to the user clock

All sensing runs at 100 MHz. User logic runs on `clk_user`, which must be at most
100 MHz and faster than the I2C clock. The crossings are:
- Pad data crosses through the two dual-clock XY RAMs. There is one RAM per user read
  port, so two consumers never compete.
- `mode` and `rescan_trig` go through two-flop synchronizers.
- `done_out` is a toggle passed through a synchronizer. It pulses once per completed
  refresh.
- `busy_out` and the bounds are re-timed by two flops. The bounds change only while
  `busy_out` is high.

User read ports: drive `x_coordinate`/`y_coordinate`. `sensor_data` is valid two user
clocks later. It reads 0 outside the bounds and where the surface has no pad, and
`sensor_valid` says whether a pad is there. Coordinate
widths are N+2 bits, so N = 4 allows a 64 x 64 pad surface.

## Demo top (`touchpad_demo`)

| part | function |
|------|----------|
| `debounce` x3 | buttons: mode (press = one refresh, hold = continuous), rescan, calibrate; 10 ms at 65 MHz |
| `xvga`, `tp_display` | 1024 x 768 at 60 Hz; each pad a square of 2^`pad_size_log2` pixels: green touched, grey untouched, black no pad; read port 1 |
| `simple_calibration` | on the calibrate button, threshold = smallest nonzero reading (press with nothing touched); borrows read port 2 while it runs; switches `threshold_trim` move the result down (bit 0 = 1) or up by bits 4:1 |
| `num_pad`, `rs232send` | keys 1-9 at pads (0..2, 0..2) row by row, key 0 at (1, 3); a key is down when its reading is nonzero and below threshold; sends `{0, keys[5:0], 0}` then `{1, 00, keys[9:6], 1}` at 115 200 baud (divisor 564 at 65 MHz), the outer bits marking which byte is which |
| `display_8hex` | eight-digit seven-segment readout of `{0, threshold, y bound, x bound}` in hexadecimal; segments and digit strobes active low, each digit lit for 2^11 clocks in turn |

The I2C pins are open-drain pairs: `*_oe = 1` pulls the line low and `*_i` is the line
as seen. The board's I/O buffers and pull-ups sit outside. The remaining status outputs are
meant for the board's LEDs:
- controller FSM state;
- the blocks being polled and addressed;
- error flags;
- threshold;
- keys.

## Parameters and timing

| parameter | default | where |
|-----------|---------|-------|
| `N` | 4 (up to 16 blocks, 256 pads) | all; internal address width |
| `I2C_SPEED` | 400 000 | bus clock, Hz |
| `SENSE_TIME` | 75 000 | window in 100 MHz clocks (750 us) |
| `XY_QUADRANT` | 4 | origin corner |
| `CLK_HZ` | 100 000 000 | controller clock |
| `MCLR_CYCLES` | 1024 | reset pulse to the blocks |

At the defaults:
- One I2C write takes `(2 + 18*4 + 4) * 62 + 2` = 4838 clocks (48 us).
- One block polls in about 8 x (750 + 48) us + two rail writes, which is about 6.5 ms.
  The full-size test measures 6.48 ms per block.
- A full refresh of B blocks takes about 6.5 x B ms, plus one clock per coordinate for
  the XY rebuild.
- The memories are:
  - sensor state RAM: 256 x 12 bits;
  - XY RAMs: 2 x 4096 x 12 bits;
  - translation table: two frames of 256 entries.

## How far this follows the original design, and where it departs

These parts follow the original description:
- the split into command layer, mapping, translation, polling and XY-image modules;
- the command set;
- the adjacency-then-walk mapping procedure;
- the `{x, y}`-addressed user RAMs in two clock domains;
- the number-pad byte format.

These parts are this design's own:
- **I2C engine.** The original used a third-party I2C master. `i2c_master` is a small
  replacement. It handles one-byte writes and reads only, with no clock stretching and
  no arbitration.
- **Edge counting.** Rising edges are counted. One version of the original counted both
  edges. The rail passes through a synchronizer first, and the 12-bit count saturates.
- **Multiplexer command.** The multiplexer command is coded `11sss` internally. Both
  multiplexers always get the same select.
- **Neighbor bit order.** The order follows the written description
  `{left, top, right, bottom}`. The board schematic implies the reverse order; a real
  board must match one or the other.
- **Root edge.** The FPGA attachment is stored as a full 2-bit edge, so the FPGA may
  plug into any edge of the root block.
- **Mapping tables.** The adjacency and position tables are register arrays, not block
  RAMs.
- **Rotation.** It is undone arithmetically, not by a lookup table.
- **Control inputs.** They cross clock domains through synchronizers, not a RAM.
- **Done and busy.** `done_out` only pulses. The original also held it high while the
  blocks were being found; here that is a separate `busy_out`.
- **Demo details.** These are:
  - MCLR pulse length;
  - calibration ignoring zeros, with no margin;
  - display colours and the power-of-two pad size;
  - the `busy` output of the serial sender;
  - read-port sharing in the demo;
  - a 32-bit hex display word, and a standard font for the digit 6.

These parts are not included:
- the block microcontroller firmware;
- the analog oscillators, multiplexers and tristate buffers;
- the FPGA clock generator (both clocks are inputs);
- the USB-keyboard microcontroller;
- the original demo's debug LEDs that blink with mapping progress.

The original authors reported that their mapping logic was not working when they
stopped. The mapping here is a complete implementation of the procedure they described.
It has been verified only against the behavioural block model, not against real tiles.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. The two system tests use
`sensor_block_model`, which models:
- the I2C slave and its command set;
- neighbor-detect pins wired from a geometric layout;
- the two oscillators: a 100 kHz square wave, 80 kHz under a touched pad.

**`tb_touchpads`** is the end-to-end test, at a short window and a fast bus. It uses
three blocks, two of them turned. The steps are:
1. power-up scan, map and poll;
2. a single poll on a mode pulse, plus a second pulse during that poll, which must be
   queued;
3. continuous polling with mode held;
4. a block is moved and turned, and a rescan must produce the new layout;
5. a block is pulled away from the array while staying on the bus, which also cuts
   off the block beyond it, and a rescan must map only the block still joined to
   the FPGA.

After each refresh, every coordinate is read through both ports and compared with the
model's geometry. The same test also passes with `N` set to 2, 3 and 5, and the top
elaborates without width warnings for every `N` from 1 to 7.

**`tb_touchpads_full_array`** fills the whole address space of the default N = 4: 16
blocks, 256 pads. They are first arranged as a 4 x 4 square of turned blocks, then as
one row of 16 (64 x 4 pads, the widest the grid allows) after a rescan. Every
coordinate is checked after each layout.

**`tb_touchpad_demo`** runs the whole top at its default parameters, with two blocks.
It checks:
- the first refresh;
- the calibrated threshold and its switch trim;
- three digits of the seven-segment readout;
- the key states and the two serial bytes after two pads are touched;
- the time of that poll (under 10 ms per block);
- the number of green and grey pixels and lines in a full VGA frame.

It simulates several tens of milliseconds of operation in well under a minute.

To run one with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl \
  rtl/tp_pkg.sv $(ls rtl/*.sv | grep -v tp_pkg) \
  tb/sensor_block_model.sv tb/tb_touchpads.sv --top-module tb_touchpads
obj_dir/Vtb_touchpads
```

For a unit test, replace the two `tb/` files with `tb/tb_<module>.sv`. Testbench delays
assume 1 ns units. Anything read is reset or initialised, so the tests also pass when
Verilator starts other state at random values.
