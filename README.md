# Overhead-camera robot localisation: FPGA vision front end and LED beacon

This design helps locate robots on a FIRST Robotics field. Each robot carries
an 8x8 RGB LED **beacon** split into four quadrants. Three quadrants show one
colour and the fourth shows another, which gives twelve distinct IDs. A camera
above the field feeds an FPGA. The FPGA captures a frame, throws away every
pixel that is not a clean beacon colour, and stores the result in an external
cellular RAM. A soft processor then searches the stored frame for coloured
patches, pairs them into beacons and reports positions and IDs to a central
PC. Between frames, the stored image can be shown on a VGA monitor for
checking.

This repository holds the synthesizable RTL for:

- the FPGA side: camera capture, colour conversion and filtering, the RAM
  controller, frame sequencing and the VGA display
- the beacon's pattern controller

It also holds self-checking testbenches and behavioural models of the camera
and the RAM. The soft processor and its software are not included; the
processor's ports are brought out at the top level (see "Processor interface").

## Data path at a glance

```
 camera (54 MHz, UYVY bytes)
   │ din, href, vref, dclk
   ▼
 camera_in ── 4 bytes → 32-bit macropixel {U,Y0,V,Y1}, dual-clock FIFO ──► 80 MHz
   ▼
 processing ─ split into 2 pixels ─► yuv2rgb (7 clocks) ─► color_filter (1 clock)
   │          ─► pack 8 pixels into 64 bits ─► 16-word FIFO
   ▼
 ram_interface ── 4 x 16-bit synchronous bursts ──► cellular RAM (8M x 16)
   ▲                                                   │
   │ address, read/write requests                      │ 64-bit read data
 frame_ctrl (state machine + address counter)          ├──► processor (gpi1/gpi2)
                                                       └──► vga_display (25 MHz) ─► monitor

 beacon_ctrl (separate 1 MHz clock) ──► LED matrix row/column drivers
```

`robot_loc_top` wires all of this together. The beacon controller sits beside
the vision logic with its own clock and pins; on a real robot it would run on
its own board.

## Frame sequencing: the one-port RAM problem

The frame store is a single cellular RAM, and it can either read or write at
any one time. So capture, processor access and display must take turns.
`frame_ctrl` runs a five-state machine:

| State | Entered when | What happens |
|---|---|---|
| `ST_WAIT` | reset, `next_frame`, auto restart, RAM still powering up | The filter output is drained and discarded. The address is held at 0. |
| `ST_CAMERA` | the camera's `vref` falls (end of vertical blanking) | Camera bytes are captured. Each filtered 64-bit word is written to RAM when the RAM is ready. |
| `ST_FINAL` | `vref` rises (frame over) | The pipeline drains into RAM. The state ends when the filter reports `processing_complete` and the RAM is idle. |
| `ST_PROCESSOR` | from `ST_FINAL` | The processor owns the RAM. Each rising edge of its read line fetches one 64-bit word. |
| `ST_DISPLAY` | the processor raises "frame processed" | The VGA display reads the frame in a loop while its FIFO has room. |

`next_frame` returns every state to `ST_WAIT`, and so does a RAM that has not
finished powering up. When `auto_mode` is on, the display state also restarts
by itself after `AUTO_FRAME_CYCLES` clocks.

**Addressing.** The RAM controller only needs the address at the start of a
burst. So the counter moves on by 4 words as soon as a burst has been
accepted, which is when `ram_ready` falls. It wraps to 0 after
`HPIXELS*VPIXELS/2` words: each 16-bit RAM word holds two 8-bit pixels. The
counter is cleared:

- in `ST_WAIT`
- on the clock where `ST_FINAL` hands over to `ST_PROCESSOR`
- on the clock where `ST_PROCESSOR` hands over to `ST_DISPLAY`
- while the display flushes at each vertical sync

So writing, the processor's reads and every displayed frame all start at
pixel 0.

**Handshakes.**

- Writes: `proc_out_ready` is `ram_write && ram_ready`. A word leaves the
  filter FIFO only in the clock where the RAM takes it. In `ST_WAIT` the FIFO
  is drained freely.
- Display reads: requested while `display && !fifo_full && !flush`.
- Processor reads: the processor's read line passes through two flip-flops,
  and each rising edge gives exactly one read.

`vref`, the processor's read line and its frame-done line all cross into the
80 MHz domain through two-flop synchronisers.

## Pixel pipeline

**Camera input (`camera_in`).** The camera sends YUV 4:2:2 as U, Y0, V, Y1,
one byte per 54 MHz clock while `href` is high. A shift register in the
camera domain collects four bytes. It writes them as one 32-bit word into a
Gray-pointer dual-clock FIFO, with U in bits 31:24. Only the first
`2*HPIXELS` bytes of a line are taken. Capture is enabled (through a
synchroniser) only in `ST_CAMERA`. A sticky `overflow` flag reports a full
FIFO; in the tests it never fires.

**Split and convert (`processing`, `yuv2rgb`).** Each macropixel becomes two
pixels, (Y0,U,V) and (Y1,U,V), on consecutive clocks. So the converter takes
at most one macropixel every two clocks, far more than the camera delivers.
The converter inverts the BT.601 relations:

```
R = Y + 1.13988 (V-128)
G = Y - 0.39464 (U-128) - 0.58060 (V-128)
B = Y + 2.03206 (U-128)
```

The coefficients are 10-bit fixed point (1167, 404, 595, 2081 / 1024), with
rounding and clamping. The seven pipeline stages give exactly 7 clocks from
input to output, and a valid bit travels with the data.

**Colour filter (`color_filter`).** Each channel is compared with a minimum
(default 160) and a maximum (default 96):

- a channel is **on** if it is above its minimum
- it is **off** if it is below its maximum

A pixel passes only if every channel is clearly on or clearly off and at
least one is on. A passing pixel is written as the saturated colour in RGB
3-3-2 (for example yellow = `0xFC`). Anything else becomes black (0). This
keeps the beacon colours (red, green, blue, yellow, purple and so on) and
drops greys and mixed shades. With `filter_en` low the filter is bypassed: the
pixel is compressed to its top 3/3/2 bits, which gives an ordinary picture for
aiming and focusing the camera.

**Packing and buffering.** Eight filtered pixels make one 64-bit word, the
first pixel in bits 63:56. Words go into a 16-entry FIFO. The input stops
accepting macropixels once fewer than four FIFO places are free. That covers
the pixels still inside the 8-clock convert/filter pipeline, so nothing is
lost when the RAM falls behind. `processing_complete` is high when no pixel is
in flight, the packer is empty and the FIFO is empty.

## Cellular RAM controller (`ram_interface`)

After reset the controller waits `POWERUP_CYCLES` clocks (150 µs at 80 MHz).
It then writes the bus configuration register through the address lines, with
CRE high. The value is `0x87019`:

| Bits | Value | Meaning |
|---|---|---|
| 19:18 | 10 | select BCR |
| 15 | 0 | synchronous burst mode |
| 14 | 1 | fixed initial latency |
| 13:11 | 110 | latency code 6 = 7 clocks |
| 10 | 0 | WAIT active low |
| 8 | 0 | WAIT asserted during the delay |
| 5:4 | 01 | half drive strength |
| 3 | 1 | no burst wrap |
| 2:0 | 001 | 4-word bursts |

Each transfer is one 4-word burst of 64 bits. Counting from the cycle in which
ADV# and CE# go low:

```
cycle   0     1 .. 6      7    8    9    10   11
ADV#    L     H ...                            H
CE#     L     L ...       L    L    L    L     H   (ready again)
DQ      -     latency     w0   w1   w2   w3         w0 = data[63:48]
```

WE# is low in cycle 0 for a write. For a read, OE# is low from cycle 1.

- Requests can follow every 12 clocks, so `ready` is low for 11 clocks.
- Read data is valid in the clock after the burst, 12 clocks after the
  request.
- Write wins if write and read are requested together.
- The bidirectional DQ bus is split into `dq_o`/`dq_oe`/`dq_i`; the tri-state
  buffer belongs in the pad ring.
- LB#/UB# are held low, and the flash that shares the board bus is held
  deselected. These constant outputs are intended.

**Bandwidth.** 4 words per 12 clocks at 80 MHz is 26.7 M words/s. The camera
needs 13.5 M words/s at its peak:

- 54 M bytes/s of YUV is 27 M pixels/s
- stored as 8-bit pixels, two per word, that is 13.5 M words/s

The VGA display needs 12.5 M words/s. In the full-size test no capture write
ever had to wait for the RAM.

## Processor interface

The soft processor talks to the top level through three 32-bit input ports
and one 32-bit output port:

| Port | Bits | Use |
|---|---|---|
| `gpi1` | 31:0 | read data bits 63:32 |
| `gpi2` | 31:0 | read data bits 31:0 |
| `gpi3` | 31 | read data valid: set at the end of a read, cleared by the next read request |
| `gpi3` | 30 | processor owns the RAM (`ST_PROCESSOR`) |
| `gpi3` | 29 | RAM ready and configured |
| `gpi3` | 28:26 | slide switches `sw` |
| `gpo1` | 31 | frame processed: go to display |
| `gpo1` | 30 | read request: a rising edge reads the next 64-bit word |
| `gpo1` | 29:23 | board LEDs (`led[6:0]`; `led[7]` shows processor mode) |

A program reads a frame word by word:

1. Raise bit 30 of `gpo1`.
2. Wait for `gpi3[31]` to clear and then set again.
3. Take `gpi1`/`gpi2`.
4. Drop bit 30.

The address advances by itself and wraps at the end of the frame.

## VGA display (`vga_display`)

The display uses 640x480 at 60 Hz from a 25 MHz clock: 800 clocks per line,
525 lines, negative syncs. The porch and sync widths are the common industry
values: 16/96/48 clocks and 10/2/33 lines.

A dual-clock FIFO takes 64-bit words at 80 MHz and gives one 8-bit pixel per
25 MHz clock, top byte first. Its `fifo_full` output is an almost-full flag,
two places early, so the one read still in flight always fits.

During every vertical sync pulse, and whenever the display is off, both FIFO
sides are held in reset and `frame_flush` tells `frame_ctrl` to restart at
address 0. This keeps every displayed frame aligned with the frame store. A
flush started by switching the display on lasts until the next vertical sync,
so the first frame shown is a whole one. An empty FIFO during active video
shows black and sets the sticky `underflow` flag; in the tests this never
happens.

The display wraps the frame store. With a store smaller than 640x480 (as in
the reduced testbench), screen pixel n shows stored pixel n mod
`HPIXELS*VPIXELS`.

## LED beacon controller (`beacon_ctrl`)

The 8x8 matrix is driven through eight lines, each through a half-H driver:

- rows 1-4 and rows 5-8, active low: `row_n[0]`, `row_n[1]`
- red, green and blue columns 1-4 and 5-8, active high: bit 0 and bit 1 of
  `red`, `green` and `blue`

Lighting one row group at a time lets each quadrant take its own colour. The
top-left, top-right and bottom-left quadrants show the main colour; the
bottom-right quadrant shows the second colour.

| ID | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| pattern | RRRY | RRRG | RRRP | YYYR | YYYG | YYYP | GGGR | GGGY | GGGP | PPPR | PPPY | PPPG |

R is red, Y is red+green, G is green and P is red+blue. ID 0 is off.

With the 1 MHz clock and default dividers:

- The controller steps every 125 µs through a 33-step cycle (4.1 ms).
- Steps 0-9 are lit, alternating top and bottom row groups. The other steps
  are dark, which sets the brightness to 10/33.
- The push button is sampled every 96 ms. Each new press advances the ID:
  0, 1, ..., 12, 0.

## Clocks and resets

There are four clock domains:

| Clock | Used by |
|---|---|
| `dclk`, 54 MHz | the camera side of `camera_in` |
| `clk_80m` | the pixel pipeline, the RAM controller and `frame_ctrl` |
| `clk_25m` | VGA timing |
| `beacon_clk`, 1 MHz | `beacon_ctrl` |

Data crosses between domains only through the two Gray-pointer FIFOs.
Single-bit controls cross through two-flop synchronisers.

`rst` is active high. A new-frame request (`next_frame` or the auto restart)
also resets the camera FIFO and the filter through a registered `frame_rst`.
Lint notes that `rst` and `frame_rst` drive both synchronous and asynchronous
resets. That is intended: the dual-clock FIFO needs an asynchronous reset for
its camera-clock side.

## Parameters

| Module | Parameter | Default | Notes |
|---|---|---|---|
| top, `frame_ctrl`, `camera_in` | `HPIXELS`, `VPIXELS` | 640, 480 | camera mode and frame store size |
| top, `ram_interface` | `POWERUP_CYCLES` | 12000 | 150 µs at 80 MHz |
| top, `frame_ctrl` | `DISPLAY_PERIOD` | 80,000,000 | display timer period, 1 s |
| top, `frame_ctrl` | `AUTO_FRAME_CYCLES` | 16,000,000 | auto restart after 0.2 s of display |
| `color_filter`, `processing` | `R/G/B_MIN`, `R/G/B_MAX` | 160, 96 | filter thresholds |
| `vga_display` | `H_*`, `V_*` | 640/16/96/48, 480/10/2/33 | VGA timing |
| `beacon_ctrl` | `MUX_DIV`, `MUX_STEPS`, `ON_STEPS` | 125, 33, 10 | multiplexing |
| `beacon_ctrl` | `BTN_DIV` | 96,008 | button sampling |

## Where this design differs from the original system, and why

- **Colour-difference naming.** The original conversion equations call the
  red difference U and the blue difference V. That is the reverse of BT.601
  and of the camera's UYVY order. This design uses the standard pairing: V
  is the red difference.
- **Beacon patterns 1-3.** The original firmware's switch statement lists
  RRRP, RRRY, RRRG for IDs 1-3, while the pattern table gives RRRY, RRRG,
  RRRP. This design follows the table. The firmware also counted the button
  up to 13; here the ID cycles 0-12.
- **Display timer.** The original timer counted 25 MHz clocks, wrapped at
  25,000,000 and restarted at 5,000,000. Its comment spoke of showing the
  image for one second. Here the timer counts 80 MHz clocks, and the defaults
  (1 s period, restart at 0.2 s) keep the same ratio.
- **RAM burst spacing.** The original gives 11 clocks for 4 words (29 M
  words/s). This design adds one idle clock between bursts, which keeps CE#
  high between them. The result, 26.7 M words/s, is still twice what capture
  needs.
- **BCR reserved field.** The original table prints the reserved field as
  bits 22:19, which overlaps the register-select bits 19:18. It is taken as
  22:20; the value written is the same.
- **FIFOs** are small hand-written Gray-pointer and single-clock FIFOs instead
  of vendor cores.
- **Chosen here (the original gives no value):** the filter threshold values,
  FIFO depths, power-up time, VGA porches, the processor-port bit positions,
  the sticky read-valid flag and the per-frame VGA flush.
- **Not included:**
  - the soft processor and its beacon-search software
  - the camera's I2C register setup (done in software; register 0 = `0x40C3`)
  - the clock generator (its 80/25 MHz outputs are top-level inputs)
  - the UART link and the PC-side reconstruction
  - the LED driver hardware
- **Other camera modes.** 1280x1024 would need `HPIXELS=1280, VPIXELS=1024`.
  The frame (655,360 words) fits in the RAM, but the VGA path would then need
  a 108 MHz pixel clock.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `camera_in_tb` | byte packing, line-length limit, capture gating, random read gaps |
| `yuv2rgb_tb` | random pixels against a floating-point reference within one code; exactly 7 clocks latency |
| `color_filter_tb` | pass/normalise/reject rule recomputed per channel; bypass mode |
| `processing_tb` | whole filter chain with random back-pressure; word packing order; `processing_complete` |
| `ram_interface_tb` | BCR value; burst pin timing (11 bus cycles, 12 clocks per request, data valid at 12); word order; write/read round trips; write priority |
| `vga_display_tb` | sync widths, line and frame periods, every visible pixel of two frames, no underflow (reduced 32x8 mode) |
| `frame_ctrl_tb` | every state transition, address +4/wrap/clear points, write/read gating, one read per processor edge, auto restart after exactly `AUTO_FRAME_CYCLES` clocks |
| `beacon_ctrl_tb` | pattern stepping 0-12-0; lit duty; row alternation; main and second colour per quadrant group |
| `robot_loc_top_tb` | end to end, 16x8 frame; see below |
| `robot_loc_top_full_tb` | end to end at full size with all defaults |

`robot_loc_top_tb` runs the whole design against:

- `camera_model`: UYVY frames with real blanking and a hashed colour pattern
- `cellular_ram_model`: checks the burst protocol and latency
- an emulated processor

It stores three frames and reads each back word by word against the expected
filter output. It also compares one complete VGA frame pixel by pixel. It
counts each mechanism and fails if any never occurs:

- power-up hold
- each of the five states
- filter pass and reject
- filter bypass mode
- address wrap on processor and display reads
- VGA FIFO-full stall
- VGA flush
- auto restart
- capture abort by `next_frame`
- beacon steps

`robot_loc_top_full_tb` runs at 640x480 with every parameter at its default:

- RAM power-up and configuration
- one full camera frame in the 60 Hz timing (194 blank pixels per line, 59
  blank lines)
- reading back all 38,400 words
- one complete 640x480 VGA frame compared pixel by pixel

It runs in about 10 s with Verilator.

Each block also has a one-line fault variant that its testbench catches, for
example a reversed packing order or a burst word index off by one.

### Running a testbench

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/rl_pkg.sv tb/robot_loc_top_tb.sv \
  --top-module robot_loc_top_tb
./obj_dir/Vrobot_loc_top_tb
```

Replace the testbench name for the others. The end-to-end testbenches include
`tb/robot_loc_top_body.svh`, which holds the shared harness.

## Files

- `rtl/rl_pkg.sv`: shared types (states, pixel structs, BCR value, colours)
- `rtl/robot_loc_top.sv`: top level
- `rtl/camera_in.sv`, `rtl/processing.sv`, `rtl/yuv2rgb.sv`,
  `rtl/color_filter.sv`: the pixel pipeline
- `rtl/ram_interface.sv`: the RAM controller
- `rtl/frame_ctrl.sv`: sequencing
- `rtl/vga_display.sv`: the display
- `rtl/beacon_ctrl.sv`: the beacon
- `rtl/async_fifo.sv`, `rtl/sync_fifo.sv`: FIFOs
- `tb/`: one testbench per block, the two end-to-end testbenches, and the
  camera and RAM models
