# Live camcorder video on a VGA monitor, double-buffered in one SRAM

This design shows live video from a composite camcorder on a 640x480 VGA monitor. It
runs on the Altera DE2 board (Cyclone II) and uses only that board's parts. These are:

- an ADV7181 video decoder, which turns NTSC into a stream of bytes;
- a 256K x 16 SRAM (512 KB);
- an ADV7123 video DAC;
- switches, seven-segment displays and two 40-pin probe headers.

The main idea is **double buffering in one memory**. The SRAM is split into two halves.
The camera fills one half with a whole interlaced frame while the monitor shows the
frame held in the other half. When a frame is complete, the two halves swap roles.
Camera and monitor run on unrelated clocks: the decoder's 27 MHz and the board's
50 MHz. They share a single SRAM port. The monitor owns half of every pixel period, and
camera writes fill the remaining cycles.

A second, smaller part configures the decoder. The user sets a register address and a
data byte on the switches, checks them on the seven-segment displays, and flips GO. An
I2C master then writes the byte into the decoder.

```
 27 MHz decoder clock domain                      | 50 MHz board clock domain
                                                  |
 td_data,hs,vs --> video_capture --(byte writes)--+--> sram_arbiter <==> SRAM pins
                        | write_half_low          |       ^  | rd_data
                        +-------------------------+--> frame_reader <-- vga_timing
                                                  |       | video, syncs  (h, v, pix_en)
 sw[17:11] --> hex_register_file --> HEX0..HEX7   |       v
                 | cmd/addr/data                  |   colour expand --> VGA DAC pins
 sw[GO] ---> i2c_loader <-- i2c_clock_divider     |
                 |  (four steps per SCL period)   |
                 v I2C SCLK / SDAT (open drain)   |
```

| module | clock | job |
|---|---|---|
| `de2_video_top` | both | board-level wiring, reset, colour expansion, probe headers |
| `video_capture` | 27 MHz | finds the capture window in each field and makes one SRAM byte write per kept byte |
| `sram_arbiter` (+ `async_fifo`) | 27 → 50 MHz | buffers camera writes across the clock boundary and gives the SRAM to display reads or camera writes, cycle by cycle |
| `vga_timing` | 50 MHz | 25 MHz pixel enable, 800 x 525 raster, syncs, blank window |
| `frame_reader` | 50 MHz | four display address counters, chooses half and byte lane, lines the pixel up with the syncs |
| `i2c_clock_divider` | 27 MHz | 40 kHz serial clock and the loader's step ticks |
| `hex_register_file` | 27 MHz | command/address/data registers set from the switches |
| `seven_seg_decoder` | none (combinational) | hex digit to segments |
| `i2c_loader` | 27 MHz | start, three bytes each followed by an acknowledge slot, stop |
| `reset_sync` | per clock | asynchronous assert, synchronous release of the KEY0 reset |
| `de2_video_pkg` | none | shared constants and the `cam_write_t` write record |

The decoder, the DAC, the SRAM chip itself and the board's other interfaces are outside
this RTL. Their pins are ports of the top.

## How a frame is laid out in memory

The interlaced video needs the most explanation. NTSC sends a frame as two fields. One
field carries the odd lines and the next field the even lines. The capture keeps the
same window of each field: 624 bytes by 210 lines. The two fields of one frame are then
stored **in the same 16-bit words**:

- the **odd field** goes to the low byte lane (LB);
- the **even field** goes to the high byte lane (UB).

So word *n* of a half holds one pixel of an odd line and the pixel directly below it on
the next even line. A field is 624 x 210 = 131,040 bytes, and a whole frame fills
131,040 words of one half.

```
SRAM word address     UB (bits 15:8)             LB (bits 7:0)
0x00000 ..            even field, frame A        odd field, frame A      <- lower half
0x1FFDF                                                                      (2^17 words)
0x20000 ..            even field, frame B        odd field, frame B      <- upper half
0x3FFDF
```

Within a field, the word address is simply the count of bytes kept since that field's
vertical sync, starting at the base of the half (0 or 0x20000). Both fields of a frame
start again at the same base, so line *k* of the even field lands in the same words as
line *k* of the odd field.

A 2-bit field counter in `video_capture` steps at every vertical sync and drives the
layout:

| field counter | lane written | half written |
|---|---|---|
| `00` | LB (odd field) | upper (0x20000) |
| `01` | UB (even field) | upper |
| `10` | LB | lower (0) |
| `11` | UB | lower |

Bit 0 selects the lane and bit 1 selects the half, so the half changes after every
second field, once per frame. `write_half_low` (= bit 1) tells the display side which
half is being written.

On the display side, line *v* of the 420 shown lines is read from:

- the LB lane when *v* is even;
- the UB lane when *v* is odd.

Each lane has its own address counter. One walk of 624 words per line pair rebuilds the
full interlaced picture: 624 x 420 pixels. There are four counters, one for each
combination of half and lane. All four return to the base of their half once the raster passes line 419.

## Sharing the SRAM between the 27 MHz camera and the 25 MHz display

This is the most delicate part of the design. It involves three clocks and one memory
port.

**Display reads set the pace.** All display logic runs on the 50 MHz clock. `vga_timing`
toggles `vid_clk` every cycle, and a pixel step (`pix_en`) happens in every other
cycle. So each 25 MHz pixel period is two 50 MHz cycles:

- while `vid_clk` is **low**, the SRAM belongs to the display;
- while `vid_clk` is **high**, it belongs to the camera.

For pixel (h, v), the following happens:

```
50 MHz cycle      A (vid_clk=0,pix_en) B (vid_clk=1)        C (vid_clk=0,pix_en) D (vid_clk=1)
frame_reader      sees (h,v); sets rd_valid/rd_addr for it                       takes rd_data -> video
sram_arbiter                           registers OE=0, addr  SRAM drives the byte
SRAM pins         (camera write, if any) (camera write slot)  display read         camera write slot
outputs                                                                          video/hsync/vsync/blank
                                                                                 of pixel (h,v)
```

- At the end of cycle A the read request is registered.
- During cycle B the arbiter decides that the *next* cycle is a read (`vid_clk && rd_valid`).
- In cycle C, OE is low and the SRAM drives the requested byte lane.
- At the end of cycle C, the next pixel step copies `rd_data` into `video`.

The horizontal sync, vertical sync and blank signals go through the same two pixel
steps, so all four outputs describe the same pixel. Outside the read window (h ≥ 624 or
v ≥ 420), the display makes no requests, and both cycles of the pixel period are free
for writes.

**Camera writes go through a small dual-clock buffer.** `video_capture` produces at most
one byte write every two 27 MHz clocks (74 ns), because it keeps every other byte. Each
write is an 18-bit word address, a lane bit and a byte (`cam_write_t`). These records
enter an 8-entry asynchronous FIFO (`async_fifo`) with Gray-coded pointers and two-flop
synchronizers.

In every 50 MHz cycle that is not a display read, the arbiter writes the oldest entry.
It drives:

- WE low and the record's address;
- the byte on both halves of the data bus;
- only the record's byte enable (UB or LB).

At least one free cycle comes every 40 ns, and writes arrive at most every 74 ns, so the
buffer stays nearly empty. An overflow would set the sticky `capture_overflow` output and trip an
assertion. The `write_waited` signal marks the cycles where a buffered byte had to wait
for a display read. The end-to-end test checks that this happens.

**OE and WE are never low together.** Every SRAM control signal is registered and set
in one `if / else if` (read, else write, else idle). An assertion checks that OE and WE
are never both low, and another checks that the data bus is not driven during a read.
CE is held low.

**Swapping halves across the clock boundary.** The display must never show the half
that is being written. At each display frame end, `frame_reader` samples
`write_half_low` through a two-flop synchronizer and sets `framem` to the *other* half.
Because `framem` changes only between display frames, a shown frame never mixes two
halves. The display (about 60 frames/s) is faster than the camera (about 30 frames/s),
so each captured frame is usually shown twice. The first display frame after a capture
swap can overlap the last moments of the write into the half it is about to leave. That
is acceptable for live video. The end-to-end test takes this into account: it compares
only frames during which no write touched the displayed half.

## The raster

`vga_timing` counts h from 0 to 799 and v from 0 to 524, about 59.5 Hz at 25 MHz. The
other signals decode from the counters:

| signal | active when | level |
|---|---|---|
| hsync | 664 ≤ h < 760 (96 pixels) | low |
| vsync | 491 ≤ v < 493 (2 lines) | low |
| vid_blank (video shown) | 8 ≤ v < 420 and 20 ≤ h < 624 | high |
| read window | h < 624 and v < 420 | — |

Memory reads therefore start at h = 0, but the DAC's blank input hides the first 20
columns and the first 8 lines. The DAC clock `vga_clk` is the inverted `vid_clk`, so
the DAC samples in the middle of each pixel.

Colour: each stored byte is read as RGB with **4 bits red, 2 green, 2 blue**:

- red is bits 7:4;
- green is bits 3:2;
- blue is bits 1:0.

Each field is widened to the DAC's 10 bits by repeating its bits. With the decoder in its
default mode this gives a crude, false-colour picture. A YCrCb pipeline would be needed
for natural colour, and it is not part of this design.

## Capture window

The decoder sends two bytes per pixel on its 27 MHz clock. `video_capture` registers the
bytes and the sync signals (HS and VS, taken as active low). It keeps three counters:

- horizontal: clocks since the last falling HS;
- line: HS falls since the last falling VS;
- field: VS falls, as described above.

A byte is in the window when **300 < horizontal ≤ 1548** and **30 < line ≤ 240**. That
is 1248 clocks by 210 lines. The first byte of each pair is kept, which gives 624 bytes
per line.

The window counter doubles as the address: its bit 0 picks the kept byte and its upper
bits are the word offset within the half. The counters saturate rather than wrap, so a
missing sync cannot create a second window.

## Configuring the decoder over I2C

The seven-segment displays show **40 | AA | DD**:

- the fixed command 0x40 (write to the video decoder) on HEX5/HEX4;
- the register address on HEX3/HEX2;
- the data on HEX1/HEX0;
- HEX7/HEX6 stay blank.

| SW17 | SW16 | SW15 | SW14..SW11 loads |
|---|---|---|---|
| up | down | down | data[3:0] (HEX0) |
| up | down | up | data[7:4] (HEX1) |
| up | up | down | address[3:0] (HEX2) |
| up | up | up | address[7:4] (HEX3) |
| down | x | x | nothing |

While SW17 is up, the selected nibble follows SW14..SW11 (SW14 is the MSB). The switches
pass through a two-flop synchronizer first.

A rising edge on the GO switch (`GO_SW`, default switch 1) starts `i2c_loader`. It
sends the following on an open-drain pair, MSB first:

- start;
- command, then an acknowledge slot;
- address, then an acknowledge slot;
- data, then an acknowledge slot;
- stop.

The loader advances one step per `step_tick`. `i2c_clock_divider` produces four ticks
per 40 kHz period (675 clocks of 27 MHz). Each bit takes four steps:

1. SDA changes.
2. SCL rises; the slave samples.
3. SCL stays high.
4. The acknowledge is sampled (ninth bit only), then SCL falls.

For start, SDA falls while SCL is high, then SCL falls. For stop, SDA is held low, SCL
rises, then SDA rises. A transfer is 113 steps, about 0.7 ms. A missing acknowledge
sets `i2c_ack_error`, but the transfer still runs to its stop. There is no retry.

A typical use is register 0x8F, which sets the decoder's output clock. The divider runs
from that clock, so the I2C clock halves with it when the decoder is switched to
13.5 MHz.

## Clocks, reset and pins

- **Clock domains**:
  - `clock_50` runs the display, the arbiter and the FIFO read side.
  - `td_clk27` from the decoder runs the capture, the FIFO write side and all of the I2C
    part.

  Only three things cross between the domains: the FIFO pointers (Gray code), the
  capture-half bit (two flops) and the reset.
- **SW0** drives the decoder's reset pin high, which starts its 27 MHz clock. It also
  enables the I2C divider.
- **KEY0** (active low) resets everything. Each domain has its own `reset_sync`:
  asynchronous assert, release two clocks after the button is let go.
- **Bidirectional pins** are split into `*_o`, `*_oe` and `*_i` (SRAM data). I2C data
  uses `i2c_sdat_drive_low` and `i2c_sdat_i`. The tristate buffers belong in the
  board-level wrapper.
- **Probe headers**:
  - `gpio0[15:0]` = {SRAM address[7:0], vid_clk, vsync, hsync, READ, UB, LB, OE, WE},
    with WE at bit 0.
  - `gpio1[2:0]` = {40 kHz clock, 27 MHz clock, divider enable}.

## Where this design differs from the tutorial it is based on

The structure, the window, raster and memory numbers, the switch map and the I2C frame
follow a set of DE2 teaching tutorials. These points differ, on purpose:

- **Capture buffer.** The tutorial latches one camera byte and writes it whenever the
  display is not reading. It accepts an occasional lost pixel. Here an 8-entry dual-clock
  FIFO replaces the latch, and no byte is lost.
- **Read window.** The tutorial's address enable includes line 420 (421 lines). Here it
  stops after line 419: a half holds exactly 210 lines per lane, and line 420 would read
  past the frame.
- **Counter wrap.** The tutorial's raster counters clear one count past 800 and 525.
  Here they wrap after exactly 800 and 525 counts.
- **Half selection.** The tutorial selects the displayed half with a frame bit and says
  only that the two sides must be kept in step. Here the choice is synchronized and
  taken only at display frame ends.
- **Output alignment.** The pixel byte and the syncs are delayed together by two pixel
  steps.
- **Single clock edge.** Everything on the display side runs on the 50 MHz clock with
  an enable. Nothing is clocked by the divided 25 MHz signal.
- **GO switch.** The tutorial names switch 1 as GO in one place and switch 2 in another.
  The default is switch 1 (`GO_SW` parameter).
- **Colour bit order.** The order within the byte (R = 7:4, G = 3:2, B = 1:0) and the
  widening to 10 bits are this design's choice.
- **Sync polarity.** The decoder's HS/VS polarity (active low) is assumed.
- **Kept byte.** Which byte of each pair is kept (the first) follows the tutorial's
  write enables. Whether that byte is a luma or chroma sample depends on the decoder's
  output mode.

## Simulating

All testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M` and stops
on its own, and each has a watchdog. With Verilator 5 (run from the repository root):

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/de2_video_pkg.sv tb/tb_video_pkg.sv tb/tb_de2_video_top.sv \
    --top-module tb_de2_video_top -o sim
./obj_dir/sim
```

To run another bench, replace the testbench file and `--top-module`. `-y rtl -y tb` lets
Verilator find the other modules by file name. The two packages must be listed first.

| testbench | what it does | time |
|---|---|---|
| `tb_seven_seg_decoder` | all 16 digits, lit and blanked, against an independently written segment list | instant |
| `tb_hex_register_file` | random switch settings against a reference model, all displays, load latency | < 1 s |
| `tb_i2c_clock_divider` | period of exactly 675 clocks, high time, four ticks per period, enable | < 1 s |
| `tb_i2c_loader` | slave model decodes bytes, start/stop shapes, SDA stable while SCL high, missing acknowledge, step count | < 1 s |
| `tb_video_capture` | scaled-down stream and window; every write's address, lane, half and byte, the write rate and the writes per field | < 1 s |
| `tb_vga_timing` | default 800x525 raster; sync periods and widths, pixel clock, frame period, size and position of the shown area | ~1.5 s |
| `tb_frame_reader` | small raster; every pixel's byte, lane and address, sync/blank alignment, half changes only at frame ends | < 1 s |
| `tb_sram_arbiter` | random display reads and maximum-rate camera bursts; every read's data, every camera byte in memory, OE/WE exclusion, no overflow | < 1 s |
| `tb_de2_video_top` | whole design at a reduced raster (100x40) and window | ~1 s |
| `tb_de2_video_top_full` | whole design at the default (real) sizes, two verified 624x420 frames | ~10 s |

The end-to-end benches (`top_check_harness`) use four models:

- a decoder model that emits a known byte pattern, `pix(field, line, byte)`;
- an I2C slave model;
- a 256K x 16 SRAM model;
- a shadow copy of both SRAM halves, built from the pattern alone.

They configure the decoder over I2C from the switches, then compare every pixel of the
VGA output with the shadow copy, for frames whose half was not written while they were
shown. They also require each mechanism to happen at least once:

- an I2C transfer;
- capture and display half swaps;
- display reads;
- camera writes both between reads and in blanking;
- a camera byte waiting for a read;
- both byte lanes shown.

They also check that OE and WE never overlap and that the FIFO never overflows.

## How far to trust it

- Every module passes lint in Verilator and in a second SystemVerilog front end, and
  synthesizes with Yosys without latches.
- Each unit testbench fails when its module has a deliberate, realistic bug. Examples
  are a swapped byte lane, a sync pulse one pixel too long, and an I2C divider one clock
  slow.
- The full-size end-to-end run checks the real raster and window sizes, and a full
  frame's worth of SRAM traffic.
- **Not verified:**
  - no FPGA build or timing closure for the Cyclone II;
  - no check against the real ADV7181 output format, sync polarities or SRAM access
    times (the SRAM model is ideal and answers within the cycle);
  - no test of I2C with clock stretching (the decoder does not need it).

  The one-cycle SRAM access assumes a 10 ns class part, as fitted to the board.
- The picture content depends on the decoder's output mode. The design stores and shows
  bytes; it does not convert colour spaces.
