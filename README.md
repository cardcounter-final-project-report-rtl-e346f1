# CardCounter: colour-class pixel counting for playing-card recognition

A camera looks down at a single playing card. Each card face has a
characteristic number of red and of black pixels: a ten of hearts has more red
than a three of hearts, and a king of spades more black than an ace of spades.
So a card can be told apart by counting, in every video frame, how many pixels
fall into a few colour classes. No shapes need to be recognised.

This RTL does the counting in hardware, at the camera's pixel rate. Software on
a soft processor does the rest. It defines the colour classes, reads the counts
every few milliseconds, learns per-card ranges and matches new readings against
them. The hardware gives it eight independent counters. Each counts the pixels
of a frame whose red, green and blue values all lie inside a box in RGB space,
and each box is programmed by software at run time. Changing a threshold
therefore needs no new FPGA build.

The same camera stream is also sent, through an external frame buffer, to a VGA
monitor for aiming the camera. The number of captured frames is shown on eight
seven-segment digits.

## Data path

```
 camera pins ──► input regs ──► ccd_capture ──► raw2rgb ──┬──► histo x8 ──► communication ◄──► processor (Avalon-MM)
 (pixel clock)                  x, y, dval     R,G,B      │     ▲ min/max ◄──┘
                                new_frame ────────────────┼─────┘
                                                          └──► mirror stage ──► frame buffer ──► vga_controller ──► DAC
```

| module | role |
|---|---|
| `cardcounter_top` | board-level top: pins, clocks, resets, wiring |
| `ccd_capture` | frames the raw stream with frame/line valid, gives x, y, a frame counter and a one-cycle `new_frame` pulse |
| `raw2rgb` | Bayer demosaic, one RGB pixel per raw sample |
| `histo` | one colour-class counter (eight instances) |
| `communication` | Avalon-MM slave: count read-back and threshold registers |
| `vga_controller` | 640x480 timing, frame-buffer read requests, DAC outputs |
| `reset_delay` | three staged resets from one key |
| `seg7_lut_8` | 32-bit value to eight hex digits |
| `cardcounter_pkg` | widths, the RGB word packing, shared types |

## The colour box and how it is programmed

Every counter has two 32-bit registers, a lower corner `min` and an upper
corner `max`. Both use the same packing:

```
 31 30 | 29 ........ 20 | 19 ........ 10 | 9 ......... 0
  --   |      red       |     green      |     blue
```

A valid pixel increments the counter when `min.r <= R <= max.r`, and likewise
for G and B. Bounds are inclusive. A box with `min > max` in any channel never
matches. After reset all corners are zero, so every box holds only the pixel
(0,0,0).

Register map of `communication`. These are 32-bit word addresses; a byte-addressed
master uses four times these values.

| word address | read | write |
|---|---|---|
| 0 .. 7 | count of class 0 .. 7 | (see below) |
| 2n | | `min` of class n (n = 0 .. 7) |
| 2n+1 | | `max` of class n |
| any other | `32'hAAAA_AAAA` | ignored |

Reads and writes share addresses 0..7 but reach different registers:
`min`/`max` cannot be read back. `readdata` is registered. It is valid on the
clock after `read` and `chipselect`, and there is no `waitrequest`. A read wins
over a write in the same cycle.

The recognition software uses two classes: red, R in 700..1023 and G, B in
0..300; and black, all three channels in 0..300. The other six classes are
free for other uses.

## Frame boundaries: what a count means

The important timing property is that software never sees a half-counted
frame. Each `histo` has two registers:

* a **running** counter, incremented on every clock cycle in which
  `new_pixel` is high and the pixel is inside the box;
* the visible **count**, which is loaded from the running counter on every
  clock cycle in which `new_frame` is high.

On the first cycle after `new_frame` falls, the running counter restarts, at 1
if that cycle carries a matching pixel and at 0 otherwise. `new_frame` comes
from `ccd_capture` when a frame starts, before the first line. So the visible
count is always the total of the last complete frame, and it stays put while
the next frame is counted. Software can therefore poll at any time.

**Counting is per clock cycle, not per pixel.** The counters and the register
block run on the 50 MHz system clock. The camera pixel clock is 25 MHz, and
the pixel-valid and frame strobes come straight from that domain. Each pixel is
therefore seen on two system-clock edges and counted twice. A full 1280x1024
frame gives at most 2,621,440, far inside 32 bits. Recognition compares counts
with ranges learned on the same hardware, so this factor cancels. This is how
the design is meant to be used. It is kept as is, and it is not a clean
clock-domain crossing: it relies on the pixel clock being derived from the
50 MHz clock, as it is when the camera returns the 25 MHz master clock. With an
unrelated pixel clock, add synchronisers or move the counters into the pixel
domain.

## Capture and demosaic

`ccd_capture` accepts a frame only if capture is enabled when frame-valid
rises. `start` is tied high in the top. `stop`, which is button `key[2]`, wins
while held, so pressing it skips whole frames and never cuts one short. Inside
an accepted frame every line-valid cycle is a pixel. `x` runs 0..1279 and then
wraps, advancing `y`. `frame_cnt` counts accepted frames and drives the
seven-segment display.

The sensor has one colour filter per site. `raw2rgb` forms, for each pixel, the
2x2 window made of the pixel, the previous sample of the same line, and the two
samples directly above those. The samples above come from a one-line buffer of
`LINE_PIXELS` words, read and rewritten at column `x`. Whatever the position,
such a window holds one red, one blue and two green sites. Red and blue are
copied and green is the mean of the two greens, rounded down. The mosaic
layout is taken as even rows `G R G R...` and odd rows `B G B G...`. To use a
sensor with another phase, permute the four cases in `raw2rgb`. The first
column of each line takes its "left" samples from the end of the line before,
and row 0 takes the last line of the previous frame. Those edge pixels are not
corrected. They are a small, constant share of the frame. Output is one RGB
pixel per input sample, one pixel clock later.

## Clocks and resets

| clock | source | used by |
|---|---|---|
| `clock_50` | board | histograms, register block, resets, clock halver |
| 25 MHz master clock | `clock_50` / 2 (flip-flop) | camera (`gpio1_mclk`), VGA, frame-buffer read side |
| pixel clock | returned by the camera (`gpio1_pixclk`) | input registers, capture, demosaic, frame-buffer write side |

* A 16-bit power-on counter holds `sys_rst_n` low for 65,535 cycles (1.3 ms).
  This reset covers the processor side, the histograms and the register block.
* `reset_delay`, restarted by `key[0]`, releases three active-low resets in
  turn. Stage 0 starts the frame-buffer FIFOs (`fb_load` is its inverse).
  Stage 1 releases capture, demosaic and the mirror stage. Stage 2 releases the
  VGA controller. The delays are 0x0FFFFF, 0x1FFFFF and 0x2FFFFF cycles, about
  21, 42 and 63 ms at 50 MHz. These values are a choice of this design; the
  order is what matters.
* The power-on counter, the clock halver and `reset_delay` use declaration
  initial values, as FPGA registers have after configuration, so the reset
  sequence starts from a known count without a key press.

## Display path

The demosaiced pixels leave the top on `mir_in_*` towards a column-mirroring
stage and come back on `mir_out_*`. Each returned pixel is split into two
16-bit words for a 16-bit-wide frame buffer:

```
fb_wr1_data = {1'b0, G[9:5], B[9:0]}     fb_wr2_data = {1'b0, G[4:0], R[9:0]}
```

On the read side `vga_controller` raises `request` (`fb_rd`) for each visible
pixel. The buffer must return both words on the next `fb_rd_clk` edge. The top
rebuilds R, G and B from them. The controller delays syncs and blank by one
clock to line up with the returned pixel and forces black outside the picture.
Its default timing is the standard 640x480 at 60 Hz mode: 800 clocks per line
(16 front porch, 96 sync, 48 back porch) and 525 lines per frame (10, 2, 33),
with both syncs active low. `vga_clk` is the inverted pixel clock. The
composite-sync output to the DAC is held low.

## Parts that are not in this RTL

These connect through ports of `cardcounter_top`:

* **Processor** (with its program memory): drives the `avs_*` Avalon-MM slave
  port and takes `sys_rst_n`.
* **Frame buffer**: an SDRAM controller with two write and two read FIFOs plus
  the SDRAM chip. It uses the `fb_*` ports; the write side runs on the pixel
  clock.
* **Column-mirror stage**, between demosaic and frame buffer: `mir_*`. To run
  without it, loop `mir_in_*` back to `mir_out_*`.
* **Camera configuration over I2C**: sets exposure from `sw[15:0]` and is
  reset by `key[1]`. These are passed out as `ccd_cfg_exposure` and
  `ccd_cfg_rst_n`.

Other board wiring: `ledr` mirrors the switches and `ledg` shows the current
camera row. The camera connector's data bits 2..5 arrive on pins 5, 3, 2 and 4
(`gpio1_data`), and the top undoes that mapping.

## What follows the original design and what is chosen here

Taken from the original design: the histogram compare-and-latch behaviour,
the register map and the read-back pattern, the capture framing and 1280-pixel
line, the eight counters, the threshold packing, the pin mapping, the
frame-buffer word packing, the clocking (including per-cycle counting), the
power-on counter, and all connections.

Chosen here, because the original gives only a function or a name:

* the demosaic method and mosaic phase;
* the VGA mode, sync polarities and request latency;
* the `reset_delay` delays;
* the segment coding of the display: active low, bit 0 = segment a, hex
  letters `A b C d E F`.

Also chosen here: reset of the histogram and register-block registers, which
the original leaves uninitialised. Where the original's counter cleared and
incremented in the same cycle, the increment overrode the clear. Here the
counter restarts at one in that case.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. For example,
with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cardcounter_pkg.sv tb/tb_histo.sv --top-module tb_histo -o sim
./obj_dir/sim
```

* `tb_histo`, `tb_communication`, `tb_ccd_capture`, `tb_raw2rgb`,
  `tb_vga_controller`, `tb_reset_delay` and `tb_seg7_lut_8` test one module
  each against values computed in the testbench. Some reduce the line length
  or the VGA mode to keep runs short.
* `tb_cardcounter_top` runs the whole design at reduced size: 16-pixel lines,
  6-line frames and an 8x4 picture. `tb_cardcounter_top_full` runs it with
  every parameter at its default: 1280x1024 camera frames, 640x480 VGA and the
  full reset delays. It takes about 15 s.

Both use `cardcounter_bench`, which models the camera, the processor's bus
accesses, a pass-through mirror stage and a FIFO frame buffer. The camera
frames are random 2x2 blocks of red, black, white and yellow with noise. The
bench computes the expected eight counts with its own demosaic and checks
every count after every frame. One frame is sent with capture stopped. The VGA
output is compared pixel by pixel with what the frame buffer returned. The
bench counts each mechanism (staged reset, box match, frame latch, line wrap,
register read and write, unmapped read, capture stop, frame-buffer write, VGA
request, syncs and display), and a mechanism that never occurs is a failure.

Not covered by simulation: the external parts above and a camera whose pixel
clock is not derived from the master clock.
