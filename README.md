# Real-time background subtraction on a 90x90 region of interest

This RTL finds objects in a video stream from a fixed camera by comparing a
small window of the picture with a stored reference picture. A 1280x720,
60 frames/s stream arrives pixel by pixel at 74.25 MHz. Inside a 90x90-pixel
region of interest (ROI), every pixel is converted to 8-bit gray. It is then
subtracted from the matching pixel of a background image held in an 8100-byte
block RAM. Where the absolute difference exceeds a threshold, the pixel is
foreground and is shown. Everything else is black. A switch (`sw0`) makes the
ROI of the next frame the new background.

There is no frame buffer and no pipeline fill: each pixel is finished within
its own pixel period (13.468 ns). To do that, the design runs at three times
the pixel clock (222.75 MHz) and spreads the per-pixel work over three
sub-cycles.

The design targets a small FPGA (a Zynq-7010 class device). HDMI receive and
transmit and the clock generator are vendor IP and are not part of this RTL.
The top module starts where the HDMI receiver delivers parallel video and
ends where the HDMI transmitter takes it.

## One pixel period, three sub-cycles

`pixel_phase` counts 0, 1, 2 on the 222.75 MHz clock. It gives one clock
enable per sub-cycle. All registers sit on that single clock, and each stage
acts only on the edge its enable selects:

| edge | enable      | what happens                                                                  |
|------|-------------|-------------------------------------------------------------------------------|
| 0    | `ce_sample` (`pix_ce`) | input pixel and syncs registered; `roi_window` decides whether the pixel is in the ROI |
| 1    | `ce_conv`   | `rgb2gray` registers the gray value; BRAM reads the background pixel at the current address |
| 2    | `ce_out`    | `bgs_compare` registers the thresholded difference as 24-bit RGB; syncs registered; on a load pass the gray pixel is written to BRAM; the controller and address counter step |

The result of a pixel sampled on edge 0 appears on the outputs at edge 2. It
stays there until edge 2 of the next pixel. Seen from the 74.25 MHz pixel
clock, the output is one pixel period behind the input.

The source must hold each pixel stable across the edge on which `pix_ce` is
high. `pix_ce` is the combinational phase decode, so it is high during the
cycle that ends with the sampling edge. On the board, the clock generator
keeps the pixel clock and the 3x clock phase-aligned. In simulation the
testbench drives a new pixel whenever it sees `pix_ce` high.

The original design uses three related clocks: 74.25, 148.5 and 222.75 MHz,
with operations placed on rising and falling edges. This RTL keeps the order
of operations and the latency. It replaces the three clocks with one clock
and enables, so it has no clock-domain crossings to worry about.

## Loading and reading the background: `bram_wr_fsm`

The controller works frame by frame. Each frame is either a **load pass**
(`w1_r0 = 1`: ROI pixels are written to BRAM) or a **read pass**
(`w1_r0 = 0`: ROI pixels are read and compared). The controller has seven
states:

| state        | action |
|--------------|--------|
| `WAIT_SW0`   | While `sw0` is high, set `w1_r0` and wait. When it is low, go to `W1R0_VSYNC`. |
| `W1R0_VSYNC` | At Vsync, clear the address counter and the row/pixel counters. Enter `WRITE` if `w1_r0` is set, otherwise `READ`. |
| `WRITE` / `READ` | Each pixel with `en_roi` high writes or reads one BRAM location and increments the address. After `ROI_W` pixels, go to `WAIT_LINE`. |
| `WAIT_LINE`  | Clear `pixel_row`. When the active line ends, increment `row_count` and go to `CHECK_W` or `CHECK_R`. |
| `CHECK_W`    | If `row_count < ROI_H`, go back to `WRITE`. Otherwise clear `w1_r0`, pulse `pass_done` and go to `WAIT_SW0`. |
| `CHECK_R`    | If `row_count < ROI_H`, go back to `READ`. Otherwise pulse `pass_done` and go to `WAIT_SW0`. |

Here is what this means in practice:

* **No switch press.** Every frame is a read pass. At the end of a pass the
  controller goes through `WAIT_SW0` and waits in `W1R0_VSYNC` for the next
  Vsync.
* **Switch raised and lowered.** `w1_r0` goes high. The next frame after the
  switch is low again is a load pass. The frame after that is a read pass
  against the new background.
* **Switch held.** The controller waits in `WAIT_SW0`, and no passes run.
* **Short press during a pass.** The press is latched and acts at the next
  frame start.
* **Frame too short.** If Vsync rises before a pass has covered all `ROI_H`
  rows, the pass is dropped and starts again at that Vsync.

While the BRAM is still cleared (after configuration, before the first load),
the difference equals the input. The ROI then shows the input wherever it is
brighter than the threshold.

## Memory map

The BRAM is 8100 x 8 bits with a 13-bit address. ROI row `r` (0..89), column
`c` (0..89) is at address `90*r + c`:

| row | first address | last address |
|-----|---------------|--------------|
| 1   | 0x0000        | 0x0059       |
| 2   | 0x005A        | 0x00B3       |
| 89  | 0x1EF0        | 0x1F49       |
| 90  | 0x1F4A        | 0x1FA3       |

`addr_counter` produces these addresses. The controller clears it at Vsync,
and it advances once per ROI pixel. Reads and writes use the same single port:

* a read happens on edge 1;
* a write happens on edge 2;
* the port is read-first.

## Pixel arithmetic

* Gray: `gray = (77*R + 150*G + 29*B) >> 8`. This is BT.601 luma in 1/256
  steps; the weights sum to 256, so white stays 255.
* Difference: `d = |gray - bg|`.
* Decision: `fg = d > th`. A difference equal to `th` counts as background.
* Output: `fg ? {d, d, d} : 0` as 24-bit RGB. Pixels outside the ROI, or
  outside a running pass, are black with `fg = 0`.

The textbook rule behind this is binary: 1 above the threshold, 0 below. That
decision is available as `out_fg`. The video output carries the difference
value instead of plain white, so the picture still shows how strongly each
pixel differs. It also reproduces the behaviour described above for an empty
background, where the ROI shows the input.

## Top-level interface (`bgs_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 222.75 MHz, 3x pixel clock |
| `rst` | in | 1 | synchronous, active high |
| `sw0` | in | 1 | background update switch; synchronised inside |
| `th` | in | 8 | threshold |
| `in_vsync`, `in_hsync`, `in_de` | in | 1 each | input syncs, active high; `in_de` = active video |
| `in_rgb` | in | 24 | input pixel `{R,G,B}` |
| `pix_ce` | out | 1 | high in the cycle whose closing edge samples the input |
| `out_vsync`, `out_hsync`, `out_de` | out | 1 each | syncs, delayed with the pixel |
| `out_rgb` | out | 24 | result pixel |
| `out_fg` | out | 1 | foreground flag of the result pixel |
| `w1_r0` | out | 1 | load pending or running (e.g. for an LED) |
| `ctrl_state` | out | 3 | controller state (`bgs_pkg::ctrl_state_t`) |
| `pass_done` | out | 1 | high for one pixel period when a pass ends |

| parameter | default | meaning |
|-----------|---------|---------|
| `ROI_W`, `ROI_H` | 90, 90 | ROI size; BRAM depth is `ROI_W*ROI_H` |
| `ROI_X0`, `ROI_Y0` | 595, 315 | ROI top-left corner in the active picture (centred) |
| `HW`, `VW` | 11, 10 | column and line counter widths |
| `AW` | 13 | BRAM address width, must satisfy `2**AW >= ROI_W*ROI_H` |
| `CW` | 7 | row and pixel counter width, must exceed `ROI_W` and `ROI_H` |

A larger ROI only needs `ROI_W`, `ROI_H`, `AW` and, beyond 127, `CW` to be
changed. For example, 260x260 needs `AW = 17` and `CW = 9`.

## Files

| file | content |
|------|---------|
| `rtl/bgs_pkg.sv` | shared types (`rgb_t`, `video_t`, `ctrl_state_t`) and default sizes |
| `rtl/bgs_top.sv` | top level: wiring of the stages below |
| `rtl/pixel_phase.sv` | sub-cycle enables |
| `rtl/roi_window.sv` | pixel position counters and `en_roi` |
| `rtl/rgb2gray.sv` | RGB to gray |
| `rtl/bram_wr_fsm.sv` | load/read controller |
| `rtl/addr_counter.sv` | BRAM address counter |
| `rtl/bg_bram.sv` | 8100 x 8 background memory |
| `rtl/bgs_compare.sv` | difference, threshold, 8 to 24-bit conversion |
| `tb/tb_*.sv` | one self-checking testbench per module, plus two end-to-end ones |

## Departures from the original design and own choices

These points are not fixed by the original design, or were changed from it:

* **Clocking.** One 222.75 MHz clock with enables replaces the three clocks
  (74.25, 148.5 and 222.75 MHz). The sub-cycle order follows the original,
  but the exact edges do not.
* **ROI position.** The ROI is centred in the frame. The original fixes only
  its size.
* **Gray weights.** The weights are this design's choice. The original only
  requires an RGB-to-gray conversion.
* **Threshold.** The threshold is a run-time input. The original calls it
  predetermined but gives no value.
* **Output format.** Foreground pixels carry the difference value and
  everything else is black (see *Pixel arithmetic*).
* **Controller.** It uses the seven named states. The load pass starts at the
  first Vsync after the switch is released. Two behaviours are additions of
  this design:
  * a press during a pass is latched;
  * a frame that ends before the ROI is finished restarts the pass.
* **Background model.** The background is one captured frame, replaced only
  on request. There is no averaging over several frames and no automatic
  update.
* **Signals.** Syncs are active high and the reset is synchronous.
* **BRAM.** It is modelled as an inferred single-port, read-first array that
  starts cleared. The original uses the vendor BRAM IP.
* **Not included.** The HDMI receiver, the HDMI transmitter and the clock
  generator are vendor IP and are not included.

## Size

Generic synthesis of `bgs_top` at its defaults gives:

* 106 flip-flop bits;
* about 170 word-level cells;
* one 64,800-bit memory (8100 x 8).

That is about 2 of the 60 BRAM36 blocks of a Zynq-7010. Resource figures
reported for the complete board design, about 1,900 registers, 1,250 LUTs
and 8 BRAM, include the HDMI, video and clocking IP around this core.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Any testbench can be run with plain Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/bgs_pkg.sv \
        tb/tb_bgs_top.sv --top-module tb_bgs_top
    ./obj_dir/Vtb_bgs_top

| testbench | what it checks |
|-----------|----------------|
| `tb_pixel_phase` | one-hot enables, period 3, order after reset |
| `tb_addr_counter` | random clear/increment against a model, wrap at 8099 |
| `tb_bg_bram` | all 8100 locations cleared, random traffic against a model, read-first, hold |
| `tb_rgb2gray` | exact black/white/primaries; 5000 random pixels within 1 LSB of floating-point BT.601 |
| `tb_bgs_compare` | reset value, `d == th` and `d == th+1`, outside-ROI black, 5000 random cases |
| `tb_roi_window` | `en_roi`, `hpos` and `vpos` on small frames with a sub-cycle enable |
| `tb_bram_wr_fsm` | counts per frame of clears, accesses, writes and passes over eight frames: read, latched press, load, held switch, skipped frame, load, short frame (abandoned pass), restarted pass |
| `tb_bgs_top` | end to end at 24x16 frames with a 6x5 ROI (see below) |
| `tb_bgs_top_full` | the same scenario at the defaults: 1280x720 with 720p60 blanking (1650x750), 90x90 ROI, five frames (about 15 s) |

The end-to-end tests run five frames:

1. input with an object, against the empty memory;
2. plain background, with a switch press during the frame;
3. load pass of a slightly noisy background;
4. read pass where everything matches;
5. a new object.

A reference model predicts every output pixel and sync. The tests also check
the latency in cycles: a result must not be visible two cycles after sampling
and must be present three cycles after. Each mechanism must occur at least
once: read pass, load pass, switch press, foreground pixel, background pixel,
blanked pixel, pass end and empty-memory pass-through.
