# Sobel video edge-detection IP core

A streaming edge detector for video, packaged as an IP core with AXI4-Stream
video ports and an AXI4-Lite register block, for a processor-plus-FPGA system
such as the Zynq-7000. Each incoming RGB pixel is reduced to a grey level. The
3x3 Sobel operator gives the horizontal and vertical gradient of that grey level
around each pixel. A pixel whose gradient magnitude exceeds a programmable
threshold is marked as an edge, and the result leaves as a black-and-white (or
gradient-shaded) picture. The core takes one pixel per clock, needs no frame
buffer and stores only two video lines. Its default geometry is 1920 x 1080.

The design follows a published Simulink/HDL Coder model of this core (the
"SOBEL_CORE" with its RGB-to-intensity, Sobel, output-control and bypass blocks
and its generated AXI wrapper). That publication shows the block structure, the
Sobel masks, the data types on the wires, the control-register names and the
resource figures. It does not show the insides of the generated blocks. Where
this RTL had to fill a gap, the choice is marked as such below, and again in the
opening comment of each file.

## Data flow

```
              AXI4-Lite (processor)
                     |
               axi_lite_regs  -- soft reset, enable, Threshold, Sobel_Enable,
                     |           Background_Color, Show_Gradient
                     v
 s_axis --> axis_video_in --> sobel_core ------------------> axis_video_out --> m_axis
                                 |                              |
                                 |  rgb2intensity -> sobel_filter -> output_control -> Y2RGB --+-- T
                                 |  (input, one register) -------------------------------------+-- F
                                 |                                                Sobel_Enable switch
                                 +-- ce = IPCore_Enable AND output FIFO has room
```

| file | role |
|---|---|
| `rtl/sobel_pkg.sv` | pixel-control struct, RGB struct, gradient type, register offsets |
| `rtl/sobel_ip.sv` | top: wires the four parts below, derives reset and clock enable |
| `rtl/axi_lite_regs.sv` | AXI4-Lite slave and the control registers |
| `rtl/axis_video_in.sv` | AXI4-Stream video to pixel + pixel-control |
| `rtl/sobel_core.sv` | the algorithm, with the bypass switches |
| `rtl/rgb2intensity.sv` | RGB to grey |
| `rtl/sobel_filter.sv` | line memory, 3x3 window, gradients, threshold, border handling |
| `rtl/output_control.sv` | output grey level from edge flag and settings |
| `rtl/axis_video_out.sv` | output FIFO and AXI4-Stream video master |

Inside the core, every pixel travels with a five-bit *pixel-control* bundle
(`pixelctrl_t`): `h_start` and `h_end` mark the first and last pixel of a line,
`v_start` and `v_end` the first and last pixel of a frame, and `valid` marks a
real pixel. The stream adapters translate between this bundle and the AXI4-Stream
video convention, in which TUSER marks the first pixel of a frame and TLAST the
last pixel of a line.

## The Sobel stage (`sobel_filter`)

This is the part that needs the most care, because the output lags the input and
the frame borders must be handled without stopping the stream.

**Window.** The gradients of pixel (r, c) need its eight neighbours, so the
filter can only produce that output once pixel (r+1, c+1) has arrived: one line
and one pixel later. A *line memory* keeps the two previous lines. It has one
16-bit word per column, holding the grey level one line up and two lines up. On
each step the filter reads the word of the current column and forms a new window
column from it and the incoming pixel: two lines up, one line up, current. It
then writes back the word shifted by one line. The 3x3 window is a set of
registers shifted one column per step. The memory is read asynchronously, as
distributed (LUT) RAM, so a step needs one clock. For 1920 columns it holds
30,720 bits. The published implementation likewise uses LUTs as memory and no
block RAM.

**Gradients.** With `w[row][col]` the window (row 0 on top, col 0 on the left):

```
Gh = (w00 + 2 w10 + w20) - (w02 + 2 w12 + w22)      mask  1 0 -1 / 2 0 -2 / 1 0 -1
Gv = (w00 + 2 w01 + w02) - (w20 + 2 w21 + w22)      mask  1 2 1 / 0 0 0 / -1 -2 -1
```

The masks are applied as written, without the kernel flip of a true convolution.
This only changes the sign of both gradients. Each gradient lies in -1020..1020
and leaves as an 11-bit signed word. The word is read as the fixed-point type
sfix11_En3, i.e. the value divided by 8. That is the gradient type of the
original model, which equals the classic Sobel sum with weights scaled by 1/8.

**Edge decision.** A pixel is an edge when the gradient magnitude in that
scaled unit exceeds the 8-bit threshold Th:
`sqrt((Gh/8)^2 + (Gv/8)^2) > Th`. The hardware avoids the square root and
compares `Gh^2 + Gv^2 > 64 * Th^2`, using 22-bit unsigned arithmetic. The source
gives the magnitude formula but not the exact comparison, so this rule is this
design's choice.

**Borders.** Pixels outside the frame count as 0. The line length is not a
parameter: the filter learns it from `h_end` and can take lines of up to
`MAX_WIDTH` pixels. `v_start` always restarts a frame, even in mid-frame.
Because of the one-line-one-pixel lag, the last column of every line and the
whole last line would never be emitted if only real input pixels drove the
filter. The filter therefore runs *padding steps*, which take no input:

* one step after every line (the column to the right of the frame), and
* width + 1 steps after the line marked `v_end` (the row below the frame).

During padding steps `in_ready_o` is low. In the IP this reaches the AXI4-Stream
input as TREADY = 0, so no pixel is lost. A source that cannot be stalled must
give the core at least 1 blank clock after each line and width + 1 after each
frame. Real video timing has far more than that: 1080p has 280 blank pixels per
line and 45 blank lines.

**States.** IDLE waits for `v_start`. ACTIVE consumes pixels. PADCOL is the one
step after `h_end`. PADROW is the flush row after `v_end`, and returns to IDLE.
A two-bit saturating row counter (0, 1, 2 or more) masks the rows above the
frame. Reset or filter gating is not needed between frames.

**Pipeline.** Stage 0 is the window and the regenerated pixel-control bundle.
Stage 1 registers the gradients. Stage 2 registers the edge flag, the gradients
and the control. The output therefore appears 3 enabled clocks after the step
that completes a pixel's neighbourhood.

## Grey level in, grey level out

`rgb2intensity` uses the ITU-R BT.601 luma weights in 8-bit fixed point,
`Y = (77 R + 150 G + 29 B + 128) >> 8`. It is combinational, so the filter can
decide in the same clock whether it takes the pixel. The source names this
conversion but gives no coefficients.

`output_control` selects what is shown. A non-edge pixel shows the background:
black, or white when `Background_Color` = 1. An edge pixel shows the opposite
colour or, when `Show_Gradient` = 1, the gradient strength `(|Gh| + |Gv|) / 8`,
which always lies in 0..255. The source names the block and its five inputs; the
rule is this design's. The grey level is copied into R, G and B of the 32-bit
output word (Y2RGB).

32-bit pixel words carry R in bits 23:16, G in 15:8 and B in 7:0. Output bits
31:24 are 0. This packing is this design's choice.

**Bypass.** With `Sobel_Enable` = 0, the two output switches pass the input
words and their control through one register instead. The Sobel pipeline keeps
running behind the switch and still stalls the input during its padding steps.
Change `Sobel_Enable` only between frames. After switching it back on, wait
width + 6 clocks after the last bypassed frame; otherwise the filter's flush of
that frame appears on the output.

## Registers (AXI4-Lite, 32-bit data, 16-bit byte address)

| offset | name | access | meaning |
|---|---|---|---|
| 0x000 | IPCore_Reset | W | writing 1 to bit 0 gives a one-clock soft reset of the datapath, the stream adapters and the four algorithm registers |
| 0x004 | IPCore_Enable | W | bit 0: 1 runs the core (reset value), 0 freezes it |
| 0x008 | IPCore_Timestamp | R | identification word, parameter `TIMESTAMP` |
| 0x100 | Threshold | W | bits 7:0, reset value 5 |
| 0x104 | Sobel_Enable | W | bit 0, reset value 1 |
| 0x108 | Background_Color | W | bit 0, reset value 0 (black) |
| 0x10C | Show_Gradient | W | bit 0, reset value 0 |

IPCore_Reset, IPCore_Enable and their meaning, the four algorithm inputs, the
single read-back register and the one-clock read delay come from the source. The
offsets, the reset values and the identification word are this design's. The
value 5 for Threshold is the value shown feeding the threshold input in the
original model. Only IPCore_Timestamp reads back; other addresses read 0.
Address and data of a write are taken together. A write takes effect only if
byte lane 0 is enabled. Responses are always OKAY.

## Streams, clock enable and back-pressure

The whole core shares one clock enable:
`ce = IPCore_Enable AND (output FIFO holds fewer than FIFO_DEPTH-1 beats)`. When
`ce` is low, every pipeline register holds its value. The input TREADY is
`ce AND in_ready` of the filter. The core's output `valid` is qualified with the
enable of the previous clock, so a frozen output is pushed only once. A pixel
made in an enabled clock therefore always finds room in the FIFO.
`axis_video_in` counts lines from TUSER to place `v_end` on the TLAST of line
`ACTIVE_LINES`-1. The frame height is a parameter, not a register.

## Timing and throughput

* Steady state: one pixel per clock. A 1920 x 1080 frame with a source that is
  always valid and a sink that is always ready takes 2,076,606 clocks, measured:
  about (1920+1) x (1080+1) because of the padding steps. At 170 MHz this gives
  81.9 frames/s.
* The published implementation reports 170 MHz and 95 frames/s at 1920 x 1080.
  Those two figures do not fit one pixel per clock: 95 frames/s needs
  197 Mpixel/s. This core does not reach 95 frames/s at 170 MHz.
* Latency through the IP: the output for pixel (r, c) is offered on TVALID
  5 clocks after pixel (r+1, c+1) enters. That is 3 clocks in the filter, 1 in
  the core's output register and 1 in the FIFO. In bypass, a pixel comes out
  3 clocks after it enters.
* Register read: data one clock after the read address is taken.

## Parameters

| parameter | default | where |
|---|---|---|
| `MAX_WIDTH` | 1920 | longest line (line memory depth) |
| `ACTIVE_LINES` | 1080 | lines per frame, for `v_end` |
| `FIFO_DEPTH` | 8 | output FIFO beats |
| `TIMESTAMP` | 32'h2019_0001 | read-back identification word |

The defaults are the 1920 x 1080 format of the published implementation. The
original model was simulated on 320 x 240 video; use `ACTIVE_LINES = 240` for
that.

## How far to trust it, and departures from the source

* Built from the source: the block structure of the core, the Sobel masks, the
  sfix11_En3 gradient outputs, the threshold input, the bypass switches, the
  control register names, the single readable register with one-clock read
  delay, the LUT-based line storage and the 1920 x 1080 format.
* This design's own: the luma coefficients, the threshold comparison, zero
  border padding, the output-control rule, the register offsets and reset
  values, pixel packing, the stream adapters, the FIFO and the clock-enable
  scheme.
* The published resource figures include no DSP blocks. The edge test here
  squares two 11-bit gradients and the 8-bit threshold. Depending on the
  synthesis settings, these multipliers may map to DSP blocks.
* Not part of this RTL, being processor-side or vendor parts: the Zynq
  processing system, the AXI interconnect, the video DMA, the colour-space
  transform cores placed before and after this core, the camera/HDMI video I/O,
  clocking and reset IP, and the frame-to-pixel conversion of the simulation
  model.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come
from `tb/sobel_ref_pkg.sv`, a reference written directly from the formulas. It
computes the edge test in floating point with a real square root.

| testbench | what it covers |
|---|---|
| `tb_rgb2intensity` | 5,000+ pixels, and within 1 grey level of the exact BT.601 value |
| `tb_output_control` | all flag combinations, extreme and random gradients |
| `tb_sobel_filter` | several frame sizes, gated enable, back-pressure, a free-running source with minimum blanking, a 1-line frame, full-width lines, a restarted frame, the 3-clock latency |
| `tb_sobel_core` | all output modes, bypass, 4- and 2-clock latencies |
| `tb_axi_lite_regs` | reset values, writes, strobes, read-back, read delay, response hold, soft reset |
| `tb_axis_video_in`, `tb_axis_video_out` | framing, back-pressure, FIFO fill and order |
| `tb_sobel_ip` | end to end at 32 x 6: border back-pressure, FIFO stall, enable off mid-frame, soft reset mid-frame, bypass, all display modes, threshold change, rate bound, 5-clock end-to-end latency; each mechanism is counted and must occur |
| `tb_sobel_ip_qvga` | one 320 x 240 frame, every beat checked, rate bound |
| `tb_sobel_ip_full` | one 1920 x 1080 frame at the default parameters, all 2,073,600 beats checked, rate bound |

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_sobel_ip -y rtl -y tb +libext+.sv \
  rtl/sobel_pkg.sv tb/sobel_ref_pkg.sv tb/tb_sobel_ip.sv -o sim
./obj_dir/sim
```

The full-size frame simulates in a few seconds. The RTL uses concurrent
assertions for the AXI handshake rules, FIFO overflow and line length;
`--assert` enables them. Everything in `rtl/` is synthesizable SystemVerilog
(IEEE 1800-2017). The line memory and the output FIFO are written as plain
arrays.
