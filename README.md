# Object tracking on an FPGA: the VGA trace display

A camera-style video is tracked frame by frame: each frame is compared with a
background frame, the changed pixels are thresholded and filtered, and the
centre of gravity (COG) of what remains is taken as the object's position.
Shown one after another on a monitor, the COGs trace the object's path.

The system runs on a Spartan-3E board at 50 MHz. The work is split between
hardware and software. A soft processor reads the frames from an SD card into
SDRAM and runs the image processing in software. It sends each COG, one 32-bit
word per frame, over a Fast Simplex Link (FSL, a point-to-point FIFO channel)
to a small custom accelerator. The accelerator keeps a 640x480, 60 Hz VGA
picture on the screen. This repository holds the RTL of that accelerator, plus
testbench models of the software and of the FSL links, so that the whole path
from video frame to screen pixel can be simulated.

```
 video frames --> [ processor: delta frame, threshold 40, median filter, COG ]
                        | FSL link: 512*x + y          ^ FSL link: acknowledgement
                        v                              |
                 +---------------------- fsl_hwa ---------------------+
                 |  vga_controller --hcount,vcount,blank--> vga_display |--> rgb[7:0]
                 |        |                                             |
                 +--------+---------------------------------------------+
                          +--> hs, vs
```

## The COG word

The processor packs a point as `512*x + y`:

| bits   | field | compared with | range used |
|--------|-------|---------------|------------|
| 8:0    | y     | `vcount` (row)    | 0..479 |
| 17:9   | x     | `hcount` (column) | 0..511 |
| 31:18  | zero  | -             | -          |

Nine bits per coordinate is the original design's choice. It works because
the tracked object never leaves the region below column and row 500.
A COG in columns 512..639 cannot be sent. To allow it, widen `COORD_W` in
`ot_pkg`. The processor's packing must then change to match.

The origin is the top-left corner of the screen, with rows growing downward.
This is the same orientation as the image's row and column indices. So a COG
needs no transformation before it is drawn.

## The FSL handshake

This is the part to read carefully when connecting the block to a processor.

*Slave side (COG words in).* `fsl_s_exists` says a word is waiting on
`fsl_s_data`. On the first clock edge where `fsl_s_exists` is high and no read
is in progress, `vga_display` stores the word's x and y. On the same edge it
sets `fsl_s_read` for exactly one cycle. The link pops the word on the next
edge. Because the read strobe is a register, the block never looks at a word
while its own read is pending. So it takes at most one word every two clocks.
Two assertions check the FSL rules: read only while a word exists, and write
only while the link has room.

*Master side (acknowledgements out).* Each accepted word is sent back
unchanged on `fsl_m_data`, with `fsl_m_write` high in the same cycle as
`fsl_s_read`. The processor can read these words to learn that a point
reached the display. Or it can ignore them, as long as it drains the link.

*Stall.* While `fsl_m_full` is high, no word is accepted, so no acknowledgement
is ever lost. If the processor stops reading acknowledgements, the return link
fills (16 words in the link model used here). The accelerator then leaves
further COG words in the forward link until there is room again. The order of
the words is kept throughout.

The original software sends one point every 100 clock cycles. This is far
faster than the screen refreshes (one frame every 840,000 clocks), so the
monitor shows the path as an animation rather than a still picture. Only the
latest point is stored in hardware. The path exists only as the sequence of
points the software sends.

## Drawing the picture

For each pixel the controller names, `vga_display` picks a colour. The rules
are applied in this order:

1. `blank` high (outside the 640x480 area): black.
2. Inside a 5x5 square whose top-left corner is the stored (x, y): red.
   A single pixel would be too small to see, so the point covers 25 pixels.
   No square is drawn between reset and the first word.
3. On the X axis (rows 0..4) or the Y axis (columns 0..4): white.
4. Anything else: black (background).

Colours are RGB332: three bits of red, three of green and two of blue. This
matches the board's 8-bit resistor-ladder VGA port. The colours, the axis
placement and the corner of the square are parameters or easy to change in
`vga_display`.

`rgb` is a combinational function of the controller's registered counters and
the stored point. It therefore changes in the same clock as `hs` and `vs`, and
all VGA pins always describe the same pixel.

## Video timing

`vga_controller` uses a clock enable that is high on one clock in `CLK_DIV`
(default 2). This turns the 50 MHz system clock into the 25 MHz pixel rate.
On each enable it advances the counters, and it registers `blank`, `hs` and
`vs` from the next counter values.

| | visible | front porch | sync | back porch | total |
|-|---------|-------------|------|------------|-------|
| horizontal (pixels) | 640 | 16 | 96 | 48 | 800 |
| vertical (lines)    | 480 | 10 | 2  | 33 | 525 |

Both sync pulses are active low. A line lasts 1600 clocks and a frame lasts
840,000 clocks, which gives 59.5 Hz. The original system only asks for
"640x480 at 60 Hz" and takes the numbers from the board manual. The table
above is the standard VESA mode. Every number in it is a parameter.

## Modules

| file | what it is |
|------|------------|
| `rtl/ot_pkg.sv` | shared widths, timing constants, `rgb_t` (RGB332), `cog_t`, `encode_cog`/`decode_cog` |
| `rtl/vga_controller.sv` | pixel enable, hcount/vcount, blank, hs, vs |
| `rtl/vga_display.sv` | FSL handshake, stored point, colour rules |
| `rtl/fsl_hwa.sv` | top: the accelerator with FSL ports and VGA pins |

Testbench helpers, not for synthesis:

| file | what it is |
|------|------------|
| `tb/fsl_link_model.sv` | a 16-word FSL FIFO link |
| `tb/tracking_sw_model.sv` | the processor's tracking software: synthetic 640x480 frames, grey conversion, delta frame, threshold 40, 3x3 median filter, COG |
| `tb/vga_frame_checker.sv` | rebuilds the picture from `hs`, `vs` and `rgb` alone and compares whole frames with the expected picture |

Resource use is small: about 76 flip-flops in total, with no memory and no
multipliers.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog stops the run if it hangs. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fsl_hwa \
    -y rtl -y tb +libext+.sv rtl/ot_pkg.sv tb/tb_fsl_hwa.sv
./obj_dir/Vtb_fsl_hwa
```

Replace `tb_fsl_hwa` with any of the names below.

| testbench | what it checks | run time |
|-----------|----------------|----------|
| `tb_vga_controller` | two full frames at the default timing. It checks the counter stepping every clock, the blank and sync windows, the line and frame periods, the sync pulse widths and the count of visible pixels. | ~2 s |
| `tb_vga_display` | the read pulse one cycle after `exists`, one pop per word, acknowledgement contents and order, no read while `fsl_m_full` is high, one word per two cycles in a burst, full-screen colour scans, blanking, a square over the axes corner, and reset. | ~1 s |
| `tb_fsl_hwa` | end to end at full size. Six tracked frames go through the software model, each COG is shown for a whole frame, and each frame is compared pixel by pixel. Then comes an animated burst with 100-cycle gaps, then a stall with the acknowledgement link full. It counts each mechanism (reads, acks, stall cycles, axes, square, blanking, sync pulses, threshold rejects, median removals) and fails if any never happens. | ~8 s |
| `tb_demo_video` | the tracking workload: 100 frames (4 s of 25 frame/s video) with the object moving from (12,12) to (495,435). The COG must be exact for every frame, every point is acknowledged within the software's 100-cycle delay, and one frame in ten is compared in full. | ~11 s |

The testbenches run every design parameter at its default. The frame checker
knows the standard timing only from the sync pulses, not from the design's
counters. So it is an independent check of the timing as well as of the
picture.

## What follows the original design, and what was chosen here

These follow the original design:
- the split into a controller and a display block, and their signal names;
- the 50 MHz clock and the 640x480, 60 Hz mode;
- 8-bit colour;
- axes 5 pixels wide;
- a point enlarged 25 times;
- storing x and y and pulsing the read acknowledge when a word exists;
- drawing where the counters equal the stored coordinates;
- the `512*x + y` word with 9-bit fields;
- keeping only the current point, with the animation paced by software.

These were chosen here:
- the porch and sync widths, the sync polarity and the divide-by-2 pixel enable;
- the synchronous, active-high reset;
- the colours, the axes along the top and left edges, and the square's corner
  at (x, y);
- the echo of each word on the master FSL port, and the stall it implies;
- the combinational `rgb` output.

The original block diagram labels the colour output with 9 bits. The board
has an 8-bit colour port, so the output here is 8 bits.

Not in this RTL:
- the processor and its software;
- the FSL links;
- the bus and memory system (BRAM and its controllers, SDRAM controller);
- the SD-card GPIO and its FAT12 driver;
- the timer and UART;
- the debug module.

All of these are standard parts of the vendor's embedded tool kit. The image
processing (delta frame, thresholding at 40, median filter, COG) runs as
software on the processor in the original partition. It exists here only as
the testbench model `tracking_sw_model`. That model uses grey weights
77/150/29, a 3x3 median on the binary image, and an integer mean, all of which
are choices of this model.
