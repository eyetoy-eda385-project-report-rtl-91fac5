# Eyetoy-style "avoid the wall" camera game: FPGA hardware

The player stands in front of a camera and sees themselves on a VGA monitor,
behind a coloured wall with a player-shaped hole in it. They win the level if
they fit into the hole when time runs out. The board this was designed for
has too little memory to buffer a video frame. So every step works *on the
fly*, one pixel per clock, from the camera's data pins straight to the VGA
pins. The same holds for the image processing that separates the player from
the background.

The RTL has two independent parts, side by side in `eyetoy_top`:

* **Display path** (`vga_ctrl`): VGA timing, luminance extraction from the
  camera's byte stream, and the wall overlay.
* **Player extraction** (`img_proc`): a chain of processing stages. It
  thresholds the brightness, then cleans the binary mask with erosion and
  dilation. Dual-clock FIFOs sit between the stages. In the original system
  this chain was never joined to the display path, and here it is not joined
  either: its ports are brought out of the top as they are.

Some parts of the full system are not in this RTL:

* a soft CPU with an AXI bus and an I2C master, which programs the camera
  once at start-up;
* the camera (640×480 CMOS sensor, 8-bit YCbCr output);
* the FPGA's output-DDR primitive, which forwards the 25 MHz pixel clock to
  the camera's clock pin.

## Display path

### One clock for everything, and no camera syncs

The camera is clocked from the 25 MHz VGA pixel clock. Its frame-size
registers are set to the same totals as the VGA raster: 800 clocks per line
and 525 lines per frame. These are the only camera registers changed from
their defaults:

| register | default | written | meaning |
|---|---|---|---|
| 04h | 03h | 03h | frame width, high byte |
| 05h | 83h | 20h | frame width, low byte (0x0320 = 800) |
| 06h | 01h | 02h | frame height, high byte |
| 07h | F3h | 0Dh | frame height, low byte (0x020D = 525) |

`eyetoy_pkg` holds these values and derives the VGA totals (`FRAME_W`,
`FRAME_H`) from them. Changing one therefore changes the other.

The camera's own hsync, vsync and pixel-clock outputs are not used. The
display raster decides where each incoming byte lands on the screen. This is
the design's weak point: nothing locks the camera's frame to the raster.
Camera and display run at the same rate, but at an unknown phase. The picture
can be offset or torn, and the Y/chroma byte phase can be wrong. The design
also assumes that the camera sends one byte per clock, so that an 800-wide
camera line lasts 800 clocks like the VGA line. The sensor is rated at 30
frames/s with a 27 MHz clock, which hints at two bytes per pixel. If that
holds, a camera line spans two display lines, and the picture repeats
sideways.

### Raster (`vga_timing`)

The line has 800 clocks, with 640 of them visible. The frame has 525 lines,
with 480 of them visible. That is 420,000 clocks per frame, or 59.5 frames/s
at 25 MHz. Both syncs are active low. Hsync covers columns 656–751 and vsync
covers lines 490–491, the usual 640×480@60 Hz placement. This placement and
the polarity are this design's choice.

### Grey-scale camera picture (`luma_select`)

The camera sends YCbCr 4:2:2, one byte per clock, in the order Cb, Y, Cr, Y.
Sending those bytes straight to an RGB monitor gives false colours. Instead,
only Y is kept and put on R, G and B, which gives a clean black-and-white
picture. The byte phase restarts at every display line. The byte seen in the
`line_start` cycle is byte 0, and Y is byte `Y_PHASE` (default 1). Y is
latched and held across the next chroma byte, so each Y value covers two
screen pixels.

### Wall overlay (`img_gen`)

For each visible pixel, `img_gen` checks whether the position lies inside the
hole. The hole is the union of `N_HOLES` rectangles, given as the `HOLES`
parameter in inclusive screen coordinates. Pixels outside the hole get
`WALL_COLOR`. Pixels inside it show the camera Y, using the top bits of Y for
each of the 3-3-2 colour channels. `wall_en = 0` hides the wall.

The default hole is a figure made of a head, outstretched arms and a body,
drawn on a red wall:

| part | x (columns) | y (lines) |
|---|---|---|
| head | 280–359 | 150–239 |
| arms | 150–489 | 240–279 |
| body | 240–399 | 240–479 |

These coordinates, the red colour and the 3-3-2 DAC widths are this design's
choices.

### Timing through `vga_ctrl`

| clock | stage |
|---|---|
| t | `vga_timing` presents position (h, v); camera byte sampled |
| t+1 | `luma_select` holds Y; position and syncs delayed one clock |
| t+2 | `img_gen` colour on the outputs, with hsync/vsync for (h, v) |

The syncs are delayed to match the colour, so all VGA outputs leave together.
`hcount`/`vcount` at the outputs give the position of the colour being shown.

## Player extraction

### Idea

The wall is much brighter (or much darker) than the player. One comparison
per pixel therefore separates them: 1 = player, 0 = background. Real images
are noisier than that. Shot noise, dark corners of the wall and bright patches
of clothing leave small specks of the wrong value. These specks are smaller
than the player, so a morphological **opening** removes them. An opening is an
erosion followed by a dilation with the same rectangle. Pixel groups smaller
than the rectangle disappear, and larger shapes get their outline back.

```
Y bytes -> [threshold] -> [erode SE_W x SE_H] -> [dilate SE_W x SE_H] -> mask (00/FF)
```

Set `OP2`/`OP3` of `img_proc` to `OP_DILATE`/`OP_ERODE` to get a closing
instead.

### The processing stage (`proc_stage`)

Every stage has the same shape: an input FIFO, a core and an output FIFO.

* The producer writes `in_data` with `in_wr_en` in its own clock domain. It
  must not write while `in_full` is high.
* The core runs on `proc_clk`. It takes the head of the input FIFO when the
  input FIFO is not empty and the output FIFO is not full.
* The consumer reads `out_data` with `out_rd_en` in a third clock domain.
  `out_data` is valid whenever `out_empty` is low (show-ahead).

Because all stages look alike, they can be chained in any order. In
`img_proc`, a link in the `proc_clk` domain moves a byte from one stage's
output FIFO to the next stage's input FIFO. It does this whenever the first is
not empty and the second is not full. Binary pixels travel on the 8-bit bus as
`00`/`FF`, and any non-zero byte counts as 1.

**Stalling.** Camera data can arrive with gaps, and the reader may pause. In
either case a core simply does not fire: its row and column counters and its
line memory stay frozen, so the chain stops without losing its place in the
frame. The `in_full` output and the wait on the output FIFO's full flag are
this design's additions. Without them a slow consumer would lose pixels.

**Core choice.** `OP` selects the core: `OP_THRESHOLD` uses `bg_threshold`,
while `OP_ERODE` and `OP_DILATE` use `morph_rect`.

### Dual-clock FIFO (`async_fifo`)

The FIFO holds 2^`ADDR_W` words (default 16). Pointers are kept in both binary
and Gray code. Each Gray pointer crosses to the other clock through two flip-
flops.

* `full` and `empty` are registered and conservative. A slot freed or filled
  on the far side shows up 2–3 clocks later.
* The read is show-ahead.
* Assertions flag a write while full and a read while empty.

Depth, show-ahead read and `full` are this design's choices.

### Thresholding (`bg_threshold`)

This is a single comparator with no clock and no state:

* `bg_bright = 1`: the pixel is player when `y < threshold`.
* `bg_bright = 0`: the pixel is player when `y > threshold`.

A pixel equal to the threshold counts as background. The threshold is an
input, because it has to be tuned to the room's lighting.

### Erosion and dilation without line buffers of pixels (`morph_rect`)

This block is the hardest part. An erosion with an `SE_W × SE_H` rectangle
sets an output pixel to 1 only if every input pixel under the rectangle is 1.
Done directly, that needs `SE_H - 1` full image lines of storage and an
`SE_W × SE_H` AND gate. The core instead splits the rectangle into a column
part and a row part, and counts runs:

1. **Column runs.** A line memory with one small counter per image column
   (`IMG_W` entries of `clog2(SE_H+1)` bits) holds how many consecutive 1s end
   at the current row in that column, saturating at `SE_H`. For each incoming
   pixel, the counter of its column is read, set to 0 if the pixel is 0 or
   incremented (saturating) if it is 1, and written back. The column
   *passes* when the counter equals `SE_H`.
2. **Row run.** One counter holds how many consecutive passing columns end at
   the current column, saturating at `SE_W`. The output is 1 when it equals
   `SE_W`.

With the defaults (640 columns, 3×3 element) the line memory is
640 × 2 = 1,280 bits. A direct version would need 2 × 640 = 1,280 bits for
3×3 as well, but it grows linearly with `SE_H`, while the counter memory
grows only with log2(`SE_H`). The logic also stays two counters wide for any
element size.

Dilation uses the duality *dilate(f) = NOT erode(NOT f)*. With `DILATE = 1`
the input bit and the output bit are inverted around the same counters.

Conventions (this design's choices):

* **Window position.** The output for pixel (r, c) covers rows r−SE_H+1…r
  and columns c−SE_W+1…c. The window ends at the current pixel, so no
  look-ahead and no extra latency are needed. Compared with a centred
  element, the mask is shifted by (SE_W−1)/2 columns and (SE_H−1)/2 rows
  towards the bottom-right. An opening with a symmetric element shifts once
  in the erosion and once more in the dilation.
* **Borders.** Positions above or to the left of the image count as 1 for
  erosion and as 0 for dilation. The borders are then neither eaten away nor
  grown, which matches the usual padding of erosion/dilation library
  functions. In the counters this means: a column counter reads as saturated
  on row 0, and the row counter reads as saturated on column 0.
* **Frame start.** No sync marker travels with the pixels. A frame is exactly
  `IMG_W × IMG_H` pixels in raster order. Reset clears the row and column
  counters and so marks the first pixel. After the last pixel, the counters
  wrap to the next frame.

Timing: the core is combinational from the FIFO head to the output FIFO's
write port, and moves one pixel per `proc_clk` while both FIFOs allow it.
`in_rd_en` and `out_wr_en` are the same signal.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `vga_timing` | `H_ACTIVE`/`H_TOTAL`/`V_ACTIVE`/`V_TOTAL` | 640/800/480/525 | totals shared with the camera registers |
| `vga_timing` | `H_FRONT`/`H_SYNC`/`V_FRONT`/`V_SYNC` | 16/96/10/2 | own choice |
| `luma_select` | `Y_PHASE` | 1 | byte order Cb,Y,Cr,Y assumed |
| `img_gen` | `HOLES`, `WALL_COLOR`, `R_W/G_W/B_W` | see above, red, 3/3/2 | own choice |
| `img_proc`, `proc_stage`, `morph_rect` | `IMG_W`/`IMG_H` | 640/480 | camera array |
| same | `SE_W`/`SE_H` | 3/3 | element size was a tuning value; 3×3 assumed |
| `async_fifo` / `FIFO_AW` | `ADDR_W` | 4 (16 words) | own choice |

Size after coarse synthesis of `eyetoy_top` at the defaults: about 360
flip-flop bits and 3.3 kbit of memory (two 1,280-bit line memories and six
16×8 FIFOs).

## What is not here, and where this RTL departs from the original

* The image-generation logic of the original also held some debugging and
  demonstration timers. Their function was never specified, so they are
  missing. `wall_en` is the only demonstration control.
* No game logic is included: there is no level timer and no check of whether
  the player touches the wall. The original game was never finished either.
* The player-extraction chain is not connected to the display path, as in the
  original.
* The sync placement, byte order, hole shape, colours, FIFO depth,
  structuring-element size, window position and border rules are this
  design's choices, described above.

## Simulation

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
reference models in `tb/morph_ref_pkg.sv` evaluate each window directly, with
no counters. To run one testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/eyetoy_pkg.sv tb/tb_eyetoy_top.sv --top-module tb_eyetoy_top -o sim
./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `tb_vga_timing` | two full frames; every output compared every clock; line/frame period, sync widths, 307,200 visible pixels |
| `tb_luma_select` | random line lengths; only odd bytes reach `y`, held, one clock late |
| `tb_img_gen` | random positions; wall, hole and blanking colours against an independent hole table |
| `tb_vga_ctrl` | two full frames at 800×525; colour, syncs and position predicted two clocks after the raster; wall switched off for part of the run |
| `tb_async_fifo` | unrelated 10 ns / 17 ns clocks; scoreboard; fills to exactly 16 and drains to empty |
| `tb_bg_threshold` | all 256 values × 6 thresholds × both polarities |
| `tb_morph_rect` | erosion 3×3 and dilation 4×2 on three 12×8 frames with random input gaps and output back-pressure; handshake rule checked every clock |
| `tb_proc_stage` | threshold, erosion and dilation stages, each on three unrelated clocks |
| `tb_img_proc` | the whole chain on a 24×16 scene with noise specks; specks removed |
| `tb_eyetoy_top` | the whole design at its default sizes: two VGA frames, plus one 640×480 frame through the extraction chain (about 5 s of simulation) |

`tb_eyetoy_top` also counts each mechanism and fails if one never happens:

* wall pixels, camera pixels and blanking;
* hsync and vsync pulses;
* wall disabled;
* gaps in the camera input;
* input back-pressure;
* output FIFO empty;
* noise pixels removed by the opening;
* pixels restored by the dilation.
