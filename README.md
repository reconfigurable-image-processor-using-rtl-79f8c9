# Command-controlled image processor for a VGA display

A small FPGA image processor that applies one of six fixed effects to a
16×16 colour image and shows the result on a 640×480 VGA monitor. A
4-bit binary command selects the effect. The command comes from a host's
GPIO pins, for example a single-board computer that maps typed keywords to
codes. The effects are:

* black and white,
* greyscale,
* a colour filter that keeps one colour and turns the rest grey,
* rotation by 90° or 180°,
* mirroring,
* a two-frame animation.

The design has no frame buffer for results. It processes the
**display's own pixel stream**. For every screen pixel inside the image
window, the VGA driver asks for one image pixel. The selected mode decides
two things:

* which ROM address is read (this is how rotation and mirroring work), and
* how the pixel read is recoloured (black and white, greyscale and the
  colour filter).

Only the animation needs storage beyond the source ROM. A second
256-entry frame memory is filled once after reset.

The design follows a published description of a student-level FPGA image
processor on a Spartan-3E board. Where that description is silent or
ambiguous, the choices made here are listed in
[Departures and own choices](#departures-and-own-choices).

## Block structure

```
 cmd[3:0] ──► command_decoder ──► mode
                                   │ (enables / selects)
 vga_driver ──(row,col)──► rotation ──► mirror ──► image_rom port A ──┐
     ▲                                                                │ pixel
     │                      animation ◄── image_rom port B (copy)     │
     │                          │  frame select                       │
     │          ┌───────────────┴──────┬──────────────┬───────────────┤
     │          ▼                      ▼              ▼               ▼
     │   anim pixel            bw_threshold      greyscale      color_filter
     │          └──────────┬───────────┴──────────────┴───────────────┘
     └──── pixel_in ◄── mode multiplexer (imgproc_top)
 vga_driver ──► vga_red[2:0] vga_green[2:0] vga_blue[1:0] hsync vsync
```

| File | Role |
|---|---|
| `rtl/imgproc_pkg.sv` | Pixel type (RGB332), mode enum, intensity and grey functions, the built-in sprite |
| `rtl/imgproc_top.sv` | Top level: wiring and the mode multiplexer |
| `rtl/command_decoder.sv` | Synchronises and decodes the 4-bit command |
| `rtl/image_rom.sv` | 256 × 8 source image, two asynchronous read ports |
| `rtl/rotation.sv`, `rtl/mirror.sv` | Address transforms in the ROM read path |
| `rtl/bw_threshold.sv`, `rtl/greyscale.sv`, `rtl/color_filter.sv` | Per-pixel recolouring |
| `rtl/animation.sv` | Copy engine, second frame memory, frame alternation counter |
| `rtl/vga_driver.sv` | 640×480 timing, zoom window, output register |

## Commands

| `cmd` | Mode | What is shown |
|---|---|---|
| 0 | original | the ROM image |
| 1 | black and white | white where intensity ≥ `bw_threshold`, black elsewhere |
| 2 | greyscale | five grey shades from a four-threshold ladder |
| 3 | colour filter | blue (`8'h03`) kept, everything else grey |
| 4 | rotate 90 | image turned 90° clockwise |
| 5 | rotate 180 | image turned 180° |
| 6 | mirror | image reflected about its main diagonal (rows ↔ columns) |
| 7 | animation | the image and a copy shifted up four rows alternate |
| 8–15 | — | treated as 0 |

The GPIO lines are asynchronous to the FPGA clock. `command_decoder` passes
them through a two-flop synchroniser. It accepts a code only after seeing the
same value on two consecutive cycles, so a code caught while the host is
still changing pins is ignored. A stable code takes effect four clock cycles
after it appears on the pins. The mode can change at any time. If it changes
in the middle of a frame, the rest of that frame is shown in the new mode.

## Pixels and colour arithmetic

Pixels are 8-bit RGB332, `{red[2:0], green[2:0], blue[1:0]}`. Together with
the two syncs, these are the ten lines of a resistor-DAC VGA port.

**Intensity.** Each channel is widened to 8 bits by bit replication. For
example, red `r` becomes `{r, r, r[2:1]}` and blue `b` becomes `{b,b,b,b}`.
The intensity is then

    Y = (77·R + 150·G + 29·B) >> 8        (ITU-R BT.601 weights)

**Black and white** compares `Y` with the run-time `bw_threshold` input.

**Greyscale** compares `Y` with four ascending thresholds (64, 112, 160, 208)
at once. The number of thresholds reached is the band, 0 to 4. Band `k` is
shown as grey level `g = k·7/4`, which gives levels 0, 1, 3, 5 and 7. Level
`g` is output as the RGB332 grey `{g, g, g[2:1]}`. Band 0 is black and
band 4 is white.

**Colour filter** passes a pixel unchanged when its 8-bit value equals
`KEEP_COLOR`. Otherwise it uses an instance of the greyscale block. The
match is exact, so only pixels of exactly that colour survive.

All three are purely combinational between the ROM output and the VGA
output register.

## Rotation and mirroring as address arithmetic

Nothing is moved in memory. The VGA driver presents the image coordinate
`(row, col)` that the beam is over. `rotation` and then `mirror` map it to
the ROM coordinate to read:

| mode | ROM row | ROM column |
|---|---|---|
| rotate 90 (clockwise) | 15 − col | row |
| rotate 180 | 15 − row | 15 − col |
| mirror | col | row |

Each block has an `enable` input and passes the address unchanged when it
is off. Both blocks therefore sit permanently in the read path, and the
decoded mode only enables one of them. The ROM address is `{row, col}`.

The source description explains rotation as keeping the horizontal read
order and reversing the vertical one. On its own, that is a vertical flip.
Here the 180° mode reverses both orders, so the result is a true rotation.

Mirroring follows the description literally: row and column addresses are
exchanged. This reflects the image about its diagonal rather than about a
vertical axis.

## The animation frame

After reset, `animation` runs a copy engine that reads ROM port B once, one
entry per clock:

    frame_mem[i] = rom[i + 64]   for i = 0 … 191
    frame_mem[i] = black         for i = 192 … 255

The copy takes exactly 256 cycles, which is 5.12 µs at 50 MHz. `copy_busy`
is high during the copy and `copy_done` afterwards.

The result is the image moved up four rows, with a black band at the bottom.
In animation mode, a frame counter counts the VGA driver's `frame_tick`
pulses and toggles `frame_sel` every `FRAMES_PER_SWAP` (= 2) display frames.
At 60 Hz the picture therefore changes 30 times a second. The output pixel
comes from the ROM while `frame_sel` is 0 and from the frame memory while
it is 1. The counter does not start before the copy is done.

## VGA timing and the zoom window

The board clock is 50 MHz. `vga_driver` makes a pixel enable on every
second clock (25 MHz) and runs the standard 640×480 at 60 Hz timing:

| | visible | front porch | sync | back porch | total |
|---|---|---|---|---|---|
| horizontal (pixels) | 640 | 16 | 96 | 48 | 800 |
| vertical (lines) | 480 | 10 | 2 | 33 | 525 |

Both syncs are active low. The 16×16 image is enlarged 16× (`ZOOM_SHIFT` = 4)
to 256×256 screen pixels. It is centred, with its top-left corner at
(192, 112).

Visible pixels outside the image are green (`BG_COLOR`), and blanking is
black. Colour, `hsync` and `vsync` are registered together on the pixel
enable, so all ten lines change on the same clock edge. They appear one
pixel period after the counter position they belong to. The ROM, the frame
memory and all pixel operations are asynchronous or combinational, so the
whole path from counters to pins is that one register stage.

## Source image

`image_rom` holds a built-in 16×16 sprite: a plumber-style character with a
red cap, brown hair and shoes, skin-coloured face and hands, blue overalls
and yellow buttons, on a white background. `imgproc_pkg::build_image()`
builds it at elaboration from sixteen text rows, one character per pixel.
To use another image, edit `sprite_row()` and `char_colour()`. To load an
image from a file instead, replace the `CONTENTS` localparam.

## Departures and own choices

Taken from the source description:

* a 4-bit binary command;
* six processing blocks plus a VGA driver, selected in a switch-case manner;
* thresholding for black and white (threshold set by the user);
* threshold bands for greyscale;
* one colour kept by the filter (blue);
* rotation and mirroring by changing the ROM read order;
* a shifted copy of the ROM that alternates with the original more than
  15 times a second;
* 640×480 output with a zoomed 256-pixel image;
* ten lines to the VGA port.

Choices of this design:

* **Image format.** The image is read as 16×16 pixels of 8-bit RGB332.
* **Image contents.** The sprite is an original drawing in the same style
  as the one described.
* **Command codes.** The code table and the synchroniser with its
  agreement check are this design's.
* **Intensity and greyscale.** The BT.601 intensity, the four greyscale
  thresholds and the grey shades are this design's.
* **Rotation.** The 90° turn is clockwise. The 180° mode reverses both
  axes; the description reverses only the vertical order.
* **Mirroring.** It is a diagonal reflection, kept literally from the
  description.
* **Animation shift.** The description says the last 191 values are
  copied. That count does not fill whole 16-pixel rows, and the published
  picture of the frame shows a black band about four rows high. The shift
  is therefore read as 64 entries: entries 64…255 go to entries 0…191.
* **Animation timing.** The copy runs after reset, one entry per clock, and
  the two frames swap every two display frames.
* **Clocking.** The 50 MHz clock is divided by 2, and the porches are the
  standard VESA values.
* **Screen layout.** The zoom factor is 16, the image is centred, and the
  background is green.
* **Threshold input.** The black-and-white threshold is a top-level port.
  How a user sets it (switches, more GPIO lines) is left to the board
  wrapper.
* **Reset.** Reset is synchronous and active high.

Not covered: the host software (keyword to code), the board, the connector
and the monitor. Device-specific timing and area results are also outside
this RTL; yosys reports about 170 word-level cells, 59 flip-flops and
6 kbit of ROM/RAM for the top.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. The reference
arithmetic is in `tb/tb_ref_pkg.sv` and is written independently of the
RTL.

| Testbench | What it checks |
|---|---|
| `tb_bw_threshold` | all 256 pixel values at 16 thresholds, plus the exact threshold edge |
| `tb_greyscale`, `tb_color_filter` | all 256 pixel values, plus hand-worked shades of the sprite colours |
| `tb_rotation`, `tb_mirror` | every coordinate in every setting; 90° applied twice equals 180° |
| `tb_image_rom` | hand-picked sprite pixels, colour census, port B read independently |
| `tb_command_decoder` | all 16 codes, the 4-cycle latency, one pulse per change, rejection of a one-cycle glitch |
| `tb_animation` | behavioural ROM with random contents; copy length of exactly 256 cycles; shifted frame contents; no swap before the copy ends; swap every 2 ticks |
| `tb_vga_driver` | all ten outputs on every pixel of more than one frame, against an independent scan model; frame period 800×525 pixel clocks |
| `tb_imgproc_top` | end to end at default parameters (see below) |

`tb_imgproc_top` acts as host and monitor. It captures the centre of each
zoomed cell over whole frames and checks the first (original) frame at
hand-picked pixels. It then compares every later frame with its own
transformation of that original, once per mode. It also runs:

* a second threshold,
* an unused code,
* eight animation frames, checking that exactly four of each kind appear
  and counting the swaps.

It checks the syncs on every pixel, the background colour and blanking. A
mechanism that never occurs counts as a failure. It runs 28 frames
(about 23.5 M clock cycles) in roughly a minute.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_imgproc_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/imgproc_pkg.sv tb/tb_ref_pkg.sv tb/tb_imgproc_top.sv -o sim
./obj_dir/sim
```

Replace `tb_imgproc_top` with any other testbench name. For lint only, use
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/imgproc_pkg.sv rtl/<module>.sv`.

## Changing it

* `imgproc_top` parameters:
  * `DIM`: image side. The ROM contents are written for 16.
  * `CLK_DIV`: set it to 1 for a 25 MHz system clock.
  * `ANIM_SHIFT`: entries to shift; a multiple of `DIM` moves whole rows.
  * `FRAMES_PER_SWAP`: animation speed.
  * `KEEP_COLOR`: colour kept by the filter.
* `greyscale` takes `NUM_THR` and `THRESHOLDS`, in ascending order.
* `vga_driver` takes all timing values, as well as `ZOOM_SHIFT`, `X0`, `Y0`
  and `BG_COLOR`.
* New modes: add an enum value in `imgproc_pkg`, a pixel or address block,
  and a case in the top's multiplexer.
