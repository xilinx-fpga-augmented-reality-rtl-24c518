# Augmented-reality cards on an FPGA

A camera looks down at a playing-card-sized card lying on a plain mat. The card
has a green body and a small red mark off its centre. The monitor shows the
live camera picture. Wherever the card is, a small 3D model (a coloured cube
by default) stands on it. The model is redrawn from the viewpoint that matches
how far the card has been turned. The design has no processor: the camera
path, the detection and a complete triangle renderer with a z-buffer are all
fixed-function logic running from one 65 MHz clock.

The system has three parts:

1. **Camera path.** The camera frame is captured, turned upright and stored. The
   display reads it back magnified.
2. **Card detection.** Colour thresholds, centroids and an angle estimate are
   computed from the displayed pixel stream.
3. **Rendering.** The model is projected, rasterized and depth-tested into a
   64x64 image. That image is laid over the camera picture, centred on the card.

The top module is `ar_cards_top` (`rtl/ar_cards_top.sv`). Every module lives in
`rtl/<name>.sv`. Shared types and constants are in `rtl/ar_pkg.sv`.

## Clock and interfaces of the top

| port | width | meaning |
|---|---|---|
| `clk_65mhz` | 1 | 65 MHz pixel clock; the board needs a clock synthesizer (100 MHz in, 65 MHz out) outside this RTL |
| `rst` | 1 | synchronous, active high |
| `cam_pclk`, `cam_href`, `cam_vsync`, `cam_data[7:0]` | | OV7670-style camera pins, sampled as data in the 65 MHz domain |
| `sw[1:0]` | 2 | display selection: 0 AR picture, 1 camera only, 2 detection mask, 3 camera with detected pixels painted over |
| `vga_r/g/b[3:0]`, `vga_hs`, `vga_vs` | | 1024x768 VGA output (XGA timing, 1344x806 total) |
| `cat_out[6:0]`, `an_out[7:0]` | | eight-digit seven-segment display: angle in the upper digits, card x centroid in the lower |

Everything runs in the single 65 MHz domain. The camera's `pclk` is
oversampled rather than used as a clock. This only works while `pclk` runs
well below 65 MHz; an OV7670 at 320x240 and 30 frames/s needs about 4.6 M
bytes/s.

## Camera path

`cam_capture` synchronises the camera pins with two flip-flops. It detects
rising edges of `pclk` and joins each pair of bytes of a line into one RGB565
pixel, high byte first. It pulses `frame_done_out` at the start of `vsync`.

`recover` counts the pixels of a 320x240 frame into a column and row.

`rotate` turns the picture by 90 degrees. The camera is mounted on its side, so
its rows become the screen's columns. It writes pixel (column c, row r) to
address `c*240 + (239 - r)` of a 240-wide, 320-high frame buffer.

`frame_buffer` is a simple dual-port memory: 76,800 words of 16 bits, one write
port and one registered read port. The same module, with other parameters,
serves as the 64x64x10 colour memory of the renderer.

The display side scans 1024x768. `addr_picker` maps a screen position (h, v) to
the buffer position ((3h)>>3, (3v)>>3), so the 240x320 picture appears
magnified by 8/3 (640x853, cut off at line 768). `scale` drives black outside
the picture.

### Display pipeline timing

Latencies are counted from the `vga_gen` counters:

- buffer address: 1 cycle;
- buffer data: 2 cycles;
- scaled pixel and threshold decisions: 3 cycles;
- model overlay: 4 cycles;
- VGA pins: 5 cycles.

`hsync` and `vsync` are delayed by 5 cycles so that they line up with the
pixels. Each stage's counters are delayed by the same amount. The overlay and
the detection therefore see the screen position that belongs to their pixel.

## Card detection

Detection works on the magnified pixel stream that goes to the monitor. It
uses the same coordinates as the overlay, so no conversion is needed between
them.

- **`threshold`.** Widens RGB565 to three 6-bit channels. A pixel is flagged
  when the chosen channel is at least `HI` (20) and both others are at most
  `LO` (12). Two instances are used: green for the card body and red for the
  mark. The levels suit a saturated card under even light and will need tuning
  for a real scene.
- **`center_of_mass`.** Adds x, y and 1 for every flagged pixel of a display
  frame. At the frame's end it divides the two sums by the count, using
  `seq_divider` (one quotient bit per cycle). The 11-bit x and
  10-bit y centroid is ready 35 cycles after the frame ends. A frame with no
  flagged pixel keeps the old result.
- **`angle_guesser`.** The mark sits off the card's centre, so the vector from
  the body centroid to the mark centroid turns with the card.
  - A 12-step CORDIC in vectoring mode turns that vector into a whole-degree
    angle, 0..359 anticlockwise with y up.
  - The first measurement is used as it is. Each later estimate moves halfway
    from the previous estimate towards the new measurement, along the shorter
    arc. This damps camera noise but needs a few frames to follow a fast turn.
  - Latency is 15 cycles.
  - It does not count the mass of each scan line; the angle comes only from
    the two centroids.

Until the first angle exists, the render stage passes the camera pixel through
unchanged. The model appears only once the card has been seen.

## Rendering pipeline

`render_pipeline` owns the model memory, the projection, the rasterizer, the
z-buffer and the 64x64 colour memory. Each new camera location from
`angle_to_coord` starts a *pass*:

1. the z-buffer clears depth to 511 (far) and colour to 0 (transparent), which
   takes 4096 cycles;
2. every model triangle is read and projected;
3. each projected triangle is rasterized and its pixels are depth-tested into
   the colour memory.

A location that arrives during a pass is remembered and starts the next pass.
The display reads the colour memory through the memory's second port at any
time. A pass is much shorter than a display frame, so any tearing is brief.

### Model format

`model_rom` holds one triangle per 64-bit line:
`{x0,y0,z0, x1,y1,z1, x2,y2,z2, color}`.

- Each coordinate is a signed 6-bit number in model units.
- Colour is 10 bits, R3 G4 B3. Colour 0 is reserved for "nothing drawn".
- The default file `rtl/model_cube.hex` is a cube of side 32 centred on the
  origin, as 12 triangles with one colour per face.
- `N_TRI` and `FILE` on `render_pipeline` select another model. Paths are
  relative to the directory the simulator or synthesis runs in.

### Camera location (`angle_to_coord`, `sine_table`)

The virtual camera sits on a sphere of radius 64 model units. It is 40 degrees
above the card plane and turns about the vertical axis with the card angle θ:

    x = 64·cos40°·cos θ = 49·cos θ,   y = 49·sin θ,   z = 64·sin40° = 41

`sine_table` holds sin 0°..89° as 90 signed Q2.14 words (`rtl/sine_q14.hex`).
Folding maps any angle 0..360 onto it; 90° and 270° are produced by logic.
Lookups take 2 cycles and one can start every cycle. cos θ is read as
sin(θ+90°) on the following cycle. The block passes sin θ and cos θ on with the
position, so the projection needs no table of its own. Total latency is 4
cycles.

### Projection (`project_3dto2d`)

This is the hardest part of the design. For each vertex:

1. `d = vertex − camera`.
2. Rotate about the vertical axis by the heading:
   `a = cos θ·dx + sin θ·dy` (towards the model), `X = cos θ·dy − sin θ·dx` (screen right).
3. Tilt by the fixed elevation φ = 40°:
   `Y = cos φ·dz − sin φ·a` (screen up), `D = −(cos φ·a + sin φ·dz)` (depth, positive in front).
4. Round X, Y, D to integers. D is clamped to 1..511. X and Y are multiplied by
   32 with a shift. The smallest D of the three vertices becomes the
   triangle's depth.
5. Divide 32X and 32Y by D in `pipe_div`, a six-stage pipelined divider. Add
   the image centre 32 and flip Y so that rows grow downwards.

Arithmetic is Q2.14 in steps 2–3; sin φ and cos φ are elaboration-time
constants. The pipeline takes 10 cycles. All stages advance together
*unless* the last stage holds a finished triangle that the rasterizer cannot
take yet. The projection therefore keeps working while the rasterizer is busy,
and stops only when it has nowhere to put a result.

Only the heading varies. The card is assumed to lie flat, and its distance from
the camera is not used to scale the model. The overlay is drawn 1:1 (64x64
screen pixels).

### Rasterization (`rasterize`)

For the vertex pairs (v0,v1), (v1,v2), (v2,v0), the rasterizer sets up the edge
functions `E = A·x + B·y + C` with

    A = y_i − y_j,   B = x_j − x_i,   C = x_i·y_j − x_j·y_i

It also finds the bounding box of the vertices and clips it to the 64x64
image. It then scans the box row by row, one pixel per cycle. A pixel is
covered when all three E are ≥ 0 or all are ≤ 0. Both windings are therefore
accepted, and pixels on an edge are drawn. Triangles with zero area are
skipped.

- The first pixel's result comes 2 cycles after a triangle is taken.
- A box of W×H pixels keeps `busy_out` high for W·H cycles: 4096 for a
  triangle covering the whole image, 256 for a 16x16 box.

### Depth test (`z_buffer`)

The depth memory is 4096x9 and lives inside the z-buffer; the colour memory is
outside.

- **Cycle 1:** a pixel reads the stored depth at its address.
- **Cycle 2:** the stored depth is compared with the pixel's. If the pixel is
  nearer, both its depth and its colour are written.
- **Forwarding:** the depth written in the previous cycle is forwarded to the
  compare. Two pixels in a row at the same address are therefore handled
  correctly at one pixel per cycle.

Each triangle carries a single depth: its nearest vertex. Models whose
triangles pierce one another, or that overlap in depth in complicated ways,
can therefore show wrong occlusion. For closed convex shapes like the cube the
result is correct.

### Pipeline timing and throughput

From the first model read to the first colour write is 14 cycles:

- model memory read;
- 10 cycles of projection;
- rasterizer set-up and first pixel;
- z-buffer compare.

A model of N triangles needs at most 4096 (clear) + N·(4096 + 13) cycles. The
12-triangle cube needs under 54,000 cycles (0.8 ms), against 1,083,264 cycles
(16.7 ms) per display frame. So a pass finishes within the frame in which a
new angle arrives. In one frame time the pipeline could draw about 260
worst-case triangles, or about 4000 triangles with 16x16 boxes.

Memory use:

| memory | size |
|---|---|
| camera frame | 76,800 × 16 bits |
| colour | 64·64 × 10 bits |
| depth | 64·64 × 9 bits |
| sine table | 90 × 16 bits |
| model | N_TRI × 64 bits |
| angle CORDIC | a small table of arctangent constants |

## Overlay and output (`render`, `vga_mux`, `seven_seg`)

`render` places the 64x64 image centred on the card-body centroid. Inside that
square it reads the colour memory (one cycle of latency). A non-zero colour is
widened from R3G4B3 to RGB565 and replaces the camera pixel; colour 0 lets the
camera show through. The output is registered 2 cycles after the counters.

`vga_mux` selects by `sw`:

| `sw` | shown |
|---|---|
| 0 | AR picture |
| 1 | magnified camera picture |
| 2 | detection mask: body white, mark red, rest black |
| 3 | camera picture with detected pixels painted over |

It truncates RGB565 to 4:4:4 and blanks outside the active area.

`seven_seg` cycles through the eight digits (`COUNT_W` = 17 gives about
500 Hz per digit at 65 MHz).

## How this design differs from the description it is based on

- **Clock.** The 100 MHz → 65 MHz clock generator is not part of the RTL: it
  is a vendor clocking primitive. The top takes the 65 MHz clock as a port.
- **Angle estimate.** The angle comes from the body and mark centroids with a
  halfway blend. The source also mentions counting the mass of each horizontal
  line, without saying how that enters the estimate; that part is not built.
  No noise filter is used beyond the blend.
- **Widths.** Several widths are larger than the source's figures because the
  chosen frame sizes need them:
  - the frame-buffer address is 17 bits (not 12 or 16 bits), for 76,800 words;
  - the horizontal and vertical counters are 11 and 10 bits, for 1344x806.
- **Camera settings.** The resolution (320x240 RGB565), the rotation direction,
  the card colours and the threshold levels are not given by the source. They
  are choices of this design.
- **Camera-location units.** The camera radius of 64 is taken as 64 model
  units, the same scale as the model's 6-bit coordinates. The source quotes it
  in centimetres.
- **Edge test.** The source describes the test as "all positive". Here both
  signs are accepted, as are zeros, so vertex order in the model file does not
  matter.
- **Depth clamp.** Depth after projection is clamped to 1..511 so that it fits
  the 9-bit depth memory.
- **Clearing.** Clearing both memories before each pass, and restarting on a
  location that arrives mid-pass, are this design's choices.

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each ends by
printing `TB_RESULT checks=<n> failures=<n>` and has a watchdog. Run from the
project root, so that the memory files under `rtl/` and `tb/` are found:

    verilator --binary --timing -Irtl -y rtl -y tb rtl/ar_pkg.sv tb/tb_rasterize.sv --top tb_rasterize
    ./obj_dir/Vtb_rasterize

What the main testbenches check:

- **`tb_ar_cards_top`** runs the top at full size with its default parameters.
  It takes about 11 s of simulation.
  - A behavioural camera shows first an empty mat, then a 45x45 green card with
    an 8x8 red mark.
  - Checked: the overlay stays off before a card is seen; both centroids are
    right to ±1 pixel; the first angle is 45° ± 2; a complete AR frame on the
    VGA pins matches the camera picture overlaid with the colour memory
    contents; the mask selection works; moving the mark moves the angle by at
    least half the change.
  - It also checks that stalls, depth rejections and render passes all
    happened.
- **`tb_render_pipeline`**
  - renders the cube from four headings; the face towards the camera must
    appear in the middle, the white top above it, and the corners must stay
    transparent;
  - checks that the projection stalls and that the z-buffer both replaces and
    rejects pixels;
  - checks that a location sent during a pass starts a second pass;
  - checks the 14-cycle latency with a one-triangle model (`tb/one_tri.hex`).
- **`tb_project_3dto2d`** compares against a floating-point model of the same
  camera, within one pixel. It checks the 10-cycle latency and runs under
  random stalls.
- **`tb_rasterize`** compares against a brute-force coverage test of every
  image pixel.
- **`tb_z_buffer`** compares against a reference depth map. It sends pixel
  pairs aimed at the forwarding path.

## Files

- `rtl/` — the design:
  - `ar_pkg.sv`: shared types and constants;
  - one module per file;
  - `sine_q14.hex`: the sine table;
  - `model_cube.hex`: the default model.
- `tb/` — the testbenches, plus `one_tri.hex` for the latency test.
