# Adaptive edge-enhanced Bayer demosaicing processor

A single-sensor camera sees the scene through a Bayer colour filter array:
every pixel carries only one of red, green or blue, and the two missing
colours must be estimated from the neighbours ("demosaicing"). This design
does that in a streaming pipeline that takes one CFA sample per clock and
gives out one full RGB pixel per clock. It needs only two line memories and
uses no multipliers or dividers. All weights are multiples of 1/8, so they
are built from adders, shifters and multiplexers.

What makes the interpolation adaptive is a small edge detector. At every
pixel it measures how much the image changes horizontally (DH) and
vertically (DV), and how strong the local structure is (TD = DH + DV). Flat
areas get an isotropic weighting. Where there is an edge, the green
estimate leans towards the direction with less change, so edges are not
smeared across. A Laplacian term taken from the pixel's own colour channel
sharpens the result.

## Bayer layout and window

```
 row 0:  B G B G ...      B at (even row, even col)
 row 1:  G R G R ...      R at (odd row,  odd col)
 row 2:  B G B G ...      G elsewhere
```

Every output pixel is computed from a 3 x 5 window of CFA samples centred
on it: rows i-1..i+1 and columns j-2..j+2. In the RTL the window is
`win[r][c]`, with `win[1][2]` = P(i,j).

## The arithmetic

Notation used below:

* H is the sum of the row green neighbours: G(i,j-1) + G(i,j+1).
* V is the sum of the column green neighbours: G(i-1,j) + G(i+1,j).
* L is the Laplacian of the centre colour: 2·P(i,j) − P(i,j−2) − P(i,j+2).
* D is the sum of the four diagonal samples.

**Edge detector** (at every pixel):

```
DH = |P(i+1,j+1)-P(i+1,j-1)| + |P(i,j+1)-P(i,j-1)| + |P(i-1,j+1)-P(i-1,j-1)|
DV = |P(i-1,j-1)-P(i+1,j-1)| + |P(i-1,j)-P(i+1,j)| + |P(i-1,j+1)-P(i+1,j+1)|
TD = DH + DV
```

**Model choice** (`demosaic_pkg::select_mode`):

| condition                                  | model      |
|--------------------------------------------|------------|
| `edge_en`=0, or TD ≤ THRESHOLD, or DH = DV | none       |
| TD > THRESHOLD and DH < DV                 | horizontal |
| TD > THRESHOLD and DH > DV                 | vertical   |

**Green at a red or blue site** (`g_interpolator`):

| model      | G                     |
|------------|-----------------------|
| none       | (3H + V + 2L) / 8     |
| horizontal | (4H + 2L) / 8         |
| vertical   | (H + 3V + L) / 8      |

**Red at a blue site, or blue at a red site** (`rb_m1_interpolator`). Here g
is the green just interpolated at the same site:

| model      | result                      |
|------------|-----------------------------|
| none       | D/4 + g − (V + H)/4         |
| horizontal | D/4 + g − (3V + H)/8        |
| vertical   | D/4 + g − (V + 3H)/8        |

**Red or blue at a green site.** The colour found in the pixel's column
comes from `rb_m2_interpolator`:

```
(P(i-1,j) + P(i+1,j))/2 + G(i,j)/2 − (sum of the four diagonal greens)/8
```

The colour found in the pixel's row comes from `rb_m3_interpolator`. It
uses the greens already interpolated at the left and right neighbours,
written g(i,j−1) and g(i,j+1):

```
(P(i,j-1) + P(i,j+1))/2 + G(i,j) − (g(i,j-1) + g(i,j+1))/2
```

In a blue row the row neighbours of a green pixel are blue and the column
neighbours are red. In a red row it is the other way round.
`output_mux` selects the sources by site:

| site         | R     | G     | B     |
|--------------|-------|-------|-------|
| B            | RB_M1 | G int | raw   |
| R            | raw   | G int | RB_M1 |
| G, blue row  | RB_M2 | raw   | RB_M3 |
| G, red row   | RB_M3 | raw   | RB_M2 |

Every division is an arithmetic right shift, so results round towards minus
infinity. Every result is then clamped to 0..255.

## The pipeline and its timing

The hardest part of the design is lining up the data, so this section is the
one to read before changing anything. All registers in the datapath are
enabled by one signal, `adv`. It is high when an input pixel is accepted, or
during the flush at the end of a frame. When no pixel arrives, the whole
pipeline simply freezes. Times below are counted in these steps, not in
clock cycles.

```
in_pix ─► register bank ─► window_mirror ─► edge_detector (4 steps) ─────► DH DV TD
            (3x5 + 2 LB)         │                                           │
                                 └─► window delay line (4 steps) ─► step 4:  mode
                                                                   G int, RB_M1, RB_M2
                                                                        │
                                             step 5 registers: g(i,j), g(i,j-1), ...
                                                   RB_M3 (needs g of both neighbours)
                                                   output multiplexers
                                                                        │
                                                   step 6: output register ─► out_rgb
```

1. **Register bank** (`register_bank`, `line_buffer`). It has three shift
   rows of five registers. A new sample P(i+1,j+3) enters the bottom row.
   The sample leaving the bottom row is written into line buffer 2, and
   that buffer's output feeds the middle row. Likewise the middle row
   drains into line buffer 1, which feeds the top row. Each line buffer is
   IMG_W−5 words long, so a row of registers plus its buffer delays exactly
   one image row. Once the newest sample is in, the window centre is the
   sample taken IMG_W+2 steps earlier.
2. **Border mirroring** (`window_mirror`). At the frame edges, part of the
   window lies outside the image. Those columns actually hold the end of
   the previous row or the start of the next one, and the top row may hold
   data from the previous frame. They are replaced by mirroring: row −1
   becomes row 1, column −2 becomes column 2, and column W becomes column
   W−2. Mirroring by an even distance keeps each sample's Bayer colour.
3. **Edge detector** (`edge_detector`). It has six absolute subtractors and
   five adders, named W1..W8 as in the original architecture. They are cut
   into four register stages of one arithmetic level each: |sub|, first
   adds, DH/DV, TD. Meanwhile the mirrored window moves down a 4-step delay
   line, so window and edge values reach step 4 together.
4. **Step 4.** The model is chosen, and the G interpolator, RB_M1 and RB_M2
   all work on the same window.
5. **Step 5.** RB_M3 needs g(i,j−1) and g(i,j+1), the interpolated greens
   of both row neighbours. So RB_M3 runs one step later than the other
   interpolators:
   * g(i,j−1) is the G result registered one step earlier (register `g6`).
   * g(i,j+1) comes directly from the G interpolator, which by then is
     working on the next pixel.
   * At the left and right frame edges the two are mirrored: at column 0,
     g(i,−1) is taken as g(i,1); at column W−1, g(i,W) is taken as g(i,W−2).
6. **Output register.** `out_valid` is a one-cycle pulse for each pixel,
   together with its row, column and the model used.

**Latency:** a pixel leaves IMG_W + 8 steps after its CFA sample entered.
That is IMG_W + 2 steps for the window to centre on it, plus 6 steps of
pipeline.

## Frame protocol (`demosaic_controller`)

* After reset the controller is in RUN. `in_ready` is high and every cycle
  with `in_valid` high is one step. Pixels arrive in raster order, frame
  after frame, IMG_W × IMG_H pixels each.
* After the last pixel of a frame the controller enters FLUSH for
  IMG_W + 8 cycles. During FLUSH `in_ready` is low and the pipeline steps
  on its own, pushing out the last row and a half of the frame. Then it
  returns to RUN.
* A frame therefore takes IMG_W·IMG_H + IMG_W + 8 steps. For 1080p that is
  2,075,528 cycles, about 96 frames/s at 200 MHz.
* There is no output back-pressure: the consumer must take one pixel per
  step.
* The controller also produces the frame position of the window centre.
  This tag travels with the data. It drives border mirroring and the
  output multiplexers, and is reported on `out_row` / `out_col`.

## Ports and parameters of `demosaic_top`

| parameter   | default | meaning |
|-------------|---------|---------|
| `IMG_W`     | 1920    | line length (HD) |
| `IMG_H`     | 1080    | lines per frame |
| `THRESHOLD` | 64      | TD level above which edge enhancement applies |

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `edge_en` | in | 1: adaptive edge enhancement; 0: isotropic model everywhere. Change it only between frames. |
| `in_valid`, `in_ready`, `in_pix[7:0]` | in/out/in | CFA sample handshake |
| `out_valid`, `out_rgb` {r,g,b} | out | output pixel, one-cycle pulse |
| `out_row`, `out_col` | out | position of the output pixel |
| `out_mode` | out | model used for the output pixel: none, horizontal or vertical (meaningful at R/B sites) |
| `flushing` | out | end-of-frame flush in progress |

The frame must be at least 6 pixels wide and 2 lines high, and each side
must be below 65536. The line memories are the only large storage:
2 × (IMG_W−5) × 8 bits.

## Where this design departs from, or goes beyond, the published architecture

The following follow the published architecture:

* the block structure: register bank with two line buffers, pipelined
  edge detector, reconfigurable G interpolator, three red/blue
  interpolators, FSM controller, two output multiplexers;
* the 3 × 5 register window;
* the edge-detector equations and its four pipeline stages;
* the green weights and the /8 shifter structure of the G interpolator;
* the red/blue equations;
* the 8-bit samples;
* the HD line length;
* the with/without edge-enhancement configurations.

The following are choices of this implementation:

* **Threshold.** The published threshold value is not given, so 64 is used.
  Ties (TD equal to the threshold, or DH equal to DV) use the isotropic
  model.
* **Laplacian term of the green models.** The weights are read from the
  shifter and multiplexer structure of the G datapath. The term is 2L/8 for
  the isotropic and horizontal models and L/8 for the vertical one.
  L = 2·centre − outer pair is this design's reading of the subtractor.
* **RB_M1.** The horizontal model weights the column greens by 3, and the
  vertical model weights the row greens by 3. This is kept exactly as the
  equations state it.
* **RB_M3** uses the interpolated green at both neighbours.
* **Rounding and clamping.** Floor rounding, and saturation to 0..255.
* **Frame handling.** Border mirroring, the frame flush, the valid/ready
  input handshake, stall-by-freezing, and the position tag.
* **Edge-detector pipelining.** The original explains its four pipeline
  stages in processor terms: instruction fetch, register read, execute,
  write back, one subtract or add instruction per cycle. Here every stage
  works on every step instead, so the design keeps the stated throughput of
  one pixel per clock.
* **Edge-detector outputs** keep full precision: 10-bit DH/DV and 11-bit TD.
  A reference waveform of the original showed only 8 bits of them, and its
  values agree with these outputs taken modulo 256.
* **Line buffers** use an asynchronous-read circular memory. A
  synchronous-read SRAM would need the read address issued one step ahead.

The image-quality figures reported for the original (CPSNR around 34 dB)
have not been reproduced: no test image set is available and the threshold
is unknown.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_line_buffer` | exact DEPTH-step delay under random enables |
| `tb_register_bank` | every window position against the input history, random gaps |
| `tb_edge_detector` | DH/DV/TD against integer sums with 4-step latency; one directed case matching the reference waveform values |
| `tb_g_interpolator`, `tb_rb_m1/2/3_interpolator` | floating-point evaluation of the equations, all models, saturation |
| `tb_output_mux` | source selection for the four Bayer sites |
| `tb_demosaic_controller` | stall, flush length, centre tag sequence over three frames |
| `tb_demosaic_top` | four 20×12 frames end to end, against a frame-level reference model (see below) |
| `tb_demosaic_full` | two 1920×1080 frames with default parameters, same checks (about 20 s of simulation) |

The reference model is `tb/demosaic_ref_pkg.sv`. It evaluates the equations
in floating point on the whole frame with mirrored coordinates. It uses no
window, line buffer or pipeline, so it checks the RTL's alignment
independently.

The two end-to-end testbenches check each pixel's value, its position, the
model it reports, and its exact latency in steps. They also count every
mechanism and fail if one never happened:

* input stalls;
* flushes;
* each of the three models;
* edge enhancement switched off;
* each of the four borders;
* each of the four Bayer sites;
* saturation.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/demosaic_pkg.sv tb/demosaic_ref_pkg.sv tb/tb_demosaic_top.sv \
    --top-module tb_demosaic_top -o sim
./obj_dir/sim
```

For a unit testbench, replace the last file and the top module name. The
reference package is only needed by the two end-to-end testbenches.

## Files

* `rtl/demosaic_pkg.sv` – shared types (pixel, window, mode, site, position
  tag, RGB) and helpers (mode choice, clamp).
* `rtl/demosaic_top.sv` – the processor.
* `rtl/register_bank.sv`, `rtl/line_buffer.sv` – window generation.
* `rtl/window_mirror.sv` – border handling.
* `rtl/edge_detector.sv` – pipelined edge detector.
* `rtl/g_interpolator.sv`, `rtl/rb_m1_interpolator.sv`,
  `rtl/rb_m2_interpolator.sv`, `rtl/rb_m3_interpolator.sv` – interpolators.
* `rtl/demosaic_controller.sv` – frame FSM.
* `rtl/output_mux.sv` – output selection.
* `tb/` – testbenches and the reference model.
