# SRI-SURF: SURF feature extraction with a scaled-RAM interpolator

SURF finds blob-like feature points with box filters on an integral image, then
describes each point by Haar wavelet responses sampled on a grid around it. The
grid is scaled by the point's scale `s` and turned by its orientation, so the
sample positions almost never fall on whole pixels. A software SURF rounds them
to integer pixels. That rounding costs accuracy. Computing Haar wavelets at
fractional positions straight from the integral image would need
many interpolated corner reads per sample, and the whole integral image band of
rows that a point can reach must be kept on chip.

This design solves both problems with two ideas:

* **Pre-computed, interpolated Haar wavelets.** For each of the four rounded
  scales `s0 = 2, 3, 4, 5`, the Haar responses (dx, dy) with side `2*s0` are
  computed once, on a grid with spacing `s0` pixels. A sample at any
  fractional position then costs one read of four neighbouring grid values and
  one bilinear interpolation.
* **Multi-scaled RAM.** The responses for scale `s0` are stored on that scaled
  grid, so the RAM row for `s0` is only `W/s0` words wide, and all scales see
  the same access pattern (a point of scale `s` reaches about `16` grid rows in
  its own scale). Each scaled RAM keeps 84 rows, and the four of them together
  hold `84 * (1/2 + 1/3 + 1/4 + 1/5) = 108` full-width rows.

Around these sit an integral-image generator, a two-octave Hessian detector,
an orientation generator, a descriptor generator and a normaliser. There are
two clock domains (pixel I/O and calculation) and two feedback loops: image
reading is stalled when the calculation falls behind, and the detection
threshold is raised for the next frame when a frame yields too many points.

## Dataflow

```
pix_clk | clk
pixels -> cdc_fifo -> iig (integral image, ring of 64 rows)
                        |            \
                        v             v
                   haar_pre       fe_octave x2 (octave 1: L = 9,15,21,27 step 2;
                        |                       octave 2: L = 15,27,39,51 step 4)
                        v             |
             msr_ram s0=2,3,4,5       v
                        ^        feature-point queue (16) --> fp_throttle
                        |             |                        (threshold)
                        +------- sri_sampler --(ci3_interp)
                                   |      |
                                   og     dg --> desc_norm --> desc_valid
```

| Module | Role |
|---|---|
| `surf_pkg` | widths, `haar_t`, `fp_t`, scale helpers |
| `cdc_fifo` | Gray-code asynchronous FIFO, pixel clock to calculation clock |
| `iig` | integral image, ring of the last `ROWS` rows, combinational read ports |
| `haar_pre` | one scaled row of Haar pairs per call, written to a scaled RAM |
| `msr_ram` | one scaled RAM: ring of 84 rows of `IMG_W/S0` Haar pairs, four-neighbour read |
| `ci3_interp` | bilinear interpolation of four Haar pairs, 16-bit fractions |
| `fe_octave` | Hessian determinant for four filter sizes, 3x3x3 local maximum, threshold |
| `fp_throttle` | per-frame threshold feedback |
| `sri_sampler` | sample generator for orientation and descriptor, drives the interpolator |
| `og`, `cordic` | orientation: 60-degree sliding window, atan2, cos/sin |
| `dg` | 4x4 sub-regions of sum dx, sum dy, sum abs dx, sum abs dy |
| `desc_norm` | unit-length normalisation of the 64 values |
| `sri_surf_top` | everything above, plus the row scheduler and the stall logic |

## The scaled grid and the interpolator (hardest part)

Filter side `L` has scale `s = 2L/15` (side 9 is `s = 1.2`). The four middle
filter sides of the two octaves, 15, 21, 27 and 39, give `s = 2, 2.8, 3.6,
5.2`, which round to `s0 = 2, 3, 4, 5`. A point found at side `L` is served
from the scaled RAM of `round(s)`, clamped to 2..5.

Grid point `(X, Y)` of scale `s0` is the pixel corner `(X*s0, Y*s0)`. Its Haar
pair covers the square of side `2*s0` centred there:

* `dx` is the right half minus the left half.
* `dy` is the bottom half minus the top half.

Each half is one box sum, so one grid point takes 6 integral-image reads
(`haar_pre` uses 8 ports and reads the 3x3 corner set). A scaled row `Y` can be
written once image row `Y*s0 + s0 - 1` is in the integral image. After each image
row `r`, the scheduler starts `haar_pre` for every `s0` with `(r + 1) % s0 == 0`.

A sample at pixel position `p` (fixed point, 16-bit fraction) maps to grid
coordinate `g = (p + 0.5) / s0`. The `+0.5` moves from a pixel index to the pixel
centre. The division is a multiply by `2^24 / s0`. The integer part of `g` picks
the four stored neighbours. Its fraction `(fx, fy)` weights them:

```
v = (1-fy)*((1-fx)*q00 + fx*q01) + fy*((1-fx)*q10 + fx*q11)
```

The result has 8 fractional bits (`ci3_interp`, floor rounding, 64-bit
products). Because the stored wavelets all have side `2*s0`, the interpolated
response is an approximation of a Haar wavelet of side `2s` at the exact
sample position. The error comes from `s` versus `s0` and from interpolating
across the grid. That is the trade between accuracy and speed the design makes:
one RAM read and four multiplies per sample, instead of computing each wavelet
from the integral image.

### Ring addressing

Scaled row `Y` is stored at `Y % ROWS`. `msr_ram` returns zero for rows not yet
written, for rows already overwritten (`Y < rows_done - ROWS`), and outside the
image. That keeps the reads right at the image borders and makes any overrun
visible as zeros, not as data from the wrong row.

## Detection (`fe_octave`)

For every `STEP`-th column of the centre row, the detector works out four box
sums for each of the four filter sizes:

* two for `Dxx` (the whole 3-lobe band minus three times the middle lobe);
* two for `Dyy`;
* four for `Dxy` (the quadrants).

That is one box per clock, so 32 clocks per grid point. Each response is
normalised by the filter area: it is multiplied by `2^32 / L^2` and kept in Q8.
The determinant is `Dxx*Dyy - 0.81*Dxy^2` in Q16.

Three determinant rows are kept per size. After each new row, the middle one
is searched at the two middle sizes for strict 3x3x3 maxima above `threshold`.
Points within `BMAX + STEP` pixels of the border are not searched, where
`BMAX` is half the largest filter. A found point enters the feature-point queue.
When the queue is full, the point is dropped and counted.

Octave 1 starts on image row `r` once `r >= 13` (centre row `r - 13`). Octave 2
starts once `r >= 25` (centre row `r - 25`). Each runs only on rows that fit its step.

## Row scheduling and the stall loop

Everything that happens after image row `r` is one *row job*: the `haar_pre`
calls, then the two detectors. While a row job runs, `iig` holds the next
row. Image reading (`pix_ready`, and through the FIFO, the pixel clock side)
stops when any of these is true:

1. a row job is still pending (`events[1]`);
2. the oldest queued point, or the point being sampled, still needs scaled
   rows that the next image rows would overwrite. The guard is
   `r >= y + (MSR_ROWS/2) * s0` (`events[0]`);
3. a new frame begins before the previous one is fully described.

Rule 2 is what keeps the ring of 84 scaled rows large enough. A point's samples
reach about `16s` pixels above and below it. That is at most about 34 scaled rows at
`s0`. Holding half of the ring behind the point is enough.

The sampler starts a point once its scaled RAM holds every row its samples can
reach (`rows_done*s0 >= y + 16s + 2*s0 + 2`), or once the whole frame is in.

## Threshold feedback (`fp_throttle`)

At the end of every frame, the count of queued points and of dropped points
decides the threshold for the next frame:

* any drop, or more than `TARGET` points: multiply by 1.5;
* fewer than `TARGET/4` points: multiply by 0.75 (not below 1.0);
* otherwise: keep it.

The default is `TARGET = 3250`, the points per 1080p frame the design aims at.

## Orientation and descriptor

`sri_sampler` handles one point at a time, one sample per clock:

* **Orientation:** 109 samples at integer offsets `(i, j)*s` with
  `i^2 + j^2 < 36`, weighted by a Gaussian with sigma `2.5s`. `og` sorts each
  response pair into one of 36 sectors of 10 degrees, by sign tests against
  tables of cos and sin. It then slides a window of 6 sectors (60 degrees)
  over the 36 start positions and keeps the longest summed vector. Its angle
  comes from a CORDIC atan2, and its cos and sin from a CORDIC rotation.
* **Descriptor:** a 20x20 grid at offsets `(k - 9.5)*s`, rotated by the
  orientation, weighted by a Gaussian with sigma `3.3s`. Each response pair is
  turned into the point's frame. `dg` adds `rx, ry, |rx|, |ry|` into the 4x4
  sub-region of 5x5 samples it falls in.
* **Normalisation:** `desc_norm` forms the sum of squares over 64 clocks, takes a
  bit-serial square root, and divides each value by it (15 quotient bits,
  signed Q1.15 output).

A point takes about 2,000 clocks. Roughly 109 + 400 are samples, and most of
the rest is the serial normaliser.

## Number formats

| Quantity | Format |
|---|---|
| pixel | 8-bit unsigned |
| integral image | 32-bit unsigned (`1920*1080*255 < 2^31`) |
| stored Haar pair | 2 x 16-bit signed, integer box differences |
| sample position | pixels, 16 fractional bits |
| interpolated response | 24-bit signed, 8 fractional bits |
| determinant, threshold | signed, 16 fractional bits |
| angle | radians, Q16 |
| descriptor out | 64 x 16-bit signed Q1.15 |

## Where this RTL departs from SRI-SURF as published

* **Schedule and speed.** Box filters are computed one box per clock, and
  points are described one at a time. A 1080p frame takes about 19 million
  clocks of detection, and each point about 2,000 clocks. The published system
  reaches 241K points per second and 72 frames per second at 1080p, with a
  parallel datapath that this RTL does not reproduce.
* **No sub-pixel refinement.** Points keep their grid position and filter size.
  The interpolation step that fits the maximum in space and scale is not built.
* **Orientation by sectors.** The sliding window runs over 36 sectors of 10
  degrees, not over the exact angle of every sample.
* **Sizes chosen here.** These were picked for this RTL, not taken from the published design:
  * the feature-point queue (16 entries) and the pixel FIFO (16);
  * the integral-image ring (64 rows);
  * the threshold rule (x1.5 / x0.75) and the default threshold (26.0);
  * the two-octave filter layout;
  * the Gaussian widths.
* **Frame size is fixed at build time.** `IMG_W` and `IMG_H` are parameters, 1920x1080 by default.
  Smaller images, such as VGA, need a build with those values.

The simulations compare against models written in the testbenches:

* exact reference detection;
* double-precision interpolation, CORDIC, square root and division;
* end-to-end runs that check each descriptor's norm, position and size, and that a repeated frame repeats its descriptors.

They do not compare against a software SURF.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
stops itself with a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl --top-module tb_fe_octave \
    rtl/surf_pkg.sv tb/tb_fe_octave.sv
./obj_dir/Vtb_fe_octave
```

The testbenches:

| Testbench | What it runs |
|---|---|
| `tb_sri_surf_top` | the whole design on a 96x160 image, with a 44-row scaled RAM, an 8-entry queue and a target of 6 points, over three frames. It makes every mechanism happen: both stalls, I/O back-pressure, queue drops, interpolation at fractional positions, and the threshold going up and down. It checks that every descriptor has unit length and a valid position and size, that each frame describes every point it accepted, and that a repeated frame gives the same descriptors for the points it shares with the first run. |
| `tb_sri_surf_full` | the top with every default, one 1920x1080 frame (about 40 s with Verilator) |
| `tb_sri_surf_sizes` | builds for 640x480 and 800x640 side by side, one frame each |
| `tb_<block>` | one per block |

To change the frame size, override `IMG_W` and `IMG_H` on `sri_surf_top`. `MSR_ROWS` may shrink for small
images, since the guard scales with it. `TARGET` sets the points per frame
that the threshold loop aims at.
