# SIFT feature extraction for 720p video

This is synthesizable SystemVerilog for a SIFT (scale-invariant feature
transform) front end that turns a 1280x720 grey-level video stream into key-points
and 128-element descriptors at about 42 frames per second. It has two parts
that run on separate clocks:

* **Key-point detection** (50 MHz). This is a streaming pipeline that takes
  one pixel per clock. It builds the Gaussian scale space, forms the
  difference-of-Gaussian (DoG) images, finds the key-points and computes the
  gradient of every pixel at every key-point scale.
* **Feature generation** (100 MHz). It computes each key-point's main
  orientation and descriptor from the stored gradients, one key-point at a
  time. The workload depends on the number of key-points, not on the number
  of pixels.

Two ideas make this fit into a moderate amount of logic and memory:

1. **Octave interleaving.** The scale space has two octaves, and the second
   octave is half the size in each direction. Both octaves share one
   filtering and detection datapath. After every two first-octave rows, the
   datapath processes one second-octave row, which it reads from a FIFO of
   down-sampled pixels. Each line buffer has a full-width bank for the first
   octave and a half-width bank for the second.
2. **A buffer with no back-pressure between the two parts.** Detection never
   waits. Gradients of each key-point scale stream into a ring of row
   buffers, and key-points are queued in FIFOs. Feature generation picks up a
   key-point once the rows of its window are stored. If feature generation
   falls so far behind that newer rows have overwritten too much of a window,
   that key-point is skipped.

## Data flow

```
 pixels ─► octave_scheduler ─► gaussian_dog ─┬─► kp_detect ──── key-point flags ─┐
   ▲          (2:1 rows)       (6 Gaussians, │                                   │
   │                            5 DoGs)      └─► grad_compute ── gradients ──────┤
   └── scale3_fifo ◄── L3, even x/y ◄───────┘                                    │
                                                   ┌────────── per scale ────────┘
                                                   ▼   (one fg_unit per scale 1..3)
                         ┌─────────── grad_buffer (43 / 55 / 69 rows) ───────────┐
  detection clock        │ async key-point FIFO per octave, row counters (Gray)  │
 ────────────────────────┼───────────────────────────────────────────────────────┼──
  feature clock          │ fg_buffer_ctrl ─► MOG FIFO ─► mog ─► orientation FIFO │
                         │               └─► LDG FIFO ───────────► ldg ──────────┼─► descriptors
                         └───────────────────────────────────────────────────────┘
```

## The beat stream and octave interleaving

`octave_scheduler` produces one *beat* per clock. A beat carries a pixel
together with its coordinates `(oct, x, y)`, which are 13-bit signed numbers.
The coordinates, not a state machine, tell each stage what to do, and they
travel through every stage with the data.

* Each row is followed by `HBLANK` = 16 beats of idle data.
* Each octave is followed by `VBLANK` = 16 extra rows.

The blanking moves the last real pixels out of the filter windows, which span
up to 25 rows and 25 columns, and through the pipeline latency. Stage outputs
for coordinates outside the image are ignored by whatever follows.

Rows are scheduled in the order *octave-1 row, octave-1 row, octave-2 row*.
An octave-2 row is taken only when the scale-3 FIFO holds a complete
down-sampled row (640 pixels). Otherwise the first octave continues, and the
remaining second-octave rows run after the first octave ends. The pixel input
is a ready/valid handshake, and `in_ready` is low during blanking and
second-octave rows. One frame takes

    (1280+16)(720+16) + (640+16)(360+16) = 1,200,512 cycles,

which is 41.65 frames/s at 50 MHz. The full-size testbench measures this number
exactly.

Latencies along the stream:

| stage          | latency | output coordinate          |
|----------------|---------|----------------------------|
| `gaussian_dog` | 7       | (x-12, y-13) of the input beat |
| `kp_detect`    | 24      | (x-1, y-2) of its input    |
| `grad_compute` | 24      | (x-1, y-2) of its input    |

`kp_detect` is padded to the latency of `grad_compute`, so a key-point flag
leaves in the same beat as the gradient of its own pixel. The top level checks
this with an assertion.

## RAM-bar clusters

Every stage that needs a vertical window uses a `ram_bar_cluster`: NBARS row
memories, or *bars*, each `IMG_W` words deep (plus a half-depth bank for the
second octave).

* An incoming row is written into the bar selected by a cyclic pointer, one
  pointer per octave.
* At the end of the row the pointer advances, so the cluster always holds the
  last NBARS rows.
* All bars are read at the write column in the same cycle, read before write.
* A rotation by the pointer puts the oldest row at index 0.

Sizes:

| cluster                         | bars         | word                                      |
|---------------------------------|--------------|-------------------------------------------|
| image (input of the Gaussian filters) | 25     | 8                                         |
| DoG, one per D0..D4             | 3            | 22                                        |
| Gaussian, one per L1..L3 (for gradients) | 3   | 24                                        |
| gradient buffer, scale 1 / 2 / 3 | 43 / 55 / 69 | 33 ({orientation 9, magnitude 24})       |

The gradient buffers hold 2R+1 rows, where R = 21/27/34 is the radius of the
descriptor window at that scale. They account for almost all of the 11.5 Mibit
of on-chip memory. `grad_buffer` has its own write clock and two read ports in
the feature clock domain, one for orientation and one for descriptor
generation.

## Scale space (`gauss_sym_filter`, `gaussian_dog`)

There are six Gaussian images per octave, with σ_s = 1.6·2^(s/3) for
s = 0..5. Each is blurred with a separable filter of radius
4, 5, 6, 8, 10, 12 (windows 9 to 25 taps): first along y over the 25 bar
outputs, then along x over a 25-deep shift register of y results.

* **Coefficients.** Each 1-D filter uses tap weights
  exp(-i²/2σ²), normalised to a sum of 1 and rounded to Q16. They are
  computed during elaboration (`sift_pkg::make_gcoef`), so no table is stored
  in a file.
* **Symmetric pre-add.** Symmetric samples are added first, so a filter of
  radius R needs R+1 multipliers.
* **Image border.** A sample outside the image takes the value of its mirror
  partner inside the window. If both partners are outside, which only happens
  for windows wider than the image, the centre sample is used.

Gaussian pixels are 8Q16 (8 integer bits, 16 fraction bits). DoG pixels are
D_s = L_{s+1} − L_s in signed 6Q16, saturated.

`scale3_fifo` takes L3 of the first octave at even x and even y, rounds it to
8 bits and queues it as the second octave's source image.

## Key-point detection (`kp_detect`)

A 3×3 window of each DoG image, centred on (x-1, y-2), comes from the
3-bar DoG clusters plus three column registers. For each scale k = 1..3 the
centre of D_k is a key-point candidate when all of the following hold:

* **Extremum.** It is ≥ all 26 neighbours in D_{k-1}, D_k and D_{k+1} and
  above the contrast threshold, or ≤ all 26 and below minus the threshold.
* **Contrast threshold.** This is 0.04/3 of the 8-bit range, 222822 in 6Q16.
* **Edge response.** The Hessian of D_k satisfies det > 0 and
  tr²·r < (r+1)²·det with r = 10. The determinant is formed from 16·det, so
  only integers are involved.
* **Border.** The centre is at least 5 pixels from every image border.

Each key-point carries a per-axis quadratic sub-pixel offset, −D′/D″ in Q1.4
clamped to ±0.5 pixel. This is a simplification of the full 3-D refinement:
the location stays on the pixel grid, and neither the contrast test nor the
descriptor uses the offset.

## Gradients (`grad_compute`, `cordic_vec`)

The central differences gx = L(x+1,y) − L(x−1,y) and gy = L(x,y+1) − L(x,y−1)
of L1..L3 go through a 16-iteration pipelined CORDIC in vectoring mode. It
gives:

* the magnitude in 8Q16, with the CORDIC gain removed by a Q16 multiply;
* the angle atan2(gy, gx) rounded to whole degrees 0..359.

Neighbours outside the image make the difference 0.

## Between the clocks: buffer management (`fg_unit`, `fg_buffer_ctrl`)

Each key-point scale has one `fg_unit`. On the detection clock:

* the unit writes the gradient of every in-image pixel into its gradient
  buffer;
* it counts the completed rows per octave;
* on a key-point flag, it pushes {location, offsets, row number, bar} into the
  key-point FIFO of that octave.

There are two dual-clock FIFOs of 32 entries each, with Gray-coded pointers,
and the row counters cross the clock domain through Gray-code synchronisers.
Nothing flows back: a push into a full FIFO is dropped and counted.

On the feature clock, `fg_buffer_ctrl` looks at the oldest key-point of each
octave. With `rows_done` the number of completed rows of its octave and `seq`
the key-point's row number:

* **ready** when `rows_done − seq ≥ min(R, H−1−y) + 1`, meaning every row of
  the window, or every row up to the image bottom, is stored;
* **skipped** when `(rows_done − seq − (R+1))·(2R+1) ≥ OVR_THR`, meaning at
  least the threshold number of window pixels has already been replaced by
  newer rows. The default threshold is four rows of the window.

A ready key-point is copied into the MOG FIFO and the LDG FIFO in the same
cycle. The controller removes at most one key-point per cycle: skips go first,
then dispatches, and the first octave comes before the second within each.

The queues are per octave for a reason. A second-octave key-point needs about
twice as many first-octave rows of time before its window is complete. In a
single shared FIFO it would block the first-octave key-points behind it until
their windows were overwritten.

`ldg` checks the overwrite rule again when it takes a key-point, because the
window may have aged while the key-point waited for its orientation. Window
pixels that are overwritten but still under the threshold are read as they
are. They lie at the edge of the window, where the Gaussian weight is small.

## Main orientation (`mog`) and descriptor (`ldg`)

Both units walk a square window around the key-point, one pixel per clock,
through `win_scanner`. The scanner derives the bar of each row from the bar of
the key-point's row by cyclic stepping, and it flags pixels outside the image
so they are ignored.

**`mog`** uses a window of radius round(4.5σ) = 9, 11, 14 pixels. For each
pixel it:

1. weights the magnitude by g(dx)·g(dy), a Gaussian with σ_w = 1.5σ in Q16;
2. adds the result to one of 36 bins of 10°.

A 36-cycle search then finds the largest bin, and its centre, 10·bin + 5, goes
into the orientation FIFO. One key-point takes (2R+1)² + about 42 cycles,
which is 403 at scale 1.

**`ldg`** waits for both its key-point and that key-point's orientation, then
walks the radius-R window (21, 27, 34). For each pixel:

1. The offset (dx, dy) is rotated by the main orientation, using Q14 sin/cos
   tables built during elaboration.
2. The rotated offset is multiplied by 1/(3σ) and floored to a sub-region
   index −2..1 per axis. Pixels outside the 4×4 grid are dropped.
3. The gradient angle minus the main orientation picks one of 8 bins of 45°.
4. The magnitude, weighted by a Gaussian with σ_w = 6σ, is added to that one
   bin of the 128-bin histogram (32-bit bins).

The sum of squares of the histogram is kept current during the scan: an
update h → h + v adds (2h + v)·v. After the pipeline drains (5 cycles), the
rest of the normalisation is sequential:

1. bit-serial square root, 36 cycles;
2. reciprocal of the norm by restoring division, 33 cycles. The norm is first
   shifted to 32 significant bits, so the leading quotient bits are known to
   be zero and are skipped;
3. output, 128 cycles: element i = hist_i·512/‖hist‖ in 12Q16, one element
   per clock.

Each output beat carries the location, octave, scale, orientation and
element index. `desc_last` marks element 127. One key-point takes
(2R+1)² + 204 cycles: 2053, 3229 and 4965 for scales 1, 2 and 3.

Because MOG is much shorter than LDG and has its own key-point FIFO, it
computes the orientation of key-point M+1 while LDG is still building the
descriptor of key-point M. Orientation time is therefore hidden behind
descriptor time.

## Number formats

| quantity                   | format                         |
|----------------------------|--------------------------------|
| source pixel               | 8Q0                            |
| Gaussian pixel             | 8Q16                           |
| DoG pixel                  | 6Q16, signed                   |
| gradient orientation       | 9Q0 (degrees)                  |
| gradient magnitude         | 8Q16                           |
| key-point x, y             | 11Q0, 10Q0                     |
| sub-pixel offset           | signed Q1.4                    |
| main orientation           | 9Q0 (degrees)                  |
| descriptor element         | 12Q16, vector length 512       |

All shared types (`beat_tag_t`, `kp_loc_t`, `kp_entry_t`, `desc_elem_t`) and
all elaboration-time tables are in `rtl/sift_pkg.sv`.

## Capacity and sizes

| item | this RTL at default parameters | published figure |
|---|---|---|
| frame rate, 1280×720 | 41.65 fps at 50 MHz | 42 fps |
| cycles per key-point, scale 1 / 2 / 3 | 2053 / 3229 / 4965 | ≈2000 / 3100 / 4900 |
| key-points per frame, scale 1 / 2 / 3 | 1169 / 743 / 483 | 1148 / 743 / 468 |
| working memory | 12.04 Mbit (11.48 Mibit) | 11.46 Mbit |

Key-points per frame is the number of feature-clock cycles per frame
(2 × 1,200,512) divided by the cycles per key-point. The gradient buffers are
10.6 Mbit of the 12.04 Mbit total.

## Where this RTL departs from the published design

The overall architecture, word lengths, window sizes, bar counts, thresholds
and clocks follow the published accelerator. The following are choices of this
implementation:

* **Window sizes and weights.** The orientation and descriptor window radii
  and the weighting sigmas (1.5σ and 6σ) follow common SIFT software
  practice.
* **Descriptor simplifications.** Accumulation is nearest-bin, with no
  trilinear interpolation and no 0.2 clamp before renormalisation.
* **Orientation simplifications.** There is one main orientation per
  key-point, at the centre of the largest bin, with no smoothing, no peak
  interpolation and no secondary peaks.
* **Sub-pixel refinement** is only the per-axis offset described above.
* **Border handling.** Blanking and flush rows, mirroring at image borders
  and the CORDIC are this design's ways of realising behaviour that the
  architecture needs but does not specify.
* **Key-point queues** are split per octave, and the readiness rule and the
  overwrite threshold of four rows are this implementation's.
* **Pipeline depths and latencies** are this implementation's, and so is the
  priority order in the buffer controller.
* **FIFO depths** are this implementation's: key-point 2×32, MOG 2, LDG 4,
  orientation 4, scale 3 one 1280-pixel buffer.
* **Timing.** Descriptor time per key-point is 1–5 % above the published
  approximate cycle counts. The frame budget still covers the published
  key-point capacity at every scale, with no margin at scale 2 (743 against
  743).

## Files

`rtl/` holds one module or package per file:

| file | contents |
|---|---|
| `sift_pkg.sv` | formats, constants, types, elaboration-time tables |
| `sift_top.sv` | top level: both components, reset synchronisers, counters |
| `octave_scheduler.sv` | 2:1 octave-interleaved beat stream |
| `ram_bar_cluster.sv` | cyclic row buffer with octave banks and rotation |
| `gauss_sym_filter.sv` | one 1-D symmetric Gaussian filter |
| `gaussian_dog.sv` | six Gaussian images and five DoGs |
| `sync_fifo.sv` | show-ahead FIFO (helper) |
| `scale3_fifo.sv` | down-sampling of L3 into the second-octave FIFO |
| `kp_detect.sv` | extremum, contrast, edge and border tests |
| `cordic_vec.sv` | vectoring CORDIC (helper) |
| `grad_compute.sv` | gradients of L1..L3 |
| `grad_buffer.sv` | dual-clock gradient row buffer with two read ports |
| `async_fifo.sv` | dual-clock FIFO with Gray pointers |
| `gray_sync.sv` | counter clock-domain crossing (helper) |
| `fg_buffer_ctrl.sv` | readiness / overwrite / dispatch decision |
| `win_scanner.sv` | window address generator (helper) |
| `mog.sv` | main orientation |
| `ldg.sv` | descriptor and normalisation |
| `fg_unit.sv` | one feature-generation unit per scale |

`tb/` has one self-checking testbench per block, `tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* **Blocks with exact reference models.** The `gaussian_dog`,
  `grad_compute`, `mog`, `ldg` and `fg_unit` testbenches carry independent
  fixed-point models of their block and compare bit for bit, or within 1 LSB.
* **`tb_sift_top`** runs three 96×64 frames end to end and checks every
  descriptor. It also counts each mechanism and fails if one never occurs:
  second-octave rows, back-pressure, key-points at every scale and octave,
  MOG/LDG overlap, skipped and waiting key-points.
* **`tb_sift_full`** runs one full 1280×720 frame with all parameters at their
  defaults. It checks the frame period of 1,200,512 cycles and that every
  key-point is accounted for.

## Simulating

Everything simulates with plain Verilator 5. From the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --assert -Wno-fatal -Irtl rtl/sift_pkg.sv tb/tb_sift_top.sv \
          -y rtl -y tb --top-module tb_sift_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_sift_top` by any other testbench name. The block testbenches take
seconds. `tb_sift_top` takes about 15 s, and `tb_sift_full` takes a few
minutes.

The testbenches drive a falling reset edge at 1 ns, so they also pass when
Verilator starts every variable at a random value
(`--x-initial unique` with `+verilator+rand+reset+2`).

To change the image size, set `IMG_W` and `IMG_H` on `sift_top`. Keep IMG_W a
multiple of 4; the testbenches use sizes from 40×30 up. The gradient-buffer heights
follow from σ in `sift_pkg` and do not depend on the image size.
