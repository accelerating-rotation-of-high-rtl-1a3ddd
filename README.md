# Hierarchical image rotation engine

Rotating an image by an arbitrary angle means computing, for every pixel,
where it lands: `x' = x cos φ − y sin φ`, `y' = x sin φ + y cos φ`. A
straightforward engine runs a CORDIC rotation per pixel. A 512 × 512 image
then needs 262 144 iterative CORDIC operations, and the CORDIC becomes the
bottleneck. An earlier refinement splits the image into a grid of windows.
It rotates the window centres once, then rotates the pixel offsets of one
window and adds each offset to all centres in parallel. That still costs a
CORDIC per window centre and one per window pixel.

This engine removes almost all of those CORDIC operations. A rotation of
the whole image uses only **H + 2 CORDIC operations**, five for the default
configuration. Everything else is additions:

1. **Hierarchical centres.** The image is split into quadrants, each
   quadrant into quadrants again, and so on, for H layers. A window centre
   is the sum of one quadrant-centre vector per layer. Because rotation is
   linear, its rotated position is the sum of the rotated quadrant-centre
   vectors. Only the layer vectors need rotating, not the 4^H window centres.
2. **Symmetry.** The four quadrant centres of a square layer are `(±d, ±d)`.
   Rotating `(d, d)` to get `(X, Y)` also gives the other three: `(−X, −Y)`,
   `(Y, −X)` and `(−Y, X)`. So one CORDIC per layer is enough. A
   rectangular image (M columns, MY rows, M ≠ MY) has layers with centres
   `(±dx, ±dy)`. There the swap does not hold, so a second CORDIC rotates
   `(dx, −dy)`; the other two centres are the negations of the two results.
   Such an image needs 2H + 2 CORDIC operations.
3. **Pixel order.** Neighbouring pixels differ by one unit. Walking a window
   in raster order, the rotated offset of the next pixel is the previous one
   plus `(cos φ, sin φ)`. The first pixel of the next row is the previous row
   start plus `(−sin φ, cos φ)`. Two CORDIC operations (one for cos/sin and
   one for the first pixel) replace all per-pixel rotations.

The default configuration is a 512 × 512 image and H = 3 layers, giving an
8 × 8 grid of 64 windows, each 64 × 64 pixels. It uses a 12-iteration,
25-bit CORDIC and 64 pairs of 10-bit local adders. The engine delivers the
rotated coordinates of 64 pixels per clock, one pixel from each window. A
full image takes 4297 cycles from `start`.

## Data flow

```
                       angle
                         |
              +----------v-----------+
  start ----->|  rotation_controller |  sequences the five CORDIC operations
              +--+----------------+--+  and the two adder phases
                 | operands       ^ results
              +--v----------------+--+
              |    cordic_engine     |  12 micro-rotations, 1 per clock
              |  (cordic_atan_rom)   |
              +----------------------+
   rep (X,Y) per layer |                    cos, sin, first offset |
   +-------------------v------+                  +-----------------v-----+
   | symmetry_inference_unit  | x H              |   offset_generator    |
   +-------------+------------+                  | 1 vector add / pixel  |
                 | 4 quadrant centres per layer  +-----------+-----------+
   +-------------v------------+                              | offset (valid/ready)
   |    centre_generator      | H-1 adds per centre          |
   +-------------+------------+                              |
                 | write                                     |
   +-------------v------------+   64 centres     +-----------v-----------+
   |      centre_memory       +----------------->|   local_adder_array   |--> 64 rotated
   +--------------------------+   (parallel)     |  64 pairs of adders   |    pixels/clock
                                                 +-----------------------+
```

`rotation_engine` is the top. It contains one instance of each block and
one `symmetry_inference_unit` per layer. `rot_pkg` holds the shared sizes,
the arctan constants and the CORDIC gain constant.

## One rotation, phase by phase

All phases run one after the other. Cycle counts are for the default
configuration with the output never stalled.

| Phase | Work | Cycles |
|---|---|---|
| Layer centres | H CORDIC rotations of `(d_l, d_l)`, with `d_l = M / 2^(l+2)` (128, 64, 32) | 3 × 14 |
| Window centres | 4^H × (H−1) = 128 vector additions, written to the centre memory | 128 + 2 |
| cos/sin | CORDIC rotation of `(1, 0)` | 14 |
| First offset | CORDIC rotation of `(−(WIN−1)/2, −(WIN−1)/2)` = `(−31.5, −31.5)` | 14 |
| Offsets | WIN² = 4096 offsets, one per cycle, each added to all 64 centres | 4096 + 2 |

`out_valid` rises (H+2)(ITER+2) + 4^H·max(H−1,1) + 4 = 202 cycles after
the clock edge that takes `start`. One beat follows per cycle, and the last
beat is taken 4297 cycles after `start`. Each CORDIC operation costs ITER + 2
cycles: a request cycle, 12 iterations and a done cycle.

### Why the centre sum works

Number the windows by grid column `gx` and row `gy`, each H bits, with
`gx = 0` the left column and `gy = 0` the bottom row. At layer `l` (l = 0 is
the outermost) the window lies in the quadrant chosen by bit `H−1−l` of `gx`
(right if 1) and of `gy` (top if 1). Its centre, relative to the image
centre, is `Σ_l (±d_l, ±d_l)` with those signs. For example, window
`gx = 7` has x = 128 + 64 + 32 = 224, and its pixels 448…511 have their
middle at 479.5 − 255.5 = 224. The rotated centre is the same sum over the
rotated quadrant centres. The symmetry units provide those, indexed by
`q = {y_positive, x_positive}`:

| q | quadrant centre | rotated |
|---|---|---|
| 3 | ( d,  d) | ( X,  Y) |
| 1 | ( d, −d) | ( Y, −X) |
| 2 | (−d,  d) | (−Y,  X) |
| 0 | (−d, −d) | (−X, −Y) |

### CORDIC gain

The CORDIC engine does not correct its gain K ≈ 1.6468; its outputs are K
times the rotated vector. Every vector the controller rotates is a
constant, so the controller pre-multiplies each constant by 1/K at
elaboration (`rot_pkg::half_units_times_kinv`). The results come out
unscaled. The angle is the only run-time operand.

## Coordinates and number formats

- **Pixel positions.** Pixel (column c, row r) sits at
  `(c − (M−1)/2, r − (MY−1)/2)`, so pixel centres are half-integers. x
  grows to the right and y grows upwards. Positive angles rotate
  counter-clockwise.
- **Angle.** `angle` is in radians, signed 25 bits with 22 fraction bits. It
  must satisfy |angle| < 1.74 rad (99.9°), the range over which the 12
  micro-rotations converge. No quadrant pre-rotation is built; rotate by
  ±90° outside the engine if needed.
- **CORDIC and offset datapath.** Signed 25 bits: a sign bit, clog2(M) = 9
  integer bits and 15 fraction bits. Every rotated position of the image
  (at most 361.3 pixels from the centre) fits.
- **Centres and local adders.** Signed 10-bit integers. Window centres are
  rounded to nearest when written. Offsets are truncated (floor) when they
  leave the offset generator. The sum `P` is thus the integer part of the
  rotated position, within one pixel. Because pixel centres are
  half-integers, `(out_x + M/2, out_y + MY/2)` is the nearest source pixel.
  It may lie outside 0…M−1 for pixels rotated out of the frame. At 0° every
  output is exactly the pixel's own index minus M/2.

## Accuracy

The output error against exact rotation comes from three sources:

- rounding the centre (0.5 px);
- truncating the offset (0.5 px about the cell middle);
- the CORDIC's residual angle after 12 iterations, at most arctan(2^−11) ≈
  4.9·10⁻⁴ rad. All five CORDIC operations share one angle, so they all
  rotate by the same slightly-off angle, giving under 0.18 px at the image
  corners.

The accumulated rounding error of 63 + 63 offset additions at 15 fraction
bits is about 0.004 px. The testbenches compare `P + 0.5` with the exact
position and allow 1.2 px. Measured over 0° to 45° in 1° steps (all 262 144
pixels each), the mean error per pixel is 0.34 px (at most 0.44 px at any
angle) and the maximum error is 1.10 px. Mapping pixels without any
interpolation needs one-pixel accuracy, and this meets it. Finer
interpolation would need more fraction bits in the local adders.

The 25-bit width matters because the offsets are built from 126 chained
additions. `tb_register_length` sweeps the datapath width at 0° to 45° in
5° steps:

| W (bits) | 12 | 16 | 20 | 25 | 32 |
|---|---|---|---|---|---|
| worst mean error (px) | 14.6 | 1.74 | 0.42 | 0.42 | 0.42 |
| worst max error (px) | 37.2 | 5.25 | 1.43 | 1.08 | 1.08 |
| worst (max x error + max y error) / 2 (px) | 34.9 | 4.59 | 1.35 | 1.08 | 1.08 |

At 20 bits the maximum error exceeds the one-pixel bound. At 25 bits the
remaining error is only from the integer outputs and the CORDIC angle
residue.

## Top-level interface (`rotation_engine`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | begin a rotation; taken only while the controller is idle, so wait for `busy` low |
| `angle` | in | 25 | rotation angle, radians, 22 fraction bits |
| `busy` | out | 1 | rotation in progress or results still pending |
| `done` | out | 1 | pulses with the last beat taken |
| `out_valid`, `out_ready` | out/in | 1 | result stream handshake; the beat holds while `out_ready` is low |
| `out_u`, `out_v` | out | 6 | pixel column/row inside the window |
| `out_x[g]`, `out_y[g]` | out | 64 × 10 | rotated position of pixel (gx·64 + u, gy·64 + v), g = gy·8 + gx |
| `out_last` | out | 1 | last beat (u = v = 63) |

The internal units talk through one-cycle `start`/`done` pulses. The
offsets and results use valid/ready streams. Assertions in
`offset_generator`, `local_adder_array` and `rotation_engine` check the
stream hold rule and that only one unit runs at a time.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `M` | 512 | image width in pixels (power of two) |
| `MY` | `M` | image height in pixels; M ≠ MY selects the rectangular mode |
| `H` | 3 | hierarchy layers (1 or more); 4^H windows of M/2^H × MY/2^H pixels |
| `NITER` | 12 | CORDIC iterations |
| `W` | 25 | CORDIC/offset datapath width |
| `LW` | 10 | centre memory and local adder width; must hold ±0.71·max(M, MY) |

The latency model behind the method favours H = 4 for 512 × 512. That
configuration has 256 local adder pairs and needs 1879 cycles instead of
4297. H = 3 is the default because it keeps the area equal to a 64-adder
window engine. The testbench `tb_resolutions` runs five configurations:
M = 128/H = 3, 256/4, 512/4, 1024/4 and 2048/5, with LW = clog2(M) + 1.
For images beyond 2048 × 2048, the 12-iteration angle residue alone
exceeds one pixel at the corners, so `NITER` and `W` must grow with M
(about log2 M iterations).

## Departures and open points

- **Image shape.** Square by default. With `MY ≠ M` the controller rotates
  two representatives per layer, `(dx, dy)` and `(dx, −dy)`, and the
  symmetry units switch to negation only (`SQUARE = 0`). Which two centres
  are rotated is this design's choice. With a square image the `rep2_*`
  outputs of the controller stay at zero and are unused.
  `tb_rectangular` rotates 512 × 256, 256 × 512, 512 × 384 (H = 3) and
  128 × 64 (H = 2) by 30° and −75°. The maximum error is 1.03 px. The
  cycle counts are 2291, 2291, 3315 and 615.
- **Interpolation.** The engine produces coordinates only. Pixel memory and
  interpolation (nearest neighbour, bilinear, …) are left to the user of
  the stream.
- **Phase scheduling.** The phases are strictly sequential. The cos/sin and
  first-offset rotations could overlap the centre additions, and the local
  adders could compute the centres in parallel. Neither is done.
- **Centres and rounding.** Centres are rounded to nearest rather than
  truncated. This is what makes the output land on the nearest source
  pixel.
- **CORDIC.** The iterations start at i = 0 (45°), so angles up to 99.9°
  converge. The arctan table is a constant ROM, not a register file.
- **Number of local adders.** The area figures of the method can be read
  as either one adder pair per window centre or one per window pixel. This
  design has one pair per centre (64), which is what producing one pixel
  of every window per cycle requires.
- **Design choices.** The fixed-point split of the 25 bits, the pixel
  coordinate convention, the raster walk with a row-start register, the
  handshakes and the reset behaviour are all this design's own.

## Files

`rtl/`: `rot_pkg`, `cordic_atan_rom`, `cordic_engine`,
`symmetry_inference_unit`, `centre_generator`, `centre_memory`,
`offset_generator`, `local_adder_array`, `rotation_controller` and
`rotation_engine` (top).

`tb/`: one self-checking testbench per module (`tb_<module>`) plus:

- `tb_rotation_engine`: default size, six angles, every output checked,
  cycle counts, back-pressure, and counts of every mechanism (CORDIC
  operations, centre additions, quadrant inferences, offset additions, row
  steps, stalls).
- `tb_angle_sweep`: 0° to 45° in 1° steps at the default size, with mean
  and maximum error.
- `tb_resolutions`: the five sizes above.
- `tb_register_length`: the datapath-width sweep.
- `tb_rectangular`: four rectangular image sizes, two angles each.
- `tb_symmetry_rectangular`: the symmetry unit in rectangular mode.
- `rotation_run`: a helper for the four whole-image testbenches above (angles, sizes, widths, rectangular).

Each testbench prints `TB_RESULT checks=N failures=F`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rot_pkg.sv \
    tb/tb_rotation_engine.sv --top-module tb_rotation_engine -o sim
./obj_dir/sim
```

Replace the testbench name to run another test. Each finishes in seconds.
Lint a module with
`verilator --lint-only -Wall -Irtl rtl/rot_pkg.sv rtl/<module>.sv`. The
remaining lint warnings are about unused package constants, unused high
bits in the rounding helpers, and `rst_n` being used both as an
asynchronous reset and in assertion `disable iff` clauses.
