# Pipelined steerable Gaussian smoother

A Gaussian smoothing filter turned to an arbitrary direction is, in general,
not separable, so a direct 2-D implementation needs one full N x N
convolution per direction. This design uses the steerable decomposition
instead. A directional Gaussian equals an isotropic Gaussian followed by a
1-D Gaussian along the direction of interest. The isotropic part is
separable, so it becomes two 1-D passes, one vertical and one horizontal.
Those two passes do not depend on the direction, so they run once per image.
Only the third, short 1-D pass is repeated for each direction.

The RTL implements the design published as *FPGA Implementation of
Pipelined Steerable Gaussian Smoothing Filter*, at its main configuration:

- a 48 x 48 input image;
- a 9 x 9 isotropic Gaussian, built as a vertical 9 x 1 pass and a
  horizontal 1 x 9 pass;
- 7-tap directional passes. By default there are two, horizontal (1 x 7)
  and vertical (7 x 1).

Pixel formats, weights, border rules and handshakes were not specified by
that description. The choices made here are listed in
[Own choices and departures](#own-choices-and-departures).

## Data flow

```
 load port ──► image_bram 48x48 ──9 pixels of one column per clock──┐
                                                                   ▼
                                          gauss_conv1d (vertical 9x1)
                                                   │ one column result per clock
                                                   ▼
                                   hconv_delay: D─D─D─D─D─D─D─D─D  (9 registers)
                                                │ all 9 register outputs
                                                ▼
                                   gauss_conv1d (horizontal 1x9)
                                                │ iso_* stream, 40x40 pixels
                                                ▼
                                   iso_ram 40x40 (7 read ports per direction)
                                      │                         │
                                      ▼                         ▼
                             dir_conv #0 (1x7)         dir_conv #1 (7x1)   ...NDIR units
                                      │                         │
                                      └──────► out_pix[0], out_pix[1] ─► out_* stream
```

Two `raster_scan` generators drive the frame. One scans the input columns
for the separable stage. The other starts when that stage has written its
last pixel, and scans the smoothed image for the directional stage.

## Separable stage: vertical and horizontal passes at once

The structure that matters most here is how the two isotropic passes share
one stream.

1. **Column reads.** Each clock, `image_bram` returns nine vertically
   adjacent pixels (x, y) … (x, y+8). For output row y the scan reads
   columns x = 0 … 47 in order, one per clock.
2. **Vertical 9 x 1 pass.** A `gauss_conv1d` weights the column and adds
   it up, giving one vertical result per clock, left to right.
3. **Delay line.** The results are pushed into a chain of nine registers
   (`hconv_delay`). When column x has been pushed, the chain holds the
   vertical results of columns x-8 … x of the same row. Those are exactly
   the taps of the horizontal 1 x 9 pass for output column x-8.
4. **Horizontal 1 x 9 pass.** A second `gauss_conv1d` produces that output.
   No line buffer of vertical results is needed: the horizontal pass runs
   only nine clocks behind the vertical one.

The first eight columns of each row only fill the chain, so a row of 48
input columns gives 40 outputs. Likewise 40 output rows use all 48 input
rows. The smoothed image is therefore 40 x 40, and only pixels whose whole
9 x 9 window lies inside the image are produced. Each output carries its
coordinates (`iso_x`, `iso_y`), so a consumer never has to count clocks.

The chain refills at the start of every row. Between rows the scan does not
stall: the first eight pushes of a row simply produce no output. Input
clocks with `in_valid` low may occur anywhere, and the chain just waits.

## Directional stage: steering by address

For a centre pixel (x, y), unit *i* reads seven pixels of the smoothed image
on a line:

    (x + r*s*dx_i, y + r*s*dy_i),   r = -3 … 3

- (dx, dy) is the unit's direction step. (1,0) is horizontal, (0,1)
  vertical, and (1,1) and (1,-1) are the two diagonals.
- s is the decimation factor `decim`, from 1 to 3 (0 is taken as 1). The
  first two passes have already smoothed the image, so it can be
  subsampled without much aliasing. With factor s the directional stage
  computes only the centres on an s-pixel grid: (0,0), (s,0), (2s,0) and
  so on. Its taps are s pixels apart, which means adjacent in the
  subsampled image. The directional work falls by s², to 20 x 20 centres
  at s = 2 and 14 x 14 at s = 3, with the same seven multipliers per
  direction. `out_x`/`out_y` give each centre's position in the
  full-resolution 40 x 40 smoothed image.
- A tap position outside the 40 x 40 image is clamped to the nearest edge
  pixel. Every centre on the grid therefore gets an output.

The steering is purely a matter of addresses. The tap addresses go
combinationally to seven read ports of `iso_ram`, and the data return one
clock later into the same multiply-add unit used by the other passes. All
units see the same centre on the same clock, so their outputs arrive
together on one `out_*` stream. The directions and the decimation are sampled
when `start` is accepted and held for the whole frame.

## Arithmetic

All three passes use `gauss_conv1d`. It has one multiplier per tap and
computes `(Σ w_k·p_k + 2^(S-1)) >> S`. The result saturates at 255 if the
weights are changed to sum above 2^S. The weights are binomial coefficients,
the standard integer approximation of a sampled Gaussian:

| pass | taps | weights | sum | S | σ (pixels) |
|---|---|---|---|---|---|
| vertical, horizontal | 9 | 1 8 28 56 70 56 28 8 1 | 256 | 8 | √2 |
| directional | 7 | 1 6 15 20 15 6 1 | 64 | 6 | √1.5 |

The weights sum to a power of two, so normalisation is a shift, and a flat
image stays flat exactly. Each pass rounds back to 8 bits. To use other
weights, override `COEF` and `SHIFT` on the instances, or change `G9` and
`G7` in `steer_pkg`.

## Interface and operation (`steer_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `ld_we`, `ld_x`, `ld_y`, `ld_data` | in | 1, 6, 6, 8 | write one pixel of the input image |
| `start` | in | 1 | one-clock pulse; ignored while `busy` |
| `dir` | in | NDIR × {dx, dy} (2-bit signed each) | direction step per unit, sampled at start |
| `decim` | in | 2 | decimation factor (tap spacing and centre grid), sampled at start |
| `busy`, `done` | out | 1 | frame in progress; pulse with the last result |
| `iso_valid`, `iso_x`, `iso_y`, `iso_pix` | out | 1, 6, 6, 8 | smoothed (isotropic) image stream |
| `out_valid`, `out_x`, `out_y`, `out_pix` | out | 1, 6, 6, NDIR×8 | directional results, one per unit |

To run a frame:

1. Load the image (2304 writes).
2. Set `dir` and `decim`, and pulse `start`.
3. Collect `iso_*` and then `out_*`.
4. Wait for `done`.

The image stays in memory, so a second frame with other directions only
needs another `start`. After reset the directions are (1,0) for even units
and (0,1) for odd units, with decimation 1.

Timing at the default size, counted in rising edges after the edge that
accepts `start`:

| event | edge |
|---|---|
| first smoothed pixel | 15 |
| last smoothed pixel | 40·48 + 6 = 1926 |
| first directional result | 1930 |
| `done` (last directional result) | 1926 + n² + 3, with n = ⌈40/s⌉ |

Latencies of the blocks:

| block | latency |
|---|---|
| `image_bram` read | 1 clock |
| `gauss_conv1d` | 2 clocks |
| `hconv_delay` | 3 clocks |
| `dir_conv` | 3 clocks, including the memory read |

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `steer_top` | `IMG_W_P`, `IMG_H_P` | 48, 48 | input image size; the smoothed image is 8 smaller in each dimension |
| `steer_top` | `NDIR` | 2 | number of directional units working in parallel |
| `gauss_conv1d`, `hconv_delay`, `dir_conv` | `N`, `COEF`, `SHIFT` | 9 or 7 taps, binomial | kernel |
| `image_bram` | `NRD` | 9 | column window height |
| `iso_ram` | `NRD` | 14 | read ports (7 per directional unit) |

The coordinate ports of the top are `$clog2` of the image sizes wide.

## Own choices and departures

The following follow the original description:

- the three-pass decomposition;
- the image and kernel sizes;
- the image block RAM feeding nine pixels to a vertical 9 x 1 pass;
- the register delay line feeding the horizontal 1 x 9 pass;
- storing the smoothed image and running the 1 x 7 and 7 x 1 directional
  passes on it after the first two passes;
- multiply-then-add arithmetic;
- direction-dependent pixel access scaled by a decimation factor.

The following are this implementation's choices:

- **Pixel format and weights.** The pixels are 8-bit unsigned. The weights
  are binomial, with rounding after every pass. The original names no σ
  and no fixed-point format.
- **Image loading.** The original initialises the image block RAM at FPGA
  configuration. Here a write port loads it.
- **Borders.** The separable stage produces only fully covered pixels. The
  directional stage clamps tap positions to the edge.
- **Directions.** Directions are integer steps from {-1, 0, 1}, which
  covers 0°, 45°, 90° and 135°. Other angles would need interpolation
  between pixels, which was not described, and is not built.
- **Decimation.** The original says a downsampling factor cuts the
  number of operations, and that pixels are accessed according to the
  decimation factor. Here one factor sets both the spacing of the taps
  and the grid of computed centres. The original gives no value for it.
- **Stage overlap.** The directional stage starts only after the whole
  smoothed image is stored. A next frame's separable stage is not
  overlapped with the current directional stage.
- **Memory read ports.** Read ports are written directly: nine on the image
  memory and seven per unit on the smoothed-image memory. A synthesiser
  replicates the memories to build them. Banking the image memory by row
  mod 9 would give the same behaviour with single-port banks.
- **Resources.** The published implementation reports 5 block RAMs and
  15 DSP multipliers on a Virtex-5. This RTL has one multiplier per tap:
  9 + 9 + 7·NDIR = 32 at the default. It does not attempt to match the
  published resource counts.

## Verification

Each block has a self-checking testbench in `tb/`. Each one computes
expected values itself, from its own binomial weights and clamping rules,
and ends by printing `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_gauss_conv1d` | random, flat and impulse windows; value, tag, 2-clock latency |
| `tb_image_bram` | full load; random column windows, including ones past the bottom row |
| `tb_raster_scan` | every coordinate for steps 0–3, `last`, duration, `start` ignored while busy |
| `tb_iso_ram` | 14 ports read at random; write followed by read on the next clock |
| `tb_hconv_delay` | 12 rows with idle gaps; 40 outputs per row, coordinates, 3-clock latency |
| `tb_dir_conv` | every centre of a 40 x 40 image for 4 directions and tap spacings 1–3; border clamping |
| `tb_steer_top` | 3 complete frames at the default size (see below) |

The four frames of `tb_steer_top` are:

1. horizontal and vertical directions, decimation 1;
2. both diagonals, decimation 2;
3. a new image, with the directions swapped, decimation 3, and a `start`
   that arrives while busy and must be ignored;
4. the horizontal and anti-diagonal directions with `decim` driven as 0,
   which must give the decimation-1 result.

For each frame it checks:

- every smoothed pixel and every directional result;
- the stage edges 15 and 1926, and the `done` edge, which is 3529, 2329
  or 2125 depending on the decimation.

It also counts how often each mechanism occurred:

- loads;
- stage runs;
- clamped outputs;
- direction and decimation switches;
- downsampled frames;
- ignored starts.

It fails if any count is zero. It runs the top with no parameter overrides.

Running a testbench with Verilator 5, for example the end-to-end one:

```
verilator --binary --timing --assert -Irtl rtl/steer_pkg.sv rtl/*.sv \
          tb/tb_steer_top.sv --top-module tb_steer_top -o sim
./obj_dir/sim
```

For a block testbench, list `rtl/steer_pkg.sv`, the block's file,
`rtl/gauss_conv1d.sv` where it is used, and `tb/tb_<block>.sv`. The
testbenches use `$urandom` and are two-state safe: everything they read is
reset or written first. `steer_top` carries two assertions:

- the directional units stay in lockstep;
- the two stages never scan at the same time.

## Files

| file | contents |
|---|---|
| `rtl/steer_pkg.sv` | pixel and weight types, sizes, kernels `G9`/`G7`, direction type `dir_t` |
| `rtl/gauss_conv1d.sv` | N-tap multiply-add with rounding (all three passes) |
| `rtl/image_bram.sv` | input image memory with a 9-pixel column read |
| `rtl/hconv_delay.sv` | delay line and horizontal 1 x 9 pass |
| `rtl/raster_scan.sv` | start/busy/last coordinate generator with a grid step |
| `rtl/iso_ram.sv` | smoothed-image memory with many read ports |
| `rtl/dir_conv.sv` | directional 1 x 7 pass with tap spacing and border clamping |
| `rtl/steer_top.sv` | the complete filter |
| `tb/tb_*.sv` | one self-checking testbench per module |
