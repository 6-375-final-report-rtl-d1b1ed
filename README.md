# Power-aware depth processing for a wearable navigation aid

A wearable guide for visually impaired users looks ahead with a
time-of-flight (ToF) depth camera and warns about obstacles. The camera is
the main power drain: its illumination LEDs and its frame rate each cost
watts. This RTL does the per-pixel work in hardware. It also computes three
cheap signals that let a controller lower frame rate and illumination when
the scene allows:

| engine | input | output, per frame | used for |
|---|---|---|---|
| `point_cloud` | phase pixels | one (X, Y, Z) point per pixel | the navigation map |
| `scene_differencing` | phase pixels | SkipFrame: this frame barely differs from the last | frame-rate control |
| `scene_statistics` | phase + confidence pixels | illumination step −1 / 0 / +1 | LED power control |
| `step_rate` | IMU vertical acceleration | the wearer's step frequency (Hz) | gain of the frame-rate loop |

The camera is an 80×60 (QQQVGA) sensor. Each pixel carries a 12-bit
*phase*, which encodes distance as a fraction of the sensor's unambiguous
range, and a 12-bit *confidence*. The control loop that uses these outputs
is host software and is not included. In the reference system, that host
keeps a three-second moving average of the illumination steps. It also
updates the frame rate as
`rate += (k + q·StepRate)·(desired − mean skip rate)`.

The structure follows a published class-project design (MIT 6.375, "Hardware
Acceleration for Power Intelligent Wearable Navigation Systems"). That design
was written in Bluespec for a Zynq FPGA. This is an independent SystemVerilog
version of it. Where the original leaves a constant or a detail open, a
choice was made here. Every such choice is listed under
[Departures and choices](#departures-and-choices).

## Conventions shared by all blocks

* Every stream is valid/ready. A transfer happens on a clock edge where both
  are high. Reset is synchronous and active low (`rst_n`).
* Pixels arrive **column-major**: `y` (0..59) runs fastest, then `x`
  (0..79). Pixel `p` of a frame sits at `x = p / 60`, `y = p % 60`. There is
  no frame-start signal. Each block counts pixels, so the stream must start
  on a frame boundary after reset.
* Number formats are in `rtl/nav_pkg.sv`:

  | type | format |
  |---|---|
  | phase, confidence | unsigned 12 bits |
  | IMU sample (`motion_t`) | signed Q16.16, in g |
  | FFT data (`complex_t`) | signed Q16.16 re/im |
  | coordinates (`coord_t`) | signed Q8.16 metres |
  | step rate | signed Q8.16 Hz |
  | illumination step | signed 2 bits: −1, 0, +1 |

* Phase to distance: `d = RANGE_M · phase / 4096`. `RANGE_M` is the
  unambiguous range and is 2.5 m by default. It is a parameter of the point
  cloud, and the bin scale of the scene statistics depends on it.

## Top level: `nav_accel_top`

The top broadcasts the camera pixel stream to the three camera engines.
`pix_ready` is the AND of their three readies. Each engine sees `valid` only
when the other two are also ready. This keeps all three on the same pixel
count, and so on the same frame boundary. The IMU stream feeds `step_rate`
alone. Each engine has its own output stream, so a slow consumer of one
result stalls the shared pixel input only once that engine's queues fill.

At 60 MHz, every camera engine takes one pixel per cycle. An 80×60 frame
therefore takes about 4800 cycles, or about 12,500 frames/s. That is three
times the sensor's 4000 frames/s maximum.

## Point cloud (`point_cloud`, `pc_coord_rom`)

The pinhole transform of a pixel at (x, y) with measured distance D, taking
the focal length as 1, is:

```
u = (x − W/2)·tan(FOVx/W)     v = (y − H/2)·tan(FOVy/H)
X = D / sqrt(1 + u² + v²)     Y = X·u     Z = X·v
```

Everything except D depends only on the pixel position, and the magnitudes
are the same in all four quadrants. The block keeps a table for one quadrant
only. The table has (W/2+1)·(H/2+1) = 41·31 entries, and each entry holds
X, Y and Z for a phase of 1.0 (D = `RANGE_M`). The table is computed at
elaboration by a constant function that uses `$sqrt` and `$tan`. No data
file is needed. The table is read like a block RAM: one registered read per
cycle.

The block has three stages:

1. **Fetch.** A pixel counter walks (x, y) on its own, without waiting for
   data. It forms `PCIndex = |x−W/2|·31 + |y−H/2|` and reads the table.
   Each entry goes into a 4-deep coordinate FIFO, together with the two
   quadrant sign bits and a last-pixel flag. A credit count stops Fetch from
   overrunning that FIFO. This lets Fetch run ahead of the data.
2. **Scale.** Scale pops one phase and one table entry together. The two
   stay paired only by their order. It computes `(phase · entry) >> 12` for
   each axis, then negates Y when `x < W/2` and Z when `y < H/2`.
3. **Output FIFO.** The result leaves through a 2-deep FIFO, with `out_last`
   on pixel 4799.

Latency is 3 cycles, and throughput is one point per cycle.

## Scene statistics (`scene_statistics`)

This block picks an illumination step from how well lit the *largest*
objects in the scene are. Those are usually the nearest ones.

* **Histogram, one pixel per cycle.** Each pixel goes into a 0.15 m distance
  bin: `bin = (phase·267) >> 16`, which gives 17 bins over 2.5 m. The block
  counts pixels per bin, `H(b)`. It also counts pixels per bin whose
  confidence reaches the threshold `thr(b) = max(300 − 12·b, 0)`; this count
  is `t(b)`.
* **Hand-off.** After 4800 pixels, both count vectors are copied into a
  shadow set and the histogram clears. The next frame can then stream in
  while the previous frame is being voted on. The last pixel of a frame
  waits only if the shadow set is still busy.
* **Search and Vote.** Search scans all bins, one per cycle, for the largest
  bin not yet visited. Ties go to the lower bin. Vote then judges that bin:
  * `4·t ≤ H` (t/H ≤ 0.25): too dark, so +1 to Vp.
  * `4·t ≥ 3·H` (t/H ≥ 0.75): brighter than needed, so +1 to Vd.
  * Otherwise: no vote.

  The bin's pixels are added to a "covered" count. The loop stops when the
  covered pixels reach M = 50 % of the frame, when all bins have been
  visited, or when the largest remaining bin is empty. The result is
  `sign(W1·Vp − W2·Vd)`. Worst case, the loop takes 17·18 cycles, which is
  well inside the next frame's 4800.

## Scene differencing (`scene_differencing`)

SkipFrame is set when `Σ |G(frame_i) − G(frame_{i−1})| < G_SKIP`. Here G is
a K×K Gaussian blur, used so that sensor noise does not count as change.
The hard part is doing a 2-D convolution on a column-major pixel stream
without storing the whole frame. The block therefore works on whole columns:

```
pixels -> Chunker -> Rolling Window (K columns) -> Convolve -> Gaussian Column
                                                                  |
                      previous-frame column RAM (80 x 720 bits) --+-> Compare -> Accumulate -> SkipFrame
                                       ^--------------- Store ----+
```

* **Chunker.** Collects 60 pixels into a column. The pixel that completes a
  column is merged in on the fly, and the column goes into a two-column
  queue. The next column can start filling at once. The queue absorbs the
  extra column of filtering at each frame edge, so the input never stalls.
* **Rolling Window.** Holds K column registers, each with a valid flag. The
  filter is always centred on the middle column. A new column shifts in,
  and the oldest drops out, on the cycle the centre column's last output is
  computed.
* **Frame edges.** These come from the valid flags:
  * At the start of a frame, the centre column is invalid, so the shift
    costs one cycle and produces nothing.
  * After the last column, K/2 invalid columns are shifted in. This filters
    the right edge against zeros and stops the next frame's first columns
    from acting as neighbours.
  * Rows outside 0..59 are also zero.
* **Convolve.** One output per cycle, walking down the centre column. The
  weights are binomial, `C(K−1,i)·C(K−1,j) / 2^(2(K−1))`, which is
  [1 2 1]ᵀ[1 2 1]/16 for the default K = 3.
* **Compare and Store.** On a column's last convolution cycle, the same
  column of the previous frame is read from the column-wide RAM. On the next
  cycle, the 60 absolute differences are summed into a column Delta, and the
  new column is written back to the same address.
* **Accumulate.** Adds the Deltas of a frame's 80 columns and compares the
  total with `G_SKIP` (default 76,800, about 16 phase codes per pixel).
  The first frame after reset produces no flag, because there is nothing to
  compare it with.

Each column takes 60 cycles, so a frame streams in exactly 4800 cycles. The
flag appears about 132 cycles after the frame's last pixel (for K = 3), because
the last two columns are still being filtered then. The whole pipeline holds
while the 3-deep output queue has fewer than two free slots.

## Step rate (`step_rate`, `fft_superfolded`, `cordic_mag`)

Footsteps show up as a periodic component in vertical acceleration. The block
finds that component's frequency.

* **Chunker.** Samples, nominally 20 Hz, go into a circular history of 128
  samples. Once the history is full, and then after every 64 new samples
  (50 % overlap), the last 128 samples are streamed into the FFT, oldest
  first. Input is held off while a frame streams in.
* **Superfolded FFT.** A 128-point radix-2 FFT with **one** butterfly, using
  the constant-geometry (Pease) ordering:
  * In cycle j of stage s, the butterfly reads `x[j]` and `x[j+64]` and
    writes `x[2j] = a+b` and `x[2j+1] = (a−b)·W^k`, where `k = (j>>s)<<s`.
  * Two register banks swap roles every stage. Every stage uses the same
    addressing, so the control is one counter.
  * The butterfly is pipelined in two steps. Step one reads, adds and
    subtracts, and looks up the twiddle. Step two multiplies and writes
    back one cycle later. Stages still run back to back: stage s+1 first
    reads a word written by stage s at least 32 cycles before.
  * After 7 stages (448 issue cycles plus 1 to drain), the result is in bit-reversed order. The
    unload port reorders it to natural bin order.
  * Data stay Q16.16 with no scaling between stages. The 7 stages can grow
    values by up to 128×, so |input| must stay below 256.
  * Twiddles are Q2.16 values computed at elaboration.
* **CORDIC.** Bins 0..63 pass through a 16-stage pipelined vectoring CORDIC
  that outputs magnitudes. The gain is corrected with ×0.60725.
* **Find Peak.** Takes the largest magnitude among bins 1..63. Bin 0 is
  skipped because it holds gravity. The output is
  `bin · 20/128 Hz = bin · 0.15625 Hz` in Q8.16.

A result appears about 660 cycles after the last sample of its window.

## Departures and choices

These points follow the reference design: the block structure, the stream
order, the data widths, the 0.15 m bins, the vote ratios, the quadrant
table, the column-wise Gaussian pipeline, the 128-point 50 %-overlap FFT
with a single butterfly, and the CORDIC.

The following are choices made here, and are all parameters unless noted:

* Field of view 74°×59°, and an unambiguous range of 2.5 m (phase
  4096 = 2.5 m).
* The focal length is taken as 1. This is the only value for which the
  three transform equations agree with each other.
* The confidence threshold function, M = 50 %, and the weights W1 = W2 = 1.
* Vote sign convention: too-dark bins vote "up".
* The kernel width, K = 3, with binomial weights.
* `G_SKIP = 76800`.
* The sample rate is 20 Hz. The reference gives both 20 Hz and 64 samples/s.
  Either way, frames are 128 points.
* Step rate uses Q8.16. The reference lists both Q8.16 and Q16.16.
* Distance binning uses a constant reciprocal multiply, not a divider. The
  bin width is fixed.
* The lookup table is computed at elaboration instead of being loaded from
  a file.
* FIFO depths, the FFT's ping-pong register banks, and the non-overlapped
  load/compute/unload of the FFT.

Some of the `nav_accel_top` output bits are constant by construction:
* The high bits of `pc_coord.x` are always 0, because X ≤ 2.5 m and is never
  negative.
* The 11 low bits of the step rate are always 0, because the rate is a
  multiple of 0.15625 Hz.

## Verification

Each block has a self-checking testbench in `tb/`. Each one:
* compares outputs with a reference model computed inside the testbench;
* checks cycle counts;
* has a watchdog;
* ends with `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_point_cloud` | 2 full frames; every point against the floating-point transform (±3 LSB); 4800 points in ≤ 4808 cycles; back-pressure |
| `tb_scene_statistics` | 7 full frames (dark, bright, balanced, random) against a model of histogram/search/vote; result within 5200 cycles of frame start |
| `tb_scene_differencing` | 6 full frames (noise only, new scene, exact copy, local change); SkipFrame against a floating-point Gaussian model; no flag after frame 0; 28,800 pixels in 28,800 cycles; flag latency |
| `tb_fft_superfolded` | 3 frames against a direct DFT (±0.005); compute phase = 449 cycles |
| `tb_cordic_mag` | 300 vectors in all quadrants against `sqrt`; 18-cycle latency; tag order |
| `tb_step_rate` | 5 overlapping windows with a changing step tone; result = DFT-model peak bin; ≤ 700-cycle latency |
| `tb_nav_accel_top` | whole design at default size: 5 frames plus an IMU stream; every output checked; each mechanism must occur (skip / no skip, no first-frame flag, up / down / hold, overlapping step frames, an input stall caused by each of the three camera engines, all quadrant signs) |
| `tb_system_response` | closed loop with a model of the host controller: 14 frames (still, shaken, wall at 0.45 / 0.9 / 2.0 m) plus an IMU tone; SkipFrame exactly on still frames at an unchanged distance; illumination steps from full power down to 0 at the near wall and back to 3 at 2 m; the host frame rate, updated as `rate += (k + q·StepRate)·(0.5 − skip)`, falls while still and rises while shaken, faster than with q = 0; step rate 1.875 Hz |

Run a testbench with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_nav_accel_top -y rtl -y tb +libext+.sv -Irtl \
  rtl/nav_pkg.sv tb/tb_nav_accel_top.sv
./obj_dir/Vtb_nav_accel_top
```

The full-size end-to-end test takes about 29,000 cycles and well under a
second.

What is not covered:
* No FPGA timing closure. The reference reports a 17 ns critical path in
  its FFT, which allows 60 MHz.
* No bit-exact comparison against the reference implementation's software
  model, which is not available.
* Camera data are synthetic.

## Changing the design

* **Frame size.** `WIDTH` and `HEIGHT` on `nav_accel_top` set the frame size
  for all engines. The quadrant table and column RAM resize with them.
  `scene_statistics` takes `FRAME_PIX = WIDTH*HEIGHT`.
* **Optics.** `FOV_X_DEG`, `FOV_Y_DEG` and `RANGE_M` on `point_cloud` set
  the optics. If you change the range, change `BIN_SCALE` in
  `scene_statistics` too: `BIN_SCALE = 65536·RANGE_M/(0.15·4096)`.
* **FFT length.** `FFT_N` (a power of two) sets the FFT length. `SAMPLE_HZ`
  on `step_rate` only scales the reported Hz.
* **Filter and threshold.** `K` (odd) and `G_SKIP` on `scene_differencing`.
