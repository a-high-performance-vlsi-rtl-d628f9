# Two-engine half-pel / quarter-pel interpolator for H.264 fractional motion estimation

Motion estimation in H.264 searches for a block's best match at fractional positions,
not only at whole pixels. Positions half a pixel apart are made with a six-tap FIR filter.
Positions a quarter pixel apart are the mean of two neighbouring whole- or half-pixel
samples. This RTL does that interpolation in two engines:

* **Engine I** takes a small reference frame (10 × 10 pixels by default) and builds its
  complete half-pel grid. It then derives the quarter-pel samples of one 4 × 4 block.
  That gives a 16 × 16 image sampled every quarter pixel.
* **Engine II** treats that 16 × 16 quarter-pel image as a frame of its own and repeats
  both steps on it. The result is a further refinement between the quarter-pel
  positions that engine I found.

Everything is synchronous to one clock. Reset is synchronous and active high. All
memories are plain arrays that map onto block RAM.

## Structure

```
                 fractional_me (top)
  ┌─────────────────────── fractional_me_e1 (engine I) ───────────────────────┐
  │ wr_* ─► c1 input_data_mem ─► c2 half_pel_interpolation ─► c3 qpel_interp. │─► qpo_rd_data
  │          128 x 8             10x10 -> 20x20 grid            16x16 out      │   done_qpel
  └──────────────────────────────────────────────────────────────┬───────────┘
                                                                 │ second read port (hpel16_*)
            c4 half_pel_interpolation (16x16 -> 32x32) ◄─────────┘
                      │
            c5 qpel_interpolation (16x16 out) ─────────────────────────────────► qpo_rd_data_e4
                                                                                 done_qpel_e4
```

Each stage starts on the previous stage's one-cycle completion pulse, so a single
`start` runs the whole chain. The half-pel and quarter-pel modules are each written
once and used twice, with different parameters.

| file | role |
|---|---|
| `rtl/fme_pkg.sv` | pixel type; clip, round-and-shift, average and clamp helpers |
| `rtl/six_tap_filter.sv` | combinational `e - 5f + 20g + 20h - 5i + j` |
| `rtl/input_data_mem.sv` | frame store (`c1`), 128 × 8, synchronous read |
| `rtl/half_pel_interpolation.sv` | half-pel grid of a W × H frame (`c2`, `c4`) |
| `rtl/qpel_interpolation.sv` | quarter-pel grid of one 4 × 4 block (`c3`, `c5`) |
| `rtl/fractional_me_e1.sv` | engine I: `c1`, `c2`, `c3` |
| `rtl/fractional_me.sv` | top: engine I, then `c4`, `c5` |

## The half-pel grid

For a W × H frame `P`, the half-pel stage writes a 2W × 2H grid in raster order
(address = row · 2W + column). The four grid positions at `(2y+v, 2x+u)` are:

| (v,u) | name | value |
|---|---|---|
| (0,0) | G | `P[y][x]`, the integer pixel |
| (0,1) | b | `clip((b1 + 16) >> 5)`, with `b1 = tap6(P[y][x-2 .. x+3])` |
| (1,0) | h | `clip((tap6(P[y-2 .. y+3][x]) + 16) >> 5)` |
| (1,1) | j | `clip((tap6(b1[y-2 .. y+3][x]) + 512) >> 10)` |

`tap6` is the filter (1, −5, 20, 20, −5, 1) and `clip` limits to 0…255. The centre
sample `j` is filtered from the *unrounded* horizontal results `b1`, as H.264 requires.
That is why the stage keeps a 16-bit `b1` for every integer position. Any filter tap that
falls outside the frame uses the nearest edge pixel.

The stage works in three passes, one sample per clock:

1. **Load.** Copy the frame from the frame store into a pixel register file.
   This takes W·H + 2 cycles because of the one-cycle read latency.
2. **Row pass.** Compute and store `b1` for every integer position (W·H cycles).
3. **Grid pass.** Write the 4·W·H grid samples. Three filter instances are
   multiplexed onto the current position: row taps for `b1`, column taps for `h`, and
   column taps over `b1` for `j`.

From `start` to `done` takes **6·W·H + 3 cycles**: 603 for 10 × 10 and 1539 for 16 × 16.

## The quarter-pel grid

The quarter-pel stage refines one BS × BS block (BS = 4) whose top-left integer pixel
is `(BX, BY)`. First it copies the (2·BS+1)² = 81 half-grid samples around the block
into a window register file. Then it writes the 4·BS × 4·BS = 16 × 16 quarter samples
(address = qy · 16 + qx). With `(r, c) = (qy >> 1, qx >> 1)` the window position:

* **qy and qx both even:** copy `win[r][c]`, which is an integer or half sample.
* **Exactly one of them odd:** take the mean of the two window samples on either side
  along that axis.
* **Both odd (diagonal):** average two corners of the half-grid cell `(r..r+1, c..c+1)`.
  Use only the two corners that are `b`- or `h`-type samples, meaning exactly one of
  their grid coordinates is odd. Never use the integer corner or the `j` corner. That
  gives the anti-diagonal when `r + c` is even and the main diagonal when it is odd.
  This is the H.264 rule for the positions called e, g, p and r.

Means round halves up: `(a + b + 1) >> 1`. From `done` (the stage's start input) to
`done_qpel` takes 81 + 3 + 256 = **340 cycles**.

By default the block is the centre of the frame: `(3, 3)` in the 10 × 10 frame and
`(6, 6)` in engine II's 16 × 16 frame. Every filter tap of such a block lies inside the
frame, so edge clamping changes nothing in the final outputs. It only affects the rim
of the half-pel grid.

## Interface and timing of the top

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | clock; synchronous active-high reset |
| `wr_enb`, `wr_addr`, `wr_data` | in | 1, 7, 8 | write one pixel of the frame, address y·W + x |
| `start` | in | 1 | one-cycle pulse; ignored while the first half-pel stage is busy. Pulse it again only after `done_qpel_e4` |
| `qpo_rd_addr` → `qpo_rd_data` | in/out | 8/8 | engine I result, one cycle read latency |
| `qpo_rd_addr_e4` → `qpo_rd_data_e4` | in/out | 8/8 | engine II result, one cycle read latency |
| `done_qpel` | out | 1 | pulse: engine I result is ready (943 cycles after `start`) |
| `done_qpel_e4` | out | 1 | pulse: engine II result is ready (2822 cycles after `start`) |

A typical sequence is:

1. Write the 100 pixels.
2. Pulse `start`.
3. Wait for `done_qpel` (or `done_qpel_e4`).
4. Read the 256 output samples.

The output RAMs keep their contents until the next run overwrites them. The frame store
keeps its contents too, so `start` can be pulsed again without rewriting the frame.

Parameters of `fractional_me` are:

* `W`, `H`: frame size, default 10.
* `MEM_DEPTH`: frame store depth, default 128.
* `BS`: block size, default 4.
* `BX`, `BY`: engine I block position, default the centre.
* `BX2`, `BY2`: engine II block position, default the centre of the 16 × 16 image.

Elaboration stops with an error if the frame does not fit the store or a block window
leaves its grid.

## What is taken from the source design, and what is not

Taken from the source design:

* The two-engine arrangement.
* The five blocks, their names, their port names and the top-level port widths.
  The top-level widths agree with the I/O counts of the FPGA builds: 36 pins for
  engine I and 53 for engine II.
* The 16 × 16 size of engine II's half-pel stage.
* The 4 × 4 block granularity.
* The use of a six-tap filter for half pels and simple averaging for quarter pels.

Filled in from the H.264 standard:

* The filter taps.
* The rounding shifts, the clipping, and the order of filtering for `j`.
* Which samples are averaged on diagonal positions.

This design's own choices:

* The 10 × 10 frame size, taken from the size of the demonstration images.
* The synchronous-read memories.
* The sequential one-sample-per-clock schedule, and therefore every cycle count above.
* The grid address maps.
* Edge clamping.
* The choice of the centre block.
* Making engine I a sub-module rather than placing the five blocks flat.

Known departures and limits:

* The demonstration output images of the source design are drawn as 10 × 10. The 8-bit
  output address admits 256 samples, so this design produces the full 16 × 16
  quarter-pel grid of the block.
* No motion search is included. There is no SAD (sum of absolute differences)
  computation and no choice of best vector. The block to refine is a parameter, not an
  input chosen by a search.
* Clock rate and FPGA resource use have not been measured. The source design reports
  200 MHz on a Spartan-6. Here the longest path is in the half-pel grid pass: six stored
  `b1` values are selected through wide multiplexers, filtered, rounded and clipped in
  one cycle. Reaching that rate may need pipelining.

## Verification

Each module has a self-checking testbench in `tb/`. Expected values come from
`tb/fme_ref_pkg.sv`, a separate model written from the standard's definitions. It uses
explicit multiplications, and looks quarter samples up in the standard's table of named
positions (a, b, c, d, e, f, g, h, i, j, k, n, p, q, r) instead of using the parity rule
above.

| testbench | what it checks |
|---|---|
| `tb_six_tap_filter` | 2006 input sets, including worst-case `b1` ranges |
| `tb_input_data_mem` | full write and read-back; read during write; write disabled |
| `tb_half_pel_interpolation` | 10 × 10 and 16 × 16 frames; every grid sample and the latency; all four sample kinds and both clip directions must occur |
| `tb_qpel_interpolation` | engine I and engine II configurations; every output sample on both read ports; the latency |
| `tb_fractional_me_e1` | engine I end to end through its ports; latency 943 |
| `tb_fractional_me` | full design at default parameters (see below) |

`tb_fractional_me` runs five frames: a diagonal checkerboard, two random frames,
clipping stripes and a flat frame. It then restarts without rewriting the frame. For
each run it checks:

* Both latencies.
* All 256 samples of each engine.

It also counts how often each mechanism happened: the four half-pel sample kinds,
low and high clipping, edge-clamped filters, the three quarter-pel classes, engine II
runs and restarts. A mechanism that never happened counts as a failure.

Each testbench prints `TB_RESULT checks=N failures=M` and stops with a watchdog if the
design hangs. To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/fme_pkg.sv tb/fme_ref_pkg.sv tb/tb_fractional_me.sv \
  --top-module tb_fractional_me -o sim
./obj_dir/sim
```

Verilator finds the other modules in `rtl/` and `tb/` by name. To run another
testbench, replace the testbench file and the `--top-module` name. Each one finishes
in well under a second.
