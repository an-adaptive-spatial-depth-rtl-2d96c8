# Adaptive spatial depth filter with skipped depth-buffer reads

A 3D rendering pipeline spends much of its memory bandwidth on fragments
that end up invisible: they are textured, fogged and blended, and only
then does the depth test throw them away. This design puts a tiny
occlusion test in the rasterizer, ahead of texturing, that needs just two
bits per pixel instead of a second depth buffer:

* **Filter plane.** One plane at depth `t` cuts the view volume in two.
  If something has already been drawn at a pixel *in front of* the plane,
  any later fragment at that pixel that lies *behind* the plane must be
  hidden, and is dropped on the spot.
* **SDBR plane** ("skipping depth buffer reading"). One bit says whether
  anything has been drawn at the pixel in this frame. If not, the z-buffer
  still holds its cleared value (1.0, the far plane), so the depth test can
  write the new depth without reading the old one first.
* **Adaptation.** Where the filter plane sits decides how much it rejects.
  A small block in the depth test counts, per frame, the fragments in front
  of the plane (FP) and the fragments behind it that survived the filter
  (SP), and moves the plane towards the point where the two are equal,
  which approximates the position of maximum rejection.

The RTL follows the 2-plane SDBR form of the adaptive depth filter
published by C.-H. Yu and L.-S. Kim ("An Adaptive Spatial Depth Filter for
3D Rendering IP"). The rasterizer, texturing, fog/stencil/alpha testing,
per-pixel operations and the frame-buffer DRAM are outside this design;
their connections are ports of the top module.

## Pipeline

```
 rasterizer ──rast_*──► df_depth_filter ──tex_*──► [texture, fog, stencil, alpha]
                            ▲    │                          │
                            │  df_mem_*  (filter planes,    │ zt_*
                          t │    ▼       8x8-pixel tiles)   ▼
                            │  frame-buffer DRAM ◄─zb_*─ df_depth_test ──pix_*──► per-pixel ops
                            │                             │ (z-buffer, read skip)
                            └──────── df_adaptation ◄─────┘ (inside df_depth_test)
```

`df_render_top` wires the filter and the depth test together and feeds the
adaptation block's plane position `t` back to the filter. A single
`frame_end` pulse, given once the last fragment of a frame has left the
depth test, moves `t` and starts the next frame in the filter.

Depths are 24-bit unsigned fractions: 0 is the near plane, all ones the far
plane. The screen is 512 x 512 (`df_pkg`).

## The two bits per pixel

Each pixel has a 2-bit code (`df_pkg::DF_SDBR` = bit 0, `DF_MASK` = bit 1):

| code (MASK,SDBR) | meaning this frame |
|---|---|
| 00 | nothing drawn; stored depth is the cleared 1.0 |
| 01 | drawn, but only behind the plane |
| 11 | something drawn in front of the plane |

(10 cannot occur: a pixel marked in front of the plane has also been drawn.)

For a fragment at depth `z` the filter does:

1. If MASK = 1 and `z >= t`: drop it. An earlier fragment at this pixel was
   nearer than `t`, hence nearer than `z`, so under a less-than depth test
   this one loses.
2. Otherwise pass it on, carrying the pixel's current SDBR bit, and then set
   SDBR, plus MASK when `z < t`.

Because a dropped fragment is always one the depth test would have failed,
the fragments reaching the per-pixel stage are exactly those a plain
z-buffer would pass, in the same order. The testbenches check exactly this.

**Limit of the scheme.** Marking happens when a fragment leaves the filter.
If a later stage (alpha or stencil test) discards a fragment that lay in
front of the plane, the MASK bit is still set, and fragments behind the
plane at that pixel may be dropped wrongly. The filter should be used only
while such tests cannot discard fragments, or the pixels they touch must be
excluded. The SDBR bit has no such problem as long as the z-buffer is still
cleared each frame: a needless read only costs bandwidth.

## Where the filter plane goes (df_adaptation)

With the plane at `t`, let FP be the fragments in front of it, BP those
behind it, and RP the part of BP it rejects; SP = BP − RP survives. The
number it rejects is the total minus (FP + SP). FP grows with `t` and SP
shrinks with it, so FP + SP is smallest near the point where the two curves
cross. The adaptation block tracks that crossing:

* While a frame runs, every fragment entering the depth test is counted as
  FP (`z < t`) or SP (`z >= t`). Fragments the filter dropped never get
  there, so the count naturally measures SP rather than BP.
* At `frame_end`, with `D = |FP − SP|` and `S = FP + SP`, the plane moves by

  `step = 2^(Z_W − STEP_SHIFT) >> (lod(S) − lod(D))`

  towards the crossing: down when FP > SP, up when FP < SP, not at all when
  they are equal or the frame was empty. `lod()` is the position of the
  leading one (`leading_one_detector`), so `lod(S) − lod(D)` is the
  imbalance ratio rounded to a power of two. With `STEP_SHIFT = 2` a
  one-sided frame moves the plane by a quarter of the depth range, and the
  step halves with every halving of the imbalance.
* `t` starts at 0.5 after reset and is clamped to [0, 1).

The published algorithm specifies the counters, the leading-one detectors
and the per-frame update towards FP = SP, but not the step size; the
formula above is this design's choice. In the test scenes the large moves
are over after two or three frames; after that the plane keeps making
small corrections (see the results below).

## Filter storage (df_depth_filter)

The two planes for the whole screen (4096 tiles x 128 bits = 64 KiB) live
in the external frame buffer. The filter keeps the tiles in use in a
direct-mapped, write-back cache:

* A tile is 8 x 8 pixels, so one transfer moves 64 pixels of both planes
  (128 bits). Tile number = `{y[8:3], x[8:3]}`; its low 6 bits pick one of
  the 64 lines (`CACHE_LINES`), so one line per tile column and a whole row
  of tiles across the screen fits at once.
* A miss writes back the victim if dirty, then fetches the tile.
* One flag per tile (4096 flip-flops) records whether the tile has been
  written out during the current frame. A tile without the flag must be all
  zeros, so it is installed without any memory read. This makes the
  per-frame clear of the planes free: `frame_start` drops all lines without
  writing them back and clears the flags in one cycle.

The tile shape, cache size and organisation, and the clear flags are this
design's choices; the source specifies only that the planes are kept in
the frame buffer and moved 64 pixels at a time.

## Depth test (df_depth_test)

A plain less-than z-test, one fragment at a time, against the z-buffer at
address `y * 512 + x`. A fragment with SDBR = 1 is read, compared and, if
nearer, written. A fragment with SDBR = 0 is written straight away. Each
passing fragment is then presented to the per-pixel stage. The z-buffer is
assumed to be cleared to the far plane at the start of each frame by the
usual frame-buffer clear, which is outside this design.

## Interfaces and timing

All fragment links are valid/ready; a sender must hold a fragment until it
is taken. Both memory ports hold a request (`req`, `we`, `addr`, `wdata`)
until a one-cycle `ack`, with read data valid in the `ack` cycle.

| link | payload |
|---|---|
| `rast_*` in, `pix_*` out | `frag_t` = {x[8:0], y[8:0], z[23:0]} |
| `tex_*` out, `zt_*` in | `dfrag_t` = {x, y, z, sdbr} |
| `df_mem_*` | tile number [11:0], 128-bit tile |
| `zb_*` | pixel address [17:0], 24-bit depth |

* Filter: one fragment per clock on a tile hit (checked); the result sits in
  a register, one cycle latency. A miss stalls `rast_ready` for the
  write-back and fetch round trips.
* Depth test: with a memory that acknowledges in the cycle after a
  request, one fragment every 4 cycles when the read is skipped and every
  6 when it is made (the 2-cycle difference is checked).
* `frame_end` must be pulsed only when the pipeline is empty. It resets the
  per-frame statistics (`df_*`, `zt_*`) and the FP/SP counters.
* Reset is synchronous and active low everywhere.

## Files

| file | contents |
|---|---|
| `rtl/df_pkg.sv` | screen size, depth width, tile constants, fragment structs |
| `rtl/leading_one_detector.sv` | leading-one position of a word |
| `rtl/df_adaptation.sv` | FP/SP counters and per-frame plane update |
| `rtl/df_depth_filter.sv` | 2-bit filter, tile cache, external-memory port |
| `rtl/df_depth_test.sv` | z-test with read skip; holds `df_adaptation` |
| `rtl/df_render_top.sv` | top: filter + depth test |
| `tb/df_ext_mem_model.sv` | behavioural frame-buffer memory (not synthesizable) |
| `tb/df_top_harness.sv` | scene generator and z-buffer reference for the top |
| `tb/tb_*.sv` | self-checking testbenches, one per block, plus `tb_df_workloads` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and exits. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/df_pkg.sv tb/tb_df_render_top.sv --top-module tb_df_render_top -o sim
obj_dir/sim
```

Replace the testbench name for the others:

* `tb_leading_one_detector`: against a shift-and-count reference.
* `tb_df_adaptation`: FP/SP counts and every update against a reference
  formula; settling near the median of a skewed depth distribution.
* `tb_df_depth_filter`: every output fragment and SDBR bit against a
  per-pixel model of both planes, under random stalls, with heavy tile
  traffic through a memory model that powers up with random data;
  hit throughput.
* `tb_df_depth_test`: outputs, final z-buffer and statistics against a
  reference z-buffer; the cost of a read.
* `tb_df_render_top`: eight frames in a 128 x 128 corner, near objects then
  far ones. Checks every fragment at the per-pixel stage and every z-buffer
  word against a plain z-buffer renderer. Requires each mechanism to occur
  at least once: rejection, read skip, read, tile write-back and fetch,
  input stall, output back-pressure, plane moving down and plane moving up.
  About 2 s.
* `tb_df_position_sweep`: replays one scene through the filter for 15
  fixed plane positions and checks the rule behind the adaptation: the
  rejection ratio where FP and SP are closest must be within 90 % of the
  best in the sweep. On its scene the best is 24.0 % at t = 0.375 and the
  FP = SP point (t = 0.4375) gives 22.8 %. FP must grow and SP shrink as
  t grows.
* `tb_df_workloads`: four full-size 512 x 512 scenes side by side, four
  frames each, every parameter at its default. About 1 minute.

## Results on synthetic scenes

`tb_df_workloads` uses scenes with the depth complexities of the four
evaluation scenes of the original work (4.50, 3.49, 2.54 and a flat
textured picture at 1.00). The geometry is synthetic: random opaque
rectangles with depths spread over 0.05 to 0.95, drawn in random order.
Last-frame figures:

| scene | depth complexity | plane `t` | fragments rejected | z reads skipped | traffic estimate |
|---|---|---|---|---|---|
| a | 4.50 | 0.31 | 33.8 % | 30.1 % | 12.9 B/fragment |
| b | 3.49 | 0.38 | 32.0 % | 37.3 % | 13.0 B/fragment |
| c | 2.54 | 0.38 | 16.2 % | 38.0 % | 16.0 B/fragment |
| d | 1.00 | —    | 0 %    | 100 % | 16.3 B/fragment |

The traffic estimate charges every fragment that survives the filter five
4-byte accesses (z read, z write, colour read, colour write, texel), one
fewer when its z read is skipped, and 16 bytes per filter-tile transfer. A
pipeline without the filter needs 20 bytes per fragment on the same terms.

The published rejection ratios (about 58 to 72 % for the 2-plane SDBR
system on the real models) are higher. These random scenes have no
front-to-back structure, and their depth distribution differs from that of
real models, so the figures are not comparable. They show that the
mechanism works and that the plane settles, not the published gains. For
the flat picture the plane has nothing to reject, but every z read is
skipped, which is what makes the SDBR form pay off at low depth complexity.

## Departures and open points

* **Main configuration only.** The 1-plane system (no SDBR bit) and the
  3-plane system (three filter planes in the same 2 bits) were compared in
  the original work but are not built. There is no mode switch between
  them.
* **Choices not fixed by the source:** 24-bit depth; less-than depth
  function; code bit order; 8 x 8 tiles; 64-line direct-mapped cache;
  per-tile clear flags (with them, first-touch tile reads disappear from
  the filter's memory traffic); the step rule and start position of the
  adaptation; valid/ready and request/ack handshakes; one fragment at a
  time in the depth test.
* **Throughput.** One depth-test unit processes a fragment every 4 to 6
  cycles and the filter one per cycle. Bandwidth figures in the source
  assume a 2.6 Gpixel/s fill rate, which would need parallel pipes and a
  clock rate that the source does not specify.
* **Alpha/stencil discards** can make the filter drop visible fragments
  (see "Limit of the scheme").
