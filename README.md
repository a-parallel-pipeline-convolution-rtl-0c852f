# Parallel pipelined 3×3×3 resampling for perspective volume rendering

This is the resampling stage of a shear-warp volume renderer. It handles both
parallel and perspective projection on a fixed set of NP pipelines. It is written in
synthesizable SystemVerilog and follows the architecture of Ogata, Ohkami, Pfister,
Lauer and Dohi, *A Parallel Pipeline Convolution for Perspective Projection in
Real-Time Volume Rendering* (2000). Where the paper is silent, the choices here are
this implementation's own. They are listed below.

## The problem and the two ideas

In shear-warp, the volume is sheared so that all rays run parallel to one axis (k)
and cross every slice at a fixed pixel position of the *base plane*. Under
perspective, slice k is also shrunk by a factor 1/M, with M = 1 + k/k0, where k0 is
the eye's distance from the base plane. So the further a slice is, the more voxels
fall inside one pixel. An anti-aliased sample therefore needs an M×M×M
neighbourhood whose size grows without bound. A systolic array cannot do that: one
voxel goes in per pipeline and one sample comes out.

The design keeps the array fixed with two ideas:

1. **Multi-resolution volume.** The memory holds the volume at levels
   L = 0, 1, 2, … (edge V' = V/2^L), like a 3D mip-map. Slice k is resampled from level
   L = floor(log2 M). At that level the voxel spacing is between ½ and 1 pixel, so a
   fixed 3×3×3 window is always enough. The level boundaries are the slices
   k = k0·(2^L − 1). `level_select` finds them with comparators, without a division.
2. **Separable convolution.** With weights w_lmn = w_l·w_m·w_n, the 27-term sum
   becomes three 3-tap convolutions in a row: along i, along j over the i-results, and
   along k over the j-results. That takes 3·3 = 9 multiply-add units per pipeline
   instead of 27.

## How voxels flow: the skewed stream

Each pipeline has its own memory module. A voxel (i', j', k') of level L has the
*skewed position* m = (i' + j' + k') mod V'. It is stored in module m mod NP, at
index m/NP + j'·V'/NP + k'·V'²/NP inside that level's region (`skew_addr`).
Levels are stacked in each module (`voxel_mem`). Reading all modules at the same
index, counting up from 0, therefore delivers each slice row by row: NP consecutive
skewed positions per cycle, in V'/NP *slots* per row. This is the order the whole
convolver is built around:

    stream index g = k'·V'² + j'·V' + m      pipeline = g mod NP, cycle = g / NP

Skewing rotates each row, so the neighbours of the voxel at stream index g lie at
fixed stream offsets:

| neighbour      | normally at | when m = V'−1 (end of the skewed row) |
|----------------|-------------|----------------------------------------|
| (i'+1, j', k') | g + 1       | g + 1 − V'   (i wraps around the row)  |
| (i', j'+1, k') | g + V' + 1  | g + 1                                  |
| (i', j', k'+1) | g + V'² + 1 | g + V'² + 1 − V'                       |

## The convolver (`conv1d_array`, `resampler`)

This is the core of the design, and the part that needs the closest reading.

**Arithmetic unit (`arith_unit`).** Each unit takes a partial sum C and a sample
point A, which travel down its own pipeline. It also takes an operand D and that
operand's sheared position B, which come sideways. It looks up the weight
W = w(A − B) in its direction's kernel table, adds W·D to C, and registers all four
values. Units W0–W2 run along i, W3–W5 along j and W6–W8 along k.

**Sideways passing.** A window is started in unit 0 of the pipeline that holds its
first element. Unit l needs the element l steps further along. That element is the
operand that unit l−1 of the *next* pipeline has just used. So each unit takes its
operand from the d/b register of its right-hand neighbour's previous unit, and no
voxel is read from memory twice. Along i the neighbour is one stream position away,
so the partial sum only has to pass through the unit register. Along j it is V'
positions further on, so the partial sum waits a *j-delay* of V'/NP cycles between
units. Along k it waits a *k-delay* of V'²/NP cycles. The operands are not delayed
at all.

**Folding.** The last pipeline (NP−1) has no right-hand neighbour. Its next element
is in pipeline 0 one slot later. This is the same cycle in which the last pipeline's
partial sum reaches its next unit, so pipeline NP−1 takes pipeline 0's operand
*unregistered*: one cycle less than every other sideways path. That is the paper's
one-unit *folding delay*, seen from the other side. When the window crosses the end
of a skewed row (m = V'−1), the element is at the *start* of that row. Pipeline 0
used it V'/NP − 1 slots earlier. A *left folding delay* of V'/NP cycles on pipeline
0's operands keeps it, and a selector in pipeline NP−1 picks that path for windows
flagged `row_last`. With V' = NP (one slot per row) this reduces to the paper's
unfolded special case.

**Delays that change with the level.** The j-delay, the k-delay and the left folding
delay all depend on V'. Each one is a `var_delay`: a circular memory with a single
read/write pointer whose wrap point sets the length. Because the lengths change
between levels, the pipeline is drained and the delays are cleared at each level
change. After a clear, a delay reads zero until it is full again, so stale data
cannot appear as valid.

**Timing.** There are no stalls: NP voxels go in and NP samples come out every cycle
while a level is streaming. A sample leaves
`3·TAPS + (TAPS−1)·(V'/NP + V'²/NP)` cycles after its first voxel entered. At the
default size and level 0 that is 32,905 cycles.

Windows wrap around the row in i, as in the paper's ring structure. In j and k,
windows that would reach past the last row or the last streamed slice have their
`in_slab` flag cleared. Their value is not meaningful.

## Positions and weights (`shear_unit`, `kernel_lut`)

For every streamed voxel the shear unit forms two positions:

* **Sheared position of the voxel.** For i and j it is
  `e + (x·D + k'D·s − e) · k0/(k0 + k'D)`, in base-plane pixels, with 8 fraction
  bits. Here e is the foot of the eye on the base plane, s is a parallel shear per
  slice and D = 2^L. In perspective mode the scale k0/(k0 + k'D) comes from a divider.
  In parallel mode it is 1. For k, the position is kept in slices of the current
  level (k+ = k').
* **Sample point.** This is the pixel corner at or below the sheared position of the
  window centre: i^ = floor(i+(i'+1)), j^ = floor(j+(j'+1)), k^ = k'+1.

The weight of a tap is W(sample point − voxel position) along that unit's direction.
W is a programmable table per direction: 128 signed 12-bit weights (10 fraction
bits), indexed by the distance in steps of 1/16 pixel over [−4, 4), and zero outside
that range. Nearest-neighbour, box, linear, Lagrange or windowed-sinc kernels are
all just table contents. The arithmetic carries 24-bit signed samples (voxel << 8)
and truncates each product before adding.

## Frame sequencing (`seq_ctrl`)

A frame walks away from the base plane in *segments*, one per resolution level. For
each segment the sequencer does the following:

* It takes L from `level_select`.
* It sets V'/NP and V'²/NP, and pulses `clr`.
* It streams the level-L slices from one slice before to one slice after the
  segment's centre slices, clipped to the volume.
* It then idles for the pipeline latency.

Parallel projection is a single level-0 segment. A frame takes

    Σ over segments [ 2 + slices·V'²/NP + 3·TAPS + 4 + (TAPS−1)(V'/NP + V'²/NP) ] cycles.

## Top level (`ppc_top`) and how to drive it

`ppc_top #(NP=4, V=256, TAPS=3)` connects the following:

* the host write port, through `skew_addr`, to NP `voxel_mem` modules;
* `seq_ctrl`, which drives every module's read index and the `shear_unit`;
* the memory data and the shear payload, which go into the `resampler`.

To use it:

1. With the design idle, write every level of the volume through
   `vw_en / vw_addr {l, i, j, k} / vw_data`, one voxel per cycle, by logical
   coordinates.
2. Write the kernel tables through `kw_en / kw_dir / kw_addr / kw_data`.
3. Set `persp`, `k0`, `ei`, `ej`, `si`, `sj` and pulse `start`. Hold them until
   `frame_done`.
4. Each cycle, `smp_out[p]` carries a resampled value and `smp_col[p]` describes it:
   `f.valid`, `f.in_slab`, the window-origin coordinates `c`, the sample point `a`
   and the voxel position `p`.

`cur_lvl`, `seg_clr` and `fold_sel` are there for observation.

The samples leave where the paper's rendering pipelines would take them. Those
pipelines composite along the rays, write a pixel memory and feed a warp to the
screen. The paper describes them only as boxes, so they are not part of this RTL.

At V = 256 and NP = 4, the memory holds 4 × 4,793,488 bytes for levels 0–6. A
perspective frame with k0 = 8 runs in 245,910 cycles. A parallel frame runs in
4,227,215 cycles, which is 33.8 ms at a 125 MHz memory cycle. That is just short of
30 frames/s, the paper's target for this size.

## Where this departs from, or adds to, the paper

* **Sequencing of level changes.** The paper gives the delay lengths per level
  ((V/D)/NP for the j-delay and (V/D)²/NP for the k-delay) but not how a frame moves
  from one level to the next. Here each level is a separate, drained segment, so
  windows never mix two levels.
* **Shear.** The paper computes positions with a DDA. This design uses a per-slice
  divider and one multiply per coordinate. The shear-shrink matrix is not given in
  the paper, so the formula above, a perspective scale about the eye foot plus a
  per-slice shear, is this design's.
* **Sample point and weight arguments.** These are defined as above. The k weights
  depend only on the tap, because k positions are in level slices.
* **Number formats, widths, reset and handshakes.** All are this design's own; the
  paper leaves fixed-point analysis open.
* **Folding-delay placement.** The placement was derived from the skewed addressing
  and checked in simulation. It reproduces the paper's delay values (one unit for
  folding, V/NP for left folding) but may not match its drawing box for box.
* **Not built:** the rendering (compositing) pipelines, the pixel memory and its
  FIFO, the warp unit, the display, and the SDRAM protocol with double buffering.
  The voxel memory here is a plain synchronous array, loaded while idle. Building the
  lower-resolution levels (averaging 8 voxels) is left to software before loading,
  as the paper proposes.
* **Other sizes.** The RTL is parameterised in NP and V (powers of two,
  V ≥ NP·2^LMAX). The paper's larger configurations, 512³ on 32 pipelines and
  1024³ on 256 pipelines, are parameter changes that have not been simulated.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares against
arithmetic written independently of the block's structure: plain nested sums of the
separable convolution, closed-form addresses, and real-valued level selection. The
helpers are in `tb/tb_ref_pkg.sv`.

* `tb_resampler` and `tb_conv1d_array` use random kernels and check every sample
  and its latency at V' = 32, 16, 8 and 4. These widths cover the folded and the
  unfolded cases, and the tests confirm that the left folding selector is used.
* `tb_ppc_top` runs the whole design at V = 16. It renders two perspective frames
  (eye distances k0 = 2 and k0 = 9, the second with a shear) and a parallel frame. It checks every
  in-slab sample, the frame length in cycles, NP samples per slot and the segment
  count.
* `tb_ppc_top_full` runs one perspective frame at the default V = 256. It loads all
  19 M voxels and checks a spread subset of the samples. It takes about a minute.
* Three testbenches replay the rendering experiments that motivated the design,
  using real multi-resolution data (the coarse levels are 2×2×2 means):
  * `tb_wl_cube` renders a solid cube in a 64³ volume with a linear (2-point
    Lagrange) kernel.
  * `tb_wl_checker` renders a 128³ checker-board that alternates every voxel. It
    renders once with a nearest-neighbour kernel and once with a 3×3×3 box kernel,
    and requires the box kernel to smooth the pattern. The sample variance drops
    from 1.3·10⁹ to 2·10⁷ (in squared LSBs).
  * `tb_wl_engine` runs at the default size with a quadratic (3-point Lagrange)
    kernel. It renders a perspective frame and a parallel frame. The parallel frame
    takes 4,227,215 cycles, which is 29.6 frames/s at an 8 ns cycle. A synthetic
    volume stands in for a real 256³ data set.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/ppc_pkg.sv tb/tb_ref_pkg.sv tb/tb_ppc_top.sv --top-module tb_ppc_top
    ./obj_dir/Vtb_ppc_top

Each testbench prints `TB_RESULT checks=N failures=M`.

## Files

| file | contents |
|------|----------|
| `rtl/ppc_pkg.sv` | number formats, `col_t` / `opd_t` / `coord_t` types, kernel index |
| `rtl/var_delay.sv` | circular-memory variable delay |
| `rtl/kernel_lut.sv` | per-direction weight table |
| `rtl/arith_unit.sv` | multiply-add unit W0–W8 |
| `rtl/conv1d_array.sv` | NP-pipeline 1D convolver with line, folding and left folding delays |
| `rtl/resampler.sv` | i, j, k convolvers in series |
| `rtl/skew_addr.sv` | skewed multi-resolution address map |
| `rtl/voxel_mem.sv` | one memory module holding all levels |
| `rtl/level_select.sv` | level per slice and level boundaries |
| `rtl/shear_unit.sv` | sheared positions and sample points |
| `rtl/seq_ctrl.sv` | frame and segment sequencer |
| `rtl/ppc_top.sv` | top level |
| `tb/tb_ref_pkg.sv` | reference sums, volume builder and kernel shapes for the testbenches |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_ppc_top.sv`, `tb/tb_ppc_top_full.sv` | whole design, small and default size |
| `tb/tb_wl_cube.sv`, `tb/tb_wl_checker.sv`, `tb/tb_wl_engine.sv` | the rendering experiments |
