# GMaC: point-cloud accelerator with geometric mapping and address-index distance computation

Point-based point-cloud networks (PointNet++ and its relatives) spend most of
their time in two stages. **Down-sampling** picks well-spread centre points by
farthest point sampling (FPS), which needs a great many Euclidean distances.
**Feature computation** runs a shared MLP over the points of each group.
Usually the second stage waits for the first.

This design removes that dependency with **geometric mapping**. Each point is
split into two parts:

* a **voxel**: its cell on a coarse grid of up to 16 segments per axis. This
  is the point's global location, as three 4-bit integers.
* a **local coordinate**: its offset inside that voxel.

FPS then runs on the small integer voxel coordinates. The feature network runs
on the local coordinates of the points in each voxel. Neither needs the
other's result, so the two run **at the same time**. They meet only at the
end. The FPS result decides which voxel features enter the global pooling.
This is the element-wise ("Hadamard") product of the feature map with the
0/1 FPS map.

Two smaller ideas complete the design:

* **Address-index distance computation.** Voxel coordinates are small
  integers. A squared difference can therefore be found by reading small
  weight arrays in which every cell stores a multiple of its own column
  number. No multiplier is needed.
* **Double-pointer (D-P) buffer.** A second, half-step mapping gives every
  point a left/right bit per axis. From one stored copy of the points, the
  buffer can return a whole voxel, any half of it, or a half shifted by half a
  step. These are the overlapping and multi-scale groups, built without
  storing the points again.

The original is a resistive compute-in-memory (RRAM) chip. Its mapping unit,
distance arrays, ADC and crossbars are analog. This RTL models each of those
parts by its digital function (see "Departures" below). All the digital parts
are ordinary synthesizable logic.

## Block map

```
 points ──► gm_unit (1st level, step S1) ──► gm_unit (2nd level, S1/2) ──► pointer bits
   Q1.15        │ voxel, local coord                                          │
                ▼                                                             ▼
           voxel_map  ◄── activate ──────────────── dp_buffer (local x,y,z + pointers, paged per voxel)
     (list of active voxels,                                   │  page walk per voxel
      sampled bits)                                            ▼
                │                                    cim_mvm 3→64 (local MLP, ReLU)
                ▼                                              ▼
  ds_unit: LANES × {ac_unit x,y,z + flash_adc}       maxpool (per voxel)
           distance_buffer, max_comparator                     ▼
                │ FPS samples ──► sampled bits ──►   local_feat_buffer (1024 × 64 ch)
                                                               ▼  only sampled voxels
                                                     maxpool (global) → cim_mvm 64→40 → act_bn → scores
```

| File | Block |
|---|---|
| `rtl/gmac_pkg.sv` | shared widths, `point_t`, `voxel_t`, voxel address packing |
| `rtl/gm_unit.sv` | geometric mapping unit: 3 rows × 16 programmable boundaries |
| `rtl/ac_unit.sv` | address-index computation array for one axis (3 × 16) |
| `rtl/flash_adc.sv` | 4-bit flash quantiser used inside `ac_unit` |
| `rtl/voxel_map.sv` | searched voxel map: active bitmap, active list, sampled bits |
| `rtl/distance_buffer.sv` | 1024 × 16-bit minimum-distance store (2 KB) |
| `rtl/max_comparator.sv` | argmax over the distances of one clock |
| `rtl/ds_unit.sv` | down-sampling unit: the FPS engine |
| `rtl/dp_buffer.sv` | double-pointer buffer (input and local-coordinate buffer) |
| `rtl/cim_mvm.sv` | crossbar matrix-vector layer (local MLP and global FC) |
| `rtl/maxpool.sv` | channel-wise max-pooling with its aggregation register |
| `rtl/local_feat_buffer.sv` | pooled feature of each active voxel (128 KB) |
| `rtl/act_bn.sv` | per-channel batch-norm affine and ReLU |
| `rtl/gmac_top.sv` | the whole accelerator and its frame sequencing |

## Number formats and address packing

* Coordinates are signed **Q1.15** (16 bits) over the normalised range
  [-1, 1). Converting from floating point is left to the host.
* A voxel is `{x, y, z}` with 4 bits per axis. Its 12-bit address is
  `x*256 + y*16 + z`.
* Features are 16-bit signed integers. Weights are 8-bit signed. Sums are
  32-bit.
* Squared voxel distances fit in 10 bits (at most 3·15² = 675). They are kept
  in 16-bit words.

## Geometric mapping (`gm_unit`)

Each axis has one row of 16 cells. Each cell holds one boundary.

* Column 0 holds the origin, the lower end of the range.
* Columns 1 to 15 hold the interior boundaries, in ascending order.
* A cell set to `0x7fff` is unused and never matches.

A cell "matches" when the coordinate is at or above its boundary. The matches
form a thermometer code, and its population count is the segment index. The
local coordinate is the input minus the boundary of the matched segment. The
number of segments is therefore set only by programming. After reset the grid
is 10 segments of 0.2 over [-1, 1).

The second instance in the top (`SECOND=1`) maps the local coordinate against
one boundary at S1/2 (0.1 after reset). Its index on each axis is the
left (0) or right (1) pointer bit.

Worked example on the reset grid:

* (0.09, 0.75, −0.23) → voxel (5, 8, 3), local (0.09, 0.15, 0.17)
* (−0.65, 0.51, −0.11) → voxel (1, 7, 4)
* (0.32, −0.19, 0.98) → voxel (6, 4, 9)

These three points are in the unit testbench.

Latency is one clock, and the unit takes one point per clock.

## Distances without multipliers (`ac_unit`, `flash_adc`)

Each array has three rows of 16 columns. Column L of every row stores α·L.

1. **Subtract.** For voxel coordinates X1 and X2, row 0 is read at column X1
   and row 1 at column X2. Their difference stands for the analog difference
   current α·(X1 − X2).
2. **Quantise.** The 4-bit flash ADC has thresholds at α, 2α, … 15α. It turns
   the magnitude into |X1 − X2|.
3. **Square.** That code selects column |X1 − X2| of row 2 and multiplies
   the cell's weight. Since the weight is α·|X1 − X2|, the result is
   α·(X1 − X2)².

The weights can be reprogrammed, as the resistive cells can. Reset restores
α·L. The array is a two-stage pipeline, one clock for subtract-and-sample and
one for the square, so a result appears two clocks after the request.

## Farthest point sampling on voxels (`ds_unit`)

FPS works on the activated-voxel list that `voxel_map` builds in
first-seen order. Each iteration does the following:

1. Stream the whole list, `LANES` (4) voxels per clock.
2. For each lane, three `ac_unit`s (x, y, z) give the squared distance to the
   last sample, and an adder sums them.
3. The stored minimum distance of each voxel is read from `distance_buffer`,
   lowered if needed and written back.
4. `max_comparator` finds the largest updated minimum of the clock. A running
   maximum across clocks gives the next sample. On ties the lowest list index
   wins.

Some rules of the engine:

* The first sample is list entry 0.
* A sampled voxel has distance 0 to itself, so it is never picked again.
* Asking for more samples than there are active voxels takes all of them.

Every sample is marked in the voxel map, so each voxel is in one of three
states: no point, not sampled, or sampled. Each sample is also streamed out on
`smp_valid` / `smp_vox`.

**Timing.** The first sample comes one clock after `start`. Every further
sample takes `ceil(n_active / LANES) + 4` clocks. A full 1,000-voxel frame
with 512 samples therefore takes about 130,000 clocks, or 1.3 ms at 100 MHz.

## The double-pointer buffer (`dp_buffer`)

This is the least obvious part of the design.

**What is stored.** Every point is stored once. An entry holds its local x, y
and z (three arrays sharing one address) and three pointer bits. A pointer bit
is 1 when the point lies in the right half [S1/2, S1) of its voxel on that
axis, and 0 for the left half.

**How points are paged.** The entries are organised by voxel. A head table of
4096 entries holds the newest point of each voxel. Each point keeps a link to
the previous point of the same voxel. Walking one voxel's page therefore costs
one clock per point in that voxel, whatever the size of the buffer.

**Query modes.** Every query walks the page newest point first.

* `q_mode = 0`: return every point of the voxel.
* `q_mode = 1`: return only the points whose pointer on `q_axis` equals
  `q_side`. This is a half voxel. Combining halves along several axes splits
  a voxel into eight sub-spaces.
* `q_bias = 1`: add +S1/2 to the `q_axis` coordinate of points whose pointer
  is right, and −S1/2 to those whose pointer is left. Such a group can be
  pooled as part of a voxel shifted by half a step, which gives the
  overlapping groups.

**Timing.** After `q_start` the walk begins on the next clock. Points come out
on `o_valid` / `o_loc`. `o_done` marks the clock of the last point, or comes
two clocks after `q_start` for an empty voxel. The buffer holds 10,000 points.
Writes beyond that are dropped and raise `full`. `clear` empties it in one
clock.

In the top, `cfg_grp_half`, `cfg_grp_axis`, `cfg_grp_side` and
`cfg_grp_bias` choose the group that every voxel contributes in a run.

## Feature path and global stage

**Local path.** Run in parallel with FPS:

1. The top walks the active list. For each voxel it queries the D-P buffer.
2. Each returned point goes through the local layer `cim_mvm` (3 → 64,
   ReLU), one point per clock.
3. `maxpool` keeps the channel maximum of the group. The pooled vector is
   written to `local_feat_buffer`, at the voxel's list index.

**Global stage.** Starts when both FPS and the local path are done:

1. The local features are read in list order.
2. Only the rows of sampled voxels enter a second `maxpool`. This is the
   gating by the FPS map.
3. The result passes the FC layer `cim_mvm` (64 → 40, no ReLU) and `act_bn`:
   `y = ((x·γ) >>> 8) + β`, with ReLU when `cfg_bn_relu` is set.
4. The 40 scores leave on `score_valid`, and `done` pulses.

`cim_mvm` computes the whole vector in one clock, as a crossbar does. Its
output is `(Σ x·w) >>> 7`, saturated to 16 bits.

## Using the top (`gmac_top`)

**Reset.** After reset:

* the mapping grid is 10 segments of 0.2 over [-1, 1);
* the second-level split is at 0.1;
* α = 1;
* all MLP and FC weights are 0;
* γ = 1.0 and β = 0.

**Program.** Everything is written one item per clock:

* `cfg_gm_*`: mapping boundaries, level 0 or 1.
* `cfg_half_step`: S1/2 in Q1.15.
* `cfg_ac_*`: distance-array weights, broadcast to all lanes of one axis.
* `cfg_wl_*`: local weights, row = input (x, y, z), column = channel.
* `cfg_wg_*`: FC weights, row = channel, column = class.
* `cfg_bn_*`: γ (Q8.8) and β per class.

**Run a frame.**

1. Pulse `frame_clear`.
2. Stream the points on `pt_valid` / `pt`, one per clock. Two clocks later
   each point is in the buffer and its voxel is active.
3. Pulse `start` with `n_samples`.
4. `ds_busy` and `fe_busy` show the two stages running together. Samples
   appear on `smp_valid` / `smp_vox`. Scores appear on `score_valid` and
   `done` pulses.

`n_act`, `n_pts`, `map_overflow` and `buf_full` report occupancy.

**Capacity.**

* 10,000 points per frame.
* 1,024 active voxels, enough for the full 10 × 10 × 10 grid. On finer grids,
  voxels beyond the 1,024th are dropped and `map_overflow` is set.
* 40 classes.

### Main parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `gmac_top` | `NPTS` | 10000 | points per frame (D-P buffer depth) |
| `gmac_top` | `LANES` | 4 | distances computed per clock in FPS |
| `gmac_top` | `C` | 64 | local feature channels |
| `gmac_top` | `NCLS` | 40 | output classes |
| `gm_unit` | `NB` | 16 | boundary cells per axis |
| `ac_unit` | `ALPHA` | 1 | weight step α |
| `gmac_pkg` | `MAXACT` | 1024 | active-voxel list / distance-buffer depth |

## Simulation

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

`tb_gmac_top` runs seven complete frames at the default parameters:

1. a clustered cloud;
2. half-voxel groups with bias;
3. more samples than voxels;
4. a full 10,000-point, 512-sample frame;
5. the same points on 4³ and 8³ grids;
6. a 16³ grid that overflows the voxel list.

For each frame it compares the FPS sequence and all 40 scores with a reference
model inside the testbench. It also counts the mechanisms it must exercise:

* overlap of the two stages;
* points sharing a voxel;
* both pointer sides;
* half-voxel groups;
* FPS gating;
* clipping of the sample count;
* overflow;
* frame clear.

All seven frames take about a second of simulation. Cycles from `start` to
`done` in that run:

| Frame | Points | Voxels | Samples | Cycles |
|---|---|---|---|---|
| 10³ grid | 10,000 | 1,000 | 512 | 130,803 |
| 8³ grid | 10,000 | 512 | 64 | 12,566 |
| 4³ grid | 10,000 | 64 | 16 | 10,326 |

On coarse grids the local path (one clock per point) sets the time. On the
10³ grid with 512 samples, FPS sets it.

With plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_gmac_top \
    -Irtl -y rtl -y tb +libext+.sv rtl/gmac_pkg.sv tb/tb_gmac_top.sv
./obj_dir/Vtb_gmac_top
```

Replace `tb_gmac_top` by `tb_<module>` to run a unit testbench. Verilator's
lint (`--lint-only -Wall`) is clean apart from unused-constant notes on the
package.

## Departures and limits

**Analog parts modelled digitally.**

* Mapping unit: in the original, a bias divider with a sensing-line discharge
  and a half-supply threshold. Here, a digital comparison.
* Distance arrays: in the original, differential currents. Here, integers in
  units of α.
* Crossbars: in the original, analog column currents. Here, exact integer
  dot products.

Timing is one clock per roughly 10 ns analog phase, at 100 MHz. No analog
non-ideality is modelled: noise, conductance spread, ADC offset.

**Arithmetic.** The original uses half-precision floating point for the MLP,
8-bit integers for FPS and 32-bit floating-point input. Here all arithmetic
is fixed point.

**Network size.** The layer sizes are this design's choice, not given by the
source:

* one local layer, 3 → 64;
* one global FC layer, 64 → 40.

64 channels × 1,024 voxels × 16 bits matches the 128 KB feature buffer of the
original. A deeper network would chain more `cim_mvm` layers.

**Comparators.** The original lists 512 comparators. Here there are
`LANES − 1` per clock plus a running maximum, sized to the distances produced
each clock.

**Distance arrays and ADCs.** The original lists four 3 × 16 distance arrays
and four ADCs. Here there is one array, with its own ADC, per axis per lane:
12 of each with `LANES = 4`.

**Not built:**

* the "high-resolution" two-stage (S1 × S2)³ addressing; the second level
  here only gives the half-step pointers;
* the on-demand geometric transform beside the local MLP;
* the output-distribution (softmax) stage;
* per-point segmentation heads.

**Group scheduling.** Overlapping groups are produced one kind per run, set
by `cfg_grp_*`. The two overlapping representations of a point are not pooled
in the same pass.

**This design's own choices:**

* FPS starts from the first activated voxel, and ties go to the lowest index;
* sequencing is simple: the top waits for each voxel's pooled result before
  the next query;
* reset values, handshakes (valid pulses, no back-pressure) and all widths
  not stated above.
