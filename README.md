# DPM object detector in SystemVerilog

This is a streaming hardware object detector built on *deformable parts models* (DPM). A
DPM describes an object class, for example a person, as two kinds of linear filter over HOG
features:

- one coarse **root** filter for the whole object;
- eight smaller **part** filters (head, arms, ...) that may move a little around their
  expected place, paying a quadratic cost for the move.

A window's score is its root score plus, for each part, the best deformed part score. The
detector finds objects of any size by scoring every window of a 12-level feature pyramid.

The RTL takes a grey-scale video frame as a pixel stream, one pixel per clock in raster
order. It reports each detection as a pyramid level, a window position and a score. No frame
buffer is used: the pyramid is computed straight from the stream, and classification runs as
the features appear. The design follows the architecture of a published 65 nm full-HD
(1920×1080, 30–60 fps) DPM accelerator. Where that architecture left details open, this
design makes its own choices, and those are marked below.

Two **classification engines** (CE) run at once, so two object classes (two models) are
detected in one pass. An engine is switched off by gating its clock, and so is its parts
section.

## How a frame flows through the design

```
pixels ─► filter_bank ─► 3× (multi_fifo ─► hist_norm_engine ─► basis_projection)   = fpg
                                                   │ projected 13-D features, ≤3/cycle
                      ┌────────────────────────────┴──────────────────────────┐
              root levels 3..11                                      part levels 0..8
                      │                                                       │
          class_engine ×2: root_classifier ─► pruning ─►            vq_unit (3 engines)
                 parts section: 8 × (deformation ◄─► part_classifier)         │ 8-bit indices
                      ▲          reads indices and de-quantises them ◄─ feature_memory
                      └──────── centroid_rf (256 centroids) ─────────────────┘
```

- **Pyramid levels.** There are 12 levels, with cell sizes 8, 10, 13, 16, 20, 26, 32, 40,
  52, 64, 80 and 104 pixels: four octaves of three levels each. Level *l*+3 has exactly twice
  the cell size of level *l*. Root filters therefore run on levels 3..11, and their parts run
  on levels 0..8, at twice the resolution.
- **Features.** A feature is a 13-D HOG vector, 10 bits per dimension: 9 orientation values
  and 4 texture (energy) values. Before classification it is projected onto 13 basis vectors.
  These give a space in which the SVM weights are sparse (see *Sparse weights* below).
- **Root path.** Root-level features go straight into both engines' root classifiers.
- **Part path.** Part-level features are vector-quantised to one of 256 centroids. Only the
  8-bit index is stored, in a 32-row line buffer per level. Storing indices is what makes a
  full-HD feature store small: 32 rows × 994 columns × 8 bits ≈ 31 KiB. Storing 13×11-bit
  features would take about 18 times more.
- **Pruning.** Each engine discards windows whose root score is not above a programmable
  pruning threshold. Only the remaining *candidates* get part classification. That is the
  expensive step, so the design relies on most windows being pruned (it targets at least 80%).

## Feature pyramid generation (`fpg`)

The pyramid is computed without resizing the image. Each level has its own cell size, and
each level's low-pass filter plays the part of the down-scaling filter.

- **`filter_bank` / `lpf_gradient`.**
  - Four line buffers form a 5×5 pixel window that all 12 levels share.
  - Each level filters the window with a separable kernel [1 w 1]⊗[1 w 1]/(w+2)².
    - w = 14 on levels 1–2, 6 on levels 3–5 and 2 on levels 6–11.
    - Level 0 is not filtered.
    - Wider-celled levels get stronger smoothing.
  - Each level then takes central differences gx and gy. The magnitude is |gx|+|gy|, and the
    orientation goes into one of 9 unsigned 20° bins, found by sign tests against Q8 cosines
    and sines.
  - Pixels within 2 of the border give no magnitude.
  - Per level, magnitudes are summed over the *c* pixels of one pixel row inside one cell. That
    sum is a *partial histogram* (9 bins), emitted when the segment ends. A pixel row therefore
    yields about IMG_W/c partial histograms per level.
  - After the last pixel, the bank flushes itself for 2·IMG_W+2 cycles.
- **`multi_fifo`.** The 12 levels are shared by three histogram engines: levels
  {1,3,5,7,9}, {0,11} and {2,4,6,8,10}. Several levels of one engine can finish a segment in
  the same cycle, so each engine sits behind a FIFO that takes up to N writes per cycle and
  gives one read.
- **`hist_norm_engine`.**
  - **Histogram.** Segments are added into a four-cell-row buffer.
  - **Trigger.** When a cell row is complete, the row above it has all its neighbours and is
    normalised.
  - **Block energies.** For every interior cell, the engine forms the L1 energy N_k of the
    four 2×2 blocks holding it.
  - **Reciprocals.** It computes 2³⁷/N_k with four serial dividers (`recip_div`, 38 cycles).
  - **Normalise.** Each bin gives min(h·2¹²/N_k, 819).
  - **Output.** The 9 orientation values are each the sum over the four blocks ÷ 4. The 4
    texture values are each the sum over the bins ÷ 8.
  - **Cost.** About 41 cycles per feature.
  - **Grid.** A level with W×H cells gives (W−2)×(H−2) features.
- **`basis_projection`.**
  - P_k = sat₁₁((Σ_d H_d·S_k,d) >>> 9), one output dimension per cycle (13 cycles per
    feature).
  - The basis S is signed 10-bit and written at start-up.
  - The three engines hold identical copies.

At 1920×1080 the pyramid has 83,188 features per frame. The FPG keeps up with one pixel per
clock: `pix_ready` drops only during the end-of-frame flush.

## Feature storage and vector quantisation

- **`vq_unit`.**
  - Three quantiser engines work in lock-step and share `centroid_rf`. The 256 centroids are
    organised as 8 banks of 32.
  - A batch takes every waiting part-level feature (up to three). For 32 cycles it presents
    row *r* of all eight banks. Each engine computes eight squared-distance sums in parallel
    and keeps the minimum.
  - One more cycle picks the best of the eight. The index is bank·32+row, and the lower index
    wins ties. A batch takes 34 cycles.
- **`feature_memory`.**
  - Holds 32 rows per part level of 8-bit indices; row *y* lives in slot *y* mod 32.
  - `rows_done[l]` counts the finished rows of level *l*.
  - There are 16 combinational read ports, 8 per engine.
- **`centroid_rf`.** The same centroids serve the VQ (one bank row per cycle) and
  de-quantisation: 16 ports turn an index back into a 13-D vector for the part classifiers.

## Classification engine (`class_engine`)

This is the most involved part of the design.

### Sparse weights and the selected MAC

In the projected space each filter cell keeps at most six non-zero weights. A weight cell is
43 bits:

- a 13-bit flag marks the dimensions that have a weight;
- six signed 5-bit weights follow, and the k-th weight belongs to the k-th set flag bit.

`selected_mac` routes the six flagged feature dimensions through a crossbar to six
multipliers and sums the products.

### Root classifier

Features of a root level arrive in raster order. A feature at (x, y) is cell (i, j) of window
(x−j, y−i). `root_classifier` therefore:

- walks the FH×FW filter cells four at a time, using four selected MACs, which takes
  ⌈FH·FW/4⌉ cycles per feature;
- adds each product into that window's partial score;
- keeps partial scores for 16 window rows per level (indexed by window row mod 16);
- initialises a window at its first cell (0, 0) and emits it, with the bias added, at its last
  cell (FH−1, FW−1).

The filter is at most 16 cells tall and 208 cells in area.

### Pruning

`pruning` compares each root score with the threshold. A score strictly greater than the
threshold is queued as a candidate in a 64-entry queue, and anything else is counted as
pruned. A candidate that meets a full queue is lost and sets the sticky `overflow` flag.

### Parts and deformation

Candidates are taken one at a time. A candidate at window (wx, wy) of level L uses part
level L−3. Part p is anchored at (2·wx+ax_p, 2·wy+ay_p). Two steps follow.

**1. Wait for rows.** The engine waits until the feature storage holds every row the parts
may touch: rows up to 2·wy + max(ay+ph) + 2. For a full-height window this is the only
stall, because the rows of all levels are produced nearly in step.

**2. Search.** Eight `deformation` units then run in parallel. Each maximises

    PS(anchor + (dx, dy)) − (a1·dx² + a2·dx + a3·dy² + a4·dy)

over the 5×5 displacements |dx|, |dy| ≤ 2. It does not score all 25 positions:

- it scores the 9 coarse positions with dx, dy ∈ {−2, 0, 2};
- it then scores the in-range 4-neighbours of the best coarse position;
- that is 11–13 part scores, about half the work;
- the first maximum wins ties.

Each part score comes from a `part_classifier`. For one cell per cycle it:

- reads the stored index;
- de-quantises it;
- applies one selected MAC.

Cells outside the level count as zero. Parts are at most 8×8 cells.

**3. Result.** The DPM score is the root score plus the eight best deformed part scores. A
window is reported when that score is greater than the detection threshold.

With `parts_en` low, the parts section's clock stops. Candidates are then judged on their root
score alone against the detection threshold.

The coarse-to-fine search finds the exact 5×5 maximum whenever the score surface has a single
peak reachable from the best coarse point. A narrow diagonal peak between coarse points can be
missed. The testbenches check the hardware against this same search, not against the full
5×5 search.

## Interface of `dpm_top`

| Signal | Meaning |
|---|---|
| `pix_valid`, `pix[7:0]`, `pix_ready` | Pixel stream, raster order; a pixel is taken when `pix_valid && pix_ready`. The first pixel starts a frame. |
| `frame_done` | One-cycle pulse when every feature of the frame has been produced and every enabled engine is idle. Wait for it before sending the next frame. |
| `cfg_we`, `cfg_addr[23:0]`, `cfg_wdata[31:0]` | Configuration writes (table below). Load them before the first frame. |
| `det_en[1:0]`, `parts_en[1:0]` | Clock enables of engine *c* and of its parts section. |
| `det_valid[c]`, `det[c]` | Detection of engine *c*: `lev`, `x`, `y` (window origin in cells of level `lev`), `score` (signed 26 bits). |
| `n_kept`, `n_pruned`, `n_parts_done`, `n_late`, `overflow` | Per-engine counters since the frame start, and the sticky overflow flag. |

Configuration map (`cfg_addr[23:20]` selects the region):

| Region | Address fields | Data |
|---|---|---|
| 1 basis | [7:0] = k·13+d | S_k,d, signed 10 bits |
| 2 centroids | [11:4] centroid, [3:0] dimension | signed 11 bits |
| 3 engine registers | [19] engine, [7:0] register | 0: fh[4:0], fw[9:5]; 1: root bias; 2: pruning threshold; 3: detection threshold; 16+8p+0: ph[3:0], pw[7:4] of part p; +1/+2: anchor ax/ay; +3..+6: a1..a4 |
| 4 root weights | [19] engine, [7:0] cell i·FW+j, [8] word | low word [31:0] first, then the high word [10:0], which commits the cell |
| 5 part weights | [19] engine, [11:9] part, [5:0] cell, [8] word | as for root weights |

Register writes to an engine whose clock is gated off are lost.

## Where this design departs from, or adds to, the published architecture

The following follow the published architecture:

- the 12-level pyramid with per-level filtering;
- three histogram/normalisation engines;
- sparse projection with the 43-bit selected-MAC weight cell;
- 256-centroid VQ in 8 banks with three engines;
- 32-row index storage;
- root/part level pairing;
- pruning on the root score;
- eight parallel part classifiers with a coarse-to-fine search;
- two engines;
- four clock enables.

These are this design's own choices:

- the shared 5×5 pixel window;
- the exact LPF kernels;
- gradient and binning arithmetic;
- the L1 normalisation with clip;
- the 13-D feature layout;
- every bit width not listed above (26-bit scores);
- the projection shift;
- the lock-step VQ schedule;
- the scores-memory layout;
- the candidate queue depth;
- the anchor convention;
- the row-wait rule;
- the register map;
- the frame protocol.

What was not modelled:

- SRAM macros, pads and other physical parts;
- the external system (camera, DRAM, FPGA, display);
- non-maximum suppression of overlapping detections (done off-chip);
- trained models, so no detection accuracy is claimed.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each testbench:

- compares the module with a behavioural reference;
- prints `TB_RESULT checks=N failures=M`;
- stops through a watchdog if the module hangs.

Notable ones:

- **`tb_fpg`.** Runs a 320×240 textured frame. It checks the exact feature count per level,
  value ranges, random output stalls and simultaneous outputs.
- **`tb_class_engine`.** Uses a 320×240 geometry with a 2×3 root and eight 2×2 parts. Every
  detection is checked against a reference:
  - root score;
  - pruning;
  - coarse-to-fine search over de-quantised features.

  It also checks a root-only pass.
- **`tb_dpm_top`.** Runs 320×240 frames end to end.
  - **Frame 0** calibrates the thresholds.
  - **Frame 1** runs engine 0 with parts and engine 1 on root scores alone.
  - **Frame 2** runs engine 1 with its clock gated off.
  - **Reference.** The testbench observes the features and the stored indices and recomputes
    both engines' detections exactly.
  - **Mechanism counts.** It counts these and fails if any never happened: pruned and kept
    windows, DPM and root-only detections, multi-feature VQ batches, multi-write FIFO
    cycles, `frame_done`, and stopped clocks.
- **`tb_dpm_top_full`.** The same test at the default parameters (1920×1080). Three frames
  run in about a minute, including the build, with Verilator.

The testbenches set the top-level sizes only through `IMG_W`/`IMG_H`. Run any of them with:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dpm_pkg.sv \
    $(ls rtl/*.sv | grep -v dpm_pkg) tb/tb_dpm_top.sv --top-module tb_dpm_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

All state that is read is reset, so results do not depend on the initial values.

What is *not* verified:

- Timing closure and the clock rates.
- The FPG against a software HOG implementation. It is checked for structure, counts and
  ranges, and its arithmetic per unit, but not value by value for a whole frame.
- Detection quality with real models.
- Candidate-queue overflow. It appears when far fewer than 80% of windows are pruned. It is
  flagged, not handled.
