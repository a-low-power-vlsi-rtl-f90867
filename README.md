# Sparse FIND object-recognition core

This core finds objects such as pedestrians in video. It slides a 24 × 64-pixel detection
window over each image, moving it 4 pixels at a time, and scores every position with a linear
SVM. It uses two classifiers in sequence:

1. **HOG.** A cheap classifier on HOG (histogram of oriented gradients) features scores every
   window. Each window has 2,400 features. Windows whose score is not above a rejection
   threshold α are dropped.
2. **Sparse FIND.** A more accurate classifier scores only the windows that survive. Its
   features are products of pairs of histogram elements, normalised by the block's energy. A
   pair is used only when both elements are larger than the block's mean element. This
   "sparsification" leaves about 3,300 features per window, against 76,800 for the full set of
   pair features.

Both classifiers are organised around the **block**, not the window:

- a block is 2 × 2 cells of 4 × 4 pixels;
- every block is computed once;
- every block is fed once into 75 multiply-accumulate units (MACs), one for each window
  position it can take.

Window scores build up as partial sums that move through a fixed chain of MACs. So no feature
is ever computed twice, although the windows overlap heavily.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. Everything below the pixel input
is implemented: the gradient, the SVM classifiers and the two-stage controller. The image
pyramid (the image scaled by 2^(-1/6) per level) is produced outside the core. The core
processes one pyramid level as one frame.

## Data flow

```
pixels (column-major, 1/clock)
  -> gradient_unit       gradient, 11-step CORDIC: magnitude and 8 orientation bins
  -> cell_histogram      8-bin histogram per 4x4-pixel cell
  -> block_former        32-element block vector H from 2x2 cells, stride one cell
  -> sparse_threshold    marks the elements h_i > mean(H)
  -> normalize_coef      S = sum h_i^2; 4 Newton steps of 1/sqrt(S); gives sqrt(a) and a = 1/S
  -> core_controller
       FIFO -> block buffer (8 block columns)
       HOG stage:         hog_feature -> svm_classifier (1 block per step)   -> kept-window map
       Sparse FIND stage: sparse_feature_calc -> svm_classifier (2 blocks per step) -> detections
       coefficients:      svm_coef_ram (HOG, 4 banks) and svm_coef_ram (Sparse FIND, 16 banks)
```

The first five units are the **common stage**. They all advance on one enable.
`core_controller` drops that enable when it must stop the input. The top module is
`sparse_find_processor`. Shared types and constants are in `sfind_pkg`.

## Features and number formats

**Gradient.** The gradient is a backward difference: dx = I(x,y) − I(x−1,y) and
dy = I(x,y) − I(x,y−1), with zero at the image border. The vector is folded into the upper half
plane, which makes the orientation unsigned (0–180°).

**CORDIC.** A vectoring CORDIC then runs 11 micro-rotations, with 8 fractional bits, so the rounded magnitude is within 0.02 of exact. Angles are
in units of 180/4096°, so the bin is the top 3 bits of the angle (22.5° per bin). The magnitude
keeps the CORDIC gain K ≈ 1.647. The gain cancels in every normalised feature.

**Block vector.** Cell histograms hold 16-bit sums. A block's vector H = (h_1 … h_32) lists its
cells in this order: top-left, top-right, bottom-left, bottom-right, 8 bins each. Blocks overlap
with a one-cell stride. So a window of 6 × 16 cells holds 5 × 15 = 75 blocks.

**Sparsification.** An element is selected when h_i > k · mean(H), with k = 1.0. The test is
done without division, as 2·32·h_i > K_X2 · Σh. K_X2 = 2k makes k = 0.5, 1.0, 1.5 and 2.0 exact.

**Normalisation.**

- S = Σh_i² is written as m · 4^e, with 1 ≤ m < 4.
- Newton's iteration for the inverse square root runs 4 steps, y ← y(3 − m·y²)/2. It starts
  from a 3-entry seed table.
- This gives two values:
  - r = 1/sqrt(S) as an 18-bit Q1.17 mantissa with exponent e;
  - a = 1/S as the squared mantissa with exponent 2e.
- A block with S = 0 gives zero features.

**Features.** Both are unsigned Q0.16:

- HOG feature: h_i · r.
- Sparse FIND feature: h_i · h_j · a, for selected pairs i < j (496 possible pairs per block).

**Scores.** SVM coefficients are signed 16-bit Q3.12. A product is Q3.28. Scores, biases and
thresholds are signed 48-bit Q19.28.

## Window scores: 5 cores × 15 MACs

This part is the least obvious, and it is the same for both stages (`svm_classifier`).

Take block (bx, by). It is block (c, j) of the window whose top-left block is (bx − c, by − j),
for c = 0..4 and j = 0..14. The classifier therefore has 5 **cores** (the window-column offset
c), each made of 15 **MACs** (the row offset j). When the block arrives, MAC (c, j) adds the
block's features times the coefficients of position (c, j). The coefficient memory returns one
word per read that holds the same feature's coefficient for all 75 positions, so one read
serves all MACs.

Blocks come in column by column, top to bottom. At the end of a block ("step"):

- MAC j of core c takes the partial sum that MAC j−1 had after the previous block. Moving down
  the chain follows the window down by one block row.
- MAC 0 of core 0 starts from the bias.
- MAC 0 of core c > 0 starts from the **intermediate-result RAM** of core c−1. That RAM holds
  the sums core c−1 completed in the previous block column, indexed by window row.
- The sum leaving MAC 14 of core c has collected block columns 0..c of a window.
  - For c < 4 it is written to that core's intermediate RAM.
  - For c = 4 the window is finished. The **detector** compares it with the threshold, and
    reports the result one clock after the step.

Each window is scored exactly once. Each block is fed exactly once.

The Sparse FIND stage steps two vertically adjacent blocks at a time (GROUP = 2). Each MAC has
one accumulator per block of the pair. The chain then moves two rows per step:

- MAC j of block B takes block A's MAC j−1 of the same step;
- MAC j of block A takes block B's MAC j−1 of the previous step.

Each MAC has an enable per window. A MAC whose window was rejected by the HOG stage adds
nothing. Its result is thrown away at the detector.

## Block-parallel Sparse FIND features

A block selects a variable subset of its 496 pairs, typically a few dozen. The Sparse FIND
coefficients are spread over N = 16 banks:

- pair k (lexicographic order (1,2), (1,3), …) is in bank k mod N, at address k div N;
- each bank reads one word per clock.

If one block were processed alone, a block whose selected pairs crowd into a few banks would
waste most of the banks. `sparse_feature_calc` works on two blocks A and B together:

- each clock, each bank serves the lowest pending pair of A that it holds, otherwise the lowest
  pending pair of B;
- one feature extractor per bank forms h_i · h_j · a for the block it served;
- the result goes to that block's MACs.

A pair of blocks therefore takes max over the banks of (accesses of A + accesses of B) clocks,
instead of the sum of the two per-block maxima. The testbench checks this count exactly.
`sf_pair_cycles` reports it for each block pair.

## Two-stage schedule and the stop signal

`core_controller` runs both stages at once on different block columns:

- **HOG stage.** It takes blocks from an 8-entry FIFO. It stores each block in a buffer of 8
  block columns. It feeds 4 features per clock to the HOG classifier. It marks each finished
  window "kept" when its score is above α.
- **Sparse FIND stage.** It may begin block column s once the HOG stage has finished column
  s + 4. At that point every window containing a block of s has been decided. It walks the
  column in block pairs. A MAC's window enable comes from the kept map. A block pair that lies
  in no kept window is skipped in a single clock. Only kept windows whose Sparse FIND score is
  above `sf_threshold` are reported. There can be up to two reports per clock (one per block of
  the pair).

When rejection is low, the Sparse FIND stage is the slower one. The HOG stage then reaches a
buffer column the Sparse FIND stage has not yet released, and waits. The FIFO fills, and
`pix_ready` (the common stage's enable) goes low. This is the stop signal: the common stage and
the HOG stage stop until the Sparse FIND stage catches up.

## Interface (sparse_find_processor)

| signal | meaning |
|---|---|
| `start`, `img_w`, `img_h` | Begin a frame of img_w × img_h pixels: multiples of 4, from 24 × 64 up to 1920 × 1080. |
| `pix_valid`, `pix[7:0]`, `pix_ready` | Luminance, column by column, top to bottom. A pixel is taken when valid and ready are both high. |
| `coef_wr_en`, `coef_wr_sel`, `coef_wr_pos`, `coef_wr_idx`, `coef_wr_data` | Coefficient load. `sel` 0 is HOG (`idx` = element 0–31) and 1 is Sparse FIND (`idx` = pair 0–495). `pos` = 15c + j. Load before `start`. |
| `hog_bias`, `hog_alpha`, `sf_bias`, `sf_threshold` | Q19.28. α plays the role of the rejection threshold; values between −1.18 and −0.68 are typical operating points. |
| `det_valid[1:0]`, `det_wx`, `det_wy`, `det_score` | Detections. The window's top-left block gives the pixel position 4·wx, 4·wy. |
| `frame_busy`, `frame_done` | `frame_done` pulses after the last block column. |
| `ev_*`, `sf_pair_cycles` | One-clock event strobes for monitoring: stop, HOG wait, HOG window finished/rejected, block pair done/skipped. |

**Parameters and their defaults.**

- `N_BANKS` = 16 Sparse FIND banks.
- `LANES_HOG` = 4.
- `BUF_COLS` = 8. It must be a power of two and at least 8.
- `K_X2` = 2, which gives k = 1.0.
- `MAX_HEIGHT` = 1080.

The CORDIC and Newton step counts (11 and 4) are parameters of their units.

**Latency.** The gradient unit takes 14 clocks (CORDIC steps + 3). Normalisation takes
4 + 3 clocks.

## Throughput and sizes

- **Input rate.** The common stage takes one pixel per clock. An HDTV frame with its full
  pyramid is about 1920·1080 / (1 − 2^(−1/3)) ≈ 10 Mpixel. At 130 MHz that is about 13 frames/s,
  not 60. Reaching 60 frames/s at that clock needs about 4.6 pixels per clock, which means
  several parallel front ends or scaled levels fed in parallel. This design does not provide
  them.
- **Measured frame time.** One 1920 × 1080 level takes about 2.95 M clocks in simulation, or
  1.42 clocks per pixel. This figure comes from the full-size testbench with its synthetic
  image. The loss comes from the HOG stage, not from Sparse FIND:
  - all blocks of a block column leave the common stage during the last pixel column of each
    cell column, one every 4 clocks;
  - the HOG stage needs about 11 clocks per block (8 clocks of features and the step).

  The 8-entry FIFO therefore fills in every cell column, and the stop signal holds the input.
  Either of two changes would remove most of this loss:
  - a FIFO of one block column (269 entries);
  - `LANES_HOG` = 16.
- **Sparse FIND rate.** With 16 banks the Sparse FIND stage is not the limit on that image.
  With few banks, or dense blocks and low rejection, it is the limit. The HOG stage then waits
  for buffer space, and the stop signal comes from the Sparse FIND side. `tb_core_controller`
  exercises this case.
- **Memory.** The coefficients take (75·32 + 75·496) · 16 bit ≈ 0.63 Mbit. The block buffer
  (8 columns × 269 blocks × 607 bits) takes about 1.3 Mbit. Both are written as arrays and are
  meant to map to SRAM.

## Departures and own choices

The architecture follows a published low-power HDTV object-recognition processor: two-stage
HOG / Sparse FIND classification, 5 × 15 MACs with an intermediate-result RAM, banked
coefficients, block-parallel feature extraction, an 11-step CORDIC, 4 Newton steps, and a stop
signal from the Sparse FIND controller. The points below are where this RTL makes its own
choices or differs.

- **Rejection rule.** The published description states the rejection rule both ways. A window is *kept* when its HOG score is above α, and rejected otherwise.
  This is the reading under which a larger α rejects more windows.
- **Unspecified front-end details.** Pixel order, gradient kernel, unsigned orientation, hard
  binning, block stride, the order of cells in H, all word widths, the seed table, and the Q
  formats are this design's choices.
- **Which blocks are paired.** The two blocks processed together are vertically adjacent
  blocks of one column. The number of banks (16) is likewise a choice.
- **Controller internals.** The FIFO, the block buffer depth, the kept-window map, the skip of
  empty block pairs, and the rule for starting a Sparse FIND column are this design's own.
- **Not included:**
  - the image-pyramid scaler;
  - on-chip SRAM macros, since memories are plain arrays;
  - any host or video interface.

## Simulation

Each unit has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The reference values are computed in
the testbench, mostly in real arithmetic. The testbenches use only two-state values and
`$urandom`.

| testbench | what it checks |
|---|---|
| `tb_gradient_unit` | CORDIC magnitude and bin against exact values, 14-clock latency |
| `tb_cell_histogram`, `tb_block_former` | Histograms and block vectors against a software model |
| `tb_sparse_threshold` | Selection bits, including exact ties |
| `tb_normalize_coef` | sqrt(a) and a to Newton precision, latency |
| `tb_hog_feature`, `tb_svm_coef_ram` | Feature arithmetic, bank placement and read timing |
| `tb_svm_classifier` | Window scores through cores, chain and intermediate RAM, window enables |
| `tb_sparse_feature_calc` | Features, and the exact clocks per block pair (max over banks of the summed accesses) |
| `tb_core_controller` | Both stages, rejection, skipping, stop signal and detections on synthetic blocks |
| `tb_sparse_find_processor` | Whole core at its defaults on a 48 × 80 image; every window and every block judged |
| `tb_sparse_find_processor_full` | Whole core at its defaults on one 1920 × 1080 frame; about 400 windows judged, every block compared |

The end-to-end tests build an image whose gradients are exact and lie away from bin edges, and
random coefficients. They set α and the detection threshold at the median scores, and compare
rejection, detections and scores with the model. The tests count each mechanism (stop, HOG
wait, rejection, skipped and worked block pairs, detections) and fail if a required one never
occurs.

To run one with Verilator 5:

```
verilator --binary --timing -Irtl -yrtl rtl/sfind_pkg.sv tb/tb_svm_classifier.sv \
          --top-module tb_svm_classifier -Mdir obj && ./obj/Vtb_svm_classifier
```

The package is listed first; `-yrtl` finds the modules by name. The two whole-core testbenches take several minutes
to compile, because the classifiers hold about 1,500 multipliers.
