# Fast intra prediction core for a scalable H.264 (SVC) encoder

An H.264/AVC intra encoder normally tries every prediction mode for every
block size: nine 4x4 modes in each of sixteen 4x4 blocks, nine 8x8 modes,
four 16x16 modes and four chroma modes, each with a full cost evaluation. A
scalable (SVC) encoder that codes three quality layers for three picture sizes
at 60 frames/s cannot afford that. This RTL implements a cheaper scheme in two
steps, both driven by transform coefficients of the *original* pixels:

1. **Block-size decision.** Two smoothness measures of the macroblock (MB)
   pick 4x4, 8x8 or 16x16 before any prediction is tried.
2. **Mode candidates.** The direction of texture in each 4x4 block keeps at
   most five of the nine 4x4 modes (DC is always kept); the 8x8 candidates are
   merged from the four 4x4 candidate sets inside each 8x8 block, so the 8x8
   size needs no analysis of its own.

The hardware side rests on one more idea: **two MBs from different frames are
encoded together, interleaved block by block.** Intra prediction of a 4x4
block needs the reconstructed pixels of its left and upper neighbours, so a
single MB would leave the datapath idle while each block goes through
quantisation, inverse transform and reconstruction. With two independent MBs,
block k of MB B is mode-decided while block k of MB A is being reconstructed.

The reconstruction loop also produces three quality layers: the base layer
at QP, and two refinement layers that re-quantise, at QP-6 and QP-12, what
the previous layer left out.

## Block-size decision (`block_size`, `cost_mode`, `trans48dc`)

Each original 4x4 block goes through the 4x4 integer transform. Two sums come
out of it:

* **AC2** adds |F01| + |F10| + |F20|, the first three AC terms in zig-zag
  order, over the 16 blocks. It measures texture *inside* the 4x4 blocks.
* **AC1** is taken from the 4x4 Hadamard transform of the 16 DC terms. It adds
  |H(i,j)| * floor((i+j-1)/2), so only the upper frequencies count, with
  weights 1 and 2. It measures how the block averages vary *across* the MB.

The thresholds depend on QP:
TH1 = 2571.4 QP^2 - 1228.6 QP + 1000 and TH2 = 228.57 QP^2 - 891.43 QP + 1220.
`block_size` computes them in fixed point with integer division. It then
chooses 4x4 if AC1 >= TH1, otherwise 8x8 if AC2 >= TH2, otherwise 16x16.

`cost_mode` is the single cost unit for the whole core. Each cycle it takes
one transformed 4x4 block. Its `sel` input chooses what it adds to its
accumulator: SATD (sum of |coefficients| of the integer transform, not the
Hadamard), SATD without DC, the AC2 terms, or either of the two AC1 weight
classes. In the same cycle it forms the texture intensities
IV = |F01|+|F02|+|F03| and IH = |F10|+|F20|+|F30| and derives candidates
from them:

| condition     | 4x4 candidates                         | 16x16 candidates (on the DC Hadamard) |
|---------------|----------------------------------------|---------------------------------------|
| IV > 2 IH     | DC, vertical, vertical-right, vertical-left   | DC, vertical (IV > IH)          |
| IH > 2 IV     | DC, horizontal, horizontal-down, horizontal-up | DC, horizontal (IH > IV)       |
| otherwise     | DC, vertical, horizontal, both diagonals-down  | DC, plane (IV = IH)            |

These thresholds are this design's own choice. The transform-domain method the
scheme is based on uses its own rules; change them in one `case` of
`cost_mode.sv`.

`mode8x8` merges the candidate sets. Let S_n be the number of 4x4 blocks in
the 8x8 block that list mode n. Vertical and horizontal are kept if S_n > 0.
Modes 3 to 8 are kept if S_n > 1. DC is always kept. The highest mode numbers
are then dropped until at most four modes remain.

## The two datapaths

The core has two datapaths of different width:

* **Intra-residue path, 16 pixels per cycle.** It holds prediction (`pred`,
  `pred_dc`, `pred_plane`), `residue`, the forward transform `trans48dc` and
  `cost_mode`.
  * `pred` produces one 4x4 group of predicted pixels per cycle for any
    direction. A 4x4 block takes 1 cycle, 8x8 and chroma blocks 4 cycles, and
    16x16 blocks 16 cycles.
  * DC prediction needs a sum over all neighbours, and plane prediction needs
    a parameter stage. They have their own units, each with a register stage.
  * `trans48dc` transforms a whole 4x4 block (integer or Hadamard) in one
    cycle, or an 8x8 block in four cycles of two rows each. Its separate 4x4
    vertical stage lets 4x4 blocks pass while an 8x8 block drains.
* **Reconstruction / quality path, 8 coefficients per cycle.** It holds
  `quant`, `iquant`, `norm_minus`, `itrans48dc` and `recon`. A 4x4 block
  passes as two halves of two rows each. `itrans48dc` takes 2 cycles in and
  gives 2 cycles out for a 4x4 block, and 8 in and 8 out for an 8x8 block.

Only the quality path needs the cheaper width. Each layer is only a
quantisation, so 8 coefficients per cycle cover three layers of two MBs in the
cycle budget.

### Quality layers (`norm_minus`)

Let W be the pre-quantised coefficients of a block. Each layer works as
follows:

    Z_l     = quant(W_l, QP_l)
    W_{l+1} = W_l - sign(Z_l) * ((|Z_l| * round(2^27 / MF) << QP_l/6) + 2048) >> 12

Here MF is the forward quantiser multiplier of the coefficient position, and
QP_l = QP - 6l, clamped at 0. The term subtracted is the level mapped back to
the forward-transform scale. The remainder W_{l+1} is therefore what the next
layer, with a finer step, still has to code.

The decoder's view of layer l is the sum of the dequantised layers 0..l. The
core reconstructs two of them:

* the base layer, which is the reference for all later intra prediction;
* the sum of all three layers, which is the highest quality.

## Top level: `svc_intra_top`

### Phases

`global_ctrl` runs the encoder pipeline. It starts all stages, waits for the
end signal of every stage, flips the ping-pong memory select and starts
again. Stage 0 is this core. Stages 1 and 2 stand for the inter-prediction
side and the entropy-coding/loop-filter side. They are outside this design,
so their start and end signals are ports. For each MB pair the core goes
through these phases:

1. **Load (≈66 cycles).** Reads both MBs' luma from the dual-port current-MB
   memory (96 x 64 bits, two MBs with chroma) into registers.
   * The host writes the memory through `cur_we/cur_addr/cur_wdata`.
   * Layout: word = 8 pixels of one row, address = mb*48 + y*2 + x/8.
2. **Analysis (22 cycles per MB).**
   * Cycles 0-15: the 16 original blocks enter `trans48dc`, and their
     results enter `cost_mode` one cycle later. This gives AC2 and the 4x4
     candidates.
   * Cycle 17: the DC matrix goes through the Hadamard.
   * Cycles 18-19: two `cost_mode` passes give AC1 and the 16x16 candidates.
   * Cycle 21: `block_size` decides, and the merged 8x8 candidates come out
     of four `mode8x8` instances.
3. **Encode.** Two stages run concurrently over the 32 luma 4x4 blocks.
   * **Mode decision**, one block at a time:
     * Wait for the neighbour reconstruction (counted in `dep_stall`).
     * Latch the neighbours and start `pred_dc`.
     * Feed one candidate per cycle through `pred` → `residue` →
       `trans48dc` → `cost_mode`.
     * The cost is SATD + 4λ, with the 4λ left out for the most probable
       mode. λ = 0.85·2^((QP−12)/3).
     * Drain, re-transform the winner and write its coefficients to the
       two-port coefficient memory (96 x 136 bits = eight 17-bit coefficients
       per word).
     * Hand the block to the reconstruction stage.
     * This takes 9 + (number of candidates) cycles.
   * **Reconstruction**, a fixed 11-cycle schedule per block:

     | cycle | 0-5 | 1-6 | 3-4 | 5-6 | 7-8 | 9-10 |
     |---|---|---|---|---|---|---|
     | unit | quant (layer 0 h0,h1, layer 1, layer 2) | iquant + norm_minus | itrans (base layer) | recon → base-layer memory | itrans (sum of layers) | recon → top-layer memory and stream |

     The base-layer pixels are ready after cycle 6. At that point the
     mode-decision stage may start a block that needs them.

`interleave` selects the block order:

* `interleave=1`: A0 B0 A1 B1 … A15 B15. The mode-decision stage never waits:
  `dep_stall` is 0, and an MB pair takes about 550 cycles.
* `interleave=0`: A0…A15 B0…B15. Every block waits for its predecessor, about
  7.5 cycles each (240 cycles per pair).

Both orders give bit-identical results.

The whole operation, from `go` to the last reconstruction, takes exactly
412 + (candidates evaluated) + `dep_stall` + `hand_stall` cycles. The 412
fixed cycles are the 64-cycle load, 2 x 22 analysis cycles, the per-block
states other than candidate evaluation, and the last block's
reconstruction. The end-to-end testbench checks this count in every round.

### Outputs

* Analysis results per MB: AC1, AC2, block size, 4x4, 8x8 and 16x16
  candidates.
* The chosen 4x4 modes.
* A level stream: one half block of one layer per cycle, tagged with MB,
  block, layer and half.
* A top-layer reconstruction stream.
* Read ports on the base-layer and top-layer reconstruction memories. They are
  block-organised: address mb*48 + blk*2 + half, one word = two columns of a
  4x4 block. Read them while `busy` is low.
* Statistics: `dep_stall`, `hand_stall`, `cand_evals`, `enc_cycles`.

The chroma-DC Hadamard (`hadamard2x2`), the chroma candidate rule
(`mode_chroma`: DC and plane always, plus vertical if IV ≥ IH, else
horizontal) and the plane predictor are brought out as side ports.

### What the top does not do

* **Only 4x4 coding of luma is sequenced.** The core makes the block-size
  decision and forms the 8x8 and 16x16 candidates, but then codes every MB
  with 4x4 blocks. The units for the other passes exist and are tested:
  8x8 transforms in both transform units, 8x8 (de)quantisation (one row of
  an 8x8 block per cycle, `mode = QM_AC8` with the row number on `row`),
  16x16/chroma prediction, DC/plane prediction, chroma-DC Hadamard and
  chroma candidates. No controller drives the 8x8, 16x16 and chroma passes.
* **Quality layers for 4x4 AC only.** `norm_minus` covers 4x4 AC positions
  only.
* **Neighbours are inputs.** Neighbouring pixels come in as ports, and
  neighbours inside the MB come from register copies. The 960 x 64 neighbour
  row memory, the 240 x 16 neighbour mode memory and the 24 x 76 best
  coefficient memories are not instantiated; `sram_sp` and `sram_dp` can be
  sized for them.
* **Most probable mode at MB edges.** Neighbouring-MB modes are not inputs, so
  the most probable mode at MB edges is DC.
* **Throughput.** The measured 544-563 cycles per MB pair, for luma only, are
  above the 454-cycle budget of 594,360 MB/s at 135 MHz (CIF + SD + 1080p at
  60 frames/s). At 135 MHz the core keeps up with CIF and SD at 60 frames/s,
  but not with 1080p alone (it needs about 138 Mcycles/s).

## Choices made in this design, and where it follows the scheme

Taken from the scheme:

* the two measures AC1 and AC2, their QP thresholds and the size decision
  order;
* SATD on the integer transform;
* the 8x8 merge rule and the limit of four modes;
* DC always a 4x4 candidate and plane always a chroma candidate;
* the 16-/8-pixel datapath split and the interleaving of two MBs;
* three quality layers;
* transform and prediction unit timing (4x4 in 1 cycle, 8x8 in 4; inverse
  4x4 in 2+2, 8x8 in 8+8);
* memory shapes;
* the start/end protocol of the global controller.

This design's own choices:

* **Mode candidates.** The IV/IH definitions and the candidate thresholds.
  The 16x16 candidate rule.
* **Weights and QP steps.** The fixed-point thresholds, the MPM penalty
  approximation `(218|274|345 << QP/3) >> 10`, and the quality-layer QP step
  of 6.
* **Remainder normalisation.** The normalisation in `norm_minus`, and the
  intra rounding offset 2^qbits/3 in `quant`. The 8x8 forward multipliers
  are computed as MF8 = round(2^36 / (n_i · n_j · V8)), where n_k is the
  squared norm of row k of the 8x8 core transform scaled by 8 (512, 578,
  320, 578, 512, 578, 320, 578) and V8 the standard's 8x8 scale. This gives
  the usual reference-encoder table.
* **Scheduling.** All cycle schedules, the handover register and the
  register copies of the current MB and base-layer reconstruction.
* **Formulas.** The H.264/AVC equations are used wherever the formulas are
  standard: prediction, DC rules, plane parameters (with a = 16·(p(−1,15) +
  p(15,−1))), chroma plane, (de)quantisation and transforms.
* **Reset.** Asynchronous active-low reset `rst_n` everywhere.

## Files

`rtl/intra_pkg.sv` holds the shared types and functions. They are:

* pixel and coefficient types (8-bit unsigned, 18-bit signed);
* transform kinds, block sizes and quantiser modes;
* mode numbers;
* the quantiser, dequantiser and normaliser tables, as functions.

The other files, one module each:

| module | function |
|---|---|
| `trans48dc` | forward 4x4 integer / 4x4 Hadamard / 8x8 integer transform |
| `itrans48dc` | inverse transforms, 8 coefficients per cycle |
| `cost_mode` | SATD, AC1, AC2 accumulation, texture intensities, 4x4 / 16x16 candidates |
| `block_size` | TH1/TH2 and the block-size decision |
| `mode8x8` | 8x8 candidates merged from 4x4 candidates |
| `mode_chroma` | chroma candidates |
| `pred`, `pred_dc`, `pred_plane` | directional, DC and plane prediction |
| `residue`, `recon` | subtraction and clipped addition |
| `quant`, `iquant`, `norm_minus` | quantisation, scaling, quality-layer remainder |
| `hadamard2x2` | chroma DC transform |
| `sram_sp`, `sram_dp`, `sram_tp` | single-, dual- and two-port memory models (synchronous arrays) |
| `global_ctrl` | start/end pipeline handshake with ping-pong select |
| `svc_intra_top` | the core described above |

Each `tb/tb_<module>.sv` tests one module against a model computed in the
testbench. It prints `TB_RESULT checks=<n> failures=<m>` and contains a
watchdog.

`tb/tb_svc_intra_top.sv` runs the top at its default size. It runs six MB
pairs: blocky texture, fine stripes, ramps, bars and noise, at QP 4, 6, 16
and 28, with some neighbours missing. It checks every output against a
complete behavioural model of the algorithm written in the testbench. It also
requires that each mechanism occur at least once:

* all three block sizes;
* MB alternation;
* dependency stalls in sequential order and none when interleaved;
* non-zero levels in each layer;
* candidate pruning;
* ping-pong switching;
* the side units.

## Simulating

With Verilator 5 (the package first, then the modules):

    verilator --binary --timing -Irtl rtl/intra_pkg.sv rtl/*.sv tb/tb_svc_intra_top.sv \
              --top-module tb_svc_intra_top -o sim
    ./obj_dir/sim

`rtl/intra_pkg.sv` then appears twice on the command line. Verilator accepts
that with a warning; list the files explicitly to avoid it. For a unit test,
replace the testbench file and the `--top-module` name. All testbenches finish
in well under a minute.

The memories are plain arrays. To use SRAM macros, replace `sram_*.sv` with
wrappers that have the same ports: the read latency is one cycle. In
`sram_tp`, a read of the address being written returns the old word.
