# H.264 high-profile intra encoder datapath (8-pixel parallel)

This RTL implements the intra-coding core of an H.264/AVC high-profile
encoder. High profile adds intra 8x8 luma prediction with an 8x8 transform
to the 4x4 and 16x16 modes of baseline. That adds about a third more mode
decision work per macroblock, but the original design had to keep the same
per-macroblock cycle budget. The architecture meets that with four ideas,
and all four are in this RTL:

* **Two prediction paths running at the same time.** The 4x4 path predicts
  two rows of a 4x4 block per cycle (eight samples). An additional 8x8 path
  predicts one row of an 8x8 block per cycle, also eight samples. Each path
  has its own forward transform, cost unit and mode decision.
* **Cheap decisions.** The cost is an *enhanced SATD* (ESATD): the sum of the
  absolute transform coefficients, weighted with values taken from the
  quantizer scaling. A *three-step fast search* evaluates only 7 of the 9
  directional modes, and plane prediction is dropped entirely.
* **Re-computation instead of buffering.** Once a mode is chosen, its
  prediction and transform are computed again from the same inputs rather
  than stored while the other modes were tried. For 8x8 this is done twice:
  once for the coefficients and once for the prediction values.
* **One reconstruction chain for everything.** Eight lanes run through
  quantization, de-quantization, inverse transform and the add. They sit
  behind single-port buffers. A deblocking filter follows, and it visits
  block edges in an interleaved order that gives the standard's result.

Everything is 8 bits per sample, 4:2:0, constant QP per region.

## What is here

| Module | Role |
|---|---|
| `h264_pkg` | types, scaling tables, deblocking tables, intra prediction equations |
| `intra_pred_gen` | 4x4 (and 16x16/chroma-style) prediction, 2 rows of a 4x4 block per cycle |
| `intra8_pred_gen` | 8x8 luma prediction with reference filtering, 1 row per cycle |
| `fwd_transform` | forward 4x4 DCT, 8x8 DCT, 4x4 and 2x2 Hadamard |
| `esatd_cost` | weighted absolute sum of coefficients (4x4 and 8x8) |
| `mode_decision` | three-step fast search with compare-and-replace |
| `quantizer` / `dequantizer` | eight coefficients per cycle; two 4-lane halves share one table |
| `inv_transform` | inverse 4x4/8x8 DCT and 4x4/2x2 Hadamard |
| `recon_add` | `(res + 32) >> 6`, add prediction, clip |
| `sp_sram` | single-port synchronous RAM model (registered read) |
| `residual_buffer` | transformed residuals: luma 32 x 120 bits, chroma 16 x 104 bits |
| `reference_buffer` | prediction values: luma 2 x (32 x 32 bits), chroma 2 x (16 x 32 bits) |
| `coef_buffer` | quantized levels for the entropy coder: luma 16 x 224, chroma 8 x 192 |
| `deblock_filter` | standard edge filter, one 8-sample line per cycle |
| `dbf_edge_order` | walks the 48 edges of a macroblock in interleaved order |
| `intra_encoder_top` | the whole flow for one 8x8 luma region |

The top does not encode a whole macroblock. It takes one 8x8 luma region
and its neighbourhood (four rows above, 16 wide, and four columns to the
left). It runs the 4x4-versus-8x8 decision, reconstruction and deblocking,
and returns:

* the modes and costs;
* the deblocked region, plus the changed neighbour samples;
* a read port into the coefficient buffer for an entropy coder.

These parts are not built:

* The macroblock-level scheduler: four regions interlaced, luma 16x16 and
  chroma.
* The entropy coder.
* Motion estimation, which shares the buffers in the full encoder.
* The frame memories of the deblocking engine.

The building blocks for 16x16 and chroma do exist. The generator takes an
external DC value, the transforms do 4x4 and 2x2 Hadamard, and the
de-quantizer has the DC modes. Each of these is tested on its own.

## Flow of one region (`intra_encoder_top`)

```
start ─► T_MD ──► 4x4 path: decide block b (7 modes) ─► T_A_RECOMP ─► T_RECON ─┐
          │                                                                     │ b = 0..3
          │       (back to T_MD for the next block, predicting from rec) ◄──────┘
          └─────► 8x8 path: decide the 8x8 block (7 modes), in parallel
                                   │
                 T_DECIDE: cost8 < sum of four 4x4 costs ?
                   yes ─► T_B_RECOMP (coefficients) ─► T_B_PRED (prediction) ─► T_RECON (8x8)
                   no  ─┐
                        ▼
                 T_DBF: edges of the region, in edge-order, one line per 2 cycles ─► done
```

* **4x4 path.** The blocks go in reconstruction order 0 1 / 2 3. Each block
  is decided, then its best mode is computed once more. That pass writes
  two things: the transform output goes to the residual buffer, and the
  prediction goes to the reference buffer. The reconstruction phase then
  reads both. It quantizes, writing the levels to the coefficient buffer,
  then de-quantizes, inverse-transforms and adds. The next block predicts
  from this reconstruction. Block 3 has no top-right neighbour, so its last
  top sample is repeated.
* **8x8 path.** It starts with the 4x4 path and finishes long before it.
  If 8x8 wins, the best 8x8 mode is re-run twice. The first pass sends its
  coefficients to the residual buffer. The second regenerates its
  prediction for the adder.
* **Deblocking.** `dbf_edge_order` produces all 48 edges. The top filters
  only the edges of its region:
  * the left and top macroblock edges, with bS 4, against the neighbour
    samples;
  * the internal 4x4 edges, with bS 3, but only when the 4x4 transform won.

  Results are written back in place.
* **Run time.** It is reported on `cycles`. The testbench measures at most
  450 cycles per region.
* **Events.** The `ev_*` outputs pulse on:
  * each mode decision, and which third-step branch it took;
  * the start of deblocking, when `rec_out` still holds the unfiltered
    reconstruction;
  * each filtered line.

Handshake: drive `src`, `top_px`, `left_nb`, `corner`, `qp` and the most
probable modes. Pulse `start` for one cycle and wait for the `done` pulse.
The outputs stay valid until the next `start`.

## Mode decision and the cost function

`mode_decision` asks for one mode's cost at a time: `req_valid` with
`req_mode` out, then `cost_valid` with `cost` back. It runs three steps:

1. Modes 0 (vertical), 1 (horizontal) and 2 (DC).
2. Modes 3 and 4 (the two diagonals).
3. If cost(0) < cost(1), modes 5 and 7 (near vertical), otherwise 6 and 8
   (near horizontal).

The least cost wins. On equal cost, the mode evaluated first is kept. The
most probable mode starts from `mpm_init_cost` instead of zero; the encoder
takes that value from its lambda table. `took_5_7` reports the branch.

`esatd_cost` weights each absolute coefficient by its position class and
shifts the block sum right:

* **4x4:** weights 32, 25 and 20, from the 4x4 quantizer scaling, and a
  shift of 5.
* **8x8:** the DC factor of the 8x8 transform is half that of the 4x4, so
  the shift is one more, 6. The 8x8 weights follow the same rule as the 4x4
  ones. Each of the six 8x8 scaling classes gets `32 * sqrt(MF/MF00)` at
  QP%6 = 0, which gives 32, 30, 40, 31, 36 and 35. The original work states
  only the shift. The weights are this design's own derivation.

## Eight-lane data layout

Every unit moves eight values per cycle. The lanes mean different things at
different points in the chain, so this is the part to read before changing
any wiring:

* **Prediction, residual and reconstruction.**
  * 4x4: lanes 0-3 are row `2*i` and lanes 4-7 are row `2*i+1` of the
    block, for beat `i` = 0..1.
  * 8x8: lanes 0-7 are row `i`, for beat `i` = 0..7.
* **Forward transform output.** The forward transform does its row pass on
  input into an 8x8 register array, and its column pass on output. Its
  output beats are therefore columns.
  * 4x4: lanes 0-3 are column `2*i` and lanes 4-7 are column `2*i+1`.
  * 8x8: beat `i` is column `i`.
* **Quantizer and de-quantizer.** They take the forward transform's column
  beats, and pick each lane's scaling factor from that layout. The two
  halves of the datapath are the two quantizer circuits. In a 4x4 beat they
  see two columns. In an 8x8 beat they see the upper and lower four
  coefficients of a column. By symmetry of the tables, each half needs only
  one half of the table.
* **Inverse transform.** It collects the whole block first, then does rows,
  then columns. It outputs rows in the same layout as the prediction, so
  `recon_add` can pair lanes directly.

Latencies:

| Unit | Latency |
|---|---|
| prediction generators | 1 cycle |
| `fwd_transform` | first output 2 cycles after the last input |
| `esatd_cost` | cost valid 1 cycle after the last beat |
| `quantizer`, `dequantizer` | 1 cycle |
| `inv_transform` | first output 2N+2 cycles after the last input, where N is the number of input beats (3 cycles for 2x2) |
| `recon_add` | 1 cycle |
| `deblock_filter` | 1 cycle |
| SRAM read data | the cycle after the read |

## Buffers between prediction and reconstruction

All buffers are single-port. Their sizes are those of the original chip:

| Buffer | Luma | Chroma | Word |
|---|---|---|---|
| residual | 32 x 120 bits | 16 x 104 bits | 8 values of 15 or 13 bits |
| reference | 2 banks of 32 x 32 bits | 2 banks of 16 x 32 bits | lanes 0-3 in bank 0, 4-7 in bank 1 |
| coefficient | 16 x 224 bits | 8 x 192 bits | 16 levels of 14 or 12 bits |

The coefficient buffer word holds a whole 4x4 block, or two rows of an
8x8 block, so an entropy coder reads one per cycle. The quantizer gives
eight levels per cycle, so a word is written in two halves. The first half
waits in a register, and the full word is written with the second.

Values are truncated on write and sign-extended on read.

## Deblocking

`deblock_filter` is the standard filter: the alpha/beta sample decisions,
the tc0-clipped normal filter for bS 1-3, and the strong filter for bS 4.
Chroma lines change p0 and q0 only. Slice filter offsets are zero.

`dbf_edge_order` visits the luma edges row by row as V0 V1 H0 V2 H1 V3 H2 H3
(edges 8r to 8r+7). Here V(x) is the vertical edge left of block x, and H(x)
the horizontal edge above it. Chroma follows, each plane's 2x2 blocks in
the same pattern: Cb edges 32-35 and 40-43, Cr edges 36-39 and 44-47.
Interleaving lets a block be filtered on both its edges while its samples
are still at hand. The top-level testbench checks that this order gives
exactly the standard's all-vertical-then-all-horizontal result.

## Where this RTL departs from the original design

* **Cycle count.** The original chip finishes a whole macroblock in 600
  cycles, which is 1080p at 30 fps with a 145 MHz clock. This RTL needs up
  to 450 cycles for a single 8x8 region. It processes the four 4x4 blocks
  strictly one after another (decide, re-compute, reconstruct) and does not
  interlace them. At this speed a macroblock's luma 4x4/8x8 work alone would
  take about 1800 cycles.
* **Unused chroma and DC hardware.** The buffers have their chroma halves,
  and the transforms, quantizer and de-quantizer have their DC modes, but
  the region top uses luma only.
* **Residual buffer contents.** It holds the forward-transform output of
  the chosen mode, not pixel differences. Its output feeds the quantizer
  directly, and its 15-bit fields are sized for coefficients.
* **8x8 prediction register.** The regenerated 8x8 prediction is kept in an
  8x8 register array (`pred_hold`) until the adder needs it. The original
  schedules the regeneration to meet the adder and keeps no such buffer.
* **Deblocking memories.** The original has a reordering SRAM and an
  external-row SRAM. Here the region's samples are deblocked in place in
  registers.
* **Table 2 entry.** One printed entry of the 4x4 quantizer table at QP 28
  disagrees with the standard: it reads 5243 where the row pattern requires
  8192. The standard value is used.
* **Standard behaviour where the original gives none.** The rounding offset
  of the quantizer (1/3 of a step, intra) and the bS assignment come from
  the standard, as do the neighbour availability rules. So does the rule
  that no internal 4x4 edges are filtered in an 8x8-transformed block.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares against a reference model written inside the testbench and prints
`TB_RESULT checks=<n> failures=<n>`. They cover:

* **`h264_pkg`:** the scaling tables, through their QP-28 values at every
  block position and through scaling properties (quantization times
  de-quantization constant per class, steps following the quantizer step
  size). It also checks the shape of the deblocking thresholds.
* **Prediction generators:** every mode on random neighbours.
* **Transforms:** all transform types, against matrix products. The
  testbenches also check the latencies given above.
* **Quantizer and de-quantizer:** the standard's formulas, at all QPs and in
  all modes.
* **`deblock_filter`:** its own copy of the standard's tables, 20000 lines
  at all QPs and bS values.
* **`dbf_edge_order`:** a literal table of the 48-edge sequence, with random
  back-pressure.

`tb_intra_encoder_top` runs 140 regions of seven kinds of content at
QP 0-51. The kinds are flat, ramps, noise, stripes, steps at the edges,
texture and bars. It checks:

* the type decision against the reported costs;
* the unfiltered reconstruction against the source, within an error bound
  set by the quantizer step. For flat content the reconstruction must be
  exact and every level zero;
* the deblocked output, exactly, against an independent model that uses
  the standard's edge order;
* the run time against 600 cycles.

It counts each mechanism and fails if any never happened: 4x4 and 8x8
wins, both third-step branches in both paths, the MPM chosen, lines changed
at bS 4 and at bS 3, and non-zero levels. It runs at the top's only
configuration, so it is also the full-size test.

`tb_intra_qp_sweep` runs the top at QP 16, 22, 28, 34 and 40, which are
the usual all-intra reporting points. Each QP encodes 48 regions of a
generated 1080p-like picture. It checks that PSNR falls as QP rises, and it
bounds the run time. Typical output:

| QP | PSNR-Y (dB) | 8x8 chosen | cycles / region |
|---|---|---|---|
| 16 | 45.6 | 28 of 48 | 435 |
| 22 | 41.1 | 31 of 48 | 437 |
| 28 | 38.1 | 33 of 48 | 439 |
| 34 | 35.5 | 36 of 48 | 441 |
| 40 | 33.4 | 38 of 48 | 443 |

To run one test with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/h264_pkg.sv \
    tb/tb_intra_encoder_top.sv --top-module tb_intra_encoder_top
./obj_dir/Vtb_intra_encoder_top
```

Replace the testbench name to run any other block's test. All tests finish
in seconds.
