# Memory-bandwidth subsystem for an H.264/AVC scalable (SVC) encoder

A scalable H.264/AVC encoder does two things that a plain H.264 encoder
does not, and both need a lot of off-chip memory traffic:

* **FGS quality layers.** Fine-granularity SNR scalability codes each frame
  as a base layer plus refinement layers. Each enhancement layer is coded
  in *scans over the whole frame*: first coefficient 0 of every block, then
  coefficient 1 of every block, and so on. The naive encoder therefore
  keeps every enhancement layer's coefficients in a frame memory in DRAM.
  It writes the whole frame and reads it back in a different order.
* **Large motion search ranges.** Hierarchical-B GOPs predict from frames
  that are far apart in time, so motion vectors get long. A plain Level C
  search window, tall enough for the longest vertical vector, becomes large
  on chip and expensive to refill.

This RTL implements the memory-side hardware for both problems. It covers
a 4CIF (704x576) top spatial layer and the search windows of the CIF and
QCIF layers below it:

1. **Scan buckets.** The FGS scan order is worked out block by block, while
   the macroblock is still on chip. Each symbol is dropped into a small
   on-chip *bucket* for its scan. Full buckets go to DRAM as sequential
   bursts, one DRAM region per scan, so DRAM acts as a transpose buffer.
   At frame end the regions are read back in order. Every DRAM access is
   sequential, and only the coded symbols travel, not the full coefficient
   frames.
2. **Centric moving row buffer (CMRB).** The lower spatial layer has already
   been coded, so its motion vectors, upsampled ×2, predict where this
   layer's vectors lie. For each macroblock row the vertical window is only
   ±16 rows. It is centred where that row's predicted motion points, and it
   moves along the row with Level C reuse. A macroblock whose predictor
   falls outside the window gets a separate 32×32 *refinement region*.
   Key frames need a wider range. For them, the two B-frame window memories
   (forward and backward) are joined into one window about 1.5 times
   larger.
3. **Lower layers.** The CIF and QCIF layers are small enough for full
   search. They keep plain Level C windows, tall enough for their whole
   vertical range, in the same two-bank memory.

What is *not* here is listed near the end: the transform, the motion
estimation datapath, CABAC, and everything of the lower layers beyond their
search windows. These blocks sit at the ports.

```
                     coef (1/cycle, zigzag, with QP, MB, block)
                       |
  +--------------------v--------------------------------------------------+
  | fgs_quant_stage (base) -> fgs_quant_stage (L1) -> (L2) -> (L3)         |
  |      |  base_* out           | levels+RC flag    |          |          |
  |                       fgs_scan_analyzer x3  (scan rule, per block)     |
  |                              | (bucket k, symbol)                      |
  |                       scan_bucket_buffer x3  --ext_wr_*-->  DRAM       |
  |                              | frame end: flush, then                  |
  |                       fgs_scan_reader x3     <--ext_rd_*--  DRAM       |
  |                              | enh_* : symbols in FGS coding order     |
  +------------------------------------------------------------------------+
  +------------------------------------------------------------------------+
  | mv_gat_* -> cmrb_ctrl (row centre, inside/outside test) -> pred_*      |
  | ld_cmd_* -> sr_loader --me_rd_*--> DRAM                                |
  |               |-> sr_memory     (two banks: 2 B windows / 1 key window) |
  |               |-> refine_buffer (32x32 per reference)                   |
  |            sr_rd_*, rb_rd_* : read by the motion estimator              |
  +------------------------------------------------------------------------+
  | cif_*  -> level_c_sr (sr_loader + sr_memory, 352x288)                  |
  | qcif_* -> level_c_sr (sr_loader + sr_memory, 176x144)                  |
  +------------------------------------------------------------------------+
```

## 1. The FGS layer cascade (`fgs_quant_stage`)

There are four reconstruction loops in a row: the base layer and three
enhancement layers. Each loop quantizes what the earlier loops have not
yet represented:

* `d = coef − acc`, where `acc` is the sum of the earlier loops'
  reconstructions.
* `level = round(|d| / step(QP))`, and `acc += level · step(QP)`.
* Each loop passes `QP − 6` to the next. This halves the step, so each
  layer roughly doubles the precision.

The step table is the H.264 one (10, 11, 13, 14, 16, 18 sixteenths,
doubled every 6 QP). The quantizer is a plain rounding divider. It
reconstructs directly in the coefficient domain, so no separate
normalisation step is needed.

Every coefficient of an enhancement layer is classified:

* **RC (refinement coefficient):** it was non-zero in *any* earlier layer,
  including the base layer. Its level is limited to −1, 0 or +1.
* **NC (new coefficient):** it has never been significant. Its whole value
  is coded.

Why the truncation never triggers in the top: with this quantizer, an RC's
residual is at most half of the previous step, which is one new step. So
its level cannot exceed 1. The limiter still exists and has its own test,
which drives arbitrary accumulator values. The testbench of the whole
design counts truncations but does not require them.

Coefficients are 13 bits (`svc_pkg::COEFW`). The accumulator has 3 extra
bits. The stages are one register each. They advance together on `en`,
which is the global stall described in section 4.

## 2. The FGS scan rule (`fgs_scan_analyzer`)

This is the part most worth understanding. An enhancement layer is coded in
scans `k = 0 … 15`. In scan `k`, every block in the frame is visited in
order, and its `k`-th coefficient (zigzag order) decides what the block
contributes to that scan:

| coefficient at position k | contributes to scan k |
|---|---|
| an RC | that single RC value |
| an NC not yet coded | a *run*: every NC from `k` up to and including the next non-zero NC. RCs inside the run are skipped; they wait for their own scan. |
| an NC not yet coded, with no non-zero NC left in the block | one `NC end` symbol; the block has no NCs left after it |
| an NC already covered by an earlier run, or after `NC end` | nothing |

What a block contributes to scan `k` depends only on that block. So the
whole schedule of a block can be computed as soon as its 16 levels are
known. That is the key to moving the scan from frame level to macroblock
level.

A worked example with 8 coefficients per block (`R` marks an RC):

```
block X:  0   0   3   R+1  0   0   2   0
block Y:  R0  4   0   0    0   0   0   0

scan 0: X codes the run {0,0,3};  Y codes R0
scan 1: X nothing (covered);      Y codes the run {4}
scan 2: X nothing;                Y codes NC end
scan 3: X codes R+1;              Y nothing
scan 4: X codes the run {0,0,2};  Y nothing
scan 7: X codes NC end;           Y nothing

frame coding order:  0 0 3 | R0 | 4 | end(Y) | R+1 | 0 0 2 | end(X)
```

The analyzer holds one block while it collects the next (two block
registers). It walks positions `k = 0 … NCOEF−1`. Runs are walked one
coefficient per cycle, and skipped RCs cost one cycle each. It emits
`(bucket k, symbol)` pairs in increasing `k`. A block takes at most
`2·NCOEF` cycles, one cycle per symbol at most.

The **symbol word** is 31 bits (`svc_pkg::fgs_sym_t`):

| bits | field |
|---|---|
| 30:29 | kind: 0 = NC value, 1 = RC value, 2 = NC end |
| 28:18 | MB index |
| 17:13 | block index in the MB |
| 12:0 | value (signed) |

It is stored zero-extended to 32 bits in DRAM.

## 3. Buckets and DRAM as a transpose buffer (`scan_bucket_buffer`, `fgs_scan_reader`)

Each enhancement layer has one bucket per scan (16 buckets of `BDEPTH = 16`
symbols, in one array). In DRAM, scan `k` owns the region that starts at
word `k · 2^REGION_LOG2`. With 24-bit word addresses and
`REGION_LOG2 = 20`, the layout is:

```
ext_wr_addr = { scan[3:0], offset[19:0] }   offset = words already in that region
```

The buffer works as follows:

* **Full bucket.** When a bucket fills, its 16 words go out as one burst
  (`ext_wr_valid/ready`, with `ext_wr_last` on the final word). That
  scan's word count `scan_count[k]` then advances. The input is refused
  while a burst is going out.
* **Frame end.** A frame-end flush writes every partly filled bucket as a
  shorter burst, then pulses `flush_done`. A flush request that arrives
  during a burst is remembered.
* **Overflow.** A region that would overflow sets `overflow` and drops the
  symbols. A 4CIF layer has at most one symbol per coefficient plus one
  NC end per block: 608,256 + 38,016 words. A region holds 2^20 words, so
  this cannot happen within one frame.

The reader then walks region 0 from word 0 to `scan_count[0]−1`, then
region 1, and so on. It hands each symbol with its scan number to the
entropy coder on `enh_valid/enh_ready`:

* Within a region the reads are strictly sequential.
* One read is outstanding at a time. With a read latency of L cycles, this
  costs L + 3 cycles per symbol.
* `done` pulses after the last symbol, and `enh_busy` shows the read-back
  is in progress.

## 4. How the FGS side fits together (`svc_bw_top`)

One coefficient enters per cycle, with its base QP, MB index and block
index. The base stage produces `base_*`; this output has no back-pressure.
Enhancement stage `n` feeds analyzer `n`. The whole cascade moves only when
*all three* analyzers can accept (`coef_ready`). The stages therefore stay
aligned on the same coefficient, and a busy layer stalls the input.

When `frame_end` is given, the top waits until the cascade and the
analyzers are empty. It then starts the flush in all three bucket buffers.
Each layer's reader starts on its own `flush_done`. `frame_start` clears the
region counts for the next frame. Reading a frame back while the next one
is written (double-buffered regions) is not implemented.

## 5. Level C windows and the CMRB (`cmrb_ctrl`, `sr_loader`, `sr_memory`)

**Level C reuse.** For an N×N block and search range `[−SR_H, SR_H) ×
[−SR_V, SR_V)`, the window covers two adjacent macroblocks. It is
`(2N + 2SR_H)` wide and `(2SR_V + N)` tall. Moving one macroblock right
only needs N new columns, so the window is addressed circularly:

* Window column `x` lives at physical column `(x + col_base) mod W`.
* `advance` moves `col_base` by N, so the oldest N columns become the
  newest.
* `row_start` resets `col_base`.

At a row start the loader fetches the whole window of every reference.
After that it fetches `N × (2SR_V + N)` pixels per reference per
macroblock. The testbench checks this count: 16 × 48 = 768 pixels per
reference.

**CMRB placement.** Before a macroblock row is searched, `cmrb_ctrl`
receives the base-layer vertical vectors of the row's 44 macroblocks
(`mv_gat_*`). It doubles them and takes the rounded mean as the row
centre. The centre is limited to ±48 so the ±16 window stays within the
±64 maximal vector range. The loader places the window's top row at
`16·mb_y + centre − 16`. Pixels beyond the frame edge are replaced by the
nearest edge pixel.

**Refinement regions.** For each macroblock, `mb_chk_*` gives its
base-layer vector. The upsampled predictor with a ±4 search around it must
lie inside the window:

* horizontally, within ±SR_H;
* vertically, within centre ± 16.

If it does not fit, the top loads a 32×32 region for each reference into
`refine_buffer`. The region's corner is at
`(16·mb_x + 2·mvx − 8, 16·mb_y + 2·mvy − 8)`. Its size is 16 for the block
plus 2·4 for the refinement plus margins for the 6-tap half-pixel filter.
Only when the region is loaded is `pred_valid` raised, with `pred_refined`
set. B-frames load two regions and key frames load one. The region origins
are reported on `rb_origin_*`.

**B-frame and key-frame modes.** `sr_memory` has two banks:

* In B-frame mode each bank holds one reference's window (forward and
  backward).
* In key-frame mode (`me_mode = ME_KEY`) there is one reference with a
  1.5× wider range. The window is laid out row-major across bank 0 and
  then bank 1.

Two read ports with one-cycle latency serve the motion estimator.

Sizes in this build (4CIF, CMRB ±16 rows):

| window | size | bytes |
|---|---|---|
| B-frame, per reference (SR_H 128) | 288 × 48 | 13,824 |
| both B windows + two 32×32 regions | | 29,696 |
| key frame (SR_H 192) in the two banks | 416 × 48 | 19,968 ≤ 27,648 |
| same subsystem without the CMRB (key, SR_V 96) | 416 × 208 | 86,528 |

The last row is for comparison only. The CMRB cuts the on-chip memory to
about a third, close to what the CIF layer needs.

**Lower layers (`level_c_sr`).** The CIF and QCIF layers each have a loader
and a two-bank memory. Their windows are placed with a zero centre, so they
form a plain Level C window with no refinement regions. The sizes come
from each format's level 1 (B-frame) and level 0 (key-frame) search
ranges:

| layer | B-frame window, per reference | both banks | key-frame window |
|---|---|---|---|
| CIF (±64 × ±32, key ±96 × ±48) | 160 × 80 | 25,600 bytes | 224 × 112 = 25,088 bytes |
| QCIF (±32 × ±16, key ±48 × ±24) | 96 × 48 | 9,216 bytes | 128 × 64 = 8,192 bytes |

The deeper temporal levels (2 to 4) use narrower ranges than level 1. They
can search inside the level 1 window. Level C bandwidth per macroblock
depends only on the window height, so this does not change the traffic.

## 6. Top-level ports and protocols

All handshakes are valid/ready: a transfer happens on a clock edge where
both are high. Read responses arrive in order, any number of cycles after
the request. The reset is asynchronous and active low. Each enhancement
layer has its own ports, as arrays of `NUM_ENH`:

* `ext_wr_*`: word writes, with bursts marked by `ext_wr_last`;
* `ext_rd_*`: word reads;
* `enh_*`: ordered symbols.

Motion side:

* `ld_cmd_*` takes `LD_ROW_START` or `LD_MB_STEP` with a mode and an MB
  position.
* `ref_base[2]` are the frame base addresses of the two references.
* `me_rd_*` is a pixel read port with address `base + y·704 + x`.
* `me_pix_count` and `refine_count` count fetched pixels and refinement
  loads, for bandwidth measurement.

Some output bits are constant by construction:

* bit 31 of `ext_wr_data` (symbols are 31 bits);
* bit 0 of `pred_mvx/pred_mvy` (the predictor is twice an integer vector).

## 7. Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog. The models in the
testbenches are written independently of the RTL:

| testbench | what is checked |
|---|---|
| `tb_fgs_quant_stage` | hand-worked cascade values and 400 random cases against a behavioural quantizer, including the RC limiter |
| `tb_fgs_scan_analyzer` | a 4-block, 8-coefficient example with known buckets, and random 16-coefficient blocks with back-pressure; cycle bound `2·16+2` per block |
| `tb_scan_bucket_buffer` | burst addresses, burst lengths, frame-end flush, word counts |
| `tb_fgs_scan_reader` | order of read-back under random latency and back-pressure; cycle bound |
| `tb_cmrb_ctrl` | row centre, limit, inside/outside test, region origin |
| `tb_sr_memory` | circular addressing in both modes against a reference array |
| `tb_refine_buffer` | write/read, origin and valid bits |
| `tb_sr_loader` | every pixel written, per-step pixel counts, refinement loads |
| `tb_level_c_sr` | CIF and QCIF configurations: rows at both frame edges and a key-frame row; pixel counts and window contents |
| `tb_svc_bw_top` | whole design at its default parameters (below) |

`tb_svc_bw_top` runs one complete 4CIF frame through the FGS side at the
default parameters:

* 1,584 macroblocks × 24 blocks × 16 random coefficients with random QPs;
* DRAM models with random write back-pressure and random read latency;
* a consumer with random back-pressure.

A reference model computes the cascade and the scan rule. The testbench
checks every base level and every enhancement symbol in its exact
frame-level position, about 1.03 million symbols over three layers.

In parallel, it codes three macroblock rows on the motion side:

* a B-frame row with small motion;
* a B-frame row with large motion, which drives the centre into its ±48
  limit;
* a key-frame row.

For the CIF and QCIF layers it runs B-frame rows at both frame edges and a
key-frame row, using a reusable agent (`tb/lc_sr_agent.sv`).

For each macroblock it checks the fetched pixel counts, random
search-memory pixels against the model frame, the inside/outside decision,
and the refinement regions' pixels and origins.

It counts these mechanisms and fails if any of them never happened:

* cascade stalls;
* RC symbols;
* runs that skip RCs;
* NC ends;
* full-bucket bursts;
* frame-end partial bursts;
* output back-pressure;
* the centre limit;
* refinement loads;
* predictors inside the window;
* B-frame and key-frame rows;
* Level C steps, and the lower layers' steps and windows.

A full run simulates about 3.5 million cycles and takes a few seconds.

Building and running a testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb -Irtl rtl/svc_pkg.sv tb/tb_svc_bw_top.sv --top-module tb_svc_bw_top -o sim
./obj_dir/sim
```

Replace the testbench file and top-module name to run any other test. Each
test overrides parameters only inside its own instantiation. The leaf tests
use small configurations where that speeds them up; the top test uses
none.

## 8. Departures, limits and what is not built

Not built, and left at the ports:

* the forward and inverse transform;
* the motion estimation datapath (full search, ±4 refinement, fractional
  search);
* motion compensation and intra prediction;
* base-layer and enhancement-layer entropy coding (CABAC);
* the binarizer and context modeller moved to MB level ("early context
  modeling");
* spatial decimation and inter-layer texture upsampling;
* the bitstream multiplexer;
* everything of the CIF and QCIF layers except their search windows,
  including FGS, which is built for the 4CIF layer only.

Only motion-vector upsampling is built, inside `cmrb_ctrl`.

Choices this design makes where no detail was available:

* **Quantizer.** Rounding scalar quantizer with the H.264 step table. A real
  encoder's dead-zone quantizer gives different levels. The scan hardware
  does not depend on how the levels are produced.
* **Scan runs.** A run *includes* the significant NC that ends it.
* **DRAM data format.** Symbols are 32-bit words, one per symbol. This keeps
  the ordering mechanism simple, but it is not bandwidth-optimal. In the
  full-frame test, about 1.03 M symbols per frame means 8.3 MB written and
  read per frame, about 250 MB/s at 30 Hz. That is more than storing the
  raw coefficient frames would cost. To reach the low tens of MB/s the
  scheme is capable of, the symbols must be packed (for example
  run/level-coded bytes), or binarized at MB level before the buckets.
  Random test coefficients also produce many more symbols than real video.
* **Row starts.** Each macroblock row reloads its whole window. For 4CIF
  B-frames this adds about 28 MB/s to the ~73 MB/s of the per-macroblock
  Level C steps. Carrying the window over from the row above would save
  part of it, but is not done.
* **Row centre.** The rounded mean of the row's upsampled vertical vectors.
  Other statistics (median, histogram peak) would drop in at the same
  place.
* **Integer vectors and region placement.** Vectors are in integer pixels;
  the refinement region sits at predictor − 8. Key frames use the same
  ±16 rows as B-frames, with ±192 columns.
* **Frame-level sequencing.** No double buffering of DRAM regions between
  frames; one outstanding read per reader and per loader (a pixel per
  request); a global stall across the three layers.

Key parameters and where to change them:

| parameter | default | meaning |
|---|---|---|
| `NUM_ENH` | 3 | enhancement layers |
| `NCOEF` | 16 | coefficients per block = scans = buckets |
| `BDEPTH` | 16 | symbols per bucket (burst length) |
| `REGION_LOG2` | 20 | DRAM words per scan region (log2) |
| `FRAME_W/H` | 704/576 | frame size |
| `SRH_B`, `SRH_K` | 128, 192 | horizontal range, B and key frames |
| `SRV_C`, `SRV_MAX` | 16, 64 | CMRB half height, maximal vertical range |
| `RW` | 32 | refinement region size |
| `CIF_*`, `QCIF_*` | Table above | lower-layer frame sizes and ranges |

Shared types and constants are in `rtl/svc_pkg.sv`. The other files each
hold one module, named after the file.
