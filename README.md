# Sparsity-aware memory interface for XOR-compressed pruned DNN weights

A pruned neural network stores far fewer weights than its dense form, but the
processing engines still want dense weight matrices, at the rate the memory can
deliver. This RTL is a memory-side decompressor that rebuilds dense 8-bit weight
matrices on the fly from a compressed image and hands them to the engines through
256 parallel lanes, while reading memory only in fixed, regular rows.

It implements the interface architecture of the paper *Sparsity-Aware Memory
Interface Architecture using Stacked XORNet Compression for Accelerating
Pruned-DNN Models*: XOR-network ("XORNet") decompression, patches stored in a
vertically-arranged layout, per-lane imbalance FIFOs and a stacked two-size LUT
(sXORNet). The RTL is an independent implementation. Where the paper gives no
detail (record formats, LUT sizes, fetch policy, memory timing), the choices are
this design's own, and the section *Departures and open points* lists them.

## The idea in four steps

1. **XOR-network compression.** The pruned, INT8 weights are handled one bit-plane
   at a time. For every plane, a short compressed vector `u` (x = 20 bits) goes
   through a fixed network of XOR gates (the *LUT*) that outputs a much longer
   vector `v` (80 bits): one bit of each of 80 weights. The encoder picks `u` so
   that `v` matches the wanted bits at the surviving (unpruned) positions. Pruned
   positions are don't-cares, and a mask word clears them afterwards. The LUT also
   sees the two previous `u` vectors, held in two shift registers, which lets it
   represent more patterns. Every lane takes one `u` per cycle, so reading the
   compressed weights is perfectly regular.
2. **Patches.** The LUT cannot represent every pattern. The encoder lists the
   wrong output bits as *patches* (bit positions), and the decompressor flips
   them. Patches are irregular: most outputs need none, and a few need several.
3. **Vertically-arranged (VA) patches.** If the patches were packed in memory one
   after another (horizontally), any patch of a fetched row could belong to any
   lane, and a large N-to-N distributing network would have to route them. Here,
   patch memory row `r` holds the `r`-th patch *of every lane*, so lane `i` is
   wired only to slice `i` of the row. The price is that lanes consume patches at
   different speeds. A lane decoding locally sparse data needs few patches, and
   its slices of the rows already read pile up in its **imbalance FIFO**
   (B = 256 entries). When such a FIFO is full, the lane misses a row and that row
   must be **read again** later. This costs extra memory cycles, not correctness.
4. **Stacked XORNet (sXORNet).** Patches, and so the imbalance, come mostly from
   locally dense data. The compressed stream may therefore mark a word as
   *half-size*: it uses only the first 40 rows of the same XOR network (the
   full-size LUT is the half-size one with 40 more rows stacked on it), so two
   half-size words make one 80-bit plane. Dense regions spend more compressed bits
   and produce fewer patches. Switching LUT size costs only output gating.

## Memory image (the part to get right first)

All three streams are stored row-wise: row `r` holds entry `r` of every lane
`i = 0..N-1`, as a packed array with lane 0 in the low bits. Lanes with fewer
entries are padded at the end.

| stream | per-lane record | bits | meaning |
|---|---|---|---|
| compressed words (`cw`) | `cword_t {half, has_patch, u[19:0]}` | 22 | `half` = use the 40-row LUT; `has_patch` = this LUT output needs at least one patch |
| VA-patches (`p`) | `patch_t {last, pos[6:0]}` | 8 | flip bit `pos` of the current LUT output; `last` = final patch of that output |
| masks (`m`) | `logic [79:0]` | 80 | one per 8 planes; bit j = 0 clears weight j (pruned) |

Lane `i` reads its own sequences as follows.

* **Words.** Each plane is either one full-size word or two consecutive half-size
  words (low 40 bits first). A full-size word must not fall between the two words
  of a half-size pair (an assertion checks this).
* **Patches.** The patches of the lane's words come in the same order as the
  words. `pos` indexes the LUT output of its own word (0..39 half, 0..79 full).
* **Masks.** Mask `g` covers planes `8g..8g+7`. Plane `8g+k` is bit `k` of the 80
  weights (least significant bit first).

The LUT's connection matrix follows from `SEED`. Output bit `i` is the XOR of the
LUT inputs selected by the low 60 bits of `{xs(a), a}`, where
`a = xs(xs(SEED ^ 0x9E3779B9*(i+1)))` and `xs` is xorshift32. An all-zero row
selects input `i mod 60`. The LUT input is `{u(t-2), u(t-1), u(t)}`, with `u(t)`
in the low bits. The history is cleared at every `start`. An encoder for this
hardware has to use the same matrix. In the paper the network is trained per
model, so a real deployment would override `SEED` or replace `sxornet_lut`'s
matrix function.

## A decompressor lane

`decomp_lane` wires together the following parts.

* **`sync_fifo` ×3.** A 4-entry word FIFO, the B-entry imbalance FIFO for patches,
  and a 2-entry mask FIFO. All are first-word-fall-through.
* **`sxornet_decompressor`.** It takes the head word and evaluates the LUT in the
  same cycle. A word without patches, or with a single patch already waiting, is
  finished in one cycle. A word with `k` patches takes `k` cycles, because the
  correction unit applies one patch per cycle. If the next patch has not arrived
  yet, the lane holds the partly corrected output and waits (`stall_patch`). After
  `seg_target` planes the lane is done and throws away any padding words.
* **`weight_assembler`.** It collects 8 planes, takes the mask, and emits
  80 × 8-bit weights with a one-cycle `w_valid` pulse. If the mask has not arrived
  by the eighth plane, it holds the lane back.

When no patches are needed and the memory keeps up, a lane emits one 80-bit plane
per cycle. That is 80 weights every 8 cycles per lane, or 256 × 80 bits/cycle in
total (2.56 TB/s of dense INT8 weights at 1 GHz).

## Fetching: regular rows, uneven lanes

* **`row_fetcher` (compressed words).** It reads rows 0, 1, 2, … one per cycle, and
  all lanes take row `r` together. It reads only while every lane's word FIFO has
  room for the row in flight. A lane stalled on a patch therefore eventually holds
  the word stream back (`cw_block_cycles`).
* **`va_patch_fetcher` (patches, and also masks).** Every lane keeps a pointer to
  the next row it still has to receive. Each cycle, the fetcher reads the *lowest*
  pointer among the lanes whose FIFO has room. Every lane with room whose pointer
  equals that row takes its slice, and its pointer advances. Space is reserved
  when the read is issued, so a returned entry always fits.
  * A lane whose FIFO is full is skipped: it *misses* the row (`miss_count`).
  * Once that lane has drained, its pointer is the lowest, so the row is read a
    second time (`reaccess_count`).
  * If B is at least the stream's peak imbalance, every row is read exactly once,
    in order, one row per cycle.
  * The lowest-pointer-first rule serves a lagging lane before the others advance,
    which cannot deadlock. A lane can only hold the word stream back while it
    waits for a patch, and such a lane always has FIFO room, so it is always
    served.
  * Masks use a second instance of this fetcher with 2-entry FIFOs. Lanes with
    many half-size words finish their planes later, so mask rows are needed at
    different times.

All memory reads have a one-cycle latency: data for a read issued in cycle t is
on `*_rd_data` during cycle t+1.

## Top level: `sami_top`

To run a stream:

1. Set `seg_target` (planes per lane, a multiple of 8), `cw_rows`, `p_rows` and
   `m_rows` (= `seg_target/8`).
2. Pulse `start` for one cycle. This clears every lane and fetcher.
3. Serve the three memory ports.
4. Collect `w_valid[i]` / `w_data[i][j]` (lane i, weight j, 8 bits).

`done` rises, and stays high until the next `start`, once every lane has emitted
`seg_target/8` groups. The 32-bit counters cover the run:

* `cycles`: cycles from start to done.
* `patch_stall_cycles`: cycles in which some lane waited for a patch.
* `cw_block_cycles`: cycles in which the word fetch was held back.
* `reaccess_count`: patch rows read again.
* `miss_count`: patch reads that a full lane missed.

Effective bandwidth is `seg_target × 80 × N` bits per `cycles`.

Parameters (defaults follow the paper's main configuration where it gives one):

| parameter | default | origin |
|---|---|---|
| `N` | 256 lanes | paper (960 GB/s configuration) |
| `B` | 256 patches | paper (fixed FIFO size of the main comparison) |
| `X_BITS` (package) | 20 | paper's XORNet(20, 20/(1−S)) |
| `SR_STAGES` (package) | 2 shift registers | paper |
| `Y_HALF` / `Y_FULL` (package) | 40 / 80 | own choice: sparsity 0.5 / 0.75 around 0.6 |
| `Q_BITS` (package) | 8 | paper (INT8) |
| `AW` | 24-bit row addresses | own choice |
| `CW_DEPTH`, `M_DEPTH` | 4, 2 | own choice |
| `SEED` | `32'h5A17C0DE` | own choice |

The sizes in `sami_pkg` are shared by all modules and the record types. Change
them there, not by overriding module parameters one at a time.

## Departures and open points

* **Compressed-vector width.** The paper uses x = 20 for its bandwidth
  configuration but also analyses XORNet(8, 20) for the 256-lane case. This RTL
  uses 20, which is what 2/3 of 960 GB/s over 256 lanes at 1 GHz gives.
* **LUT sizes.** The paper gives no sizes for the half and full LUTs; 40/80 is
  this design's choice. The paper's LUT contents are trained per model. Here they
  are a fixed pseudo-random pattern, so this RTL decompresses only images made by
  an encoder that uses the same matrix. No encoder is included, and the
  testbenches build their streams directly from random `u` and patches.
* **Record formats, patch count encoding, one patch per cycle, LSB-first planes,
  per-group mask words.** All of these are own choices. The paper names patches
  and masks but gives no formats.
* **Memory model.** There are three independent read ports, each one row per
  cycle with one-cycle latency. The paper instead shares one physical bandwidth,
  with 1/3 for the extra data. No arbitration between the streams is modelled,
  and no DRAM or HBM controller is included.
* **Fetch policy.** The lock-step word fetch and the lowest-pointer-first patch
  re-access rule are own choices. The paper states only that missed VA-patches
  are re-accessed at the cost of extra cycles.
* **Not included.** The compressor and encoder, the processing engines, and the
  baseline designs the paper compares against (CSR decompressors and the
  distributing network for horizontally arranged patches).
* **Area and bandwidth results.** The paper's 28 nm area and measured bandwidth
  results are not reproduced. The statistics counters let a simulation measure
  cycles for a given stream.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_sxornet_lut` | LUT output against an independent XOR model, half-size gating, shift history, clear |
| `tb_sxornet_decompressor` | random full/half words with 0–3 patches, random gaps and back-pressure, padding drain; a patch-free stream gives 1 plane/cycle |
| `tb_weight_assembler` | plane-to-weight transposition, masking, back-pressure when the mask is late |
| `tb_sync_fifo` | queue model, full/empty/count, clear |
| `tb_row_fetcher` | in-order rows, no overflow, blocking, 1 row/cycle when unblocked |
| `tb_va_patch_fetcher` | every lane gets every row once and in order, misses and re-reads under imbalance, exact 1 row/cycle when balanced |
| `tb_sami_top` | 8 lanes, B = 4, 64 planes per lane: bit-exact weights for every lane, rate check, and every mechanism (half/full words, multi-patch, patch stall, miss, re-access, word-fetch block, padding) at least once |
| `tb_sami_top_full` | the same with all defaults (256 lanes, B = 256), 256 planes per lane, with dense stretches long enough to overflow 256-entry FIFOs |
| `tb_sami_workload_s06` | all defaults, 512 planes per lane of a synthetic stream with the patch statistics reported for a 0.6-pruned transformer (81 % of LUT outputs patch-free, 14 % one patch, 5 % two or three) and 30 % half-size words; checks every weight and reports the effective bandwidth |

`tb_ref_pkg` holds the testbenches' own model of the XOR network.

To run the full-size test with plain Verilator (the other testbenches are the
same, with their own top module):

```
verilator --binary --timing --assert -j 0 -Wno-fatal \
  -y rtl -y tb rtl/sami_pkg.sv tb/tb_ref_pkg.sv tb/tb_sami_top_full.sv \
  --top-module tb_sami_top_full
./obj_dir/Vtb_sami_top_full
```

The full-size build takes under a minute, and the run takes about a second. In
that run, the imbalanced stream takes about 2,000 cycles against 258 for the
patch-free one. This shows the cost of re-reading rows when the peak imbalance
exceeds B.

On the synthetic 0.6-sparsity stream, 512 planes per lane take about 1,050
cycles. That is about 9,900 dense weight bits per cycle, or 1.24 TB/s at 1 GHz,
against a peak of 2.56 TB/s. No patch row had to be read again; the time goes to
half-size words (two words per plane) and to multi-patch outputs. The word
stream moves in lock step, so every lane waits for the slowest one. The paper
reports 1.36 TB/s for its 256-lane sXORNet design on the real model. The two
figures are not directly comparable, because this stream is random, not an
encoded model.

Assertions check the FIFO protocol (no push when full, no pop when empty) and
the half-size pairing rule. The design is synthesizable: register-array FIFOs,
and an elaboration-time LUT matrix. Reset is asynchronous and active-low; every
block also has a synchronous clear at `start`.
