# Three-bin-per-cycle CABAC decoder for H.264/AVC

CABAC decoding is serial at the bin level. Every bin needs the range and
offset left by the previous bin and the probability state its context left
the last time it was used. A plain decoder therefore gets at most one bin per
cycle, and in practice fewer, because it spends cycles fetching contexts from
memory.

This design decodes up to three bins per cycle by cascading three one-bin
arithmetic decoders. The second decoder does not wait to find out whether the
first bin was the most probable symbol (MPS). It assumes it was, and starts
from the interval the first decoder would leave on its MPS branch. That
interval depends only on `range - rLPS`, not on the comparison. The third
decoder assumes the same about the second. The comparator flags then say how
many of the three guesses held. So a cycle yields one of six symbol patterns:

| pattern | meaning |
|---|---|
| `L`   | one bin (an LPS) |
| `M`   | one bin (MPS; the next bin could not be decoded in this cycle) |
| `ML`  | two bins |
| `MM`  | two bins |
| `MML` | three bins |
| `MMM` | three bins |

Any sequence with an LPS before its last position (`LM`, `MLM`, ...) is split
over later cycles. The cost is one extra subtractor-comparator path per stage.
Long MPS runs are the common case in real streams, so this gains far more than
it costs.

Two more ideas keep the cascade fed:

* **A context cache (CSR).** All contexts of a syntax element (SE) are loaded
  into ten registers when the element starts, and written back when another
  context row is needed. The bins of one cycle read and update these registers,
  never the memory.
* **A memory arrangement matched to the cache.** The 550 contexts live in 55
  rows of ten 7-bit contexts. The pairs of contexts that alternate quickly
  share a row:
  * `significant_coeff_flag` and `last_significant_coeff_flag` of the same scan
    position (five pairs per row);
  * `prev_intra4x4_pred_mode_flag`, `rem_intra4x4_pred_mode` and
    `intra_chroma_pred_mode`.

## Block diagram and pipeline

```
 bit-stream words ──► bitstream_buffer ──9-bit window──┐
                                                       ▼
 SE request ─► addr_gen ─row─► ctx_memory ◄─► csr_regfile ─10 contexts─► ctx_select
               (AG)            (55 x 70 b)    (CSR)                      (CS)
                                                                           │ 3 contexts, mode
                                                                           ▼
                               range/offset ◄──────────────────── threesym_bad (3 x onesym_bad)
                                                                           │ 3 bins + binvalid
                                                                           ▼
                               SE value ◄──────────────────────── binarizer (BM)
```

`cabad_top` runs one small state machine:

| state | work | cycles |
|---|---|---|
| IDLE | accept an SE request (the AG result is combinational) or a slice start | 0 when requests arrive back to back |
| INIT | `codIRange = 510`, `codIOffset` = first 9 bits | 1 per slice |
| WB   | write the CSR back to its row (context memory update) | 1 |
| CML  | load the new row into the CSR (context memory load) | 1 |
| BAD  | context selection + 3-bin decode + binarization | 1 per 1–3 bins |

Switching from one SE to the next costs **two stall cycles** (WB + CML), as the
original design specifies.

This implementation adds one refinement: when the next element uses the row
already in the CSR, the stall is skipped. Examples are consecutive
`coeff_abs_level_minus1` of one block, intra modes followed by
`intra_chroma_pred_mode`, and `end_of_slice_flag`, which has no context. Inside
a significance map, the CSR is reloaded (two cycles) only when the scan crosses
into the next row of five positions. The second chroma bin of
`coded_block_pattern` also sits in the next row and costs a reload in the
same way.

## The BAD stage in detail

### One-bin core (`onesym_bad`)

The core handles all three arithmetic modes:

* **Decision.** `rLPS` comes from `rangeTabLPS`. The table is read as a 64:1
  selection on `pStateIdx` followed by a 4:1 selection on `codIRange[7:6]`.
  * MPS (`offset < range - rLPS`): the new range is `range - rLPS`.
  * LPS: the offset drops by that amount and the range becomes `rLPS`.
  * The context then moves along `transIdxMPS` / `transIdxLPS`. On an LPS at
    state 0, valMPS flips.
* **Bypass.** One bit is shifted into the offset, which is compared with the
  range.
* **Terminal.** The range drops by 2. A `1` bin does not renormalize.

Renormalization is done in the same cycle by a leading-zero count and one
shift. The core exports two results: the symbol it actually decoded, and the
MPS branch (range, offset, bits used). The MPS branch is what the next stage
starts from.

### The cascade (`threesym_bad`)

Stage k+1 takes the MPS-branch interval of stage k, and a bit window shifted
by the bits that branch consumed.

* `binvalid2` is the MPS flag of stage 1.
* `binvalid3` is the AND of the MPS flags of stages 1 and 2.
* In terminal mode only stage 1 counts.

Per stage, the block outputs the range, offset and cumulative bit count after
that stage. The controller commits those of the last bin the binarizer
accepted.

A cycle consumes at most 8 bits: an MPS renormalizes by at most one bit and an
LPS by at most six. That is why the window is 9 bits, and why the decoder waits
whenever fewer than 9 bits are buffered.

### Context selection (`ctx_select`)

Stage 2's context index may depend on stage 1's bin. Examples:

* the third bin of a P `mb_type`;
* bins 4 and 5 of an I `mb_type`;
* the unary prefixes whose context changes after bin 0.

Context selection therefore steps the parse state of the element using the
bin it *assumes* (stage 1's valMPS; 0 in bypass mode), and reads the next slot
from the CSR.

If two stages land on the same slot, the later stage must see the context
after the earlier MPS. Its pStateIdx is forwarded through `transIdxMPS`.
valMPS never changes on an MPS.

A stage is disabled when any of these holds:

* the element would already be finished;
* the bin needs another arithmetic mode (a decision-to-bypass switch always
  happens in the next cycle);
* the bin needs another memory row;
* the mode is terminal.

### Binarization (`binarizer` and the `se_*` functions of `cabad_pkg`)

One set of functions describes every supported element. Context selection and
the binarizer both use them:

* `se_mode`: the arithmetic mode of the next bin;
* `se_slot`: the CSR slot of the next bin;
* `se_row`: the memory row of the next bin;
* `se_step`: advances the parse by one bin.

Context selection runs `se_step` on assumed bins and the binarizer runs it on
real ones, so the two always agree when the assumptions hold.

| syntax element | binarization | value returned |
|---|---|---|
| `mb_skip_flag`, `mb_field_decoding_flag`, `coded_block_flag`, `end_of_slice_flag` | one bin (the last one in terminal mode) | 0/1 |
| `mb_type`, I slice | standard bin tree, bin 1 terminal | 0–25 |
| `mb_type` intra suffix, P or B slice | the I-slice tree, request kind `MB_TYPE_I` with the P/B slice type, suffix contexts | 0–25 |
| `mb_type`, P slice | 3-bin tree; prefix `1` means intra | 0–3, 5 = intra prefix |
| `mb_type`, B slice | 1, 3, 6 or 7 bins | 0–22, 23 = intra prefix |
| `sub_mb_type`, P slice | 1–3 bins | 0–3 |
| `sub_mb_type`, B slice | 1–6 bins | 0–12 |
| `coded_block_pattern` | 4 fixed-length luma bins, then truncated unary chroma (cMax 2) | luma + 16·chroma |
| prev/rem intra 4x4 mode | flag, then 3 fixed-length bins, LSB first | 8 = use predicted mode, else 0–7 |
| `intra_chroma_pred_mode` | truncated unary, cMax 3 | 0–3 |
| `ref_idx` | unary | ≥ 0 |
| `mb_qp_delta` | unary, mapped to ±⌈k/2⌉ | signed |
| `mvd_x`, `mvd_y` | UEG3, prefix cut-off 9, sign | signed |
| `coeff_abs_level_minus1` + sign | UEG0, prefix cut-off 14, sign | signed level |
| significance map (sig + last flags) | one element, last position inferred | `{count[20:16], map[15:0]}` |

Two values are supplied with each request rather than computed here, because
they come from neighbouring macroblocks or from the residual state:

* the ctxIdxInc of bin 0;
* the ctxIdxInc of the later `coeff_abs_level_minus1` bins.

For `coded_block_pattern`, `incn` carries the four neighbour terms of the luma
bins that lie outside the macroblock: {A of block 2, B of block 1, B of block
0, A of block 0}. `incc` carries the neighbour part (condTermFlagA + 2·condTermFlagB,
0–3) of the chroma ctxIdxInc: bin 0 in the low two bits, bin 1 in the high two
bits. Bin 1 adds 4 to it, as the standard does. Terms inside the macroblock come from
the luma bins already decoded.

After an intra prefix (P `mb_type` 5, B `mb_type` 23), the caller issues a
second request of kind `MB_TYPE_I` with the same slice type. It decodes the
intra type with ctxIdx 17–20 (P) or 32–35 (B) instead of the I-slice ones.

## Context memory map

Each row holds ten contexts. Slot `s` of row `r` is bits `[7s+6:7s]`.

| rows | contents (standard ctxIdx) |
|---|---|
| 0 | I `mb_type` 3–10 |
| 1–4 | P skip 11–13, P `mb_type` 14–20 (intra suffix 17–20), P `sub_mb_type` 21–23, B skip 24–26 |
| 5–6 | B `mb_type` 27–35 (intra suffix 32–35), B `sub_mb_type` 36–39 |
| 7–8 | `mvd` x 40–46, y 47–53 |
| 9–10 | `ref_idx` 54–59, `mb_qp_delta` 60–63 |
| 11 | `intra_chroma_pred_mode` 64–67 (slots 0–3), prev flag 68 (slot 4), rem 69 (slot 5) |
| 12 | `mb_field_decoding_flag` 70–72 |
| 13 | `coded_block_pattern` luma 73–76 (slots 0–3), chroma bin 0 77–80 (slots 4–7) |
| 14 | `coded_block_pattern` chroma bin 1 81–84 (slots 0–3) |
| 15–19 | `coded_block_flag`, block category 0–4 |
| 20–24 | `coeff_abs_level_minus1`, block category 0–4 |
| 25–37 | significance map, frame: slot 2j = sig, 2j+1 = last of position 5·row+j |
| 38–50 | significance map, field (same layout) |
| 51–54 | spare |

The significance-map part uses 26 rows, i.e. 260 contexts. The frame
significance flags use ctxIdx 105+ and the last flags 166+. The field ones use
277+ and 338+.

## Interface of `cabad_top`

* **Bit-stream:** `bs_valid`/`bs_data[31:0]`/`bs_ready`. The first stream bit is
  in bit 31.
* **Context initialisation:** `ctx_init_we`/`ctx_init_addr`/`ctx_init_data[69:0]`.
  * It writes one row per cycle while idle.
  * Initial states are computed outside the decoder from the standard's (m, n)
    tables and SliceQP. For example, firmware or a separate init engine can do
    this.
* **Slice start:** a one-cycle `slice_start` pulse while idle. The decoder then
  loads 9 offset bits.
* **Requests:** `se_req_valid`/`se_req`/`se_req_ready`. `se_req_t` carries:
  * the element kind;
  * the slice type;
  * the field flag;
  * `ctxBlockCat`;
  * the neighbour-derived ctxIdxInc of bin 0 (`inc0`);
  * the ctxIdxInc for later `coeff_abs_level_minus1` bins, or the
    `coded_block_pattern` luma neighbour terms (`incn`);
  * the `coded_block_pattern` chroma ctxIdxInc values (`incc`).

  Requests may be back to back. A new one is accepted in the cycle the
  previous one completes.
* **Results:** `se_out_valid` for one cycle, with `se_out_kind` and
  `se_out_value`.
* **Status:** `busy`, `bins_cycle` (bins decoded this cycle), `stall_cycle`
  (WB/CML cycle), `ctx_base` (first ctxIdx of the element).

Reset is asynchronous and active low. The memory contents are not reset.

## Where this implementation departs from the original design

* **Not decoded:** anything of the 8x8 transform
  (`transform_size_8x8_flag`, block category 5). These belong to the High
  profile, and the memory has no rows for them. All Main-profile elements are
  decoded.
* **Outside the decoder:**
  * context initialisation from the (m, n) tables;
  * the header parser;
  * the neighbour bookkeeping that yields ctxIdxInc of bin 0.

  All three are taken as inputs.
* **I_PCM:** after I_PCM (`mb_type` 25) the arithmetic decoder is not
  re-initialised, and PCM samples are not read.
* **Own choices:**
  * the row map;
  * the skipped stall on a CSR row hit;
  * the 9-bit window;
  * the handshakes;
  * the packing of the significance-map result.

  The original design gives the 550-context and 70-bit-row sizes, the
  five-pair and intra-sharing rearrangement, and the two-cycle stall, but not
  a full row list.
* **Standard H.264/AVC rules used where the original tables disagree:**
  * frame/field offsets of the significance map;
  * the bin string of I `mb_type` 2;
  * bin order of `rem_intra4x4_pred_mode` (LSB first);
  * the bypass offset update.
* **Asynchronous memory read:** the memory read is asynchronous, so that a
  load fits one cycle. A synchronous SRAM would need the row address one cycle
  earlier. The address is known in the WB cycle, so this is a local change in
  `cabad_top`.

## Throughput

The original design reports the following at 115 MHz in a 0.13 µm process,
with 11,937 gates without the memory:

| measure | value |
|---|---|
| average, QP24, 1080HD IBBP | 219 cycles/macroblock |
| average bins per cycle | 1.019 |
| Level 4.0 maximum rate | 245,760 macroblocks/s |
| cycles available per macroblock at 115 MHz | about 468 |

219 cycles per macroblock leaves about half the cycles spare for 1080HD at
30 fps. These figures have not been reproduced here; they need real streams
and a macroblock-layer parser to drive the request interface.

`tb_cabad_mb_workload` builds synthetic macroblocks in the order of the
macroblock layer (skip flag, type, prediction, coded_block_pattern, residual
blocks) in an I B B P picture pattern. The statistics are its own, not taken
from real streams, and the contexts start from random states rather than
from the initialisation tables. On 210 such macroblocks the decoder needs
about 145–155 cycles per macroblock on average, depending on the random seed:
about 210–220 for I, 156 for P and 120–140 for B macroblocks, at about 0.92
bins per cycle (counting stall cycles). The original design reports 270, 246
and 204 cycles for I, P and B macroblocks of real 1080HD streams at QP24. The
two sets of numbers are not comparable: real residual data are denser and
real contexts are adapted. The testbench checks that the average stays within
the 468-cycle budget. It also prints bins per decoding cycle for each group of
elements. Stall cycles are not counted there, and every group is above one
bin per cycle.

On the random element mix of the end-to-end testbench (random contexts, many
element switches), the decoder averages about 1.7 bins per decoding cycle. It
also spends about one stall cycle per two decoding cycles.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

`tb/cabac_ref_pkg.sv` holds the independent references:

* the standard binarization of every supported element, giving bins, modes
  and ctxIdx;
* a bit-exact CABAC **encoder**, including the terminate and flush steps;
* a bit-serial decoder following the flowcharts;
* the memory row/slot layout.

The testbenches:

* `tb_onesym_bad` and `tb_threesym_bad`: random intervals against the
  bit-serial decoder.
* `tb_ctx_select`: slots, forwarding and stage enables, checked against the
  reference binarization.
* `tb_binarizer`: values and bins taken per cycle.
* `tb_addr_gen`: ctxIdxOffsets and rows.
* `tb_csr_regfile`, `tb_ctx_memory`, `tb_bitstream_buffer`: model-based
  tests.
* `tb_cabad_top`: the whole decoder at its default sizes.
  1. Encode 2,500 random syntax elements of every supported kind.
  2. Decode the stream through `cabad_top`, with random bit-stream gaps.
  3. Compare every value.
  4. Check that each element took exactly its number of bins, and exactly two
     stall cycles per context-row change (none on a row hit).
  5. Count 14 mechanisms, and fail if any never occurs: 3-bin and 2-bin
     cycles, multi-bin bypass, terminal bins, pState forwarding, row hits, SE
     switches, significance-map reloads, decision-to-bypass switches,
     LPS-shortened cycles, bit-stream back-pressure and starvation, memory
     initialisation, and back-to-back elements.

* `tb_cabad_mb_workload`: the same checks on macroblock-structured traffic,
  plus cycles per macroblock by picture type against the Level 4.0 budget.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing -Wno-fatal -y rtl -Itb \
    rtl/cabad_pkg.sv tb/cabac_ref_pkg.sv tb/tb_cabad_top.sv --top-module tb_cabad_top
./obj_dir/Vtb_cabad_top
```

All RTL lints under `verilator -Wall`, apart from unused-bit warnings from the
shared package functions. It elaborates and synthesises with yosys (slang
front end). The memory stays a 3,850-bit memory cell.
