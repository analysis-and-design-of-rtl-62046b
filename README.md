# High-throughput H.264/AVC residual entropy decoder (CAVLC + CABAC)

Every coefficient of an H.264/AVC video passes through the entropy decoder. The
decoder is a long chain of bit-serial dependencies, so it limits how fast the
whole video decoder can run. This RTL decodes the residual data (the transform
coefficients of each 4x4 block) in both entropy-coding modes. It beats the
one-symbol-per-cycle limit in three ways:

* **CAVLC**
  * A *delay-balanced two-level decoder* decodes two `level` symbols in one
    cycle.
  * `run_before` symbols are also decoded two per cycle.
  * Four *skips* drop decoding steps that a block provably does not need.
* **CABAC**
  * A *two-symbol arithmetic decoding engine* decodes two bins in one cycle.
  * A *hybrid context-model memory* supplies the three context models those two
    bins may need. It is half SRAM and half register file.
  * The decoder predicts the next syntax element so that the memory read can
    start a cycle early. A wrong guess costs one cycle.

It also contains the start-code scanner of the scalable extension (SVC). The
scanner finds where slices begin in the stored bitstream and marks the
quality-enhancement-layer slices. A second engine set decodes those slices in
parallel with the first. Its CABAC decoder has a context memory that holds only
what quality layers use.

The design follows a published architecture, which reports:

| Decoder | Frequency (UMC 90 nm) | Gates | Throughput |
|---|---|---|---|
| CAVLC | 390 MHz | 13.9 k | about 127 cycles per macroblock on its test sequences |
| CABAC | 264 MHz | 42.4 k | 1.71 bins/cycle on its test sequences, 451 Mbins/s |

This RTL implements those mechanisms cycle for cycle where the architecture
defines them. Its own clock rate and area have not been measured against a cell
library.

```
            32-bit words                                 slice-start events
  memory ───────────────► bitstream_fetcher   stored ─► svc_bitstream_scanner
                          (buffer, 64-bit       stream
                           window, consume)
                              │ win / consume (selected by entropy_coding_mode)
              ┌───────────────┴───────────────────┐
              ▼                                   ▼
        cavlc_decoder                    cabac_residual_decoder
   ┌──────────┼────────────┐            ┌─────────┼──────────────┐
 coeff_token  dbtld   total_zeros    MCS logic  cabac_cm_memory  cabac_tsbad
              run_before (x2)                   (SRAM 205 + regs 254)

  quality-layer    ┌──────────────────┐  q_entropy_coding_mode
  words ──────────►│ bitstream_fetcher├──────────┬──────────────────────┐
                   │ (u_q_fetch)      │          ▼                      ▼
                   └──────────────────┘    cavlc_decoder      cabac_residual_decoder
                                           (u_q_cavlc)        QUALITY_LAYER=1 (u_q_cabac)
                                                              SRAM 199 + regs 197
```

## The CAVLC path

### Schedule

`cavlc_decoder` runs one decoding unit per cycle:

1. **TOKEN:** `coeff_token`. This gives TotalCoeff and TrailingOnes. The code
   table is chosen by nC: 0–1, 2–3 and 4–7 use VLC tables, ≥8 uses a 6-bit
   fixed code, and −1 is chroma DC.
2. **T1:** all trailing-one signs, in one cycle.
3. **LEVEL:** one or two levels per cycle.
4. **TZ:** `total_zeros`.
5. **RUN:** one or two `run_before` per cycle.

The skips cut this short:

| Condition | What is skipped |
|---|---|
| TotalCoeff = 0 | the rest of the block |
| TotalCoeff = TrailingOnes | LEVEL |
| TotalCoeff = maxNumCoeff | TZ and RUN |
| total_zeros = 0, or only one coefficient | RUN |

For example, the block `0,3,0,1,-1,-1,0,1` (nC 0) takes 7 cycles from `start`
to `done`. Its two levels are decoded in a single cycle.

### Two levels per cycle (`cavlc_dbtld`)

A level code is `level_prefix`, then a `level_suffix` of `levelSuffixSize`
bits. That size depends on `suffixLength`, which the previous level updates.
Cascading two ordinary level decoders would put the second one behind the
first's whole arithmetic.

The DBTLD avoids this by deriving the next `suffixLength` from `level_prefix`
alone, so the second level can start as soon as the first prefix is counted.
The rules, with *first* meaning the first level of a block with fewer than
three trailing ones:

| suffixLength | Next value |
|---|---|
| 0 | 1; or 2 if (*first* and prefix > 3) or prefix > 5 |
| 1 | 2 if (*first* and prefix > 1) or prefix > 2 |
| s ≥ 2 | s+1 if s < 6 and prefix > 2 |

These are the standard's thresholds `|level| > 3·2^(s−1)`, restated on the
prefix.

The second level is decoded only in the general case. There its suffix size
equals the new `suffixLength`, and its prefix is below 15 (no escape). Level 1
keeps the full logic: the suffixLength-0 prefix-14 case, the 12-bit escape, the
+15 correction and the +2 correction for *first*. Level 1 applies its
corrections after the level-2 path has branched off, which balances the delay
of the two paths. When level 2 is not the general case, the next cycle decodes
it as its level 1.

### Reconstruction in one buffer

There is a single 16 × 13-bit output buffer:

1. Trailing ones and levels are written in decoding order, from index
   TotalCoeff−1 downwards.
2. After `total_zeros`, each RUN cycle moves the coefficient at `coeffsLeft−1`
   to `coeffsLeft+zerosLeft−1` and clears its old place.
3. The move is done once for each decoded `run_before`, one or two per cycle.
   It starts at the highest coefficient.
4. When no zeros remain, the rest are already in place.

So the buffer ends in scan order without a separate run table. The two
`run_before` lookups are cascaded: the second uses `zerosLeft − run_1` and the
bits after the first code.

## The CABAC path

### Two bins per cycle (`cabac_tsbad`)

The bin decision is rewritten as `O_LPS = (O − R) + R_LPS`, where the bin is
LPS when the result is non-negative. This is equivalent to `O ≥ R − R_LPS`, but
`(O − R)` can be formed while the `R_LPS` table is being read.

After the first bin, the renormalised offset difference for the second decision
is already known on both paths:

* **MPS path:** `(O_LPS << s) + new bits`, with s = 0 or 1.
* **LPS path:** `((O − R) << s) + new bits`, with s = 1..7 from a table on
  R_LPS.

The second bin's context model and its `R_LPS` are prepared for both paths. The
first bin's LPS decision then selects one. When both bins use the same context,
the second one takes the model already updated by the first. Bypass bins are
decoded one per cycle.

### Choosing contexts a cycle early (MCS stage and prediction)

Reads from the context memory are synchronous. So the addresses for the next
two bins are formed at the end of the current cycle, from the state the decoder
will be in after its current bins. Two bins are always taken from one syntax
element. The significance map (`significant_coeff_flag` and
`last_significant_coeff_flag`) is treated as one merged element, so the next
pair's candidates are known:

* **Pair starting at SIG[i]:** needs SIG[i], LAST[i] and SIG[i+1]. The second
  bin is LAST[i] after a 1 and SIG[i+1] after a 0.
* **Pair starting at LAST[i]:** needs LAST[i] and SIG[i+1].
* **`coeff_abs_level_minus1` prefix:** bin 0 has its own context set. Bins ≥ 1
  share one context (truncated unary, cMax 14). The Exp-Golomb suffix and the
  signs are bypass bins.

Only one branch depends on a value that has just been decoded:
`coded_block_flag`. If it is 1 the significance map follows; if it is 0 the
next block starts. The decoder predicts that the flag repeats its last value
and addresses that element. A miss costs exactly one stall cycle, during which
the right models are read. The exception is a miss on the last block when no
further command is waiting: the decoder goes idle and no stall is counted.

### Hybrid context memory (`cabac_cm_memory`, `entropy_pkg::cm_locate`)

The 459 context models are split by a single rule. A set whose members are
never needed two at a time goes into a 205-entry one-read/one-write SRAM. Such
sets include `coded_block_flag`, `last_significant_coeff_flag`, the first bin
of `coeff_abs_level_minus1`, `mb_skip_flag` and the like. All other sets go
into a 254-entry two-read/two-write register file. These include
`significant_coeff_flag`, the later `coeff_abs_level_minus1` bins, `mb_type`,
`mvd` and others.

Each cycle reads one model from the SRAM and two from the registers, and writes
up to two back. Writes are forwarded to same-cycle reads.

## SVC start-code scanner

`svc_bitstream_scanner` takes the stored bitstream one 32-bit word per cycle.
It keeps the last six bytes, so a start code `00 00 00 01` can be found at any
byte alignment. For each slice NAL unit (types 1, 5 and 20) it reports:

* the byte address of the start code;
* `nal_unit_type`;
* `dependency_id` and `quality_id`, taken from the SVC extension header.

Type-20 slices with `quality_id > 0` are flagged as quality-enhancement layers.
The memory controller uses these addresses to send each slice to the fetcher
of the matching engine set.

## SVC quality-layer engine

Context modelling never crosses a slice boundary. A quality-enhancement slice
can therefore be decoded at the same time as the base or spatial layer it
refines. For that reason the top holds a second engine set. It has its own
`bitstream_fetcher` (`u_q_fetch`), its own `cavlc_decoder` (`u_q_cavlc`) and a
second `cabac_residual_decoder` (`u_q_cabac`) built with `QUALITY_LAYER = 1`.
`q_entropy_coding_mode` selects which of the two decoders takes bits from the
fetcher, exactly as in the first set.

The CAVLC decoder is the same as in the first set. CAVLC codes only residual
data, so a quality layer leaves nothing in it to remove.

A quality layer carries only refinement data; macroblock modes and motion come
from the base layer. The only elements it codes are `mb_skip_flag`,
`coded_block_pattern`, `transform_size_8x8_flag`, `mb_qp_delta` and the
residual elements. So the quality decoder's context memory keeps only those
models: 199 SRAM entries and 197 register entries, against 205 and 254 in the
full decoder. `entropy_pkg::cm_locate_q` gives the packed address map. It puts
each kept context range in the same kind of memory as the full map, at
consecutive addresses, and marks every other index as absent. A
context-initialisation write to an absent index is dropped, so the
initialisation source can write all indices to both engines alike.

The MCS logic, the two-bin engine and the prediction are unchanged. Only the
address map and the memory sizes differ.

## Using the top level (`entropy_decoder_top`)

* **Reset:** `rst_n` is asynchronous and active low.
* **Bitstream:** words go in on `bs_data`/`bs_valid`/`bs_ready`, first bit in
  bit 31. `bs_bit_pos` counts the bits consumed.
* **Mode:** `entropy_coding_mode` = 0 selects CAVLC, 1 selects CABAC. Change it
  only while both decoders are idle.
* **CAVLC:**
  1. Pulse `cavlc_start` with `cavlc_nc` (−1 for chroma DC) and
     `cavlc_max_num_coeff` (16, 15 or 4).
  2. When `cavlc_done` pulses, `cavlc_coeff[0..15]` holds the block in scan
     order.
* **CABAC:**
  1. Write all context models through `cm_init_we`/`cm_init_ctx`/`cm_init_value`.
     Each value is `{pStateIdx, valMPS}`, already computed for the slice QP.
  2. Pulse `cabac_slice_init`, which reads the 9-bit offset.
  3. Issue blocks with `cabac_cmd_valid`/`ready`, giving `ctxBlockCat` 0–4,
     maxNumCoeff, and the `coded_block_flag` ctxIdxInc taken from the
     neighbours.
  4. When `cabac_done` pulses, `cabac_cbf` and `cabac_coeff` hold the block.
* **Quality-layer engine set:** the `q_*` ports repeat the interface for the
  second set:
  * `q_bs_*`: word input;
  * `q_entropy_coding_mode`: mode select;
  * `q_cavlc_*`: CAVLC blocks;
  * `q_cm_init_*`, `q_slice_init` and `q_cmd_*`: CABAC set-up and blocks;
  * `q_done`, `q_cbf` and `q_coeff`: CABAC results.

  The second set runs independently of the first.
* **Observation:** `cavlc_skip_events`, `cabac_events`, `q_cavlc_skip_events` and `q_events` pulse once
  per skip, two-bin cycle, prediction hit, miss and stall.

A decoder waits, without consuming bits, while the fetcher holds fewer than 64
bits. So the stream must be padded with at least 64 bits after its last
symbol.

## What is not here, and where this RTL departs from the architecture

* **Not included:**
  * the syntax-element parser for slice and macroblock headers;
  * the neighbour memory that computes nC and the context increments;
  * the context-initialisation ROM, which holds (m, n) per context and does
    the QP computation;
  * the external memory controller.

  Their values enter through the top-level ports listed above.
* **CABAC syntax elements:** only residual-block elements are decoded, for
  `ctxBlockCat` 0–4. Macroblock-layer elements and 8x8 blocks are not.
* **SVC:** the quality engine decodes only residual blocks, like the base
  CABAC decoder. Its `mb_skip_flag`, `coded_block_pattern`,
  `transform_size_8x8_flag` and `mb_qp_delta` contexts are kept but not used.
* **Power gating:** the architecture gates off idle CAVLC units. Here they see
  the window and their results are ignored.
* **Second-bin R_LPS:** the engine looks up the second bin's R_LPS on each
  path's range, rather than picking among four precomputed values. The result
  is the same; only the timing differs.
* **Fetcher:** the 4-word buffer, the 64-bit window, the word handshake and the
  16-bit CABAC coefficient width are this design's choices.
* **Tables:** the CAVLC code tables and the CABAC range and transition tables
  are those of the H.264/AVC standard.

## Verification

Every module has a self-checking testbench in `tb/`. Each one:

* prints `TB_RESULT checks=N failures=M`;
* has a watchdog;
* checks against reference models written independently in the testbench.

| Testbench | What it checks |
|---|---|
| `tb_entropy_decoder_top` | End to end at default parameters. 300 CAVLC blocks (the example block first, then random blocks over all nC ranges, including AC and chroma DC), then a mode switch and a CABAC slice of 300 random blocks of all five categories. The stream is fed with random gaps. It checks every coefficient and that CAVLC consumed exactly its bits. It fails if any mechanism never happened: two-level cycles, two-run cycles, each skip, two-bin cycles, prediction hit and miss, one stall per miss that leaves the decoder busy, fetcher back-pressure, window underflow, mode switch, SVC slice and quality slice. In parallel with the first set's CAVLC part, the quality-layer set decodes a second stream: 60 CAVLC blocks, then, after its own mode switch, 150 CABAC blocks. The test counts its CAVLC blocks, its two-bin cycles and the cycles in which both engine sets are busy. |
| `tb_cavlc_decoder` | The worked example with its 7-cycle schedule, plus 400 random blocks from an encoder in the testbench. |
| `tb_cabac_residual_decoder` | 300 random blocks from an arithmetic encoder in the testbench. Also checks the two-bin, hit, miss and stall counts. |
| `tb_svc_quality_cabac_decoder` | The same test on the quality-layer decoder (`QUALITY_LAYER = 1`). It also checks that the reduced map keeps exactly the quality-layer contexts, fills the 199 + 197 addresses and never places two contexts at the same address. |
| `tb_cavlc_coeff_token_dec`, `tb_cavlc_total_zeros_dec` | Every codeword of every table, plus hand-written codewords. |
| `tb_cavlc_run_before_dec` | Random run pairs over all zerosLeft values. |
| `tb_cavlc_dbtld` | Random level pairs, including escapes and the first-level correction. |
| `tb_cabac_tsbad` | Against a bit-serial model of the standard's decoding process, on random contexts and bins. |
| `tb_cabac_cm_memory` | Against reference arrays, with colliding addresses. |
| `tb_bitstream_fetcher` | Random consumption and random input gaps. |
| `tb_svc_bitstream_scanner` | A random NAL stream with emulation-prevention bytes. |

`tb/tb_enc_pkg.sv` holds the CAVLC and CABAC encoders that the system test
uses.

On random data the CABAC residual test measures about 1.38 bins per
bin-decoding cycle. Random blocks have no spatial correlation, so the
`coded_block_flag` prediction hits only about half the time there. The 1.71
bins/cycle and 97 % hit rate reported for the architecture come from real video
sequences, which are not part of this test set.

To run a testbench with Verilator 5 (from the directory that holds `rtl/` and
`tb/`):

```
verilator --binary --timing -Wno-fatal -Irtl -yrtl rtl/entropy_pkg.sv \
    tb/tb_enc_pkg.sv tb/tb_entropy_decoder_top.sv --top-module tb_entropy_decoder_top
./obj_dir/Vtb_entropy_decoder_top
```

Modules are found by name in `rtl/`. For another testbench, change the last
file and the top module. `-Wno-fatal` keeps the width and style warnings of the
testbenches from stopping the build. The top-level test runs in well under a
second.
