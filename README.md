# Read mapper with parallel q-gram filtering and in-situ verification

Read mapping places short DNA reads (here 100 nucleotides) on a reference
genome, allowing up to `e` edits (substitutions, insertions, deletions). This
RTL does it in two stages on one chip:

1. **Filter.** A read of `R` nucleotides contains `M = R - q + 1` overlapping
   q-grams (substrings of length `q`). By the q-gram lemma, if the read matches
   a stretch of the reference with at most `e` edits, at least
   `R - (e+1)·q + 1` of its q-grams occur in that stretch. The filter looks up
   all `M` q-grams of a read at once, each in its own search engine, counts the
   hits and lets the read through only if the count reaches that threshold.
2. **Verification.** A read that passes is aligned against the whole stretch
   with Myers' bit-vector edit-distance algorithm, one reference nucleotide per
   clock. Every position where the read ends with an edit distance of at most
   `e` is reported.

The reference is too large for on-chip memory, so it is cut into overlapping
**sections** (2048 nucleotides by default, overlapping by at least `R + e`).
A host loads one section at a time, streams all reads through, collects the
mappings and moves on to the next section. Verification happens right where
filtering happens ("in situ"): the filter result is never stored, it only
starts the verifier.

The design follows a published FPGA read mapper (Zynq UltraScale+, 100-nt
reads, 2048-nt sections, 187.5 MHz). Its block structure and signal names are
kept; where the published description leaves a detail open, the choice made
here is stated below and in the opening comment of each file.

## Data formats

| item | encoding |
|---|---|
| nucleotide | 2 bits: A=00, C=01, G=10, T=11 (`rm_pkg::nt_t`) |
| read | `2·R` bits, nucleotide `i` in bits `[2i+1:2i]` |
| q-gram value | `2·q` bits, **first** nucleotide in the most significant pair, so numeric order is string order |
| sorted q-gram array (SQA) | all `X = N - q + 1` q-grams of a section, sorted ascending; duplicates allowed |
| section | `N` nucleotides, one 2-bit word per address |

The host (software) builds the SQA and the encoded section; any sort will do.
Ambiguous reference symbols (N) must be replaced by some nucleotide before
encoding. The hardware always holds exactly `X` q-grams and `N` nucleotides,
so a shorter last section must be padded by the host (repeating one of its
q-grams in the SQA is harmless; padding nucleotides in the section may produce
extra reported positions past the real end).

Default sizes (package `rm_pkg`, overridable per module): `READ_LEN = 100`,
`QGRAM_LEN = 16`, `SECTION_LEN = 2048`, hence `M = 85` search engines and
`X = 2033` q-grams of 32 bits each per engine. The q-gram length of 16 is
inferred from the published resource figures (85 engines for 100-nt reads);
it is not stated there as a number.

## Operating the top level (`read_mapper`)

All inputs are sampled on the rising edge of `clk`; `rst` is synchronous,
active high. One section is processed as follows:

1. **Configure.** Set `enable_filt_op`, `enable_verif_op`,
   `score_threshold = e` and `count_threshold = R - (e+1)·q + 1`. Optionally
   write engine enables with `qse_en_wr`/`qse_en` (below).
2. **Load the SQA.** Hold `array_update` high; for each entry `i` pulse
   `array_we` with `array_waddr = i`, `array_din = SQA[i]`. The write is
   broadcast, so one write fills the same entry in all 85 engines.
3. **Load the section.** For each nucleotide `j`, pulse `section_update` with
   `section_addr = j`, `section_din = nucleotide`.
4. **Start.** Pulse `start_search`. Push reads with `read_fifo_we` /
   `read_fifo_din` whenever `read_fifo_full` is low. After the last read,
   pulse `reads_end`.
5. **Collect.** While `match_found` is high, the head record is on
   `match_read_id`, `score`, `match_location` and `match_candidate_only`;
   pulse `out_rd_en` to pop it. `match_read_id` numbers the reads from 0 at
   each `start_search`. `match_location` is the section index of the last
   reference nucleotide of the alignment.
6. **Section end.** `section_end` rises once every read has been handled and
   stays high until the next `start_search`. `busy` is high from
   `start_search` to then.

Do not reload the arrays while `busy` is high.

### Engine enable command

`qse_en` is an 8-bit command written with `qse_en_wr`: `8'hFF` enables all
engines, `8'h00` disables all, otherwise `{on, index+1}` enables (`on=1`) or
disables engine `index` (0..84). All engines are enabled after reset. A
disabled engine counts as "not found" and does not delay the filter; the host
is responsible for lowering `count_threshold` accordingly.

### Modes

* `enable_filt_op = 0`: every read goes straight to verification (pure
  alignment, no filtering).
* `enable_verif_op = 0`: a read that passes the filter produces one record
  with `match_candidate_only = 1` and zero score and location.

## Filter (`filtering_core`, `qse`, `ones_counter`)

Each **q-gram search engine** (`qse`) holds a private copy of the SQA in a
memory with a registered read port (block RAM) and runs a binary search over
a low and a high address limit. The probe address is formed combinationally
from the previous compare result and sent straight to the memory, so the
engine makes one probe per clock: at most `floor(log2 X) + 1 = 11` probes for
`X = 2033`, and `done` rises at most 12 clocks after `search_en`. The engine
stops early on an exact hit.

`filtering_core` extracts q-gram `i` from read nucleotides `i .. i+q-1`,
starts all engines with one `search_en`, waits until every engine is done,
sums the found flags (`ones_counter`) and raises `verif_en` when the sum is
**at least** `count_threshold`. `filt_done` pulses at most
`floor(log2 X) + 3` clocks after `search_en`. Under the system controller a
read that the filter rejects costs at most 15 clocks.

The memory cost is the dominant one: 85 engines × 2033 × 32 bits ≈ 5.5 Mbit,
which is why sections are kept small.

## Verification (`verification_core`, `peq_unit`, `myers_engine`)

**Pre-equal vectors.** `peq_unit` splits the read into two bit planes,
`Peq2` (high bits) and `Peq1` (low bits), bit `i` for read position `i`. A
counter walks the read and ORs a shifted `1` into each plane when the
nucleotide's bit is set: `READ_LEN` clocks (done at `READ_LEN + 1` after
start).

**Equal vector.** For a reference nucleotide `c`, the read positions equal to
`c` are `Eq = (Peq2 == c[1]) & (Peq1 == c[0])` bitwise, i.e. one of
`Peq2&Peq1`, `Peq2&~Peq1`, `~Peq2&Peq1`, `~Peq2&~Peq1`, selected by `c` and
registered (Reg Eq).

**Column update** (`myers_engine`), one reference nucleotide per clock, on
`R`-bit vectors `Pv`, `Mv` (vertical +1/−1 deltas) starting at `Pv = 1…1`,
`Mv = 0`, `score = R`:

```
Xv = Eq | Mv            Xh = (((Eq & Pv) + Pv) ^ Pv) | Eq
Ph = Mv | ~(Xh | Pv)    Mh = Pv & Xh
score += Ph[R-1] ? +1 : Mh[R-1] ? -1 : 0
Ph <<= 1                Mh <<= 1          (no carry in: the read may start anywhere)
Pv = Mh | ~(Xv | Ph)    Mv = Ph & Xv
```

After reference nucleotide `j`, `score` is the smallest edit distance between
the whole read and any reference substring ending at `j`. All `R` bits are
processed in one step (a 100-bit add), so there is no limit of a machine word
and no banding.

**Sequencing.** `verification_core` holds the section in its own memory. On
`verif_en` it captures the read, runs the precomputation, then streams
addresses 0..N−1 through the memory → Reg Eq → column update pipeline, and
pulses `valid_match` (with `score`, `match_location`) for **every** position
with `score <= score_threshold`. Neighbouring positions of one true hit are
therefore all reported. `verif_done` follows `READ_LEN + SECTION_LEN + 7`
clocks after `verif_en` (2155 clocks at the defaults) when not held. `hold`
stops issuing new reference nucleotides; at most three results already in the
pipeline still come out.

## System control (`read_mapper`, `sync_fifo`)

A small state machine takes one read at a time from the read FIFO, runs the
filter, and, if the read passes, resets and starts the verifier; filtering is
paused until `verif_done`. Mapping records go into an output FIFO
(`{candidate, read_id, score, location}` in one word). When the output FIFO
has four or fewer free entries the verifier is held, so no mapping is lost and
the host can read the output at its own pace. `sync_fifo` is a
first-word-fall-through FIFO whose `count` output supports this reservation.

## Departures from the published design and open points

* **q-gram length 16** is derived from resource figures, not given.
* **One column per clock.** The published text describes a multi-state state
  machine for the bit-vector update, but its measured alignment time (100 nt
  against 2164 nt in 0.011 ms at 187.5 MHz) leaves about one clock per
  reference nucleotide; this design does one column per clock after the Reg
  Eq stage.
* **Threshold comparison** is `count >= threshold`, as in the published flow
  chart; one sentence there says "higher than".
* **Precomputation and scoring enables** are generated inside the
  verification core rather than driven from the system controller.
* **Host interface.** The published system is driven by an ARM processor over
  AXI with DMA-fed FIFOs, an SD card and a UART. None of that is included:
  the top exposes plain ports, and `reads_end`, `section_end`, the engine
  enable encoding, the output record layout, FIFO depths (16) and the
  backpressure rule are this design's own.
* **No alignment output** (CIGAR/SAM); only read, end position and edit
  distance, like the published system.
* The host must keep `count_threshold` positive: for `e >= 6` with `q = 16`
  the q-gram lemma bound is not positive and the filter then passes every read.

## Files

| file | contents |
|---|---|
| `rtl/rm_pkg.sv` | default sizes, nucleotide type, enable-command constants |
| `rtl/read_mapper.sv` | top: system control, FIFOs, filter, verifier |
| `rtl/filtering_core.sv` | 85 search engines, q-gram extraction, count and compare |
| `rtl/qse.sv` | one q-gram search engine (SQA memory + binary search) |
| `rtl/ones_counter.sv` | population count of the engine flags |
| `rtl/verification_core.sv` | section memory, control, pipeline |
| `rtl/peq_unit.sv` | pre-equal bit-plane builder |
| `rtl/myers_engine.sv` | Eq select, Reg Eq, bit-vector column update |
| `rtl/sync_fifo.sv` | FIFO for reads and outputs |
| `tb/tb_ref_pkg.sv` | reference models: DP edit distance, q-gram value, random reads/mutations |
| `tb/tb_<block>.sv` | self-checking test of each block |
| `tb/tb_read_mapper.sv` | end-to-end test at reduced size (24-nt reads, q=6, 128-nt sections) |
| `tb/tb_read_mapper_full.sv` | end-to-end test at the default size |
| `tb/tb_workload_mapping.sv` | multi-section mapping run, edit distance 0..5, sensitivity check |
| `tb/tb_workload_alignment.sv` | alignment only: 100-nt query against a 2,164-nt reference |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself (with
a watchdog). With Verilator 5, from the repository root:

```
verilator --binary --timing --assert --top-module tb_read_mapper_full \
  -y rtl -y tb +libext+.sv rtl/rm_pkg.sv tb/tb_ref_pkg.sv tb/tb_read_mapper_full.sv
./obj_dir/Vtb_read_mapper_full
```

Replace the top module and file for any other testbench. The two `tb_read_mapper` tests
play the host for four sections (normal, one engine disabled, filter off,
verification off), push reads that are exact or edited copies of section
pieces plus random reads, pause the output reader to force backpressure, and
compare every output record against a dynamic-programming reference. The
full-size run builds in about 10 s and simulates in about 1 s.

## Workload results

* **Mapping sweep** (`tb_workload_mapping`, default sizes). A random
  reference of three sections, cut with an overlap of `R + 5`, is mapped with
  `e = 0..5`, using reads drawn from it with up to `e` substitutions or one
  insertion or deletion, plus random reads. Every drawn read is reported at
  its true end position, and every record matches the dynamic-programming
  reference. The number of reported locations grows with `e` (neighbouring
  end positions of one hit are all within `e`), from 40 for 40 reads at
  `e = 0` to a few hundred at `e = 5`.
* **Throughput estimate.** A rejected read costs at most 15 clocks per
  section. A 64.4-million-nucleotide chromosome gives about 33,000 sections
  of 2048 nucleotides, so filtering 100,000 reads takes about
  100,000 × 33,000 × 15 clocks ≈ 265 s at 187.5 MHz; verification adds
  `R + N + 7` clocks per read that passes.
* **Alignment only** (`tb_workload_alignment`). A 100-nucleotide query
  against 2,164 nucleotides needs two sections at the default size: 2160
  clocks each, 23 µs in total at 187.5 MHz. Setting `SECTION_LEN` to 2164
  would do it in one pass of about 2,280 clocks (12 µs).

To change sizes, override `READ_LEN`, `QGRAM_LEN` and `SECTION_LEN` on
`read_mapper` (all derived widths follow), and `READ_FIFO_DEPTH`,
`OUT_FIFO_DEPTH` (at least 5) and `READ_ID_W`.
