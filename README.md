# Selection-based kNN classifier

A k-nearest-neighbour (kNN) classifier in SystemVerilog. It is sized for
touch-modality recognition on a 4 x 4 tactile sensor array. Each sample has
16 taxel values. The classifier decides between two touch gestures, sliding
a finger and rolling a washer.

A kNN classifier spends its time in two places: computing the distance to
every training sample, and finding the K smallest of those distances. The
usual approach sorts the whole distance vector. This design does not sort.
A **selector** runs once over the vector and keeps only the K best
candidates in K ordered registers. It handles the last part of the vector
with a cheaper rule: most late elements fail a single compare against the
current K-th minimum and are skipped.

Default configuration: 672 training samples, 16 features, K = 3, two
classes, 24-bit fixed point with 6 integer and 18 fraction bits (<6,18>).
Six distance units run in parallel, each handling four features per clock.
A query takes 1126 clocks, or 11.26 us at 100 MHz.

The top level, `knn_accel`, has two AXI ports:

- an AXI4-Lite slave, through which a processor writes training and query
  words and reads back the result;
- an AXI4 read master, which fetches the training set from external
  memory in bursts.

Inside it, `axil_regs` turns register accesses into the word stream and
control signals of the classifier core, `knn_top`. The core's own ports
are plain valid/ready signals, so it can also be used without the
register interface.

## Data flow of one classification

```
                            AXI4-Lite (s_axi_*)
                                     |
                              +-----------+  results back from class_det
                              | axil_regs |<------------------------------
                              +-----------+
   AXI4 read (m_axi_*)      s_valid/s_ready/s_data/s_query
          |                          |
   +-------------+  word stream      |
   | burst_fetch |-------------------+
   +-------------+                   |
                  +----------+   features + labels   +-----------+
                  | data_acq |---------------------->| train_mem |  672 x 16 x 24 bit
                  +----------+                       +-----------+
                    | query (16 words)                     | 6 samples x 4 features / clock
                    v                                      v
                  +----------------------------------------------+
                  | distance_calc: 6 x udc, 112 rows x 4 clocks  |
                  +----------------------------------------------+
                                   | one row = 6 x {distance, class}
                                   v
                              +----------+
                              | dist_mem |  combined Distance/Modality array
                              +----------+
                                   | 1 element / clock
                                   v
                              +----------+    K x {distance, class}   +-----------+
                              | selector |--------------------------->| class_det |--> res_class
                              +----------+                            +-----------+
```

`knn_top` contains a four-state controller (idle, distance, select, vote)
that runs these phases one after another. The four phases:

1. **Acquisition** (`data_acq`). Training words and query words arrive on
   one valid/ready stream. Training words go into `train_mem`. The 16th
   query word fires `query_done`, which starts a classification. The
   training set reaches that stream in one of two ways:
   - `burst_fetch` reads it from external memory over AXI4 in 16-beat
     bursts;
   - the training words are written to the word port directly.
2. **Distance calculation** (`distance_calc`, six `udc` units). Each
   `train_mem` read returns 6 samples x 4 features. Each `udc` squares and
   sums four differences per clock, so a row of six distances is done
   after four clocks. 672 samples take 112 rows, or 448 clocks. Each
   finished row goes to `dist_mem` together with the six class labels.
3. **Selection** (`selector`). One scan over the 672 elements, one per
   clock. The result is the three nearest neighbours with their labels.
4. **Vote** (`class_det`). A fully parallel count of the three labels
   gives the majority class.

## The selector

This part is the core of the design.

The selector holds K registers `nn[0..K-1]`. They are always ordered
`nn[0] <= nn[1] <= ... <= nn[K-1]`. At the start of a scan every register
holds the largest distance code, 0xFFFFFF.

**Insertion.** When an element `e` arrives, all K compares `e < nn[p]`
happen in the same clock. Because the registers are ordered, the compare
results form a thermometer code. Let p be the first position where `e` is
smaller. Then `e` takes register p, registers p .. K-2 each move down by
one, and the old `nn[K-1]` drops out. If no compare is true, nothing
changes. An element equal to a register does not displace it. Among equal
distances, the training sample with the lower index therefore wins.

**The split.** The distance vector of S elements is cut into two parts:

- V1 is the first S1 = floor(SPLIT x S / 100) elements: 403 of 672 for the
  default 60:40 split.
- V2 is the remaining elements.

On V1 (step 2), every element goes through the insertion above. On V2
(step 3), an element is first compared with `nn[K-1]`, the current K-th
minimum. If it is not smaller, it is skipped. Otherwise it is inserted.
The idea is that after V1 the registers already hold small values. Most
V2 elements then fail the first compare, so the registers rarely change.
In the default mode the hardware spends one clock per element in both
parts, so the split changes which rule applies but not the scan time.

**`early_out`.** With `early_out` high, the selector stops the scan at the
first V2 element that is not below `nn[K-1]`. This saves time, but the
result is no longer guaranteed to be the exact K nearest. A small neighbour
later in V2 is missed. With `early_out` low the whole vector is scanned
and the result is always exact. The input is sampled when the selector
starts, so it can change from one query to the next. The `aborted` and
`v2_inserts` outputs report which path a scan took.

Example with K = 3. After V1 the registers hold {2, 5, 9}. The V2 values
12, 4, 9, 1 then give:

| V2 value | Action | Registers after |
|---|---|---|
| 12 | skipped (not < 9) | {2, 5, 9} |
| 4 | inserted at position 1 | {2, 4, 5} |
| 9 | skipped | {2, 4, 5} |
| 1 | inserted at position 0 | {1, 2, 4} |

With `early_out` high, the scan would stop at the value 12 and return
{2, 5, 9}.

## Distances and number format

- Features are signed <6,18> fixed point, in the range [-32, 32).
- `udc` computes the distance as the sum of (q_i - t_i)^2. There is no
  square root, so this is the squared Euclidean distance.
- Each square is formed exactly, then cut to 18 fraction bits.
- The sum is kept wide. At the end it saturates to the unsigned 24-bit
  <6,18> distance, whose largest value is just under 64.
- A saturated distance equals the selector's start value. Such a sample
  can never become a neighbour.

You can use this to pad a smaller training set. Fill the unused slots
with samples whose features are far from every query, and they are never
picked.

## Register interface

`axil_regs` decodes an 8-bit address. All registers are 32 bits wide.

| Offset | Access | Register | Content |
|---|---|---|---|
| 0x00 | W | TRAIN_DATA | one training word (feature in bits 23:0, or label in bit 0) |
| 0x04 | W | QUERY_DATA | one query feature in bits 23:0 |
| 0x08 | RW | CTRL | bit 0 `train_clear` (pulse), bit 1 `early_out` (level), bit 2 `fetch_start` (pulse) |
| 0x0C | RW | FETCH_BASE | byte address of the packed training set |
| 0x10 | R | STATUS | bit 0 result ready, 1 busy, 2 `train_full`, 3 `fetch_busy`, 4 data word pending |
| 0x14 | R | RESULT | class in the low bits, bit 8 early-out stop, bits 31:16 V2 insertions |
| 0x18 | R | CYCLES | latency of the last query in clocks |
| 0x1C | R | FETCH_INFO | bits 15:0 bursts, bits 23:16 error beats of the last fetch |
| 0x20 | R | VOTES | votes for class c in byte c |
| 0x40 + 4p | R | NN[p] | neighbour p: distance in bits 23:0, class in bits 31:24 |

Behaviour of the port:

- **Data writes.** A write to TRAIN_DATA or QUERY_DATA goes into a
  one-word holding register, which offers the word to the core's stream.
  While that word is still waiting, the next data write is held off
  (`awready` and `wready` stay low). No word is lost. Software can
  therefore write the next query straight after the previous one. The
  writes simply stall until the core is free.
- **Results.** A finished classification is copied into RESULT, CYCLES,
  VOTES and NN[], and sets STATUS bit 0 and `irq`. Reading RESULT clears
  both. The copy stays valid until the next result arrives, so the
  previous result can be read while the next query runs.
- **Other details.** Write strobes select bytes of FETCH_BASE. CTRL is
  written only when strobe 0 is set. Unmapped addresses read as zero and
  ignore writes. Every response is OKAY.

A typical sequence:

1. Write FETCH_BASE, then CTRL = 0x4 to fetch the set. Poll STATUS until
   bit 2 is set and bit 3 is clear.
2. Write the 16 query features to QUERY_DATA.
3. Wait for `irq`. Read NN[], VOTES and CYCLES as needed, and RESULT last.

## Stream format and control

All words on `s_data` are 24 bits. `s_query` says which kind of word is
offered:

- **Training words** (`s_query = 0`). Each training sample is 16 feature
  words followed by one label word, where bit 0 is the class. Samples are
  sent in index order, 0 to 671. Sample i lands in row i/6, lane i%6 of
  `train_mem`.
  Training words are accepted only until the set is complete, which raises
  `train_full`. Pulse `train_clear` to load a new set.
- **Query words** (`s_query = 1`). A query is 16 feature words. Query words
  are accepted only while all of these hold:
  - the set is complete;
  - the classifier is idle;
  - the clock in which `query_done` is high has passed.

  These rules keep the query register stable during a classification. A
  source may send the next query at once; it is simply stalled
  (`s_ready` low) until the current result is out.

The stream follows the valid/ready rule: once a word is offered, it stays
offered until it is taken. An assertion in `data_acq` checks this.

### Fetching the training set from memory

The training set can also be fetched from external memory instead of
written word by word.

**Memory layout.** The set is packed as NT x 17 32-bit words, sample by
sample:
- words 0 to 15 hold the features, each in bits 23:0;
- word 16 holds the label in bit 0.

**Starting a fetch.** Pulse `fetch_start` with the byte address of the
set on `fetch_base`. Align that address to 64 bytes so no burst crosses a
4 KB page. A fetch first clears the old training set. `fetch_start` is
ignored while a classification is running.

**Bursts.** `burst_fetch` issues INCR read bursts of 16 four-byte beats,
one burst outstanding at a time. The default set needs 11,424 words, or
714 bursts. `rready` follows the acquisition side, so backpressure stalls
the memory rather than dropping data.

**Status.** While the fetch runs, `fetch_busy` is high and the word port
is held off. `fetch_bursts` reports how many bursts the fetch issued, and
`fetch_errors` counts beats that returned an error response.

Results are valid for one clock on `res_valid`:

| Signal | Content |
|---|---|
| `res_class` | majority class |
| `res_nn` | the K neighbours as {distance, class}, nearest first |
| `res_counts` | votes per class |
| `res_cycles` | latency of this query in clocks |
| `res_v2_inserts` | number of V2 elements that entered the registers |
| `res_aborted` | high if the scan was stopped by `early_out` |

Reset is asynchronous and active low. It clears all control state. The
memories are not cleared.

## Timing

Let R = NT/UN be the number of rows and G = NF/UF the number of clocks per
row. Latencies in clocks:

| Stage | Latency | Defaults |
|---|---|---|
| distance calculation | R x G + 2 | 450 |
| selector, full scan | S + 1 | 673 |
| whole query, from `query_done` to `res_valid`, full scan | R x G + S + 6 | 1126 |
| whole query, early-out stop at element i | R x G + i + 7 | |
| register port: last QUERY_DATA write to the core, core result to `irq` | 1 + 1 | 2 |

Loading the training set takes one clock per accepted word: 672 x 17 =
11,424 words.

## Parameters

The parameters of `knn_accel` and `knn_top` have these defaults; `knn_pkg` holds the
package-wide constants.

| Parameter | Default | Meaning |
|---|---|---|
| `NT` | 672 | training samples; must be a multiple of `UN` |
| `NF` | 16 | features per sample; must be a multiple of `UF` |
| `K` | 3 | neighbours |
| `UN` | 6 | distance units in parallel |
| `UF` | 4 | features per distance unit per clock |
| `SPLIT` | 60 | percentage of the vector in V1 |
| `knn_pkg::W`, `FRAC` | 24, 18 | word width and fraction bits |
| `knn_pkg::CLS_W`, `N_CLASS` | 1, 2 | label width and number of classes |

## Departures and limits

- **Where the training set lives.** The reference system keeps the
  training set in external SDRAM behind an AXI interconnect, driven by an
  ARM processing system. The processor, the interconnect and the memory
  are outside this RTL. `knn_top` reads the set over its AXI4 read port,
  or takes it on the word port, and keeps it in an on-chip buffer,
  `train_mem` (258,048 bits at the defaults). Every later query reuses
  that copy. The reference system reaches the IP through an AXI
  SmartConnect that shares one port between data writes and result reads.
  Here `axil_regs` provides that single port directly. Its register map
  is this design's own.
- **Number format.** The "exact" variant of the reference design computes
  in 32-bit floating point. This RTL implements only the 24-bit <6,18>
  fixed-point datapath, which is used by the approximate variant. The
  approximate variant's down-sampling and down-scaling are done offline:
  they reduce each raw recording to the 16 values per sample that this
  hardware takes.
- **Overlap.** The phases do not overlap. Distances are all computed
  before selection starts.
- **K registers.** The selector keeps its K minima in registers instead
  of writing them back into the distance array.
- **Latency.** The published figures (25.7 us exact, 11.2 us approximate)
  come from an HLS build that includes data movement. They are not
  comparable one-to-one with the 1126 clocks of this RTL.
- **Choices made here.** The tie rules, the saturation, the stream format,
  the register map, the `irq` output and the `early_out` input are choices
  of this implementation. For the V2 rule, the exact scan (skip and
  continue) is the default. The stop at the first non-improving V2
  element is available through `early_out`.
- **Sizes the defaults do not cover.** Only two classes fit in the 1-bit
  label. Larger K, larger sets or more features need different parameters.
  For instance, 699 samples with K = 10 needs `NT = 702, K = 10`.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/knn_ref_pkg.sv`
holds the integer reference model: distances, selection including the
early-out rule, and the vote. `tb/axi_mem_model.sv` is a behavioural model
of the external memory behind the AXI read port. It inserts random
latencies and gaps, and flags bursts that break the AXI rules.

| Testbench | What it checks |
|---|---|
| `tb_udc` | random and saturating distances, one-clock latency |
| `tb_train_mem`, `tb_dist_mem` | placement and read latency |
| `tb_data_acq` | word placement, every flow-control rule, a stall, reload |
| `tb_distance_calc` | all distances and labels, row count, latency (R x G + 2) |
| `tb_selector` | exact and early-out scans against the model on random, tied, sorted and V2-heavy vectors, including latency |
| `tb_class_det` | all label patterns for K = 3, ties for K = 4 |
| `tb_knn_top` | 30 samples, 24 queries, sets loaded by stream and by burst fetch; result, neighbours, V2 statistics and latency |
| `tb_burst_fetch` | AXI burst count and lengths, word order under backpressure, restart |
| `tb_knn_top_full` | default size (672 samples), 12 queries, sets loaded by stream and by burst fetch |
| `tb_axil_regs` | register map, byte strobes, data words in order with the write held off while one is pending, CTRL pulses, result capture, `irq` and clear on read |
| `tb_knn_accel` | the whole accelerator through its AXI ports: 30 samples, 16 queries written back to back, a set written through TRAIN_DATA and a set fetched from memory; every result register against the model |
| `tb_knn_accel_full` | the same at the default size (672 samples, 8 queries) |
| `tb_knn_workloads` | K = 10 with 699 samples of 9 features (padded to 702 x 12); K = 5 with 300,000 samples of 2 features |

The top-level tests also count how often each mechanism occurs, and
fail if one never does. The mechanisms are: stalls, V2 insertions, V2
skips, early-out stops, saturated distances, mode switches, a
training-set reload and a burst fetch. The `knn_accel` tests also count
held-off register writes and interrupts.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_knn_accel_full \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/knn_pkg.sv tb/knn_ref_pkg.sv \
  tb/tb_knn_accel_full.sv
./obj_dir/Vtb_knn_accel_full
```

Replace the testbench name to run any other one. The full-size run takes
a few seconds.

## Files

- `rtl/knn_pkg.sv`: widths, default sizes, the {distance, class} struct
- `rtl/knn_accel.sv`: top level with the two AXI ports
- `rtl/axil_regs.sv`: AXI4-Lite register interface
- `rtl/knn_top.sv`: classifier core and its controller
- `rtl/burst_fetch.sv`: AXI4 burst reader for the training set
- `rtl/data_acq.sv`, `rtl/train_mem.sv`: acquisition and training buffer
- `rtl/udc.sv`, `rtl/distance_calc.sv`: distance units and their sequencer
- `rtl/dist_mem.sv`: combined Distance/Modality array
- `rtl/selector.sv`: nearest-neighbour selector
- `rtl/class_det.sv`: majority vote
- `tb/`: testbenches, the reference package, the memory model and the
  workload runner
