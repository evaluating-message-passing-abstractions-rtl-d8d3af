# HiSparse single-cluster SpMV accelerator in SystemVerilog

This design computes a sparse matrix-vector product, y = A · x. It streams
the non-zeros of A through a small number of parallel lanes called
**streams**. The catch is that two streams may want the same piece of on-chip
storage in the same cycle. Two **shuffle units** detect such conflicts and
route every element to the stream that owns the storage it needs. A few
**stream commands** travel in-band with the data and keep all lanes in step.

The RTL is a single-kernel, single-cluster build of the HiSparse architecture:

- two streams;
- input-vector and output-vector banks of two words per stream;
- 32-bit data with an 18 × 18 signed multiply;
- 2048-word block RAMs.

An 8 × 8 benchmark product finishes in 88 clock cycles. A 32 × 32 matrix
that is 99 % sparse finishes in about 590 cycles.

Everything is plain synthesizable SystemVerilog-2017 and has no vendor
primitives. The block RAMs are inferred arrays. There is one module, package
or interface per file, in `rtl/`, and the self-checking testbenches are in `tb/`.

## The idea in one picture

```
 matrix memory ──► matrix loader ──► shuffle (by column) ──► vector buffer access[s] ──► shuffle (by row) ──► processing engine[s] ──► pack ──► result drain ──► y
                                                               ▲                                                 │
 vector memory ──► vector loader ──► unpack ───────────────────┘                         output bank[s] ◄────────┘
```

The flow through the datapath:

1. Stream `s` owns rows `s, s+S, s+2S, …` of the matrix (`S` = `STREAMS`). It
   also owns one bank of the input vector and one bank of the output vector.
2. The **matrix loader** reads the non-zeros of each stream as
   `(row, column, value)` payloads.
3. The first shuffle sends each payload to the stream that owns the input
   vector bank holding `x[column]`.
4. There the **vector buffer access** unit swaps the column for the vector
   value.
5. The second shuffle then sends the payload to the stream that owns the
   output bank of `row`.
6. There the **processing engine** multiplies and accumulates into `y[row]`.

Both shuffles use the same rule. Element `c` of the vector and row `r` of the
result live in bank `c mod S` and bank `r mod S`.

## Partitions and the packed matrix format

The on-chip banks are small, so the cluster works on one **partition** of the
matrix at a time.

- A partition is `OB_SIZE × S` rows by `VB_SIZE × S` columns. With the
  defaults that is 4 × 4.
- A **row partition** is a horizontal strip of partitions. The cluster computes
  one row partition per trigger. `spmv_driver` re-triggers it for the next
  strip.
- Inside a row partition, the cluster walks the **column partitions** left to
  right.
- The vector bank of each stream is reloaded for every column partition.
- The output bank keeps accumulating until the strip is done.

The matrix sits in a **channel memory**. One word holds one payload for every
stream, `S × 64` bits.

| word address | contents |
|---|---|
| `2p` | start word of partition `p`'s payloads (bits 31:0) |
| `2p + 1` | number of payload words per stream in partition `p` (bits 31:0) |
| `2·total_parts` onward | packed payload words |

Here `p = row_part · num_col_parts + col_part`.

In a payload word, stream `s`'s element is in bits `[64s +: 64]`. The column
is in the low half and the value is in the high half. The column is local to
the partition, in the range `0 … VB_SIZE·S − 1`.

There is no row-pointer array, unlike CSR. Row changes are written into the
element stream itself as **row-skip tokens**:

- A token has column `−1` (all ones). Its value is the number of this stream's
  own rows to skip.
- A stream starts a partition at its first row, `k = 0`.
- Each data element belongs to row `row_base + s + S·k`.
- A token adds its count to `k`.
- All streams of a partition must have the same length. A shorter stream is
  padded with tokens of count 0, which are harmless.
- An empty partition has length 0.

Example: stream 0 of the top-right 4 × 4 partition of the benchmark matrix.
The partition covers rows 0–3 and columns 4–7. Stream 0 owns local rows 0 and
2. Local row 0 is empty and local row 2 holds 3 and 4 in local columns 0 and
2. Its entries are therefore:

```
(col −1, value 1)   skip one of my rows: now on local row 2
(col  0, value 3)
(col  2, value 4)
```

The vector memory holds `S` elements per word, with element `s` in bits
`[32s +: 32]`. Column partition `c` occupies words `c·VB_SIZE … c·VB_SIZE +
VB_SIZE − 1`.

The testbench class `spmv_image` (`tb/spmv_image_pkg.sv`) builds both memory
images from a dense matrix. It shows the format in executable form.

## Stream commands: SOD, EOD, EOS

Every lane carries `lane_pld_t`, defined in `rtl/hisparse_pkg.sv`. Its fields
are a 2-bit command, `row`, `col`, `mval` and `vval`. Besides data there are
three commands:

- **SOD** (start of data) opens a column partition.
- **EOD** (end of data) closes it.
- **EOS** (end of stream) closes the row partition.

For one row partition, each lane of the matrix side therefore carries:

```
SOD data… EOD  SOD data… EOD  …  SOD data… EOD  EOS
```

The vector side carries the same framing with `VB_SIZE` vector elements per
column partition. The vector is re-sent in full for every row partition.

Each unit uses the commands as its synchronisation points:

- The shuffle units line the commands up across lanes.
- The vector buffer access unit pairs a matrix partition with its vector
  partition.
- The processing engine clears its bank on the first SOD and reads it out on
  EOS.

## Matrix loader: requests and responses split

`matrix_loader` is three parts joined by a tagged memory request channel:

1. `ml_send` issues requests, one per cycle. For each column partition it
   sends:
   - two metadata reads;
   - a SOD marker;
   - `length` data reads from the start word;
   - an EOD marker.

   After the last column partition it sends EOS. A marker is a request with
   `rd = 0`: it never touches the memory but travels in order with the reads.
2. `bram_port_adapter` turns the request channel into block-RAM reads with
   one cycle of latency. The tag rides along with each read. Responses go into
   a small queue, which is a skid buffer. The adapter accepts a request only
   when the queue has room for the request and for the read still in flight.
   So back-pressure from downstream never loses a word.
3. The responses are demultiplexed by tag:
   - Metadata goes back to `ml_send`. It must wait for the length before it
     can stream.
   - Data and markers go to `ml_recv`.

   `ml_recv` decodes tokens and computes row indices, and broadcasts a marker
   to every lane.

The split is what lets the loader stream one word per clock. The request side
never waits for a response except at the metadata of a new partition.
`vector_loader` reuses the same adapter. It has no metadata, because vector
partitions are at fixed addresses.

## Shuffle units

The shuffle unit (`shuffle_unit`, with `shuffle_arbiter` and
`shuffle_crossbar`) is the hardest part of the design, and the place where
throughput is won or lost. There are two instances:

- `KEY_IS_ROW = 0` routes by column, to the input-vector bank.
- `KEY_IS_ROW = 1` routes by row, to the output-vector bank.

### Slots, grants and resends

Each input lane has one **slot** that holds its current payload. In every
cycle:

- `shuffle_arbiter` (combinational) visits the slots in priority order. It
  starts at a rotating `offset`, which advances by one each cycle for
  fairness. It grants a slot if no earlier-visited slot was granted the same
  destination bank. Every bank that is asked for is granted exactly once, and
  the top-priority slot always wins.
- `shuffle_crossbar` delivers the granted payloads. Output `d` carries the
  granted slot whose destination is `d`.
- A slot that was granted, or was empty, reads its input lane without
  blocking. It takes a payload if one is there.
- A slot that lost keeps its payload and offers it again next cycle: the
  **resend**. Its input is not read that cycle, and this back-pressure
  propagates up to the matrix loader.

Without conflicts, every lane moves one payload per cycle with one cycle of
latency. With all `S` lanes hitting one bank, that bank still drains one
payload per cycle.

### Command synchronisation and flushing

The unit has four states:

- **SYNC**: wait until every input lane shows the same command.
  - SOD: consume it on all lanes, send one SOD on every output, and enter
    STREAM.
  - EOS: consume it, forward it, and stay in SYNC.
- **STREAM**: the slot and grant machinery above. When a slot reads an EOD,
  that lane is marked finished. A finished lane's slot stops reading, so the
  next partition's SOD is not swallowed.
- **FLUSH**: entered once every lane has seen EOD. The unit runs
  `ARB_STAGES × STREAMS` further cycles. That is enough to drain the worst
  case, where every slot holds a payload for the same bank.
- **EXIT**: send a single EOD on every output, then return to SYNC.

The whole unit advances only in cycles where every output is ready. This one
shared stall keeps the lanes aligned and avoids per-lane bookkeeping.

Assertions check three rules:

- no data is seen while in SYNC;
- no SOD or EOS is taken while streaming;
- all slots are empty at EXIT.

## Vector buffer access: double-buffered vector banks

Each stream has a `vector_buffer_access` unit and a one-port 32-bit bank. The
bank has two halves of `VB_SIZE` words each.

The **fill side** takes the vector lane:

- SOD waits until the half being filled is free.
- Each element is written at `half·VB_SIZE + position`.
- EOD marks that half full and switches to the other half.

The **lookup side** takes the matrix lane from the first shuffle:

- SOD waits until the half it reads is full.
- Each payload reads word `half·VB_SIZE + col / S` and replaces `col` with the
  value it finds.
- EOD frees that half and switches halves.

Because there are two halves, the vector for partition `c + 1` is loaded while
the payloads of partition `c` are still being looked up. An empty partition
therefore costs only its SOD/EOD framing. The single port gives reads
priority over writes. The fill side simply waits for a cycle without a read.

## Processing engine and the in-flight write queue

Each stream has a `processing_engine` and a dual-port 32-bit output bank.
Port S reads and port A writes. Row `r` lives at word `(r / S) mod OB_SIZE`.

For a data payload the engine works in two stages:

- **Cycle t:** read the row's partial sum on port S. Register the product
  `mval[17:0] × vval[17:0]`, signed 18 × 18.
- **Cycle t+1:** add the product to the sum returned by the bank and write the
  new sum on port A.

Consider two payloads for the same row in consecutive cycles. The second one
reads the bank in the same cycle that the first one writes it. The bank
returns the old value, because it is read-first. This is a read-after-write
hazard.

The **in-flight write queue (IFWQ)** removes the hazard without stalling:

- It is a shift register of `{valid, address, sum}`. Every cycle it shifts in
  that cycle's write, or an invalid entry if there was none.
- The add stage compares its address with every entry. It takes the newest
  matching sum in place of the bank's output.
- The depth is the bank's read latency plus its write latency: 1 + 1 = 2.
  That covers every write the bank read could have missed.

The engine accepts one payload per cycle even when every payload hits the
same row. The testbench pushes 16 same-row payloads back to back and counts
15 forwards.

The rest of a row partition:

- **First SOD:** the engine clears its bank, taking `OB_SIZE` cycles. The SOD
  and EOD of later column partitions are consumed.
- **EOS:** the engine waits for its last write to land. Then it reads the bank
  out through a `bram_port_adapter` as results `{last, index, value}`, with
  `index = row_base + a·S + s`.
- **Packing:** `result_pack` takes one result from each engine in turn. This
  restores row order (`base, base+1, …`). The flag `last` marks the final row
  of the strip.

The multiply uses the low 18 bits of each operand as a signed number. The
sums are 32 bits and wrap. An 18 × 18 multiply fits one FPGA DSP slice at
100 MHz. The cost is dynamic range: an operand outside −131072 … 131071 loses its upper bits.
The testbench reference model applies the same truncation.

## Driver, result drain and the top level

- `spmv_driver` starts the matrix loader and the vector loader on row
  partition 0. It waits for the drain's `row_done`, then starts the next row
  partition. After the last one it raises `finished`. `num_cycles` counts the
  cycles from `start` to `finished`.
- `result_drain` is always ready. It writes each result to
  `final_vec[index mod NUM_ROWS]` and pulses `row_done` on a result flagged
  `last`.

How to use `hisparse_top`:

1. Hold `rst` high for a few cycles (synchronous, active high).
2. Write the matrix image through `ml_wr_en/ml_wr_addr/ml_wr_data`. Write the
   vector image through `vl_wr_en/vl_wr_addr/vl_wr_data`. These drive the
   second port of each memory.
3. Set `num_row_parts`, `num_col_parts` and `total_parts`. Pulse `start` for
   one cycle.
4. Wait for `finished`. Then read `final_vec` and `num_cycles`.

`busy`, `result_count` and the `ev_*` event counters are for observation:

| counter | what it counts |
|---|---|
| `ev_sh1_resend` | shuffle resends in the first unit |
| `ev_sh2_resend` | shuffle resends in the second unit |
| `ev_sh1_flush` | flushes completed by the first unit (one per column partition) |
| `ev_pe_forward` | IFWQ forwards, per engine |

The cluster (`hisparse_cluster`) brings its block-RAM ports out, so it can be
used with other memories. Every RAM is expected to have one cycle of read
latency.

| RAM | width | wiring |
|---|---|---|
| matrix channel | `S·64` bits | one read port |
| vector | `S·32` bits | one read port |
| vector bank, per stream | 32 bits | one read/write port |
| output bank, per stream | 32 bits | read port S and write port A |

Every connection between units passes through a two-entry `stream_fifo`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `STREAMS` | 2 | parallel streams (lanes) in the cluster |
| `VB_SIZE` | 2 | words per input-vector bank half; a partition has `VB_SIZE·STREAMS` columns |
| `OB_SIZE` | 2 | words per output bank; a partition has `OB_SIZE·STREAMS` rows |
| `MEM_DEPTH` | 2048 | words per block RAM (11-bit addresses) |
| `NUM_ROWS` | 8 | length of `final_vec`, which is the largest matrix height the top can return |
| `MUL_W` | 18 | signed operand width of the multiply |
| `IFWQ_DEPTH` | 2 | in-flight write queue entries (bank read + write latency) |
| `FIFO_DEPTH` | 2 | entries of each inter-unit queue |

Constraints on the matrix and parameters:

- The matrix must be padded to a whole number of partitions.
- The height must not exceed `NUM_ROWS`, or rows overwrite each other in
  `final_vec`.
- The image must fit in `MEM_DEPTH` words.

## Performance

| workload | cycles, start to finished | reference figures |
|---|---|---|
| 8 × 8 benchmark, 18 non-zeros, x = 0..7 | 88 | 237 for the fully streaming HLS version of the same architecture; 120 for a dense one-operation-per-cycle product |
| 32 × 32, 99 % sparse (10 non-zeros, 64 partitions), `NUM_ROWS = 32` | about 590 | 727 reported for this workload; 2016 for the dense product |

The benchmark's result is y = 4 0 36 62 76 94 48 54.

Most of the time goes into per-partition overhead, not into the non-zeros:

- two dependent metadata reads;
- the SOD/EOD framing through two shuffle units, with their sync and flush
  cycles;
- the bank clear and read-out once per row partition.

## Where this departs from the original architecture

- **Configuration.** Only one kernel with one cluster is built. The
  multi-kernel parts of HiSparse are absent: HBM channels, vector duplication
  across clusters, and result merging across kernels. So are the FPGA host
  side (processing system, AXI GPIO, memory initialisation files). The top
  instead has host write ports and plain outputs.
- **Shuffle unit.** The original shuffle has an outer synchronising module
  and an inner core. Here they are one state machine. The arbiter is a single
  combinational stage instead of several pipeline stages, so the flush lasts
  `STREAMS` cycles. The unit stalls all lanes together when any output is not
  ready.
- **Memory formats.** These are this design's own choices, chosen to be
  simple and consistent:
  - the bit layout of channel and vector words;
  - the metadata offset formula;
  - padding with zero-count tokens;
  - the vector address map.
- **Bank clearing and result order.** These are likewise this design's own:
  clearing the output bank at the first SOD, round-robin packing, and
  `row_done` on the last result.
- **Cycle counts.** Counts are not comparable cycle for cycle with the HLS
  version. That version's pipeline depths came from its compiler; here every
  unit streams one payload per cycle with one cycle of latency.
- **Row partitions do not overlap.** The driver starts a row partition only
  after the previous one's last result has been drained.

## Verification

Every block has a self-checking testbench in `tb/`. Each one:

- prints `TB_RESULT checks=<n> failures=<m>`;
- has a watchdog;
- computes its expected values independently of the RTL.

| testbench | what it shows |
|---|---|
| `tb_hisparse_top` | benchmark matrix and a random 8 × 8 at default parameters; checks y, the benchmark cycle bound, and that every mechanism fired at least once: resends in both shuffles, flushes, IFWQ forwarding, row-skip tokens, an empty partition, matrix-loader back-pressure, vector-bank refill during lookup |
| `tb_workload_32x32` | three random 99 %-sparse 32 × 32 products, checked against y and the 727-cycle figure |
| `tb_hisparse_cluster` | 16 × 16 matrices one row partition at a time, with random result back-pressure |
| `tb_cluster_four_streams` | the cluster built with four streams (8 × 8 partitions) on 32 × 32 matrices |
| `tb_matrix_loader`, `tb_ml_send`, `tb_ml_recv` | metadata walk, tokens, commands and back-pressure |
| `tb_vector_loader`, `tb_vector_unpack` | vector framing and lane split |
| `tb_shuffle_unit`, `tb_shuffle_arbiter`, `tb_shuffle_crossbar` | conflict resolution, fairness, full rate without conflicts, flush count |
| `tb_vector_buffer_access` | lookups across six partitions with overlapping refills |
| `tb_processing_engine` | sums with 18-bit truncation, result order, and 16 same-row payloads in 16 cycles |
| `tb_result_pack`, `tb_result_drain`, `tb_spmv_driver` | ordering, flags and counters |
| `tb_bram_tdp`, `tb_bram_port_adapter` | latency, read-first, no loss under back-pressure, one request per cycle |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/hisparse_pkg.sv tb/spmv_image_pkg.sv rtl/*.sv tb/tb_hisparse_top.sv \
  --top-module tb_hisparse_top -o sim && ./obj_dir/sim
```

The package is listed first so that it is compiled before the modules that
import it. The glob repeats it, which Verilator reports as a harmless
duplicate-declaration warning. All testbenches finish in well under a second
of simulation time. `tb_hisparse_top` is the
full-size run: it uses the top with every parameter at its default.
