# ForeGraph: iterative graph processing spread over several FPGA boards

A graph with billions of edges does not fit in the block RAM of one FPGA, and random
access to vertex values in DRAM is slow. This design divides the vertices of the graph among
P boards, so that each board owns one *interval* of vertices. Each board streams edges from
its own DRAM, and all random vertex reads and writes hit on-chip RAM. A board updates only the
vertices it owns. It reads the values of the other intervals from copies kept in its DRAM.
After every iteration, the boards send each other only the parts of their intervals that
changed.

Inside a board, each interval is cut into Q *sub-intervals* of fewer than 65,536 vertices. A
vertex inside a sub-interval is therefore addressed with 16 bits, and an edge takes 32 bits
(16-bit source index, 16-bit destination index). K processing elements (PEs) work side by side.
Each PE owns one source sub-interval and a copy of the current destination sub-interval. The
edges are pre-arranged in DRAM so that every memory word feeds all PEs at once with no
conflicts.

The RTL implements breadth-first search (BFS, 8-bit depths). It also implements connected
components by minimum-label propagation (WCC), selected by a parameter. PageRank is not
implemented (see *Departures*).

## Partitioning

With S = P·Q sub-intervals in total, vertex `v` is placed by stride:

* global sub-interval `v mod S`;
* interval (board) `(v mod S) / Q`;
* sub-interval `(v mod S) mod Q` inside that interval;
* local index `v / S` inside the sub-interval.

Striding spreads high-degree vertices evenly, so the sub-blocks have similar sizes. No edges
have to be sorted. The edges whose source lies in sub-interval *i* and whose destination lies
in sub-interval *j* form the sub-block SB(i→j). Board *b* stores every sub-block whose
destination lies in its own interval.

This placement is done by the host before a run. In the testbenches it is done by the
`graph_image` class in `tb/fg_tb_pkg.sv`.

## Memory layout of a board

One memory word is `MEM_W` = 1024 bits. It holds 128 eight-bit vertex values or 32 edges.

| Region | Address (words) | Contents |
|---|---|---|
| Vertex region | `(x·QMAX + si)·SI_WORDS` | sub-interval `si` of interval `x`, for all P intervals (own and copies) |
| Edge stream | from `cfg_edge_base` | one *segment* per (source interval x, source group g, destination sub-interval j), in that order |

A segment holds one header word (`seg_hdr_t` in `rtl/fg_pkg.sv`: magic byte, x, g, j, and the
number of edge words). After the header come the K sub-blocks SB(g·K+k → j), k = 0..K-1,
*shuffled*: edge *r* of sub-block *k* is placed at position `r·K + k`. Every run of K
consecutive edges therefore holds one edge for each PE. Sub-blocks shorter than the longest one
are padded with NULL edges (source index `0xFFFF`), which the dispatcher drops. A segment with
no edges is just a header with a word count of zero.

## One board

```
                 +-------------+        +-----------+
 DRAM port <---->| scheduler   |------->| update    |
  (mux)    |     | (DFR loops) |        | bitmap    |
           |     +------+------+        +-----------+
           |            | mode
           |     +------v------+  edges / rows  +------+------+ ... +------+
           +---->| dispatcher  |--------------->| PE 0 | PE 1 |     | PE K-1|
           |     +-------------+                +------+------+ ... +------+
           |                                            | K destination copies
           |     merged rows  <----- merge_unit <-------+
           |
           +---->| data_controller |<--->| interconnect_ctrl |<---> ring
```

### Scheduler and destination-first replacement

The scheduler (`rtl/scheduler.sv`) runs one iteration as three nested loops: source interval
*x*, source group *g* (K sub-intervals at a time), destination sub-interval *j*.

* Source sub-interval g·K+k is loaded once per group into PE *k*.
* For each *j*, the scheduler:
  1. reads the segment header and checks it against (x, g, j); a mismatch sets `hdr_err`;
  2. broadcasts destination sub-interval *j* to all PEs;
  3. streams the segment's edge words;
  4. waits for every PE to drain;
  5. writes the merged destination back to DRAM.

This order keeps the source sub-intervals on chip and replaces the destination after every
segment ("destination first"). A source group is loaded once per group, and a destination
sub-interval once per segment.

Two cases skip work:

* **Inactive group.** If none of a group's K source sub-intervals changed in the previous
  iteration, its sources are not loaded and no edges are read. Only the segment headers are
  read, to step over the segments.
* **Empty segment.** A segment with no edges costs only its header read.

### Processing element

Each PE (`rtl/pe.sv`) contains:

* a source buffer and a destination buffer (`vertex_buffer`, a dual-port RAM of `DEPTH`
  values, organised as rows of one memory word);
* a 16-entry edge FIFO (`edge_fifo`);
* the update rule (`update_unit`).

Edges pass through a two-stage pipeline:

1. Read the source value and the destination value.
2. Compute the candidate value and, if it is better, write it back.

A write in stage 2 is forwarded to a read of the same destination in the next cycle. Back-to-back
edges to the same vertex therefore see the newest value, and a PE accepts one edge per cycle.
The PE raises `changed` when it writes, and `idle` when its FIFO and pipeline are empty.

Update rules (`ALGO`):

* **BFS:** `new = src + 1` if that is smaller than `dst`. All ones means unreached and is never
  incremented.
* **WCC:** `new = src` if that is smaller than `dst`.

### Dispatcher

The dispatcher (`rtl/dispatcher.sv`) works in one of four modes, set by the scheduler:

* **Source:** writes a loaded row into the source buffer of one PE.
* **Destination:** writes a loaded row into the destination buffers of all PEs.
* **Header:** hands the word to the scheduler.
* **Edge:** splits each word into 32 edges. Edge *l* of a word goes to PE `(base + l) mod K`,
  and `base` advances by 32 per word, which undoes the shuffling. NULL edges are dropped. The
  stream stalls while any edge FIFO is full.

### Destination copies and merge

Every PE updates its own copy of the destination sub-interval. At write-back,
`rtl/merge_unit.sv` reads the same row from all K PEs and takes the element-wise minimum. For
BFS and WCC this equals the result of a single shared copy, because a value only ever
decreases. Within one segment, an improvement made by one PE is not seen by the other PEs
until the copies are merged at write-back.

### Update bitmap

`rtl/update_bitmap.sv` keeps one bit per sub-interval of the whole graph (P·QMAX bits). There
are two vectors:

* *previous*: used for skip decisions during this iteration;
* *current*: set by local write-backs and by sub-intervals received from other boards.

At the start of a run all bits are set, so nothing is skipped in the first iteration.

## Exchange between boards

After computing, every board raises `comp_done`, and all boards wait until every board has.
Then `rtl/data_controller.sv` reads each local sub-interval that changed in this iteration and
sends it as a series of packets. Each packet carries one memory word plus the origin board, the
sub-interval, the word offset and the last board that should receive it. Every packet is a
broadcast that passes once around the ring. After its data, each board sends an END packet,
which carries whether the board changed anything.

A receiving board:

1. writes each data word into its copy of the origin's interval;
2. marks that sub-interval in its bitmap, so the groups that depend on it are processed in the
   next iteration.

A board finishes the exchange when it has sent its own END and received the END packets of the
P-1 other boards. All boards therefore see the same "anything updated" flag and stop in the
same iteration. A run also stops after `cfg_max_iter` iterations.

### Ring node

`rtl/interconnect_ctrl.sv` is one node of a unidirectional ring, with a 4-entry input FIFO.
The downstream node reports two space flags: room for one packet and room for two.

* A packet at the head of the FIFO is handed to the data controller.
* It is also forwarded downstream, unless this board is its last hop. Forwarding needs room
  for one packet.
* Injecting a new packet needs room for two packets and an empty input FIFO.

This bubble rule keeps one slot free around the ring, so the ring cannot deadlock. With four
boards the ring is the 2×2 torus.

## Board control

`rtl/fg_board.sv` sequences INIT → (COMPUTE → SYNC → EXCHANGE → DECIDE)*.

* The single DRAM port belongs to the scheduler while computing and to the data controller
  while exchanging.
* `stats` counts source loads, destination steps, skipped groups, empty segments, edge words,
  NULL edges, and packets sent and received.

`rtl/foregraph_top.sv` instantiates P boards in a ring and forms the barrier. It brings out
each board's memory port as an array.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `P` | 4 | boards (the four-board setup used for the largest BFS graph) |
| `K` | 96 | PEs per board (the BFS configuration) |
| `VW` | 8 | bits per vertex value (BFS depth) |
| `DEPTH` | 65536 | vertices per sub-interval (16-bit local index) |
| `MEM_W` | 1024 | memory word; about the 96 bytes per 200 MHz cycle of a 19.2 GB/s DDR4 port |
| `QMAX` | 192 | largest Q; with P = 4, enough for about 50 million vertices |
| `ALGO` | `ALGO_BFS` | or `ALGO_WCC` |

Run-time inputs:

* `cfg_groups`: Q / K;
* `cfg_si_words`: words per sub-interval actually used;
* `cfg_edge_base`;
* `cfg_max_iter`.

A smaller graph can thus run on the full-size hardware. At the defaults, the on-chip buffers
take 96 × 2 × 64 KB = 12 MB.

## What a full-size system holds

These estimates use the graph sizes published for the standard benchmark graphs:

| Workload | Holds at the defaults? | Why |
|---|---|---|
| BFS on youtube (1.2 M vertices), wiki-talk (2.4 M) and live-journal (4.8 M) | yes | Q = 96 is enough |
| BFS on twitter-2010 (41.7 M vertices, 1.47 G edges) on four boards | yes | needs Q ≥ 160 (QMAX is 192); about 1.72 GB of shuffled edges per board plus 50 MB of vertex copies fits in 2 GB of DRAM |
| yahoo-web (1.4 G vertices) | no | needs more than 21,000 sub-intervals |
| WCC on these graphs | no, not at the defaults | needs `VW = 32` (and then K = 24 fits the block RAM) |

## Departures and open points

* **PageRank is not implemented.** It needs values from the previous iteration kept apart from
  new sums, a sum (not a minimum) across the PE copies, and an apply step with the damping
  factor. None of this is detailed enough here to build.
* **Intervals are kept, not discarded.** Remote intervals are kept as copies in each board's
  DRAM and refreshed by the exchange, instead of being fetched and dropped during the
  iteration.
* **Ring instead of a general torus.** Only the ring is built. For P = 4 it is the same as the
  2×2 torus; larger tori would need a 2-D router.
* **Choices of this design.** These are not specified anywhere and were chosen here:
  * the merge of per-PE destination copies by minimum;
  * the segment header;
  * the packet format and END protocol;
  * the memory word width;
  * the barrier.
* **Skipping granularity.** Skipping works on whole groups of K source sub-intervals, because
  their edges are interleaved in one stream.
* **Off-chip parts are outside.** The DDR4 controller, the DRAM, the SerialLite links and the
  host are not part of the RTL. Each board has a simple valid/ready read port and write port.
  Ring links are parallel valid/space wires.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_foregraph_top \
  rtl/fg_pkg.sv $(ls rtl/*.sv | grep -v fg_pkg) \
  tb/fg_tb_pkg.sv tb/dram_model.sv tb/tb_foregraph_top.sv
./obj_dir/Vtb_foregraph_top
```

Single-block testbenches:

* `tb_vertex_buffer`
* `tb_edge_fifo`
* `tb_update_unit`
* `tb_pe`
* `tb_merge_unit`
* `tb_dispatcher`
* `tb_update_bitmap`
* `tb_interconnect_ctrl`

Board and system testbenches:

* **`tb_fg_board`:** one board with its link looped back. It checks BFS depths against a
  reference and includes a group that gets skipped.
* **`tb_foregraph_top`:** four small boards, with random DRAM stalls. It counts that every
  mechanism occurred: DFR steps, source loads, skipped groups, empty segments, NULL edges,
  packets, back-pressure on the ring, and memory stalls.
* **`tb_foregraph_full`:** the top with every parameter at its default. It runs BFS on a
  3,000-vertex graph to completion (about a minute of simulation).
* **`tb_foregraph_wcc`:** four boards built for connected components (`ALGO_WCC`, 32-bit
  labels, 4 PEs each). It labels a sparse 500-vertex graph with many components and checks
  every copy of every interval against a reference.

`tb/dram_model.sv` is a behavioural DRAM with latency and random stalls. The graph images are
generated in the testbench by `fg_tb_pkg::graph_image`, which also computes the reference
result by relaxing every edge until nothing changes.
