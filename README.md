# ACES sparse matrix multiplication accelerator (SystemVerilog)

This accelerator computes C = A x B for sparse double-precision matrices with
the row-wise product (Gustavson) dataflow. Every non-zero a(i,k) is multiplied
with the whole row k of B, and the resulting partial row is merged into row i
of C. Two ideas set it apart from a plain row-wise engine:

* **Adaptive traversal of A.** A can be *condensed* before it is walked: the
  non-zeros of each row are pushed to the left, and the walk goes by condensed
  column across many rows. Condensing more makes the rows of B that are used
  together more alike, which is good for reuse. It also makes many partial
  fibers of one output row arrive close together, which hurts parallelism. The
  accelerator picks the degree band by band, by measuring it.
* **A cache built for concurrency.** One multiplication touches every cache
  line of one B row at once, and a single miss stalls the whole product. The
  replacement policy, *PureFiber*, keeps the lines of short rows, which are
  cheap to hold completely. A non-blocking miss buffer lets every other
  request go on while the misses are served.

The RTL is written from a published description of the architecture. The
sections below say what follows that description and what is this
implementation's own choice. Everything listed is synthesizable except the
testbenches.

## Data flow

```
 CSR offsets ─► condensing_adapter ── window (rows, degree) ──► a_fetcher ◄── CSR of A
                                                                    │ condensed order
                                                              global_buffer ── RD of head
                                                                    │ a(i,k)
 B row table ◄──────────────────────────────────────────────── b_fetcher
                                                                    │ task (i, a, line0, len, RD)
               ┌──────────── 16 lanes ─────────────────────────────┼───────────────┐
               │   mpe ── line requests ─► crossbar ─► global_cache (16 PureFiber banks
               │    │ a*B(k,:)                          + NB buffer) ◄─► B line channel
               │ selective_queue ◄── sync_scheduler ──► ape ◄──► c_fiber_store ──► c_* out
               └───────────────────────────────────────────────────────────────────┘
 merge_scheduler (Huffman order for the final merging stage) ── ms_* ports
```

`aces_top` runs A window by window. A window is at most 32 consecutive rows
run with one degree. For each window it:

1. starts the A fetcher;
2. lets the MPEs and APEs run until the fetcher is done, the buffer, fetcher
   and MPEs are idle, every selective queue is empty and no APE is busy;
3. streams rows `row0 .. row0+n-1` of C out on `c_valid / c_row / c_elem`,
   in row order and in increasing coordinate order within a row;
4. clears the C store and signals `window_done` to the adapter. The adapter
   uses that signal to time its sampling passes.

Because a window's partial C rows stay on chip until they are complete, every
output row leaves as a single fiber. Two things in the published design are
therefore not built: writing partial fibers back to DRAM, and the final
merging stage that follows. The Huffman merging scheduler for that stage is a
complete block, instantiated in the top with its ports brought out (`ms_*`)
but not connected to the APEs.

## Condensing degrees and bands (`condensing_adapter`, `a_fetcher`)

The three degrees are one walk with different column groups:

| degree     | column groups             | walk order                                            |
|------------|---------------------------|-------------------------------------------------------|
| none       | one group per column      | original column order, all rows of the window per column |
| moderate   | first half, second half   | condensed inside each half, first half before second  |
| aggressive | one group, all columns    | j-th non-zero of every row, for j = 0, 1, ...         |

The fetcher keeps a pointer to the next unread non-zero of each row. One pass
over the rows takes the next element of every row whose column lies below the
group's upper bound. It repeats passes until one takes nothing, then moves to
the next group. Each element keeps its original column index, so the B row to
fetch is never in doubt. The split at half the columns for *moderate* is this
design's reading: the description names the three degrees but does not give
the moderate grouping in words.

The adapter first reads the CSR offsets once and starts a new band wherever
the row length differs from the previous row's by more than 10. It then
handles each band:

* **A band of 256 rows or more** starts with three sampling windows of 32
  rows, run with none, then moderate, then aggressive. Each is timed from
  issue to `window_done`, which covers both multiplication and immediate
  merging. The rest of the band runs with the fastest degree; a tie goes to
  the earlier degree.
* **A smaller band** runs with moderate condensing.

The sampled rows are real work and their results are kept. The order of the
three passes, the tie rule and the 32-row window are this design's choices.
The adapter records up to 64 bands; any rows after that join the last band.

## The non-blocking PureFiber cache (`mpe`, `crossbar`, `global_cache`, `cache_bank`, `nb_buffer`)

This is the most involved part of the design.

**Layout of B.** B is stored as row fibers aligned to 64-byte lines. A line
holds 4 elements, each a 32-bit coordinate and a 64-bit value. Row k starts at
line `line0(k)` and has `len(k)` elements. The B fetcher reads `line0` and
`len` from a row-information table (the `binfo_*` port, one-cycle latency).
It then gives the task (i, a(i,k), line0, len, RD) to the lowest-numbered
idle MPE. The line size and the table are this design's choices.

**An MPE's view.** An MPE requests the lines of its fiber one after another.
Each request carries two hints:

* **RD**, the next request distance, from the global buffer;
* **FD**, the fiber density: the fiber's line count, ceil(len/4).

One of three replies comes back one cycle later:

* **HIT**: the line comes with the reply. The MPE multiplies its elements at
  one per cycle into its selective queue, then requests the next line.
* **MISS**: the miss buffer took the miss. The MPE waits for its bit in
  `notify_mask`, then asks again, and that request hits.
* **NACK**: the miss could not be taken this cycle. The MPE asks again.

A fiber in which no request missed counts as a *pure fiber*. An MPE takes
2 cycles per line plus 1 per element.

**Crossbar.** The bank of a line is `line mod 16`. Each bank takes one request
per cycle, chosen round robin among the MPEs that want it. The reply is routed
back by requester id. The published design uses a swizzle-switch network;
round robin is this design's stand-in for its arbitration.

**Banks and PureFiber.** The cache is 1 MB: 16 banks x 64 sets x 16 ways x
64 B. Each way stores its tag, its FD, and T, the predicted time of its next
use. On a fill or a hit, T = now + RD. Then RD = max(0, T - now), which counts
down by one every cycle without touching every way. To pick a victim:

1. an invalid way, if there is one;
2. otherwise the way with the largest RD + FD;
3. on a tie, the way with the larger FD;
4. then the lower way number.

Rule 2 and the preference for the larger FD follow the description. The time
stamp, the invalid-first rule and the way-number tie are this design's
choices. The effect is that long rows of B, which are hard to keep whole, are
evicted before short ones that are about to be reused.

**Miss buffer.** The NB buffer has 32 entries, one per missing line, and a
shared pool of 64 subentries, one per waiting requester:

* The first miss to a line takes an entry and sends one request on the line
  channel (`mem_req_*`).
* Later misses to the same line only add a subentry.
* When the line returns (`mem_resp_*`, any latency), it is written into its
  bank. The bank uses the RD and FD of the first miss. The buffer raises the
  `notify_mask` bit of every waiting requester and frees the entry in the same
  cycle.

Two cases are refused and answered NACK:

* a full buffer or an empty subentry pool;
* a second bank's miss in the same cycle. One miss per cycle is accepted,
  round robin over the banks.

The shared pool, the NACK retry and the one-miss-per-cycle port are this
design's choices.

**Partial C fibers.** The published design keeps partial C rows in the
global cache, next to B, under the same policy. Here they live in
`c_fiber_store`: 32 row slots (one window) of 2 x 128 elements. An APE reads
the current copy while it writes the merged result into the other copy, then
flips the two. A row that would grow past 128 elements sets `c_overflow`;
such a row comes out wrong. This is the design's main capacity limit, along
with the 128-element selective queue described next.

## Immediate merging (`selective_queue`, `sync_scheduler`, `ape`)

Each MPE writes into its own selective queue: 2 KB, which is 128 elements, and
at most 8 fibers. The queue fills in order like a FIFO, but the scheduler may
take any *finished* fiber out of order. Space is reclaimed only when the
oldest fiber has been merged. A B row longer than 128 elements can never
finish in the queue, so it is not supported.

MPE i is paired with APE i. When APE i is idle, the synchronization scheduler
looks at the finished fibers of queue i, oldest first. It grants the first
fiber whose output row no APE is merging at the moment:

* it counts a **bypass** when the granted fiber is not the oldest;
* it counts a **conflict** when every finished fiber collides with a busy row.

When two APEs want the same free row in one cycle, the lower-numbered one
wins.

The published scheduler goes one step further. When the head fibers of two
queues belong to the same row, one APE merges the two of them first. That
pairing is not built: the second fiber waits.

The APE merges with two pointers. It reads the new fiber from the queue and
the stored fiber of row i from the C store, one output element per cycle. When
the coordinates are equal it adds the values with the FP64 adder. A merge of a
new fiber of length x with a stored one of length y takes x + y + 2 cycles or
fewer.

## Final merging order (`merge_scheduler`)

The leaf fibers of one output row arrive with their weights (lengths), and the
scheduler builds the Huffman tree over them in a 32-entry priority queue:

1. take the two lightest fibers;
2. make a merge task (a, b, destination id, weight a + b);
3. put the result back into the queue;
4. repeat until one fiber is left, then report the root and reuse the queue
   for the next row.

Tasks wait in a 16-entry buffer in the order they were made. The scheduler
issues the oldest task neither of whose inputs is still being merged. New node
ids start at 128 for every row.

## Arithmetic

`fp64_mul` and `fp64_add` are combinational IEEE 754 double-precision units.
They round to nearest, ties to even. Subnormal inputs and results are flushed
to zero, and NaN and infinity are not handled. These simplifications are this
design's own.

## Parameters

The defaults follow the evaluated configuration wherever one is given:

| parameter (top) | default | origin |
|---|---|---|
| `NPE` MPEs = APEs = queues | 16 | configuration table |
| `NBANKS`, `WAYS`, `SETS` | 16, 16, 64 | 16 banks, 16 ways, 1 MB with 64-byte lines (line size chosen) |
| `NB_ENTRIES`, `NB_SUBS` | 32, 64 | configuration table |
| `SQ_DEPTH` | 128 elements | 2 KB per queue |
| `THRESH`, `BIG_BAND` | 10, 256 | band rule |
| sampling pass | 32 rows | band rule |
| `GB_DEPTH` global buffer | 64 | chosen |
| `WIN` rows per window, `C_MAXLEN` | 32, 128 | chosen |

Shared types are in `aces_pkg`: `elem_t` (coordinate and value), `line_t`,
`a_elem_t`, `degree_t`, `cresp_t` and the `stats_t` block of event counters.
The counters are cycles, A elements, pure fibers, hits, misses, NB merges,
NACKs, evictions, bypasses, conflicts, immediate merges, direct writes, adds,
bands, sampling passes, choices, windows per degree and C elements.

## External memory contract

`aces_top` has no memory of A or B. It exposes read channels that a memory
system (or a testbench) serves:

| channel | ports | latency | returns |
|---|---|---|---|
| adapter offsets | `ad_off_*` | 1 cycle | CSR row offset of A |
| fetcher offsets | `af_off_*` | 1 cycle | CSR row offset of A |
| fetcher elements | `af_el_*` | 1 cycle | column and value of an A non-zero |
| B row table | `binfo_*` | 1 cycle | first line and length of B row k |
| B lines | `mem_req_*` / `mem_resp_*` | any; replies may come in any order | 4 elements of one line |

Separate channels stand for the multi-channel HBM of the original design.
Start a multiplication by pulsing `start` with `n_rows` and `n_cols`; `done`
pulses after the last row of C has been sent.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself if it hangs. To build and run
one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/aces_pkg.sv tb/tb_ape.sv --top-module tb_ape -Mdir obj_ape
./obj_ape/Vtb_ape
```

`tb/tb_aces_top.sv` runs the whole accelerator at its default parameters,
checking every element of C against a reference product. The workload is
A (300 x 128, one big band of 270 rows, then longer rows) times B (128 x 128),
with integer-valued entries so the result is exact, and a memory latency of
24 cycles. It requires these events to happen at least once:

* pure fibers, hits, misses, NB merges, NACKs and evictions;
* bypasses and conflicts;
* two bands and three sampling passes;
* windows of all three degrees.

It also checks a Huffman order through the `ms_*` ports. It finishes in about
22 thousand cycles.

## Limits

* A B row may hold at most 128 elements, and a C row at most 128 (see above).
* There is no DRAM spill of partial C rows. Final merging is scheduled but not
  executed.
* Same-row head fibers of two queues are not merged with each other first.
* FP64 without subnormals, NaN or infinity.
* C fibers are held in their own store, not in the global cache, so PureFiber
  manages only B lines.
