# ATR probing on FPGA: a fully unrolled probe-set engine

Probing is a template-matching method for automatic target recognition (ATR) in LADAR range
images. A **probe** is a pair of pixels plus a yes/no question: is the absolute difference of
the two pixel values above a threshold? Put another way, does the pair straddle an edge? A
**probe set** is a list of such probes. It traces the silhouette of one vehicle seen from one
viewpoint. Place a probe set at a position in the image; its score there is the fraction of its
probes that answer yes. The recognizer evaluates every probe set at every image position and
reports the best-scoring set at each position.

This RTL evaluates three vehicle libraries on a 512 x 1024 image of 12-bit pixels: the M60 tank,
the M113 personnel carrier and the M901 missile carrier. Each library has 81 probe sets (27
aspect angles times 3 depression angles). There is one engine per vehicle. The engines run side
by side, each reading the image from its own memory. Inside an engine, the loops over probe sets
and probes are fully unrolled into hardware. Every threshold comparison, every hit count, every
score and the winner selection for one window position are computed in the same clock cycle, as
one pipelined data path. The loop that remains is the walk over window positions. That walk is
limited only by memory bandwidth: one 32-bit word, holding two pixels, is read per clock.

## Data flow of one engine

```
 memory ──► image_reader ──► window_gen ──► probe_threshold ──► hit_delay ──► 81 x hit_sum
 (32-bit    addresses,        13x4 window     one comparator      hit history     per probe set
  words)    1 word/clk        per column      per distinct probe  (taps 0..W-4)        │
                                                                                   81 x rank_lut
                                                                                        │
                          result memory ◄── result_writer ◄──────────────────────── max_tree
                                            {rank, index} per position              (81 → 1)
```

| stage | module | what it holds |
|---|---|---|
| read stream | `image_reader` | strip, word-column and row counters |
| window | `window_gen` | column-pair buffer, holding register, 13 x 4 pixel window |
| threshold operators | `probe_threshold` | N_UNIQUE comparators (151 / 106 / 143), registered hits |
| temporal reuse | `hit_delay` | hit history, PS_COLS-4 stages of N_UNIQUE bits |
| sum trees | `hit_sum` | adder tree per probe set (35 / 29 / 30 inputs) |
| division by table | `rank_lut` | rank table indexed by (set size, hit count) |
| winner | `max_tree` | compare-and-select tree over 81 ranks |
| output | `result_writer` | address generation, end-of-scan detection |

`probe_engine` connects these stages and adds the pipeline registers. `atr_top` instantiates
three engines.

## The compacted window: why a 34-column probe set needs only a 4-column window

This is the part of the design that is least obvious from the algorithm.

An M60 probe set spans a window 12 rows high and 34 columns wide. No single probe is that wide,
though: the two pixels of every probe lie within 4 adjacent columns. So every probe can be
written as a **distinct probe** plus a **column delay**:

* A distinct probe is a pixel pair placed in a 13 x 4 window. There are 151 of them for the M60,
  106 for the M113 and 143 for the M901.
* A probe of a probe set lies `d` columns to the left of the set's right edge. It gives exactly
  the answer that its distinct probe gave `d` window steps earlier, when the 4-column window
  stood `d` columns further left.

The engine therefore evaluates only the distinct probes, once per image column, on a 13 x 4
window. `hit_delay` keeps each distinct probe's answers for the last PS_COLS-4 columns (30 for
the M60). The sum tree of a probe set then reads, for each of its probes, tap `d` of its
distinct probe. At the M60's size this replaces 2832 comparators with 151 comparators and
151 x 30 flip-flops of history. Which distinct probe and which delay each probe uses is fixed
when the design is elaborated, just as the compiled configuration fixes the probe library.

The result for the probe-set position whose left edge is column `x` appears when the window's
newest column is `x + PS_COLS - 1`. At that moment every tap refers to a column of the same
strip, because the largest delay is PS_COLS-4 and the window reaches 3 columns back. Positions
closer to the left edge of a strip would mix in columns of the previous strip. `result_writer`
drops them.

## Scan order, memory format and timing

* The image is stored row by row, two horizontally adjacent pixels per 32-bit word. The
  even-column pixel sits in bits 11:0 and the odd-column pixel in bits 27:16. Word address =
  `row * 512 + column / 2`.
* The image is processed in strips 13 rows high that step down one row at a time, giving 500
  strips. Within a strip, `image_reader` walks across the 512 word columns. For each word column
  it reads the 13 words from top to bottom, which yields two complete 13-pixel image columns.
* `window_gen` shifts the two columns into the window on consecutive clocks. It therefore emits
  two window positions per 13 reads.
* A full scan is (512-13+1) x 512 x 13 = **3,328,000 reads**. With no memory stalls it takes
  exactly that many clocks plus 10 clocks of pipeline latency. That is 81.0 ms at the 41.1 MHz
  the original implementation reached. The full-size testbench measures 3,328,010 clocks.
* Latency from a window leaving `window_gen` to its result write is 5 clocks. The registers
  are at the hit vector, the hit counts, the ranks, the winner and the write port.
* All three engines use 13-row strips, although the M60 and M113 probe sets are only 12 and 11
  rows high. Their probes simply use only the top rows of the window. This keeps the read stream
  of all three engines identical.

## Scores as ranks

Dividing a hit count by the probe-set size is replaced by a table lookup (`rank_lut`), because
only the ordering of scores matters:

```
pct  = floor(100 * hits / size)
rank = 0               if pct < 80
       pct - 79        otherwise        (1 .. 21, 5 bits)
```

The table is built at elaboration from this formula. Each probe set's size is a constant, so
synthesis keeps only that set's column of the table. `max_tree` picks the highest rank. On a tie
it keeps the lowest probe-set index. A position where no set reaches 80% is reported as
rank 0, index 0.

## The probe library

The published statistics give the size of each library but not the probe coordinates. `atr_pkg`
therefore generates a deterministic stand-in library with exactly those sizes:

| vehicle | probe sets | probes | distinct probes | probe-set window |
|---|---|---|---|---|
| M60 (VEH 0) | 81 | 2832 | 151 | 12 x 34 |
| M113 (VEH 1) | 81 | 2315 | 106 | 11 x 26 |
| M901 (VEH 2) | 81 | 2426 | 143 | 13 x 25 |

Probe set `s` holds probes `floor(P*s/81)` to `floor(P*(s+1)/81)-1`, where `P` is the
vehicle's total probe count. Three functions define the library: `probe_geom(v,u)` gives the
pixel pair of distinct probe `u`; `member_uid(v,k)` and `member_delay(v,k)` give the distinct
probe and column delay of probe `k`. Each is an integer hash of its arguments, limited to the
window. To run a real library, replace these three functions with tables. Nothing else in the
design changes, provided the per-vehicle size constants are updated.

## Interface of `atr_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-clock pulse; starts all three engines |
| `threshold` | in | 12 | probe threshold; a hit needs a difference strictly above it |
| `busy`, `done` | out | 3 | per engine; `done` stays high until the next `start` |
| `all_done` | out | 1 | AND of `done` |
| `mem_req[v]`, `mem_addr[v]` | out | 1, 18 | read request; taken in a cycle with `mem_gnt[v]` high |
| `mem_gnt[v]` | in | 1 | the memory may hold it low to stall the engine |
| `mem_rvalid[v]`, `mem_rdata[v]` | in | 1, 32 | read data, returned in request order, any latency |
| `res_we[v]`, `res_addr[v]`, `res_data[v]` | out | 1, 19, 12 | result write, always accepted |

Result layout for engine `v`: `res_addr = strip * (1024 - PS_COLS + 1) + x`, where `x` is the
left edge of the probe-set position. `res_data = {rank[4:0], index[6:0]}`. Loading the image,
and choosing between vehicles at each position, is left to the host.

## Choices made in this design

These points are this design's own; the method fixes none of them:

* the probe coordinates (stand-in library, see above);
* a single run-time threshold shared by all probes;
* the word packing, the scan order within a strip, and the request/grant memory port;
* the rank formula above 80%, and the rule that ties go to the lower index;
* the placement of pipeline registers, and the result address map and format;
* each probe set has its own adder tree. The original compiler shared partial sums between sets
  and roughly halved the adder count (2751 to 1413 for the M60). The counts are the same either
  way, but this design spends more adders.

## Size

After coarse synthesis, the three-engine top at full size has about 12,500 word-level cells
and 17,300 flip-flop bits. The flip-flops are mostly hit history and pipeline registers. There are
no memories inside the design: the image and the results live in external memory.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `tb/probe_ref.sv` is a reference model that evaluates probe sets
directly over the full, uncompacted window, so it checks the compaction and delay logic rather
than repeating it.

| testbench | covers |
|---|---|
| `tb_atr_full` | full 512 x 1024 scan at default parameters. Checks the clock count (3,328,010), that every result is written once, and 1 in 4001 results against the model. About 15 s in Verilator. |
| `tb_atr_top` | 15 x 72 image, all three engines. Every result is checked, with and without memory stalls. Also counts stalls, dropped edge positions, strip changes, rank-0 and winning positions. |
| `tb_probe_engine` | one engine on 16 x 64. Checks the one-read-per-clock rate, stalls, and high and low thresholds. |
| `tb_image_reader`, `tb_window_gen`, `tb_probe_threshold`, `tb_hit_delay`, `tb_hit_sum`, `tb_rank_lut`, `tb_max_tree`, `tb_result_writer` | unit tests |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/atr_pkg.sv tb/probe_ref.sv \
          tb/tb_atr_top.sv --top-module tb_atr_top
./obj_dir/Vtb_atr_top
```

Use the same command for the other testbenches. `probe_ref.sv` is only needed by those that
compare against the model.
