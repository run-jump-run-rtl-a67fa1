# JIP: an L1 instruction prefetcher built from a runner and IP jumpers

Large client and server programs have instruction footprints far larger than
an L1 instruction cache, so the front end keeps missing even though the code
sits in the last-level cache. JIP ("bouquet of instruction-pointer jumpers")
tries to predict where fetch goes next and fetch those lines early. It sorts
every instruction into one of three kinds and gives each kind its own
predictor:

* **non-branch**: the next instruction follows in sequence. The *runner*
  handles these by stepping forward.
* **branch with one target** (direct jumps and calls, taken conditional
  branches): the *Single Target Jump Table (SJT)* remembers the
  [branch IP, target IP] pair.
* **branch with several targets** (indirect jumps and calls, returns): the two
  *Multiple Target Jump Tables (MJT-I, MJT-II)* keep several targets per branch
  and a short history of which target came when. They predict the next target
  from a repeating pattern, or from per-target confidence counters when no
  pattern matches.

Starting from each L1-I access, the prefetcher *walks* the predicted control
flow: run, jump, run, jump. Every cache line the walk enters becomes a
prefetch. A *temporal table* adds timeliness. It remembers which miss
followed, 25 accesses later, an earlier access, so that next time the miss
can be prefetched that far ahead. All IPs are stored in a compressed 25-bit
form. The total storage is about 128 KB.

This repository holds synthesizable SystemVerilog for the complete
prefetcher, at the published table sizes, plus a self-checking testbench for
every block and one for the whole design.

## Block overview

```
                 acc (IP, hit, branch, target)
                   |
            +------v------+   25-bit IPs    +-------------------------------+
            |  ip_mapper  |---------------->| jip_tables                    |
            | 512 x 48 b  |   train         |  branch_filter (Bloom, 4 Kb)  |
            +------^------+                 |  sjt      7800 x 51 b (FA)    |
                   | reverse                |  mjt I    1024 x 112 b (DM)   |
                   |                        |  mjt II    512 x 280 b (DM)   |
   pf_addr <-------+                        +---------------^---------------+
                   |                                  lookup|next IP
            +------+--------------------------------------------------+
            | lookahead_engine (walk, depth 260 / degree 7, extended |
            | lookahead, LAP counter, output register)               |
            +--^--------------^-----------------^--------------^-----+
               |              |                 |              |
            raq (25) -> temporal_table     RPQ line_queue   2 x LAPRQ
                        7150 x 50 b (FA)   64 x 19 b        line_queue
```

| file | what it is |
|---|---|
| `rtl/jip_pkg.sv` | widths (64-bit IP, 25-bit compressed IP, 19-bit compressed line), access and event structs |
| `rtl/jip_prefetcher.sv` | top level, wires everything as above |
| `rtl/ip_mapper.sv` | 512-entry mapper table: compression and reverse mapping |
| `rtl/jip_tables.sv` | runner, SJT, MJT-I, MJT-II and migration between them |
| `rtl/branch_filter.sv` | Bloom filter of IPs that may be branches |
| `rtl/sjt.sv` | single-target jump table |
| `rtl/mjt.sv` | multiple-target jump table (instanced as MJT-I and MJT-II) |
| `rtl/temporal_table.sv` | leader/follower pairs |
| `rtl/raq.sv` | recent access queue |
| `rtl/line_queue.sv` | 64-entry line queue, used as the RPQ and the two LAPRQs |
| `rtl/lookahead_engine.sv` | the walk, extended lookahead and path selection |

## IP compression

Storing 64-bit IPs everywhere would be expensive. Programs use very few
distinct values of the upper 48 bits of an IP, one per 64 KB code region they
touch. The mapper table keeps up to 512 such values in a fully associative
table. A compressed IP is the 9-bit index of the IP's upper bits followed by
its lower 16 bits: 25 bits in all. A compressed *line* drops the 6 offset bits
of a 64-byte line and is 19 bits wide. On a miss in the mapper, the oldest entry is
replaced (FIFO). Decompression needs no search, because the 9-bit index
addresses the same table directly.

A program touching more than 512 regions still works, but compressed IPs
that named a replaced entry now decompress to the wrong region. Those
prefetches are wasted. The design accepts this loss by construction.

## The jump tables and how branches move between them

Every branch seen with a taken target (a zero target means "not taken", and
nothing is learned) trains the tables:

1. A branch in no table goes into the **SJT** (fully associative, NRU
   replacement).
2. If an SJT branch shows up with a *different* target, it moves to
   **MJT-I** with both targets.
3. When an MJT-I branch meets a target beyond the three it can hold, it moves
   to **MJT-II** (eight targets) with all four.
4. In MJT-II a ninth target replaces the target that was used longest ago.

The MJTs are direct mapped. The compressed IP is shifted right by two bits,
and the low 10 (MJT-I) or 9 (MJT-II) bits select the set. The remaining bits
form the tag, including the two bits shifted out: 15 and 16 bits.

Each MJT entry holds its targets, a 2-bit confidence per target, and an
*array of targets*. This is the history of the last 8 (MJT-I) or 16 (MJT-II)
instances, stored as target slot numbers. To predict, the last 4 entries of
the history are compared with every earlier window of 4 in the same history.
If one matches exactly, the slot that followed that window is the
prediction; the most recent match wins. Otherwise, the target with the highest
confidence is predicted, and ties go to the lowest slot. On every instance, the
target that occurred gains one confidence point and the others lose one.

A lookup checks all three tables in the same cycle; a branch lives in only
one of them.

## The walk (main lookahead)

Published behaviour: starting at an access, the tables are looked up up to
260 times (the *lookahead depth*), following the predicted flow. The walk
stops after 7 new lines have been prefetched (the *prefetch degree*). A 64-entry
**Recent Prefetch Queue (RPQ)** drops lines that were recently sent, and those
don't count toward the degree. If the access IP is a leader in the temporal
table, its follower's line is prefetched as well.

The published model does all of this "instantly" on every access. This RTL
does **one table lookup per clock cycle**, which needs three additions:

* **Branch filter.** Stepping through straight code one instruction per
  lookup would only keep pace with fetch, never get ahead of it. Since only
  branches are stored, a Bloom filter marks every trained branch IP. Each
  cycle, it finds the first IP at or after the walk position, in the same
  64-byte line, that may be a branch. Only that IP is looked up in the
  tables. If the line holds no possible branch, the runner moves straight to
  the next line, so straight code advances one line per cycle. A false
  positive only costs one lookup: the walk continues after it. The filter
  never forgets a branch, so it has no false negatives.
* **Walk continuation.** The walk usually runs ahead of fetch. An access to
  one of the last 16 lines the walk passed through confirms the prediction.
  The walk then keeps its position with a fresh depth and degree budget
  instead of starting over. Any other access restarts the walk from the access
  IP. The published design suggests this for saving table accesses.
* **Output register.** Prefetches leave through a one-entry register with a
  valid/ready handshake. While the prefetch queue refuses a request, the
  engine stalls and the request stays unchanged (an assertion checks this).

The runner never crosses a 64 KB region boundary, because the next region
has no mapper entry it could name. The walk ends there.

Timing, counted from an access in cycle 0 (see `tb_lookahead_engine`):
1. Cycle 1 issues the temporal-table prefetch, if the access had one.
2. Each later cycle performs one lookup.
3. A new line reaches `pf_valid` on the edge after the lookup that found it.
4. The walk stops on the lookup that makes the 7th prefetch, or on the 260th
   lookup.

## Extended lookahead and the LAP counter

When the L1-I goes quiet, the prefetcher uses the idle time to look further
ahead. The extended lookahead starts once all three of these hold:

* the walk has ended;
* no access has come for two cycles;
* two cycles have passed since the last prefetch.

It runs three rounds, each allowed one prefetch (degree 1), because the
prediction gets less certain further out. Each round starts from one of two
IPs:

* the **last prefetched IP**, continuing the main walk, or
* the **last temporal-table target**, a second, independent guess at where the
  program goes.

A 9-bit saturating **LAP-confidence counter** picks between them. It starts at
256, and values of 256 and above choose the temporal path, which is favoured.
Lines prefetched by the extended rounds go into one of two 64-entry
**LAPRQs**, one per path. When a later access hits a line in the temporal
path's LAPRQ, the counter gains 2; a hit in the other path's LAPRQ costs 1.
Every 256 accesses the counter returns to 256. An access during the extended
lookahead aborts it and starts a normal walk.

Here a "cycle" of the published extended lookahead is a *round* of lookups:
the round walks until it has made its one prefetch, or until the depth limit or a region end. A round
that made a prefetch moves its path's start IP to that line, so the next
round continues further down the path.

## Temporal table

The **Recent Access Queue (RAQ)** holds the last 25 compressed access IPs.
When an access misses in the L1-I, the oldest IP in the RAQ (the *leader*) is
paired with the missing IP (the *follower*) in the 7150-entry, fully
associative temporal table. Replacement is random: a 16-bit LFSR modulo the
size, after invalid entries are used up. A leader that is already present has
its follower updated in place. When the leader is accessed again, the
follower's line is prefetched right away, about 25 accesses ahead of need.

## Storage

| structure | entries | bits/entry | bits |
|---|---|---|---|
| SJT | 7800 | 51 (trigger 25, target 25, NRU 1) | 397 800 |
| MJT-I | 1024 | 112 (tag 15, 3 x 25 targets, 8 x 2 history, 3 x 2 confidence) | 114 688 |
| MJT-II | 512 | 280 (tag 16, 8 x 25, 16 x 3, 8 x 2) | 143 360 |
| temporal table | 7150 | 50 | 357 500 |
| mapper table | 512 | 57 | 29 184 |
| RPQ, RAQ, 2 x LAPRQ | 64 / 25 / 128 | 19 / 25 / 19 | 4 273 |
| registers | | | 146 |

That is about 127.8 KB. The RTL adds to this:

* a valid bit per table entry;
* a target count per MJT entry;
* the 4096-bit branch filter;
* the 16 x 19-bit path window;
* the output register.

## Top-level interface (`jip_prefetcher`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `acc` | in | `l1i_access_t`: `valid` (one access per cycle at most), 64-bit `ip`, `hit` in the L1-I, `is_branch`, 64-bit predicted-taken `target` (0 = none) |
| `pf_valid`, `pf_addr`, `pf_ready` | out/out/in | 64-byte aligned prefetch address with a valid/ready handshake |
| `lap_conf` | out | the LAP-confidence counter |
| `ev` | out | `jip_events_t`, one-cycle pulses of every mechanism (for counting and debug) |

The branch flag and target come from the core's branch predictor; the
prefetcher does not include one. Table lookups and answers are combinational
within a cycle. Table updates take effect at the next edge.

All sizes are parameters with the published values as defaults:
* `MAP_ENTRIES` 512, `SJT_ENTRIES` 7800, `M1_SETS` 1024, `M2_SETS` 512,
  `TT_ENTRIES` 7150;
* `RAQ_DEPTH` 25, `RPQ_ENTRIES` 64, `LAPRQ_ENTRIES` 64;
* `MAX_DEPTH` 260, `DEGREE` 7.

`SEQ_STEP` (4) is the instruction size the runner assumes.

## Where this RTL departs from the published design

* One lookup per cycle, with the branch filter and walk continuation described
  above, instead of a full-depth walk per access.
* MJT-I holds three targets. The published text mentions four in one place,
  but the published table layout and storage budget (112-bit entries) have
  three, and that is what is built.
* These details are not specified and were chosen here:
  * NRU victim order;
  * random source;
  * confidence update rule;
  * initial contents of a migrated MJT entry;
  * tie-breaking in MJT prediction;
  * the region-boundary stop;
  * the LAPRQ entry being cleared once it has counted.
* Instructions are assumed to be 4 bytes, and lines 64 bytes. Variable-length
  code is still walked correctly across lines, but the filter only sees
  branches on the 4-byte grid of the walk IP.
* The fully associative tables (7800 and 7150 entries) are written as
  single-cycle searches, as in the published model. That is fine for
  simulation and logic synthesis, but a physical design would use a
  set-associative or direct-mapped form. A direct-mapped form is reported to
  cost about 1.3 % of performance.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and a watchdog makes sure it always ends.

* `tb_ip_mapper`: compression, FIFO replacement, reverse mapping and
  two-port same-cycle cases, against a model.
* `tb_sjt`, `tb_temporal_table`, `tb_raq`, `tb_line_queue`: hits, inserts
  and replacement orders, against models.
* `tb_mjt`: two instances (MJT-I and MJT-II shape) against a reference
  model, covering pattern prediction, confidence, oldest-target replacement
  and install/remove.
* `tb_branch_filter`: no false negatives, answers on the grid, and a bounded
  false-positive rate.
* `tb_jip_tables`: the full migration SJT → MJT-I → MJT-II, pattern
  prediction, and the runner skipping lines.
* `tb_lookahead_engine`: checks the published limits in cycles:
  * the degree stop (7 prefetches) and the depth stop (260th lookup);
  * the temporal prefetch first, and RPQ filtering;
  * the extended rounds on both paths, with their start delay;
  * the LAP +2 / -1 / reset rules, aborts and stalls.
* `tb_jip_prefetcher`: the whole design at its default sizes. A synthetic
  program of 160 basic blocks (about 170 lines) uses every branch kind and
  runs against a 96-line L1-I model, with idle periods and a prefetch queue
  that refuses one request in eight. A final phase touches 600 code regions,
  wrapping the mapper. The test checks that:
  * prefetches are aligned, inside the program, and not repeated within 64;
  * refused requests are held;
  * at least half of the misses of a no-prefetch run are removed;
  * every mechanism happens at least once.

  In a 10 000-access run, misses fell from 813 to 75, with 775 of 1210
  prefetches used.

## Simulating

With Verilator 5, for example the whole design:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/jip_pkg.sv tb/tb_jip_prefetcher.sv --top-module tb_jip_prefetcher
./obj_dir/Vtb_jip_prefetcher
```

Replace `tb_jip_prefetcher` with any other testbench name to run that block.
The full-size run builds and simulates in well under a minute. The testbenches
rely only on two-state simulation and `$urandom`.
