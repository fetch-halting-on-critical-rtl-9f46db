# Fetch halting on critical load misses

When a load misses all the way to main memory, an out-of-order core keeps
fetching for a couple of hundred cycles. If the instructions behind the load
depend on it, they can only pile up in the issue queue and the reorder buffer,
where every occupied entry burns wakeup and select power while doing nothing.
Fetch halting stops the front end for the duration of such a miss. The queues
then stay emptier, and a queue that switches off its unused entries saves
power. Performance is barely affected, because the core could not have issued
those instructions anyway.

Two questions decide whether a given load may halt fetch:

* **Is this static load critical?** This is answered offline. Profiling runs
  measure, for every miss of every load, how badly the machine stalled. The
  program is then annotated with two criticality bits per instruction. Loads
  whose misses do not stall the machine are never allowed to halt. Halting on
  every miss costs far too much performance.
* **Will this dynamic instance miss to memory?** This is answered in hardware
  by a partial-address Bloom filter that shadows the L2 tags. It is looked up
  as soon as the load's address is known, so the halt can start before the L2
  miss is actually detected.

Only a load that passes both tests halts fetch.

This repository holds synthesizable SystemVerilog for the hardware side of the
scheme:

* the miss predictor;
* the L2 tag directory with the collision detector that keeps the predictor
  exact;
* the halt controller;
* the profiling counters that produce the statistics behind the annotation.

Each block has a self-checking testbench.

## What happens to one load

The unit sits beside an out-of-order pipeline. Its timing, in the order a
load moves through the pipeline:

| pipeline step | what the unit does |
|---|---|
| decode | The two annotation bits give the load's level: non-critical, half-critical or critical. Encoding: bit 1 set means critical; bit 0 alone means half-critical. |
| address generation (`agen_*`, cycle *t*) | An annotated load looks up the Bloom filter with its line address. Non-critical loads do not access it, which saves lookups. |
| *t+1* | The prediction is available (`pred_valid`, `pred_miss`). An annotated load that is predicted to miss is entered in the halt table. |
| L1 access starts (`l1_*`, cycle *a* ≥ *t+1*) | The load's table entry starts halting. |
| *a+1* … | `fetch_halt` is high. The fetch unit fetches nothing while it is high. |
| completion (`done_*`) or squash (`squash_*`, `flush`) | The entry is freed, and `fetch_halt` falls on the next cycle unless another entry is halting. |

A **critical** load halts fetch until it completes. A **half-critical** load
halts fetch for only about half of the miss. The end of the miss is not known
when the halt starts, so "half" is a fixed count, `HALF_HALT_CYCLES`
(default 103). That count is half of an expected L2-plus-memory time of 206
cycles: a 20-cycle L2, 180 cycles for the first memory chunk and 2 cycles for
each of the three further 8-byte chunks of a 32-byte line. After the count
runs out, the entry stays in the table without halting until the load
completes.

The halt table holds `N_HALT_ENTRIES` (default 8) loads. `fetch_halt` is the
OR of all halting entries, so overlapping misses keep fetch stopped until the
last one ends. A request that finds the table full is dropped: that load
simply does not halt fetch, and `halt_drop` pulses. A squashed wrong-path load
releases fetch at once.

An optional extension (`EN_LONG_LAT = 1`, off by default) lets annotated
arithmetic operations with a latency of four or more cycles halt fetch too.
Such an operation halts fetch from the cycle after it issues until it
completes. Its halt does not depend on the miss predictor.

## The miss predictor and why it stays exact

`bf_predictor` is a plain bit array of 2^P bits. The default is P = 15, so
32 kbit or 4 kB, about 3 % of a 128 kB L2. It is indexed by the low P bits of
the line address, called the *partial address*. Bit *i* is 1 exactly when at
least one line now in the L2 has partial address *i*. A 0 therefore proves
that the line is absent, and the load is predicted to miss. A 1 predicts a
hit. A 1 can be wrong when a different resident line shares the partial
address; this is aliasing, and such a miss goes unpredicted. A larger P
aliases less.

Keeping the bits exact is the subtle part, and `l2_tag_dir` does it. Every L2
access is looked up in the tag directory. On a miss, the directory allocates
a way and then:

* **sets** the bit of the incoming line;
* **clears** the bit of the evicted line, but only if no other valid way of
  the same set, and not the incoming line, has the same partial address.

The second rule is the collision detector. Without it, evicting one of two
lines that share a partial address would clear a bit that the other line
still needs. The filter would then report a miss for a line that is present:
a false halt.

The check only has to look inside one set. The partial address contains all
the index bits, because P (15) is larger than the index width (9). Lines that
share a partial address therefore always map to the same set, and the
detector compares the low P − 9 = 6 tag bits of the other seven ways with
those of the victim.

When an L2 access is presented, the filter shows its effect two cycles later:

1. the tag directory registers the update;
2. the filter writes it.

A lookup made in between still sees the old value. When a set and a clear of
the same bit arrive in one cycle, the set wins. Reset clears the whole
filter, which matches an empty cache.

The tag directory models only tags. By default it has 512 sets of 8 ways with
32-byte lines, 18-bit tags and a 32-bit physical address. Lines are allocated
when the miss is detected, not when the data returns. Replacement fills an
invalid way first and then goes round-robin within each set, which is
equivalent to first-in-first-out. The directory answers in one cycle. The
real L2 latency belongs to the cache around it and does not affect the
filter.

## Where the annotation comes from: the profiling counters

`crit_profiler` gathers two statistics for each monitored miss to memory, from
the cycle the miss is reported (`mon_valid`) to the cycle the load completes:

* **dead cycles**: cycles in which no instruction issues;
* **fetch-issue count**: instructions fetched after the miss started that
  issue before it ends. A load whose misses let almost nothing through is
  critical.

The fetch-issue count needs to know when each issued instruction was fetched.
The core numbers its instructions in fetch order:

* `fetch_seq` is the number the next fetched instruction will get;
* each issue slot reports the number of the instruction it issues.

An entry records `fetch_seq` when its miss starts. An issued instruction
counts for that miss when its number is not older than the recorded one. The
comparison is wrap-safe.

Up to `N_MON_ENTRIES` (default 8) misses are monitored at once. Each completed
miss emits one record (`rec_pc`, `rec_dead`, `rec_fi`). Squashed or flushed
misses emit nothing, and the counters saturate.

Two things are left to software: averaging the records per static load, and
applying the thresholds that turn them into annotation bits. A load is
critical when its average dead-cycle count is high enough, or its average
fetch-issue count low enough, and the spread is small. Thresholds of about
165 and 140 dead cycles (critical and half-critical) worked across a range of
programs. The corresponding fetch-issue thresholds were 70 and 30.

A finished entry stays occupied until its record is sent, which takes at most
one cycle per record. A burst of completions can therefore briefly leave fewer
free entries than `N_MON_ENTRIES` minus the misses in flight.

## Files and interfaces

| file | contents |
|---|---|
| `rtl/fh_pkg.sv` | shared widths, the `crit_e` level type, `decode_annot()` |
| `rtl/bf_predictor.sv` | partial-address Bloom filter, one lookup port per load/store unit |
| `rtl/l2_tag_dir.sv` | L2 tags, hit/miss, victim choice, collision detector |
| `rtl/halt_ctrl.sv` | halt table and `fetch_halt` |
| `rtl/crit_profiler.sv` | dead-cycle and fetch-issue counters |
| `rtl/fetch_halting.sv` | top level wiring the four together |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_occupancy` |
| `tb/core_model.sv` | behavioural core used by `tb_occupancy` |

The top level, `fetch_halting`, has these port groups. `N_LSU` is 3, `N_DONE`
is 8 and `ISSUE_W` is 8.

* **Load side**: `agen_*` and `l1_*` (one port per load/store unit),
  `done_*` (8 completion ports), `squash_*` (one per load/store unit) and
  `flush`.
* **Arithmetic extension**: `ll_*`.
* **Fetch unit**: `fetch_halt` is the only signal the fetch unit needs. It
  depends only on registers. `halt_start`, `halt_drop` and `n_halting` are
  for statistics.
* **L2**: `l2_req_*` carries every L2 access. `l2_resp_*` answers one cycle
  later with hit, eviction and the evicted line.
* **Profiling**: `mon_*`, `fetch_seq`, `issue_*` and `rec_*`.

All signals are synchronous to `clk`. `rst` is a synchronous, active-high
reset.

Default sizes are taken from a machine with:

* a 64-entry issue queue and a 256-entry ROB (hence 8-bit instruction tags);
* 8-wide issue and commit;
* 3 load/store units;
* a 128 kB 8-way L2 with 32-byte lines;
* 64-bit memory with a 180-cycle first access.

All are parameters.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_fetch_halting rtl/fh_pkg.sv tb/tb_fetch_halting.sv
./obj_dir/Vtb_fetch_halting
```

Replace `tb_fetch_halting` with `tb_bf_predictor`, `tb_l2_tag_dir`,
`tb_halt_ctrl` or `tb_crit_profiler` for the unit tests. All of them run at
the default sizes and finish in well under a second.

* `tb_bf_predictor`: directed cases, then random lookups, sets and clears on
  three ports, checked against a reference bit array.
* `tb_l2_tag_dir`: a per-set first-in-first-out reference model. It checks
  hit/miss, the victim, and the set and clear outputs through thousands of
  collisions.
* `tb_halt_ctrl`: checks the exact cycles on which `fetch_halt` rises and
  falls, and that a half-critical halt lasts exactly 103 cycles. It also
  covers non-critical and already completed loads, overlapping halts, squash,
  flush, table overflow and the arithmetic extension.
* `tb_crit_profiler`: recounts dead cycles and fetch-issue counts from a
  random issue stream. The sequence numbers cross the 32-bit wrap point.
* `tb_fetch_halting`: plays loads through the whole unit, with a fetch model
  that stops while `fetch_halt` is high. It derives the expected prediction
  from its own picture of the L2 contents. It counts each mechanism and fails
  if any never occurs: full halt, half halt, predicted hit, non-critical
  load, squash, bit cleared on eviction, collision, aliasing, table overflow,
  flush and profiling record.
* `tb_fetch_halting_ll`: the same unit with the arithmetic extension
  enabled. It checks full, half and non-annotated arithmetic halts, a
  squash, and an overlap with a load halt.

### Effect on queue occupancy: a synthetic program

`tb_occupancy` shows what the unit is for. It runs two copies of a
behavioural out-of-order core (`tb/core_model.sv`), each with its own
`fetch_halting` at default parameters. The core has:

* 8-wide dispatch, issue and commit;
* a 64-entry issue queue and a 256-entry ROB;
* at most 3 loads issued per cycle.

The synthetic program has a load every 8th instruction. Every 512th
instruction is a load to a fresh line, which misses to memory (206 cycles),
and the following 400 instructions all depend on it. Other loads hit in 20
cycles, and other instructions take one cycle. In one copy the missing loads
are annotated critical; in the other, the baseline, nothing is annotated.

After 40,000 cycles the test requires:

* lower average issue-queue and ROB occupancy with halting (below 90 % of
  the baseline);
* an IPC within 5 % of the baseline;
* no halts in the baseline.

A typical run prints:

```
baseline: IQ 64.0 ROB 102.3 IPC 1.894 halts 0
halting : IQ 27.2 ROB 65.5 IPC 1.894 halts 149
```

This program is the ideal case: nothing useful can be done during a miss.
Real programs gain less, because some work could have overlapped the miss.
That is why the offline criticality analysis matters.

## How far it can be trusted, and its own choices

The following parts follow the published scheme:

* the two criticality levels and the rule that annotation and prediction must
  agree;
* a halt that starts the cycle after the L1 access begins;
* release on completion or squash;
* the Bloom filter's indexing, its set and reset rules, and its collision
  detection;
* the 32 kbit size;
* the definitions of the two profiling statistics.

The following are this design's own choices:

* The two-bit encoding of the annotation.
* Measuring a half-critical halt as a fixed 103 cycles.
* The sizes of the halt table and the monitor table, and dropping requests
  when a table is full.
* One-cycle lookup and directory latencies.
* Round-robin L2 replacement and allocation when the miss is detected.
* The sequence-number method for the fetch-issue count.
* All widths not tied to the machine above: the 32-bit address and PC, and
  the 16-bit counters.

Some known departures and gaps:

* **Filter size.** The predictor was described as four times the number of L2
  lines, yet also as 32 kbit. With 32-byte lines, a 128 kB L2 has 4096 lines,
  so four times would be 16 kbit. The default keeps the stated 32 kbit
  (4 kB). Set `P = 14` for the 16 kbit reading.
* **Moment the halt starts.** The pipeline diagram places the halt decision at
  issue, while the text places it at the L1 access. The RTL uses the L1
  access.
* **What is not included.** The core itself is outside the unit: fetch unit,
  issue queue, reorder buffer, load/store queue, execution units and the
  switching-off of unused queue entries. So are the L2 data array and main
  memory. They connect through the ports above.
* **No throughput evaluation.** No benchmark program is run. The expected
  effect is lower average issue-queue and ROB occupancy for a few percent of
  IPC. That effect is a property of the whole processor, so this RTL cannot
  show it.
* **Lookup ports.** One Bloom-filter lookup port per load/store unit is
  provided. Only annotated loads use them.
