# Fetch Mask Determination: an instruction fetch stage that reads only the instructions it will use

A wide-issue processor reads a whole fetch line from the instruction cache every
cycle, but taken branches waste part of it:

* **branch out** - a taken branch in the line makes every instruction after it useless;
* **branch into** - a branch target in the middle of the line makes every instruction before it useless.

With 8 or 16 instructions per line this waste is large. If the I-cache data
array is *subbanked* (one 32-bit subbank per instruction slot, each with its
own enable), the unused slots need not be read at all. This RTL implements a
fetch stage around that idea: a **Fetch Mask Determination (FMD)** unit
computes, one cycle ahead, a bit mask of the slots of the next line that will
actually be used, and the I-cache powers only those subbanks. The mask only
follows what the branch predictor is going to do anyway, so the instruction
stream and the timing are the same as with full-line fetch.

The default configuration is an 8-wide fetch with a 32 KB, 4-way I-cache with
32-byte lines (1024 lines), a 1024-entry 2-way BTB and a 32 KB PAs two-level
predictor. The same RTL is parameterised for 4- and 16-wide fetch.

## The fetch mask

A mask has one bit per slot; **bit i is slot i** (slot 0 is the first
instruction of the line). Two masks are combined:

| mask | case | where it comes from |
|---|---|---|
| target mask | branch into | If the current line ends in a predicted-taken branch (or fetch is redirected), slots from the target slot to the end of the next line; otherwise all ones. |
| mask of predictions | branch out | The **Mask Table (MT)** entry of the next line, decoded to ones from slot 0 up to the slot it names. |

`next_fetch_mask = target_mask & mask_of_predictions`, except that if this is
zero the target mask is used alone.

The zero case is real. Suppose a 4-wide line holds `branch_2` in slot 0 and a
target in slot 1. The MT remembers that `branch_2` will be taken, so the mask
of predictions is slots {0}. A branch from another line now jumps to slot 1, so
the target mask is slots {1,2,3}. The AND is empty, but the fetch enters
*after* the remembered branch, which therefore does not apply. The target mask
is the right answer. In the ordinary case (target in slot 1, taken branch in
slot 2) the result is slots {1,2}.

### The Mask Table

The MT has one entry per I-cache line: 1024 entries of log2(8) = 3 bits, i.e.
3 Kbit against 256 Kbit of cache data. An entry is binary-encoded. It holds the
slot of the last instruction that will be used the next time the line is
fetched. The value `ISSUE_WIDTH-1` means the whole line, which is the same as
the all-ones mask. The entry is maintained as follows:

* after reset every entry is all ones;
* when a line is filled into the cache, its entry returns to all ones;
* when a branch commits and its line is still cached, the predictor's
  **next** prediction for that branch is looked at. If it will be predicted
  taken, the entry becomes the branch's slot, so the branch itself is fetched
  and the slots after it are not. Otherwise the entry becomes all ones;
* a branch that was mispredicted leaves its line's entry at all ones.

The predictor already computes the next prediction while it updates, so
maintaining the MT costs no extra predictor access.
`pas_predictor.upd_next_taken` is that next prediction. It is read from the
counter that the branch's *updated* history selects, or from the freshly
updated counter when the index does not change.

### When the mask is computed, and which way it is for

In cycle *i* the BTB and predictor look at the current line and produce the
next PC. The next PC's set indexes the MT, `fmd` forms the mask, and the mask is
registered. In cycle *i+1* it drives the subbank enables. The BTB and MT
lookups are sequential, so this is the critical path added by the scheme.

The MT is indexed per cache line, but which of the 4 ways holds the next line
is only known after that line's own tag compare. So the MT returns the entries
of all four ways of the set, `fmd` forms one mask per way, and each way of the
data array is enabled by its own mask. The way that hits has used its own
line's mask. The other ways cost whatever their masks enable, as in any
parallel-read set-associative cache. `subbanks_read` counts the subbanks
switched on over all ways.

### When the mask does not match the prediction

In this implementation the MT can disagree with the predictor. A BTB entry can
be replaced. Two branches can alias in the pattern tables. A line can be
fetched again before its previous branch has committed. So before a line is
used, the fetch stage checks that the registered mask covers every slot the
current prediction needs. If it does not, the line is not used: the needed mask
is loaded and the line is read again in the next cycle (`ev_mask_replay`). This
safety net belongs to this implementation. The scheme itself assumes the MT is
always in step with the predictor. In the tests it fires on about 0.1-0.2 % of
fetches. The end-to-end test fails if it reaches 1 %.

## The fetch stage (`fetch_unit`)

```
            +-------+   slot,target,cond    +-----------+  next PC   +------------+
 pc ------->|  BTB  |----------------------->| taken ?   |----------->| Mask Table |--+
   |        +-------+                        | next PC   |  set       +------------+  | entries
   |        +-----------+  taken             |           |                 of 4 ways   v
   +------->|    PAs    |------------------->|           |--target slot-->+-----+
   |        +-----------+                    +-----------+                | fmd |--> fmask (per way, registered)
   |                                                                      +-----+
   |        +-------------------------------+   used slots    +---------------+
   +------->| I-cache, 4 ways x 8 subbanks  |---------------->| prefetch      |--> decode
            |  enables = fmask              |                 | buffer (queue)|
            +-------------------------------+                 +---------------+
```

Each cycle in state `RUN`:

1. The BTB gives the taken branch recorded for the line: its slot, whether it is
   conditional, and its target. A conditional branch is taken if the PAs
   predictor says so. The branch counts only if it lies at or after the
   slot where fetch enters the line. At most one taken branch is handled per
   cycle.
2. The used slots run from the entry slot to that branch (or to the end of
   the line). If the line hits, the mask covers them and the prefetch buffer
   has room for a whole line, they are pushed into the buffer. Each instruction
   is pushed with its address and the address predicted to follow it.
3. The next PC is the branch target or the next sequential line. Its mask is
   formed and registered as described above.

On a miss the stage sends one line request (`mem_req_*`) and waits in `MISS`.
When `mem_resp_*` arrives the line is filled, and the victim's MT entry is
reset in the same cycle. The stage then spends one cycle (`REPLAY`) forming
the mask again from the reset entry, and returns to `RUN`.
`redirect_valid`/`redirect_pc` restart fetch at any address. The target
mask then starts at the restart slot. The caller flushes the buffer
(`fb_flush`) at the same time.

The commit port (`commit`, type `fetch_pkg::commit_t`) takes one resolved
branch per cycle:
* conditional branches update the predictor;
* taken branches write the BTB;
* a second tag port of the I-cache checks whether the branch's line is still
  cached, and in which way, and the MT entry of that line is updated as above.
  If the line has been evicted, nothing is written (`ev_mt_skip`).

The `ev_*` outputs pulse once per event. They are meant for energy and
coverage accounting: fetches, taken branches, branch-into entries, branch-out
masks applied, zero-mask fallbacks, misses, buffer-full stalls, mask replays,
MT updates and skips, and mispredictions.

## Modules

| file | block | notes |
|---|---|---|
| `rtl/fetch_pkg.sv` | package | `addr_t`, `instr_t`, `commit_t`, `fb_entry_t`, mask helper functions |
| `rtl/fetch_unit.sv` | top | fetch control, miss FSM, wiring |
| `rtl/fmd.sv` | Fetch Mask Determination | combinational; target mask, decode, AND, fallback, per way |
| `rtl/mask_table.sv` | Mask Table | SETS x WAYS entries of log2(ISSUE_WIDTH) bits; read of a whole set; replacement and commit write ports |
| `rtl/btb.sv` | BTB | ENTRIES/WAYS sets, one taken branch per fetch line, LRU |
| `rtl/pas_predictor.sv` | PAs predictor | 2048 x 12-bit histories, 32 x 4096 two-bit counters; clears itself after reset (`ready`) |
| `rtl/icache.sv` | subbanked I-cache | one subbank per slot and way, fetch port, probe port, fill port with replacement report |
| `rtl/fetch_buffer.sv` | prefetch buffer | 32-entry queue; accepts a line only when a whole line fits |

All blocks use one clock and an asynchronous active-low reset `rst_n`. The
exception is the PAs tables, which are cleared by a sweep of one entry per cycle:
131072 cycles at the default size. The fetch stage waits for `ready`, and
commits before `ready` are ignored.

Top-level parameters: `ISSUE_WIDTH` (8), `IC_SETS` (256), `IC_WAYS` (4),
`BTB_ENTRIES` (1024), `BTB_WAYS` (2), `BHT_ENTRIES` (2048), `HIST` (12),
`PHT_SETS` (32), `FB_DEPTH` (32), `RESET_PC` (0). The I-cache line is always
`ISSUE_WIDTH` instructions. So for a 32 KB cache use `IC_SETS = 512` at 4-wide
and `IC_SETS = 128` at 16-wide.

## Where this implementation makes its own choices

Taken from the scheme:
* the mask algorithm, including the zero fallback;
* the MT size and entry width, and its initial, replacement, commit and
  misprediction rules;
* the one-cycle-ahead timing;
* the one-taken-branch-per-cycle limit;
* the cache, BTB and predictor sizes.

Chosen here:
* **Mask bit order and MT encoding.** The entry holds the slot of the last used
  instruction. A branch in slot *s* keeps slots 0..*s*: the branch itself is
  fetched and only the slots after it are dropped.
* **Per-way masks** (see above), because the way is not known when the MT is
  read.
* **The mask-replay safety net.**
* **BTB organisation.** One entry per fetch line, describing the most recently
  committed taken branch of that line. Full tags, LRU replacement.
  Unconditional branches are marked and always predicted taken.
* **PAs split.** The 32 KB are the pattern tables: 32 tables, selected by
  branch address bits 6:2, of 4096 counters indexed by a 12-bit per-address
  history. The 2048-entry history table is extra. Counters start weakly
  not-taken.
* **I-cache.** Replacement is first invalid way, else per-set round robin.
  Fill and probe port formats are also choices.
* **Prefetch buffer.** Depth 32. Each entry carries its predicted successor.
* **Misses and recovery.** Miss handling with one outstanding request; the
  redirect/flush protocol; reset PC 0.
* **Mispredicted branches.** A mispredicted branch resets its MT entry to all
  ones even if the predictor would now predict it taken. This is the
  conservative reading of the two rules that apply to it.

Not provided: the decode/execute/commit back end and the L2 cache and memory.
They appear only as ports. The testbenches model them.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_fetch_unit \
          rtl/fetch_pkg.sv tb/tb_fetch_unit.sv -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_fmd` | every target slot / MT entry combination for 8-wide x 4 ways against masks built from slot numbers; the two worked 4-wide examples (`0111 & 1110 = 0110`, and `0111 & 1000 = 0`, which falls back to `0111`, written first slot left) |
| `tb_mask_table` | 20000 random cycles of replacements, commits and mispredictions, including collisions on one entry, against a reference table |
| `tb_btb` | hits, contents, overwrite and LRU eviction against a reference |
| `tb_pas_predictor` | clear time (131072 cycles), lookups and next-prediction output against a reference two-level model |
| `tb_icache` | hits, ways, masked word reads, zeros from disabled subbanks, subbank count, probe, replacement report |
| `tb_fetch_buffer` | queue contents, whole-line admission, flush, successor addresses |
| `tb_fetch_unit` | the whole fetch unit at its default size (see below) |
| `tb_fetch_widths` | the same scenario on a 4-wide and a 16-wide fetch unit, through `tb/fetch_scenario.sv` |

The end-to-end test runs a synthetic program of 96 lines. Twelve lines share
each of eight cache sets, so lines are evicted. Each line has at most one
branch: unconditional, always taken, never taken, a loop branch, or a
data-dependent branch. Targets fall anywhere in a line. The testbench acts as
the back end:
* it takes instructions from the buffer at a varying rate, sometimes not at
  all, so that the buffer fills;
* it checks every address against the architectural path and every word
  against the memory image;
* it redirects on a wrong prediction;
* it delivers each branch to the commit port 12 cycles after resolving it.

It requires every mechanism to occur: taken branch, branch into, branch-out
mask, zero fallback, miss and fill, buffer-full stall, MT update, skipped MT
update for an evicted line, and misprediction. It runs 30000 instructions,
about 147000 cycles including the predictor clear, in well under a second.

The test also checks the stream rate: a fetch is followed by a fetch in the next
cycle unless a miss, a full buffer, a mask replay or a redirect stops it. That
is the 1-cycle hit. It compares the subbanks read in the hitting way with an
oracle mask of exactly the used slots, and fails if they differ by more than 5 %.

Measured on the synthetic program, in the hitting way:

| fetch width | subbanks read (FMD) | used slots (oracle) | full-line reads |
|---|---|---|---|
| 4 | 66170 | 65225 | 78892 |
| 8 | 40624 | 39969 | 53432 |
| 16 | 37092 | 36709 | 53088 |

The FMD mask stays within 1.7 % of the oracle and saves 16-30 % of data-array
reads against full-line fetch. Counted over all four ways, the subbanks read
are 84 %, 76 % and 71 % of a full read of all ways. These numbers describe this
synthetic program only. They are not a prediction for real workloads.

## Limits

* The energy benefit depends on the cache's subbank enables being wired to real
  per-subbank power control. The RTL data array is an ordinary array with a
  read enable per subbank.
* The tag array is always read in full. Only the data array is masked.
* The PAs tables are cleared by a sweep rather than by reset, so the stage
  stays idle for `PHT_SETS << HIST` cycles after reset.
* Only one line request can be outstanding, and there is no prefetching.
