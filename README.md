# Hybrid wakeup: an issue stage that wakes dependents by index

In a conventional out-of-order instruction window, every completing instruction
drives its destination tag across the whole window, and every entry compares
that tag against both of its source tags. Most of those comparisons are wasted.
The great majority of results have at most one consumer that is already
waiting in the window when the result is produced.

This RTL builds the issue stage around that observation. When a consumer is
inserted and one of its sources is not yet available, the consumer's window
index is recorded in the producer's entry. When the producer completes, that
index is decoded and only the consumer's comparator is switched on. A broadcast
is used only when a second consumer arrives for the same producer. Even then,
the *Hybrid-Snoop* variant restricts the broadcast to the few entries known to
be interested. Issue timing is the same as with full broadcast: no instruction
waits longer than it would in a conventional window.

The design follows the hybrid wakeup scheme of "Energy-Efficient Hybrid Wakeup
Logic". The interface, the sizes the scheme leaves open and the details
listed under "Choices made here" are this implementation's own.

## Pipeline view

```
 decoded instr ──► rat_pie ──► preg_ready ──► issue_window ──► iss_* (up to 6/cycle)
 (logical regs,    map + PIE    ready bits      entries, DIE links,
  new phys dest)   checkpoints  (+ bypass)      wakeup_enable × 6,
                                                issue_arbiter
                                     ▲                 ▲
                                     └──── wb_valid/wb_idx (completions) ◄── execution units
```

* **`rat_pie`** is the register alias table. For each logical register it
  holds the physical register, plus the **PIE** (Producer Instruction-window
  Entry): the window entry of the instruction that will write that register.
* **`preg_ready`** holds one ready bit per physical register. It forwards
  completions of the current cycle into the lookup.
* **`issue_window`** holds 96 entries. Each entry has the usual fields (opcode,
  two source tags with ready bits, a destination tag and a branch mask) and
  four added ones:

  | field     | meaning                                                   |
  |-----------|-----------------------------------------------------------|
  | DIE       | index of the one dependent recorded so far                |
  | Empty     | set while no dependent is recorded (DIE unused)           |
  | Broadcast | a second dependent arrived: wake by broadcast             |
  | Snoop     | this entry takes part in broadcasts (Hybrid-Snoop only)   |

* **`wakeup_enable`** turns one completing producer's DIE, Empty and Broadcast
  bits, plus the window's Snoop bits, into per-entry comparator enables. There
  is one instance per completion port.
* **`issue_arbiter`** grants up to six ready entries per cycle, lowest index
  first.
* **`hybrid_wakeup_core`** is the top level and wires the four together.

## The linking rules (the heart of the design)

Take an instruction being inserted. For each source that is not ready, the
producer entry `p = PIE[src]` is examined. A consumer whose two sources come
from the same producer counts as one dependence.

| state of producer `p`         | Indexing-Only      | Hybrid-Plain        | Hybrid-Snoop (default)                                   |
|-------------------------------|--------------------|---------------------|----------------------------------------------------------|
| Empty = 1 (no dependent yet)  | DIE[p] ← new, Empty ← 0 | same           | same                                                     |
| Empty = 0, Broadcast = 0      | **stall** insertion | Broadcast[p] ← 1   | Broadcast[p] ← 1; Snoop ← 1 on the new entry and on DIE[p] |
| Empty = 0, Broadcast = 1      | (cannot happen)    | nothing             | Snoop ← 1 on the new entry                               |

When `p` completes, the window reads its fields and enables comparators:

| producer state            | comparators enabled                                    |
|---------------------------|--------------------------------------------------------|
| Empty = 1, Broadcast = 0  | none. Nobody is waiting, so the completion costs nothing. |
| Empty = 0, Broadcast = 0  | one: the entry DIE points to (decoder)                 |
| Broadcast = 1             | all 96 entries (Plain), or the entries with Snoop set (Snoop) |

With `BCAST_STALL` = 1 the insertion logic adds a hold. An instruction that
would set a Broadcast bit is refused for one cycle, once. If its producer
completes in that cycle, no broadcast is needed at all. This trades a little
issue bandwidth for fewer broadcasts. It is off by default.

An enabled entry compares the result tag with both of its source tags and sets
the ready bit of each one that matches. `stat_wb_cmp` reports the number of
enabled entries for each completion. That number is the energy metric this
design is built to minimise.

Two cases in the timing are handled explicitly:

* **Producer completes while its consumer is being inserted.** The producer's
  entry is freed in that cycle, so the link cannot be recorded. `preg_ready`
  forwards the completing tags into the insertion lookup, so the source
  already counts as ready.
* **An entry is kept until completion, not until issue.** A consumer may still
  need to write DIE into its producer while the producer is executing.
  Consequently the window holds both issued and waiting instructions.

## Branch recovery and dangling pointers

A branch takes a checkpoint of the RAT, including the PIE field
(`NUM_CKPT` = 4 of them). Each window entry carries the mask of the
unresolved checkpoints it follows, in the style of the R10000. A misprediction:

* restores the RAT from the branch's checkpoint;
* frees that checkpoint and every younger one;
* frees every window entry whose mask has the branch's bit set.

A correct resolution just clears the bit everywhere.

The added window fields are **not** checkpointed. A producer older than the
branch may keep a DIE pointer to a squashed consumer. Such a pointer can never
cause a missed wakeup. At worst:

* a later true consumer of that producer sees Empty = 0, so it stalls
  (Indexing-Only) or sets Broadcast (Hybrid);
* the producer's completion then enables one useless comparator.

The end-to-end tests exercise these cases under random mispredictions.

## Interface of `hybrid_wakeup_core`

One clock domain. Reset is synchronous and active low. The execution units,
the free list and the reorder buffer are outside this block.

| group | signals | notes |
|-------|---------|-------|
| insertion | `in_valid`, `in_ready`, `in_op`, `in_src_valid[2]`, `in_src_lreg[2]`, `in_has_dest`, `in_dest_lreg`, `in_dest_preg`, `in_is_branch` | One instruction per cycle, taken when `in_valid && in_ready`. `in_dest_preg` is a free physical register. A branch must not have a destination. |
| insertion results | `in_entry`, `in_ckpt`, `in_old_preg` | The entry used, the branch's checkpoint, and the previous mapping of the destination (to free at retirement). |
| issue | `iss_valid[6]`, `iss_idx`, `iss_op`, `iss_has_dest`, `iss_dest_tag`, `iss_src_tag[2]`, `iss_mask` | Combinational grants from the current state. |
| completion | `wb_valid[6]`, `wb_idx[6]` | Window index of a completing instruction. Each issued, non-squashed instruction completes exactly once. |
| branches | `br_valid`, `br_id`, `br_mispredict` | `br_id` is the checkpoint returned in `in_ckpt`. |
| events | `stat_wb_cmp`, `stat_wb_bcast`, `stat_wb_dest`, `stat_full`, `stat_ckpt_stall`, `stat_dep_stall`, `stat_links`, `stat_bcast_set`, `stat_bc_stall`, `stat_bypass` | Per-cycle counts for energy accounting. |

Timing:

* An instruction inserted in cycle *t* can issue in cycle *t+1*.
* A completion in cycle *t* lets its dependents issue in cycle *t+1*.

`in_ready` is low when any of these holds:

* the window is full;
* a branch finds no free checkpoint;
* a misprediction is being signalled;
* in Indexing-Only, a producer of the instruction already has a dependent.

The execution units must drop instructions squashed by a misprediction. They
can tell which ones from `iss_mask`.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `WIN_ENTRIES` | 96 | the evaluated core |
| `ISSUE_WIDTH`, `WB_WIDTH` | 6, 6 | the evaluated core's issue width, also used for completions |
| `SCHEME` | `HYBRID_SNOOP` | the variant with the fewest comparisons. `HYBRID_PLAIN` and `INDEXING_ONLY` are also built. |
| `BCAST_STALL` | 0 | the one-cycle hold before a Broadcast bit is set. An evaluated option that costs performance, so it is off by default. |
| `NUM_LREGS` | 64 | own choice: 32 integer + 32 FP registers of a MIPS target |
| `NUM_PREGS` | 160 | own choice: 64 committed registers + one per window entry |
| `NUM_CKPT` | 4 | own choice, as on the R10000 |
| `OP_W` | 8 | own choice: the opcode is carried, not interpreted |

Coarse synthesis of the top at these defaults gives about 9,100 word-level
cells and 10,100 flip-flops. The window accounts for most of both.

## Choices made here, and departures

* **One insertion per cycle.** The scheme does not fix a dispatch width.
  Inserting several dependent instructions per cycle would need forwarding of
  PIE and links within the group. That is not built.
* **Snoop bits** are cleared when an entry issues, is freed or is allocated.
  When they clear is otherwise unspecified. Clearing at issue and at free keeps
  finished entries out of broadcasts.
* **Comparison count.** Hybrid-Plain enables all entries, including empty
  ones, which matches charging a full window per broadcast. One enabled entry
  counts as one comparison, although it checks both of its source tags.
* **Issue policy.** Issue priority is the lowest entry index. Functional-unit
  classes are not modelled: any ready instruction can take any issue slot.
* **Register file.** Only the ready bits are built, not the value array.
* **Not built:**
  * Multiple windows with window-qualified DIE pointers.
  * Compacting windows, which direct indexing does not support.
  * The empty/ready-entry gating baseline that the scheme is compared against.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_wakeup_enable` | All three schemes against a reference, over random DIE, Empty, Broadcast and Snoop values. |
| `tb_issue_arbiter` | Random request vectors. Grants must go to the first six requesters in index order. |
| `tb_preg_ready` | Set and clear against a reference, including same-cycle forwarding and allocate-over-complete. |
| `tb_rat_pie` | Renames, checkpoints, correct resolutions and mispredictions against a reference RAT. |
| `tb_issue_window` | Directed scenarios under each scheme (`issue_window_scenario`), plus the Broadcast hold (`issue_window_hold`). See the list below the table. |
| `tb_hybrid_wakeup_core` | End to end at the default parameters, over 20,000 random instructions. See the list below the table. |
| `tb_core_schemes` | The same end-to-end test for Indexing-Only, Hybrid-Plain, and Hybrid-Snoop with `BCAST_STALL`. |
| `tb_dependence_profile` | All three schemes on a stream with a prescribed number of close-by dependents per result. See "Comparison counts for a realistic dependence profile" below. |

`tb_issue_window` checks, under each scheme:

* a single dependent costs one comparison and issues the next cycle;
* a producer with no dependent costs no comparison;
* a second dependent stalls or broadcasts, and a broadcast costs 96 (Plain) or
  3 (Snoop) comparisons;
* an unrelated waiting entry is not woken;
* two sources on one producer make one link;
* a dangling pointer after a squash is harmless;
* a cleared mask bit protects an entry from a later squash.

With `BCAST_STALL` = 1 it also checks that:

* a second dependent is held exactly one cycle and then sets Broadcast;
* a producer that completes during the hold leaves nothing to broadcast.

`tb_hybrid_wakeup_core` runs 20,000 random instructions with branches, stores,
random latencies and mispredictions. `core_driver` models the free list, the
reorder buffer and the execution units. It checks every cycle that:

* no instruction issues before its producers complete;
* no ready instruction is passed over while an issue slot is free;
* the tags at issue are correct;
* each completion makes exactly one comparison for a single dependent, none
  for none, and broadcasts for more.

It also fails if any mechanism never occurred. The mechanisms are: indexed
wakeup, broadcast, snoop-limited broadcast, dispatch bypass, full window,
checkpoint exhaustion, a misprediction and a correct resolution, and the
Indexing-Only stall.

Measured on the random stream of `tb_hybrid_wakeup_core`, which has a deliberately small set of hot
registers and so far more multi-consumer results than real code:

| scheme | comparisons per completing instruction with a destination | cycles for 20,000 instructions |
|--------|------|------|
| Hybrid-Snoop  | 3.8  | 22,900 |
| Hybrid-Plain  | 15.4 | 23,000 |
| Hybrid-Snoop with `BCAST_STALL` | 2.8 | 24,400 |
| Indexing-Only | 0.28 | 48,300 |

The ranking is the one the scheme predicts: Snoop is far cheaper than Plain
at the same speed, and Indexing-Only is cheapest but slow. The Broadcast hold
removes about a fifth of the broadcasts and costs about 6% in cycles. The absolute values
depend on the stream and are not comparable with results measured on real
programs.

## Comparison counts for a realistic dependence profile

The scheme's evaluation reports dependence statistics for a 96-entry window:

* 52.1% of destination-writing instructions have exactly one close-by
  dependent;
* 8.7% have more than one;
* a broadcast reaches 2.8 snooping entries on average.

`tb_dependence_profile` builds a stream with that profile. Each producer is
followed by 0, 1, or 2 to 4 stores that read its result while it executes.
From the profile:

* Hybrid-Plain should cost 0.521 + 96 × 0.087 = 8.87 comparisons per
  completion;
* Hybrid-Snoop should cost at least 0.521 + 2.8 × 0.087 = 0.77.

| scheme | measured | from the profile | published |
|--------|----------|------------------|-----------|
| Hybrid-Plain  | 8.8 – 8.9   | 8.87      | 8.9 |
| Hybrid-Snoop  | 0.83 – 0.85 | ≥ 0.77    | 0.8 |
| Indexing-Only | 0.61        | 0.61      | –   |

Hybrid-Snoop lands above its lower bound for a simple reason. A broadcast also
reaches entries that are snooping for a different broadcasting producer still
in flight, which gives about 3.7 snooping entries per broadcast in this
stream. In the same stream Indexing-Only takes about 48% more cycles. That
figure depends heavily on the stream; the published average slowdown is 8%.

## Simulating

With Verilator 5 (two-state, `--timing` for the testbench clocks):

```
verilator --binary --timing --assert -y rtl -y tb rtl/wakeup_pkg.sv \
          tb/tb_hybrid_wakeup_core.sv --top-module tb_hybrid_wakeup_core -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. The package must come first
on the command line. All other files are found through `-y`. To try another
wakeup variant in your own bench, set `SCHEME` on `hybrid_wakeup_core` to
`wakeup_pkg::HYBRID_PLAIN` or `wakeup_pkg::INDEXING_ONLY`.
