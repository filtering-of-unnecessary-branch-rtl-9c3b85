# Branch predictor lookup filtering with next branch distances

A dynamic branch predictor (a branch target buffer plus a direction
predictor) is normally read on every fetch cycle, because at fetch time the
processor cannot yet tell whether the fetched word is a branch. Most fetched
instructions are not branches, so most of those reads are wasted energy.

This front end removes the wasted reads without changing a single
prediction. It learns, at run time, the **next branch distance (NBD)** of
each branch held in the BTB: how many non-branch instructions follow the
branch, on its taken path and on its not-taken path, before the next branch.
When a branch is fetched and predicted, the distance for the predicted
direction is loaded into a down-counter. While that counter is non-zero, the
BTB, the direction predictor and the distance table itself are not read at
all, and the fetch unit simply predicts "next sequential PC", which is what
the predictor would have said for a non-branch anyway. The first instruction
after the distance runs out is looked up normally.

The scheme is the one published by W.-H. Chiao and C.-P. Chung ("Filtering of
Unnecessary Branch Predictor Lookups for Low-power Processor Architecture").
This RTL implements it around a 512-entry direct-mapped BTB and a 16K-entry
gshare predictor with 9-bit distances, the configuration that work evaluates.
Everything outside the fetch front end (decode, execute, caches) is not part
of this RTL; the top module has ports where it connects to them.

## Structure

```
              +-------------------- predicted next PC -------------------+
              v                                                          |
   +----+   +----+        +-----------+   hit, TAdd                      |
   | PC |-->| EN |--gate->|   BTB     |-----------------+--> next-PC mux-+
   +----+   +----+   |    +-----------+                 |      ^
      |       ^      +--->| gshare    |-- pred_tkn -----+------+
      |       |      |    +-----------+                 |
      |       |      +--->|   NBDT    |-- T/NT NBD, valid (selected by pred_tkn)
      |       |           +-----------+                 |
      |       +-- Next_en -- next lookup filter (ER) <--+
      |
   ... IF -> ID -> EX ...   EX: NBDC counts, collector writes NBDT / BTB
```

| Module | Role |
|---|---|
| `nbd_frontend` | top: PC, next-PC selection, all blocks below, misprediction redirect |
| `btb` | direct-mapped BTB: fetch lookup gated by EN, EX probe, allocate / target update |
| `gshare_dirpred` | 2-bit counters indexed by PC xor global history, lookup gated by EN |
| `nbdt` | NBD table, one 20-bit entry per BTB entry: `tkn_NBD`, `nt_NBD`, `tkn_v`, `nt_v` |
| `nbdc` | EX-stage saturating counter of non-branch instructions since the last branch |
| `nbd_collector` | EX-stage control: closes the previous branch's collection, applies the management rules |
| `next_lookup_filter` | enable register ER, `Next_en`, the lookup enable EN |
| `nbd_pkg` | default sizes, instruction size, the T/NT direction type |

## Collecting distances (EX stage)

Distances are measured on the path the program really executes, so they are
gathered where instructions are resolved, in EX.

* `nbdc` is cleared by every executed branch and incremented by every
  executed non-branch, saturating at `2^NBD_W - 1` (511). When a branch B2
  reaches EX, the counter holds the distance from the previous branch B1.
* `nbd_collector` remembers B1's BTB index (`L_IDX`), its direction
  (`L_BDIR`) and whether B1's distance is wanted (the pending flag). When B2
  executes, a pending distance is written into `NBDT[L_IDX]`, field
  `L_BDIR`, and that field's valid bit is set.
* In the same cycle the collector decides what to do about B2 itself:

| B2 direction | B2 in BTB? | relevant valid bit | BTB target right? | action |
|---|---|---|---|---|
| not taken | no | - | - | nothing (not-taken branches are never allocated) |
| not taken | yes | `nt_v` = 0 | - | collect `nt_NBD` |
| not taken | yes | `nt_v` = 1 | - | nothing, already known |
| taken | no | - | - | allocate BTB entry, clear `tkn_v` and `nt_v`, collect `tkn_NBD` |
| taken | yes | `tkn_v` = 0 | either | collect `tkn_NBD` (and fix the target if wrong) |
| taken | yes | `tkn_v` = 1 | yes | nothing, already known |
| taken | yes | `tkn_v` = 1 | no | update target, clear `tkn_v`, collect `tkn_NBD` |

  "Collect" means B2 becomes the new `L_IDX`/`L_BDIR` with the pending flag
  set; any other outcome clears the flag.

Two rules keep the table consistent with the BTB: a distance is cleared
whenever its BTB entry changes owner or its taken target changes, because the
path after the branch is then different; and a clear in the same cycle as a
write to the same valid bit wins (the write belongs to the old owner). When
B2 lives in the same entry as the pending B1 (a one-branch loop), the write
is forwarded into B2's decision so the distance is not collected twice.

Collection happens once per field: after the valid bit is set, the entry is
not written again until something invalidates it.

## Filtering (IF stage)

`next_lookup_filter` keeps ER, the number of non-branch instructions still
expected before the next branch. For every instruction that leaves fetch:

* BTB hit (only possible when EN = 1): ER is loaded with the NBD of the
  predicted direction if that field is valid, else with 0.
* No hit: ER counts down, stopping at 0.

`Next_en = (new ER == 0)` is registered into EN, which gates the next
fetch's reads of the BTB, gshare and NBDT. With EN = 0 those blocks report no
hit and not-taken, so the next PC is PC + 4.

Example, a three-instruction loop whose taken distance (2) has been
collected:

| fetched | new ER | Next_en | EN for this fetch |
|---|---|---|---|
| `BNE L` (hit, predicted taken, `tkn_NBD` = 2) | 2 | 0 | 1 |
| `L: ADD` | 1 | 0 | 0 |
| `CMP` | 0 | 1 | 0 |
| `BNE L` | ... | ... | 1 |

Only one lookup in three is performed.

## Why no prediction changes

A filtered fetch always predicts PC + 4, so filtering is harmless exactly when
the filtered instruction is not a BTB-resident branch. The stored distances
are never larger than the real ones:

* a distance is measured on the executed path that follows the branch in the
  direction, and to the target, that the BTB will predict next time;
* if the branch's BTB entry is replaced, or its target changes, the distance
  is cleared before it can be used;
* a distance too large for the counter is stored as the maximum, which is
  short, not long (the predictor is then simply read a few times too often);
* on any misprediction the fetched path differs from the predicted one, so
  EX redirects fetch, ER is reset and EN is set: the first instruction on the
  corrected path is looked up.

An unknown distance (invalid field, replaced entry, after a flush) falls back
to 0, i.e. to reading the predictor on every fetch. The end-to-end testbench
checks the claim directly: at every fetch the front end's prediction is
compared with an unfiltered BTB + gshare model trained identically.

## Interface and timing of `nbd_frontend`

All state changes on the rising edge of `clk`; `rst_n` is asynchronous, active
low. Reset leaves the PC at `RESET_PC`, EN = 1, ER = 0, all BTB and NBDT
valid bits clear and the global history zero. The gshare counter table is not
reset (any 2-bit value is a legal state).

Fetch side, valid in the same cycle:

| port | dir | meaning |
|---|---|---|
| `if_advance` | in | the instruction in IF is accepted this cycle; PC, ER, EN hold when low |
| `if_pc` | out | fetch PC |
| `if_lookup_en` | out | EN: whether this fetch reads the predictor |
| `if_pred_taken`, `if_pred_npc` | out | prediction for this fetch |
| `if_dir_idx` | out | gshare index used; carry it with the instruction to EX |

Execute side, one resolved instruction per cycle in program order, correct
path only:

| port | dir | meaning |
|---|---|---|
| `ex_valid`, `ex_pc` | in | an instruction resolves this cycle, and its PC |
| `ex_branch`, `ex_taken`, `ex_target` | in | branch, direction, actual target |
| `ex_pred_npc`, `ex_dir_idx` | in | `if_pred_npc` and `if_dir_idx` carried from fetch |
| `ex_mispredict`, `ex_actual_npc` | out | combinational: the prediction was wrong; fetch restarts at `ex_actual_npc` on the next edge and the pipeline must squash everything younger |

Table reads are combinational within the cycle; all table writes from EX land
on the clock edge, so a fetch in the same cycle still sees the old contents.

Parameters (defaults are the evaluated configuration):

| parameter | default | meaning |
|---|---|---|
| `PC_W` | 32 | PC width (this design's choice) |
| `BTB_ENTRIES` | 512 | BTB and NBDT entries, power of two |
| `DIR_ENTRIES` | 16384 | gshare counters, power of two |
| `NBD_W` | 9 | width of NBDC, ER and each NBD field (entry = 2·NBD_W + 2 bits) |
| `RESET_PC` | 0 | fetch address after reset |

Wider `NBD_W` captures longer basic blocks but makes every NBDT read more
expensive; 9 bits was found to be the best trade-off for SPEC CPU2000-like
code.

## Choices made here, and departures

* Instructions are 4 bytes, PCs 32 bits; the BTB uses a full tag above index
  `PC[10:2]`.
* gshare: 2-bit counters, 14-bit global history, index `PC[15:2] ^ history`;
  history and counters are trained non-speculatively in EX on every branch
  (conditional or not), using the index carried from fetch. Only "gshare,
  16K entries" is part of the original description.
* EX learns whether a branch is in the BTB, its stored target and its NBD
  valid bits by probing the BTB and NBDT with the branch's PC (a second
  read port on each).
* When a taken branch is in the BTB with a wrong target but its `tkn_v` is
  still clear, the target is updated as well. The published decision flow
  updates the target only when `tkn_v` is set; without the update the
  distance collected next could belong to a path the BTB does not predict
  and could be too long.
* ER stops at 0 rather than wrapping; ER and EN hold while fetch stalls; a
  flush sets EN as well as clearing ER.
* A branch whose NBD field is invalid loads the default distance 0 into ER,
  so an unknown distance always means "look up everything".
* No energy, timing or area model is included: the benefit of the scheme is
  in the number of array reads, which the testbenches count. The filter's
  critical path (NBDT read, T/NT select, valid select, compare with zero,
  select by hit, into EN) is meant to be about as long as the BTB's own
  path (tag read, compare, AND with the direction, next-PC select), so the
  filter should fit in the fetch cycle; this RTL keeps that structure but
  makes no timing claim of its own.

## Verification

Each module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_nbdc` | loop example counts, saturation at 511, random steps against a model |
| `tb_next_lookup_filter` | the loop example sequence, default 0 for invalid NBDs, stall, flush, random against a model |
| `tb_nbdt` | reset state, field selection, disabled reads, invalidate-over-write, random against a model |
| `tb_btb` | lookups with and without enable, EX probe, allocation, replacement, target update |
| `tb_gshare_dirpred` | index = PC xor history, counter training, gating, at full 16K size |
| `tb_nbd_collector` | every row of the decision table, pending writes, loop forwarding, same-entry replacement, then random instructions against a table model |
| `tb_nbd_frontend` | whole front end at default sizes inside a modelled 3-stage pipeline |
| `tb_nbd_width_sweep` | the same program on eight front ends with `NBD_W` = 5 ... 12 (environment in `tb/nbd_width_env.sv`) |

`tb_nbd_frontend` runs a synthetic program of 100,000 executed instructions
(a short inner loop, data-dependent and random branches, a 600-instruction
basic block that overflows the 9-bit distance, an indirect jump whose target
alternates, and two jumps that share a BTB entry), with random fetch stalls.
It checks that every instruction reaching EX is the next architectural one,
that fetch restarts at the corrected PC with EN = 1 on the cycle after a
misprediction, that every fetch predicts exactly what the unfiltered reference predicts, that
no BTB-resident branch is ever fetched with its lookup filtered, and that
every distance written into the NBDT equals the true distance. It requires
each mechanism (filtering, collection, default NBD, saturation, replacement,
target-update invalidation, direction and target mispredictions, stalls) to
occur, and prints the lookup ratio; on this program about half of all
fetches read the predictor.

`tb_nbd_width_sweep` repeats this for distance widths 5 to 12 and requires the
same checks of every width. On its program the fraction of fetches that read
the predictor falls from about 93 % at 5 bits to about 58 % at 9 bits and
43-60 % at 10-12 bits (the spread comes from different random branch outcomes
and the mispredictions they cause, each of which resets ER). Only widths of
10 bits or more hold the 600-instruction block's distance without saturating.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/nbd_pkg.sv tb/tb_nbd_frontend.sv --top-module tb_nbd_frontend -o sim
./obj_dir/sim
```

Replace `tb_nbd_frontend` by any other testbench name (add `-y tb` for
`tb_nbd_width_sweep`). Each finishes in under a second.
