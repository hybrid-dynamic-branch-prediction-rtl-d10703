# HDBP: a hybrid dynamic branch predictor

Two-level predictors like gshare hash the global branch history with the
PC to pick a two-bit counter. When two unrelated branches hash to the same
counter, they train it against each other. This is *destructive aliasing*,
and it worsens as tables shrink and histories grow. The hybrid dynamic
branch predictor (HDBP) in this repository attacks it in two ways:

* **Use only the history that matters.** Each register records where in
  the branch stream it was last written. A branch's operands show how far
  back the branches that decide its outcome lie. Only that stretch of
  global history goes into the index. The rest of the index is filled with
  upper PC bits instead of zeros, so branches with short histories still
  spread across the table.
* **Fold history that is too long to fit.** If a branch's operand was
  written further back than the dependency table can see, a history twice
  as long as the index is folded in half (upper XOR lower). It is then
  hashed with the PC shifted by 0, 4 and 12 bits. This is a modified gshare
  that can see distant correlations.

Both paths produce an n-bit index into one table of 2^n two-bit saturating
counters. The default is n = 12, a 4K-entry table.

## Files

| file | contents |
|---|---|
| `rtl/hdbp_pkg.sv` | default sizes, counter type `ctr_t`, counter update function |
| `rtl/brdt.sv` | branch register dependency table (BRDT) |
| `rtl/hdbp_len_mask.sv` | "first MSB 1" fill: history mask and length |
| `rtl/hdbp_dyn_index.sv` | dynamic-length index path |
| `rtl/hdbp_fold_index.sv` | folded-history index path |
| `rtl/hdbp_ghr.sv` | 2n-bit global history register |
| `rtl/hdbp_pht.sv` | 2^n × 2-bit pattern history table with initialisation walk |
| `rtl/hdbp.sv` | top level: path selection and wiring |
| `tb/*_tb.sv` | one self-checking testbench per module, `hdbp_tb` end to end, `hdbp_sizes_tb` over four table sizes |

## The branch register dependency table

The BRDT is the most unusual part of the design. It has one entry per
physical register (64 by default). Each entry is a bit vector as wide as
the PHT index (n bits). Bit *i* set means "this register was last written
*i* branches ago". In other words, it was written in the basic block that
ended *i* branches before the current one. Bit 0 is the current block.

* **Register write:** the destination entry becomes `0…001`.
* **Branch:** every entry shifts up by one position. The top bit is
  *sticky*: `new[n-1] = old[n-1] | old[n-2]`. A write that is n-1 or more
  branches old therefore stays visible as "at least n-1 branches back"
  instead of dropping out of the table.
* **Write and branch in the same cycle:** the write is taken to be older
  than the branch, so the fresh entry ages along with the rest and becomes
  `0…010`.
* **Lookup:** the entries of the branch's (up to two) source registers are
  ORed together. A branch reading r3 (written 2 branches ago) and r7
  (written 5 branches ago) sees `…0100100`.

Lookups are combinational and see the table as it was before the current
cycle's updates. Reset clears every entry, which means "no dependency".

## Forming a prediction

All of this happens in one combinational path from `pred_*` inputs to
`pred_taken` / `pred_idx`. Bit 0 of the history is the newest outcome. The
PC is a word address, with the instruction alignment bits already removed.

1. **Mask** (`hdbp_len_mask`): every bit from the highest 1 of the BRDT
   lookup down to bit 0 is set. `…0100100` becomes `…0111111`, a history
   length of 6. An empty lookup gives an empty mask and length 0.
2. **Path choice:** if the length reaches n (the sticky top bit is set),
   the folded path is used. Otherwise the dynamic path is used.
3. **Dynamic path** (`hdbp_dyn_index`):

       new_bhr = (ghr[n-1:0] & mask) | (pc[2n-1:n] & ~mask)
       idx     = new_bhr ^ pc[n-1:0] ^ pc[n+3:4]

4. **Folded path** (`hdbp_fold_index`):

       folded = ghr[2n-1:n] ^ ghr[n-1:0]
       idx    = folded ^ pc[n-1:0] ^ pc[n+3:4] ^ pc[n+11:12]

5. **PHT read** (`hdbp_pht`): the upper bit of counter `idx` is the
   prediction.

The PC must be at least `n+12` bits wide for the folded path. With the
defaults it is 32.

## Training

When a branch resolves, the caller raises `upd_valid` with its outcome and
the `pred_idx` it was given at prediction time. At the next clock edge:

* the counter at `upd_idx` moves one step towards the outcome, saturating
  at 00 and 11;
* the global history shifts the outcome into bit 0;
* the BRDT ages by one basic block.

History is updated only with resolved outcomes. There is no speculative
history and no repair. The prediction stays correct as long as each branch
is predicted and resolved before the next branch is predicted, in program
order. A pipeline that keeps several branches in flight would have to add
speculative history and checkpointing on top of this.

## Interface and timing (`hdbp`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `ready` | out | 1 | PHT initialised; wait for it after reset |
| `pred_pc` | in | 32 | word address of the branch |
| `pred_src1_valid`, `pred_src1` | in | 1, 6 | first source register of the branch |
| `pred_src2_valid`, `pred_src2` | in | 1, 6 | second source register |
| `pred_taken` | out | 1 | predicted direction, same cycle |
| `pred_idx` | out | n | PHT index used; hand it back on update |
| `pred_fold` | out | 1 | 1 = folded-history path was used |
| `pred_hist_len` | out | ⌈log2(n+1)⌉ | correlated history length, 0…n |
| `upd_valid`, `upd_idx`, `upd_taken` | in | 1, n, 1 | resolved branch |
| `wr_valid`, `wr_dst` | in | 1, 6 | register-writing instruction completed |

Each cycle takes one prediction, one resolved branch and one register
write. After reset is released, the PHT writes "weakly not taken" into one
counter per cycle, so `ready` rises 2^n cycles later (4096 with the
defaults). Updates offered before that are dropped, and predictions made
before that are not meaningful.

Parameters of `hdbp`: `N` (index width, default 12), `NREGS` (BRDT
entries, 64) and `PCW` (PC width, 32). The BRDT width is always N and the
global history is always 2N.

## What comes from the scheme and what is this design's own

Taken from the published scheme:
* the dependency table indexed by register;
* the "first MSB 1" fill;
* AND masking of the history;
* filling the masked-off bits with upper PC bits;
* XOR with the PC shifted by 0 and 4 bits;
* folding a long history in half;
* XOR with the PC shifted by 0, 4 and 12 bits;
* the choice between the two paths when the history length reaches the
  table width;
* a 2^n table of two-bit counters, at 4K entries.

Chosen here, because the scheme leaves them open:
* **BRDT encoding.** Latest write only, as one bit per branch distance.
  Operand dependencies are not merged into an entry. Merging them would
  drive almost every entry to full length, and nearly all branches would
  then take the folded path.
* **Sticky top bit.** This is what makes "length ≥ table width" reachable.
* **Sizes.** Up to two source registers per branch. 64 registers. A 2n-bit
  global history.
* **Which PC bits are "upper".** `pc[2n-1:n]`.
* **Counter encoding and reset value.** 00 = strongly not taken;
  counters start at weakly not taken.
* **PHT initialisation.** The table is cleared by a walk, not by a
  single-cycle reset, so that it can be an ordinary memory.
* **Update protocol.** One update per cycle, resolved-outcome history,
  in-order.
* **The "static" part of the hybrid.** It is read as the fixed-length
  folded gshare path. There is no separate static predictor.

The scheme was evaluated in a cycle-level simulator on SPEC2000 integer
programs. Against gshare it was reported to reduce aliasing by about 44 %
and mispredictions by about 19 % on average over 1K–8K-entry tables, and
to raise IPC by about 1.3 %. Those results depend on the choices above,
which the published description does not pin down. They have not been
reproduced with this RTL.

## Simulating

Every testbench checks itself against an independent model and ends by
printing `TB_RESULT checks=<n> failures=<m>`. For example:

    verilator --binary --timing --assert -Wno-fatal --top-module hdbp_tb \
        -y rtl -y tb rtl/hdbp_pkg.sv tb/hdbp_tb.sv -o sim
    ./obj_dir/sim

* `hdbp_tb` runs the top at its default sizes. It uses a synthetic program
  of 24 static branches and random register writes over 30 000 cycles
  (about 15 000 branches). Every prediction's index, path, history length
  and direction is compared with a model of the whole predictor. The test
  also counts each mechanism and fails if one never occurs: empty and
  partial masks, the folded path, the sticky top bit, a write in the same
  cycle as a branch, and both counter saturation limits.
* `brdt_tb` models each register as a set of branch distances.
* `hdbp_len_mask_tb` tries all 4096 entries.
* `hdbp_dyn_index_tb` and `hdbp_fold_index_tb` rebuild each index bit by
  bit.
* `hdbp_ghr_tb` compares the history against a queue.
* `hdbp_pht_tb` checks the 4096-cycle initialisation and compares
  saturating updates against an integer array.
* `hdbp_pkg_tb` checks the counter update function exhaustively.
* `hdbp_sizes_tb` runs four predictors side by side, with 1K, 2K, 4K and 8K
  entries (`N` = 10…13), on a synthetic stream of 400 static branches. It
  checks every prediction against a shadow counter table. For each size it
  prints mispredictions and aliasing next to a plain gshare model of the
  same size. Aliasing here means a lookup that finds its counter last
  trained by a different static branch. On this random, weakly correlated
  stream, HDBP aliases slightly less than gshare at every size. That says
  little about real programs.

The RTL is SystemVerilog-2017 and synthesizable. The PHT is written as a
memory with one read and one write port.
