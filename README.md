# Naive Bayes dynamic branch predictor (NBBP)

This is a conditional-branch predictor that treats "will this branch be taken?"
as a two-class classification problem. The classifier is a naive Bayes model
whose features are the outcomes of the last *l* conditional branches. A
perceptron predictor learns a weighted sum of the same history. Here each
history bit has its own small table of conditional probabilities instead, and
the two classes (taken, not taken) are scored independently and then compared.
The arithmetic is cut down until a prediction takes two clock cycles: log
probabilities become single bits, and adding them becomes counting ones. That
fits a six-stage LatticeMico32-style pipeline (A F D X M W) if the predictor
moves from stage D to stage F.

Default configuration: 30-bit global history, 8 branch-address bits (256 table
entries), 4-bit saturating counters. That is a 122,880-bit conditional
probability table and a 2,048-bit prior table.

## The model in a few lines

For a branch at address `pc` with history `x_1 .. x_l`:

    score(c) = MSB(p(y=c)) + sum_i MSB(p(x_i = hist_i, y = c))      c in {0, 1}
    predict taken  <=>  score(1) > score(0)

Every `p(...)` is an up/down saturating counter in the table entry that the
address selects. It estimates a probability. Naive Bayes multiplies the
likelihoods. Taking logarithms turns the product into a sum, and each
logarithm is then approximated by the counter's most significant bit. So a
class score is simply the number of "confident" counters that support it.
The denominator of Bayes' rule is the same for both classes and is dropped.

Each counter is stored together with its complement. The pairs are
`p(y=0)`/`p(y=1)`, and `p(x_i=0,y=c)`/`p(x_i=1,y=c)` for each `i` and `c`.
Probabilities that sum to one are represented by counter values that sum to
all ones (`0111`+`1000`, `1001`+`0110`, ...). The reset values and the
training rule keep this invariant.

## Organisation (`rtl/nbbp.sv`)

```
 pred_pc[9:2] ──► prior_table (256 x 2 counters) ──┐
              └─► cpt (256 x 30 x 4 counters) ─────┤
 gbh (30-bit shift register) ─── features ─────────┼─► nbc_classifier ─► taken, scores
                                                   │     (2 cycles)
 upd_pc, outcome, history snapshot ─► nbbp_trainer ┘─► write back the same entry
```

* **Entry selection.** The low word-address bits `pc[ADDR_BITS+1:2]` select
  one entry of each table. They are not hashed further, so branches 1 KiB
  apart share an entry.
* **Global branch history (`gbh`).** A shift register. When a conditional
  branch *resolves*, its outcome enters at the newest end (`x_l`, the top bit)
  and the oldest bit drops out. Bit `k` is feature `x_(k+1)`. The register
  clears to zero at reset.
* **Tables (`prior_table`, `cpt`).** Register arrays with two read ports: one
  for prediction and one for the training read-modify-write. There is one
  write port. A read of an entry that is being written in the same cycle
  returns the old contents. At reset every pair is set to the two values
  nearest the middle (`0111`/`1000`). As a result, both classes start with
  equal likelihoods and the prior leans slightly towards taken.

## Scoring in two cycles (`nbc_classifier`, `nbc_posterior_sum`)

This is the part that sets the latency. For each class, the classifier picks
31 bits:

* the MSB of `p(y=c)`;
* for each of the 30 history positions, the MSB of whichever of
  `p(x_i=0,y=c)` and `p(x_i=1,y=c)` the history bit selects.

One `nbc_posterior_sum` per class counts the ones among those 31 bits. The
counting tree has fixed widths:

| step | cycle | what | result width |
|---|---|---|---|
| LUTs | 1 | bits cut into groups of 7, 7, 7, 7 and 3; each group looked up in a popcount table (`nbc_popcount_lut`) | 3, 3, 3, 3, 2 |
| first adders | 1 | groups 1+2 and 3+4 | 4, 4 |
| pipeline registers | edge | the two pair sums and the 3-bit group's count | |
| second adder | 2 | pair sum + pair sum | 5 |
| final adder | 2 | + 3-bit group count | 6 |
| compare | 2 | taken if score(1) > score(0) | 1 |

The 3-bit group holds the last two history MSBs and the prior MSB. Other
values of `HIST_LEN` or `LUT_W` follow the same scheme: groups are paired in
order, and an unpaired last group bypasses the first adders. Any history
length of 1 or more works.

A request presented at a rising edge therefore gives its result during the
*next* cycle (`pred_valid_o` is high then). A branch predicted while it is
fetched has its prediction by the end of decode.

## Training (`nbbp_trainer`)

Every executed conditional branch trains the predictor, whether or not its
prediction was correct. Let `t` be its outcome and `h` the history that its
prediction used:

* `p(y=t)` is incremented and `p(y=!t)` decremented;
* for every `i`, `p(x_i=h_i, y=t)` is incremented and `p(x_i=!h_i, y=t)` is
  decremented;
* the `y=!t` half of the entry is left alone;
* all counters saturate at 0 and at all ones.

The trainer is combinational. The tables write the new entry at the clock
edge that also shifts `t` into the history.

The pipeline should carry the history snapshot (`pred_hist_o`) along with the
branch and return it at resolution. Training then sees the same features the
prediction saw, even when older branches resolved in between.

## Placement in the pipeline (`rtl/nbbp_frontend.sv`, the top)

`nbbp_frontend` is the fetch-side unit. It contains `branch_decoder` and
`nbbp`:

* **Stage F, cycle 1.** The fetched word and its address arrive on
  `f_valid_i`, `f_pc_i` and `f_instr_i`. The decoder recognises the
  LatticeMico32 PC-relative branches:
  * conditional branches: `be bg bge bgeu bgu bne`, opcodes 0x11 to 0x15 and
    0x17, with destination `pc + 4*sext(imm16)`;
  * unconditional branches: `bi` (0x38) and `calli` (0x3E), with destination
    `pc + 4*sext(imm26)`.

  A conditional branch starts an NBBP prediction in the same cycle.
* **Stage D, cycle 2.** The unit drives these outputs:
  * `d_redirect_o` is high for an unconditional branch, and for a
    conditional branch that NBBP predicts taken;
  * `d_target_o` is the destination address;
  * `d_hist_o` is the snapshot that must travel to stage X;
  * `d_score0_o` and `d_score1_o` are the two class scores.
* **Stage X.** The resolved conditional branch comes back on `x_valid_i`,
  `x_pc_i`, `x_taken_i` and `x_hist_i`.

Register-indirect jumps (`b`, `call`) are reported as non-branches. An
assertion checks that an NBBP result appears in exactly the stage-D cycle of
each conditional branch.

The processor core is not part of this RTL: fetch, stalls, flushes and the
misprediction recovery all belong to it. Neither are the bus and memories of
the evaluation system. The unit's pipeline interface is brought out as plain
ports instead.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `HIST_LEN` | 30 | history length *l* (bits) |
| `ADDR_BITS` | 8 | address bits used to select an entry (2^n entries) |
| `CNT_BITS` | 4 | bimodal counter width |
| `LUT_W` | 7 | bits counted by one look-up table |

The defaults are the sizes chosen in the design-space study, which swept
history length from 3 to 50 bits, address bits from 1 to 10 and counter
width from 2 to 10. Longer histories and more address bits helped. Wider
counters hurt, because they converge more slowly. The ends of each sweep
build and are checked in `tb/tb_nbbp_configs.sv`.

## Design choices not fixed by the algorithm

These are this implementation's decisions; change them knowingly.

* Entry index is the raw low word-address bits (no hash function).
* Counter reset values are `0111`/`1000` (pairs complementary, classes
  equal).
* A tie between the scores predicts not taken.
* The history is updated at resolution, not speculatively at prediction.
  Training uses the carried snapshot.
* A prediction and an update in the same cycle: the prediction sees the old
  state.
* Unconditional PC-relative branches are always predicted taken and do not
  train the NBBP.
* The tables are flip-flop arrays with combinational reads. An SRAM version
  (much smaller and lower power) would need a synchronous read and the first
  pipeline stage rearranged. That is not done here.

## How well it predicts, and a caveat

The MSB approximation makes every history position cast a vote for each
class. With a structured history, as in a loop nest, branches are learnt
quickly. In the end-to-end test an alternating branch and a never-taken
branch are mispredicted about 1% of the time once trained. When much of the
history is random, the 30 CPT votes are noisy and the single prior vote
cannot outweigh them. Even an always-taken branch is then mispredicted
often: a fifth to a quarter of the time in `tb_nbbp`, whose branches
resolve after random delays.
Branches that share an entry interfere, as in any untagged table.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.
`tb/nbbp_ref_pkg.sv` holds an integer reference model of the whole predictor
(scores, prediction, training, history). The core, top and configuration
testbenches compare against it cycle by cycle.

* `tb_nbbp_frontend`: the whole unit at default sizes. It runs a looping
  program with loop, alternating, correlated, never-taken, random, aliased
  and unconditional branches, plain instructions and fetch bubbles, for
  6,000 cycles. It checks every stage-D output and counts the mechanisms:
  taken and not-taken predictions, score ties, redirects, counter saturation
  at both ends, a prediction and an update of one entry in the same cycle,
  history shifts and mispredictions.
* `tb_nbbp`: the core with random request gaps and resolution delays, and a
  check of the one-cycle result latency.
* `tb_nbbp_configs`: seven parameter sets, the default plus the sweep end
  points.
* Unit tests cover the following:
  * the popcount LUT, exhaustively;
  * the adder tree, including latency;
  * the history register;
  * both tables, including reset contents and read-during-write;
  * the trainer, with forced saturation;
  * the classifier, with forced ties;
  * the decoder, for all 64 opcodes.

Run one with Verilator 5 from the project root. Modules are found by file
name in `rtl/` and `tb/`; the two packages are listed first:

```
verilator --binary --timing -y rtl -y tb rtl/nbbp_pkg.sv tb/nbbp_ref_pkg.sv \
          tb/tb_nbbp_frontend.sv --top-module tb_nbbp_frontend
./obj_dir/Vtb_nbbp_frontend
```

Every testbench finishes in well under a second of wall time.
