# Perceptron branch predictor

A dynamic predictor for the direction of conditional branches in which the
usual table of two-bit saturating counters is replaced by a table of
perceptrons. Each perceptron is a vector of small signed integer weights, one
per bit of global branch history plus one bias weight. To predict a branch, its
address picks a perceptron, the dot product of that perceptron's weights with
the recent branch outcomes is formed, and the branch is predicted taken when
the result is not negative. When the branch resolves, the perceptron is trained
with the ordinary perceptron learning rule.

The attraction over counter tables is history length. A counter table indexed
by history grows exponentially with the number of history bits, so such
predictors stop at about 17 bits. A perceptron grows linearly: one more history
bit costs one more weight. This design uses 62 bits of history at its default
size. The price is that a perceptron can only learn outcomes that are a
linearly separable function of the history; in practice most branches are.

## The computation

History bit *i* is taken as a bipolar input *x<sub>i</sub>* = +1 (taken) or
−1 (not taken), and the bias input *x<sub>0</sub>* is always +1. With weights
*w<sub>0</sub> … w<sub>h</sub>*:

    y = w0 + sum over i = 1..h of  x_i * w_i          predict taken  <=>  y >= 0

**No multiplier is needed.** Multiplying by ±1 either passes a weight or
negates it, and negation in two's complement is "invert and add one". So

    y = w0 + sum( hist_i ? w_i : ~w_i ) + (number of not-taken history bits)

which is a single multi-operand addition, the same shape as the partial-product
sum of an integer multiplier (`perceptron_output`).

**Training** (`perceptron_trainer`) happens when the prediction was wrong, *or*
when it was right but |y| < θ. The second condition keeps training a perceptron
until it is confidently right, which is what lets it keep adapting. A training
step moves every weight by *t·x<sub>i</sub>*, where *t* = ±1 is the outcome:
a weight goes up by one when its input agreed with the outcome and down by one
when it did not, and the bias weight goes toward the outcome. Weights are 9-bit
signed integers with saturating arithmetic, kept within [−256, 255].

The threshold is a linear function of the history length,
θ = ⌊1.93·h + 14⌋, because each extra weight adds a roughly constant amount to
the typical output. At h = 62, θ = 133.

## Sizing from a hardware budget

The whole predictor is sized from one parameter, `BUDGET_KB`, the kilobytes of
weight storage. The best history length per budget is a measured table:

| budget (KB) | 1 | 2 | 4 | 8 | 16 | 32 | 64 | 128 | 256 | 512 |
|---|---|---|---|---|---|---|---|---|---|---|
| history length *h* | 12 | 22 | 28 | 34 | 36 | 59 | 59 | 62 | 62 | 62 |

From *h* follow θ and the number of perceptrons,
⌊`BUDGET_KB`·8192 / ((*h*+1)·9)⌋. Only weight bits are counted. The default is
128 KB: *h* = 62, θ = 133, 1849 perceptrons of 63 weights, 1 048 383 bits of
table. 1849 is not a power of two, so the address hash is a modulo (below).
All of this is in `perceptron_pkg`; every derived parameter of the top can
also be overridden on its own.

## Pipeline and interface

The predictor has a prediction port and an update port, usable in the same
cycle. The table has two synchronous read ports (one per port) and one write
port.

```
cycle            t                 t+1
predict     pred_req_i,pred_pc_i   pred_valid_o, pred_taken_o, pred_y_o, pred_hist_o
            table read A issued    dot product (combinational) on the returned row

cycle            u                 u+1                       u+2
update      upd_valid_i, upd_pc_i, trainer works on the row   new weights in the array
            upd_taken_i, upd_y_i,  train_o = row written
            upd_hist_i             (write at end of u+1)
            history shifts at end of u
```

Things a user of this block must know:

* **The caller carries the prediction back.** Training must use the output and
  the history that produced the prediction, not whatever is current when the
  branch resolves. `pred_y_o` and `pred_hist_o` are returned with every
  prediction and must be given back on `upd_y_i` and `upd_hist_i`, the way a
  processor keeps per-branch state with an in-flight branch.
* **History is updated at resolution.** The outcome given on the update port
  is shifted into the history register at the end of that cycle. A prediction
  requested in the same cycle still sees the old history. The history is not
  updated speculatively, so there is no recovery logic.
* **Bypass.** If a table read (for a prediction or for a training step) hits
  the row being written in the same cycle, it receives the new row. So
  back-to-back updates of one branch train on the newest weights, and a
  prediction requested the cycle after its perceptron was trained already sees
  the result. `bypass_o` marks such reads.
* **Clearing.** After reset the table clears itself to all-zero weights, one
  row per cycle. `ready_o` stays low for `NUM_PERCEPTRONS` cycles (1849 at the
  default size); requests during that time are ignored.
* **Address hash.** The row is (address / 4) mod `NUM_PERCEPTRONS`
  (`index_hash`). Unrelated branches that hash to the same row share a
  perceptron (aliasing).

`train_o`, `mispredict_o` and `saturated_o` describe the training step in the
cycle after an update and are meant for performance counters.

## Modules

| file | role |
|---|---|
| `rtl/perceptron_pkg.sv` | budget → history length, θ, number of perceptrons, output width |
| `rtl/perceptron_predictor.sv` | top: the whole predictor and its two-stage pipeline |
| `rtl/history_register.sv` | global history shift register |
| `rtl/index_hash.sv` | branch address → perceptron row |
| `rtl/weight_table.sv` | weight storage: 2 read ports, 1 write port, bypass, clearing |
| `rtl/perceptron_output.sv` | dot product and prediction |
| `rtl/perceptron_trainer.sv` | training decision and saturating weight update |

The table is an ordinary array, which synthesis keeps as a memory; a real
implementation would map it to an SRAM macro with the same ports.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
values computed independently in the testbench and prints
`TB_RESULT checks=N failures=M`. The tests for the whole predictor use
`tb/predictor_driver.sv`, a plain-integer model of the predictor plus a small
synthetic branch program:

* a loop back edge, taken five times and then not taken,
* a random branch,
* a branch whose outcome equals that of the random branch just before it,
* an always-taken branch,
* a second random branch, followed by a branch whose outcome is the XOR of the
  two random ones,
* and, in the pipelined phase, branches at random addresses.

The XOR branch is not a linearly separable function of the history. No
perceptron can learn it exactly: a linear decision gets at most three of its
four cases right. The test demands that it stays visibly mispredicted.

The program runs first sequentially: each branch is predicted, then resolved.
In the second half, the loop, correlated and always-taken branches must be
predicted at least 90 % / 90 % / 98 % correctly, and the random branches must
not be. It then runs pipelined, with predictions and updates overlapping at random.
Every prediction and every training decision is compared with the model. The
test also checks the one-cycle prediction latency, the clearing time, and that
each mechanism actually occurs: training, skipped training, misprediction,
bypass on both table ports, overlapped ports and weight saturation.

* `tb_perceptron_predictor` runs a 1 KB budget with 6-bit weights, so that
  weights reach saturation in a short run.
* `tb_perceptron_predictor_full` runs the default 128 KB design with no
  parameter changed, for about 26 000 predictions.
* `tb_budget_sweep` runs ten predictors side by side, one for each budget of
  the sizing table (1 KB to 512 KB; 70 to 7397 perceptrons). Each is
  configured only through `BUDGET_KB`.

At every size, the loop, correlated and always-taken branches end up with no
mispredictions, and the random branches stay near 50 %. The XOR branch is
mispredicted 25–50 % of the time.

Weight width matters. With 5-bit weights at the 1 KB size, the correlated
branch falls to about 72 % correct and the loop branch to about 91 %. The one
informative weight saturates at 15, while the many weights on history bits
that never change swing together by a dozen per training step. The 9-bit
default comes from tuning on real programs, where it balanced this effect
against aliasing.

To run one test with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/perceptron_pkg.sv tb/tb_perceptron_predictor_full.sv \
    --top-module tb_perceptron_predictor_full -o sim
./obj_dir/sim
```

## What is this design's own, and what is not here

The perceptron arithmetic, training rule and condition, threshold formula,
9-bit saturating weights and the budget/history table are the method's. These
are choices made here:

* "below the threshold" is implemented as |y| < θ (strict);
* the address hash;
* the table's port structure, its write-first bypass and its clearing to zero;
* counting only weight bits toward the budget;
* non-speculative history;
* returning the prediction's output and history with the update;
* 128 KB as the default size.

Not built: a hybrid of this predictor with a counter-based predictor, and the
uses suggested as outlook: confidence estimation from |y|, indirect-branch
target prediction and value prediction. The dot product is written as a plain
sum; whether it meets a one-cycle budget at a given clock depends on the adder
tree that synthesis builds, and this has not been evaluated. No real program
traces were run; the accuracy figures above are for the synthetic program only.
