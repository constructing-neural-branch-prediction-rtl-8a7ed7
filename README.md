# Neural branch predictors with separated and adaptive weights, and a memristor perceptron model

A perceptron branch predictor keeps one small signed weight for each past branch in the
global history. It predicts "taken" when the bias plus the sum of the history-weighted
weights is non-negative. The classic form multiplies each weight by +1 or -1. That
makes one weight describe two correlations at once: "that branch was taken, so this one
is taken" and "that branch was not taken, so this one is not taken". Many real branches
have only one of the two. For example, if `x >= 1000` was taken, `x >= 500` is certainly
taken too, but a not-taken `x >= 1000` says nothing about it.

This repository holds SystemVerilog for three designs built on that observation:

| Design | What it is | Files |
|---|---|---|
| **SWP**, separated-weights predictor | Each recent history position has two weights, WT (used when that past branch was taken) and WNT (used when it was not). The older history keeps single perceptron weights. | `swp_predictor` and below |
| **AFPBP**, adaptive four-state perceptron | Each weight is 10 bits: a 2-bit state plus 8 bits. Depending on the state, it acts as a WT/WNT pair of 4-bit weights, or as one 8-bit weight of a perceptron, taken-only or not-taken-only kind. | `afpbp_predictor` and below |
| **Memristor perceptron** | Behavioural model of an analog 1-bit-history perceptron. A weight is stored as the states of two complementary memristors, and the prediction is made by summing currents. | `memristor_predictor` and below |

`neural_bp_top` puts the three side by side. They share no logic. Each has its own port
group, so the same branch stream can drive both digital predictors and they can be compared.

## 1. Separated-weights predictor (`swp_predictor`)

### Prediction

For a branch at address `pc`:

```
sum = W0[pc]
for i = 1 .. GHL:
    row = pc XOR path[i]                       (low 8 bits; path[i] = address of the i-th previous branch)
    if i <= H0:  sum += ghr[i] ? WT_i[row] : WNT_i[row]
    else:        sum += ghr[i] ? W_i[row]  : -W_i[row]
predict taken  <=>  sum >= 0
```

- Defaults: `GHL = 64` history bits, of which the `H0 = 20` most recent use separated
  tables. There are 7-bit weights and 256 rows per table.
- The separated part never negates a weight. A 2:1 multiplexer per position picks WT or
  WNT, and everything after it is a plain addition.
- Separating only the recent positions keeps most of the accuracy gain (recent branches
  correlate most) without doubling the storage.

Structure:

```
 pc ─┬─ bp_index_hash (x GHL) ── row_i ──┬─ swp_sep_column  i = 0..H0-1   ── WT/WNT by ghr[i] ─┐
     │        ▲ path[i]                  └─ perceptron_column i = H0..GHL-1 ── ±W by ghr[i] ─────┤
     │   bp_history (ghr, path)                                                                  ├─ bp_adder_tree ─ sum ─ sum>=0 ─ pred_taken
     └─ perceptron_column (bias W0, hist=1) ─────────────────────────────────────────────────────┘
                                         dyn_threshold ── theta ── training decision
```

### Training

- **When it trains:** on a misprediction, or when `|sum| <= theta`. The predictor then
  updates every weight it used for this branch.
- **Separated weight:** +1 for a taken outcome and -1 for a not-taken outcome. Only the
  selected WT or WNT moves; its partner is untouched.
- **Single weight:** +1 when the history bit and the outcome agree, -1 when they differ.
- **Bias:** +1 for taken, -1 for not taken.
- **Saturation:** all weights saturate at their two's complement limits.

`dyn_threshold` adapts `theta`. A 7-bit counter counts up on mispredictions and down on
low-confidence training. When it saturates at either end, `theta` moves by one in that
direction and the counter is cleared. The starting value is `floor(1.93*GHL) + 14`.

### Interface and timing

The predictors are built for trace-driven use, with one conditional branch per clock.

- Present `br_valid`, `br_pc` and the resolved outcome `br_taken` together.
- `pred_taken` and `pred_sum` are combinational from the current table state in the
  same cycle.
- At the rising edge the tables train (if `trained` is high) and the outcome and address
  are shifted into the histories.

This matches a front end whose history is updated at fetch with the correct outcome.

In a real pipeline, prediction and update would be separate events, and you would have to
checkpoint the history. That is not built here.

## 2. Adaptive four-state weights (`afpbp_weight_logic`, `afpbp_predictor`)

This is the hardest part of the design. Profiling shows that most weight pairs end up
with opposite signs anyway, which is plain perceptron behaviour. AFPBP therefore stores
one 10-bit weight per position, that is 2m+2 bits with m = 4. It lets the weight decide
at run time which of four forms it takes:

| State | Meaning | Payload | Contribution (h = history) | Training step |
|---|---|---|---|---|
| 0 | separated | WT (bits 7:4) and WNT (bits 3:0), each in [-8, 7] | WT if h taken, WNT if not | selected half ±1 by outcome |
| 1 | perceptron | W in [-128, 127] | +W if h taken, -W if not | +1 if h equals the outcome, else -1 |
| 2 | taken-only | W | +W if h taken, 0 if not | ±1 by outcome, only when h taken |
| 3 | not-taken-only | W | +W if h not taken, 0 if taken | ±1 by outcome, only when h not taken |

**Leaving state 0.** This happens only when a training step would push the selected
4-bit half past 7 or below -8. The other half, compared with the threshold `THW`
(default 3), decides the new state:

- **Other half is strong with the same sign** (`> THW` when overflowing upward,
  `< -THW-1` downward): there is no clear single correlation. The weight stays in state 0
  and saturates.
- **Other half is strong with the opposite sign:** go to state 1, perceptron. `W` becomes
  the value that crossed the limit. If WNT crossed, `W` is negated, because state 1
  contributes `-W` for not-taken history.
- **Other half is weak** (within `[-THW-1, THW]`): go to state 2 if WT crossed, or state 3
  if WNT crossed. `W` becomes the crossing value.

**Returning to state 0.** This happens as soon as a training step leaves `W` inside
[-8, 7]. The halves are rebuilt as follows:

- State 1 gives `WT = W` and `WNT = -W`. `-W` is clamped to 7 when `W = -8`.
- State 2 gives `WT = W` and `WNT = 0`.
- State 3 gives `WNT = W` and `WT = 0`.

There are no direct moves between states 1, 2 and 3.

Because a weight that has just left state 0 sits at ±8 or ±9, one step in the other
direction brings it back. There is no hysteresis beyond that, and the source describes
none.

`afpbp_predictor` uses the same organisation as the SWP predictor: PC XOR path
indexing, an 8-bit bias, the same training rule and the same adaptive threshold. It has
`HIST = 40` positions of `afpbp_column`. `sel_state` exposes the state code of every
weight read this cycle.

Storage at the defaults:
- AFPBP: 40 × 256 × 10 + 256 × 8 = 104,448 bits.
- SWP: 20 × 2 × 256 × 7 + 44 × 256 × 7 + 256 × 7 = 152,320 bits.

## 3. Memristor perceptron circuit (behavioural models)

These files model an analog circuit with `real` values. They simulate, but they are not
synthesizable logic. The first comment of each file says so.

- **`memristor`** is one device. Its current follows the fitted law
  `I = w^4 · 9 · sinh(2V) + 0.01 · (exp(4V) − 1)`, in µA. Its state is `w` in
  [0.05, 0.95]. Each programming pulse moves `w` by a fixed step. Turning on (0.075) is
  slower than turning off (0.1), as the device is asymmetric. The continuous state
  equation of the device is replaced by these steps. The step sizes are this model's
  choice.
- **`memristor_pbp_cell`** is one weight, made of a primary and a complementary device:
  - **Prediction:** for a taken history bit, the primary current goes to the Taken line
    and the complementary current to the Not-taken line. For a not-taken bit they swap.
  - **Update:** `history XOR outcome` picks the programming polarity. On agreement the
    primary device is turned on and the complement off. On disagreement it is the
    reverse.
- **`memristor_readout`** models the lines and the amplifier. Each line ends in 200 kΩ to
  ground, and its voltage solves `V/R = Σ I(w_k, VDD − V)` by bisection. An ideal
  differential comparator predicts taken when V(Taken) ≥ V(Not-taken). `v_diff` is the
  confidence.
- **`memristor_predictor`** sequences the phases. While `clk` is high the circuit
  predicts, and a latch holds the result when `clk` falls. While `clk` is low it updates.
  It trains on every branch, with no threshold.

`N_HIST = 1` is the circuit that was designed. Larger values put more cells on the same
lines.

The testbench reproduces the two published experiments:
- **History flips:** prediction starts neutral, grows more confident, mispredicts once
  the history flips, then recovers after about five cycles.
- **Outcome flips:** prediction stays taken for one wrong cycle, then becomes not-taken.

## 4. What follows the source and what is this design's choice

**Taken from the published description:**
- the SWP prediction and training algorithm;
- partial separation with 64/20 positions;
- PC XOR path indexing;
- the use of a dynamic threshold;
- the AFPBP states, their contributions, ranges, switch conditions and write-back values;
- m = 4;
- the memristor current law and its constants;
- the pair steering and update polarity;
- the 200 kΩ line resistors.

**Chosen here:**
- Table depth: 256 rows and 8-bit index. No table size is given.
- Weight width 7 for SWP, the largest width evaluated.
- `HIST = 40` for AFPBP, the longest history evaluated.
- `THW = 3`.
- Bias training.
- The `|sum| <= theta` test.
- The threshold-fitting rule and its starting value. The source only names an adaptive
  threshold.
- Saturating arithmetic.
- Zero reset of all tables and histories.
- The AFPBP payload layout and the values written on state changes where the source is
  silent.
- No training of the ignored polarity in AFPBP states 2 and 3.
- The current unit (µA), VDD = 1 V and the discrete programming steps of the memristor.
- The phase clocking of the memristor model and the ideal comparator.

**Resolving contradictions:**
- The separated update writes the WNT table for a not-taken history bit. One line of the
  algorithm listing writes WT there, which contradicts its own description.
- The not-taken-only state is the one where WNT is strong.

**Not built:**
- The processor core and caches of the evaluation framework.
- The earlier SRAM/DAC analog perceptron that the memristor pair replaces.
- A plain perceptron baseline. SWP with `H0 = 0` behaves as one.

## 5. Files

Each file starts with a comment on what the module does, its interface and its timing.

`rtl/`:

- `bp_pkg.sv`: shared saturating step and AFPBP state type.
- `memristor_pkg.sv`: device law and circuit constants.
- **SWP:** `swp_predictor`, `swp_sep_column`, `perceptron_column`, `bp_history`,
  `bp_index_hash`, `bp_adder_tree` and `dyn_threshold`.
- **AFPBP:** `afpbp_predictor`, `afpbp_column` and `afpbp_weight_logic`.
- **Memristor:** `memristor_predictor`, `memristor_pbp_cell`, `memristor_readout` and
  `memristor`.
- `neural_bp_top`: the three designs side by side.

`tb/`: one self-checking testbench `tb_<module>.sv` per module. Also
`tb_bp_ref_pkg.sv`, which holds the independent reference models: the SWP and AFPBP
predictors, the AFPBP weight rule, the threshold rule and a synthetic branch stream. The
branch stream is a random `x` with `x>=1000` and `x>=500` branches, a noise branch and a
loop branch.

## 6. Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. For example,
for the whole design at its default sizes:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    rtl/bp_pkg.sv rtl/memristor_pkg.sv tb/tb_bp_ref_pkg.sv tb/tb_neural_bp_top.sv \
    --top-module tb_neural_bp_top
./obj_dir/Vtb_neural_bp_top
```

`tb_neural_bp_top` runs 12,000 branches through both digital predictors, with every
parameter at its default. Every cycle it compares predictions, sums and thresholds with
the reference models. It then checks that each mechanism occurred, and prints a count for
each:
- training on a misprediction and on low confidence;
- threshold moves;
- both WT and WNT selection;
- AFPBP weights in all four states;
- memristor misprediction and recovery.

It takes a few seconds. The digital predictors also carry two assertions: training
follows only a presented branch, and every misprediction trains.

Two more testbenches run the configuration sweeps on the same synthetic stream. Every
instance is checked against its own reference model, and the misprediction counts are
printed.

- `tb_workload_swp_sweep` runs SWP with 4-, 5-, 6- and 7-bit weights. It also runs 0,
  20, 40 and 64 separated positions out of 64.
- `tb_workload_hist_sweep` runs AFPBP against fully separated SWP at history lengths 10,
  20, 30 and 40.

The block testbenches use smaller parameters: for example 24 history bits and 64 rows
for the predictor-level tests.

What the block testbenches check:
- The AFPBP weight logic is checked exhaustively: every state, payload, history bit and
  outcome.
- The predictor testbenches also check that the branch correlated with an earlier taken
  branch is predicted correctly at least 95% of the time late in the run. The loop branch
  must reach at least 90%.

## 7. Limits

- **Workloads:** the evaluation workloads, championship branch traces, are not available.
  The synthetic stream exercises the mechanisms but says nothing about absolute accuracy.
- **Memristor model:** it is qualitative. Its line voltages have the right shape but not
  the published millivolt values, because the current unit and the state dynamics are
  assumptions. With fixed programming steps, training from neutral to strong takes about
  as many cycles as retraining the other way. The published circuit showed the first to
  be clearly faster, because of the device's asymmetric switching; reproducing that needs
  the device's state equation.
- **Memristor state levels:** each device has about ten usable levels between its limits
  (0.9 / 0.075 on, 0.9 / 0.1 off). That is in line with the small number of levels a
  memristor cell can reliably hold. Multi-device weights with more levels are not
  modelled.
- **Synthesis:** the digital predictors reset their tables with a loop. That suits
  register-based tables; an SRAM-based implementation would clear them sequentially
  instead.
- **Lint warnings:** the upper address bits above the 8 index bits do not take part in
  the hash, and lint reports them as unused.
