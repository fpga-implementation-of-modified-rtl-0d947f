# Adaptive Viterbi decoder (K = 9, rate 1/2)

A full Viterbi decoder for a constraint-length-9 code updates all 256 trellis
states for every received symbol. This decoder updates only a short list of the
most likely states. The list holds at most N_max = 16 states by default.

Every stage, each state on the list is extended by both possible input bits.
Two rules then decide which of the successors stay on the list:

1. **Threshold rule.** A successor is dropped if its path metric exceeds the
   smallest metric of the previous stage by more than a threshold T. T is set
   by the user; 20 is the nominal value and up to 30 is supported.
2. **Survivor bound.** At most N_max successors are kept: the ones with the
   smallest metrics.

This is the adaptive Viterbi algorithm, also known as the T-algorithm with a
survivor bound. Each stage costs 2 × (list length) add-compare-select (ACS)
operations. A full decoder costs 512. The decoder takes one received symbol per
clock and delivers one decoded bit per clock after a fixed delay.

The implementation is written in SystemVerilog. It is synthesizable and
parameterized in K, N_max, the input resolution, the largest threshold and the
decision depth.

## One trellis stage

Everything below happens in a single clock cycle, in `avd_acs` and the blocks
it instantiates. Each stage works on the survivor list from the previous
cycle.

**Survivor list** (`avd_pm_array`) has NMAX slots. Each slot holds:
- a valid bit;
- a state, which is the last K-1 input bits with the newest bit in the MSB;
- a path metric;
- a *slack*.

The list is kept sorted: slot 0 always holds the best path. After a start, the
list is the single state 0 with metric 0.

**Path metric adder** (`avd_pm_adder`). Slot i with input bit u becomes
candidate c = 2i + u. The candidate's next state is `{u, state[K-2:1]}`. Its
expected code pair is the parity of each generator ANDed with `{u, state}`.
That code pair selects one of the four metrics from the branch metric unit, and
one adder per candidate forms `pm + bm`. There are 2 × NMAX = 32 candidates,
which together make up the *added-path bus*.

**Branch metric unit** (`avd_bmu`). Each code bit arrives as a Q-bit level,
Q = 3 by default: 0 means a confident 0 and 7 a confident 1. For an expected
bit e, the bit metric is `level XOR {Q{e}}`, which is the level itself or
7 minus the level. The unit sums the two bit metrics for each of the four code
pairs. With Q = 1 this is the Hamming distance.

**Threshold selection** (`avd_threshold_sel`) uses a reformulated test. This is
the core idea of the datapath. Stored metrics are always *relative to the
previous stage minimum*: the minimum is subtracted when they are written. The
threshold rule `pm + bm <= PMmin + T` therefore becomes `pm + bm <= T`, which is
the same as `bm <= T - pm`.

The right-hand side, the slack, is computed once, when the metric is stored.
The threshold test is then a single 6-bit comparison of the branch metric with
the slack. It runs at the same time as the addition rather than after it, so no
subtraction is needed per candidate.

The rescaling also bounds the metric width. A stored metric never exceeds T, and
a candidate never exceeds T + 14. With T_MAX = 30, 6 bits suffice.

**State merge** (`avd_state_merge`). Two survivors whose states differ only in
the LSB reach the same next state with the same input bit. Only the smaller
metric may survive; this is the compare-select of an ordinary Viterbi decoder.
Survivors can sit in any slot, so every candidate is compared with every other
one. On equal metrics, the predecessor whose state LSB is 0 wins.

Merge and threshold run in parallel. Their order does not matter, because a
merge winner never has a larger metric than the candidate it beats.

**Min path calculation** (`avd_min_path`) is a comparison tree over the
candidates that pass the threshold. Its result is the new stage minimum, used
for rescaling.

**Survivor state contender** (`avd_survivor_contender`) applies the survivor
bound. It ranks each eligible candidate by counting the eligible candidates with
a smaller key `{metric, state}`. Merge leaves one candidate per state, so the
keys are unique. A candidate with rank < nmax_i is kept, and its rank is the
slot it moves to. Ranking therefore selects the survivors, compacts them and
sorts them in one step.

**Path metric control** (`avd_pm_array`) stores the chosen candidates. It
subtracts the stage minimum from each metric and writes the new slack,
`T - pm`.

If no candidate meets the threshold, the list would be empty. This cannot
happen with 3-bit inputs when T ≥ 7, because the better branch out of the best
state costs at most 7. With a smaller T it can happen; the control then restarts
the decoder from state 0 and pulses `lost_o`.

## Decisions and latency

The survivor memory (`avd_survivor_mem`) keeps one row of TB_LEN = 45 decision
bits per slot; 45 is 5K. When a stage is loaded, row k takes the row of its
parent slot, shifted by one, with the new bit appended. This scheme is called
register exchange. It suits this decoder because the contender reorders the
slots every stage, and register exchange follows the reordering with one
multiplexer per row.

The decoded bit is the oldest bit of row 0, the best path.

The control path (`avd_control`) counts the loaded stages after a start. It
raises `dec_valid_o` once TB_LEN stages have been loaded. The bit decoded for
symbol n therefore appears one clock after symbol n + 44 has been taken. After
that, `dec_valid_o` marks one bit for every symbol taken.

## Interface

`adaptive_viterbi_decoder` has the following ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (gives the start list) |
| `start_i` | in | 1 | begin a new stream. The list goes back to state 0 and the survivor memory is cleared. A symbol presented in the same cycle is dropped. |
| `in_valid_i` | in | 1 | `rx_i` holds a symbol. One symbol per clock; there is no back-pressure. |
| `rx_i[b]` | in | 2 × Q | level of code bit b; b = 0 belongs to generator G0 |
| `thresh_i` | in | 5 | T, clipped to T_MAX. Set it before a stream: slacks are computed when metrics are stored. |
| `nmax_i` | in | 5 | survivor bound, 1..NMAX |
| `dec_valid_o`, `dec_bit_o` | out | 1 | decoded bit |
| `surv_count_o` | out | 5 | number of survivors kept at the last stage |
| `lost_o` | out | 1 | pulses when no path met the threshold and the decoder restarted |

| parameter | default | |
|---|---|---|
| `K` | 9 | constraint length; must be at least 3 |
| `NMAX` | 16 | survivor slots |
| `Q` | 3 | bits per received code bit (8 levels) |
| `T_MAX` | 30 | largest threshold; sets the metric width |
| `TB_LEN` | 45 | decision depth |
| `G0`, `G1` | 561, 753 (octal) | generator polynomials. Bit K-1 taps the current input; bit j < K-1 taps state bit j. |

The constants live in `avd_pkg`, together with the width functions and the
encoder function `conv_code`. The code is correct for any generator pair. The
561/753 pair is a common K = 9 choice, not something the architecture
requires.

## Measured behaviour

`tb_avd_threshold_sweep` sends 2,000 random bits through a soft channel and
decodes them with two builds side by side:
- the default build, N_max = 16;
- a build with NMAX = 128 = 2^(K-2), the largest bound worth considering for
  this code.

The channel adds noise to the ideal levels 0 and 7: half the sum of four
uniform integers in [-n, n], clipped to 0..7. The testbench also runs a full
256-state Viterbi decoder, with the same metric and decision depth. The table
shows bit errors and the average number of ACS operations per stage (a full
decoder does 512):

| T | n | full VA errors | N_max 16: errors | ACS ops | N_max 128: errors | ACS ops |
|---|---|---|---|---|---|---|
| 20 | 3 | 0 | 0 | 11.8 | 0 | 11.9 |
| 20 | 4 | 0 | 0 | 18.4 | 0 | 24.3 |
| 20 | 5 | 46 | 231 | 27.0 | 99 | 78.1 |
| 25 | 3 | 0 | 0 | 22.9 | 0 | 28.2 |
| 25 | 4 | 0 | 0 | 28.0 | 0 | 68.6 |
| 25 | 5 | 123 | 792 | 31.8 | 159 | 181.1 |
| 30 | 3 | 0 | 0 | 31.0 | 0 | 64.7 |
| 30 | 4 | 0 | 531 | 31.8 | 0 | 148.8 |
| 30 | 5 | 24 | 235 | 31.9 | 22 | 211.5 |

With 16 slots, the number of ACS operations falls by 94 % to 98 %. The
reduction can never be less than 93.75 %.

The price shows once noise is high enough that the correct path gets pruned.
A K = 9 decoder with only 16 survivors can then follow wrong paths for hundreds
of stages before the correct state re-enters the list, so errors come in long
bursts.

With 128 slots and T = 30, the decoder matches the full decoder's error count
within the statistical spread, while still doing 58 % to 87 % fewer ACS
operations.

In practice:
- T sets how many paths are kept when the channel is quiet.
- N_max caps the cost when it is noisy.
- N_max = 16 suits channels where a full decoder is nearly error-free.

Synthesis with yosys gives about 10,900 word-level cells and 1,071 flip-flops at
the defaults. Most of the logic is the all-pairs comparisons in the merge
(32 × 32) and the contender ranking (32 × 32 key comparisons). Both grow with
the square of NMAX.

The stage is one long combinational path: adder, merge, ranking, then the
compaction multiplexers. Pipelining it would need the rescale and slack
computation to move with it. This version does not pipeline it.

## Assertions

The top level carries concurrent assertions, which Verilator checks when run
with `--assert`. They check that:
- the valid survivor slots always form a prefix, with slot 0 occupied;
- the survivor count stays within NMAX;
- `init` and `load` never coincide;
- `dec_valid_o` only follows a loaded stage.

## Where this design makes its own choices

- **Order of merge and contender.** Merge comes before the contender, so the
  N_max kept entries are always distinct states. A block diagram that puts the
  contender first can end up keeping fewer than N_max states after merging.
- **Tie-breaking.** Ties are broken deterministically, not at random: in a
  merge the predecessor with LSB 0 wins, and in the contender the smaller
  `{metric, state}` wins.
- **Minimum.** The stage minimum is taken over candidates that pass the
  threshold, so it is the minimum of the survivors. Only the reformulated
  threshold test is built; the conventional form compares `pm + bm` with
  `PMmin + T` after the add.
- **Branch metrics.** The four possible branch metrics are computed once per
  symbol and selected per branch. A separate metric circuit per ACS wing would
  give the same values.
- **Survivor memory and depth.** Register exchange and the depth of 45 are
  this design's choices.
- **Generators, state bit order, soft-level encoding and restart.** The
  generator pair, the bit order of the state, the soft-level encoding, and the
  restart on an empty list are all this design's choices. The state convention
  reproduces the standard K = 3 example of the algorithm exactly.
- **Not included.** There is no output puncturing and no split of the trellis
  into segments: their details are not defined.

## Files

| file | contents |
|---|---|
| `rtl/avd_pkg.sv` | defaults, width functions, encoder function |
| `rtl/adaptive_viterbi_decoder.sv` | top level |
| `rtl/avd_bmu.sv` | branch metric unit |
| `rtl/avd_acs.sv` | one trellis stage: the five blocks below |
| `rtl/avd_pm_adder.sv`, `rtl/avd_threshold_sel.sv`, `rtl/avd_state_merge.sv`, `rtl/avd_min_path.sv`, `rtl/avd_survivor_contender.sv` | ACS parts |
| `rtl/avd_pm_array.sv` | survivor list registers, rescale, slack |
| `rtl/avd_survivor_mem.sv` | register-exchange decision memory |
| `rtl/avd_control.sv` | start / fill / run / restart control |

## Testbenches

Each testbench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line.

- `tb_adaptive_viterbi_decoder` runs the full-size decoder end to end. It
  compares every output, every cycle, against a per-state reference model that
  uses absolute metrics, no slots and no rescaling. The run includes input
  gaps, a restart, a small N_max and T = 0. The testbench also checks that
  threshold drops, merges, contender overflow, rescaling, stalls, restarts and
  empty-list recovery each happened.
- `tb_avd_threshold_sweep` produces the measurements above. It takes about
  1.5 minutes because of the 128-slot build.
- `tb_avd_fig4_example` decodes the K = 3 example through the whole decoder:
  generators 7/5, hard decisions, T = 1, N_max = 3, received
  `01 10 11 01 00`. It expects survivor counts 2, 3, 2, 3, 3 and the decoded
  bits `1 0 0 0 0`.
- `tb_avd_acs` runs the same example stage by stage. It checks the surviving
  states, their metrics, the stage minima (1, 1, 1, 2, 2) and the trace-back.
- `tb_avd_bmu`, `tb_avd_pm_adder`, `tb_avd_threshold_sel`,
  `tb_avd_state_merge`, `tb_avd_min_path`, `tb_avd_survivor_contender`,
  `tb_avd_pm_array`, `tb_avd_survivor_mem` and `tb_avd_control` each test one
  block against values the testbench works out itself.

To simulate with Verilator 5:

```
verilator --binary --assert -Irtl -y rtl rtl/avd_pkg.sv tb/tb_adaptive_viterbi_decoder.sv \
          --top-module tb_adaptive_viterbi_decoder -o sim
./obj_dir/sim
```

Replace the testbench name to run any other testbench. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/avd_pkg.sv rtl/<module>.sv`.
