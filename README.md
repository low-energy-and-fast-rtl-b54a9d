# A spiking network that learns which pot to dig in which room

This is synthesizable SystemVerilog for a small spiking neural network with
reward-driven learning. It solves a context-dependent choice task taken from
rat experiments. There are two rooms, context A and context B. Each room has
two pots, item X and item Y, which can stand in position 1 or 2. The food is
under X in room A and under Y in room B, wherever the pots stand. The agent
looks at one pot at a time. It either **digs** or **moves** to the other pot.
Digging ends the trial, with or without a reward. The network must learn the
item-by-context rule from reward alone. Where the pots stand does not matter.

The network has three layers of leaky integrate-and-fire (LIF) neurons:

| layer | neurons | role |
|---|---|---|
| sensory | 6 (0..5) | context A, context B, item X, item Y, position 1, position 2 |
| hippocampal | 8 (6..13) | winner-take-all layer that learns conjunctions |
| motor | 2 (14 dig, 15 move) | winner-take-all layer that chooses the action |

Plastic excitatory synapses connect every neuron of one layer to every
neuron of the next layer: 6x8 + 8x2 = 64 synapses. Static inhibitory
synapses of weight 1 connect every pair of neurons within the hippocampal
layer and within the motor layer: 8x7 + 2x1 = 58 synapses. All arithmetic
uses 32-bit signed fixed point with 16 fraction bits (Q16.16, so 1.0 is 65536).

## How a trial runs

1. **Initialisation.** A `run` pulse makes four LFSRs write random weights
   in [0, 1) into the 64 plastic synapses, four per cycle, in 16 cycles.
2. **Behavioural phase.** A `start_trial` pulse starts it. The sensory
   neurons of the presented triplet (context, item, position) each receive
   a constant drive. The hippocampal and motor neurons are **not** driven by
   their synaptic input. For each of them an *activity* is computed every
   tick:

       A_j = sum_i (V_i - V_reset) * W_ij  -  sum_{i != j, same layer} (V_i - V_reset)

   The first sum runs over the previous layer and uses the plastic weights.
   The second sum is the lateral inhibition, with weight 1. A
   winner-take-all unit gives the neuron with the highest positive activity
   a fixed pull-up drive and gives the others zero. So each layer fires only
   its winner. The first motor spike is the action.
   The choice does not depend on how large the weights are, only on their
   ranking. This keeps spike counts low and makes learning fast.
3. **Move.** The neurons are cleared for one cycle. The environment then
   presents the other pot, and the phase goes on.
4. **Dig.** The `reward` input is sampled, and the plastic synapses become
   eligible for learning. The recorded **action sequences** are then
   replayed. An action sequence is the set of neurons that fired before one
   action. The two latest sequences of the trial are kept.
   - **Rewarded:** forward replay. The older sequence comes first. Within a
     sequence, sensory neurons are forced to fire, then hippocampal neurons
     2 ticks later, then motor neurons 2 ticks after that. Each presynaptic
     spike comes just before its postsynaptic spike, so STDP strengthens
     every synapse on the path that led to the reward.
   - **Not rewarded:** reverse replay. The latest sequence comes first, and
     the layers fire in the order motor, hippocampal, sensory. The same
     synapses are weakened.

   The two sequences are 48 ticks apart. That is longer than the STDP
   window, so spikes from different sequences do not interact.
5. `trial_done` pulses for one cycle and the network waits for the next
   trial.

A trial also ends without reward after 8 actions or after 100 ticks with no
action. It is then replayed in reverse. Without this limit, a network that
always chooses "move" would never finish a trial.

## The neuron

The usual discretised LIF update needs two multiplications. This design
drops the small leak-times-voltage term and keeps only additions:

    Vm[n+1] = Vm[n] + V[n] - V_leak

Each neuron is one adder (`V[n] - V_leak`), one accumulator and one
comparator against `V_th`. When `V_th` is crossed, the neuron spikes for one
cycle and `Vm` returns to `V_reset`. `Vm` is held at `V_reset` rather than
allowed to go below it. Each neuron also has a saturating 8-bit counter of
ticks since its last spike. The synapses use these counters for spike
timing.

Values used: `V_th` = 1.0, `V_reset` = 0, `V_leak` = 0.01 per tick. The
sensory drive and the WTA pull-up are both 0.25, so a driven neuron fires
every 5 ticks. The replay drive is 1.125, which forces a spike in one tick.

## The learning rule, as a table

Each plastic synapse reads its weight change from a 16x10 look-up table.
It has no exponential unit.

- The spike-time difference selects one of 16 bins. Bins 0..7 cover
  pre-before-post at dt = +1..+40 ticks. Bins 8..15 cover post-before-pre at
  the same distances. Each bin is 5 ticks wide.
- The current weight selects one of 10 levels, `floor(10*w)`.
- Each entry is computed at elaboration from the formula below. It is
  evaluated at the centre of the bin and the centre of the level:

      dt > 0:  dw = +0.056 * (1 - w) * exp(-dt / 10)
      dt < 0:  dw = -0.056 *  w      * exp(-|dt| / 10)

So strong synapses grow slowly and weaken quickly, and weak synapses do the
opposite. After each update the weight is clamped to [0, 1]. A synapse
updates only while it is eligible (replay phase). It updates on the later
spike of a pair, when the other neuron fired less than 40 ticks earlier.
Nothing happens when both neurons spike in the same cycle.

The potentiation amplitude and time constant follow the published
weight-dependent rule. The published depression is about three times weaker.
With that weaker depression this network never learned the task: the
hippocampal neurons became item detectors, not item-in-context detectors.
The depression amplitude was therefore raised to equal the potentiation
amplitude (`STDP_A_M` in `snn_pkg`).

## Block structure

```
snn_top
├── neurons_block        16 x lif_neuron + spike-age counters
├── synapses_block       64 x exc_synapse (each with a stdp_lut)
├── crossbar             connection map: neurons <-> synapses <-> activity units
├── activities_wta       8 + 2 activity_unit, two wta
└── peripheral_block
    ├── scheduler        phases: IDLE, INIT, WAIT, BEHAV, MOVE, RSTART, REPLAY
    ├── init_synapses    4 x lfsr
    ├── hist_sequence    latest two action sequences
    ├── ctrl_behav       sensory drive + WTA levels
    ├── ctrl_replay      forward / reverse replay schedule
    └── input multiplexer (behavioural or replay drive into the neurons)
```

`snn_pkg` holds the shared types (`fix_t`, `phase_t`), the network
dimensions, the neuron constants and the table formula.

One network tick takes one clock cycle. The path from neuron state to
activity, WTA and the next neuron update is one combinational stage. It
contains 64 32x32-bit multipliers. A fast implementation would pipeline
this stage over several cycles. That would not change the behaviour,
because a tick is one enable of the neurons.

## Interface of `snn_top`

| port | dir | meaning |
|---|---|---|
| `run` | in | initialise the weights (any time outside a trial) |
| `start_trial` | in | start a trial with the triplet on `ctx` (0=A), `item` (0=X), `pos` |
| `reward` | in | sampled in the cycle `dig` is high |
| `dig`, `move` | out | the action taken. After `move`, present the other pot |
| `trial_done`, `trial_rewarded`, `trial_timeout` | out | one-cycle status at the end of the replay |
| `phase` | out | scheduler phase (`snn_pkg::phase_t`) |
| `spike`, `vm`, `act_hid`, `act_out`, `win_hid`, `win_out`, `valid_*` | out | observation of the neurons and WTAs |
| `hist_push`, `replay_fwd`, `replay_busy` | out | observation of the history and replay |
| `wt_addr` / `wt_data` | in/out | read one plastic weight (combinational) |

Synapse `k < 48` connects sensory neuron `k/8` to hippocampal neuron
`6 + k%8`. Synapse `k >= 48` connects hippocampal neuron `6 + (k-48)/2` to
motor neuron `14 + (k-48)%2`.

Cycle counts: initialisation takes 18 cycles from `run` to the wait phase.
A replay takes 53 cycles per stored sequence, plus 1 for each empty history
entry, plus 1. In simulation a whole trial takes about 110 to 200 cycles.

## Results in simulation

`tb/tb_snn_top.sv` plays the task for 400 trials against the default
configuration. It prints how many of the last 30 first choices were
correct, every 50 trials. With the default seeds, 25 of 30 are correct at
trial 100, 28 at trial 150 and 30 of 30 from trial 200 on. The network thus learns the rule
in a number of trials comparable to the roughly 100 that the original work reports. The
testbench also checks the following:

- After a rewarded trial, no weight has fallen.
- After an unrewarded trial, no weight has risen.
- Every replay has exactly the predicted length.
- Every mechanism occurred at least once: initialisation, spikes in each
  layer, both WTAs, move, rewarded and unrewarded dig, forward and reverse
  replay, potentiation, depression, and a trial ended by the limit.

## Where this departs from, or adds to, the original design

These are choices made here. The original work does not specify them.

- Fixed-point split, and the threshold, leak, drive and replay voltages.
- Reading the 16x10 table as 16 time bins by 10 weight levels, and one tick
  as 1 ms.
- The depression amplitude, raised as described above.
- Nearest-spike STDP pairing, with spike timing from per-neuron age counters.
- The history holds one neuron mask per action. The replay spacing is 2
  ticks between layers and 48 ticks between sequences.
- Neurons are cleared after every action. The trial ends after 8 actions or
  100 idle ticks.
- WTA ties go to the lowest index. A layer has no winner unless the highest
  activity is positive.
- One tick per clock cycle, no pipelining. The reported FPGA resource use,
  clock rate, 77 us per trial and 45.6 us decision latency are not
  reproduced or checked.

## Simulating

Every testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=N failures=M` line. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/snn_pkg.sv tb/tb_snn_top.sv \
          --top-module tb_snn_top -o sim && ./obj_dir/sim
```

The whole-network test runs in under a minute. The block testbenches take
seconds. To change the network size, the neuron constants or the learning
table, edit `rtl/snn_pkg.sv`. The replay timing and trial limits are
parameters of `peripheral_block`.
