# Time-window neural network for finger-alphabet recognition

A feed-forward neural network in which every multiplier is a single 2-input
AND gate. It recognises the 36 signs of the Dactyl (finger-spelling) alphabet
from a data glove: 20 inputs (14 optical bend and spread sensors of the glove
plus 6 values for the wrist position) pass two hidden layers to 36 outputs,
one per character.

The idea is to make the neuron small enough that many of them fit on a chip.
A conventional neuron needs a multiplier per synapse and an adder tree. Here
numbers are turned into pulse trains in time, and a product is the number of
clock cycles in which two pulse trains are both high. A neuron adds those
coincidences with one counter as they occur, so multiplication and summation
happen together during one "time window".

## Number format

Every value (input, weight, neuron activity) is sign-magnitude. A 4-bit
magnitude `k` stands for `k/15`, so magnitudes cover the closed interval [0, 1]
in steps of 1/15, and the sign bit extends the range to [-1, +1]. The type is
`tw_num_t` in `rtl/tw_pkg.sv` (`{s, m[3:0]}`, 5 bits).

## The time window and the AND-gate product

A time window is `WIN_LEN = 2^4 - 1 = 15` clock cycles, one cycle per possible
magnitude value. The two operands of a product are encoded in two different
ways:

* **From the start of the window** (the weights): the pulse is high in time
  units `0 .. |w|-1`. This is just the comparison `t < |w|` against the shared
  time-unit counter (`tw_synapse`).
* **Symmetrically around the window centre** (the activities): `|x|` pulses are
  spread evenly over the window so that the number of pulses before time unit
  `t` is `round(t*|x|/15)` (`sym_encoder`). For `|x| = 5` the pulses are at
  `t = 1, 4, 7, 10, 13`. Because `t*|x|/15` never ends in exactly .5, the
  pattern is mirror-symmetric about `t = 7`.

ANDing the two codes keeps exactly those spread pulses of `x` that fall in the
first `|w|` time units, which is `round(|w|*|x|/15)`: the product in the same
`k/15` format, correctly rounded. The sign of the product is `s_x XOR s_w`.

The symmetric encoder is a small accumulator (in units of 1/30): it starts
at 15 on the window's first time unit and adds `2|x|` each unit. When it
reaches 30 it emits a pulse and subtracts 30. One encoder per activity feeds
every neuron of the next layer. Each synapse costs one comparator, one AND
gate and one XOR gate.

## Neuron

`tw_neuron` has `FAN_IN` synapses. In every time unit it adds the number of
positive product pulses to a signed accumulator and subtracts the number of
negative ones. At the end of the window the accumulator holds

    P = sum_i  (s_xi XOR s_wi) * round(|x_i|*|w_i| / 15)

in units of 1/15. The output activity is `P` clipped to `[-15, +15]`
(i.e. to [-1, +1]) and registered. The neuron has no bias.

## Network and timing

`dactyl_nn` chains three `tw_layer`s (hidden 1, hidden 2, output). Each layer
holds its input encoders and its neurons. All its neurons work in parallel, so a
layer takes exactly one window. `tw_timebase` runs the layers back to back,
one window each:

| clock edges after `start` | activity |
|---|---|
| 0 | inputs `x` captured, hidden layer 1 window begins |
| 15 | hidden-1 activities registered, hidden layer 2 window begins |
| 30 | hidden-2 activities registered, output layer window begins |
| 45 | 36 outputs registered, `done` high for one cycle, `busy` low |

At 37.477 MHz, the clock rate reported for a synthesized version of this
architecture, 45 cycles is 1200.7 ns and one window is 400 ns. The outputs `y`
hold until the next computation ends. A `start` while `busy` is ignored. The
inputs may change during a computation because they are captured at the start.
The weights must stay stable while `busy` is high.

Interface of `dactyl_nn` (parameters `N_IN=20`, `N_H1=20`, `N_H2=20`,
`N_OUT=36`):

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; synchronous active-low reset |
| `start` | 1 | begin a recognition |
| `x` | `N_IN` x `tw_num_t` | glove and wrist inputs, each scaled to k/15 |
| `w1`, `w2`, `w3` | `[N_out][N_in]` x `tw_num_t` | trained weights, `w[n][i]` from input `i` to neuron `n` |
| `busy`, `done` | 1 | running; one-cycle result strobe |
| `y` | `N_OUT` x `tw_num_t` | activity of each character's output neuron |

The trained weights are ports. For a fixed network, tie them to constants:
synthesis then reduces each weight comparator to a fixed decode of `t`.
Training (modified back-propagation) happens off-chip.

## Files

| file | content |
|---|---|
| `rtl/tw_pkg.sv` | number format, `WIN_LEN`, potential width |
| `rtl/sym_encoder.sv` | symmetric pulse encoder |
| `rtl/tw_synapse.sv` | AND-gate multiplier with from-the-start weight code |
| `rtl/tw_neuron.sv` | signed coincidence counter and saturating output |
| `rtl/tw_layer.sv` | encoders plus `N_NEU` neurons |
| `rtl/tw_timebase.sv` | window and layer sequencer |
| `rtl/dactyl_nn.sv` | top: 20-20-20-36 network |
| `tb/tw_ref_pkg.sv` | reference arithmetic used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_dactyl_recognition.sv` | recognition of 36 synthetic glove gestures |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. For example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/tw_pkg.sv tb/tw_ref_pkg.sv tb/tb_dactyl_nn.sv --top-module tb_dactyl_nn
    ./obj_dir/Vtb_dactyl_nn

* `tb_sym_encoder` covers every magnitude. It checks pulse positions,
  mirror symmetry, and the coincidence count against a from-the-start code
  of every length.
* `tb_tw_synapse` is exhaustive per time unit and checks every whole-window
  product `a o b` against `round(a*b/15)`.
* `tb_tw_neuron` and `tb_tw_layer` use random inputs and weights. They cover
  both saturations, windows that restart back to back, and an aborted window.
* `tb_tw_timebase` checks the 45-cycle latency, the one-hot layer order and
  that `start` is ignored while busy.
* `tb_dactyl_nn` runs the full-size network with default parameters. It
  compares all 36 outputs with a reference model and checks the 45-cycle
  latency, a `start` while busy, inputs changing during a run and
  back-to-back runs.
* `tb_dactyl_recognition` checks recognition of 36 synthetic glove gestures
  (described below).

## Choices made here, and limits

The pulse codes, the AND-gate product, the XOR sign rule, simultaneous
multiply-and-count, the 4-bit / 15-cycle window, the 20-input, two-hidden-layer,
36-output topology, and the three-window latency all come from the published
description of the architecture. The following were not specified there and
are this design's own choices:

* **Output function.** It was not specified. The neuron uses symmetric
  saturation ("hard tanh") so that its activity stays in the number format.
  Networks trained for a sigmoid-like function need weights retrained or
  rescaled for it.
* **Hidden layer sizes.** They are free in the architecture and were not given
  for the evaluated network. The default is 20 neurons each.
* **Exact pulse positions of the symmetric code** (the rounding rule above). So
  is the choice of which operand gets which code: activities get the symmetric
  code so that encoders can be shared.
* **No bias inputs, and no winner-take-all stage.** The host picks the largest
  of the 36 activities.
* **Control.** The start/busy/done handshake, the input capture register and
  the synchronous reset.
* **Glove input scaling.** The host scales each glove reading to a 4-bit
  magnitude.

Not included: the data glove itself, the host software that trains the network
and controls the wrist position, and a slower, non-optimized variant of the
network (about 60 cycles per recognition). Recognition accuracy on real glove
data (all 36 characters after 3 training samples each) depends on trained
weights that are not available here. `tb_dactyl_recognition` shows only that a
network with hand-built weights separates 36 distinct synthetic gestures.
