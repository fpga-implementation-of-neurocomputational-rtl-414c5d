# On-chip learning with back-propagation and with C-Mantec

This design trains small neural classifiers in hardware. It has two learning
machines, and each trains a network from examples held in on-chip memory.

- **Back-propagation machine.** A fixed NI-NH-NO multilayer perceptron with
  sigmoid units. It learns on line with the standard gradient rule, one weight
  update after every pattern. It keeps the weights that gave the lowest error
  on a validation set.
- **C-Mantec machine.** A constructive network. It starts with a single
  threshold neuron and adds neurons to its one hidden layer only when the
  neurons it already has cannot take in a misclassified pattern. The output is
  a majority vote of the hidden neurons. Each hidden neuron learns with the
  thermal-perceptron rule: a perceptron whose learning rate falls with a
  "temperature" and with how far the pattern lies from its decision boundary.

Both machines follow the same two hardware ideas:

- **One multiplier per neuron.** Every neuron owns a single multiplier and
  uses it for each multiplication it needs, one after another. All neurons
  work at the same time.
- **Tables for the nonlinear functions.** The sigmoid and the exponential are
  each a small table plus linear interpolation.

The cost of a pattern therefore grows with the number of inputs, not with the
number of weights. The two machines share nothing but the clock and reset, so
they can be compared side by side.

Default size: 5 inputs, 50 hidden neurons, 1 output, and 1024 stored patterns
per machine. Weights and inputs are 8.8 fixed point.

## Cycle budget per pattern

The schedules below are tuned so that presenting one pattern takes exactly
these numbers of clock cycles. All the testbenches check them.

| machine          | output phase        | learning phase                  | at 5-50-1 |
|------------------|---------------------|---------------------------------|-----------|
| C-Mantec         | `8 + 2*NI`          | `38 + ceil(NH/16) + 2*NI`       | 18 + 52   |
| back-propagation | `11 + NI + NH + NO` | `10 + 2*NO + NI`                | 67 + 17   |

A C-Mantec pattern costs almost the same whatever the hidden layer size: all
neurons work in parallel, and only the search for the winning neuron grows,
by one cycle per 16 neurons. Back-propagation needs one cycle per hidden
neuron in its output phase, because one sigmoid table serves the whole hidden
layer.

The C-Mantec learning phase runs only when the network misclassifies the
pattern. A correct pattern costs the output phase alone.

## Number formats (`nn_pkg`)

| quantity                               | format                      | type    |
|----------------------------------------|-----------------------------|---------|
| weights, inputs, potentials            | signed Q8.8, saturating     | `fix_t` |
| sigmoid outputs, thermal factor `Tfac` | unsigned Q0.16 (65535 ≈ 1)  | `act_t` |
| temperature ratio `T/T0`               | unsigned Q1.16 (65536 = 1)  | `tau_t` |
| back-propagation deltas                | signed Q1.16 in 18 bits     |         |

`N1`/`N2` in `nn_pkg` set the integer and fraction widths of the weights.
Only 8.8 is tested. Wider formats also need wider multipliers, a new table
input format (`FB`) and new update shifts.
Every multiplier is 18 x 18 bits (`tdm_mult`). It is registered: a product is
read one cycle after its operands are applied. Every weight update rounds to
nearest and saturates.

`nn_pkg` also holds:

- the two operation enums that the controllers broadcast to their neurons
  (`cm_op_t`, `bp_op_t`);
- a 16-bit Galois LFSR (`lfsr16`, taps 0xB400);
- `scale16(r, n) = (r*n) >> 16`, used for the random pattern orders.

## Function tables

`sigmoid_lut` computes `1/(1+exp(-h))` as follows:

- The table has 64 segments, addressed by the sign, 3 integer bits and 2
  fraction bits of `h`. It covers -8 to +8 in steps of 1/4.
- It interpolates linearly inside a segment.
- The output saturates to 0 below -8 and to 65535 at +8 and above.
- Maximum error is about 7.6e-4 inside the range and 3.4e-4 from the
  saturation.
- With `NB = 3` (eighth steps), the maximum error falls to 3.35e-4.

`exp_lut` computes `exp(-x)` for `x >= 0` in the same way. It uses 3 integer
and 3 fraction bits, so 64 segments over [0, 8), and outputs 0 beyond that.
Its maximum error is about 1.8e-3, or 4.8e-4 with 4 + 4 bits.

Both tables are computed during elaboration by constant functions from the
formula. They are not read from a file. `NA` and `NB` change their size.

## The C-Mantec machine

### Neuron (`cm_neuron`)

Each neuron holds its weights `w[i]`, its bias `b` and its own temperature
ratio `tau = T/T0`. The controller sends every neuron the same operation code
and the same input value each cycle. The neuron computes:

- **Output.** `h = sum w[i]*psi[i] - b` and `S = (h >= 0)`. This takes two
  cycles per input: issue the multiply, then accumulate.
- **Thermal factor.** `T = T0*tau`, then `|h|/T` through a 24-cycle restoring
  divider (`seq_div`), then `Tfac = tau * exp(-|h|/T)` through `exp_lut`. A
  neuron far from its boundary, or a cold one, gets a small `Tfac`.
- **Learning**, only for the selected neuron:
  - `w[i] += (t - S)*psi[i]*Tfac`;
  - `b -= (t - S)*Tfac`;
  - `tau -= 1/Imax`.

  After `I` learning steps, therefore, `T = T0*(1 - I/Imax)`. The host gives
  `1/Imax` directly as `dtau`, which avoids a divider.

### Network (`cm_network`)

`NH` neurons are built in. `n_act` of them are in use, starting with one. On
`start` the network runs the output phase, and the majority unit (`majority`)
gives `y`. The output is 1 when at least half of the neurons in use are on:
`sum >= ceil(n_act/2)`. With `n_act = 1`, the output is that neuron's output.

If `learn` is set and `y` differs from the target, the learning phase follows:

1. Every neuron forms its `Tfac` in parallel.
2. A comparison stage scans 16 neurons per cycle. It looks for the largest
   `Tfac` among the neurons in use whose own output is wrong.
3. If that largest `Tfac` exceeds `gfac`, the winner learns the pattern. The
   output `learned` reports this.
4. Otherwise the network grows:
   - the next free neuron comes into use (`grew`);
   - every temperature goes back to `T0`;
   - the new neuron learns the pattern at full temperature.
5. If no neuron is free, the network sets `full` instead.

### Training loop and noise filter (`cm_trainer`)

The trainer repeats passes over the stored patterns. Each pass uses a fresh
random order, made by a Fisher-Yates shuffle driven by the LFSR. It stops when
a whole pass makes no error (`converged`), or after `max_pass` passes.

The trainer counts, for each pattern, how often it was misclassified since the
last growth (`N_LT`). Each time the network grows, a learning cycle has ended,
and the noise filter runs. It deletes every pattern with
`N_LT >= mean + phi*stddev` over the patterns still in use. All counts are
then cleared, and the pass starts again. The comparison needs no square root:

```
n = patterns in use, S1 = sum N_LT, S2 = sum N_LT^2
delete when  d = n*N_LT - S1 > 0  and  d^2 >= phi^2 * (n*S2 - S1^2)
```

The filter needs two passes over the memory:

1. sum `S1` and `S2`;
2. mark the deleted patterns.

`phi` is Q8.8. A large `phi`, for example 127, turns the filter off in
practice.

### Ports

Outputs: `passes`, `n_act`, `n_deleted`, `full`, and `n_fix`, the number of
learning steps taken by neurons that already existed.

A query port (`q_start`, `q_psi`, `q_done`, `q_y`) classifies new inputs
after training.

## The back-propagation machine

### Neurons (`bp_inp_hid`, `bp_out`)

The input layer has no hardware of its own. Each hidden neuron (`bp_inp_hid`)
reads the inputs directly, and it owns two sets of weights:

- its input weights `w[i]`;
- its weights towards every output, `v[k]`.

Ownership of `v[k]` is the point of this arrangement. In the backward pass a
hidden neuron needs `sum_k v[k]*delta_k`, and it has every `v[k]` locally.
The output deltas are broadcast, and the error never has to be collected
across neurons. There is no bias term. Feed a constant input of 1.0 if the
problem needs one.

Each output neuron (`bp_out`) takes the summed potential and the sigmoid
output. It then forms, in a 6-cycle sequence:

- the error `z - y`;
- the squared error;
- `delta = (z - y) * y * (1 - y)`;
- `eta * delta`.

### Schedule (`bp_network`)

Forward pass:

1. The hidden neurons multiply and accumulate one input per cycle, all in
   parallel.
2. The shared hidden-layer sigmoid table converts their potentials one neuron
   per cycle. This is the `NH` term of the budget.
3. For each output in turn, every hidden neuron forms `v[k]*y`. An adder tree
   sums these products, and the output sigmoid table gives `y_k`.
4. The output neurons form their deltas.

Backward pass:

1. For each output, the hidden neurons accumulate `v[k]*delta_k` and update
   `v[k]` by `eta*delta_k*y`. This takes two cycles per output.
2. Three cycles form the hidden delta `y*(1-y)*sum`.
3. One cycle per input updates `w[i]`.

### Weights and training (`bp_trainer`)

`init` loads start weights uniform in [-0.5, 0.5). They come from an integer
hash of the seed, the neuron and the weight index.

Every weight has a shadow copy. `save` and `restore` copy all weights to and
from these shadows in one cycle.

`bp_trainer` stores training patterns at addresses `0..n_train-1` and
validation patterns after them. For each epoch it:

1. presents the training set once, in a fresh random order, learning after
   each pattern;
2. presents the validation set without learning, summing the squared error;
3. saves the weights whenever that error is the lowest so far.

After `max_epochs` epochs it restores the best weights and reports
`best_epoch` and `best_err`. A query port classifies new inputs.

### A second hidden layer (`bp_hid`, `bp_network2`)

The same weight ownership extends to deeper networks. `bp_network2` builds
NI-NH-NH2-NO from three neuron types:

- `bp_inp_hid` for the first hidden layer. Its outgoing weights now point at
  the second layer.
- `bp_hid` for the second hidden layer.
- `bp_out` for the outputs.

A `bp_hid` neuron works like this:

- It does not see the inputs.
- Its potential comes from the adder tree over the first layer's products,
  the same path that feeds an output neuron.
- Its activation comes from a sigmoid table for its layer. A pipeline
  converts one second-layer neuron per cycle.
- It owns its weights to the outputs.
- It produces its own delta and `eta*delta`. The first layer consumes these
  exactly as the single-layer network consumes the output deltas.

Set `NH2 > 0` on `bp_trainer` or the top to build this network instead of
`bp_network`. The default is 0, a single hidden layer.

Cycle counts for two hidden layers:

- output `13 + NI + NH + NH2 + NO`;
- learning `11 + 2*NO + 2*NH2 + NI`.

With 8.8 weights, two sigmoid layers learn more slowly than one. They need a
learning rate near 1. XOR is reached from some start seeds and not from
others, because the error can settle on the plateau where the output stays
near 0.5.

## Top level (`nn_fpga_top`)

The top instantiates both trainers. Each trainer's ports come out with a
`cm_` or `bp_` prefix:

- a pattern load port;
- configuration inputs;
- a run/busy/done handshake;
- results;
- a query port.

The host loads patterns and sets the parameters. For C-Mantec these are `T0`,
`1/Imax`, `gfac` and `phi`. For back-propagation they are `eta`, `seed` and
the epoch count. The host then pulses `run` and waits for `done`.

All commands are accepted only while the machine is idle. The reset is
active-low and asynchronous.

## Where this design departs from the published algorithms, or fills gaps

- **Majority threshold.** The output is on when half or more of the neurons
  are on, which means `ceil(n/2)` for an odd count. A plain `n >> 1` threshold
  would make a one-neuron network always output 1.
- **Thermal factor.** It uses `exp(-|h|/T)`. With a signed `h` the exponent
  would be unbounded for the neurons that compete.
- **Bias update.** The C-Mantec bias learns as a weight on a constant -1 input.
- **Weight start values.**
  - C-Mantec weights start at 0.
  - The first neuron, and any added one, learns its first pattern at full
    temperature.
- **Counts and orders.**
  - `N_LT` saturates at 255.
  - The deletion test uses the standard deviation.
  - Training orders come from a 16-bit LFSR.
- **Back-propagation stop rule.** It stops after a fixed number of epochs.
- **Hidden layers.** The back-propagation network has one hidden layer by
  default. At most two can be built (`NH2`). The size of the second layer
  and its schedule are this design's own.
- **Interfaces.** The interfaces, the operation codes and the padding cycles
  that give the cycle budget exactly are this design's own.

## How far it has been tested

Each module has a self-checking testbench in `tb/` that compares it with
values computed independently in the testbench:

- the tables are checked over their whole input range against `$exp`;
- the neurons are checked against a model of their arithmetic;
- each network is checked on every presentation, including its cycle counts.

Learning tests:

| what                                   | result                                            |
|----------------------------------------|---------------------------------------------------|
| C-Mantec network, AND                  | learned with one neuron                           |
| C-Mantec network, XOR                  | learned by growing to several neurons             |
| C-Mantec trainer, noisy data set       | noise filter removes the flipped patterns         |
| back-propagation, XOR                  | learned in about 170 epochs                       |
| back-propagation trainer               | keeps and restores the best weights               |
| two hidden layers, XOR                 | learned (480 epochs, learning rate 1)             |
| two hidden layers, one learning step   | output and every weight match a real-valued model |

`cycle_sweep_tb` builds both networks at 1, 5, 15, 30, 45 and 60 hidden
neurons and measures the cycles per pattern at each size. A pattern with
learning costs fewer cycles in back-propagation up to 30 neurons, and fewer
in C-Mantec from 45 neurons on.

`benchmark_size_tb` builds both machines with 8 inputs and room for 1024
patterns, then trains them on 768 synthetic patterns with a linear rule and
4% flipped labels:

- C-Mantec has up to 50 neurons and noise filter φ = 2. It converges in 7
  passes with 16 neurons. The filter deletes 405 patterns. Afterwards 743 of
  768 patterns agree with the noise-free rule.
- Back-propagation has 5 hidden neurons. It uses 576 training patterns, 192
  validation patterns and 30 epochs. Afterwards 731 of 768 patterns agree
  with the noise-free rule.

These are the shapes of the largest classification benchmark. The real
benchmark data are not included.

`nn_fpga_top_tb` runs the full default-size top. It trains both machines on
small problems and counts the following events, failing if any of them never
happened:

- growth;
- learning without growth;
- deletion by the noise filter;
- convergence;
- stopping at the pass limit;
- saving and restoring the best weights.

Not tested: the real benchmark data sets, which need more inputs than the
default 5. Change `NI` to run them. Pattern memories of 1024 entries are
enough for data sets of up to 1024 patterns.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module cm_network_tb rtl/nn_pkg.sv tb/cm_network_tb.sv
./obj_dir/Vcm_network_tb
```

Each testbench prints a `TB_RESULT checks=N failures=M` line and stops itself.
A watchdog ends a stuck run with a failure. The testbenches set smaller
pattern memories where that shortens the run. `nn_fpga_top_tb` uses the
defaults and finishes in seconds.

Parameters to change:

- `NI`, `NH`, `NO`, `NPAT` and `NH2` on the top;
- `N1`/`N2` in `nn_pkg` for the weight format (8.8 is the tested one);
- `NA`/`NB` on the table modules.

The design is plain synthesizable SystemVerilog:

- the weight storage is registers;
- the pattern memories are arrays that synthesis can map to block RAM;
- there are no vendor primitives.
