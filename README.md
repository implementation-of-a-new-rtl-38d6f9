# Stochastic-logic neurochip with nonmonotonic neurons

This is a neural-network chip whose arithmetic is done on random pulse streams
instead of binary words. A number becomes a stream of single-bit pulses whose
density is the number. Multiplying two independent streams then takes one AND
gate, and adding them takes an up/down counter. The chip holds 50 neurons. A
neuron is a handful of comparators, gates and counters, so many fit on one die.

The second idea is the *nonmonotonic* neuron. Its output first rises with the
membrane potential, then falls back to zero when the potential gets large.
Networks of such neurons need fewer neurons for associative memory and
learning tasks. Here the nonmonotonic activation costs two comparators and an
XOR gate. The randomness that stochastic logic needs anyway also serves as
annealing noise for optimisation problems. Boltzmann-machine learning is built
in.

The network it computes is the discrete-time Hopfield/Boltzmann dynamics

    u_i(t+1) = sum_j w_ij x_j(t)        x_i(t) = f(u_i(t))

with 14-bit membrane potentials `u`, 8-bit weights `w`, and `f` either
nonmonotonic or monotonic. Weights live in external memory. A host drives the
chip. Several chips share one broadcast bus and together form one network of
up to 1023 neurons.

## Pulse streams and signs

Every value travels as a `spike_t` (`rtl/neuro_pkg.sv`): a `fire` bit for each
clock and a `neg` bit that says whether the pulse counts as +1 or -1.

* **Coding a number** (`stoch_coder`): the coder fires when a uniform random
  number is below the value. A 7-bit weight magnitude `|w|` against 7 random
  bits fires with probability `|w|/128`.
* **Multiplying**: the weight stream is ANDed with the broadcast neuron output
  `x_j`. The product's sign is `sign(w) xor sign(x_j)`.
* **Summing**: the membrane counter (`membrane_counter`) counts each product
  pulse up or down by its sign.

So `u` is a count of pulses, not a scaled fraction. Take a slot of `Na` clocks
with a source that always fires (a clamped ±1). It adds `Na*|w|/128` on
average, with binomial noise of variance `Na*p*(1-p)`, `p = |w|/128`. A larger
`Na` gives less noise and a larger `u`. The noise is deliberate: `Na` is the
knob that sets the temperature.

## The nonmonotonic coder

`nonmono_coder` compares the magnitude `|U|` with two independent noises R1 and
R2 and XORs the two comparator outputs. The sign of `U` goes along as the
pulse's sign. If both noises have the same distribution with
`P1(U) = P(R < |U|)`, the firing probability is

    Pf(U) = 2 P1(U) (1 - P1(U))

This is zero at `U = 0` and peaks at 0.5 where `P1 = 1/2`. It falls back to
**exactly zero** once `|U|` is above every noise value: both comparators fire,
and the XOR cancels them. This is the "end cut-off" characteristic. The point
`θ` where it reaches zero is the top of the noise range, `Umax`.

The noise distribution shapes the curve. `split_noise` turns a 13-bit uniform
number into noise that is uniform on `[0, a)` and `[b, Umax)`, with nothing in
between:

    C = Umax + a - b
    s = floor(r * C / 2^13)              (r uniform on 0 .. 8191)
    R = s            if s < a
        s + (b - a)  otherwise

This gives

    P1(U) = U/C           for U < a
            a/C           for a <= U < b     (a flat shoulder)
            (U + a - b)/C for b <= U < Umax
            1             above

With `a = Umax - b` the curve is symmetric with a peak of 0.5. With `a = b` the
noise is plain uniform on `[0, Umax)` and `Pf = 2q(1-q)`, `q = |U|/Umax`.
`a`, `b` and `Umax` are inputs in the same units as `u`. The inputs must
satisfy `a <= b <= Umax`; nothing checks this. Typical settings are
`a = 200, b = 300, Umax = 500` for learning, and `Umax = 4*Na`,
`a = 200, b = Umax - 200` for the travelling-salesman runs.

**Monotonic mode** (`mono[i] = 1`, set per neuron) holds R2 at its largest
code. The second comparator then never fires, and the output is the plain
`P1(U)`: a saturating sigmoid-like ramp. Per-neuron selection allows, for
example, nonmonotonic hidden neurons with monotonic output neurons.

## Noise supply

Five `mseq_rng` generators each produce a 200-bit window of an M-sequence per
clock. Each is a 200-stage Fibonacci LFSR with the primitive polynomial
`x^200 + x^163 + x^2 + x + 1`. It advances 20 positions per clock, so every
20-bit slice holds new bits in every clock. Slice `m` of generator `g` feeds
neuron `10g + m`:

| bits  | use                                                        |
|-------|------------------------------------------------------------|
| 6:0   | weight-coder noise                                         |
| 19:7  | through `split_noise`, becomes R1 of this neuron           |

R2 of neuron `10g + m` is R1 of neuron `10g + (m+1) mod 10`. Because of the
20-bit leap, that is this neuron's own slice one clock earlier: a disjoint
stretch of the sequence. The polynomial, the leap, this R2 wiring and the
per-generator seeds (`SEED` in `neurochip`) are this design's choices. Change
them there.

## One state update: broadcast slots

The neurons are fully connected through one bus. At any moment one neuron `j`
broadcasts its pulse stream `x_j`. Every neuron `i` multiplies that stream by
its own `w_ij` and accumulates. A state update is therefore `N` slots, one per
source neuron. The `control_unit` sequences each slot:

```
slot j:  | 12 clocks: w_addr = j, column j loads (w_load on the 12th) | Na clocks: acc_en, x bus = x_j |
update:  slot 0, slot 1, ... slot N-1; u_latch + cnt_clear on the very last clock
```

* One update takes exactly `n_net * (12 + Na)` clocks, from the command being
  accepted to `done`.
* Each neuron keeps two copies of its state. The membrane counter gathers
  `u_i(t+1)`. A separate `u` register drives the coder with `u_i(t)`. On the
  last counting clock all counters are copied into `u` (including that clock's
  pulse) and cleared. All neurons therefore update at the same time
  (synchronous update).
* **Asynchronous update** (`async_en`, `async_idx`): the same slots run, but
  only the selected neuron latches its new `u`. The other counters are still
  cleared. The host chooses which neuron, at random if it wants the classical
  asynchronous Hopfield dynamics. Asynchronous updates avoid the oscillations
  that synchronous updates can cause in Hopfield networks.
* **Clamping** (`clamp_en[i]`, `clamp_neg[i]`): the neuron's output becomes a
  steady +1 or -1 stream (fires every clock). This sets inputs and targets
  during learning.
* **Overflow**: `u` is a 14-bit two's complement count that wraps like a
  counter. `ovf_o[i]` tells the host that the last sum wrapped. Keep
  `n_net * Na * mean|w|/128` below 8191. The 5-city TSP, for example, stays at
  `Na <= 600`.

Throughput: all neurons compute in parallel, so one update is
`n_net^2` connections in `n_net*(12+Na)` clocks. At 30 MHz, `N = 1000` and
`Na = 10`, that is about 1.36·10^9 connections per second.

## Learning pass

`learn_unit` is the weight register of a neuron, able to count. The
Boltzmann-machine rule

    Δw_ij = (ε/T) * ( <x_i x_j>_clamped - <x_i x_j>_free )

becomes a counting window. In each clock where `x_i`, `x_j` and the external
`ctrl_pulse` all fire, the weight moves by one step. The direction is
`phase xor sign(x_i) xor sign(x_j)`, with `phase` 0 in the clamped phase and 1
in the free phase. The density of `ctrl_pulse` sets the rate `ε/T`. The
register saturates at ±127. A loaded -128 becomes -127, so the magnitude always
fits the 7-bit coder.

A `CMD_LEARN` command runs one slot per source neuron `j`:

```
| 12 clocks: load column j | learn_len clocks: learn_en, x bus = x_j | 12 clocks: w_we on the first, column j written back |
```

That makes `n_net * (24 + learn_len)` clocks per pass. A full learning step for
the host is:

1. Clamp the visible neurons to a pattern and let the network settle with
   `CMD_UPDATE`s.
2. Run `CMD_LEARN` with `phase = 0`.
3. Release the clamps, settle again, and run `CMD_LEARN` with `phase = 1`.

The split of the 24 overhead clocks into 12 load and 12 store clocks is this
design's reading of the chip's learning timing.

The learning rate can be set in two equivalent ways. The window length and
the control-pulse density both scale the mean weight change. A 512-clock
window at density `ε/T` gives the same mean step as a window of `512·ε/T`
clocks with a steady control pulse. The original chip's learning throughput
corresponds to the short window, so `learn_len ≈ 512·ε/T` reproduces its
timing.

## Several chips, one network

All chips see the same host signals. `chip_base` is the global index of a
chip's neuron 0. When the broadcast index `j` falls on a chip:

* that chip drives `x_bus_o` and raises `x_bus_oe`;
* all other chips take `x_bus_i`.

Outside the chip, the bus is a plain multiplexer or a wired selection on
`x_bus_oe`. Each chip has its own weight memory with 50 weights per column
`j`, and `w_addr` is the global `j`. `n_net` is the size of the whole network.
Neurons with no role get zero weights.

## Host interface (`neurochip`)

| port | dir | meaning |
|------|-----|---------|
| `cmd_valid`, `cmd`, `cmd_ready` | in/in/out | command handshake; a command is taken when valid and ready are both high. `CMD_UPDATE` or `CMD_LEARN` |
| `n_net`, `na`, `learn_len`, `async_en`, `async_idx` | in | taken with the command (0 counts as 1) |
| `chip_base`, `a`, `b`, `umax`, `mono[50]`, `phase`, `ctrl_pulse`, `clamp_en[50]`, `clamp_neg[50]` | in | used directly |
| `w_addr`, `w_rdata[50]`, `w_wdata[50]`, `w_we` | out/in/out/out | weight memory, column `w_addr`. Read data must be valid by the 12th load clock (up to 11 clocks of latency). Write on `w_we` |
| `x_bus_i`, `x_bus_o`, `x_bus_oe` | in/out/out | inter-chip broadcast bus |
| `u_o[50]`, `ovf_o[50]`, `busy`, `done` | out | state readout and status; `done` pulses one clock after the last one |

Reset (`rst_n`, asynchronous, active low) clears every counter and register
and loads the generator seeds. An annealing schedule such as
`Na(t) = Na0 (1 + t/τs)^2` belongs to the host: it passes a new `na` with each
command.

## Modules

| file | role |
|------|------|
| `neuro_pkg.sv` | widths, `spike_t`, command codes |
| `mseq_rng.sv` | 200-bit M-sequence generator, 20-bit leap |
| `split_noise.sv` | uniform → uniform/split noise |
| `stoch_coder.sv` | comparator coder |
| `nonmono_coder.sv` | two coders + XOR + sign; monotonic mode |
| `membrane_counter.sv` | 14-bit up/down counter with wrap flag |
| `learn_unit.sv` | weight register with learning counter |
| `neuron.sv` | one neuron: synapse, counter, `u` register, coder, clamp, learning |
| `control_unit.sv` | slot sequencer |
| `neurochip.sv` | top: 50 neurons, 5 generators, 50 shapers, CU, x bus |

## Where this departs from the original chip, and what is assumed

The chip's published structure is followed: 50 neurons, five 200-bit
M-sequence generators with 20 bits per neuron, 14-bit `u` and 8-bit `w`,
comparator coders, the two-comparator XOR neuron with a sign bit, AND-gate
multiplication with an up/down counter, the AND/XOR learning circuit with an
external rate pulse, external weight memory, a broadcast bus, and
`12 + Na` clocks per slot.

These parts are this design's own, because no specification of them exists:

* the control unit's command interface and handshake;
* the learning-slot layout;
* the width of the weight-memory port (a whole 50-weight column at once);
* the way split noise is produced (a multiplier per neuron, 50 in all);
* the noise slicing and the R2 wiring, the LFSR polynomial and the seeds;
* the double-buffered `u` register;
* the clamp inputs;
* the weight saturation;
* the `u` overflow flag;
* 10-bit fields for the network size and `Na`, which limits `Na` to 1023 and
  the network to 1023 neurons.

Not included: the host computer, the weight SRAMs, and the chip's pads and
analog details. Also not included is a continuous-time variant with
`u(t+δt) = u(t) + (δt/τ) Σ w x`. It is only a proposal, and it does not help
without a decay term.

## Simulating

Every testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/neuro_pkg.sv tb/tb_neurochip.sv --top-module tb_neurochip -o sim
./obj_dir/sim
```

| testbench | what it checks |
|-----------|----------------|
| `tb_stoch_coder` | every value/noise pair; firing count = value |
| `tb_split_noise` | random operands against the formula; no value in the gap; share below `a` |
| `tb_mseq_rng` | every output bit for 300 clocks against a bit-serial model of the recurrence; density of ones |
| `tb_nonmono_coder` | comparator/XOR rule on random operands; firing rate against `2q(1-q)` and `q` |
| `tb_membrane_counter` | random traffic and wraps at both ends against a model |
| `tb_learn_unit` | random traffic against the counting rule, saturation |
| `tb_neuron` | exact `u` after 1–4 slots, `x_i` every clock, clamp, learning |
| `tb_control_unit` | clock counts `n(12+Na)` and `n(24+len)`, slot order, latch position |
| `tb_neurochip` | full 50-neuron chip: update timing, sums from clamped sources, overflow, the measured nonmonotonic, split-noise and monotonic curves, the exact cut-off, asynchronous update, the external-bus slots, learning passes with saturation |

`tb_neurochip` runs the chip at its default size in a few seconds. The
statistical checks allow 5 standard deviations plus a small margin for the
13-bit noise quantisation.

## Workloads

Two more testbenches drive the full-size chip the way a host would, on the
two problems the chip was built for.

**`tb_tsp5`: five-city travelling salesman.** The tour uses 25 neurons (city ×
position) in the usual Hopfield-Tank form, and 5 clamped +1 neurons carry the
bias. Each trial starts from a random state and runs 100 asynchronous
single-neuron updates. Two noise schedules are run:

* annealed: `Na(t) = 450 (1 + t/100)^2`, capped at 600;
* fixed: `Na = 600`.

Both use split noise with `a = 200`, `b = 4Na - 200`, `Umax = 4Na`, and five
trials each. The testbench checks the update timing and that valid tours are
found, and prints how many trials reached the shortest tour. The penalty
weights (`A = B = 1`, `D = 0.2`, `I = 0.8`) are a starting point, not a tuned
setting. Expect mostly valid but often non-optimal tours over so few trials.

**`tb_parity4`: four-bit parity as a Boltzmann machine.** The network has:

* 4 clamped inputs;
* 3 nonmonotonic hidden neurons;
* 1 monotonic output;
* 1 bias neuron.

It runs with `a = 200`, `b = 300`, `Umax = 500`, `Na = 1000`, and a control
pulse of density 0.048. Every pattern runs a clamped and a free phase. The
testbench checks every clamped-pair weight change exactly, and all command
timings. A useful parity solution needs far more epochs than a simulation
run allows. The accuracy after each of 6 epochs is printed, not checked.
