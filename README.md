# A reconfigurable digital spiking neuron

This is the RTL of one low-power digital spiking neuron. It is a leaky
integrate-and-fire cell that fires at random. It adds up the weights of the
input axons that spiked, lets that sum leak away with a time constant you can
set, and then fires if the membrane potential plus a bias is above a random
threshold. The output spike *rate* therefore follows an activation function of
the membrane potential. The function is chosen by which random number the cell
compares against:

| activation | fires when `Y + theta` ... | spike probability as a function of `v = Y + theta` |
|---|---|---|
| Identity (0) | `> uni`, where `uni` is uniform on 0..65535 | linear: 0 for `v <= 0`, `v/65536` in between, 1 for `v >= 65535` |
| Binary (1) | `> 0` | a step |
| Sigmoid (2) | `> gauss`, the sum of eight uniform 13-bit numbers minus 32768 | approximately the Gaussian distribution function: 1/2 at `v = 0`, spread about 6700 |
| reserved (3) | never | 0 |

Inputs are one-bit spikes, so the cell needs no multiplier. The leak is a
multiplication by `alpha = 1 - 2^-LF`, done with one arithmetic right shift
and one subtraction. The random thresholds come from one small xorshift
generator, so no lookup table is needed for the activation functions.
Several such cells, each with its own weights and parameters, are meant to be
wired into a recurrent spiking network for serial data such as audio. That
network is not part of this RTL: the top is one neuron.

## One pulse cycle

Time advances in *pulse cycles*, and each one is started by a `pulse_tick`.
In one pulse cycle the neuron computes

    S      = sum over synapses i of  S_i(t) * W_i           (S_i(t) = spiked AND connected)
    A      = clamp( Y(t-1) + S * 2^g )                       g = LF if LF < 3, else LF - 3
    Y(t)   = A - (A >>> LF)   if the leakage timer is 0      (timer <- LP)
           = A                otherwise                      (timer <- timer - 1)
    spike  = activation(Y(t) + theta)

`clamp` saturates at the 20-bit signed range of `Y`. The bias `theta` is added
only for the comparison and never accumulates into `Y`.

### Leak factor, leak period and what they do to gain and delay

`LF` is the number of right shifts in the leak. `LP` makes the leak run only
once every `LP + 1` pulse cycles. Together they set the integrator's time
constant, the delay a signal sees through the neuron:

    delay = T_pulse_cycle * 2^LF * (1 + LP)

A leaky integrator with that time constant, fed a constant input `x` per pulse
cycle, settles where the leak removes what comes in, at `x * 2^LF * (1 + LP)`.
The neuron's gain law is steeper than that:

    Gain = 2^(2 LF)     * (1 + LP)    for LF < 3
    Gain = 2^(2 LF - 3) * (1 + LP)    for LF > 2

So the weighted sum is shifted left by `g` before it enters the integrator:
by `LF` for `LF < 3`, by `LF - 3` above. This input shift is the least obvious
part of the design, and `sn_pkg::gain_shift` holds it. The steady state is
then `x * Gain`. Strictly, that is the value just before a leak; `Y` right
after the leak is lower by a factor `(1 - 2^-LF)`. `LF = 1..7` are the useful
leak modes. `LF = 0` clears `Y` at every leak.

`LT` is the start value of the leakage timer. `load_v0` copies it into the
timer, together with `V0` into `Y`. The first leak after a load therefore
comes in the `(LT+1)`-th pulse cycle, and leaks follow every `LP + 1` cycles
after that.

### Random numbers

`sn_rng` steps a 32-bit xorshift generator (`x ^= x<<13; x ^= x>>17;
x ^= x<<5`) eight times per pulse cycle, one step per clock:

* `gauss` is the sum of the low 13 bits of the eight states, minus 2^15. It is
  a signed 16-bit number with mean about 0 and variance `8 * (2^13)^2 / 12`.
* `uni` is the top 16 bits of the last state.

The seed is the `SEED` parameter. Every neuron of a network should get its own.

## Configuration memory

Weights and parameters are held in one small memory, `sn_memory`. It is
written one 16-bit word per clock through `cfg_we`, `cfg_addr` and
`cfg_wdata`. With `N = N_SYN`:

| address | content | bits used |
|---|---|---|
| 0 .. N-1 | weight `W_i` of synapse i, signed; bit 15 is the synapse value `S_ij` (1 = connected) | 7:0 and 15 |
| N + 0 | activation function `AF` (0 Identity, 1 Binary, 2 Sigmoid, 3 reserved) | 1:0 |
| N + 1 | leakage factor `LF` | 2:0 |
| N + 2 | leakage period `LP` | 7:0 |
| N + 3 | leakage timer start `LT` | 7:0 |
| N + 4 | bias `theta`, signed | 15:0 |
| N + 5 | reset membrane potential `V0`, signed | 15:0 |

After reset, every synapse is unconnected and the parameters are AF = Identity
and LF = LP = LT = theta = V0 = 0. The weights themselves are not reset. Write
the memory only while `busy` is low; an assertion in `spiking_neuron` flags a
write during a pulse cycle.

## Interface and timing

`spiking_neuron` has these ports, all synchronous to `clk`, with an
asynchronous active-low `rst_n`:

| port | dir | width | meaning |
|---|---|---|---|
| `cfg_we`, `cfg_addr`, `cfg_wdata` | in | 1, clog2(N_SYN+6), 16 | memory write |
| `load_v0` | in | 1 | `Y <- V0`, leakage timer `<- LT` |
| `pulse_tick` | in | 1 | start a pulse cycle (ignored while `busy`) |
| `spike_in` | in | N_SYN | axon spikes, at any clock |
| `spike_out` | out | 1 | one-clock output spike, only together with `done` |
| `done` | out | 1 | one-clock end of a pulse cycle |
| `busy` | out | 1 | pulse cycle in progress |
| `membrane` | out | 20 | the `Y` register |
| `leak_event`, `sat_event`, `stall` | out | 1 each | a leak was applied, `Y` saturated, the fire step is waiting for random numbers |

The clock with `pulse_tick` is clock 0. Timing within a pulse cycle:

* **Clock 0:** the synapse latches take their snapshot, and the random draw
  starts.
* **Clocks 1..N_SYN:** the adder walks the synapses one per clock. The
  snapshot includes every spike seen since the previous snapshot, counting
  clock 0.
* **Clock N_SYN+1:** the integrator adds and leaks.
* **Clock N_SYN+2:** the fire decision is registered.
* **After that clock:** `done` and `spike_out` are high for one clock, so the
  latency is N_SYN+3 clocks (19 with 16 synapses).

A random draw takes 8 clocks. With fewer than 7 synapses, the fire step
therefore waits (`stall`) and the latency becomes 10 clocks. Spikes that
arrive while the neuron is busy are not lost: they collect in the latches and
count in the next pulse cycle. A new pulse cycle can start in the clock after
`done`.

## Structure

| module | role |
|---|---|
| `sn_pkg` | widths, activation codes, parameter record `sn_params_t`, memory map, `gain_shift` |
| `sn_synapse_latch` | one sticky flop per axon plus the snapshot register |
| `sn_memory` | weights, connection bits and parameters |
| `sn_adder` | serial weighted sum, `W_W + clog2(N_SYN) + 1` bits, cannot overflow |
| `sn_leaky_integrator` | `Y` register, gain shift, saturation, shift-and-subtract leak, leakage timer |
| `sn_rng` | xorshift generator, uniform and Gaussian random numbers |
| `sn_activation` | the comparator for the three activation functions |
| `sn_controller` | the pulse-cycle state machine (IDLE, ACC, INTEG, FIRE) |
| `spiking_neuron` | the top: wires the above together |

Parameters of `spiking_neuron`: `N_SYN = 16` synapses, `W_W = 8` weight bits,
`Y_W = 20` membrane bits, `RNG_W = 16` random-number bits and `SEED`. The
16-bit configuration word and the 3-bit `LF` and 8-bit `LP`/`LT` fields are
package constants. A weight word must keep bit 15 for `S_ij`, so `W_W` must
stay below 16.

## Where the design interprets its source

The neuron model is published: its structure (adder, leaky integrator, random
generator, comparator, memory unit), parameter set, gain and delay laws and
activation functions. The following points are this implementation's choices,
or readings of a description that is open or inconsistent:

* **Word widths, memory map, handshake and timing** are not specified. The
  ones above were chosen here.
* **The input gain shift** is derived from the gain law. The published
  iteration adds the raw weights to the running sum.
* **Activation codes** follow the parameter table (0 Identity, 1 Binary,
  2 Sigmoid). The published pseudocode numbers them differently.
* **The bias** is added to `Y` for the comparison only, as the operation flow
  describes. The membrane equation could also be read as accumulating it into
  `Y`.
* **`V0`** is loaded into `Y` on `load_v0`. There is no reset of `Y` after a
  spike: the firing is stochastic, and the model's equation has no such
  reset.
* **`LT`** is read as the start value of the leakage timer.
* **`S_ij`** is stored as a connection bit per synapse.
* **The random generator** is a xorshift32. Its eight draws are taken
  serially. `Y` saturates instead of wrapping.

The gate count of the cell depends on widths the source does not give, so it
was not compared. Multi-neuron networks are outside this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=... failures=...` line and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sn_synapse_latch` | snapshots against a model of pending spikes, random spikes and captures |
| `tb_sn_memory` | reset values, random writes (also past the last address), weight and connection-bit read-back, parameters |
| `tb_sn_adder` | random and extreme weighted sums |
| `tb_sn_leaky_integrator` | `Y`, leak and saturation against an integer model (floor division instead of shifts); leak every `LP+1` cycles; steady state equals the gain law for LF = 1..7, LP = 0..2; decay to about 1/e after `2^LF (1+LP)` pulse cycles |
| `tb_sn_rng` | 8-clock latency, bit-exact against its own xorshift model, uniformity of `uni`, mean and variance of `gauss` |
| `tb_sn_activation` | all four codes, edge values and ties (strict comparison) |
| `tb_sn_controller` | clock-by-clock schedule, stall while random numbers are not ready, ignored `pulse_tick` |
| `tb_spiking_neuron` | end to end with 4 synapses (so the stall occurs) |
| `tb_spiking_neuron_full` | the same scenario with all default parameters |
| `tb_sn_activation_curves` | full-size neuron: measured spike rate against `v = Y + theta` for each activation function, compared with the linear, step and normal-distribution curves within binomial error |

The end-to-end scenario is `tb/sn_e2e_scenario.svh`. It compares every pulse
cycle with the reference model in `tb/sn_ref_pkg.sv`: the spike decision,
`Y`, the leak and saturation flags, and the exact latency. The runs cover each
activation function, connected and unconnected synapses, and saturation in
both directions. They also cover spikes arriving while the neuron is busy and
ticks that must be ignored. The scenario counts each of these mechanisms and
fails if one never occurs.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/sn_pkg.sv tb/sn_ref_pkg.sv tb/tb_spiking_neuron_full.sv \
        --top-module tb_spiking_neuron_full -o sim
    ./obj_dir/sim

Each run finishes in well under a second.
