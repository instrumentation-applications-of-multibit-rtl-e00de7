# Multibit random-data instrumentation and neural network in SystemVerilog

Stochastic ("random-pulse") computing represents an analog quantity by the probability of a
pulse in a random bit stream. A single AND gate then multiplies, and a multiplexer with a random
select adds. The price is time: a one-bit stream needs very many samples before its average is
accurate. This design widens each sample from one bit to two, so a sample takes one of the three
levels −1, 0 and +1. A value x in [−1, +1] is carried by a stream of such samples whose mean is
x. The arithmetic remains a handful of gates. For the same accuracy, the number of samples that
must be averaged drops by roughly an order of magnitude. A three-level correlator, for example,
needs about 12.5 times fewer samples than a two-level one.

The design builds these blocks from that representation and uses them in three applications:

* a **serial correlator**, which estimates the correlation of two analog signals at a chosen lag;
* an **analog/digital converter**, which estimates an analog input;
* a **30-neuron auto-associative memory** (a Hopfield-style single-layer network). It stores
  three 6×5 pixel digits and recalls a digit from a corrupted copy. Its weights, inputs and
  neuron outputs are all random-data streams.

## The three-level code

Every random-data sample is a 2-bit ones'-complement word (`mrd_pkg::rd_t`):

| code | value |
|------|-------|
| `00` | 0     |
| `01` | +1    |
| `10` | −1    |
| `11` | never produced; read as 0 |

The code was chosen for the multiplier. With it, the product of two samples needs only two
AND-OR terms per bit:

    Z_MSB = X_LSB·Y_MSB + X_MSB·Y_LSB
    Z_LSB = X_MSB·Y_MSB + X_LSB·Y_LSB

A stream stands for the mean of its samples. Each block below produces or consumes one sample
per clock.

## Converting into and out of random data

**Analog to random data** (`ard_converter`, a behavioural model). A dither R, uniform over
[−Δ/2, +Δ/2), is added to the input V, the sum is rounded to the nearest level, and each clock
edge samples it. Take an input between the levels k−1 and k, at distance β·Δ below k. It gives
k−1 with probability β and k otherwise, so the mean is exactly V/Δ. The real converter is analog:
a noise source, a summer and a quantizer. The model uses `real` arithmetic and `$urandom`, and
the levels saturate at ±1.

**Digital to random data** (`dig_to_rd`, synthesizable). This is the same dithered quantizer
in digital form. The value `d` is fixed point with FRAC fraction bits (+1.0 = 2^FRAC). The block
adds a FRAC-bit uniform random number and keeps the integer part: floor(d + U). A neuron uses it
to turn its digital result back into a stream.

**Random data to digital** (`rd_moving_average`). It averages the last N samples. Rather than
re-summing the window every clock, it keeps a running sum: each clock it adds the new sample and
subtracts the sample leaving the window. The window itself is an N-stage delay line. The output
`sum` is an integer in [−N, +N], and the estimate is `sum/N`. With the default N = 32 that is
simply a binary point five places from the right. A short window tracks changes quickly but is
noisy: with N = 32 the estimate has a standard deviation of about 0.1 for a typical stream.

## Arithmetic on streams

**Multiplier** (`rd_multiplier`) is the two equations above, with no clock. If the two operand
streams are statistically independent, the mean of the product stream is the product of their
means.

**Stochastic adder** (`rd_adder`). Each clock a random number picks one of the M inputs. A
1-out-of-M decoder drives select lines S_1..S_M. Each input is ANDed with its select line and
the results are ORed. The output stream carries (X_1 + … + X_M)/M: a scaled sum, not a sum.
The random choice also breaks correlations between inputs that happen to have similar sample
patterns. The index is floor(r·M/2^16) for a 16-bit random r. For M = 30 this is uniform to
within 0.05 %.

**Random numbers** (`mrd_rng`). Each block that needs randomness has its own 32-bit xorshift
generator (shifts 13, 17, 5), advanced once per clock. The seeds differ per instance. In
particular, every neuron gets independent scanning and dither.

## Correlator

`rd_correlator` passes VRD2 through an R-stage delay line (`rd_delay_line`). It multiplies the
result with VRD1 and averages the product stream over N samples:

    cor_sum / N  ≈  E[ V1(n) · V2(n − R) ]

In `mrd_top` two `ard_converter` instances feed it. Their dithers are independent, so the
quantization noise of one input does not correlate with the other's.

## The neural network

This is the part that needs the most explanation.

### Synapse: a weight that is a stream

A synapse (`rd_synapse`) does not store its weight as a number. It stores **N samples of a
random-data stream** whose mean is the weight. They sit in an N-stage delay line whose output
feeds back to its input, so the samples circulate forever and the synapse presents one weight
sample per clock. That sample times the input sample X_i is the synapse output DT_ij.

Loading is serial. While `mode` is low, `synadd` is decoded (`syn_addr_decoder`) into one select
line. The selected synapse takes its delay-line input from `datin` instead of its own output. N
clocks of `datin` samples therefore replace the whole weight, while every other synapse keeps
circulating. With `mode` high, no synapse can be written. The weight's resolution is 1/N. With
N = 32, a weight of 1/3 is stored as 11 non-zero samples out of 32 (0.344).

Timing: the weight sample after a load's last clock is the first sample that was loaded, and the
sequence repeats with period N.

### Neuron body

`rd_neuron_body` chains four stages:

1. a 30-input stochastic adder over DT_1j..DT_30j, giving a stream of mean (1/30)·Σ_i w_ij x_i;
2. a moving average over NAVG = 32 samples (`n_sum`);
3. a hard-limit activation (`rd_activation`): +1 if `n_sum` ≥ 0, else −1;
4. a digital/random-data converter, giving the output stream Y_j.

With a ±1 activation output, Y_j is simply the code of the decision. Keeping the converter
leaves room for graded activation functions.

A sample enters the window at one clock edge. The decision changes combinationally, and Y_j
follows at the next edge. Because the integrated value is an estimate, a neuron whose true input
is close to 0 flickers between +1 and −1. Decisions should be read over time: the sign of
`n_sum` averaged over many clocks, or the majority of `a_j`.

### Auto-associative memory

`aam_network` has 30 inputs and 30 neurons, joined by 900 synapses. Synapse S_ij connects input i
to neuron j, and its address is `synadd = j·30 + i`. The neurons run only while `mode` is high.
The network computes a single pass, a = hardlim(W·P), with no feedback of outputs to inputs.

The stored patterns are the digits 0, 1 and 2 on a 6×5 grid. A black pixel is +1 and a white
pixel is −1. A grid is scanned column by column into a 30-element vector, so element c·6 + r
holds row r of column c. The Hebbian weight matrix is W = P1·P1ᵀ + P2·P2ᵀ + P3·P3ᵀ, with entries
−3, −1, +1 and +3. A stream can only carry values in [−1, +1], so each weight is loaded as W/3,
which does not change any sign. Computing W and producing the 32 loading samples of each weight
is the job of whoever drives `datin`; the testbenches do it. For a stored digit, the
neuron inputs are about ±0.3 against a window noise of about 0.1. The digit is then recovered in
every pixel once the decisions are read over time.

## Top level

`mrd_top` places the three applications side by side. They share only the clock and the reset:

* correlator: `v1`, `v2` (analog, `real`) → `vrd1`, `vrd2`, `cor_sum`, `cor_full`;
* A/D converter: `v_adc` → `adc_sum`, `adc_full`;
* memory: `mode`, `synadd`, `datin`, `x[30]` → `y[30]`, `a`, `n_sum[30]`.

The analog front ends are behavioural models, so `mrd_top` and `rd_adc` simulate but do not
synthesize. Everything else is synthesizable. Reset (`rst_n`, active low, asynchronous) clears
every delay line, weight and sum to the code of 0.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `NI` | 30 | `aam_network`, `mrd_top` | inputs = neurons (6×5 grid) |
| `NW` | 32 | `aam_network`, `rd_synapse` (`N`) | samples per stored weight |
| `NAVG` | 32 | `aam_network`, `rd_neuron_body` (`N`) | neuron integration window |
| `N` | 32 | `rd_moving_average`, `rd_correlator`, `rd_adc` | averaging window |
| `R` | 8 | `rd_correlator`, `mrd_top` | correlation lag in clocks |
| `M` | 30 | `rd_adder`, `rd_neuron_body` | adder inputs |
| `FRAC` | 8 | `dig_to_rd`, `rd_activation` | fraction bits of digital values |
| `DELTA` | 1.0 | `ard_converter`, `rd_adc` | level spacing of the analog converter |

Only the network size (30 inputs, 900 weights) and the 32-sample window (the example window of
the method) come from the design's description. The lag R, the weight length NW, the neuron
window NAVG, FRAC, the random generator and all seeds are this implementation's own choices.

## Departures and open points

* The weight scale W/3 and the address order `j·30 + i` are this implementation's choices.
* The activation is a symmetric hard limit (±1), because the network's targets are ±1 pixel
  patterns. It is not the 0/1 step that the name "hardlim" often denotes. At exactly 0 it gives +1.
* Only the three-level (2-bit) representation is built. Correlators with 2, 4 or 8 levels, and
  the one-bit random-pulse converters, are not.
* The delay-line shift and the weight recirculation run on every clock, also during loading.
* A digital voltmeter would add a display to `rd_adc`; no display is modelled.
* The neuron windows are short (32), so the outputs are noisy, as expected for this method.
  Averaging the decisions over time, as the testbenches do, is part of using the network.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each ends by printing
`TB_RESULT checks=N failures=F`. Example with Verilator 5:

    verilator --binary --timing --assert -y rtl +libext+.sv -Irtl \
        rtl/mrd_pkg.sv tb/tb_mrd_top.sv --top-module tb_mrd_top -o sim
    ./obj_dir/sim

`tb_mrd_top` and `tb_aam_network` run the full-size network. They load all 900 weights
(28,800 clocks), then recall each digit and a copy with 9 of its 30 pixels inverted. They compare
every neuron with an exact model of W·P that uses the loaded weights. `tb_mrd_top` also drives
the correlator with square waves at matched and unmatched lag and with constants, and the A/D
converter with constants. It counts that every mechanism occurred. Building either full-size
testbench takes about two minutes; the simulation then takes under a second. The unit
testbenches compare against independent models: exhaustive tables for the multiplier, decoder
and activation, and cycle-exact sums for the delay line, moving average and correlator. For the
random blocks (adder, converters, neuron body) they check statistical bounds.

Statistical checks use tolerances of several standard deviations. They pass for the seeds and
random reset values tried, but a different seed can in principle cross a bound.

## Files

`rtl/`: `mrd_pkg` (code and helpers), `mrd_rng`, `rd_multiplier`, `rd_adder`, `rd_delay_line`,
`rd_moving_average`, `dig_to_rd`, `ard_converter` (behavioural), `rd_adc` (behavioural),
`rd_correlator`, `syn_addr_decoder`, `rd_synapse`, `rd_activation`, `rd_neuron_body`,
`aam_network`, `mrd_top`. `tb/`: one testbench per module.
