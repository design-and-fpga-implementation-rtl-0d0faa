# Neuromorphic spike encoders and LSM readout layer

This is a synthesizable SystemVerilog front end for spiking neural networks. It turns
16-bit input samples into spike trains with three encoders, and it adds the
readout layer of a liquid state machine (LSM) that learns on chip:

| Part | What it does | Clocks per sample / step |
|---|---|---|
| Rate encoder array | 16 encoders in parallel. Each fires when the sample is larger than a dual-LFSR random number. | 16 |
| TTFS encoder | Time-to-first-spike: fires when the sample crosses an exponentially decaying threshold. The exponential is a shift-and-add unit, not a ROM. | 40 |
| Multiplexing encoder | Builds an ISI (burst) spike train, then moves every spike to the next rising edge of a PWM reference. | 34 |
| LSM readout layer | Two LIF readout units with R-STDP learning. Weights live in a pipelined dual-port RAM, and a temp memory keeps the best weights. | 22 (39 with learning) |

Three baseline encoders run alongside, for comparison. They are the conventional designs the proposed encoders improve on:

* a rate encoder with one LFSR per time step;
* a TTFS encoder with a 40-entry threshold ROM;
* a binary phase encoder, the classic phase code that the PWM phase stage of the multiplexing encoder replaces.

Everything runs on one clock with a synchronous active-low reset (`rst_n`). The top
level is `neuro_encoder_top`. The three encoders are alternative front ends, so each
has its own sample input and its own outputs (`rate_*`, `ttfs_*`, `mux_*`). The
baselines share the `start` and sample inputs of their counterparts and have their
own outputs (`rate_base_*`, `ttfs_base_*`). The phase encoder has its own
`phase_load`, `phase_data` (8 bits) and `phase_spike`. The
readout layer (`lsm_*`) takes a 16-bit spike record from a reservoir. That reservoir
is not part of this design, so the spike record is an input port of the top.

## Number formats

* Encoder samples are 16-bit unsigned values.
  * The rate encoder compares the raw 16 bits (full scale `16'hFFFF`) with a 16-bit random number.
  * The TTFS and ISI/multiplexing encoders read the sample as Q1.15, where `16'h8000` = 1.0. Larger values count as 1.0.
* The TTFS time axis is Q6.10: 6 integer bits and 10 fraction bits.
* The exponential unit returns Q1.15.
* Synaptic weights are signed 16-bit, clamped to [-2048, 2047]. The membrane potential and threshold are signed 16-bit and saturate.

## Rate encoder (`lfsr16_fib`, `lfsr16_galois`, `rate_encoder`, `rate_encoder_array`)

Each encoder has two free-running 16-bit LFSRs with the same polynomial,
x^16 + x^14 + x^13 + x^11 + 1:

* a Fibonacci one, which shifts B0→B15 with XOR feedback into B0;
* a Galois one, with mask `16'hB400`.

XORing the two states gives a random number that is less predictable, and less
correlated between neighbouring encoders, than either register alone.

A sample is latched on `start`. Sixteen clocks later (`RAND_PERIOD`), `spike_valid`
is high for one clock, and `spike = data > random`.

`rate_encoder_array` runs 16 such encoders on the same sample, each with its own
seeds. It delivers a 16-bit spike word every 16 clocks. The number of ones in that
word, divided by 16, estimates the sample.

## TTFS encoder (`exp_approx`, `ttfs_encoder`)

The threshold is exp(-t/tau_th). A time counter advances by `X_STEP` = 1024/tau_th per
clock. The default is 128, i.e. tau_th = 8 steps.

`exp_approx` computes exp(-x) as 2^(-1.4375·x):

1. It forms p = x + x/2 − x/16 with shifts and adds.
2. It splits n = −p into an integer part i and a fraction f.
3. It approximates 2^f by the mantissa 1+f and shifts that mantissa right by −i.

The result is purely combinational and needs no table.

`ttfs_encoder` works as follows:

* It registers the threshold.
* At step k = 0..39 (clock k+1 after `start`), it fires if the sample is larger than exp(−k·X_STEP/1024).
* A refractory register is cleared at the start of each sample. It grows by `T_REF` on every spike, and a spike is allowed only while the time counter has reached that register.
* The default `T_REF` (40 steps) is longer than the window, so each sample gets exactly one spike, at its first crossing, or none. A smaller `T_REF` allows later spikes.

Outputs are `spike`, `step_valid`, `step` and `done`. `done` is high on the last
step, so a sample takes 40 clocks.

## Baseline encoders (`rate_encoder_lfsr_array`, `ttfs_encoder_rom`, `phase_encoder`)

`rate_encoder_lfsr_array` has 16 lanes. Each lane has one Fibonacci LFSR (the same polynomial and seed as the
Fibonacci half of the proposed lane) and one comparator. The random number of a lane
is therefore a single, fully predictable LFSR sequence.

`ttfs_encoder_rom` has the same counter, comparator and refractory loop as
`ttfs_encoder`. Its threshold comes from a registered 40 × 16 ROM holding
round(32768·e^(−k/8)), i.e. the exact values that the shift-and-add unit approximates.
Its refractory register counts steps, and its default `T_REF` is 40.

The rate and TTFS baselines have exactly the timing and handshake of their counterparts, so the same
sample can go to both in the same clock.

`phase_encoder` is an 8-bit register with parallel load that rotates by one stage per
clock. The last stage is the spike output and is fed back to the first stage. After
`load`, the spikes are the sample's bits, most significant first. They repeat every 8
steps, and step t carries weight 2^−(1+((t−1) mod 8)). Decoding one period returns the
8-bit sample exactly, so its only error is the 8-bit quantisation.

## Multiplexing encoder (`isi_encoder`, `pwm_generator`, `pwm_edge_detect`, `pwm_align`, `multiplexing_encoder`)

**ISI stage.** A normalised sample A becomes a burst:

* Ns = ceil(NMAX·A) spikes;
* the spikes are ISI = TMAX − floor((TMAX−TMIN)·A) steps apart, or TMAX when Ns ≤ 1.

The defaults are NMAX = 8, TMAX = 6 and TMIN = 2. Both products are shifts because
NMAX and TMAX−TMIN are powers of two. The spikes fall at steps ISI, 2·ISI, ... of a
16-step window. Spikes that would land after step 16 are not generated. Start takes
one clock and the window takes 16, so this stage needs 17 clocks.

**PWM reference.** `pwm_generator` makes a square wave with a period of 4 steps, high
for 2 steps. `pwm_edge_detect` marks its rising edges with `pwm & ~previous`. In the
16-step window those edges fall at steps 4, 8, 12 and 16. They are collected into a
16-bit edge train in the same clocks as the ISI stage.

**Alignment.** `pwm_align` loads both trains into left-shifting registers, so the MSB
is always the current step. A one-bit *pending* register holds a spike that is still
waiting for an edge. At each step:

```
out     = (isi_msb | pending) & edge_msb
pending = (isi_msb | pending) & ~edge_msb
```

The effects are:

* every ISI spike moves to the next rising edge;
* spikes that wait for the same edge merge into one;
* a spike that lands on an edge leaves at that edge;
* a spike still pending after the last edge is dropped.

The aligned train is shifted into an output register. This stage also takes 17
clocks.

**Timing.** `done` is high in the 34th clock counted from the `start` clock. The top
then holds these trains, each with bit 15 = step 1:

* `mux_train`, the aligned train;
* `mux_isi_train` and `mux_edge_train`, the intermediate trains.

`mux_spike` and `mux_valid` give the aligned train serially.

## LSM readout layer (`dp_ram`, `ru_learning_engine`, `ru_spike_generator`, `readout_unit`, `lsm_readout`)

`lsm_readout` holds two readout units, one per class (idle or busy sub-carrier).
Both units see the same 16 spike-record bits at every time step, and each counts
its own output spikes. The class whose unit fired more is the decision. Unit r
learns only when its teacher bit `ct[r]` is high.

**Readout unit sequence.** Each unit runs one time step as a fixed sequence:

1. **INTEG.** The 16 weights are read one per clock. The weights of the inputs that spiked are summed.
2. **FIRE.** The spike generator updates its state (below).
3. **SHIFT.** The input spikes and the new output spike enter the spike histories.
4. **LEARN** (optional). One learning sweep over all 16 synapses.

Counted from the `step_start` clock to the `step_done` clock, a step takes 22 clocks
without learning and 39 with it.

**Spike generator.** This is a leaky integrate-and-fire neuron:

* V ← V − V/8 + ΣW·S. If V > Vth, the neuron spikes and V is reset to 0.
* Vth = 256 + A. The adaptive part A grows by 64 on each spike and decays by A/16 per step.

**Learning engine.**

* **Spike histories.** Each synapse and the output have a 12-deep spike history, newest bit first.
* **Timing difference.** For each synapse, a priority encoder measures dt:
  * if the unit fired now, the nearest earlier (or simultaneous) input spike gives +k, which means potentiation;
  * otherwise, if the input fired now, the nearest earlier output spike gives −k, which means depression.
* **Update gate.** |dt| addresses a probability LUT holding 2^(−|dt|/2) in 16 bits. An update is enabled (ENA) when a 16-bit LFSR number is below that probability. The weight changes only when ENA and `ct` are both high.
* **Update size.** The change is the STDP LUT value round(32·2^(−|dt|/2)). The result is clamped.
* **Weight memory.** The weights live in `dp_ram`, a registered-read dual-port RAM. It is used as a two-stage read/modify-write pipeline, so the 16 synapses take 17 clocks.
* **Temp memory.** At `iter_end` the engine compares the iteration's loss with the previous one:
  * if loss + C < previous loss, the current weights are copied into the temp memory (`saved`);
  * otherwise the best weights are copied back (`restored`).
* **Host port.** Weights can be written and read while the unit is idle.

## Parameters (defaults)

| Module | Parameter | Default |
|---|---|---|
| rate_encoder | RAND_PERIOD | 16 |
| rate_encoder_array | N_ENC | 16 |
| ttfs_encoder | T_WINDOW, X_STEP, T_REF | 40, 128 (tau_th = 8), 40·128 |
| ttfs_encoder_rom | T_WINDOW, T_REF | 40, 40 (steps) |
| rate_encoder_lfsr_array | N_ENC, RAND_PERIOD | 16, 16 |
| phase_encoder | N | 8 |
| isi_encoder | WINDOW, NMAX, TMAX, TMIN | 16, 8, 6, 2 |
| pwm_generator | PERIOD, HIGH | 4, 2 |
| lsm_pkg | N_RU, N_PRE, HIST, STDP_A | 2, 16, 12, 32 |
| ru_spike_generator | TAU_MEM_SH, TAU_TH_SH, VTH0, C_TH | 3, 4, 256, 64 |
| ru_learning_engine | W_MIN, W_MAX, LOSS_C | −2048, 2047, 0 |

## Simulated accuracy

`tb_neuro_encoder_top` generates four 1000-sample test signals:

* **NS:** a noisy sum of sines;
* **SS:** a smooth noisy sine;
* **CRF:** a rising signal with a sigmoid step;
* **SW:** a staircase.

The original signals are not available, so these are stand-ins of the same length
and kind. Every sample goes through all encoders, and the trains are decoded in
the testbench:

* rate: spike count / 16;
* TTFS, ISI and multiplexing: the mean sample value that produces the same train;
* phase: the sum of the bit weights of the first period.

One run gave these RMSE values. "ISI" decodes the intermediate ISI train of the
multiplexing encoder, i.e. plain burst coding. The phase baseline (8-bit binary code,
not noise-robust) decodes to RMSE 0.002 on every signal, which is its quantisation
error.

| Signal | Rate | Baseline rate | TTFS | Baseline TTFS (ROM) | ISI | Multiplexing |
|---|---|---|---|---|---|---|
| NS | 0.109 | 0.113 | 0.020 | 0.021 | 0.069 | 0.114 |
| SS | 0.101 | 0.100 | 0.019 | 0.021 | 0.060 | 0.104 |
| CRF | 0.088 | 0.090 | 0.019 | 0.022 | 0.053 | 0.101 |
| SW | 0.087 | 0.081 | 0.025 | 0.032 | 0.030 | 0.133 |

Observations:

* **Rate.** The proposed encoder's figures are close to those published for it (0.08–0.14).
* **Baseline rate.** It does about as well here. The published large gap (about 0.33 for the existing encoder) is not reproduced: with distinct seeds per lane, a single 16-bit LFSR is already a good enough random source for this test.
* **TTFS vs ROM.** The shift-and-add TTFS encoder loses almost nothing against the exact ROM thresholds. That is the point of replacing the ROM.
* **TTFS vs published.** The absolute TTFS figures are far better than the published ones (about 0.2), because this decoder is a lookup of the mean sample per first-spike step.
* **Multiplexing.** It is worse than plain ISI here. With a PWM period of 4 steps, a spike can only sit at steps 4, 8, 12 or 16, so different ISI trains collapse onto the same aligned train. The published multiplexing figures (about 0.075, equal to ISI) are not reached with this default. The PWM reference is a parameter of the multiplexing encoder (`PWM_PERIOD`, `PWM_HIGH`), but the testbench's reference model assumes the default period of 4, so it must be adapted before another period is scored.

## Where this design goes beyond, or differs from, the source thesis

* **Not built: the LSM reservoir.** This covers its 16 learning units, recurrent connectivity and spike-record register. Only its existence is described, so the spike record is an input port.
* **Not built: the spectrum-sensing classification experiment.** It needs the reservoir and a dataset. The top-level testbench instead feeds rate-encoded samples into the readout layer as a spike record. This exercises learning and the save/restore path, but it is not a meaningful classifier: misclassification stays near chance.
* **Not reproduced: resource and Fmax figures.** Those are vendor-tool results for a Zynq-7000.
* **Chosen here:** LFSR taps and seeds. The taps are read from the gate positions of the LFSR figure, and the seeds are not given.
* **Chosen here:** tau_th, T_REF and the Q1.15/Q6.10 formats of the TTFS encoder.
* **Chosen here:** NMAX, TMAX and TMIN of the ISI encoder, and how the window is truncated.
* **Chosen here:** the PWM period and duty. The thesis only says the reference can be produced from the clock.
* **Chosen here:** whether a spike that coincides with an edge leaves at that edge, and the dropping of spikes still pending at the end of the window.
* **Chosen here:** the probability and STDP LUT contents, the weight bounds and the learning-rate constant. The thesis says these LUTs were calibrated in software and gives no values.
* **Chosen here:** the spike-generator constants, and adding the threshold increment only on a spike.
* **Chosen here:** the readout sequencing and the handshakes (`start`/`done`, `step_start`/`step_done`, `busy`).
* **Differs: STDP sign.** The thesis calls a positive Δt "post-before-pre" and says it potentiates. This design uses the causal order of its STDP equations instead: an input spike before the output spike potentiates, and an input spike after it depresses.
* **Differs: history shifting.** The thesis says the histories shift only when the neuron spikes. This design shifts every history once per time step, so that Δt counts time steps.
* **Differs: exp shift amount.** The thesis shifts the exp mantissa by the "count of true bits" of the integer part. This design shifts by the magnitude of the integer part, which is what makes the result equal to 2^int·(1+f).
* **Differs: spike-record timing.** The thesis adds W_i when input i fired in the previous step. Here the spike record presented with `step_start` is integrated in that step, and it is up to the source to present the previous step's spikes.

## Files

* `rtl/encoder_pkg.sv`, `rtl/lsm_pkg.sv`: shared types, constants and the LUT functions.
* `rtl/*.sv`: one module per file, named after the module.
* `tb/tb_<module>.sv`: a self-checking testbench for each module. Each prints `TB_RESULT checks=N failures=M`.

## Simulating

The design uses Verilator 5 with `--timing`. To run a testbench:

```
verilator --binary --timing -Irtl rtl/encoder_pkg.sv rtl/lsm_pkg.sv \
  -y rtl -y tb tb/tb_neuro_encoder_top.sv --top-module tb_neuro_encoder_top
./obj_dir/Vtb_neuro_encoder_top
```

The end-to-end testbench does the following:

* runs 4 × 1000 samples through every encoder;
* checks the TTFS, multiplexing and phase trains and every latency against models (the rate trains are checked bit by bit in the unit testbenches);
* trains the readout layer;
* checks that each mechanism of the design happened at least once.

The mechanisms are: rate spike and silence, TTFS spike, no spike and refractory
suppression, ISI Ns ≤ 1 and truncation, alignment shift and merge, LIF firing,
potentiation, depression, weight save and weight restore, and a phase spike. The
run takes a few seconds.
