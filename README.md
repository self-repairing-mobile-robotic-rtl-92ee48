# Self-repairing robot-car controller on a spiking astrocyte-neuron network

This design steers a two-wheeled robot car with two spiking neurons. Each neuron's
output spike rate sets the speed of one wheel. The car runs straight only while
both neurons fire at the same rate. The neurons are fed by unreliable,
probabilistic synapses, and synapses can fail. The design keeps the rates
matched anyway. An *astrocyte* (a model of a glial cell) couples the two neurons,
and with the neurons' own feedback it raises the release probability of a
neuron's surviving synapses when some of its other synapses fail. Nothing checks
for faults explicitly: the repair comes out of the network's feedback loops.

The RTL is synthesizable SystemVerilog. It contains the whole controller: the
network of 2 neurons with 10 synapses each plus 1 astrocyte, and per wheel a
frequency meter, a moving-mean filter, a frequency-to-duty map and a 500 Hz PWM
generator. The H-bridge motor drivers, the motors and the monitoring PC are
outside the chip. The probed internal signals come out as ports.

## How the self-repair works

Every synapse transmits an incoming spike with release probability **PR**. Two
signals move PR, working in opposite directions:

* **DSE** (depolarisation-induced suppression of excitation) is *local*. Each
  time a neuron fires it releases the messenger 2-AG, which builds up and decays
  slowly. DSE is proportional to the 2-AG level and negative. It lowers PR on that
  neuron's own synapses only. A neuron that fires more suppresses its own inputs
  more, which is negative feedback on each neuron.
* **e-SP** (astrocyte-driven potentiation) is *global*. The astrocyte collects
  the 2-AG of both neurons and turns it into a slow positive signal, e-SP, which
  raises PR on every synapse of both neurons.

Both act on PR in percent of the starting value PR0 = 0.5:

    PR = PR0 + PR0 * DSE/100 + PR0 * eSP/100        (clamped to 0..1)

In the healthy state this settles at DSE ≈ −220 %, e-SP ≈ +180 % and PR ≈ 0.27,
and each neuron fires at about 7–8 Hz. Suppose some synapses of neuron 2 fail:
their PR is forced to 0.1. Neuron 2 then fires less, so its 2-AG and DSE shrink,
while e-SP, fed by both neurons, barely changes. The balance on neuron 2's
**healthy** synapses tips toward e-SP, their PR rises, and neuron 2's rate returns
close to neuron 1's. In simulation (600 s, fault injected at 200 s):

| faulty synapses on neuron 2 | mean PR of a healthy synapse | mean f′ left / right | right wheel |
|---|---|---|---|
| 0 of 10  | 0.28 | 7.5 / 7.5 Hz | same duty as left |
| 2 of 10  | 0.32 | 7.4 / 7.1 Hz | same duty as left |
| 4 of 10  | 0.37 | 7.4 / 6.9 Hz | same duty, short dips to 20 % (9 % of the time) |
| 8 of 10  | 0.62 | 7.2 / 4.9 Hz | 20 % instead of 40 % duty: the car drifts |

Up to 40 % faulty synapses, the wheel speeds stay matched. At 80 % the repair is
not enough, and neuron 2's rate settles lower.

## One time step

The network is advanced in discrete time steps of 1 ms. A step timer in
`sann_robot_top` issues a step every `STEP_CYCLES` = 200 000 cycles, which is 1 ms
at 200 MHz. A one-hot phase sequencer then computes the step in 6 cycles:

| phase | what happens |
|---|---|
| 1 | every synapse draws a random number and transmits if an input spike is present and rand < PR. PR uses the DSE and e-SP of the previous step |
| 2 | each neuron adds its synapse currents, leaks, and fires at 9 mV |
| 3 | 2-AG/DSE update from the new spike; the frequency meters count it |
| 4 | the astrocyte advances IP3 → Ca²⁺ → glutamate → e-SP; the moving-mean filters take a sample |
| 5–6 | the moving-mean filters finish; `step_done` pulses |

The duty maps and PWM generators run continuously and are independent of the
step. The design is real-time with a lot of headroom: 6 cycles are used out of
200 000, and the whole computation fits far inside a 2 500-cycle budget per step.

## Number formats

All continuous state uses `fx_t` from `sann_pkg`: signed 40-bit fixed point with
24 fraction bits, a range of ±32768 and a resolution of 6·10⁻⁸. That covers
membrane voltage (mV), 2-AG, IP3, Ca²⁺, glutamate, and DSE/e-SP in percent, with
one format everywhere. Probabilities are unsigned Q0.16 in 17 bits (65536 =
1.0), and random numbers are 16-bit fractions in [0,1). Every time constant is a
power of two of steps. Each first-order update is therefore `x += (target − x)
>>> S` with no divider, which is also how the moving mean divides.

## The network blocks

**Synapse (`sann_synapse`, with `sann_rng`).** The synapse computes PR
combinationally from DSE and e-SP with two multipliers, the two "PR adjustors".
`fault_ena` overrides PR with 0.1 and ignores DSE and e-SP; this is how a dead
synapse is emulated, permanently or temporarily. The random source is a 32-bit
xorshift per synapse, seeded from the `seeds` port while reset is active. The
output current is the constant `I_INJ` (1.0) for one step.

**Neuron (`sann_lif_neuron`).** A leaky integrate-and-fire neuron:
`v += (R_M·ΣI − v) / 2^7`, so τ_m = 128 ms and one transmitted spike adds
512/128 = 4 mV. At v ≥ 9 mV it spikes and resets to 0. It then ignores its
input for 2 steps (2 ms refractory).

**DSE generator (`sann_dse_generator`).** 2-AG rises by 1.0 per spike and decays
with τ_AG = 16.4 s. DSE = −1.75 · 2-AG. At 7 Hz, 2-AG settles near 115, which
gives DSE ≈ −200 % after about 100 s.

**Astrocyte (`sann_astrocyte`).** This block is the hardest to follow, so in detail:

1. IP3 relaxes toward `IP3* + 0.0037·(AG₁ + AG₂)` with τ = 1.02 s, where
   IP3* = 0.16. With both neurons at 7 Hz this gives IP3 ≈ 1.0.
2. Calcium follows `dCa = J_chan + J_leak − J_pump` with
   `J_chan = 0.002·IP3·h`, `J_leak = 0.0001` and `J_pump = Ca/512`.
   The gate `h` makes calcium oscillate. It relaxes (τ = 64 ms) toward 0 after Ca
   has passed 0.5, and back toward 1 after Ca has fallen below 0.15. Ca rises
   while the channel is open, overshoots 0.5, the channel closes, the pump
   drains Ca below 0.15, and the cycle repeats. More IP3 makes the rise, and so
   the whole cycle, faster. Too little IP3 and Ca never reaches 0.5, so the
   oscillation stops.
3. Each step in which Ca rises through 0.3 releases 1.0 unit of glutamate,
   which decays with τ = 128 ms. `probe_ca_release` marks these steps.
4. e-SP relaxes toward `1750·Glu` with τ = 32.8 s. This is slow enough to
   average the calcium pulses into a smooth level of about +180 %.

The equations for IP3, glutamate and e-SP are the standard astrocyte model. The
three calcium fluxes here are the simplest forms that give IP3-controlled
oscillation. They are not the full Li–Rinzel channel kinetics, so expect
different oscillation shapes, not a different role.

## The motor path

* **Frequency meter (`sann_freq_meter`).** Counts spikes over a 1000-step (1 s)
  window and holds the count (Hz) until the next window ends.
* **Moving mean, FMMM (`sann_fmmm`).** The filter averages the last 2¹⁴ = 16384
  frequency samples, one per step, so the window is 16.4 s. The FIFO is a
  circular buffer RAM: in cycle 1 of a sample the entry about to be overwritten
  (the one leaving the FIFO) is read; in cycle 2 it is replaced. A running sum
  adds the entering value and subtracts the leaving one, and f′ = sum >> 14.
  Until the buffer has filled once, f′ is held at 0. An assertion flags samples
  closer than 2 cycles apart.
* **Frequency-to-duty map (`sann_spike_to_pwm`).** A staircase on the 8-bit duty
  scale. f′ < 5 Hz gives 0; 5–6 Hz gives 51 (20 %); 7 Hz and above gives 102
  (40 %). Inputs above f′max = 10 Hz are clamped first. The steps match the
  operating points the car is known to show (7 Hz ↔ 40 %, 5–6 Hz ↔ 20 %). Other
  applications would change `F_LO/F_HI/D_LO/D_HI`.
* **PWM controller (`sann_pwm_controller`).** An 8-bit counter advanced every
  `PRESCALE` = 1562 cycles. The period is 256 × 1562 cycles, i.e. 500.16 Hz at
  200 MHz. The output is high while counter < duty. A new duty is taken only at
  the period boundary. `pwm[0]` drives the left wheel (neuron 0) and `pwm[1]`
  the right wheel (neuron 1). Only the speed/enable signal is produced; the
  H-bridge direction inputs are not driven.

## Top-level interface (`sann_robot_top`)

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | 200 MHz clock, asynchronous active-low reset (also loads the seeds) |
| `in_spikes[n]` | NSYN | input spike of each synapse of neuron n, sampled once per step |
| `fault_ena[n]` | NSYN | force PR = 0.1 on that synapse |
| `seeds[n][s]` | 32 | random seed per synapse (0 is replaced by a constant) |
| `pwm` | NNEU | wheel PWM outputs |
| `step_done` | 1 | pulse when a step's computation ends |
| `probe_*` | — | PR of every synapse, membrane voltage, spikes, 2-AG, DSE, e-SP, IP3, Ca²⁺, glutamate, calcium-release pulse, frequency, f′, duty, FIFO full/done, PWM period start |

Main parameters: `NNEU` = 2, `NSYN` = 10, `STEP_CYCLES` = 200000,
`CLK_HZ` = 200 000 000, `PWM_HZ` = 500, `FMMM_K` = 14, `WIN_STEPS` = 1000,
`FREQ_W` = 9. The model constants are parameters of the individual blocks, with
the values given above as defaults. After coarse synthesis the top has about 1 800
flip-flop bits and 2 × 147 456 RAM bits for the two moving-mean FIFOs.

## What is specified and what is chosen here

The following are fixed design facts: the structure (two neurons, ten synapses
each, one astrocyte, a moving mean, a duty map and a PWM controller per wheel);
PR0 = 0.5; faulty PR = 0.1; the 9 mV threshold; the 2 ms refractory period; the
2¹⁴-deep moving mean divided by a shift; 500 Hz PWM with 256 levels; f′max =
10 Hz; a 200 MHz clock; under 2 500 cycles per step.

These are this design's own choices:

* the 1 ms time step;
* every rate, gain and time constant of the network, tuned so the healthy state
  sits near DSE −200 %, e-SP +190 %, PR 0.25 and 7 Hz;
* the form of the calcium fluxes (above);
* the frequency measurement by 1 s spike counts;
* f′ held at 0 while the FIFO fills;
* the breakpoints of the duty staircase;
* the random generator;
* the number formats;
* the order of updates within a step.

The PR law is read as `PR0·(1 + DSE/100 + eSP/100)`. Without the leading PR0
term, PR would start at 0 rather than 0.5.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end and stops itself via a watchdog. With
Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl rtl/sann_pkg.sv \
        tb/tb_sann_robot_top.sv --top-module tb_sann_robot_top -o sim
    ./obj_dir/sim

| testbench | what it runs | time |
|---|---|---|
| `tb_sann_rng`, `tb_sann_synapse`, `tb_sann_lif_neuron`, `tb_sann_dse_generator`, `tb_sann_astrocyte`, `tb_sann_freq_meter`, `tb_sann_fmmm`, `tb_sann_spike_to_pwm`, `tb_sann_pwm_controller` | each block against a reference model written in the testbench | seconds |
| `tb_sann_robot_top` | 300 s of car operation with a temporary single-synapse fault at 60–90 s and a 40 % fault at 150 s. It checks every f′ against its own moving mean, the duty map, PWM high times, the healthy operating point and the repair, and counts that every mechanism occurs | ~15 s |
| `tb_sann_fault_rates` | the four 600 s experiments of the table above, side by side | ~1.5 min |
| `tb_sann_robot_top_full` | all parameters at their defaults for 15 steps (3 M cycles): step period and latency, refractory spacing, 2-AG/DSE, PWM period 399 872 cycles | ~40 s |

The long runs compress the step from 200 000 to 8 cycles (`STEP_CYCLES = 8`) and
set the PWM prescaler to 1 (`CLK_HZ = 500·256`); every other parameter stays at its
default. At full size, filling the moving-mean FIFO alone takes 3.3·10⁹ cycles,
so the full-size run covers the start-up only, with f′ still 0.

## Files

`rtl/sann_pkg.sv` (types and fixed-point helpers), `rtl/sann_rng.sv`,
`rtl/sann_synapse.sv`, `rtl/sann_lif_neuron.sv`, `rtl/sann_dse_generator.sv`,
`rtl/sann_astrocyte.sv`, `rtl/sann_freq_meter.sv`, `rtl/sann_fmmm.sv`,
`rtl/sann_spike_to_pwm.sv`, `rtl/sann_pwm_controller.sv`,
`rtl/sann_robot_top.sv`; one testbench per module in `tb/`, plus
`tb/tb_sann_fault_rates.sv` and `tb/tb_sann_robot_top_full.sv`.
