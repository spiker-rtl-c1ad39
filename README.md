# Spiker: a clock-driven spiking neural network accelerator

Spiker runs inference of a spiking neural network (SNN) on an FPGA. Its
neurons follow the Leaky Integrate-and-Fire (LIF) model. The neuron is cut
down to an adder, a shifter and a comparator, so that hundreds of them fit
side by side and are all updated in the same cycle. The default
configuration is the classic MNIST network with unsupervised training
(after Diehl and Cook):

- 784 inputs, one per 28x28 pixel.
- One layer of 400 excitatory neurons. Every neuron inhibits every other one.
- 313,600 synapses with 5-bit weights held in block RAM.
- 3500 time steps of 0.1 ms per image.

The network is trained off-line. The hardware only runs it: it takes an
image and a trained weight table, and returns the spike count of every
neuron. The most active neuron gives the class.

All RTL is SystemVerilog (IEEE 1800-2017). It is accepted by Verilator 5's
lint and by the slang front end. Every block has a self-checking testbench. One
end-to-end testbench runs the full-size network on two images and compares
it with a bit-exact model.

## How a sample is processed

```
 pixels ──► input_interface ──spikes──► layer ──out_spikes──► output_interface ──► counts
             (1 shared LFSR)             │  ▲  (400 neurons,      (400 counters)
                                 exc_idx │  │ weights              
                                         ▼  │ (400 x 5 bit)
                                      weight_mem (block RAMs, via weight_addr)
                 network_cu: gen / layer_start / count / reset_v, step counter
```

An image is processed as a sequence of `N_STEPS` time steps. Each step
goes like this:

1. **Spike generation** (`input_interface`). Each input turns its 8-bit
   value into at most one spike per step. Input *i* spikes when the shared
   16-bit pseudo-random number *n* satisfies `n < pixel[i] << 1`. So its
   firing probability per step is proportional to its value (rate coding):
   about 0.8 % per step for a white pixel.
   - All 784 inputs compare against the **same** random number. This is
     the main hardware saving: one LFSR instead of 784.
   - A side effect is that spikes come in bursts. In a given step, either
     no input fires, or every input brighter than *n*/2 fires at once.
   - As a result, only about 25 of the 3500 steps of a typical image
     contain any spike.
2. **Leak.** Every neuron applies the leak.
3. **Skip test.** If no input spiked and no neuron fired in the previous
   step, the layer skips straight to the fire check. This OR-based skip is
   what makes the design fast.
4. **Excitatory phase.** If any input spiked, the layer control unit walks
   over the 784 inputs, one per cycle. For each one, the weight memory
   delivers all 400 weights of that input in parallel. Every neuron whose
   input bit is set adds its own weight.
5. **Inhibitory phase.** If any neuron fired in the previous step, the
   layer walks over the 400 neurons, one per cycle. Each neuron that fired
   subtracts 15 mV from every *other* neuron.
6. **Fire check.** Every neuron compares its potential with its own
   threshold. If the potential is above it, the neuron spikes and its
   potential drops to V_reset.
7. **Counting.** The output interface adds the step's spikes to the 400
   counters.

After the last step, the network control unit returns all membranes to the
rest value. The next image then starts from the same state.

## The neuron and its number formats

The potentials are stored shifted so that the rest potential is 0 V. The
leak toward rest then needs no addition of V_rest:

    V[n] = V[n-1] - (dt/tau) * V[n-1]

In addition, dt/tau = 0.1 ms / 100 ms is rounded to 2^-10. The
multiplication therefore becomes an arithmetic right shift by 10.

| quantity | format | value used |
|---|---|---|
| membrane potential V | 16-bit signed, 3 fractional bits (1 LSB = 0.125 mV) | rest 0 |
| V_reset | same | 5.0 mV = 40 |
| threshold V_th (per neuron, loadable) | same | 13.0 mV = 104 at reset |
| inhibitory weight | same, signed | -15 = -120 |
| excitatory weight | 5-bit unsigned, 3 fractional bits (0 to 3.875) | from the weight table |
| leak | `V >>> DECAY_SHIFT` | shift 10 |

`neuron.sv` contains the datapath:

- a four-way operand multiplexer: 0, `V >>> 10`, the excitatory weight,
  the inhibitory weight;
- one add/subtract unit;
- a multiplexer that loads either the sum or V_reset;
- the V register;
- the threshold register;
- a strict `>` comparator.

`neuron_cu.sv` decodes a 3-bit command broadcast by the layer
(`CMD_DECAY`, `CMD_EXC`, `CMD_INH`, `CMD_FIRE`, `CMD_RESET`), together with
the neuron's own input bit, into the datapath controls. The output spike is
a register. It keeps the result of the last fire check.

Points about the arithmetic that are easy to miss:

- **Leak.** With 3 fractional bits and a shift of 10, the leak of a
  positive potential below 128 mV is exactly zero. Only negative potentials
  (after inhibition) visibly creep back toward 0, by one LSB per step. This
  follows directly from the formats and the shift.
- **Saturation.** The sum saturates at the 16-bit limits instead of
  wrapping around. Without this, a burst of inhibition from many neurons
  could wrap a deeply negative potential to a large positive one.

## Control and timing

`network_cu` starts a step when all layers are ready. In the same cycle it
orders the next set of input spikes: the layer samples the current set on
that clock edge, so generation overlaps with processing. When the layer
reports `done`, the CU counts the output spikes and starts the next step at
once.

`layer_cu` has the states IDLE, SEL, EXC, INH, FIRE and WAITF. It sends
its command through one pipeline register, so that the spike bit meets the
weights coming out of the synchronous block RAMs in the same cycle.

Cycle cost per time step, from one `start` to the next:

| step content | cycles |
|---|---|
| no spike anywhere | 3 |
| input spikes only | 4 + 784 |
| inhibitory spikes only | 4 + 400 |
| both | 4 + 784 + 400 |

A complete sample costs 2 more cycles. On the test images this gives about
30,000 to 34,500 cycles, or 300 to 345 µs at 100 MHz. The published
accelerator reports 215 µs per MNIST image at 100 MHz. This RTL is
therefore roughly 1.5x slower. The gap is mostly the 3-cycle floor of the
~3475 empty steps and the full walk over all 784 inputs in an active step.
The source does not say how its own step timing achieves 215 µs.

## Weight memory

Each input index needs 400 x 5 = 2000 bits of weights in a single cycle.
`weight_mem` stores them as follows:

- 29 columns of 14 weights each. A 70-bit word fills one 512x72 Artix-7
  block RAM.
- The 784 indices are split over 2 rows of 512 words.
- This gives 58 block-RAM-sized arrays in all.

`weight_addr` is the index-to-physical-address translator. It takes the
layer's spike index and produces the row enable and the word address. A
`BASE` parameter lets several layers share one memory.

The published design fits its weights in 45 block RAMs. It does not say how
it packs them, so this packing is this design's own. The host loads the
memory through the same port, one 70-bit word at a time. It writes word
(`w_idx`, `w_col`), which holds the weights of neurons `14*w_col` to
`14*w_col+13` for input `w_idx`, with the lowest-numbered neuron in bits
4:0.

## Using the top level

```
spiker #(.N_IN(784), .N_NEURONS(400), .N_STEPS(3500)) u_spiker (...);
```

1. Hold `rst_n` low, then release it.
2. Load the weights with `w_we`/`w_idx`/`w_col`/`w_data`. An assertion
   forbids this while `busy` is high.
3. Optionally, give each neuron its own threshold with
   `vth_load`/`vth_idx`/`vth_data`. In Diehl & Cook style training, the
   adapted per-neuron threshold goes here.
4. Load the 784 pixels with `pix_we`/`pix_addr`/`pix_data`.
5. Pulse `start`. `busy` stays high for the whole sample.
6. When `done` pulses, `counts[n]` holds the number of spikes of neuron
   *n* (12 bits).
7. Load the next image, then `start` again. The counters clear
   automatically. The LFSR keeps running across samples; `seed_load`
   restarts it.

`exc_phase`, `inh_phase` and `skipped` pulse once per step to show which
phases ran. `out_spikes` are the spikes of the last step.

Parameters: `N_IN`, `N_NEURONS`, `N_STEPS`, `DECAY_SHIFT`, `LFSR_W`,
`RATE_SHIFT`, `WPW` (weights per RAM word), `BRAM_DEPTH`, `V_RESET` and
`W_INH`. Shared formats and constants are in `spiker_pkg.sv`.

## Files

| file | block |
|---|---|
| `rtl/spiker_pkg.sv` | formats, model constants, command encodings |
| `rtl/spiker.sv` | top level |
| `rtl/network_cu.sv` | central control unit |
| `rtl/input_interface.sv`, `rtl/lfsr.sv` | rate encoder with its shared LFSR |
| `rtl/layer.sv`, `rtl/layer_cu.sv` | neuron layer and its control unit |
| `rtl/neuron.sv`, `rtl/neuron_cu.sv` | LIF neuron and its control unit |
| `rtl/weight_mem.sv`, `rtl/weight_addr.sv` | parallel weight memory and address translation |
| `rtl/output_interface.sv` | spike counters |
| `tb/tb_<block>.sv` | self-checking testbench of each block |

## Simulating

Every testbench prints one line, `TB_RESULT checks=N failures=M`, and has a
watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/spiker_pkg.sv tb/tb_spiker.sv --top-module tb_spiker -Mdir obj_spiker
./obj_spiker/Vtb_spiker
```

Replace `spiker` with `lfsr`, `input_interface`, `neuron`, `layer`,
`weight_addr`, `weight_mem`, `output_interface` or `network_cu` to run the
other testbenches. `-Irtl` lets Verilator find the submodules.

- **`tb_spiker`** runs the full-size network at its default parameters. It
  builds in about 25 s and simulates in about 2 s. It uses a sparse random
  weight table, random per-neuron thresholds and two synthetic ring-shaped
  "digits". It checks:
  - every neuron's spike count, the cycle count and the number of each kind
    of phase, against an independent step-level model;
  - that the membranes are at rest after each sample;
  - that each mechanism occurs at least once: skipped step, excitatory
    phase, inhibitory phase, firing, visible leak, end-of-sample reset,
    per-neuron threshold.
- **`tb_layer`** uses a small layer (12 inputs, 5 neurons, leak shift 2)
  and checks potentials, spikes and exact step latency.
- **`tb_neuron`** compares the neuron with a cycle-level model over 50,000
  random commands.
- **The other testbenches** check their block exhaustively or against a
  model.

## Where this RTL departs from, or adds to, the published design

**Following the source:**
- the block structure: input interface, network CU, layer with layer CU,
  neuron with neuron CU, weight RAM, output counters;
- one shared LFSR;
- rest potential shifted to 0, and the leak as a power-of-two shift;
- the 16-bit / 5-bit fixed-point formats and the Table-I model constants;
- spikes presented one at a time, excitatory before inhibitory;
- the OR-based skip of empty steps;
- per-neuron loadable thresholds;
- RESET V at the end of a sample;
- un-normalised output counters.

**This design's own choices:**
- **Spike rule direction.** The source's text states the spike condition
  as "random number greater than the rate". Here a spike is produced when
  the random number is *below* the scaled value, so the spike probability
  grows with the input value, as the rate coding requires.
- **Random number.** LFSR width 16, polynomial x^16+x^14+x^13+x^11+1,
  seed 0xACE1, and the `<< 1` rate scaling. These give about 25 active
  steps per image, in line with the ~23 reported.
- **Excitatory weights** are unsigned. The inhibitory weight is one
  common signed value.
- **No self-inhibition.** A neuron is not inhibited by its own spike.
- **Inhibition delay.** Inhibition acts in the step after the spike.
- **Saturating arithmetic** in the neuron.
- **Weight memory:** the packing (58 block-RAM arrays instead of the
  reported 45), a single port shared with the host, and a one-cycle read
  latency.
- **Host interfaces and handshakes**, and all cycle timing. As noted
  above, the resulting per-image time is higher than the published 215 µs.
- **Single layer.** The top level builds only the single-layer MNIST
  network. `network_cu` waits on `N_LAYERS` ready/done pairs, so stacking
  further `layer` instances in a feed-forward chain is a wiring change.
  Multi-layer networks are not exercised by any testbench here.
- **Not part of the hardware:** training (STDP, off-line) and the choice of
  the winning neuron from the counts.
