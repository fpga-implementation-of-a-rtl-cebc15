# Bit-slice hardware for a synchronising spiking neural network

This is a fully connected network of oscillatory leaky integrate-and-fire
neurons, written as synthesizable SystemVerilog. It follows the FPGA design
described by L.-C. Caron, F. Mailhot and J. Rouat in "FPGA implementation of a
spiking neural network for pattern matching".

Without input, every neuron's membrane potential rises along a saturating
curve. When the potential reaches a threshold the neuron fires and resets, so
each neuron oscillates with a fixed period. When a neuron fires, its
excitatory synaptic weights are added at once to the potentials of the other
neurons. Strongly coupled neurons therefore pull each other into phase. After
a number of periods, neurons that share a feature (for example, image regions
of similar grey level) fire together. The final potentials then hold the
answer: neurons with equal phase form one group. This is the principle of the
Oscillatory Dynamic Link Matcher, used for image segmentation, image matching
and sound source separation.

The hardware is built from identical *slices*, one per neuron. Slices talk
almost only to their neighbours, and they add weights bit-serially. A group of
neurons that fire together costs the same as a single neuron, so the network
runs faster as it synchronises.

Default size: 648 neurons, 648 × 648 = 419,904 synapses, 16-bit potentials,
11-bit weights and 448 time steps per oscillation period.

## How a run proceeds

A run alternates between two phases.

* **Time evolution.** Every neuron advances one time step per clock cycle.
  A neuron whose new potential reaches the threshold fires. Its potential goes
  to 0, its *spiking bit* (SB) is set, and it becomes *refractory* for the
  rest of this time step.
* **Spike propagation.** Starts when the spike-detection signal is high. This
  signal is the OR of all SBs across the array. Time evolution pauses. Every
  SB travels once around a ring through all slices. At each position, each
  slice adds the weight from the neuron whose SB it holds, if that SB is set.
  Afterwards each slice checks its own potential. A neuron that was pushed to
  the threshold, and is not refractory, fires: it resets, sets its SB and
  becomes refractory. If any neuron fired this way, another propagation step
  follows. If none did, time evolution resumes and all refractory flags
  clear.

Refractory neurons receive no weights. This keeps a freshly reset group from
being pushed straight back over the threshold.

Cycle cost, as measured by the test benches:

| event | clock cycles |
|---|---|
| one time step | 1 |
| one spike propagation step | N·P + 3 (one cycle to detect, N·P serial cycles, one drain cycle, one check cycle) |
| end of a run | 1 |

With the defaults, a fully synchronised network needs 448 + 10,371 cycles per
period. At 100 MHz that is about 6 M spikes/s. If every neuron fires on its
own, a period costs 448 + 648 × 10,371 ≈ 6.7 M cycles, or about 9.6 k
spikes/s. How many propagation steps a period costs depends only on how many
separate groups fire. It does not depend on how many neurons are in a group.

## The spiking-bit ring and the weight layout

This is the part that needs the most care when you change the design.

A propagation step is a loop over N ring positions k = 0 … N−1. Each position
takes P clock cycles.

* At position k, slice c holds the SB of neuron (c − k) mod N. At k = 0 each
  slice holds its own SB, so the first weight it reads is its feedback weight.
* At the end of each P-cycle word, every slice passes its SB to the slice on
  its right and takes the SB from the slice on its left. Slice N−1 feeds
  slice 0. After N words every SB is back where it started.

All weights sit in one memory array, `weight_memory`:

* The array has **one bit column per slice** and N·W rows.
* One address selects one bit of one weight in every column at once.
* Weights are stored LSB first, in ring order:

```
row k*W + b, column c  =  bit b of weight(from neuron (c-k) mod N  to neuron c)
```

During a propagation step, the address counter advances once for each of the
first W cycles of every word. Those cycles are the weight bits. In the
remaining P − W cycles no address is read; only the carry ripples up through
the potential. Reads are synchronous (one cycle of latency). For this reason
the controller delays the serial control fields by one register, so they line
up with the data.

A weight of 0 means no connection. Every pair has a place in the memory, so
any topology fits.

## Inside a slice

* **Synapse model unit (`smu`).** A one-bit full adder with a carry flip-flop,
  plus the SB register. It adds `weight bit AND SB AND NOT refractory` to the
  potential bit. For bits at or above W, the weight input is forced to 0. A
  carry out of bit P−1 flags an overflow, and the potential then saturates at
  all ones. Weights are unsigned, because all synapses are excitatory.
* **Membrane model unit (`mmu`).** The P-bit potential register.
  * During propagation it works as a rotating shift register: bit 0 goes to
    the adder, and the sum bit comes back into bit P−1.
  * During time evolution it adds a piecewise-linear increment in one cycle.
  * It compares the potential with the threshold.
  * It also forms one stage of the P-bit load/unload chain, which runs from
    the host through slice 0 … slice N−1 and back to the host.

### The membrane curve

The curve approximates 1 − e^(−t) with four segments. The two top bits of the
potential select the segment, and the slope halves from one segment to the
next. Every increment is a power of two, so no multiplier is needed:

| segment (potential, P = 16) | increment per step | steps |
|---|---|---|
| 0 … 16383 | 512 | 32 |
| 16384 … 32767 | 256 | 64 |
| 32768 … 49151 | 128 | 128 |
| 49152 … threshold 63488 (0xF800) | 64 | 224 |

From 0 the threshold is reached in exactly 32 + 64 + 128 + 224 = 448 steps.
For other P the increments scale as 2^(P−7−s) and the default threshold
scales with them (`hsnn_pkg::default_threshold`). The host can change the
threshold. Doing so changes the period.

## Host interface

`hsnn_top` exposes a command port and a response port:

* **Command port.** `cmd_valid`/`cmd_ready`, plus `cmd_op`, `cmd_addr` (8
  bits) and `cmd_data` (32 bits).
* **Response port.** `rsp_valid`/`rsp_data`. `rsp_valid` pulses one cycle
  after any command that returns data.
* **Ready rule.** Register reads are accepted at any time. All other commands
  wait while a run is in progress (`busy`).

| `cmd_op` | command | effect / response |
|---|---|---|
| 1 | REG_WRITE | register `cmd_addr` ← `cmd_data` |
| 2 | REG_READ | response: register `cmd_addr` |
| 3 | WADDR_CLEAR | weight address counter ← 0 |
| 4 | WBIT_SHIFT | shift `cmd_data[0]` into the loading register; response: the bit shifted out (column 0 first) |
| 5 | WROW_WRITE | write the loading register to the current row; address + 1 |
| 6 | WROW_READ | read the current row into the loading register; address + 1 (2 cycles) |
| 7 | POT_SHIFT | shift `cmd_data[P-1:0]` into slice 0's potential and move the whole chain by one slice; response: slice N−1's potential before the shift |
| 8 | RUN | run for REG_PERIODS × 448 time steps |

| register | address | access |
|---|---|---|
| THRESHOLD | 0 | read/write, reset 0xF800 |
| PERIODS | 1 | read/write, reset 1 |
| STATUS | 2 | bit 0: run in progress |
| STEPS, ROUNDS, CYCLES, SPIKES | 3, 4, 5, 6 | statistics of the current or last run: time steps, propagation steps, clock cycles, spikes processed |

Typical use:

1. **Load the weights.** Send WADDR_CLEAR. Then, for each row in order, send N
   WBIT_SHIFTs (column 0's bit first) followed by one WROW_WRITE.
2. **Load the potentials.** Send N POT_SHIFTs, neuron N−1's value first.
3. **Run.** Write PERIODS, send RUN, then poll STATUS until the run ends.
4. **Read the results.** Send N more POT_SHIFTs. They return the final
   potentials, neuron N−1 first. If you shift the returned values back in,
   the state is restored.

Loading a full-size weight memory this way takes N·W·(N+1) ≈ 4.6 M commands.

## Modules

| module | role |
|---|---|
| `hsnn_pkg` | sizes, PWL constants, command/register encodings, control structs |
| `hsnn_top` | the whole system |
| `com_controller` | decodes host commands and steers their data |
| `config_regs` | threshold, run length, status and statistics |
| `hsnn_controller` | FSM that runs the two phases and serves host requests while idle |
| `addr_counter` | "+1" weight memory address counter, wraps after N·W−1 |
| `weight_memory` | N·W × N-bit block-RAM array with the loading/unloading register |
| `load_unload_reg` | N-bit serial-to-parallel register |
| `hsnn` | N slices, the SB ring, the potential chain, the spike-detection OR and the spike count |
| `slice` | one neuron: `smu` + `mmu` |
| `smu`, `mmu` | synapse and membrane model units |

Parameters of `hsnn_top`:

| parameter | default | meaning |
|---|---|---|
| N | 648 | neurons |
| P | 16 | potential bits (at least 10) |
| W | 11 | weight bits (W ≤ P) |
| M | 448 | time steps per period (used for the run length only) |

The clock is `clk`. Reset (`rst`) is synchronous and active high. Reset does
not clear the weight memory, so it must be loaded before a run.

## Simulating

Every test bench is self-checking and ends with a `TB_RESULT checks=… failures=…` line. For example:

```
verilator --binary --timing --assert -Irtl rtl/hsnn_pkg.sv tb/tb_hsnn_top.sv \
          --top-module tb_hsnn_top -o sim && ./obj_dir/sim
```

* `tb_hsnn_top` works through the host port at N = 8. It covers:
  * random and strong weights;
  * weight read-back;
  * a threshold written by the host;
  * four runs checked against a behavioural model of the algorithm: final
    potentials, statistics and the cycle-count formula.

  It counts time steps, propagation steps, repeated propagation, saturation,
  refractory gating, command stalls and register reads during a run. It fails
  if any of these never happened.
* `tb_hsnn_top_full` runs at the default size (648 neurons). It:
  * loads all 419,904 weights through the host port;
  * runs one period of an image-comparison network, then four more;
  * checks all 648 final potentials and the run statistics after each run.

  The features form eight groups. The first period needs 16 propagation
  steps. Each later period needs 8, one per group: about 10,800 cycles per
  group per period.

  The weights use w = w_max (1 − 1/(1 + e^(−α(|f_i − f_j| − δ)))), with
  w_max = threshold/32, α = 100 and δ = 4, over random grey-level features.
  The run takes about 1.5 minutes to build and under 2 minutes to simulate.
* `tb_image_match` runs the image-comparison workload at N = 48 (one neuron
  per image segment). The weights use the same formula. It starts from random
  phases and runs 85 periods. Besides matching the model, it checks two things:
  * most feature groups end in one phase;
  * later periods need fewer propagation steps than the first. With the
    built-in seed, the first period needs 49 propagation steps and the last
    needs 9, and 7 of the 8 groups end fully in phase.
* `tb_<module>` tests each block on its own at small sizes.

## Departures from the original description, and choices made here

The original design is described at block level. The following details are
this implementation's own:

* **Membrane curve.** The breakpoints and slopes of the four-segment curve,
  the threshold 0xF800 and the reset value 0. The original gives only "four
  segments, 448 steps per period".
* **Refractory gating and saturation.** Neither is described in the original.
* **Cycle overhead.** The one-cycle memory latency, and the detect, drain and
  check cycles. They add 3 cycles per propagation step to the original's
  P·N + M.
* **Host link.** The link itself (serial, USB, …) is not modelled. It is
  replaced by the command port above. The command set and register map are
  invented here.
* **Weight memory placement.** The weight memory is one shared array loaded
  through a single N-bit serial-to-parallel register. Per-slice W-bit load
  buses are not used.
* **Statistics counters.** The counters and the spike-count popcount are
  additions, for measurement only.
* **Fully connected only.** The future-work ideas of the original (shared
  potential/weight memory, time multiplexing for sparse networks, plasticity)
  are not implemented.

A generic coarse synthesis of the full-size design gives 13,206 flip-flops
and 4,618,944 memory bits. For comparison, the original FPGA build reports
14,098 flip-flops and 126 block RAMs (4.6 Mbit).

The 648-input spike-detection OR and the popcount are the longest
combinational paths. The original design also reports the OR as its critical
path at 100 MHz.
