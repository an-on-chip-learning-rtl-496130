# STT-RAM crossbar learning core for binary-activation spiking networks

This RTL implements a neurosynaptic core that both runs and **trains** one layer
of a spiking neural network on chip. The weights sit in a crossbar of
non-volatile STT-RAM bit cells. Each cell stores exactly one bit, so no
analog-to-digital converters are needed and device-to-device conductance
spread does not matter. A 16-bit half-precision (FP16) weight takes 16
adjacent cells of a row. The whole row of a pre-synaptic input is sensed at
once, and ordinary digital logic at the foot of the columns does all the
arithmetic:

* the **forward pass** sums the weights of the inputs that spiked into each
  neuron's membrane potential;
* the **backward pass** multiplies the same rows by the layer's error to
  send the error one layer back;
* the **weight update** adds a scaled error to the weights and writes back
  **only the bits that changed**.

The design follows the paper "An On-Chip Learning Accelerator for Spiking
Neural Networks using STT-RAM Crossbar Arrays". The paper fixes the array
geometry, the number formats, the clock ratio, the write-driver budget and
the learning equations. The paper does not give the packet format, the
handshakes, the command set, the FP16 corner-case rules or the exact
sequencing. Those parts are this implementation's own, and they are called
out below.

The top level, `snn_accelerator`, holds two independent cores side by side:

| core | array | neurons | weight | clock | purpose |
|------|-------|---------|--------|-------|---------|
| `snn_learning_core` | 2048 x 2048 bits (512 KB) | 128 | FP16 | logic 500 MHz, array 100 MHz | training and inference |
| `snn_inference_core` | 256 x 256 bits | 32 | 8-bit signed fixed point | 100 MHz | the smaller inference-only core that the learning core extends |

## The network model

Neurons have a binary activation. In time step t, neuron j of layer k has
the membrane potential

    v_j = sum_i a_i^(k-1) * w_ji        (inputs a_i are 0 or 1, so this is a sum of weights)

It spikes (`a_j = 1`) when `v_j > theta`. Training uses a straight-through
estimator. The activation derivative is `1/(2*theta)` where
`0 <= v_j <= 2*theta` and zero elsewhere. The core records where it is
non-zero as the **gradient flag** `g_j`. With that:

    delta_i^(k-1) = 1/(2*theta) * sum_j w_ji * delta_j^k     (only for inputs i with g_i = 1)
    w_ji <- w_ji + 2^-b * delta_j^k                          (only for inputs i with a_i = 1)

The learning rate is a power of two, `2^-b`, and `theta` is a power of two,
`2^theta_exp`. Both scalings are therefore exponent shifts, not multiplies.
The potential starts from zero in every time step. The bias is not a
separate register. Treat it as one more input row whose spike the host keeps
at 1, so it is stored and trained like any weight.

## Learning core: how a row is stored

Wordline i holds every weight leaving input i. Bitlines `16j .. 16j+15` of
that row hold `w_ji` as an FP16 number, with bit b on bitline `16j+b`. One
read therefore gives all 128 weights of input i in parallel, one for each
neuron. The array model (`stt_crossbar`) performs one operation per memory
cycle: it senses a whole row, or it programs the bits selected by a mask.

## Learning core: the memory cycle

There is one clock, the 500 MHz logic clock. The controller raises
`mem_tick` on one cycle in five (`MEM_DIV = 5`). The array accepts a read or
a write only on such a tick, which models the 100 MHz STT-RAM. A sensed row
stays on `rd_data` until the next read.

## Learning core: forward pass (`CMD_FORWARD`)

1. Input packets arrive before the command. Each packet is a kind bit (spike
   or gradient flag) and an 11-bit input address. `spike_decoder` sets the
   packet's bit in a 2048-bit spike map or gradient map.
2. The controller clears all potentials. It then reads the rows of the spike
   map in ascending order, one per memory cycle. In the logic cycle after
   each read, all 128 `snn_neuron`s add their weight through their own FP16
   adder.
3. When no spiking row is left, the neurons fire. `spike_out` and `grad_out`
   latch, and `spike_router` starts sending one packet per spike and per
   gradient flag to the next layer. Packets go out lowest neuron first, with
   a neuron's spike before its flag. Each address is `route_base + j`, which
   lets two 128-neuron cores feed one 256-input layer. The router uses a
   valid/ready handshake.

A step with N spiking rows takes N+1 memory cycles. With the MNIST
statistics (20 spiking inputs per layer per core) the full-size simulation
measures 21 memory cycles. The paper counts 20.

## Learning core: backward pass and weight update (`CMD_BACKWARD`)

This is the part that carries the paper's main idea.

The controller latches the layer error `delta_in` (128 FP16 values). It then
visits, in ascending order, every row that received a spike **or** a
gradient flag. For each row it does the following:

* **Read once, use twice.** It reads the row. The same sensed weights feed
  the MAC and the weight update.
* **Back-propagation (if `g_i`).** `mac_unit` walks the neurons whose delta
  is non-zero. It performs one FP16 multiply-accumulate per logic cycle and
  skips zero deltas. It then shifts the sum by `1/(2*theta)`. The result
  leaves on `delta_out` with `delta_out_row = i`. The MAC is busy for
  `nnz + 1` cycles, where nnz is the number of non-zero deltas.
* **Weight update (if `a_i`).** Each neuron has a `weight_update` unit that
  forms `w + 2^-b*delta_j` and the XOR with the old word. The XOR marks the
  bits that must flip.
* **Flipped-bit writes with two drivers per synapse.** `write_scheduler`
  programs the row over exactly 8 memory cycles. In cycle c, bits `2c` and
  `2c+1` of every synapse can be written, and a driver is enabled only where
  that bit flips. Unchanged bits are never programmed. The paper limits the
  drivers to two per synapse to cap the STT-RAM write current.
* **Overlap.** The MAC and the write of a row run at the same time. The next
  row is read as soon as the array is not being written, even while the MAC
  is still running. The MAC takes that row only when it is free. The MAC
  copies the weights when it starts. The write scheduler copies the new row
  when it starts. After that, the sensed row can be replaced.

For one core, the paper reports these per-step statistics: 20 input spikes,
95 input gradient flags, and about 60 of 128 deltas non-zero. For those
statistics the MAC is the bottleneck, as the paper says. A full-size
simulation run with 20 spikes, about 95 flags and 62 non-zero deltas
measured:

| | this RTL | paper (Table V, STT-RAM) |
|---|---|---|
| forward pass | 21 memory cycles | 20 |
| backward + update | 1262 memory cycles (MAC alone needs 1210) | 1152 MAC, 160 write, 1172 total |

The remaining gap comes from the MAC's bookkeeping cycle per row and from
rows that wait for a write to finish.

## Learning core: host access and operation

Commands use a `cmd_valid`/`cmd_ready` handshake. `cmd_ready` is high only
while the core is idle, and `done` pulses once when a command finishes.

| `cmd` | effect |
|---|---|
| `CMD_WRITE_ROW` | writes `host_wr_data` (128 x FP16) to row `cmd_row`. Every bit is flagged, so a row write also takes 8 memory cycles. |
| `CMD_READ_ROW` | reads row `cmd_row`. `host_rd_data` is valid while `host_rd_valid` is high. |
| `CMD_FORWARD` | runs the forward pass described above. |
| `CMD_BACKWARD` | runs the backward pass and weight update described above. |

One training time step for a layer runs as follows:

1. Pulse `spikes_clear`.
2. Send the previous layer's spike and flag packets.
3. Run `CMD_FORWARD`.
4. Drain the router.
5. Obtain `delta^k` and drive it on `delta_in`. For the output layer it is
   the loss derivative, which the host computes. For a hidden layer it is
   the `delta_out` stream of the next layer's cores.
6. Run `CMD_BACKWARD`.

`delta_out` has no back-pressure, so the receiver must take every pulse.

## FP16 arithmetic

`fp16_add` and `fp16_mul` are combinational IEEE-754 binary16 units. They
round to nearest, ties to even. Subnormal inputs count as zero. A result
below 2^-14 is flushed to a signed zero; the check is made on the exact
value before rounding. Overflow gives infinity. `inf - inf` and `0 * inf`
give a quiet NaN. The paper specifies FP16 only; these corner-case rules are
this implementation's choice. A synthesis flow aiming at 500 MHz would
pipeline these units. The RTL keeps them single-cycle, and the MAC does one
multiply-add per cycle.

## Inference core

`snn_inference_core` is the 256-input, 32-neuron core. Its synapses are 8
bits wide on 8 adjacent bitlines, stored as two's complement. Each
`fxp_neuron` adds the weights of the spiking rows into a 16-bit potential
and fires when `v > theta`. `theta` is a 16-bit signed input. The whole core
runs on the 100 MHz memory clock. It reads one spiking row per cycle, and
all 32 neurons update in the next cycle. That is 32 synaptic operations per
cycle, or 3.2 GSOPS. A step with N spiking rows completes N+3 cycles after
the command is accepted. Row writes take one cycle. `CMD_BACKWARD` completes
at once without doing anything.

## Sizes, and what fits

* One learning core holds one layer slice of up to 2048 inputs and 128
  neurons: 262,144 FP16 weights.
* A 784-256-256-10 MNIST network has 268,800 weights. Each 256-neuron layer
  needs two cores, so the network needs five learning cores. `snn_accelerator`
  has one learning core. Each individual layer slice fits one core.

## Files

| file | content |
|---|---|
| `rtl/snn_pkg.sv` | sizes, FP16 type and helpers, packet kinds, commands |
| `rtl/fp16_add.sv`, `rtl/fp16_mul.sv` | FP16 arithmetic |
| `rtl/stt_crossbar.sv` | behavioural model of the STT-RAM array with sense amplifiers and write drivers (synthesizable as a plain memory) |
| `rtl/write_scheduler.sv` | flipped-bit row writes, 2 drivers per synapse, 8 memory cycles |
| `rtl/snn_neuron.sv` | FP16 neuron: accumulate, spike, gradient flag |
| `rtl/weight_update.sv` | `w + 2^-b*delta` and the flip mask |
| `rtl/mac_unit.sv` | zero-skipping FP16 MAC with the `1/(2*theta)` shift |
| `rtl/spike_decoder.sv`, `rtl/spike_router.sv` | packets in and out |
| `rtl/core_controller.sv` | memory-cycle divider and sequencer |
| `rtl/find_first_set.sv` | lowest-set-bit finder used to walk sparse sets |
| `rtl/snn_learning_core.sv` | learning core |
| `rtl/fxp_neuron.sv`, `rtl/snn_inference_core.sv` | inference core |
| `rtl/snn_accelerator.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/fp16_ref_pkg.sv` | FP16 reference model through `real` arithmetic |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Build and run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/snn_pkg.sv tb/fp16_ref_pkg.sv tb/tb_snn_accelerator.sv \
        --top-module tb_snn_accelerator -Mdir obj && obj/Vtb_snn_accelerator

Replace the name to run another testbench. `tb_snn_accelerator` uses every
default parameter, including the full 2048 x 2048 array. It loads all rows,
runs the inference core and three training time steps of the learning core
(the first uses the MNIST statistics), and checks every result against the
reference model. It also counts every mechanism: host reads and writes,
fires, gradient flags, MAC rows, skipped zero deltas, write-only,
MAC-only and combined rows, flipped and unchanged synapses, router stalls,
and delta outputs. The test fails if any of these never occurs. It runs in
a few seconds.

Parameters: `N_IN`, `N_NEURONS` and `MEM_DIV` on `snn_learning_core`;
`N_IN`, `N_NEURONS`, `WB` and `V_BITS` on `snn_inference_core`. The block
testbenches use smaller sizes.

## Where this departs from the paper, and what is not here

* The paper does not say how the output-layer error (the squared-hinge-loss
  derivative against the desired spikes) is computed in hardware. The core
  takes it on `delta_in`.
* The sense amplifiers, write drivers and 1T-1R cells are analog. They exist
  only as the digital behaviour of `stt_crossbar`: a one-memory-cycle read or
  write and a per-bit write enable. Resistance states, currents and power are
  not modelled.
* The following are design choices, not taken from the paper:
  * the packet format and the decoder/router behaviour;
  * the command interface and the host row port;
  * the bit order inside a synapse;
  * the order in which the write drivers serve the bits;
  * zero-skipping in the MAC, which is inferred from the paper's operation
    counts;
  * the read-ahead overlap in the backward pass;
  * the FP16 corner-case rules;
  * the treatment of the bias as an input row;
  * power-of-two `theta` and learning rate (the paper's weight-update formula
    and its `1/(2*theta)` shifter imply them);
  * the two's-complement format of the inference core's weights.
* Dropout (used during the paper's training runs) has no hardware here; a
  host can drop input packets to the same effect.
* The paper's area, power and throughput figures come from a 65 nm
  synthesis and circuit simulation. They are not reproduced here.
* The backward pass takes about 10 % more memory cycles than the paper's
  count (see the table above).
