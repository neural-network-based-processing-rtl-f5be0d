# Streaming neural-network classifier for handwritten Amharic characters

This is a small, fully connected neural-network inference engine for an FPGA
SoC. A host CPU loads trained weights over an AXI4-Lite register port. It then
writes a 28 × 28 grayscale image one pixel at a time. The engine returns the
index of the most likely character class, and that class's Unicode code point
in the Ethiopic block (U+1200 + index).

The design is meant for a mid-size device: the Cyclone V SoC 5CSEMA5F31C6, with
an ARM hard processor and a lightweight HPS-to-FPGA AXI bridge. Its main idea
is to spend memory rather than multipliers on bandwidth. Every neuron has its
own weight RAM and its own multiplier. All neurons of a layer see the same
input sample on a shared bus in the same clock cycle, so a layer of *N* neurons
processes one input per clock at *N* multiply-accumulates per clock. No weight
is moved between memories at run time.

The default build is the configuration that fits the device:

- 784 inputs;
- one layer of 250 neurons;
- an argmax over the 250 outputs ("hardmax");
- a 12-bit signed fixed-point datapath.

Deeper networks, such as a 784-30-30-343-343 model, are built by changing the
top-level parameters.

## Block structure

```
 AXI4-Lite ──> axil_slave ──> ctrl_regs ──┬─ soft reset ──────────────────────────┐
                                          ├─ weight/bias loading (LAYER, NEURON) │
                                          └─ INPUT samples                       │
                                                 │                               ▼
                     ┌──────────── nn_layer 1 ───┴──────────┐        (core reset)
                     │ neuron 0 … neuron N1-1               │
                     │  weight_memory + MAC + bias + act    │
                     └──────────────┬───────────────────────┘
                                    │ vector y(1)
                              layer_streamer  (only between layers)
                                    │ one element per clock
                              nn_layer 2 … nn_layer L
                                    │ vector y(L)
                              max_finder (hardmax) ──> char_map
                                    │ class index, code point
                                    └──> ctrl_regs: OUTPUT, CHAR, STATUS.done, irq
```

| File | Purpose |
|---|---|
| `rtl/nn_pkg.sv` | Shared types and constants: activation enum, default widths, register offsets, Ethiopic base code point. |
| `rtl/weight_memory.sv` | Per-neuron weight RAM: one write port, registered read port, optional `$readmemb` initialisation. |
| `rtl/neuron.sv` | Streaming MAC neuron: weight loading, pipelined multiply, saturating accumulation, bias, activation. |
| `rtl/relu.sv` | Registered ReLU with saturation, which rescales the accumulator back to the data format. |
| `rtl/sig_rom.sv` | Registered sigmoid look-up table, computed at elaboration time. |
| `rtl/nn_layer.sv` | A row of neurons sharing one input stream. |
| `rtl/layer_streamer.sv` | Turns one layer's parallel output vector into the next layer's serial input stream. |
| `rtl/max_finder.sv` | Sequential argmax over the final vector. |
| `rtl/char_map.sv` | Class index → Unicode code point. |
| `rtl/axil_slave.sv` | AXI4-Lite slave that turns bus transactions into single-cycle register strobes. |
| `rtl/ctrl_regs.sv` | Register bank: control, input, status/interrupt, result, configuration. |
| `rtl/nn_accel.sv` | Top level. |

## The streaming neuron

The neuron carries most of the timing subtlety, so this section describes it
cycle by cycle. The weight RAM has a synchronous read, and the multiply is
registered. A sample that arrives on `in_data` with `in_valid` in cycle *t*
therefore goes through these stages:

| Cycle | What happens |
|---|---|
| *t* | The RAM reads weight `r_addr`, and `r_addr` increments. The sample is copied into `in_d`, and `w_valid_d` is set. |
| *t+1* | `mult = in_d × weight` is registered, and `mult_valid` is set. |
| *t+2* | `sum <= sat_add(sum, mult)`. |

Samples may arrive back to back or with any gaps between them. The read
address counts the samples, so sample *k* always meets weight *k*.

A falling-edge detector on `mult_valid` finds the end of the vector. When the
valid chain goes quiet and `r_addr == NUM_WEIGHT`, the last product has been
accumulated. The bias is then added once, also with saturation. The bias is
stored shifted left by `DATA_W` bits, because the product of two Q1.11 numbers
is a Q2.22 number. The result is passed to the activation unit, which is
registered. `out_valid` pulses one clock later, and `r_addr` and `sum` clear,
ready for the next image.

Timing: `out_valid` rises 5 clock edges after the edge that accepts the last
sample, whatever the spacing of the samples.

**A departure from the reference behaviour.** In the original edge detector,
the end condition is "`mult_valid` just fell, and `r_addr` equals
`NUM_WEIGHT`". Taken alone, this condition fires too early when the last two
samples arrive 2 or 3 cycles apart: the edge left by the second-to-last sample
coincides with the address reaching its final value, and the last product is
lost. This implementation also requires that no product is still in the
pipeline (`!w_valid_d && !mult_valid`). For every other spacing the result is
unchanged. The neuron testbench drives random gaps of 0 to 3 cycles to cover
this case.

**Weight loading.** A neuron accepts configuration words only while the
`cfg_layer` and `cfg_neuron` buses equal its own `LAYER_NO` and `NEURON_NO`:

- Each `weight_valid` pulse writes the next weight address. The write pointer
  starts at all-ones after reset, so the first weight lands at address 0.
- `bias_valid` loads the bias.

No weight is written while reset is high, so a table preloaded from a file
survives power-up. Reset clears the counters, the accumulator and the valid chain. It does not
clear the weights or the bias, so a soft reset between images does not require
a reload.

## Number format and saturation

All samples, weights, biases and activations are 12-bit two's-complement Q1.11
numbers: 1 sign bit and 11 fraction bits, covering [−1, 1). Products and the
accumulator are 24 bits wide (Q2.22). Every accumulator addition saturates: if
two operands of equal sign give a result of the other sign, the sum is clamped
to the largest positive or the most negative 24-bit value.

**ReLU** (`relu.sv`, with `WEIGHT_INT_W = 1`):

- A negative accumulator gives 0.
- If any integer bit between the sign and the output slice is set, the output
  saturates to 0x7FF.
- Otherwise the output is the 12-bit slice that starts `WEIGHT_INT_W` bits
  below the sign, which gives min(x / 2^11, 2047/2048).

**Sigmoid** (`sig_rom.sv`) indexes a table of 2^`SIGMOID_SIZE` = 32 entries
with the top 5 bits of the accumulator. Those bits are a signed value *v* with
a step of 2^(INT_BITS − SIGMOID_SIZE) = 1/8, where INT_BITS = weight integer
bits + input integer bits = 2. *v* therefore spans [−2, 1.875]. The index is
re-centred by flipping its MSB, which is the same as adding 16. Entry *a*
holds:

    T[a] = min( round( 2^11 · 1 / (1 + e^(−(a − 16)/8)) ), 2047 )

The table is computed by a constant function during elaboration, so no data
file is needed. Changing `SIGMOID_SIZE` or `DATA_W` resizes it automatically.

## Layers, chaining and the hardmax

`nn_layer` instantiates `NUM_NEURON` neurons that share `in_data` and
`in_valid`. All of them finish on the same clock. Their outputs form the packed
vector `out_data`, and `out_valid` is neuron 0's pulse. An assertion checks
that all the neurons stay in lock step.

Between two layers, `layer_streamer` captures the vector when `out_valid`
pulses. It then presents one element per clock, element 0 first, as the next
layer's input stream.

After the last layer, `max_finder` captures the vector and compares one element
per clock against the running maximum. The comparison is a signed, strict `>`,
so on a tie the lowest index wins. `o_valid` pulses `NUM_INPUT` clocks after
the capture. `char_map` adds 0x1200 to the index.

**End-to-end latency.** Let *E0* be the clock edge at which the first layer
accepts the last sample, and `LN[l]` the size of layer *l*. The done flag and
`irq` rise at:

    E0 + 5 + Σ_{l=1..L-1} (LN[l-1] + 6) + LN[L-1] + 2

For the default build this is *E0* + 257. Measured from the AXI W handshake
of the last INPUT write, it is 2 clocks more. A whole image takes 784 register
writes plus about 260 clocks.

## Register map and host sequence

The 32-bit registers sit behind an AXI4-Lite slave with an 8-bit address. All
responses are OKAY, write strobes are ignored, and unmapped offsets read as 0.

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x00 | CTRL | R/W | Bit 0 is the soft reset of the core. It reads 1 after `rst_n`; write 0 to run. |
| 0x04 | INPUT | W | Each write feeds one sample, taken from `wdata[11:0]` (Q1.11), into layer 1. |
| 0x08 | STATUS | R | Bit 0 is done. It is cleared by the read that returns it; `irq` equals this bit. |
| 0x0C | OUTPUT | R | Predicted class index. |
| 0x10 | WEIGHT | W | Next weight of the neuron selected by LAYER and NEURON (`wdata[11:0]`). |
| 0x14 | BIAS | W | Bias of the selected neuron (`wdata[11:0]`). |
| 0x18 | LAYER | R/W | Layer to configure, numbered from 1. |
| 0x1C | NEURON | R/W | Neuron to configure, numbered from 0. |
| 0x20 | CHAR | R | Unicode code point of the predicted character. |

If a completion and the clearing read of STATUS happen in the same clock, the
completion wins, so no result is lost.

A typical host sequence:

1. Write CTRL = 0.
2. For each layer *l* and each neuron *n*, write LAYER = *l* and NEURON = *n*.
   Then write the neuron's fan-in weights to WEIGHT, in input order, and its
   bias to BIAS.
3. To load the weights again, write CTRL = 1 and then CTRL = 0. This rewinds
   every write pointer.
4. For each image:
   - write the 784 samples to INPUT;
   - wait for `irq`, or poll STATUS until bit 0 reads 1;
   - read OUTPUT and CHAR.

A soft reset in the middle of an image discards the partial image. The weights
are kept.

The AXI slave keeps the address and data channels in separate buffers, so AW
and W may arrive in either order. `wr_en` fires once both are held and no write
response is pending. On a read, the data is captured in the cycle the read
address is accepted. Assertions check that `bvalid` and `rvalid` (with stable
`rdata`) stay high until they are accepted.

## Parameters and resources

| Parameter (`nn_accel`) | Default | Meaning |
|---|---|---|
| `N_LAYERS` | 1 | Number of fully connected layers. |
| `NUM_INPUT` | 784 | Inputs per image (28 × 28). |
| `LAYER_NEURONS[N_LAYERS]` | `'{250}` | Neurons per layer; the last entry is the number of classes. |
| `LAYER_ACT[N_LAYERS]` | `'{ACT_RELU}` | Activation of each layer (`ACT_RELU` or `ACT_SIGMOID`). |
| `DATA_W` | 12 | Data width in bits; the format is Q1.(DATA_W−1). |
| `SIGMOID_SIZE` | 5 | log2 of the sigmoid table depth. |
| `WEIGHT_INT_W`, `INPUT_INT_W` | 1, 1 | Integer bits of the weights and inputs; they set the activation scaling. |

For example, the 784-30-30-343-343 model is

    nn_accel #(.N_LAYERS(4), .LAYER_NEURONS('{30,30,343,343}),
               .LAYER_ACT('{ACT_SIGMOID,ACT_SIGMOID,ACT_SIGMOID,ACT_SIGMOID})) u_nn (...);

The default build holds 250 × 784 weights of 12 bits, which is 2,352,000 bits
of RAM, plus 250 12-bit biases. It has 250 multipliers (12 × 12) and 24-bit
accumulators. A generic synthesis of the default top gives about 27,000
flip-flop bits, most of them in the pipelines and the output vector.

The weight RAMs are meant to map to Cyclone V block memory (M10K) and the
multipliers to DSP blocks. Builds with a 16-bit datapath were too large for
the 5CSEMA5F31C6; narrowing the datapath to 12 bits is what made the network
fit, which is why Q1.11 is the default.

## Departures and open points

- **End-of-stream guard** in the neuron (see above). This is a correctness fix.
- **Default activation.** The activation of the fitted build is not specified,
  so ReLU is the default. Sigmoid is selectable per layer.
- **Sigmoid table contents** are computed by the formula above, not loaded
  from a file.
- **Register offsets and the weight/bias configuration registers** are this
  design's own. The register roles (soft reset, per-sample input, read-to-clear
  status, result register, interrupt) follow the reference system.
- **Pretrained builds.** `WEIGHT_FILE` and `BIAS_FILE` on a neuron preload
  its weights and its bias (binary text, one word per line). Run-time loading
  through the registers works in every build and overrides the preloaded
  values. The top level loads everything at run time.
- **The signed comparison in the hardmax** agrees with an unsigned one for the
  non-negative outputs of ReLU and sigmoid.
- **The host side is not part of the RTL.** This covers the ARM program, the
  lightweight AXI bridge and interconnect, and the image preprocessing and
  training. An unnamed conduit port of the reference system has no stated
  function and is not provided.

## Simulation

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends a hung run:

- `tb/nn_model_pkg.sv` is an independent reference model of the neuron
  arithmetic: saturating accumulation, ReLU and sigmoid.
- `tb/axil_if.sv` is an AXI4-Lite master with per-channel delays.
- `tb_nn_accel` runs a 16-input, 8-6-5 network with sigmoid and ReLU layers
  over 12 images. It covers:
  - a soft-reset abort in the middle of an image;
  - accumulator and ReLU saturation;
  - read-to-clear;
  - the interrupt;
  - the latency formula.
- `tb_nn_accel_sw_model` configures the top as the 784-30-30-343-343
  network with sigmoid in every layer. It loads all 152,359 weights and runs
  three images, checking class, code point and latency (771 clocks from the
  last sample) against the model.
- `tb_nn_accel_full` runs the default 784 → 250 build on two synthetic images.
  It loads all 196,000 weights through the bus and checks the class, the code
  point and the latency against the model.

With Verilator 5:

    verilator --binary --timing --assert -j 0 -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/nn_pkg.sv tb/nn_model_pkg.sv tb/tb_nn_accel.sv --top-module tb_nn_accel
    ./obj_dir/Vtb_nn_accel

Replace `tb_nn_accel` with any other testbench name. The testbenches that
need the reference model list `tb/nn_model_pkg.sv`. `tb_weight_memory` reads
`tb/weight_init.mem`, so run it from the repository root. The full-size
testbench needs about half a minute to build and run. The four-layer one
needs about a minute and a half.
