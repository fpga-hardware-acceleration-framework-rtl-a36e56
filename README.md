# Streaming neural-network classifier for IoT intrusion detection

This is the programmable-logic half of a network intrusion detector for an
IoT gateway built on a Zynq-7000 class FPGA SoC. Software on the ARM cores
parses each packet and extracts five header fields: source IP, destination IP,
source port, destination port and protocol, each min-max scaled to [0, 1).
It then sends the records to the fabric by DMA. The fabric runs a small
quantized neural network (5 inputs, 40 ReLU hidden neurons, 16 outputs) and
returns, for every record, one of 16 classes: benign, or one of 15 attack
labels of the IoT-23 traffic dataset. The network is trained offline. Its
weights are integers, quantized per layer as `floor(2^20 * w / w_max)`, and
are loaded into on-chip RAM over the AXI-lite register port before traffic
is sent.

The RTL follows the structure of the published FPGA SoC design for this
classifier:

- a pre-process stage on the input stream;
- a hidden layer and an output layer, each computed by 8 time-shared
  neuron units built from multipliers and multiply-accumulators;
- parameters held in block RAM;
- a post-process stage that drives the output stream and its `tlast`;
- a reset block and a 32-bit AXI-lite register block on the
  general-purpose port.

The internals of each unit, the number formats, the stream format and the
register map are this design's own. Everything is plain synthesizable
SystemVerilog, with no vendor primitives.

## Block structure

```
              ext_reset_n ──► ps_reset ──► interconnect reset ──► axil_regs ◄── AXI-lite (GP port)
                                   └─────► NN reset (+ soft reset bit)      │
                                                                            │ param writes, NUM_REC
 s_axis (DMA MM2S) ─► pre_process ─► layer_engine (hidden) ─► layer_engine (output) ─► post_process ─► m_axis (DMA S2MM)
   5 beats/record      feature vec    40 x ReLU, Q4.12         16 x 48-bit scores       argmax, tlast    1 beat/record
                                      [param_ram x2]           [param_ram x2]
```

| file | role |
|---|---|
| `rtl/ids_pkg.sv` | sizes, fixed-point formats, register map, parameter-write struct |
| `rtl/ids_pl_top.sv` | top: reset block, register block, NN block; stream and AXI-lite ports |
| `rtl/nn_block.sv` | the four-stage NN datapath |
| `rtl/layer_engine.sv` | one layer on `LANES` shared neuron units with `K` multipliers each |
| `rtl/param_ram.sv` | row-read, element-write parameter memory (block RAM) |
| `rtl/pre_process.sv` | stream beats to feature vector |
| `rtl/post_process.sv` | argmax, output beat, `tlast` every `NUM_REC` records |
| `rtl/axil_regs.sv` | AXI-lite slave registers |
| `rtl/ps_reset.sv` | reset synchronizer with software reset of the datapath |

The DMA engine, the AXI memory interconnects and the processor system are
not part of this RTL. Their connections are the top's ports.

## The layer engine: how 8 neuron units compute a layer

This is the core of the design. A layer with `N_NEU` neurons of fan-in
`N_IN` is computed on `LANES = 8` neuron units, one neuron per unit at a
time:

- **Groups.** The neurons are taken in groups of 8, giving
  `GROUPS = ceil(N_NEU/8)` passes. The hidden layer takes 5 passes and the
  output layer 2.
- **Beats.** Each unit has `K = 4` multipliers. In one beat it multiplies 4
  inputs by 4 weights and adds each product to its own accumulator, so one
  neuron takes `BEATS = ceil(N_IN/4)` beats: 2 for the hidden layer, 10 for
  the output layer. Input positions past the fan-in are fed as zero, so the
  weight slots behind them need no loading.

The engine issues one beat per cycle without bubbles, including across
group boundaries. The pipeline has four stages:

| stage | what happens |
|---|---|
| issue | read row `group*BEATS + beat` of the weight RAM and row `group` of the bias RAM |
| mul | register 8 × 4 products (17-bit unsigned input × 21-bit signed weight) |
| mac | accumulate: on the first beat of a group the accumulator is loaded with the product, otherwise the product is added; on the last beat the four sums are copied aside |
| act | add the four sums and `bias << BIAS_SHIFT`, shift right by `OUT_SHIFT`; with `RELU=1` clamp to `[0, 2^OUT_W-1]`; write the neuron's output |

Handshakes and timing:

- An input vector is copied when it is accepted, which frees the stage
  before it at once.
- `out_valid` rises `GROUPS*BEATS + 4` cycles after acceptance: 14 cycles
  for the hidden layer, 24 for the output layer.
- The next vector is accepted only after the result has been taken.
- An assertion checks that an unread result is never overwritten.

Weight RAM layout: element `lane*K + k` of row `group*BEATS + beat` holds
the weight of neuron `group*8 + lane` for input `beat*4 + k`. Bias RAM
layout: element `lane` of row `group`.

## Number formats and how to quantize a trained model

| quantity | format |
|---|---|
| feature `x` | unsigned Q0.16, in `tdata[15:0]` of its beat |
| weight, bias | 21-bit two's complement integers (n = 20 plus sign) |
| hidden accumulator | 48 bits, scale 2^16 · 2^20 / w_h |
| hidden activation `h` | `clamp((acc >>> 24), 0, 65535)`, i.e. unsigned Q4.12 in units of 1/w_h |
| output score | 48-bit signed, scale 2^12 · 2^20 / (w_h · w_o) |
| class | index of the largest score, lowest index on a tie |

Here `w_h` and `w_o` are the largest weight magnitudes of the hidden and
output layers. For the integer network to match the float one up to
rounding, quantize as follows:

- hidden weights: `floor(2^20 * w / w_h)`
- hidden biases: `floor(2^20 * b / w_h)` (the hardware scales them by 2^16)
- output weights: `floor(2^20 * w / w_o)`
- output biases: `floor(2^20 * b / (w_h * w_o))` (the hardware scales them by 2^12)

Hidden activations clamp at 16 · w_h in real units. Choose `HID_SHIFT`, or
`H_FRAC` in `ids_pkg`, if a model needs more range. Softmax is not computed:
it is monotonic, so the argmax of the raw scores is the same class.

## Stream framing and the register map

**Input stream.** `N_IN = 5` beats per record, one feature per beat. Records
are framed by counting beats; input `tlast` is ignored.

**Output stream.** One beat per record, carrying the class number.
`m_axis_tlast` is set on every `NUM_REC`-th beat, so a DMA receive buffer of
`NUM_REC` records closes exactly at its end. A value of 0 behaves as 1.

**Registers** (byte offsets on the 32-bit AXI-lite slave):

| offset | name | access | content |
|---|---|---|---|
| 0x00 | CTRL | RW | bit 0: soft reset of the NN datapath; parameters and registers are kept |
| 0x04 | NUM_REC | RW | records per output transfer; resets to 1 |
| 0x08 | PARAM_ADDR | RW | [16] layer (0 hidden, 1 output), [15:8] neuron, [7:0] input; input = fan-in addresses the bias |
| 0x0C | PARAM_DATA | W | writes bits [20:0] to the parameter at PARAM_ADDR |
| 0x10 | STATUS | R | records classified since the datapath reset |
| 0x14 | INFO | R | `{N_OUT, N_HID, N_IN, 8'h00}` |

Loading a model takes 896 pairs of writes to PARAM_ADDR and PARAM_DATA.
Switching models means loading new parameters; one model is resident at a
time. The write address and write data channels may arrive in any order, and
every access answers OKAY.

**Resets.** `ext_reset_n` is asserted asynchronously and released after 3
clock edges. The NN datapath leaves reset one edge later, and is also held in
reset while CTRL bit 0 is set.

## Throughput and latency

The output layer sets the pace: one record every
`GROUPS_out*BEATS_out + 5 = 25` cycles, so 4 M records/s at 100 MHz. One
record takes 45 cycles from its first input beat to its output beat. A
transfer of N records therefore takes `45 + 25*(N-1)` cycles, as long as the
DMA keeps the input stream full (it needs only 5 of every 25 cycles). The
testbenches measure and check this formula.

| records per transfer | cycles | time at 100 MHz |
|---|---|---|
| 1 | 45 | 0.45 µs |
| 1,024 | 25,620 | 0.26 ms |
| 16,384 | 409,620 | 4.1 ms |
| 22,544 | 563,620 | 5.6 ms |
| 398,000 (any buffer size from 1 to 32) | 9,950,020 | 99.5 ms |

The buffer size does not change the time here: the datapath never waits
between transfers. In a real system the time is set by the per-transfer
overhead of the DMA and the software.

The published implementation reports about 0.43 ms for 16,384 records and
0.44 ms for 22,544 records at 100 MHz, using 184 DSP slices. That is about 2
cycles per record, while one record needs 840 multiply-accumulates; at one
multiply per DSP slice per cycle, 184 slices need at least 4.6 cycles per
record. This design does not try to reach the reported rate. It uses
8 × 4 × 2 = 64 multipliers. The record interval is
`ceil(N_OUT/LANES) * ceil(N_HID/K) + 5` cycles. Raising `P_K` on `nn_block`
(or `K_MUL` in `ids_pkg`) shortens it: with 8 multipliers per unit it is 15
cycles.

## Where this design departs from the published one

- **Neuron units.** Its block diagram shows, inside each hidden neuron,
  multiply-accumulate units in the adder path after the four MUL/MAC pairs.
  Here each unit is 4 multipliers, 4 accumulators and a plain adder tree.
- **Softmax.** The output layer's softmax is replaced by an argmax in the
  post-process stage. The class is the same, but no probabilities are
  produced.
- **Parameter loading.** Parameters are written through registers after
  reset instead of being part of the configuration image.
- **Chosen here.** The number formats, the stream format, the `tlast` rule
  and the register map are all this design's own.
- **Not checked.** Timing closure at the reported 104 MHz and resource use
  have not been checked against an FPGA implementation.
- **Not built.** The two-model hierarchical decision (re-classify with a
  benign-vs-port-scan model when the main model says benign or port scan) is
  not in hardware. The published design also runs it in software.

## Simulation

All testbenches are self-checking and print
`TB_RESULT checks=<n> failures=<n>`. The testbenches share a reference
model, `tb/nn_ref_pkg.sv`, that computes each class with plain integer loops.

| testbench | what it covers |
|---|---|
| `tb_param_ram` | element writes, row reads, data held between reads |
| `tb_layer_engine` | hidden, output and saturating layer shapes against a reference; latency; both ReLU clamps |
| `tb_pre_process` | feature order, input stall while a vector waits |
| `tb_post_process` | argmax with ties, `tlast` for periods 1, 4 and 7, backpressure |
| `tb_axil_regs` | channel ordering, byte strobes, read-only registers, parameter-write pulses |
| `tb_ps_reset` | asynchronous assertion, synchronous release, soft reset |
| `tb_nn_block` | random model and records; 25-cycle steady-state rate; random gaps and backpressure |
| `tb_ids_pl_top` | full design at default sizes through AXI-lite and both streams (see below) |
| `tb_dma_buffer_sizes` | transfers of 2^0 … 2^14 records and of 22,544 records; a 398,000-record trace for buffer sizes 1 to 32; cycle counts (about a minute of simulation) |

`tb_ids_pl_top` runs the whole design at its default sizes:

- transfers of 1, 2, 4, 8, 16 and 32 records;
- a soft reset with a record half sent and a result unread;
- loading a second model.

It counts input stalls, output backpressure, `tlast` beats, ReLU zeroing,
soft resets and model loads, and fails if any of them never happened.

To run one with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/ids_pkg.sv tb/nn_ref_pkg.sv tb/tb_ids_pl_top.sv --top-module tb_ids_pl_top -o sim
./obj_dir/sim
```

Replace the testbench name as needed; the block testbenches that do not
import `nn_ref_pkg` need only `rtl/ids_pkg.sv` in front. The simulations use
random models, because the trained parameters are not part of this design.
Every result is checked against the reference model, not against a
classification accuracy.

## Changing the design

- **Network shape.** Set `P_N_IN`, `P_N_HID` and `P_N_OUT` on `nn_block`
  (for example 18 inputs for a model using all flow features, or 2 outputs
  for a two-class model). Neuron and input indices are 8-bit fields, so
  layers up to 255 wide can be addressed.
- **Parallelism.** `P_LANES` and `P_K` set the neuron units and the
  multipliers per unit.
- **Formats.** Change them in `ids_pkg`: `HID_SHIFT` follows from `X_FRAC`,
  `Q_BITS` and `H_FRAC`.
- **Known lint output.** The lint warnings that remain are unused package
  constants, the two unused address bits of the word-aligned register
  decoder, and notes that the reset synchronizer's flip-flops feed both
  flip-flop data and asynchronous resets downstream (which is what a reset
  synchronizer does), and that the resets also drive assertion `disable iff`
  clauses.
