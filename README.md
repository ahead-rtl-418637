# Fixed-point MLP neural decoder

This is a small, parameterised inference engine for a multilayer perceptron (MLP). It is meant for the
decoder of a proactive brain–machine interface edge device. Such a decoder has to be retrained often,
and retraining can change the network topology. So the hardware is not written for one network. It is
generated from a handful of parameters: the number of layers, the neurons per layer, the activation
function per layer, how many multipliers work in parallel, and a separate signed fixed-point format for
each signal in the datapath. The fixed-point formats are the main saving. Every node gets only the integer
and fraction bits it needs, and the widths can differ from node to node and from layer to layer. That
gives a much smaller and lower-power circuit than a floating-point datapath of the same structure.

The default build is a 768-48-20-2 network with sigmoid activations in every layer. This is the larger of
the two retrained decoders the architecture was evaluated on. A host writes the weights, biases,
activation tables and an input vector over an AXI4-Lite port, and starts an inference. The two outputs
can be read back 937 clock cycles later.

## How one layer computes

A layer with `NIN` inputs and `NOUT` neurons computes `z = f(x·W + b)`. The bias weights are stored as one
more row of the weight matrix, in the same weight memory, but they are not multiplied: CG-PE2 reads
each bias once and adds it to the finished weighted sum, so the long multiply-accumulate loop never
spends a cycle on it. The work is split between two coarse-grained processing elements.

```
 input x_i ──► ┌───────────── CG-PE1 (PAR lanes) ─────────────┐   ┌──────────── CG-PE2 (PAR2 lanes) ────────────┐
 weight bank ─►│ × ─► reg ─► + ─► acc ──(last input)──► buffer-1 │──►│ + bias ─► buffer-2 ─► PWL f(·) ─► buffer-3 │──► next layer
   (PAR banks) │            ▲ 0 on first input (clear)          │   └────────────────────────────────────────────┘
               └────────────────────────────────────────────────┘
```

* **CG-PE1** (`cg_pe1`) has `PAR` multiply-accumulate lanes. In each cycle one input element `x_i` is
  broadcast to every lane, and each lane reads its own weight from its own bank of the weight memory.
  Neurons are processed in groups of `PAR`: the inputs are streamed once per group, so CG-PE1 takes
  `ceil(NOUT/PAR)·NIN` cycles. On the first input of a group, the accumulator feedback is replaced by
  zero. This is how buffer-1 is cleared, at no cost in cycles. After the last input of a group, the
  lanes write their sums into buffer-1.
* **CG-PE2** (`cg_pe2`) works through the neurons `PAR2` at a time. It reads their bias weights from
  the weight banks, adds them, converts the result
  into the buffer-2 format, passes it through the activation unit and stores the result in buffer-3.
  Buffer-3 is the input buffer of the next layer.
* **Weight memory.** The weight memory of a layer is split into `PAR` banks (`buffer_mem`). Weight
  `w[i][j]` lives in bank `j mod PAR`, at word `(j div PAR)·NIN + i`. One read of all banks therefore
  gives the weights of one input for a whole group of neurons. The bias `b[j]` is stored in the same bank,
  after all weights, at word `ceil(NOUT/PAR)·NIN + j div PAR`. `PAR2` must not exceed `PAR`, so that
  the `PAR2` biases CG-PE2 needs in one cycle always sit in different banks.

The default sets `PAR = NOUT` for every layer. All neurons of a layer then work at once, and a layer
costs about one cycle per input element. `PAR2` defaults to 1, which gives one activation unit per layer.

### Latency

A layer takes `ceil(NOUT/PAR)·NIN + 4 + ceil(NOUT/PAR2) + 6` cycles from `start` to `done`. Of these, 4
cycles are the CG-PE1 pipeline plus the handover to CG-PE2, and 6 are the bias read, the buffer-2
stage and the three-stage activation pipeline. The layers run strictly one after another. The top adds one cycle for
the start command. For the default network this gives 1 + 826 + 78 + 32 = **937 cycles**, which is
8.2 µs at 114 MHz. The next inference can start as soon as `done` is seen, so throughput is
1/latency, as for the published designs. Pipelining inferences across layers is not implemented.

## Fixed-point formats

Every value is a signed Q-format number: one sign bit, `IBW` integer bits and `FBW` fraction bits,
`1+IBW+FBW` bits in all. A stored integer `v` means `v·2^-FBW`. Each layer has six signal nodes, each
with its own format:

| node | parameter (per layer `k`) | default | holds |
|---|---|---|---|
| input `x` | `X_I[k]`, `X_F[k]` | Q(3,4) for the network input, Q(1,6) after a sigmoid | the layer's input, i.e. buffer-3 of the layer before |
| weight `w` | `W_I[k]`, `W_F[k]` | Q(1,6) | weights and bias weights of the layer |
| product | `P_I[k]`, `P_F[k]` | Q(4,8) | `x·w` before accumulation |
| buffer-1 | `A_I[k]`, `A_F[k]` | Q(7,8) | weighted sum without the bias |
| buffer-2 | `S_I[k]`, `S_F[k]` | Q(3,5) | sum plus bias, the activation input |
| buffer-3 | `X_I[k+1]`, `X_F[k+1]` | Q(1,6) | activation output, the next layer's `x` |

Moving a value from one node to the next (`fx_resize`) drops the extra fraction bits, which rounds toward
minus infinity. A value beyond the range of the new format saturates. The accumulator saturates on every
addition too. The full-precision product `x·w` is formed first and only then cut to the product format.

The default widths are placeholders. In the intended flow an offline bit-width search picks every
`IBW`/`FBW` for the trained network and its reference data set, and it reaches averages of about 7 bits.
The defaults here average about 10 bits and are not tuned for any data.

## Activation functions

`pwl_act` evaluates a piecewise-linear approximation `y = a·x + b`. An address generation unit takes the
integer part of `x` and uses it to pick one of `NSEG` = 16 segments of width 1 on [−8, 8). Two small
coefficient memories give the slope `a` (Q(1,8)) and the intercept `b` (Q(1,8)) of that segment. One
multiplier and one adder produce the result, with a register after the coefficient read, after the
multiplier and after the adder, so the latency is 3 cycles at one result per cycle. Inputs outside
[−8, 8) are clamped to the end of the range, so the curve is flat there and does not follow the first or
last line beyond the range. `a·x` and `b` are aligned in an intermediate Q(4,10) format before the
addition.

The hardware does not know which function it computes: the host loads the 16 pairs `(a, b)`. The
testbenches use the chords of the function between integer points, rounded to Q(1,8). With these, the
sigmoid is accurate to better than 0.05, while tanh, which is steep near zero, is within 0.1.

A layer whose `ACT` is `ACT_LINEAR` skips the lines and only converts buffer-2 to the output format, with
the same 3-cycle latency.

## Programming model

Every access is a 32-bit word. The byte address is split into fields (`ahead_pkg`):

| bits | field |
|---|---|
| 27:25 | region |
| 24:22 | layer |
| 21:14 | neuron `j` |
| 13:2 | input `i`, or PWL segment |

| region | name | access |
|---|---|---|
| 0 | control / status | write bit 0 = 1: start. Read: bit 0 busy, bit 1 done |
| 1 | input buffer | write `x[i]` |
| 2 | weights | write `w[layer][i][j]` |
| 3 | biases | write `b[layer][j]` (stored in the weight banks) |
| 4 | PWL slopes | write `a[layer][segment]` |
| 5 | PWL intercepts | write `b[layer][segment]` |
| 6 | outputs | read buffer-3 of the last layer at `j`, sign-extended |

Values are written as two's-complement codes in the low bits of the data word, in the format of the
node they go to. Only the output region and the status register can be read; everything else reads as
zero. A start while the decoder is busy is ignored. The `done` pin mirrors status bit 1 and can serve as
an interrupt. `ahead_pkg::cfg_byte_addr()` builds addresses for software and testbenches.

The AXI4-Lite slave (`axi_lite_slave`) accepts the write address and write data in either order. It
handles one write and one read at a time, ignores byte strobes, and always answers OKAY. A read is
answered two cycles after its address handshake. Assertions in the slave check the AXI rules on
`valid`/`ready` stability.

## Other networks

The top parameters describe any chain of layers up to 8 layers, 255 neurons per layer and 4095 inputs,
limits set by the address fields. Two more topologies are tested by their own testbenches:

* an 800-20-2 sigmoid network: `NL=2`, `N='{800,20,2}`, `PAR='{20,2}`. It takes 863 cycles.
* a 768-48-20-7 network with a linear, a tanh and a sigmoid layer:
  `ACT='{ACT_LINEAR,ACT_TANH,ACT_SIGMOID}`, `X_I/X_F` of the linear output widened to Q(3,4). It takes
  942 cycles.

Every per-layer array parameter must have `NL` (or `NL+1`) entries. Reducing `PAR` trades multipliers
for time: one extra pass over the inputs for every further group.

## Files

| file | content |
|---|---|
| `rtl/ahead_pkg.sv` | activation and region enums, configuration structs, address helpers |
| `rtl/ahead_mlp_top.sv` | top: AXI port, input buffer, layer chain, start/done control, read mux |
| `rtl/mlp_layer.sv` | one layer: weight banks, sequencer, CG-PE1, CG-PE2 |
| `rtl/cg_pe1.sv` | parallel multiply-accumulate lanes and buffer-1 |
| `rtl/cg_pe2.sv` | bias addition, buffer-2, activation lanes, buffer-3 |
| `rtl/pwl_act.sv` | piecewise-linear activation unit |
| `rtl/fx_resize.sv` | Q-format conversion with truncation and saturation |
| `rtl/buffer_mem.sv` | dual-port memory with registered read |
| `rtl/axi_lite_slave.sv` | AXI4-Lite slave |

## Simulation

Each block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`. The
reference values come from integer models written independently in the testbenches. Cycle counts are
checked wherever a latency is defined.

* `tb_fx_resize`, `tb_buffer_mem`, `tb_pwl_act`, `tb_cg_pe1`, `tb_cg_pe2`, `tb_mlp_layer`,
  `tb_axi_lite_slave`: the blocks on their own.
* `tb_ahead_mlp_top`: a reduced 16-6-4-3 network with all three activation kinds, several neuron groups,
  parallel activation lanes, PWL clamping, AXI back-pressure and an ignored start. It runs six
  inferences and checks that each of these mechanisms occurred.
* `tb_ahead_full`: one complete inference of the default 768-48-20-2 decoder, including programming all
  37,824 weights over AXI.
* `tb_ahead_case1`, `tb_ahead_fig4net`: the two other topologies above.

`tb/tb_ahead_common.svh` holds the AXI master tasks and the bit-exact network model shared by the
top-level testbenches.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/ahead_pkg.sv \
          tb/tb_ahead_full.sv --top-module tb_ahead_full
./obj_dir/Vtb_ahead_full
```

The same command works for any testbench: change the file and the top module. Every testbench finishes in
well under a second of simulation time.

## What is taken from the architecture and what is this design's own

These parts follow the architecture as published:

* the layer structure of CG-PE1 (multipliers, accumulator, clearing multiplexer, buffer-1) and CG-PE2
  (bias accumulation, buffer-2, activation function, buffer-3), chained layer to layer;
* the bias weights kept in the weight memory and added by CG-PE2 after the weighted sum;
* parallel lanes in both processing elements;
* partitioned weight memories and an input buffer on the AXI bus;
* six fixed-point nodes per layer, each with its own signed Q(IBW,FBW) format;
* the PWL activation unit with an AGU and two coefficient memories, and 16 segments on [−8, 8);
* the 768-48-20-2 sigmoid default network.

These are choices made here, where the published description is silent:

* all default bit widths;
* truncation and saturation;
* the default parallelism, chosen so that the cycle count matches the reported latency of about 8 µs;
* the bank mapping, including the place of the biases after the weights, and the rule `PAR2 ≤ PAR`;
* the strictly sequential layer schedule;
* the buffer-2 register stage and the pipeline depths;
* input clamping in the PWL unit;
* the address map, the control register and the AXI4-Lite handshake details;
* reset: asynchronous and active low, clearing control state and PWL coefficients but not the
  weight, bias and input memories.

The published hardware was produced by high-level synthesis on FPGAs. This RTL was written directly, so
the area, frequency and power of the published results do not carry over to it. The bit-width search
that chooses the formats, the test-bench generator of that flow, the host processor and the
neural-signal acquisition front end are not part of this RTL.
