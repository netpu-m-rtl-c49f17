# NetPU-M: a stream-programmed MLP accelerator

NetPU-M runs inference for quantized multilayer perceptrons (MLPs) without
being rebuilt for each network. The hardware holds a few neurons whose
behaviour can be changed at run time. Each neuron can switch between binary
and 2-8 bit arithmetic, with or without batch normalization, and can apply
ReLU, Sigmoid, tanh, Sign or a multi-threshold quantizer.

Everything that describes a network arrives on one 64-bit input stream, in a
fixed order:
- the layer count;
- one setting word per layer;
- the image;
- each layer's parameters and weights.

The accelerator answers with one word: the winning class and its score. The
host does nothing but stream data, because every load happens in an order
known in advance.

The design has three levels:

| Level | What it is | How it is used |
|---|---|---|
| **TNPU** (transformable neuron processing unit) | One neuron. | It computes one neuron's weighted sum and post-processes it as the current layer asks. |
| **LPU** (layer processing unit) | 8 TNPUs plus FIFO buffers. | It runs one layer. Neurons are processed in batches of 8, and the layer input is replayed from a reload buffer for each batch. |
| **NetPU** (network processing unit) | A ring of 2 LPUs, plus stream FIFOs and a controller. | Layers are assigned to the LPUs in turn. An LPU that has finished one layer is given the layer two steps ahead. Any depth of network therefore runs on two LPUs. |

All RTL is in `rtl/`, in SystemVerilog, one module per file. The testbenches
are in `tb/`.

## Number formats

Most of the subtle parts of the design are formats, so they are described
first.

| Quantity | Format |
|---|---|
| Activations (layer inputs and outputs) | Unsigned, 1 to 8 bits. A precision code `p` (3 bits) means `p+1` bits. |
| Weights | Two's complement, 2 to 8 bits. A 1-bit weight is bipolar: `1` = +1 and `0` = -1. |
| Binary layers (input precision code 0) | Activations are also bipolar. A lane computes `2·popcount(XNOR) − n`. |
| Accumulator | 32-bit signed. |
| Bias | 8-bit signed. It is used only when batch normalization is folded into the bias and thresholds. |
| BN scale and offset | 32-bit signed, 5 fraction bits. |
| Values after BN or ACCU, and activation inputs | 37-bit signed, 5 fraction bits. |
| Sign threshold and multi-thresholds | 32-bit signed, 5 fraction bits. |
| QUAN scale | 32-bit signed, 16 fraction bits. |
| QUAN offset | 32-bit signed, 5 fraction bits. |

Quantization computes:

`q = clamp((x·scale + offset·2^16 + 2^20) >>> 21, 0, 2^bits − 1)`

In words, this is `round(x·scale + offset)` brought back to an integer.

The activations:

- **ReLU** gives `max(x, 0)`.
- **Sigmoid** is piecewise linear, with an output in 1/32 units:

  | `|x|` range | f(|x|) |
  |---|---|
  | ≥ 5 | 1 |
  | 2.375 to 5 | `|x|/32 + 0.84375` |
  | 1 to 2.375 | `|x|/8 + 0.625` |
  | below 1 | `|x|/4 + 0.5` |

  For negative x the result is `1 − f(|x|)`.
- **tanh** is `2·sigmoid(2x) − 1`, using the same sigmoid unit.
- **Sign** outputs 1 when x ≥ threshold, otherwise 0.
- **Multi-threshold** has `2^n − 1` thresholds for an n-bit output. The output is the number of thresholds below x (`thr < x`). n is at most 4 (15 thresholds).

Sign and multi-threshold produce the next layer's activation directly.
ReLU, Sigmoid and tanh go through the quantizer.

## TNPU: one reconfigurable neuron

`tnpu.sv` chains five stages. A crossbar chooses which of them a value
passes through.

- **MUL** (`tnpu_mul.sv`) has 8 lanes, and each takes one byte of the 64-bit
  input word and one byte of the weight word.
  - In integer mode each lane multiplies one element.
  - In binary mode each lane XNORs 8 one-bit channels and counts the matches.
  - `nvalid` masks the unused tail of a layer's last word.
  - It is combinational.
- **ACCU** (`tnpu_accu.sv`) adds the 8 lane products into a 32-bit register.
  On a neuron's first word it starts again from the bias (BN folded) or from
  zero.
- **BN** (`tnpu_bn.sv`) computes `acc·scale + offset`, saturated to 37 bits. It is used only when BN is not folded.
- **ACTIV** (`tnpu_activ.sv`) applies the activation selected by the layer setting.
- **QUAN** (`tnpu_quan.sv`) does the requantization described above.
- **Crossbar** (`tnpu_crossbar.sv`) sets the path:

  | Layer | Path |
  |---|---|
  | Input layer | The 8-bit pixel (as `pixel·32`) goes to ACTIV for Sign/multi-threshold, otherwise to QUAN. |
  | Hidden layer | ACCU → BN (or `acc·32` when folded) → ACTIV → QUAN (skipped for Sign/multi-threshold). |
  | Output layer | The BN/ACCU value is the neuron's result. |

A TNPU keeps its own copy of its parameters in registers:
- sign threshold;
- 15 multi-thresholds;
- bias;
- BN scale and offset;
- QUAN scale and offset.

The LPU writes them one value per cycle through `prm_we/prm_sel/prm_idx/prm_data`.

Timing:
- `acc_en` adds one input/weight word per cycle.
- `fin` ends the neuron.
- The result appears, registered, on the next cycle with `out_valid`.

## LPU: one layer, batch by batch

`lpu.sv` contains the layer control, 8 TNPUs and the buffer cluster
(`lpu_buffer_cluster.sv`). All buffers are first-word-fall-through FIFOs
(`sync_fifo.sv`).

| Buffer | Width × depth |
|---|---|
| layer input, input reload, layer weight, bias | 64 bit × 1024 |
| BN scale, BN offset, sign threshold, multi-thresholds, QUAN scale, QUAN offset | 128 bit × 2048 |

The 128-bit buffers are filled from pairs of 64-bit stream words, the first
word in the low half.

A layer passes through three steps.

1. **Layer initialization.** `cfg_valid` loads the layer setting word. The
   LPU then takes the layer's parameters from the stream. They come category
   by category, in this order:
   - sign thresholds, then multi-thresholds;
   - biases;
   - BN scales, then BN offsets;
   - QUAN scales, then QUAN offsets.

   Categories the layer does not use are skipped, and neuron counts are
   padded to whole batches. Packing is two 32-bit values per stream word, or
   eight biases per word. When the parameters are in, `loaded` goes high.
2. **Neuron initialization.** After `start`, for each batch of up to 8
   neurons the LPU moves the batch's parameters from the buffers into the
   TNPU registers, one value per cycle.
3. **Neuron processing.** Weights arrive on the stream: for each input word,
   one weight word per neuron in the batch. Each cycle one weight word goes to
   one TNPU, together with the current input word. A batch of 8 neurons
   therefore uses each input word for 8 cycles. This design processes at the
   rate of the 64-bit stream: one weight word per cycle.
   - The first batch takes its inputs from the layer input buffer and copies
     them into the input reload buffer.
   - Later batches read the reload buffer and copy back.
   - The last batch does not copy.

   Because of this, each layer input is received only once. When the batch
   is done, the TNPUs finish and their outputs are packed:
   - binary outputs 64 per word, with element i in bit i;
   - wider outputs one per byte.

An **input layer** receives the raw 8-bit pixels and has no weights. It uses
one batch of parameters, and TNPU t processes byte t of every input word.
That is, per-pixel-position parameters repeat with period 8. Its job is to
quantize the image into the first hidden layer's activations.

An **output layer** feeds each neuron's 37-bit result through **MaxOut**
(`maxout.sv`). MaxOut is a serial arg-max: the first maximum wins on ties.
After the last batch the LPU emits one word:
`{max value sign-extended in 63:16, class index in 15:0}` with `out_last`.

## NetPU: the stream and the LPU ring

`netpu.sv` is the top. It contains:
- a receive FIFO (512 words) on `s_axis_*`;
- a layer setting FIFO (64 entries);
- a transmit FIFO (16 words) on `m_axis_*`;
- the two LPUs connected in a ring.

In front of LPU 0, an input multiplexer chooses between the image (while
`is_first_input` is high) and the output of the last LPU. Behind each LPU, an
output crossbar sends its words either to the next LPU or through the output
multiplexer to the transmit FIFO. It uses the transmit FIFO when that LPU is
running the output layer (output enable and output layer index).

Stream layout for an N-layer network, each item one or more 64-bit words:

```
N                          (bits 15:0)
N layer setting words      (layer_cfg_t, below)
image: 8 pixels per word   (in_len of layer 0 pixels)
parameters of layer 0, parameters of layer 1
weights of layer 0
parameters of layer 2
weights of layer 1
...
weights of layer N-1
```

With NUM_LPU LPUs, the parameters of layer `l+NUM_LPU` follow the weights of
layer `l`. The controller:
1. loads the settings;
2. sends the image into LPU 0's input buffer;
3. configures layers 0 and 1 and loads their parameters;
4. runs the layers in order.

When an LPU finishes layer `l` and there is a layer `l+2`, that LPU is reset
with the new setting and parameters. While it loads, the other LPU is already
processing.

Layer setting word (`netpu_pkg::layer_cfg_t`, 47 bits):

| bits | field |
|---|---|
| 15:0 | input length (elements) |
| 31:16 | neuron count |
| 34:32 | output precision code |
| 37:35 | weight precision code |
| 40:38 | input precision code (0 = binary) |
| 41 | BN folded |
| 44:42 | activation: 0 ReLU, 1 Sigmoid, 2 tanh, 3 Sign, 4 multi-threshold |
| 46:45 | layer type: 0 input, 1 hidden, 2 output |

Weights are ordered by:
1. batch;
2. then input word;
3. then neuron within the batch.

Each weight word holds 8 weights, or 64 in a binary layer. It is aligned
with the input word it multiplies. Layer 0 must be an input layer and the
last layer an output layer.

## Capacity and speed

The default build has 2 LPUs of 8 TNPUs and the buffer sizes above. It holds
layers of up to:
- 8192 inputs at 2 to 8 bits (1024 input words);
- 4096 neurons with one value per parameter category (8192 values per 128-bit buffer).

This covers the MNIST MLPs used to evaluate the architecture. Each has 784
inputs, three hidden layers of 64 (TFC), 256 (SFC) or 1024 (LFC) neurons, and
10 outputs.

Measured in simulation, in cycles from the first stream word to the result:

| Model | stream words | cycles | µs at 100 MHz |
|---|---|---|---|
| TFC-w1a1 (Sign, BN folded) | 1200 | 2057 | 20.6 |
| TFC-w2a2 (multi-threshold, folded) | 7806 | 9063 | 90.6 |
| SFC-w1a1 | 6006 | 8519 | 85.2 |
| SFC-w2a2 (BN not folded) | 43844 | 48591 | 485.9 |
| LFC-w1a1 | 48270 | 57407 | 574.1 |
| LFC-w1a2 | 368886 | 384183 | 3841.8 |

Latency is set by the input stream: close to one cycle per stream word. The
remaining cycles come from:
- loading parameters into the TNPUs, one value per cycle, per batch;
- finishing each batch;
- packing the outputs.

The 2-bit models are dominated by their weight volume.

## Departures and choices

The architecture fixes the three-level structure, the TNPU stages and their
widths, and the buffer sizes. It also fixes the batch scheme with input
reload, the LPU ring with its multiplexers, the stream order and the sigmoid
approximation. The following are this implementation's own decisions:

- Encodings: the setting word layout, the precision code meaning, signedness and bipolar 1-bit weights.
- The fixed-point formats of BN, thresholds and quantization, and the rounding rule.
- The packing of parameters, weights and outputs into 64-bit words, and the padding of parameters to whole batches.
- Serial processing inside an LPU: one TNPU receives one weight word per cycle, matching the stream rate.
- Multi-threshold outputs are limited to 4 bits (15 thresholds per neuron), which keeps the per-TNPU threshold registers small.
- MaxOut returns both the class index and the score; ties go to the first neuron.
- Valid/ready handshakes everywhere, synchronous active-low reset, and FIFO depths for the receive, transmit and setting FIFOs.

SoftMax is not implemented. The DMA engine and the host processor that feed
the stream in a system are outside this RTL.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares against an
independent model in `tb/netpu_tb_pkg.sv`, which includes a full reference
network (`net_model`). Each ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_tnpu_mul`, `tb_tnpu_accu`, `tb_tnpu_bn`, `tb_tnpu_activ`,
  `tb_tnpu_quan`, `tb_tnpu_crossbar` and `tb_tnpu` cover the arithmetic with
  random operands in every mode. `tb_tnpu` also checks that the result comes
  one cycle after `fin`.
- `tb_sync_fifo`, `tb_lpu_buffer_cluster` and `tb_maxout` are checked against
  queue models and an arg-max model.
- `tb_lpu` runs single input, hidden and output layers of random networks.
  It uses random stalls, and checks the cycle count against one weight word
  per cycle plus a fixed overhead.
- `tb_netpu` runs 40 random networks of 3 to 6 layers end to end, with input
  gaps and output back-pressure. It checks every word passed between LPUs.
  It counts each mechanism and fails if one never occurred. The mechanisms
  are:
  - binary and integer layers, each activation, BN folded and not;
  - input reload, partial batches, mixed precisions, bipolar 1-bit weights;
  - LPU resetting, output from each LPU, stalls, multi-batch MaxOut.
- `tb_netpu_full` runs the six MNIST models above on the default-size top.
  It checks the class and score, and checks that the latency stays within
  one cycle per stream word plus a fixed overhead. It also checks that the
  latency is no higher than the simulated latency published for the
  original architecture at 100 MHz, and that the receive FIFO filled up and
  held the stream back at least once. The measured latencies are 0.52 to
  0.64 times the published ones.

Weights, parameters and images in the testbenches are random. No trained
network is included.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_netpu \
  rtl/netpu_pkg.sv tb/netpu_tb_pkg.sv rtl/*.sv tb/tb_netpu.sv -Irtl -Itb
./obj_dir/Vtb_netpu +verilator+rand+reset+2
```

Replace `tb_netpu` with any other testbench name. The packages must come
first on the command line.
