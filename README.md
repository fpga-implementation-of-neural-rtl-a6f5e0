# Neural-network inference on an FPGA: a fully connected digit classifier and a small CNN

This RTL holds two separate inference engines that classify one image at a time
from weights trained offline:

* **ANN**: a fully connected 784-30-30-30-10 perceptron for 28x28 handwritten
  digits (one 16-bit word per pixel). It uses the *distributed* architecture,
  where every neuron of a layer has its own multiplier and weight memory, all
  neurons of a layer work at the same time, and each one sees every output of
  the previous layer. A maximum function picks the class, and a validation unit
  compares it with the expected label and counts correct answers.
* **CNN**: a convolutional network for 32x32 RGB patches. It has three 5x5
  convolutions with 2-pixel zero padding, each with a bias and ReLU. After them
  come 2x2 max pooling, then 2x2 average pooling twice, then a reshape into a
  feature vector, a fully connected layer with ReLU, and the maximum function.

The design follows the architecture of the paper "FPGA Implementation of Neural
Nets" as far as the paper describes it. It fills in the rest (number format,
schedule, memory organisation, load ports) with its own choices. These are
marked below and in each file's header.

`fpga_nn_top` puts the two engines side by side. They share the clock and reset
and nothing else.

## Number format

Every pixel, activation, weight and bias is a 16-bit signed fixed-point number
with 8 fraction bits (Q7.8). The values are set in `nn_pkg` (`DATA_W`, `FRAC`,
`ACC_W`).

* A product of two Q7.8 numbers has 16 fraction bits. Products are summed in a
  48-bit accumulator, which cannot overflow for any dot product in this design.
* The bias is shifted left by 8 and added to the sum.
* `requant()` then shifts the sum right by 8 (arithmetic shift, truncating
  toward minus infinity), applies ReLU if asked, and saturates the result to
  16 bits.
* Average pooling is `(a+b+c+d) >>> 2`.

The 16-bit word size comes from the paper. The Q7.8 split, truncation and
saturation are this design's choices. To train for this hardware, quantise to
Q7.8 and reproduce this rounding.

## The neuron

`nn_neuron` is the basic unit of both networks: one multiplier and one
accumulator.

* It takes one `(x, w)` pair per cycle.
* `in_first` restarts the sum and `in_last` ends it.
* One cycle after the last pair, `out_valid` pulses and `y` holds
  `act(sum + bias)`.

The ANN has one neuron per output of every layer: 30 + 30 + 30 + 10 = 100
multipliers. Each CNN stage uses a single neuron for all of its outputs.

## The fully connected network (`ann_mlp`)

### One layer (`ann_layer`)

After `start`, the layer steps an index `i` from 0 to `N_IN-1`:

1. It requests input `i` from its source, and reads weight `i` of every neuron
   from that neuron's own block RAM.
2. One cycle later, the input word is broadcast to all `N_OUT` neurons. Each
   neuron multiplies it by its own weight.

So a layer pass costs `N_IN + 2` cycles, whatever the number of neurons. `y`
keeps all results until the next pass ends.

The source has one cycle of read latency:

* For the first layer, the source is the 784-word image buffer (block RAM).
* For later layers, it is a registered multiplexer over the previous layer's
  output registers.

### Network

The layers run one after another. Layer *k+1* starts on layer *k*'s `done`.

* The hidden layers use ReLU.
* The output layer is linear, so the maximum function (`ann_argmax`) compares
  signed scores. On a tie, the lower index wins.
* `ann_validate` compares the class with the `label` sampled at `start`. It
  updates `match`, `n_total` and `n_correct`. Accuracy is
  `n_correct / n_total`.

Latency, counted in rising edges from the edge that accepts `start` to the one
that raises `done`:

    (784+2) + (30+2) + (30+2) + (30+2) + 1 = 883 cycles per image

The number of hidden layers is a parameter (`N_HIDDEN`, default 3), and so are
the layer sizes.

### Loading (`ld`, one word per cycle, while idle)

| `ld.sel` | writes |
|---|---|
| 0 | image pixel `ld.index` (0..783) |
| 1 + k | weight `ld.index` of neuron `ld.unit` in layer k (k = 0 is the first hidden layer) |
| 8 + k | bias of neuron `ld.unit` in layer k |

## The convolutional network (`cnn_top`)

### Stages and buffers

Each stage reads one feature-map block RAM and writes the next one. A
sequencer FSM (`ST_CONV1 … ST_MAX`) starts each stage once the previous one has
reported `done`. Map `c`, row `y`, column `x` is at word `(c*H + y)*W + x` in
every buffer. The default sizes are:

| stage | block | result | buffer words |
|---|---|---|---|
| input | – | 3 x 32x32 | 3,072 |
| conv 1 | `cnn_conv` 3→32 | 32 x 32x32 | 32,768 |
| max pool | `cnn_pool` AVG=0 | 32 x 16x16 | 8,192 |
| conv 2 | `cnn_conv` 32→32 | 32 x 16x16 | 8,192 |
| avg pool | `cnn_pool` AVG=1 | 32 x 8x8 | 2,048 |
| conv 3 | `cnn_conv` 32→64 | 64 x 8x8 | 4,096 |
| avg pool | `cnn_pool` AVG=1 | 64 x 4x4 | 1,024 |
| full connection + ReLU | `cnn_fc` 1024→10 | 10 scores | registers |
| maximum | `ann_argmax` | class | – |

### Convolution (`cnn_conv`)

Nested counters walk the layer in this order: output map, row, column, then
input map, kernel row, kernel column. The innermost counters change fastest.

* Each output pixel sums `CIN*K*K` products, one per cycle.
* A tap that falls into the padding is not read from memory; a zero is fed in
  its place.
* The result is written back with the address it was computed for, which is
  carried through the two pipeline stages.

A convolution takes `COUT*H*W*CIN*K*K + 2` cycles. A pooling stage reads its
four window pixels one per cycle and takes `4*C*(H/2)*(W/2) + 2` cycles. The
fully connected layer takes `N_OUT*N_IN + 3` cycles. With the sequencer's state
changes, one image takes

    sum of stage work + 23 = 12,343,319 cycles at the default sizes.

The convolutions dominate this time. With one multiplier per stage, the CNN
trades speed for a very small datapath: 4 multipliers in total.

### Loading (`ld`, while idle)

| `ld.sel` | writes |
|---|---|
| 0 | image word `(c*32 + y)*32 + x` |
| 1, 2, 3 | weight `(ci*5 + ky)*5 + kx` of output map `ld.unit` of convolution 1, 2, 3 |
| 4 | weight `ld.index` (feature index, layout as above) of output `ld.unit` of the full connection |
| 8, 9, 10, 11 | bias of map/output `ld.unit` of convolution 1, 2, 3, full connection |

## What comes from the paper and what does not

From the paper:

* the 784-input, 30-neuron hidden layers and 10-output network;
* three hidden layers, as printed in its architecture figures;
* the 16-bit pixel word;
* the maximum function at the output;
* comparing the output with the expected label;
* the distributed architecture, in which each neuron takes every output of the
  previous layer;
* the CNN's 32x32x3 input, 5x5 kernels with 2-pixel padding and 32 first-layer
  maps;
* the 16x16 size after max pooling;
* the stage order: conv, max pool, conv, avg pool, conv, avg pool, reshape,
  full connection, ReLU;
* ReLU layers inside the CNN.

This design's own choices:

* the Q7.8 format and rounding;
* ReLU in the ANN's hidden layers (the paper names no ANN activation);
* the serial multiply-accumulate schedule;
* one block RAM per neuron;
* the load ports and their encodings;
* 2x2 pooling windows;
* the map counts of the second and third convolution (32 and 64);
* ten CNN outputs.

Where the paper is inconsistent:

* **Hidden layers.** The paper's text mentions both two and three hidden
  layers. Three are built, as in its figures. Set `N_HIDDEN = 2` for the other
  reading.
* **Final CNN maps.** The paper states that the last layers form 125 feature
  maps of 5x5. That does not follow from 16x16 maps, size-keeping 5x5
  convolutions and halving poolings. This design gets 64 maps of 4x4 (1,024
  features).
* **CNN input size.** The paper also mentions 200x72 images for the CNN. The
  built network takes square `IMG x IMG` patches (32x32). A 200x72 image does
  not fit without adding separate height and width parameters.

Not built:

* **Serial and parallel ANN architectures.** The paper compares these with the
  distributed one and reports lower accuracy for them.
* **Local response normalisation.** The paper mentions it but gives no position
  or constants.
* **Training.** Weights are trained offline and loaded through the `ld` ports.

The paper's timing figures come without a clock frequency, so they cannot be
compared with the cycle counts here.

## Verification

Each block has a self-checking testbench in `tb/`. A testbench drives the
block, compares it with an integer model in `tb_nn_ref`, checks the cycle
counts given above, and ends by printing
`TB_RESULT checks=N failures=M`. The model is written independently of the RTL,
using `longint` sums, shifts and clipping.

| testbench | what it runs |
|---|---|
| `tb_nn_neuron` | 200 random dot products, ReLU on/off, saturation, output timing |
| `tb_ann_layer` | 20-input, 5-neuron layer, four passes, pass length |
| `tb_ann_argmax`, `tb_ann_validate` | random vectors with ties; counters and clear |
| `tb_ann_mlp` | full 784-30-30-30-10 network, three images, latency 883, counters with one wrong label |
| `tb_ann_mnist_batch` | full network over 10,000 images (the size of the MNIST test set), every class checked, validation counters at the end; about 30 s |
| `tb_cnn_conv`, `tb_cnn_pool`, `tb_cnn_fc` | each stage at a reduced size against the model |
| `tb_cnn_top` | whole CNN at 8x8 input with 4 maps per layer, two images |
| `tb_fpga_nn_top` | full-size top with default parameters: both networks at once, two ANN images and one CNN image (about 12.4 M cycles) |

Test data is generated, not read from files:

* Weights come from a hash of (memory, unit, index), in the range ±32/256.
* Pixels are 0..255/256, and are scaled up by 8 for the CNN.

The top-level test also counts the mechanisms it exercises: ReLU clipping,
padding taps, every convolution, max-pooling, average-pooling and
full-connection run, and label match and mismatch. It fails if any of them
never happened. It shows that the arithmetic and control are right. It says
nothing about accuracy on real data, which depends on trained weights.

Two assertions guard the usage rules. Loading through `ld` is allowed only
while the network is idle (`ann_mlp`, `cnn_top`). In the CNN, at most one stage
may be busy at a time. Build with `--assert` to check them.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/nn_pkg.sv tb/tb_nn_ref.sv tb/tb_fpga_nn_top.sv --top-module tb_fpga_nn_top
    ./obj_dir/Vtb_fpga_nn_top

Replace the last file and `--top-module` to run another testbench. The
full-size run finishes in well under a minute.

## Files

* `rtl/nn_pkg.sv`: number format, `requant()`, the `load_t` load-port struct.
* `rtl/nn_ram.sv`: simple dual-port block RAM (synchronous write and read).
* `rtl/nn_neuron.sv`, `rtl/ann_layer.sv`, `rtl/ann_argmax.sv`,
  `rtl/ann_validate.sv`, `rtl/ann_mlp.sv`: the fully connected network.
* `rtl/cnn_conv.sv`, `rtl/cnn_pool.sv`, `rtl/cnn_fc.sv`, `rtl/cnn_top.sv`: the
  convolutional network.
* `rtl/fpga_nn_top.sv`: both networks side by side.
* `tb/`: testbenches and the reference package `tb_nn_ref.sv`.
