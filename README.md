# Binarized CNN inference engine for weed classification

This is synthesizable SystemVerilog for a small FPGA inference engine that runs
*binarized* convolutional networks. Every weight and every hidden activation
is +1 or -1. The engine classifies a 3x32x32 camera image into one of nine
classes: eight weed species and "negative", meaning no target plant. For every
weed class it raises a trigger that a spot sprayer can use.

Because the values are binary, 32 of them fit in one 32-bit word. A block of
32 multiply-accumulates then reduces to one XNOR and one population count:

    a += popcount(xnor(activations[31:0], weights[31:0]))

The engine is built around that operation.

The design follows the FPGA engine described in *Low-Power and High-Speed Deep
FPGA Inference Engines for Weed Classification at the Edge*.
That engine was written mostly as OpenCL kernels. Its one hand-written RTL
module is a four-cycle XNOR kernel on 32-bit registers. The XNOR kernel, the
sign rule, the 32-per-word packing and the list of layer kernels come from that
description: convolution as a matrix product, inner product, activation,
pooling, batch normalisation and a softmax output. Everything else is this
design's own: the command interface, the memory organisation and sizes, zero
padding, map slicing for dense-block concatenation, the number formats, and
the argmax output. The section
"Departures and limits" lists where the two differ.

## Binary values and the dot product

* Encoding: bit 1 means +1 and bit 0 means -1.
* Sign rule, used for weights, inputs and activations: a value becomes -1 if
  it is <= 0 and +1 otherwise. Both +0.0 and -0.0 give -1.
* XNOR of two bits is 1 exactly when the product of the two +/-1 values is +1.
  Over a dot product of `n` words with `m` agreeing bits the true value is
  `dot = m - (32n - m) = 2m - 32n`. `xnor_accumulator` computes this.
* A feature map is stored pixel by pixel in row-major order. The channel words
  of one pixel are consecutive:
  `addr = (y * width + x) * channel_words + cw`. Channel `c` is bit `c % 32`
  of word `c / 32`.
* Unused channel bits in the last word of a pixel are 0 (-1) in both
  activations and weights. Each such bit therefore adds +1 to the dot product
  for every kernel tap. This is a constant per layer, and the host folds it
  into the batch-norm shift.

## The XNOR kernel (`xnor_popcount`)

This unit is a four-stage pipeline. It takes one word pair per cycle and
returns the count four cycles later. It never stalls.

| stage | register holds |
|---|---|
| 1 | per bit: `a & w` (both +1) and `~(a \| w)` (both -1) |
| 2 | per bit: XNOR = OR of the two stage-1 terms |
| 3 | popcount of each 8-bit group (4 groups) |
| 4 | sum of the group counts (0..32) |

The source design gives the four-cycle latency, the 32-bit width, and a
per-bit logic network ahead of a final summation. How the logic is split into
stages here is this design's choice.

## How one layer runs

The host sends a `layer_cfg_t` command (see `bnn_pkg`). The engine then
streams one word per cycle through this chain:

    conv_addr_gen -> activation bank + weight memory (1-cycle read)
      -> xnor_accumulator (4 XNOR stages + 1 accumulate)
      -> batchnorm (1 cycle) -> sign_activation (1 cycle) -> other bank

### Convolution as addressing (`conv_addr_gen`)

A 3-D convolution is computed as a matrix product over flattened input
patches (im2col). No patch is copied. Instead, the sequencer emits the
activation and weight addresses of every patch element directly. The loop
order is:

    for oy, ox (output pixel) -> for oc (output channel) -> for ky, kx, c

`c` runs fastest. Each output value is one contiguous run of
`k*k*cin_words` steps, marked `first` and `last`. The channels of a pixel come
out in order, so a plain output map is written to consecutive addresses. A
sliced map uses a fixed pitch instead (see the section on dense blocks). The weight layout follows the same order:
`w_base + ((oc*k + ky)*k + kx)*cin_words + c`.

Zero padding: a step that falls on the border is flagged `skip`, and the
accumulator ignores it. A padded convolution therefore computes the dot
product over the real pixels only, which is the same as padding with zeros.
Strides are fixed: 1 for convolution, and 2 for the 2x2 pooling window.

A fully connected layer is a convolution on a 1x1 map with `k = 1` and
`cin_words` equal to the whole flattened input. The pixel-major layout means
a map needs no reordering before it is flattened.

### Timing

The pipeline has no stalls and dot products follow each other without gaps,
even one-word dot products. For a command of `S` address steps:

* OP_CONV and OP_FINAL: `S = out_h * out_w * cout * k * k * cin_words`.
  The command takes `S + 10` cycles from the cycle `cmd_valid` is taken to
  `done`.
* OP_POOL: `S = out_h * out_w * cin_words * 4`. The command takes `S + 3`
  cycles.

The batch-norm parameter of the next output channel is read one cycle ahead:
the read address is the next value of the channel counter. The parameter is
therefore ready even when a result arrives every cycle.

### Batch normalisation and activation

* `batchnorm` computes `y = ((dot * scale) >>> 8) + shift`. `scale` is a
  signed Q8.8 number and `shift` a signed 24-bit integer, one pair per output
  channel. The host folds the trained mean, variance, gain and bias into this
  pair.
* `sign_activation` binarizes `y` with the sign rule. The networks use tanh
  as their activation, and `sign(tanh(y)) = sign(y)`. The unit packs the bits
  of 32 consecutive channels into one word. It closes a partial word at the
  pixel's last channel.

### Pooling

With values of +/-1, 2x2 max pooling is the bitwise OR of the four window
words. `maxpool` pools all 32 channels of a word in one step.

### Dense blocks: concatenation in place

In a DenseNet layer, the input is every feature map produced so far in the
block, and the layer adds 32 new channels, which is exactly one word per
pixel. Four `cmd` fields let a layer read a slice of a wider map and append to
it:

* `in_stride`: the number of words per pixel in the source map. The layer
  reads the first `cin_words` of them. A value of 0 means `cin_words`.
* `out_stride`, `out_offset`: output word `j` of a pixel goes to
  `pixel * out_stride + out_offset + j`. A value of 0 for `out_stride` means
  the layer's own width.
* `in_place`: write into the bank the layer reads from.

A dense block is allocated once at its final width `W` words per pixel. A
stem writes word 0. Layer `i` then reads words `0..i` (`in_stride = W`) and
writes word `i+1` in place. This is safe because each bank has separate read
and write ports, and a layer never reads the words it writes. A transition
layer then reads all `W` words and writes a new, narrower map in the other
bank. Every write leaves the other words of the destination pixels unchanged,
and the testbench checks this.

### Final layer and classification

OP_FINAL runs like OP_CONV, but it keeps the normalised values as integer
scores. It writes them to a 16-entry score memory and passes them to
`argmax_classifier`. That unit reports the class with the largest score;
on a tie the lower index wins. It raises `spray` unless the class is 8, the
negative class. Softmax keeps the order of the scores, so the decision is the
one a softmax output would give.

## Using the engine (`bnn_engine`)

The engine does nothing on its own. A host, in practice the SoC's processor,
drives it through these ports. All host accesses must happen while `busy` is
low, and assertions check this.

| port group | use |
|---|---|
| `load_valid/target/addr/values` | write 32 single-precision values, binarized and packed, to the weight memory (`LD_WEIGHT`) or an activation bank (`LD_ACT0/1`) |
| `bn_wr_en/addr/data` | write a batch-norm `{scale, shift}` entry |
| `cmd_valid`, `cmd` | start a layer; `done` pulses when its last result is written |
| `act_rd_bank/addr/data` | read back an activation word, one cycle later |
| `score_rd_addr/data` | read back a class score, one cycle later |
| `result_*`, `spray` | class decision after an OP_FINAL command |

Fields of `cmd`:

* `op`: OP_CONV, OP_POOL or OP_FINAL.
* `src_bank`: the bank the command reads. The result always goes to the other
  bank, so consecutive commands alternate banks.
* `in_h`, `in_w`, `cin_words`: the input map.
* `cout`: the number of output channels.
* `k`: the kernel size.
* `pad`: the zero border added on each side.
* `w_base`: the layer's first weight word.
* `bn_base`: the layer's first batch-norm entry.
* `in_stride`, `out_stride`, `out_offset`, `in_place`: map slicing, described
  in the section on dense blocks. Set them to 0 for plain layers.

A binarized VGG-16 at 3x32x32 is issued as follows. The input image goes into
bank 0, binarized by sign. Next come 13 padded 3x3 convolutions in blocks of
64-128-256-512-512 channels, each block followed by an OP_POOL. Then come two
fully connected OP_CONV commands of 4096 channels on the 1x1x512 map, and an
OP_FINAL with 9 outputs. `tb_bnn_engine` runs exactly this sequence.

### Default sizes

| parameter | default | chosen so that |
|---|---|---|
| `ACT_WORDS` | 65536 words per bank | the widest map of the evaluated networks fits. An estimate for DenseNet-128-32 is 32x32x1,376 channels = 44,032 words, assuming three dense blocks of about 41 layers; the exact shapes are not published. WRN-28-10 needs 5,120 words and VGG-16 2,048. |
| `W_WORDS` | 2,097,152 words (64 Mbit) | the binary weights of VGG-16 (1,051,200 words) and WRN-28-10 (at most 1,139,955 words) fit |
| `BN_DEPTH` | 65536 entries | all output channels of a network have their own entry (VGG-16 uses 12,425) |

The weight memory stands in for the external memory of a real board, which
is far larger than the on-chip RAM of a small FPGA. In a synthesized system,
replace `u_wmem` with a port to external memory.

## Departures and limits

* **Throughput.** The engine processes one 32-connection word per cycle in a
  single lane. A VGG-16 image takes about 12.0 M cycles, roughly 300 ms at
  40 MHz. The source engine reports 1-7 ms per image with its kernels unrolled
  by factors it does not publish. A spot sprayer that must classify each
  camera frame within 100 ms would need a clock of at least 120 MHz at this
  rate. Parallel output lanes would be the first extension.
* **Network topologies.** Chains of convolution, pooling and fully connected
  layers run as they are (VGG-16). Dense blocks run through in-place
  concatenation (DenseNet). Wide-ResNet residual additions are not supported,
  because a stored map holds binary values and cannot carry a sum. DenseNet
  transition layers normally use average pooling, but the engine only provides
  2x2 max pooling. Batch normalisation and the sign function are applied where
  each layer produces its output, not at the input of the next layer.
* **Softmax** is replaced by argmax: there is a class decision, but no
  probabilities.
* **First layer.** The input image is binarized by sign like every other
  activation. The source design does not say how its first layer handles the
  non-binary image.
* **External parts.** The following are outside this RTL: the host processor,
  the bridge between processor and FPGA, the external memory and the kernels
  that move data to and from it, the camera and the sprayers. Training-only
  kernels (regularization, optimisation) are also left out, because the engine
  only runs inference.
* No x/z handling: memories and data registers are not reset. Only control
  state is reset, synchronously and active-low, through `rst_n`.

## Files

| file | content |
|---|---|
| `rtl/bnn_pkg.sv` | widths, encodings, `layer_cfg_t`, `bn_param_t`, enums |
| `rtl/xnor_popcount.sv` | four-stage XNOR/popcount kernel |
| `rtl/xnor_accumulator.sv` | dot product over word runs, padding skip |
| `rtl/conv_addr_gen.sv` | im2col address sequencer for convolution and pooling |
| `rtl/batchnorm.sv` | folded fixed-point batch normalisation |
| `rtl/sign_activation.sv` | sign binarization and 32-channel packing |
| `rtl/maxpool.sv` | 2x2 max pooling of packed words |
| `rtl/weight_binarize_pack.sv` | float -> sign bit packing of host loads |
| `rtl/argmax_classifier.sv` | class decision and sprayer trigger |
| `rtl/local_ram.sv` | synchronous-read on-chip memory |
| `rtl/bnn_engine.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench checks its module against values computed independently in
the testbench. Each one prints `TB_RESULT checks=N failures=M` and has a
watchdog. `tb_bnn_engine` runs the engine at its default sizes:

1. A small network on three images, then a small dense block. Together they
   contain a padded convolution, an unpadded convolution, pooling, fully
   connected layers with one-word dot products, a partial output word, strided
   reads, in-place concatenation, a transition layer, and final layers both
   with and without the sprayer trigger. After every command the testbench
   reads the whole destination map back and compares it with a loop-level
   reference model. It also checks the `S + 10` / `S + 3` cycle counts, and
   counts each mechanism. A mechanism that never happened counts as a
   failure.
2. One dense block at full resolution: a 3x32x32 image, a 64-channel stem,
   four layers of growth 32 appended in place to a 192-channel map, a 1x1
   transition to 96 channels and a pool. Every map is checked as in step 1.
3. One full binarized VGG-16 classification of a random 3x32x32 image with
   random weights, checked layer by layer. It takes about 12 M simulated cycles.
   The whole testbench runs in about 15 s with Verilator.

To simulate with Verilator, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl rtl/bnn_pkg.sv \
        tb/tb_bnn_engine.sv --top-module tb_bnn_engine -o sim -Mdir obj
    ./obj/sim

Replace `tb_bnn_engine` with any other `tb_<module>` to run that module's
testbench. For lint, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/bnn_pkg.sv rtl/<module>.sv`.
