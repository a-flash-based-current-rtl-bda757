# Flash-based current-mode QNN inference chip

This RTL describes a mixed-signal accelerator for quantized and binarized
convolutional neural networks. Every weight sits in the threshold voltage of a
flash transistor, and a neuron ("node") computes its dot product as a sum of
currents. Nothing is fetched from memory during inference. The weights never
move: an image streams in row by row, each layer works on it as soon as it has
enough pixels, and the class scores stream out of a final layer that carries an
8-bit ADC per node.

The digital parts are synthesizable SystemVerilog: the layer memories, window
logic, multiplexers, control FSMs and the successive-approximation logic of the
ADC. The analog parts are behavioural models with integer currents: the flash
input networks, the threshold blocks, the current mirrors and comparators, and
the ADC's sample-and-hold, DAC and comparator. They are marked as such in their
file headers.

## The node: a dot product in current

A node has two halves of flash branches, a left and a right input network, with
one branch pair per input. Weights take nine values, -4..+4.

- A weight's magnitude is set by the flash threshold voltage. |w| = 4, 3, 2, 1
  and 0 map to 0.862, 0.908, 0.962, 1.037 and 2 V (`qnn_pkg::vth_mv`).
- Its sign chooses which half holds the conducting branch.
- Each input bit x_i (1 = +1, 0 = -1) steers the branch current to one of two
  summing lines, I_IN+ or I_IN-. The current lands on I_IN+ exactly when
  w_i·x_i is positive.

Kirchhoff's current law adds up all branches. Two current mirrors then bring
I_IN+ and I_IN- to one comparator node, and the comparator outputs 1 when the
positive side wins.

Batch normalisation folds into a threshold T, giving out = (Σ w·x > T).
T is realised by two extra flash blocks, T+ and T-. A positive T adds current to
the negative side; a negative T adds to the positive side.

In `flash_input_network` and `flash_node` all of this is modelled in whole
"unit currents", with ideal mirrors:

- `i_pos` and `i_neg` are the two line currents.
- `diff` is their difference after the thresholds.
- `out_bit` is the comparator output.

The model evaluates on a `fire` strobe and registers the bit one clock later.
On silicon, the clock period bounds how long the comparator is given to settle.

**8-bit first layer.** The first CONV layer takes 8-bit pixels. Its node holds
eight copies of the input network, IN0..IN7, fed with the eight bit-planes of
the pixels. A binary-weighted mirror scales copy j by 2^j. Each bit is still
treated as ±1, so the node computes Σ w·(2v − 255) for pixel value v. Choose
the thresholds with that in mind.

## Dataflow and the layer chain

`qnn_top` is a pipeline. Between layers, data moves over valid/ready streams.
The stages are:

```
image -> CONV0 -> [MAXPOOL0] -> CONV1 -> [MAXPOOL1] -> ... -> CONV(N-1) -> [MAXPOOL(N-1)]
                                                                       \
                 any earlier layer --64:1 mux--> FC0 --> FC1 --> ... --> OUT (FC + ADC)
```

Routing is set by configuration:

- CONV 0 reads the image.
- MAXPOOL s reads CONV s.
- CONV s > 0 reads MAXPOOL s-1 when that layer is enabled, and CONV s-1
  otherwise. This is a 2:1 `layer_src_mux`.
- Each FC layer, including the final one, reads any earlier layer through a
  64:1 `layer_src_mux`. The source numbers are:
  - CONV s = 2s
  - MAXPOOL s = 2s+1
  - FC l = 2·N_CONV + l

A disabled layer produces nothing. A network with fewer layers therefore
switches off the trailing CONV/MAXPOOL stages and points the first FC layer at
its last feature map.

A stream with several readers advances only when all of them are ready. For
example, CONV output s can feed both MAXPOOL s and an FC layer.

Layers behave as follows:

- **CONV layers** (`conv_layer`) run at the same time: each starts as soon as
  it has enough rows for one output pixel.
- **FC layers** (`fc_layer`) wait for their whole input vector.
- **The final layer** (`fc_out_layer`) converts each node's current difference
  with its own SAR ADC. It then sends `(score_idx, score)` pairs out, one per
  cycle, and raises `score_last` on the last one.

## Sliding windows with shift registers

All layer memories are shift registers. `window_buffer` holds K_MAX-1 line
shift registers (the "LAYER MEM") and a K_MAX×K_MAX array (the "NODE MEM").

- A pixel enters and every line moves up one place.
- A tap at the configured width (the "decoder") feeds the next line, so a
  column of k pixels enters the NODE MEM each cycle.
- After k-1 rows and k-1 columns the window is complete. It is emitted only at
  positions that are multiples of the stride.
- While a window waits for the nodes, the input stalls.

CONV nodes are **shared**: each filter has one node, and that node is reused
for every window position. `maxpool_layer` uses the same buffer. Its node,
`maxpool_node`, is a 9-input OR with a mask for kernels below 3×3. On ±1 data
encoded as bits, max equals OR.

An FC layer has no window. `fc_layer_mem` shifts in whole words (one pixel with
all its channels, or a whole FC output) until the vector is complete. Its
outputs are wired straight to every node's inputs.

Branch order inside a node:

- **CONV node:** (row, column, channel) of the window, k×k×C_MAX branches.
- **FC node:** the first word received sits in the highest bits of LAYER MEM.
  A flattened feature map therefore places pixel (row 0, column 0) at the top.

## Layer partitioning

Each CONV and FC layer has a `part` bit.

- **`part` = 0:** all enabled nodes of the layer fire in the same cycle.
- **`part` = 1:** one node fires per cycle. This lowers peak power and costs
  one cycle per filter or node.

The three chip variants this design was evaluated in map onto these bits:

| Variant | CONV `part` | FC `part` |
|---|---|---|
| Node sharing only | 0 | 0 |
| Plus FC partitioning | 0 | 1 |
| Plus CONV partitioning | 1 | 1 |

## Programming and configuration

Weights and thresholds are written through `prog` (a `qnn_pkg::prog_t`), which
is broadcast to every layer.

- **Weight beat:** `w_we` writes 64 consecutive weights (4-bit two's
  complement) of one node: `layer`, `node`, `chunk`.
- **Threshold beat:** `t_we` writes that node's threshold T.
- **Layer numbers:**
  - CONV s → s
  - FC l → N_CONV + l
  - the final layer → N_CONV + N_FC

This bus stands in for the flash programming circuitry, which is outside this
RTL.

The configuration ports set each layer's use, image size, padding, kernel,
stride, filter or node count, source and partitioning. They are static while
images flow. Change them only while `rst_n` is low. Reset clears the control
state of every layer but not the flash contents, so the weights survive it.

## Parameters

Defaults cover the union of Binary AlexNet (ImageNet) and BinaryNet
(CIFAR-10). The `*_W` values are the largest row widths after padding.

| Parameter | Default | Meaning |
|---|---|---|
| N_CONV | 6 | CONV (+ optional MAXPOOL) stages |
| CONV_W / CONV_K / CONV_F | 231,34,18,18,15,10 / 11,5,3,3,3,3 / 128,192,384,384,512,512 | width, kernel, filters per stage |
| POOL_W | 56,32,16,16,13,8 | MAXPOOL input width per stage |
| N_FC, FC_N, FC_F | 2, {9216,4096}, {4096,4096} | hidden FC layers: inputs, nodes |
| OUT_N, OUT_F | 4096, 1000 | final layer: inputs, nodes (each with an ADC) |
| ADC_LSB | 16 | unit currents per ADC step |
| WORD_W | 4096 | FC input word width |

The FC sizes (9216 inputs, 4096 nodes), the 64:1 FC multiplexer, the 3×3
MAXPOOL OR and the 8-bit ADC belong to the reference design. The CONV and pool
maxima are this implementation's choice, sized for the two networks.

Both networks fit at the defaults:

- **Binary AlexNet:**
  - 224×224×3 input, conv 11×11/4 → 3×3/2 pool → 5×5 → pool → 3×3 ×3 → pool.
  - The last pool gives 6×6×256 = 9216 FC inputs.
  - Then FC 4096, 4096 and 1000.
- **BinaryNet:**
  - Six 3×3 convs with 2×2 pools, giving 4×4×512 = 8192 inputs.
  - Then FC 1024, 1024 and 10.

## Departures and choices

- **Padding and stride are additions.** `stream_padder` inserts a border of
  -1 pixels (all-zero bits), and the window buffer honours a stride. Both are
  needed to map the benchmark networks.
- **The analog behaviour is ideal.** Mirrors are exact, currents are integers
  and comparator ties give 0. Device variation and latency-bounded comparator
  errors are not modelled.
- **ADC scale:**
  - The ADC is bipolar: its code is offset binary around zero difference, with
    ADC_LSB unit currents per step, and it clamps at the ends.
  - `score` is that code with the MSB inverted (two's complement).
  - Conversion takes 9 clocks after start: 8 bit decisions plus the result
    cycle.
- **Node timing.** A node decides in one clock. Partitioned layers take one
  clock per node.
- **FC interconnect.** The large FC layers rely on a specific physical wiring
  of their input lines over all nodes. In RTL this is a plain connection.

## Verification

Each block has a self-checking testbench in `tb/`. Each one:

- compares the block against a reference computed in the testbench;
- checks the ADC latency in cycles;
- ends with `TB_RESULT checks=N failures=M`;
- has a watchdog.

`tb/qnn_ref_pkg.sv` holds the reference models: hashed pseudo-random weights,
convolution, pooling, flattening and FC.

- **`tb_qnn_top`** runs a reduced chip end to end: two CONV stages, one hidden
  FC layer and a 5-class output. It covers two configurations:
  1. Padded 3×3 CONV with partitioning, then MAXPOOL, then a partitioned CONV.
  2. Stride 2 with asymmetric padding and a bypassed MAXPOOL, loaded across a
     reset.

  It counts each mechanism and fails if any never happened:
  - input stalls and padding
  - partitioned and parallel firing
  - pool bypass and mux selection
  - multi-reader streams, output back-pressure and ADC conversions

  It checks every score against the reference.
- **`tb_qnn_full`** instantiates `qnn_top` at its default size and runs Binary
  AlexNet with every layer partitioned. At full size the model is large: it
  builds slowly and needs several GB of memory. The largest size verified
  end to end against the reference is the reduced `tb_qnn_top` configuration.

Run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/qnn_pkg.sv tb/qnn_ref_pkg.sv tb/tb_qnn_top.sv -y rtl +libext+.sv \
    --top-module tb_qnn_top -o sim && ./obj_dir/sim
```

Swap in any other `tb/tb_*.sv`; the unit testbenches need only `qnn_pkg.sv`.
