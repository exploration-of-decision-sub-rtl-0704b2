# Early-exit LeNet-5 on an FPGA: pipeline and parallel decision sub-networks

A dynamic (early-exit) neural network saves time and energy on easy inputs. A small
*decision sub-network* (a "branch") sits after an early layer, classifies the input
from that layer's output, and ends the inference there when it is confident enough.
Only the hard inputs go through the rest of the network (the *backbone*).

This RTL implements such a network, a BranchyNet-style LeNet-5 for 28×28 MNIST
digits, as a fixed-point accelerator. It also implements the two ways of adding the
branch to the hardware that the work *Exploration of Decision Sub-Network
Architectures for FPGA-based Dynamic DNNs* compares:

* **Pipeline approach** (default). The backbone's own layer engines also run the
  branch. The backbone stalls after its first layer and that layer's output is
  saved. The branch then runs and decides. On an exit, the inference ends. Otherwise
  the saved output is loaded back and the backbone continues. This needs no extra
  arithmetic, but costs the stall and a store/load of 2880 bytes.
* **Parallel approach.** The branch has engines of its own. The first layer's output
  goes to both paths at once and both run together. An exit stops the backbone
  where it is. Nothing is saved or reloaded, and a no-exit inference is faster. The
  cost is the duplicated engines.

`dyn_lenet_top` selects the approach with its `APPROACH` parameter.

## The network

All values are 8-bit signed fixed point with 3 integer bits and 5 fraction bits
(Q3.5, range −4 … +3.97). That format comes from the source work. The layer sizes
below are this design's reading of a BranchyNet LeNet-5. The source work gives
only the layer counts (three convolutional and two fully connected layers in the
backbone; one convolutional and one fully connected layer in the branch) and the
2.88 kB stored intermediate.

| step | layer | input → output | notes |
|---|---|---|---|
| conv1 | 5×5 conv, 1→5 ch, ReLU | 28×28×1 → 24×24×5 | output = 2880 bytes, the branch point |
| pool1 | 2×2 max, stride 2 | → 12×12×5 | |
| conv2 | 5×5 conv, 5→10 ch, ReLU | → 8×8×10 | |
| pool2 | 2×2 max | → 4×4×10 | |
| conv3 | 3×3 conv, 10→20 ch, ReLU | → 2×2×20 | |
| fc1 | 80→84, ReLU | | |
| fc2 | 84→10 | logits | final exit: softmax → class |
| branch pool | 2×2 max | 24×24×5 → 12×12×5 | |
| branch conv | 3×3 conv, 5→10 ch, ReLU | → 10×10×10 | |
| branch fc | 1000→10 | logits | decision: softmax → exit / continue |

Convolutions use stride 1 and no padding, so conv1's output is exactly the 2880
bytes that the pipeline approach moves. The pooling layer at the head of the branch
is this design's addition, as in BranchyNet. Without it, the branch convolution
would run at 24×24 and the branch would take longer than the rest of the backbone.
The parallel approach could then never stop a running backbone.

## Arithmetic

A product of two Q3.5 values is Q6.10 (16 bits). The products are summed in a
24-bit accumulator. The result is converted back to Q3.5 in four steps:

1. Add the bias shifted to Q.10.
2. Shift right by 5 (floor).
3. Apply ReLU where the layer has it.
4. Saturate to −128 … 127.

The function is `requant` in `lenet_pkg`. Rounding, saturation and accumulator
width are this design's choices.

## Exit decision (`softmax_exit`)

Every exit point applies a softmax to its 10 logits. The class is the index of the
largest logit; the lowest index wins a tie. Softmax preserves order, so no
probabilities are needed for the class.

The rule for taking the early exit is this design's own; the source work does not
state one. The branch exits when its largest softmax probability is at least
`exit_thr/256`. That probability is `1/S`, where `S = Σ exp(z_i − z_max)`, so the
test needs no divider: exit when `exit_thr · S ≤ 2^23`, with S in units of 2^−15.

Each term is computed as `2^(−d·log2 e)`:

* `d = z_max − z_i` is in Q3.5.
* `d·log2 e` is formed as `d·369/8192`, rounded to 1/16.
* A 16-entry table supplies `2^(−f/16)` for the fraction, and a right shift handles
  the integer part.

Each term is within about 2.2 % of the true exponential. Setting `exit_thr = 0`
always exits. Setting 255 exits only on near-certain inputs.

## Layer engines

All engines read a source feature map from a buffer with one-cycle read latency,
one word per cycle. They write their result to another buffer. Feature maps are
channel-major (`addr = c·H·W + y·W + x`) and start at address 0. Each engine takes
a configuration struct on a one-cycle `start` and pulses `done`. It also has an
`abort` input that returns it to idle at once.

**Convolution (`conv_engine`, with `pe_array` and `adder_tree`).** The datapath
follows the source work: a sliding window the size of the kernel, an array of PEs
that multiplies the window by the kernel, an adder tree, then bias and ReLU. The
array is 5×5 and serves the 3×3 kernels too. A k×k kernel uses the top k rows and
the right-most k columns of the array.

Because the buffer delivers one pixel per cycle, the engine works one output row
at a time:

1. For each output channel and output row, and for each input channel, the engine
   fetches the k×k kernel as one 200-bit word.
2. It streams the k input rows column by column. Each complete column shifts into
   the window.
3. Once k columns are in, the PE array and the adder tree give one output pixel's
   contribution from this input channel. It is added to a row accumulator.
4. After the last input channel, the row is requantised and written, one pixel per
   cycle.

The engine takes `out_ch·oh·(in_ch·(in_w·k + 5) + ow) + 1` cycles per layer.

**Fully connected (`fc_engine`).** As in the source work, the input vector and the
weight rows are split into equal parts that are computed separately. A part here is
8 elements. For each part:

1. Eight inputs are loaded into a register.
2. The engine then walks through the neurons. Each cycle it reads one 8-weight word,
   and 8 multipliers plus an adder tree add a partial dot product into that neuron's
   accumulator.
3. Inputs past the end of the vector count as zero.

After the last part, bias and (optional) ReLU are applied and the outputs written.
The engine takes `⌈n_in/8⌉·(n_out + 10) + n_out + 2` cycles per layer.

**Max pooling (`maxpool_engine`).** A 2×2 window with stride 2 keeps a running
maximum over four reads. It takes `4·outputs + 2` cycles.

**Store / load (`fmap_mover`).** This block copies n words from one memory to
another at one word per cycle, in `n + 2` cycles. The pipeline approach uses it
for the 2880-byte save and restore.

## The two accelerators

### `pipeline_accel`

The accelerator has one engine of each kind, plus two ping-pong feature-map buffers
A and B of 2880 bytes each and a 2880-byte save memory. Each compute step reads
`buf[src]`, writes `buf[!src]`, and flips `src`. A fixed 14-step table drives the
sequencer:

```
0 conv1  A->B        5 decision softmax on A  -> exit: done (early_exit=1)
1 store  B->save     6 load   save->B
2 bpool  B->A        7 pool1  B->A     10 conv3 A->B    13 final softmax on B
3 bconv  A->B        8 conv2  A->B     11 fc1   B->A       -> done (early_exit=0)
4 bfc    B->A        9 pool2  B->A     12 fc2   A->B
```

Each step costs one launch cycle plus its engine's latency. `stall_cycles` counts
the cycles from the start of the store to the end of the load (or to the exit).
`xfer_words` counts the words moved: 2880 with an exit, 5760 without.

### `parallel_accel`

The backbone has its own engines and buffers: A (784 B) and B (2880 B). The branch
has its own engines and buffers: C (2880 B) and D (720 B). It also has its own
weight memories. conv1's result writes go to B and, through the same write, to C.

* **Branch start.** When conv1 finishes, the branch sequencer (pool → conv → fc →
  decision) starts. The backbone continues with pool1 in the same cycle.
* **Exit.** If the branch decides to exit, every backbone engine is aborted and the
  branch's class is returned (`bb_aborted` is set if the backbone was still
  running).
* **No exit.** Otherwise the result waits for the backbone's final softmax.

`overlap_cycles` counts the cycles in which both paths run.

### Timing (cycles at default sizes, simulated)

| | exit taken | no exit |
|---|---|---|
| pipeline | 50 088 | 91 306 |
| parallel | 47 205 | 58 618 |

The source work reports three things:

* The pipeline approach is the most energy-efficient.
* The parallel approach is 1.2× faster when no exit is taken. Its summary puts
  this at 17 %, which is about the same ratio.
* Exits are taken 94.37 % of the time on MNIST.

In this design the parallel approach is 1.56× faster without an exit, and about
52 400 / 47 850 cycles on average at that exit rate. The ratio differs because this
design's engines and layer sizes are its own. The source does not give a clock
frequency or an engine throughput.

Memory: the pipeline approach uses 3 × 2880 bytes of feature-map storage; the
parallel approach uses 7264 bytes.

## Host interface and memory map

The top's ports are plain write ports. While the accelerator is idle, write:

* the weights once: `cw_*` (200-bit 5×5 kernel words), `cb_*` (conv biases), `fw_*`
  (64-bit 8-lane FC words) and `fb_*` (FC biases);
* the image before each run: `img_*`, 784 Q3.5 pixels at addresses 0…783.

Then pulse `start` with `exit_thr`, and wait for the one-cycle `done` pulse;
`class_id` and `early_exit` are valid while it is high.

Layouts (see the `lenet_pkg` header; word counts are this design's own):

* **Conv kernels.** `addr = base + oc·in_ch + ic`. Tap (r, c) of a k×k kernel goes
  in byte lane `r·5 + (5 − k + c)`. Bases: conv1 0, conv2 5, conv3 55, branch
  conv 255 (305 words).
* **Conv biases.** Bases: 0, 5, 15, 35 (45 bytes).
* **FC weights.** `addr = base + j·⌈n_in/8⌉ + i/8`, lane `i mod 8`. Bases: fc1 0,
  fc2 840, branch fc 950 (2200 words).
* **FC biases.** Bases: 0, 84, 94 (104 bytes).

Branch layers sit at the top of each range. In the parallel approach those
addresses go to the branch's own memories.

The source work only names the board and its processor. The load protocol, the
address map and the asynchronous active-low reset `rst_n` are this design's own.
Memories are not reset.

## Departures from the source work and open points

* The layer sizes, the pooling layer in the branch, stride and padding are
  reconstructed from the layer counts and the 2880-byte intermediate.
* The exit rule (top probability ≥ threshold) is this design's own. BranchyNet
  itself uses the entropy of the softmax.
* The source says the adder tree "adds the biases". Here the bias is added after
  the tree, in the requantisation.
* In the pipeline approach, "the memory" that receives the stored output is an
  on-chip 2880-byte RAM. The source does not say whether it is on chip or in
  external DRAM.
* Not modelled: energy and power, the processing system and its software, and
  external DRAM.
* Layer geometry is fixed by the step tables in the two accelerators and by
  `lenet_pkg`. The engines themselves are configured at run time. Changing the
  network means editing those tables and the weight map.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares against
`tb/lenet_ref_pkg.sv`, a plain-loop integer model of every layer and of the whole
network, and each checks the cycle counts above exactly.

* **Layer engines** are tested on the network's own layer shapes with random
  weights scaled to ±32·√(6/fan-in). The tests include an abort in mid-layer.
* **`softmax_exit`** is also checked against real-valued softmax.
* **`tb_dyn_lenet_top`** runs both approaches side by side on random images with
  thresholds that force, forbid, and just allow or just refuse the exit. It counts
  each mechanism seen: exit, no exit, store/load, stall, overlap, backbone abort,
  and parallel faster than pipeline.
* **`tb_dyn_lenet_stream`** runs 16 images back to back through both approaches.
  15 of them take the early exit (93.75 %, close to the 94.37 % measured on MNIST).
  It checks every result and every cycle count, and prints the average time per
  image.
* **`tb_dyn_lenet_top_full`** runs the top at its default parameters through one
  full and one early-exit inference.

To run a testbench with Verilator 5, run from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert rtl/lenet_pkg.sv tb/lenet_ref_pkg.sv \
  rtl/sdp_ram.sv rtl/adder_tree.sv rtl/pe_array.sv rtl/conv_engine.sv \
  rtl/maxpool_engine.sv rtl/fc_engine.sv rtl/softmax_exit.sv rtl/fmap_mover.sv \
  rtl/pipeline_accel.sv rtl/parallel_accel.sv rtl/dyn_lenet_top.sv \
  tb/tb_dyn_lenet_top.sv --top-module tb_dyn_lenet_top -Wno-fatal
./obj_dir/Vtb_dyn_lenet_top
```

Each test ends with a line `TB_RESULT checks=N failures=M`. A whole inference
simulates in well under a second.

## Files

`rtl/lenet_pkg.sv` holds the types, the layer constants, the address map and
`requant`. Each engine, the RAM model, the two accelerators and the top each have
one file in `rtl/`. The testbenches and the reference model are in `tb/`.
