# Selective gradient computation for a DNN training accelerator

During training, most of the work in backward propagation is spent on
gradients that are known in advance to be zero:

* Behind a ReLU, the gradient of every activation whose forward output was 0
  is 0. In the convolutional layers of AlexNet and VGG-16 that is typically
  60–70 % of all activations.
* Behind a dropout layer, the gradient of every dropped neuron is 0.

A DianNao-style accelerator has 16 neural functional units (NFUs) of 16
multipliers each and streams its operands from DRAM. It still reads the
filters for those gradients and multiplies them. Backward propagation is
memory-bound, so every filter that is never read saves time and energy.

This RTL adds that skipping to a 32-bit fixed-point, DianNao-like datapath
with no on-chip buffers. It holds two independent engines:

* `cnn_bp_accel` computes the input-side gradient map of a convolutional
  layer. It only computes the channels whose ReLU output was positive. A
  one-bit-per-activation *bit-vector*, saved during the forward pass, tells
  it which channels those are. The same engine also runs the forward pass
  of the layer, and in that pass it writes the bit-vector.
* `fc_dropout_accel` runs a fully connected layer with dropout.
  * Forward pass: it draws the dropout mask on the fly from a seeded random
    generator.
  * Backward pass: it regenerates the same mask from the same seed, and
    computes (and reads the weights of) only the kept neurons.

`sgc_top` places both engines side by side. Each has its own configuration
inputs, DRAM port and statistics outputs, with port prefixes `c_` and `f_`.

## Datapath shared by both engines

* **NFU** (`nfu`): 16 Q16.16 multipliers, an adder tree and an activation
  stage (identity or ReLU), with 3 register stages.
  * The product is the full 64-bit product shifted right by 16 and
    truncated to 32 bits.
  * An NFU accumulates over a sequence of input vectors. `first` restarts
    the sum and `last` releases the result to stage 3.
* **NFU array** (`nfu_array`): 16 NFUs, i.e. 256 MACs per cycle.
  * The same 16 input values (e.g. 16 channels of one output-gradient
    pixel) go to every NFU.
  * Each NFU gets the 16 weights of *its own* filter.
  * A per-NFU enable zeroes the products of unused slots.
* **DRAM port**: one 512-bit line (16 words) per access.
  * Reads return in request order, after any latency.
  * Writes carry a 16-bit word mask.
  * `mem_if` arbitrates the DMA engines onto the port with fixed priority.
    A FIFO of requester ids sends each returning line back to the client
    that asked for it.
* **Read DMA** (`read_dma`): takes one *MAC job*, i.e. one activation line
  plus up to 16 weight-line addresses, one per NFU slot.
  * It reads the activation line, then the weight line of each *valid*
    slot, one request per cycle.
  * When all the lines are back, it hands them to the NFUs for one cycle.
  * Invalid slots cost no DRAM access. That saving is the whole point:
    with 16 collected filters a job costs 17 reads, as in the baseline, and
    with 3 filters it costs 4.
* **Write DMA** (`write_dma`): takes 16 results plus a bit-vector and a bit
  range, and writes the range as masked lines. Each position whose bit is 1
  gets the next result in order; each position whose bit is 0 gets a zero.
  * For example, bits `1101010` with results g0 g1 g3 g5 are written as
    `g0 g1 0 g3 0 g5 0`.
  * It writes one line per cycle while the memory accepts.

## Convolutional backward pass with bit-vectors

### What is computed

The layer has:

* input-side gradient map dCin: Ix × Iy × Iz
* output-side gradient map dCout: Fn channels
* Iz rearranged (flipped and transposed) backward filters, each Fx × Fy × Fn

```
dCin(x,y,z) = [relu_out(x,y,z) > 0] * sum_{i<Fx, j<Fy, k<Fn} dCout'(x+i, y+j, k) * F_z(i, j, k)
```

Here dCout' is dCout with the border padding already stored in memory. Its
size is (Ix+Fx−1) × (Iy+Fy−1) × Fn. The convolution has stride 1. Pooling,
and the weight-gradient computation, are not part of this engine.

### Bit-vector lines

The forward pass stores one bit per activation of the ReLU output: 1 if
positive, 0 if not. For pixel (x,y), the Iz bits of all its channels form a
*bit-vector line*.

* The line length is the channel count, at most 512. Longer lines would be
  useless, because the NFUs can only combine channels of the same pixel.
* Lines are packed densely in DRAM. Bit (y·Ix + x)·Iz + z counts from the
  line address `bv_base`. So a line can straddle two DRAM lines.
* The controller fetches the one or two DRAM lines it needs, and keeps the
  last one to reuse for the next pixel. It then aligns the bits and passes
  them to the filter collector.
* The forward pass writes the bits in exactly this layout
  (`c_mode`/`cfg_mode = 0`). The forward convolution has the same loop nest
  as the backward one: the padded input map takes the place of dCout', the
  forward filters take the place of F_z, and every bit is taken as 1. The
  NFUs apply ReLU.
  * `bv_packer` appends the signs of each finished group to a 512-bit line
    register. It writes the register as soon as it is full.
  * The last, partial line is written up to the word that holds the last
    bit, so the rest of that word becomes 0.
  * A group may straddle two lines. If the layer's final group does, a
    second write follows for the tail.

### Filter collector

The filter collector (`filter_collector`) splits a line into *groups*, each
ending at its 16th set bit. For example, a 64-bit line with 16 ones in bits
0..27, 16 ones in 28..53 and 3 ones in 54..63 gives three groups:

| group | bit range | filters |
|-------|-----------|---------|
| 0     | 0–27      | 16      |
| 1     | 28–53     | 16      |
| 2     | 54–63     | 3       |

A group never reaches into the next pixel's line. That is why the last group
of a line can be partly empty.

**How it works.**

1. When a line arrives, one cycle computes, for every bit position, how many
   set bits come before it (its *rank*). The ranks are registered.
2. After that, the collector emits one group per cycle. Group g takes the
   positions whose rank lies in 16g..16g+15. For the write DMA it also
   reports the group's bit range, its filter count, and whether it is the
   last group.
3. A line with no set bit yields a single empty group. That group issues no
   MAC job, but its range still has to be written as zeros.

### Sequencing (`cnn_bp_ctrl`)

Pixels are visited in raster order, and groups in channel order. For one
group, the controller issues Fx·Fy·Fn/16 MAC jobs. Each job covers one
(i, j) position and one 16-channel block of dCout. Its slot s reads the
weights of the s-th collected filter.

The NFU array accumulates over all the jobs of the group. The 16 (or fewer)
results then go to the write DMA together with the line bits and the group's
range. The write DMA puts every result at the channel it belongs to and
fills the skipped channels with zeros.

A dense layer therefore behaves like the baseline: 17 reads per job. A layer
where 2/3 of the bits are zero needs about 1/3 of the weight reads.

Memory layout. All addresses are DRAM line addresses except dCin, which is
word-addressed. The channel index runs fastest everywhere.

```
dCout' line   = dout_base + ((y+j)*(Ix+Fx-1) + (x+i))*Fn/16 + k/16
filter line   = w_base    + ((z*Fy + j)*Fx + i)*Fn/16 + k/16
dCin word     = din_base  + (y*Ix + x)*Iz + z
```

Limits: Fn must be a multiple of 16. Iz can be at most 512. Fx and Fy can
be at most 15.

## Fully connected layers with dropout

### Filter dropper (`filter_dropper`)

The filter dropper combines four parts:

* a 32-bit xorshift generator (`dropout_rng`), loaded with the layer's seed;
* a comparator that keeps a neuron when `rnd >= rate`, where `rate` is the
  dropout rate as a 32-bit fraction;
* a 16-entry × 16-bit index table (`dropout_table`);
* the mask unit (`dropout_mask`), which computes
  `out = bit ? value * scale : 0` with a Q16.16 scale, normally 1/(1−rate).

Each neuron uses one random number, in neuron order. So the same seed gives
the same mask in both passes, and the mask is never stored.

* **Forward pass** (`cfg_mode = 0`):
  * Each step computes 16 output neurons, one per NFU. It reads the input
    vector line by line, plus the 16 weight rows.
  * While the MACs run, the dropper produces the step's 16 mask bits, one
    per cycle. It needs 16 cycles, plus one to hand them over.
  * The NFU results pass through the mask unit before they are written.
* **Backward pass** (`cfg_mode = 1`):
  * The dropper walks the neurons. It pushes the index of every kept neuron
    into the table and records a bit per neuron.
  * It hands the table to the controller in three cases: the table holds 16
    indices, the last neuron has been passed, or the range has reached 512
    neurons (one write-DMA bit-vector line).
  * The controller issues MAC jobs that read only the kept neurons' rows of
    the transposed weight matrix. It scales the results in the mask unit.
    The write DMA then writes the range, with zeros for the dropped neurons.

A range with no kept neuron costs no MAC job.

Memory layout:

```
input / next-layer gradient line = src_base + k/16
weight line  (FP: row n of W, BP: row m of W^T) = w_base + row*(n_src/16) + k/16
output word  = dst_base + neuron
```

`n_src` must be a multiple of 16.

## Interfaces and timing

* **Mode.** `c_mode` selects the forward pass (0) or the backward pass (1)
  of the convolutional engine; `f_mode` does the same for the FC engine.
* **Configuration and control.** The configuration inputs must be held
  stable from `start` (a one-cycle pulse) until `done` (a one-cycle pulse
  once the last write has been accepted). `busy` is high in between. Reset
  is asynchronous and active low.
* **DRAM port.** `m_valid/m_ready` is the request handshake; the request
  carries `m_we`, `m_addr`, `m_wdata` and `m_wmask`. `m_rsp_valid` and
  `m_rsp_data` return read lines in request order.
* **Statistics.** `c_stats` holds eight counters:
  * collected groups;
  * empty groups;
  * skipped filters;
  * bit-vector DRAM reads;
  * bit-vector lines spanning two DRAM lines;
  * data reads;
  * zeros inserted;
  * bit-vector lines written.

  `f_stats` holds five counters: steps, empty steps, dropped neurons, data
  reads, and zeros inserted.
* **Throughput.** A MAC job occupies the read DMA for 1 + (collected
  filters) DRAM accesses, plus the DRAM latency. Jobs do not overlap, and
  the NFU pipeline adds 3 cycles. So the engine is DRAM-latency bound,
  which makes the number of DRAM reads the figure of merit. For example,
  a 2 × 2 × 512 layer with 3 × 3 filters and Fn = 16, with about half of
  the bits set, takes about 14,000 cycles at a DRAM latency of 12 cycles.

## Measured read savings

`tb_sgc_workloads` runs slices of real layer shapes through `sgc_top` with
bit-vectors and dropout masks drawn at realistic densities. It compares the
DRAM data reads with those of the same datapath without skipping, which
needs 17 reads per MAC job and computes every filter or neuron. DRAM
latency is 8 cycles in these runs.

| layer (slice) | zero / dropped fraction | reads vs. no skipping | cycles |
|---|---|---|---|
| 28×28×512 dCin, 3×3, 512 filters (2 pixels) | 62 % | 0.384 | 202,946 |
| 13×13×384 dCin, 3×3, 256 filters (2 pixels) | 66 % | 0.347 | 67,821 |
| FC 800 neurons ← 800, BP | 0.5 | 0.514 | 36,385 |
| FC 1024 neurons ← 4096, BP | 0.3 | 0.730 | 335,984 |
| FC 1024 neurons ← 4096, BP | 0.5 | 0.528 | 243,246 |
| FC 1024 neurons ← 4096, BP | 0.7 | 0.320 | 148,489 |

The ratios follow the kept fraction, plus the cost of partly filled groups.
A group ends at a line boundary, and a table ends at a 512-neuron range.
The forward pass of a dropout layer reads everything, so its ratio is 1.0.

## Where this design departs from the accelerator it follows

* The binary point (Q16.16) and the truncating multiplier are this design's
  choice. The 32-bit width follows the original design.
* The random generator type (xorshift32) is this design's choice. A zero
  seed is replaced by a fixed non-zero constant.
* Dropout polarity: a neuron is kept when `rnd >= rate`, in both passes. One
  description of the backward pass records neurons whose random value is
  *below* the rate. Following it would make the two passes' masks disagree,
  so it is not followed here.
* The bit-vector layout (densely packed lines), the one-line reuse cache,
  and all data layouts are this design's choices.
* **Not built:** the variant with on-chip SRAM buffers. That variant reuses
  a window of output gradients and weights, and switches the bit-vector line
  to a 4 × 4 × 32 plane-by-plane shape, selecting a filter if any bit of its
  plane is set. Its buffer organisation is not specified well enough to
  build.
* **Not built:** overlap of consecutive read-DMA jobs. It would hide DRAM
  latency, but changes no result.
* The forward convolution reuses the backward loop, with all bits set and
  ReLU on. That is this design's choice; the original only describes the
  baseline's forward pass.
* The two engines are not merged into one datapath. Each has its own NFU
  array and DRAM port.

## Files

* `rtl/sgc_pkg.sv` holds the shared constants, types and the fixed-point
  multiply.
* Every other file in `rtl/` is one module, as named in the text above.
* `tb/` holds one self-checking testbench per module, plus:
  * `dram_model` (behavioural DRAM: latency, random stalls, word and bit
    access helpers);
  * `sgc_tb_pkg` (reference functions, including a software copy of the
    dropout generator).

Each testbench prints `TB_RESULT checks=<n> failures=<n>`.

Testbenches of note:

* `tb_sgc_top` runs the top with its default sizes. It makes every
  mechanism happen at least once: skipped filters, empty groups, several
  groups per line, bit-vector lines straddling and reusing DRAM lines, zero
  insertion, DRAM stalls, masking, full and empty tables, the 512-neuron
  range limit, and the FP/BP mode switch. It checks every written word
  against a reference model.
* `tb_cnn_bp_accel` runs a 2 × 2 × 512 layer with 3 × 3 filters.
* `tb_sgc_workloads` runs the layer slices in the table above. It takes
  about a minute.
* `tb_fc_dropout_accel` runs FP and BP passes without activation.
* `tb_cnn_bp_accel` also chains a forward pass and a backward pass through
  the bit-vector that the forward pass wrote.
* `tb_bv_packer` covers groups that straddle lines and the tail write.
* `tb_filter_collector` reproduces the 64-bit example above.
* `tb_write_dma` reproduces the `1101010` example.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/sgc_pkg.sv tb/sgc_tb_pkg.sv tb/tb_sgc_top.sv --top-module tb_sgc_top
./obj_dir/Vtb_sgc_top
```

Replace `tb_sgc_top` with any other testbench name. The `-I` paths let
Verilator find the modules by file name. `sgc_tb_pkg.sv` is needed only by
the testbenches that import it. `-Wno-fatal` keeps the width warnings of the
testbenches' address arithmetic from stopping the build. The top-level test
finishes in well under a minute.
