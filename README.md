# A chain of event-driven matrix-vector processors for CNN inference

This RTL implements a CNN inference engine for a large FPGA. The main idea is
to keep nearly every multiplier busy on nearly every cycle. It does not build
one big, general array that spends most of its cycles waiting or padding.
Instead it splits a network such as GoogLeNet across a short **chain of four
processors**, each with its own shape:

| Processor | N1 (input lanes) | N2 (output lanes) | Handles in GoogLeNet |
|---|---|---|---|
| P1 | 21 | 8  | first 7x7 convolution |
| P2 | 32 | 16 | the two convolutions of the stem |
| P3 | 96 | 16 | the 54 inception convolutions |
| P4 | 8  | 1  | the fully connected classifier |

The lane counts are chosen so that each processor needs about the same number
of cycles per image as the others. This lets the four processors work on
consecutive images as a pipeline.

Other features of the design:
- All weights and activations stay in on-chip RAM.
- There is no central controller. Each processor runs its own instruction list
  and starts work when its upstream neighbour signals that data is ready.
- The top level places three independent chains side by side, one per die
  region of the FPGA. Each chain has its own weights, its own image input and
  its own logits output.

```
                 +-----+    +------+    +------+    +------+
image --(+bias)->| P1  |--->|  P2  |--->|  P3  |--->|  P4  |---> logits
                 +-----+    +--+---+    +--+---+    +------+
                               ^  |        ^  |
                               +--+        +--+      (x3 chains)
                          (own results back into own buffer)
```

P2 and P3 can write results back into their own buffer. This lets one
processor run several consecutive layers: the inception modules on P3, and
the stem layers plus pooling on P2. The softmax runs on the host after the
logits arrive.

## Inside one processor

```
 host cfg --> instruction memory --> proc_controller
                                          | addresses, slots, first/last
  upstream --> buffer_write_port --> tensor_buffer --q--> mxv_array --z--> accumulator_bank
  own results ----^                      |                 ^   ^               |
                                         |   operand_cache-+   | r = bias      v
                                         +--> pool_unit    bias store       aux_unit
                                                  |                            |
                                                  +------> output FIFO <-------+
                                                               |
                                     own tensor buffer (self-loop) or next processor
```

These are the parts of `nn_processor`, each in its own file:

- **`tensor_buffer`** holds the activations. Tensors are stored
  height-width-channel and addressed by element. The memory is split into N1
  lane banks, so any run of N1 consecutive elements can be read in one cycle,
  at any alignment. Lane bank `l` reads word `e/N1 + (l < e%N1)`, and the
  result is rotated by `e%N1`. A write stores 1..N1 consecutive elements at any
  element address. Read latency is 1 cycle, and the read data hold while no
  new read is issued.
- **`mxv_array`** computes `z = P·q + r` every cycle for an N2 x N1 weight
  block `P`. Each output lane is a **`dsp_cascade_column`**: a chain of N1
  registered multiply-add stages that passes the partial sum from stage to
  stage, like the cascade path of DSP tiles, with no adder tree. Input lane `i`
  is delayed by `i` cycles so that it meets the partial sum at stage `i`.
  Result lane `z` appears N1 cycles after its inputs.
- **`operand_cache`** holds the weight blocks of one output-channel group in
  two banks. The MxV reads one bank while the controller copies the next
  group's weights from the **weight store** (a `chunk_ram`) into the other.
  `swap` exchanges the banks.
- **`accumulator_bank`** holds T running sums per output lane, one per
  time-interleaved slot. This is needed because the cascade is N1 cycles deep
  and the slots come round every T cycles.
   - `first` starts a sum with `z`, where `z` already includes the bias as `r`.
   - `last` releases the sum.
- **`aux_unit`** scales a 48-bit sum back to 8-bit significands:
   - a rounding arithmetic right shift, with rounding half up;
   - optional ReLU;
   - saturation.
- **`pool_unit`** takes a lane-wise running maximum over a pooling window. It
  is fed straight from the tensor buffer and bypasses the MxV.
- **Output FIFO and credits.** Results go to a small FIFO. The controller
  issues work only while it has a credit for every result still in flight, so
  the FIFO can never overflow. When the downstream consumer stalls, issue
  stalls too (the *output stall*).
- **`buffer_write_port`** merges two write streams into the tensor buffer:
   - the processor's own results (self-loop), which have priority;
   - the upstream processor's stream.

  It splits beats wider than N1 into N1-element writes. It also counts
  *events*: each upstream beat marked `last` ends an upstream instruction.

## Time interleaving and the operand cache

This is the part that most needs explaining. A convolution's weight matrix
is split as follows:
- rows are output channels, split into blocks of N2;
- columns are filter taps times input channels, split into blocks of N1.

Each output pixel visits the column blocks `kb` in order. For each `kb` the
controller does not issue one MxV cycle but **T = 4**, one per slot `t`. Each
slot uses a different block of N2 output channels but **the same input
vector**. The tensor buffer is read only on slot 0, and the vector is reused
for the other three cycles.

The result is that the input address moves at a quarter of the rate of the
weight address, which reduces the bandwidth the input memory must supply.
One *group* therefore covers `N2*T` output channels.

The weight address is the operand-cache word `kb*T + t`. A group's weights
are `kb_total*T` cache words, and they are loaded while the previous group
computes. If that load is not done when the group starts, the group waits,
and this is counted as a *fill stall*.

## Controller: loop nest and addressing

`proc_controller` executes four instructions: `OP_CONV`, `OP_POOL`,
`OP_JUMP` and `OP_HALT`. The fields are in `nn_pkg::instr_t`.

Fully connected layers are `OP_CONV` on a 1x1 image.

Before an instruction starts, the controller waits for `wait_ev` upstream
events. After the instruction, it waits until all of its results have been
written.

Convolution loops, innermost first: `t, cb, fx, fy, x, y, g`.
```
in_ea   = in_base + (y*S + fy)*in_row_stride + x*S*in_pix_stride + fx*fx_stride + cb*N1
out_ea  = out_base + y*out_row_stride + x*out_pix_stride + (g*T + t)*N2
weights = operand cache word kb*T + t   (kb = (fy*fx_n + fx)*cb_n + cb)
bias    = bias store word b_base + g*T + t, added on the first kb
```

Pooling loops, innermost first: `fx, fy, cb, x, y`. Here
`out_ea = ... + cb*N1`.

The strides do several jobs:
- **Concatenation.** A layer can write its output at any channel offset
  inside a wider tensor, so concatenating inception branches costs nothing.
  Each branch writes at its own offset of a shared output tensor.
- **Folding filter taps into lanes.** P1's 21 input lanes read 21
  consecutive HWC elements, which are 7 filter columns x 3 colour channels.
  Its 7x7 convolution is therefore set up as `fx_n = 1, fy_n = 7,
  in_pix_stride = 3`, with stride 2. The same trick helps any layer with few
  input channels.
- **Padding.** Firmware stores tensors with explicit zero borders.

The controller also keeps five 32-bit counters: fill stalls (groups after
the first), output stalls, event-wait cycles, MxV cycles and instructions.

## Numbers

Tensors are block floating point: one exponent per tensor and signed 8-bit
significands (`nn_pkg::SIG_W`). The datapath sees only significands. The
firmware folds the exponents of weights and activations into each layer's
`shift` field. Other widths:
- bias: 32 bits;
- accumulator: 48 bits, like a DSP48E2 accumulator.

## Configuration and streams

- **Configuration bus.** The host writes instructions, weights, biases and the
  input-bias registers over one 64-bit bus, in `cfg_*` chunks. Two fields
  select the target: `cfg_chain` and `cfg_proc`. `cfg_target` picks
  `CFG_INSTR`, `CFG_WEIGHT`, `CFG_BIAS` or `CFG_INBIAS`. Inside the selected
  memory, `cfg_addr` is `word*chunks_per_word + chunk`.
- **Streams.** Data between processors, and the image and logits ports, use
  valid/ready streams. Each beat carries:
   - `eaddr`: the destination element address;
   - `cnt`: the number of valid elements;
   - `data`;
   - `last`: ends an instruction, which is one event.
- **`input_bias`** adds a per-colour bias to each image element before P1,
  using `channel = eaddr mod 3`, and saturates the result.
- **Start and status.** A `start` pulse runs a processor from instruction 0;
  `busy` shows that it is running.

## Where this departs from the original design

- **One clock.** The original runs the DSP arrays and operand caches at
  720 MHz and the rest at half that rate. This RTL uses one clock; the 1/T
  input-read rate is kept.
- **No physical supertiles.** The original groups DSP columns into
  "supertiles" of four adjacent columns for timing closure. That is a
  placement rule, and this RTL has no such level.
- **Details not given by the original design:**
   - the instruction format;
   - the event protocol;
   - the stream format;
   - the credit-based output FIFO;
   - where max pooling runs;
   - the HWC lane-banked tensor buffer;
   - the weight store being separate from the activation buffer;
   - P1's tap folding.

  All of these are this design's own choices.
- **Slower on P3.** With this loop nest and 64-channel groups, P3 needs about
  1.14 M cycles per GoogLeNet image against about 0.71 M in the original. The
  many 16..48-channel reduce and 5x5 layers are padded to full groups. The
  original distributes that work more finely, in a way it does not detail.
  P1 is within 2 % of the original, P2 within 3 %, and P4 is exact.
- **Measuring efficiency.** The original judges each processor by two
  numbers, and their product is its compute efficiency:
   - *balance*: how long the processor is busy compared with the slowest
     processor;
   - *distribution efficiency*: the share of multiply-add cycles that do
     useful work.

  Both can be measured here from `cnt_mxv_cycles` and the stall and
  event-wait counters. For GoogLeNet, this design's P3 would reach a
  distribution efficiency of about 61 %. The original reports 95 %.
- **More multipliers.** This design uses 2224 multipliers per chain (6672 for
  three chains, one per DSP if mapped 1:1). The original reports 3817 DSP
  tiles in total, so it must share DSPs between 8-bit multiplies in a way it
  does not describe.
- **Parts not included:** the PCIe endpoint, the host, and the softmax.

## Memory sizes (defaults of `processor_chain`)

| | tensor buffer words | operand cache words | weight store words | bias words |
|---|---|---|---|---|
| P1 | 8192 x 21 el. | 32 | 64 | 16 |
| P2 | 65536 x 32 el. | 128 | 256 | 64 |
| P3 | 16384 x 96 el. | 128 | 6144 | 512 |
| P4 | 256 x 8 el. | 512 | 131072 | 1024 |

These sizes hold GoogLeNet with one network per chain:
- The weights need 56, 224, 5424 and 128000 words.
- The largest cache block is 72 words on P2, 100 on P3 and 512 on P4.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`, apart from
`chunk_ram`, which is used as the weight store. Each testbench prints
`TB_RESULT checks=N failures=M`. `tb/tb_nn_pkg.sv` holds the reference
models:
- a convolution, pooling and requantisation model;
- the weight and instruction packers;
- `mini_net`: a small network with the same structure, which exercises every
  mechanism.

`mini_net` is a 9x9x3 image. Its layers are:
- P1: 7x7/2 convolution.
- P2: 1x1 convolution into its own buffer, then 2x2 max pooling sent
  downstream.
- P3: two branches concatenated at channel offsets 0 and 64, one of them two
  layers deep through the self-loop.
- P4: fully connected, 40 classes, which is more results than P4 has output
  credits.

The testbenches check:
- `tb_processor_chain` checks the logits and the cycle and event counters.
- `tb_accelerator_top` runs three chains at the full default sizes with
  different weights. It checks each chain's logits and that every mechanism
  happened at least once:
   - fill stall;
   - output stall;
   - event wait;
   - self-loop;
   - chunked upstream write;
   - max pooling.

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/nn_pkg.sv rtl/*.sv tb/tb_nn_pkg.sv tb/tb_processor_chain.sv \
  --top-module tb_processor_chain -o sim && ./obj_dir/sim
```

The full-size top builds a large model: three chains, each with about
25 MB of weight store. Expect a C++ build of several minutes.
