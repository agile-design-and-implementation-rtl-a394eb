# Systolic-array CNN accelerator

This is the RTL of a layer-by-layer convolutional neural network accelerator for FPGAs. A host
puts images and weights into DDR memory and writes a short program, one instruction per layer,
into the accelerator. The accelerator then runs the network on its own. For each layer it streams
weights and the input feature map out of memory and through a three-dimensional systolic array.
It requantizes the 32-bit sums to 8 bits and writes the output map back to memory, where the next
layer reads it.

The architecture follows the paper "Agile Design and Implementation of a Systolic Array-Based CNN
Accelerator". Its authors generated their design with SpinalHDL and evaluated it on YOLOv4-Tiny
at 416x416 input. The paper gives the block structure, the mapping of a convolution onto the
array and the structure of a processing element. It does not give bit widths, instruction
formats, memory layout or handshakes. This RTL chooses all of those itself. The section
"Own choices and departures" lists them.

The default configuration is the paper's largest: 16 input channels by 16 output channels in
parallel, with a third array dimension of 9 for 3x3 kernels. That is 2304 multiply-accumulate
elements.

## How a convolution is mapped onto the array

A layer computes, for each output pixel and output channel `o`:

    out[y][x][o] = sum over ky, kx, i of  in[y*S-P+ky][x*S-P+kx][i] * w[o][i][ky][kx]

The array has three dimensions (`systolic_array_3d`):

* **Layers, one per kernel position** (`K*K = 9` for a 3x3 kernel). Layer `k = ky*3+kx` only
  sees the input pixel at that position of the sliding window. A 1x1 convolution uses layer 0, and
  the other layers get zeros.
* **Columns, one per input-channel lane** (`PAR = 16`). Input channels are handled in *groups* of
  16: group `g` holds channels `16g .. 16g+15`. Column `c` sees channel `16g + c`.
* **Rows, one per output channel** of the current output-channel group (`PAR = 16`).

**Weights flow right and stay put.** Before a layer's windows start, the weights of one
output-channel group are streamed in from the left. A *weight packet* holds, for one input lane
`c` and one channel group `g`, the weight of every output channel (row) at every kernel position
(layer). It is tagged with `(c, g)`. The packet travels along every row. Each processing element
(`pe`) keeps only the weights tagged with its own column and stores them by group in a small
weight buffer (`GD = 32` entries). Every PE then holds `w[o][16g+c][k]` for all groups `g`. These
weights are reused for every window of the layer. `wb_buffer` builds the packets from memory
beats, and `wgt_busy` tells when the last packet has reached its PE.

**Features flow down, channel first.** The line cache (`line_buffer`) emits one window per
channel group. A window beat carries the 16 channels of group `g` at all 9 kernel positions. The
groups of one window come on consecutive beats, and `win_last` marks the last one. Every PE
multiplies the feature passing through it by its buffered weight for that group. It accumulates
over the groups and restarts at group 0. After the last group, PE `(o, c, k)` holds one partial
sum: output channel `o`, input lane `c`, kernel position `k`.

**Results are not added inside the column.** A PE does not add its sum to the results of the
PEs above it. Those belong to other output channels. It places its sum in its own slot of a
*result bundle* and passes the bundle down together with the upstream results. A feature reaches
row `o` one cycle after row `o-1`. So the bundle from above always arrives in the same cycle as
the last group, and an assertion in `pe` checks this. The bottom of every column delivers 16 sums,
one per output channel.

**Accumulation below the array.** `ob_accumulator` adds the bundles of all 16 columns and all 9
layers. That completes the sum over input lanes and kernel positions. It yields 16 finished 32-bit
outputs, one per output channel, for one window. A result appears `PAR + 1` enabled cycles after
the last group of its window entered. One window takes `ceil(in_channels/16)` cycles, so with
stalls ignored the array produces 16 output channels of one pixel every `G` cycles.

Layers with more than 16 output channels are run once per output-channel group. The weights are
reloaded and the input map is streamed again each time. The output of group `og` is written
interleaved with the other groups (see the memory layout below).

## Data path of one layer

```
 DDR --AXI4--> dma_read --> data_preproc --+--> features --> line_buffer --\          /--> array --\
                                           |                                SWITCH ---             SWITCH --> out buffer
                                           +--> weights  --> wb_buffer --> (array)  \--> reshape --/          |
                                                                                       (external)             v
 DDR <--AXI4-- dma_write <-- quant_unit <-- buffer group (stream_fifo) <--------------------------------------/
```

* `instr_unit` is the AXI-Lite slave. It holds the instruction cache and the control and status
  registers, and decodes the current instruction into a `layer_cfg_t` (see `cnn_pkg`).
* `global_controller` steps through the program. For each convolution layer and output-channel
  group it runs two phases. First it restarts the weight numbering, reads the group's weights and
  waits until they have settled in the PEs. Then it starts the line cache, reads the whole input
  map and writes `out_h*out_w` result beats. A reshape layer skips the weight phase.
* `data_preproc` buffers the read stream and routes it to the weight or the feature input. It
  zeroes the feature lanes whose channel index is at or above the layer's channel count, so a
  3-channel image needs no clean padding in memory.
* `alu` holds the line cache, the weight buffer, both switches, the array and an output FIFO.
  `cfg.op` selects the convolution path (`OP_CONV`) or the reshape path (`OP_RESHAPE`).
* The buffer group (`stream_fifo`, 16 deep) and `quant_unit` turn each beat of 16 sums into 16
  bytes: `y = sat8(((x*q_mult + 2^(q_shift-1)) >>> q_shift) + q_zp)`.
* `dma_read` issues INCR bursts of up to 16 beats that never cross 4 KB. `dma_write` writes one
  beat per AXI write at `base + i*stride`.

## Line cache

The whole input map does not fit on chip, so `line_buffer` keeps a ring of `K = 3` rows. Each row
holds `LB_WORDS = 416` beats, that is width times channel groups. Row `y` lives in slot `y mod 3`.
Rows are loaded until every row that output row `oy` needs is present. Then that row's windows
are emitted in the order pixel, then channel group. A new row may be loaded only if the row it
overwrites is no longer needed. Loading therefore stalls while the rows of the current window row
are in use. Positions outside the map, or outside a kernel smaller than 3x3, read as zero. This
gives zero padding, strides 1 to 3 and 1x1 kernels. Input rows that a stride skips at the bottom
are still read in and dropped.

## Back-pressure

The array, its weight feed and its window feed move on a single enable:
`en = !result_valid || output_buffer_ready`. When the output FIFO fills, the whole array freezes,
and so does the line cache behind it. This is how the processing elements can "interrupt and
respond to back pressure at any time". All other interfaces use valid/ready handshakes, and the
AXI ports follow the AXI4 and AXI-Lite rules. Assertions check that the AXI address and data stay
stable while waiting, that RLAST matches the burst length, that responses are OKAY, and that FIFO
outputs stay stable while stalled.

## Programming model

AXI-Lite register map (byte addresses):

| address | register |
|---|---|
| `0x000` | CTRL: write 1 to bit 0 to start |
| `0x004` | STATUS: bit 0 busy, bit 1 done (cleared by the next start) |
| `0x008` | NUM_INSTR |
| `0x800 + 4*(8*i + w)` | word `w` of instruction `i` (64 instructions) |

Instruction words (`cnn_pkg`):

| word | bits |
|---|---|
| 0 | `[1:0]` op (0 conv, 1 reshape), `[3:2]` kernel size, `[5:4]` stride, `[7:6]` padding, `[13:8]` input channel groups, `[21:16]` output channel groups |
| 1 | `[9:0]` input height, `[25:16]` input width |
| 2 | `[9:0]` output height, `[25:16]` output width |
| 3, 4, 5 | feature map, weight and output base addresses |
| 6 | `[15:0]` quant multiplier (signed), `[21:16]` shift, `[31:24]` zero point |
| 7 | `[9:0]` input channel count |

The host computes the output sizes. `irq` pulses when the last instruction is done.

Memory layout, with one beat being `PAR` bytes:

* Feature map: beat `(y*W + x)*G + g` holds channels `g*PAR .. g*PAR+PAR-1` of pixel `(y, x)`.
* Weights, for output-channel group `og`: `G*PAR*K*K` beats starting at
  `wgt_base + og*G*PAR*K*K*PAR`. Beat `((g*PAR + c)*K*K + k)` holds, in byte `r`, the weight of
  output channel `og*PAR + r`, input channel `g*PAR + c`, kernel position `k = ky*K + kx`.
* Output map: the same layout as a feature map with `out_groups` groups. The map written by one
  layer is directly the input of the next.

## Parameters and capacity

| parameter | default | meaning |
|---|---|---|
| `PAR` | 16 | input and output channel parallelism (the paper's 4, 8 and 16 are all valid) |
| `K` | 3 | largest kernel; the array has `K*K` layers |
| `GD` | 32 | channel groups per PE weight buffer, so at most 512 input channels |
| `LB_WORDS` | 416 | line cache words per row (width x channel groups) |
| `N_INSTR` | 64 | instruction cache size |

For YOLOv4-Tiny at 416x416, every layer has width x channel groups = 416. The largest layer has
512 input channels (32 groups). Both fit the defaults. Its convolutions run as they are. Its
max-pool, route and upsample layers need the external reshape operator.

## Own choices and departures

* **Widths and arithmetic.** 8-bit signed features and weights, 32-bit sums, and a
  multiply/shift/zero-point requantizer. The paper only says the network was quantized.
* **No activation function.** The quantization unit applies none, so YOLOv4-Tiny's leaky ReLU is
  missing.
* **Reshape operator.** The paper names this ALU path but does not say what it computes. Its
  two streams are ports (`rs_out_*` carries windows out, `rs_in_*` brings 32-bit results back).
* **Host, PCIe bridge, DDR and AXI interconnect** are outside the RTL. The top has one AXI-Lite
  slave and one AXI4 master.
* **Array size.** The full 16x16x9 array needs 2304 multipliers. The paper reports 1525 DSPs for
  this configuration and does not explain the difference. Packing two 8-bit products into one DSP
  would be one explanation, but it is not done here.
* **Weight tags** with a per-PE weight buffer, the **result bundle** in place of a serial output
  chain, a **single array-wide enable** in place of per-PE FIFOs, and alternating load and emit
  in the line cache are this design's own ways of realising what the paper describes.
* **One read stream.** The paper feeds the ALU from several DMA streams at once. Here a single
  AXI4 read master brings weights and then features one after the other, and the small FIFO in
  `data_preproc` plays the part of the ALU's input buffer group.
* **No performance claim.** The paper's frame rates depend on its boards' memory systems, and
  none are reproduced here. The DMA engines are simple: one read burst outstanding, and single-beat
  writes.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against values computed in
the testbench and prints `TB_RESULT checks=N failures=M`.

* `tb_pe`, `tb_systolic_array_3d`, `tb_ob_accumulator`: the MAC and tag logic, array sums against
  a direct convolution, the `PAR+1` latency, and random stalls.
* `tb_line_buffer`: windows for 3x3 with padding 1 and stride 1 or 2, 3x3 without padding, and
  1x1 with several groups, under random back-pressure.
* `tb_wb_buffer`, `tb_stream_fifo`, `tb_quant_unit`, `tb_data_preproc`, `tb_dma_read`,
  `tb_dma_write`, `tb_instr_unit`, `tb_global_controller`, `tb_alu`.
* `tb_cnn_accel_top`: the whole accelerator at `PAR = 4` against a behavioural DDR model
  (`tb/axi_mem_model.sv`) with random ready signals. It runs a four-layer program: a 3x3 stride-1
  convolution with a 6-channel input (masked lanes), a 3x3 stride-2 convolution, a 1x1
  convolution with two output-channel groups, and a reshape layer through a stand-in operator.
  Every output byte is checked against a reference model. The test also counts array stalls,
  line-cache stalls, 4 KB burst splits, channel masking, memory back-pressure and reshape beats,
  and fails if any of them never happened.
* `tb_cnn_accel_top_full`: the same program with channel counts scaled up, with the top at its
  default parameters (`PAR = 16`, the full 16x16x9 array). Layers of 20 to 32 channels make
  every input lane and both weight phases busy. The simulation itself is short (about 2600
  cycles), but compiling the full array with Verilator takes about 8 minutes on four cores.

To run one with Verilator, for example the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_cnn_accel_top \
        -y rtl -y tb +libext+.sv -Irtl rtl/cnn_pkg.sv tb/tb_cnn_accel_top.sv
    ./obj_dir/Vtb_cnn_accel_top

`cnn_pkg.sv` must come first on the command line. The other modules are found through `-y`.
