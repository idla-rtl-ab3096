# IDLA-style instruction-driven CNN accelerator engine

A CNN inference engine driven by a stream of 128-bit instructions. Instead of
hard-wiring one network, a host-side scheduler breaks every layer into tiles
and emits instructions that move tiles from DDR into on-chip buffers, run
them through a 32 x 32 multiply-add array, post-process the results (bias,
batch-norm folded into weights and bias, residual add, ReLU) and write them
back. Three worker modules - **Load**, **Comp** and **Save** - each have their
own instruction queue and run concurrently; a small **Ctrl** module fetches
the stream and deals the instructions out. The workers never look at each
other's state: they order themselves by passing *tokens* through four
handshake FIFOs, so loading the next tile, computing the current one and
saving the previous one overlap.

The RTL is SystemVerilog-2017 in `rtl/`, with self-checking testbenches in
`tb/`. Default sizes: TP = 32 (1024 16-bit multipliers), 16-bit fixed-point
data, 32-bit accumulators.

```
             host: start / insn_base / insn_count -> busy / done
                                   |
   DDR ---128b---> [ Ctrl ] --+--> Load queue --> [ Load ] <---512b--- DDR
                              |                    | inp/wgt/res writes
                              |        l2c  ^  c2l v
                              +--> Comp queue --> [ Comp ] <---512b--- DDR (bias)
                              |                    | Cfg | Dense+array | Alu | acc_buf
                              |        c2s  v  s2c ^        | out_buf writes
                              +--> Save queue --> [ Save ] ---512b---> DDR
   on-chip: inp_buf, wgt_buf, res_buf (Load -> Comp), out_buf (Comp -> Save)
```

## Files

| file | what it is |
|---|---|
| `rtl/idla_pkg.sv` | sizes, instruction structs, opcodes, register map |
| `rtl/ddr_rd_if.sv` | interface: word-granular DDR read port with valid/ready |
| `rtl/idla_top.sv` | the engine: Ctrl, queues, token FIFOs, buffers, Load, Comp, Save |
| `rtl/idla_ctrl.sv` | instruction fetch, decode, dispatch |
| `rtl/idla_fifo.sv` | valid/ready FIFO (instruction queues and token FIFOs) |
| `rtl/idla_load.sv` | Load: DDR -> inp_buf / wgt_buf / res_buf |
| `rtl/idla_comp.sv` | Comp: sequencing, tokens, accumulation buffer, Alu pass |
| `rtl/idla_cfg.sv` | Cfg: control registers and bias buffer |
| `rtl/idla_dense.sv` | Dense: convolution / pooling loop engine |
| `rtl/idla_mac_array.sv` | TP x TP multiply-add array |
| `rtl/idla_alu.sv` | Alu: bias, rescale, residual, ReLU |
| `rtl/idla_save.sv` | Save: out_buf -> DDR |
| `rtl/idla_vec_buf.sv`, `rtl/idla_wgt_buf.sv` | buffer RAMs |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_idla_top` end to end; `tb_idla_workload` ResNet18 / VGG16 layer tiles |
| `tb/ddr_rd_model.sv` | behavioural DDR read port with random back-pressure |

## How the dependency tokens work

This is the part that makes the engine both concurrent and correct, and the
part a program writer has to get right.

Each instruction carries four DEPT_INFO bits. "prev" means the module before
it in Load -> Comp -> Save, "next" the one after:

| bit | name | before the instruction runs / after it is done |
|---|---|---|
| 3 | `pop_prev`  | wait for and take a token from the previous module |
| 4 | `pop_next`  | wait for and take a token from the next module |
| 5 | `push_prev` | give a token to the previous module |
| 6 | `push_next` | give a token to the next module |

There are four one-bit token FIFOs (depth 8):

| FIFO | pushed by | popped by | meaning |
|---|---|---|---|
| l2c | Load `push_next` | Comp `pop_prev` | input tile is in inp/wgt/res_buf |
| c2l | Comp `push_prev` | Load `pop_next` | Comp is done with a tile, its buffer space may be reused |
| c2s | Comp `push_next` | Save `pop_prev` | results are in out_buf |
| s2c | Save `push_prev` | Comp `pop_next` | out_buf space has been written out |

Load only uses `pop_next`/`push_next`, Save only `pop_prev`/`push_prev`;
Comp uses all four. A module waits (stalls) in front of an instruction until
every token it must pop is available, pops them all in one cycle, runs the
instruction, then pushes its tokens (waiting if a token FIFO is full).

A typical program splits every buffer into two halves and alternates tile
groups *g* between them (this is what `tb_idla_top` does):

* Load group *g*: inputs, weights, residuals into half *g*&nbsp;mod&nbsp;2; the first
  Load pops a c2l token if *g* >= 2, the last Load pushes l2c.
* Comp group *g*: Comp_cfg register writes, then one Comp per input-channel
  block. The first Comp pops l2c. The last one (with OUT_FLAG) pops s2c if
  *g* >= 2, and pushes c2l and c2s.
* Save group *g*: pops c2s, writes the half to DDR, pushes s2c.

With that pattern Load fills one half while Comp works on the other, and
Comp fills one half of out_buf while Save drains the other. The token FIFOs
end the program holding two leftover tokens each in c2l and s2c, which is
harmless; their depth (8) bounds how far a producer may run ahead.

Ctrl does not take part in this: it fetches as fast as the three queues
(16 deep) accept, and stalls only when the target queue is full.

## Instruction encoding

All instructions are 128 bits; OP_CODE is bits [2:0], DEPT_INFO bits [6:3].
The structs are in `idla_pkg` (`mem_insn_t`, `comp_insn_t`, `cfg_insn_t`);
field order below is from bit 7 upwards.

| OP_CODE | instruction |
|---|---|
| 0 | Load |
| 1 | Comp |
| 2 | Save |
| 3 | Comp_cfg |

Other opcodes are dropped by Ctrl and counted on `bad_ops`.

**Load / Save** (`mem_insn_t`)

| bits | field | meaning |
|---|---|---|
| 8:7 | BUF_ID | 0 inp_buf, 1 wgt_buf, 2 res_buf (Load); ignored by Save (always out_buf) |
| 24:9 | sram_base | first buffer address; for wgt_buf a weight *row* index = tile*32 + row |
| 56:25 | DRAM_BASE | DDR word address of the first word |
| 72:57 | x_size | words per row |
| 88:73 | y_size | rows |
| 104:89 | dram_stride | DDR words from one row to the next |

A transfer moves `x_size * y_size` words; the buffer side is always
contiguous, the DDR side is a 2-D block. Save can therefore write an output
tile into the interior of a larger (for example zero-padded) feature map.

**Comp** (`comp_insn_t`)

| bits | field | meaning |
|---|---|---|
| 8:7 | CMP_OP | 0 convolution, 1 average pooling (sum), 2 max pooling |
| 9 | ACC_FLAG | begin a new accumulation instead of adding to the stored one |
| 10 | OUT_FLAG | afterwards pass the OH*OW accumulations through the Alu into out_buf |
| 26:11 | inp_base | inp_buf address of input pixel (0,0) |
| 42:27 | wgt_base | first weight tile |
| 58:43 | acc_base | accumulation buffer address of output pixel (0,0) |
| 74:59 | res_base | res_buf address of the residual for output pixel (0,0) |
| 90:75 | out_base | out_buf address for output pixel (0,0) |
| 98:91 | CMP_SIZE.iw | input row width (pixels) |
| 102:99 | CMP_SIZE.k | kernel size (square, 1..15) |
| 106:103 | CMP_SIZE.stride | stride (1..15) |
| 114:107 | CMP_SIZE.oh | output rows (1..255) |
| 122:115 | CMP_SIZE.ow | output columns (1..255) |

**Comp_cfg** (`cfg_insn_t`)

| bits | field | meaning |
|---|---|---|
| 8:7 | CFG_OP | 0 write a register, 1 load bias data |
| 16:9 | CFG_ADDR | register number, or first bias-buffer entry |
| 48:17 | CFG_DATA | register value |
| 80:49 | DRAM_BASE | DDR word address of the bias data |
| 96:81 | CFG_CH_SIZE | number of bias values (ceil(n/32) words are read) |

## Data layout

One DDR word (512 bits) is one *vector*: 32 16-bit values, lane *c* in bits
[16c+15:16c].

* Feature maps: channels are grouped in blocks of 32. One vector holds the 32
  channels of one pixel of one block; a block of an H x W map is H*W vectors
  in row-major order. There is no padding logic: a padded layer reads a
  zero-bordered map (the previous Save can write into the interior of one).
* Weights: a *tile* is the 32 x 32 matrix W[co][ci] of one kernel position
  (kh, kw) for one output-channel block and one input-channel block; it is
  32 DDR words, word *r* = row co = r. Tiles of one Comp instruction must be
  consecutive in kh-major order: tile = wgt_base + kh*K + kw.
* Biases: 32 16-bit values per DDR word, one bias-buffer entry per word.

## Dense: the convolution data flow

A Comp instruction runs the loop nest

```
for kh in 0..K-1, kw in 0..K-1:            # one weight tile per (kh, kw)
  for oh in 0..OH-1, ow in 0..OW-1:        # tile reused for every output pixel
    x   = inp_buf[inp_base + (oh*S+kh)*IW + ow*S+kw]      # 32 input channels
    acc_buf[acc_base + oh*OW + ow] (+)= W[wgt_base + kh*K + kw] x
```

The two innermost loops of a convolution (output channel, input channel) have
the fixed bound 32 and are fully unrolled into `idla_mac_array`, so one
output pixel's 32 partial sums are produced per cycle: 1024 multiply-adds per
cycle. Because the weight tile only changes with (kh, kw), each weight is
read from wgt_buf once per instruction and used OH*OW times. More
input-channel blocks are added by further Comp instructions on the same
acc_base without ACC_FLAG.

Pooling uses the same loops channel-wise, without the array: average pooling
sums (the division is done by the Alu, e.g. SCALE = 1, OUT_SHIFT = 2 for 2x2),
max pooling keeps the maximum. With ACC_FLAG the first kernel position starts
from 0, or from -32768 for max pooling.

**Timing.** Dense is a two-stage pipeline: addresses in stage 0, the buffers
answer a cycle later and stage 1 adds and writes back. A Comp instruction
takes K*K*OH*OW + 2 cycles from start to done. When OH*OW = 1 (a fully
connected layer expressed as a K x K kernel on a K x K input) consecutive
cycles update the same accumulator; a one-entry bypass forwards the value
just written, so there is no stall.

After Dense, OUT_FLAG streams the OH*OW accumulations through the Alu into
out_buf at one vector per cycle (plus one cycle of latency). This pass is not
overlapped with the next Dense run.

## Alu and the control registers

`idla_alu` works lane by lane on a 32-bit accumulator:

```
x = acc + (bias << BIAS_SHIFT)           if bias_en
y = sat16((x * SCALE) >>> OUT_SHIFT)
y = sat16(y + residual)                  if res_en
y = max(y, 0)                            if relu_en
```

Batch normalisation is expected to be folded into the weights and bias; the
multiply-and-shift is the dynamic fixed-point rescale back to 16 bits (and
the average-pool divide). Registers, written by Comp_cfg with CFG_OP = 0:

| CFG_ADDR | register | reset |
|---|---|---|
| 0 | ALU_CTRL = {relu_en, res_en, bias_en} | 0 |
| 1 | BIAS_IDX: bias-buffer entry used by the Alu | 0 |
| 2 | BIAS_SHIFT (6 bits) | 0 |
| 3 | OUT_SHIFT (6 bits) | 0 |
| 4 | SCALE (16 bits, unsigned) | 1 |

Comp executes its instructions strictly in order, so a register write only
affects the Comp instructions after it.

## DDR ports

The top brings out four ports; a memory controller or interconnect would
merge them.

* `insn_rd_*` (128-bit), `ld_rd_*` and `cfg_rd_*` (512-bit): read ports.
  A request (`req_addr`, word address) is taken when `req_valid && req_ready`;
  responses return **in order** on `rsp_data` and are taken when
  `rsp_valid && rsp_ready`. Both sides must hold their data until taken
  (asserted in `ddr_rd_if`). Ctrl keeps one read outstanding, Load up to 16,
  Cfg up to 8.
* `sv_wr_*` (512-bit): write port, one word per `sv_wr_valid && sv_wr_ready`.

All four are word-addressed; how words map to bytes is left to the memory
side. Reset is synchronous, active low (`rst_n`).

## Sizes

| parameter | default | where |
|---|---|---|
| TP | 32 | `idla_pkg` (array is TP x TP) |
| DATA_W / ACC_W | 16 / 32 | `idla_pkg` |
| inp_buf | 4096 vectors (2 Mbit) | `idla_top.INP_D` |
| wgt_buf | 256 tiles (4 Mbit) | `idla_top.WGT_T` |
| res_buf / out_buf | 2048 vectors each | `RES_D`, `OUT_D` |
| accumulation buffer | 2048 x 32 accumulators (2 Mbit) | `ACC_D` |
| bias buffer | 64 entries (2048 channels) | `idla_pkg::BIAS_DEPTH` |
| instruction queues / token FIFOs | 16 / 8 | `Q_DEPTH`, `DEP_DEPTH` |

At 167 MHz the array peaks at 1024 x 2 x 167e6 = 342 GOPS. The published
FPGA build reached 277.6 GOPS on VGG16-SVD (1.62 ops per DSP per cycle) and
168.8 GOPS on ResNet18; this RTL has not been timed or placed, and its
sequential Alu pass and per-instruction overhead will cost some of that.

**Fitting real networks.** With the buffers split in halves as above, a
layer is run as tiles of a few output rows. A 56x56x64 3x3 layer of ResNet18
in tiles of 4 output rows needs 2 channel blocks x 6 x 58 = 696 input
vectors (of a 2048-vector half of inp_buf) and 224 accumulators (of a 1024
half); the first 64-channel layer of VGG16 (IW = 226 with padding) fits as
tiles of 2 output rows: 2 x 4 x 226 = 1808 input vectors and 448
accumulators. A 512-channel 3x3 layer needs 16 x 9 = 144 weight tiles per
output block, more than a 128-tile half, so it is run as two passes over
input channels on the same accumulators. ResNet18's 7x7 stride-2 first layer
fits the 4-bit K and stride fields; its 3 input channels occupy one
32-channel block. Fully connected layers map to a K x K kernel over a K x K
input (one output pixel). All field widths (8-bit sizes, 16-bit buffer
addresses) cover these layers. `tb_idla_workload` runs exactly the two
tiles above (ResNet18 conv2_x with its residual, VGG16 conv1_2), each over
both 32-channel output groups: 31.4 k cycles against 24.2 k cycles of pure
array work, the rest being loads the array waited for, the Alu passes and
instruction overhead.

## What follows the published design and what does not

Taken from the published design: the Ctrl / Load / Comp / Save partition
working concurrently, handshake FIFOs for inter-module dependencies, four
128-bit instructions with the named fields, Load_inp / Load_wgt / Load_res,
Comp made of Cfg, Dense and Alu, the data flow with the (co, ci) loops
unrolled into a TP x TP array and weights reused over h and w, ACC_FLAG,
convolution / average / max pooling, bias + residual + ReLU fused after the
convolution, TP = 32 and 16-bit data.

This design's own choices, where the published description stops: all bit
positions and field widths; the DEPT_INFO bit meanings and the four token
FIFOs; OUT_FLAG and the separate Alu pass; the register map and the
scale/shift rescale with saturation; 32-bit accumulators; buffer depths and
the banked weight buffer; the bypass; the 2-D transfer shape of Load and
Save; one shared DDR port for all three loaders; four separate DDR ports;
the host interface (start / insn_base / insn_count / done) standing in for
the PCIe link.

Not included: the host-side network parser that tiles layers, chooses input-
or weight-stationary scheduling and generates the instruction stream; the
DDR controller and PCIe. There is no hardware padding, no ceil-mode pooling,
and no overflow detection in the accumulators (they wrap).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/idla_pkg.sv tb/tb_idla_top.sv --top-module tb_idla_top
./obj_dir/Vtb_idla_top
```

Replace `tb_idla_top` by any other `tb/tb_*.sv` to test one module.
`tb_idla_top` runs the whole engine at its default sizes through four small
layers (a 3x3 convolution with bias, residual and ReLU; max pooling; average
pooling; a fully connected layer that saturates) and checks every word
written to DDR against a reference computed in the testbench. It also counts
how often each mechanism happens - every kind of token wait, full
instruction queues, DDR back-pressure, the bypass, each CMP_OP, residual,
ReLU, saturation, Load/Comp and Comp/Save overlap - and fails if one never
does. The run takes about two minutes, most of it compilation. The
module-level testbenches check exact cycle counts where the design promises
them (Dense: K*K*OH*OW + 2; Save: one word per cycle).

To change the array size, edit `TP` in `idla_pkg`; the DDR word width and
the weight tile follow it.
