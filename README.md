# Multi-precision CNN accelerator for a small RISC-V SoC

This is a convolution accelerator that a small RISC-V microcontroller controls
through three custom instructions. It computes convolution, dense and max-pool
layers whose operands are 8-, 4- or 2-bit signed integers, and the width can
change from one layer to the next.

The hardware is the same at every width. Each processing element (PE) takes one
8-bit feature lane and one 8-bit weight lane. In 4-bit mode a lane holds two
operands, and in 2-bit mode it holds four. A lower precision therefore gives 2×
or 4× the multiply-accumulates per cycle from the same array. The core writes
the layer description into control registers and starts a run. The accelerator
then fetches its inputs and weights from DRAM by itself and writes its results
back to DRAM.

With the default 32×32 PE array at 214 MHz, the peak rates are:

| Precision | MAC/cycle | Peak throughput |
|---|---|---|
| 8 bit | 1024 | 438 GOPS |
| 4 bit | 2048 | 877 GOPS |
| 2 bit | 4096 | 1753 GOPS |

The array size was chosen to match those rates.

```
  RISC-V core ──custom insn──► custom_insn_unit ──AXI-Lite──► ctrl_regs ─► control_module
                                                   (0x5000_0000)               │
     DRAM (0x4000_0000) ◄──AXI4──► mbw_dma ─► feature_buffer ──► pe_array ─► accum_unit ─► activation ─► mbw_output ─┐
                                      ▲   └─► weight_buffer  ──┘    └──► pooling ───────────────────────────────┤
                                      └────────────────────────── sync_fifo (output words) ◄──────────────────────┘
```

`mp_system` is the top: `custom_insn_unit` plus `mp_accel`, which holds
everything else. The core, its system bus, UART, JTAG, Flash and the DRAM are
not included. The top brings out the custom-instruction port and the AXI4
master so those parts can be attached.

## Bit-split-and-combination PE (`bsc_pe`)

A PE splits both 8-bit lanes into four 2-bit slices, giving F0..F3 and K0..K3.
Sixteen signed 3×3-bit multipliers form every product Fa·Kb. In each product:
- The top slice of each operand is sign-extended.
- The lower slices are zero-extended.

Each product is shifted left by 2·(a+b) and added. Precision selects which
products are kept:

| Mode | Products kept | Result |
|---|---|---|
| 8 bit | all 16 | f·k |
| 4 bit | the two 2×2 blocks on the diagonal | f0·k0 + f1·k1 for the two nibbles |
| 2 bit | the four diagonal products | Σ fi·ki over four 2-bit pairs |

So a PE always produces a small dot product of its packed operands (17 bits,
signed), and the array never has to unpack anything.

Operands inside a lane are packed little-endian: operand 0 sits in the low bits.

## The array and the dataflow (`pe_array`, buffers)

The array has T_OUT rows of T_IN PEs:
- **Features.** One feature word (T_IN lanes = T_IN·8 bits, 256 bits at the
  defaults) is broadcast to all rows.
- **Weights.** Each row gets its own weight word from its own bank of
  `weight_buffer`.
- **Row sums.** A pipelined adder tree sums each row.

Row r therefore gives the partial sum of output channel r over one input
channel group, at one kernel position. The array has two register stages.

Memory layouts in DRAM:

| Data | Layout, outermost first |
|---|---|
| Input feature map | [channel group][row][column][T_IN·8/b channels] |
| Weights | [channel group][ky][kx][output channel][T_IN lanes] |
| Output | [row][column][T_OUT channels] at b bits |

Notes on the layouts:
- One word of the input map is one pixel of one channel group. It holds 32
  channels at 8 bit, 64 at 4 bit and 128 at 2 bit.
- Weight word i goes to bank i mod T_OUT at address i div T_OUT.
- Output words pack 8/b consecutive pixels. A run's last word may be partly
  filled.
- At 8 bit the output layout is the input layout of the next layer. At 4 and
  2 bit, software must regroup channels between layers.

Buffer sizes at the defaults:
- `feature_buffer`: 4096 words (128 KiB), holding the rows one run needs.
- `weight_buffer`: 32 banks × 1024 words (1 MiB). This is enough for a 25 088-input dense layer at 8 bit.

## One run (`control_module`)

A run computes T_OUT output channels for a band of output rows. Larger layers
are tiled by software: one run per (row band, output-channel group). A run has
five phases:

1. **Load weights** (conv only): G·K·K·T_OUT words.
2. **Load the input band**: IN_ROWS × IN_W words per channel group, for G
   groups.
3. **Hand the DMA the write command** for all output words of the run.
4. **Issue one buffer read per cycle.**
   - Conv: for each output pixel in row-major order, every (group, ky, kx)
     step, so G·K·K cycles per pixel.
   - Pool: for each group and output pixel, the K·K window positions.
5. **Wait** for the last write response, then raise `done`.

**Zero padding.** No padded copy is stored. A position that falls outside the
held rows, or outside columns 0..IN_W−1, is read as zero. IN_ROW0 and
OUT_ROW0 give the global row numbers of the band, so a band in the middle of
an image uses real neighbour rows rather than padding.

**Back-pressure.** Results go through a 16-word output FIFO to the DMA.
DRAM may be slow to accept writes. The controller does not start a new output
pixel while the FIFO has fewer than 8 free entries (PIPE_SLOTS, which covers
everything still in the pipeline). It raises `stall` during those cycles.

Pipeline from issue to FIFO:

| Path | Stages |
|---|---|
| Conv | buffer read 1, array 2, accumulate 1, activation 1, packing 1 |
| Pool | buffer read 1, max 1 |

## Accumulation, requantization, packing

- **`accum_unit`** keeps one 32-bit partial sum per output channel. The first
  step of a pixel loads it and later steps add to it. Consecutive pixels
  follow without a bubble.
- **`activation`** applies optional ReLU, then divides by 2^shift with
  round-half-up, then clamps to [−2^(b−1), 2^(b−1)−1]. The scale is therefore
  a power of two, set per run. Biases are not supported.
- **`mbw_output`** packs the b-bit results. Channel c of pixel slot k sits at
  bit k·T_OUT·b + c·b. A word is emitted when it is full or at the end of the
  run.
- **`pooling`** takes the element-wise signed maximum over a K×K window, with
  any stride. It works directly on packed words in any precision. There is no
  padding for pooling.

## Control registers and custom instructions

The registers are 32-bit, at 0x5000_0000 + offset. Only the low 16 address
bits are decoded.

| Offset | Name | Meaning |
|---|---|---|
| 0x00 | CTRL | write: bit 0 start, bit 1 operation (0 conv/dense, 1 max pool) |
| 0x04 | STATUS | bit 0 busy, bit 1 done (sticky until next start) |
| 0x08 | CFG | [1:0] precision (0: 8, 1: 4, 2: 2 bit), [2] ReLU, [12:8] shift |
| 0x0C / 0x10 / 0x14 | IN_ADDR / W_ADDR / OUT_ADDR | DRAM byte addresses (32-byte aligned) |
| 0x18 | IN_W | input width |
| 0x1C / 0x20 | IN_ROWS / IN_ROW0 | rows held in the buffer, global index of the first |
| 0x24 / 0x28 | IN_GROUPS / IN_GSTR | channel groups, bytes between groups in DRAM |
| 0x2C | OUT_W | output width |
| 0x30 / 0x34 | OUT_ROWS / OUT_ROW0 | output rows of this run, global index of the first |
| 0x38 / 0x3C / 0x40 | KSIZE / STRIDE / PAD | kernel or window size (≤ 15), stride, padding |
| 0x7C | CLEAR | write: all registers to zero |

A dense layer is a 1×1 convolution on a 1×1 map, with the inputs spread over
channel groups.

`custom_insn_unit` accepts R-type instructions with the CUSTOM-0 opcode
(0001011). It tells them apart by bits 14:12 (xd, xs1, xs2) and ignores func7:

| Instruction | xd xs1 xs2 | Bus access |
|---|---|---|
| CL_RG | 000 | AXI-Lite write to CLEAR |
| LD_RG | 110 | rd ← read of register number rs1, at byte address base + 4·rs1 |
| ST_RG | 011 | register number rs1 ← rs2 |

Other encodings get an error response. One instruction is executed at a time,
with a valid/ready request and a valid/ready response.

## DRAM access (`mbw_dma`)

The DMA is an AXI4 master with separate read and write engines. It uses 256-bit
beats and INCR bursts of up to 16 beats. It splits bursts so that none crosses
a 4 KiB boundary, and keeps one burst outstanding per direction. The DMA only
moves whole words, so precision does not affect it. An SLVERR or DECERR
response sets `dma_err`.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| T_IN, T_OUT | 32 | PE columns and rows; must be equal; bus width is T_IN·8 |
| FB_DEPTH | 4096 | feature buffer words |
| WB_DEPTH | 1024 | weight words per bank, which bounds G·K·K ≤ 1024 |
| FIFO_DEPTH | 16 | output FIFO |
| ACC_BASE | 0x5000_0000 | register window of the custom instructions |

## How far it can be trusted, and where it is this design's own

What the design takes from its source description:
- the block structure;
- the 8/4/2-bit BSC PE;
- round-and-clamp quantization;
- the AXI-Lite control path and AXI-Full DRAM path;
- the three instructions and their field layout;
- the base addresses;
- the tiled "one run per row tile and channel tile" mapping.

This implementation's own choices:
- the array size, which is derived from the reported throughput;
- buffer depths;
- the register map;
- power-of-two scales with round-half-up;
- the data layouts at 4 and 2 bit;
- the instruction handshake;
- the meaning of the xd/xs1/xs2 bits;
- DMA burst policy;
- the stall rule;
- the loop order.

It does not cover:
- depthwise convolution;
- bias addition;
- residual additions;
- a sum that continues across runs. The largest input a single output can see
  is G·K·K ≤ 1024 weight words per bank: 32 768 inputs at 8 bit, 65 536 at
  4 bit, 131 072 at 2 bit.

Signals use an active-low asynchronous reset (`rst_n`). The core's ordinary
load/store path to the register window is not modelled: here only the custom
instructions reach the registers.

## Testbenches

Every block in `rtl/` has a self-checking testbench `tb/tb_<block>.sv`. Each
one compares against arithmetic written independently in `tb/tb_ref_pkg.sv`,
has a watchdog, and prints one summary line `TB_RESULT checks=N failures=M`.
`tb/axi_mem_model.sv` is a behavioural AXI4 DRAM with random ready stalls that
flags protocol errors.

The end-to-end tests:
- **`tb_mp_accel`** runs nine layers on a 4×4 array over AXI-Lite.
- **`tb_mp_system`** (4×4 array) and **`tb_mp_system_full`** (default 32×32
  array) drive the whole design only through CL_RG/ST_RG/LD_RG. They run a
  layer chain: conv+ReLU, max pool, conv, 1×1 conv, 3×3 conv, dense, in 8, 4
  and 2 bit.
- **`tb_vgg16_layers`** runs VGG16-sized layers at the default size:
  - the 25 088-input first dense layer at 8 and 4 bit;
  - a 14×14, 512-channel 3×3 conv in two row bands;
  - 56-wide 3×3 convs at 4 and 2 bit.

  It also times the compute phase. It requires at least 95 % of the peak
  MAC rate and measures 100 %: 438, 877 and 1753 GOPS at 214 MHz.
- Every output word is compared with the reference. The tests count each
  mechanism and fail if one never occurs: each instruction, FIFO stall, zero
  padding, pooling, partial last word, each precision.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/acc_pkg.sv tb/tb_ref_pkg.sv \
    tb/tb_mp_system.sv --top-module tb_mp_system -j 4
./obj_dir/Vtb_mp_system
```

`tb_mp_system_full` builds the same way. It takes well under a minute to
simulate and several minutes to compile.
