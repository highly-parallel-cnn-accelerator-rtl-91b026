# A channel-parallel training engine for RepVGG-like CNNs

RepVGG-like networks train as multi-branch networks and run inference as plain
ones. During training, each *basic block* has three branches side by side:

- a 3x3 convolution;
- a 1x1 convolution;
- an identity path.

Each branch is followed by batch normalization and ReLU, and a shortcut
addition joins the three branches. For inference the three branches fold into
a single 3x3 convolution.

This RTL accelerates training of such a network at batch size 1 on an FPGA.
Two ideas shape it:

1. **Channel-level parallelism inside each compute unit.** Every convolution
   unit takes 8 input channels and produces 8 output channels in the same
   cycle.
   - The 3x3 unit has 8 x 8 x 3 x 3 = 576 multipliers.
   - A layer with more channels is processed as a loop over 8-channel *tiles*.
2. **Task-level parallelism between units.**
   - In the forward pass, the 3x3 branch and the 1x1 branch run at the same
     time on the same input tile. The identity branch is a copy.
   - In the backward pass, error back-propagation (deConv) and weight-gradient
     calculation (dilated Conv) run at the same time, for both kernel sizes.
   - Each branch has its own group of two buffers used as a ping-pong pair, so
     no branch waits for another one's storage.

All arithmetic is 16-bit fixed point: Q8.8, with 8 integer bits (sign
included) and 8 fraction bits.

- Products are summed in 40-bit accumulators.
- Results are rounded to the nearest value (ties up) and saturated back to 16
  bits.

## Data layout: channel tiles and words

Every feature map, error map and weight row is stored as **words of 8
channels** (`vec_t`, 128 bits).

- A pixel of an 8-channel tile is one word, at address `y*W + x`.
- A layer with C channels uses C/8 tiles.

At its default parameters the design holds:

- maps up to 32x32 (`H_MAX`, `W_MAX`);
- up to 8 tiles (`NT_MAX`), which is 64 channels, the widest layer of the
  CIFAR-10 network
  16C-16C-32C-32C-32C-64C-64C-64C-64C-AvgPool-FC.

Weights are stored per (output tile, input tile, output channel, tap), with a
word holding the 8 input channels. Momentum velocities have the same layout.

## The convolution engine (`conv_engine`)

One engine instance serves both the forward convolution and the backward
deConv of one (output tile, input tile) pair.

### Datapath

1. A sequencer walks a zero-padded frame in raster order, one position per
   cycle.
2. The pixel stream feeds `line_window_buffer`:
   - two line buffers of 8-channel words;
   - a 3x3 window register.
   After the rows have filled, it yields a full 3x3x8 window every cycle, so
   the initiation interval is 1.
3. `conv_pe_array` multiplies the window by an 8x8x3x3 kernel tile. Adder
   trees reduce each output channel to one partial sum.
4. The partial sums go into an on-chip psum buffer, with one 8x40-bit word per
   output pixel.

### Output-stationary accumulation over input tiles

The psum buffer stays in place while the input tiles of an output tile pass
through the engine.

- `first` clears the sums.
- `last` requantizes the finished sums and streams them out.

### Stride 2

Stride 2 in the forward pass is computed as a stride-1 convolution. Every other
output row and column is discarded.

### deConv for back-propagation

The error map of a stride-s layer is dilated virtually: s-1 zeros go after
every error pixel, and the zeros are produced without a memory read.

The kernel is then read rotated by 180 degrees, with the input and output
channel roles exchanged. The same datapath then computes the error of the
layer input.

### Timing

A run takes (H+2)(W+2) streaming cycles plus a 4-cycle drain. For a 32x32 map
that is 1160 cycles.

### 1x1 branch

The 1x1 branch uses the same module with `K = 1`.

## The weight-gradient engine (`dilated_conv_engine`)

The gradient of a 3x3 kernel is a convolution of the layer input with the
layer's output error:

    G[co][ci][kh][kw] = sum over pixels D[co][y][x] * A[ci][y+kh-1][x+kw-1]

Here the error plays the part of the kernel, but it is as large as the feature
map (4x4 up to 32x32). A kernel that size cannot be fetched in one cycle.

The engine therefore **partitions the error into non-overlapping 4x4
regions**. For each region:

1. It loads the 4x4x8 error region and the matching 6x6x8 activation region
   into local registers, one word per cycle from each of two read ports.
2. It spends 9 cycles, one per kernel tap, sliding the error region over the
   activation region. Each cycle it adds 8 x 8 x 16 products into the
   accumulators of that tap.

Stride-2 layers use the zero-dilated error, as in deConv.

`first` clears the accumulators. Without it, gradients of successive images
add up (batch accumulation).

### Timing and how it differs from the forward engine

A region takes 36 + 1 + 9 = 46 cycles. That is about 2.9 cycles per pixel,
against 1.1 for the convolution engine.

The original scheme overlaps the load of the next region with computation on
the current one. That would match the two engines' speeds, but this design
does not do it.

Because of this, in the backward pass the dilated Conv, not the deConv, sets
the duration of each (output tile, input tile) step.

## Batch normalization and ReLU (`bn_relu`, `bn_relu_bwd`)

BN is applied after each 8-channel output tile, with statistics over the
pixels of that tile's map of the current image. ReLU is fused with it.

### Forward (`bn_relu`)

The unit works in two passes over a branch buffer.

1. **Statistics pass.** It sums x and x².
2. **Square root and reciprocal.** Bit-serially, 24 cycles of square root (16
   fraction bits) and 15 of reciprocal, form
   `inv_std = 1/sqrt(var + 2^-16)`.
3. **Apply pass.** It emits y = max(0, γ·x̂ + β), and keeps the normalized
   input x̂ and the ReLU mask for the backward pass.

The map size must be a power of two (`log2n`).

### Backward (`bn_relu_bwd`)

This unit also works in two passes.

1. With d = mask ? dy : 0, it forms dβ = Σd and dγ = Σd·x̂. These BN parameter
   gradients are ready *before* the error.
2. It then emits dx = γ·inv_std·(d − dβ/N − x̂·dγ/N).

## Buffers, shortcut addition and update

- **`pingpong_buffer`**: two banks, one written while the other is read. There
  are three of them, one per branch.
- **`shortcut_add`**: adds the enabled branches with saturation.
  - In the forward pass it sums the three BN&ReLU outputs.
  - In the backward pass it sums the two deConv results and the identity
    error.
- **`sgd_momentum`**: v' = m·v + g, then w' = w − lr·v'. It handles 8 weights
  per cycle.
  - The default hyper-parameters are lr = 0.05 ≈ 13/256 and m = 0.9 ≈ 230/256.
  - They are inputs of the top, not constants.

## Network head (`avgpool`, `fc_unit`)

- **`avgpool`**: global average pooling of the last 8x8 map.
  - Forward, it produces one 8-channel word per tile.
  - Backward, it spreads err/N over every pixel.
- **`fc_unit`**: a 64→10 fully connected layer with 8 multipliers. It has
  three operations:
  - forward: y = Wx + b;
  - backward error: dx = Wᵀdy;
  - weight gradient: g = dy·xᵀ.

  Each pass takes 80 cycles. The loss gradient and the FC weight update are
  left to the host.

## The top: `repvgg_accel`

The top runs one basic block of a layer through three commands. A command is
given by `cmd_valid` and `cmd_op`, is accepted while `busy` is low, and ends
with a `done` pulse. Layer data is written beforehand through the host ports
`act_*`, `err_*` and `wv_*`. These on-chip arrays stand in for the external
DRAM holding one layer.

| Command | Tile argument | What happens |
|---|---|---|
| `OP_FWD` | output tile `co` | For each input tile: load the 3x3 and 1x1 kernels (72 cycles), then run both Conv engines together while the identity branch copies input tile `co`. Then all three BN&ReLU units run at once (statistics pass, then apply pass). The shortcut sum streams out on `out_*`. x̂, the masks and inv_std are kept. |
| `OP_BNB` | output tile `co` | The block-output error of tile `co` passes through the three BN backward units at once. dγ/dβ appear on `bn_dgamma`/`bn_dbeta`; the per-branch errors are kept. |
| `OP_BWD` | input tile `ci` | For each output tile: load the weights and velocities, then run 3x3 deConv, 1x1 deConv, 3x3 dilated Conv and 1x1 dilated Conv together. SGD writes back the updated weights and velocities of that tile pair (80 cycles). Finally the summed error of tile `ci` streams out on `out_*`. |

A layer is run as follows:

1. `OP_FWD` for each output tile.
2. `OP_BNB` for each output tile, once its error is available.
3. `OP_BWD` for each input tile.

The head (`pool_*`, `fc_*`) has its own ports and runs independently.

### Choices of this design, not of the original scheme

- **Backward loop order.** The original scheme loops over output tiles, then
  input tiles. Here `OP_BWD` takes input tiles outer and output tiles inner. The
  deConv result of an input tile then accumulates in place (output
  stationary). The weight updates are the same.
- **BN does not overlap the next Conv.** The branch BN phase runs after the
  Conv of a tile, not overlapped with the next tile's Conv. The ping-pong
  buffers swap, but the sequencer does not exploit the overlap.
- **Weights update after every image** (batch 1). Batch accumulation exists in
  the gradient engine but is not sequenced by the top.
- **No inference bypass.** Inference with reparameterized weights works by
  loading merged 3x3 weights, zero 1x1 weights and `cmd_id_en = 0`. The 1x1
  engine still runs, so there is no inference-specific speed-up.
- **Identity branch only for stride 1** with equal channel counts
  (`cmd_id_en`).
- **The Q8.8 split, eps, rounding and saturation** are this design's choices.
  The original only specifies 16-bit fixed point.
- **Not included:**
  - the DRAM and bus interfaces (128-bit packed bursts);
  - the host processor;
  - the loss function.

## Verification

Each unit has a self-checking testbench in `tb/`. It compares the unit against
an independent model and prints `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_conv_engine` | Forward stride 1 over two input tiles, forward stride 2, and stride-2 deConv, all against direct sums. The deConv reference scatters through the forward connectivity. Also the cycle count. |
| `tb_dilated_conv_engine` | All 576 gradients for stride 1 and stride 2, accumulation across two runs, and 46 cycles per region. |
| `tb_bn_relu`, `tb_bn_relu_bwd` | Against real-valued BN formulas. Also the statistics latency. |
| `tb_line_window_buffer`, `tb_conv_pe_array`, `tb_pingpong_buffer`, `tb_shortcut_add`, `tb_sgd_momentum`, `tb_avgpool`, `tb_fc_unit` | Exact comparisons. |
| `tb_repvgg_accel` (8x8 maps) and `tb_repvgg_accel_full` (32x32 maps) | End to end, with the top at its default parameters (see below). |

The two end-to-end testbenches go through three parts:

- **A:** a 16→16-channel stride-1 block with identity: forward, BN backward,
  backward with weight update.
- **B:** a stride-2 block.
- **C:** the AvgPool→FC head on a 64-channel map.

They check the block output against a real-valued model, with a tolerance of a
few LSBs. The propagated error is checked exactly, and every updated weight and
velocity within 2 LSBs. They also count each mechanism and fail any that never
occurs:

- parallel branches;
- deConv beside dilated Conv;
- buffer swaps;
- the identity branch;
- stride-2 dropping;
- zero dilation;
- 4x4 regions;
- the SGD update;
- the BN passes;
- the head operations.

To run a testbench with Verilator:

    verilator --binary --timing -Irtl -Itb rtl/repvgg_pkg.sv tb/tb_repvgg_accel.sv \
              --top-module tb_repvgg_accel -o sim
    ./obj_dir/sim

The testbenches with a 3x3 engine (`tb_conv_engine`, the end-to-end ones)
take one to two minutes to compile, because the PE array and the weight tiles
are wide. Simulation itself takes seconds, even at 32x32.

## Files

- `rtl/repvgg_pkg.sv`: types (`data_t`, `vec_t`, …), rounding and saturation
  helpers, command codes.
- `rtl/*.sv`: one module per file, as named above.
- `tb/*.sv`: testbenches. `repvgg_accel_tb_core.sv` holds the shared
  end-to-end sequence.
