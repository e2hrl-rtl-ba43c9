# E2HRL: a small accelerator for a hierarchical reinforcement-learning agent

This RTL runs the policy network of a hierarchical reinforcement-learning (HRL)
agent that navigates from camera images, and it is sized for a small FPGA. The
agent has two levels:

- A slow **subgoal module** (pi_G) runs once every K frames. It turns the image
  embedding into a 32-value subgoal vector.
- A fast **action module** (pi_C) runs on every frame. It combines the current
  image embedding with the most recent subgoal and picks one of three actions.

The hardware saves work by running pi_G only when the subgoal is due. The frames
in between reuse the stored subgoal. All convolutions and dense layers run on
one shared array of multiply-accumulate processing elements (PEs). In the LSTM
variant, pi_G runs on a separate small LSTM datapath.

Everything is 32-bit signed fixed point in Q16.16 format: 16 integer bits and 16
fraction bits.

## The network a frame runs through

| # | Layer | Input | Output | Notes |
|---|-------|-------|--------|-------|
| 0 | conv1 | 40x30x3 image | 20x15x32 | 3x3 kernel, stride 2, ReLU |
| 1 | conv2 | 20x15x32 | 10x8x32 | 3x3 kernel, stride 2, ReLU |
| 2 | conv3 | 10x8x32 | 5x4x32 | 3x3 kernel, stride 2, ReLU |
| 3 | embedding | 640 (flattened) | 32 | dense, ReLU |
| 4 | pi_G | 32 | 32 | dense with ReLU (FC-HRL), or one LSTM step (LSTM-HRL); only every K frames |
| 5 | pi_C hidden | 64 = [embedding, subgoal] | 32 | dense, ReLU |
| 6 | action | 32 | 3 | dense, no activation |

The stride-2 convolutions take the place of pooling. Padding is "same": output
size = ceil(input / 2). Where the padding is odd, the extra row or column goes at
the bottom or right. These sizes are the only ones that give the chain
40x30 → 20x15 → 10x8 → 5x4.

The trained network ends in a softmax, but softmax does not change which output
is largest. So the hardware skips it. It outputs the three action values
(`logits`) and the index of the largest one (`action`). On a tie, the lower
index wins.

All sizes are top-level parameters: `N_PE`, `IMG_H`, `IMG_W`, `IMG_C`,
`CONV_K`, `EMB`, `SUB`, `HID_C` and `N_ACT`. The function
`e2hrl_pkg::build_layers` turns them into a table of layer descriptors
(`layer_cfg_t`). The controller and the address generators run from that table.

## The K counter and the subgoal branch

`top_ctrl` steps through the layer slots 0..6. For each slot it starts one of
three address generators: convolution, dense or LSTM. It then waits for that
generator's `done`.

Whether slot 4 (pi_G) runs is set by an internal K counter that is compared with
the `k_param` input:

- **pi_G runs** on the first frame after reset or after `episode_start`, and on
  any frame where `k_count == K`. The counter then restarts at 1.
- **pi_G is skipped** on all other frames. The counter increments, and slot 3
  jumps straight to slot 5, reusing the stored subgoal.
- `k_param = 0` is treated as 1.
- The `branch_run` output shows which case the last frame was.

With K = 3 the branch pattern is run, skip, skip, run, skip, skip, …

The subgoal is kept in its own sub-goal memory. pi_C reads its input through a
concatenating read path: addresses below `EMB` read the embedding memory, and
higher addresses read the sub-goal memory. No data is copied.

`episode_start`, given while the accelerator is idle, does three things:

- clears the sub-goal memory;
- clears the LSTM cell state and output;
- makes the next frame run pi_G.

## PE array and output-channel tiling

Each PE (`pe`, grouped in `pe_array`) is a multiplier, an adder, an accumulator
register and an optional ReLU on the output. `s_load` starts a new dot product
by replacing the accumulator feedback with zero.

Work is split by **output channel**:

- Every cycle, one feature value is read and shared by all N_PE PEs.
- Each PE gets its own weight from its own weight bank. All banks are read at the
  same address.
- PE p therefore computes output channel `g*N_PE + p` of group g.
- For a convolution, the address generator walks each output pixel and each
  group of N_PE channels. It issues one **bias tap**, whose operand is forced to
  1.0, and then 9·IC taps in the order kernel row, kernel column, input channel
  (innermost).
- Taps that fall in the padding are flagged, and their operand is forced to 0.
- After the taps, the N_PE results are written back one lane per cycle.

Dense layers work the same way, with one output "pixel".

Feature maps are stored in HWC order: address = (y·W + x)·C + c.

### Weight bank layout

Each layer owns a contiguous stream in every bank, starting at that layer's
`wbase`. For output group g and input length T (9·IC for a convolution):

    bank p, address wbase + g*(T+1)      : bias of output g*N_PE+p
    bank p, address wbase + g*(T+1) + 1+t: weight of tap t for output g*N_PE+p

In a partly filled last group, the unused lanes compute values that are never
written back, so their bank words may hold anything. With the default sizes each bank has 5,413 words. The total,
43,304 words, holds the 43,139 weights and biases of the network.

### Feature map memory map (13,200 words at default sizes)

| Region | Base | Size | Holds |
|---|---|---|---|
| A | 0 | 20·15·32 = 9,600 | conv1 output, conv3 output |
| B | 9,600 | max(40·30·3, 10·8·32, 32) = 3,600 | input image, conv2 output, pi_C hidden vector |

Each layer reads one region and writes the other, so it never overwrites its
own input. The embedding (32 words), the subgoal (32 words) and the action
outputs have their own small memories or registers.

## The LSTM block

In LSTM-HRL, pi_G is one LSTM step with 32 inputs and 32 units. The input is the
image embedding. Everything happens inside `lstm_block`, driven by
`lstm_addr_gen`.

**Memories.** The block holds four memories:

- kernel: `[W_xi; W_xf; W_xo; W_xg]`, 4·HID rows of IN words;
- recurrent kernel: the matching `W_h*`, 4·HID rows of HID words;
- bias: 4·HID words;
- cell state: HID words.

Gate order is i, f, o, g. The address of row `(q*HID + j)` is
`(q*HID + j)*IN + t` in the kernel memory and `(q*HID + j)*HID + t` in the
recurrent kernel memory.

**Pre-activations.** For each unit j and gate q, two two-stage MACs (`lstm_mac`)
run in parallel:

- MAC1 computes the kernel row times x_t;
- MAC2 computes the recurrent row times h_(t-1).

A third accumulator then forms the pre-activation over three cycles. A
selector (S1) feeds it MAC1 first (replacing the old value), then MAC2, then
the bias. Each gate therefore costs max(IN, HID) taps + 2 drain + 3 sum +
1 activation cycles.

**Activations** (`hard_act`):

- hard sigmoid `clip(0.2x + 0.5, 0, 1)` for i, f and o;
- hard tanh `clip(x, -1, 1)` for g.

**Update.** After the fourth gate:

    c_j = f*c_j + i*g
    h_j = hardtanh(c_j) * o

h_j is written to the sub-goal memory and to one bank of a two-bank h register
file. The other bank still holds h_(t-1) for the rest of the step. The banks
swap at the end of the step.

## Fixed point

`fxmul(a, b)` is the full 64-bit product shifted right arithmetically by 16 and
truncated to 32 bits. Accumulators add in 32 bits and wrap on overflow. The
constant 0.2 is 13107/65536. The testbenches compute their expected values with
the same arithmetic, so results match bit for bit.

## Interface and use

Ports of `e2hrl_top`:

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `ld_we`, `ld_target`, `ld_bank`, `ld_addr`, `ld_data` | in | load port, one word per cycle while idle. `ld_target`: 0 weight bank `ld_bank`, 1 feature memory, 2 LSTM kernel, 3 LSTM recurrent kernel, 4 LSTM bias |
| `start` | in | run one frame |
| `episode_start` | in | new episode (see above) |
| `use_lstm` | in | 0 FC-HRL, 1 LSTM-HRL |
| `k_param` | in | K, frames per subgoal |
| `busy`, `done` | out | frame running; one-cycle pulse when the frame has finished |
| `branch_run`, `k_count` | out | whether this frame ran pi_G; the K counter |
| `logits`, `action` | out | action-layer outputs; chosen action |

A typical sequence:

1. Load the weights and biases into the banks, using the layout above. Load the
   LSTM memories if the LSTM variant is used.
2. Pulse `episode_start`.
3. For each frame: load the image into region B of the feature memory, pulse
   `start`, wait for `done`, then read `action`.

## Timing

The memories have one cycle of read latency. Per layer, with N = N_PE:

| Layer | Cycles |
|---|---|
| convolution | OH·OW·ceil(OC/N)·(9·IC + 2 + N) |
| dense | ceil(OUT/N)·(IN + 2 + N) |
| LSTM step | HID·(4·(max(IN, HID) + 6) + 1) |

On top of these, each layer adds 2 cycles for its launch and its done handshake,
and a frame adds 1 cycle. At the default sizes with N_PE = 8:

| Frame | Cycles | At 100 MHz |
|---|---|---|
| FC-HRL, pi_G runs | 166,721 | 1.67 ms |
| FC-HRL, pi_G skipped | 166,551 | 1.67 ms |
| LSTM-HRL, pi_G runs | 171,449 | 1.71 ms |

Both are far inside the 33 ms per frame that 30 frames/s allows. The end-to-end
testbenches check these counts cycle-exactly against the formulas.

## Where this design departs from, or goes beyond, its source description

- **Bias taps.** Convolution and dense biases are stored in the weight banks and
  applied as an extra tap. The source describes a bias memory only for the LSTM.
- **Padding.** The text calls the convolution "valid", but the layer table's
  sizes require "same" padding, which is what is built.
- **Subgoal storage.** One passage puts the subgoal at the end of the feature
  map memory, while the block diagram shows a separate sub-goal memory. The
  separate memory is built.
- **Memory reads.** The source reads N feature values and N×N_PE weights per
  step. This design reads one feature value per cycle and writes results back
  sequentially, so each group costs N_PE extra cycles. This is one reason the
  FC-HRL latency is 1.67 ms rather than the reported 0.9 ms. The reported
  latencies also come from a smaller network, whose exact layer shapes are not
  given.
- **Choices made here.** The Q16.16 split, the HWC layout, the tap order, the
  load port, the first-frame and `episode_start` behaviour and the
  one-cycle-latency memories are all this design's own choices.
- **Not built.** No softmax probabilities are produced.

## Files

- `rtl/e2hrl_pkg.sv`: types, layer descriptors, layouts, fixed-point functions.
- `rtl/e2hrl_top.sv`: top level.
- `rtl/top_ctrl.sv`: layer sequencing and the K counter.
- `rtl/conv_addr_gen.sv`, `rtl/fc_addr_gen.sv`, `rtl/lstm_addr_gen.sv`: address
  generators.
- `rtl/pe.sv`, `rtl/pe_array.sv`: processing elements.
- `rtl/weight_mem.sv`, `rtl/feature_mem.sv`, `rtl/vector_mem.sv`: memories.
- `rtl/lstm_block.sv`, `rtl/lstm_mac.sv`, `rtl/hard_act.sv`: LSTM datapath.
- `rtl/action_select.sv`: action outputs and argmax.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/e2hrl_tb_core.sv`: the end-to-end stimulus and a bit-exact reference model.
  It is used by two testbenches:
  - `tb/tb_e2hrl_top.sv`, a reduced network: 8x6x3 image, 8 channels, 4 PEs;
  - `tb/tb_e2hrl_full.sv`, the default sizes, with no parameter overrides.

  - `tb/tb_e2hrl_pe_sweep.sv`, the default network on 1 and 2 PEs side by side.

  Each runs an FC-HRL episode with K = 3 and then an LSTM-HRL episode with
  K = 2. Every frame's logits, action, branch decision and cycle count are
  checked. The testbench also counts that each mechanism occurs at least once:
  padding, ReLU clipping, branch run and skip, hard-sigmoid saturation and
  linear range, and hard-tanh saturation.

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`, and each
has a watchdog.

To simulate with Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/e2hrl_pkg.sv $(ls rtl/*.sv | grep -v pkg) tb/e2hrl_tb_core.sv \
        tb/tb_e2hrl_full.sv --top-module tb_e2hrl_full -o sim && ./obj_dir/sim

Replace the testbench file and top module name to run any other testbench. For a
single module, list only the package, that module's files and its testbench.
