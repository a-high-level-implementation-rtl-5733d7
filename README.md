# Parametrised feed-forward neural network for small FPGAs

This is a feed-forward (non-recurrent) neural network for inference, written so
that one configuration array sets its whole shape. The array is a list of
layers. Each entry gives the layer type (fully-connected, convolutional or
max-pooling), the number of neurons, the number of parallel MAC units, the
receptive field, the stride, the zero padding and the activation function.
At elaboration time a generate loop builds one hardware layer per entry and
chains them. Functions in the package work out every memory size and address
width from the array.

The design targets small, low-power parts such as edge-sensor nodes, so all
storage is on-chip block RAM. Each memory has one write port and one read
port. Trading MAC units against cycles is the main design knob: more MACs per
layer evaluate more neurons at once, at the cost of one multiplier and one
weight memory each.

The default top-level configuration is a small handwritten-digit CNN:

| Layer | Type | Configuration | Output |
|---|---|---|---|
| input | | 20x20x1 | |
| 0 | convolution | 5x5, stride 1, 10 neurons on 5 MACs, ReLU | 16x16x10 |
| 1 | max-pooling | 2x2, stride 2 | 8x8x10 |
| 2 | fully-connected | 10 neurons on 5 MACs, linear | 10 |

## Configuration array

`rtl/ann_pkg.sv` defines the following types:

- `layer_cfg_t`, a packed struct that describes one layer;
- `net_cfg_t`, an array of `MAX_LAYERS` (8) such structs;
- `dims_t`, a volume given as height, width and depth.

`ann_top` takes `NET` (the array), `NL` (the number of layers in use) and
`DIN0` (the input volume). A field that does not apply to a layer type is
ignored:

- a pooling layer ignores neurons, MACs and activation;
- a fully-connected layer ignores the geometry.

Any sequence of layer types is allowed. A longer network needs a larger
`MAX_LAYERS` in the package.

Helper functions:

- `mk_layer(kind, S, M, F, stride, pad, act)` builds a square-kernel entry.
- `cnn_setup_a()` gives the default network.
- `cnn_setup_b()` gives conv 5x5, conv 3x3, pool 2x2/2, then FC 10.
- `fcnn(nl, m)` gives the EMG network: 16 inputs, `nl-1` layers of 32 neurons
  on `m` MACs, then a 3-neuron linear output layer on one MAC.

The output volume of a layer follows the usual rule:

    Hout = floor((H - Fh + Pt + Pb) / Stv) + 1
    Wout = floor((W - Fw + Pl + Pr) / Sth) + 1
    Dout = S   (FC, convolution)      Dout = D   (max-pooling)

A fully-connected layer is handled as a convolution whose receptive field is
the whole input volume (Fh = H, Fw = W, no padding). So Hout = Wout = 1, and
the same datapath serves both layer types.

Example: a network with a 3x3 padded convolution and a 4-neuron FC layer.

```systemverilog
localparam net_cfg_t NET = '{0: mk_layer(L_CONV, 8, 4, 3, 1, 1, ACT_RELU),
                             1: mk_layer(L_POOL, 0, 1, 2, 2, 0, ACT_LINEAR),
                             2: mk_layer(L_FC,   4, 2, 1, 1, 0, ACT_LINEAR),
                             default: '0};
ann_top #(.NET(NET), .NL(3), .DIN0('{h: 16'd12, w: 16'd12, d: 16'd1})) u_net (...);
```

## Numbers

- Data and weights are signed 9-bit values with 5 fractional bits, so the
  range is -8.0 to +7.97.
- Products are summed exactly in a 32-bit accumulator, with 10 fractional
  bits.
- The bias is stored like any weight and multiplied by the constant input
  1.0 (the word 32), so it enters the sum already in product format.
- The activation unit then does three things in order:
  1. it shifts the sum right by 5, an arithmetic shift that rounds toward
     minus infinity;
  2. it applies ReLU, or nothing for a linear layer;
  3. it saturates the result to [-256, 255].
- Max-pooling compares 9-bit values directly.
- The widths and fractional bits are constants in `ann_pkg` (`DATA_W`,
  `DATA_FB`, `WGT_W`, `WGT_FB`, `ACC_W`), and the RTL derives everything
  from them. The testbench reference model assumes 9 bits with 5 fractional
  bits, so it must be changed along with them.

## Layers and their three stages

Each layer has an input memory and an output memory. Data moves through the
network by copying one layer's output memory into the next layer's input
memory. Each layer runs three state machines at the same time. Two set/reset
flags couple them:

| Stage | Module | Work | Flag |
|---|---|---|---|
| 1. load | `layer_loader` | Copies the previous output memory, one word per cycle, into the input memory. The first layer takes a valid/ready stream instead. | Sets `in_full` after the last word. Pulses `src_release` to free the previous layer's output memory. |
| 2. elaborate | inside `mac_layer` / `maxpool_layer` | Walks the receptive field and feeds the MACs (or the max unit). Starts only when `in_full` = 1 and `out_full` = 0. | Pulses `in_release` after its last read, then waits until stage 3 raises `out_full`. |
| 3. save | inside `mac_layer` / `maxpool_layer` | Takes the MAC results one per cycle through the MAC-address multiplexer and the activation unit into the output memory. | Sets `out_full` after the last output word. The next layer's loader clears it with `out_release`. |

A high flag means the memory holds valid data that is in use. A low flag
means the memory may be overwritten. With these two flags the layers form a
pipeline:

- layer *k* can elaborate input *n* while layer *k+1* elaborates input *n-1*;
- layer *k*'s loader already takes input *n+1*.

A full output memory stops its producer. That producer then keeps its input
memory full, which stops the layer before it, and so on back to the input
port. No data is lost: back-pressure travels backwards one layer at a time.

### FC / convolutional layer (`mac_layer`)

Structure:

- one input memory;
- `M` MAC units, each with its own weight memory;
- a multiplexer that steps through the MAC results;
- the activation unit;
- one output memory.

The input memory has a single read port, so each cycle one input value is
read and sent to all `M` MACs at once. Each MAC multiplies it by its own
neuron's weight.

Elaboration order:

- The `S` neurons are split into `G = ceil(S/M)` groups. MAC `i` of group `g`
  computes neuron `g*M + i`. The last group may be partly unused.
- For each group (outer loop), the receptive field visits every output
  position row by row (inner loop). A set of weights is used for the whole
  image before the next group's weights are read.
- One iteration means one group at one position. It takes `K+1` cycles, with
  `K = Fh*Fw*D`:
  - cycle 0 feeds the bias;
  - the next `K` cycles feed the receptive field in (fy, fx, d) order.
- A term that falls into the zero padding feeds 0 without reading the memory.

Saving:

- When an iteration ends, each MAC copies its sum into a result register and
  starts the next sum at once.
- Stage 3 then writes the `M` results, one per cycle, to output address
  `(oy*Wout + ox)*S + g*M + i`. Only the neurons of the group that exist are
  written.

Stall rule:

- An iteration that leaves `n` results to save keeps stage 3 busy for about
  `n + 2` cycles after its last term: one memory-read cycle, one MAC-result
  cycle, then `n` save cycles.
- The next iteration reaches its own last term `K+1` cycles later. If stage 3
  is still busy then, stage 2 holds that last term (the `stall` signal) until
  the result registers are free. The hold lasts `max(0, n + 2 - K)` cycles.
- The stall happens when a group has about as many neurons as the receptive
  field has terms (`n >= K - 1`). Examples are FC layers with few inputs and
  many MACs, or a 16-input layer on 16 MACs. It never happens in the default
  CNN.

Memory sizes:

| Memory | Words |
|---|---|
| input | `H*W*D` |
| output | `Hout*Wout*S` |
| weights of MAC `i` | `G*(K+1)`; neuron `g*M+i` starts at word `g*(K+1)`, bias first |

### Max-pooling layer (`maxpool_layer`)

This layer has the same input/output structure and flags. One compare-and-hold
unit (`max_unit`) replaces the MACs, weights and activation. For each output
position and each channel, it reads the `Fh*Fw` window values. Padded
positions count as 0. The maximum goes straight into the output memory. One
output takes `Fh*Fw` cycles.

### Memory layout

Every volume is stored channel-minor: element (h, w, d) sits at address
`(h*W + w)*D + d`. The network input is streamed in the same order. A
fully-connected layer's output (1x1xS) is just its neuron index, so any layer
type can follow any other.

## Weight loading (`weight_loader`)

After reset, the network takes one stream of 9-bit weight words on
`w_valid/w_data/w_ready`, one word per cycle. The order is:

- by layer, skipping pooling layers;
- within a layer, neuron by neuron;
- within a neuron, the bias first, then the weights in (fy, fx, d) order.

For FC layers that order is simply the input order. Word `k` of neuron `s`
goes to MAC `s mod M` at address `(s div M)*(K+1) + k`. When the last word is
taken, `loaded` rises and `w_ready` falls. The input port stays closed
(`in_ready` = 0) until then. Weights cannot be reloaded without a reset.

## Top level (`ann_top`)

`ann_top` holds the weight loader and a generate loop over the layers:

- layer 0's loader takes the input stream;
- every other loader reads the previous layer's output memory.

The last output memory is the result interface, with these signals:

| Signal | Meaning |
|---|---|
| `out_full` | a result is ready |
| `out_rd_en`, `out_rd_addr` | read request; data comes one cycle later on `out_rd_data` |
| `out_release` | one-cycle pulse that hands the memory back |

Address width and sizes follow from `NET`.

## Timing

Cycle counts below assume an idle network. They were checked cycle-exactly
in simulation for every network listed in this section.

| Step | Cycles |
|---|---|
| input stream | one word per cycle |
| copy between layers | `N + 2` |
| FC / conv layer | `1 + G*P*(K+1) + 2 + (S - (G-1)*M)`, plus the stall cycles above for every iteration except the last |
| max-pooling layer | `1 + P*D*Fh*Fw + 2` |

`P = Hout*Wout` is the number of positions.

An inference is not pipelined inside a layer. A layer's output memory must be
copied to the next layer before the layer can start its next input. So the
time between results is set by the slowest layer: its elaboration, plus
copying its result out.

Measured cycle counts, at one result per run:

| Network | First result (cycles from first input word) | Between results |
|---|---|---|
| CNN setup A (default) | 20,776 | 15,883 |
| CNN setup B | 57,368 | 38,236 |
| FCNN 2 layers, 8 MACs | 231 | 135 |
| FCNN 3 layers, 8 MACs | 408 | 178 |
| FCNN 4 layers, 8 MACs | 585 | 178 |

The same networks with a different number of MACs per layer (the FCNN output
layer always has one MAC):

| Network | MACs | First result | Between results |
|---|---|---|---|
| FCNN 3 layers | 1 | 1,794 | 1,095 |
| FCNN 3 layers | 2 | 996 | 568 |
| FCNN 3 layers | 4 | 600 | 306 |
| FCNN 3 layers | 16 | 326 (2 stall cycles) | 135 |
| FCNN 3 layers | 32 | 306 | 135 |
| CNN setup A | 1 | 79,144 | 69,127 |
| CNN setup A | 2 | 42,661 | 35,848 |
| CNN setup A | 10 | 13,489 | 9,232 |

From 16 MACs up, the FCNN's interval is set by the output layer. It computes
its 3 neurons one after another on one MAC (3 x 33 cycles), plus the copy
into that layer.

Resources of the default CNN:

- 16 memory instances (2 + MACs per layer) and 10 multipliers;
- 13,480 words of 9 bits, 121,320 bits in total;
- on a 30-block M9K device (276,480 bits) that is 44% of the memory bits;
- the 2,560-word and 1,282-word memories need more than one 1024x9 block
  each.

## Simulation

All files are plain SystemVerilog. Every testbench is self-checking and ends
with a `TB_RESULT checks=... failures=...` line. Compile the packages first
and let verilator find the modules by file name:

```sh
verilator --binary --timing -j 0 -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/ann_pkg.sv tb/ann_model_pkg.sv tb/tb_ann_full.sv --top-module tb_ann_full
./obj_dir/Vtb_ann_full
```

Replace `tb_ann_full` with any testbench below.

| Testbench | What it checks |
|---|---|
| `tb_layer_ram`, `tb_mac_unit`, `tb_activation_unit`, `tb_max_unit` | The primitives, each against its own arithmetic. |
| `tb_layer_loader` | Both source modes, the flag set and release, and back-pressure on the stream. |
| `tb_mac_layer` | A padded, stride-2 convolution whose last neuron group is partly used, with exact latency and a blocked second input. Also an FC layer that must stall. |
| `tb_maxpool_layer` | Pooling with padding, plus its latency. |
| `tb_weight_loader` | Word-to-MAC/address mapping for a mixed network. |
| `tb_ann_top` | A reduced four-layer network (padded conv, pool, two FC) run four times back to back, with results held for a while so back-pressure travels through the chain. It counts weight loading, padding, group changes, stalls, back-pressure and overlapped layers, and fails if any of them never happened. |
| `tb_ann_full` | The default network exactly as shipped: two inferences and the latency. Takes the longest. |
| `tb_workloads` | FCNN with 2, 3 and 4 layers, and CNN setup B, against the reference model and their computed latency. |
| `tb_mac_sweep` | The FCNN and setup A with 1 to 32 MACs per layer: outputs and latency. |

Reference results come from `tb/ann_model_pkg.sv`, an integer model of the
layers that shares no code with the RTL. It is also where the latency formula
lives.

## Departures and choices

The following are this design's own choices:

- The kernel of CNN setup A (5x5, stride 1, no padding) and its pooling (2x2,
  stride 2) are choices. With them the default network uses 16 memory
  instances and 10 multipliers. Setup B's 3x3 second kernel is also a choice.
- The 3-neuron output layer of the FCNN networks uses one MAC. With 8 MACs in
  the other layers this gives 9 and 17 multipliers and 13 and 23 memory
  instances for two and three layers. The alternative, 8 MACs on a 3-neuron
  layer, would leave five unused.
- The 32-bit accumulator and the floor-then-saturate output rounding are
  choices. The exact rounding of the reference implementation is unknown, so
  results can differ from it by one least significant bit.
- ReLU and linear are the only activations.
- The design's own conventions:
  - storage order;
  - weight stream order;
  - per-MAC weight layout;
  - the valid/ready input stream;
  - the one-cycle release pulses;
  - the `N+2`-cycle copy.
- Speed of the FCNN: the three-layer FCNN with 8 MACs produces a result every
  178 cycles, with 408 cycles of latency. That is slower than the roughly 100
  cycles per inference reported for the reference implementation.
  - With one read port, a 32-input, 32-neuron layer on 8 MACs needs 4 groups
    x 33 cycles = 132 cycles.
  - A 34-cycle copy of its input comes on top, so 8 MACs cannot reach 100
    cycles with this structure.
  - With two layers the 135-cycle interval is set by the output layer: 3 x 33
    cycles on its single MAC, plus its copy.
  - Giving that layer 3 MACs would cost two multipliers and two memories.
    Overlapping the copy with elaboration would change the stage protocol.
  - It is not known how the reference figure was counted.
- Memory bits: the FCNN networks use fewer memory bits here (2% and 6%) than
  the reference figures (4% and 11%). The default CNN is close (44% against
  47%).
- Training, and the microcontroller used for comparison, are outside the
  hardware. Weights enter through the weight stream.
