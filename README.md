# Tiny-YOLO-v2 convolution accelerator in SystemVerilog

This is a register-transfer model of a hardware accelerator for the nine
convolution layers of the Tiny-YOLO-v2 object detector (416 x 416 x 3 picture
in, 125 x 13 x 13 detection tensor out). Its central idea is to build **one
convolution block for a 13 x 13 output tile** and reuse it for everything:
13 x 13 is the map size of the last four layers, and every larger map
(26, 52, 104, 208, 416) is an exact multiple of it. A 26 x 26 map is cut into
4 tiles ("divisions"), a 52 x 52 map into 16, up to 1024 divisions for the
416 x 416 picture. Depth is handled four channels at a time, and the partial
results of those four-channel groups are parked in a bank of "internal"
memories and added up at the end.

The network, as built by the default parameters:

| Layer | Input map | In depth | Filters | Filter | Divisions | 4-depth groups | Internal memories x passes | Pool after |
|------:|----------:|---------:|--------:|-------:|----------:|---------------:|---------------------------:|:----------:|
| 1 | 416 x 416 | 3    | 16   | 3x3 | 1024 | 1   | 1 x 1  | 2x2 |
| 2 | 208 x 208 | 16   | 32   | 3x3 | 256  | 4   | 4 x 1  | 2x2 |
| 3 | 104 x 104 | 32   | 64   | 3x3 | 64   | 8   | 8 x 1  | 2x2 |
| 4 | 52 x 52   | 64   | 128  | 3x3 | 16   | 16  | 16 x 1 | 2x2 |
| 5 | 26 x 26   | 128  | 256  | 3x3 | 4    | 32  | 32 x 1 | 2x2 |
| 6 | 13 x 13   | 256  | 512  | 3x3 | 1    | 64  | 64 x 1 | -   |
| 7 | 13 x 13   | 512  | 1024 | 3x3 | 1    | 128 | 64 x 2 | -   |
| 8 | 13 x 13   | 1024 | 1024 | 3x3 | 1    | 256 | 64 x 4 | -   |
| 9 | 13 x 13   | 1024 | 125  | 1x1 | 1    | 256 | 64 x 4 | -   |

Layers 1-8 use leaky ReLU; layer 9 is linear. All activations and weights are
16-bit fixed point with 8 fraction bits (Q8.8); sums are 32 bits (Q16.16).

## Block structure

```
tiny_yolo_top
 ├─ fmap_mem            picture memory (3 x 416 x 416), 4 read ports
 └─ conv_layer x 9      one instance per layer, sized from the table above
     ├─ filter_buffer x4   weights of the current filter, one per lane
     ├─ input_buffer  x4   padded 15 x 15 window of one depth, one per lane
     ├─ conv_engine        4 lanes, outputs added across lanes
     │   └─ pe_array x4    row-stationary K x 13 PE array per lane
     │       └─ pe         filter RF, input RF, one multiplier, one adder
     ├─ psum_bank          internal memories (<= 64) + adder across them
     ├─ activation         bias, leaky ReLU, Q16.16 -> Q8.8 with saturation
     ├─ fmap_mem           division memory: this filter's full map before pooling
     ├─ maxpool            2x2 maximum (or pass-through)
     └─ fmap_mem           the layer's output memory, read by the next layer
```

Shared types, widths and the per-layer rules (filter size, pooling, leaky)
live in `rtl/tyolo_pkg.sv`.

## The processing element and the row-stationary array

A `pe` holds one filter row (K weights) and a sliding window of the last K
values of one input row. Each accepted input value shifts the window; once the
window is full, the PE spends K cycles multiplying and accumulating tap by tap
and then presents `psum_out = own sum + psum_in` for one cycle. A row of N
values therefore gives N-K+1 outputs, at one output per K+1 cycles, and every
input value is reused by K outputs without being fetched again.

`pe_array` arranges K x 13 PEs in the row-stationary pattern: PE(i,j) keeps
filter row i and is fed padded input row i+j. Filter rows are shared along
array rows, input rows along diagonals, and the partial sums of a column are
chained from PE(K-1,j) up to PE(0,j), which yields output row j. The padded
15 x 15 block is streamed one column per accepted cycle; all PEs run in lock
step, and after the first K columns every further column produces one output
column of the 13 x 13 tile.

`conv_engine` runs four such arrays side by side, one per depth of a
four-depth group, and adds their outputs. One engine run produces the
partial 13 x 13 result of four depths.

## How a layer is scheduled

`conv_layer` contains the controller. For each filter:

1. **Weight load** (`S_WREQ`, `S_WLOAD`): it pulses `wreq_valid` with the
   filter number and takes `C_IN*K*K` weights (depth, row, column order) and
   then one bias word from the off-chip source. Depth `c` goes to filter buffer
   `c mod 4`.
2. **Per division, per four-depth group g**:
   * `S_BUFLD` reads the (13+K-1)^2 window of each lane's depth from the
     previous layer's memory (one value per lane per cycle) into the lane's
     input buffer. Positions outside the map, and lanes past the last depth
     (layer 1 has only three), are written as zero.
   * `S_PELD` writes the K*K weights of each lane into the PE arrays.
   * `S_STREAM` streams the window through the engine and stores the 13 output
     columns in internal memory g of `psum_bank`.
3. **Reduction** (`S_REDUCE`): when the groups of a pass are stored, the adder
   sums the same pixel of all used internal memories, one pixel per cycle.
   If the layer has more than 64 groups (layers 7-9), the memories are reused:
   the first pass's sums go to an accumulator, the next pass adds to it, and so
   on. After the last pass each pixel gets its bias and activation and is
   written into the filter's division memory at its place in the full map.
4. **Pooling** (`S_POOL`): the filter's full map is read back four pixels per
   2x2 window (one pixel for layers without pooling) and the maxima are written
   into the layer's output memory at `(f*HO + y)*HO + x`.

Cycle cost, with the defaults and a weight source that delivers one word per
cycle:

* engine run: (13+K-1)^2+1 buffer load + K*K weight load + (K-1)+13(K+1)+1
  streaming = 290 cycles for 3x3 filters, 198 for 1x1;
* reduction: 169 cycles per division and pass;
* pooling/copy: 4 (or 1) cycles per output pixel;
* weights: about `C_IN*K*K + 3` cycles per filter.

At full size the simulated cycle counts of layers 5, 6 and 9 (10,144,770,
10,857,474 and 6,570,127) equal this formula exactly. One engine run does 169 x 9 x 4 = 6084
multiply-accumulates in 290 cycles (about 21 per cycle); the window load, not
the MAC array, is the dominant cost. Adding it up over the table gives about
201 million cycles for one 416 x 416 picture (layer 8 alone 86 million),
about 2.0 s at 100 MHz.

## Interfaces of the top

| Port | Dir | Meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `img_we`, `img_waddr`, `img_wdata` | in | write the picture, address `(c*416 + y)*416 + x`, Q8.8 |
| `start` | in | run the nine layers |
| `busy`, `layer_busy[8:0]`, `done` | out | status; `done` is a one-cycle pulse |
| `wreq_valid`, `wreq_layer`, `wreq_filter` | out | weight request for one filter |
| `wdat_valid`, `wdat` | in | the requested weights, then the bias, any spacing |
| `res_raddr`, `res_rdata` | in/out | read the 125 x 13 x 13 result, one cycle latency |

Weights and biases are expected to come from external memory; the weight
interface is the only path by which they enter. Batch normalisation is
assumed to be folded into the weights and bias beforehand.

## Where this model departs from, or adds to, the reference design

* **PE count.** The reference block diagram shows a 13 x 13 PE array. Here
  each of the four lanes has K x 13 PEs (39 for 3x3 filters, 156 in all), which
  is the row-stationary mapping of a 13-row tile; how the reference arranges its
  169 PEs is not described.
* **Division borders.** The reference shows each division with a zero-padding
  border on its outer edge only. This model computes an exact "same"
  convolution of the whole map: neighbouring divisions supply each other's
  border pixels and zeros appear only outside the map.
* **Internal memories.** Their number is depth/4, capped at 64 and reused in
  passes, which matches the reference for layers 2, 3, 5, 6, 7 and 8. Its
  diagrams show 3 memories for layer 1 and 8 for layer 4; this model uses 1 and
  16 (the same rule as the other layers).
* **Activation.** Leaky ReLU with slope 13/128 (about 0.1) and a linear last
  layer, bias added at activation time, floor rounding and saturation to 16
  bits. The number format and these details are choices of this model.
* **Pooling placement.** Pooling follows layers 1-5 only, as the layer sizes
  require (416 -> 13 in five halvings); layers 6-8 have none.
* **Scheduling.** The layers run one after another, each started by the
  previous one's `done`, and the window load is not overlapped with
  computation. The reference mentions pipelining without describing it.
* **Memories.** Feature maps are stored as flat arrays, one per layer
  (address `(c*H + y)*W + x`), instead of one memory per 13 x 13 division; the
  content is the same. The reference limits block RAM use per layer; this model
  sizes its memories from the layer shapes, which at full size is far more
  storage (about 3.4 M words of feature maps) than a single FPGA's block RAM.
* Local response normalisation, box decoding and the external DRAM are not
  part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|-----------|----------------|
| `tb_pe` | 1-D convolution with incoming partial sum; one output per K+1 cycles |
| `tb_pe_array` | full 2-D tile against a direct convolution; output spacing |
| `tb_conv_engine` | four lanes summed |
| `tb_input_buffer`, `tb_filter_buffer`, `tb_fmap_mem`, `tb_psum_bank` | storage and the adder across memories |
| `tb_activation` | bias, leaky slope, rounding, saturation against integer arithmetic |
| `tb_maxpool` | maxima of back-to-back and stalled windows |
| `tb_conv_layer` | a small layer with 4 divisions, a partly empty depth group and two passes |
| `tb_layer_full` | layers 5, 6 and 9 at full size (via `tb/layer_harness.sv`), every output and the exact cycle count |
| `tb_tiny_yolo_top` | all nine layers end to end at reduced size, every layer's memory |

The reference values are computed inside the testbenches by a direct software
convolution (`tb/tb_ref_pkg.sv` holds the integer activation model and the
hash-based generators of pictures, weights and biases).

`tb_tiny_yolo_top` uses a 64 x 64 picture, a 2 x 2 tile, narrow layers
(3,4,8,8,8,8,12,12,8,5 channels) and two internal memories; it counts and
requires zero padding, division reuse, an empty lane, multi-pass depth, leaky
negatives, max pooling and the 1x1 layer, and checks 6,992 values.

The whole network at its default size has not been simulated end to end: one
picture takes about 201 million cycles, which Verilator needs well over ten
minutes for (the three full-size layers of `tb_layer_full`, 27.6 million
cycles, take about 2.5 minutes). The largest runs are therefore the complete
nine-layer network at the reduced size above, and layers 5, 6 and 9 (the
pooled 3x3 case, the 64-memory case and the four-pass 1x1 case) at their
full sizes. Layers 7 and 8 share their structure with layers 6 and 9 and
differ only in depth (2 and 4 passes).

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/tyolo_pkg.sv tb/tb_ref_pkg.sv tb/tb_tiny_yolo_top.sv \
  --top-module tb_tiny_yolo_top -o sim
./obj_dir/sim
```

## Changing the design

All sizes are parameters of `tiny_yolo_top`: `TILE` (division size), `IMG`
(picture size, must be `TILE * 32`), `LANES` (depths per engine run),
`INT_MEMS` (internal memories) and `CH` (channel count before and after each
layer). Data and accumulator widths and the fraction bits are in
`tyolo_pkg`. `conv_layer` can be used on its own for a single layer.
