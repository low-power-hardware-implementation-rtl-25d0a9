# A row-stationary AlexNet accelerator in SystemVerilog

This is an inference accelerator for AlexNet, the five-CONV, three-FC image
classifier. It aims at low power on an FPGA. One small matrix of 12 × 14
processing elements (PEs) computes every convolutional and fully connected
layer. Data movement is kept low with a *row-stationary* dataflow:

- a filter row stays in a PE's register file while input pixels stream past;
- partial sums are added vertically through the matrix instead of being
  written to memory.

Around the matrix sit:

- four global buffers: a filter buffer, a partial-sum (PSUM) buffer and two
  *swapping buffers*, which take turns holding one layer's input and the
  next layer's output;
- a max-pooling unit;
- a local response normalisation (LRN) pipeline built on a 16-stage divider;
- a class-estimation (arg-max) unit.

A host plays the part of the off-chip memory. It loads the image, weights and
biases into the buffers, issues one command per pass, and reads results back.

The RTL follows the original design for the block structure, the PE matrix
shape, the buffer sizes, the layer-1 strip processing with partial pooling,
the LRN datapath and the divider algorithm. Where the original is silent
(bit-level interfaces, handshakes, control schedules), the choices are this
implementation's. They are listed under [Departures and own choices](#departures-and-own-choices).

## Number formats

| quantity | width | fraction bits | where |
|---|---|---|---|
| pixel (feature-map value) | 16 | 5 | swapping buffers, ifmap register files |
| weight, bias | 16 | 11 | filter buffer, filter register files |
| partial sum | 32 | 16 | PE accumulators, PSUM buffer |
| LRN denominator / quotient | 32 | 16 | `lrn_unit`, `pipe_divider` |

- **Product:** pixel × weight gives a 32-bit value with 16 fraction bits.
  Partial sums therefore need no alignment.
- **Bias:** the bias is in weight format, so it is shifted left by 5 before
  it is added.
- **Back to a pixel:** a partial sum becomes a pixel again when it leaves the
  PSUM side, either at pooling or at the FC output. The conversion is an
  arithmetic shift right by 11 with saturation (`cnn_pkg::requant`).

## The PE and the PE matrix (`pe`, `pe_array`)

### The PE

Each PE has:

- a 256-word filter register file and a 256-word ifmap register file;
- a multiplier;
- an accumulator.

A MAC step names one word in each register file.

- Cycle *t*: both files are read.
- Cycle *t+1*: the product is added to the accumulator. A step flagged
  `first` restarts the accumulator instead.
- Cycle *t+2*: the result is visible.

Each PE adds its accumulator to the partial sum coming from the PE above, so
a column's sum appears at the bottom in the same cycle. An unused PE stands
for a clock-gated one: its `active` input is low, it does not accumulate, and
it adds nothing.

### Mapping a CONV layer

The matrix is configured per pass by `array_cfg_t`:

- **Rows:** a filter of size K × K occupies K PE rows, one filter row each.
  When K is small, `ngrp` groups of K rows are stacked, each group working on
  different input depths. For example K = 3 gives 4 groups in 12 rows, and
  K = 5 gives 2 groups.
- **Columns:** PE column *j* computes output row *j* of the pass. Up to 14
  output rows are computed at once.
- **Diagonal input placement:** padded input row *r* of depth group *g*
  belongs to PE (*i*, *j*) when *i* = *g*·K + (*r* − S·*j*) and
  0 ≤ *r* − S·*j* < K, where S is the vertical stride. With this rule:
  - column *j* sees exactly input rows S·*j* … S·*j*+K−1;
  - an input row is shared diagonally between columns.
- **Filter rows:** each filter row is shared along a PE row.

### Broadcast writes

Every register-file write goes out on one broadcast bus (`rf_wr_t`). The bus
carries a tag: diagonal, PE row, or single PE. Each PE decides from the tag
and its own coordinates whether the write is its own. An input row is
therefore sent once, however many PEs keep it.

### Register-file layout

Inside a PE:

- depth *ds* of its group occupies ifmap words *ds*·Wp …, where Wp is the
  padded row length;
- filter *i* of the current batch, depth *ds*, column *c* sits at filter word
  (*i*·nd + *ds*)·K + *c*.

So one output pixel *x* of one filter is nd·K MAC steps: weight
(*i*·nd+*ds*)·K+*c* against pixel *ds*·Wp + S·*x* + *c*. These steps run in
lock step over the whole matrix, and the result is the sum over K rows ×
ngrp·nd depths for every active column at once.

### FC layers

In an FC pass every PE holds one chunk (`fc_chunk` words) of the input
vector, together with the same chunk of one neuron's weights. A neuron spans
`fc_rows` × `fc_cols` PEs. Several neurons sit side by side across the
columns. For AlexNet FC6 this is 36 PEs of 256 words each; FC7 and FC8 use
24 PEs of 171 words each. After one MAC run the neuron's column sums are
added, the bias is added, ReLU is applied, and the result is converted to a
pixel and written to a swapping buffer.

## The control unit (`layer_ctrl`)

`layer_ctrl` runs one CONV or FC pass from a `layer_cfg_t`.

### Sequence of a CONV pass

1. **Load input.** The needed input rows of all the pass's depths are
   streamed from the source buffer into the ifmap register files, and
   padding zeros are inserted. This step is skipped when the register files
   already hold that input.
2. **For each batch of `nf_rf` filters:**
   - **Load filters.** Their rows are copied from the weight buffer into the
     filter register files.
   - **For each filter of the batch and each output pixel:**
     - broadcast nd·K MAC steps;
     - wait two cycles;
     - drain the `ncol` column sums into the PSUM buffer at one word per
       cycle.

### PSUM buffer writes

Each drain write carries a mode:

- **first** depth pass: store;
- **later** depth passes: accumulate;
- **last** pass: accumulate, add the bias and apply ReLU.

The PSUM buffer (`psum_buffer`) does the read-add-write itself. It forwards
results so that back-to-back accumulations of the same word stay correct.
Partial-sum rows of a map lie `out_w` words apart, and each map has `psum_h`
rows.

### Addresses

| data | address |
|---|---|
| input channel *c*, row *y*, column *x* | `in_base + (c*in_h + y)*in_w + x` |
| weight of filter *f*, channel *c*, row *kr*, column *j* | `w_base + ((f*flt_c + c)*K + kr)*K + j` |
| bias of filter *f* | `bias_base + f` |

### Building a whole layer

A whole layer is a list of passes:

- input depths are split over **depth passes** that accumulate in the PSUM
  buffer;
- output rows are split over **column passes** of at most 14 rows
  (`out_row0`, `psum_row0`);
- filters are split into batches that fit the filter buffer.

The command list is computed offline. The end-to-end testbenches show how
such a list is built.

## Layer 1: strips and partial pooling

Layer 1 is the hardest case. Its 227 × 227 × 3 image (154,587 words) does not
fit a swapping buffer (69,984 words). It is therefore processed in four
horizontal strips:

| strip | input rows | output rows |
|---|---|---|
| 0 | 0–62 (63 rows) | 0–13 |
| 1 | 56–118 (63 rows) | 14–27 |
| 2 | 112–174 (63 rows) | 28–41 |
| 3 | 168–226 (59 rows) | 42–54 (13 rows) |

### Computing a strip

For each strip:

- the 96 filters run in six batches of 16;
- each batch needs 5,824 filter words;
- each batch is three depth passes, one per colour channel, with K = 11,
  S = 4;
- the 16 maps × 14 rows × 55 columns fill the PSUM buffer exactly
  (12,320 words);
- a POOL command (3 × 3 window, stride 2) then moves the batch into the
  27 × 27 × 96 pooled output, which fills a swapping buffer exactly.

### Partial pooling

Pooling windows can straddle two strips. Pooled row 6 needs conv rows 12–14,
but a strip holds only rows 0–13. `maxpool_unit` handles this with a dynamic
window, using `row0`, the global row number of PSUM row 0:

- **First strip:** it pools the rows present (a 2 × 3 window) and writes that
  maximum into the output location.
- **Next strip:** it pools the rest of the window (1 × 3), reads the stored
  value back, and writes the larger of the two.

This happens for pooled rows 6, 13 and 20. That is 3 × 27 × 96 = 7,776
windows pooled partially and merged, counted by `pool_partial` and
`pool_merged`.

### Copy mode

With a 1 × 1 window and stride 1, the pooling unit copies PSUM maps to a
swapping buffer as pixels. Layers 3 and 4, which have no pooling, use this
mode.

## LRN and the divider (`lrn_unit`, `lrn_engine`, `pipe_divider`)

### The normalisation

LRN divides each pixel by a function of the squares of the pixels at the
same position in the five neighbouring maps:

    b = a / (k + α · Σ a_j²)      α = 2·10⁻⁵, k = 1, j = i−2 … i+2

### The pipeline (`lrn_unit`)

`lrn_unit` is the original schematic turned into an 18-cycle pipeline:

- **cycle 1:** input registers for the centre pixel and its four neighbours;
- **cycle 2:** squares, sum, × α and + k, giving a registered Q16.16
  denominator;
- **cycles 3–18:** a 16-stage pipelined divider.

One pixel enters per cycle. The result is saturated back to a 16-bit pixel.

### Streaming a volume (`lrn_engine`)

`lrn_engine` streams a volume through the unit. It reads map-major data from
one swapping buffer and writes it to the other. For each position it:

1. reads the depths one per cycle;
2. shifts them through a five-entry window, with zeros beyond the first and
   last map;
3. writes results as they leave the pipeline.

### The divider (`pipe_divider`)

The divider uses restoring shift-and-subtract division on 32-bit Q16.16
operands. The dividend, extended by 16 zero fraction bits, is shifted into a
partial remainder one bit at a time. Whenever the remainder is at least the
divisor, the divisor is subtracted and the quotient bit is 1. That makes 48
quotient bits, spread as 3 per stage over 16 pipeline stages:

- one division enters per cycle;
- each result leaves 16 cycles after its operands.

1000/21 gives 47.6190338… (3,120,761 / 2¹⁶), and 7/4 gives 1.75. A quotient
that overflows, or a division by zero, saturates to all ones. A tag travels
with each division, so the LRN pipeline can carry the centre pixel's sign
and position along.

## The top and its command interface (`cnn_accel_top`)

The host sends one `cmd_t` per pass, with `cmd_valid` while `cmd_ready`
is high. `done` pulses when the pass has finished.

| op | engine | does |
|---|---|---|
| `OP_CONV` | `layer_ctrl` | part of a CONV layer into the PSUM buffer |
| `OP_FC` | `layer_ctrl` | a batch of FC neurons into a swapping buffer |
| `OP_POOL` | `maxpool_unit` | PSUM buffer → swapping buffer (3 × 3 / 2 pooling or copy) |
| `OP_LRN` | `lrn_engine` | swapping buffer → the other swapping buffer |
| `OP_EST` | `estimation_unit` | arg-max over the class scores → `est_cls`, `est_score` |

### Host ports

Two host ports move data:

- `ld_*` writes any global buffer except the PSUM buffer;
- `hr_*` reads one, with data one cycle after the address.

Use them only while `cmd_ready` is high.

### Buffer ports and statistics

Each buffer has one read port and one write port. Only the active engine
drives them.

`events` gives one-cycle pulses for each datapath mechanism a host may want
to count:

- PSUM store, accumulate and final writes;
- padding zeros;
- filter register-file loads;
- MAC steps with part of the matrix unused (gated);
- copy-mode writes;
- LRN writes;
- FC writes;
- estimation done.

### Parameters and configuration

Buffer sizes are parameters of the top, with these defaults:

| buffer | words |
|---|---|
| filter | 36,880 (3 × 3 × 256 × 16 + 16, the layer-3 batch) |
| PSUM | 12,320 |
| swapping buffers, each | 69,984 |

All other sizes come from `cnn_pkg`:

- PE matrix 12 × 14;
- register files 256 words;
- the data widths above.

Configuration field widths limit a pass. For example `nf` and `nf_rf` are at
most 31, `ngrp` at most 7, and `in_h`, `in_w` and `out_w` at most 255.

## Departures and own choices

- **LRN β:** the exponent β is taken as 1, because the schematic has no power
  block. The textbook AlexNet uses β = 0.75.
- **Clock gating:** unused PEs are disabled by an enable, not a gated clock.
- **External memory:** the SD card / DRAM and the transfer engine are not
  modelled. The host load and read ports stand in for them, and the host also
  sequences the layers. In the original, a control unit requests filter
  batches.
- **Filter batches in the register files:** with the register-file layout
  above, a register-file load holds at most ⌊256 / (nd·K)⌋ filters:
  - 16 in layer 1;
  - 6 in layer 2 with nd = 8;
  - 5 in layer 3 with nd = 16.

  So a filter-buffer batch (15 filters in layer 2, 16 in layers 3–5) takes
  several register-file loads.
- **MAC schedule:** output pixels are computed one at a time. Column sums
  are drained serially, one word per cycle. These cycle counts are this
  implementation's, not the original's.
- **Timing:** the original reports layer latencies in milliseconds without a
  clock frequency, so there is no cycle count to compare with. This
  implementation takes 4,185,220 cycles for layer 1 + pool 1, host loads
  included.
- **PSUM format:** partial sums are kept at 32 bits with 16 fraction bits
  until pooling. ReLU is applied in the PSUM buffer on the final write, and
  pixels are produced by shift-and-saturate.
- **Swapping buffer 2** is built at 69,984 words, the same as swapping buffer
  1, because the buffers swap roles between layers.
- **Buffer sizes:** buffer depths follow the per-layer location counts. The
  original's memory summary gives 64 KB for the filter buffer and 32 KB for
  the PSUM buffer. At 16-bit weights and 32-bit partial sums, the location
  counts need 72 KB and 48 KB.
- **Pooling destination:** the original places the pooled layer-1 output
  once in swapping buffer 2 and once in swapping buffer 1. The destination
  is therefore a field of the POOL command.
- **Power, FPGA resources and clock rates** of the original are outside this
  RTL.
- **Layer-3 filter batches:** the original sizes the filter buffer for 16
  layer-3 filters (3 × 3 × 256 × 16 + 16 = 36,880 words) but also mentions
  batches of 8. This implementation uses 16.
- **Whole-network runs:** layer 4 and FC7 are supported by the command set,
  but they are not simulated at full size. Layer 4 has the shape of layer 5
  with more filters, and FC7 has FC8's mapping with more neurons. FC6 is
  simulated for 64 of its 4096 neurons: 1.22 M cycles, most of it host
  weight loads. The full layer would need about 38 M host-load cycles for
  its weights.

  The following have been simulated at full size:

  | workload | cycles, host loads included |
  |---|---|
  | layer 1 + pool 1 | 4.19 M |
  | layer 2 + pool 2 | 4.93 M |
  | layer 3 | 5.00 M |
  | layer 5 + pool 5 | 2.50 M |
  | FC8 + estimation | 8.28 M, about half of it host weight loads |
  | LRN1, LRN2 | 71,465 and 43,625 for the command alone (*nch* + 2 cycles per pixel position) |

## Simulating

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M` and stops itself on a watchdog. With
Verilator 5:

    verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
        rtl/cnn_pkg.sv tb/tb_cnn_full.sv --top-module tb_cnn_full -o sim
    ./obj_dir/sim

Replace `tb_cnn_full` with any testbench below.

| testbench | what it checks |
|---|---|
| `tb_cnn_full` | **All of AlexNet layer 1 + pool 1 at default sizes:** 4 strips × 6 filter batches × 3 depth passes, then partial pooling. Checks all 27 × 27 × 96 outputs against a reference and the partial/merged window counts. Takes about 20 s. |
| `tb_cnn_conv2` | **All of AlexNet layer 2 + pool 2 at default sizes:** 27 × 27 × 96 input with padding 2, 256 filters of 5 × 5 × 48 in two groups, batches of 15 (the last of 8), two column passes × three depth passes, then 3 × 3 / 2 pooling to 13 × 13 × 256. Checks every output. Takes about 25 s. |
| `tb_cnn_conv3` | **All of AlexNet layer 3 at default sizes:** 13 × 13 × 256 input with padding 1, 384 filters of 3 × 3 × 256 in 24 batches of 16, four depth passes of 64 depths each, and copy mode into 13 × 13 × 384. Checks every output. Takes about 25 s. |
| `tb_cnn_conv5` | **All of AlexNet layer 5 + pool 5 at default sizes:** 13 × 13 × 384 input with padding 1, 256 filters of 3 × 3 × 192 in two groups and batches of 16, three depth passes, then 3 × 3 / 2 pooling to the 6 × 6 × 256 FC input. Checks every output. Layer 4 has the same shape with 384 filters. |
| `tb_cnn_fc6` | **AlexNet FC6 mapping at default sizes, for 64 of the 4096 neurons:** a 9216-word input in 256-word chunks over 36 PEs per neuron, 2 neurons per pass, bias and ReLU. Checks every output and that ReLU leaves enough of them positive. |
| `tb_cnn_fc8` | **AlexNet FC8 + class estimation at default sizes:** 4096 → 1000 with 171-word chunks over 24 PEs per neuron and 3 neurons per pass. The input stays in the register files across all 334 passes, and each pass's weights are loaded by the host. Checks all 1000 scores and the estimated class. Takes about 35 s. |
| `tb_cnn_lrn` | **Both AlexNet LRN layers at default sizes** through the command interface: 27 × 27 × 96 and 13 × 13 × 256. Checks every pixel within one LSB of a real-number reference. |
| `tb_cnn_accel_top` | **End to end at reduced size:** CONV (2 strips × 2 depth passes) → POOL with partial windows → LRN → padded CONV → copy → FC → estimation. Counts every event kind and requires each to occur. |
| `tb_layer_ctrl` | Control unit with the real PE matrix and behavioural memories: single pass, strips × depth passes, and FC with and without ReLU. |
| `tb_pe_array` | Diagonal placement for K3/S1 with 4 groups, K5/S2 with 2 groups, and K11/S4; partial column use; FC point writes. |
| `tb_pe` | MAC runs against a reference, the t+2 latency, and an inactive PE. |
| `tb_psum_buffer` | Random store/accumulate/ReLU traffic with back-to-back hazards. |
| `tb_global_buffer` | Read/write, read-before-write and out-of-range accesses. |
| `tb_maxpool_unit` | 3 × 3 / 2 pooling of maps split over two parts, partial and merge counts, copy mode. |
| `tb_lrn_unit` | Against a real-number reference (±1 LSB), with the 18-cycle latency. |
| `tb_lrn_engine` | A 7-map volume against the same reference. |
| `tb_pipe_divider` | Worked examples and random operands, the 16-cycle latency, in-order tags. |
| `tb_estimation_unit` | Arg-max over 1000 scores, ties resolved to the lower index. |

Test data comes from `$urandom` or from a fixed hash inside the testbench,
so no data files are needed. The testbenches need only two-state
simulation: every register that is read is reset or written first.
