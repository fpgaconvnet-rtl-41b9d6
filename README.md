# Streaming ConvNet building blocks in the style of fpgaConvNet

A ConvNet layer sequence such as *convolution → activation → pooling* can be
built on an FPGA as a chain of hardware blocks that all run at once, each
block firing as soon as its input stream has data. Every layer becomes a
*bank* of identical units, and two knobs trade area for speed: how many units
a bank has (**coarse-grained folding**) and how many multipliers each
dot-product unit has (**fine-grained folding**). This RTL implements that set
of building blocks, as described in the fpgaConvNet paper (Venieris and
Bouganis, FCCM 2016), and wires them into one complete mapping: the paper's
example network.

```
 off-chip      mem_read   sliding     fork     conv_bank    nonlinear   sliding     stream    pool_bank   mem_write   off-chip
 memory  ───▶  _unit  ──▶ window ──▶  1→N ──▶  N units  ──▶ _bank    ──▶ window ──▶ fifo  ──▶ N units ──▶ _unit  ───▶ memory
 (1 port)      W-word     5x5/1       copies   dot product  ReLU        2x2/2 x N   1 row     max         N ports
               beats→words                     (20 filters)                        of windows              words→beats
```

The default configuration (`fpgaconvnet_top` with no parameter overrides)
is that example network, fully unrolled:

| layer | size |
|---|---|
| input | one 42 x 42 map, 16-bit words |
| convolution | 20 filters, 5 x 5, stride 1 → 20 maps of 38 x 38 |
| activation | ReLU on 20 streams |
| pooling | max, 2 x 2, stride 2 → 20 maps of 19 x 19 |

All data are Q8.8 two's-complement fixed point (16 bits, 8 fraction bits).

## How the blocks fit together

Every arc between two blocks is a **stream**: `valid`, `ready` and a data
payload of one word or of a whole window. A transfer happens in a cycle where
both are high; a producer holds `valid` and its data until the transfer. Each
module carries a concurrent assertion for that rule on its outputs. A bank of
N units has N independent streams, passed as unpacked arrays indexed by the
stream number.

Within a stream, words appear in raster order (row by row, left to right).
When one stream carries several maps — which happens when a convolution unit
computes several filters, see *Coarse-grained folding* — the maps are
interleaved **per pixel**, with the map index changing fastest.

| block | module | in → out | cost per transfer |
|---|---|---|---|
| memory read | `mem_read_unit` | W-word beats → 1 word | 1 word / cycle / port |
| sliding window | `sliding_window_block` (N × `sliding_window_unit`) | 1 word → KH·KW-word window | 1 pixel / cycle |
| input splitter | `stream_split` | 1 word → one of IN_PAR streams, in turn | 1 word / cycle |
| fork | `fork_unit` | C words → N copies | 1 / cycle |
| convolution | `conv_bank` (N × `dot_product_unit`) | window → 1 word | FILT · ⌈KK/MACCS⌉ cycles per window |
| activation | `nonlinear_bank` | word → word | 1 / cycle |
| window buffer | `stream_fifo` | window → window | 1 / cycle |
| pooling | `pool_bank` (`max_pool_unit` or `dot_product_unit`) | window → word | P² cycles (max), ⌈P²/MACCS⌉ (average) |
| memory write | `mem_write_unit` | 1 word → W-word beats | 1 word / cycle / port |

Shared types (`word_t`, the activation and pooling enums) and the
saturation helper are in `fcn_pkg`.

### Sliding window

Each unit keeps KH−1 line buffers of one image row (IMG_W · CH words) and a
KH × KW window register per interleaved map. For every accepted pixel, the
column formed by the buffered words above it plus the new word is shifted
into the window, and the line buffers shift up by one row at that column.
Row, column and stride-phase counters decide whether the window just
completed starts at a multiple of the stride. If it does, the window is
registered on the output, with element `r*KW + c` holding row `r` (0 =
oldest) and column `c`. There is no padding: only windows that lie
completely inside the map are produced. Images follow one another with no
gap.

### Dot-product unit: the convolution and average-pooling engine

This is the hardest block to read, because both folding knobs act here.

* **Fine-grained folding** (`MACCS`): a unit has MACCS multipliers feeding a
  balanced adder tree. A KK-element window (KK = KH·KW) is consumed in
  `PASSES = ⌈KK/MACCS⌉` passes; pass p multiplies elements
  `p·MACCS … p·MACCS+MACCS−1`, and the last pass is padded with zeros. With
  `MACCS = KK` the unit computes one dot product per cycle. With `MACCS = 1`
  it is a single multiply-accumulate unit that needs KK cycles.
* **Coarse-grained folding** (`N` < `N_NOM` in `conv_bank`): a bank of N
  units serves N_NOM filters, so each unit holds `FILT = N_NOM/N` kernels.
  It keeps each window in a register and runs it against its FILT kernels
  in turn. Its output stream therefore carries FILT maps, interleaved per
  pixel. Unit u computes layer filters `u·FILT … u·FILT+FILT−1`. N_NOM must
  be a multiple of N.
* **Input-map accumulation** (`IN_MAPS`): for a layer whose input has
  several maps, the windows of the maps of one pixel arrive one after
  another. Their dot products, each with its own kernel, are summed in one
  accumulator per filter before a result is emitted.

The loop order per window is: filter f (outer), then pass p (inner). The
input map index m advances after each window. A result for filter f leaves
on the last pass of the last input map. The next window is accepted in the
cycle the current window's last pass runs. The initiation interval is
therefore exactly `FILT · PASSES` cycles per window. A result appears one
cycle after its last pass.

Arithmetic: products are exact, and sums are kept in a 48-bit accumulator.
The result is shifted right arithmetically by 8 bits, which rounds toward
minus infinity, and saturated to 16 bits. There is no bias term.

Kernels are written through a port: `w_unit` selects the unit and
`w_addr = (f·IN_MAPS + m)·KK + k` selects the word. Element k follows the
same `r*KW + c` order as the windows.

With `CONST_AVG = 1` the weights are replaced by the constant averaging
kernel `round(256/KK)`, which is exactly 0.25 for 2 × 2. This is how the
pooling bank does average pooling.

### Max pooling

`max_pool_unit` has a single comparator. It walks the registered window one
element per cycle, so its initiation interval is P² cycles per window.

With 2 × 2 windows at stride 2, windows appear only on every second row, in
bursts of one window every 2 cycles, while the unit needs 4 cycles for each.
A `stream_fifo` on each pooling arc holds one pooled row of windows
(POOL_W · FILT windows). This lets the comparator catch up during the rows
that produce no windows, so the pool bank does not stall the convolution.
Without this buffer, the example network ran 35% slower than its slowest
block allows. With it, the example network runs within 2% of that bound.

### Activations

`nonlinear_bank` has one register stage per unit. The function is set by
parameter `T`:

| `T` | function |
|---|---|
| `NL_RELU` | max(0, x) |
| `NL_SIGMOID` | PLAN piecewise-linear approximation; the slopes are shifts |
| `NL_TANH` | 2·sigmoid(2x) − 1, using the same approximation |

The PLAN segments, for |x|:

| input | output |
|---|---|
| \|x\| ≥ 5 | 1 |
| 2.375 ≤ \|x\| < 5 | \|x\|/32 + 0.84375 |
| 1 ≤ \|x\| < 2.375 | \|x\|/8 + 0.625 |
| \|x\| < 1 | \|x\|/4 + 0.5 |

For negative x the output is 1 − y. The largest error measured over all
16-bit inputs is 0.021 for sigmoid and 0.043 for tanh.

### Memory I/O

The memory ports use a simple split-transaction protocol:

* **Read port:** request with `valid/ready/addr`, where `addr` is a beat
  address. The response is `valid` + one beat of W words. Responses return
  in order, with any latency and no back-pressure.
* **Write port:** `valid/ready/addr/data`.

`mem_read_unit` keeps a response FIFO of `FIFO_DEPTH` beats. It only issues a
request when the beats in flight plus the beats already buffered still fit
in that FIFO. It serialises each beat into single words, word 0 first.

`mem_write_unit` packs words into beats and pads a last partial beat with
zeros. It refuses a word only when that word would complete a beat while
the previous beat is still waiting for the memory.

The memory's efficiency (the fraction of its nominal bandwidth it really
delivers) is not a parameter: it follows from how often the memory accepts
requests.

## Running the top

1. Load the kernels: for layer filter `f`, input map `m` and kernel
   element `k`, drive `w_we = 1` with `w_unit = f / FILT`,
   `w_addr = ((f % FILT)·IN_MAPS + m)·K·K + k` and `w_data`, one word per
   cycle. With `IN_PAR > 1` the address becomes
   `(((f % FILT)·S + m / IN_PAR)·IN_PAR + m % IN_PAR)·K·K + k`, where
   `S = IN_MAPS / IN_PAR`.
2. Store `num_images` input images back to back from beat address
   `in_base`. Each image is in raster order, with its `IN_MAPS` maps
   interleaved per pixel, MEM_W words per beat.
3. Pulse `start` for one cycle. `busy` rises.
4. `done` rises, and `busy` falls, once every output beat has been
   written. `done` stays high until the next `start`.

Output stream `u` (one per convolution unit) is written from beat address
`out_base + u·out_stride`. Its word order is: image, pooled row, pooled
column, then the unit's FILT maps. With the defaults FILT = 1, so stream u
is simply output map u: 19 × 19 = 361 words per image, or 91 beats.

Several images in one run flow through the pipeline back to back. The
pipeline is not drained between images.

### Several input maps

A layer whose input has `IN_MAPS` maps reads them from memory interleaved
per pixel. `IN_PAR`, which must divide `IN_MAPS`, sets how many sliding
window units take them in parallel.

* `stream_split` deals the memory words out in turn. So window unit `p`
  sees maps `p, p + IN_PAR, …`, still interleaved per pixel.
* The fork copies all `IN_PAR` window streams to every convolution unit.
* Each convolution unit joins its `IN_PAR` copies into one window of
  `IN_PAR·K·K` words.
* The dot-product unit sums the remaining `IN_MAPS / IN_PAR` maps
  serially in its accumulator.

`IN_PAR = IN_MAPS` is the fully parallel form: N_in window units and an
N × N_in fork. `IN_PAR = 1` is one window unit over all maps, which is
`IN_MAPS` times slower in the convolution but uses K² multipliers per
unit instead of `IN_MAPS·K²`. The memory still delivers one word per
cycle, so the input stage costs `IMG_H·IMG_W·IN_MAPS` cycles per image
whatever `IN_PAR` is.

### Partitioned networks

A network too large for one device is split into subgraphs, and each
subgraph is its own configuration of the FPGA. The top builds such
subgraphs by switching stages off:

* `HAS_CONV = 0` removes the memory-to-window front end, the fork and the
  convolution bank. The top then has `CONV_UNITS` read ports, one per
  stream. Read stream `u` fetches `FILT` interleaved maps of
  `IMG_H × IMG_W` per image from beat address `in_base + u·in_stride`.
  That is exactly the layout that the write ports of another
  configuration produce, so one subgraph's output region is the next
  subgraph's input region.
* `HAS_NL = 0` and `HAS_POOL = 0` pass the stream past the activation or
  the pooling stage.

With `HAS_CONV = 1` there is one read port, and `in_stride` is unused.
`tb_fpgaconvnet_partitioned` runs the layer in two parts. The first part
is convolution only. The second part is activation plus pooling and reads
the first part's maps back. Both parts share one memory model. The
testbench checks both the intermediate and the final maps.

### Timing

With the default, fully unrolled mapping and a memory that keeps up, the
pipeline takes one input word per cycle. Each block's cost per image, in
cycles, is:

| block | cycles per image |
|---|---|
| input | IMG_H · IMG_W = 1764 |
| convolution | 38 · 38 · FILT · PASSES = 1444 |
| max pooling | 19 · 19 · FILT · 4 = 1444 |

The slowest block sets the time: a run of M images takes about
`M · max(...)` cycles plus the pipeline fill, which is roughly 4 rows for
the 5 × 5 window. Measured with a memory that refuses a quarter of the read
requests and a tenth of the writes: 2 images took 3589 cycles, against 3528
predicted.

## Parameters of `fpgaconvnet_top`

| parameter | default | meaning |
|---|---|---|
| `IMG_H`, `IMG_W` | 42, 42 | input map size |
| `IN_MAPS` | 1 | input maps, interleaved per pixel in memory |
| `IN_PAR` | 1 | parallel window units for the input maps (divides `IN_MAPS`) |
| `K`, `CONV_S` | 5, 1 | kernel size and stride |
| `N_FILT` | 20 | filters in the layer |
| `CONV_UNITS` | 20 | convolution units (coarse folding; must divide `N_FILT`) |
| `CONV_MACCS` | 25 | multipliers per unit (fine folding, 1…IN_PAR·K²) |
| `NL_T` | `NL_RELU` | activation |
| `POOL_P`, `POOL_S` | 2, 2 | pooling window and stride |
| `POOL_T` | `POOL_MAX` | `POOL_MAX` or `POOL_AVG` |
| `POOL_MACCS` | 4 | multipliers per average-pooling unit |
| `MEM_W` | 4 | words per memory beat (a 64-bit port) |
| `ADDR_W` | 32 | beat address width |
| `HAS_CONV`, `HAS_NL`, `HAS_POOL` | 1, 1, 1 | which stages this subgraph contains |

The default uses 20 × 25 = 500 multipliers. That is more than the 220 DSP
slices of the XC7Z020 on which the published designs ran. To fit that
device, fold the layer, for example with `CONV_MACCS = 5` (100 multipliers,
5 cycles per window) or with `CONV_UNITS = 5`.

## What is this design's own, and what is not covered

These points follow the published framework:

* the block set and each block's role
* the folding knobs: the number of units, and multipliers plus adder tree
  per unit
* max pooling with one comparator at one element per cycle
* average pooling as a dot product with an averaging kernel
* piecewise-linear sigmoid and tanh
* Q8.8 words
* the example network

These points are choices made here:

* the valid/ready handshake and its reset
* the line-buffer organisation
* the interleaving of maps on one stream
* how a coarse-folded unit cycles through its filters
* the rounding (floor) and saturation
* no bias and no padding
* the kernel write port
* the memory protocol and the output layout
* conversion between memory beats and single-word streams
* tanh by way of sigmoid
* the window buffer before the pooling bank
* dealing the input maps to parallel window units in turn, and joining their windows into one longer dot product
* the stage switches and memory layout used to split a network into subgraphs

Not covered:

* **Fully-connected and classifier layers.**
* **Reconfiguration between partitions.** Each subgraph is a separate
  parameterisation of the top (see *Partitioned networks*). Loading one
  bitstream after another is done by the FPGA's configuration logic and
  the host, and is not modelled. A subgraph that starts with a
  convolution reads a single interleaved region. So after a subgraph with
  several output streams, the maps must be rearranged by the host unless
  that subgraph used `CONV_UNITS = 1`.
* **Rectangular kernels and separate strides in the top.** The top uses
  a square `K × K` kernel and a single stride per layer. The
  `sliding_window_block` itself takes separate `KH`, `KW`, `SH` and `SW`.
* **The design-space search.** It is software; its output is the
  parameters above.

## Simulating

Every module has one file in `rtl/`, and `fcn_pkg.sv` must be read first.
The testbenches are in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops by itself, with a watchdog.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fcn_pkg.sv tb/tb_fpgaconvnet_top.sv --top-module tb_fpgaconvnet_top
./obj_dir/Vtb_fpgaconvnet_top
```

`-y` lets Verilator find every other module by its file name.

| testbench | what it checks |
|---|---|
| `tb_fpgaconvnet_top` | Default top; 2 images; random read/write throttling. Every output word is compared with a software reference (convolution, ReLU, max pooling). Also checks the transfer counts of every stage, the run time against the slowest-block bound, and that each mechanism occurred. |
| `tb_fpgaconvnet_top_folded` | 18 × 16 images with 2 input maps, on 5 units × 4 filters, 10 multipliers (3 passes), tanh, average pooling. Same checks. |
| `tb_fpgaconvnet_top_parallel` | 16 × 16 images with 4 input maps on 2 parallel window units. 2 convolution units join the two window streams and sum 2 maps serially. 6 multipliers (3 passes), ReLU, max pooling. Same checks. |
| `tb_fpgaconvnet_partitioned` | Two subgraphs of one layer on 14 × 14 images with 2 input maps: convolution only, then ReLU plus max pooling read back from memory. Checks the intermediate maps (negative values kept) and the final maps against the unsplit network. |
| `tb_sliding_window_block` | 3 × 2 windows, strides 2/1, 2 interleaved maps, stalls; then the rate of 1 pixel/cycle. |
| `tb_fork_unit` | 2 → 6 copies under independent stalls; then 1 transfer/cycle. |
| `tb_conv_bank` | 2 units × 3 filters, 4 multipliers on 3 × 3 windows, 2 input maps, saturation; then the 9-cycle initiation interval. |
| `tb_pool_bank` | Max pooling on 2 × 2 and average pooling on 3 × 3 windows; then initiation intervals of 4 and 3 cycles. |
| `tb_nonlinear_bank` | All 65536 inputs through ReLU, sigmoid and tanh; exact segment values and the error bound. |
| `tb_mem_read_unit`, `tb_mem_write_unit` | Partial beats, throttling, restart, and 1 word/cycle. |

`top_harness.sv` holds the shared end-to-end environment: a behavioural
off-chip memory, a reference model and mechanism counters. Its parameters
mirror the top's, so other mappings can be tried by adding a small wrapper
like `tb_fpgaconvnet_top_folded.sv`.
