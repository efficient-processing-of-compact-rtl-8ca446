# Hybrid dedicated/reusable CNN accelerator for compact CNNs

Compact CNNs such as MobileNet are built from depthwise and pointwise
convolutions, usually grouped into inverted residual bottlenecks. Their layers
are very uneven. The first layers have large feature maps and few channels.
The later ones have small maps and many channels, and they resemble each other
more and more.

Accelerators for such networks usually take one of two forms:

- **One engine per layer type.** A pointwise engine and a depthwise engine are
  reused for every layer of that type. This is cheap, but the engines are sized
  for an average layer. Every layer's output must also be stored whole before
  the next layer can read it.
- **One engine per layer, as a streaming pipeline.** This fits each layer well
  and keeps little data on chip. However, it grows with the depth of the
  network and soon exceeds any fixed resource budget.

This design combines the two:

- **Dedicated part.** The first layers each get an engine. These engines run
  concurrently and hand pixels to one another.
- **Reusable part.** A single pointwise engine and a single depthwise engine run
  all remaining layers, one layer at a time, out of on-chip feature-map buffers.

Inside the dedicated part, each inverted residual bottleneck is a *fused*
module. Its three engines are linked by FIFOs only a few pixels deep, instead of
the full double buffers a conventional layer pipeline puts between engines.

The RTL is SystemVerilog-2017. Every block is synthesizable and parameterised,
and each has a self-checking testbench.

## Block diagram

```
                 dedicated part (one engine per layer)                     reusable part
 image  ┌──────────┐   ┌──────────── firb ─────────────┐   ┌──────────┐   ┌──────────────────────────┐
 pixels │ engine 0 │   │ eng 1   FIFO  eng 2  FIFO eng 3│   │ engine 4 │   │  FM buffer 0 ◄─┐  ┌─► out │
 ──────►│ 3x3 conv ├──►│ PW  ──►[ ]──► DW ──►[ ]──► PW ─┼──►│ PW       ├──►│      │  ▲      │  │       │
        │ stride 2 │   │ expand       3x3        project│   │ expand   │   │      ▼  │      │  │       │
        └──────────┘   │   └──── shortcut FIFO ───► (+) │   └──────────┘   │  PW engine / DW engine   │
                       └────────────────────────────────┘                  │      │  ▲                │
                                                                           │      ▼  │ shortcut buf   │
                                                                           │  FM buffer 1             │
                                                                           └──────────────────────────┘
```

| Module | Role |
|---|---|
| `fibha_top` | Top level: engines 0–4 of the dedicated part, and the reusable part |
| `conv_engine` | Engine 0, the standard KxK convolution of the first layer: a line buffer feeding a MAC engine |
| `firb` | Engines 1–3: the fused inverted residual bottleneck, with replicated expansion/depthwise copies |
| `seml_part` | The reusable pointwise and depthwise engines, FM buffers, layer sequencer |
| `pw_engine` | Pointwise (1x1) engine: MAC lanes, accumulators, batch norm, ReLU |
| `dw_engine` | Depthwise engine: `window_gen` followed by `dw_mac` |
| `window_gen` | Line buffer that turns a raster pixel stream into KxK windows |
| `dw_mac` | Depthwise MAC lanes (KxK multipliers, adder tree, batch norm, ReLU) |
| `stream_fifo` | Small valid/ready FIFO (links between engines, shortcut path) |
| `bn_relu` | Folded batch norm, ReLU and saturation for one channel |
| `adder_tree` | Balanced adder tree |
| `fibha_pkg` | Widths, the `act_t`/`acc_t`/`bn_t` types, the layer-kind enum, `sat8` |

## How data moves

Every stream carries whole pixels. One transfer holds all channels of one
(row, column) position as a packed array of signed bytes, sent in raster order
with valid/ready handshaking. A frame is just H·W transfers and there is no
frame marker on the input. Each engine counts positions itself, from its
configured height and width.

### Engines and their timing

**Pointwise engine** (`pw_engine`)
- Has `PAR_OUT` lanes. Each lane has `PAR_IN` multipliers, an adder tree and a
  32-bit accumulator, followed by batch norm and ReLU.
- It latches one input pixel, then for each group of `PAR_OUT` output channels
  it sweeps the input channels `PAR_IN` at a time, accumulating.
- A pixel occupies the engine for ⌈cin/PAR_IN⌉·⌈cout/PAR_OUT⌉ + 2 cycles: one to
  accept, the MAC cycles, and one to hand over.
- The result appears ⌈cin/PAR_IN⌉·⌈cout/PAR_OUT⌉ + 1 cycles after acceptance.
  The testbench checks this latency.

**Depthwise engine** (`dw_engine` = `window_gen` + `dw_mac`)
- Has `PAR` lanes. Each lane has a KxK grid of multipliers and an adder tree,
  then batch norm and ReLU. There is no cross-channel sum, so there is no
  accumulator.
- An output pixel takes ⌈c/PAR⌉ + 2 cycles once its window is ready.
- The latency is ⌈c/PAR⌉ + 1 cycles; `tb_dw_mac` checks it.

**Line buffer** (`window_gen`)
- Keeps K+1 image rows in a circular buffer.
- It issues the window for output (r, c) as soon as input pixel
  (min(r·S+P, H−1), min(c·S+P, W−1)) has arrived, where P = K/2 is the zero
  padding and S the stride (1 or 2). Out-of-image taps read as zero.
- It refuses an input pixel while that pixel's row slot is still needed by the
  current window row. Back-pressure therefore works in both directions.
- After the last window of a frame has been taken, it starts the next frame on
  its own.
- A height or width of 0 means "not configured": it then takes no pixel and
  issues no window. The reusable depthwise engine relies on this before its
  layer table is written.

**Stem convolution** (`conv_engine`)
- The same line buffer as the depthwise engine.
- The KxK window is flattened to a K·K·CIN vector with index (i·K+j)·CIN + c and
  fed to a `pw_engine`. A standard convolution is a pointwise convolution over
  that vector.

### The fused bottleneck (`firb`)

A conventional pipeline for the expand–depthwise–project block stores a tile of
each layer's output in a double buffer. That is four buffers per bottleneck.
`firb` stores almost nothing between its engines:

- The expansion engine's output pixel goes into a 2-entry FIFO. The depthwise
  line buffer consumes it directly, so the expanded feature map never exists in
  memory. Only K+1 rows of it do, inside the line buffer.
- The depthwise output goes through another 2-entry FIFO straight into the
  projection engine.
- The only other storage is the **shortcut FIFO** for the residual add.

The shortcut FIFO needs care. Each accepted input pixel is pushed both into the
expansion engine and into the shortcut FIFO. The FIFO is popped when the
projected pixel of the same position leaves. Between those two events the
pixel can be held up by three things:

- the line buffer's look-ahead of one row plus one pixel (W+2 pixels);
- the two link FIFOs;
- the engines' registers.

The FIFO is therefore `SKIP_DEPTH` = 2·W + 8 deep by default.

- If it fills, it holds back the input. This is ordinary back-pressure, counted
  on `skip_stalls`.
- If it were shallower than the look-ahead, the pipeline would deadlock,
  because the depthwise engine could never see the pixel it waits for.
- The residual path is built only when `STRIDE == 1` and `CIN == COUT`.
- The add saturates to 8 bits.

**Replicated engines.** The expansion engine, its link FIFO and the depthwise
engine are built `REP` times (default 2).
- Copy *r* owns expanded channels *r*·CEXP/REP up to (*r*+1)·CEXP/REP − 1. It
  computes, buffers and filters only those channels, in its own line buffer
  slice.
- All copies take the same input pixel in the same cycle.
- The projection engine joins them: it takes a pixel when every copy has one
  ready, and sees the concatenated CEXP channels.
- Weight and BN rows for engines 1 and 2 stay global channel numbers. The
  block picks the copy as row / (CEXP/REP).

Replication divides the work of the expansion and depthwise layers without
making any buffer larger in total.

The engines run at different rates. At the defaults, each expansion copy
needs ⌈8/4⌉·⌈8/2⌉ = 8 MAC cycles per pixel and each depthwise copy ⌈8/2⌉ = 4.
The projection engine needs ⌈16/4⌉·⌈8/2⌉ = 16. The pipeline moves at the pace
of the slowest engine, so here the projection sets the rate. The link FIFOs
only absorb jitter.

### The reusable part (`seml_part`)

The reusable part runs one layer at a time. Each layer's output is kept whole,
so it has:

- two feature-map buffers of H_MAX·W_MAX pixels, used ping-pong (source and
  destination swap after every layer);
- a third **shortcut buffer** for residual adds.

A small FSM sequences a frame:

1. **FILL.** The dedicated part's output is written into buffer 0. During this
   time the dedicated part keeps running on the next image until it is held
   back; `sesl_stalls` counts those cycles.
2. **WREQ.** For each layer, `wreq` is raised with `wreq_layer`. The design
   does not assume the model fits on chip, so an outside agent (typically a DMA
   from DRAM) must write that layer's weights and batch-norm parameters into the
   pointwise or depthwise engine. It then pulses `wdone`.
3. **RUN.** The source buffer is streamed through the engine named by the layer
   table. The results are written to the other buffer, and the buffers swap
   roles.
   - A layer flagged `save` also copies its input pixels into the shortcut
     buffer.
   - A layer flagged `add` adds the shortcut buffer to its results, with
     saturation.
   - Together these flags run a full residual bottleneck on the reusable
     engines.
4. **DRAIN.** After the last layer, the final buffer is streamed out. The last
   pixel is marked with `out_last`.

Each layer-table entry holds: kind (PW/DW), cin, cout, h, w, stride, relu,
save and add. For a depthwise layer, `cin` is the channel count. A layer's h
and w are those of its input.

## Number format

| Quantity | Format |
|---|---|
| Activations and weights | signed 8 bit |
| Products and sums | 32-bit accumulators |
| Batch norm (folded per channel) | `y = (acc·scale + bias) >>> 8`, with a signed 16-bit `scale` and a 32-bit `bias` |

After batch norm, ReLU is applied if enabled, and the result is saturated to
[−128, 127]. ReLU can be switched off per layer in the reusable part, and by
the `PROJ_RELU` parameter for the projection engine of `firb`.

## Programming the top

| Port group | Use |
|---|---|
| `wt_we, wt_eng, wt_row, wt_col, wt_data` | Write one weight |
| `bn_we, bn_eng, bn_row, bn_data` | Write one channel's batch-norm pair |
| `ltab_*`, `cfg_layers` | Write the reusable part's layer table and set its length |
| `wreq, wreq_layer, wdone` | Per-layer weight hand-shake of the reusable part |
| `in_*` / `out_*` | Image pixels in, result pixels out |
| `skip_stalls, sesl_stalls, pw_layers_run, dw_layers_run, add_layers_run` | Activity counters |

The `wt_eng`/`bn_eng` codes select an engine:

| Code | Engine | `wt_row` | `wt_col` |
|---|---|---|---|
| 0 | stem convolution | output channel | (i·K+j)·IMG_C + c |
| 1 | bottleneck expansion | output channel | input channel |
| 2 | bottleneck depthwise | channel | tap i·K+j |
| 3 | bottleneck projection | output channel | input channel |
| 4 | dedicated pointwise (engine 4) | output channel | input channel |
| 5 | reusable pointwise | output channel | input channel |
| 6 | reusable depthwise | channel | tap i·K+j |

Write the dedicated engines' weights once, before the first image. The reusable
engines are written between layers, in answer to `wreq`.

## Parameters and sizes

Every default is this design's choice. The architecture it follows is defined
without concrete layer sizes. Only the 3x3 depthwise kernel and the two lanes
per engine come from its drawings.

| `fibha_top` parameter | Default | Meaning |
|---|---|---|
| `IMG_H`, `IMG_W`, `IMG_C` | 16, 16, 3 | input image |
| `K` | 3 | kernel size of all KxK engines |
| `STEM_C`, `STEM_STRIDE` | 8, 2 | stem convolution output channels and stride |
| `FIRB_CEXP` | 16 | expanded width of the fused bottleneck (8 → 16 → 8) |
| `TAIL_C` | 16 | output channels of engine 4 |
| `SEML_C_MAX`, `SEML_L_MAX` | 16, 8 | reusable-engine channel limit and layer-table size |
| `PW_PAR_IN`, `PW_PAR_OUT`, `DW_PAR` | 4, 2, 2 | multipliers per lane and lanes |

`firb` has one more parameter, `REP` (default 2), the number of expansion and
depthwise copies. It must divide `FIRB_CEXP` into slices of at least two
channels.

The reusable part's map size equals the stem's output size: 8x8 at the
defaults. A real ImageNet network does not fit these defaults. MobileNetV2, for
example, has a 224x224 input, up to 960 expanded channels and a 1280-channel
last layer. All engines are parameterised, so a larger build is a parameter
change.

Two practical limits apply:

- The line buffers and feature-map buffers are written as plain arrays. At
  ImageNet sizes they should map to block RAM. `window_gen` reads K·K pixels
  in one cycle, which would need to become K row memories read in parallel.
- `window_gen` and the reusable part hold full channel vectors per pixel, so
  wide layers make wide memories.

## Where this design departs from, or goes beyond, its source

- **Widths, batch-norm folding, handshakes, FIFO depths, the line-buffer
  organisation, the sequencer and the weight hand-shake** are this design's
  own. The source fixes the block structure: multipliers, adder trees, an
  accumulator, BN and ReLU per lane, and which engines exist and how they
  connect.
- **ReLU after the projection layer.** The source draws ReLU after every
  engine, including the projection engine. This follows the drawings
  (`PROJ_RELU = 1`), although the usual "linear bottleneck" has none. In the
  reusable part it is a per-layer choice.
- **Residual add in the reusable part.** The shortcut-buffer mechanism is this
  design's way of performing the Add layers of the blocks the reusable engines
  compute. The source shows those adds but not how they are done.
- **Not included:**
  - the fully connected classifier layers;
  - the procedure that decides where to split a network between the two parts
    (a design-time heuristic; here the split is fixed by the structure of
    `fibha_top`: stem, one bottleneck, and the first pointwise layer of the
    next one);
  - off-chip memory, which the testbenches model as a weight agent.
- **Replication by channel slices.** The fused bottleneck's drawing stacks
  copies of the expansion and depthwise engines. Giving each copy a slice of
  the expanded channels, and making two copies the default, is this design's
  reading of that drawing. The projection engine is not replicated; give it
  more lanes (`PW_PAR_OUT`) to balance the pipeline.
- **Bottlenecks without expansion** (expansion factor 1) are not supported by
  `firb`, which always has an expansion engine. Such a block can run on the
  reusable engines.

## Verification

Each block has a testbench `tb/tb_<module>.sv`. The testbenches compare
against integer reference models in `tb/fibha_ref_pkg.sv`: standard,
pointwise and depthwise convolution with zero padding, folded BN, ReLU and
saturation. They use random data and random valid/ready gaps. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it covers |
|---|---|
| `tb_fibha_top` | Default parameters, three back-to-back images. Five reusable layers per image, one of them a residual bottleneck. Requires that every mechanism occurred: per-layer weight requests, engine reuse, residual adds in both parts, shortcut-FIFO back-pressure, dedicated-part stalls on the reusable part. |
| `tb_firb` | Three frames at different consumer speeds; residual add; shortcut back-pressure |
| `tb_firb_mbv2` | A MobileNetV2 bottleneck at its real channel counts (24 → 144 → 24, residual) on an 8x8 map, two replicated copies of 72 channels |
| `tb_seml_part` | Five-layer program with a residual bottleneck and a stride-2 layer, two frames |
| `tb_conv_engine` | Two 16x16x3 frames, stride 2, at default size |
| `tb_dw_engine`, `tb_window_gen` | Several shapes and strides, frame restart, `out_last` |
| `tb_pw_engine`, `tb_dw_mac` | Partial channel counts, ReLU on/off, exact latency |
| `tb_stream_fifo`, `tb_bn_relu`, `tb_adder_tree` | Leaf checks, including saturation corners |

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fibha_top \
    -y rtl -y tb +libext+.sv rtl/fibha_pkg.sv tb/fibha_ref_pkg.sv tb/tb_fibha_top.sv
./obj_dir/Vtb_fibha_top
```

The full end-to-end test takes about 10,000 cycles and well under a second.
Lint with `verilator --lint-only -Wall -y rtl rtl/fibha_pkg.sv rtl/<module>.sv`.
The remaining warnings are harmless:
- the upper bits of the 8-bit weight-address buses are unused at small sizes;
- `rst_n` is used both by the flops and by the assertions' `disable iff`.
