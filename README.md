# SVC intra prediction engine

This design is an intra prediction engine for H.264/AVC high profile and
its scalable extension, SVC, with spatial scalability. It has two halves:

* **Basic intra prediction.** This is ordinary H.264 intra prediction, used
  for single-layer streams and for the SVC base layer. The Intra_4x4 and
  luma Intra_8x8 generators both run on one small adder, the *base-mode
  predictor*. Two ping-pong *Line SRAMs* hold the pixels of the row above.
* **Intra_BL prediction.** This is the inter-layer intra mode of SVC. An
  enhancement-layer macroblock of type I_BL is predicted by upsampling the
  reconstructed base-layer pixels. The source pixels sit in a four-bank
  SRAM. Area-optimised "basic" interpolators filter horizontally and then
  vertically. For some field/frame combinations of the two layers, an
  "extended" vertical interpolator runs as a third step.

The RTL follows the architecture of a published design: the thesis "Design
of An Intra Predictor with Spatial Scalability for Scalable Video Decoding".
Where this RTL fills gaps or departs from that design, the text below says
so.

## Top level

`svc_intra_top` places three generators side by side:

| instance | module | job |
|---|---|---|
| `u_line` | `line_sram_pp` | two 20 x 32-bit Line SRAMs (upper-line pixels), ping-pong |
| `u_i4` | `intra4x4_pred` | Intra_4x4, all nine modes, one row of 4 pixels per cycle |
| `u_i8` | `intra8x8_pred` | luma Intra_8x8 with reference sample filtering |
| `u_bl` | `intra_bl_engine` | Intra_BL upsampling of one 4x4 block |

They share one output. `pred_sel` picks the source: 0 is Intra_4x4, 1 is
Intra_8x8 and 2 is Intra_BL. Each generator reports its results as
`pred_valid`, `pred_row`, `pred_half` (which four columns of an 8x8 row) and
four pixels.

With `upper_from_sram` set, an Intra_4x4 block takes its four upper
neighbours straight from the Line SRAM read word. This is the trick that
replaces the last sub-row of an upper neighbour buffer with the SRAM's
`data_out`. The SRAM output register holds its value until the next read, so
the word can be used for several blocks.

All other neighbour pixels enter through ports. The macroblock-pair
(MBAFF) neighbour buffers that would produce them are not built (see
*Not built*).

## Basic intra prediction

### The base-mode predictor (`base_mode_pred`)

Every H.264 intra predictor except DC is a 3-tap filter,
`(a + 2b + c + 2) >> 2`, or a 2-tap average `(a + b + 1) >> 1`, or a plain
copy. The reference sample filter of Intra_8x8 has the same form.

Each of the four lanes computes `(x + 2z + y + 2) >> 2`:

* a 2-tap average is `x = y = a`, `z = b`;
* a copy is `x = y = z = a`.

A mode is therefore only a choice of three edge pixels per lane. The
generators build that choice as a mux per lane. They never need a second
adder shape.

### Intra_4x4 (`intra4x4_pred`)

On `start`, the 13 edge pixels are registered. These are L3..L0, the corner
M, and T0..T7. Then four rows follow on four consecutive cycles, one row per
cycle. A function maps (mode, x, y) to three edge indices for each lane. DC
has its own small adder tree, including the cases with the top or left
neighbours unavailable.

### Intra_8x8 with filtering (`intra8x8_pred`)

Intra_8x8 first low-pass filters its neighbours. The block has two phases:

1. **FILT.** The four lanes make only the filtered pixels that the mode
   needs, four per cycle, and write them into a 17-entry (136-bit)
   filtered-pixel buffer. The count M is 8 for V, H and HU, 16 for DDL and
   VL, 17 for DDR, VR and HD, and 0/8/16 for DC. FILT therefore lasts
   ceil(M/4) cycles, which is 0 to 5.
2. **PRED.** The same lanes read the buffer and produce 4 pixels per cycle,
   two cycles per row, 16 cycles in all.

The buffer layout depends on the mode class and is given in the module
header.

**Reuse between neighbouring 8x8 blocks.** The 8x8 blocks of a macroblock
come in left/right pairs: blocks 0/1 and 2/3. Suppose the left block of a
pair is predicted in diagonal down-left or vertical-left mode. It has then
filtered the whole top row, and the right block's first filtered top pixels
are values it has already made. The generator keeps six of them,
p'[8..13,-1], in the buffer.

The right block reuses them if its mode uses the filtered top row: V, DC
with top, or modes 3..7. The six values are moved into that block's layout
at `start`, and only M - 6 pixels are filtered. For example, DDL followed by
VL filters 10 pixels, and DDL followed by DDR filters 11. `reusing` flags
such a block.

The caller supplies `blk_idx`. It must also give the right block its shared
neighbours: top[0..7] equal to the left block's top[8..15], and the corner
equal to the left block's top[7]. A real decoder does this naturally.

### Line SRAMs (`line_sram_pp`, `line_sram`)

There are two single-port SRAMs of 20 words x 32 bits (640 bits each).
`sel` says which one faces the predictor; the other faces the 32-bit system
bus. A one-cycle `swap` pulse exchanges the two roles between macroblocks
(or MB pairs), so the next upper line can load while the current one is in
use.

## Intra_BL prediction

### Filters

* **Luma** uses the SVC 4-tap poly-phase filter with 16 phases. Its
  coefficients sum to 32.
* **Chroma** uses the bilinear filter `(16 - p) * 2` and `p * 2`.

A 4x4 output block is computed separably:

* horizontal pass, result not rounded;
* vertical pass, rounded with `(sum + 512) >> 10` and clipped to 0..255.

This two-stage rounding comes from the standard. The source design does not
state it.

### Basic interpolator (`basic_interp`)

One datapath serves both luma and chroma, with no multipliers:

* **Coefficient generators.**
  * `chr_coef_gen` computes the chroma pair straight from the phase.
  * `luma_coef_gen` stores only the nine luma sets for phases 0..8, with
    the two negative outer taps stored as magnitudes. Phases 9..15 are the
    mirror image of 7..1. For those, the generator folds the phase with a
    two's complement and raises a `swap` flag, and the interpolator
    reverses the tap order.
* **Pixel shifters** make the scaled copies x1, x2, x4 ... x32 of each
  reference pixel. The two inner taps get six copies; the outer taps get
  three.
* **Scaling engines** use each coefficient bit as a mux select on these
  copies and add them up.
* **Final subtraction.** Positive and negative products are summed apart.
  The negative outer taps are subtracted only in the last adder, so every
  earlier adder is narrower.

**Equality bypass.** If all taps that matter are equal (four for luma, two
for chroma), the output is simply `pixel << 5`, because the coefficients sum
to 32. The `eq` output reports that the bypass was taken. This is the
power-saving path, and the result is bit-identical.

### Extended vertical interpolator (`ext_v_interp`)

This step runs when the two layers differ in frame/field structure. That is
the case for frame -> MBAFF, MBAFF -> frame and field(PAFF) -> frame. For
luma, the filter `(-3, 19, 19, -3)` is rewritten as:

    16*(b + c + 1) - 3*((a + d + 1) - (b + c + 1))  >> 5

The common term `(b + c + 1)` is also the chroma filter: its `>> 1` is the
chroma result. Luma and chroma therefore share the adders. The luma result
is clipped.

### Banked SRAM and the half swap (`banked_sram`)

The source region is held in four banks of 48 words x 16 bits (two pixels
per word), 3072 bits in total. Each bank has its own read address.

In one cycle, one word is read from each bank. Together they form an aligned
8-pixel window, which gives the four taps for two neighbouring output
columns. Each address is computed for its own bank, so the window can start
at any even column.

The region is 32 columns x 12 rows. It is stored as two 16-column halves.
Within a half, consecutive two-pixel words go round the four banks.

When a macroblock is finished, `swap_half` flips one flop (`left_half`). The
old right half becomes the left half without any data moving, and only the
new right half has to be fetched from external memory.

The source design's text gives both "24 entries" per bank and "3072 bits" in
total. These disagree by a factor of two. This RTL keeps the 3072-bit total,
read as two 24-word halves per bank. That reading matches the half-update
scheme and the total SRAM size the design reports.

### The engine (`intra_bl_engine`)

It has two basic horizontal interpolators (`IW = 9`), two basic vertical ones
(`IW = 16`) and four extended ones. These counts follow the source design.
There are two register sets:

* **V_BHI**: 4 horizontally filtered values for each of the 12 region rows;
* **V_BI**: 7 basic rows x 4 vertically filtered pixels.

One block goes through three phases:

| phase | cycles | work |
|---|---|---|
| HPASS | 2 per source row | read an 8-pixel window, filter two columns, write V_BHI |
| VPASS | 2 per basic row | filter two V_BHI columns, round, clip, write V_BI |
| OUT | 4 | one row per cycle: V_BI rows 1..4, or 4 extended results from V_BI rows k..k+3 |

**Reuse for the block below.** Both register sets keep their contents from
one block to the next. Each V_BHI row has a valid tag, which stays set while
the column command (`xref`, `xphase`, chroma) is unchanged. Each V_BI row is
tagged with its (`yref`, `yphase`).

Suppose the next block is the one directly below, so its column command is
the same:

* the horizontal pass starts at the first region row that is not already
  held;
* any basic row that is already held at the same position and phase is
  copied, not recomputed. With the extended step, rows -1..1 of a block are
  rows 3..5 of the block above.

`h_reuse` and `v_reuse` flag such blocks. A write to the SRAM, or a half
swap, clears every tag. To benefit, the caller should send the 4x4 blocks of
a macroblock down each column.

**Cycle count.** From `start` to the last row takes `2*NH + 5 + 2*NV`
cycles:

* `NH` is the number of region rows filtered horizontally. Without reuse it
  is `yref[last] - yref[first] + 4`.
* `NV` is the number of basic rows filtered vertically. Without reuse it is
  4, or 7 with the extended step.

At 2:1 frame-frame, a block takes 23 cycles and the block below it 17.

**Block command.** The caller supplies it; the engine does not derive
positions itself. For each of the 4 output columns it gives the region
column of tap 0 and a phase (`xref`, `xphase`). For each of the 7 basic rows
it gives the region row and phase (`yref`, `yphase`). Basic rows sit at
vertical positions -1..5 of the block; only rows 0..3 are used without the
extended step.

**Rules on the command.** Assertions check them:

* references are non-decreasing;
* all taps lie inside the region;
* the taps of columns 0/1, and of columns 2/3, fit in one 8-pixel window
  starting at an even column.

This window rule holds for every upsampling ratio of 1.5 or more.

### Throughput against the source design

The source design works on units of two 4x4 blocks. It schedules a whole
macroblock, and it uses two more register sets, H_ST and H_BI, to carry
results to the unit on the right. It reports 192 cycles per MB for
frame-frame and 312 in the worst case, and 170 with all four register sets.

This engine reuses only towards the block below. A 2:1 frame-frame luma MB
sent down the columns takes 320 cycles, including one idle cycle per block.
For the HD720 -> HD1080 ratio of 1.5, a 4:2:0 MB takes 544 cycles: 360 for
luma and 92 for each chroma component. Region loads are not counted in these
figures. At 1.5x a 16-row luma MB reads 14 source rows, which is more than
the 12 rows the region holds. It is therefore done as two halves of 8 rows,
with a region load between them. At 145 MHz, 544 cycles fit the 592 available
per enhancement-layer MB. This holds only if Intra_BL runs beside the
base-layer prediction and does not share its cycle budget.

## Interface conventions

* `pixel_t` is an 8-bit unsigned pixel.
* The mode and picture-type encodings are in `svc_pkg`:
  * `i4_mode_e` uses the H.264 numbering, V = 0 ... HU = 8.
  * `il_type_e` encodes the layer combination: frame-frame, field-field,
    frame-MBAFF, MBAFF-frame, MBAFF-MBAFF, frame-PAFF, PAFF-frame.
* Reset is asynchronous and active low (`rst_n`).
* Memories are not reset. Write them before reading.
* Each generator takes `start` only when its `busy` is low.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference models are in
`tb/svc_ref_pkg.sv`:

* the luma table;
* the filters;
* the two-stage rounding;
* the H.264 Intra_4x4/8x8 equations.

These models are written directly from the equations and are independent of
the RTL structure. For example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/svc_pkg.sv tb/svc_ref_pkg.sv tb/tb_svc_intra_top.sv \
        --top-module tb_svc_intra_top -o sim
    ./obj_dir/sim

`tb_svc_intra_top` runs the whole engine at its default sizes:

* a Line SRAM fill and swap;
* one Intra_4x4 macroblock covering every mode and DC availability case,
  with SRAM-fed upper neighbours;
* 36 Intra_8x8 blocks going round the four 8x8 positions, with filtered-pixel
  reuse;
* three 2:1 I_BL macroblocks along a row, with a half swap;
* 42 further I_BL blocks over all picture-type combinations, luma and
  chroma, with flat regions to trigger the equality bypass.

It fails if any of these mechanisms never occurs.

`tb_svc_workloads` measures the cycle cost of whole macroblocks. It issues
each block as soon as the previous one finishes, and checks every pixel. It
covers:

* an Intra_4x4 MB: 80 cycles;
* an Intra_8x8 MB in the slowest modes: 88 cycles;
* a 1.5x I_BL 4:2:0 MB: 544 cycles;
* a 2:1 I_BL luma MB: 320 cycles;
* a 2:1 frame-MBAFF luma MB: 640 cycles. Each block reads 10 source rows,
  so the region is reloaded for every block row and rows below are not
  reused. This is about twice the 312-cycle worst case that the source
  design reports before it adds its reuse register sets.

It fails if a macroblock goes over its budget. The budget is 408 cycles for
HD1080 at 100 MHz and 592 for the enhancement layer at 145 MHz.

## Not built

* **MBAFF neighbour buffers.** These are the upper, left and corner data
  reuse buffers, and they would feed the neighbour ports. Their update order
  for frame and field MB pairs is not specified in enough detail to build.
* **Pixel re-ordering, Intra_16x16 and chroma intra generators.** These are
  outside this RTL.
* **Inter-block reuse.** This covers the H_ST/H_BI register sets and the
  macroblock-level Intra_BL schedule (see above).
* **Position derivation.** The SVC derivation of reference positions and
  phases from the layer sizes is done by the caller.
* **Gated clocks.** Gated clocks on the register sets are modelled as write
  enables.
* **Shared base-mode adders.** Intra_4x4 and Intra_8x8 are separate
  instances here. A smaller chip would let them share the base-mode adders,
  since only one runs at a time.

## Files

`rtl/`:

* `svc_pkg.sv`: types and encodings;
* `svc_intra_top.sv`: the top level;
* `line_sram.sv`, `line_sram_pp.sv`: the Line SRAMs;
* `base_mode_pred.sv`, `intra4x4_pred.sv`, `intra8x8_pred.sv`: basic intra
  prediction;
* `chr_coef_gen.sv`, `luma_coef_gen.sv`, `basic_interp.sv`, `ext_v_interp.sv`:
  the Intra_BL interpolators;
* `banked_sram.sv`, `intra_bl_engine.sv`: the Intra_BL memory and engine.

`tb/`: one `tb_<module>.sv` per module, `tb_svc_workloads.sv` for the
macroblock cycle budgets, and `svc_ref_pkg.sv` with the reference models.
