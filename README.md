# P-LUT convolution accelerator

This accelerator runs 3x3 convolutions of 4-bit power-of-two quantized
networks without any multiplier. Weights and activations are both 4-bit
codes: a sign bit and a 3-bit index into one small set of eight
non-negative levels, each normally zero or a short sum of powers of two.
With only eight levels there are only 8 x 8 possible magnitude products. The
accelerator computes them once, offline, and keeps them in a product
look-up table (the **P-LUT**). A "multiplication" is then one table read
addressed by the two indices, with the XOR of the two signs. That
replaces the shift-and-add logic of a classic power-of-two datapath, which
needs one shifter per operand bit. The table is symmetric, so only its upper
triangle (36 of 64 entries) is stored, and one copy is shared by all 64
convolution units.

The weights are also stored compressed, in a **signed Huffman (S-Huff)**
format: a zero weight costs one bit, and a non-zero weight costs a flag, its
sign and a Huffman code of its magnitude. An on-chip decoder expands the
stream into the second bank of a double-banked weight buffer. It works in
the background, so the next tile is decoded while the current one is in
use.

Per clock the datapath takes one 3x3 window of an 8-channel image and
produces one output pixel of 8 channels. That is 64 3x3 convolutions, or
576 table reads and additions, per cycle. Outputs are rescaled by a
power-of-two shift and re-quantized to the same 4-bit codes, so a layer's
output can be fed back as the next layer's input. They can also be sent out
as raw 32-bit sums.

## Number format

| item | format |
|---|---|
| code | `{sign, idx[2:0]}`. `idx = 0` is the zero level. A zero weight is always `4'b0000`. |
| level `L[i]` | unsigned 32-bit fixed point with 24 fractional bits, `L[0] = 0`, ascending |
| P-LUT entry `(i,j)` | `L[i]*L[j] >> 24`, same format |
| partial sum | signed 32-bit, same format |

The hardware does not fix the levels. The host writes them, together with
the 36 products. The testbenches use the set 0, 1/16, 1/8, 3/16, 1/4,
3/8, 1/2, 3/4: a zero plus sums of at most two powers of two.

The stored triangle holds entry `(i,j)` with `i <= j` at address
`8*i - i*(i-1)/2 + (j - i)`. The hardware sorts the two indices before
reading, so `(j,i)` reads the same entry (see `tri_addr` in `plut_pkg`).

**Output quantization.** The product of the weight scale, the activation
scale and the next layer's scale is a power of two. It is applied as a
single signed shift (`REG_SHIFT`: positive shifts left, negative shifts
right arithmetically). The scaled magnitude is then clipped to `L[7]` and
rounded to the nearest level by comparing it with the seven midpoints. A
value exactly between two levels goes to the larger one. A value that
rounds to level 0 gets code `0000`. No ReLU is applied: the sign bit is
kept.

## Blocks and data path

```
 s_wt_data ─────────────────► shuff_decoder ─► weight_buffer (2 banks) ─┐
 (32 bit, S-Huff words)                                                 ▼
 s_data ─► pingpong_buffer ─► line_buffer ─► 8x9 window ─► plut_complex ─► out_stage ─► pingpong_buffer ─► m_data
 (32 bit)  (input, 2x64)      (2 row memories)            (64 x plut_conv3x3) (8 x act_quantizer) (output, 2x64)
 AXI4-Lite ─► axil_regs ─► accel_ctrl (loads, passes)    plut_table (36 x 32 bit) ─► all 64 conv units
```

| module | role |
|---|---|
| `plut_pkg` | sizes, code/struct types, `tri_addr`, `lut_product`, register map |
| `plut_table` | the 36-entry P-LUT, written over AXI, read in full by every unit |
| `plut_conv3x3` | one 3x3 convolution: 9 table reads with sign XOR, adder tree; 2 stages |
| `plut_complex` | 8 output lanes x 8 input-channel units, channel sum; 3-stage pipeline |
| `shuff_decoder` | S-Huff bit stream to 576 weight codes, one per cycle |
| `weight_buffer` | two banks of one 8x8x3x3 tile; the decoder fills the shadow bank |
| `line_buffer` | two row memories plus a 3x3 register window; stride 1 or 2 |
| `act_quantizer` | shift, clip, nearest level (combinational) |
| `out_stage` | packs 8 codes per word, or sends 8 raw words; drives the pipeline enable |
| `pingpong_buffer` | two-bank stream buffer; one bank fills while the other drains |
| `axil_regs` | AXI4-Lite slave with the registers below |
| `accel_ctrl` | background weight loads; pass sequencer: LOAD (wait for tile, swap) → RUN → DONE |
| `plut_accel` | top level |

The whole pipeline has one enable, the output stage's `can_accept`. When
the output stage cannot take a pixel, the line buffer stops accepting input
and every pipeline register holds its value. Backpressure on `m_ready`
therefore propagates back to `s_ready`. So does raw mode, which needs eight
output cycles per pixel. No data is dropped. The weight path is not part of
this pipeline: the decoder only writes the inactive bank and never stalls
the pixels.

## Passes and weight loads

A **pass** convolves one image of 8 input channels with one weight tile of
8 output x 8 input channels x 3x3. Deeper layers take several passes (see
*Host responsibilities*).

The pixels of a pass arrive on the pixel stream `s_*`: `W*H` words in
raster order. Bits `4*c+3 .. 4*c` of a word hold the code of input channel
`c`. The last word must carry `s_last`, because it releases the partly
filled last bank of the input buffer.

Weight tiles arrive separately, on the weight stream `s_wt_*`, one tile of
`WWORDS` words per **load** command. Loads and passes are decoupled:

* A load decodes a tile into the shadow bank. A load requested while the
  decoder is busy, or while a decoded tile is still waiting, is remembered
  and starts as soon as that is over.
* A decoded tile stays **pending** until a pass is started with the
  *new tile* bit. That pass first waits for any requested or running decode,
  then swaps the banks and streams its pixels.
* A pass without the *new tile* bit reuses the active tile at once. A
  background decode may keep running meanwhile.

The usual schedule is therefore: start pass *k*, then request the load of
the tile for pass *k+1*. Its decode (576 cycles) then overlaps pass *k*,
and pass *k+1* starts without waiting. A one-off pass writes start, load and
new tile in a single CTRL write and waits for its own tile.

The output is `((H-3)/S+1) * ((W-3)/S+1)` pixels for stride `S`, in raster
order, with `m_last` on the final word. In quantized mode each pixel is one
word, with output channel `o` in bits `4*o+3 .. 4*o`. In raw mode each pixel
is eight words, the signed 32-bit sums of channels 0..7 in that order.

There is no padding logic. A "same" convolution is run by sending the image
with its one-pixel zero border, which is why the row memories hold 58 pixels:
a 56x56 layer plus its border.

Weight tile order in the stream and in the buffer: weight `(o, c, ky, kx)`
is the `((o*8 + c)*9 + 3*ky + kx)`-th weight decoded. The same tap numbering
`3*ky + kx` is used for the window.

## S-Huff weight stream

Bits are read most significant bit first from each 32-bit word. Each weight
is one of:

```
0                        zero weight
1  s  <canonical code>   non-zero weight, s = sign, code of magnitude index 1..7
```

The Huffman code is canonical and is described by two registers:

* `HCOUNT`: 3 bits per code length 1..7 (bits `3*(l-1)+2 .. 3*(l-1)`), the
  number of codes of length `l`.
* `HSYM`: 3 bits per position 0..6, the magnitude indices in canonical order
  (shortest code first, then by code value).

The decoder rebuilds the first code of each length with
`first[1] = 0`, `first[l] = (first[l-1] + count[l-1]) << 1`. A code of length `l`
is valid when `code - first[l] < count[l]`. Its symbol is
`HSYM[offset[l] + code - first[l]]`, where `offset[l]` is the sum of the
counts of shorter codes. Each tile starts on a word boundary. The bits after
its last weight, up to the end of word `WWORDS`, are ignored, so the decoder
never reads into the pixels.

Internally the decoder keeps a 64-bit bit buffer. It loads a word whenever
32 bits or fewer are left, and emits one weight whenever the buffer holds
the flag, sign and code. Because a weight is at most 9 bits, it emits one
weight per cycle unless the weight stream stalls.

## Register map (AXI4-Lite, 32-bit, byte addresses)

| addr | name | bits |
|---|---|---|
| 0x000 | CTRL | [0] start (ignored while busy), [1] raw output mode, [2] load a tile (accepted at any time), [3] the pass uses the next decoded tile (taken with start) |
| 0x004 | STATUS | [0] busy, [1] done (sticky, cleared by the next start), [2] load requested or decoding, [3] decoded tile pending |
| 0x008 | WIDTH | image width in pixels, 3..58 |
| 0x00C | HEIGHT | image height, >= 3 |
| 0x010 | STRIDE | 1 or 2 |
| 0x014 | SHIFT | signed 6-bit power-of-two shift of the outputs |
| 0x018 | WWORDS | words of the next tile on the weight stream |
| 0x01C | HCOUNT | Huffman code counts per length |
| 0x020 | HSYM | Huffman symbols in canonical order |
| 0x024 | OUTCNT | read only: output pixels of the last pass |
| 0x040..0x05C | LEVEL0..7 | activation levels used by the quantizer |
| 0x100..0x18C | LUT0..35 | P-LUT entries, triangular order |

Writes take address and data in the same cycle (`awvalid && wvalid`). The
slave answers with OKAY and does not use byte strobes. `irq` pulses for one
cycle at the end of each pass, when the last output word has entered the
output buffer.

Typical use:
1. Write the levels and the LUT once.
2. For a load, wait for STATUS[2] = 0. Write WWORDS and the Huffman table,
   set CTRL[2], and queue the tile's words on the weight stream.
3. For a pass, write the geometry and SHIFT. Then write CTRL with bit 0,
   plus bit 3 if the pass uses the newly loaded tile. Stream the pixels,
   drain the output, and wait for `irq`.

The decoder reads WWORDS, HCOUNT and HSYM directly, so leave them alone
while STATUS[2] is set. The pass registers may be rewritten while a pass
runs; the next start uses the new values.

## Timing

* Weight load: about one cycle per weight (576) plus a few cycles. A
  compressed tile is about 50–200 words, so the decoder, not the bus, sets
  the load time. The load runs in parallel with a pass.
* Pixels: one pixel per cycle. The first output appears after two image rows
  plus about 6 cycles of pipeline. Stride 2 still reads every pixel.
* Raw mode: eight cycles per output pixel.
* Measured at the default sizes, a full 58x58 pass whose tile was decoded
  during the previous pass takes `58*58 + 130` cycles without backpressure.
  The pass is only lengthened when the decode started less than 576 cycles
  before it, as happens for small feature maps.

## Host responsibilities and departures

These points are deliberate limits of this implementation:

* **Layer size.** A pass is fixed at 8 input x 8 output channels and a 3x3
  kernel. Bigger layers are split into 8x8 channel tiles by the host.
  Partial sums over input-channel groups are collected in raw mode and added
  by the host, which also applies the final quantization for those layers.
  A 1x1 convolution runs as a 3x3 kernel whose only non-zero tap is the
  centre. The 7x7 stem layer of a ResNet cannot be run.
* **Padding** is part of the pixel stream, not generated on chip.
* **One decoder, one weight per cycle.** The original accelerator decodes
  about 6–8 times faster (for the 128-channel ResNet18 stage, roughly
  0.25 ms of decoding where this design needs about 1.75 ms at 300 MHz).
  The single decoder here is the simplest one that meets the format.
  Background decoding hides it for feature maps of about 24x24 and larger.
  For smaller maps (7x7, 14x14) the decode sets the pace of the passes.
* **Separate weight stream.** Weights and pixels come on two streams, so
  that decoding can overlap computation. A DMA with two read channels, or a
  stream splitter, feeds them.
* **Only 4-bit codes** (8 levels). 3-bit models run by leaving levels
  unused. 5- and 6-bit models would need a 16- or 32-level table, which the
  package sizes are not set up for.
* **Not included:** the DMA engine that feeds the two streams, the host
  processor, and the general-purpose compression stage that is applied on
  top of the S-Huff stream in storage. That stage is undone in software
  before the stream reaches the accelerator.
* The fixed-point format (24 fractional bits), the stream formats, the
  Huffman table format, the buffer depths (64 words per bank) and the
  register map are this design's own choices.

## Simulation

All RTL is synthesizable SystemVerilog-2017. The package must come first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/plut_pkg.sv tb/plut_tb_pkg.sv rtl/plut_table.sv rtl/plut_conv3x3.sv \
  rtl/plut_complex.sv rtl/shuff_decoder.sv rtl/weight_buffer.sv \
  rtl/line_buffer.sv rtl/pingpong_buffer.sv rtl/act_quantizer.sv \
  rtl/out_stage.sv rtl/axil_regs.sv rtl/accel_ctrl.sv rtl/plut_accel.sv \
  tb/tb_plut_accel.sv --top-module tb_plut_accel -o sim
./obj_dir/sim
```

Any other testbench builds the same way with its own `--top-module`. Each
testbench prints `TB_RESULT checks=N failures=M` and stops, and each has a
watchdog that counts a failure if the design hangs. The simulator has no X
state, so all state that is read is reset.

| testbench | what it checks against an independent model |
|---|---|
| `tb_plut_table` | triangular writes, either index order, reset |
| `tb_plut_conv3x3` | random windows and weights against sums of level products, with stalls |
| `tb_plut_complex` | 64-unit engine, all lanes and channels, 3-cycle latency |
| `tb_shuff_decoder` | streams from a reference encoder with random canonical tables, input gaps, word count, rate |
| `tb_weight_buffer` | shadow write, swap, bank isolation |
| `tb_line_buffer` | windows of random images, stride 1 and 2, stalls |
| `tb_pingpong_buffer` | ordering, last handling, random gaps and backpressure |
| `tb_act_quantizer` | random sums and shifts against a direct nearest-level search, clip, sign of zero |
| `tb_out_stage` | quantized packing, raw order, backpressure, throughput, clip count |
| `tb_axil_regs` | every register, start/load/new-tile bits, status, P-LUT forwarding |
| `tb_accel_ctrl` | sequencing, stride-2 completion, load requests, pending tiles, waiting and background loads |
| `tb_plut_accel` | five passes through the whole design at default sizes |
| `tb_resnet_conv3` | a 16x16-channel slice of two ResNet18 128-channel-stage layers (56x56 stride 2, then 28x28), tiled into 8 passes with host accumulation |

`tb_plut_accel` uses the top's default parameters. Its passes include a
full 58x58 image, stride 1 and 2, new and reused weights, tiles decoded
with their pass or during the previous pass, quantized and raw output, and
positive and negative shifts with clipping. It adds random input
gaps and output backpressure. Every output word is compared with a reference
convolution, and each mechanism (bank swap, reuse, zero weights, raw-mode
stalls, background decoding, waiting for a tile, backpressure, buffer bank changes, clipping, interrupts) is counted
and must occur. It also checks the cycle count of the full-size pass: one pixel per cycle,
with the decode of its tile hidden behind the pass before.

`tb_resnet_conv3` shows how software drives the accelerator on a real layer
shape. It splits 16 input and 16 output channels into 2 x 2 passes, adds
the raw partial sums of the two input groups, re-quantizes the result, adds
the zero border, and feeds it to the next layer. It checks every partial
sum, both layers' full sums and each pass's cycle count. In raw mode a pass
takes 8 cycles per output pixel plus 1 per input pixel that completes no
window; decode time is hidden after the first pass.

Assertions in the modules check the bus and stream rules: AXI response
hold, stream data stable while stalled, no buffer overwrite, and no decoder
overrun.
