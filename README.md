# FSRCNN super-resolution engine with layer fusion

This is synthesizable SystemVerilog for a CNN super-resolution accelerator. It runs
FSRCNN, the "fast" super-resolution network. FSRCNN works on the low-resolution (LR)
image and enlarges it only in its last layer, a 9x9 deconvolution. A direct mapping
of such a network to hardware sends every intermediate feature map to external
memory and back. That traffic is far larger than a video-rate bus can carry. Three
ideas bring it down and keep the multipliers busy:

* **Layer fusion.** The eight layers are run in two fused groups. Each group works
  on a tile, and everything between the group's first input and its last output
  stays in on-chip SRAM. The split is 6-2: feature extraction, shrinking and the
  four mapping layers form group 0; expanding and the deconvolution form group 1.
  Only the 12-channel map between the groups goes off chip. At 10 bits per
  channel, one of its pixels fills one 128-bit bus beat.
* **Dynamic quantization.** Activations and weights are 10-bit fixed-point words.
  Each layer has its own binary-point position. In hardware this becomes one
  right-shift amount per layer, applied by a shift adder after the adder trees.
* **Deconvolution as convolution.** A stride-s 9x9 deconvolution is rewritten as
  s² small convolutions on the LR map, one per output phase. The same multiplier
  array therefore serves every layer. The sub-kernels shrink as the scale grows:
  5x5 for x2, 3x3 for x3 and x4.

Supported upscaling factors are x2, x3 and x4, chosen at run time.

## Network and fused groups

FSRCNN(d, s, m) with the defaults d = 56, s = 12, m = 4 (`D`, `S`, `M` parameters):

| group | layer | operation | window | in → out channels | PReLU |
|---|---|---|---|---|---|
| 0 | 0 | feature extraction | 5x5 | 1 → 56 | yes |
| 0 | 1 | shrinking | 1x1 | 56 → 12 | yes |
| 0 | 2–5 | mapping | 3x3 | 12 → 12 | yes |
| 1 | 0 | expanding | 1x1 | 12 → 56 | yes |
| 1 | 1 | deconvolution, as s² sub-pixel convolutions | ⌈9/s⌉ | 56 → s² | no |

All convolutions are "valid". A layer with a KxK window makes the map K−1 pixels
smaller, so the host sends each tile with its halo:

* **Group 0.** The halo is 6 pixels on each side. A 20x20 input tile gives an 8x8x12 output.
* **Group 1.** The halo is 2 pixels on each side for x2 and 1 pixel for x3 and x4. An 8x8x12 input
  tile gives 4x4 LR positions at x2 and 6x6 at x3 and x4. Each LR position is an sxs
  block of high-resolution (HR) pixels.

Tile sizes are run-time inputs (`tile_h_i`, `tile_w_i`). They are limited by the SRAM
depth: the largest intermediate map of a run must fit one bank. The default depth
is 3584 words, which is 16x16 pixels x 56 channels in 4-channel words. This allows
a 20x20 tile in group 0 and a 16x16 tile in group 1.

## Deconvolution as sub-pixel convolution

Let W(u, v), with u, v = 0..8, be the 9x9 kernel of one input channel, and s the
scale. Count kernel rows backwards, r = 8 − u. Then

    phase row   qy = r mod s        window row  ky = r div s

Columns work the same way. The tap (u, v) therefore belongs to sub-kernel
qy·s + qx, at window position (ky, kx), in a window of K = ⌈9/s⌉ taps. Each phase's
kernel takes every s-th tap in reverse order.

At x2 this gives four kernels of 5x5, 5x4, 4x5 and 4x4 taps. The first kernel's
top-left tap is W(8,8), the next tap to its right is W(8,6), and its last tap is
W(0,0). The second kernel starts at W(8,7). Taps that fall outside the 9x9 kernel
are zero. This happens for the shorter kernels at x2, and for phases 1–3 at x4.

Sub-kernel q is a normal output channel of a KxK convolution on the expanded
56-channel map. Its window starts at LR position (y, x). It yields the HR pixel at

    ( s·y + (s−1−qy) ,  s·x + (s−1−qx) )

of the tile's output. This is exactly a transposed convolution:

    HR(Y,X) = Σ in(iy,ix) · W(u,v)   over   s·iy + u = Y + 9 − s,  s·ix + v = X + 9 − s

The remapping happens in hardware while the weights load. The host sends each
input channel's original 81 weights. `deconv_remap` computes the phase and the tap
for each weight, and `weight_reg` stores it only if the phase belongs to the lane
group being loaded. When s² exceeds the 4 lanes (9 phases at x3, 16 at x4), the
same kernels are sent once per group of 4 phases. `output_pack` then turns the s²
phase values of one LR position into an sxs block of 8-bit pixels.

The phase-to-position convention above is this design's choice. The
decomposition itself follows the published x2 example.

## Computation unit

`compute_unit` is a pipeline that accepts a new pass every cycle. A pass has one
window of KMAX² = 25 taps x G = 4 input channels, and 4 output lanes.

1. **Multiplier array** (`mult_array`). It has 4 x 4 x 25 = 400 signed 10x10
   multipliers. The window is broadcast to every lane, and each lane has its own
   weights. The products are held in the intermediate data register.
2. **Adder trees and accumulator.** For each lane there are two levels of
   `adder_tree`. A filter-wise tree per input channel sums the 25 taps, and a
   channel-wise tree sums the 4 channels. The lane's 32-bit accumulator adds this
   sum. It is cleared by the first pass of a pixel, and a pixel needs ⌈cin/4⌉
   passes.
3. **Output stage**, on the last pass of a pixel:
   * `quant_shift` shifts the sum right by the layer's shift, rounding half up.
     It then adds the channel's bias and saturates to 10 bits.
   * `prelu_shift` multiplies negative values by the channel's slope. The slope
     is coded as up to two negative powers of two (`e1,p1,e2,p2`: x·a =
     x>>>p1 + x>>>p2). It is implemented with shifters and one adder.

The result appears 3 cycles after the last pass. Smaller windows (3x3, 1x1) use
the first K² taps. Their unused taps have zero weights.

Number format: the shift of layer l is f_in + f_w − f_out. These are the fraction
bits of the layer's input, its weights and its output. Choosing them is the
host's job, done offline per layer. The bias must already be in the output format.

## Dataflow inside a run (`fusion_ctrl`)

1. **Tile load.** One beat is one pixel, channel c in bits [10c+9:10c]. The pixel
   is written as ⌈cin/4⌉ words to bank 0.
2. **For each layer, for each group of 4 output channels:**
   * one parameter beat → `param_reg`;
   * the group's weights → `weight_reg`, one weight per cycle;
   * for each output pixel (row-major) and each input-channel group, the KxK
     window is gathered from the source bank, one tap per cycle, into
     `feature_reg`. Then one pass is issued. Results are written to the
     other bank.
   * the pipeline drains before the next group's parameters are loaded.
3. **Output.** Banks swap after every layer. At the end, the last map is read
   out, one beat per pixel.

An SRAM word holds one pixel's 4-channel group. Channel group g, row y, column x
of an h x w map is at address (g·h + y)·w + x.

Cost per pass is K² cycles. For the default sizes:

* **Group 0, 20x20 tile:** 18,872 passes, about 151,000 cycles including weight
  loading.
* **Group 1, 8x8 tile at x2:** 2,688 expanding passes plus 224 deconvolution passes.

## Bus formats

All streams are valid/ready. Data moves when both are high.

**Input stream of one run**, in order:

1. **Pixel beats.** There are `tile_h*tile_w` beats, row-major.
2. **For every layer, for every output-channel group:**
   * **Parameter beat.** Bits [5:0] hold the shift. Lane i's 24-bit field starts
     at bit 8+24i. Its bits [19:10] hold the bias. Its bits [9:0] hold the slope:
     e1 in bit 9, p1 in bits 8:5, e2 in bit 4, p2 in bits 3:0.
   * **Weight beats.** Each beat carries twelve 10-bit weights, weight j in bits
     [10j+9:10j], packed without gaps. Each group starts on a new beat.
     * Ordinary layers: the order is lane, then input channel, then kernel row,
       then column. Only lanes that exist are sent; 56/4 and 12/4 always fill
       all 4.
     * Deconvolution: all 56 original 9x9 kernels are sent, ordered by channel,
       then row, then column. They are repeated for each group of 4 phases.
     * The unused tail of a group's last beat is ignored.

**Output stream:** one beat per output pixel, row-major.

* **Group 0:** 12 channels of 10 bits.
* **Group 1:** an sxs block of 8-bit HR pixels. Pixel (ry, rx) is in byte
  ry·s + rx, clamped to 0..255.

Control: set `group_i`, `scale_i` and `tile_h_i`/`tile_w_i`, then pulse `start_i`.
`done_o` pulses after the last output beat. Reset is asynchronous, active low.
`n_passes_o` and `n_layers_o` count passes issued and layers completed.

## Sizes and memories

| item | this RTL | note |
|---|---|---|
| data / weight word | 10 / 10 bit | as published |
| bus | 128 bit | as published |
| multipliers | 400 (`G`=4) | not published; parameter |
| feature SRAM | 2 banks x 3584 x 40 bit = 35 kB | published total on-chip memory 53.4 kB |
| weight register | 4 x 56 x 25 x 10 bit = 7 kB of flip-flops | |

## Where this RTL departs from the published design

* **Throughput.** The published chip reaches 960x540 → Full HD at 75/75/62 fps
  (x2/x3/x4) at 200 MHz. This RTL does not come near that rate:
  * The multiplier count and the dataflow that would reach it were not published.
  * This engine gathers one window tap per cycle and does not reuse windows
    between neighbouring pixels.
  * For 1x1 layers, only 16 of the 400 multipliers do useful work.

  At 200 MHz a 960x540 frame takes about 8160 group-0 tiles of ~151k cycles each,
  about 6 s. The architecture is the published one in structure, not in speed.
* **Bandwidth.** Weights are streamed into the weight register for every tile,
  as the published block diagram feeds that register straight from the bus.
  Pixels travel one per beat. So the off-chip traffic per frame is much higher
  than the published 1.05 GB/s at 60 fps: about 17.7 kB per 8x8 group-0 tile,
  8.7 GB/s at 60 fps. Packing several pixels per beat and caching weights across
  tiles would cut this. Neither is built.
* **This design's own choices:**
  * the accumulator across channel groups;
  * biases;
  * the PReLU slope code;
  * rounding and saturation;
  * the beat formats;
  * the tile sizes;
  * the two-bank SRAM organisation;
  * the loop order.
* **Not modelled:** the external memory and system bus. Layer-boundary padding
  of the whole image is also left to the host, which sends tiles with their halo.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. The
package must come first on the command line, and `-Irtl` lets verilator find the
other modules:

    verilator --binary --timing --assert -Irtl rtl/fsrcnn_pkg.sv tb/tb_fsrcnn_sr_top.sv \
              --top-module tb_fsrcnn_sr_top -o sim && obj_dir/sim

**`tb_fsrcnn_sr_top`** runs the whole engine at its default sizes.

* A 20x20 tile goes through group 0. Its 8x8x12 result is fed back through
  group 1 at x2, x3 and x4.
* The expected values come from a plain loop-nest model of the same fixed-point
  arithmetic. That model does the deconvolution as a scatter-form transposed
  convolution, independent of the remapping.
* Weights and parameters are generated by a hash function, so no tables are
  stored.
* The bus has random input gaps and output back-pressure.
* It checks the pass count against the schedule formula. It also requires that
  saturation, negative PReLU inputs, multi-pass accumulation and a partial last
  lane group (9 phases at x3) all occurred.
* It simulates in well under a second.

Each module has its own testbench, `tb/tb_<module>.sv`. `fusion_ctrl` is covered by
the top-level test.

## Files

* `rtl/fsrcnn_pkg.sv`: types, widths, descriptor and parameter layouts.
* `rtl/fsrcnn_sr_top.sv`: top level.
* `rtl/fusion_ctrl.sv`: controller.
* `rtl/layer_table.sv`: layer descriptors.
* `rtl/feature_sram.sv`: SRAM bank.
* `rtl/feature_reg.sv`: feature register.
* `rtl/weight_reg.sv`: weight register.
* `rtl/deconv_remap.sv`: deconvolution index mapping.
* `rtl/param_reg.sv`: parameter register.
* `rtl/compute_unit.sv`: computation unit, built from `mult_array`, `adder_tree`,
  `quant_shift` and `prelu_shift`.
* `rtl/output_pack.sv`: output beat formatting.
