# Texel decompressors for DXT1, DXT5 and ETC

A GPU's texture unit reads textures that are stored compressed, so that each
texel fetch costs less memory bandwidth. Texture compression formats use a
fixed rate: every 4x4 block of texels is packed into the same number of bits.
Any texel can then be found and decoded from its block alone, with no
indirection and no need to decode the rest of the image. The decoder sits in
the sampling path and may be replicated for several texels per clock, so it
has to be small and fast.

This library contains three such decoders. Each one is combinational and
decodes one texel of one block per evaluation:

| unit                | format                          | block    | output     |
|---------------------|---------------------------------|----------|------------|
| `dxt1_decompressor` | DXT1 / S3TC, color-only variant | 64 bits  | RGB888     |
| `dxt5_decompressor` | DXT5 / S3TC, color + alpha      | 128 bits | RGBA8888   |
| `etc_decompressor`  | ETC (ETC1)                      | 64 bits  | RGB888     |

`texture_decompressors` places the three units side by side, each with its
own ports, so that they can be compared or used together. The DXT decoders
need fixed divisions by 3, 5 and 7. ETC needs only additions. That difference
is the main reason ETC is the cheaper decoder, and it is why ETC is aimed at
mobile GPUs with tight area budgets.

## Interface and timing

Every unit has the same shape:

```
input  logic [N-1:0] block     // the compressed block
input  logic [1:0]   texel_x   // column inside the block, 0..3
input  logic [1:0]   texel_y   // row inside the block, 0..3
output <color>                  // texdec_pkg::rgb888_t or rgba8888_t
```

There is no clock, reset or handshake. The output is valid one propagation
delay after the inputs change. To decode N texels per cycle, instantiate N
units. To meet a clock, put registers before and after a unit. The library
does not pipeline them itself.

The colors are packed structs from `texdec_pkg`. Red is the most significant
byte, and in `rgba8888_t` alpha is the least significant byte.

## DXT color: two references and an interpolation

A DXT color block holds two RGB565 reference colors and a 2-bit code per
texel. The decoder widens both references to 8 bits per channel by bit
replication (`{r5, r5[4:2]}`, `{g6, g6[5:4]}`). It then compares the
references as unsigned 16-bit words:

| code | color0 > color1 (four-color) | color0 <= color1 (three-color) |
|------|------------------------------|--------------------------------|
| 0    | color0                       | color0                         |
| 1    | color1                       | color1                         |
| 2    | (2*color0 + color1) / 3      | (color0 + color1) / 2          |
| 3    | (color0 + 2*color1) / 3      | black                          |

DXT5's color half always uses the four-color rules, whatever the order of
the references. `dxt_color_decoder` serves both formats through its
`force_four_color` input. DXT1 ties this input low and DXT5 ties it high.

### Division without dividers

Dividing by 3 is the longest path in the DXT color decoder. No divider is
built. Each channel does the following:

1. The low bit of the code picks which reference is doubled. One adder then
   forms `2*a + b`, which is at most 765. A single adder therefore serves both
   thirds.
2. That sum is multiplied by the constant 683 and shifted right by 11 bits.

Because 683/2048 is slightly more than 1/3, the result is `n/3 + n/6144`.
For n <= 765 the error is below 0.125. The largest fractional part of n/3 is
2/3, so the error never carries into the next integer, and the result equals
`floor(n/3)` for every possible sum. Halving is a shift. All divisions
truncate.

The DXT5 alpha decoder uses the same idea with a 14-bit shift. It multiplies
by 2341 for /7 (sums up to 1785) and by 3277 for /5 (sums up to 1275). Both
give the exact floor over their ranges. The color part thus needs one
constant multiplier per channel, three in all. The alpha part needs one
reciprocal multiplier plus the two small weight products described below.

## DXT5 alpha

The alpha half of a DXT5 block holds two 8-bit references and a 3-bit code
per texel:

| code k | alpha0 > alpha1                 | alpha0 <= alpha1                |
|--------|---------------------------------|---------------------------------|
| 0, 1   | alpha0, alpha1                  | alpha0, alpha1                  |
| 2..5   | ((8-k)*a0 + (k-1)*a1) / 7       | ((6-k)*a0 + (k-1)*a1) / 5       |
| 6, 7   | ((8-k)*a0 + (k-1)*a1) / 7       | 0 and 255                       |

`dxt5_alpha_decoder` derives the weight of alpha1 as `k-1` and the weight of
alpha0 as `7-(k-1)` or `5-(k-1)`. It forms the weighted sum with two narrow
(3-bit by 8-bit) products, then applies the reciprocal multiplier for the
current mode.

## ETC: base color plus luminance modifier

An ETC block splits its 4x4 texels into two halves. With flip = 0 these are
the left and right 2x4 halves. With flip = 1 they are the top and bottom 4x2
halves. Each half (sub-block) has a base color and one of eight luminance
tables. Each texel has a 2-bit index into its sub-block's table. The decoder
adds the selected modifier to all three channels of the base color and clamps
the result to 0..255.

There are two ways to code the base colors, selected by the diff bit:

* Individual (diff = 0): two RGB444 colors, each widened as `x*17`.
* Differential (diff = 1): one RGB555 color, plus a signed 3-bit delta per
  channel for the second sub-block (`c2 = c1 + delta`, modulo 32). Both
  colors are widened by bit replication. Valid encoders never make the sum
  leave 0..31.

The tables hold a small magnitude a and a large magnitude b. The index gives
+a, +b, -a or -b. The eight (a, b) pairs are (2,8), (5,17), (9,29), (13,42),
(18,60), (24,80), (33,106) and (47,183), in `texdec_pkg::etc_modifier`.

`etc_decompressor` first works out which sub-block the texel lies in:
`texel_y[1]` when flip = 1, otherwise `texel_x[1]`. It then selects that
sub-block's base color and table, so only one adder with a clamp is needed
per channel. There are no multipliers.

## Block layouts

DXT bit numbering: bit 0 is bit 0 of the block's first byte (the formats'
little-endian words). Texel `(x, y)` is number `i = 4*y + x`.

```
DXT1   [15:0] color0   [31:16] color1   [63:32] 2-bit code of texel i at 32+2i
DXT5   [7:0] alpha0    [15:8] alpha1    [63:16] 3-bit alpha code at 16+3i
       [79:64] color0  [95:80] color1   [127:96] 2-bit color code at 96+2i
```

ETC bit numbering: bit 63 is the most significant bit of the first byte.
Texels are numbered down the columns, `j = 4*x + y`.

```
individual    [63:60] R1 [59:56] R2 [55:52] G1 [51:48] G2 [47:44] B1 [43:40] B2
differential  [63:59] R1 [58:56] dR [55:51] G1 [50:48] dG [47:43] B1 [42:40] dB
both          [39:37] table 1  [36:34] table 2  [33] diff  [32] flip
              index of texel j = {bit 16+j, bit j}
```

## Files

* `rtl/texdec_pkg.sv`: color structs, block sizes, reciprocal constants,
  widening functions and the ETC modifier table.
* `rtl/dxt_color_decoder.sv`: the DXT color interpolation, shared by DXT1 and DXT5.
* `rtl/dxt1_decompressor.sv`: selects the texel code and calls the color decoder.
* `rtl/dxt5_alpha_decoder.sv`: the DXT5 alpha interpolation.
* `rtl/dxt5_decompressor.sv`: alpha decoder plus color decoder in four-color mode.
* `rtl/etc_decompressor.sv`: the ETC decoder.
* `rtl/texture_decompressors.sv`: the top level, with the three units side by side.
* `tb/texdec_ref_pkg.sv`: reference decoders that use true integer division,
  a lookup array for the ETC tables and whole-block decoding.
* `tb/tb_<module>.sv`: one self-checking testbench per module.

## Verification

Each testbench compares the unit under test with the reference decoders in
`tb/texdec_ref_pkg.sv`, one vector per clock. Each has a watchdog. Each ends
by printing `TB_RESULT checks=N failures=M`.

* `tb_dxt5_alpha_decoder` is exhaustive: every pair of references with every
  code, 524,288 vectors.
* `tb_dxt_color_decoder` drives corner cases and about 21,000 random
  reference pairs, each with every code, with and without forcing. The
  corner cases include 1,000 random equal pairs, which sit on the mode
  boundary.
* `tb_dxt1_decompressor`, `tb_dxt5_decompressor` and `tb_etc_decompressor`
  decode all 16 texels of 4,000 random blocks. The blocks are steered so that
  every mode occurs: both reference orders, all four diff/flip combinations,
  and saturated ETC base colors so that the clamp acts.
* `tb_texture_decompressors` runs all three units at once on 3,000 blocks
  each. It also counts how often each mechanism occurred and fails if any
  count is zero. The mechanisms are four- and three-color DXT1 blocks, thirds,
  halves, black texels, both DXT5 alpha modes, forced 0 and 255 alphas,
  four-color decoding with color0 <= color1, both ETC modes, both flips, a
  negative delta, and clamping at 0 and 255.

Each testbench was also run against a deliberately broken copy of its unit.
Every one of them reported failures.

The reference model and the RTL both follow the public DXT and ETC1
definitions. The tests therefore show that the two agree. They do not
compare against images from a third-party encoder.

### Running a test with Verilator

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/texdec_pkg.sv tb/texdec_ref_pkg.sv \
  rtl/dxt_color_decoder.sv rtl/dxt1_decompressor.sv rtl/dxt5_alpha_decoder.sv \
  rtl/dxt5_decompressor.sv rtl/etc_decompressor.sv rtl/texture_decompressors.sv \
  tb/tb_texture_decompressors.sv --top-module tb_texture_decompressors
./obj_dir/Vtb_texture_decompressors
```

To test a single unit, swap in its testbench and top module name. Each run
takes well under a second.

## Design choices and limits

* **Rounding.** Every interpolation truncates. Some DXT decoders round, or
  keep extra precision in the interpolated colors. Outputs can therefore
  differ by one code from such decoders. To round, add half the divisor to
  the sum before the multiply; the reciprocal ranges still hold.
* **Widening before interpolating.** RGB565 colors are widened to 8 bits
  first and then interpolated. Interpolating on 5/6-bit values instead would
  save a few adder bits but lose precision.
* **DXT1 is the color-only variant.** Code 3 of a three-color block is
  black, and there is no alpha output. For the punch-through-alpha DXT1
  variant, a 1-bit alpha would have to be added, clear exactly for that code.
* **ETC differential overflow.** The sum wraps modulo 32. Later formats use
  this case to signal extra modes; ETC1 encoders never produce it.
* **No pipelining.** The units are purely combinational, as is usual for
  this kind of block. Registers are left to the surrounding texture unit.
* **Structure.** The color path reuses one adder and one constant multiplier
  for both thirds. ETC selects the sub-block before adding. Both are choices
  of this implementation and change area, not results. DXT5's color path is
  the DXT1 decoder with the mode forced, and synthesis removes the comparator
  that is no longer used.
