// dxt1_decompressor: combinational DXT1 texel decompressor for color-only
// textures (the RGB flavour of DXT1, where code 3 of a three-color block is
// black).
//
// A 64-bit DXT1 block encodes 4x4 texels: two RGB565 reference colors and a
// 2-bit code per texel. The texel position selects its code from the 32 code
// bits (a 16-to-1 multiplexer of 2-bit fields) and dxt_color_decoder turns
// the references and the code into an RGB888 color.
//
// Block layout (the little-endian byte order of the format, bit 0 = bit 0 of
// the first byte):
//   [15:0]  color0 (RGB565)    [31:16] color1 (RGB565)
//   [63:32] codes, texel (x,y) at bits 32 + 2*(4*y + x) +: 2
//
// Interface: block, texel_x (column), texel_y (row) in; rgb out. Purely
// combinational: one texel per evaluation, no clock and no latency in cycles.
module dxt1_decompressor
  import texdec_pkg::*;
(
  input  logic [DXT1_BLOCK_BITS-1:0] block,
  input  logic [1:0]                 texel_x,
  input  logic [1:0]                 texel_y,
  output rgb888_t                    rgb
);

  logic [3:0]  texel;
  logic [31:0] codes;
  logic [1:0]  code;

  assign texel = {texel_y, texel_x};
  assign codes = block[63:32];
  assign code  = codes[2*texel +: 2];

  dxt_color_decoder u_color (
    .color0           (rgb565_t'(block[15:0])),
    .color1           (rgb565_t'(block[31:16])),
    .code             (code),
    .force_four_color (1'b0),
    .rgb              (rgb)
  );

endmodule
