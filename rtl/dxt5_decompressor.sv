// dxt5_decompressor: combinational DXT5 texel decompressor (color plus
// interpolated transparency).
//
// A 128-bit DXT5 block encodes 4x4 texels. The low 64 bits hold the
// transparency: two 8-bit references and a 3-bit code per texel, decoded by
// dxt5_alpha_decoder. The high 64 bits hold the color exactly as a DXT1
// block, decoded by the same dxt_color_decoder as DXT1 but always with the
// four-color rules (force_four_color tied high).
//
// Block layout (bit 0 = bit 0 of the first byte of the block):
//   [7:0]    alpha0     [15:8]    alpha1
//   [63:16]  alpha codes, texel (x,y) at bits 16 + 3*(4*y + x) +: 3
//   [79:64]  color0     [95:80]   color1 (RGB565)
//   [127:96] color codes, texel (x,y) at bits 96 + 2*(4*y + x) +: 2
//
// Interface: block, texel_x (column), texel_y (row) in; rgba out. Purely
// combinational: one texel per evaluation.
module dxt5_decompressor
  import texdec_pkg::*;
(
  input  logic [DXT5_BLOCK_BITS-1:0] block,
  input  logic [1:0]                 texel_x,
  input  logic [1:0]                 texel_y,
  output rgba8888_t                  rgba
);

  logic [3:0]  texel;
  logic [47:0] alpha_codes;
  logic [31:0] color_codes;
  logic [2:0]  alpha_code;
  logic [1:0]  color_code;
  rgb888_t     rgb;
  logic [7:0]  alpha;

  assign texel       = {texel_y, texel_x};
  assign alpha_codes = block[63:16];
  assign color_codes = block[127:96];
  assign alpha_code  = alpha_codes[3*texel +: 3];
  assign color_code  = color_codes[2*texel +: 2];

  dxt5_alpha_decoder u_alpha (
    .alpha0 (block[7:0]),
    .alpha1 (block[15:8]),
    .code   (alpha_code),
    .alpha  (alpha)
  );

  dxt_color_decoder u_color (
    .color0           (rgb565_t'(block[79:64])),
    .color1           (rgb565_t'(block[95:80])),
    .code             (color_code),
    .force_four_color (1'b1),
    .rgb              (rgb)
  );

  assign rgba = '{r: rgb.r, g: rgb.g, b: rgb.b, a: alpha};

endmodule
