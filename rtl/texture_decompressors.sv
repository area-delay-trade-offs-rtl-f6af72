// texture_decompressors: the three texel decompressors of this library side
// by side - DXT1 (color only), DXT5 (color and transparency) and ETC - each
// with its own block input, texel position and decoded output.
//
// The three units are independent and share nothing at run time (DXT1 and
// DXT5 use separate instances of the same color decoder). Each decodes one
// texel of one compressed 4x4 block per evaluation, without clock or state,
// so a texture unit can place whichever it needs in its sampling path and
// register around it as its timing requires.
//
// Ports, per unit: <unit>_block (64 bits for DXT1 and ETC, 128 for DXT5),
// <unit>_texel_x / <unit>_texel_y (column and row in the block), and the
// decoded color (RGB888 structs, RGBA8888 for DXT5).
module texture_decompressors
  import texdec_pkg::*;
(
  input  logic [DXT1_BLOCK_BITS-1:0] dxt1_block,
  input  logic [1:0]                 dxt1_texel_x,
  input  logic [1:0]                 dxt1_texel_y,
  output rgb888_t                    dxt1_rgb,

  input  logic [DXT5_BLOCK_BITS-1:0] dxt5_block,
  input  logic [1:0]                 dxt5_texel_x,
  input  logic [1:0]                 dxt5_texel_y,
  output rgba8888_t                  dxt5_rgba,

  input  logic [ETC_BLOCK_BITS-1:0]  etc_block,
  input  logic [1:0]                 etc_texel_x,
  input  logic [1:0]                 etc_texel_y,
  output rgb888_t                    etc_rgb
);

  dxt1_decompressor u_dxt1 (
    .block   (dxt1_block),
    .texel_x (dxt1_texel_x),
    .texel_y (dxt1_texel_y),
    .rgb     (dxt1_rgb)
  );

  dxt5_decompressor u_dxt5 (
    .block   (dxt5_block),
    .texel_x (dxt5_texel_x),
    .texel_y (dxt5_texel_y),
    .rgba    (dxt5_rgba)
  );

  etc_decompressor u_etc (
    .block   (etc_block),
    .texel_x (etc_texel_x),
    .texel_y (etc_texel_y),
    .rgb     (etc_rgb)
  );

endmodule
