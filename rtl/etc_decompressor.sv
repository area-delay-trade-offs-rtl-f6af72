// etc_decompressor: combinational ETC (Ericsson Texture Compression, ETC1
// format) texel decompressor.
//
// A 64-bit ETC block encodes 4x4 texels split into two sub-blocks of 2x4
// (flip = 0: left and right halves) or 4x2 (flip = 1: top and bottom halves).
// Each sub-block has a base color and one of eight luminance tables; each
// texel has a 2-bit modifier index into its sub-block's table. A texel's
// color is its sub-block's base color plus the selected modifier, added to
// all three channels and clamped to 0..255. No multiplication is needed.
//
// Base colors come in two modes, chosen per block by the diff bit:
//   individual   (diff = 0): two RGB444 colors, each widened by replication
//   differential (diff = 1): an RGB555 color for sub-block 0 and a signed
//                 3-bit delta per channel giving sub-block 1 (R2 = R1 + dR,
//                 modulo 32), both widened by replication
//
// Block layout (bit 63 = most significant bit of the first byte):
//   individual:   [63:60] R1 [59:56] R2 [55:52] G1 [51:48] G2 [47:44] B1 [43:40] B2
//   differential: [63:59] R1 [58:56] dR [55:51] G1 [50:48] dG [47:43] B1 [42:40] dB
//   [39:37] table of sub-block 0   [36:34] table of sub-block 1
//   [33] diff   [32] flip
//   [31:16] index msbs, [15:0] index lsbs; texel (x,y) uses bit 4*x + y
//
// The texel's sub-block is decided first, so only one base color, one table
// and one adder per channel sit on the path. The modes and the split into
// sub-blocks follow the description of ETC; the bit layout, the table values
// (texdec_pkg::etc_modifier) and the modulo-32 differential sum are those of
// the ETC1 format.
//
// Interface: block, texel_x (column), texel_y (row) in; rgb out. Purely
// combinational: one texel per evaluation.
module etc_decompressor
  import texdec_pkg::*;
(
  input  logic [ETC_BLOCK_BITS-1:0] block,
  input  logic [1:0]                texel_x,
  input  logic [1:0]                texel_y,
  output rgb888_t                   rgb
);

  logic             diff, flip, second;
  logic [3:0]       idx_bit;
  logic [15:0]      idx_msb, idx_lsb;
  logic [1:0]       mod_idx;
  logic [2:0]       table_sel;
  logic signed [8:0] modifier;
  logic [2:0][7:0]  base;       // [2] red, [1] green, [0] blue
  logic [2:0][7:0]  chan_out;

  assign diff = block[33];
  assign flip = block[32];

  // Sub-block of the texel: right half (flip = 0) or bottom half (flip = 1).
  assign second = flip ? texel_y[1] : texel_x[1];

  // Texels are numbered down the columns for the index bits.
  assign idx_bit = {texel_x, texel_y};
  assign idx_msb = block[31:16];
  assign idx_lsb = block[15:0];
  assign mod_idx = {idx_msb[idx_bit], idx_lsb[idx_bit]};

  assign table_sel = second ? block[36:34] : block[39:37];
  assign modifier  = etc_modifier(table_sel, mod_idx);

  // Base color channels: field position of R, G, B in the upper 24 bits.
  for (genvar ch = 0; ch < 3; ch++) begin : g_base
    localparam int unsigned HI = 63 - 8 * ch;  // 63, 55, 47
    logic [4:0] c5_0, c5_1;
    logic [2:0] delta;

    assign c5_0  = block[HI -: 5];
    assign delta = block[HI - 5 -: 3];
    assign c5_1  = c5_0 + {{2{delta[2]}}, delta};

    always_comb begin
      if (diff) base[2-ch] = expand5(second ? c5_1 : c5_0);
      else      base[2-ch] = expand4(second ? block[HI-4 -: 4] : block[HI -: 4]);
    end
  end

  // One adder with clamping per channel.
  for (genvar ch = 0; ch < 3; ch++) begin : g_add
    logic signed [9:0] sum;
    logic [7:0]        val;

    assign sum = $signed({2'b00, base[ch]}) + 10'(modifier);

    always_comb begin
      if (sum < 0)         val = 8'd0;
      else if (sum > 255)  val = 8'd255;
      else                 val = sum[7:0];
    end

    assign chan_out[ch] = val;
  end

  assign rgb = rgb888_t'(chan_out);

endmodule
