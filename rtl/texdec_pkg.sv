// texdec_pkg: types, constants and small pure functions shared by the DXT1,
// DXT5 and ETC texel decompressors.
//
// Every decompressor in this library works on one 4x4 texel block and one
// texel position (texel_x = column 0..3, texel_y = row 0..3) at a time and is
// purely combinational. Colors leave the decoders as 8-bit-per-channel
// structs. The bit layouts of the compressed blocks follow the public DXT1/DXT5
// (S3TC) and ETC1 formats; the constants for the fixed divisions by 3, 5 and 7
// and the exact ETC luminance table values are this library's own choices and
// are documented next to each constant.
package texdec_pkg;

  // 8-bit-per-channel color, red in the most significant byte.
  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb888_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
    logic [7:0] a;
  } rgba8888_t;

  // A 16-bit RGB565 reference color as stored in a DXT block.
  typedef struct packed {
    logic [4:0] r;
    logic [5:0] g;
    logic [4:0] b;
  } rgb565_t;

  // Sizes of the compressed blocks.
  localparam int unsigned DXT1_BLOCK_BITS = 64;
  localparam int unsigned DXT5_BLOCK_BITS = 128;
  localparam int unsigned ETC_BLOCK_BITS  = 64;

  // Reciprocal constants replacing the fixed dividers: floor(n/d) equals
  // (n * RECIP) >> SHIFT for every n the decoders can produce
  // (n <= 3*255 for /3, n <= 5*255 for /5, n <= 7*255 for /7).
  localparam int unsigned DIV3_RECIP = 683;   // ceil(2^11 / 3)
  localparam int unsigned DIV3_SHIFT = 11;
  localparam int unsigned DIV5_RECIP = 3277;  // ceil(2^14 / 5)
  localparam int unsigned DIV7_RECIP = 2341;  // ceil(2^14 / 7)
  localparam int unsigned DIV57_SHIFT = 14;

  // Channel widening by bit replication: the top bits of the narrow value are
  // repeated into the new low bits, so 0 maps to 0 and all-ones to 255.
  function automatic logic [7:0] expand4(input logic [3:0] v);
    return {v, v};
  endfunction

  function automatic logic [7:0] expand5(input logic [4:0] v);
    return {v, v[4:2]};
  endfunction

  function automatic logic [7:0] expand6(input logic [5:0] v);
    return {v, v[5:4]};
  endfunction

  // ETC luminance modifier: table selects one of the eight predefined tables
  // and idx = {msb, lsb} the entry. Each table holds a small magnitude a and a
  // large magnitude b; idx 0..3 gives +a, +b, -a, -b. The magnitudes are the
  // values of the ETC1 format.
  function automatic logic signed [8:0] etc_modifier(input logic [2:0] table_sel,
                                                      input logic [1:0] idx);
    logic [7:0] mag;
    unique case ({table_sel, idx[0]})
      4'b000_0: mag = 8'd2;
      4'b000_1: mag = 8'd8;
      4'b001_0: mag = 8'd5;
      4'b001_1: mag = 8'd17;
      4'b010_0: mag = 8'd9;
      4'b010_1: mag = 8'd29;
      4'b011_0: mag = 8'd13;
      4'b011_1: mag = 8'd42;
      4'b100_0: mag = 8'd18;
      4'b100_1: mag = 8'd60;
      4'b101_0: mag = 8'd24;
      4'b101_1: mag = 8'd80;
      4'b110_0: mag = 8'd33;
      4'b110_1: mag = 8'd106;
      default:  mag = (idx[0]) ? 8'd183 : 8'd47;
    endcase
    return idx[1] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
  endfunction

endpackage
