// dxt_color_decoder: the color half of a DXT (S3TC) texel decoder, shared by
// the DXT1 and DXT5 decompressors.
//
// The two RGB565 reference colors are widened to 8 bits per channel by bit
// replication. Comparing color0 and color1 as unsigned 16-bit numbers picks
// the block's mode:
//   color0 >  color1 (four-color): code 0 color0, 1 color1,
//                                  2 (2*color0+color1)/3, 3 (color0+2*color1)/3
//   color0 <= color1 (three-color): code 0 color0, 1 color1,
//                                  2 (color0+color1)/2, 3 black
// force_four_color = 1 makes the four-color rules apply whatever the order of
// the references (DXT5 color). Divisions truncate.
//
// Per channel, the code's low bit first steers which reference is doubled, so
// one adder and one constant multiplier per channel serve both thirds: the
// divider by 3 is replaced by a multiplication by 683 followed by an 11-bit
// right shift, which gives floor(n/3) exactly for every n up to 765. Halving
// is a shift. The mode rules follow the DXT1 definition; expanding before
// interpolating and truncating the quotient are this design's choices.
//
// Purely combinational, no clock: rgb is valid one propagation delay after the
// inputs.
module dxt_color_decoder
  import texdec_pkg::*;
(
  input  rgb565_t    color0,
  input  rgb565_t    color1,
  input  logic [1:0] code,
  input  logic       force_four_color,
  output rgb888_t    rgb
);

  logic                  four_color;
  logic [2:0][7:0]       c0, c1, res;

  assign four_color = force_four_color || (color0 > color1);

  assign c0 = {expand5(color0.r), expand6(color0.g), expand5(color0.b)};
  assign c1 = {expand5(color1.r), expand6(color1.g), expand5(color1.b)};

  for (genvar ch = 0; ch < 3; ch++) begin : g_channel
    logic [7:0]  dbl, sgl;      // doubled and single operand of the third
    logic [9:0]  sum3;          // 2*dbl + sgl <= 765
    logic [20:0] prod3;         // sum3 * 683
    logic [7:0]  third, half;
    logic [8:0]  sum2;

    assign dbl   = code[0] ? c1[ch] : c0[ch];
    assign sgl   = code[0] ? c0[ch] : c1[ch];
    assign sum3  = {1'b0, dbl, 1'b0} + {2'b00, sgl};
    assign prod3 = 21'(sum3) * 21'(DIV3_RECIP);
    assign third = prod3[DIV3_SHIFT +: 8];
    assign sum2  = {1'b0, c0[ch]} + {1'b0, c1[ch]};
    assign half  = sum2[8:1];

    always_comb begin
      unique case (code)
        2'd0:    res[ch] = c0[ch];
        2'd1:    res[ch] = c1[ch];
        2'd2:    res[ch] = four_color ? third : half;
        default: res[ch] = four_color ? third : 8'd0;
      endcase
    end
  end

  assign rgb = rgb888_t'(res);

endmodule
