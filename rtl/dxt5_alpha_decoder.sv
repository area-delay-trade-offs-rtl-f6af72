// dxt5_alpha_decoder: the transparency half of the DXT5 texel decoder.
//
// Two 8-bit references alpha0 and alpha1 and a 3-bit texel code give the
// texel's alpha:
//   code 0 alpha0, code 1 alpha1
//   alpha0 >  alpha1: code k = 2..7 -> ((8-k)*alpha0 + (k-1)*alpha1) / 7
//   alpha0 <= alpha1: code k = 2..5 -> ((6-k)*alpha0 + (k-1)*alpha1) / 5,
//                     code 6 -> 0, code 7 -> 255
// Divisions truncate.
//
// The weights are small (at most 6 and 4), so the weighted sum is formed with
// two narrow multiplications and one adder. The divider is replaced by a
// multiplication with a reciprocal constant chosen by the mode (2341 for /7,
// 3277 for /5) followed by a 14-bit right shift; both give the exact floor
// for every weighted sum the decoder can form. The value rules are the DXT5
// definition; the reciprocal constants and truncation are this design's
// choices.
//
// Purely combinational: alpha is valid one propagation delay after the inputs.
module dxt5_alpha_decoder
  import texdec_pkg::*;
(
  input  logic [7:0] alpha0,
  input  logic [7:0] alpha1,
  input  logic [2:0] code,
  output logic [7:0] alpha
);

  logic        eight_alpha;
  logic [2:0]  w0, w1;        // weights of alpha0 and alpha1
  logic [10:0] wsum;          // <= 7*255 = 1785
  logic [11:0] recip;
  logic [22:0] prod;
  logic [7:0]  quot;

  assign eight_alpha = alpha0 > alpha1;

  // k-1 is the weight of alpha1; the weight of alpha0 is 7-(k-1) or 5-(k-1).
  assign w1 = code - 3'd1;
  assign w0 = (eight_alpha ? 3'd7 : 3'd5) - w1;

  assign wsum  = 11'(w0) * 11'(alpha0) + 11'(w1) * 11'(alpha1);
  assign recip = eight_alpha ? 12'(DIV7_RECIP) : 12'(DIV5_RECIP);
  assign prod  = 23'(wsum) * 23'(recip);
  assign quot  = prod[DIV57_SHIFT +: 8];

  always_comb begin
    if (code == 3'd0)                                  alpha = alpha0;
    else if (code == 3'd1)                             alpha = alpha1;
    else if (!eight_alpha && code == 3'd6)             alpha = 8'd0;
    else if (!eight_alpha && code == 3'd7)             alpha = 8'd255;
    else                                               alpha = quot;
  end

endmodule
