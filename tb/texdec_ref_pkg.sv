// texdec_ref_pkg: reference models of DXT1, DXT5 and ETC1 texel decoding for
// the testbenches. Written straight from the format rules with plain integer
// arithmetic (true divisions, a lookup array for the ETC tables, whole-block
// decoding), so they share no structure with the decoders under test.
package texdec_ref_pkg;

  function automatic int widen(input int v, input int bits);
    // replicate the top bits into the low bits
    return (v << (8 - bits)) | (v >> (2 * bits - 8));
  endfunction

  // DXT color: returns {r,g,b} as a 24-bit value.
  function automatic logic [23:0] dxt_color_ref(input logic [15:0] c0, input logic [15:0] c1,
                                                input int code, input bit force4);
    int a[3], b[3], o[3];
    a[0] = widen(int'(c0[15:11]), 5); a[1] = widen(int'(c0[10:5]), 6); a[2] = widen(int'(c0[4:0]), 5);
    b[0] = widen(int'(c1[15:11]), 5); b[1] = widen(int'(c1[10:5]), 6); b[2] = widen(int'(c1[4:0]), 5);
    for (int i = 0; i < 3; i++) begin
      if (code == 0)      o[i] = a[i];
      else if (code == 1) o[i] = b[i];
      else if (force4 || int'(c0) > int'(c1)) begin
        if (code == 2) o[i] = (2 * a[i] + b[i]) / 3;
        else           o[i] = (a[i] + 2 * b[i]) / 3;
      end else begin
        if (code == 2) o[i] = (a[i] + b[i]) / 2;
        else           o[i] = 0;
      end
    end
    return {o[0][7:0], o[1][7:0], o[2][7:0]};
  endfunction

  function automatic logic [7:0] dxt_alpha_ref(input int a0, input int a1, input int code);
    int r;
    if (code == 0) r = a0;
    else if (code == 1) r = a1;
    else if (a0 > a1) r = ((8 - code) * a0 + (code - 1) * a1) / 7;
    else if (code <= 5) r = ((6 - code) * a0 + (code - 1) * a1) / 5;
    else if (code == 6) r = 0;
    else r = 255;
    return r[7:0];
  endfunction

  // DXT1 block, texel (x,y) -> rgb
  function automatic logic [23:0] dxt1_ref(input logic [63:0] blk, input int x, input int y);
    int code;
    code = int'(blk[32 + 2 * (4 * y + x) +: 2]);
    return dxt_color_ref(blk[15:0], blk[31:16], code, 1'b0);
  endfunction

  // DXT5 block, texel (x,y) -> rgba
  function automatic logic [31:0] dxt5_ref(input logic [127:0] blk, input int x, input int y);
    int ccode, acode;
    ccode = int'(blk[96 + 2 * (4 * y + x) +: 2]);
    acode = int'(blk[16 + 3 * (4 * y + x) +: 3]);
    return {dxt_color_ref(blk[79:64], blk[95:80], ccode, 1'b1),
            dxt_alpha_ref(int'(blk[7:0]), int'(blk[15:8]), acode)};
  endfunction

  // ETC1 block, texel (x,y) -> rgb
  function automatic logic [23:0] etc_ref(input logic [63:0] blk, input int x, input int y);
    int tbl[8][4] = '{'{2, 8, -2, -8}, '{5, 17, -5, -17}, '{9, 29, -9, -29},
                      '{13, 42, -13, -42}, '{18, 60, -18, -60}, '{24, 80, -24, -80},
                      '{33, 106, -33, -106}, '{47, 183, -47, -183}};
    int base[2][3], o[3], sub, t, idx, k, d;
    for (int c = 0; c < 3; c++) begin
      if (blk[33]) begin
        base[0][c] = int'(blk[63 - 8 * c -: 5]);
        d = int'(blk[58 - 8 * c -: 3]);
        if (d >= 4) d -= 8;
        base[1][c] = (base[0][c] + d + 32) % 32;
        base[0][c] = widen(base[0][c], 5);
        base[1][c] = widen(base[1][c], 5);
      end else begin
        base[0][c] = 17 * int'(blk[63 - 8 * c -: 4]);
        base[1][c] = 17 * int'(blk[59 - 8 * c -: 4]);
      end
    end
    sub = blk[32] ? int'(y >= 2) : int'(x >= 2);
    t   = (sub != 0) ? int'(blk[36:34]) : int'(blk[39:37]);
    k   = 4 * x + y;
    idx = 2 * int'(blk[16 + k]) + int'(blk[k]);
    for (int c = 0; c < 3; c++) begin
      o[c] = base[sub][c] + tbl[t][idx];
      if (o[c] < 0) o[c] = 0;
      if (o[c] > 255) o[c] = 255;
    end
    return {o[0][7:0], o[1][7:0], o[2][7:0]};
  endfunction

endpackage
