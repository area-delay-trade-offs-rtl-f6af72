// tb_texture_decompressors: end-to-end test of the three decompressors side
// by side, with the top at its default configuration (it has no parameters).
// Every clock, one texel of a DXT1 block, one of a DXT5 block and one of an
// ETC block are decoded at once; each block is walked through all 16 texels
// and checked against the whole-block reference decoders. The test also
// counts how often each mechanism of the formats occurred and fails if any
// never did:
//   DXT1: four-color block, three-color block, interpolated third, half,
//         black texel
//   DXT5: eight-value alpha block, six-value alpha block, alpha code forced
//         to 0 and to 255, color block with color0 <= color1 decoded as
//         four-color
//   ETC:  individual mode, differential mode, flip 0, flip 1, a negative
//         differential delta, clamp at 0, clamp at 255
// A watchdog ends a run that hangs.
module tb_texture_decompressors;
  import texdec_pkg::*;
  import texdec_ref_pkg::*;

  localparam int N_BLOCKS = 3000;
  localparam int WATCHDOG_CYCLES = 100000;

  typedef enum int {
    DXT1_FOUR, DXT1_THREE, DXT1_THIRD, DXT1_HALF, DXT1_BLACK,
    DXT5_EIGHT, DXT5_SIX, DXT5_ZERO, DXT5_FULL, DXT5_FORCED,
    ETC_INDIV, ETC_DIFF, ETC_FLIP0, ETC_FLIP1, ETC_NEG_DELTA, ETC_CLAMP0, ETC_CLAMP255,
    N_EVENTS
  } event_e;

  logic         clk = 1'b0;
  logic [63:0]  dxt1_block, etc_block;
  logic [127:0] dxt5_block;
  logic [1:0]   dxt1_texel_x, dxt1_texel_y, dxt5_texel_x, dxt5_texel_y, etc_texel_x, etc_texel_y;
  rgb888_t      dxt1_rgb, etc_rgb;
  rgba8888_t    dxt5_rgba;
  int checks = 0, failures = 0;
  int count[N_EVENTS];

  always #5 clk = ~clk;

  texture_decompressors dut (.*);

  function automatic logic [31:0] r32();
    return $urandom;
  endfunction

  // Count the mechanisms one texel of each format exercises.
  task automatic note_events(input int x, input int y);
    int k, c1, a5;
    k  = 4 * y + x;
    c1 = int'(dxt1_block[32 + 2 * k +: 2]);
    if (dxt1_block[15:0] > dxt1_block[31:16]) begin
      if (k == 0) count[DXT1_FOUR]++;
      if (c1 >= 2) count[DXT1_THIRD]++;
    end else begin
      if (k == 0) count[DXT1_THREE]++;
      if (c1 == 2) count[DXT1_HALF]++;
      if (c1 == 3) count[DXT1_BLACK]++;
    end
    a5 = int'(dxt5_block[16 + 3 * k +: 3]);
    if (dxt5_block[7:0] > dxt5_block[15:8]) begin
      if (k == 0) count[DXT5_EIGHT]++;
    end else begin
      if (k == 0) count[DXT5_SIX]++;
      if (a5 == 6) count[DXT5_ZERO]++;
      if (a5 == 7) count[DXT5_FULL]++;
    end
    if (k == 0 && dxt5_block[79:64] <= dxt5_block[95:80]) count[DXT5_FORCED]++;
    if (k == 0) begin
      if (etc_block[33]) count[ETC_DIFF]++; else count[ETC_INDIV]++;
      if (etc_block[32]) count[ETC_FLIP1]++; else count[ETC_FLIP0]++;
      if (etc_block[33] && (etc_block[58] || etc_block[50] || etc_block[42])) count[ETC_NEG_DELTA]++;
    end
  endtask

  initial begin
    foreach (count[i]) count[i] = 0;
    dxt1_block = '0; dxt5_block = '0; etc_block = '0;
    dxt1_texel_x = '0; dxt1_texel_y = '0; dxt5_texel_x = '0; dxt5_texel_y = '0;
    etc_texel_x = '0; etc_texel_y = '0;
    for (int i = 0; i < N_BLOCKS; i++) begin
      @(posedge clk);
      dxt1_block = {r32(), r32()};
      dxt5_block = {r32(), r32(), r32(), r32()};
      etc_block  = {r32(), r32()};
      etc_block[33:32] = 2'(i);
      if (i % 8 == 5) etc_block[63:40] = 24'hFFFFFF;
      if (i % 8 == 6) etc_block[63:40] = 24'h000000;
      if (i % 2 == 1) dxt1_block[31:0] = {dxt1_block[15:0], dxt1_block[31:16]};
      if (i % 3 == 1) dxt5_block[15:0] = {dxt5_block[7:0], dxt5_block[15:8]};
      for (int t = 0; t < 16; t++) begin
        if (t != 0) @(posedge clk);
        dxt1_texel_x = 2'(t); dxt1_texel_y = 2'(t >> 2);
        // the other two walk the block in a different order
        dxt5_texel_x = 2'(t >> 2); dxt5_texel_y = 2'(t);
        etc_texel_x  = 2'(15 - t); etc_texel_y = 2'((15 - t) >> 2);
        #1;
        note_events(t % 4, t / 4);
        checks += 3;
        if (dxt1_rgb !== dxt1_ref(dxt1_block, t % 4, t / 4)) begin
          failures++;
          if (failures < 10) $display("FAIL dxt1 block=%h texel=%0d got=%h", dxt1_block, t, dxt1_rgb);
        end
        if (dxt5_rgba !== dxt5_ref(dxt5_block, t / 4, t % 4)) begin
          failures++;
          if (failures < 10) $display("FAIL dxt5 block=%h texel=%0d got=%h", dxt5_block, t, dxt5_rgba);
        end
        if (etc_rgb !== etc_ref(etc_block, (15 - t) % 4, (15 - t) / 4)) begin
          failures++;
          if (failures < 10) $display("FAIL etc block=%h texel=%0d got=%h", etc_block, t, etc_rgb);
        end
        if (etc_rgb.r == 8'd0 || etc_rgb.g == 8'd0 || etc_rgb.b == 8'd0) count[ETC_CLAMP0]++;
        if (etc_rgb.r == 8'd255 || etc_rgb.g == 8'd255 || etc_rgb.b == 8'd255) count[ETC_CLAMP255]++;
      end
    end
    for (int e = 0; e < N_EVENTS; e++) begin
      event_e ev;
      ev = event_e'(e);
      checks++;
      $display("event %-14s occurred %0d times", ev.name(), count[e]);
      if (count[e] == 0) begin
        failures++;
        $display("FAIL event %s never occurred", ev.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
