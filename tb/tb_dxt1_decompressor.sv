// tb_dxt1_decompressor: self-checking test of the dxt1 texel decompressor.
// Decodes every texel of random and directed DXT1 blocks, in both the four-color and the three-color (black code) mode, and compares each texel
// with the whole-block reference decoder. Combinational: one texel per clock,
// checked one time step after the inputs change. A watchdog ends a run that
// hangs.
module tb_dxt1_decompressor;
  import texdec_pkg::*;
  import texdec_ref_pkg::*;

  localparam int N_BLOCKS = 4000;
  localparam int WATCHDOG_CYCLES = 200000;

  logic          clk = 1'b0;
  logic [64-1:0] block;
  logic [1:0]    texel_x, texel_y;
  rgb888_t     rgb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dxt1_decompressor dut (.*);

  task automatic run_block(input logic [64-1:0] blk);
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        @(posedge clk);
        block = blk; texel_x = 2'(x); texel_y = 2'(y);
        #1;
        checks++;
        if (rgb !== dxt1_ref(blk, x, y)) begin
          failures++;
          if (failures < 10)
            $display("FAIL block=%h x=%0d y=%0d got=%h exp=%h", blk, x, y, rgb, dxt1_ref(blk, x, y));
        end
      end
  endtask

  function automatic logic [64-1:0] rand_block();
    logic [64-1:0] b;
    for (int i = 0; i < 64; i += 32) b[i +: 32] = $urandom;
    return b;
  endfunction

  initial begin
    logic [64-1:0] b;
    block = '0; texel_x = '0; texel_y = '0;
    run_block('0);
    run_block('1);
    for (int i = 0; i < N_BLOCKS; i++) begin
      b = rand_block();
      // every other block: references in the opposite order
      if (i % 2 == 1) b[31:0] = {b[15:0], b[31:16]};
      run_block(b);
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
