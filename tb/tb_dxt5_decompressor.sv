// tb_dxt5_decompressor: self-checking test of the dxt5 texel decompressor.
// Decodes every texel of random and directed DXT5 blocks, with the alpha references in both orders, and compares each texel
// with the whole-block reference decoder. Combinational: one texel per clock,
// checked one time step after the inputs change. A watchdog ends a run that
// hangs.
module tb_dxt5_decompressor;
  import texdec_pkg::*;
  import texdec_ref_pkg::*;

  localparam int N_BLOCKS = 4000;
  localparam int WATCHDOG_CYCLES = 200000;

  logic          clk = 1'b0;
  logic [128-1:0] block;
  logic [1:0]    texel_x, texel_y;
  rgba8888_t     rgba;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dxt5_decompressor dut (.*);

  task automatic run_block(input logic [128-1:0] blk);
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        @(posedge clk);
        block = blk; texel_x = 2'(x); texel_y = 2'(y);
        #1;
        checks++;
        if (rgba !== dxt5_ref(blk, x, y)) begin
          failures++;
          if (failures < 10)
            $display("FAIL block=%h x=%0d y=%0d got=%h exp=%h", blk, x, y, rgba, dxt5_ref(blk, x, y));
        end
      end
  endtask

  function automatic logic [128-1:0] rand_block();
    logic [128-1:0] b;
    for (int i = 0; i < 128; i += 32) b[i +: 32] = $urandom;
    return b;
  endfunction

  initial begin
    logic [128-1:0] b;
    block = '0; texel_x = '0; texel_y = '0;
    run_block('0);
    run_block('1);
    for (int i = 0; i < N_BLOCKS; i++) begin
      b = rand_block();
      // every other block: alpha references in the opposite order,
      // every fourth: color references in three-color order (must stay
      // four-color)
      if (i % 2 == 1) b[15:0] = {b[7:0], b[15:8]};
      if (i % 4 == 2) b[95:64] = {b[79:64], b[95:80]};
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
