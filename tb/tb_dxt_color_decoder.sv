// tb_dxt_color_decoder: self-checking test of the shared DXT color decoder.
// Drives random and corner-case reference colors (equal colors, 0x0000,
// 0xFFFF, colors one apart, many random equal pairs) with every code in both normal and forced
// four-color operation, and compares each result with the integer-division
// reference. The decoder is combinational: results are checked one time step
// after the inputs change, one vector per clock. A watchdog ends the run as
// failed if it has not finished after a fixed number of cycles.
module tb_dxt_color_decoder;
  import texdec_pkg::*;
  import texdec_ref_pkg::*;

  localparam int N_RANDOM = 20000;
  localparam int N_EQUAL  = 1000;
  localparam int WATCHDOG_CYCLES = 200000;

  logic       clk = 1'b0;
  rgb565_t    color0, color1;
  logic [1:0] code;
  logic       force_four_color;
  rgb888_t    rgb;
  int checks = 0, failures = 0;
  int n_three = 0, n_four = 0;

  always #5 clk = ~clk;

  dxt_color_decoder dut (.*);

  task automatic apply(input logic [15:0] c0, input logic [15:0] c1, input bit f);
    for (int k = 0; k < 4; k++) begin
      @(posedge clk);
      color0 = rgb565_t'(c0); color1 = rgb565_t'(c1); code = 2'(k); force_four_color = f;
      #1;
      checks++;
      if (rgb !== dxt_color_ref(c0, c1, k, f)) begin
        failures++;
        if (failures < 10)
          $display("FAIL c0=%h c1=%h code=%0d force=%0b got=%h exp=%h", c0, c1, k, f, rgb,
                   dxt_color_ref(c0, c1, k, f));
      end
    end
    if (f || c0 > c1) n_four++; else n_three++;
  endtask

  initial begin
    color0 = '0; color1 = '0; code = '0; force_four_color = 1'b0;
    for (int f = 0; f < 2; f++) begin
      apply(16'h0000, 16'h0000, f[0]);
      apply(16'hFFFF, 16'hFFFF, f[0]);
      apply(16'hFFFF, 16'h0000, f[0]);
      apply(16'h0000, 16'hFFFF, f[0]);
      apply(16'h1234, 16'h1233, f[0]);
      apply(16'h1233, 16'h1234, f[0]);
      apply(16'hF800, 16'h07E0, f[0]);
      apply(16'h001F, 16'hF81F, f[0]);
    end
    for (int i = 0; i < N_RANDOM; i++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));
    // equal references sit on the mode boundary: they must decode as
    // three-color unless forced
    for (int i = 0; i < N_EQUAL; i++) begin
      logic [15:0] c;
      c = 16'($urandom);
      apply(c, c, 1'($urandom));
    end
    checks++;
    if (n_three == 0 || n_four == 0) begin
      failures++;
      $display("FAIL mode coverage three=%0d four=%0d", n_three, n_four);
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
