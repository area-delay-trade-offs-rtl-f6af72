// tb_dxt5_alpha_decoder: exhaustive self-checking test of the DXT5 alpha
// decoder. Every pair of 8-bit references with every 3-bit code (524288
// vectors) is compared with the true-division reference, which covers both
// the eight-value (/7) and six-value (/5, 0, 255) modes and the equal-
// reference case. Combinational: one vector per clock, checked one time step
// after it is applied. A watchdog ends a run that hangs.
module tb_dxt5_alpha_decoder;
  import texdec_ref_pkg::*;

  localparam int WATCHDOG_CYCLES = 600000;

  logic       clk = 1'b0;
  logic [7:0] alpha0, alpha1, alpha;
  logic [2:0] code;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dxt5_alpha_decoder dut (.*);

  initial begin
    alpha0 = '0; alpha1 = '0; code = '0;
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        for (int c = 0; c < 8; c++) begin
          @(posedge clk);
          alpha0 = 8'(a); alpha1 = 8'(b); code = 3'(c);
          #1;
          checks++;
          if (alpha !== dxt_alpha_ref(a, b, c)) begin
            failures++;
            if (failures < 10)
              $display("FAIL a0=%0d a1=%0d code=%0d got=%0d exp=%0d", a, b, c, alpha,
                       dxt_alpha_ref(a, b, c));
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
