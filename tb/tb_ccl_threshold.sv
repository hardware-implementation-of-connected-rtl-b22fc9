// tb_ccl_threshold: exhaustive check of the foreground decision for every
// pixel value against a set of thresholds, including 0 and 255.
`timescale 1ns/1ps
module tb_ccl_threshold;
  import ccl_pkg::*;
  pixel_t pixel, thresh;
  logic fg;
  int checks = 0, failures = 0;
  ccl_threshold dut (.*);
  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int th[6] = '{0, 1, 100, 128, 200, 255};
    foreach (th[i])
      for (int p = 0; p < 256; p++) begin
        pixel = pixel_t'(p); thresh = pixel_t'(th[i]);
        #1;
        checks++;
        if (fg !== (p >= th[i])) begin
          failures++;
          $display("FAIL pixel %0d thresh %0d fg %0d", p, th[i], fg);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
