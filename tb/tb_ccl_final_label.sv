// tb_ccl_final_label: backs the final-label lookup with a table in the
// testbench and checks every label: background maps to 0, any other label to
// its table entry.
`timescale 1ns/1ps
module tb_ccl_final_label;
  import ccl_pkg::*;
  label_t label_in, lut_addr, lut_data, label_out;
  label_t table_q [256];
  int checks = 0, failures = 0;
  ccl_final_label dut (.*);
  assign lut_data = table_q[lut_addr];
  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int i = 0; i < 256; i++) table_q[i] = label_t'($urandom % (i + 1));
      table_q[0] = label_t'(1 + $urandom % 255);   // must not be used
      for (int l = 0; l < 256; l++) begin
        label_t exp;
        label_in = label_t'(l);
        #1;
        exp = (l == 0) ? 8'd0 : table_q[l];
        checks++;
        if (label_out !== exp) begin
          failures++;
          $display("FAIL label %0d -> %0d exp %0d", l, label_out, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
