// tb_ccl_counter: steps the column counter across rows of several widths,
// with idle cycles in between, and checks x and the last-column flag each
// cycle; checks that clear restarts the row.
`timescale 1ns/1ps
module tb_ccl_counter;
  import ccl_pkg::*;
  logic clk = 0, clear = 1, inc = 0, last;
  col_t width_m1 = '0, x;
  int checks = 0, failures = 0;
  ccl_counter dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    int widths[4] = '{1, 5, 13, 512};
    foreach (widths[i]) begin
      automatic int expx = 0;
      @(negedge clk); clear = 1; inc = 0; width_m1 = col_t'(widths[i] - 1);
      @(negedge clk); clear = 0;
      while (expx < widths[i]) begin
        check(x == col_t'(expx), $sformatf("x=%0d exp %0d", x, expx));
        check(last == (expx == widths[i] - 1), "last flag");
        inc = ($urandom % 3) != 0;
        @(negedge clk);
        if (inc) expx++;
        inc = 0;
      end
    end
    @(negedge clk); clear = 1; inc = 1;
    @(negedge clk); check(x == '0, "clear wins over inc");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
