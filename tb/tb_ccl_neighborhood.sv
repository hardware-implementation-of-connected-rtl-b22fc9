// tb_ccl_neighborhood: feeds random top-row labels and current labels along
// rows and checks that TL, T and CL follow the raster scan (TL = previous T,
// CL = previous current label, all 0 at the start of a row, T = 0 without a
// top row) and that the RAM addresses are {slot, column}.
`timescale 1ns/1ps
module tb_ccl_neighborhood;
  import ccl_pkg::*;
  logic clk = 0, clear = 1, load_t = 0, use_top = 0, shift = 0;
  label_t top_q = '0, c_label = '0, tl, t, cl;
  col_t x = '0;
  slot_t act_slot = '0, top_slot = '0;
  logic [BYTE_AW-1:0] top_addr, act_addr;
  int checks = 0, failures = 0;
  ccl_neighborhood dut (.*);
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
    for (int row = 0; row < 8; row++) begin
      automatic label_t prev_t = 0, prev_c = 0;
      @(negedge clk); clear = 1; use_top = (row % 3) != 0;
      act_slot = slot_t'(row % 3); top_slot = slot_t'((row + 2) % 3);
      @(negedge clk); clear = 0;
      check(tl == 0 && t == 0 && cl == 0, "cleared at row start");
      for (int c = 0; c < 20; c++) begin
        label_t tv, cv;
        x = col_t'(c);
        #1;
        check(top_addr == BYTE_AW'(top_slot * 512 + c), "top address");
        check(act_addr == BYTE_AW'(act_slot * 512 + c), "active address");
        tv = label_t'($urandom); top_q = tv; load_t = 1;
        @(negedge clk); load_t = 0; top_q = label_t'($urandom);
        check(t == (use_top ? tv : 8'd0), "T loaded");
        check(tl == prev_t && cl == prev_c, $sformatf("TL/CL row %0d col %0d", row, c));
        cv = label_t'($urandom); c_label = cv; shift = 1;
        @(negedge clk); shift = 0;
        prev_t = use_top ? tv : 8'd0; prev_c = cv;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
