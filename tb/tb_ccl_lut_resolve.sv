// tb_ccl_lut_resolve: builds random label forests in a table held by the
// testbench (every entry points at a label not larger than itself), runs the
// resolver on it and checks that every label then points straight at the
// root of its tree, computed beforehand by following the chain, that entries
// above the count are untouched, and that busy lasts exactly count clocks.
`timescale 1ns/1ps
module tb_ccl_lut_resolve;
  import ccl_pkg::*;
  logic clk = 0, reset = 1, start = 0, busy, we;
  label_t count = 0, rd_addr1, rd_data1, rd_addr2, rd_data2, waddr, wdata;
  label_t tbl [256];
  int checks = 0, failures = 0;
  ccl_lut_resolve dut (.*);
  assign rd_data1 = tbl[rd_addr1];
  assign rd_data2 = tbl[rd_addr2];
  always @(posedge clk) if (we) tbl[waddr] <= wdata;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  initial begin
    int n[5] = '{0, 1, 17, 120, 255};
    repeat (2) @(negedge clk); reset = 0;
    foreach (n[k]) begin
      int root [256];
      automatic int cyc = 0;
      for (int l = 0; l < 256; l++)
        tbl[l] = (l == 0 || l > n[k] || ($urandom % 4) == 0) ? label_t'(l) : label_t'($urandom % l + (l > 1 ? 1 : 0));
      for (int l = 0; l < 256; l++) if (tbl[l] == 0) tbl[l] = label_t'(l);
      for (int l = 0; l < 256; l++) begin
        automatic int c = l;
        while (tbl[c] != label_t'(c)) c = tbl[c];
        root[l] = c;
      end
      count = label_t'(n[k]); start = 1;
      @(negedge clk); start = 0;
      while (busy) begin @(negedge clk); cyc++; end
      check(cyc == n[k], $sformatf("busy %0d clocks for count %0d", cyc, n[k]));
      for (int l = 0; l < 256; l++)
        check(tbl[l] == label_t'(root[l]), $sformatf("n=%0d label %0d -> %0d exp %0d", n[k], l, tbl[l], root[l]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
