// tb_ccl_lut: hands out labels and merges random pairs of them, as the
// labeller would, and compares the table with a reference kept as explicit
// class numbers: after every merge each entry must point at a label not
// larger than itself, and following the entries from any label must end at
// the lowest label of its class. Merges of labels already in one class and
// merges that need a walk along a chain are both exercised; the walk's length
// is counted and must exceed one step at least once.
`timescale 1ns/1ps
module tb_ccl_lut;
  import ccl_pkg::*;
  logic clk = 0, reset = 1;
  logic init_we = 0, merge_start = 0, ext_we = 0, busy;
  label_t init_label = 0, merge_a = 0, merge_b = 0, ext_addr = 0, ext_data = 0;
  label_t rd_addr1 = 0, rd_data1, rd_addr2 = 0, rd_data2;
  int checks = 0, failures = 0;
  ccl_lut dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int cls [256];   // reference class number of each label

  function automatic int lowest(int l);
    for (int i = 1; i < 256; i++) if (cls[i] == cls[l]) return i;
    return l;
  endfunction

  task automatic read_root(int l, output int root);
    int cur = l, steps = 0;
    forever begin
      rd_addr1 = label_t'(cur);
      @(negedge clk);
      if (rd_data1 == label_t'(cur) || steps > 300) break;
      check(rd_data1 < label_t'(cur), "entry points at a smaller label");
      cur = rd_data1; steps++;
    end
    root = cur;
  endtask

  initial begin
    int nlab, long_walks = 0;
    repeat (2) @(negedge clk); reset = 0;
    for (int rep = 0; rep < 3; rep++) begin
      nlab = 40 + rep * 100;
      for (int l = 1; l <= nlab; l++) begin
        init_we = 1; init_label = label_t'(l); cls[l] = l;
        @(negedge clk);
      end
      init_we = 0;
      for (int m = 0; m < nlab; m++) begin
        automatic int a = 1 + $urandom % nlab, b = 1 + $urandom % nlab, ca, cnt = 0;
        if (a == b) continue;
        merge_a = label_t'(a); merge_b = label_t'(b); merge_start = 1;
        @(negedge clk); merge_start = 0;
        while (busy) begin @(negedge clk); cnt++; end
        if (cnt > 1) long_walks++;
        ca = cls[a];
        for (int i = 1; i <= nlab; i++) if (cls[i] == ca) cls[i] = cls[b];
        for (int i = 1; i <= nlab; i++) begin
          int r;
          read_root(i, r);
          check(r == lowest(i), $sformatf("label %0d root %0d exp %0d", i, r, lowest(i)));
        end
      end
    end
    // external write port and second read port
    ext_we = 1; ext_addr = 8'd7; ext_data = 8'd3;
    @(negedge clk); ext_we = 0; rd_addr2 = 8'd7;
    @(negedge clk); check(rd_data2 == 8'd3, "external write / read port 2");
    check(long_walks > 0, "a merge walked a chain");
    $display("long walks %0d", long_walks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
