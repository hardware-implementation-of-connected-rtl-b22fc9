// tb_ccl_label: checks the first-pass label decision for random and corner
// neighbourhoods against the neighbourhood table written out case by case,
// checks the merge request, and checks the label counter, including its
// saturation at 255 with the overflow flag.
`timescale 1ns/1ps
module tb_ccl_label;
  import ccl_pkg::*;
  logic clk = 0, clear = 1, commit = 0, fg = 0;
  label_t tl = 0, t = 0, cl = 0, label, merge_a, merge_b, count;
  logic new_label, merge, overflow;
  int checks = 0, failures = 0;
  ccl_label dut (.*);
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
  function automatic label_t pick(int v);
    return (($urandom % 3) == 0) ? 8'd0 : label_t'(v);
  endfunction
  initial begin
    int expcount = 0;
    @(negedge clk); clear = 0;
    for (int i = 0; i < 5000; i++) begin
      label_t e_lab; bit e_new, e_merge; label_t lo, hi;
      fg = ($urandom % 4) != 0;
      tl = pick(1 + $urandom % 255); t = pick(1 + $urandom % 255); cl = pick(1 + $urandom % 255);
      if (i % 7 == 0 && t != 0) cl = t;    // equal labels meet
      if (i >= 2000 && ($urandom % 2) == 0) begin tl = 0; t = 0; cl = 0; end
      e_new = 0; e_merge = 0;
      if (!fg)                    e_lab = 0;
      else if (tl == 0 && t == 0 && cl == 0) begin e_lab = label_t'(expcount == 255 ? 255 : expcount + 1); e_new = 1; end
      else if (tl != 0)           e_lab = tl;
      else if (t == 0)            e_lab = cl;
      else if (cl == 0)           e_lab = t;
      else begin
        lo = (t < cl) ? t : cl; hi = (t < cl) ? cl : t;
        e_lab = lo; e_merge = (lo != hi);
      end
      commit = ($urandom % 2);
      #1;
      check(label == e_lab, $sformatf("label %0d exp %0d (fg %0d tl %0d t %0d cl %0d)", label, e_lab, fg, tl, t, cl));
      check(new_label == e_new, "new label flag");
      check(merge == e_merge, "merge flag");
      if (e_merge) check((merge_a == t && merge_b == cl) || (merge_a == cl && merge_b == t), "merge pair");
      @(negedge clk);
      if (commit && e_new) begin
        check(overflow == (expcount == 255), "overflow flag");
        if (expcount < 255) expcount++;
      end
      commit = 0;
      check(count == label_t'(expcount), $sformatf("count %0d exp %0d", count, expcount));
    end
    check(overflow, "overflow reached");
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    check(count == 0 && !overflow, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
