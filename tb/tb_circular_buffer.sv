// tb_circular_buffer: drives random commits, row completions and releases
// and compares every output with a reference that counts rows written,
// labelled and released as plain integers: a row n may be written when at
// most two rows are held and, for n >= 3, row n-2 is labelled; row n sits in
// slot n mod 3; reads come from the oldest unreleased labelled row. Also
// checks that commits without space and releases with nothing ready are
// ignored, and that clear empties the ring.
`timescale 1ns/1ps
module tb_circular_buffer;
  import ccl_pkg::*;
  logic clk = 0, reset = 1, clear = 0, commit = 0, release_row = 0, row_done = 0, win_we = 0;
  logic [6:0] win_word = '0;
  logic [WORD_AW-1:0] ram_word;
  logic row_valid, has_top, space, ready;
  slot_t act_slot, top_slot;
  int checks = 0, failures = 0;
  int wr = 0, pr = 0, rl = 0, n_full = 0, n_topheld = 0, n_wrap = 0;
  circular_buffer dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s (wr %0d pr %0d rl %0d)", what, wr, pr, rl); end
  endtask
  function automatic bit ref_space();
    return (wr - rl < 3) && (wr < 3 || pr >= wr - 1);
  endfunction
  task automatic compare();
    check(space == ref_space(), "space");
    check(ready == (pr > rl), "ready");
    check(row_valid == (wr > pr), "row_valid");
    check(act_slot == slot_t'(pr % 3), "act_slot");
    check(top_slot == slot_t'((pr + 2) % 3), "top_slot");
    check(has_top == (pr > 0), "has_top");
    win_word = 7'($urandom); win_we = 1; #1;
    check(ram_word == {slot_t'(wr % 3), win_word}, "write window slot");
    win_we = 0; #1;
    check(ram_word == {slot_t'(rl % 3), win_word}, "read window slot");
  endtask
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    for (int i = 0; i < 20000; i++) begin
      compare();
      if (i % 5000 == 4999) begin
        clear = 1; @(negedge clk); clear = 0;
        wr = 0; pr = 0; rl = 0;
        continue;
      end
      commit = ($urandom % 3) == 0;
      row_done = row_valid && (($urandom % 4) == 0);
      release_row = ($urandom % 3) == 0;
      if (commit && !ref_space()) begin
        if (wr - rl >= 3) n_full++; else n_topheld++;
      end
      if (commit && ref_space() && wr >= 3) n_wrap++;
      @(negedge clk);
      commit = 0; row_done = 0; release_row = 0;
    end
    check(n_full > 0 && n_topheld > 0 && n_wrap > 0, "ring full, top row held and wrap all seen");
    $display("full %0d topheld %0d wrap %0d", n_full, n_topheld, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // reference update at the clock edge, from the values seen before it
  always @(posedge clk) if (!reset && !clear) begin
    automatic bit sp = ref_space();
    automatic bit rd = pr > rl;
    if (commit && sp) wr++;
    if (row_done) pr++;
    if (release_row && rd) rl++;
  end
endmodule
