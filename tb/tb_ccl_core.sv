// tb_ccl_core: runs the labeller on whole random images with the row RAM
// behind it, the testbench playing the circular buffer (row r in slot
// r mod 3, one row at a time) and writing and reading rows through the RAM's
// word port. The reference is a flood fill with the same six-neighbour
// adjacency, independent of the design. Checked: pass-1 labels are non-zero
// exactly on foreground pixels; the label count equals the number of
// pixels with no labelled top-left, top or left neighbour; after pass 2
// every component carries the lowest of its pass-1 labels and no two
// components share one; the table flattening keeps the labeller busy for
// exactly count clocks; and each row takes 4 clocks per pixel plus one,
// plus the clocks spent on merges (walk length + 1 each).
`timescale 1ns/1ps
module tb_ccl_core;
  import ccl_pkg::*;
  localparam int MAXH = 24, MAXW = 64;
  logic clk = 0, reset = 1, start1 = 0, start2 = 0, pass2 = 0;
  col_t width_m1 = '0;
  pixel_t thresh = 8'd128;
  logic row_valid = 0, has_top = 0, row_done;
  slot_t act_slot = '0, top_slot = '0;
  logic [BYTE_AW-1:0] ram_addr;
  logic [7:0] ram_wdata, ram_q;
  logic ram_we, busy, overflow, ev_new, ev_merge, ev_stall;
  label_t count;
  logic [8:0] address_b = '0;
  logic [31:0] data_b = '0, q_b;
  logic wren_b = 0;
  int checks = 0, failures = 0;

  ccl_core dut (.*);
  ram_cc u_ram (.clock(clk), .aclr(reset), .address_a(ram_addr), .data_a(ram_wdata),
                .wren_a(ram_we), .q_a(ram_q), .address_b, .data_b, .wren_b, .q_b);

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

  byte unsigned img [MAXH][MAXW];
  byte unsigned lab1 [MAXH][MAXW];
  byte unsigned labf [MAXH][MAXW];
  int comp [MAXH][MAXW];
  int H, W, n_merges = 0, n_stalls = 0;

  function automatic bit fgp(int r, int c);
    if (r < 0 || c < 0 || r >= H || c >= W) return 0;
    return img[r][c] >= thresh;
  endfunction

  // recursive-free flood fill by repeated relaxation
  function automatic int components();
    int n = 0;
    bit changed;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) comp[r][c] = fgp(r, c) ? r * MAXW + c : -1;
    do begin
      changed = 0;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          if (comp[r][c] >= 0) begin
            int nr[6] = '{r, r, r-1, r+1, r-1, r+1};
            int nc[6] = '{c-1, c+1, c, c, c-1, c+1};
            for (int k = 0; k < 6; k++)
              if (fgp(nr[k], nc[k]) && comp[nr[k]][nc[k]] < comp[r][c]) begin
                comp[r][c] = comp[nr[k]][nc[k]]; changed = 1;
              end
          end
    end while (changed);
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) if (comp[r][c] == r * MAXW + c) n++;
    return n;
  endfunction

  task automatic put_row(int slot, int r, bit labels);
    for (int w = 0; w < (W + 3) / 4; w++) begin
      @(negedge clk);
      address_b = 9'(slot * 128 + w); wren_b = 1;
      for (int k = 0; k < 4; k++)
        data_b[8*k +: 8] = (4*w + k >= W) ? 8'd0 : labels ? lab1[r][4*w+k] : img[r][4*w+k];
    end
    @(negedge clk); wren_b = 0;
  endtask

  task automatic get_row(int slot, int r, bit final_pass);
    for (int w = 0; w < (W + 3) / 4; w++) begin
      address_b = 9'(slot * 128 + w);
      @(negedge clk); @(negedge clk);
      for (int k = 0; k < 4; k++)
        if (4*w + k < W) begin
          if (final_pass) labf[r][4*w+k] = q_b[8*k +: 8];
          else            lab1[r][4*w+k] = q_b[8*k +: 8];
        end
    end
  endtask

  task automatic do_row(int r, bit p2);
    int cyc = 0, m0 = n_merges, s0 = n_stalls;
    put_row(r % 3, r, p2);
    act_slot = slot_t'(r % 3); top_slot = slot_t'((r + 2) % 3); has_top = (r > 0);
    row_valid = 1;
    do begin @(negedge clk); cyc++; end while (!row_done);
    row_valid = 0;
    check(cyc == 4 * W + 1 + (n_merges - m0) + (n_stalls - s0),
          $sformatf("row %0d took %0d clocks, merges %0d stalls %0d", r, cyc, n_merges - m0, n_stalls - s0));
    get_row(r % 3, r, p2);
  endtask

  always @(posedge clk) begin
    if (ev_merge) n_merges++;
    if (ev_stall) n_stalls++;
  end

  task automatic run_image(int h, int w, int dens);
    int ncomp, nexp = 0, rcyc = 0;
    int minl [MAXH*MAXW];
    bit used [256];
    H = h; W = w;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        img[r][c] = (($urandom % 100) < dens) ? byte'(thresh + $urandom % (256 - thresh)) : byte'($urandom % thresh);
    ncomp = components();
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
      if (fgp(r, c) && !fgp(r-1, c-1) && !fgp(r-1, c) && !fgp(r, c-1)) nexp++;
    width_m1 = col_t'(W - 1);
    @(negedge clk); pass2 = 0; start1 = 1; @(negedge clk); start1 = 0;
    for (int r = 0; r < H; r++) do_row(r, 0);
    check(count == label_t'(nexp), $sformatf("label count %0d exp %0d", count, nexp));
    check(!overflow, "no overflow");
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
      check((lab1[r][c] != 0) == fgp(r, c), "pass-1 foreground");
    @(negedge clk); pass2 = 1; start2 = 1; @(negedge clk); start2 = 0;
    while (busy) begin rcyc++; @(negedge clk); end
    check(rcyc == nexp, $sformatf("flattening took %0d clocks for %0d labels", rcyc, nexp));
    for (int r = 0; r < H; r++) do_row(r, 1);
    foreach (minl[i]) minl[i] = 1000;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
      if (comp[r][c] >= 0 && lab1[r][c] < minl[comp[r][c]]) minl[comp[r][c]] = lab1[r][c];
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
      if (comp[r][c] < 0) check(labf[r][c] == 0, "final background");
      else begin
        check(labf[r][c] == minl[comp[r][c]], $sformatf("final label at %0d,%0d", r, c));
        if (comp[r][c] == r * MAXW + c) begin
          check(!used[minl[comp[r][c]]], "components share a label");
          used[minl[comp[r][c]]] = 1;
        end
      end
    $display("image %0dx%0d: %0d components, %0d labels", W, H, ncomp, nexp);
  endtask

  initial begin
    repeat (3) @(negedge clk); reset = 0;
    run_image(4, 8, 0);      // background only: pure 4 clocks per pixel
    run_image(8, 16, 50);
    run_image(16, 40, 55);
    thresh = 8'd60;
    run_image(24, 64, 45);
    run_image(5, 7, 70);
    check(n_merges > 0 && n_stalls > n_merges, "merges with multi-step walks seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
