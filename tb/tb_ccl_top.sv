// tb_ccl_top: end-to-end test of the labeller as the host sees it. A driver
// model speaks Avalon-MM to ccl_top and runs the two-pass protocol on whole
// images: pass 1 streams pixel rows in through the row window, overlapping
// writes of new rows with reads of finished label rows; pass 2 streams the
// pass-1 labels back in and reads the final labels.
//
// The reference is independent of the design: components are found by a
// flood fill with the same six-neighbour adjacency (left, right, up, down,
// up-left, down-right). Checked: background stays 0 in both passes; every
// component has one final label, the lowest of its pass-1 labels, and
// different components have different final labels; the label count equals
// the number of pixels with no labelled top-left, top or left neighbour;
// the overflow flag is set exactly when that number exceeds 255.
//
// Images: small random ones, a dense noise image that overflows the labels,
// and a full-width 512 x 512 image of crosses and bars similar to the ones the
// design is meant for, all at the design's default parameters. Each mechanism
// (new label, merge, merge stall, multi-step merge walk, ring wrap, no space
// for the next row, pass switch, table flattening, overflow) is counted and
// must occur.
`timescale 1ns/1ps
module tb_ccl_top;
  import ccl_pkg::*;

  localparam int MAXW = 512;
  localparam int MAXH = 512;

  logic clk = 0, reset = 1;
  logic chipselect = 0, read = 0, write = 0;
  logic [BUS_AW-1:0] address = '0;
  logic [BUS_W-1:0]  writedata = '0, readdata;
  logic waitrequest, ev_new, ev_merge, ev_stall;

  ccl_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_new = 0, n_merge = 0, n_stall_cycles = 0, n_long_walk = 0;
  int n_nospace = 0, n_wrap = 0, n_pass2 = 0, n_resolve = 0, n_overflow = 0;
  longint cycles = 0;

  // event counting from the core's strobes
  int stall_run = 0;
  always @(posedge clk) begin
    cycles++;
    if (ev_new) n_new++;
    if (ev_merge) n_merge++;
    if (ev_stall) begin n_stall_cycles++; stall_run++; end
    else begin
      if (stall_run >= 2) n_long_walk++;
      stall_run = 0;
    end
  end

  initial begin : watchdog
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- Avalon master ----------------
  task automatic av_write(int a, logic [31:0] d);
    @(posedge clk);
    chipselect <= 1; write <= 1; address <= BUS_AW'(a); writedata <= d;
    @(negedge clk);
    while (waitrequest) @(negedge clk);
    @(posedge clk);
    chipselect <= 0; write <= 0;
  endtask

  task automatic av_read(int a, output logic [31:0] d);
    @(posedge clk);
    chipselect <= 1; read <= 1; address <= BUS_AW'(a);
    @(negedge clk);
    while (waitrequest) @(negedge clk);
    d = readdata;
    @(posedge clk);
    chipselect <= 0; read <= 0;
  endtask

  localparam int REGB = 1 << (BUS_AW - 1);

  // ---------------- image and reference ----------------
  byte unsigned img  [MAXH][MAXW];
  byte unsigned lab1 [MAXH][MAXW];   // pass-1 labels read back
  byte unsigned labf [MAXH][MAXW];   // final labels read back
  int           comp [MAXH][MAXW];   // reference component id, -1 background
  int           qr [MAXH*MAXW];
  int           qc [MAXH*MAXW];
  int H, W;
  byte unsigned thr;

  function automatic bit fgp(int r, int c);
    if (r < 0 || c < 0 || r >= H || c >= W) return 0;
    return img[r][c] >= thr;
  endfunction

  function automatic int flood();
    int ncomp = 0;
    int dr[6] = '{0, 0, -1, 1, -1, 1};
    int dc[6] = '{-1, 1, 0, 0, -1, 1};
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) comp[r][c] = -1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        if (fgp(r, c) && comp[r][c] < 0) begin
          int head = 0, tail = 0;
          comp[r][c] = ncomp; qr[tail] = r; qc[tail] = c; tail++;
          while (head < tail) begin
            int rr = qr[head], cc = qc[head];
            head++;
            for (int k = 0; k < 6; k++) begin
              int nr = rr + dr[k], nc = cc + dc[k];
              if (fgp(nr, nc) && comp[nr][nc] < 0) begin
                comp[nr][nc] = ncomp; qr[tail] = nr; qc[tail] = nc; tail++;
              end
            end
          end
          ncomp++;
        end
    return ncomp;
  endfunction

  function automatic int expected_new();
    int n = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        if (fgp(r, c) && !fgp(r-1, c-1) && !fgp(r-1, c) && !fgp(r, c-1)) n++;
    return n;
  endfunction

  // ---------------- driver: one pass over the image ----------------
  // pass 0 sends pixels and collects lab1; pass 1 sends lab1, collects labf.
  task automatic run_pass(int pass);
    int wrow = 0, rrow = 0, nwords;
    logic [31:0] st, d;
    nwords = (W + 3) / 4;
    while (rrow < H) begin
      av_read(REGB + 5, st);
      if (st[1]) begin
        for (int w = 0; w < nwords; w++) begin
          av_read(w, d);
          for (int k = 0; k < 4; k++)
            if (4*w + k < W) begin
              if (pass == 0) lab1[rrow][4*w+k] = d[8*k +: 8];
              else           labf[rrow][4*w+k] = d[8*k +: 8];
            end
        end
        av_write(REGB + 4, 0);
        rrow++;
      end else if (wrow < H && st[0]) begin
        for (int w = 0; w < nwords; w++) begin
          d = '0;
          for (int k = 0; k < 4; k++)
            if (4*w + k < W) d[8*k +: 8] = (pass == 0) ? img[wrow][4*w+k] : lab1[wrow][4*w+k];
          av_write(w, d);
        end
        av_write(REGB + 3, 0);
        if (wrow >= ROWS) n_wrap++;
        wrow++;
      end else if (wrow < H) begin
        n_nospace++;
      end
    end
  endtask

  task automatic run_image(string name);
    int ncomp, nexp;
    logic [31:0] d;
    longint t0;
    int minl [];
    int finl [];
    bit seen [256];
    ncomp = flood();
    nexp  = expected_new();
    t0 = cycles;
    av_write(REGB + 1, W);
    av_write(REGB + 2, thr);
    av_read(REGB + 1, d);  check(d == W, {name, ": WIDTH readback"});
    av_write(REGB + 0, 1);                       // pass 1
    run_pass(0);
    av_read(REGB + 6, d);
    check(d == ((nexp > 255) ? 255 : nexp), $sformatf("%s: label count %0d exp %0d", name, d, nexp));
    av_read(REGB + 5, d);
    check(d[3] == (nexp > 255), {name, ": overflow flag"});
    if (d[3]) n_overflow++;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        check((lab1[r][c] != 0) == fgp(r, c), $sformatf("%s: pass-1 fg/bg at %0d,%0d", name, r, c));
    av_write(REGB + 0, 2);                       // pass 2
    n_pass2++;
    av_read(REGB + 5, d);
    if (d[2]) n_resolve++;                       // table being flattened
    run_pass(1);
    if (nexp <= 255) begin
      minl = new[ncomp]; finl = new[ncomp];
      foreach (minl[i]) begin minl[i] = 1000; finl[i] = -1; end
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          if (comp[r][c] >= 0 && lab1[r][c] < minl[comp[r][c]]) minl[comp[r][c]] = lab1[r][c];
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          if (comp[r][c] < 0) check(labf[r][c] == 0, $sformatf("%s: final bg at %0d,%0d", name, r, c));
          else check(labf[r][c] == minl[comp[r][c]],
                     $sformatf("%s: final %0d exp %0d at %0d,%0d", name, labf[r][c], minl[comp[r][c]], r, c));
      foreach (minl[i]) begin
        check(!seen[minl[i]], {name, ": components share a label"});
        seen[minl[i]] = 1;
      end
    end
    $display("%s: %0dx%0d, %0d components, %0d labels, %0d cycles", name, W, H, ncomp, nexp, cycles - t0);
  endtask

  // ---------------- images ----------------
  task automatic random_image(int h, int w, int density_pct);
    H = h; W = w; thr = 8'd100;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        img[r][c] = (($urandom % 100) < density_pct) ? byte'(100 + $urandom % 156) : byte'($urandom % 100);
  endtask

  task automatic crosses_image(int h, int w);
    H = h; W = w; thr = 8'd128;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = byte'($urandom % 128);
    for (int gy = 0; gy < H / 48; gy++)
      for (int gx = 0; gx < W / 48; gx++) begin
        int cy = gy * 48 + 24, cx = gx * 48 + 24;
        for (int k = -16; k <= 16; k++)
          for (int t = -2; t <= 2; t++) begin
            if ((gx + gy) % 2 == 0) begin          // upright cross
              img[cy + k][cx + t] = 8'd255;
              img[cy + t][cx + k] = 8'd200;
            end else begin                          // down-right bar and a short
              img[cy + k][cx + k + t] = 8'd255;     // upright bar beside it
              if (k >= 0 && k <= 8) img[cy + k - 12][cx + t + 6] = 8'd180;
            end
          end
      end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    reset <= 0;
    repeat (2) @(posedge clk);
    random_image(6, 8, 50);    run_image("tiny");
    random_image(12, 20, 55);  run_image("small");
    random_image(16, 36, 60);  run_image("medium");
    random_image(5, 13, 50);   run_image("odd width");
    random_image(64, 64, 35);  run_image("overflow");
    crosses_image(MAXH, MAXW); run_image("crosses 512x512");
    check(n_new > 0,          "mechanism: new label");
    check(n_merge > 0,        "mechanism: equivalence merge");
    check(n_stall_cycles > 0, "mechanism: merge stall");
    check(n_long_walk > 0,    "mechanism: multi-step merge walk");
    check(n_wrap > 0,         "mechanism: ring wrap-around");
    check(n_nospace > 0,      "mechanism: no space for next row");
    check(n_pass2 > 0,        "mechanism: pass switch");
    check(n_resolve > 0,      "mechanism: table flattening");
    check(n_overflow > 0,     "mechanism: label overflow");
    $display("events: new=%0d merge=%0d stall_cycles=%0d long_walks=%0d wrap=%0d nospace=%0d pass2=%0d resolve=%0d overflow=%0d",
             n_new, n_merge, n_stall_cycles, n_long_walk, n_wrap, n_nospace, n_pass2, n_resolve, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
