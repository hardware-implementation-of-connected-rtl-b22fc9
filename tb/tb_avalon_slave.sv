// tb_avalon_slave: drives the bus slave as an Avalon-MM master would, with a
// model of the row RAM's port b behind it (address and output registered,
// data two clocks after the address). Checks: reset values of the registers;
// register writes and read-back; one-clock command pulses for start of pass
// 1, start of pass 2, commit and release, and none for other writes; status
// and label count read-back; window writes reaching the RAM and window reads
// returning its data; and that every read holds waitrequest for exactly two
// clocks while writes complete at once.
`timescale 1ns/1ps
module tb_avalon_slave;
  import ccl_pkg::*;
  logic clk = 0, reset = 1;
  logic chipselect = 0, read = 0, write = 0;
  logic [BUS_AW-1:0] address = '0;
  logic [BUS_W-1:0] writedata = '0, readdata;
  logic waitrequest;
  logic [6:0] win_word;
  logic win_we;
  logic [31:0] win_wdata, ram_q;
  csr_t csr;
  cmd_t cmd;
  status_t status = '0;
  label_t labels = '0;
  int checks = 0, failures = 0;
  avalon_slave dut (.*);
  always #5 clk = ~clk;

  // row RAM model, port b only
  logic [31:0] mem [128];
  logic [6:0]  addr_r;
  always @(posedge clk) begin
    addr_r <= win_word;
    ram_q  <= mem[addr_r];
    if (win_we) mem[win_word] <= win_wdata;
  end

  // command pulse counters
  int n_start1 = 0, n_start2 = 0, n_commit = 0, n_release = 0;
  always @(posedge clk) if (!reset) begin
    if (cmd.start1) n_start1++;
    if (cmd.start2) n_start2++;
    if (cmd.commit) n_commit++;
    if (cmd.release_row) n_release++;
  end

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

  task automatic av_write(int a, logic [31:0] d);
    @(posedge clk);
    chipselect <= 1; write <= 1; address <= BUS_AW'(a); writedata <= d;
    @(negedge clk);
    check(!waitrequest, "write without wait states");
    @(posedge clk);
    chipselect <= 0; write <= 0;
  endtask

  task automatic av_read(int a, output logic [31:0] d);
    int waits = 0;
    @(posedge clk);
    chipselect <= 1; read <= 1; address <= BUS_AW'(a);
    @(negedge clk);
    while (waitrequest) begin waits++; @(negedge clk); end
    d = readdata;
    check(waits == 2, $sformatf("read wait states %0d", waits));
    @(posedge clk);
    chipselect <= 0; read <= 0;
  endtask

  localparam int REGB = 1 << (BUS_AW - 1);

  initial begin
    logic [31:0] d;
    logic [31:0] shadow [128];
    repeat (3) @(negedge clk); reset = 0;
    check(csr.width_m1 == 9'd511 && csr.thresh == 8'd128 && !csr.pass2, "reset values");
    av_read(REGB + 1, d); check(d == 512, "WIDTH reset value");
    av_read(REGB + 2, d); check(d == 128, "THRESH reset value");
    av_write(REGB + 1, 37); av_read(REGB + 1, d);
    check(d == 37 && csr.width_m1 == 9'd36, "WIDTH write");
    av_write(REGB + 2, 77); av_read(REGB + 2, d);
    check(d == 77 && csr.thresh == 8'd77, "THRESH write");
    av_write(REGB + 0, 2); @(negedge clk); check(csr.pass2, "pass 2 mode");
    av_read(REGB + 0, d);  check(d == 1, "CTRL read");
    av_write(REGB + 0, 1); @(negedge clk); check(!csr.pass2, "pass 1 mode");
    av_write(REGB + 3, 0); av_write(REGB + 3, 0); av_write(REGB + 4, 0);
    av_write(REGB + 5, 0);                       // read-only register: no effect
    @(negedge clk);
    check(n_start1 == 1 && n_start2 == 1 && n_commit == 2 && n_release == 1,
          $sformatf("command pulses %0d %0d %0d %0d", n_start1, n_start2, n_commit, n_release));
    for (int i = 0; i < 16; i++) begin
      status = status_t'($urandom); labels = label_t'($urandom);
      av_read(REGB + 5, d); check(d == 32'(status), "STATUS read");
      av_read(REGB + 6, d); check(d == 32'(labels), "LABELS read");
    end
    for (int w = 0; w < 128; w++) begin
      shadow[w] = $urandom;
      av_write(w, shadow[w]);
    end
    for (int i = 0; i < 300; i++) begin
      automatic int w = $urandom % 128;
      av_read(w, d);
      check(d == shadow[w], $sformatf("window word %0d", w));
    end
    check(n_commit == 2, "window traffic makes no commands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
