// tb_ram_cc: checks the mixed-width dual-port RAM against a byte array kept
// by the testbench: byte writes on port a read back as little-endian words on
// port b and the reverse, random traffic on both ports at once to different
// words, the two-clock read latency (the old value one clock after the
// address, the addressed value two clocks after), and aclr clearing both
// outputs.
`timescale 1ns/1ps
module tb_ram_cc;
  logic clock = 0, aclr = 0, wren_a = 0, wren_b = 0;
  logic [10:0] address_a = '0;
  logic [8:0]  address_b = '0;
  logic [7:0]  data_a = '0, q_a;
  logic [31:0] data_b = '0, q_b;
  byte unsigned ref_mem [2048];
  int checks = 0, failures = 0;
  ram_cc dut (.*);
  always #5 clock = ~clock;
  initial begin : watchdog
    repeat (200000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  function automatic logic [31:0] ref_word(int w);
    return {ref_mem[4*w+3], ref_mem[4*w+2], ref_mem[4*w+1], ref_mem[4*w]};
  endfunction
  initial begin
    // fill through port b
    for (int w = 0; w < 512; w++) begin
      @(negedge clock);
      wren_b = 1; address_b = 9'(w); data_b = $urandom;
      for (int k = 0; k < 4; k++) ref_mem[4*w+k] = data_b[8*k +: 8];
    end
    @(negedge clock); wren_b = 0;
    @(negedge clock);
    // read every byte through port a, checking the latency
    for (int b = 0; b < 2048; b++) begin
      address_a = 11'(b);
      @(negedge clock);
      @(negedge clock);
      check(q_a == ref_mem[b], $sformatf("byte %0d = %02x exp %02x", b, q_a, ref_mem[b]));
    end
    // random traffic on both ports, different words
    for (int i = 0; i < 4000; i++) begin
      int ba, wb;
      logic [31:0] exp_b; logic [7:0] exp_a;
      ba = $urandom % 2048;
      do wb = $urandom % 512; while (wb == ba / 4);
      @(negedge clock);
      address_a = 11'(ba); wren_a = $urandom % 2; data_a = $urandom;
      address_b = 9'(wb);  wren_b = $urandom % 2; data_b = $urandom;
      exp_a = ref_mem[ba]; exp_b = ref_word(wb);     // old contents
      if (wren_a) ref_mem[ba] = data_a;
      if (wren_b) for (int k = 0; k < 4; k++) ref_mem[4*wb+k] = data_b[8*k +: 8];
      @(negedge clock); wren_a = 0; wren_b = 0;
      @(negedge clock);
      check(q_a == exp_a, "port a read during write returns old data");
      check(q_b == exp_b, "port b read during write returns old data");
      @(negedge clock);
      check(q_a == ref_mem[ba], "port a after write");
      check(q_b == ref_word(wb), "port b after write");
    end
    // latency: one clock after a new address the output still holds the old word
    address_b = 9'd5; @(negedge clock); @(negedge clock);
    address_b = 9'd6; @(negedge clock);
    check(q_b == ref_word(5), "no data one clock after the address");
    @(negedge clock);
    check(q_b == ref_word(6), "data two clocks after the address");
    // aclr
    address_a = 11'd0; address_b = 9'd0;
    ref_mem[0] = 8'hff; wren_a = 1; data_a = 8'hff; @(negedge clock); wren_a = 0;
    repeat (3) @(negedge clock);
    aclr = 1; #1;
    check(q_a == 0 && q_b == 0, "aclr clears outputs");
    @(negedge clock); aclr = 0;
    repeat (2) @(negedge clock);
    check(q_a == 8'hff, "contents kept through aclr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
