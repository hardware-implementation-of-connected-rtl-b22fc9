// ccl_top: FPGA side of a two-pass connected-component labeller for images
// streamed one row at a time by a host driver over an Avalon memory-mapped
// bus. It joins the bus slave, the three-row circular buffer, the 2048-byte
// dual-port row RAM and the labeller:
//
//   bus -> avalon_slave -> circular_buffer (window -> slot) -> RAM port b
//   circular_buffer -> ccl_core (active/top row)  <-> RAM port a
//
// Interface: the Avalon slave signals (word address, 32-bit data, read wait
// states via waitrequest) and the event strobes of the labeller. The
// register map and the software protocol are given in avalon_slave and
// circular_buffer. Single clock, synchronous active-high reset; the RAM's
// output registers are cleared asynchronously by the same reset, so lint
// notes reset as both a synchronous and an asynchronous input, as intended.
// The block split and the connections follow the original design's block
// diagram; the event strobes are brought out for observation.
module ccl_top
  import ccl_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              chipselect,
  input  logic              read,
  input  logic              write,
  input  logic [BUS_AW-1:0] address,
  input  logic [BUS_W-1:0]  writedata,
  output logic [BUS_W-1:0]  readdata,
  output logic              waitrequest,
  output logic              ev_new,     // a new label was handed out
  output logic              ev_merge,   // two labels met
  output logic              ev_stall    // labeller waits for the table
);

  csr_t    csr;
  cmd_t    cmd;
  status_t status;
  label_t  labels;
  logic    overflow, core_busy;

  logic [$clog2(SLOT_WORDS)-1:0] win_word;
  logic              win_we;
  logic [BUS_W-1:0]  win_wdata, q_b;
  logic [WORD_AW-1:0] ram_word;

  logic  row_valid, has_top, row_done, space, ready;
  slot_t act_slot, top_slot;

  logic [BYTE_AW-1:0] a_addr;
  logic [PIXEL_W-1:0] a_wdata, q_a;
  logic               a_we;

  assign status = '{overflow: overflow, busy: core_busy, ready: ready, space: space};

  avalon_slave u_slave (
    .clk, .reset, .chipselect, .read, .write, .address, .writedata, .readdata, .waitrequest,
    .win_word, .win_we, .win_wdata, .ram_q(q_b), .csr, .cmd, .status, .labels);

  circular_buffer u_cbuf (
    .clk, .reset, .clear(cmd.start1 || cmd.start2), .commit(cmd.commit),
    .release_row(cmd.release_row), .row_done, .win_we, .win_word, .ram_word,
    .row_valid, .act_slot, .top_slot, .has_top, .space, .ready);

  ram_cc #(.BYTES(RAM_BYTES), .A_W(PIXEL_W), .B_W(BUS_W)) u_ram (
    .clock(clk), .aclr(reset),
    .address_a(a_addr), .data_a(a_wdata), .wren_a(a_we), .q_a,
    .address_b(ram_word), .data_b(win_wdata), .wren_b(win_we), .q_b);

  ccl_core u_core (
    .clk, .reset, .start1(cmd.start1), .start2(cmd.start2), .pass2(csr.pass2),
    .width_m1(csr.width_m1), .thresh(csr.thresh),
    .row_valid, .act_slot, .top_slot, .has_top, .row_done,
    .ram_addr(a_addr), .ram_wdata(a_wdata), .ram_we(a_we), .ram_q(q_a),
    .busy(core_busy), .count(labels), .overflow, .ev_new, .ev_merge, .ev_stall);

endmodule
