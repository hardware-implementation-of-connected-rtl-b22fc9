// ram_cc: dual-port, single-clock RAM of 2048 bytes with ports of different
// width. Port a is one byte wide and serves the labeller; port b is one
// 32-bit word wide and serves the bus. Word w of port b holds bytes 4w..4w+3
// of port a in little-endian order (byte 4w+k in bits 8k+7:8k).
//
// Every input (address, data, write enable) is registered, and so is each
// read output: a read issued with the address in clock cycle t returns its
// data on q in cycle t+2; a write lands in the array one clock after it is
// presented. A read on one port of a location being written in the same
// cycle returns the old contents. aclr asynchronously clears the two output
// registers only; the array itself is not reset.
//
// Port names, widths and the registered inputs and outputs follow the
// printed memory block; the read-during-write behaviour is this design's.
module ram_cc #(
  parameter int unsigned BYTES = 2048,
  parameter int unsigned A_W   = 8,
  parameter int unsigned B_W   = 32,
  localparam int unsigned LANES = B_W / A_W,
  localparam int unsigned AA_W  = $clog2(BYTES),
  localparam int unsigned AB_W  = $clog2(BYTES / LANES)
) (
  input  logic            clock,
  input  logic            aclr,
  input  logic [AA_W-1:0] address_a,
  input  logic [A_W-1:0]  data_a,
  input  logic            wren_a,
  output logic [A_W-1:0]  q_a,
  input  logic [AB_W-1:0] address_b,
  input  logic [B_W-1:0]  data_b,
  input  logic            wren_b,
  output logic [B_W-1:0]  q_b
);

  // Stored as words of byte lanes so both ports index it directly.
  logic [LANES-1:0][A_W-1:0] mem [BYTES/LANES];

  logic [AA_W-1:0] addr_a_r;
  logic [A_W-1:0]  data_a_r;
  logic            wren_a_r;
  logic [AB_W-1:0] addr_b_r;
  logic [B_W-1:0]  data_b_r;
  logic            wren_b_r;

  always_ff @(posedge clock) begin
    addr_a_r <= address_a;
    data_a_r <= data_a;
    wren_a_r <= wren_a;
    addr_b_r <= address_b;
    data_b_r <= data_b;
    wren_b_r <= wren_b;
  end

  // Writes from both ports; the byte port wins a same-byte collision.
  always_ff @(posedge clock) begin
    if (wren_b_r) mem[addr_b_r] <= data_b_r;
    if (wren_a_r) mem[addr_a_r[AA_W-1:$clog2(LANES)]][addr_a_r[$clog2(LANES)-1:0]] <= data_a_r;
  end

  // Registered outputs with asynchronous clear.
  always_ff @(posedge clock or posedge aclr) begin
    if (aclr) begin
      q_a <= '0;
      q_b <= '0;
    end else begin
      q_a <= mem[addr_a_r[AA_W-1:$clog2(LANES)]][addr_a_r[$clog2(LANES)-1:0]];
      q_b <= mem[addr_b_r];
    end
  end

endmodule
