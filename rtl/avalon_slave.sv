// avalon_slave: the Avalon memory-mapped slave port through which the host's
// driver reaches the labeller. Word addresses with the top bit clear form the
// one-row window (128 words = 512 pixels, four pixels per word, first pixel
// in the low byte); those with the top bit set are registers (see ccl_pkg):
//
//   0 CTRL    W bit0 start pass 1, bit1 start pass 2; R bit0 pass-2 mode
//   1 WIDTH   RW row width in pixels (1..512)
//   2 THRESH  RW foreground threshold (default 128)
//   3 COMMIT  W  the row in the window is complete
//   4 RELEASE W  the labelled row in the window has been read
//   5 STATUS  R  {overflow, busy, ready, space} in bits 3..0
//   6 LABELS  R  number of pass-1 labels handed out
//
// Writes complete without wait states: window writes go straight to port b
// of the row RAM, register writes update the register or emit a one-clock
// command pulse. Reads take three clocks: the RAM registers its address and
// its output, so waitrequest is held for the first two clocks of a read and
// readdata is valid in the third, when waitrequest is low. Register reads go
// through the same delay. No byteenable: whole words are written.
// The read wait states follow the source's note that the dual-port RAM adds
// delay to a read; the register map is this design's.
module avalon_slave
  import ccl_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  // Avalon-MM slave
  input  logic              chipselect,
  input  logic              read,
  input  logic              write,
  input  logic [BUS_AW-1:0] address,
  input  logic [BUS_W-1:0]  writedata,
  output logic [BUS_W-1:0]  readdata,
  output logic              waitrequest,
  // row window towards the circular buffer and RAM port b
  output logic [$clog2(SLOT_WORDS)-1:0] win_word,
  output logic              win_we,
  output logic [BUS_W-1:0]  win_wdata,
  input  logic [BUS_W-1:0]  ram_q,
  // registers
  output csr_t              csr,
  output cmd_t              cmd,
  input  status_t           status,
  input  label_t            labels
);

  logic is_reg;
  reg_e reg_sel;
  assign is_reg  = address[BUS_AW-1];
  assign reg_sel = reg_e'(address[2:0]);

  logic wr_access, rd_access;
  assign wr_access = chipselect && write;
  assign rd_access = chipselect && read;

  // ---- read wait states ----
  logic [1:0]       rd_stage;
  logic             rd_is_reg;
  logic [BUS_W-1:0] rd_reg;

  logic [BUS_W-1:0] reg_rdata;
  always_comb begin
    reg_rdata = '0;
    unique case (reg_sel)
      REG_CTRL:   reg_rdata = BUS_W'(csr.pass2);
      REG_WIDTH:  reg_rdata = BUS_W'(csr.width_m1) + 1;
      REG_THRESH: reg_rdata = BUS_W'(csr.thresh);
      REG_STATUS: reg_rdata = BUS_W'(status);
      REG_LABELS: reg_rdata = BUS_W'(labels);
      default:    reg_rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      rd_stage <= '0;
    end else if (rd_access) begin
      if (rd_stage == 2'd0) begin
        rd_is_reg <= is_reg;
        rd_reg    <= reg_rdata;
      end
      rd_stage <= (rd_stage == 2'd2) ? 2'd0 : rd_stage + 2'd1;
    end else begin
      rd_stage <= '0;
    end
  end

  assign waitrequest = rd_access && (rd_stage != 2'd2);
  assign readdata    = rd_is_reg ? rd_reg : ram_q;

  // ---- window ----
  assign win_word  = address[$clog2(SLOT_WORDS)-1:0];
  assign win_we    = wr_access && !is_reg;
  assign win_wdata = writedata;

  // ---- registers ----
  always_ff @(posedge clk) begin
    if (reset) begin
      csr.pass2    <= 1'b0;
      csr.width_m1 <= col_t'(SLOT_BYTES - 1);
      csr.thresh   <= THRESH_DEFAULT;
    end else if (wr_access && is_reg) begin
      unique case (reg_sel)
        REG_CTRL: begin
          if (writedata[0])      csr.pass2 <= 1'b0;
          else if (writedata[1]) csr.pass2 <= 1'b1;
        end
        REG_WIDTH:  csr.width_m1 <= col_t'(writedata - 1);
        REG_THRESH: csr.thresh   <= pixel_t'(writedata);
        default: ;
      endcase
    end
  end

  always_comb begin
    cmd = '0;
    if (wr_access && is_reg) begin
      cmd.start1      = (reg_sel == REG_CTRL) && writedata[0];
      cmd.start2      = (reg_sel == REG_CTRL) && !writedata[0] && writedata[1];
      cmd.commit      = (reg_sel == REG_COMMIT);
      cmd.release_row = (reg_sel == REG_RELEASE);
    end
  end

  a_no_rw: assert property (@(posedge clk) disable iff (reset) !(chipselect && read && write));
  a_hold_addr: assert property (@(posedge clk) disable iff (reset)
    rd_access && waitrequest |=> rd_access && $stable(address));

endmodule
