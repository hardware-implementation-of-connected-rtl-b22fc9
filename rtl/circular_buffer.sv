// circular_buffer: runs three row slots of the row RAM as a ring, so an image
// far larger than the RAM can be labelled one row at a time. Software writes
// a row of pixels into a one-row window and commits it; the labeller takes
// committed rows in order, using the previous row (the top row) for the top
// neighbours; software reads the labels of each finished row back through the
// same window and releases it.
//
// Row n of the image lives in slot n mod 3. Window accesses are mapped to RAM
// word {slot, word}: writes go to the slot of the next row to be written,
// reads to the slot of the oldest labelled row not yet released.
//
// Flow control, given to software through the status register:
//   space - row n may be written when row n-3 has been released (at most
//           three rows in the ring) and, for n >= 3, row n-2 has been
//           labelled, since it uses row n-3 as its top row;
//   ready - a labelled row waits to be read.
// To the labeller: row_valid when a committed row waits, with its slot
// (act_slot), the slot of the row above (top_slot) and has_top, which is low
// for the first row after clear. A commit without space and a release with no
// row ready are ignored.
//
// clear (start of a pass) empties the ring. All updates at the clock edge.
// The ring discipline follows the source's three-row buffer; the exact
// conditions are this design's.
module circular_buffer
  import ccl_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  clear,
  input  logic  commit,
  input  logic  release_row,
  input  logic  row_done,
  // window side
  input  logic                         win_we,   // selects the write slot
  input  logic [$clog2(SLOT_WORDS)-1:0] win_word,
  output logic [WORD_AW-1:0]           ram_word,
  // labeller side
  output logic  row_valid,
  output slot_t act_slot,
  output slot_t top_slot,
  output logic  has_top,
  // software side
  output logic  space,
  output logic  ready
);

  slot_t wr_slot, proc_slot, rel_slot;
  logic [1:0] queued;   // committed, not yet labelled
  logic [1:0] unread;   // labelled, not yet released
  logic [1:0] written;  // rows committed since clear, saturating at 3
  logic       first;

  function automatic slot_t next_slot(slot_t s);
    return (s == slot_t'(ROWS - 1)) ? '0 : s + slot_t'(1);
  endfunction

  logic [2:0] occ;
  assign occ   = {1'b0, queued} + {1'b0, unread};
  assign space = (occ < 3'(ROWS)) && (queued < 2'd2 || written < 2'd3);
  assign ready = (unread != '0);

  logic do_commit, do_release, do_done;
  assign do_commit  = commit && space;
  assign do_release = release_row && ready;
  assign do_done    = row_done && (queued != '0);

  always_ff @(posedge clk) begin
    if (reset || clear) begin
      wr_slot   <= '0;
      proc_slot <= '0;
      rel_slot  <= '0;
      queued    <= '0;
      unread    <= '0;
      written   <= '0;
      first     <= 1'b1;
    end else begin
      if (do_commit) begin
        wr_slot <= next_slot(wr_slot);
        if (written != 2'd3) written <= written + 2'd1;
      end
      if (do_done) begin
        proc_slot <= next_slot(proc_slot);
        first     <= 1'b0;
      end
      if (do_release) rel_slot <= next_slot(rel_slot);
      queued <= queued + 2'(do_commit) - 2'(do_done);
      unread <= unread + 2'(do_done) - 2'(do_release);
    end
  end

  assign ram_word  = {win_we ? wr_slot : rel_slot, win_word};
  assign row_valid = (queued != '0);
  assign act_slot  = proc_slot;
  assign top_slot  = (proc_slot == '0) ? slot_t'(ROWS - 1) : proc_slot - slot_t'(1);
  assign has_top   = !first;

  a_ring_bound: assert property (@(posedge clk) disable iff (reset) occ <= 3'(ROWS));

endmodule
