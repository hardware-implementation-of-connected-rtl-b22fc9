// ccl_neighborhood: the 2x2 neighbourhood of the raster scan,
//
//     TL  T
//     CL  C
//
// T is read from the top row's slot in the row RAM (it holds the top row's
// pass-1 labels); TL and CL are not read again but kept in registers: when a
// pixel has been labelled, T moves into TL and the new label of C into CL.
// At the start of a row all three are cleared, and on the first row of an
// image (no top row) T is forced to background. The block also forms the RAM
// byte addresses {slot, column} of the top pixel and of the current pixel.
//
// Timing: clear, load_t and shift act at the next clock edge.
module ccl_neighborhood
  import ccl_pkg::*;
(
  input  logic   clk,
  input  logic   clear,     // start of row
  input  logic   load_t,    // RAM output holds the top label now
  input  logic   use_top,   // the top row exists
  input  label_t top_q,     // RAM output
  input  logic   shift,     // current pixel labelled
  input  label_t c_label,   // its label (0 = background)
  input  col_t   x,
  input  slot_t  act_slot,
  input  slot_t  top_slot,
  output label_t tl,
  output label_t t,
  output label_t cl,
  output logic [BYTE_AW-1:0] top_addr,
  output logic [BYTE_AW-1:0] act_addr
);

  always_ff @(posedge clk) begin
    if (clear) begin
      tl <= '0;
      t  <= '0;
      cl <= '0;
    end else begin
      if (load_t) t <= use_top ? top_q : '0;
      if (shift) begin
        tl <= t;
        cl <= c_label;
      end
    end
  end

  assign top_addr = {top_slot, x};
  assign act_addr = {act_slot, x};

endmodule
