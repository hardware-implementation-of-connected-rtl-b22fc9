// ccl_core: the connected-component labeller. It works on one image row at a
// time, as handed to it by the circular buffer, through the byte-wide port a
// of the row RAM, and runs one of two passes chosen by the pass2 input.
//
// Pass 1 (label): for every pixel of the active row, left to right, it reads
// the top row's label at the same column and the pixel itself, thresholds the
// pixel, decides its label from the top-left, top and left neighbours, and
// writes the label back over the pixel, in place. Equal-component labels that
// meet are recorded in the equivalence table, and the labeller stalls until
// the table has taken the merge.
//
// Pass 2 (resolve): a start2 pulse first flattens the equivalence table; the
// rows then written by software hold pass-1 labels, and each is replaced by
// its lowest equivalent label, in place.
//
// Per pixel: RD_T presents the top address, RD_P the pixel address; the RAM
// returns data two clocks after the address, so the top label is captured in
// WAIT and the pixel is on the RAM output in CALC, where the result is
// written back. A pixel takes 4 clocks, plus the merge walk (at least one
// clock) when two labels meet. row_done is high for one clock, the clock
// at whose end the last label write reaches the array, so any read the
// bus issues after it sees the whole row.
//
// The per-pixel schedule and the stall are this design's; the neighbourhood
// rule and the two passes follow the source.
module ccl_core
  import ccl_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  // control
  input  logic   start1,      // begin pass 1 of a new image
  input  logic   start2,      // begin pass 2: flatten the table first
  input  logic   pass2,
  input  col_t   width_m1,
  input  pixel_t thresh,
  // circular buffer
  input  logic   row_valid,
  input  slot_t  act_slot,
  input  slot_t  top_slot,
  input  logic   has_top,
  output logic   row_done,
  // row RAM port a
  output logic [BYTE_AW-1:0] ram_addr,
  output logic [PIXEL_W-1:0] ram_wdata,
  output logic               ram_we,
  input  logic [PIXEL_W-1:0] ram_q,
  // status
  output logic   busy,
  output label_t count,
  output logic   overflow,
  // event strobes, for observation
  output logic   ev_new,
  output logic   ev_merge,
  output logic   ev_stall
);

  typedef enum logic [2:0] {S_IDLE, S_RD_T, S_RD_P, S_WAIT, S_CALC, S_MERGE, S_DONE} state_e;
  state_e state;

  col_t   x;
  logic   last;
  label_t tl, t, cl;
  logic [BYTE_AW-1:0] top_addr, act_addr;
  logic   fg;
  label_t p1_label, merge_a, merge_b;
  logic   new_label, merge;
  label_t final_label, fl_lut_addr;
  logic   lut_busy, res_busy;
  label_t res_a1, res_a2, res_wa, res_wd, lut_d1, lut_d2;
  logic   res_we;

  logic in_calc, calc1, advance;
  assign in_calc = (state == S_CALC);
  assign calc1   = in_calc && !pass2;
  assign advance = (in_calc && !(calc1 && merge)) || (state == S_MERGE && !lut_busy);

  ccl_counter u_counter (
    .clk, .clear(state == S_IDLE), .inc(advance && !last), .width_m1, .x, .last);

  ccl_neighborhood u_nbr (
    .clk, .clear(state == S_IDLE), .load_t(state == S_WAIT), .use_top(has_top),
    .top_q(ram_q), .shift(calc1), .c_label(p1_label), .x, .act_slot, .top_slot,
    .tl, .t, .cl, .top_addr, .act_addr);

  ccl_threshold u_thr (.pixel(ram_q), .thresh, .fg);

  ccl_label u_label (
    .clk, .clear(start1), .commit(calc1), .fg, .tl, .t, .cl,
    .label(p1_label), .new_label, .merge, .merge_a, .merge_b, .count, .overflow);

  ccl_lut u_lut (
    .clk, .reset,
    .init_we(calc1 && new_label), .init_label(p1_label),
    .merge_start(calc1 && merge), .merge_a, .merge_b, .busy(lut_busy),
    .ext_we(res_we), .ext_addr(res_wa), .ext_data(res_wd),
    .rd_addr1(res_busy ? res_a1 : fl_lut_addr), .rd_data1(lut_d1),
    .rd_addr2(res_a2), .rd_data2(lut_d2));

  ccl_lut_resolve u_resolve (
    .clk, .reset, .start(start2), .count, .busy(res_busy),
    .rd_addr1(res_a1), .rd_data1(lut_d1), .rd_addr2(res_a2), .rd_data2(lut_d2),
    .we(res_we), .waddr(res_wa), .wdata(res_wd));

  ccl_final_label u_final (
    .label_in(ram_q), .lut_addr(fl_lut_addr), .lut_data(lut_d1), .label_out(final_label));

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE:  if (row_valid && !res_busy && !start1 && !start2) state <= S_RD_T;
        S_RD_T:  state <= S_RD_P;
        S_RD_P:  state <= S_WAIT;
        S_WAIT:  state <= S_CALC;
        S_CALC:  if (calc1 && merge) state <= S_MERGE;
                 else state <= last ? S_DONE : S_RD_T;
        S_MERGE: if (!lut_busy) state <= last ? S_DONE : S_RD_T;
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ram_addr  = (state == S_RD_T) ? top_addr : act_addr;
    ram_we    = in_calc;
    ram_wdata = pass2 ? final_label : p1_label;
  end

  assign row_done = (state == S_DONE);
  assign busy     = (state != S_IDLE) || res_busy;
  assign ev_new   = calc1 && fg && new_label;
  assign ev_merge = calc1 && merge;
  assign ev_stall = (state == S_MERGE) && lut_busy;

  a_no_start_mid_row: assert property (@(posedge clk) disable iff (reset)
    (start1 || start2) |-> state == S_IDLE);

endmodule
