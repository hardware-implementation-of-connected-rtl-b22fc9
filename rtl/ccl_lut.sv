// ccl_lut: the label equivalence table. Entry LUT[l] holds a label that is
// equivalent to l and not larger than it; a label whose entry points to
// itself is the root of its class.
//
//  * init:  a freshly handed-out label n gets LUT[n] = n.
//  * merge: labels a and b were found to touch. The rule is
//           LUT[larger] = smaller. If the larger label x already points to
//           some other label old, overwriting it would lose x ~ old, so the
//           rule is applied again along the chain: LUT[x] = min(old, y) and
//           the pair (max(old, y), min(old, y)) is merged next, until x is a
//           root (it is then pointed at y) or already points at y. Every step
//           lowers x, so the walk ends; one step takes one clock, and busy is
//           high from the clock after merge_start until the walk is over.
//  * ext:   a plain write port used by the table resolver.
//
// Two combinational read ports serve the resolver and the final-label
// lookup. The table is 256 entries of 8 bits and has no reset: only entries
// written by init are ever read. Entry 0 (background) is never used.
// The chain walk is this design's way of keeping the printed update rule
// lossless.
module ccl_lut
  import ccl_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   init_we,
  input  label_t init_label,
  input  logic   merge_start,
  input  label_t merge_a,
  input  label_t merge_b,
  output logic   busy,
  input  logic   ext_we,
  input  label_t ext_addr,
  input  label_t ext_data,
  input  label_t rd_addr1,
  output label_t rd_data1,
  input  label_t rd_addr2,
  output label_t rd_data2
);

  label_t lut [NLABELS];

  label_t x, y, old;
  logic   step_we;
  label_t step_addr, step_data;

  assign old      = lut[x];
  assign rd_data1 = lut[rd_addr1];
  assign rd_data2 = lut[rd_addr2];

  // One step of the chain walk.
  always_comb begin
    step_we   = 1'b0;
    step_addr = x;
    step_data = y;
    if (busy && old != y && old > y) step_we = 1'b1;  // x root, or old > y
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      busy <= 1'b0;
    end else if (merge_start) begin
      busy <= 1'b1;
      x    <= (merge_a > merge_b) ? merge_a : merge_b;
      y    <= (merge_a > merge_b) ? merge_b : merge_a;
    end else if (busy) begin
      if (old == x || old == y) begin
        busy <= 1'b0;                  // x was a root (now linked) or already linked
      end else if (old > y) begin
        x <= old;                      // LUT[x] = y, continue with (old, y)
      end else begin
        x <= y;                        // LUT[x] stays old, continue with (y, old)
        y <= old;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (init_we) lut[init_label] <= init_label;
    if (step_we) lut[step_addr]  <= step_data;
    if (ext_we)  lut[ext_addr]   <= ext_data;
  end

  // The three writers are used at different times.
  a_one_writer: assert property (@(posedge clk) disable iff (reset)
    $onehot0({init_we, step_we, ext_we}));
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (reset)
    !(merge_start && busy));

endmodule
