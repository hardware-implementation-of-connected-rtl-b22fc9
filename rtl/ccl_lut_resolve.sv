// ccl_lut_resolve: flattens the equivalence table between the two passes so
// that every label points straight at the lowest label of its class.
// Because each entry points at a label not larger than itself, one ascending
// sweep is enough: for l = 1 .. count, LUT[l] = LUT[LUT[l]]. When l is
// reached, LUT[l] < l has already been flattened, so LUT[LUT[l]] is a root.
// The sweep reads the table through two combinational ports and writes it
// back in the same clock: one label per clock, busy for count clocks after
// start (none when count is 0). The sweep order is this design's choice.
module ccl_lut_resolve
  import ccl_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   start,
  input  label_t count,      // labels 1..count are in use
  output logic   busy,
  output label_t rd_addr1,
  input  label_t rd_data1,
  output label_t rd_addr2,
  input  label_t rd_data2,
  output logic   we,
  output label_t waddr,
  output label_t wdata
);

  label_t l, last;

  always_ff @(posedge clk) begin
    if (reset) begin
      busy <= 1'b0;
    end else if (start) begin
      busy <= (count != '0);
      l    <= label_t'(1);
      last <= count;
    end else if (busy) begin
      if (l == last) busy <= 1'b0;
      l <= l + label_t'(1);
    end
  end

  assign rd_addr1 = l;
  assign rd_addr2 = rd_data1;
  assign we       = busy;
  assign waddr    = l;
  assign wdata    = rd_data2;

endmodule
