// ccl_counter: column counter of the labeller. It walks the active row from
// column 0 to the programmed width minus one, one step per processed pixel,
// and flags the last column. Its count addresses the neighbourhood reads and
// the label write-back in both passes.
//
// Timing: clear and inc take effect at the next clock edge; x and last are
// valid throughout the cycle. clear wins over inc.
module ccl_counter
  import ccl_pkg::*;
(
  input  logic clk,
  input  logic clear,     // restart at column 0
  input  logic inc,       // advance one column
  input  col_t width_m1,  // row width - 1
  output col_t x,
  output logic last
);

  always_ff @(posedge clk) begin
    if (clear)    x <= '0;
    else if (inc) x <= x + col_t'(1);
  end

  assign last = (x == width_m1);

endmodule
