// ccl_final_label: second-pass relabelling. A pass-1 label read back from the
// row RAM is replaced by the lowest label equivalent to it, read from the
// flattened equivalence table; background (0) stays 0. It drives the table's
// read address and returns the result in the same cycle (combinational).
module ccl_final_label
  import ccl_pkg::*;
(
  input  label_t label_in,
  output label_t lut_addr,
  input  label_t lut_data,
  output label_t label_out
);

  assign lut_addr  = label_in;
  assign label_out = (label_in == '0) ? '0 : lut_data;

endmodule
