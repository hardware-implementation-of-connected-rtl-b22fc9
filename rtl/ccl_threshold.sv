// ccl_threshold: decides whether a grey-level pixel belongs to an object
// (foreground) or to the background. A pixel is foreground when its value is
// at least the programmed threshold. Purely combinational.
// The comparison direction and the threshold register are this design's
// choices; the source only says the pixels are thresholded.
module ccl_threshold
  import ccl_pkg::*;
(
  input  pixel_t pixel,
  input  pixel_t thresh,
  output logic   fg
);

  assign fg = (pixel >= thresh);

endmodule
