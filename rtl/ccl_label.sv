// ccl_label: first-pass label decision. From the foreground flag of the
// current pixel C and the labels of its neighbours top-left TL, top T and
// left CL (0 = background) it gives C's label:
//
//   C background               -> 0
//   TL labelled                -> L(TL)   (T and CL need not be looked at)
//   only CL labelled           -> L(CL)
//   only T labelled            -> L(T)
//   T and CL labelled          -> the smaller of the two; if they differ,
//                                 request LUT[larger] = smaller
//   no neighbour labelled      -> a new label
//
// With the six-neighbour adjacency used here (TL, T, CL, and by symmetry the
// mirrored three below), TL touches both T and CL, so when TL is labelled any
// equivalence among the three was recorded when T or CL was labelled.
// The cases follow the original neighbourhood table; its general wording,
// "take the smallest neighbouring label", is applied where TL is background,
// and both give the same final labels after pass 2.
//
// The block also holds the count of labels handed out. A new label is
// count+1; labels are 8 bits, so after 255 labels the new label stays at 255
// and the sticky overflow flag is raised (this saturation is this design's
// choice). The decision is combinational; commit, clear update the count at
// the next clock edge.
module ccl_label
  import ccl_pkg::*;
(
  input  logic   clk,
  input  logic   clear,      // start of pass 1
  input  logic   commit,     // the decision below is taken this cycle
  input  logic   fg,
  input  label_t tl,
  input  label_t t,
  input  label_t cl,
  output label_t label,
  output logic   new_label,  // label is a fresh one
  output logic   merge,      // T and CL carry different labels
  output label_t merge_a,
  output label_t merge_b,
  output label_t count,      // labels handed out
  output logic   overflow
);

  localparam label_t MAX_LABEL = '1;

  label_t fresh;
  assign fresh = (count == MAX_LABEL) ? MAX_LABEL : count + label_t'(1);

  always_comb begin
    label     = '0;
    new_label = 1'b0;
    merge     = 1'b0;
    merge_a   = t;
    merge_b   = cl;
    if (fg) begin
      if (tl != '0)                   label = tl;
      else if (t != '0 && cl != '0) begin
        label = (t < cl) ? t : cl;
        merge = (t != cl);
      end
      else if (cl != '0)              label = cl;
      else if (t != '0)               label = t;
      else begin
        label     = fresh;
        new_label = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (clear) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (commit && new_label) begin
      if (count == MAX_LABEL) overflow <= 1'b1;
      else                    count    <= fresh;
    end
  end

endmodule
