// ffa2_pre: preprocessing adders of the 2-parallel symmetric fast FIR filter.
//
// A block holds the two polyphase samples X0 = x(2k) and X1 = x(2k+1). The
// filter feeds three sub-filters: (H0+H1) with X0+X1, (H0-H1) with X0-X1,
// and H1 with X1 itself. This block forms the sum and the difference: two
// adders, purely combinational, one bit wider than the input. The choice of
// sub-filters is the published symmetric 2x2 structure; the widths are this
// design's.
module ffa2_pre #(
  parameter int unsigned DW = 16
) (
  input  logic signed [DW-1:0] x0,
  input  logic signed [DW-1:0] x1,
  output logic signed [DW:0]   x_sum,   // X0 + X1
  output logic signed [DW:0]   x_dif    // X0 - X1
);
  assign x_sum = (DW+1)'(x0) + (DW+1)'(x1);
  assign x_dif = (DW+1)'(x0) - (DW+1)'(x1);
endmodule
