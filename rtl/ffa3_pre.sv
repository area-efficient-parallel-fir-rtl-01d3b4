// ffa3_pre: preprocessing adders of the 3-parallel symmetric fast FIR filter.
//
// A block holds X0 = x(3k), X1 = x(3k+1), X2 = x(3k+2). The six sub-filters
// take H1 with X1, H2 with X2, and the four sums formed here:
//   X0+X2 -> (H0+H2)   X0-X2 -> (H0-H2)   X1+X2 -> (H1+H2)
//   X0+X1+X2 -> (H0+H1+H2)   (reusing X0+X2)
// Four adders, combinational; outputs are two bits wider than the input.
// The four symmetric sub-filters are those of the published 3x3 structure;
// which sums feed the two general ones is this design's derivation.
module ffa3_pre #(
  parameter int unsigned DW = 16
) (
  input  logic signed [DW-1:0] x0,
  input  logic signed [DW-1:0] x1,
  input  logic signed [DW-1:0] x2,
  output logic signed [DW+1:0] x02_sum,   // X0 + X2
  output logic signed [DW+1:0] x02_dif,   // X0 - X2
  output logic signed [DW+1:0] x12_sum,   // X1 + X2
  output logic signed [DW+1:0] x012_sum   // X0 + X1 + X2
);
  assign x02_sum  = (DW+2)'(x0) + (DW+2)'(x2);
  assign x02_dif  = (DW+2)'(x0) - (DW+2)'(x2);
  assign x12_sum  = (DW+2)'(x1) + (DW+2)'(x2);
  assign x012_sum = x02_sum + (DW+2)'(x1);
endmodule
