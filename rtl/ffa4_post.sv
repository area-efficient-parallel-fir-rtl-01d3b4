// ffa4_post: outer postprocessing of the cascaded 4-parallel filter.
//
// The outer 2x2 stage splits the input into its even and odd sample streams
// X'0, X'1 (two samples of each per clock) and feeds three inner filters,
// whose outputs arrive as two-sample vectors in the decimated time m:
//   a[j] = ((H'0+H'1)(X'0+X'1))(2k+j)   b[j] = ((H'0-H'1)(X'0-X'1))(2k+j)
//   p[j] = (H'1 X'1)(2k+j)
// The outer equations, as in ffa2_post but on the decimated streams,
//   Y'0(m) = (a+b)/2 - p(m) + p(m-1)     Y'1(m) = (a-b)/2
// need p one decimated sample back: for lane 1 that is p[0] of the same
// clock, for lane 0 it is p[1] of the previous accepted clock (one register,
// reset to zero). Outputs interleave to y(4k..4k+3) =
// {Y'0(2k), Y'1(2k), Y'0(2k+1), Y'1(2k+1)}. Eight adders, combinational.
// The 4-parallel filter is quoted only by its cost; building it as this
// cascade is this design's choice, and it matches the quoted multiplier count.
module ffa4_post #(
  parameter int unsigned AW = 40
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [AW-1:0] a [2],
  input  logic signed [AW-1:0] b [2],
  input  logic signed [AW-1:0] p [2],
  output logic signed [AW-1:0] y [4]
);
  logic signed [AW:0]   sum_ab [2], dif_ab [2];
  logic signed [AW-1:0] p1_d;   // p[1] of the previous block

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  p1_d <= '0;
    else if (en) p1_d <= p[1];
  end

  always_comb begin
    for (int j = 0; j < 2; j++) begin
      sum_ab[j] = (AW+1)'(a[j]) + (AW+1)'(b[j]);
      dif_ab[j] = (AW+1)'(a[j]) - (AW+1)'(b[j]);
    end
    y[0] = AW'(sum_ab[0] >>> 1) - p[0] + p1_d;
    y[1] = AW'(dif_ab[0] >>> 1);
    y[2] = AW'(sum_ab[1] >>> 1) - p[1] + p[0];
    y[3] = AW'(dif_ab[1] >>> 1);
  end
endmodule
