// ffa2_post: postprocessing of the 2-parallel symmetric fast FIR filter.
//
// Inputs are the three sub-filter outputs of one block:
//   a = (H0+H1)(X0+X1)   b = (H0-H1)(X0-X1)   p = H1 X1
// Since a + b = 2(H0X0 + H1X1) and a - b = 2(H0X1 + H1X0), the two outputs
//   y0 = (a+b)/2 - p + z^-2 p      (= H0X0 + z^-2 H1X1)
//   y1 = (a-b)/2                   (= H0X1 + H1X0)
// The halving is an exact arithmetic shift, because both sums are even.
// z^-2 in the sample domain is one block, i.e. one register that loads p on
// each clock with en high (reset to zero). Four adders; the outputs are
// combinational. The equations and adder count follow the published
// structure; the shift for the halving, the enable and the reset are this
// design's.
module ffa2_post #(
  parameter int unsigned AW = 40   // width of the inputs and outputs
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [AW-1:0] a,
  input  logic signed [AW-1:0] b,
  input  logic signed [AW-1:0] p,
  output logic signed [AW-1:0] y0,
  output logic signed [AW-1:0] y1
);
  logic signed [AW:0]   sum_ab, dif_ab;
  logic signed [AW-1:0] p_d;   // H1X1 of the previous block

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  p_d <= '0;
    else if (en) p_d <= p;
  end

  assign sum_ab = a + b;
  assign dif_ab = a - b;
  assign y0 = AW'(sum_ab >>> 1) - p + p_d;
  assign y1 = AW'(dif_ab >>> 1);
endmodule
