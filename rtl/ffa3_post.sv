// ffa3_post: postprocessing of the 3-parallel symmetric fast FIR filter.
//
// Inputs are the six sub-filter outputs of one block:
//   a  = (H0+H2)(X0+X2)   b  = (H0-H2)(X0-X2)   e = (H1+H2)(X1+X2)
//   c  = (H0+H1+H2)(X0+X1+X2)   p1 = H1 X1   p2 = H2 X2
// With a+b = 2(H0X0+H2X2) and a-b = 2(H0X2+H2X0) the outputs are
//   y0 = (a+b)/2 - p2 + z^-3 (e - p1 - p2)   (= H0X0 + z^-3 (H1X2+H2X1))
//   y1 = c - e - a + p2 + z^-3 p2            (= H0X1+H1X0 + z^-3 H2X2)
//   y2 = (a-b)/2 + p1                        (= H0X2+H1X1+H2X0)
// The halvings are exact shifts. z^-3 in the sample domain is one block: two
// registers, loaded on each clock with en high and reset to zero. Eleven
// adders; the outputs are combinational. These equations were derived here
// to fit the published sub-filter set; with ffa3_pre they need 15 adders,
// where the published structure quotes 17.
module ffa3_post #(
  parameter int unsigned AW = 40
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [AW-1:0] a,
  input  logic signed [AW-1:0] b,
  input  logic signed [AW-1:0] e,
  input  logic signed [AW-1:0] c,
  input  logic signed [AW-1:0] p1,
  input  logic signed [AW-1:0] p2,
  output logic signed [AW-1:0] y0,
  output logic signed [AW-1:0] y1,
  output logic signed [AW-1:0] y2
);
  logic signed [AW:0]   sum_ab, dif_ab;
  logic signed [AW-1:0] cross12;          // H1X2 + H2X1 of this block
  logic signed [AW-1:0] cross12_d, p2_d;  // the same of the previous block

  assign sum_ab  = a + b;
  assign dif_ab  = a - b;
  assign cross12 = e - p1 - p2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cross12_d <= '0;
      p2_d      <= '0;
    end else if (en) begin
      cross12_d <= cross12;
      p2_d      <= p2;
    end
  end

  assign y0 = AW'(sum_ab >>> 1) - p2 + cross12_d;
  assign y1 = c - e - a + p2 + p2_d;
  assign y2 = AW'(dif_ab >>> 1) + p1;
endmodule
