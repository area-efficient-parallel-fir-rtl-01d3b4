// ffa_sym_top: the 2-, 3- and 4-parallel symmetric fast FIR filters side by
// side.
//
// The three filters are independent designs for the same job at different
// degrees of parallelism: ffa2_fir_sym for tap counts that are a multiple
// of 2, ffa3_fir_sym for multiples of 3 and ffa4_fir_sym (two cascaded 2x2
// stages) for multiples of 4. Each has its own block input, coefficient
// half, valid pair and outputs; they share only the clock and the
// asynchronous active-low reset. All default to 24 taps and 16-bit samples
// and coefficients. Latency of each is one clock from an accepted input block
// to its output block; each accepts one block per clock.
module ffa_sym_top
  import ffa_pkg::*;
#(
  parameter int unsigned N2 = 24,
  parameter int unsigned N3 = 24,
  parameter int unsigned N4 = 24,
  parameter int unsigned DW = DEF_DATA_W,
  parameter int unsigned CW = DEF_COEF_W,
  localparam int unsigned OW2 = out_width(DW, CW, N2),
  localparam int unsigned OW3 = out_width(DW, CW, N3),
  localparam int unsigned OW4 = out_width(DW, CW, N4)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // 2-parallel filter
  input  logic                  p2_in_valid,
  input  logic signed [DW-1:0]  p2_x [2],
  input  logic signed [CW-1:0]  p2_coef [N2/2],
  output logic                  p2_out_valid,
  output logic signed [OW2-1:0] p2_y [2],
  // 3-parallel filter
  input  logic                  p3_in_valid,
  input  logic signed [DW-1:0]  p3_x [3],
  input  logic signed [CW-1:0]  p3_coef [(N3+1)/2],
  output logic                  p3_out_valid,
  output logic signed [OW3-1:0] p3_y [3],
  // 4-parallel filter
  input  logic                  p4_in_valid,
  input  logic signed [DW-1:0]  p4_x [4],
  input  logic signed [CW-1:0]  p4_coef [N4/2],
  output logic                  p4_out_valid,
  output logic signed [OW4-1:0] p4_y [4]
);

  ffa2_fir_sym #(.N(N2), .DW(DW), .CW(CW)) u_fir2 (
    .clk, .rst_n, .in_valid(p2_in_valid), .x(p2_x), .coef(p2_coef),
    .out_valid(p2_out_valid), .y(p2_y));

  ffa3_fir_sym #(.N(N3), .DW(DW), .CW(CW)) u_fir3 (
    .clk, .rst_n, .in_valid(p3_in_valid), .x(p3_x), .coef(p3_coef),
    .out_valid(p3_out_valid), .y(p3_y));

  ffa4_fir_sym #(.N(N4), .DW(DW), .CW(CW)) u_fir4 (
    .clk, .rst_n, .in_valid(p4_in_valid), .x(p4_x), .coef(p4_coef),
    .out_valid(p4_out_valid), .y(p4_y));

endmodule
