// ffa2_core: the 2x2 fast FIR datapath for one P-tap filter g whose
// coefficients may be general, symmetric or antisymmetric.
//
// Each clock with en high it takes the two polyphase samples x0 = u(2k),
// x1 = u(2k+1) of its input stream u and gives, combinationally,
// y0 = v(2k), y1 = v(2k+1) of v(n) = sum_{i<P} g(i) u(n-i). With G0, G1 the
// even and odd polyphase parts of g (length P/2):
//   y0 = ((G0+G1)(X0+X1) + (G0-G1)(X0-X1))/2 - G1X1 + z^-2 G1X1
//   y1 = ((G0+G1)(X0+X1) - (G0-G1)(X0-X1))/2
// If g is symmetric (P even), G0 is G1 reversed, so G0+G1 is symmetric and
// G0-G1 antisymmetric; if g is antisymmetric, G0+G1 is antisymmetric and
// G0-G1 symmetric. Either way two of the three sub-filters need only half
// their multipliers. For a general g all three sub-filters are general.
// Structure: ffa2_pre, three ffa_subfilter, ffa2_post; the sub-filter
// coefficients are formed from g by adders outside the data path.
// The full coefficient set g is an input (P values), so the core can serve as
// the second stage of a cascaded filter whose sub-filters it implements.
module ffa2_core
  import ffa_pkg::*;
#(
  parameter int unsigned P    = 24,
  parameter sub_kind_e   KIND = SUB_SYMMETRIC,
  parameter int unsigned DW   = 16,
  parameter int unsigned CW   = 16,
  parameter int unsigned OW   = 40
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] x0,
  input  logic signed [DW-1:0] x1,
  input  logic signed [CW-1:0] g [P],
  output logic signed [OW-1:0] y0,
  output logic signed [OW-1:0] y1
);
  localparam int unsigned M = P / 2;   // sub-filter length
  localparam sub_kind_e KIND_S = (KIND == SUB_SYMMETRIC)     ? SUB_SYMMETRIC :
                                 (KIND == SUB_ANTISYMMETRIC) ? SUB_ANTISYMMETRIC : SUB_GENERAL;
  localparam sub_kind_e KIND_D = (KIND == SUB_SYMMETRIC)     ? SUB_ANTISYMMETRIC :
                                 (KIND == SUB_ANTISYMMETRIC) ? SUB_SYMMETRIC : SUB_GENERAL;
  localparam int unsigned NCS = sub_ncoef(M, KIND_S);
  localparam int unsigned NCD = sub_ncoef(M, KIND_D);

  // ---- sub-filter coefficients ----
  logic signed [CW:0] c_s [NCS];   // G0+G1
  logic signed [CW:0] c_d [NCD];   // G0-G1
  logic signed [CW:0] c_1 [M];     // G1

  always_comb begin
    for (int k = 0; k < NCS; k++) c_s[k] = (CW+1)'(g[2*k]) + (CW+1)'(g[2*k+1]);
    for (int k = 0; k < NCD; k++) c_d[k] = (CW+1)'(g[2*k]) - (CW+1)'(g[2*k+1]);
    for (int k = 0; k < M; k++)   c_1[k] = (CW+1)'(g[2*k+1]);
  end

  // ---- preprocessing ----
  logic signed [DW:0] x_sum, x_dif, x_1;
  ffa2_pre #(.DW(DW)) u_pre (.x0, .x1, .x_sum, .x_dif);
  assign x_1 = (DW+1)'(x1);

  // ---- sub-filters ----
  logic signed [OW-1:0] s_a, s_b, s_p;
  ffa_subfilter #(.M(M), .KIND(KIND_S), .DW(DW+1), .CW(CW+1), .OW(OW)) u_sub_sum (
    .clk, .rst_n, .en, .x(x_sum), .coef(c_s), .y(s_a));
  ffa_subfilter #(.M(M), .KIND(KIND_D), .DW(DW+1), .CW(CW+1), .OW(OW)) u_sub_dif (
    .clk, .rst_n, .en, .x(x_dif), .coef(c_d), .y(s_b));
  ffa_subfilter #(.M(M), .KIND(SUB_GENERAL), .DW(DW+1), .CW(CW+1), .OW(OW)) u_sub_g1 (
    .clk, .rst_n, .en, .x(x_1), .coef(c_1), .y(s_p));

  // ---- postprocessing ----
  ffa2_post #(.AW(OW)) u_post (.clk, .rst_n, .en, .a(s_a), .b(s_b), .p(s_p), .y0, .y1);

  initial begin
    assert (P % 2 == 0 && P >= 2) else $error("ffa2_core: P must be even");
  end

endmodule
