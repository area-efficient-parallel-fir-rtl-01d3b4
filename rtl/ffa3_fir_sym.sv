// ffa3_fir_sym: 3-parallel N-tap FIR filter for symmetric coefficients,
// built on the 3x3 fast FIR algorithm.
//
// Each clock with in_valid high the filter takes one block of three samples,
// x[j] = x(3k+j), and one clock later presents y[j] = y(3k+j), j = 0..2, with
// out_valid high, where y(n) = sum_{i=0}^{N-1} h(i) x(n-i). The coefficients
// are even symmetric, h(i) = h(N-1-i), N a multiple of 3; only the first half,
// coef[i] = h(i) for i < ceil(N/2), is an input, held steady while filtering.
//
// With the polyphase parts H0 = {h(0), h(3), ...}, H1 = {h(1), h(4), ...},
// H2 = {h(2), h(5), ...} (length N/3), symmetry of h makes H1 symmetric and
// H0 the reverse of H2, so H0+H2 and H0+H1+H2 are symmetric and H0-H2 is
// antisymmetric. The filter uses six sub-filters of length N/3:
//   (H0+H2)(X0+X2) sym   (H0-H2)(X0-X2) antisym   (H0+H1+H2)(X0+X1+X2) sym
//   H1 X1 sym            H2 X2 general            (H1+H2)(X1+X2) general
// four of which need only half their multipliers: 4N/3 multipliers in all.
// ffa3_post combines them into the three outputs (see there).
// The choice of H2 and H1+H2 as the two general sub-filters, the output
// register, the in_valid/out_valid pair and all widths are this design's.
// Outputs are exact: OW = DW + CW + clog2(N) bits.
module ffa3_fir_sym
  import ffa_pkg::*;
#(
  parameter int unsigned N  = 24,
  parameter int unsigned DW = DEF_DATA_W,
  parameter int unsigned CW = DEF_COEF_W,
  localparam int unsigned NH = (N + 1) / 2,
  localparam int unsigned OW = out_width(DW, CW, N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x [3],
  input  logic signed [CW-1:0] coef [NH],
  output logic                 out_valid,
  output logic signed [OW-1:0] y [3]
);
  localparam int unsigned M   = N / 3;        // sub-filter length
  localparam int unsigned AW  = OW + 3;       // internal width
  localparam int unsigned SDW = DW + 2;       // sub-filter input width
  localparam int unsigned SCW = CW + 2;       // sub-filter coefficient width
  localparam int unsigned NCS = sub_ncoef(M, SUB_SYMMETRIC);
  localparam int unsigned NCA = sub_ncoef(M, SUB_ANTISYMMETRIC);
  // Multipliers in the datapath: 4N/3 when N/3 is even.
  localparam int unsigned MULTS = 3 * sub_nmult(M, SUB_SYMMETRIC)
                                + sub_nmult(M, SUB_ANTISYMMETRIC) + 2 * M;

  // ---- sub-filter coefficients ----
  logic signed [CW-1:0]  h     [N];
  logic signed [SCW-1:0] c_02s [NCS];   // H0+H2
  logic signed [SCW-1:0] c_02d [NCA];   // H0-H2
  logic signed [SCW-1:0] c_012 [NCS];   // H0+H1+H2
  logic signed [SCW-1:0] c_1   [NCS];   // H1
  logic signed [SCW-1:0] c_2   [M];     // H2
  logic signed [SCW-1:0] c_12  [M];     // H1+H2

  always_comb begin
    for (int i = 0; i < N; i++) h[i] = (i < NH) ? coef[i] : coef[N-1-i];
    for (int k = 0; k < NCS; k++) begin
      c_02s[k] = SCW'(h[3*k]) + SCW'(h[3*k+2]);
      c_012[k] = SCW'(h[3*k]) + SCW'(h[3*k+1]) + SCW'(h[3*k+2]);
      c_1[k]   = SCW'(h[3*k+1]);
    end
    for (int k = 0; k < NCA; k++) c_02d[k] = SCW'(h[3*k]) - SCW'(h[3*k+2]);
    for (int k = 0; k < M; k++) begin
      c_2[k]  = SCW'(h[3*k+2]);
      c_12[k] = SCW'(h[3*k+1]) + SCW'(h[3*k+2]);
    end
  end

  // ---- preprocessing ----
  logic signed [SDW-1:0] x02_sum, x02_dif, x12_sum, x012_sum, x_1, x_2;
  ffa3_pre #(.DW(DW)) u_pre (
    .x0(x[0]), .x1(x[1]), .x2(x[2]), .x02_sum, .x02_dif, .x12_sum, .x012_sum);
  assign x_1 = SDW'(x[1]);
  assign x_2 = SDW'(x[2]);

  // ---- sub-filters ----
  logic signed [AW-1:0] s_a, s_b, s_c, s_e, s_p1, s_p2;
  ffa_subfilter #(.M(M), .KIND(SUB_SYMMETRIC), .DW(SDW), .CW(SCW), .OW(AW)) u_sub_02s (
    .clk, .rst_n, .en(in_valid), .x(x02_sum), .coef(c_02s), .y(s_a));
  ffa_subfilter #(.M(M), .KIND(SUB_ANTISYMMETRIC), .DW(SDW), .CW(SCW), .OW(AW)) u_sub_02d (
    .clk, .rst_n, .en(in_valid), .x(x02_dif), .coef(c_02d), .y(s_b));
  ffa_subfilter #(.M(M), .KIND(SUB_SYMMETRIC), .DW(SDW), .CW(SCW), .OW(AW)) u_sub_012 (
    .clk, .rst_n, .en(in_valid), .x(x012_sum), .coef(c_012), .y(s_c));
  ffa_subfilter #(.M(M), .KIND(SUB_GENERAL), .DW(SDW), .CW(SCW), .OW(AW)) u_sub_12 (
    .clk, .rst_n, .en(in_valid), .x(x12_sum), .coef(c_12), .y(s_e));
  ffa_subfilter #(.M(M), .KIND(SUB_SYMMETRIC), .DW(SDW), .CW(SCW), .OW(AW)) u_sub_1 (
    .clk, .rst_n, .en(in_valid), .x(x_1), .coef(c_1), .y(s_p1));
  ffa_subfilter #(.M(M), .KIND(SUB_GENERAL), .DW(SDW), .CW(SCW), .OW(AW)) u_sub_2 (
    .clk, .rst_n, .en(in_valid), .x(x_2), .coef(c_2), .y(s_p2));

  // ---- postprocessing ----
  logic signed [AW-1:0] y_c [3];
  ffa3_post #(.AW(AW)) u_post (
    .clk, .rst_n, .en(in_valid), .a(s_a), .b(s_b), .e(s_e), .c(s_c),
    .p1(s_p1), .p2(s_p2), .y0(y_c[0]), .y1(y_c[1]), .y2(y_c[2]));

  // ---- output register ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int j = 0; j < 3; j++) y[j] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) for (int j = 0; j < 3; j++) y[j] <= OW'(y_c[j]);
    end
  end

  initial begin
    assert (N % 3 == 0 && N >= 3) else $error("ffa3_fir_sym: N must be a multiple of 3");
  end

endmodule
