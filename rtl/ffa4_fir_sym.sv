// ffa4_fir_sym: 4-parallel N-tap FIR filter for symmetric coefficients,
// made by cascading the 2x2 symmetric fast FIR structure twice.
//
// Each clock with in_valid high the filter takes x[j] = x(4k+j), j = 0..3,
// and one clock later presents y[j] = y(4k+j) with out_valid high, where
// y(n) = sum_{i<N} h(i) x(n-i), h(i) = h(N-1-i), N a multiple of 4. Only the
// first half of the coefficients, coef[i] = h(i) for i < N/2, is an input.
//
// Outer stage: with H'0, H'1 the even and odd polyphase parts of h (length
// N/2) and X'0 = {x(4k), x(4k+2)}, X'1 = {x(4k+1), x(4k+3)}, the 2x2
// structure needs three N/2-tap filters on two-sample blocks:
//   H'0+H'1 (symmetric) on X'0+X'1,  H'0-H'1 (antisymmetric) on X'0-X'1,
//   H'1 (general) on X'1.
// Each is built as an inner 2x2 stage (ffa2_core) of three N/4-tap
// sub-filters, nine in all. The symmetric and the antisymmetric inner filter
// each yield two sub-filters with (anti)symmetric coefficients, so four of
// the nine need only half their multipliers: 7N/4 multipliers in all.
// ffa4_post recombines the inner outputs. The cascade, the output register,
// the in_valid/out_valid pair and all widths are this design's choices.
// Outputs are exact: OW = DW + CW + clog2(N) bits.
module ffa4_fir_sym
  import ffa_pkg::*;
#(
  parameter int unsigned N  = 24,
  parameter int unsigned DW = DEF_DATA_W,
  parameter int unsigned CW = DEF_COEF_W,
  localparam int unsigned OW = out_width(DW, CW, N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x [4],
  input  logic signed [CW-1:0] coef [N/2],
  output logic                 out_valid,
  output logic signed [OW-1:0] y [4]
);
  localparam int unsigned P  = N / 2;    // inner filter length
  localparam int unsigned AW = OW + 4;   // internal width
  // Multipliers in the datapath: 7N/4 when N/4 is even.
  localparam int unsigned MULTS = ffa2_nmult(P, SUB_SYMMETRIC)
                                + ffa2_nmult(P, SUB_ANTISYMMETRIC)
                                + ffa2_nmult(P, SUB_GENERAL);

  // ---- outer coefficient split ----
  logic signed [CW-1:0] h   [N];
  logic signed [CW:0]   g_s [P];   // H'0+H'1, symmetric
  logic signed [CW:0]   g_d [P];   // H'0-H'1, antisymmetric
  logic signed [CW:0]   g_1 [P];   // H'1

  always_comb begin
    for (int i = 0; i < N; i++) h[i] = (i < N/2) ? coef[i] : coef[N-1-i];
    for (int m = 0; m < P; m++) begin
      g_s[m] = (CW+1)'(h[2*m]) + (CW+1)'(h[2*m+1]);
      g_d[m] = (CW+1)'(h[2*m]) - (CW+1)'(h[2*m+1]);
      g_1[m] = (CW+1)'(h[2*m+1]);
    end
  end

  // ---- outer preprocessing, one ffa2_pre per lane ----
  logic signed [DW:0] xs [2], xd [2], xo [2];
  for (genvar j = 0; j < 2; j++) begin : g_pre
    ffa2_pre #(.DW(DW)) u_pre (.x0(x[2*j]), .x1(x[2*j+1]), .x_sum(xs[j]), .x_dif(xd[j]));
    assign xo[j] = (DW+1)'(x[2*j+1]);
  end

  // ---- inner 2x2 stages ----
  logic signed [AW-1:0] a [2], b [2], p [2];
  ffa2_core #(.P(P), .KIND(SUB_SYMMETRIC), .DW(DW+1), .CW(CW+1), .OW(AW)) u_in_sum (
    .clk, .rst_n, .en(in_valid), .x0(xs[0]), .x1(xs[1]), .g(g_s), .y0(a[0]), .y1(a[1]));
  ffa2_core #(.P(P), .KIND(SUB_ANTISYMMETRIC), .DW(DW+1), .CW(CW+1), .OW(AW)) u_in_dif (
    .clk, .rst_n, .en(in_valid), .x0(xd[0]), .x1(xd[1]), .g(g_d), .y0(b[0]), .y1(b[1]));
  ffa2_core #(.P(P), .KIND(SUB_GENERAL), .DW(DW+1), .CW(CW+1), .OW(AW)) u_in_odd (
    .clk, .rst_n, .en(in_valid), .x0(xo[0]), .x1(xo[1]), .g(g_1), .y0(p[0]), .y1(p[1]));

  // ---- outer postprocessing ----
  logic signed [AW-1:0] y_c [4];
  ffa4_post #(.AW(AW)) u_post (.clk, .rst_n, .en(in_valid), .a, .b, .p, .y(y_c));

  // ---- output register ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int j = 0; j < 4; j++) y[j] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) for (int j = 0; j < 4; j++) y[j] <= OW'(y_c[j]);
    end
  end

  initial begin
    assert (N % 4 == 0 && N >= 4) else $error("ffa4_fir_sym: N must be a multiple of 4");
  end

endmodule
