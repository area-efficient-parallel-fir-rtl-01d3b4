// ffa2_fir_sym: 2-parallel N-tap FIR filter for symmetric coefficients,
// built on the 2x2 fast FIR algorithm.
//
// Each clock with in_valid high the filter takes one block of two samples,
// x[0] = x(2k) and x[1] = x(2k+1), and one clock later presents
// y[0] = y(2k), y[1] = y(2k+1) with out_valid high, where
//   y(n) = sum_{i=0}^{N-1} h(i) x(n-i).
// The coefficients are even symmetric, h(i) = h(N-1-i), N even; only the
// first half, coef[i] = h(i) for i < N/2, is an input. They are meant to be
// held steady while filtering.
//
// With H0 = {h(0), h(2), ...} and H1 = {h(1), h(3), ...} (length N/2 each),
// the symmetry of h makes H0 the reverse of H1, so H0+H1 is symmetric and
// H0-H1 antisymmetric. The filter computes
//   y0 = ((H0+H1)(X0+X1) + (H0-H1)(X0-X1))/2 - H1X1 + z^-2 H1X1
//   y1 = ((H0+H1)(X0+X1) - (H0-H1)(X0-X1))/2
// with three sub-filters of length N/2; two of them need only N/4 multipliers
// each, so the whole filter has N multipliers instead of 3N/2 - N/4.
// Structure: the full coefficient set is mirrored from coef and fed to
// ffa2_core (ffa2_pre with 2 adders, three ffa_subfilter, ffa2_post with 4
// adders and one block delay), followed by the output register. The output register,
// the in_valid/out_valid pair and all widths are this design's choices.
// Outputs are exact: OW = DW + CW + clog2(N) bits.
module ffa2_fir_sym
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
  input  logic signed [DW-1:0] x [2],
  input  logic signed [CW-1:0] coef [N/2],
  output logic                 out_valid,
  output logic signed [OW-1:0] y [2]
);
  localparam int unsigned AW    = OW + 3;   // internal width
  // Multipliers in the datapath: N when N/2 is even.
  localparam int unsigned MULTS = ffa2_nmult(N, SUB_SYMMETRIC);

  // ---- full coefficient set from its first half ----
  logic signed [CW-1:0] h [N];
  always_comb begin
    for (int i = 0; i < N; i++) h[i] = (i < N/2) ? coef[i] : coef[N-1-i];
  end

  // ---- 2x2 fast FIR datapath ----
  logic signed [AW-1:0] y0_c, y1_c;
  ffa2_core #(.P(N), .KIND(SUB_SYMMETRIC), .DW(DW), .CW(CW), .OW(AW)) u_core (
    .clk, .rst_n, .en(in_valid), .x0(x[0]), .x1(x[1]), .g(h), .y0(y0_c), .y1(y1_c));

  // ---- output register ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y[0]      <= '0;
      y[1]      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y[0] <= OW'(y0_c);
        y[1] <= OW'(y1_c);
      end
    end
  end

  initial begin
    assert (N % 2 == 0 && N >= 2) else $error("ffa2_fir_sym: N must be even");
  end

endmodule
