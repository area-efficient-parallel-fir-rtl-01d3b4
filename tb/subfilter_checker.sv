// subfilter_checker: one ffa_subfilter instance with its own reference model.
//
// Picks random coefficients for the given length and symmetry, expands them
// to the full M-tap impulse response g[], keeps its own history of the
// accepted samples, and on every falling clock edge with 'check' high
// compares the sub-filter output with sum_j g[j] x(now-j).
module subfilter_checker
  import ffa_pkg::*;
#(
  parameter int unsigned M    = 6,
  parameter sub_kind_e   KIND = SUB_SYMMETRIC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [7:0]   x,
  input  logic                check,
  output int                  checks,
  output int                  failures
);
  localparam int unsigned NC = sub_ncoef(M, KIND);

  logic signed [7:0]  coef [NC];
  logic signed [23:0] y;
  int                 g    [M];
  int                 hist [M];   // hist[j]: sample j accepted clocks back (j>=1)

  ffa_subfilter #(.M(M), .KIND(KIND), .DW(8), .CW(8), .OW(24)) dut (
    .clk, .rst_n, .en, .x, .coef, .y);

  initial begin
    checks = 0;
    failures = 0;
    for (int k = 0; k < NC; k++) coef[k] = 8'($urandom);
    for (int j = 0; j < M; j++) begin
      case (KIND)
        SUB_GENERAL:   g[j] = int'(coef[j]);
        SUB_SYMMETRIC: g[j] = (j < NC) ? int'(coef[j]) : int'(coef[M-1-j]);
        default: begin
          if (2*j + 1 == M)  g[j] = 0;
          else if (j < M/2)  g[j] = int'(coef[j]);
          else               g[j] = -int'(coef[M-1-j]);
        end
      endcase
    end
    for (int j = 0; j < M; j++) hist[j] = 0;
  end

  always @(posedge clk) begin
    if (rst_n && en) begin
      for (int j = M - 1; j > 0; j--) hist[j] = hist[j-1];
      hist[1 % M] = (M > 1) ? int'(x) : hist[0];
    end
  end

  always @(negedge clk) begin
    if (check) begin
      int expected;
      expected = g[0] * int'(x);
      for (int j = 1; j < M; j++) expected += g[j] * hist[j];
      checks++;
      if (int'(y) != expected) begin
        failures++;
        if (failures < 10)
          $display("subfilter M=%0d kind=%0d: y=%0d expected %0d", M, KIND, y, expected);
      end
    end
  end
endmodule
