// ffa_subfilter: one length-M FIR sub-filter of a parallel (fast FIR) filter.
//
// Each clock with en high the sub-filter takes one input sample x (one block
// of the parallel filter) and shifts its delay line; the output y is the
// combinational sum  y = sum_{j=0}^{M-1} g[j] * x(now - j), where x(now) is the
// current input and x(now - j) the value held j enabled clocks ago. The
// delay line resets to zero.
//
// The coefficient symmetry is a parameter (ffa_pkg::sub_kind_e):
//   SUB_GENERAL       coef[0..M-1] = g[0..M-1], one multiplier per tap.
//   SUB_SYMMETRIC     coef[0..ceil(M/2)-1] = g[0..], g[M-1-k] = g[k]; the two
//                     samples that share a coefficient are added first, so
//                     ceil(M/2) multipliers remain.
//   SUB_ANTISYMMETRIC as symmetric but g[M-1-k] = -g[k]; the samples are
//                     subtracted, the middle tap of an odd M is zero, and
//                     floor(M/2) multipliers remain.
// Sharing one multiplier between mirrored taps is the saving the filter
// structure is built around; the direct-form delay line and the
// combinational output are this design's choice.
module ffa_subfilter
  import ffa_pkg::*;
#(
  parameter int unsigned M     = 12,
  parameter sub_kind_e   KIND  = SUB_SYMMETRIC,
  parameter int unsigned DW    = 17,   // input sample width
  parameter int unsigned CW    = 17,   // coefficient width
  parameter int unsigned OW    = 40,   // output width
  localparam int unsigned NC   = sub_ncoef(M, KIND),
  localparam int unsigned NMUL = sub_nmult(M, KIND)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] x,
  input  logic signed [CW-1:0] coef [NC],
  output logic signed [OW-1:0] y
);

  localparam int unsigned PW = DW + 1 + CW;  // product width after pre-add

  // taps[0] is the current input, taps[j] the sample j enabled clocks back.
  logic signed [DW-1:0] taps [M];
  logic signed [DW-1:0] dly  [M];  // dly[0] unused

  assign taps[0] = x;
  for (genvar j = 1; j < M; j++) begin : g_taps
    assign taps[j] = dly[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < M; j++) dly[j] <= '0;
    end else if (en) begin
      dly[0] <= '0;
      for (int j = 1; j < M; j++) dly[j] <= taps[j-1];
    end
  end

  // Pre-added operand and coefficient of each multiplier.
  logic signed [DW:0]   opnd [NMUL];
  logic signed [CW-1:0] cmul [NMUL];
  logic signed [PW-1:0] prod [NMUL];

  always_comb begin
    for (int k = 0; k < NMUL; k++) begin
      cmul[k] = coef[k];
      unique case (KIND)
        SUB_GENERAL:       opnd[k] = (DW+1)'(taps[k]);
        SUB_SYMMETRIC:     opnd[k] = (k == M - 1 - k) ? (DW+1)'(taps[k])
                                                      : taps[k] + taps[M-1-k];
        default:           opnd[k] = taps[k] - taps[M-1-k];
      endcase
    end
  end

  for (genvar k = 0; k < NMUL; k++) begin : g_mul
    assign prod[k] = opnd[k] * cmul[k];
  end

  always_comb begin
    y = '0;
    for (int k = 0; k < NMUL; k++) y = y + OW'(prod[k]);
  end

  initial begin
    assert (OW >= PW) else $error("ffa_subfilter: OW narrower than one product");
  end

endmodule
