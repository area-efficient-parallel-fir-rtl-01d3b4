// core_checker: one ffa2_core instance with its own reference model.
//
// Draws a random P-tap coefficient set of the given symmetry (general,
// symmetric or antisymmetric), drives the core's two-sample inputs from the
// shared random stream, and on every falling clock edge with 'check' high
// compares both outputs with a direct convolution of the accepted samples.
module core_checker
  import ffa_pkg::*;
#(
  parameter int unsigned P    = 8,
  parameter sub_kind_e   KIND = SUB_SYMMETRIC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic signed [9:0] x0,
  input  logic signed [9:0] x1,
  input  logic              check,
  output int                checks,
  output int                failures
);
  logic signed [9:0]  g [P];
  logic signed [27:0] y0, y1;
  longint hist [$];   // accepted samples, newest first

  ffa2_core #(.P(P), .KIND(KIND), .DW(10), .CW(10), .OW(28)) dut (
    .clk, .rst_n, .en, .x0, .x1, .g, .y0, .y1);

  initial begin
    checks = 0;
    failures = 0;
    for (int i = 0; i < P; i++) g[i] = 10'($urandom);
    for (int i = P / 2; i < P; i++)
      case (KIND)
        SUB_SYMMETRIC:     g[i] = g[P-1-i];
        SUB_ANTISYMMETRIC: g[i] = -g[P-1-i];
        default: ;
      endcase
  end

  function automatic longint conv(longint newest0, longint newest1, int lag);
    // output for the sample 'lag' positions before the newest one
    longint acc = 0;
    longint s [$];
    s = hist;
    s.push_front(newest0);
    s.push_front(newest1);
    for (int i = 0; i < P && i + lag < s.size(); i++) acc += longint'(g[i]) * s[i+lag];
    return acc;
  endfunction

  always @(posedge clk) begin
    if (rst_n && en) begin
      hist.push_front(longint'(x0));
      hist.push_front(longint'(x1));
    end
  end

  always @(negedge clk) begin
    if (check) begin
      checks += 2;
      if (longint'(y0) != conv(longint'(x0), longint'(x1), 1)) begin
        failures++;
        if (failures < 10) $display("core P=%0d kind=%0d: y0=%0d expected %0d", P, KIND, y0, conv(longint'(x0), longint'(x1), 1));
      end
      if (longint'(y1) != conv(longint'(x0), longint'(x1), 0)) begin
        failures++;
        if (failures < 10) $display("core P=%0d kind=%0d: y1=%0d expected %0d", P, KIND, y1, conv(longint'(x0), longint'(x1), 0));
      end
    end
  end
endmodule
