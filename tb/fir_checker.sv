// fir_checker: drives one parallel symmetric FIR filter (ffa2_fir_sym for
// L = 2, ffa3_fir_sym for L = 3, ffa4_fir_sym for L = 4) with random
// symmetric coefficients and a random block stream with random gaps in
// in_valid, and checks every output block against a direct N-tap
// convolution of the accepted samples.
//
// Timing checked: out_valid must follow in_valid by exactly one clock, and
// the output block then is y(Lk .. Lk+L-1) of the block accepted one clock
// earlier. With EXTREME = 1 all coefficients are -2^15 and the samples are
// drawn from {-2^15, 2^15-1}, which drives the outputs to full scale.
module fir_checker #(
  parameter int unsigned L       = 2,
  parameter int unsigned N       = 24,
  parameter bit          EXTREME = 1'b0,
  parameter int unsigned BLOCKS  = 400
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   blocks,
  output logic done
);
  localparam int unsigned DW = 16;
  localparam int unsigned CW = 16;
  localparam int unsigned NH = (N + 1) / 2;
  localparam int unsigned OW = DW + CW + $clog2(N);

  logic                 in_valid = 1'b0;
  logic signed [DW-1:0] x [L];
  logic signed [CW-1:0] coef [NH];
  logic                 out_valid;
  logic signed [OW-1:0] y [L];

  if (L == 2) begin : g_l2
    ffa2_fir_sym #(.N(N), .DW(DW), .CW(CW)) dut (
      .clk, .rst_n, .in_valid, .x, .coef, .out_valid, .y);
  end else if (L == 3) begin : g_l3
    ffa3_fir_sym #(.N(N), .DW(DW), .CW(CW)) dut (
      .clk, .rst_n, .in_valid, .x, .coef, .out_valid, .y);
  end else begin : g_l4
    ffa4_fir_sym #(.N(N), .DW(DW), .CW(CW)) dut (
      .clk, .rst_n, .in_valid, .x, .coef, .out_valid, .y);
  end

  longint h [N];
  longint hist [$];        // accepted samples, newest first
  longint pending [L];
  logic   pend_valid = 1'b0;

  function automatic logic signed [DW-1:0] draw();
    if (EXTREME) return ($urandom % 2) ? 16'sh7fff : 16'sh8000;
    return DW'($urandom);
  endfunction

  initial begin
    checks = 0; failures = 0; stalls = 0; blocks = 0; done = 1'b0;
    for (int i = 0; i < NH; i++) coef[i] = EXTREME ? 16'sh8000 : CW'($urandom);
    for (int i = 0; i < N; i++)  h[i] = longint'((i < NH) ? coef[i] : coef[N-1-i]);
    for (int j = 0; j < L; j++)  x[j] = '0;
    @(posedge rst_n);
    for (int t = 0; t < BLOCKS; t++) begin
      @(posedge clk);
      #1;
      in_valid = (t > 2) ? (($urandom % 5) != 0) : 1'b1;
      for (int j = 0; j < L; j++) x[j] = draw();
      if (!in_valid) stalls++;
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (2) @(posedge clk);
    done = 1'b1;
  end

  // Reference: on each accepted block compute the expected outputs.
  always @(posedge clk) begin
    if (rst_n) begin
      pend_valid <= in_valid;
      if (in_valid) begin
        for (int j = 0; j < L; j++) begin
          longint acc;
          hist.push_front(longint'(x[j]));
          acc = 0;
          for (int i = 0; i < N && i < hist.size(); i++) acc += h[i] * hist[i];
          pending[j] <= acc;
        end
        blocks++;
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== pend_valid) begin
        failures++;
        $display("L=%0d N=%0d: out_valid=%0b expected %0b", L, N, out_valid, pend_valid);
      end
      if (pend_valid) begin
        for (int j = 0; j < L; j++) begin
          checks++;
          if (longint'(y[j]) != pending[j]) begin
            failures++;
            if (failures < 10)
              $display("L=%0d N=%0d: y[%0d]=%0d expected %0d", L, N, j, y[j], pending[j]);
          end
        end
      end
    end
  end
endmodule
