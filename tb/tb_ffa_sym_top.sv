// tb_ffa_sym_top: end-to-end test of ffa_sym_top at its default sizes
// (24 taps, 16-bit samples and coefficients, all three filters).
//
// All three filters are fed random symmetric coefficients and random sample
// blocks with random gaps in in_valid. Every output block is compared with a
// direct 24-tap convolution of the accepted samples, and out_valid must
// follow in_valid by one clock. Halfway through, reset is pulsed and new
// coefficients are loaded; the filters must then start again from an empty
// delay line. The run also includes a stretch of full-scale samples with
// full-scale coefficients. Each of these events is counted and must occur.
module tb_ffa_sym_top;
  import ffa_pkg::*;

  localparam int unsigned N   = 24;
  localparam int unsigned DW  = DEF_DATA_W;
  localparam int unsigned CW  = DEF_COEF_W;
  localparam int unsigned OW  = out_width(DW, CW, N);
  localparam int unsigned NH2 = N / 2;
  localparam int unsigned NH3 = (N + 1) / 2;
  localparam int unsigned NH4 = N / 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic                 p2_in_valid = 1'b0, p3_in_valid = 1'b0, p4_in_valid = 1'b0;
  logic signed [DW-1:0] p2_x [2], p3_x [3], p4_x [4];
  logic signed [CW-1:0] p2_coef [NH2], p3_coef [NH3], p4_coef [NH4];
  logic                 p2_out_valid, p3_out_valid, p4_out_valid;
  logic signed [OW-1:0] p2_y [2], p3_y [3], p4_y [4];

  int checks = 0, failures = 0;
  int stalls2 = 0, stalls3 = 0, stalls4 = 0, blocks2 = 0, blocks3 = 0, blocks4 = 0;
  int resets = 0, fullscale = 0;
  bit full_mode = 1'b0;

  always #5 clk = ~clk;

  ffa_sym_top dut (
    .clk, .rst_n,
    .p2_in_valid, .p2_x, .p2_coef, .p2_out_valid, .p2_y,
    .p3_in_valid, .p3_x, .p3_coef, .p3_out_valid, .p3_y,
    .p4_in_valid, .p4_x, .p4_coef, .p4_out_valid, .p4_y);

  // ---- reference models ----
  longint h2 [N], h3 [N], h4 [N];
  longint hist2 [$], hist3 [$], hist4 [$];
  longint exp2 [2], exp3 [3], exp4 [4];
  logic   pend2 = 1'b0, pend3 = 1'b0, pend4 = 1'b0;

  function automatic longint conv(const ref longint h [N], const ref longint hist [$]);
    longint acc = 0;
    for (int i = 0; i < N && i < hist.size(); i++) acc += h[i] * hist[i];
    return acc;
  endfunction

  task automatic load_coefs(bit extreme);
    for (int i = 0; i < NH2; i++) p2_coef[i] = extreme ? 16'sh8000 : CW'($urandom);
    for (int i = 0; i < NH3; i++) p3_coef[i] = extreme ? 16'sh8000 : CW'($urandom);
    for (int i = 0; i < NH4; i++) p4_coef[i] = extreme ? 16'sh8000 : CW'($urandom);
    for (int i = 0; i < N; i++) begin
      h2[i] = longint'((i < NH2) ? p2_coef[i] : p2_coef[N-1-i]);
      h3[i] = longint'((i < NH3) ? p3_coef[i] : p3_coef[N-1-i]);
      h4[i] = longint'((i < NH4) ? p4_coef[i] : p4_coef[N-1-i]);
    end
  endtask

  function automatic logic signed [DW-1:0] draw();
    if (full_mode) return ($urandom % 2) ? 16'sh8000 : 16'sh7fff;
    return DW'($urandom);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist2.delete();
      hist3.delete();
      hist4.delete();
      pend2 <= 1'b0;
      pend3 <= 1'b0;
      pend4 <= 1'b0;
    end else begin
      pend2 <= p2_in_valid;
      pend3 <= p3_in_valid;
      pend4 <= p4_in_valid;
      if (p2_in_valid) begin
        for (int j = 0; j < 2; j++) begin
          hist2.push_front(longint'(p2_x[j]));
          exp2[j] <= conv(h2, hist2);
        end
        blocks2++;
      end
      if (p3_in_valid) begin
        for (int j = 0; j < 3; j++) begin
          hist3.push_front(longint'(p3_x[j]));
          exp3[j] <= conv(h3, hist3);
        end
        blocks3++;
      end
      if (p4_in_valid) begin
        for (int j = 0; j < 4; j++) begin
          hist4.push_front(longint'(p4_x[j]));
          exp4[j] <= conv(h4, hist4);
        end
        blocks4++;
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks += 3;
      if (p2_out_valid != pend2) begin failures++; $display("2-parallel out_valid wrong"); end
      if (p3_out_valid != pend3) begin failures++; $display("3-parallel out_valid wrong"); end
      if (p4_out_valid != pend4) begin failures++; $display("4-parallel out_valid wrong"); end
      if (pend4) for (int j = 0; j < 4; j++) begin
        checks++;
        if (longint'(p4_y[j]) != exp4[j]) begin
          failures++;
          if (failures < 10) $display("4-parallel y[%0d]=%0d expected %0d", j, p4_y[j], exp4[j]);
        end
      end
      if (pend2) for (int j = 0; j < 2; j++) begin
        checks++;
        if (longint'(p2_y[j]) != exp2[j]) begin
          failures++;
          if (failures < 10) $display("2-parallel y[%0d]=%0d expected %0d", j, p2_y[j], exp2[j]);
        end
      end
      if (pend3) for (int j = 0; j < 3; j++) begin
        checks++;
        if (longint'(p3_y[j]) != exp3[j]) begin
          failures++;
          if (failures < 10) $display("3-parallel y[%0d]=%0d expected %0d", j, p3_y[j], exp3[j]);
        end
      end
    end
  end

  // ---- stimulus ----
  task automatic run_blocks(int n);
    for (int t = 0; t < n; t++) begin
      @(posedge clk);
      #1;
      p2_in_valid = ($urandom % 4) != 0;
      p3_in_valid = ($urandom % 4) != 0;
      p4_in_valid = ($urandom % 4) != 0;
      for (int j = 0; j < 2; j++) p2_x[j] = draw();
      for (int j = 0; j < 3; j++) p3_x[j] = draw();
      for (int j = 0; j < 4; j++) p4_x[j] = draw();
      if (!p2_in_valid) stalls2++;
      if (!p3_in_valid) stalls3++;
      if (!p4_in_valid) stalls4++;
      if (full_mode && p2_in_valid) fullscale++;
    end
    @(posedge clk);
    #1;
    p2_in_valid = 1'b0;
    p3_in_valid = 1'b0;
    p4_in_valid = 1'b0;
  endtask

  // Coefficients are changed only under reset: the block delays of the
  // postprocessing hold products made with the old coefficients.
  task automatic restart(bit extreme);
    @(negedge clk);
    rst_n = 1'b0;
    resets++;
    load_coefs(extreme);
    @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 2; j++) p2_x[j] = '0;
    for (int j = 0; j < 3; j++) p3_x[j] = '0;
    for (int j = 0; j < 4; j++) p4_x[j] = '0;
    load_coefs(1'b0);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run_blocks(500);

    // reset in the middle of a stream, then new coefficients
    restart(1'b0);
    run_blocks(500);

    // full-scale stretch
    full_mode = 1'b1;
    restart(1'b1);
    run_blocks(200);
    repeat (3) @(posedge clk);

    $display("blocks: 2-parallel %0d, 3-parallel %0d, 4-parallel %0d; gaps: %0d, %0d, %0d; resets %0d; full-scale blocks %0d",
             blocks2, blocks3, blocks4, stalls2, stalls3, stalls4, resets, fullscale);
    if (stalls2 == 0 || stalls3 == 0 || stalls4 == 0) begin failures++; $display("no gap in in_valid"); end
    if (resets < 2)     begin failures++; $display("no reset during a stream"); end
    if (fullscale == 0) begin failures++; $display("no full-scale block"); end
    if (blocks2 < 800 || blocks3 < 800 || blocks4 < 800) begin failures++; $display("too few blocks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
