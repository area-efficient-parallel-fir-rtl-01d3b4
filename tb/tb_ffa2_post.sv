// tb_ffa2_post: checks the postprocessing of the 2-parallel filter.
//
// Each clock the test draws four random cross products h_ij = Hi*Xj, builds
// from them the three sub-filter outputs the block receives
// (a = (H0+H1)(X0+X1), b = (H0-H1)(X0-X1), p = H1X1) and expects
//   y0 = H0X0 + (H1X1 of the previous accepted block),  y1 = H0X1 + H1X0.
// The enable is random, so the block delay must hold over disabled clocks.
module tb_ffa2_post;
  localparam int AW = 40;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [AW-1:0] a = '0, b = '0, p = '0, y0, y1;
  longint h00, h01, h10, h11, prev11;
  int checks = 0, failures = 0, stalls = 0;

  always #5 clk = ~clk;

  ffa2_post #(.AW(AW)) dut (.clk, .rst_n, .en, .a, .b, .p, .y0, .y1);

  function automatic longint rnd();
    return longint'($signed($urandom)) >>> 2;
  endfunction

  task automatic expect_eq(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, want);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev11 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      h00 = rnd(); h01 = rnd(); h10 = rnd(); h11 = rnd();
      a  = AW'(h00 + h01 + h10 + h11);
      b  = AW'(h00 - h01 - h10 + h11);
      p  = AW'(h11);
      en = ($urandom % 3) != 0;
      if (!en) stalls++;
      @(negedge clk);
      expect_eq("y0", longint'(y0), h00 + prev11);
      expect_eq("y1", longint'(y1), h01 + h10);
      @(posedge clk);
      if (en) prev11 = h11;
      #1;
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
