// tb_ffa4_post: checks the outer postprocessing of the 4-parallel filter.
//
// Each clock the test draws, for each of the two decimated time steps
// m = 2k and 2k+1, the four random cross products H'iX'j(m), builds the
// inner-filter outputs a, b, p the block receives and expects
//   y[2j]   = H'0X'0(2k+j) + H'1X'1(2k+j-1)
//   y[2j+1] = H'0X'1(2k+j) + H'1X'0(2k+j)
// where H'1X'1(2k-1) comes from the previous accepted clock. The enable is
// random, so the delay must hold over disabled clocks.
module tb_ffa4_post;
  localparam int AW = 40;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [AW-1:0] a [2], b [2], p [2], y [4];
  longint h00 [2], h01 [2], h10 [2], h11 [2], prev11;
  int checks = 0, failures = 0, stalls = 0;

  always #5 clk = ~clk;

  ffa4_post #(.AW(AW)) dut (.clk, .rst_n, .en, .a, .b, .p, .y);

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
    for (int j = 0; j < 2; j++) begin a[j] = '0; b[j] = '0; p[j] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      for (int j = 0; j < 2; j++) begin
        h00[j] = rnd(); h01[j] = rnd(); h10[j] = rnd(); h11[j] = rnd();
        a[j] = AW'(h00[j] + h01[j] + h10[j] + h11[j]);
        b[j] = AW'(h00[j] - h01[j] - h10[j] + h11[j]);
        p[j] = AW'(h11[j]);
      end
      en = ($urandom % 3) != 0;
      if (!en) stalls++;
      @(negedge clk);
      expect_eq("y0", longint'(y[0]), h00[0] + prev11);
      expect_eq("y1", longint'(y[1]), h01[0] + h10[0]);
      expect_eq("y2", longint'(y[2]), h00[1] + h11[0]);
      expect_eq("y3", longint'(y[3]), h01[1] + h10[1]);
      @(posedge clk);
      if (en) prev11 = h11[1];
      #1;
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
