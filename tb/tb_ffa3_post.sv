// tb_ffa3_post: checks the postprocessing of the 3-parallel filter.
//
// Each clock the test draws the nine random cross products h_ij = Hi*Xj,
// builds the six sub-filter outputs the block receives and expects
//   y0 = H0X0 + (H1X2 + H2X1 of the previous accepted block)
//   y1 = H0X1 + H1X0 + (H2X2 of the previous accepted block)
//   y2 = H0X2 + H1X1 + H2X0.
// The enable is random, so the block delays must hold over disabled clocks.
module tb_ffa3_post;
  localparam int AW = 40;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [AW-1:0] a = '0, b = '0, e = '0, c = '0, p1 = '0, p2 = '0;
  logic signed [AW-1:0] y0, y1, y2;
  longint h [3][3];
  longint prev12, prev22;
  int checks = 0, failures = 0, stalls = 0;

  always #5 clk = ~clk;

  ffa3_post #(.AW(AW)) dut (.clk, .rst_n, .en, .a, .b, .e, .c, .p1, .p2, .y0, .y1, .y2);

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
    longint sum;
    prev12 = 0;
    prev22 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      sum = 0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          h[i][j] = longint'($signed($urandom)) >>> 3;
          sum += h[i][j];
        end
      a  = AW'(h[0][0] + h[0][2] + h[2][0] + h[2][2]);
      b  = AW'(h[0][0] - h[0][2] - h[2][0] + h[2][2]);
      e  = AW'(h[1][1] + h[1][2] + h[2][1] + h[2][2]);
      c  = AW'(sum);
      p1 = AW'(h[1][1]);
      p2 = AW'(h[2][2]);
      en = ($urandom % 3) != 0;
      if (!en) stalls++;
      @(negedge clk);
      expect_eq("y0", longint'(y0), h[0][0] + prev12);
      expect_eq("y1", longint'(y1), h[0][1] + h[1][0] + prev22);
      expect_eq("y2", longint'(y2), h[0][2] + h[1][1] + h[2][0]);
      @(posedge clk);
      if (en) begin
        prev12 = h[1][2] + h[2][1];
        prev22 = h[2][2];
      end
      #1;
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
