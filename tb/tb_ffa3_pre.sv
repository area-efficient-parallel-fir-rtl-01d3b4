// tb_ffa3_pre: checks the four preprocessing adders of the 3-parallel filter
// (X0+X2, X0-X2, X1+X2, X0+X1+X2) on random and extreme 16-bit samples.
module tb_ffa3_pre;
  logic signed [15:0] x0, x1, x2;
  logic signed [17:0] x02_sum, x02_dif, x12_sum, x012_sum;
  int checks = 0, failures = 0;

  ffa3_pre #(.DW(16)) dut (.x0, .x1, .x2, .x02_sum, .x02_dif, .x12_sum, .x012_sum);

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      x0 = 16'($urandom);
      x1 = 16'($urandom);
      x2 = 16'($urandom);
      if (t == 0) begin x0 = -16'sd32768; x1 = -16'sd32768; x2 = -16'sd32768; end
      if (t == 1) begin x0 =  16'sd32767; x1 =  16'sd32767; x2 = -16'sd32768; end
      if (t == 2) begin x0 =  16'sd32767; x1 =  16'sd32767; x2 =  16'sd32767; end
      #1;
      expect_eq("x0+x2",    int'(x02_sum),  int'(x0) + int'(x2));
      expect_eq("x0-x2",    int'(x02_dif),  int'(x0) - int'(x2));
      expect_eq("x1+x2",    int'(x12_sum),  int'(x1) + int'(x2));
      expect_eq("x0+x1+x2", int'(x012_sum), int'(x0) + int'(x1) + int'(x2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
