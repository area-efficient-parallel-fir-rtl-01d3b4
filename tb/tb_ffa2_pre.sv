// tb_ffa2_pre: checks the two preprocessing adders of the 2-parallel filter
// (X0+X1 and X0-X1) on random and extreme 16-bit samples.
module tb_ffa2_pre;
  logic signed [15:0] x0, x1;
  logic signed [16:0] x_sum, x_dif;
  int checks = 0, failures = 0;

  ffa2_pre #(.DW(16)) dut (.x0, .x1, .x_sum, .x_dif);

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
      if (t == 0) begin x0 = -16'sd32768; x1 = -16'sd32768; end
      if (t == 1) begin x0 =  16'sd32767; x1 = -16'sd32768; end
      #1;
      checks += 2;
      if (int'(x_sum) != int'(x0) + int'(x1)) begin
        failures++;
        $display("sum %0d + %0d gave %0d", x0, x1, x_sum);
      end
      if (int'(x_dif) != int'(x0) - int'(x1)) begin
        failures++;
        $display("dif %0d - %0d gave %0d", x0, x1, x_dif);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
