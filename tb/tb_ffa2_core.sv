// tb_ffa2_core: self-checking test of the 2x2 fast FIR datapath ffa2_core.
//
// Five cores (symmetric P = 8 and P = 6, antisymmetric P = 8 and P = 6,
// general P = 8) share one random 10-bit stream of two-sample blocks with a
// random enable. Each output pair is compared every clock with a direct
// convolution of the accepted samples (core_checker).
module tb_ffa2_core;
  import ffa_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic check = 1'b0;
  logic signed [9:0] x0 = '0, x1 = '0;
  int c [5];
  int f [5];
  int checks, failures;
  int stalls = 0;

  always #5 clk = ~clk;

  core_checker #(.P(8), .KIND(SUB_SYMMETRIC))     u_c0 (.clk, .rst_n, .en, .x0, .x1, .check, .checks(c[0]), .failures(f[0]));
  core_checker #(.P(6), .KIND(SUB_SYMMETRIC))     u_c1 (.clk, .rst_n, .en, .x0, .x1, .check, .checks(c[1]), .failures(f[1]));
  core_checker #(.P(8), .KIND(SUB_ANTISYMMETRIC)) u_c2 (.clk, .rst_n, .en, .x0, .x1, .check, .checks(c[2]), .failures(f[2]));
  core_checker #(.P(6), .KIND(SUB_ANTISYMMETRIC)) u_c3 (.clk, .rst_n, .en, .x0, .x1, .check, .checks(c[3]), .failures(f[3]));
  core_checker #(.P(8), .KIND(SUB_GENERAL))       u_c4 (.clk, .rst_n, .en, .x0, .x1, .check, .checks(c[4]), .failures(f[4]));

  task automatic report();
    checks = 0;
    failures = 0;
    for (int i = 0; i < 5; i++) begin
      checks += c[i];
      failures += f[i];
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check = 1'b1;
    for (int t = 0; t < 600; t++) begin
      @(posedge clk);
      #1;
      x0 = 10'($urandom);
      x1 = 10'($urandom);
      en = ($urandom % 4) != 0;
      if (!en) stalls++;
    end
    report();
    if (stalls == 0) begin
      failures++;
      $display("no disabled clock was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
