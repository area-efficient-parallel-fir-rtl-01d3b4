// tb_ffa_subfilter: self-checking test of ffa_subfilter.
//
// Four sub-filters (symmetric of even and odd length, antisymmetric of odd
// length, general) share one random 8-bit sample stream with a random
// enable; each is compared every clock with a direct convolution of its
// expanded coefficients (subfilter_checker). Also checks that a disabled
// clock leaves the delay line alone and that reset clears it.
module tb_ffa_subfilter;
  import ffa_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic check = 1'b0;
  logic signed [7:0] x = '0;
  int c [4];
  int f [4];
  int checks, failures;
  int stalls = 0;

  always #5 clk = ~clk;

  subfilter_checker #(.M(6), .KIND(SUB_SYMMETRIC))     u_c0 (.clk, .rst_n, .en, .x, .check, .checks(c[0]), .failures(f[0]));
  subfilter_checker #(.M(7), .KIND(SUB_SYMMETRIC))     u_c1 (.clk, .rst_n, .en, .x, .check, .checks(c[1]), .failures(f[1]));
  subfilter_checker #(.M(7), .KIND(SUB_ANTISYMMETRIC)) u_c2 (.clk, .rst_n, .en, .x, .check, .checks(c[2]), .failures(f[2]));
  subfilter_checker #(.M(5), .KIND(SUB_GENERAL))       u_c3 (.clk, .rst_n, .en, .x, .check, .checks(c[3]), .failures(f[3]));

  task automatic report();
    checks = 0;
    failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i];
    end
  endtask

  // watchdog
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
      x  = 8'($urandom);
      if (t % 50 < 3) x = (t % 2 == 0) ? 8'sh80 : 8'sh7f;  // extremes
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
