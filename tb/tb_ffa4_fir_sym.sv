// tb_ffa4_fir_sym: self-checking test of the 4-parallel symmetric FIR filter.
//
// Five filters run at once, each driven and checked by its own fir_checker:
// N = 24 (random and full-scale), N = 8 (inner sub-filters of two taps), N = 72
// and N = 144 taps (24, 72 and 144 are the sizes the structure's cost is
// quoted for). Every output block is compared with a direct convolution,
// and the one-clock latency from in_valid to out_valid is checked every
// clock. Gaps in in_valid must occur at least once.
module tb_ffa4_fir_sym;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int c [5], f [5], s [5], b [5];
  logic d [5];
  int checks, failures;

  always #5 clk = ~clk;

  fir_checker #(.L(4), .N(24))                u_0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .stalls(s[0]), .blocks(b[0]), .done(d[0]));
  fir_checker #(.L(4), .N(24), .EXTREME(1'b1)) u_1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .stalls(s[1]), .blocks(b[1]), .done(d[1]));
  fir_checker #(.L(4), .N(8))                 u_2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .stalls(s[2]), .blocks(b[2]), .done(d[2]));
  fir_checker #(.L(4), .N(72))                u_3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .stalls(s[3]), .blocks(b[3]), .done(d[3]));
  fir_checker #(.L(4), .N(144))               u_4 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .stalls(s[4]), .blocks(b[4]), .done(d[4]));

  task automatic report();
    checks = 0;
    failures = 0;
    for (int i = 0; i < 5; i++) begin
      checks += c[i];
      failures += f[i];
      if (s[i] == 0) begin
        failures++;
        $display("filter %0d never saw a gap in in_valid", i);
      end
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
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
