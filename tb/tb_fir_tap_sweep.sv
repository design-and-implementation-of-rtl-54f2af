// Runs the filter at each tap count evaluated for the design: 10, 20, 30, 40
// and 50 taps, each with the triangular coefficient set of its length, and
// checks every output against a reference convolution (see fir_tap_checker).
module tb_fir_tap_sweep;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   c [5];
  int   f [5];
  logic d [5];

  fir_tap_checker #(.TAPS(10)) u10 (.clk(clk), .checks(c[0]), .failures(f[0]), .done(d[0]));
  fir_tap_checker #(.TAPS(20)) u20 (.clk(clk), .checks(c[1]), .failures(f[1]), .done(d[1]));
  fir_tap_checker #(.TAPS(30)) u30 (.clk(clk), .checks(c[2]), .failures(f[2]), .done(d[2]));
  fir_tap_checker #(.TAPS(40)) u40 (.clk(clk), .checks(c[3]), .failures(f[3]), .done(d[3]));
  fir_tap_checker #(.TAPS(50)) u50 (.clk(clk), .checks(c[4]), .failures(f[4]), .done(d[4]));

  int checks = 0;
  int failures = 0;

  initial begin : watchdog
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", c.sum() , f.sum() + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    foreach (c[i]) begin
      $display("%0d taps: %0d checks, %0d failures", 10 * (i + 1), c[i], f[i]);
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
