// Stimulus and reference checker for one fir_top instance of TAPS taps with
// the default triangular coefficients h[k] = min(k+1, TAPS-k) * 1024.
//
// It drives an impulse, random samples with random idle cycles and a
// full-scale negative step, compares every output with a reference
// convolution over the accepted samples, and requires each output exactly two
// cycles after its sample.  It reports its check and failure counts and
// raises done when finished.
module fir_tap_checker #(
  parameter int TAPS    = 10,
  parameter int SAMPLES = 1000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int OUT_W = 32 + $clog2(TAPS);

  logic                    rst_n;
  logic                    in_valid;
  logic signed [15:0]      x_in;
  logic                    out_valid;
  logic signed [OUT_W-1:0] y_out;

  fir_top #(.TAPS(TAPS)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .out_valid(out_valid), .y_out(y_out));

  longint hist [$];
  longint pend_val [$];
  int     pend_due [$];
  int     cycle;

  function automatic longint h(int k);
    int m;
    m = ((k + 1) < (TAPS - k)) ? (k + 1) : (TAPS - k);
    return longint'(m) * 1024;
  endfunction

  task automatic step(bit v, longint xv);
    in_valid = v;
    x_in     = 16'(xv);
    @(posedge clk);
    #1;
    cycle++;
    if (v) begin
      longint y;
      hist.push_front(longint'(x_in));
      if (hist.size() > TAPS) void'(hist.pop_back());
      y = 0;
      foreach (hist[k]) y += h(k) * hist[k];
      pend_val.push_back(y);
      pend_due.push_back(cycle + 1);
    end
    checks++;
    if (pend_due.size() > 0 && pend_due[0] == cycle) begin
      longint e;
      void'(pend_due.pop_front());
      e = pend_val.pop_front();
      if (!out_valid || longint'(y_out) != e) begin
        failures++;
        if (failures < 5) $display("FAIL %0d taps, cycle %0d: y=%0d valid=%0b expected %0d",
                                   TAPS, cycle, y_out, out_valid, e);
      end
    end else if (out_valid) begin
      failures++;
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    cycle = 0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    x_in = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    step(1, 1);
    for (int i = 0; i < TAPS + 2; i++) step(1, 0);
    for (int i = 0; i < SAMPLES; i++) begin
      bit v;
      v = ($urandom % 4) != 0;
      step(v, longint'($signed(16'($urandom))));
    end
    for (int i = 0; i < TAPS + 2; i++) step(1, -32768);
    for (int i = 0; i < 3; i++) step(0, 0);
    checks++;
    if (pend_due.size() != 0) failures++;
    done = 1'b1;
  end

endmodule
