// End-to-end self-checking testbench for fir_top at its default parameters
// (50 taps, 16-bit samples, triangular 16-bit coefficients).
//
// A reference model here keeps the history of accepted samples and forms
// y(n) = sum h[k] x(n-k) with coefficients computed from the same formula,
// h[k] = min(k+1, 50-k) * 1024.  Every output is compared with it, and every
// output must appear exactly two cycles after its sample was accepted and no
// other output may appear.  Phases: impulse response, random samples with
// random idle cycles (stalls), full-scale negative step (largest output
// magnitude), a reset in the middle of a stream, then random data again.
// The mechanisms exercised are counted, and a mechanism that never occurred
// counts as a failure: input stalls, reset with history discarded,
// coefficient sharing in the multiplier block, and multipliers running in
// binary and in Booth mode.
module tb_fir_top;
  import fir_pkg::*;

  localparam int TAPS = 50;

  logic               clk = 1'b0;
  logic               rst_n;
  logic               in_valid;
  logic signed [15:0] x_in;
  logic               out_valid;
  logic signed [37:0] y_out;

  fir_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .out_valid(out_valid), .y_out(y_out));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int n_out = 0;
  int n_stall = 0;
  int n_reset = 0;

  longint hist [$];     // accepted samples, newest first
  longint pend_val [$]; // expected outputs in order
  int     pend_due [$]; // cycle at which each becomes visible

  function automatic longint h(int k);
    int m;
    m = ((k + 1) < (TAPS - k)) ? (k + 1) : (TAPS - k);
    return longint'(m) * 1024;
  endfunction

  function automatic void fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cycle, msg);
  endfunction

  task automatic step(bit v, longint xv);
    in_valid = v;
    x_in     = 16'(xv);
    if (!v && hist.size() > 0 && rst_n) n_stall++;
    @(posedge clk);
    #1;
    cycle++;
    if (v && rst_n) begin
      longint y;
      hist.push_front(longint'(x_in));
      if (hist.size() > TAPS) void'(hist.pop_back());
      y = 0;
      foreach (hist[k]) y += h(k) * hist[k];
      pend_val.push_back(y);
      pend_due.push_back(cycle + 1);
    end
    // output check for this cycle
    if (pend_due.size() > 0 && pend_due[0] == cycle) begin
      longint e;
      void'(pend_due.pop_front());
      e = pend_val.pop_front();
      checks++;
      if (!out_valid) fail("output missing");
      else if (longint'(y_out) != e) fail($sformatf("y=%0d expected %0d", y_out, e));
      n_out++;
    end else begin
      checks++;
      if (out_valid && rst_n) fail("unexpected output");
    end
  endtask

  initial begin : watchdog
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_binary, n_booth, n_shared, n_mults;
    rst_n = 1'b0;
    in_valid = 1'b0;
    x_in = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;

    // impulse response: outputs are the coefficients themselves
    step(1, 1);
    for (int i = 0; i < TAPS + 5; i++) step(1, 0);

    // random samples with random idle cycles
    for (int i = 0; i < 3000; i++) begin
      bit v;
      v = ($urandom % 4) != 0;
      step(v, longint'($signed(16'($urandom))));
    end

    // full-scale negative step: largest output magnitude
    for (int i = 0; i < TAPS + 5; i++) step(1, -32768);
    for (int i = 0; i < 3; i++) step(0, 0);

    // reset in the middle of a stream: history is discarded
    rst_n = 1'b0;
    step(1, 1234);
    rst_n = 1'b1;
    hist.delete();
    n_reset++;
    step(1, 1);
    for (int i = 0; i < TAPS + 2; i++) step(1, 0);
    for (int i = 0; i < 1000; i++) step(($urandom % 3) != 0, longint'($signed(16'($urandom))));
    for (int i = 0; i < 4; i++) step(0, 0);

    // structure of the multiplier block
    n_mults  = dut.u_mb.NUM_MULTS;
    n_shared = TAPS - n_mults;
    n_binary = (dut.u_mb.g_tap[0].g_own.u_mult.mode == ENC_BINARY) ? 1 : 0;  // h = 1024: fundamental 1
    n_booth  = (dut.u_mb.g_tap[6].g_own.u_mult.mode == ENC_BOOTH)  ? 1 : 0;  // h = 7168: fundamental 7
    checks++;
    if (n_mults != 13) fail($sformatf("%0d multipliers built, expected 13", n_mults));

    checks += 5;
    if (n_stall  == 0) fail("no stall");
    if (n_reset  == 0) fail("no reset");
    if (n_shared == 0) fail("no coefficient sharing");
    if (n_binary == 0) fail("no binary-mode multiplier");
    if (n_booth  == 0) fail("no Booth-mode multiplier");
    checks++;
    if (pend_due.size() != 0) fail("outputs still outstanding");

    $display("outputs %0d, stall cycles %0d, resets %0d, taps sharing a multiplier %0d, multipliers %0d",
             n_out, n_stall, n_reset, n_shared, n_mults);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
