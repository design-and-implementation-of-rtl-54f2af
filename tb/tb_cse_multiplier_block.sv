// Self-checking testbench for cse_multiplier_block.
//
// Instance A uses a hand-made 12-tap coefficient set that exercises every
// sharing case: equal mirror coefficients, opposite signs, power-of-two
// multiples, a zero and the most negative value.  Instance B uses the default
// 50-tap triangular set.  For random and corner input samples every tap's
// product is compared with x*h[k] computed here, and the number of
// multipliers each instance built is compared with the count of distinct
// non-zero odd fundamentals worked out here.
module tb_cse_multiplier_block;

  localparam int TA = 12;
  localparam logic [TA-1:0][15:0] CA = {
    16'sd300,  16'sd75,   -16'sd32768, 16'sd0,  -16'sd96, 16'sd7,
    16'sd7,    16'sd12,   -16'sd75,    16'sd150, 16'sd1,  16'sd300};
  // (tap 0 is the last element listed: h = 300, 1, 150, -75, 12, 7, 7, -96, 0, -32768, 75, 300)

  localparam int TB_TAPS = 50;

  int checks = 0;
  int failures = 0;

  logic signed [15:0] x;
  logic signed [31:0] pa [TA];
  logic signed [31:0] pb [TB_TAPS];

  cse_multiplier_block #(.TAPS(TA), .DATA_W(16), .COEF_W(16), .COEFFS(CA)) dut_a (
    .x(x), .prod(pa));
  cse_multiplier_block dut_b (.x(x), .prod(pb));

  function automatic longint ha(int k);
    return longint'($signed(CA[k]));
  endfunction

  function automatic longint hb(int k);
    int m;
    m = ((k + 1) < (TB_TAPS - k)) ? (k + 1) : (TB_TAPS - k);
    return longint'(m * 1024);
  endfunction

  function automatic longint oddpart(longint v);
    if (v < 0) v = -v;
    if (v == 0) return 0;
    while ((v & 1) == 0) v = v >> 1;
    return v;
  endfunction

  task automatic apply(longint v);
    x = 16'(v);
    #1;
    for (int k = 0; k < TA; k++) begin
      checks++;
      if (longint'(pa[k]) != longint'(x) * ha(k)) begin
        failures++;
        if (failures < 20) $display("FAIL A tap %0d: x=%0d got %0d", k, x, pa[k]);
      end
    end
    for (int k = 0; k < TB_TAPS; k++) begin
      checks++;
      if (longint'(pb[k]) != longint'(x) * hb(k)) begin
        failures++;
        if (failures < 20) $display("FAIL B tap %0d: x=%0d got %0d", k, x, pb[k]);
      end
    end
  endtask

  function automatic int distinct_a();
    longint seen [$];
    for (int k = 0; k < TA; k++) begin
      longint f = oddpart(ha(k));
      bit dup = 0;
      foreach (seen[i]) if (seen[i] == f) dup = 1;
      if (f != 0 && !dup) seen.push_back(f);
    end
    return seen.size();
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint corners [6] = '{0, 1, -1, 32767, -32768, 12345};
    foreach (corners[i]) apply(corners[i]);
    for (int n = 0; n < 2000; n++) apply(longint'($urandom));
    // A: fundamentals 75, 1, 3 (12, -96), 7 -> 4 multipliers for 12 taps
    checks++;
    if (dut_a.NUM_MULTS != distinct_a() || distinct_a() != 4) begin
      failures++;
      $display("FAIL A built %0d multipliers", dut_a.NUM_MULTS);
    end
    // B: odd parts of 1..25 -> 13 multipliers for 50 taps
    checks++;
    if (dut_b.NUM_MULTS != 13) begin
      failures++;
      $display("FAIL B built %0d multipliers", dut_b.NUM_MULTS);
    end
    $display("multipliers built: A %0d for %0d taps, B %0d for %0d taps",
             dut_a.NUM_MULTS, TA, dut_b.NUM_MULTS, TB_TAPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
