// Self-checking testbench for hybrid_encoder.
//
// Sweeps every 16-bit multiplier operand.  For each it checks, against values
// computed here from the operand alone: the 1-bit count, the count of
// non-zero radix-4 Booth digits, the mode (binary when it has no more terms
// than Booth), the number of terms used, that the packed terms add up to the
// operand, that the slots past the used ones are empty, and that no term list
// exceeds eight slots.  A 6-bit instance is swept as well.
module tb_hybrid_encoder;
  import fir_pkg::*;

  int checks = 0;
  int failures = 0;
  int n_binary = 0;
  int n_booth = 0;

  logic signed [15:0] b16;
  pp_term_t           t16 [8];
  enc_mode_t          m16;
  logic [4:0]         ones16, booth16, pp16;

  logic signed [5:0]  b6;
  pp_term_t           t6 [3];
  enc_mode_t          m6;
  logic [2:0]         ones6, booth6, pp6;

  hybrid_encoder #(.B_W(16)) dut16 (
    .b(b16), .terms(t16), .mode(m16),
    .ones_count(ones16), .booth_count(booth16), .pp_count(pp16));

  hybrid_encoder #(.B_W(6)) dut6 (
    .b(b6), .terms(t6), .mode(m6),
    .ones_count(ones6), .booth_count(booth6), .pp_count(pp6));

  function automatic void check(bit ok, string what, longint v);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s for b=%0d", what, v);
    end
  endfunction

  // Reference: count of non-zero radix-4 Booth digits of a signed w-bit value.
  function automatic int ref_booth(longint v, int w);
    int n;
    n = 0;
    for (int j = 0; j < w / 2; j++) begin
      int lo, mid, hi, d;
      hi  = int'(v >> (2*j+1)) & 1;
      mid = int'(v >> (2*j)) & 1;
      lo  = (j == 0) ? 0 : (int'(v >> (2*j-1)) & 1);
      d   = -2*hi + mid + lo;
      if (d != 0) n++;
    end
    return n;
  endfunction

  function automatic int ref_ones(longint v, int w);
    int n;
    n = 0;
    for (int i = 0; i < w; i++) n += int'(v >> i) & 1;
    return n;
  endfunction

  initial begin : watchdog
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32768; v < 32768; v++) begin
      int ro, rb, exp_cnt;
      longint sum;
      enc_mode_t exp_mode;
      b16 = 16'(v);
      #1;
      ro = ref_ones(longint'(v), 16);
      rb = ref_booth(longint'(v), 16);
      exp_mode = (ro <= rb) ? ENC_BINARY : ENC_BOOTH;
      exp_cnt  = (ro <= rb) ? ro : rb;
      check(int'(ones16) == ro, "ones_count", v);
      check(int'(booth16) == rb, "booth_count", v);
      check(m16 == exp_mode, "mode", v);
      check(int'(pp16) == exp_cnt, "pp_count", v);
      check(exp_cnt <= 8, "slot bound", v);
      sum = 0;
      for (int s = 0; s < 8; s++) begin
        if (s >= exp_cnt) check(t16[s] == '0, "empty slot", v);
        if (t16[s].valid) sum += t16[s].neg ? -(64'sd1 <<< t16[s].shift) : (64'sd1 <<< t16[s].shift);
      end
      check(sum == longint'(v), "term sum", v);
      if (m16 == ENC_BINARY) n_binary++; else n_booth++;
    end
    for (int v = -32; v < 32; v++) begin
      int ro, rb;
      longint sum;
      b6 = 6'(v);
      #1;
      ro = ref_ones(longint'(v), 6);
      rb = ref_booth(longint'(v), 6);
      check(m6 == ((ro <= rb) ? ENC_BINARY : ENC_BOOTH), "mode (6 bit)", v);
      check(int'(pp6) == ((ro <= rb) ? ro : rb), "pp_count (6 bit)", v);
      sum = 0;
      for (int s = 0; s < 3; s++)
        if (t6[s].valid) sum += t6[s].neg ? -(64'sd1 <<< t6[s].shift) : (64'sd1 <<< t6[s].shift);
      check(sum == longint'(v), "term sum (6 bit)", v);
    end
    check(n_binary > 0 && n_booth > 0, "both modes seen", 0);
    $display("binary-mode operands: %0d, Booth-mode operands: %0d", n_binary, n_booth);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
