// Self-checking testbench for hybrid_multiplier.
//
// A 16 x 16 instance is driven with corner operands (0, +/-1, the extreme
// values, sparse and dense bit patterns) and random pairs; a 6 x 6 instance is
// swept exhaustively.  Products are compared with the simulator's own signed
// multiplication, and the reported mode and partial-product count are
// compared with counts worked out here from the multiplier operand.
module tb_hybrid_multiplier;
  import fir_pkg::*;

  int checks = 0;
  int failures = 0;
  int n_binary = 0;
  int n_booth = 0;

  logic signed [15:0] a16, b16;
  logic signed [31:0] p16;
  enc_mode_t          m16;
  logic [4:0]         c16;

  logic signed [5:0]  a6, b6;
  logic signed [11:0] p6;
  enc_mode_t          m6;
  logic [2:0]         c6;

  hybrid_multiplier #(.A_W(16), .B_W(16)) dut16 (
    .a(a16), .b(b16), .p(p16), .mode(m16), .pp_count(c16));
  hybrid_multiplier #(.A_W(6), .B_W(6)) dut6 (
    .a(a6), .b(b6), .p(p6), .mode(m6), .pp_count(c6));

  function automatic int ref_ones(longint v, int w);
    int n;
    n = 0;
    for (int i = 0; i < w; i++) n += int'(v >> i) & 1;
    return n;
  endfunction

  function automatic int ref_booth(longint v, int w);
    int n;
    n = 0;
    for (int j = 0; j < w / 2; j++) begin
      int d;
      d = -2*(int'(v >> (2*j+1)) & 1) + (int'(v >> (2*j)) & 1)
          + ((j == 0) ? 0 : (int'(v >> (2*j-1)) & 1));
      if (d != 0) n++;
    end
    return n;
  endfunction

  task automatic try16(longint a, longint b);
    int ro, rb;
    a16 = 16'(a);
    b16 = 16'(b);
    #1;
    ro = ref_ones(b, 16);
    rb = ref_booth(b, 16);
    checks += 3;
    if (longint'(p16) != longint'(a16) * longint'(b16)) begin
      failures++;
      if (failures < 20) $display("FAIL %0d * %0d = %0d, got %0d", a16, b16, longint'(a16) * longint'(b16), p16);
    end
    if (m16 != ((ro <= rb) ? ENC_BINARY : ENC_BOOTH)) failures++;
    if (int'(c16) != ((ro <= rb) ? ro : rb)) failures++;
    if (m16 == ENC_BINARY) n_binary++; else n_booth++;
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint corners [10] = '{0, 1, -1, 2, -2, 32767, -32768, 21845, -21846, 4097};
    foreach (corners[i]) foreach (corners[j]) try16(corners[i], corners[j]);
    for (int n = 0; n < 20000; n++) try16(longint'($urandom), longint'($urandom));
    for (int a = -32; a < 32; a++)
      for (int b = -32; b < 32; b++) begin
        a6 = 6'(a);
        b6 = 6'(b);
        #1;
        checks++;
        if (int'(p6) != a * b) begin
          failures++;
          if (failures < 20) $display("FAIL 6-bit %0d * %0d got %0d", a, b, p6);
        end
      end
    checks++;
    if (n_binary == 0 || n_booth == 0) failures++;
    $display("binary-mode products: %0d, Booth-mode products: %0d", n_binary, n_booth);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
