// Shared types and constant functions for the low-power FIR filter.
//
// A partial-product "term" is the unit the hybrid encoder hands to the
// multiplier datapath: one shifted copy of the multiplicand, added or
// subtracted.  The encoder picks, per multiplier operand, either plain binary
// terms (one per 1 bit) or radix-4 Booth terms, whichever list is shorter.
//
// The coefficient helpers are evaluated at elaboration time only.  The
// default coefficient set is a symmetric triangular (Bartlett) low-pass
// window, h[k] = min(k+1, L-k) * scale; the filter structure works with any
// set given as a parameter.
package fir_pkg;

  // Width of a term's shift amount: operands of up to 64 bits.
  localparam int SHIFT_W = 6;

  // Widest packed coefficient vector the default-coefficient helper returns.
  localparam int MAX_COEF_BITS = 4096;

  typedef enum logic {
    ENC_BINARY = 1'b0,  // one term per 1 bit of the multiplier
    ENC_BOOTH  = 1'b1   // one term per non-zero radix-4 Booth digit
  } enc_mode_t;

  typedef struct packed {
    logic               valid;  // term is present
    logic               neg;    // subtract instead of add
    logic [SHIFT_W-1:0] shift;  // left shift applied to the multiplicand
  } pp_term_t;

  // Triangular low-pass coefficients packed tap 0 in the low bits,
  // each tap w bits wide: h[k] = min(k+1, taps-k) * scale.
  function automatic logic [MAX_COEF_BITS-1:0] triangle_coeffs(int taps, int w, int scale);
    logic [MAX_COEF_BITS-1:0] r;
    r = '0;
    for (int k = 0; k < taps; k++) begin
      int m;
      m = ((k + 1) < (taps - k)) ? (k + 1) : (taps - k);
      m = m * scale;
      for (int i = 0; i < w; i++) r[k*w + i] = m[i];
    end
    return r;
  endfunction

  // Magnitude of a coefficient with its trailing zeros removed
  // (its "odd fundamental"); zero stays zero.
  function automatic longint odd_fundamental(longint v);
    longint a;
    a = (v < 0) ? -v : v;
    if (a == 0) return 0;
    while (a % 2 == 0) a = a / 2;
    return a;
  endfunction

  // Number of trailing zeros of |v| (0 for v == 0).
  function automatic int fundamental_shift(longint v);
    longint a;
    int s;
    a = (v < 0) ? -v : v;
    s = 0;
    if (a == 0) return 0;
    while (a % 2 == 0) begin
      a = a / 2;
      s++;
    end
    return s;
  endfunction

endpackage
