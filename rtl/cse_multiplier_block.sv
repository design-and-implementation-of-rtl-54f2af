// Multiplier block of a transposed direct-form FIR filter with shared
// subexpressions.
//
// In the transposed form every tap multiplies the same input sample x by its
// own constant h[k], so the products can come from one shared "multiplier
// block" instead of a multiplier per tap.  This block does the sharing at
// elaboration time: each coefficient is split into a sign, a power-of-two
// shift and an odd fundamental (|h[k]| = fund * 2^shift).  One hybrid
// multiplier is built per distinct non-zero fundamental, and every tap takes
// the product of its fundamental, shifted and negated as its coefficient
// needs.  Equal coefficients (the mirror taps of a linear-phase filter),
// coefficients of opposite sign and coefficients that differ by a power of two
// thus cost one multiplier together, and zero coefficients cost nothing.
//
// Replacing constant multiplications by a shared block with shifts is the
// multiplier-block idea the design is built on; extracting the common
// subexpressions at the level of odd fundamentals, rather than with a full
// iterative divisor search over the coefficients' digits, is this
// implementation's simplification.
//
// Interface: combinational; x in, one product per tap out.  NUM_MULTS is the
// number of multipliers actually built.
module cse_multiplier_block
  import fir_pkg::*;
#(
  parameter int TAPS   = 50,   // number of coefficients L
  parameter int DATA_W = 16,   // input sample width
  parameter int COEF_W = 16,   // coefficient width (even)
  parameter int COEF_SCALE = 1024,
  // h[k] in bits [k*COEF_W +: COEF_W], two's complement
  parameter logic [TAPS-1:0][COEF_W-1:0] COEFFS =
      (TAPS*COEF_W)'(fir_pkg::triangle_coeffs(TAPS, COEF_W, COEF_SCALE))
) (
  input  logic signed [DATA_W-1:0]        x,             // current input sample
  output logic signed [DATA_W+COEF_W-1:0] prod [TAPS]    // x * h[k]
);

  localparam int PROD_W = DATA_W + COEF_W;

  function automatic longint coef(int k);
    return longint'($signed(COEFFS[k]));
  endfunction

  // Lowest tap index with the same odd fundamental as tap k.
  function automatic int owner(int k);
    longint f;
    f = odd_fundamental(coef(k));
    for (int j = 0; j < k; j++)
      if (odd_fundamental(coef(j)) == f) return j;
    return k;
  endfunction

  function automatic int count_mults();
    int n;
    n = 0;
    for (int k = 0; k < TAPS; k++)
      if (odd_fundamental(coef(k)) != 0 && owner(k) == k) n++;
    return n;
  endfunction

  localparam int NUM_MULTS = count_mults();

  logic signed [PROD_W-1:0] fprod [TAPS];  // x * fundamental, at owner taps

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    localparam longint FUND = odd_fundamental(coef(k));
    localparam int     SH   = fundamental_shift(coef(k));
    localparam bit     NEG  = coef(k) < 0;
    localparam int     OWN  = owner(k);

    if (FUND != 0 && OWN == k) begin : g_own
      enc_mode_t                  mode;
      logic [$clog2(COEF_W+1)-1:0] pp_count;
      hybrid_multiplier #(.A_W(DATA_W), .B_W(COEF_W)) u_mult (
        .a        (x),
        .b        (COEF_W'(FUND)),
        .p        (fprod[k]),
        .mode     (mode),
        .pp_count (pp_count)
      );
    end else begin : g_shared
      assign fprod[k] = '0;
    end

    if (FUND == 0) begin : g_zero
      assign prod[k] = '0;
    end else if (NEG) begin : g_neg
      assign prod[k] = -(fprod[OWN] <<< SH);
    end else begin : g_pos
      assign prod[k] = fprod[OWN] <<< SH;
    end
  end

endmodule
