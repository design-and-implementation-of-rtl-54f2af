// Hybrid encoded low-power multiplier: signed A_W x B_W -> A_W+B_W product.
//
// The multiplier operand b goes through the hybrid encoder, which returns at
// most B_W/2 partial-product terms, each "+/- (a << shift)".  Every slot forms
// its partial product from the sign-extended multiplicand: the shifted copy
// for an added term, its one's complement for a subtracted term (the missing
// +1 enters as a carry-in bit), and all zeros for an empty slot.  The partial
// products and the carry-in bits are then summed.  Compared with a plain
// shift-and-add array (B_W partial products) this never needs more than half
// the rows, and an operand with few 1 bits uses fewer rows than Booth would;
// unused rows are held at zero, so they do not toggle.
//
// That the hybrid multiplier reduces partial products below Booth recoding
// by looking at the count and position of the 1 bits follows the description
// of the design; the carry-in handling of negative terms and the plain adder
// summing the rows are this implementation's own choices.
//
// Interface: combinational, no clock.  mode and pp_count report how the
// current b was recoded.
module hybrid_multiplier
  import fir_pkg::*;
#(
  parameter int A_W = 16,   // multiplicand width
  parameter int B_W = 16    // multiplier width (even)
) (
  input  logic signed [A_W-1:0]       a,        // multiplicand
  input  logic signed [B_W-1:0]       b,        // multiplier (recoded operand)
  output logic signed [A_W+B_W-1:0]   p,        // product a * b
  output enc_mode_t                   mode,     // recoding used for b
  output logic [$clog2(B_W+1)-1:0]    pp_count  // partial products used
);

  localparam int P_W  = A_W + B_W;
  localparam int NDIG = B_W / 2;

  pp_term_t                 terms [NDIG];
  logic [$clog2(B_W+1)-1:0] ones_count, booth_count;

  hybrid_encoder #(.B_W(B_W)) u_enc (
    .b           (b),
    .terms       (terms),
    .mode        (mode),
    .ones_count  (ones_count),
    .booth_count (booth_count),
    .pp_count    (pp_count)
  );

  logic signed [P_W-1:0] a_ext;
  logic [P_W-1:0]        pp   [NDIG];
  logic [NDIG-1:0]       cin;

  assign a_ext = P_W'(a);  // sign extension

  // Partial-product generation.
  always_comb begin
    for (int s = 0; s < NDIG; s++) begin
      logic [P_W-1:0] shifted;
      shifted = a_ext << terms[s].shift;
      if (!terms[s].valid)   pp[s] = '0;
      else if (terms[s].neg) pp[s] = ~shifted;
      else                   pp[s] = shifted;
      cin[s] = terms[s].valid & terms[s].neg;
    end
  end

  // The encoder must use exactly the term count of the recoding it chose.
  always_comb begin
    assert (pp_count == ((mode == ENC_BINARY) ? ones_count : booth_count))
      else $error("hybrid_multiplier: term count does not match the chosen recoding");
  end

  // Summation of the partial products and the carry-in bits.
  always_comb begin
    logic [P_W-1:0] acc;
    acc = '0;
    for (int s = 0; s < NDIG; s++) acc = acc + pp[s] + P_W'(cin[s]);
    p = signed'(acc);
  end

endmodule
