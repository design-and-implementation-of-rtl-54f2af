// Hybrid encoder: recodes a signed multiplier operand into the shortest list of
// partial-product terms.
//
// Two recodings are formed side by side.  Binary: one term per 1 bit, the
// sign bit weighing -2^(B_W-1) (two's complement).  Radix-4 Booth: one term per
// non-zero digit of {-2,-1,0,1,2}, digit j taken from bits 2j+1, 2j, 2j-1.
// The encoder counts the 1 bits and the non-zero Booth digits and takes
// binary when it has no more terms than Booth (ties go to binary, which needs
// no recoding), Booth otherwise.  The chosen terms are packed, in order of
// rising weight, into B_W/2 slots; slots past pp_count hold no term and stay
// all-zero, so the adders behind them see no switching.  A Booth list never
// exceeds B_W/2 terms and binary is only taken when it is no longer, so the
// slots always suffice.
//
// Choosing per operand by the number and position of its 1 bits is what the
// hybrid multiplier is described to do; the two concrete recodings, the tie
// rule and the slot packing are this design's reading of that.
//
// Interface: purely combinational, b in, terms/mode/counts out.  B_W must be
// even.
module hybrid_encoder
  import fir_pkg::*;
#(
  parameter int B_W = 16                       // multiplier operand width (even)
) (
  input  logic signed [B_W-1:0]       b,           // multiplier operand
  output pp_term_t                    terms [B_W/2], // packed term list
  output enc_mode_t                   mode,        // recoding chosen
  output logic [$clog2(B_W+1)-1:0]    ones_count,  // 1 bits in b
  output logic [$clog2(B_W+1)-1:0]    booth_count, // non-zero Booth digits
  output logic [$clog2(B_W+1)-1:0]    pp_count     // terms used
);

  localparam int NDIG = B_W / 2;
  localparam int CW   = $clog2(B_W + 1);
  localparam int IW   = (NDIG > 1) ? $clog2(NDIG) : 1;  // slot index width

  if (B_W % 2 != 0) begin : g_bad_width
    $error("hybrid_encoder: B_W must be even");
  end

  pp_term_t bin_terms   [B_W];
  pp_term_t booth_terms [NDIG];

  // Binary recoding: bit i is a term of weight 2^i, the sign bit negative.
  always_comb begin
    ones_count = '0;
    for (int i = 0; i < B_W; i++) begin
      bin_terms[i].valid = b[i];
      bin_terms[i].neg   = (i == B_W - 1);
      bin_terms[i].shift = SHIFT_W'(i);
      ones_count         = ones_count + CW'(b[i]);
    end
  end

  // Radix-4 Booth recoding.
  always_comb begin
    booth_count = '0;
    for (int j = 0; j < NDIG; j++) begin
      logic [2:0] trip;
      trip[2] = b[2*j+1];
      trip[1] = b[2*j];
      trip[0] = (j == 0) ? 1'b0 : b[2*j-1];
      booth_terms[j].valid = (trip != 3'b000) && (trip != 3'b111);
      booth_terms[j].neg   = trip[2];
      // digit magnitude 2 for 011 and 100: one more place of shift
      booth_terms[j].shift = SHIFT_W'(2*j) + SHIFT_W'((trip == 3'b011) || (trip == 3'b100));
      booth_count          = booth_count + CW'(booth_terms[j].valid);
    end
  end

  // Selection and packing into NDIG slots.
  always_comb begin
    logic [CW-1:0] slot;
    mode = (ones_count <= booth_count) ? ENC_BINARY : ENC_BOOTH;
    for (int s = 0; s < NDIG; s++) terms[s] = '0;
    slot = '0;
    if (mode == ENC_BINARY) begin
      for (int i = 0; i < B_W; i++) begin
        if (bin_terms[i].valid && (slot < CW'(NDIG))) begin
          terms[slot[IW-1:0]] = bin_terms[i];
          slot = slot + 1'b1;
        end
      end
    end else begin
      for (int j = 0; j < NDIG; j++) begin
        if (booth_terms[j].valid && (slot < CW'(NDIG))) begin
          terms[slot[IW-1:0]] = booth_terms[j];
          slot = slot + 1'b1;
        end
      end
    end
    pp_count = slot;
  end

endmodule
