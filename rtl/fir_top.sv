// L-tap low-power FIR filter, y(n) = sum_{k=0}^{L-1} h[k] * x(n-k), in
// transposed direct form with a shared constant multiplier block.
//
// Structure: an accepted sample is first captured in an input register.  The
// multiplier block (cse_multiplier_block) forms x*h[k] for all taps from that
// register, using hybrid encoded multipliers shared between coefficients with
// the same odd fundamental.  A chain of partial-sum registers z[1..L-1] then
// implements the transposed form: z[k] <= x*h[k] + z[k+1] (z[L] = 0) and
// y <= x*h[0] + z[1].  Each partial sum passes through exactly one adder per
// sample, so the critical path is one multiplier-block product plus one adder.
//
// Power: the input register only loads on in_valid, so between samples the
// multiplier block sees a steady operand and does not switch; the partial
// sums also hold.  Idle cycles therefore stall the filter without loss.
//
// Timing: a sample presented with in_valid in cycle t is registered at the end
// of t; its output appears on y_out with out_valid at the end of cycle t+1
// (two-cycle latency, one sample per cycle throughput).  Reset (rst_n low,
// synchronous) clears all state, i.e. the filter starts from zero history.
//
// The transposed form, the shared multiplier block and the hybrid multiplier
// follow the design; the sample widths, full-precision output, valid handshake,
// input register and default coefficients are this implementation's choices.
module fir_top
  import fir_pkg::*;
#(
  parameter int TAPS   = 50,   // number of coefficients L
  parameter int DATA_W = 16,   // input sample width
  parameter int COEF_W = 16,   // coefficient width (even)
  parameter int COEF_SCALE = 1024,
  parameter logic [TAPS-1:0][COEF_W-1:0] COEFFS =
      (TAPS*COEF_W)'(fir_pkg::triangle_coeffs(TAPS, COEF_W, COEF_SCALE)),
  parameter int OUT_W  = DATA_W + COEF_W + $clog2(TAPS)  // full precision
) (
  input  logic                     clk,
  input  logic                     rst_n,     // synchronous, active low
  input  logic                     in_valid,  // x_in holds a new sample
  input  logic signed [DATA_W-1:0] x_in,
  output logic                     out_valid, // y_out holds a new output
  output logic signed [OUT_W-1:0]  y_out
);

  localparam int PROD_W = DATA_W + COEF_W;

  logic signed [DATA_W-1:0] x_q;
  logic                     v_q;
  logic signed [PROD_W-1:0] prod [TAPS];
  logic signed [OUT_W-1:0]  z    [TAPS+1];   // z[0] unused, z[TAPS] = 0

  // Input register: loads only on a new sample (operand isolation).
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q <= '0;
      v_q <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) x_q <= x_in;
    end
  end

  cse_multiplier_block #(
    .TAPS   (TAPS),
    .DATA_W (DATA_W),
    .COEF_W (COEF_W),
    .COEFFS (COEFFS)
  ) u_mb (
    .x    (x_q),
    .prod (prod)
  );

  assign z[0]    = '0;
  assign z[TAPS] = '0;

  // Transposed delay/adder chain.
  for (genvar k = 1; k < TAPS; k++) begin : g_chain
    always_ff @(posedge clk) begin
      if (!rst_n)   z[k] <= '0;
      else if (v_q) z[k] <= OUT_W'(prod[k]) + z[k+1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v_q;
      if (v_q) y_out <= OUT_W'(prod[0]) + z[1];
    end
  end

endmodule
