// Direct-form FIR filter whose multiplications use the approximate Dadda
// multiplier: y(n) = sum_{i=0}^{TAPS-1} h(i) * x(n-i).
//
// Structure (the direct form with a delay line of TAPS-1 unit delays, one
// multiplier per tap and a chain of adders, three taps by default):
//   x(n) ----+---[z^-1]---+---[z^-1]---+
//            |            |            |
//     h(0)--(x)    h(1)--(x)    h(2)--(x)
//            |            |            |
//            +-----------(+)----------(+)---> y(n)
// Each (x) is one dadda_mult_8x8 instance, so every product carries the
// multiplier's approximation error. Samples and coefficients are unsigned
// 8-bit values, the width of the multiplier's operands. The adder chain and
// the output are Y_W = 16 bits wide and wrap modulo 2^16 when the sum of the
// products is larger; the coefficients are inputs so any filter can be loaded.
//
// Timing: one new sample per clock cycle, no handshake. On each rising clock
// edge the delay line shifts x_in in, and y_out takes the sum computed from
// x_in and the delay line as they stood before the edge; y_out therefore holds
// y(n) one cycle after x(n) is presented. rst is synchronous and active-high,
// and clears the delay line and y_out. The output register, the reset style,
// unsigned arithmetic and wrap-around are this design's choices.
//
// Interface: clk, rst; x_in new sample; h[0..TAPS-1] coefficients (h[0]
// multiplies the newest sample); y_out filtered output.
module fir_filter
  import approx_dadda_pkg::*;
#(
  parameter int unsigned TAPS = 3,
  parameter int unsigned Y_W  = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  operand_t       x_in,
  input  operand_t       h [TAPS],
  output logic [Y_W-1:0] y_out
);
  operand_t       taps_x [TAPS];     // taps_x[i] = x(n-i)
  product_t       prod   [TAPS];
  logic [Y_W-1:0] acc    [TAPS];     // running sums along the adder chain

  assign taps_x[0] = x_in;

  // Unit-delay line.
  for (genvar i = 1; i < TAPS; i++) begin : g_delay
    always_ff @(posedge clk) begin
      if (rst) taps_x[i] <= '0;
      else     taps_x[i] <= taps_x[i-1];
    end
  end

  // One approximate multiplier per tap.
  for (genvar i = 0; i < TAPS; i++) begin : g_mult
    dadda_mult_8x8 u_mult (.a(taps_x[i]), .b(h[i]), .p(prod[i]));
  end

  // Adder chain.
  always_comb begin
    acc[0] = Y_W'(prod[0]);
    for (int i = 1; i < TAPS; i++)
      acc[i] = acc[i-1] + Y_W'(prod[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) y_out <= '0;
    else     y_out <= acc[TAPS-1];
  end
endmodule
