// Shared sizes of the approximate Dadda multiplier and the FIR filter built on it.
//
// The multiplier is an unsigned 8 x 8 -> 16 bit array; the reduction tree in
// dadda_mult_8x8 is written out for exactly these widths, so OP_W and PROD_W
// are constants rather than module parameters. The 8-bit operands and 16-bit
// product follow the operand and product buses of the multiplier simulation;
// the 16-bit filter output follows the filter simulation.
package approx_dadda_pkg;
  localparam int unsigned OP_W   = 8;           // multiplier operand width
  localparam int unsigned PROD_W = 2 * OP_W;    // multiplier product width

  typedef logic [OP_W-1:0]   operand_t;
  typedef logic [PROD_W-1:0] product_t;
endpackage
