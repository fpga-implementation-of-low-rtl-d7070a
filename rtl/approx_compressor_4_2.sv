// Approximate 4:2 compressor.
//
// A 4:2 compressor adds four bits of equal weight. The exact form also has a
// carry-in from, and a carry-out to, the neighbouring compressor; this
// approximate form drops both, so every compressor stands alone and produces
// only sum (weight 1) and carry (weight 2).
//
// Structure: two XOR-XNOR cells form t1 = x1^x2 and t2 = x3^x4 with their
// complements. Where an exact compressor would XOR t1 and t2, a 2:1 MUX
// selected by t1 picks t2 or its complement, so sum = x1^x2^x3^x4 (the parity
// of the inputs, always correct). carry = (x1|x2) & (x3|x4): set when each
// input pair holds at least one 1.
//
// Error behaviour: of the 16 input patterns three come out wrong, each by -2:
//   0011 and 1100 (two ones in the same pair, carry lost) and 1111 (value 4 is
//   not representable in sum + 2*carry; the output is 2). Error rate 3/16.
// The rows 0000, 0001, 0010 and 0011 (the last with difference -2) and the
// count of three wrong rows are those of the proposed compressor; the carry
// expression that produces exactly them is this design's reconstruction.
//
// Interface: inputs x1..x4; outputs sum, carry. Purely combinational.
module approx_compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  output logic sum,
  output logic carry
);
  logic t1, t1_n, t2, t2_n;

  xor_xnor u_xx12 (.x1(x1), .x2(x2), .xor_o(t1), .xnor_o(t1_n));
  xor_xnor u_xx34 (.x1(x3), .x2(x4), .xor_o(t2), .xnor_o(t2_n));

  // The MUX that replaces the second XOR of the exact compressor.
  mux2 u_sum_mux (.d0(t2), .d1(t2_n), .sel(t1), .y(sum));

  assign carry = (x1 | x2) & (x3 | x4);

  // t1_n is produced by the cell but not needed on this path.
  logic unused_t1_n;
  assign unused_t1_n = t1_n;
endmodule
