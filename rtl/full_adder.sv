// Full adder used in the Dadda reduction tree: sum = a ^ b ^ c,
// carry = majority(a, b, c). Combinational; carry has twice the weight of sum.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic ab;
  assign ab    = a ^ b;
  assign sum   = ab ^ c;
  assign carry = (a & b) | (c & ab);
endmodule
