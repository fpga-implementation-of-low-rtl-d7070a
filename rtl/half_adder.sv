// Half adder used in the Dadda reduction tree: sum = a ^ b, carry = a & b.
// Combinational; carry has twice the weight of sum.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
