// Two-input XOR-XNOR cell: the basic building block of the 4:2 compressor.
//
// In silicon this is an eight-transistor cell (three PMOS, three NMOS
// pass/pull devices plus a static inverter) that delivers both polarities at
// once; the XNOR output is the XOR output through that inverter. Only its
// logic function is modelled here: xor_o = x1 ^ x2 and xnor_o = ~xor_o.
// Transistor sizing, drive strength and power are outside what RTL can express.
//
// Interface: inputs x1, x2; outputs xor_o, xnor_o. Purely combinational.
module xor_xnor (
  input  logic x1,
  input  logic x2,
  output logic xor_o,
  output logic xnor_o
);
  assign xor_o  = x1 ^ x2;
  assign xnor_o = ~xor_o;   // the cell's output inverter
endmodule
