// 2:1 multiplexer, the transmission-gate MUX used inside the 4:2 compressor.
//
// In silicon it is two transmission gates steered by sel and its complement
// (six transistors with the select inverter). Only the logic function is
// modelled: y = sel ? d1 : d0. Which data input a high select passes is this
// design's convention.
//
// Interface: inputs d0, d1, sel; output y. Purely combinational.
module mux2 (
  input  logic d0,
  input  logic d1,
  input  logic sel,
  output logic y
);
  assign y = sel ? d1 : d0;
endmodule
