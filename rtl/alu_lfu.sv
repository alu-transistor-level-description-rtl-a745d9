// Logical Function Unit (LFU) of one ALU bit.
//
// A programmable truth table: the two operand bits of the cell select one
// of the four control lines LFU[3:0], and the selected line is the cell's
// propagate P. {M,S}=11 selects LFU[3], 10 selects LFU[2], 01 selects
// LFU[1] and 00 selects LFU[0], so any two-input logic function is
// available; LFU=0110 gives M xor S, the propagate term of an add.
// In the transistor design this is an nchan/pchan pass-gate mux; here it is
// its logic function. Purely combinational.
module alu_lfu (
  input  logic       m,    // operand M
  input  logic       s,    // operand S
  input  logic [3:0] lfu,  // truth table L3..L0
  output logic       p     // propagate
);
  always_comb p = lfu[{m, s}];
endmodule
