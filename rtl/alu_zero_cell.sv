// Zero-detect stage of one ALU bit.
//
// The zero detect ripples through the cells alongside the carry chain:
// ZO = !SUM & ZI. With ZI tied high at the least significant bit, the ZO of
// the most significant bit is high exactly when every result bit is zero.
// The transistor design builds the AND from a transmission gate and a
// pull-down (mux logic); this is its logic function. Purely combinational.
module alu_zero_cell (
  input  logic sum,  // this bit's result
  input  logic zi,   // zero chain from the lower bit
  output logic zo    // zero chain to the upper bit
);
  always_comb zo = ~sum & zi;
endmodule
