// Sum EXOR of one ALU bit.
//
// The EXOR acts as a controlled inverter: the carry into the bit passes
// the propagate P unchanged when low and inverts it when high, so
// sum = P xor carry. For logic operations the carry chain is killed and
// the sum is P itself, the LFU output. The carry input here is active
// high. Purely combinational.
module alu_sum_xor (
  input  logic p,    // propagate from the LFU
  input  logic c,    // carry into this bit, active high
  output logic sum   // result bit
);
  always_comb sum = c ? ~p : p;
endmodule
