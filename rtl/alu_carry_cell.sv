// Carry cell of one ALU bit: generate, carry kill and the propagate mux.
//
// Generate G = M & S & !CRY_KILL forces the carry out high regardless of
// the carry in; otherwise the carry in is passed to the carry out when the
// propagate P is high (a transmission gate in the transistor design):
//   carry out = (P & carry in) | G.
// When P and G are both low the carry out is low.
// The carry lines use one polarity per cell. With CARRY_ACTIVE_LOW=1, the
// default, cry_in and cry_out are active low, as in the original cell;
// with 0 they are active high. A row alternates the two kinds with a single
// inverter between groups. Purely combinational.
module alu_carry_cell #(
  parameter bit CARRY_ACTIVE_LOW = 1'b1
) (
  input  logic m,         // operand M
  input  logic s,         // operand S
  input  logic p,         // propagate from the LFU
  input  logic cry_kill,  // kills the generate term
  input  logic cry_in,    // carry in, cell polarity
  output logic cry_out    // carry out, cell polarity
);
  logic g, c_in, c_out;

  always_comb begin
    g       = m & s & ~cry_kill;
    c_in    = CARRY_ACTIVE_LOW ? ~cry_in : cry_in;
    c_out   = (p & c_in) | g;
    cry_out = CARRY_ACTIVE_LOW ? ~c_out : c_out;
  end
endmodule
