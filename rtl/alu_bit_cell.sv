// One bit of the ALU datapath: the complete ALU cell.
//
// The cell joins four parts: the LFU mux (propagate P from the truth table
// LFU[3:0] and the operand bits M, S), the carry cell (generate
// M & S & !CRY_KILL and carry out = P & carry in | G), the sum EXOR
// (P xor carry in) and the zero-detect stage (ZO = !SUM & ZI).
// CRY_IN and CRY_OUT are active low by default, as in the original cell;
// CARRY_ACTIVE_LOW=0 gives the cell of opposite carry polarity used for
// alternate groups of a long row. ZI/ZO are active high.
// Purely combinational; a row of cells is formed by chaining cry_out to the
// next cry_in and zo to the next zi.
module alu_bit_cell #(
  parameter bit CARRY_ACTIVE_LOW = 1'b1
) (
  input  logic       m,         // operand M
  input  logic       s,         // operand S
  input  logic [3:0] lfu,       // LFU truth table
  input  logic       cry_kill,  // carry kill
  input  logic       cry_in,    // carry in, cell polarity
  output logic       cry_out,   // carry out, cell polarity
  input  logic       zi,        // zero chain in
  output logic       zo,        // zero chain out
  output logic       sum        // result bit
);
  logic p, c;

  alu_lfu u_lfu (.m(m), .s(s), .lfu(lfu), .p(p));

  alu_carry_cell #(.CARRY_ACTIVE_LOW(CARRY_ACTIVE_LOW)) u_carry (
    .m(m), .s(s), .p(p), .cry_kill(cry_kill), .cry_in(cry_in), .cry_out(cry_out)
  );

  always_comb c = CARRY_ACTIVE_LOW ? ~cry_in : cry_in;

  alu_sum_xor u_sum (.p(p), .c(c), .sum(sum));

  alu_zero_cell u_zero (.sum(sum), .zi(zi), .zo(zo));
endmodule
