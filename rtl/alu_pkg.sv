// Shared types and constants of the ALU.
//
// The opcodes and the four-bit LFU truth-table codes are those of the
// instruction table that drives the ALU: LFU[3..0] are the outputs the LFU
// mux gives for operand pairs {M,S} = 11, 10, 01 and 00 respectively.
// The alu_ctrl_t bundle (operand complement, carry-in source, write and flag
// enables) is this design's own packaging of the decode outputs.
package alu_pkg;

  // Opcodes; the low two bits are always zero.
  typedef enum logic [7:0] {
    OP_ADD  = 8'h60,
    OP_ADDC = 8'h64,
    OP_SBC  = 8'h68,
    OP_CP   = 8'h6C,
    OP_AND  = 8'h70,
    OP_TM   = 8'h74,
    OP_OR   = 8'h78,
    OP_XOR  = 8'h7C
  } opcode_e;

  // LFU truth tables, index = {M,S}.
  localparam logic [3:0] LFU_XOR = 4'b0110;  // also used by ADD/ADDC/SBC/CP
  localparam logic [3:0] LFU_AND = 4'b1000;
  localparam logic [3:0] LFU_OR  = 4'b1110;

  // Where the carry into bit 0 comes from.
  typedef enum logic [1:0] {
    CIN_ZERO = 2'd0,
    CIN_ONE  = 2'd1,
    CIN_FLAG = 2'd2
  } cin_sel_e;

  typedef struct packed {
    logic       legal;     // opcode is one of the table's eight
    logic [3:0] lfu;       // LFU[3:0]
    logic       cry_kill;  // CRY_KILL to every cell
    logic       invert_y;  // complement operand Y (subtracts)
    cin_sel_e   cin_sel;   // carry into the LSB
    logic       write_res; // result is written back
    logic       upd_zs;    // Z and S flags are updated
    logic       upd_c;     // C flag is updated
  } alu_ctrl_t;

  // Condition-code bundle.
  typedef struct packed {
    logic z;
    logic c;
    logic s;
  } flags_t;

endpackage
