// 64-bit ALU with its decode and condition codes.
//
// A bit-sliced ALU: every bit is the same small cell holding a programmable
// truth table (the LFU) that produces the propagate term, a generate/carry
// mux, a sum EXOR and one stage of a zero-detect chain. The truth table is
// set per instruction, so the same cells add (LFU = xor plus the carry
// chain) and do AND, OR and XOR (carry chain killed). At the default 64
// bits the carry chain is a carry-select chain (alu_carry_select); at any
// other WIDTH, as for a small embedded processor, it is one ripple row
// (alu_ripple).
//
// Per operation: opcode, x and y are presented with valid; the decode sets
// the LFU code, CRY_KILL, a complement of y for SBC and CP and the carry
// in (0, 1 or the C flag). result, result_we, carry_out and zero are
// combinational in the same cycle; at the next rising clock edge the flags
// Z (zero chain), C (carry out, arithmetic only) and S (result MSB) are
// registered. CP and TM set only the flags; an illegal opcode does nothing.
// The operand complement, carry convention (C = no borrow), reset and the
// flag update rules are this design's choices; the cell, the LFU codes and
// the carry-select scheme follow the original ALU.
module alu_top
  import alu_pkg::*;
#(
  parameter int WIDTH = 64
) (
  input  logic             clk,        // clock of the flag register
  input  logic             rst_n,      // asynchronous reset, active low
  input  logic             valid,      // operation presented this cycle
  input  logic [7:0]       opcode,     // instruction opcode
  input  logic [WIDTH-1:0] x,          // first operand (cell input M)
  input  logic [WIDTH-1:0] y,          // second operand (cell input S)
  output logic [WIDTH-1:0] result,     // result
  output logic             result_we,  // result is to be written
  output logic             illegal,    // opcode not recognised
  output logic             carry_out,  // carry out of the MSB
  output logic             zero,       // result is all zero
  output flags_t           flags       // registered condition codes
);
  alu_ctrl_t        ctrl;
  logic [WIDTH-1:0] s_op;
  logic             cin;

  alu_lfu_decode u_dec (.opcode(opcode), .ctrl(ctrl));

  always_comb begin
    s_op = ctrl.invert_y ? ~y : y;
    unique case (ctrl.cin_sel)
      CIN_ONE:  cin = 1'b1;
      CIN_FLAG: cin = flags.c;
      default:  cin = 1'b0;
    endcase
  end

  if (WIDTH == 64) begin : g_cs
    // group sizes of the 64-bit version
    alu_carry_select #(.WIDTH(WIDTH)) u_dp (
      .m(x), .s(s_op), .lfu(ctrl.lfu), .cry_kill(ctrl.cry_kill), .cin(cin),
      .zi(1'b1), .sum(result), .cout(carry_out), .zo(zero)
    );
  end else begin : g_ripple
    // smaller datapaths: one ripple-carry row
    alu_ripple #(.WIDTH(WIDTH)) u_dp (
      .m(x), .s(s_op), .lfu(ctrl.lfu), .cry_kill(ctrl.cry_kill), .cin(cin),
      .zi(1'b1), .sum(result), .cout(carry_out), .zo(zero)
    );
  end

  assign result_we = valid & ctrl.write_res;
  assign illegal   = valid & ~ctrl.legal;

  alu_flags u_flags (
    .clk(clk), .rst_n(rst_n),
    .upd_zs(valid & ctrl.upd_zs), .upd_c(valid & ctrl.upd_c),
    .z_in(zero), .c_in(carry_out), .s_in(result[WIDTH-1]),
    .flags(flags)
  );
endmodule
