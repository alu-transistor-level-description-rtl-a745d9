// ALU part of the instruction decode.
//
// Turns an opcode into the controls the ALU row needs. The LFU code of each
// instruction follows the instruction table: ADD, ADDC, SBC, CP and XOR use
// 0110 (propagate = M xor S), AND and TM use 1000, OR uses 1110. CRY_KILL is
// raised for the logic instructions so no cell generates a carry, and their
// carry in is 0, so the sum is the LFU output itself. CP (compare) is a
// subtract and TM (test mask) an AND that write no result and only set the
// condition codes.
// This design's own choices: a subtract complements operand Y ahead of the
// row (x - y = x + ~y + cin) with carry meaning "no borrow"; SBC and ADDC
// take their carry in from the C flag, CP takes 1; logic instructions leave
// C unchanged; any other opcode is illegal and does nothing.
// Purely combinational.
module alu_lfu_decode
  import alu_pkg::*;
(
  input  logic [7:0] opcode,  // instruction opcode
  output alu_ctrl_t  ctrl     // decoded controls
);
  always_comb begin
    ctrl = '{legal: 1'b0, lfu: 4'b0000, cry_kill: 1'b1, invert_y: 1'b0,
             cin_sel: CIN_ZERO, write_res: 1'b0, upd_zs: 1'b0, upd_c: 1'b0};
    unique case (opcode)
      OP_ADD, OP_ADDC, OP_SBC, OP_CP: begin
        ctrl.legal     = 1'b1;
        ctrl.lfu       = LFU_XOR;
        ctrl.cry_kill  = 1'b0;
        ctrl.invert_y  = (opcode == OP_SBC) || (opcode == OP_CP);
        ctrl.cin_sel   = (opcode == OP_ADD) ? CIN_ZERO :
                         (opcode == OP_CP)  ? CIN_ONE  : CIN_FLAG;
        ctrl.write_res = (opcode != OP_CP);
        ctrl.upd_zs    = 1'b1;
        ctrl.upd_c     = 1'b1;
      end
      OP_AND, OP_TM, OP_OR, OP_XOR: begin
        ctrl.legal     = 1'b1;
        ctrl.lfu       = (opcode == OP_OR)  ? LFU_OR :
                         (opcode == OP_XOR) ? LFU_XOR : LFU_AND;
        ctrl.write_res = (opcode != OP_TM);
        ctrl.upd_zs    = 1'b1;
      end
      default: ;
    endcase
  end
endmodule
