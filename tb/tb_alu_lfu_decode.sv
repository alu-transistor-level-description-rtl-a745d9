// Testbench of alu_lfu_decode: every opcode of the instruction table gets
// its LFU code, CRY_KILL, operand complement, carry-in source and
// write/flag enables; every other 8-bit value must decode as illegal and
// write nothing.
module tb_alu_lfu_decode;
  import alu_pkg::*;
  logic [7:0] opcode;
  alu_ctrl_t  ctrl;
  int checks = 0, failures = 0;

  alu_lfu_decode dut (.opcode(opcode), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_op(input logic [7:0] op, input logic [3:0] lfu, input logic kill,
                           input logic inv, input cin_sel_e cs, input logic wr, input logic uc);
    opcode = op;
    #1;
    checks++;
    if (!ctrl.legal || ctrl.lfu !== lfu || ctrl.cry_kill !== kill || ctrl.invert_y !== inv ||
        ctrl.cin_sel !== cs || ctrl.write_res !== wr || ctrl.upd_zs !== 1'b1 || ctrl.upd_c !== uc) begin
      failures++;
      $display("FAIL opcode=%h ctrl=%p", op, ctrl);
    end
  endtask

  initial begin
    //          opcode  LFU[3:0] kill inv cin       write upd_c
    expect_op(8'h60, 4'b0110, 0, 0, CIN_ZERO, 1, 1);  // ADD
    expect_op(8'h64, 4'b0110, 0, 0, CIN_FLAG, 1, 1);  // ADDC
    expect_op(8'h68, 4'b0110, 0, 1, CIN_FLAG, 1, 1);  // SBC
    expect_op(8'h6C, 4'b0110, 0, 1, CIN_ONE,  0, 1);  // CP
    expect_op(8'h70, 4'b1000, 1, 0, CIN_ZERO, 1, 0);  // AND
    expect_op(8'h74, 4'b1000, 1, 0, CIN_ZERO, 0, 0);  // TM
    expect_op(8'h78, 4'b1110, 1, 0, CIN_ZERO, 1, 0);  // OR
    expect_op(8'h7C, 4'b0110, 1, 0, CIN_ZERO, 1, 0);  // XOR
    for (int v = 0; v < 256; v++) begin
      if (v >= 'h60 && v <= 'h7C && (v % 4) == 0) continue;
      opcode = 8'(v);
      #1;
      checks++;
      if (ctrl.legal || ctrl.write_res || ctrl.upd_zs || ctrl.upd_c) begin
        failures++;
        $display("FAIL illegal opcode %h decoded as %p", opcode, ctrl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
