// End-to-end testbench of alu_top at its default size (64 bits).
//
// Streams directed and random instructions through the ALU, one per clock,
// and compares result, result_we, carry_out, zero and the registered flags
// with a model built on the '+', '-', '&', '|' and '^' operators. It counts
// how often each mechanism occurred: every opcode, carry kill, a carry
// generated, a carry rippling the whole width, each carry-select group
// taking its carry-1 and carry-0 chain, zero detect, ADDC/SBC using the C
// flag, the no-write compare and test, an illegal opcode and reset. A
// mechanism that never occurred counts as a failure. Results are checked in
// the same cycle (combinational datapath), flags one clock later.
module tb_alu_top;
  import alu_pkg::*;
  localparam int W = 64;
  localparam int NG = 6;
  localparam int GLO [NG] = '{0, 4, 8, 16, 32, 48};  // group LSBs of the default datapath

  `include "tb_alu_top_body.svh"

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  alu_top dut (.clk(clk), .rst_n(rst_n), .valid(valid), .opcode(opcode), .x(x), .y(y),
               .result(result), .result_we(result_we), .illegal(illegal),
               .carry_out(carry_out), .zero(zero), .flags(flags));

endmodule
