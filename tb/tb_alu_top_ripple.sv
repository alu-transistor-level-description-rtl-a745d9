// End-to-end testbench of alu_top at 16 bits, where the datapath is a
// single ripple-carry row with two carry-polarity groups instead of the
// carry-select chain of the 64-bit default. Same checks as tb_alu_top.
//
// Streams directed and random instructions through the ALU, one per clock,
// and compares result, result_we, carry_out, zero and the registered flags
// with a model built on the '+', '-', '&', '|' and '^' operators. It counts
// how often each mechanism occurred: every opcode, carry kill, a carry
// generated, a carry rippling the whole width (across the polarity-group
// inverter), zero detect, ADDC/SBC using the C
// flag, the no-write compare and test, an illegal opcode and reset. A
// mechanism that never occurred counts as a failure. Results are checked in
// the same cycle (combinational datapath), flags one clock later.
module tb_alu_top_ripple;
  import alu_pkg::*;
  localparam int W = 16;
  localparam int NG = 1;
  localparam int GLO [NG] = '{0};  // a single ripple row

  `include "tb_alu_top_body.svh"

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  alu_top #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .valid(valid), .opcode(opcode), .x(x), .y(y),
               .result(result), .result_we(result_we), .illegal(illegal),
               .carry_out(carry_out), .zero(zero), .flags(flags));

endmodule
