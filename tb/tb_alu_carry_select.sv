// Testbench of alu_carry_select at W=64 bits: directed full-ripple, zero and kill
// cases, then random operands and truth tables checked against the cell
// equations and, for add codes, against the '+' operator.
module tb_alu_carry_select;
  localparam int W = 64;
  logic [W-1:0] m, s, sum;
  logic [3:0]   lfu;
  logic         kill, cin, zi, cout, zo;
  int checks = 0, failures = 0, full_props = 0, zeros = 0;

  alu_carry_select dut (
    .m(m), .s(s), .lfu(lfu), .cry_kill(kill), .cin(cin), .zi(zi),
    .sum(sum), .cout(cout), .zo(zo));

  `include "tb_alu_row_common.svh"

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_row(20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
