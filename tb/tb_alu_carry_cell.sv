// Testbench of alu_carry_cell: both carry polarities, every combination of
// M, S, P, CRY_KILL and carry in. Expected: carry out = P & cin | G with
// G = M & S & !CRY_KILL, the lines inverted for the active-low cell.
module tb_alu_carry_cell;
  logic m, s, p, kill, ci_hi;
  logic co_lo, co_hi;
  int checks = 0, failures = 0;

  alu_carry_cell #(.CARRY_ACTIVE_LOW(1'b1)) dut_lo (
    .m(m), .s(s), .p(p), .cry_kill(kill), .cry_in(~ci_hi), .cry_out(co_lo));
  alu_carry_cell #(.CARRY_ACTIVE_LOW(1'b0)) dut_hi (
    .m(m), .s(s), .p(p), .cry_kill(kill), .cry_in(ci_hi), .cry_out(co_hi));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 32; v++) begin
      {m, s, p, kill, ci_hi} = 5'(v);
      #1;
      exp = (m && s && !kill) ? 1'b1 : (p ? ci_hi : 1'b0);
      checks += 2;
      if (co_lo !== ~exp) begin failures++; $display("FAIL lo v=%b co=%b", 5'(v), co_lo); end
      if (co_hi !==  exp) begin failures++; $display("FAIL hi v=%b co=%b", 5'(v), co_hi); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
