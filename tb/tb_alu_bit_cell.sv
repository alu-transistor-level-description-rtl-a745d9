// Testbench of alu_bit_cell: both carry polarities, every truth table and
// every combination of M, S, CRY_KILL, carry in and ZI. Expected values come
// from the cell equations written out here.
module tb_alu_bit_cell;
  logic m, s, kill, ci, zi;
  logic [3:0] lfu;
  logic co_lo, co_hi, zo_lo, zo_hi, sum_lo, sum_hi;
  int checks = 0, failures = 0;

  alu_bit_cell #(.CARRY_ACTIVE_LOW(1'b1)) dut_lo (
    .m(m), .s(s), .lfu(lfu), .cry_kill(kill), .cry_in(~ci), .cry_out(co_lo),
    .zi(zi), .zo(zo_lo), .sum(sum_lo));
  alu_bit_cell #(.CARRY_ACTIVE_LOW(1'b0)) dut_hi (
    .m(m), .s(s), .lfu(lfu), .cry_kill(kill), .cry_in(ci), .cry_out(co_hi),
    .zi(zi), .zo(zo_hi), .sum(sum_hi));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic p, e_sum, e_co, e_zo;
    for (int v = 0; v < 512; v++) begin
      {lfu, m, s, kill, ci, zi} = 9'(v);
      #1;
      p     = lfu[{m, s}];
      e_sum = p ^ ci;
      e_co  = (m & s & ~kill) | (p & ci);
      e_zo  = zi & ~e_sum;
      checks += 2;
      if (sum_lo !== e_sum || co_lo !== ~e_co || zo_lo !== e_zo) begin
        failures++;
        $display("FAIL lo v=%b sum=%b co_n=%b zo=%b", 9'(v), sum_lo, co_lo, zo_lo);
      end
      if (sum_hi !== e_sum || co_hi !== e_co || zo_hi !== e_zo) begin
        failures++;
        $display("FAIL hi v=%b sum=%b co=%b zo=%b", 9'(v), sum_hi, co_hi, zo_hi);
      end
    end
    // an add with LFU=0110 is a full adder
    lfu = 4'b0110; kill = 0; zi = 1;
    for (int v = 0; v < 8; v++) begin
      {m, s, ci} = 3'(v);
      #1;
      checks++;
      if ({co_hi, sum_hi} !== 2'(m + s + ci)) begin failures++; $display("FAIL full adder %b", 3'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
