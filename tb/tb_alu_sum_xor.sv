// Testbench of alu_sum_xor: the carry passes P unchanged when 0 and
// inverts it when 1.
module tb_alu_sum_xor;
  logic p, c, sum;
  int checks = 0, failures = 0;

  alu_sum_xor dut (.p(p), .c(c), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {p, c} = 2'(v);
      #1;
      checks++;
      // expected sum for {p,c} = 00,01,10,11 is 0,1,1,0
      if (sum !== ((v == 1) || (v == 2))) begin
        failures++;
        $display("FAIL p=%b c=%b sum=%b", p, c, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
