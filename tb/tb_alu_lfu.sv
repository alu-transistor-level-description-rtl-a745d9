// Testbench of alu_lfu: all 16 truth tables against all four operand
// pairs; P must equal the truth-table entry for {M,S} (11->L3, 10->L2,
// 01->L1, 00->L0), checked also for AND, OR and XOR by their operators.
module tb_alu_lfu;
  logic m, s, p;
  logic [3:0] lfu;
  int checks = 0, failures = 0;

  alu_lfu dut (.m(m), .s(s), .lfu(lfu), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 16; t++) begin
      for (int ab = 0; ab < 4; ab++) begin
        lfu = 4'(t); m = ab[1]; s = ab[0];
        #1;
        checks++;
        if (p !== ((t >> ab) & 1)) begin
          failures++;
          $display("FAIL lfu=%b m=%b s=%b p=%b", lfu, m, s, p);
        end
        if (t == 4'b1000 && p !== (m & s)) failures++;
        if (t == 4'b1110 && p !== (m | s)) failures++;
        if (t == 4'b0110 && p !== (m ^ s)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
