// Testbench of alu_zero_cell: ZO is high only for SUM = 0 and ZI = 1, and
// a chain of 8 stages reports zero only for an all-zero word.
module tb_alu_zero_cell;
  logic sum, zi, zo;
  logic [7:0] word;
  logic [8:0] chain;
  int checks = 0, failures = 0;

  alu_zero_cell dut (.sum(sum), .zi(zi), .zo(zo));

  assign chain[0] = 1'b1;
  for (genvar i = 0; i < 8; i++) begin : g_ch
    alu_zero_cell u (.sum(word[i]), .zi(chain[i]), .zo(chain[i+1]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {sum, zi} = 2'(v);
      #1;
      checks++;
      if (zo !== (v == 1)) begin failures++; $display("FAIL sum=%b zi=%b zo=%b", sum, zi, zo); end
    end
    for (int v = 0; v < 256; v++) begin
      word = 8'(v);
      #1;
      checks++;
      if (chain[8] !== (v == 0)) begin failures++; $display("FAIL word=%h z=%b", word, chain[8]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
