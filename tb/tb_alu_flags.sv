// Testbench of alu_flags: reset clears the flags; Z/S and C load only when
// their enables are high and hold otherwise. A shadow model tracks the
// expected flags over random cycles.
module tb_alu_flags;
  import alu_pkg::*;
  logic   clk = 0, rst_n = 0;
  logic   upd_zs = 0, upd_c = 0, z_in = 0, c_in = 0, s_in = 0;
  flags_t flags, exp;
  int checks = 0, failures = 0;

  alu_flags dut (.clk(clk), .rst_n(rst_n), .upd_zs(upd_zs), .upd_c(upd_c),
                 .z_in(z_in), .c_in(c_in), .s_in(s_in), .flags(flags));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_zs = 1; upd_c = 1; z_in = 1; c_in = 1; s_in = 1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (flags !== 3'b000) begin failures++; $display("FAIL flags not held in reset"); end
    rst_n = 1;
    exp = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      {upd_zs, upd_c, z_in, c_in, s_in} = 5'($urandom);
      @(posedge clk);
      if (upd_zs) begin exp.z = z_in; exp.s = s_in; end
      if (upd_c) exp.c = c_in;
      #1;
      checks++;
      if (flags !== exp) begin failures++; $display("FAIL cycle %0d flags=%b exp=%b", i, flags, exp); end
    end
    rst_n = 0;
    #1;
    checks++;
    if (flags !== 3'b000) begin failures++; $display("FAIL async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
