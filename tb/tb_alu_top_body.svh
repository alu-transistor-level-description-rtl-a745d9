// Body shared by the end-to-end ALU testbenches (tb_alu_top at the default
// 64 bits, tb_alu_top_ripple at 16 bits). The including module declares W,
// NG (number of carry-select groups, 1 for a ripple row) and GLO (the LSB of
// each group), and instantiates alu_top as dut.
  logic         clk, rst_n, valid;
  logic [7:0]   opcode;
  logic [W-1:0] x, y, result;
  logic         result_we, illegal, carry_out, zero;
  flags_t       flags, eflags;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_op [8];
  int n_kill = 0, n_gen = 0, n_full_ripple = 0, n_zero = 0, n_cflag_used = 0;
  int n_nowrite = 0, n_illegal = 0, n_reset = 0;
  int n_sel1 [NG], n_sel0 [NG];

  always #5 clk = ~clk;

  localparam opcode_e OPS [8] = '{OP_ADD, OP_ADDC, OP_SBC, OP_CP, OP_AND, OP_TM, OP_OR, OP_XOR};

  // Present one instruction, check the combinational outputs, then clock it
  // and check the flags.
  task automatic do_op(input logic [7:0] op, input logic [W-1:0] a, input logic [W-1:0] b);
    logic [W:0]   full;
    logic [W-1:0] eres, bb;
    logic         ec, ewe, elegal, arith, cin;
    int           idx;
    @(negedge clk);
    valid = 1; opcode = op; x = a; y = b;
    #1;
    idx = -1;
    for (int i = 0; i < 8; i++) if (OPS[i] == op) idx = i;
    elegal = (idx >= 0);
    arith  = elegal && idx < 4;
    cin    = 1'b0;
    bb     = b;
    ec     = 1'b0;
    unique case (op)
      OP_ADD:  begin full = {1'b0, a} + {1'b0, b}; end
      OP_ADDC: begin cin = eflags.c; full = {1'b0, a} + {1'b0, b} + (W+1)'(cin); end
      OP_SBC, OP_CP: begin
        cin = (op == OP_CP) ? 1'b1 : eflags.c;
        bb = ~b;
        // x - y - !C, carry out = no borrow
        full = {1'b0, a} - {1'b0, b} - (W+1)'(!cin);
        full[W] = ({1'b0, a} >= {1'b0, b} + (W+1)'(!cin));
      end
      OP_AND, OP_TM: full = {1'b0, a & b};
      OP_OR:   full = {1'b0, a | b};
      OP_XOR:  full = {1'b0, a ^ b};
      default: full = '0;
    endcase
    eres = full[W-1:0];
    ec   = full[W];
    ewe  = elegal && op != OP_CP && op != OP_TM;
    checks++;
    if (illegal !== !elegal || result_we !== ewe) begin
      failures++;
      $display("FAIL op=%h illegal=%b we=%b", op, illegal, result_we);
    end
    if (elegal) begin
      checks++;
      if (result !== eres || zero !== (eres == 0) || (arith && carry_out !== ec)) begin
        failures++;
        if (failures < 20)
          $display("FAIL op=%h x=%h y=%h res=%h exp=%h c=%b exp=%b z=%b", op, a, b, result, eres,
                   carry_out, ec, zero);
      end
      // coverage
      n_op[idx]++;
      if (!arith && ((a & b) != 0)) n_kill++;
      if (arith && ((a & bb) != 0)) n_gen++;
      if (arith && cin && ((a ^ bb) == '1)) n_full_ripple++;
      if (eres == 0) n_zero++;
      if (op == OP_ADDC || op == OP_SBC) n_cflag_used++;
      if (!ewe) n_nowrite++;
      if (arith) begin
        for (int g = 1; g < NG; g++) begin
          logic [W:0] low;
          logic [W-1:0] msk;
          msk = (W'(1) << GLO[g]) - 1;
          low = {1'b0, a & msk} + {1'b0, bb & msk} + (W+1)'(cin);
          if (low[GLO[g]]) n_sel1[g]++; else n_sel0[g]++;
        end
      end
    end else begin
      n_illegal++;
    end
    @(posedge clk);
    if (elegal) begin
      eflags.z = (eres == 0);
      eflags.s = eres[W-1];
      if (arith) eflags.c = ec;
    end
    #1;
    checks++;
    if (flags !== eflags) begin
      failures++;
      if (failures < 20) $display("FAIL op=%h flags=%b exp=%b", op, flags, eflags);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) n_op[i] = 0;
    for (int g = 0; g < NG; g++) begin n_sel1[g] = 0; n_sel0[g] = 0; end
    clk = 0; rst_n = 0; valid = 0;
    opcode = 8'h00; x = '0; y = '0;
    eflags = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (flags !== 3'b000) failures++; else n_reset++;
    rst_n = 1;

    // directed: full carry ripple, zero, 128-bit add and subtract via C flag
    do_op(OP_ADD,  '1, W'(1));                  // all-zero result, carry out
    do_op(OP_ADDC, '0, '1);                     // C=1 ripples through all bits
    do_op(OP_CP,   W'(5), W'(5));               // equal: Z=1, C=1 (no borrow)
    do_op(OP_CP,   W'(4), W'(5));               // borrow
    do_op(OP_SBC,  W'(10), W'(3));              // uses C=0 -> 10-3-1
    do_op(OP_TM,   W'('hF0), W'('h0F));             // Z=1, no write
    do_op(OP_AND,  '1, '1);                     // kill with every bit generating
    do_op(OP_XOR,  '1, '1);
    do_op(OP_OR,   {1'b1, {(W-1){1'b0}}}, '0); // sign
    do_op(8'h61,   W'(1), W'(2));               // illegal
    do_op(8'h00,   W'(1), W'(2));               // illegal
    // double-width add as ADD then ADDC
    do_op(OP_ADD,  '1, W'(1));
    do_op(OP_ADDC, '0, '0);
    // random
    for (int i = 0; i < 20000; i++) begin
      logic [7:0] op;
      int r;
      r = $urandom_range(0, 40);
      op = (r == 40) ? 8'($urandom) : OPS[r % 8];
      do_op(op, W'(alu_ref_pkg::rnd64()), W'(alu_ref_pkg::rnd64()));
    end
    // reset in the middle
    @(negedge clk);
    valid = 0;
    rst_n = 0;
    #1;
    eflags = '0;
    checks++;
    if (flags !== 3'b000) failures++; else n_reset++;
    rst_n = 1;

    // mechanism report
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL opcode %s never ran", OPS[i].name()); end
    end
    for (int g = 1; g < NG; g++) begin
      checks++;
      if (n_sel1[g] == 0 || n_sel0[g] == 0) begin
        failures++;
        $display("FAIL group %0d select: carry1=%0d carry0=%0d", g, n_sel1[g], n_sel0[g]);
      end
    end
    checks++;
    if (n_kill == 0 || n_gen == 0 || n_full_ripple == 0 || n_zero == 0 || n_cflag_used == 0 ||
        n_nowrite == 0 || n_illegal == 0 || n_reset < 2) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("mechanisms: kill=%0d generate=%0d full_ripple=%0d zero=%0d cflag=%0d nowrite=%0d illegal=%0d reset=%0d",
             n_kill, n_gen, n_full_ripple, n_zero, n_cflag_used, n_nowrite, n_illegal, n_reset);
    for (int g = 1; g < NG; g++)
      $display("group %0d (bit %0d): carry-1 chain %0d, carry-0 chain %0d", g, GLO[g], n_sel1[g], n_sel0[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
