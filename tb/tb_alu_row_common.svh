// Body shared by the testbenches of the multi-bit ALU rows (alu_ripple,
// alu_select_group, alu_carry_select). The including module declares W,
// the DUT signals m, s, lfu, kill, cin, zi, sum, cout, zo, and the counters.
// Random and directed vectors are checked against ref_row() and, for add
// codes, against the '+' operator.

task automatic check_row(input logic [63:0] a, input logic [63:0] b, input logic [3:0] t,
                         input logic k, input logic c, input logic z);
  alu_ref_pkg::row_t r;
  logic [64:0] add;
  m = a[W-1:0]; s = b[W-1:0]; lfu = t; kill = k; cin = c; zi = z;
  #1;
  r = alu_ref_pkg::ref_row(W, 64'(m), 64'(s), t, k, c);
  checks++;
  if (64'(sum) !== r.sum || cout !== r.cout || zo !== (z & r.zero)) begin
    failures++;
    if (failures < 10)
      $display("FAIL m=%h s=%h lfu=%b kill=%b cin=%b: sum=%h cout=%b zo=%b exp %h %b %b",
               m, s, t, k, c, sum, cout, zo, r.sum, r.cout, z & r.zero);
  end
  if (t == 4'b0110 && !k) begin
    add = 65'(m) + 65'(s) + 65'(c);
    checks++;
    if ({cout, sum} !== add[W:0]) begin
      failures++;
      if (failures < 10) $display("FAIL add m=%h s=%h cin=%b sum=%h", m, s, c, sum);
    end
  end
  if (c && t == 4'b0110 && !k && ((m ^ s) == '1)) full_props++;
  if (zo) zeros++;
endtask

task automatic run_row(input int n);
  // full carry ripple across the row, both polarities of carry in
  check_row('1, '0, 4'b0110, 1'b0, 1'b1, 1'b1);
  check_row('1, '0, 4'b0110, 1'b0, 1'b0, 1'b1);
  check_row('1, 64'd1, 4'b0110, 1'b0, 1'b0, 1'b1);   // all-zero sum, carry out
  check_row('1, '1, 4'b1000, 1'b1, 1'b0, 1'b1);      // AND, kill
  check_row('1, '1, 4'b0110, 1'b1, 1'b0, 1'b1);      // XOR, kill
  check_row('0, '0, 4'b1110, 1'b1, 1'b0, 1'b0);      // zi low
  for (int i = 0; i < n; i++) begin
    logic [3:0] t;
    logic k;
    int sel;
    sel = $urandom_range(0, 3);
    case (sel)
      0: begin t = 4'b0110; k = 1'b0; end
      1: begin t = 4'b1000; k = 1'b1; end
      2: begin t = 4'b1110; k = 1'b1; end
      default: begin t = 4'($urandom); k = 1'($urandom); end
    endcase
    check_row(alu_ref_pkg::rnd64(), alu_ref_pkg::rnd64(), t, k, 1'($urandom), 1'($urandom_range(0, 7) != 0));
  end
  checks++;
  if (full_props == 0 || zeros == 0) begin
    failures++;
    $display("FAIL coverage: full propagates=%0d zeros=%0d", full_props, zeros);
  end
endtask
