// WIDTH-bit ALU datapath with a carry-select ("carry save") carry chain.
//
// The least significant group is a plain ripple row (alu_ripple) that
// works with the real carry in. Every higher group is an alu_select_group
// that precomputes its carries for a carry in of 0 and of 1; the real carry
// coming out of the group below selects between them. The carry therefore
// ripples group by group rather than bit by bit. Groups grow towards the
// MSB, because the upper groups have longer to wait for the real carry:
// the default GROUP_W = {4,4,8,16,16,16} (LSB first) is this design's pick
// of the 4-, 8- and 16-bit group sizes; the sizes must add up to WIDTH.
// The zero-detect chain runs through all groups; with zi high, zo is the
// zero flag. cin/cout active high. Purely combinational.
module alu_carry_select #(
  parameter int WIDTH   = 64,
  parameter int NGROUPS = 6,
  parameter int GROUP_W [NGROUPS] = '{4, 4, 8, 16, 16, 16}
) (
  input  logic [WIDTH-1:0] m,         // operand M
  input  logic [WIDTH-1:0] s,         // operand S
  input  logic [3:0]       lfu,       // LFU truth table
  input  logic             cry_kill,  // carry kill
  input  logic             cin,       // carry into bit 0, active high
  input  logic             zi,        // zero chain in
  output logic [WIDTH-1:0] sum,       // result
  output logic             cout,      // carry out of the MSB, active high
  output logic             zo         // zero chain out
);
  // Bit offset of group g.
  function automatic int offset(int g);
    int o = 0;
    for (int j = 0; j < g; j++) o += GROUP_W[j];
    return o;
  endfunction

  initial begin
    assert (offset(NGROUPS) == WIDTH)
      else $error("alu_carry_select: GROUP_W does not add up to WIDTH");
  end

  logic [NGROUPS:0] gc;  // real carry into group g
  logic [NGROUPS:0] gz;  // zero chain into group g

  assign gc[0] = cin;
  assign gz[0] = zi;
  assign cout  = gc[NGROUPS];
  assign zo    = gz[NGROUPS];

  for (genvar g = 0; g < NGROUPS; g++) begin : g_grp
    localparam int LO = offset(g);
    localparam int GW = GROUP_W[g];
    if (g == 0) begin : g_ripple
      alu_ripple #(.WIDTH(GW)) u_grp (
        .m(m[LO +: GW]), .s(s[LO +: GW]), .lfu(lfu), .cry_kill(cry_kill),
        .cin(gc[g]), .zi(gz[g]), .sum(sum[LO +: GW]), .cout(gc[g+1]), .zo(gz[g+1])
      );
    end else begin : g_select
      alu_select_group #(.W(GW)) u_grp (
        .m(m[LO +: GW]), .s(s[LO +: GW]), .lfu(lfu), .cry_kill(cry_kill),
        .cin(gc[g]), .zi(gz[g]), .sum(sum[LO +: GW]), .cout(gc[g+1]), .zo(gz[g+1])
      );
    end
  end
endmodule
