// One carry-select group on the MSB side of the ALU.
//
// The carry chain of the group is duplicated: one chain of carry cells
// assumes a carry of 0 into the group, the other a carry of 1. Both ripple
// while the real carry is still being worked out in the lower groups. When
// the real carry cin arrives it only selects, per bit, which precomputed
// carry feeds the sum EXOR, and which chain's carry out leaves the group, so
// the carry crosses the group in one mux delay instead of W cell delays.
// Only the carry chain is duplicated; the LFU, sum and zero-detect cells are
// single. Both chains use carry polarity groups of POL_GROUP bits like
// alu_ripple. The zero-detect chain ripples through the group.
// Ports cin/cout are active high. Purely combinational.
module alu_select_group #(
  parameter int W         = 8,
  parameter int POL_GROUP = 8
) (
  input  logic [W-1:0] m,         // operand M
  input  logic [W-1:0] s,         // operand S
  input  logic [3:0]   lfu,       // LFU truth table
  input  logic         cry_kill,  // carry kill
  input  logic         cin,       // real carry into the group, active high
  input  logic         zi,        // zero chain in
  output logic [W-1:0] sum,       // result bits
  output logic         cout,      // selected carry out, active high
  output logic         zo         // zero chain out
);
  function automatic bit low_pol(int i);
    return ((i / POL_GROUP) % 2) == 0;
  endfunction

  logic [W-1:0] p;
  logic [W-1:0] cy_in  [2];   // carry into bit i of chain k, bit i's polarity
  logic [W-1:0] cy_out [2];
  logic [W-1:0] c_hi   [2];   // carry into bit i of chain k, active high
  logic [1:0]   co_hi;        // carry out of chain k, active high
  logic [W-1:0] c_sel;        // carry into bit i after selection
  logic [W:0]   z;

  assign z[0] = zi;
  assign zo   = z[W];

  for (genvar i = 0; i < W; i++) begin : g_bit
    alu_lfu u_lfu (.m(m[i]), .s(s[i]), .lfu(lfu), .p(p[i]));

    for (genvar k = 0; k < 2; k++) begin : g_chain
      if (i == 0) begin : g_first
        // chain k assumes a carry of k into the group
        assign cy_in[k][i] = low_pol(0) ? ~1'(k) : 1'(k);
      end else if (low_pol(i) != low_pol(i - 1)) begin : g_inv
        assign cy_in[k][i] = ~cy_out[k][i-1];
      end else begin : g_pass
        assign cy_in[k][i] = cy_out[k][i-1];
      end
      assign c_hi[k][i] = low_pol(i) ? ~cy_in[k][i] : cy_in[k][i];

      alu_carry_cell #(.CARRY_ACTIVE_LOW(low_pol(i))) u_carry (
        .m(m[i]), .s(s[i]), .p(p[i]), .cry_kill(cry_kill),
        .cry_in(cy_in[k][i]), .cry_out(cy_out[k][i])
      );
    end

    assign c_sel[i] = cin ? c_hi[1][i] : c_hi[0][i];

    alu_sum_xor   u_sum  (.p(p[i]), .c(c_sel[i]), .sum(sum[i]));
    alu_zero_cell u_zero (.sum(sum[i]), .zi(z[i]), .zo(z[i+1]));
  end

  for (genvar k = 0; k < 2; k++) begin : g_co
    assign co_hi[k] = low_pol(W - 1) ? ~cy_out[k][W-1] : cy_out[k][W-1];
  end

  assign cout = cin ? co_hi[1] : co_hi[0];
endmodule
