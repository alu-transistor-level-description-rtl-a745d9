// Condition-code register: Z (zero), C (carry) and S (sign).
//
// Z and S load together when upd_zs is high, C loads when upd_c is high,
// at the rising clock edge; otherwise the flags hold. The flags feed the
// conditional branches and the carry in of ADDC and SBC. Reset is
// asynchronous and active low and clears all three flags (this design's
// choice). The greater-than and externally defined conditions that a
// processor adds are not part of this register.
module alu_flags
  import alu_pkg::*;
(
  input  logic   clk,     // clock
  input  logic   rst_n,   // asynchronous reset, active low
  input  logic   upd_zs,  // load Z and S
  input  logic   upd_c,   // load C
  input  logic   z_in,    // zero
  input  logic   c_in,    // carry
  input  logic   s_in,    // sign
  output flags_t flags    // registered {Z,C,S}
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags <= '0;
    end else begin
      if (upd_zs) begin
        flags.z <= z_in;
        flags.s <= s_in;
      end
      if (upd_c) flags.c <= c_in;
    end
  end
endmodule
