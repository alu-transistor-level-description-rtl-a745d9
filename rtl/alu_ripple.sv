// Ripple-carry row of ALU bit cells.
//
// WIDTH copies of alu_bit_cell share the LFU truth table and CRY_KILL and
// chain their carry and zero-detect lines from bit 0 upward. For a long
// row the carry is rebuffered: the cells come in groups of POL_GROUP bits
// whose carry polarity alternates (even groups active low like the original
// cell, odd groups active high), so the buffer between two groups is a
// single inverter. The group size of 8 is this design's choice.
// The row's own cin/cout are active high; inverters at the ends convert.
// zi is normally tied high; zo is then the zero flag of the row.
// Purely combinational: the carry ripples through all WIDTH bits in the
// worst case.
module alu_ripple #(
  parameter int WIDTH     = 64,
  parameter int POL_GROUP = 8
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
  // Carry polarity of bit i: active low in even groups.
  function automatic bit low_pol(int i);
    return ((i / POL_GROUP) % 2) == 0;
  endfunction

  logic [WIDTH-1:0] cy_in;   // carry into bit i, in bit i's polarity
  logic [WIDTH-1:0] cy_out;  // carry out of bit i, in bit i's polarity
  logic [WIDTH:0]   z;       // zero chain

  assign z[0] = zi;
  assign zo   = z[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    if (i == 0) begin : g_first
      assign cy_in[i] = low_pol(0) ? ~cin : cin;
    end else if (low_pol(i) != low_pol(i - 1)) begin : g_inv
      // group boundary: one inverter between cells of opposite polarity
      assign cy_in[i] = ~cy_out[i-1];
    end else begin : g_pass
      assign cy_in[i] = cy_out[i-1];
    end

    alu_bit_cell #(.CARRY_ACTIVE_LOW(low_pol(i))) u_cell (
      .m(m[i]), .s(s[i]), .lfu(lfu), .cry_kill(cry_kill),
      .cry_in(cy_in[i]), .cry_out(cy_out[i]),
      .zi(z[i]), .zo(z[i+1]), .sum(sum[i])
    );
  end

  assign cout = low_pol(WIDTH - 1) ? ~cy_out[WIDTH-1] : cy_out[WIDTH-1];
endmodule
