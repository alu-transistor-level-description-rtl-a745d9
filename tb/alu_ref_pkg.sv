// Reference model shared by the ALU testbenches.
//
// ref_row() works out a row of ALU cells bit by bit from the cell
// equations (P = LFU[{M,S}], G = M & S & !kill, carry = P & carry | G,
// sum = P xor carry), for up to 64 bits; bits at and above w are ignored.
// The testbenches check arithmetic codes against the '+' operator as well.
package alu_ref_pkg;

  typedef struct {
    logic [63:0] sum;
    logic        cout;
    logic        zero;
  } row_t;

  function automatic row_t ref_row(input int w, input logic [63:0] m, input logic [63:0] s,
                                   input logic [3:0] lfu, input logic kill, input logic cin);
    row_t r;
    logic c, p, g;
    c = cin;
    r.sum = '0;
    for (int i = 0; i < w; i++) begin
      p = lfu[{m[i], s[i]}];
      g = m[i] & s[i] & ~kill;
      r.sum[i] = p ^ c;
      c = (p & c) | g;
    end
    r.cout = c;
    r.zero = (r.sum == 0);
    return r;
  endfunction

  function automatic logic [63:0] mask(input int w);
    return (w >= 64) ? '1 : ((64'd1 << w) - 64'd1);
  endfunction

  // 64 random bits, with a bias towards long carry-propagate runs.
  function automatic logic [63:0] rnd64();
    logic [63:0] v;
    int sel;
    v = {$urandom, $urandom};
    sel = $urandom_range(0, 5);
    case (sel)
      0: v = '1;
      1: v = '0;
      2: v = 64'd1 << $urandom_range(0, 63);
      default: ;
    endcase
    return v;
  endfunction

endpackage
