// ceac_prefix_adder: two-operand modulo 2^n+1 adder with a directly implemented
// complemented end-around carry (CEAC).
//
// Computes |X + Y + 1| mod (2^n + 1) for n-bit X and Y. Since X+Y+1-(2^n+1) = |X+Y|_2^n,
// the result is |X + Y + ~cout|_2^n, where cout is the carry out of X+Y. The structure
// follows the usual prefix CEAC adder: a PG unit, a prefix tree (Sklansky by default)
// whose top output G[n-1:0] is cout, one extra row of reduced prefix nodes that re-enter
// the inverted carry (c_{i+1} = G[i:0] | P[i:0] & ~cout, generate part only), and the
// summation s_i = p_i ^ c_i with c_0 = ~cout.
//
// The value 2^n of the result (X + Y = 2^n - 1, all propagate bits set) cannot be held
// in n bits; the sum bits are then all zero and z[n] is taken from the AND of the
// propagate signals. Taking that MSB from the propagate signals is this design's choice
// for returning the normal (n+1)-bit representation. Inside the multipliers the "+1"
// of this adder absorbs the constant left over by the CEAC carry-save tree.
//
// Interface: x, y (N bits) -> z (N+1 bits, 0..2^n). Combinational.
module ceac_prefix_adder
  import rns_pkg::*;
#(
  parameter int           N    = 16,
  parameter prefix_tree_t TREE = SKLANSKY
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N:0]   z
);
  logic [N-1:0] p, g, gp, gg;
  logic [N-1:0] c;
  logic         cin, all_p;  // all_p: X + Y = 2^n - 1

  pg_unit #(.N(N)) u_pg (.x(x), .y(y), .p(p), .g(g));

  prefix_tree #(.N(N), .TREE(TREE)) u_tree (.p(p), .g(g), .pg_p(gp), .pg_g(gg));

  // complemented end-around carry
  assign cin  = ~gg[N-1];
  assign c[0] = cin;
  for (genvar i = 0; i < N - 1; i++) begin : g_inc
    assign c[i+1] = gg[i] | (gp[i] & cin);
  end

  assign all_p = &p;
  assign z     = {all_p, p ^ c};
endmodule
