// shared_mod_adder: two-operand adder shared by the moduli 2^n-1, 2^n and 2^n+1.
//
// A prefix adder with a directly implemented end-around carry: the PG unit and the
// prefix tree are those of an ordinary n-bit adder, and the only modulus-dependent part
// is one multiplexer that chooses the bit re-entered through the final row of reduced
// prefix nodes:
//   MOD_2N_M1: cout   (end-around carry)                -> |X + Y| mod 2^n - 1
//   MOD_2N   : 0      (carry out discarded)              -> |X + Y| mod 2^n
//   MOD_2N_P1: ~cout  (complemented end-around carry)    -> |X + Y + 1| mod 2^n + 1
// The +1 of the last mode is the diminished-one addition; in the multipliers it absorbs
// the constant correction of the carry-save tree.
//
// The special values are handled from the bit-level signals, in parallel with the carry
// network; this is this design's addition to the multiplexer scheme:
//   * modulo 2^n-1 an all-ones sum (the second representation of zero) is replaced by
//     zero. It arises when X + Y = 2^n - 1 (all propagate bits set, the usual detector)
//     and also when both operands are all ones (all generate bits set; all-ones is
//     itself a form of zero, so such operands are legal);
//   * modulo 2^n+1 the value 2^n (X + Y = 2^n - 1) is returned as z[n] = 1 with zero
//     low bits.
// z[n] is 0 in the other two modes.
//
// Interface: sel, x, y (N bits) -> z (N+1 bits). Combinational.
module shared_mod_adder
  import rns_pkg::*;
#(
  parameter int           N    = 16,
  parameter prefix_tree_t TREE = SKLANSKY
) (
  input  modsel_t      sel,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N:0]   z
);
  logic [N-1:0] p, g, gp, gg, s;
  logic [N-1:0] c;
  logic         cout, cin, all_p, all_g;

  pg_unit #(.N(N)) u_pg (.x(x), .y(y), .p(p), .g(g));

  prefix_tree #(.N(N), .TREE(TREE)) u_tree (.p(p), .g(g), .pg_p(gp), .pg_g(gg));

  assign cout = gg[N-1];

  // end-around carry multiplexer (SelectModulus)
  always_comb begin
    unique case (sel)
      MOD_2N_M1: cin = cout;
      MOD_2N_P1: cin = ~cout;
      default:   cin = 1'b0;
    endcase
  end

  assign c[0] = cin;
  for (genvar i = 0; i < N - 1; i++) begin : g_inc
    assign c[i+1] = gg[i] | (gp[i] & cin);
  end

  assign s     = p ^ c;
  assign all_p = &p;
  assign all_g = &g;

  always_comb begin
    z = {1'b0, s};
    if ((all_p || all_g) && sel == MOD_2N_M1) z = '0;  // all ones -> zero
    if (all_p && sel == MOD_2N_P1) z = {1'b1, {N{1'b0}}}; // the value 2^n
  end
endmodule
