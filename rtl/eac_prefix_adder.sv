// eac_prefix_adder: modulo 2^n-1 adder, a prefix adder with a directly implemented
// end-around carry, and the final adder of the modulo 2^n-1 multiplier.
//
// The PG unit and the prefix tree are those of an ordinary n-bit adder. The carry out
// of the tree (weight 2^n = 1 modulo 2^n-1) is fed back as carry input through one
// extra row of reduced prefix nodes that form only the generate part,
// c_(i+1) = G_[i:0] | P_[i:0] c_out, and the summation unit forms s_i = p_i ^ c_i.
// Zero is returned as all zeros only: the sums that would come out as all ones
// (X + Y = 2^n - 1, detected by the AND of the propagate signals, or both operands all
// ones, detected by the AND of the generate signals) are replaced by zero.
//
// Follows the document: direct EAC on a prefix adder with the carry out re-entered
// through a row of generate-only prefix nodes, Sklansky tree by default, and the
// propagate AND that detects the all-ones result. This design's choice: the second
// detector (all generate bits) for two all-ones operands.
//
// Interface: x, y (N bits) -> z (N bits), |x + y| mod (2^n - 1). Combinational.
// The group propagate of the whole word is not needed by the carry row, which lint
// reports as an unused bit.
module eac_prefix_adder
  import rns_pkg::*;
#(
  parameter int           N    = 16,
  parameter prefix_tree_t TREE = SKLANSKY
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] z
);
  logic [N-1:0] p, g, gp, gg, c;
  logic         cin, all_p, all_g;

  pg_unit #(.N(N)) u_pg (.x(x), .y(y), .p(p), .g(g));

  prefix_tree #(.N(N), .TREE(TREE)) u_tree (.p(p), .g(g), .pg_p(gp), .pg_g(gg));

  // end-around carry
  assign cin  = gg[N-1];
  assign c[0] = cin;
  for (genvar i = 0; i < N - 1; i++) begin : g_inc
    assign c[i+1] = gg[i] | (gp[i] & cin);
  end

  assign all_p = &p;
  assign all_g = &g;
  assign z     = (all_p || all_g) ? '0 : (p ^ c);
endmodule
