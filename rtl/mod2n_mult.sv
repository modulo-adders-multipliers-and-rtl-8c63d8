// mod2n_mult: modulo 2^n multiplier, |X Y| mod 2^n, the low half of a binary product.
//
// The partial products x_i y_j with i + j < n form n rows (row PP_j is the multiplicand
// shifted left by j, gated by y_j, truncated to n bits); a Wallace tree of carry-save
// cells that drop the carry leaving bit n-1 reduces them to two words; an ordinary
// n-bit prefix adder (carry input 0, carry out ignored) adds those.
//
// Follows the document: a binary multiplier with all bits of weight 2^n and above
// discarded, Wallace tree and Sklansky adder as in its evaluation. This design's
// choices: n-bit truncated cells throughout the tree and the grouping of operands.
//
// Interface: x, y (N bits) -> z (N bits). Combinational. The final adder needs no
// group propagate signals and no carry out, which lint reports as unused.
module mod2n_mult
  import rns_pkg::*;
#(
  parameter int           N    = 16,
  parameter prefix_tree_t TREE = SKLANSKY
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] z
);
  logic [N-1:0][N-1:0] pp;
  logic [N-1:0]        ts, tc, p, g, gp, gg;

  // truncated partial products
  always_comb begin
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < N; k++) begin
        pp[j][k] = (k >= j) ? (x[(k - j + N) % N] & y[j]) : 1'b0;
      end
    end
  end

  mod2n_moma #(.N(N), .K(N)) u_moma (.ops(pp), .s(ts), .c(tc));

  // final n-bit adder, carry out discarded
  pg_unit #(.N(N)) u_pg (.x(ts), .y(tc), .p(p), .g(g));

  prefix_tree #(.N(N), .TREE(TREE)) u_tree (.p(p), .g(g), .pg_p(gp), .pg_g(gg));

  if (N > 1) begin : g_sum
    assign z = p ^ {gg[N-2:0], 1'b0};
  end else begin : g_sum1
    assign z = p;
  end
endmodule
