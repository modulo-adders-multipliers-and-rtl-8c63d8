// mod2nm1_mult: modulo 2^n-1 multiplier, |X Y| mod (2^n - 1).
//
// Three stages: the partial product generator rotates the multiplicand once per
// multiplier bit (n rows of n bits, no constants); a Wallace tree of carry-save cells
// with end-around carry reduces them to two words; a prefix adder with end-around carry
// adds those, returning zero as all zeros.
//
// Follows the document: the structure of the modulo 2^n-1 multiplier (partial product
// generation by periodicity, MOMA of CSA cells with EAC, modulo 2^n-1 final adder),
// Wallace tree and Sklansky adder as in its evaluation. This design's choice: zero is
// returned in the single all-zeros form.
//
// Interface: x, y (N bits, 0..2^n-2; all ones is accepted as the second form of zero)
// -> z (N bits). Combinational.
module mod2nm1_mult
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
  logic [N-1:0]        ts, tc;

  ppg_mod2nm1 #(.N(N)) u_ppg (.x(x), .y(y), .pp(pp));

  eac_moma #(.N(N), .K(N)) u_moma (.ops(pp), .s(ts), .c(tc));

  eac_prefix_adder #(.N(N), .TREE(TREE)) u_add (.x(ts), .y(tc), .z(z));
endmodule
