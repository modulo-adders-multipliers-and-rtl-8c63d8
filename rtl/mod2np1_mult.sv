// mod2np1_mult: modulo 2^n+1 multiplier for the normal (n+1-bit) representation.
//
// Three stages, all combinational:
//   1. ppg_mod2np1 forms n+3 n-bit rows (n rotated partial products with complemented
//      wrapped bits, s.!q_k, a_n b_n and 2s);
//   2. ceac_moma, a Wallace tree of n+1 carry-save cells with complemented end-around
//      carry, reduces them to two words;
//   3. ceac_prefix_adder adds the two words and 1 modulo 2^n+1.
// The constants of the complemented bits and of the carry-save cells sum to exactly the
// +1 of the final adder, so the product needs no correction unit and no input
// decrementer. This is the multiplier the source proposes; the prefix network of the
// final adder defaults to Sklansky, as in its evaluation.
//
// Interface: x, y in 0..2^n (N+1 bits) -> z = |x*y| mod 2^n+1 (N+1 bits).
// Depth: wallace_levels(N+3) carry-save levels (4, 5, 6 for n = 4, 8, 16) plus one
// prefix adder.
module mod2np1_mult
  import rns_pkg::*;
#(
  parameter int           N    = 16,
  parameter prefix_tree_t TREE = SKLANSKY
) (
  input  logic [N:0] x,
  input  logic [N:0] y,
  output logic [N:0] z
);
  localparam int K = N + 3;

  logic [K-1:0][N-1:0] pp;
  logic [N-1:0]        ts, tc;

  ppg_mod2np1 #(.N(N)) u_ppg (.x(x), .y(y), .pp(pp));

  ceac_moma #(.N(N), .K(K)) u_moma (.ops(pp), .s(ts), .c(tc));

  ceac_prefix_adder #(.N(N), .TREE(TREE)) u_add (.x(ts), .y(tc), .z(z));
endmodule
