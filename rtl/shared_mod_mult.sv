// shared_mod_mult: one multiplier for the moduli 2^n-1, 2^n and 2^n+1.
//
// The modulo 2^n+1 multiplier made shareable stage by stage, all stages driven by the
// same select (pSelectModuli):
//   1. shared_ppg: the n+3 rows of the 2^n+1 scheme, with the wrapped bits and the
//      extra rows switched by modulus;
//   2. ccsa_moma: Wallace tree of composite carry-save cells (end-around carry,
//      complemented end-around carry or none);
//   3. shared_mod_adder: prefix adder whose end-around carry is selected the same way,
//      which also removes the all-ones zero of 2^n-1 and returns 2^n for 2^n+1.
// Modulo 2^n+1 the +1 of the final adder cancels the constants of the tree exactly as in
// mod2np1_mult; modulo 2^n-1 and 2^n no constant arises.
//
// Interface: sel; a, b (N+1 bits; bit N used only modulo 2^n+1, operands below the
// modulus) -> z (N+1 bits; z[N] only for the value 2^n modulo 2^n+1). Combinational.
module shared_mod_mult
  import rns_pkg::*;
#(
  parameter int           N    = 16,
  parameter prefix_tree_t TREE = SKLANSKY
) (
  input  modsel_t    sel,
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] z
);
  localparam int K = N + 3;

  logic [K-1:0][N-1:0] pp;
  logic [N-1:0]        ts, tc;

  shared_ppg #(.N(N)) u_ppg (.sel(sel), .x(a), .y(b), .pp(pp));

  ccsa_moma #(.N(N), .K(K)) u_moma (.sel(sel), .ops(pp), .s(ts), .c(tc));

  shared_mod_adder #(.N(N), .TREE(TREE)) u_add (.sel(sel), .x(ts), .y(tc), .z(z));
endmodule
