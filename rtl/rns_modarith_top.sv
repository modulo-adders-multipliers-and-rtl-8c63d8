// rns_modarith_top: the arithmetic units of this design side by side.
//
//   * sm_*: the shared-moduli multiplier; sm_sel picks 2^n-1, 2^n or 2^n+1 per operation.
//   * fm_*: the single-modulus modulo 2^n+1 multiplier (normal representation).
//   * em_*: the single-modulus modulo 2^n-1 multiplier.
//   * bm_*: the single-modulus modulo 2^n multiplier (low half of a binary product).
//   * sa_*: the shared-moduli two-operand adder in its carry look-ahead form; sa_sel
//     picks the modulus (|x+y| for 2^n-1 and 2^n, the diminished-one sum |x+y+1| for
//     2^n+1). The prefix form of the same adder is the final adder inside sm_*.
// The units share nothing and have separate ports; placing them together is this
// design's choice, the units themselves follow the multiplier and adder structures of
// the underlying design. All are combinational: a result is valid one propagation delay
// after the operands, with no clock or reset (the units are pure logic between input
// and output pins).
module rns_modarith_top
  import rns_pkg::*;
#(
  parameter int           N    = 16,
  parameter prefix_tree_t TREE = SKLANSKY
) (
  input  modsel_t    sm_sel,
  input  logic [N:0] sm_a,
  input  logic [N:0] sm_b,
  output logic [N:0] sm_z,
  input  logic [N:0] fm_x,
  input  logic [N:0] fm_y,
  output logic [N:0] fm_z,
  input  modsel_t      sa_sel,
  input  logic [N-1:0] sa_x,
  input  logic [N-1:0] sa_y,
  output logic [N:0]   sa_z,
  input  logic [N-1:0] em_x,
  input  logic [N-1:0] em_y,
  output logic [N-1:0] em_z,
  input  logic [N-1:0] bm_x,
  input  logic [N-1:0] bm_y,
  output logic [N-1:0] bm_z
);
  shared_mod_mult #(.N(N), .TREE(TREE)) u_shared (
    .sel(sm_sel), .a(sm_a), .b(sm_b), .z(sm_z)
  );

  mod2np1_mult #(.N(N), .TREE(TREE)) u_fermat (
    .x(fm_x), .y(fm_y), .z(fm_z)
  );

  shared_mod_adder_cla #(.N(N)) u_adder (
    .sel(sa_sel), .x(sa_x), .y(sa_y), .z(sa_z)
  );

  mod2nm1_mult #(.N(N), .TREE(TREE)) u_mersenne (
    .x(em_x), .y(em_y), .z(em_z)
  );

  mod2n_mult #(.N(N), .TREE(TREE)) u_binary (
    .x(bm_x), .y(bm_y), .z(bm_z)
  );
endmodule
