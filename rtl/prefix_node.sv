// prefix_node: the carry-prefix operator (the black dot of a prefix tree).
//
// Combines the group (P,G) pair of a more significant span (p_hi, g_hi) with the pair of
// the adjacent less significant span (p_lo, g_lo):
//   (p_hi, g_hi) o (p_lo, g_lo) = (p_hi & p_lo, g_hi | (p_hi & g_lo)).
// One AND-OR for the generate and one AND for the propagate, as in the usual prefix
// adder literature. Purely combinational.
module prefix_node (
  input  logic p_hi,
  input  logic g_hi,
  input  logic p_lo,
  input  logic g_lo,
  output logic p_out,
  output logic g_out
);
  assign g_out = g_hi | (p_hi & g_lo);
  assign p_out = p_hi & p_lo;
endmodule
