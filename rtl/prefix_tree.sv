// prefix_tree: parallel-prefix carry network.
//
// From the bit-level pairs (p_i, g_i) it computes, for every bit i, the group pair
// (P[i:0], G[i:0]) with the prefix operator of prefix_node. G[i:0] is the carry out of
// bit i for a zero carry in; P[i:0] says that a carry into bit 0 would reach bit i+1.
//
// The network is chosen by TREE: Sklansky (default, log2 N levels, fan-out grows at the
// upper levels), Kogge-Stone (log2 N levels, fan-out 2) or Brent-Kung (2 log2 N - 1
// levels, fewest nodes). Each level either merges a bit with a partner bit through a
// prefix node or passes the bit straight down; rns_pkg::prefix_partner() gives the
// partner. Combinational.
module prefix_tree
  import rns_pkg::*;
#(
  parameter int           N    = 16,
  parameter prefix_tree_t TREE = SKLANSKY
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] g,
  output logic [N-1:0] pg_p,   // P[i:0]
  output logic [N-1:0] pg_g    // G[i:0]
);
  localparam int LEV = prefix_levels(TREE, N);

  logic [N-1:0] lp [LEV+1];
  logic [N-1:0] lg [LEV+1];

  assign lp[0] = p;
  assign lg[0] = g;

  for (genvar l = 0; l < LEV; l++) begin : g_lev
    for (genvar i = 0; i < N; i++) begin : g_bit
      localparam int J = prefix_partner(TREE, N, l, i);
      if (J >= 0) begin : g_node
        prefix_node u_node (
          .p_hi (lp[l][i]), .g_hi (lg[l][i]),
          .p_lo (lp[l][J]), .g_lo (lg[l][J]),
          .p_out(lp[l+1][i]), .g_out(lg[l+1][i])
        );
      end else begin : g_pass
        assign lp[l+1][i] = lp[l][i];
        assign lg[l+1][i] = lg[l][i];
      end
    end
  end

  assign pg_p = lp[LEV];
  assign pg_g = lg[LEV];
endmodule
