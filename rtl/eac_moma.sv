// eac_moma: Multi-operand modulo 2^n-1 adder (MOMA), a Wallace tree of carry-save cells
// with end-around carry.
//
// Reduces K n-bit operands to a sum word s and a carry word c with
// sum(ops) = s + c (mod 2^n - 1), using csa_eac cells. All operands and intermediate
// words stay n bits wide, because the carry leaving the top bit is re-entered at bit 0.
//
// Wallace reduction: at every level each full group of three operands goes through one
// cell and becomes two, and the one or two operands left over pass to the next level
// unchanged. The levels are generated from the operand counts that the package function
// wallace_count gives for each level; LEVELS is the number of levels (6 for K = 16).
//
// Follows the document: a Wallace tree of CSA cells with end-around carry, every word
// n bits wide. This design's choice: which operands are grouped into which cell.
//
// Interface: ops (K words of N bits) -> s, c (N bits). Combinational.
module eac_moma
  import rns_pkg::*;
#(
  parameter int N = 16,
  parameter int K = 16
) (
  input  logic [K-1:0][N-1:0] ops,
  output logic [N-1:0]        s,
  output logic [N-1:0]        c
);
  localparam int LEVELS = wallace_levels(K);

  // lv[l] holds the operands entering level l (the first wallace_count(K, l) entries);
  // entries above that count are tied to zero.
  logic [K-1:0][N-1:0] lv [LEVELS+1];

  assign lv[0] = ops;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int KL = wallace_count(K, l);  // operands entering this level
    localparam int G  = KL / 3;               // cells at this level
    localparam int R  = KL % 3;               // operands passed on unchanged
    localparam int K2 = 2 * G + R;            // operands leaving this level

    for (genvar gi = 0; gi < G; gi++) begin : g_cell
      csa_eac #(.N(N)) u_cell (
        .a(lv[l][3*gi]), .b(lv[l][3*gi+1]), .d(lv[l][3*gi+2]),
        .s(lv[l+1][2*gi]), .cc(lv[l+1][2*gi+1])
      );
    end
    for (genvar r = 0; r < R; r++) begin : g_pass
      assign lv[l+1][2*G+r] = lv[l][3*G+r];
    end
    for (genvar u = K2; u < K; u++) begin : g_unused
      assign lv[l+1][u] = '0;
    end
  end

  if (K == 1) begin : g_one
    assign s = ops[0];
    assign c = '0;
  end else begin : g_out
    assign s = lv[LEVELS][0];
    assign c = lv[LEVELS][1];
  end
endmodule
