// ccsa_moma: Shared-moduli multi-operand modulo adder (MOMA), a Wallace tree of carry-save cells.
//
// Reduces K n-bit operands to a sum word s and a carry word c using
// ccsa cells whose end-around bit follows sel, so the same tree adds modulo
// 2^n-1 (sum(ops) = s + c), modulo 2^n (same, mod 2^n) or modulo 2^n+1
// (sum(ops) = s + c + (K-2)*2^n, as for the single-modulus tree).
//
// Wallace reduction: at every level each full group of three operands goes through one
// cell and becomes two, and the one or two operands left over pass to the next level
// unchanged, so operands are reduced at the earliest opportunity. The levels are
// generated from the operand counts that the package function wallace_count gives for
// each level. LEVELS is the number of carry-save levels (for K = 7, 11, 19: 4, 5, 6).
// All operands and intermediate words stay n bits wide. Combinational.
//
// Follows the document: a common tree of composite CSA cells, one select for all of
// them. This design's choices: the Wallace grouping (as in ceac_moma) and the zero
// input of each cell's multiplexer for modulo 2^n.
module ccsa_moma
  import rns_pkg::*;
#(
  parameter int N = 16,
  parameter int K = 19
) (
  input  modsel_t             sel,
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
      ccsa #(.N(N)) u_cell (
        .sel(sel), .a(lv[l][3*gi]), .b(lv[l][3*gi+1]), .d(lv[l][3*gi+2]),
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
