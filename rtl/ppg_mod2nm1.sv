// ppg_mod2nm1: partial product generator of the modulo 2^n-1 multiplier.
//
// Each partial product x_i y_j of weight 2^(i+j) with i + j >= n is moved to weight
// 2^(i+j-n), since 2^n = 1 modulo 2^n - 1. Row PP_j, the partial products of the
// multiplier bit y_j, is then the multiplicand rotated left by j places and gated by
// y_j: bit k of PP_j is x_((k-j) mod n) y_j. All n rows are n bits wide and no constant
// arises.
//
// Follows the document: the split of the partial products into those below and those
// at or above weight 2^n and the reduction of the latter by the periodicity of powers
// of two. Rows indexed by the multiplier bit is this design's choice.
//
// Interface: x, y (N bits) -> pp[N-1:0] (N bits each). Combinational.
module ppg_mod2nm1 #(
  parameter int N = 16
) (
  input  logic [N-1:0]           x,
  input  logic [N-1:0]           y,
  output logic [N-1:0][N-1:0]    pp
);
  always_comb begin
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < N; k++) begin
        pp[j][k] = x[(k - j + N) % N] & y[j];
      end
    end
  end
endmodule
