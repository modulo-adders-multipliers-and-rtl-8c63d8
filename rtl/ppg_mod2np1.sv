// ppg_mod2np1: partial product generator of the modulo 2^n+1 multiplier.
//
// Operands are (n+1)-bit normal-representation residues 0..2^n, so x[n] = 1 only for
// X = 2^n (all other bits then 0). The product is split into
//   * n rows PP_j, one per bit y_j: bit k of PP_j is x_(k-j) y_j for k >= j, and for
//     k < j the wrapped bit ~(x_(k-j+n) y_j), because x y 2^(n+m) = ~(x y) 2^m + 2^(n+m)
//     modulo 2^n + 1;
//   * the row s & ~q_k, with s = x_n ^ y_n and q_k = x_k | y_k, which holds the
//     cross terms x_n Y + y_n X (valid because x_n = 1 forces the low bits of X to 0);
//   * a_n b_n = x_n & y_n at weight 2^0 (x_n y_n 2^2n = x_n y_n);
//   * 2s, the bit s at weight 2^1.
// The constants dropped by the complemented bits, 2^n (2^n - 1 - n), and the 2^n that
// each of the n+1 carry-save cells reducing these n+3 rows leaves behind add up to
// 2^2n = 1 (mod 2^n + 1), which the final CEAC adder supplies. So no correction unit is
// needed. This is the partial product scheme of the source (its equations for n = 4).
//
// Interface: x, y (N+1 bits) -> pp[N+2:0] (N bits each): pp[0..N-1] = PP_0..PP_(n-1),
// pp[N] = s.!q, pp[N+1] = a_n b_n, pp[N+2] = 2s. Combinational. Needs N >= 2.
module ppg_mod2np1 #(
  parameter int N = 16
) (
  input  logic [N:0]            x,
  input  logic [N:0]            y,
  output logic [N+2:0][N-1:0]   pp
);
  logic s;
  assign s = x[N] ^ y[N];

  always_comb begin
    pp = '0;
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < N; k++) begin
        if (k >= j) pp[j][k] = x[k-j] & y[j];
        else        pp[j][k] = ~(x[k-j+N] & y[j]);
      end
    end
    pp[N]      = {N{s}} & ~(x[N-1:0] | y[N-1:0]);
    pp[N+1][0] = x[N] & y[N];
    pp[N+2][1] = s;
  end
endmodule
