// shared_ppg: partial product generator shared by the moduli 2^n-1, 2^n and 2^n+1.
//
// Produces the same n+3 rows as the modulo 2^n+1 generator so that one carry-save tree
// serves all moduli; only the wrapped bits (weights >= 2^n) and the three extra rows
// depend on sel:
//   MOD_2N_P1: wrapped bit ~(x_(k-j+n) y_j); rows s.!q, a_n b_n and 2s as in
//              ppg_mod2np1 (operands 0..2^n).
//   MOD_2N_M1: wrapped bit x_(k-j+n) y_j, since 2^(n+m) = 2^m modulo 2^n - 1;
//              extra rows zero (operands 0..2^n-1, bit n ignored).
//   MOD_2N   : wrapped bits and extra rows zero, the product bits of weight >= 2^n being
//              dropped (bit n ignored).
// The source states only that the 2^n+1 generator is extended with the 2^n-1 partial
// products; the gating shown here (and the 2^n case) is this design's reading of that.
//
// Interface: sel, x, y (N+1 bits) -> pp[N+2:0] (N bits each). Combinational. N >= 2.
module shared_ppg
  import rns_pkg::*;
#(
  parameter int N = 16
) (
  input  modsel_t               sel,
  input  logic [N:0]            x,
  input  logic [N:0]            y,
  output logic [N+2:0][N-1:0]   pp
);
  logic fermat, mersenne, s;

  assign fermat   = (sel == MOD_2N_P1);
  assign mersenne = (sel == MOD_2N_M1);
  assign s        = fermat & (x[N] ^ y[N]);

  always_comb begin
    pp = '0;
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < N; k++) begin
        if (k >= j) pp[j][k] = x[k-j] & y[j];
        else        pp[j][k] = (fermat   & ~(x[k-j+N] & y[j]))
                             | (mersenne &  (x[k-j+N] & y[j]));
      end
    end
    pp[N]      = {N{s}} & ~(x[N-1:0] | y[N-1:0]);
    pp[N+1][0] = fermat & x[N] & y[N];
    pp[N+2][1] = s;
  end
endmodule
