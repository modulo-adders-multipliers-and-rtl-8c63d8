// shared_mod_adder_cla: two-operand adder shared by the moduli 2^n-1, 2^n and 2^n+1,
// built as a two-level carry look-ahead adder instead of a prefix adder.
//
// How it works: a PG unit forms the bit propagate/generate signals; a group unit
// combines them into group signals P*, G* for groups of W bits (sum-of-products form,
// W = 4 by default); a look-ahead unit over the group signals produces the carry out of
// the whole word (the carry that is wrapped around). That carry passes through the
// modulus multiplexer, exactly as in the prefix version:
//   MOD_2N_M1: cout   (end-around carry)              -> |X + Y| mod 2^n - 1
//   MOD_2N   : 0                                      -> |X + Y| mod 2^n
//   MOD_2N_P1: ~cout  (complemented end-around carry)  -> |X + Y + 1| mod 2^n + 1
// and is used as the carry input of a second look-ahead pass: group carries from the
// group signals, then bit carries inside each group, then the sums. Because the
// re-entered carry is computed first and then fed in (no carry unwrapping), the
// look-ahead units are those of an ordinary binary adder plus the one multiplexer.
// The special values are handled as in shared_mod_adder: an all-ones sum modulo
// 2^n-1 becomes zero (all propagate or all generate bits set), and modulo 2^n+1 the
// value 2^n (all propagate bits set) is returned as z[n] = 1 with zero low bits.
//
// Follows the document: the shared CLA adder with a direct end-around carry and a
// carry multiplexer, the carry out computed by a separate look-ahead over the group
// signals before the carries of the other bits, 4-bit groups. This design's choices:
// one look-ahead level over all groups (N/W groups in sum-of-products form; for large
// N a third level would lower the fan-in), the zero input of the multiplexer, the
// special-value handling and the z[n] output bit.
//
// Interface: sel, x, y (N bits) -> z (N+1 bits). Combinational, no clock.
module shared_mod_adder_cla
  import rns_pkg::*;
#(
  parameter int N = 16,
  parameter int W = 4
) (
  input  modsel_t      sel,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N:0]   z
);
  localparam int NG = (N + W - 1) / W;

  logic [N-1:0]  p, g, c, s;
  logic [NG-1:0] gp, gg;   // group propagate / generate
  logic [NG:0]   gc;       // group carries (second pass)
  logic          cout, cin, all_p, all_g;

  pg_unit #(.N(N)) u_pg (.x(x), .y(y), .p(p), .g(g));

  // group P/G in sum-of-products form:
  //   G* = g_k+W-1 | p_k+W-1 g_k+W-2 | ... | p_k+W-1..p_k+1 g_k,   P* = p_k+W-1..p_k
  always_comb begin
    for (int j = 0; j < NG; j++) begin
      gg[j] = 1'b0;
      gp[j] = 1'b1;
      for (int k = j * W; k < (j + 1) * W && k < N; k++) begin
        logic term;
        term = g[k];
        for (int m = k + 1; m < (j + 1) * W && m < N; m++) term = term & p[m];
        gg[j] = gg[j] | term;
        gp[j] = gp[j] & p[k];
      end
    end
  end

  // look-ahead over the group signals: carry into group j from the groups below it
  // and a carry input ci, as a sum of products
  function automatic logic [NG:0] group_carries(logic [NG-1:0] pp, logic [NG-1:0] ggen,
                                                logic ci);
    logic [NG:0] r;
    for (int j = 0; j <= NG; j++) begin
      logic term;
      r[j] = 1'b0;
      for (int k = 0; k < j; k++) begin
        term = ggen[k];
        for (int m = k + 1; m < j; m++) term = term & pp[m];
        r[j] = r[j] | term;
      end
      term = ci;
      for (int m = 0; m < j; m++) term = term & pp[m];
      r[j] = r[j] | term;
    end
    return r;
  endfunction

  // first pass: the carry out of the word, carry input 0
  logic [NG:0] gc0;
  always_comb gc0 = group_carries(gp, gg, 1'b0);
  assign cout = gc0[NG];

  // end-around carry multiplexer
  always_comb begin
    unique case (sel)
      MOD_2N_M1: cin = cout;
      MOD_2N_P1: cin = ~cout;
      default:   cin = 1'b0;
    endcase
  end

  // second pass: group carries with the re-entered carry
  always_comb gc = group_carries(gp, gg, cin);

  // bit carries inside each group, from the group carry and the bit P/G signals
  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic term;
      int   b;
      b    = (i / W) * W;
      term = gc[i / W];
      for (int m = b; m < i; m++) term = term & p[m];
      c[i] = term;
      for (int k = b; k < i; k++) begin
        term = g[k];
        for (int m = k + 1; m < i; m++) term = term & p[m];
        c[i] = c[i] | term;
      end
    end
  end

  assign s     = p ^ c;
  assign all_p = &p;
  assign all_g = &g;

  always_comb begin
    z = {1'b0, s};
    if ((all_p || all_g) && sel == MOD_2N_M1) z = '0;  // all ones -> zero
    if (all_p && sel == MOD_2N_P1) z = {1'b1, {N{1'b0}}}; // the value 2^n
  end
endmodule
