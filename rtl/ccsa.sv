// ccsa: composite carry-save adder for the moduli 2^n-1, 2^n and 2^n+1.
//
// n full adders reduce three n-bit operands to a sum word and a carry word. The carry of
// the top full adder (weight 2^n) is the only modulus-dependent bit; a multiplexer puts
// at weight 2^0 of the carry word:
//   MOD_2N_M1: c_n        (end-around carry,            a+b+d = s+cc       mod 2^n-1)
//   MOD_2N_P1: ~c_n       (complemented end-around carry, a+b+d = s+cc+2^n mod 2^n+1)
//   MOD_2N   : 0          (carry dropped,                 a+b+d = s+cc       mod 2^n)
// The source describes a two-input EAC/CEAC multiplexer; the zero input for modulus 2^n
// is this design's addition so that one tree serves all three moduli. Combinational.
module ccsa
  import rns_pkg::*;
#(
  parameter int N = 16
) (
  input  modsel_t      sel,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] d,
  output logic [N-1:0] s,
  output logic [N-1:0] cc
);
  logic [N-1:0] cf;
  logic         eac;

  assign s  = a ^ b ^ d;
  assign cf = (a & b) | (a & d) | (b & d);

  always_comb begin
    unique case (sel)
      MOD_2N_M1: eac = cf[N-1];
      MOD_2N_P1: eac = ~cf[N-1];
      default:   eac = 1'b0;
    endcase
  end

  if (N > 1) begin : g_wide
    assign cc = {cf[N-2:0], eac};
  end else begin : g_one
    assign cc = eac;
  end
endmodule
