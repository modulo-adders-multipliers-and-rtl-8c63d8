// csa_eac: n-bit carry-save adder with end-around carry, the cell of the modulo 2^n-1
// multi-operand adder.
//
// Three n-bit words a, b, d are reduced to a sum word s and a carry word cc with
// a + b + d = s + cc (mod 2^n - 1). Each bit is a full adder; the carry word is the
// full adders' carries moved up one place, and the carry of the top full adder, which
// has weight 2^n = 1 (mod 2^n - 1), is re-entered at bit 0. No constant is left behind,
// unlike the complemented version used modulo 2^n + 1.
//
// Follows the document: full adders FA_0..FA_n-1 with the top carry C_n-1 wrapped to
// bit 0. This design adds nothing of its own.
//
// Interface: a, b, d (N bits) -> s, cc (N bits). Combinational.
module csa_eac #(
  parameter int N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] d,
  output logic [N-1:0] s,
  output logic [N-1:0] cc
);
  logic [N-1:0] cf;
  assign s  = a ^ b ^ d;
  assign cf = (a & b) | (a & d) | (b & d);
  if (N > 1) begin : g_wide
    assign cc = {cf[N-2:0], cf[N-1]};
  end else begin : g_one
    assign cc = cf;
  end
endmodule
