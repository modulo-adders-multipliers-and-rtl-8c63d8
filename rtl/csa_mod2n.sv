// csa_mod2n: n-bit carry-save adder modulo 2^n, the cell of the modulo 2^n multiplier's
// carry-save tree.
//
// Three n-bit words a, b, d are reduced to a sum word s and a carry word cc with
// a + b + d = s + cc (mod 2^n). Each bit is a full adder; the carry word is the full
// adders' carries moved up one place with a zero at bit 0, and the carry of the top
// full adder (weight 2^n) is discarded.
//
// Follows the document: the modulo 2^n multiplier is a binary multiplier whose bits of
// weight 2^n and above are discarded. Building its tree from n-bit cells like those of
// the other two moduli is this design's choice.
//
// Interface: a, b, d (N bits) -> s, cc (N bits). Combinational. The top full adder's
// carry is computed but unused, which lint reports.
module csa_mod2n #(
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
    assign cc = {cf[N-2:0], 1'b0};
  end else begin : g_one
    assign cc = 1'b0;
  end
endmodule
