// csa_ceac: n-bit carry-save adder with complemented end-around carry.
//
// Three n-bit operands are added bitwise by n full adders. The carry of full adder i has
// weight 2^(i+1); the carry of the top adder has weight 2^n, and since
// c*2^n = ~c + 2^n (mod 2^n + 1), it is inverted and placed at weight 2^0. The outputs
// are therefore two n-bit words with
//   a + b + d = s + cc + 2^n   (mod 2^n + 1),
// i.e. every cell leaves a constant 2^n behind that the surrounding multiplier must
// account for. Combinational.
module csa_ceac #(
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
    assign cc = {cf[N-2:0], ~cf[N-1]};
  end else begin : g_one
    assign cc = ~cf;
  end
endmodule
