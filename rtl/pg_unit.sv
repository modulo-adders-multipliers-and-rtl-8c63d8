// pg_unit: bit-level propagate/generate signals of a two-operand adder.
//
// For every bit i: g_i = x_i & y_i (the bit generates a carry) and p_i = x_i ^ y_i (the
// bit passes an incoming carry on). p also feeds the summation, s_i = p_i ^ c_i.
// Combinational, N bits wide.
module pg_unit #(
  parameter int N = 16
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] p,
  output logic [N-1:0] g
);
  assign p = x ^ y;
  assign g = x & y;
endmodule
