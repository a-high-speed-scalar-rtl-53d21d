// GF(2^K) adder: r = a + b, which in characteristic two is a bitwise XOR.
// Combinational; the document's datapath has three of them.
module gf2m_add #(
  parameter int unsigned K = 233
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  output logic [K-1:0] r
);

  assign r = a ^ b;

endmodule
