// Bit-parallel GF(2^K) multiplier: r = a * b mod POLY.
//
// A Karatsuba-Ofman polynomial multiplier (gf2_kmul) followed by the
// modular reduction (gf2m_reduce). Fully combinational, so a product is
// available in the same clock cycle as its operands; in the scalar
// multiplier this path sets the clock period, as the document states.
// K = 233 and the Karatsuba-Ofman structure follow the document; POLY
// (x^233 + x^74 + 1) and the split depth (4 levels, 81 schoolbook leaves of
// 15 bits) are this design's choices.
module gf2m_mul #(
  parameter int unsigned K      = 233,
  parameter logic [K:0]  POLY   = (K+1)'(1) << K | (K+1)'(1) << 74 | (K+1)'(1),
  parameter int unsigned LEVELS = 4
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  output logic [K-1:0] r
);

  logic [2*K-2:0] p;

  gf2_kmul    #(.N(K), .LEVELS(LEVELS)) u_kmul (.a(a), .b(b), .c(p));
  gf2m_reduce #(.K(K), .POLY(POLY))     u_red  (.c(p), .r(r));

endmodule
