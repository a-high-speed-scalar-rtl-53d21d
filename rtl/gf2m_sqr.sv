// GF(2^K) squarer: r = a^2 mod POLY.
//
// In characteristic two squaring is linear: the square of a polynomial is
// the polynomial with a zero inserted between every two coefficient bits.
// The spread 2K-1 bit value is then reduced by gf2m_reduce. Combinational,
// and far cheaper than a multiplier; the document's datapath has two.
module gf2m_sqr #(
  parameter int unsigned K    = 233,
  parameter logic [K:0]  POLY = (K+1)'(1) << K | (K+1)'(1) << 74 | (K+1)'(1)
) (
  input  logic [K-1:0] a,
  output logic [K-1:0] r
);

  logic [2*K-2:0] s;

  always_comb begin
    s = '0;
    for (int i = 0; i < K; i++) s[2*i] = a[i];
  end

  gf2m_reduce #(.K(K), .POLY(POLY)) u_red (.c(s), .r(r));

endmodule
