// Reduction of a GF(2)[x] polynomial of degree <= 2K-2 modulo the field
// polynomial POLY of degree K.
//
// Works from the top bit down: whenever bit i (i >= K) is set, POLY shifted
// by i-K is added, which clears bit i. After the K-1 steps the low K bits are
// the residue. Purely combinational; for a trinomial each step touches only
// three bits, so the logic is a small XOR network.
module gf2m_reduce #(
  parameter int unsigned K    = 233,
  parameter logic [K:0]  POLY = (K+1)'(1) << K | (K+1)'(1) << 74 | (K+1)'(1)
) (
  input  logic [2*K-2:0] c,
  output logic [K-1:0]   r
);

  logic [2*K-2:0] t;

  always_comb begin
    t = c;
    for (int i = 2 * K - 2; i >= int'(K); i--)
      if (t[i]) t[i-K +: K+1] = t[i-K +: K+1] ^ POLY;
    r = t[K-1:0];
  end

endmodule
