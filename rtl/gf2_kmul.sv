// Karatsuba-Ofman polynomial multiplier over GF(2)[x].
//
// Multiplies two N-bit polynomials into a 2N-1 bit product, without
// reduction. The operands are zero-extended to NP = LEAF * 2^LEVELS bits
// and split LEVELS times: each node of size S forms its low half, its high
// half and their sum, and its product is
//   lo*lo + x^(S/2) (mid*mid + lo*lo + hi*hi) + x^S hi*hi,
// with the three half-size products coming from its three children. The
// 3^LEVELS leaves are schoolbook AND/XOR arrays of LEAF bits. The tree is
// laid out level by level (g_lvl[l] holds the 3^l nodes of level l), so the
// module does not instantiate itself. Zero padding bits are constants and
// vanish in synthesis. Purely combinational.
//
// The document builds its multiplier on Karatsuba-Ofman; this is the plain
// form with an assumed depth, not the overlap-free variant the document
// cites, whose details it does not give.
module gf2_kmul #(
  parameter int unsigned N      = 233,
  parameter int unsigned LEVELS = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] c
);

  localparam int unsigned LEAF = (N + (1 << LEVELS) - 1) >> LEVELS;
  localparam int unsigned NP   = LEAF << LEVELS;

  for (genvar l = 0; l <= int'(LEVELS); l++) begin : g_lvl
    localparam int unsigned S     = NP >> l;
    localparam int unsigned NODES = 3 ** l;

    logic [S-1:0]   x [NODES];
    logic [S-1:0]   y [NODES];
    logic [2*S-2:0] p [NODES];

    for (genvar j = 0; j < int'(NODES); j++) begin : g_node
      // operands: from the inputs at the root, else from the parent node
      if (l == 0) begin : g_root
        assign x[j] = NP'(a);
        assign y[j] = NP'(b);
      end else if (j % 3 == 0) begin : g_lo
        assign x[j] = g_lvl[l-1].x[j/3][S-1:0];
        assign y[j] = g_lvl[l-1].y[j/3][S-1:0];
      end else if (j % 3 == 1) begin : g_hi
        assign x[j] = g_lvl[l-1].x[j/3][2*S-1:S];
        assign y[j] = g_lvl[l-1].y[j/3][2*S-1:S];
      end else begin : g_mid
        assign x[j] = g_lvl[l-1].x[j/3][S-1:0] ^ g_lvl[l-1].x[j/3][2*S-1:S];
        assign y[j] = g_lvl[l-1].y[j/3][S-1:0] ^ g_lvl[l-1].y[j/3][2*S-1:S];
      end

      // product: schoolbook at the leaves, Karatsuba combination above
      if (l == int'(LEVELS)) begin : g_leaf
        always_comb begin
          p[j] = '0;
          for (int i = 0; i < int'(S); i++)
            if (y[j][i]) p[j][i +: S] = p[j][i +: S] ^ x[j];
        end
      end else begin : g_comb
        localparam int unsigned H = S / 2;
        logic [2*H-2:0] plo, phi, pmid, pcross;
        assign plo  = g_lvl[l+1].p[3*j];
        assign phi  = g_lvl[l+1].p[3*j+1];
        assign pmid = g_lvl[l+1].p[3*j+2];
        assign pcross = pmid ^ plo ^ phi;
        assign p[j]   = (2*S-1)'(plo) ^ ((2*S-1)'(pcross) << H) ^
                        ((2*S-1)'(phi) << S);
      end
    end
  end

  assign c = g_lvl[0].p[0][2*N-2:0];

endmodule
