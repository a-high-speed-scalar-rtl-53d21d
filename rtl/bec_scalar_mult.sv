// Side-channel resistant scalar multiplier for binary Edwards curves over
// GF(2^233): computes Q = e*P with the blinded Montgomery power ladder.
//
// With random blinding points R and -R supplied from outside, the ladder
// runs on R0 = R, R1 = R + P and, in parallel, doubles R_R = -R once per
// round; after T rounds R0 = e*P + 2^T*R and R_R = -2^T*R, so R0 + R_R = e*P.
// Every round does one unified point addition and two point doublings on
// two multipliers, two squarers and three adders in 14 clock cycles (15 for
// the first round), whatever the key bits are.
//
// Ports:
//   start/busy/done   start is taken when busy is low; done goes high
//                     25 + 14*T clock edges later (3287 for T = 233)
//   e                 the scalar, T bits, processed most significant first
//   p                 base point, projective (X:Y:Z)
//   r, r_neg          random blinding point and its negative; on a binary
//                     Edwards curve -(X:Y:Z) = (Y:X:Z)
//   d1, d2            curve constants. The document's formulas are those of
//                     a curve with d1 = d2; both inputs must carry the same
//                     value for the result to be a point on the curve
//   q                 result e*P, projective; valid from done until the next
//                     start. Conversion to affine (one inversion) is outside.
// Follows the document: k = 233, the unit count, the ladder, the point
// formulas and the 14-layer round. Own choices: the projective interface,
// the INIT/FINAL additions, the handshake and the field polynomial.
module bec_scalar_mult
  import bec_pkg::*;
#(
  parameter int unsigned T      = 233,   // scalar length in bits
  parameter int unsigned LEVELS = 4      // Karatsuba-Ofman split depth
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [T-1:0] e,
  input  point_t       p,
  input  point_t       r,
  input  point_t       r_neg,
  input  felem_t       d1,
  input  felem_t       d2,
  output logic         busy,
  output logic         done,
  output point_t       q
);

  logic       load, exec, bit_b, final_pa;
  prog_e      prog;
  logic [3:0] layer;
  uinstr_t    ui;

  bec_ctrl #(.T(T)) u_ctrl (
    .clk, .rst_n, .start, .e,
    .load, .exec, .prog, .layer, .bit_b, .final_pa, .busy, .done
  );

  bec_microcode u_rom (.prog, .layer, .ui);

  bec_datapath #(.LEVELS(LEVELS)) u_dp (
    .clk, .load, .p, .r, .r_neg, .d1, .d2,
    .exec, .ui, .bit_b, .final_pa, .r0(q)
  );

endmodule
