// Datapath of the BEC scalar multiplier: register file and seven GF(2^233)
// units (two bit-parallel multipliers, two squarers, three adders).
//
// Every clock cycle with exec high executes one layer of the microcode: each
// unit reads its operands from registers, computes combinationally, and its
// result is written into its destination register at the clock edge. All
// units therefore finish in one cycle, and the multiplier sets the clock
// period. A unit whose destination is R_NONE is idle (a dummy operation).
//
// Registers:
//   R0, R1  the two Montgomery ladder points (X:Y:Z each)
//   RR      the blinding point R_R, doubled once per ladder round
//   tmp[]   one register per intermediate variable of the point formulas
// The point addition reads (X1:Y1:Z1) and (X2:Y2:Z2) and the ladder doubling
// reads (X1:Y1:Z1). With scalar bit b these map onto the ladder registers as
//   (X1:Y1:Z1) = R_b,  (X2:Y2:Z2) = R_(1-b),
//   sum   (X3:Y3:Z3)    -> R_(1-b),   double (X3D:Y3D:Z3D) -> R_b,
// which is the key-dependent update of the Montgomery power ladder. With
// final_pa high the addition instead computes R0 + R_R into R0 (the last
// step of the blinded ladder). The schedule reads every input of a round
// before it overwrites the register holding it, so no copy is needed.
//
// load writes R0 <= r, R1 <= p and RR <= r_neg in one cycle. Registers are
// not reset: every register is written before it is read.
// The register-file organisation and the operand mapping are this design's
// own; the document gives the units, the variables and the schedule.
module bec_datapath
  import bec_pkg::*;
#(
  parameter int unsigned LEVELS = 4        // Karatsuba-Ofman split depth
) (
  input  logic    clk,
  input  logic    load,
  input  point_t  p,
  input  point_t  r,
  input  point_t  r_neg,
  input  felem_t  d1,
  input  felem_t  d2,
  input  logic    exec,
  input  uinstr_t ui,
  input  logic    bit_b,
  input  logic    final_pa,
  output point_t  r0
);

  point_t R0q, R1q, RRq;
  felem_t tmp [NREG];

  felem_t opa [NUNITS];
  felem_t opb [NUNITS];
  felem_t res [NUNITS];

  // The ladder register that receives the point sum and the one that
  // receives the doubling.
  logic sum_to_r0, dbl_to_r1;
  assign sum_to_r0 = final_pa | bit_b;
  assign dbl_to_r1 = bit_b;

  function automatic felem_t rd(reg_e s);
    point_t p1, p2, p3;
    p1 = bit_b ? R1q : R0q;
    p2 = final_pa ? RRq : (bit_b ? R0q : R1q);
    p3 = sum_to_r0 ? R0q : R1q;
    case (s)
      R_NONE: return '0;
      R_D1:   return d1;
      R_D2:   return d2;
      R_X1:   return p1.x;
      R_Y1:   return p1.y;
      R_Z1:   return p1.z;
      R_X2:   return p2.x;
      R_Y2:   return p2.y;
      R_Z2:   return p2.z;
      R_X3:   return p3.x;
      R_Y3:   return p3.y;
      R_Z3:   return p3.z;
      R_X3D:  return p1.x;
      R_Y3D:  return p1.y;
      R_Z3D:  return p1.z;
      R_XR:   return RRq.x;
      R_YR:   return RRq.y;
      R_ZR:   return RRq.z;
      default: return tmp[s];
    endcase
  endfunction

  always_comb begin
    for (int u = 0; u < NUNITS; u++) begin
      opa[u] = rd(ui.u[u].a);
      opb[u] = rd(ui.u[u].b);
    end
  end

  gf2m_mul #(.K(K), .POLY(POLY), .LEVELS(LEVELS)) u_mul0 (.a(opa[U_MUL0]), .b(opb[U_MUL0]), .r(res[U_MUL0]));
  gf2m_mul #(.K(K), .POLY(POLY), .LEVELS(LEVELS)) u_mul1 (.a(opa[U_MUL1]), .b(opb[U_MUL1]), .r(res[U_MUL1]));
  gf2m_sqr #(.K(K), .POLY(POLY)) u_sqr0 (.a(opa[U_SQR0]), .r(res[U_SQR0]));
  gf2m_sqr #(.K(K), .POLY(POLY)) u_sqr1 (.a(opa[U_SQR1]), .r(res[U_SQR1]));
  gf2m_add #(.K(K)) u_add0 (.a(opa[U_ADD0]), .b(opb[U_ADD0]), .r(res[U_ADD0]));
  gf2m_add #(.K(K)) u_add1 (.a(opa[U_ADD1]), .b(opb[U_ADD1]), .r(res[U_ADD1]));
  gf2m_add #(.K(K)) u_add2 (.a(opa[U_ADD2]), .b(opb[U_ADD2]), .r(res[U_ADD2]));

  always_ff @(posedge clk) begin
    if (load) begin
      R0q <= r;
      R1q <= p;
      RRq <= r_neg;
    end else if (exec) begin
      for (int u = 0; u < NUNITS; u++) begin
        case (ui.u[u].d)
          R_NONE, R_D1, R_D2, R_X1, R_Y1, R_Z1, R_X2, R_Y2, R_Z2: ;
          R_X3:  if (sum_to_r0) R0q.x <= res[u]; else R1q.x <= res[u];
          R_Y3:  if (sum_to_r0) R0q.y <= res[u]; else R1q.y <= res[u];
          R_Z3:  if (sum_to_r0) R0q.z <= res[u]; else R1q.z <= res[u];
          R_X3D: if (dbl_to_r1) R1q.x <= res[u]; else R0q.x <= res[u];
          R_Y3D: if (dbl_to_r1) R1q.y <= res[u]; else R0q.y <= res[u];
          R_Z3D: if (dbl_to_r1) R1q.z <= res[u]; else R0q.z <= res[u];
          R_XR:  RRq.x <= res[u];
          R_YR:  RRq.y <= res[u];
          R_ZR:  RRq.z <= res[u];
          default: tmp[ui.u[u].d] <= res[u];
        endcase
      end
    end
  end

  // Microcode rules: no two units write the same register in one layer, and
  // inputs and constants are never destinations.
  always_ff @(posedge clk) begin
    if (exec && !load) begin
      for (int u = 0; u < NUNITS; u++) begin
        assert (ui.u[u].d == R_NONE || ui.u[u].d > R_Z2)
          else $error("unit %0d writes read-only register %0d", u, ui.u[u].d);
        for (int v = u + 1; v < NUNITS; v++)
          assert (ui.u[u].d == R_NONE || ui.u[u].d != ui.u[v].d)
            else $error("units %0d and %0d both write register %0d", u, v, ui.u[u].d);
      end
    end
  end

  assign r0 = R0q;

endmodule
