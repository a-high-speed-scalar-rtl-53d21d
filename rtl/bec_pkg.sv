// Shared types and constants of the binary Edwards curve (BEC) scalar multiplier.
//
// The field is GF(2^233) in polynomial basis. The datapath is driven by a
// microcode of "layers": one layer is one clock cycle in which each of the
// seven arithmetic units (two multipliers, two squarers, three adders) may
// perform one operation on registered operands and write one register.
// A layer is described by a uinstr_t, which holds one uop_t per unit.
//
// Register names follow the intermediate variables of the unified projective
// point addition (A, B, C, ... T4) and point doubling (DA ... DK, and the
// same names with an _R suffix for the doubling of the blinding point).
// X1..Z2, X3..Z3 and X3D..Z3D are logical names that the datapath maps onto
// the two ladder registers R0 and R1 according to the current scalar bit.
//
// From the document: k = 233, the set of functional units, the variable
// names. Own choices: the reduction polynomial x^233 + x^74 + 1 (the NIST
// B-233 trinomial), the register numbering and the microcode encoding.
package bec_pkg;

  localparam int unsigned K = 233;                 // field degree
  localparam logic [K:0]  POLY = (K+1)'(1) << K | (K+1)'(1) << 74 | (K+1)'(1);

  localparam int unsigned NUNITS = 7;              // 2 mult, 2 sqr, 3 add
  localparam int unsigned U_MUL0 = 0;
  localparam int unsigned U_MUL1 = 1;
  localparam int unsigned U_SQR0 = 2;
  localparam int unsigned U_SQR1 = 3;
  localparam int unsigned U_ADD0 = 4;
  localparam int unsigned U_ADD1 = 5;
  localparam int unsigned U_ADD2 = 6;

  // Layers per program
  localparam int unsigned LAYERS_PA     = 11;      // single point addition
  localparam int unsigned LAYERS_FIRST  = 15;      // first ladder round
  localparam int unsigned LAYERS_STEADY = 14;      // every later round

  typedef logic [K-1:0] felem_t;

  typedef struct packed {
    felem_t x;
    felem_t y;
    felem_t z;
  } point_t;

  typedef enum logic [6:0] {
    R_NONE,
    R_D1,
    R_D2,
    R_X1,
    R_Y1,
    R_Z1,
    R_X2,
    R_Y2,
    R_Z2,
    R_X3,
    R_Y3,
    R_Z3,
    R_X3D,
    R_Y3D,
    R_Z3D,
    R_XR,
    R_YR,
    R_ZR,
    R_A,
    R_B,
    R_C,
    R_D,
    R_E,
    R_F,
    R_G1,
    R_G2,
    R_H1,
    R_H2,
    R_G,
    R_H,
    R_I,
    R_J,
    R_K1,
    R_K2,
    R_K,
    R_L,
    R_U1,
    R_U2,
    R_U3,
    R_L1,
    R_L2,
    R_V1,
    R_V2,
    R_V3,
    R_V4,
    R_V5,
    R_L3,
    R_V6,
    R_V7,
    R_V,
    R_S1,
    R_S2,
    R_S3,
    R_S4,
    R_T1,
    R_T2,
    R_T3,
    R_T4,
    R_DA,
    R_DC,
    R_DE,
    R_DB,
    R_DD,
    R_DF1,
    R_DH,
    R_DI,
    R_DF,
    R_DG,
    R_DV2,
    R_DV3,
    R_DJ,
    R_DV1,
    R_DK1,
    R_DK,
    R_DA_R,
    R_DC_R,
    R_DE_R,
    R_DB_R,
    R_DD_R,
    R_DF1_R,
    R_DH_R,
    R_DI_R,
    R_DF_R,
    R_DG_R,
    R_DV2_R,
    R_DV3_R,
    R_DJ_R,
    R_DV1_R,
    R_DK1_R,
    R_DK_R
  } reg_e;

  localparam int unsigned NREG      = 90;

  // One unit's operation: operands a, b (b unused by squarers) and destination
  // d. d == R_NONE is a dummy operation (nothing is written).
  typedef struct packed {
    reg_e a;
    reg_e b;
    reg_e d;
  } uop_t;

  typedef struct packed {
    uop_t [NUNITS-1:0] u;
  } uinstr_t;

  typedef enum logic [1:0] {
    PROG_PA     = 2'd0,   // one point addition (X1:Y1:Z1) + (X2:Y2:Z2)
    PROG_FIRST  = 2'd1,   // first bMPL round
    PROG_STEADY = 2'd2    // remaining bMPL rounds
  } prog_e;

  function automatic int unsigned prog_layers(prog_e p);
    case (p)
      PROG_PA:     return LAYERS_PA;
      PROG_FIRST:  return LAYERS_FIRST;
      default:     return LAYERS_STEADY;
    endcase
  endfunction

endpackage
