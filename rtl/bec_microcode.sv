// Layer schedule ROM of the BEC scalar multiplier.
//
// Returns, for a program and a layer number, the operation of each of the
// seven units in that layer (see bec_pkg). Purely combinational; the
// controller steps the layer number once per clock.
//
// PROG_STEADY is the 14-layer round of the document's parallelism table for
// all bMPL rounds after the first: per round one point addition (19 M, 2 S,
// 22 A), one doubling of the ladder point (4 M, 6 S, 9 A) and one doubling of
// the blinding point R_R (4 M, 6 S, 9 A) share the two multipliers, two
// squarers and three adders. The squarings, three multiplications and two
// additions of the next round's R_R doubling are computed at the end of the
// current round, which is what allows 14 layers instead of 15.
//
// PROG_FIRST (15 layers) is the first round: it computes the first R_R
// doubling from scratch and then the same look-ahead for round two. The
// document gives this table too; the layer assignment here is this design's
// own list schedule with the same operations and the same 15 layers.
// PROG_PA (11 layers) is a lone point addition, used for R + P before the
// ladder and for R0 + R_R after it; the document does not schedule these.
//
// Slots 0-1 are the multipliers (M1, M2), 2-3 the squarers (Sq1, Sq2), 4-6
// the adders (Ad1..Ad3). Unused slots and out-of-range layers are dummies.
module bec_microcode
  import bec_pkg::*;
(
  input  prog_e      prog,
  input  logic [3:0] layer,
  output uinstr_t    ui
);

  always_comb begin
    ui = '0;
    unique case (prog)
      PROG_PA: begin
        case (layer)
          4'd0: begin
            ui.u[0] = '{R_X1, R_X2, R_A};
            ui.u[1] = '{R_Y1, R_Y2, R_B};
            ui.u[4] = '{R_X1, R_Z1, R_G1};
            ui.u[5] = '{R_X2, R_Z2, R_G2};
            ui.u[6] = '{R_Y1, R_Z1, R_H1};
          end
          4'd1: begin
            ui.u[0] = '{R_G1, R_G2, R_G};
            ui.u[1] = '{R_Z1, R_Z2, R_C};
            ui.u[4] = '{R_Y2, R_Z2, R_H2};
            ui.u[5] = '{R_X1, R_Y1, R_K1};
            ui.u[6] = '{R_X2, R_Y2, R_K2};
          end
          4'd2: begin
            ui.u[0] = '{R_H1, R_H2, R_H};
            ui.u[1] = '{R_K1, R_K2, R_K};
            ui.u[2] = '{R_C, R_NONE, R_E};
            ui.u[4] = '{R_A, R_G, R_I};
          end
          4'd3: begin
            ui.u[0] = '{R_A, R_B, R_V1};
            ui.u[1] = '{R_G, R_H, R_V2};
            ui.u[4] = '{R_B, R_H, R_J};
            ui.u[5] = '{R_K, R_I, R_U1};
          end
          4'd4: begin
            ui.u[0] = '{R_D1, R_C, R_D};
            ui.u[1] = '{R_D1, R_K, R_L};
            ui.u[4] = '{R_J, R_C, R_U2};
            ui.u[5] = '{R_V1, R_V2, R_V4};
          end
          4'd5: begin
            ui.u[0] = '{R_D1, R_E, R_V3};
            ui.u[2] = '{R_D, R_NONE, R_F};
            ui.u[4] = '{R_U1, R_U2, R_U3};
            ui.u[5] = '{R_A, R_D, R_S1};
            ui.u[6] = '{R_G, R_D, R_S2};
          end
          4'd6: begin
            ui.u[0] = '{R_L, R_U3, R_L1};
            ui.u[1] = '{R_D, R_F, R_V6};
            ui.u[4] = '{R_V3, R_V4, R_V5};
            ui.u[5] = '{R_B, R_D, R_T1};
            ui.u[6] = '{R_H, R_D, R_T2};
          end
          4'd7: begin
            ui.u[0] = '{R_L, R_V5, R_L3};
            ui.u[1] = '{R_S1, R_S2, R_S3};
            ui.u[4] = '{R_L1, R_F, R_L2};
          end
          4'd8: begin
            ui.u[0] = '{R_T1, R_T2, R_T3};
            ui.u[1] = '{R_C, R_L2, R_Z3};
            ui.u[4] = '{R_L3, R_V6, R_V7};
          end
          4'd9: begin
            ui.u[0] = '{R_D, R_S3, R_S4};
            ui.u[1] = '{R_D, R_T3, R_T4};
            ui.u[4] = '{R_V7, R_Z3, R_V};
          end
          4'd10: begin
            ui.u[4] = '{R_V, R_S4, R_X3};
            ui.u[5] = '{R_V, R_T4, R_Y3};
          end
          default: ;
        endcase
      end
      PROG_FIRST: begin
        case (layer)
          4'd0: begin
            ui.u[0] = '{R_X1, R_X2, R_A};
            ui.u[1] = '{R_Y1, R_Y2, R_B};
            ui.u[2] = '{R_XR, R_NONE, R_DA_R};
            ui.u[3] = '{R_YR, R_NONE, R_DC_R};
            ui.u[4] = '{R_X1, R_Z1, R_G1};
            ui.u[5] = '{R_X2, R_Z2, R_G2};
            ui.u[6] = '{R_Y1, R_Z1, R_H1};
          end
          4'd1: begin
            ui.u[0] = '{R_G1, R_G2, R_G};
            ui.u[1] = '{R_Z1, R_Z2, R_C};
            ui.u[2] = '{R_ZR, R_NONE, R_DE_R};
            ui.u[3] = '{R_DA_R, R_NONE, R_DB_R};
            ui.u[4] = '{R_Y2, R_Z2, R_H2};
            ui.u[5] = '{R_X1, R_Y1, R_K1};
            ui.u[6] = '{R_X2, R_Y2, R_K2};
          end
          4'd2: begin
            ui.u[0] = '{R_H1, R_H2, R_H};
            ui.u[1] = '{R_DA_R, R_DE_R, R_DH_R};
            ui.u[2] = '{R_DC_R, R_NONE, R_DD_R};
            ui.u[3] = '{R_DE_R, R_NONE, R_DF1_R};
            ui.u[4] = '{R_A, R_G, R_I};
          end
          4'd3: begin
            ui.u[0] = '{R_DC_R, R_DE_R, R_DI_R};
            ui.u[1] = '{R_K1, R_K2, R_K};
            ui.u[2] = '{R_C, R_NONE, R_E};
            ui.u[3] = '{R_X1, R_NONE, R_DA};
            ui.u[4] = '{R_B, R_H, R_J};
            ui.u[5] = '{R_DB_R, R_DD_R, R_DG_R};
            ui.u[6] = '{R_DH_R, R_DD_R, R_DV2_R};
          end
          4'd4: begin
            ui.u[0] = '{R_A, R_B, R_V1};
            ui.u[1] = '{R_G, R_H, R_V2};
            ui.u[2] = '{R_Y1, R_NONE, R_DC};
            ui.u[3] = '{R_Z1, R_NONE, R_DE};
            ui.u[4] = '{R_DH_R, R_DI_R, R_DJ_R};
            ui.u[5] = '{R_K, R_I, R_U1};
            ui.u[6] = '{R_J, R_C, R_U2};
          end
          4'd5: begin
            ui.u[0] = '{R_D1, R_C, R_D};
            ui.u[1] = '{R_D1, R_DF1_R, R_DF_R};
            ui.u[2] = '{R_DA, R_NONE, R_DB};
            ui.u[3] = '{R_DC, R_NONE, R_DD};
            ui.u[4] = '{R_U1, R_U2, R_U3};
            ui.u[5] = '{R_V1, R_V2, R_V4};
            ui.u[6] = '{R_DI_R, R_DB_R, R_DV3_R};
          end
          4'd6: begin
            ui.u[0] = '{R_D2, R_DJ_R, R_DK1_R};
            ui.u[1] = '{R_D1, R_K, R_L};
            ui.u[2] = '{R_D, R_NONE, R_F};
            ui.u[3] = '{R_DE, R_NONE, R_DF1};
            ui.u[4] = '{R_DF_R, R_DG_R, R_DV1_R};
            ui.u[5] = '{R_A, R_D, R_S1};
            ui.u[6] = '{R_G, R_D, R_S2};
          end
          4'd7: begin
            ui.u[0] = '{R_D1, R_E, R_V3};
            ui.u[1] = '{R_DA, R_DE, R_DH};
            ui.u[4] = '{R_DG_R, R_DK1_R, R_DK_R};
            ui.u[5] = '{R_B, R_D, R_T1};
            ui.u[6] = '{R_H, R_D, R_T2};
          end
          4'd8: begin
            ui.u[0] = '{R_DC, R_DE, R_DI};
            ui.u[1] = '{R_L, R_U3, R_L1};
            ui.u[4] = '{R_V3, R_V4, R_V5};
            ui.u[5] = '{R_DK_R, R_DV2_R, R_XR};
            ui.u[6] = '{R_DK_R, R_DV3_R, R_YR};
          end
          4'd9: begin
            ui.u[0] = '{R_L, R_V5, R_L3};
            ui.u[1] = '{R_D, R_F, R_V6};
            ui.u[2] = '{R_XR, R_NONE, R_DA_R};
            ui.u[3] = '{R_YR, R_NONE, R_DC_R};
            ui.u[4] = '{R_DH, R_DI, R_DJ};
            ui.u[5] = '{R_L1, R_F, R_L2};
            ui.u[6] = '{R_DV1_R, R_DJ_R, R_ZR};
          end
          4'd10: begin
            ui.u[0] = '{R_D1, R_DF1, R_DF};
            ui.u[1] = '{R_D2, R_DJ, R_DK1};
            ui.u[2] = '{R_ZR, R_NONE, R_DE_R};
            ui.u[3] = '{R_DA_R, R_NONE, R_DB_R};
            ui.u[4] = '{R_DB, R_DD, R_DG};
            ui.u[5] = '{R_L3, R_V6, R_V7};
            ui.u[6] = '{R_DH, R_DD, R_DV2};
          end
          4'd11: begin
            ui.u[0] = '{R_S1, R_S2, R_S3};
            ui.u[1] = '{R_T1, R_T2, R_T3};
            ui.u[2] = '{R_DC_R, R_NONE, R_DD_R};
            ui.u[3] = '{R_DE_R, R_NONE, R_DF1_R};
            ui.u[4] = '{R_DG, R_DK1, R_DK};
            ui.u[5] = '{R_DF, R_DG, R_DV1};
            ui.u[6] = '{R_DI, R_DB, R_DV3};
          end
          4'd12: begin
            ui.u[0] = '{R_C, R_L2, R_Z3};
            ui.u[1] = '{R_DC_R, R_DE_R, R_DI_R};
            ui.u[4] = '{R_DB_R, R_DD_R, R_DG_R};
            ui.u[5] = '{R_DK, R_DV2, R_X3D};
            ui.u[6] = '{R_DK, R_DV3, R_Y3D};
          end
          4'd13: begin
            ui.u[0] = '{R_D, R_S3, R_S4};
            ui.u[1] = '{R_D, R_T3, R_T4};
            ui.u[4] = '{R_V7, R_Z3, R_V};
            ui.u[5] = '{R_DI_R, R_DB_R, R_DV3_R};
            ui.u[6] = '{R_DV1, R_DJ, R_Z3D};
          end
          4'd14: begin
            ui.u[0] = '{R_D1, R_DF1_R, R_DF_R};
            ui.u[1] = '{R_DA_R, R_DE_R, R_DH_R};
            ui.u[4] = '{R_V, R_S4, R_X3};
            ui.u[5] = '{R_V, R_T4, R_Y3};
          end
          default: ;
        endcase
      end
      PROG_STEADY: begin
        case (layer)
          4'd0: begin
            ui.u[0] = '{R_X1, R_X2, R_A};
            ui.u[1] = '{R_Y1, R_Y2, R_B};
            ui.u[2] = '{R_X1, R_NONE, R_DA};
            ui.u[3] = '{R_Y1, R_NONE, R_DC};
            ui.u[4] = '{R_X1, R_Z1, R_G1};
            ui.u[5] = '{R_X2, R_Z2, R_G2};
            ui.u[6] = '{R_Y2, R_Z2, R_H2};
          end
          4'd1: begin
            ui.u[0] = '{R_Z1, R_Z2, R_C};
            ui.u[1] = '{R_G1, R_G2, R_G};
            ui.u[2] = '{R_DA, R_NONE, R_DB};
            ui.u[3] = '{R_DC, R_NONE, R_DD};
            ui.u[4] = '{R_Y1, R_Z1, R_H1};
            ui.u[5] = '{R_X2, R_Y2, R_K2};
            ui.u[6] = '{R_X1, R_Y1, R_K1};
          end
          4'd2: begin
            ui.u[0] = '{R_D1, R_C, R_D};
            ui.u[1] = '{R_H1, R_H2, R_H};
            ui.u[2] = '{R_Z1, R_NONE, R_DE};
            ui.u[4] = '{R_A, R_G, R_I};
            ui.u[5] = '{R_DB, R_DD, R_DG};
            ui.u[6] = '{R_DF_R, R_DG_R, R_DV1_R};
          end
          4'd3: begin
            ui.u[0] = '{R_DC, R_DE, R_DI};
            ui.u[1] = '{R_DA, R_DE, R_DH};
            ui.u[2] = '{R_C, R_NONE, R_E};
            ui.u[4] = '{R_B, R_H, R_J};
            ui.u[5] = '{R_G, R_D, R_S2};
            ui.u[6] = '{R_H, R_D, R_T2};
          end
          4'd4: begin
            ui.u[0] = '{R_A, R_B, R_V1};
            ui.u[1] = '{R_D1, R_E, R_V3};
            ui.u[2] = '{R_DE, R_NONE, R_DF1};
            ui.u[4] = '{R_DH, R_DI, R_DJ};
            ui.u[5] = '{R_DH, R_DD, R_DV2};
            ui.u[6] = '{R_DH_R, R_DI_R, R_DJ_R};
          end
          4'd5: begin
            ui.u[0] = '{R_D2, R_DJ_R, R_DK1_R};
            ui.u[1] = '{R_K1, R_K2, R_K};
            ui.u[4] = '{R_A, R_D, R_S1};
            ui.u[5] = '{R_DH_R, R_DD_R, R_DV2_R};
            ui.u[6] = '{R_J, R_C, R_U2};
          end
          4'd6: begin
            ui.u[0] = '{R_D2, R_DJ, R_DK1};
            ui.u[1] = '{R_G, R_H, R_V2};
            ui.u[4] = '{R_K, R_I, R_U1};
            ui.u[5] = '{R_DG_R, R_DK1_R, R_DK_R};
            ui.u[6] = '{R_B, R_D, R_T1};
          end
          4'd7: begin
            ui.u[0] = '{R_D1, R_K, R_L};
            ui.u[1] = '{R_D1, R_DF1, R_DF};
            ui.u[3] = '{R_D, R_NONE, R_F};
            ui.u[4] = '{R_DV1_R, R_DJ_R, R_ZR};
            ui.u[5] = '{R_V1, R_V2, R_V4};
            ui.u[6] = '{R_U1, R_U2, R_U3};
          end
          4'd8: begin
            ui.u[0] = '{R_S1, R_S2, R_S3};
            ui.u[1] = '{R_L, R_U3, R_L1};
            ui.u[2] = '{R_ZR, R_NONE, R_DE_R};
            ui.u[4] = '{R_DK_R, R_DV2_R, R_XR};
            ui.u[5] = '{R_DK_R, R_DV3_R, R_YR};
            ui.u[6] = '{R_V3, R_V4, R_V5};
          end
          4'd9: begin
            ui.u[0] = '{R_D, R_F, R_V6};
            ui.u[1] = '{R_L, R_V5, R_L3};
            ui.u[2] = '{R_XR, R_NONE, R_DA_R};
            ui.u[3] = '{R_YR, R_NONE, R_DC_R};
            ui.u[4] = '{R_DG, R_DK1, R_DK};
            ui.u[5] = '{R_DI, R_DB, R_DV3};
            ui.u[6] = '{R_L1, R_F, R_L2};
          end
          4'd10: begin
            ui.u[0] = '{R_T1, R_T2, R_T3};
            ui.u[1] = '{R_C, R_L2, R_Z3};
            ui.u[2] = '{R_DA_R, R_NONE, R_DB_R};
            ui.u[3] = '{R_DC_R, R_NONE, R_DD_R};
            ui.u[4] = '{R_DF, R_DG, R_DV1};
            ui.u[5] = '{R_DK, R_DV3, R_Y3D};
            ui.u[6] = '{R_L3, R_V6, R_V7};
          end
          4'd11: begin
            ui.u[0] = '{R_D, R_T3, R_T4};
            ui.u[1] = '{R_D, R_S3, R_S4};
            ui.u[2] = '{R_DE_R, R_NONE, R_DF1_R};
            ui.u[4] = '{R_DK, R_DV2, R_X3D};
            ui.u[5] = '{R_DV1, R_DJ, R_Z3D};
            ui.u[6] = '{R_V7, R_Z3, R_V};
          end
          4'd12: begin
            ui.u[0] = '{R_D1, R_DF1_R, R_DF_R};
            ui.u[1] = '{R_DC_R, R_DE_R, R_DI_R};
            ui.u[4] = '{R_V, R_S4, R_X3};
            ui.u[5] = '{R_V, R_T4, R_Y3};
            ui.u[6] = '{R_DB_R, R_DD_R, R_DG_R};
          end
          4'd13: begin
            ui.u[0] = '{R_DA_R, R_DE_R, R_DH_R};
            ui.u[4] = '{R_DI_R, R_DB_R, R_DV3_R};
          end
          default: ;
        endcase
      end
      default: ;
    endcase
  end

endmodule
