// Routine ROM of the point-multiplication controller.
//
// Holds the fixed instruction sequences the controller executes, as a
// combinational table indexed by pc (see ed25519_pkg for the instruction
// format and the memory map). The base point P is given in projective
// Montgomery coordinates (X1 : Y1 : Z1).
//   PC_INIT    load the constants; in the protected mode multiply X1, Y1, Z1
//              by the random lambda (base-point randomization); set the
//              ladder state R0 = (1 : 0), R1 = (X1 : Z1)
//   PC_LADDER  one Montgomery ladder step on the logical registers
//              X2,Z2 (R0) and X3,Z3 (R1), which the controller swaps by
//              remapping when the key bit is 1; the first two instructions
//              multiply X2 and Z2 by lambda and run only in the protected
//              mode (continuous re-randomization)
//   PC_CONV    y-coordinate recovery of Q = [k]P from Q, Q + P and P
//              (Okeya-Sakurai), leaving Q as (Xm : Ym : Zm) with
//              Xm + Zm in X2, Xm - Zm in Z2, Xm in X3, Ym in BB, and
//              INV_IN = Ym * (Xm + Zm)
//   PC_INV     INV_OUT = INV_IN^(p-2) by the addition chain of 254
//              squarings and 11 multiplications (the rep field chains the
//              squarings), read from the dedicated inversion ROM inv_rom
//   PC_POST    map to affine Ed25519 coordinates with the one inversion:
//              XE = SQ*Xm/Ym, YE = (Xm - Zm)/(Xm + Zm)
// The ladder uses the differential addition with a projective base point,
// so a randomized base point costs nothing per step. Recovery, per
// coordinate in projective form (A = 486662):
//   Ym = ZS*((XQ*X1 + ZQ*Z1)*(XQ*Z1 + X1*ZQ + 2A*ZQ*Z1) - 2A*(ZQ*Z1)^2)
//        - XS*(XQ*Z1 - X1*ZQ)^2
//   G  = 2*Y1*Z1*ZQ*ZS,  Xm = XQ*G,  Zm = ZQ*G
// The inversion chain length, the ladder on the Montgomery curve with
// recovery and conversion, and the two extra multiplications per step
// follow the document, as does keeping the inversion chain in its own ROM;
// the instruction order and formulas' arrangement are this design's.
module ecpm_rom (
  input  logic [6:0]           pc,
  output ed25519_pkg::uinstr_t ins
);
  import ed25519_pkg::*;

  uinstr_t inv_ins;
  inv_rom u_inv (.addr(5'(pc - PC_INV)), .ins(inv_ins));

  always_comb begin
    case (pc)
      // ---- initialisation
      7'd0:  ins = ui(OP_CONST, R_ZERO, K_ZERO, R_ZERO);
      7'd1:  ins = ui(OP_CONST, R_A24,  K_A24,  R_ZERO);
      7'd2:  ins = ui(OP_MUL,   R_X1,   R_X1,   R_LAM, 0, 1'b1);
      7'd3:  ins = ui(OP_MUL,   R_Y1,   R_Y1,   R_LAM, 0, 1'b1);
      7'd4:  ins = ui(OP_MUL,   R_Z1,   R_Z1,   R_LAM, 0, 1'b1);
      7'd5:  ins = ui(OP_CONST, R_X2,   K_ONE,  R_ZERO);
      7'd6:  ins = ui(OP_CONST, R_Z2,   K_ZERO, R_ZERO);
      7'd7:  ins = ui(OP_ADD,   R_X3,   R_X1,   R_ZERO);
      7'd8:  ins = ui(OP_ADD,   R_Z3,   R_Z1,   R_ZERO, 0, 1'b0, 1'b1);
      // ---- ladder step
      7'd10: ins = ui(OP_MUL, R_X2, R_X2, R_LAM, 0, 1'b1);
      7'd11: ins = ui(OP_MUL, R_Z2, R_Z2, R_LAM, 0, 1'b1);
      7'd12: ins = ui(OP_ADD, R_A,  R_X2, R_Z2);
      7'd13: ins = ui(OP_SUB, R_B,  R_X2, R_Z2);
      7'd14: ins = ui(OP_ADD, R_C,  R_X3, R_Z3);
      7'd15: ins = ui(OP_SUB, R_D,  R_X3, R_Z3);
      7'd16: ins = ui(OP_MUL, R_AA, R_A,  R_A);
      7'd17: ins = ui(OP_MUL, R_BB, R_B,  R_B);
      7'd18: ins = ui(OP_MUL, R_DA, R_D,  R_A);
      7'd19: ins = ui(OP_MUL, R_CB, R_C,  R_B);
      7'd20: ins = ui(OP_SUB, R_E,  R_AA, R_BB);
      7'd21: ins = ui(OP_ADD, R_T0, R_DA, R_CB);
      7'd22: ins = ui(OP_SUB, R_T1, R_DA, R_CB);
      7'd23: ins = ui(OP_MUL, R_X2, R_AA, R_BB);
      7'd24: ins = ui(OP_MUL, R_T2, R_A24, R_E);
      7'd25: ins = ui(OP_MUL, R_T0, R_T0, R_T0);
      7'd26: ins = ui(OP_MUL, R_T1, R_T1, R_T1);
      7'd27: ins = ui(OP_ADD, R_T2, R_AA, R_T2);
      7'd28: ins = ui(OP_MUL, R_X3, R_Z1, R_T0);
      7'd29: ins = ui(OP_MUL, R_Z3, R_X1, R_T1);
      7'd30: ins = ui(OP_MUL, R_Z2, R_E,  R_T2, 0, 1'b0, 1'b1);
      // ---- y recovery: Q = (X2 : Z2), Q + P = (X3 : Z3)
      7'd32: ins = ui(OP_MUL,   R_T0, R_X2, R_X1);     // XQ*X1
      7'd33: ins = ui(OP_MUL,   R_T1, R_Z2, R_Z1);     // ZQ*Z1
      7'd34: ins = ui(OP_ADD,   R_A,  R_T0, R_T1);     // XQ*X1 + ZQ*Z1
      7'd35: ins = ui(OP_MUL,   R_B,  R_X2, R_Z1);     // XQ*Z1
      7'd36: ins = ui(OP_MUL,   R_C,  R_X1, R_Z2);     // X1*ZQ
      7'd37: ins = ui(OP_ADD,   R_D,  R_B,  R_C);
      7'd38: ins = ui(OP_CONST, R_E,  K_A2, R_ZERO);   // 2A
      7'd39: ins = ui(OP_MUL,   R_DA, R_E,  R_T1);     // 2A*ZQ*Z1
      7'd40: ins = ui(OP_ADD,   R_D,  R_D,  R_DA);
      7'd41: ins = ui(OP_MUL,   R_AA, R_A,  R_D);
      7'd42: ins = ui(OP_MUL,   R_BB, R_DA, R_T1);     // 2A*(ZQ*Z1)^2
      7'd43: ins = ui(OP_SUB,   R_AA, R_AA, R_BB);
      7'd44: ins = ui(OP_MUL,   R_AA, R_AA, R_Z3);
      7'd45: ins = ui(OP_SUB,   R_CB, R_B,  R_C);
      7'd46: ins = ui(OP_MUL,   R_CB, R_CB, R_CB);
      7'd47: ins = ui(OP_MUL,   R_CB, R_CB, R_X3);
      7'd48: ins = ui(OP_SUB,   R_BB, R_AA, R_CB);     // Ym
      7'd49: ins = ui(OP_ADD,   R_T2, R_Y1, R_Y1);
      7'd50: ins = ui(OP_MUL,   R_T2, R_T2, R_T1);
      7'd51: ins = ui(OP_MUL,   R_T2, R_T2, R_Z3);     // G
      7'd52: ins = ui(OP_MUL,   R_X3, R_X2, R_T2);     // Xm
      7'd53: ins = ui(OP_MUL,   R_Z3, R_Z2, R_T2);     // Zm
      7'd54: ins = ui(OP_ADD,   R_X2, R_X3, R_Z3);     // Xm + Zm
      7'd55: ins = ui(OP_SUB,   R_Z2, R_X3, R_Z3);     // Xm - Zm
      7'd56: ins = ui(OP_MUL,   R_INV_IN, R_BB, R_X2, 0, 1'b0, 1'b1);
      // ---- inversion z^(p-2): dedicated ROM
      7'd64, 7'd65, 7'd66, 7'd67, 7'd68, 7'd69, 7'd70, 7'd71, 7'd72, 7'd73, 7'd74,
      7'd75, 7'd76, 7'd77, 7'd78, 7'd79, 7'd80, 7'd81, 7'd82, 7'd83, 7'd84, 7'd85:
        ins = inv_ins;
      // ---- affine Edwards coordinates
      7'd88: ins = ui(OP_CONST, R_E,  K_SQ, R_ZERO);
      7'd89: ins = ui(OP_MUL,   R_XE, R_X3, R_X2);     // Xm*(Xm+Zm)
      7'd90: ins = ui(OP_MUL,   R_XE, R_XE, R_E);
      7'd91: ins = ui(OP_MUL,   R_XE, R_XE, R_INV_OUT);
      7'd92: ins = ui(OP_MUL,   R_YE, R_Z2, R_BB);     // (Xm-Zm)*Ym
      7'd93: ins = ui(OP_MUL,   R_YE, R_YE, R_INV_OUT, 0, 1'b0, 1'b1);
      default: ins = ui(OP_NOP, 5'd0, 5'd0, 5'd0, 0, 1'b0, 1'b1);
    endcase
  end

endmodule
