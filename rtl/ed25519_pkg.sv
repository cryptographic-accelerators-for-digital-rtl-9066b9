// Shared constants and types of the Ed25519 accelerator.
//
// Holds the field prime p = 2^255 - 19, the group order L = 2^252 + l0 and
// the small curve constant used by the Montgomery ladder, plus the field-ALU
// opcodes and the micro-instruction format executed by the controller.
// The curve constants are those of Ed25519 / Curve25519; the opcode and
// instruction encodings are this design's own.
package ed25519_pkg;

  localparam logic [255:0] P  = 256'h7fffffffffffffffffffffffffffffffffffffffffffffffffffffffffffffed;
  localparam logic [255:0] L  = 256'h1000000000000000000000000000000014def9dea2f79cd65812631a5cf5d3ed;
  localparam logic [124:0] L0 = 125'h14def9dea2f79cd65812631a5cf5d3ed;  // L - 2^252
  localparam logic [255:0] A24 = 256'd121665;                     // (486662 - 2) / 4
  localparam logic [255:0] A2  = 256'd973324;                     // 2 * 486662
  // sqrt(-486664) mod p, the scale of the map from Curve25519 to Ed25519:
  // x = SQ * u / v, y = (u - 1) / (u + 1)
  localparam logic [255:0] SQ  = 256'h70d9120b9f5ff9442d84f723fc03b0813a5e2c2eb482e57d3391fb5500ba81e7;
  // Ed25519 base point in Montgomery coordinates (u, v)
  localparam logic [255:0] BASE_U = 256'd9;
  localparam logic [255:0] BASE_V = 256'h20ae19a1b8a086b4e01edd2c7748d14c923d4d7e6d7c61b229e9c5a27eced3d9;

  // Field-ALU operations of the micro-program
  typedef enum logic [2:0] {
    OP_NOP   = 3'd0,
    OP_ADD   = 3'd1,   // dst = a + b mod p
    OP_SUB   = 3'd2,   // dst = a - b mod p
    OP_MUL   = 3'd3,   // dst = a * b mod p (rep > 0: square dst rep more times)
    OP_CONST = 3'd4    // dst = constant number a (see ALU constant table)
  } alu_op_e;

  // One micro-instruction of the controller ROM
  typedef struct packed {
    alu_op_e    op;
    logic [4:0] dst;
    logic [4:0] srca;
    logic [4:0] srcb;
    logic [6:0] rep;    // extra squarings of dst chained after a MUL
    logic       prot;   // executed only in the protected (re-randomizing) mode
    logic       last;   // last instruction of a routine
  } uinstr_t;

  // Memory map of the 32-entry memory unit (logical addresses).
  // Addresses 2..5 are remapped by the ladder swap bit.
  localparam logic [4:0] R_X1 = 5'd0,  R_Z1 = 5'd1;
  localparam logic [4:0] R_X2 = 5'd2,  R_Z2 = 5'd3, R_X3 = 5'd4, R_Z3 = 5'd5;
  localparam logic [4:0] R_A24 = 5'd6, R_LAM = 5'd7, R_Y1 = 5'd8, R_ZERO = 5'd9;
  localparam logic [4:0] R_A  = 5'd10, R_AA = 5'd11, R_B  = 5'd12, R_BB = 5'd13;
  localparam logic [4:0] R_E  = 5'd14, R_C  = 5'd15, R_D  = 5'd16, R_DA = 5'd17;
  localparam logic [4:0] R_CB = 5'd18, R_T0 = 5'd19, R_T1 = 5'd20, R_T2 = 5'd21;
  localparam logic [4:0] R_I2 = 5'd22, R_I9 = 5'd23, R_I11 = 5'd24, R_I5 = 5'd25;
  localparam logic [4:0] R_I10 = 5'd26, R_I20 = 5'd27, R_I50 = 5'd28, R_I100 = 5'd29;
  localparam logic [4:0] R_XE = 5'd30, R_YE = 5'd31;   // affine Edwards result
  // reused names: inversion input/output and temporary
  localparam logic [4:0] R_INV_IN = R_T2, R_INV_OUT = R_T1, R_IT = R_T0;

  // Constant table of OP_CONST
  localparam logic [4:0] K_ZERO = 5'd0, K_ONE = 5'd1, K_A24 = 5'd2, K_A2 = 5'd3, K_SQ = 5'd4;

  // Entry points of the routines in the controller ROM
  localparam logic [6:0] PC_INIT = 7'd0, PC_LADDER = 7'd10, PC_CONV = 7'd32;
  localparam logic [6:0] PC_INV  = 7'd64, PC_POST = 7'd88;

  function automatic logic [255:0] alu_const(input logic [4:0] k);
    case (k)
      K_ONE:   return 256'd1;
      K_A24:   return A24;
      K_A2:    return A2;
      K_SQ:    return SQ;
      default: return '0;
    endcase
  endfunction

  // builds a micro-instruction; rep is given as an integer for readable
  // tables and only its low seven bits (the rep field) are kept
  function automatic uinstr_t ui(alu_op_e op, logic [4:0] d, logic [4:0] a, logic [4:0] b,
                                 int rep = 0, logic prot = 1'b0, logic last = 1'b0);
    uinstr_t u;
    u.op = op; u.dst = d; u.srca = a; u.srcb = b;
    u.rep = 7'(rep); u.prot = prot; u.last = last;
    return u;
  endfunction

endpackage
