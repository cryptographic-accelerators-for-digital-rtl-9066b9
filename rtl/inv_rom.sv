// Inversion ROM: the addition chain for z^(p-2) = z^(2^255 - 21) in
// GF(2^255 - 19), by Fermat's little theorem.
//
// 22 micro-instructions (addresses 0..21, PC_INV + addr in the controller's
// program space) perform 254 squarings and 11 multiplications: a MUL with a
// repeat count n is followed by n squarings of its destination. The chain
// builds z^11 and z^(2^k - 1) for k = 5, 10, 20, 50, 100, 200, 250, then
// five squarings and a multiplication by z^11. The input is R_INV_IN, the
// result R_INV_OUT; R_I2 .. R_I100 and R_IT hold the intermediate powers.
// Combinational: ins follows addr in the same clock; addresses past the
// chain read a NOP marked last.
// The separate ROM for the inversion, next to the main routine ROM, and the
// counts of 254 squarings and 11 multiplications follow the document; the
// instruction format is this design's.
module inv_rom (
  input  logic [4:0]           addr,
  output ed25519_pkg::uinstr_t ins
);
  import ed25519_pkg::*;

  always_comb begin
    case (addr)
      5'd0: ins = ui(OP_MUL, R_I2,   R_INV_IN, R_INV_IN);         // z^2
      5'd1: ins = ui(OP_MUL, R_IT,   R_I2,  R_I2, 1);             // z^8
      5'd2: ins = ui(OP_MUL, R_I9,   R_IT,  R_INV_IN);            // z^9
      5'd3: ins = ui(OP_MUL, R_I11,  R_I9,  R_I2);                // z^11
      5'd4: ins = ui(OP_MUL, R_IT,   R_I11, R_I11);               // z^22
      5'd5: ins = ui(OP_MUL, R_I5,   R_IT,  R_I9);                // z^(2^5-1)
      5'd6: ins = ui(OP_MUL, R_IT,   R_I5,  R_I5, 4);
      5'd7: ins = ui(OP_MUL, R_I10,  R_IT,  R_I5);                // z^(2^10-1)
      5'd8: ins = ui(OP_MUL, R_IT,   R_I10, R_I10, 9);
      5'd9: ins = ui(OP_MUL, R_I20,  R_IT,  R_I10);               // z^(2^20-1)
      5'd10: ins = ui(OP_MUL, R_IT,   R_I20, R_I20, 19);
      5'd11: ins = ui(OP_MUL, R_IT,   R_IT,  R_I20);               // z^(2^40-1)
      5'd12: ins = ui(OP_MUL, R_IT,   R_IT,  R_IT, 9);
      5'd13: ins = ui(OP_MUL, R_I50,  R_IT,  R_I10);               // z^(2^50-1)
      5'd14: ins = ui(OP_MUL, R_IT,   R_I50, R_I50, 49);
      5'd15: ins = ui(OP_MUL, R_I100, R_IT,  R_I50);               // z^(2^100-1)
      5'd16: ins = ui(OP_MUL, R_IT,   R_I100, R_I100, 99);
      5'd17: ins = ui(OP_MUL, R_IT,   R_IT,  R_I100);              // z^(2^200-1)
      5'd18: ins = ui(OP_MUL, R_IT,   R_IT,  R_IT, 49);
      5'd19: ins = ui(OP_MUL, R_IT,   R_IT,  R_I50);               // z^(2^250-1)
      5'd20: ins = ui(OP_MUL, R_IT,   R_IT,  R_IT, 4);
      5'd21: ins = ui(OP_MUL, R_INV_OUT, R_IT, R_I11, 0, 1'b0, 1'b1); // z^(2^255-21)
      default: ins = ui(OP_NOP, 5'd0, 5'd0, 5'd0, 0, 1'b0, 1'b1);
    endcase
  end

endmodule
