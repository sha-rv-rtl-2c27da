// RV32I arithmetic-logic unit of the host core's EXE stage.
//
// Purely combinational: `y` = `a` op `b` for the ten RV32I register operations
// plus a pass-through of `b` used by LUI.  Shifts use b[4:0]; SLT/SLTU return 0/1.
// The ALU is only named in the published design; this is a standard RV32I ALU.
module rv_alu
  import sha_rv_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  always_comb begin
    unique case (op)
      ALU_ADD:    y = a + b;
      ALU_SUB:    y = a - b;
      ALU_SLL:    y = a << b[4:0];
      ALU_SLT:    y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU:   y = {31'd0, a < b};
      ALU_XOR:    y = a ^ b;
      ALU_SRL:    y = a >> b[4:0];
      ALU_SRA:    y = word_t'($signed(a) >>> b[4:0]);
      ALU_OR:     y = a | b;
      ALU_AND:    y = a & b;
      ALU_PASS_B: y = b;
      default:    y = a + b;
    endcase
  end

endmodule
