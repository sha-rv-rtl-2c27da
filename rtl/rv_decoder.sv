// Basic controller: RV32I instruction decoder of the host core's ID stage.
//
// Combinational.  Turns a 32-bit instruction into the control word `ctrl` (which
// unit is used, whether rd is written, ALU operation and operand sources) and the
// sign-extended immediate `imm`.  Supported: LUI, AUIPC, JAL, JALR, the six
// branches, LB/LH/LW/LBU/LHU, SB/SH/SW, all OP-IMM and OP register operations,
// FENCE (as a no-op), ECALL/EBREAK (end of program).  CSRs are not part of this
// core.  The access size travels with funct3 to the MEM stage.  The custom SHA and buffer instructions are decoded by
// the special controller; for them this decoder reports only which source
// registers are read.  The decoder is only named in the published design.
module rv_decoder
  import sha_rv_pkg::*;
(
  input  word_t instr,
  output ctrl_t ctrl,
  output word_t imm
);

  logic [6:0] opcode;
  logic [2:0] f3;
  logic [6:0] f7;

  assign opcode = instr[6:0];
  assign f3     = instr[14:12];
  assign f7     = instr[31:25];

  function automatic alu_op_e op_of(logic [2:0] f, logic alt, logic is_reg);
    unique case (f)
      3'b000: return (alt && is_reg) ? ALU_SUB : ALU_ADD;
      3'b001: return ALU_SLL;
      3'b010: return ALU_SLT;
      3'b011: return ALU_SLTU;
      3'b100: return ALU_XOR;
      3'b101: return alt ? ALU_SRA : ALU_SRL;
      3'b110: return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    ctrl = '0;
    ctrl.alu_op = ALU_ADD;
    imm  = '0;
    unique case (opcode)
      OPC_LUI: begin
        ctrl = '{valid_op: 1'b1, reg_we: 1'b1, alu_op: ALU_PASS_B, src_b_imm: 1'b1, default: '0};
        imm  = {instr[31:12], 12'd0};
      end
      OPC_AUIPC: begin
        ctrl = '{valid_op: 1'b1, reg_we: 1'b1, alu_op: ALU_ADD, src_a_pc: 1'b1, src_b_imm: 1'b1, default: '0};
        imm  = {instr[31:12], 12'd0};
      end
      OPC_JAL: begin
        ctrl = '{valid_op: 1'b1, reg_we: 1'b1, is_jal: 1'b1, alu_op: ALU_ADD, default: '0};
        imm  = {{12{instr[31]}}, instr[19:12], instr[20], instr[30:21], 1'b0};
      end
      OPC_JALR: begin
        ctrl = '{valid_op: 1'b1, reg_we: 1'b1, is_jalr: 1'b1, uses_rs1: 1'b1, alu_op: ALU_ADD, default: '0};
        imm  = {{20{instr[31]}}, instr[31:20]};
      end
      OPC_BRANCH: begin
        ctrl = '{valid_op: 1'b1, is_branch: 1'b1, uses_rs1: 1'b1, uses_rs2: 1'b1, alu_op: ALU_ADD, default: '0};
        imm  = {{20{instr[31]}}, instr[7], instr[30:25], instr[11:8], 1'b0};
      end
      OPC_LOAD: if (f3 inside {3'b000, 3'b001, 3'b010, 3'b100, 3'b101}) begin
        ctrl = '{valid_op: 1'b1, reg_we: 1'b1, mem_re: 1'b1, src_b_imm: 1'b1, uses_rs1: 1'b1, alu_op: ALU_ADD, default: '0};
        imm  = {{20{instr[31]}}, instr[31:20]};
      end
      OPC_STORE: if (f3 inside {3'b000, 3'b001, 3'b010}) begin
        ctrl = '{valid_op: 1'b1, mem_we: 1'b1, src_b_imm: 1'b1, uses_rs1: 1'b1, uses_rs2: 1'b1, alu_op: ALU_ADD, default: '0};
        imm  = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      end
      OPC_OPIMM: begin
        ctrl = '{valid_op: 1'b1, reg_we: 1'b1, src_b_imm: 1'b1, uses_rs1: 1'b1,
                 alu_op: op_of(f3, instr[30], 1'b0), default: '0};
        imm  = {{20{instr[31]}}, instr[31:20]};
      end
      OPC_OP: begin
        ctrl = '{valid_op: 1'b1, reg_we: 1'b1, uses_rs1: 1'b1, uses_rs2: 1'b1,
                 alu_op: op_of(f3, f7[5], 1'b1), default: '0};
      end
      OPC_FENCE:  ctrl = '{valid_op: 1'b1, alu_op: ALU_ADD, default: '0};
      OPC_SYSTEM: ctrl = '{valid_op: 1'b1, is_halt: (f3 == 3'b000), alu_op: ALU_ADD, default: '0};
      OPC_BUF, OPC_SHA: ctrl = '{valid_op: 1'b1, uses_rs1: 1'b1, uses_rs2: 1'b1, alu_op: ALU_ADD, default: '0};
      default: ;
    endcase
  end

endmodule
