// Testbench of the RV32I decoder: a table of hand-encoded instructions with the
// control bits and immediates they must produce.
module tb_rv_decoder;
  import sha_rv_pkg::*;

  word_t instr, imm;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  rv_decoder dut (.*);

  task automatic expect_dec(word_t i, logic we, logic re, logic wr, alu_op_e op, logic bimm,
                            logic br, logic jal, logic jalr, logic halt, word_t im, logic chk_imm);
    instr = i; #1;
    checks++;
    if (!ctrl.valid_op || ctrl.reg_we !== we || ctrl.mem_re !== re || ctrl.mem_we !== wr ||
        ctrl.alu_op !== op || ctrl.src_b_imm !== bimm || ctrl.is_branch !== br ||
        ctrl.is_jal !== jal || ctrl.is_jalr !== jalr || ctrl.is_halt !== halt ||
        (chk_imm && imm !== im)) begin
      failures++; $display("instr %h: ctrl %p imm %h", i, ctrl, imm);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_dec(32'hfff00093, 1, 0, 0, ALU_ADD,  1, 0, 0, 0, 0, 32'hffffffff, 1); // addi x1,x0,-1
    expect_dec(32'h12345137, 1, 0, 0, ALU_PASS_B, 1, 0, 0, 0, 0, 32'h12345000, 1); // lui x2,0x12345
    expect_dec(32'h40208133, 1, 0, 0, ALU_SUB,  0, 0, 0, 0, 0, 0, 0);          // sub x2,x1,x2
    expect_dec(32'h00208133, 1, 0, 0, ALU_ADD,  0, 0, 0, 0, 0, 0, 0);          // add
    expect_dec(32'h4020d113, 1, 0, 0, ALU_SRA,  1, 0, 0, 0, 0, 0, 0);          // srai x2,x1,2
    expect_dec(32'h0020d113, 1, 0, 0, ALU_SRL,  1, 0, 0, 0, 0, 0, 0);          // srli
    expect_dec(32'h0020a133, 1, 0, 0, ALU_SLT,  0, 0, 0, 0, 0, 0, 0);          // slt
    expect_dec(32'h0020b133, 1, 0, 0, ALU_SLTU, 0, 0, 0, 0, 0, 0, 0);          // sltu
    expect_dec(32'h0020f133, 1, 0, 0, ALU_AND,  0, 0, 0, 0, 0, 0, 0);          // and
    expect_dec(32'h0020e133, 1, 0, 0, ALU_OR,   0, 0, 0, 0, 0, 0, 0);          // or
    expect_dec(32'h0020c133, 1, 0, 0, ALU_XOR,  0, 0, 0, 0, 0, 0, 0);          // xor
    expect_dec(32'h00209133, 1, 0, 0, ALU_SLL,  0, 0, 0, 0, 0, 0, 0);          // sll
    expect_dec(32'hffc0a183, 1, 1, 0, ALU_ADD,  1, 0, 0, 0, 0, 32'hfffffffc, 1); // lw x3,-4(x1)
    expect_dec(32'h0030a423, 0, 0, 1, ALU_ADD,  1, 0, 0, 0, 0, 32'h00000008, 1); // sw x3,8(x1)
    expect_dec(32'hffc08183, 1, 1, 0, ALU_ADD,  1, 0, 0, 0, 0, 32'hfffffffc, 1); // lb x3,-4(x1)
    expect_dec(32'hffc0d183, 1, 1, 0, ALU_ADD,  1, 0, 0, 0, 0, 32'hfffffffc, 1); // lhu x3,-4(x1)
    expect_dec(32'h00308423, 0, 0, 1, ALU_ADD,  1, 0, 0, 0, 0, 32'h00000008, 1); // sb x3,8(x1)
    expect_dec(32'h00309423, 0, 0, 1, ALU_ADD,  1, 0, 0, 0, 0, 32'h00000008, 1); // sh x3,8(x1)
    expect_dec(32'hfe209ce3, 0, 0, 0, ALU_ADD,  0, 1, 0, 0, 0, 32'hfffffff8, 1); // bne x1,x2,-8
    expect_dec(32'h008000ef, 1, 0, 0, ALU_ADD,  0, 0, 1, 0, 0, 32'h00000008, 1); // jal x1,8
    expect_dec(32'h00408067, 1, 0, 0, ALU_ADD,  0, 0, 0, 1, 0, 32'h00000004, 1); // jalr x0,4(x1)
    expect_dec(32'h00100073, 0, 0, 0, ALU_ADD,  0, 0, 0, 0, 1, 0, 0);          // ebreak
    instr = 32'h00000197; #1; checks++;                                          // auipc x3,0
    if (!ctrl.src_a_pc || !ctrl.reg_we) failures++;
    instr = 32'h0140202b; #1; checks++;                                          // buffer latch x0,x20
    if (!ctrl.valid_op || ctrl.reg_we || !ctrl.uses_rs2) failures++;
    instr = 32'h0000107f; #1; checks++;                                          // unknown opcode
    if (ctrl.valid_op || ctrl.reg_we || ctrl.mem_we) failures++;
    instr = 32'hffc0b183; #1; checks++;                                          // ld (RV64 only)
    if (ctrl.valid_op || ctrl.reg_we || ctrl.mem_re) failures++;
    instr = 32'h0030b423; #1; checks++;                                          // sd (RV64 only)
    if (ctrl.valid_op || ctrl.mem_we) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
