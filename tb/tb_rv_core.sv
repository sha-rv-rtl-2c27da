// Testbench of the five-stage host pipeline with behavioural memories and
// behavioural responders for the burst engine and the SHA controller.  Checks
// ALU, LUI/AUIPC, JAL/JALR, taken and untaken branches, forwarding from MEM and
// WB, the load-use stall, word, half-word and byte loads and stores, the
// operands and timing of the custom instructions (the pipeline waits for the
// four-phase handshakes, also for two custom instructions back to back), and
// one instruction per cycle on a straight-line sequence.
module tb_rv_core;
  import sha_rv_pkg::*;

  logic clk = 0, rst_n = 0, run = 0, halted;
  logic [9:0] im_addr;
  word_t im_rdata;
  logic dm_en, dm_we;
  logic [3:0] dm_be;
  logic [12:0] dm_addr;
  word_t dm_wdata, dm_rdata;
  logic buf_latch, buf_req, buf_dir, buf_ack;
  word_t buf_base, buf_amount;
  logic sha_start, sha_done;
  logic [2:0] sha_mode;
  logic [15:0] sha_nblocks;
  word_t imem [1024];
  word_t dmem [8192];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rv_core dut (.*);

  assign im_rdata = imem[im_addr];
  assign dm_rdata = dmem[dm_addr];
  always_ff @(posedge clk)
    for (int i = 0; i < 4; i++)
      if (dm_en && dm_we && dm_be[i]) dmem[dm_addr][8*i +: 8] <= dm_wdata[8*i +: 8];

  // burst engine responder: ack 5 cycles after req, held until req falls
  int buf_cnt = 0, n_bufreq = 0;
  logic buf_ack_q = 0;
  assign buf_ack = buf_ack_q;
  always_ff @(posedge clk) begin
    if (buf_req && !buf_ack_q) begin
      buf_cnt <= buf_cnt + 1;
      if (buf_cnt == 4) begin buf_ack_q <= 1; n_bufreq <= n_bufreq + 1; end
    end else if (!buf_req && buf_ack_q) begin
      buf_ack_q <= 0; buf_cnt <= 0;
    end
  end

  // SHA controller responder: done 20 cycles after start, held until start falls
  int sha_cnt = 0, n_sha = 0;
  logic sha_done_q = 0;
  logic [2:0] last_mode;
  logic [15:0] last_nblk;
  assign sha_done = sha_done_q;
  always_ff @(posedge clk) begin
    if (sha_start && !sha_done_q) begin
      sha_cnt <= sha_cnt + 1;
      last_mode <= sha_mode; last_nblk <= sha_nblocks;
      if (sha_cnt == 19) begin sha_done_q <= 1; n_sha <= n_sha + 1; end
    end else if (!sha_start && sha_done_q) begin
      sha_done_q <= 0; sha_cnt <= 0;
    end
  end

  word_t latched_base [$], latched_amt [$];
  always_ff @(posedge clk) if (buf_latch) begin
    latched_base.push_back(buf_base); latched_amt.push_back(buf_amount);
  end

  // encoders
  function automatic word_t i_type(int imm, int rs1, int f3, int rd, logic [6:0] op);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), op};
  endfunction
  function automatic word_t addi(int rd, int rs1, int imm); return i_type(imm, rs1, 0, rd, OPC_OPIMM); endfunction
  function automatic word_t lw(int rd, int rs1, int imm);   return i_type(imm, rs1, 2, rd, OPC_LOAD); endfunction
  function automatic word_t jalr(int rd, int rs1, int imm); return i_type(imm, rs1, 0, rd, OPC_JALR); endfunction
  function automatic word_t lui(int rd, int imm20);         return {20'(imm20), 5'(rd), OPC_LUI}; endfunction
  function automatic word_t auipc(int rd, int imm20);       return {20'(imm20), 5'(rd), OPC_AUIPC}; endfunction
  function automatic word_t rop(int f7, int f3, int rd, int rs1, int rs2);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), OPC_OP};
  endfunction
  function automatic word_t st(int f3, int rs2, int rs1, int imm);
    logic [11:0] i; i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:0], OPC_STORE};
  endfunction
  function automatic word_t sw(int rs2, int rs1, int imm); return st(2, rs2, rs1, imm); endfunction
  function automatic word_t ld(int f3, int rd, int rs1, int imm); return i_type(imm, rs1, f3, rd, OPC_LOAD); endfunction
  function automatic word_t br(int f3, int rs1, int rs2, int off);
    logic [12:0] i; i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:1], i[11], OPC_BRANCH};
  endfunction
  function automatic word_t jal(int rd, int off);
    logic [20:0] i; i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), OPC_JAL};
  endfunction
  function automatic word_t custom(logic [6:0] op, int f3, int rs1, int rs2);
    return {7'd0, 5'(rs2), 5'(rs1), 3'(f3), 5'd0, op};
  endfunction

  task automatic run_prog(word_t p [$], output int cycles);
    for (int i = 0; i < 1024; i++) imem[i] = (i < p.size()) ? p[i] : 32'h00100073;
    @(negedge clk); run = 1; cycles = 0;
    while (!halted) begin @(negedge clk); cycles++; end
    run = 0;
    @(negedge clk);
  endtask

  task automatic chk(int addr, word_t e, string what);
    checks++;
    if (dmem[addr] !== e) begin failures++; $display("%s: dmem[%0d] = %h expected %h", what, addr, dmem[addr], e); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t p [$];
    int cyc;
    for (int i = 0; i < 8192; i++) dmem[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;

    // ---- program 1: ALU, forwarding, branches, jumps, memory ----
    p = '{
      addi(1, 0, 100),            // 0  x1 = 100
      addi(2, 1, -30),            // 4  x2 = 70       (MEM forward)
      rop(32, 0, 3, 1, 2),        // 8  x3 = 30 sub   (MEM + WB forward)
      rop(0, 4, 4, 1, 2),         // 12 x4 = 100^70
      lui(5, 32'h12345),          // 16 x5 = 0x12345000
      addi(5, 5, 32'h678),        // 20 x5 = 0x12345678
      sw(5, 0, 0),                // 24 dmem[0]
      lw(6, 0, 0),                // 28 x6 = dmem[0]
      addi(7, 6, 1),              // 32 load-use
      sw(7, 0, 4),                // 36 dmem[1] = 0x12345679
      addi(8, 0, 0),              // 40 x8 = 0 (loop count)
      addi(9, 0, 5),              // 44 x9 = 5
      addi(8, 8, 3),              // 48 loop: x8 += 3
      addi(9, 9, -1),             // 52
      br(1, 9, 0, -8),            // 56 bne x9,x0 -> 48
      sw(8, 0, 8),                // 60 dmem[2] = 15
      br(0, 8, 0, 8),             // 64 beq x8,x0 (not taken)
      jal(10, 12),                // 68 x10 = 72, jump to 80
      addi(8, 0, 999),            // 72 skipped
      addi(8, 0, 998),            // 76 skipped
      sw(8, 0, 12),               // 80 dmem[3] = 15
      sw(10, 0, 16),              // 84 dmem[4] = 72
      auipc(11, 0),               // 88 x11 = 88
      jalr(12, 11, 16),           // 92 x12 = 96, jump to 104
      addi(8, 0, 7),              // 96 skipped
      addi(8, 0, 7),              // 100 skipped
      sw(11, 0, 20),              // 104 dmem[5] = 88
      sw(12, 0, 24),              // 108 dmem[6] = 96
      rop(0, 3, 13, 3, 1),        // 112 sltu x13 = (30 < 100)
      sw(13, 0, 28),              // 116 dmem[7] = 1
      sw(3, 0, 32),               // 120 dmem[8] = 30
      sw(4, 0, 36),               // 124 dmem[9] = 100^70
      32'h00100073
    };
    run_prog(p, cyc);
    chk(0, 32'h12345678, "lui/addi/sw");
    chk(1, 32'h12345679, "load-use");
    chk(2, 15, "loop");
    chk(3, 15, "jal skip");
    chk(4, 72, "jal link");
    chk(5, 88, "auipc");
    chk(6, 96, "jalr link");
    chk(7, 1, "sltu");
    chk(8, 30, "sub forward");
    chk(9, 100 ^ 70, "xor");

    // ---- program 2: custom instructions ----
    p = '{
      lui(8, 4),                   // x8 = 16384
      addi(20, 0, 80),             // x20 = 80 (MEM forward into the latch)
      custom(OPC_BUF, 0, 8, 20),   // latch
      custom(OPC_BUF, 1, 0, 0),    // write burst
      custom(OPC_BUF, 2, 0, 0),    // read burst (back to back)
      addi(5, 0, 3),
      custom(OPC_SHA, 3, 5, 0),    // SHA-256 long, 3 blocks
      custom(OPC_SHA, 0, 5, 0),    // SHA-224 short, back to back
      addi(6, 0, 42),
      sw(6, 0, 40),                // runs only after both SHA sessions
      32'h00100073
    };
    run_prog(p, cyc);
    checks++; if (latched_base.size() != 1 || latched_base[0] !== 32'd16384 || latched_amt[0] !== 32'd80) failures++;
    checks++; if (n_bufreq != 2) begin failures++; $display("bursts %0d", n_bufreq); end
    checks++; if (n_sha != 2) begin failures++; $display("sha %0d", n_sha); end
    checks++; if (last_mode !== 3'd0 || last_nblk !== 16'd3) failures++;
    chk(10, 42, "after custom");
    // 11 instructions, 2 bursts of ~6 cycles and 2 SHA sessions of ~21 cycles
    checks++; if (cyc < 2 * 20 + 2 * 5 + 11 || cyc > 100) begin failures++; $display("custom program %0d cycles", cyc); end

    // ---- program 3: one instruction per cycle (EBREAK at index 51 reaches WB 4 cycles later) ----
    p.delete();
    for (int i = 0; i < 50; i++) p.push_back(addi(1, 1, 1));
    p.push_back(sw(1, 0, 44));
    p.push_back(32'h00100073);
    run_prog(p, cyc);
    chk(11, 50 + 100, "straight line");   // x1 kept 100 from program 1
    checks++; if (cyc != 51 + 4) begin failures++; $display("straight line %0d cycles", cyc); end

    // ---- program 4: byte and half-word loads and stores ----
    p = '{
      lui(1, 32'h89abc),          // x1 = 0x89abc000
      addi(1, 1, 32'h7ef),        // x1 = 0x89abc7ef
      sw(1, 0, 48),               // dmem[12] = 0x89abc7ef
      ld(0, 2, 0, 48),            // lb  x2 = 0xffffffef
      ld(4, 3, 0, 49),            // lbu x3 = 0x000000c7
      ld(1, 4, 0, 50),            // lh  x4 = 0xffff89ab
      ld(5, 5, 0, 48),            // lhu x5 = 0x0000c7ef
      sw(2, 0, 52), sw(3, 0, 56), sw(4, 0, 60), sw(5, 0, 64),
      addi(6, 0, 32'h55),
      st(0, 6, 0, 70),            // sb: dmem[17] byte 2
      st(1, 1, 0, 74),            // sh: dmem[18] upper half
      ld(0, 7, 0, 70),            // lb of the byte just stored
      sw(7, 0, 76),
      32'h00100073
    };
    dmem[17] = 32'h11223344; dmem[18] = 32'h11223344;
    run_prog(p, cyc);
    chk(12, 32'h89abc7ef, "sw");
    chk(13, 32'hffffffef, "lb");
    chk(14, 32'h000000c7, "lbu");
    chk(15, 32'hffff89ab, "lh");
    chk(16, 32'h0000c7ef, "lhu");
    chk(17, 32'h11553344, "sb");
    chk(18, 32'hc7ef3344, "sh");
    chk(19, 32'h00000055, "lb after sb");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
