// End-to-end testbench of SHA-RV at its default sizes.
//
// Acts as the host: loads a RISC-V program into instruction memory and message
// data into the two halves of data memory (First = word 0, Last = word 4096),
// pulses start and waits for done.  The program runs five SHA sessions that
// alternate between the halves (SHA-256 long x3 on First, SHA-224 short x5 on
// Last, SHA-224 long x2 on First, SHA-256 short x2 twice on Last), two
// BufferSet bursts to and from memory, and a small loop with a store, a load
// and a dependent add.  While the core works on one half, the host reads the
// results of the previous session from the other half and writes the next
// input there (double buffering).  All digests are checked against a plain
// reference model, and every mechanism of the design is counted and must occur.
module tb_sha_rv_top;
  import sha_rv_pkg::*;
  import sha_ref_pkg::*;

  localparam int FIRST = 0, LAST = 4096;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic im_we = 0;
  logic [9:0] im_addr;
  word_t im_wdata;
  logic dm_en = 0, dm_we = 0;
  logic [12:0] dm_addr;
  word_t dm_wdata, dm_rdata;
  sha_state_e sha_state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha_rv_top dut (.*);

  // ---------------- instruction encoders ----------------
  function automatic word_t i_type(int imm, int rs1, int f3, int rd, logic [6:0] op);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), op};
  endfunction
  function automatic word_t addi(int rd, int rs1, int imm); return i_type(imm, rs1, 0, rd, OPC_OPIMM); endfunction
  function automatic word_t lw(int rd, int rs1, int imm);   return i_type(imm, rs1, 2, rd, OPC_LOAD); endfunction
  function automatic word_t lui(int rd, int imm20);         return {20'(imm20), 5'(rd), OPC_LUI}; endfunction
  function automatic word_t add(int rd, int rs1, int rs2);  return {7'd0, 5'(rs2), 5'(rs1), 3'd0, 5'(rd), OPC_OP}; endfunction
  function automatic word_t sw(int rs2, int rs1, int imm);
    logic [11:0] i; i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'd2, i[4:0], OPC_STORE};
  endfunction
  function automatic word_t bne(int rs1, int rs2, int off);
    logic [12:0] i; i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), 3'd1, i[4:1], i[11], OPC_BRANCH};
  endfunction
  function automatic word_t custom(logic [6:0] op, int f3, int rs1, int rs2);
    return {7'd0, 5'(rs2), 5'(rs1), 3'(f3), 5'd0, op};
  endfunction
  localparam word_t EBREAK = 32'h00100073;

  // ---------------- host memory access ----------------
  task automatic dm_write(int a, word_t d);
    @(negedge clk); dm_en = 1; dm_we = 1; dm_addr = 13'(a); dm_wdata = d;
    @(negedge clk); dm_en = 0; dm_we = 0;
  endtask
  task automatic dm_read(int a, output word_t d);
    @(negedge clk); dm_en = 1; dm_we = 0; dm_addr = 13'(a);
    @(negedge clk); dm_en = 0; d = dm_rdata;
  endtask
  task automatic place_iv_k(int base, bit is256);
    state_t iv;
    iv = iv_of(is256);
    for (int i = 0; i < 8; i++)  dm_write(base + i, iv[i]);
    for (int i = 0; i < 64; i++) dm_write(base + 8 + i, K_TABLE[i]);
  endtask
  task automatic place_block(int addr, block_t b);
    for (int i = 0; i < 16; i++) dm_write(addr + i, b[i]);
  endtask
  task automatic check_words(int addr, state_t e, int n, string what);
    word_t d;
    for (int i = 0; i < n; i++) begin
      dm_read(addr + i, d);
      checks++;
      if (d !== e[i]) begin failures++; $display("%s word %0d: %h expected %h", what, i, d, e[i]); end
    end
  endtask

  // ---------------- mechanism counters ----------------
  int sess_started = 0, sess_finished = 0;
  int n_mode [4];
  int n_load_use = 0, n_branch = 0, n_fwd = 0, n_latch = 0, n_bufw = 0, n_bufr = 0;
  int n_batch = 0, n_chain = 0, n_prep_load = 0, n_prep_skip = 0, n_overlap = 0, n_custom_stall = 0;
  sha_state_e prev_state = ST_IDLE;

  always_ff @(posedge clk) if (rst_n) begin
    prev_state <= sha_state;
    if (prev_state == ST_IDLE && sha_state == ST_PREP) begin
      sess_started <= sess_started + 1;
      n_mode[dut.u_ctrl.mode_q[1:0]] <= n_mode[dut.u_ctrl.mode_q[1:0]] + 1;
    end
    if (prev_state == ST_DONE && sha_state == ST_IDLE) sess_finished <= sess_finished + 1;
    if (sha_state == ST_PREP && dut.u_ctrl.dm_en && dut.u_ctrl.cnt == 7'd71) n_prep_load <= n_prep_load + 1;
    if (sha_state == ST_PREP && !dut.u_ctrl.dm_en) n_prep_skip <= n_prep_skip + 1;
    if (dut.u_sha.start && dut.u_sha.n_cases > 3'd1) n_batch <= n_batch + 1;
    if (dut.u_sha.start && dut.u_ctrl.is_long && dut.u_ctrl.blk_idx != 16'd0) n_chain <= n_chain + 1;
    if (dut.u_cpu.load_use && !dut.u_cpu.ex_stall) n_load_use <= n_load_use + 1;
    if (dut.u_cpu.redirect && dut.u_cpu.ex_ctrl.is_branch) n_branch <= n_branch + 1;
    if (dut.u_cpu.ex_valid && dut.u_cpu.ex_rs1 != 0 && dut.u_cpu.fwd_a != dut.u_cpu.ex_rs1v) n_fwd <= n_fwd + 1;
    if (dut.buf_latch) n_latch <= n_latch + 1;
    if (dut.buf_req && dut.u_xfer.st == 0 && !dut.buf_dir) n_bufw <= n_bufw + 1;
    if (dut.buf_req && dut.u_xfer.st == 0 &&  dut.buf_dir) n_bufr <= n_bufr + 1;
    if (dut.u_cpu.ex_stall) n_custom_stall <= n_custom_stall + 1;
    if (dm_en && dm_we && sha_state == ST_EXEC) n_overlap <= n_overlap + 1;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  word_t prog [$];
  block_t b1 [3], b2 [5], b3 [2], b4 [2], bx;

  initial begin
    state_t h, e;
    word_t d;
    time t0;

    prog = '{
      addi(8, 0, 0), addi(20, 0, 0), custom(OPC_BUF, 0, 8, 20),          // base = First
      addi(5, 0, 3), custom(OPC_SHA, 3, 5, 0),                           // SHA-256 long x3
      addi(8, 0, 1024), addi(8, 8, 1024),                                // base = word 2048
      addi(20, 0, 80), custom(OPC_BUF, 0, 8, 20),                        // 80 words
      custom(OPC_BUF, 2, 0, 0),                                          // BufferSet -> DMEM
      lui(8, 1), custom(OPC_BUF, 0, 8, 20),                              // base = Last (word 4096)
      addi(5, 0, 5), custom(OPC_SHA, 0, 5, 0),                           // SHA-224 short x5
      addi(8, 0, 0), custom(OPC_BUF, 0, 8, 20),                          // base = First
      addi(5, 0, 2), custom(OPC_SHA, 2, 5, 0),                           // SHA-224 long x2
      lui(8, 1), custom(OPC_BUF, 0, 8, 20),                              // base = Last
      addi(5, 0, 2), custom(OPC_SHA, 1, 5, 0), custom(OPC_SHA, 1, 5, 0), // SHA-256 short x2, twice
      lui(8, 1), addi(8, 8, 1024), addi(8, 8, 1024),                     // base = word 6144
      addi(20, 0, 96), custom(OPC_BUF, 0, 8, 20),                        // 96 words
      custom(OPC_BUF, 1, 0, 0),                                          // DMEM -> BufferSet
      lui(8, 2), addi(8, 8, -1024),                                      // base = word 7168
      custom(OPC_BUF, 0, 8, 20), custom(OPC_BUF, 2, 0, 0),               // BufferSet -> DMEM
      addi(10, 0, 0), addi(11, 0, 10),
      add(10, 10, 11), addi(11, 11, -1), bne(11, 0, -8),                 // sum 10..1
      lui(12, 7), addi(12, 12, 1024), sw(10, 12, 0), lw(13, 12, 0),
      add(14, 13, 13), sw(14, 12, 4),
      EBREAK
    };

    for (int i = 0; i < 3; i++) b1[i] = rand_block();
    for (int i = 0; i < 5; i++) b2[i] = (i == 2) ? abc_block() : rand_block();
    for (int i = 0; i < 2; i++) begin b3[i] = rand_block(); b4[i] = rand_block(); end
    bx = rand_block();

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); im_we = 1; im_addr = 10'(i); im_wdata = prog[i];
    end
    @(negedge clk); im_we = 0;

    // WRITE First (session 1) and the burst source region
    place_iv_k(FIRST, 1);
    for (int b = 0; b < 3; b++) place_block(FIRST + 80 + 16*b, b1[b]);
    place_iv_k(6144, 1);
    place_block(6144 + 80, bx);

    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t0 = $time;

    // WRITE Last while the core executes First
    wait (sess_started == 1 && sha_state == ST_EXEC);
    place_iv_k(LAST, 0);
    for (int b = 0; b < 5; b++) place_block(LAST + 72 + 24*b, b2[b]);

    // READ First after session 1, then WRITE First while the core executes Last
    wait (sess_finished == 1);
    h = iv_of(1);
    for (int b = 0; b < 3; b++) h = ref_compress(h, b1[b]);
    check_words(FIRST + 72, h, 8, "SHA-256 long");
    wait (sess_started == 2 && sha_state == ST_EXEC);
    place_iv_k(FIRST, 0);
    for (int b = 0; b < 2; b++) place_block(FIRST + 80 + 16*b, b3[b]);

    // READ Last after session 2, then WRITE Last while the core executes First
    wait (sess_finished == 2);
    for (int b = 0; b < 5; b++) begin
      e = ref_compress(iv_of(0), b2[b]);
      check_words(LAST + 72 + 24*b + 16, e, 7, "SHA-224 short");
    end
    dm_read(LAST + 72 + 48 + 16, d);
    checks++; if (d !== 32'h23097d22) failures++;
    wait (sess_started == 3 && sha_state == ST_EXEC);
    place_iv_k(LAST, 1);
    for (int b = 0; b < 2; b++) place_block(LAST + 72 + 24*b, b4[b]);

    wait (done);
    $display("program finished after %0d cycles", ($time - t0) / 10);
    h = iv_of(0);
    for (int b = 0; b < 2; b++) h = ref_compress(h, b3[b]);
    check_words(FIRST + 72, h, 7, "SHA-224 long");
    for (int b = 0; b < 2; b++) begin
      e = ref_compress(iv_of(1), b4[b]);
      check_words(LAST + 72 + 24*b + 16, e, 8, "SHA-256 short");
    end
    // BufferSet read-back after session 1: IV, K and the digest
    h = iv_of(1);
    for (int b = 0; b < 3; b++) h = ref_compress(h, b1[b]);
    check_words(2048 + 72, h, 8, "BufferSet copy digest");
    dm_read(2048 + 8 + 63, d); checks++; if (d !== K_TABLE[63]) failures++;
    // DMEM -> BufferSet -> DMEM round trip of 96 words
    for (int i = 0; i < 96; i++) begin
      word_t s;
      dm_read(6144 + i, s); dm_read(7168 + i, d);
      checks++; if (d !== s) failures++;
    end
    // CPU loop, store, load and dependent add
    dm_read(7424, d); checks++; if (d !== 32'd55)  begin failures++; $display("sum %0d", d); end
    dm_read(7425, d); checks++; if (d !== 32'd110) begin failures++; $display("double %0d", d); end

    // every mechanism must have happened
    $display("sessions=%0d modes=%0d/%0d/%0d/%0d batch=%0d chain=%0d prep_load=%0d prep_skip=%0d",
             sess_finished, n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_batch, n_chain, n_prep_load, n_prep_skip);
    $display("latch=%0d bufw=%0d bufr=%0d custom_stall=%0d load_use=%0d branch=%0d fwd=%0d overlap=%0d",
             n_latch, n_bufw, n_bufr, n_custom_stall, n_load_use, n_branch, n_fwd, n_overlap);
    for (int m = 0; m < 4; m++) begin checks++; if (n_mode[m] == 0) failures++; end
    checks++; if (sess_finished != 5) failures++;
    checks++; if (n_batch == 0) failures++;
    checks++; if (n_chain == 0) failures++;
    checks++; if (n_prep_load == 0) failures++;
    checks++; if (n_prep_skip == 0) failures++;
    checks++; if (n_latch == 0) failures++;
    checks++; if (n_bufw == 0) failures++;
    checks++; if (n_bufr == 0) failures++;
    checks++; if (n_custom_stall == 0) failures++;
    checks++; if (n_load_use == 0) failures++;
    checks++; if (n_branch == 0) failures++;
    checks++; if (n_fwd == 0) failures++;
    checks++; if (n_overlap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
