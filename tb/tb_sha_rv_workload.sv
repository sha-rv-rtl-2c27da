// Block-count sweep of SHA-RV at its default sizes.
//
// Runs the sweep of message-block counts N = 1, 4, 16, 64 and 256 through the
// whole accelerator in each of the four modes: SHA-256 and SHA-224 in
// long-message mode (the blocks of a session are one chained message) and in
// short-message mode (every block hashed on its own), 1364 random blocks in all.  For each session the host (this testbench)
// writes IV, K and N random blocks into data memory at word 0 following the
// BufferSet map, loads a six-instruction program (set r8 and r20, latch base and
// amount, set the block count, SHA instruction with rs1 = N, EBREAK), pulses
// start and waits for done.
// Every digest is compared with a plain reference model, and the cycles the
// SHA instruction waits for the controller's done are compared with the
// cycle model of this RTL:
//   long : P + 284 N             (16 copy + 259 compute + 8 write-back + 1 per block)
//   short: P + sum over batches of (25 b + 259), batches of up to four blocks
// where P is 72 when IV and K are staged and 1 when they are already in the
// BufferSet (every session of a sweep after its first).  The published cycle
// model is 282 N + 72 for long and 290 N + 72 for short messages; both are
// printed next to the measured counts for comparison.
module tb_sha_rv_workload;
  import sha_rv_pkg::*;
  import sha_ref_pkg::*;

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

  function automatic word_t addi(int rd, int rs1, int imm);
    return {12'(imm), 5'(rs1), 3'd0, 5'(rd), OPC_OPIMM};
  endfunction
  function automatic word_t custom(logic [6:0] op, int f3, int rs1, int rs2);
    return {7'd0, 5'(rs2), 5'(rs1), 3'(f3), 5'd0, op};
  endfunction
  localparam word_t EBREAK = 32'h00100073;

  task automatic im_write(int a, word_t d);
    @(negedge clk); im_we = 1; im_addr = 10'(a); im_wdata = d;
    @(negedge clk); im_we = 0;
  endtask
  task automatic dm_write(int a, word_t d);
    @(negedge clk); dm_en = 1; dm_we = 1; dm_addr = 13'(a); dm_wdata = d;
    @(negedge clk); dm_en = 0; dm_we = 0;
  endtask
  task automatic dm_read(int a, output word_t d);
    @(negedge clk); dm_en = 1; dm_we = 0; dm_addr = 13'(a);
    @(negedge clk); dm_en = 0; d = dm_rdata;
  endtask

  // cycles of one session: SHA instruction waiting and done_sha still low
  int busy_cycles = 0;
  always_ff @(posedge clk)
    if (dut.u_ctrl.start_sha && !dut.u_ctrl.done_sha) busy_cycles <= busy_cycles + 1;

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_session(bit is_long, bit is256, int n, bit first);
    block_t blk [];
    state_t h, iv;
    word_t d;
    int expect_cyc, left, b, paper, c0, ndig;
    logic [2:0] mode;
    mode  = {1'b0, is_long, is256};
    ndig  = is256 ? 8 : 7;
    iv = iv_of(is256);
    blk = new[n];
    for (int i = 0; i < 8; i++)  dm_write(i, iv[i]);
    for (int i = 0; i < 64; i++) dm_write(8 + i, K_TABLE[i]);
    for (int k = 0; k < n; k++) begin
      blk[k] = rand_block();
      for (int i = 0; i < 16; i++)
        dm_write((is_long ? 80 + 16*k : 72 + 24*k) + i, blk[k][i]);
    end
    im_write(0, addi(8, 0, 0));                 // r8  = DMEM base (word 0)
    im_write(1, addi(20, 0, 0));                // r20 = burst amount (unused here)
    im_write(2, addi(5, 0, n));                 // r5  = number of blocks
    im_write(3, custom(OPC_BUF, int'(F3_BUF_LATCH), 8, 20));
    im_write(4, custom(OPC_SHA, int'(mode), 5, 0));
    im_write(5, EBREAK);

    c0 = busy_cycles;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);

    // digests
    if (is_long) begin
      h = iv;
      for (int k = 0; k < n; k++) h = ref_compress(h, blk[k]);
      for (int i = 0; i < ndig; i++) begin
        dm_read(72 + i, d); checks++;
        if (d !== h[i]) begin failures++; $display("long N=%0d word %0d: %h expected %h", n, i, d, h[i]); end
      end
    end else begin
      for (int k = 0; k < n; k++) begin
        h = ref_compress(iv, blk[k]);
        for (int i = 0; i < ndig; i++) begin
          dm_read(88 + 24*k + i, d); checks++;
          if (d !== h[i]) begin failures++; $display("short N=%0d block %0d word %0d: %h expected %h", n, k, i, d, h[i]); end
        end
      end
    end

    // cycles
    expect_cyc = first ? 72 : 1;
    if (is_long) expect_cyc += 284 * n;
    else begin
      left = n;
      while (left > 0) begin
        b = (left > 4) ? 4 : left;
        expect_cyc += 25 * b + 259;
        left -= b;
      end
    end
    paper = is_long ? 282 * n + 72 : 290 * n + 72;
    $display("SHA-%0d %s N=%0d: %0d cycles (model %0d, published %0d)",
             is256 ? 256 : 224, is_long ? "long " : "short", n, busy_cycles - c0, expect_cyc, paper);
    checks++;
    if (busy_cycles - c0 != expect_cyc) begin failures++; $display("cycle count mismatch"); end
  endtask

  initial begin
    static int sizes [5] = '{1, 4, 16, 64, 256};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // the four modes in turn; the hash variant changes between sweeps, so the
    // first session of each sweep stages IV and K again
    for (int s = 0; s < 5; s++) run_session(1, 1, sizes[s], s == 0);
    for (int s = 0; s < 5; s++) run_session(0, 0, sizes[s], s == 0);
    for (int s = 0; s < 5; s++) run_session(0, 1, sizes[s], s == 0);
    for (int s = 0; s < 5; s++) run_session(1, 0, sizes[s], s == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
