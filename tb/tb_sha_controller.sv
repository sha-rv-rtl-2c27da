// Testbench of the SHA controller together with the BufferSet and the SHA core.
// A behavioural data memory holds the map of IV, K and message blocks.  Runs
// SHA-256 long (3 chained blocks), SHA-224 short (6 independent blocks, batched
// 4 + 2), and SHA-256 long again (IV/K staging skipped), checking the digests
// written to data memory and to the BufferSet, the state codes visited and the
// session cycle counts: 72 (PREP) + per long block 16 + 259 + 8 + 1.
module tb_sha_controller;
  import sha_rv_pkg::*;
  import sha_ref_pkg::*;

  localparam int N_IN = 4;
  localparam int DM_AW = 13;
  logic clk = 0, rst_n = 0;
  logic start_sha = 0;
  logic [2:0] mode;
  logic [15:0] n_blocks;
  logic [DM_AW-1:0] base_word;
  logic done_sha;
  sha_state_e state;
  logic dm_en, dm_we;
  logic [DM_AW-1:0] dm_addr;
  word_t dm_wdata, dm_rdata;
  logic buf_we;
  logic [7:0] buf_addr;
  word_t buf_wdata, buf_rdata;
  word_t buf_words [BUF_WORDS];
  logic core_start, core_done, core_busy;
  logic [2:0] core_ncases;
  word_t core_h [N_IN][8];
  word_t core_msg [N_IN][16];
  word_t core_k [64];
  word_t core_digest [N_IN][8];
  word_t dmem [2**DM_AW];
  int checks = 0, failures = 0;
  int seen_state [6];

  always #5 clk = ~clk;

  sha_controller #(.N_IN(N_IN), .DM_AW(DM_AW)) dut (.*);
  sha_bufferset u_buf (.clk, .we(buf_we), .waddr(buf_addr), .wdata(buf_wdata),
                       .raddr(8'd0), .rdata(buf_rdata), .words(buf_words));
  sha_core #(.N_IN(N_IN)) u_core (.clk, .rst_n, .start(core_start), .n_cases(core_ncases),
                       .h_in(core_h), .msg(core_msg), .k(core_k), .busy(core_busy),
                       .done(core_done), .digest(core_digest));

  assign dm_rdata = dmem[dm_addr];
  always_ff @(posedge clk) if (dm_en && dm_we) dmem[dm_addr] <= dm_wdata;
  always_ff @(posedge clk) if (rst_n) seen_state[int'(state)]++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic place_iv_k(int base, bit is256);
    state_t iv;
    iv = iv_of(is256);
    for (int i = 0; i < 8; i++)  dmem[base + i] = iv[i];
    for (int i = 0; i < 64; i++) dmem[base + 8 + i] = K_TABLE[i];
  endtask

  task automatic session(logic [2:0] m, int nblk, int base, output int cycles);
    mode = m; n_blocks = 16'(nblk); base_word = DM_AW'(base);
    @(negedge clk); start_sha = 1;
    cycles = 0;
    while (!done_sha) begin @(negedge clk); cycles++; end
    start_sha = 0;
    @(negedge clk);
  endtask

  initial begin
    block_t blks [8];
    state_t h, e;
    int cyc, base;
    for (int i = 0; i < 2**DM_AW; i++) dmem[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // SHA-256 long, 3 chained blocks, region at word 0
    base = 0;
    place_iv_k(base, 1);
    for (int b = 0; b < 3; b++) begin
      blks[b] = rand_block();
      for (int i = 0; i < 16; i++) dmem[base + 80 + 16*b + i] = blks[b][i];
    end
    session(SHA256_LONG, 3, base, cyc);
    h = iv_of(1);
    for (int b = 0; b < 3; b++) h = ref_compress(h, blks[b]);
    for (int i = 0; i < 8; i++) begin
      checks += 2;
      if (dmem[base + 72 + i] !== h[i]) begin failures++; $display("long dmem %0d %h vs %h", i, dmem[base+72+i], h[i]); end
      if (buf_words[72 + i] !== h[i]) failures++;
    end
    checks++;
    if (cyc != 72 + 3 * (16 + 259 + 8 + 1)) begin failures++; $display("long cycles %0d", cyc); end

    // SHA-224 short, 6 independent blocks, region at word 4096
    base = 4096;
    place_iv_k(base, 0);
    for (int b = 0; b < 6; b++) begin
      blks[b] = (b == 0) ? abc_block() : rand_block();
      for (int i = 0; i < 16; i++) dmem[base + 72 + 24*b + i] = blks[b][i];
      dmem[base + 72 + 24*b + 23] = 32'hdeadbeef;   // must survive: SHA-224 writes 7 words
    end
    session(SHA224_SHORT, 6, base, cyc);
    for (int b = 0; b < 6; b++) begin
      e = ref_compress(iv_of(0), blks[b]);
      for (int i = 0; i < 7; i++) begin
        checks++;
        if (dmem[base + 72 + 24*b + 16 + i] !== e[i]) begin failures++; $display("short blk %0d w %0d", b, i); end
      end
      checks++;
      if (dmem[base + 72 + 24*b + 23] !== 32'hdeadbeef) failures++;
    end
    checks++;
    if (dmem[base + 72 + 16] !== 32'h23097d22) failures++;     // SHA-224("abc")
    checks++;
    // batches of 4 and 2: 72 + (64+259+4-1+32+1) + (32+259+2-1+16+1)
    if (cyc != 72 + (64 + 259 + 3 + 32 + 1) + (32 + 259 + 1 + 16 + 1)) begin failures++; $display("short cycles %0d", cyc); end

    // SHA-256 long again from region 0, 1 block; IV/K staging is reloaded
    // because the variant changed; then once more with staging skipped.
    base = 0;
    blks[0] = abc_block();
    for (int i = 0; i < 16; i++) dmem[base + 80 + i] = blks[0][i];
    session(SHA256_LONG, 1, base, cyc);
    checks++;
    if (dmem[base + 72] !== 32'hba7816bf || dmem[base + 79] !== 32'hf20015ad) failures++;
    checks++;
    if (cyc != 72 + 284) begin failures++; $display("reload cycles %0d", cyc); end
    session(SHA256_LONG, 1, base, cyc);
    checks++;
    if (cyc != 1 + 284) begin failures++; $display("skip cycles %0d", cyc); end
    checks++;
    if (dmem[base + 72] !== 32'hba7816bf) failures++;

    for (int s = 0; s < 6; s++) begin
      checks++;
      if (seen_state[s] == 0) begin failures++; $display("state %0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
