// Testbench of the SHA core: hashes the "abc" test vector in SHA-256 and SHA-224
// alone (checking the 258-cycle start-to-done latency) and then batches of up to
// four random blocks with random chaining values, checking every digest against
// the reference and the latency of 258 + (cases - 1) cycles.
module tb_sha_core;
  import sha_rv_pkg::*;
  import sha_ref_pkg::*;

  localparam int N_IN = 4;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [2:0] n_cases;
  word_t h_in [N_IN][8];
  word_t msg [N_IN][16];
  word_t k [64];
  word_t digest [N_IN][8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha_core #(.N_IN(N_IN)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int nc, state_t hs [N_IN], block_t ms [N_IN], int exp_lat);
    int cyc;
    state_t e;
    for (int c = 0; c < N_IN; c++) begin
      for (int i = 0; i < 8; i++)  h_in[c][i] = hs[c][i];
      for (int i = 0; i < 16; i++) msg[c][i]  = ms[c][i];
    end
    n_cases = 3'(nc);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != exp_lat) begin failures++; $display("latency %0d expected %0d", cyc, exp_lat); end
    for (int c = 0; c < nc; c++) begin
      e = ref_compress(hs[c], ms[c]);
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (digest[c][i] !== e[i]) begin failures++; $display("case %0d word %0d: %h vs %h", c, i, digest[c][i], e[i]); end
      end
    end
  endtask

  initial begin
    state_t hs [N_IN];
    block_t ms [N_IN];
    state_t kat256, kat224;
    kat256 = '{32'hba7816bf, 32'h8f01cfea, 32'h414140de, 32'h5dae2223, 32'hb00361a3, 32'h96177a9c, 32'hb410ff61, 32'hf20015ad};
    kat224 = '{32'h23097d22, 32'h3405d822, 32'h8642a477, 32'hbda255b3, 32'h2aadbce4, 32'hbda0b3f7, 32'he36c9da7, 32'h0};
    for (int i = 0; i < 64; i++) k[i] = K_TABLE[i];
    n_cases = 1; start = 0;
    for (int c = 0; c < N_IN; c++) begin hs[c] = iv_of(1); ms[c] = abc_block(); end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // known answers
    run(1, hs, ms, 258);
    for (int i = 0; i < 8; i++) begin checks++; if (digest[0][i] !== kat256[i]) failures++; end
    hs[0] = iv_of(0);
    run(1, hs, ms, 258);
    for (int i = 0; i < 7; i++) begin checks++; if (digest[0][i] !== kat224[i]) failures++; end
    // random batches of 1..4 cases
    for (int n = 0; n < 8; n++) begin
      int nc;
      nc = (n % N_IN) + 1;
      for (int c = 0; c < N_IN; c++) begin
        ms[c] = rand_block();
        for (int i = 0; i < 8; i++) hs[c][i] = $urandom;
      end
      run(nc, hs, ms, 258 + nc - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
