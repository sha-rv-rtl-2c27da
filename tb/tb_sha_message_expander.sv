// Testbench of the Message Expander: feeds random windows every cycle and checks
// that each W[j+16] appears exactly four cycles later.
module tb_sha_message_expander;
  import sha_rv_pkg::*;
  import sha_ref_pkg::*;

  logic  clk = 0;
  word_t w_j, w_j1, w_j9, w_j14, w_j16;
  word_t exp_q [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha_message_expander dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t m;
    word_t e0;
    // known schedule: W[16] of the "abc" block
    m = abc_block();
    @(negedge clk);
    w_j = m[0]; w_j1 = m[1]; w_j9 = m[9]; w_j14 = m[14];
    repeat (4) @(negedge clk);
    checks++;
    if (w_j16 !== ref_w(m, 16)) begin failures++; $display("abc W16 %h vs %h", w_j16, ref_w(m,16)); end
    // streaming: random windows each cycle, result 4 cycles later
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      m = rand_block();
      w_j = m[0]; w_j1 = m[1]; w_j9 = m[9]; w_j14 = m[14];
      exp_q.push_back(ref_w(m, 16));
      if (exp_q.size() > 4) begin
        e0 = exp_q.pop_front();
        checks++;
        if (w_j16 !== e0) begin failures++; $display("mismatch %h vs %h", w_j16, e0); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
