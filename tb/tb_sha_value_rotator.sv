// Testbench of the Value Rotator: loads two cases and the K table, then issues
// rounds alternately for both cases, feeding the next schedule word from a
// reference; checks the window each case sees and that the K ring advances one
// constant per round and wraps after 64 rotations.
module tb_sha_value_rotator;
  import sha_rv_pkg::*;
  import sha_ref_pkg::*;

  localparam int N_IN = 4;
  logic  clk = 0;
  logic  load, issue, first_round, rot_k;
  logic [1:0] case_idx;
  word_t msg_in [N_IN][16];
  word_t k_in [64];
  word_t w_new, k_cur;
  word_t w_view [16];
  block_t blk [2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha_value_rotator #(.N_IN(N_IN)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; issue = 0; first_round = 0; rot_k = 0; case_idx = 0; w_new = 0;
    blk[0] = rand_block(); blk[1] = abc_block();
    for (int c = 0; c < N_IN; c++) for (int i = 0; i < 16; i++) msg_in[c][i] = blk[c % 2][i];
    for (int i = 0; i < 64; i++) k_in[i] = K_TABLE[i];
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    for (int r = 0; r < 66; r++) begin
      for (int c = 0; c < 2; c++) begin
        issue = 1; case_idx = 2'(c); first_round = (r == 0);
        rot_k = (c == 1);
        w_new = (r + 15 < 64) ? ref_w(blk[c], r + 15) : '0;  // the expander output in the design
        #1;
        if (r < 49) begin
          for (int i = 0; i < 16; i++) begin
            checks++;
            if (w_view[i] !== ref_w(blk[c], r + i)) begin
              failures++; $display("r=%0d c=%0d i=%0d %h vs %h", r, c, i, w_view[i], ref_w(blk[c], r + i));
            end
          end
        end
        checks++;
        if (k_cur !== K_TABLE[r % 64]) begin failures++; $display("K r=%0d %h", r, k_cur); end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
