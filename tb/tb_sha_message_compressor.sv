// Testbench of the Message Compressor: streams one random round per cycle and
// compares each result, four cycles later, with a plain SHA-2 round.
module tb_sha_message_compressor;
  import sha_rv_pkg::*;
  import sha_ref_pkg::*;

  logic  clk = 0;
  word_t a_in, b_in, c_in, d_in, e_in, f_in, g_in, h_in, k_j, w_j;
  word_t a_out, b_out, c_out, d_out, e_out, f_out, g_out, h_out;
  state_t exp_arr [300];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha_message_compressor dut (.*);

  function automatic state_t ref_round(state_t s, word_t k, word_t w);
    word_t t1, t2;
    state_t o;
    t1 = s[7] + (r_rotr(s[4],6) ^ r_rotr(s[4],11) ^ r_rotr(s[4],25)) + ((s[4] & s[5]) ^ (~s[4] & s[6])) + k + w;
    t2 = (r_rotr(s[0],2) ^ r_rotr(s[0],13) ^ r_rotr(s[0],22)) + ((s[0] & s[1]) ^ (s[0] & s[2]) ^ (s[1] & s[2]));
    o[0] = t1 + t2; o[1] = s[0]; o[2] = s[1]; o[3] = s[2];
    o[4] = s[3] + t1; o[5] = s[4]; o[6] = s[5]; o[7] = s[6];
    return o;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    state_t s, e0, got;
    word_t k, w;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int i = 0; i < 8; i++) s[i] = $urandom;
      k = $urandom; w = $urandom;
      if (n == 0) begin s = iv_of(1); k = K_TABLE[0]; w = 32'h61626380; end
      {a_in, b_in, c_in, d_in, e_in, f_in, g_in, h_in} = {s[0], s[1], s[2], s[3], s[4], s[5], s[6], s[7]};
      k_j = k; w_j = w;
      exp_arr[n] = ref_round(s, k, w);
      if (n >= 4) begin
        e0 = exp_arr[n-4];
        got = '{a_out, b_out, c_out, d_out, e_out, f_out, g_out, h_out};
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (got[i] !== e0[i]) begin failures++; $display("n=%0d word %0d: %h vs %h", n, i, got[i], e0[i]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
