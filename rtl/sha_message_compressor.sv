// Message Compressor (MC): one SHA-2 compression round in a four-stage pipeline.
//
// Computes the round
//   T1 = h + EP1(e) + Ch(e,f,g) + K[j] + W[j],  T2 = EP0(a) + Maj(a,b,c)
//   a' = T1 + T2, e' = d + T1, b'=a, c'=b, d'=c, f'=e, g'=f, h'=g
// with at most one adder on any path per stage:
//   stage 1: EP1(e)+K, Ch(e,f,g)+W, Maj(a,b,c), EP0(a)+h, h+d
//   stage 2: (EP1+K)+(Ch+W) = T1-h,  Maj+(EP0+h) = T2+h, (h+d) held
//   stage 3: a' = (T1-h)+(T2+h),  e' = (T1-h)+(h+d)
//   stage 4: output register.
// The operand groups of stage 1 are those drawn in the published figure; how the
// stage-2/3 sums are paired is this design's reading of it.  b'..d' and f'..h'
// travel through four plain register stages.  Latency: inputs in cycle t give the
// round result in cycle t+4.  Free running, no reset.
module sha_message_compressor
  import sha_rv_pkg::*;
(
  input  logic  clk,
  input  word_t a_in, b_in, c_in, d_in, e_in, f_in, g_in, h_in,
  input  word_t k_j,
  input  word_t w_j,
  output word_t a_out, b_out, c_out, d_out, e_out, f_out, g_out, h_out
);

  // stage 1
  word_t s1_ek, s1_chw, s1_maj, s1_ep0h, s1_hd;
  // stage 2
  word_t s2_t1h, s2_t2h, s2_hd;
  // stage 3 / 4
  word_t s3_a, s3_e, s4_a, s4_e;
  // pass-through words b..d, f..h for each stage: index 0 = stage 1
  word_t pass_q [4][6];

  always_ff @(posedge clk) begin
    s1_ek   <= ep1(e_in) + k_j;
    s1_chw  <= ch(e_in, f_in, g_in) + w_j;
    s1_maj  <= maj(a_in, b_in, c_in);
    s1_ep0h <= ep0(a_in) + h_in;
    s1_hd   <= h_in + d_in;

    s2_t1h  <= s1_ek + s1_chw;
    s2_t2h  <= s1_maj + s1_ep0h;
    s2_hd   <= s1_hd;

    s3_a    <= s2_t1h + s2_t2h;
    s3_e    <= s2_t1h + s2_hd;

    s4_a    <= s3_a;
    s4_e    <= s3_e;

    pass_q[0] <= '{a_in, b_in, c_in, e_in, f_in, g_in};
    for (int s = 1; s < 4; s++) pass_q[s] <= pass_q[s-1];
  end

  assign a_out = s4_a;
  assign b_out = pass_q[3][0];
  assign c_out = pass_q[3][1];
  assign d_out = pass_q[3][2];
  assign e_out = s4_e;
  assign f_out = pass_q[3][3];
  assign g_out = pass_q[3][4];
  assign h_out = pass_q[3][5];

endmodule
