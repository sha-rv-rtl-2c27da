// Message Expander (ME): four-stage pipelined SHA-2 message schedule.
//
// Computes W[j+16] = SIG1(W[j+14]) + W[j+9] + SIG0(W[j+1]) + W[j] with at most
// one adder per stage, as in the published four-stage split:
//   stage 1: SIG1(W[j+14]) + W[j+9]  and  SIG0(W[j+1]) + W[j]  (two parallel adders)
//   stage 2: sum of the two partial sums
//   stage 3, stage 4: register stages that align the result with the compressor.
// The pipeline is free running: the inputs presented in cycle t give w_j16 in
// cycle t+4 (four register levels).  No reset: the controlling logic ignores the
// output until valid data has passed through.
module sha_message_expander
  import sha_rv_pkg::*;
(
  input  logic  clk,
  input  word_t w_j,     // W[j]
  input  word_t w_j1,    // W[j+1]
  input  word_t w_j9,    // W[j+9]
  input  word_t w_j14,   // W[j+14]
  output word_t w_j16    // W[j+16], four cycles later
);

  word_t s1_hi, s1_lo;   // stage-1 partial sums
  word_t s2_sum;         // stage-2 full sum
  word_t s3_sum;         // stage-3 register
  word_t s4_sum;         // stage-4 register

  always_ff @(posedge clk) begin
    s1_hi  <= sig1(w_j14) + w_j9;
    s1_lo  <= sig0(w_j1) + w_j;
    s2_sum <= s1_hi + s1_lo;
    s3_sum <= s2_sum;
    s4_sum <= s3_sum;
  end

  assign w_j16 = s4_sum;

endmodule
