// Value Rotator (VR): keeps the sliding message-word windows and the K ring.
//
// For each of up to N_IN interleaved input cases the rotator stores the 16-word
// window W[j..j+15] of that case.  When case `case_idx` issues a round
// (`issue`), the window it sees (`w_view`) is its stored window, except that
// after the first round the last word is replaced by the newest schedule word
// `w_new` coming out of the Message Expander; the window is then shifted down by
// one word and written back.  The 64 round constants live in a ring that is
// rotated by one word on `rot_k` (once per round, shared by all cases, since
// all cases are at the same round), so `k_cur` is always K[j]; after 64
// rotations the ring is back in its loaded order.  `load` copies in the message
// blocks and the K table in one cycle (parallel BufferSet access).
// Rotating both windows follows the published description; the storage layout
// and the one-cycle load are this design's choices.
module sha_value_rotator
  import sha_rv_pkg::*;
#(
  parameter int unsigned N_IN = 4
) (
  input  logic                        clk,
  input  logic                        load,
  input  word_t                       msg_in [N_IN][16],
  input  word_t                       k_in   [64],
  input  logic                        issue,
  input  logic [1:0]                  case_idx,   // 0..N_IN-1
  input  logic                        first_round,
  input  word_t                       w_new,
  input  logic                        rot_k,
  output word_t                       w_view [16],
  output word_t                       k_cur
);

  word_t win  [N_IN][16];
  word_t kring [64];

  always_comb begin
    for (int i = 0; i < 16; i++) w_view[i] = win[case_idx][i];
    if (!first_round) w_view[15] = w_new;
  end

  assign k_cur = kring[0];

  always_ff @(posedge clk) begin
    if (load) begin
      win   <= msg_in;
      kring <= k_in;
    end else begin
      if (issue) begin
        for (int i = 0; i < 15; i++) win[case_idx][i] <= w_view[i+1];
        win[case_idx][15] <= '0;
      end
      if (rot_k) begin
        for (int i = 0; i < 63; i++) kring[i] <= kring[i+1];
        kring[63] <= kring[0];
      end
    end
  end

endmodule
