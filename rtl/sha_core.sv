// SHA Core: four-stage pipelined SHA-224/256 compression of up to N_IN blocks.
//
// The Message Expander, Message Compressor and Value Rotator are combined as in
// the published SHA core.  Each round takes four cycles to pass the pipeline, so
// up to four independent input cases are interleaved: in cycle t the case
// t mod 4 issues round t div 4.  The round result of a case leaves stage 4
// exactly when that case issues its next round, so the state a..h is carried
// by the pipeline registers themselves; round 0 takes its state from h_in.
// After 64 rounds (cycle 256 + case) the pipeline output is added to h_in
// (feed-forward) and stored in `digest`.
//
// Interface: pulse `start` with `n_cases` (1..N_IN), `h_in`, `msg` and `k`
// valid.  `msg` and `k` are copied into the rotator at `start`; `h_in` must stay
// stable until `done`.  `done` pulses for one cycle with `digest` valid (digest
// holds its value until the next start).  Timing: with n_cases = 1 the digest is
// ready 258 cycles after the start pulse (257 cycles of computation plus the
// start cycle); every further case adds one cycle.  SHA-224 and SHA-256 differ
// only in h_in and in how many digest words are used, which is up to the caller.
module sha_core
  import sha_rv_pkg::*;
#(
  parameter int unsigned N_IN = 4     // concurrent input cases (<= pipeline depth 4)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [2:0]  n_cases,
  input  word_t       h_in   [N_IN][8],
  input  word_t       msg    [N_IN][16],
  input  word_t       k      [64],
  output logic        busy,
  output logic        done,
  output word_t       digest [N_IN][8]
);

  localparam int unsigned DEPTH = 4;  // pipeline stages

  logic [8:0]  t;          // cycle within the run: slot = t[1:0], round = t[8:2]
  logic [2:0]  ncase_q;
  logic [1:0]  slot;
  logic [6:0]  round;
  logic        issue, first_round, rot_k, finish;

  word_t st_in  [8];       // a..h into the compressor
  word_t st_out [8];       // a'..h' out of the compressor
  word_t w_view [16];
  word_t k_cur, w_new;

  assign slot        = t[1:0];
  assign round       = t[8:2];
  assign first_round = (round == 7'd0);
  assign issue       = busy && (round < 7'd64) && ({1'b0, slot} < ncase_q);
  assign rot_k       = busy && (round < 7'd64) && (slot == 2'(DEPTH-1));
  assign finish      = busy && (round == 7'd64) && ({1'b0, slot} < ncase_q);

  sha_value_rotator #(.N_IN(N_IN)) u_vr (
    .clk        (clk),
    .load       (start && !busy),
    .msg_in     (msg),
    .k_in       (k),
    .issue      (issue),
    .case_idx   (slot),
    .first_round(first_round),
    .w_new      (w_new),
    .rot_k      (rot_k),
    .w_view     (w_view),
    .k_cur      (k_cur)
  );

  sha_message_expander u_me (
    .clk   (clk),
    .w_j   (w_view[0]),
    .w_j1  (w_view[1]),
    .w_j9  (w_view[9]),
    .w_j14 (w_view[14]),
    .w_j16 (w_new)
  );

  always_comb begin
    for (int i = 0; i < 8; i++)
      st_in[i] = first_round ? h_in[slot][i] : st_out[i];
  end

  sha_message_compressor u_mc (
    .clk  (clk),
    .a_in (st_in[0]), .b_in (st_in[1]), .c_in (st_in[2]), .d_in (st_in[3]),
    .e_in (st_in[4]), .f_in (st_in[5]), .g_in (st_in[6]), .h_in (st_in[7]),
    .k_j  (k_cur),
    .w_j  (w_view[0]),
    .a_out(st_out[0]), .b_out(st_out[1]), .c_out(st_out[2]), .d_out(st_out[3]),
    .e_out(st_out[4]), .f_out(st_out[5]), .g_out(st_out[6]), .h_out(st_out[7])
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      t       <= '0;
      ncase_q <= 3'd1;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          t       <= '0;
          ncase_q <= n_cases;
        end
      end else begin
        t <= t + 9'd1;
        if (finish && ({1'b0, slot} == ncase_q - 3'd1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (finish)
      for (int i = 0; i < 8; i++) digest[slot][i] <= h_in[slot][i] + st_out[i];
  end

  // A run needs at least one case and at most N_IN.
  a_ncases: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> (n_cases >= 3'd1 && n_cases <= 3'(N_IN)));

endmodule
