// SHA controller: the finite-state machine that orchestrates one SHA session.
//
// Started by a custom SHA instruction (`start_sha` held high, `mode` = funct3,
// `n_blocks` = number of 64-byte blocks), it walks the published states
//   IDLE(000) -> PREP(001) -> LOADMSG(010) -> EXEC(011) -> FINAL(100) -> DONE(101)
// PREP     copies IV (DMEM base+0..7 -> BufferSet 0..7) and K (base+8..71 -> 8..71),
//          once: it is skipped while the BufferSet already holds them for the same
//          hash variant (72 cycles when done).
// LOADMSG  copies the 16 words of each block of the batch from DMEM into its
//          BufferSet slice, one word per cycle, following the fixed map:
//            long:  block i at DMEM base+80+16i -> BufferSet 80+16(i mod 11)
//            short: block i at DMEM base+72+24i -> BufferSet 72+24(i mod 7)
// EXEC     starts the SHA core with IV/K/message taken in parallel from the
//          BufferSet and waits for it (259 cycles for one block, since the
//          core's start pulse is registered).  Long mode chains blocks: block 0 starts from the IV, later blocks from the digest
//          held at BufferSet 72..79.  Short mode hashes each block independently
//          from the IV and batches up to N_IN blocks into one core run.
// FINAL    writes each digest, one word per cycle, to the BufferSet (long:
//          72..79, short: the 8 words after the block) and to the same place in
//          DMEM; SHA-224 writes 7 words to DMEM (all 8 state words go to the
//          BufferSet for chaining).
// DONE     starts the next batch if blocks remain, else raises `done_sha` until
//          `start_sha` falls (four-phase handshake with the host core).
// States, codes, the map and the copy directions follow the published FSM and
// BufferSet map.  Batching of short blocks, the skip rule for PREP, the DMEM
// digest copy and the handshake are this design's choices.  Per long block the
// session costs 16 (LOADMSG) + 259 (EXEC) + 8 (FINAL) + 1 (DONE) cycles.
module sha_controller
  import sha_rv_pkg::*;
#(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned DM_AW = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              start_sha,
  input  logic [2:0]        mode,
  input  logic [15:0]       n_blocks,
  input  logic [DM_AW-1:0]  base_word,
  output logic              done_sha,
  output sha_state_e        state,
  // data memory port (combinational read)
  output logic              dm_en,
  output logic              dm_we,
  output logic [DM_AW-1:0]  dm_addr,
  output word_t             dm_wdata,
  input  word_t             dm_rdata,
  // BufferSet
  output logic              buf_we,
  output logic [7:0]        buf_addr,
  output word_t             buf_wdata,
  input  word_t             buf_words [BUF_WORDS],
  // SHA core
  output logic              core_start,
  output logic [2:0]        core_ncases,
  output word_t             core_h   [N_IN][8],
  output word_t             core_msg [N_IN][16],
  output word_t             core_k   [64],
  input  logic              core_done,
  input  word_t             core_digest [N_IN][8]
);

  sha_state_e  st;
  logic [6:0]  cnt;                 // word counter inside PREP / LOADMSG / FINAL
  logic        k_iv_loaded, loaded_is256;
  logic        is256, is_long;
  logic [2:0]  mode_q;
  logic [15:0] nblk_q, blk_idx;
  logic [DM_AW-1:0] base_q;
  logic [15:0] msg_off;             // DMEM word offset (from base) of the batch's first block
  logic [3:0]  slot_idx;            // BufferSet slot of the batch's first block
  logic [2:0]  nb;                  // blocks in the current batch
  logic [15:0] remaining;
  logic [2:0]  nb_next;
  logic [7:0]  slot_base [N_IN];    // BufferSet word of each case's message
  logic [15:0] case_off  [N_IN];    // DMEM offset of each case's message
  logic [1:0]  cur_case;
  logic [3:0]  cur_word;

  assign is256   = mode_q[0];
  assign is_long = mode_q[1];
  assign state   = st;
  assign remaining = nblk_q - blk_idx;

  always_comb begin
    if (mode_q[1])                        nb_next = 3'd1;
    else if (remaining >= 16'(N_IN))      nb_next = 3'(N_IN);
    else                                  nb_next = remaining[2:0];
  end

  // BufferSet slot and DMEM offset of every case of the batch
  always_comb begin
    for (int c = 0; c < N_IN; c++) begin
      logic [4:0] s;
      s = 5'(slot_idx) + 5'(c);
      if (is_long) begin
        if (s >= 5'(LONG_SLOTS)) s = s - 5'(LONG_SLOTS);
        slot_base[c] = 8'(MAP_MSG_LONG) + 8'(s) * 8'd16;
        case_off[c]  = msg_off + 16'(c) * 16'd16;
      end else begin
        if (s >= 5'(SHORT_SLOTS)) s = s - 5'(SHORT_SLOTS);
        slot_base[c] = 8'(MAP_MSG_SHORT) + 8'(s) * 8'(SHORT_STRIDE);
        case_off[c]  = msg_off + 16'(c) * 16'(SHORT_STRIDE);
      end
    end
  end

  // Parallel operand selection from the BufferSet
  always_comb begin
    for (int i = 0; i < 64; i++) core_k[i] = buf_words[MAP_K + i];
    for (int c = 0; c < N_IN; c++) begin
      for (int i = 0; i < 8; i++)
        core_h[c][i] = (is_long && blk_idx != 16'd0) ? buf_words[MAP_DIGEST_LONG + i]
                                                     : buf_words[MAP_IV + i];
      for (int i = 0; i < 16; i++)
        core_msg[c][i] = buf_words[8'(slot_base[c] + 8'(i))];
    end
  end

  // Memory traffic of the copy states
  always_comb begin
    dm_en = 1'b0; dm_we = 1'b0; dm_addr = base_q; dm_wdata = '0;
    buf_we = 1'b0; buf_addr = '0;
    cur_case = '0; cur_word = '0;
    unique case (st)
      ST_PREP: if (!(k_iv_loaded && loaded_is256 == is256)) begin
        dm_en    = 1'b1;
        dm_addr  = base_q + DM_AW'(cnt);
        buf_we   = 1'b1;
        buf_addr = 8'(cnt);
      end
      ST_LOADMSG: begin
        cur_case = cnt[5:4];
        cur_word = cnt[3:0];
        dm_en    = 1'b1;
        dm_addr  = base_q + DM_AW'(case_off[cur_case]) + DM_AW'(cur_word);
        buf_we   = 1'b1;
        buf_addr = slot_base[cur_case] + 8'(cur_word);
      end
      ST_FINAL: begin
        cur_case  = cnt[4:3];
        cur_word  = {1'b0, cnt[2:0]};
        dm_wdata  = core_digest[cur_case][cur_word[2:0]];
        buf_we    = 1'b1;
        dm_en     = is256 || (cur_word != 4'd7);
        dm_we     = dm_en;
        if (is_long) begin
          buf_addr = 8'(MAP_DIGEST_LONG) + 8'(cur_word);
          dm_addr  = base_q + DM_AW'(MAP_DIGEST_LONG) + DM_AW'(cur_word);
        end else begin
          buf_addr = slot_base[cur_case] + 8'd16 + 8'(cur_word);
          dm_addr  = base_q + DM_AW'(case_off[cur_case]) + DM_AW'(16) + DM_AW'(cur_word);
        end
      end
      default: ;
    endcase
  end

  // DMEM data feeds the BufferSet in PREP/LOADMSG; digests in FINAL
  assign buf_wdata = (st == ST_FINAL) ? core_digest[cnt[4:3]][cnt[2:0]] : dm_rdata;

  assign core_ncases = nb;
  assign done_sha    = (st == ST_DONE) && (remaining == 16'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= ST_IDLE;
      cnt          <= '0;
      k_iv_loaded  <= 1'b0;
      loaded_is256 <= 1'b0;
      mode_q       <= '0;
      nblk_q       <= '0;
      blk_idx      <= '0;
      base_q       <= '0;
      msg_off      <= '0;
      slot_idx     <= '0;
      nb           <= 3'd1;
      core_start   <= 1'b0;
    end else begin
      core_start <= 1'b0;
      unique case (st)
        ST_IDLE: if (start_sha) begin
          mode_q   <= mode;
          nblk_q   <= n_blocks;
          base_q   <= base_word;
          blk_idx  <= '0;
          slot_idx <= '0;
          msg_off  <= mode[1] ? 16'(MAP_MSG_LONG) : 16'(MAP_MSG_SHORT);
          cnt      <= '0;
          st       <= ST_PREP;
        end
        ST_PREP: begin
          if (k_iv_loaded && loaded_is256 == is256) begin
            cnt <= '0;
            nb  <= nb_next;
            st  <= (remaining == 16'd0) ? ST_DONE : ST_LOADMSG;
          end else begin
            cnt <= cnt + 7'd1;
            if (cnt == 7'(MAP_K + 64 - 1)) begin
              k_iv_loaded  <= 1'b1;
              loaded_is256 <= is256;
              cnt          <= '0;
              nb           <= nb_next;
              st           <= (remaining == 16'd0) ? ST_DONE : ST_LOADMSG;
            end
          end
        end
        ST_LOADMSG: begin
          if (cnt == 7'(16 * nb - 1)) begin
            cnt        <= '0;
            core_start <= 1'b1;
            st         <= ST_EXEC;
          end else begin
            cnt <= cnt + 7'd1;
          end
        end
        ST_EXEC: if (core_done) begin
          cnt <= '0;
          st  <= ST_FINAL;
        end
        ST_FINAL: begin
          if (cnt == 7'(8 * nb - 1)) begin
            cnt      <= '0;
            blk_idx  <= blk_idx + 16'(nb);
            msg_off  <= msg_off + (is_long ? 16'd16 : 16'(SHORT_STRIDE) * 16'(nb));
            slot_idx <= (5'(slot_idx) + 5'(nb) >= 5'(is_long ? LONG_SLOTS : SHORT_SLOTS))
                        ? 4'(5'(slot_idx) + 5'(nb) - 5'(is_long ? LONG_SLOTS : SHORT_SLOTS))
                        : 4'(5'(slot_idx) + 5'(nb));
            st       <= ST_DONE;
          end else begin
            cnt <= cnt + 7'd1;
          end
        end
        ST_DONE: begin
          if (remaining != 16'd0) begin        // next_block
            nb  <= nb_next;
            cnt <= '0;
            st  <= ST_LOADMSG;
          end else if (!start_sha) begin
            st  <= ST_IDLE;
          end
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

  // The core is only started from LOADMSG and finishes while in EXEC.
  a_core_done_in_exec: assert property (@(posedge clk) disable iff (!rst_n)
    core_done |-> st == ST_EXEC);

endmodule
