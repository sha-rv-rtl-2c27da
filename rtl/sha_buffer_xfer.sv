// Buffer transfer engine: burst copies between data memory and the BufferSet.
//
// Executes the buffer-access custom instructions.  `latch` (funct3 000) stores
// the base address from rs1 (register r8 by convention) and the word count from
// rs2 (r20).  A request (`req`, held high while the instruction waits) with
// `dir` = 0 (funct3 001, "buffer write") copies DMEM[base + i] into BufferSet
// word i, and with `dir` = 1 (funct3 010, "buffer read") copies BufferSet word i
// back to DMEM[base + i], for i = 0 .. amount-1, one word per cycle.  The base is
// a data-memory word index (as in the published transfer diagram, where base
// 0x1 is the second word); the count is clipped to the 256 words of the
// BufferSet.  Handshake: four-phase; `ack` rises when the burst is complete
// and stays high until `req` falls.  A burst of n words takes n+1 cycles from
// `req` to `ack`.  The latched base is also the base of the region the SHA
// controller works on.  Register roles, the two flags and the 256-word bound are
// published; the clipping and handshake are this design's own.
module sha_buffer_xfer
  import sha_rv_pkg::*;
#(
  parameter int unsigned DM_AW  = 13,   // DMEM word-address width (8192 words)
  parameter int unsigned BUF_AW = 8     // BufferSet address width (256 words)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              latch,
  input  word_t             base_in,     // rs1
  input  word_t             amount_in,   // rs2
  input  logic              req,
  input  logic              dir,         // 0: DMEM -> buffer, 1: buffer -> DMEM
  output logic              ack,
  output logic              busy,
  output logic [DM_AW-1:0]  base_word,
  // data memory port (combinational read)
  output logic              dm_en,
  output logic              dm_we,
  output logic [DM_AW-1:0]  dm_addr,
  output word_t             dm_wdata,
  input  word_t             dm_rdata,
  // BufferSet port
  output logic              buf_we,
  output logic [BUF_AW-1:0] buf_addr,
  output word_t             buf_wdata,
  input  word_t             buf_rdata
);

  typedef enum logic [1:0] {X_IDLE, X_RUN, X_ACK} xstate_e;
  xstate_e       st;
  logic [BUF_AW:0] amount_q, idx;
  logic          dir_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= X_IDLE;
      base_word <= '0;
      amount_q  <= '0;
      idx       <= '0;
      dir_q     <= 1'b0;
    end else begin
      if (latch) begin
        base_word <= base_in[DM_AW-1:0];
        amount_q  <= (amount_in > word_t'(2**BUF_AW)) ? (BUF_AW+1)'(2**BUF_AW) : amount_in[BUF_AW:0];
      end
      unique case (st)
        X_IDLE: if (req) begin
          idx   <= '0;
          dir_q <= dir;
          st    <= (amount_q == '0) ? X_ACK : X_RUN;
        end
        X_RUN: begin
          idx <= idx + 1'b1;
          if (idx == amount_q - 1'b1) st <= X_ACK;
        end
        X_ACK: if (!req) st <= X_IDLE;
        default: st <= X_IDLE;
      endcase
    end
  end

  assign ack      = (st == X_ACK);
  assign busy     = (st == X_RUN);
  assign dm_en    = busy;
  assign dm_we    = busy && dir_q;
  assign dm_addr  = base_word + DM_AW'(idx);
  assign dm_wdata = buf_rdata;
  assign buf_we   = busy && !dir_q;
  assign buf_addr = idx[BUF_AW-1:0];
  assign buf_wdata = dm_rdata;

endmodule
