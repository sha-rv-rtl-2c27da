// BufferSet: 256 x 32-bit flip-flop buffer in front of the SHA core.
//
// Unlike a block RAM, every 32-bit lane is a register with its own read path:
// the whole 4096-bit content is visible at once on `words`, so the controller
// can hand the IV, the 64 round constants and a 16-word message block to the
// SHA core in a single cycle.  Writes go through one word-wide port (used by the
// DMEM burst engine and by the controller); a word-wide read port serves bursts
// back to data memory.  Content layout (Table I of the design notes in the
// README) is fixed by the controller, not by this module.  Size follows the
// published design; the single write port and the absence of a reset (every word
// is written before it is read) are this design's choices.
module sha_bufferset
  import sha_rv_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  word_t                    wdata,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output word_t                    rdata,
  output word_t                    words [WORDS]
);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
  assign words = mem;

endmodule
