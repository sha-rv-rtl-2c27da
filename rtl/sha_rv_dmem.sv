// Data memory of the SHA-RV core: 8192 x 32-bit, dual ported.
//
// Port A belongs to the host (processing system / DMA): synchronous write and a
// read with one cycle of latency.  Port B belongs to the core side (the RISC-V
// MEM stage, the BufferSet burst engine and the SHA controller, multiplexed
// outside): synchronous write with byte enables (for the core's byte and
// half-word stores), combinational read.  Two ports let the host fill
// or drain one half of the memory ("First" or "Last") while the core works on
// the other half, which is the double-buffering scheme of the design.  A write
// from both ports to the same word in the same cycle is not allowed (asserted).
// The 8192-word size is published; the port arrangement is this design's own.
module sha_rv_dmem
  import sha_rv_pkg::*;
#(
  parameter int unsigned DEPTH = 8192
) (
  input  logic                     clk,
  // host port
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  word_t                    a_wdata,
  output word_t                    a_rdata,
  // core port
  input  logic                     b_en,
  input  logic                     b_we,
  input  logic [3:0]               b_be,     // byte lanes written by b_we
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  word_t                    b_wdata,
  output word_t                    b_rdata
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (a_en)         a_rdata     <= mem[a_addr];
    for (int i = 0; i < 4; i++)
      if (b_en && b_we && b_be[i]) mem[b_addr][8*i +: 8] <= b_wdata[8*i +: 8];
  end

  assign b_rdata = mem[b_addr];

  a_no_write_clash: assert property (@(posedge clk)
    !(a_en && a_we && b_en && b_we && a_addr == b_addr));

endmodule
