// Instruction memory of the SHA-RV core.
//
// DEPTH x 32-bit words.  Port A is written by the host (the processing system
// loads the RISC-V program before pulsing start); port B is the core's fetch
// port with a combinational read.  The depth is not published; 1024 words is
// this design's choice.  Contents are undefined until written.
module sha_rv_imem
  import sha_rv_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     host_we,
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  word_t                    host_wdata,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output word_t                    rd_data
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
  end

  assign rd_data = mem[rd_addr];

endmodule
