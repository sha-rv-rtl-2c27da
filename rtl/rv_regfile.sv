// 32 x 32-bit register file of the host core (x0 reads as zero).
//
// Two combinational read ports (ID stage) and one write port (WB stage).  A read
// of the register being written in the same cycle returns the new value, so the
// pipeline needs no WB-to-ID forwarding.  Registers r8 and r20 carry the base and
// amount of BufferSet bursts by software convention.  Reset clears all registers.
module rv_regfile
  import sha_rv_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] rs1,
  input  logic [4:0] rs2,
  output word_t      rs1_data,
  output word_t      rs2_data,
  input  logic       we,
  input  logic [4:0] rd,
  input  word_t      rd_data
);

  word_t regs [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && rd != 5'd0) begin
      regs[rd] <= rd_data;
    end
  end

  always_comb begin
    rs1_data = (rs1 == 5'd0) ? '0 : (we && rd == rs1) ? rd_data : regs[rs1];
    rs2_data = (rs2 == 5'd0) ? '0 : (we && rd == rs2) ? rd_data : regs[rs2];
  end

endmodule
