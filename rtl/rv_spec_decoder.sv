// Special controller: decoder of the custom SHA-RV instructions.
//
// Combinational.  Both groups use the R-type layout (funct7, rs2, rs1, funct3,
// rd, opcode):
//   opcode 0101011 (buffer access): funct3 000 latch base = rs1, amount = rs2;
//                                   001 buffer write flag (DMEM -> BufferSet);
//                                   010 buffer read flag  (BufferSet -> DMEM)
//   opcode 0001011 (SHA):           funct3 000 SHA-224 short, 001 SHA-256 short,
//                                   010 SHA-224 long,  011 SHA-256 long
// Opcodes and funct3 values follow the published encoding tables.  That rs1 of
// a SHA instruction carries the number of 64-byte blocks is this design's
// choice; rd and funct7 are ignored.
module rv_spec_decoder
  import sha_rv_pkg::*;
(
  input  word_t instr,
  output spec_t spec
);

  logic [6:0] opcode;
  logic [2:0] f3;

  assign opcode = instr[6:0];
  assign f3     = instr[14:12];

  always_comb begin
    spec = '0;
    if (opcode == OPC_BUF) begin
      spec.buf_latch = (f3 == F3_BUF_LATCH);
      spec.buf_xfer  = (f3 == F3_BUF_WRITE) || (f3 == F3_BUF_READ);
      spec.buf_dir   = (f3 == F3_BUF_READ);
    end else if (opcode == OPC_SHA && f3[2] == 1'b0) begin
      spec.sha      = 1'b1;
      spec.sha_mode = f3;
    end
  end

endmodule
