// Shared constants, types and SHA-2 helper functions of the SHA-RV accelerator.
//
// Holds the SHA-224/256 round constants and initial hash values, the six SHA-2
// bit functions (Ch, Maj, the two big Sigma functions EP0/EP1 and the two small
// sigma functions SIG0/SIG1), the encodings of the custom RISC-V instructions,
// the controller state codes and the fixed word map of the 256-word BufferSet.
// The instruction encodings, state codes and map offsets follow the published
// design; the FIPS 180-4 constants are the standard ones.  The short-mode map
// capacity of 7 blocks is derived from the map (72 + 7*24 = 240 <= 256).
package sha_rv_pkg;

  typedef logic [31:0] word_t;

  // FIPS 180-4 round constants K[0..63]
  localparam word_t K_TABLE [64] = '{
    32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
    32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
    32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
    32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
    32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
    32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
    32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
    32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2
  };

  localparam word_t IV256 [8] = '{
    32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
    32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19
  };

  localparam word_t IV224 [8] = '{
    32'hc1059ed8, 32'h367cd507, 32'h3070dd17, 32'hf70e5939,
    32'hffc00b31, 32'h68581511, 32'h64f98fa7, 32'hbefa4fa4
  };

  // SHA-2 bit functions
  function automatic word_t rotr(word_t x, int unsigned n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic word_t ch(word_t e, word_t f, word_t g);
    return (e & f) ^ (~e & g);
  endfunction

  function automatic word_t maj(word_t a, word_t b, word_t c);
    return (a & b) ^ (a & c) ^ (b & c);
  endfunction

  function automatic word_t ep0(word_t a);   // big Sigma0
    return rotr(a, 2) ^ rotr(a, 13) ^ rotr(a, 22);
  endfunction

  function automatic word_t ep1(word_t e);   // big Sigma1
    return rotr(e, 6) ^ rotr(e, 11) ^ rotr(e, 25);
  endfunction

  function automatic word_t sig0(word_t w);  // small sigma0
    return rotr(w, 7) ^ rotr(w, 18) ^ (w >> 3);
  endfunction

  function automatic word_t sig1(word_t w);  // small sigma1
    return rotr(w, 17) ^ rotr(w, 19) ^ (w >> 10);
  endfunction

  // Custom instruction encodings
  localparam logic [6:0] OPC_SHA = 7'b0001011;  // SHA custom instructions
  localparam logic [6:0] OPC_BUF = 7'b0101011;  // buffer-access custom instructions

  localparam logic [2:0] F3_BUF_LATCH = 3'b000; // latch base (rs1) and amount (rs2)
  localparam logic [2:0] F3_BUF_WRITE = 3'b001; // DMEM -> BufferSet burst
  localparam logic [2:0] F3_BUF_READ  = 3'b010; // BufferSet -> DMEM burst

  // SHA instruction funct3: bit 0 selects SHA-256, bit 1 selects long mode
  typedef enum logic [2:0] {
    SHA224_SHORT = 3'b000,
    SHA256_SHORT = 3'b001,
    SHA224_LONG  = 3'b010,
    SHA256_LONG  = 3'b011
  } sha_mode_e;

  // Controller states with their published codes
  typedef enum logic [2:0] {
    ST_IDLE    = 3'b000,
    ST_PREP    = 3'b001,
    ST_LOADMSG = 3'b010,
    ST_EXEC    = 3'b011,
    ST_FINAL   = 3'b100,
    ST_DONE    = 3'b101
  } sha_state_e;

  // BufferSet word map
  localparam int BUF_WORDS        = 256;
  localparam int MAP_IV           = 0;    // H0..H7
  localparam int MAP_K            = 8;    // K[0..63]
  localparam int MAP_DIGEST_LONG  = 72;   // running / final digest in long mode
  localparam int MAP_MSG_LONG     = 80;   // first message block in long mode
  localparam int MAP_MSG_SHORT    = 72;   // first message block in short mode
  localparam int SHORT_STRIDE     = 24;   // 16 message words + 8 digest words
  localparam int LONG_SLOTS       = (BUF_WORDS - MAP_MSG_LONG) / 16;            // 11
  localparam int SHORT_SLOTS      = (BUF_WORDS - MAP_MSG_SHORT) / SHORT_STRIDE; // 7

  // ---- RISC-V host core ------------------------------------------------------
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR,
    ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASS_B
  } alu_op_e;

  // Control word produced by the basic (RV32I) decoder
  typedef struct packed {
    logic    valid_op;    // a recognised instruction
    logic    reg_we;      // writes rd
    logic    mem_re;      // LB, LH, LW, LBU, LHU
    logic    mem_we;      // SB, SH, SW
    alu_op_e alu_op;
    logic    src_a_pc;    // ALU operand A is the PC (AUIPC)
    logic    src_b_imm;   // ALU operand B is the immediate
    logic    is_branch;
    logic    is_jal;
    logic    is_jalr;
    logic    is_halt;     // ECALL / EBREAK: end of program
    logic    uses_rs1;
    logic    uses_rs2;
  } ctrl_t;

  // Control word produced by the special (custom instruction) decoder
  typedef struct packed {
    logic       buf_latch;  // latch base (rs1) and amount (rs2)
    logic       buf_xfer;   // start a burst
    logic       buf_dir;    // 0: DMEM -> BufferSet, 1: BufferSet -> DMEM
    logic       sha;        // start a SHA session
    logic [2:0] sha_mode;   // funct3 of the SHA instruction
  } spec_t;

  localparam logic [6:0] OPC_LUI    = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC  = 7'b0010111;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_OPIMM  = 7'b0010011;
  localparam logic [6:0] OPC_OP     = 7'b0110011;
  localparam logic [6:0] OPC_FENCE  = 7'b0001111;
  localparam logic [6:0] OPC_SYSTEM = 7'b1110011;

endpackage
