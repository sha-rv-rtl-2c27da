// Five-stage RISC-V (RV32I subset) host pipeline of SHA-RV with the custom
// BufferSet and SHA instructions executed in its EXE stage.
//
// Stages: IF (fetch from instruction memory at `pc`), ID (basic and special
// decoders, register file read), EXE (ALU, branch resolution, custom-instruction
// issue), MEM (data-memory load/store), WB (register write).  Results are
// forwarded from MEM and WB to EXE; a load followed by a dependent instruction
// stalls one cycle; taken branches and jumps are resolved in EXE and flush the
// two younger instructions.  A custom instruction waits in EXE, with IF/ID/EXE
// frozen and bubbles sent to MEM, until its unit answers:
//   - buffer latch  : one cycle, pulses `buf_latch` with rs1/rs2;
//   - buffer write/read flag: four-phase `buf_req`/`buf_ack` with the burst engine;
//   - SHA           : four-phase `sha_start`/`sha_done` with the SHA controller,
//                     `sha_mode` = funct3, `sha_nblocks` = rs1.
// While a custom instruction waits, the MEM stage holds a bubble, so the burst
// engine and the SHA controller have the data-memory port to themselves.
// `run` low holds the pipeline empty with pc = 0; ECALL/EBREAK stops fetching
// and pulses `halted` when it reaches WB.  Memories are read combinationally;
// load/store addresses are byte addresses.  Byte and half-word stores drive the
// data replicated over the word with byte enables `dm_be`; loads select and
// extend the addressed bytes in MEM.  Misaligned accesses are not trapped: a
// word access ignores address bits [1:0], a half-word access bit [0].  The five
// stages and the place of the SHA unit in EXE follow the published design;
// forwarding, hazard handling, the handshakes and the memory-access details
// are this design's choices.
module rv_core
  import sha_rv_pkg::*;
#(
  parameter int unsigned IM_AW = 10,   // instruction memory word-address width
  parameter int unsigned DM_AW = 13    // data memory word-address width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  output logic              halted,
  // instruction memory
  output logic [IM_AW-1:0]  im_addr,
  input  word_t             im_rdata,
  // data memory
  output logic              dm_en,
  output logic              dm_we,
  output logic [3:0]        dm_be,
  output logic [DM_AW-1:0]  dm_addr,
  output word_t             dm_wdata,
  input  word_t             dm_rdata,
  // buffer-access instructions
  output logic              buf_latch,
  output word_t             buf_base,
  output word_t             buf_amount,
  output logic              buf_req,
  output logic              buf_dir,
  input  logic              buf_ack,
  // SHA instructions
  output logic              sha_start,
  output logic [2:0]        sha_mode,
  output logic [15:0]       sha_nblocks,
  input  logic              sha_done
);

  // ---------------- pipeline registers ----------------
  word_t      pc;
  logic       stopping;                       // halt seen in EXE

  logic       id_valid;
  word_t      id_pc, id_instr;

  logic       ex_valid;
  word_t      ex_pc, ex_imm, ex_rs1v, ex_rs2v;
  logic [4:0] ex_rs1, ex_rs2, ex_rd;
  logic [2:0] ex_f3;
  ctrl_t      ex_ctrl;
  spec_t      ex_spec;

  logic       mem_valid, mem_reg_we, mem_re, mem_we, mem_halt;
  logic [2:0] mem_f3;
  word_t      ld_data;
  logic [4:0] mem_rd;
  word_t      mem_res, mem_sdata;

  logic       wb_valid, wb_reg_we, wb_halt;
  logic [4:0] wb_rd;
  word_t      wb_data;

  // ---------------- ID ----------------
  ctrl_t      id_ctrl;
  spec_t      id_spec;
  word_t      id_imm, id_rs1v, id_rs2v;
  logic [4:0] id_rs1, id_rs2, id_rd;

  assign id_rs1 = id_instr[19:15];
  assign id_rs2 = id_instr[24:20];
  assign id_rd  = id_instr[11:7];

  rv_decoder      u_dec  (.instr(id_instr), .ctrl(id_ctrl), .imm(id_imm));
  rv_spec_decoder u_spec (.instr(id_instr), .spec(id_spec));

  rv_regfile u_rf (
    .clk, .rst_n,
    .rs1(id_rs1), .rs2(id_rs2), .rs1_data(id_rs1v), .rs2_data(id_rs2v),
    .we(wb_valid && wb_reg_we), .rd(wb_rd), .rd_data(wb_data)
  );

  // ---------------- EXE ----------------
  word_t fwd_a, fwd_b, alu_a, alu_b, alu_y, ex_res;
  logic  br_taken, redirect;
  word_t target;
  logic  buf_wait, sha_wait;                 // waiting for the four-phase release
  logic  ex_stall, load_use;

  always_comb begin
    fwd_a = ex_rs1v;
    fwd_b = ex_rs2v;
    if (ex_rs1 != 5'd0) begin
      if (mem_valid && mem_reg_we && !mem_re && mem_rd == ex_rs1) fwd_a = mem_res;
      else if (wb_valid && wb_reg_we && wb_rd == ex_rs1)          fwd_a = wb_data;
    end
    if (ex_rs2 != 5'd0) begin
      if (mem_valid && mem_reg_we && !mem_re && mem_rd == ex_rs2) fwd_b = mem_res;
      else if (wb_valid && wb_reg_we && wb_rd == ex_rs2)          fwd_b = wb_data;
    end
  end

  assign alu_a = ex_ctrl.src_a_pc ? ex_pc : fwd_a;
  assign alu_b = ex_ctrl.src_b_imm ? ex_imm : fwd_b;

  rv_alu u_alu (.op(ex_ctrl.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  always_comb begin
    unique case (ex_f3)
      3'b000:  br_taken = (fwd_a == fwd_b);
      3'b001:  br_taken = (fwd_a != fwd_b);
      3'b100:  br_taken = ($signed(fwd_a) <  $signed(fwd_b));
      3'b101:  br_taken = ($signed(fwd_a) >= $signed(fwd_b));
      3'b110:  br_taken = (fwd_a <  fwd_b);
      3'b111:  br_taken = (fwd_a >= fwd_b);
      default: br_taken = 1'b0;
    endcase
  end

  assign target   = ex_ctrl.is_jalr ? ((fwd_a + ex_imm) & ~word_t'(1)) : (ex_pc + ex_imm);
  assign redirect = ex_valid && !ex_stall &&
                    (ex_ctrl.is_jal || ex_ctrl.is_jalr || (ex_ctrl.is_branch && br_taken));
  assign ex_res   = (ex_ctrl.is_jal || ex_ctrl.is_jalr) ? (ex_pc + 32'd4) : alu_y;

  // custom-instruction issue
  assign buf_latch   = ex_valid && ex_spec.buf_latch;
  assign buf_base    = fwd_a;
  assign buf_amount  = fwd_b;
  assign buf_req     = ex_valid && ex_spec.buf_xfer && !buf_wait;
  assign buf_dir     = ex_spec.buf_dir;
  assign sha_start   = ex_valid && ex_spec.sha && !sha_wait;
  assign sha_mode    = ex_spec.sha_mode;
  assign sha_nblocks = fwd_a[15:0];

  assign ex_stall = ex_valid && ((ex_spec.buf_xfer && !(buf_ack && !buf_wait)) ||
                                 (ex_spec.sha      && !(sha_done && !sha_wait)));

  assign load_use = id_valid && ex_valid && ex_ctrl.mem_re && ex_rd != 5'd0 &&
                    ((id_ctrl.uses_rs1 && id_rs1 == ex_rd) || (id_ctrl.uses_rs2 && id_rs2 == ex_rd));

  // ---------------- IF ----------------
  assign im_addr = pc[IM_AW+1:2];

  // ---------------- MEM ----------------
  assign dm_en    = mem_valid && (mem_re || mem_we);
  assign dm_we    = mem_valid && mem_we;
  assign dm_addr  = mem_res[DM_AW+1:2];

  // Byte and halfword stores: replicate the data over the word and enable the
  // addressed lanes.  Loads pick the addressed lanes and extend them.
  always_comb begin
    unique case (mem_f3[1:0])
      2'b00:   begin dm_wdata = {4{mem_sdata[7:0]}};  dm_be = 4'b0001 << mem_res[1:0]; end
      2'b01:   begin dm_wdata = {2{mem_sdata[15:0]}}; dm_be = mem_res[1] ? 4'b1100 : 4'b0011; end
      default: begin dm_wdata = mem_sdata;            dm_be = 4'b1111; end
    endcase
  end

  always_comb begin
    logic [7:0]  b;
    logic [15:0] h;
    b = dm_rdata[8*mem_res[1:0] +: 8];
    h = mem_res[1] ? dm_rdata[31:16] : dm_rdata[15:0];
    unique case (mem_f3)
      3'b000:  ld_data = {{24{b[7]}}, b};
      3'b001:  ld_data = {{16{h[15]}}, h};
      3'b100:  ld_data = {24'd0, b};
      3'b101:  ld_data = {16'd0, h};
      default: ld_data = dm_rdata;
    endcase
  end

  assign halted = wb_valid && wb_halt;

  // ---------------- sequential ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc        <= '0;
      stopping  <= 1'b0;
      id_valid  <= 1'b0;
      ex_valid  <= 1'b0;
      mem_valid <= 1'b0;
      wb_valid  <= 1'b0;
      buf_wait  <= 1'b0;
      sha_wait  <= 1'b0;
      id_pc <= '0; id_instr <= '0;
      ex_pc <= '0; ex_imm <= '0; ex_rs1v <= '0; ex_rs2v <= '0;
      ex_rs1 <= '0; ex_rs2 <= '0; ex_rd <= '0; ex_f3 <= '0; ex_ctrl <= '0; ex_spec <= '0;
      mem_reg_we <= 1'b0; mem_re <= 1'b0; mem_we <= 1'b0; mem_halt <= 1'b0;
      mem_rd <= '0; mem_res <= '0; mem_sdata <= '0; mem_f3 <= '0;
      wb_reg_we <= 1'b0; wb_halt <= 1'b0; wb_rd <= '0; wb_data <= '0;
    end else if (!run) begin
      pc        <= '0;
      stopping  <= 1'b0;
      id_valid  <= 1'b0;
      ex_valid  <= 1'b0;
      mem_valid <= 1'b0;
      wb_valid  <= 1'b0;
      buf_wait  <= 1'b0;
      sha_wait  <= 1'b0;
    end else begin
      // four-phase release tracking
      if (ex_valid && ex_spec.buf_xfer && buf_ack && !buf_wait) buf_wait <= 1'b1;
      else if (!buf_ack)                                        buf_wait <= 1'b0;
      if (ex_valid && ex_spec.sha && sha_done && !sha_wait)     sha_wait <= 1'b1;
      else if (!sha_done)                                       sha_wait <= 1'b0;

      // WB
      wb_valid  <= mem_valid;
      wb_reg_we <= mem_reg_we;
      wb_halt   <= mem_halt;
      wb_rd     <= mem_rd;
      wb_data   <= mem_re ? ld_data : mem_res;

      // MEM
      if (ex_stall) begin
        mem_valid <= 1'b0;
      end else begin
        mem_valid  <= ex_valid;
        mem_reg_we <= ex_ctrl.reg_we;
        mem_re     <= ex_ctrl.mem_re;
        mem_we     <= ex_ctrl.mem_we;
        mem_halt   <= ex_ctrl.is_halt;
        mem_rd     <= ex_rd;
        mem_res    <= ex_res;
        mem_sdata  <= fwd_b;
        mem_f3     <= ex_f3;
      end

      if (ex_valid && ex_ctrl.is_halt) stopping <= 1'b1;

      // a waiting custom instruction keeps its operands current
      if (ex_stall) begin
        ex_rs1v <= fwd_a;
        ex_rs2v <= fwd_b;
      end

      // EXE, ID, IF
      if (!ex_stall) begin
        if (redirect || load_use || stopping || (ex_valid && ex_ctrl.is_halt)) begin
          ex_valid <= 1'b0;
        end else begin
          ex_valid <= id_valid;
          ex_pc    <= id_pc;
          ex_imm   <= id_imm;
          ex_rs1v  <= id_rs1v;
          ex_rs2v  <= id_rs2v;
          ex_rs1   <= id_rs1;
          ex_rs2   <= id_rs2;
          ex_rd    <= id_rd;
          ex_f3    <= id_instr[14:12];
          ex_ctrl  <= id_ctrl;
          ex_spec  <= id_spec;
        end
        if (redirect) begin
          pc       <= target;
          id_valid <= 1'b0;
        end else if (stopping || (ex_valid && ex_ctrl.is_halt)) begin
          id_valid <= 1'b0;
        end else if (!load_use) begin
          pc       <= pc + 32'd4;
          id_valid <= 1'b1;
          id_pc    <= pc;
          id_instr <= im_rdata;
        end
      end
    end
  end

  // A burst request and a SHA start never overlap.
  a_one_unit: assert property (@(posedge clk) disable iff (!rst_n) !(buf_req && sha_start));

endmodule
