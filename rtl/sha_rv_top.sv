// SHA-RV: RISC-V core with a four-stage pipelined SHA-224/256 unit.
//
// Top level of the accelerator as seen from the host processing system.  The
// host loads a RISC-V program into instruction memory and message data into
// data memory (ports `im_*`, `dm_*`; in a system these are driven by the AXI
// interconnect and DMA, which are outside this RTL), pulses `start` and waits
// for `done`.  Inside:
//   state controller  -> start/done, runs the pipeline from address 0
//   rv_core           -> five-stage RV32I pipeline; its EXE stage issues the
//                        custom buffer and SHA instructions
//   buffer engine     -> DMEM <-> BufferSet bursts (base r8, amount r20)
//   BufferSet         -> 256 x 32-bit flip-flop buffer, fully parallel read
//   SHA controller    -> PREP / LOADMSG / EXEC / FINAL / DONE session FSM
//   SHA core          -> Message Expander, Message Compressor, Value Rotator,
//                        four pipeline stages, N_IN interleaved blocks
//   IMEM, DMEM        -> host-writable program memory, dual-port data memory
// The core-side DMEM port is shared: the burst engine when it is busy, else the
// SHA controller when it copies, else the RISC-V MEM stage (which holds a bubble
// whenever one of the other two can be active).  The BufferSet write port is
// shared the same way between the burst engine and the SHA controller.
// The host port of DMEM stays usable at all times, so the host can write the
// next input into one half of DMEM while the core hashes the other half.
module sha_rv_top
  import sha_rv_pkg::*;
#(
  parameter int unsigned N_IN     = 4,     // interleaved blocks in the SHA core
  parameter int unsigned IM_DEPTH = 1024,  // instruction memory words
  parameter int unsigned DM_DEPTH = 8192   // data memory words
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // control
  input  logic                        start,
  output logic                        done,
  // host access to instruction memory
  input  logic                        im_we,
  input  logic [$clog2(IM_DEPTH)-1:0] im_addr,
  input  word_t                       im_wdata,
  // host access to data memory
  input  logic                        dm_en,
  input  logic                        dm_we,
  input  logic [$clog2(DM_DEPTH)-1:0] dm_addr,
  input  word_t                       dm_wdata,
  output word_t                       dm_rdata,
  // status
  output sha_state_e                  sha_state
);

  localparam int unsigned IM_AW = $clog2(IM_DEPTH);
  localparam int unsigned DM_AW = $clog2(DM_DEPTH);

  logic run, halted;

  // core <-> memories
  logic [IM_AW-1:0] cpu_im_addr;
  word_t            cpu_im_rdata;
  logic             cpu_dm_en, cpu_dm_we;
  logic [3:0]       cpu_dm_be, b_be;
  logic [DM_AW-1:0] cpu_dm_addr;
  word_t            cpu_dm_wdata;

  // custom-instruction handshakes
  logic        buf_latch, buf_req, buf_dir, buf_ack, xfer_busy;
  word_t       buf_base, buf_amount;
  logic        sha_start, sha_done;
  logic [2:0]  sha_mode;
  logic [15:0] sha_nblocks;
  logic [DM_AW-1:0] base_word;

  // shared DMEM core port
  logic             x_dm_en, x_dm_we, c_dm_en, c_dm_we, b_en, b_we;
  logic [DM_AW-1:0] x_dm_addr, c_dm_addr, b_addr;
  word_t            x_dm_wdata, c_dm_wdata, b_wdata, b_rdata;

  // BufferSet
  logic        x_buf_we, c_buf_we, bs_we;
  logic [7:0]  x_buf_addr, c_buf_addr, bs_waddr;
  word_t       x_buf_wdata, c_buf_wdata, bs_wdata, bs_rdata;
  word_t       bs_words [BUF_WORDS];

  // SHA core
  logic        core_start, core_done, core_busy;
  logic [2:0]  core_ncases;
  word_t       core_h      [N_IN][8];
  word_t       core_msg    [N_IN][16];
  word_t       core_k      [64];
  word_t       core_digest [N_IN][8];

  sha_rv_state_ctrl u_state (
    .clk, .rst_n, .start, .halted, .run, .done
  );

  rv_core #(.IM_AW(IM_AW), .DM_AW(DM_AW)) u_cpu (
    .clk, .rst_n, .run, .halted,
    .im_addr(cpu_im_addr), .im_rdata(cpu_im_rdata),
    .dm_en(cpu_dm_en), .dm_we(cpu_dm_we), .dm_be(cpu_dm_be), .dm_addr(cpu_dm_addr),
    .dm_wdata(cpu_dm_wdata), .dm_rdata(b_rdata),
    .buf_latch, .buf_base, .buf_amount, .buf_req, .buf_dir, .buf_ack,
    .sha_start, .sha_mode, .sha_nblocks, .sha_done
  );

  sha_rv_imem #(.DEPTH(IM_DEPTH)) u_imem (
    .clk, .host_we(im_we), .host_addr(im_addr), .host_wdata(im_wdata),
    .rd_addr(cpu_im_addr), .rd_data(cpu_im_rdata)
  );

  sha_buffer_xfer #(.DM_AW(DM_AW), .BUF_AW(8)) u_xfer (
    .clk, .rst_n,
    .latch(buf_latch), .base_in(buf_base), .amount_in(buf_amount),
    .req(buf_req), .dir(buf_dir), .ack(buf_ack), .busy(xfer_busy), .base_word,
    .dm_en(x_dm_en), .dm_we(x_dm_we), .dm_addr(x_dm_addr), .dm_wdata(x_dm_wdata), .dm_rdata(b_rdata),
    .buf_we(x_buf_we), .buf_addr(x_buf_addr), .buf_wdata(x_buf_wdata), .buf_rdata(bs_rdata)
  );

  sha_controller #(.N_IN(N_IN), .DM_AW(DM_AW)) u_ctrl (
    .clk, .rst_n,
    .start_sha(sha_start), .mode(sha_mode), .n_blocks(sha_nblocks), .base_word,
    .done_sha(sha_done), .state(sha_state),
    .dm_en(c_dm_en), .dm_we(c_dm_we), .dm_addr(c_dm_addr), .dm_wdata(c_dm_wdata), .dm_rdata(b_rdata),
    .buf_we(c_buf_we), .buf_addr(c_buf_addr), .buf_wdata(c_buf_wdata), .buf_words(bs_words),
    .core_start, .core_ncases, .core_h, .core_msg, .core_k, .core_done, .core_digest
  );

  sha_core #(.N_IN(N_IN)) u_sha (
    .clk, .rst_n, .start(core_start), .n_cases(core_ncases),
    .h_in(core_h), .msg(core_msg), .k(core_k),
    .busy(core_busy), .done(core_done), .digest(core_digest)
  );

  // BufferSet write-port sharing
  assign bs_we    = x_buf_we | c_buf_we;
  assign bs_waddr = x_buf_we ? x_buf_addr  : c_buf_addr;
  assign bs_wdata = x_buf_we ? x_buf_wdata : c_buf_wdata;

  sha_bufferset #(.WORDS(BUF_WORDS)) u_buf (
    .clk, .we(bs_we), .waddr(bs_waddr), .wdata(bs_wdata),
    .raddr(x_buf_addr), .rdata(bs_rdata), .words(bs_words)
  );

  // DMEM core-port sharing
  always_comb begin
    if (xfer_busy) begin
      b_en = x_dm_en; b_we = x_dm_we; b_be = 4'b1111; b_addr = x_dm_addr; b_wdata = x_dm_wdata;
    end else if (c_dm_en) begin
      b_en = c_dm_en; b_we = c_dm_we; b_be = 4'b1111; b_addr = c_dm_addr; b_wdata = c_dm_wdata;
    end else begin
      b_en = cpu_dm_en; b_we = cpu_dm_we; b_be = cpu_dm_be; b_addr = cpu_dm_addr; b_wdata = cpu_dm_wdata;
    end
  end

  sha_rv_dmem #(.DEPTH(DM_DEPTH)) u_dmem (
    .clk,
    .a_en(dm_en), .a_we(dm_we), .a_addr(dm_addr), .a_wdata(dm_wdata), .a_rdata(dm_rdata),
    .b_en, .b_we, .b_be, .b_addr, .b_wdata, .b_rdata
  );

  // Only one user of the core-side DMEM port at a time.
  a_dm_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !((xfer_busy && c_dm_en) || ((xfer_busy || c_dm_en) && cpu_dm_en)));

  // The controller starts the SHA core only when it is idle, and the core
  // works only while the controller is in EXEC.
  a_core_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    core_start |-> !core_busy);
  a_core_busy_exec: assert property (@(posedge clk) disable iff (!rst_n)
    core_busy |-> (sha_state == ST_EXEC));

endmodule
