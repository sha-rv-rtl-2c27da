// State controller: start/done run control of the SHA-RV core.
//
// The host writes `start` (one-cycle pulse) once the program is in instruction
// memory and the data in data memory.  The controller then holds `run` high,
// which lets the RISC-V pipeline fetch from address 0, until the program's
// final ECALL/EBREAK retires (`halted` pulse).  It then drops `run` and raises
// `done`, which stays high until the next `start`.  Start/done come from the
// published system view; the three-state sequence is this design's own.
module sha_rv_state_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic halted,
  output logic run,
  output logic done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} run_state_e;
  run_state_e st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= S_IDLE;
    else begin
      unique case (st)
        S_IDLE:  if (start) st <= S_RUN;
        S_RUN:   if (halted) st <= S_DONE;
        S_DONE:  if (start) st <= S_RUN;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign run  = (st == S_RUN);
  assign done = (st == S_DONE);

endmodule
