// Testbench of the custom-instruction decoder: every funct3 of both custom
// opcodes, plus standard instructions that must decode to nothing.
module tb_rv_spec_decoder;
  import sha_rv_pkg::*;

  word_t instr;
  spec_t spec;
  int checks = 0, failures = 0;

  rv_spec_decoder dut (.*);

  function automatic word_t enc(logic [6:0] op, int f3);
    return {7'd0, 5'd20, 5'd8, 3'(f3), 5'd0, op};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 8; f++) begin
      instr = enc(7'b0101011, f); #1; checks++;
      if (spec.buf_latch !== (f == 0) || spec.buf_xfer !== (f == 1 || f == 2) ||
          (spec.buf_xfer && spec.buf_dir !== (f == 2)) || spec.sha) begin
        failures++; $display("buf f3=%0d %p", f, spec);
      end
      instr = enc(7'b0001011, f); #1; checks++;
      if (spec.sha !== (f < 4) || (f < 4 && spec.sha_mode !== 3'(f)) || spec.buf_latch || spec.buf_xfer) begin
        failures++; $display("sha f3=%0d %p", f, spec);
      end
    end
    instr = 32'h00208133; #1; checks++; if (spec !== '0) failures++;
    instr = 32'h0030a423; #1; checks++; if (spec !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
