// Testbench of the dual-port data memory: both ports write different halves at
// the same time, then each port reads what the other wrote (port A one cycle
// after its address, port B combinationally); random byte-lane writes on port B
// are checked the same way.
module tb_sha_rv_dmem;
  import sha_rv_pkg::*;

  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [3:0] b_be = 4'b1111;
  logic [12:0] a_addr, b_addr;
  word_t a_wdata, a_rdata, b_wdata, b_rdata;
  word_t model [8192];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha_rv_dmem dut (.*);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 13'(i);        a_wdata = $urandom; model[i] = a_wdata;
      b_en = 1; b_we = 1; b_addr = 13'(4096 + i); b_wdata = $urandom; model[4096 + i] = b_wdata;
    end
    // byte-lane writes on the core port
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      a_en = 0; a_we = 0;
      b_en = 1; b_we = 1; b_addr = 13'($urandom); b_wdata = $urandom; b_be = 4'($urandom);
      for (int i = 0; i < 4; i++) if (b_be[i]) model[b_addr][8*i +: 8] = b_wdata[8*i +: 8];
    end
    @(negedge clk); a_en = 1; a_we = 0; b_we = 0; b_en = 0;
    for (int n = 0; n < 2000; n++) begin
      a_addr = 13'($urandom); b_addr = 13'($urandom);
      #1; checks++;
      if (b_rdata !== model[b_addr]) failures++;
      @(negedge clk); checks++;
      if (a_rdata !== model[a_addr]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
