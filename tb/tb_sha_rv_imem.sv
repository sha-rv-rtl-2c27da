// Testbench of the instruction memory: host writes, combinational fetch reads.
module tb_sha_rv_imem;
  import sha_rv_pkg::*;

  logic clk = 0, host_we = 0;
  logic [9:0] host_addr, rd_addr;
  word_t host_wdata, rd_data;
  word_t model [1024];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha_rv_imem dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_addr = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); host_we = 1; host_addr = 10'(i); host_wdata = $urandom; model[i] = host_wdata;
    end
    @(negedge clk); host_we = 0;
    for (int i = 0; i < 1024; i++) begin
      rd_addr = 10'($urandom); #1; checks++;
      if (rd_data !== model[rd_addr]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
