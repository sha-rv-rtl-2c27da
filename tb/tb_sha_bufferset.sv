// Testbench of the BufferSet: writes every word, then checks the word read port
// and the parallel view, and that a write touches only its own lane.
module tb_sha_bufferset;
  import sha_rv_pkg::*;

  logic clk = 0, we = 0;
  logic [7:0] waddr, raddr;
  word_t wdata, rdata;
  word_t words [256];
  word_t model [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha_bufferset dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raddr = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(255 - i); #1;
      checks += 2;
      if (rdata !== model[255 - i]) failures++;
      if (words[i] !== model[i]) failures++;
    end
    // single-lane update
    @(negedge clk); we = 1; waddr = 8'd100; wdata = 32'h12345678; model[100] = wdata;
    @(negedge clk); we = 0;
    for (int i = 0; i < 256; i++) begin checks++; if (words[i] !== model[i]) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
