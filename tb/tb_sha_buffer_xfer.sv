// Testbench of the buffer transfer engine with a behavioural DMEM and the
// BufferSet: latches base/amount, runs a DMEM->buffer burst and a buffer->DMEM
// burst, checks the copied words, that nothing beyond the burst is touched, the
// n+1 cycle burst time and the clipping of the word count to 256.
module tb_sha_buffer_xfer;
  import sha_rv_pkg::*;

  logic clk = 0, rst_n = 0;
  logic latch = 0, req = 0, dir = 0, ack, busy;
  word_t base_in, amount_in;
  logic [12:0] base_word;
  logic dm_en, dm_we;
  logic [12:0] dm_addr;
  word_t dm_wdata, dm_rdata;
  logic buf_we;
  logic [7:0] buf_addr;
  word_t buf_wdata, buf_rdata;
  word_t words [256];
  word_t dmem [8192];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha_buffer_xfer dut (.*);
  sha_bufferset u_buf (.clk, .we(buf_we), .waddr(buf_addr), .wdata(buf_wdata),
                       .raddr(buf_addr), .rdata(buf_rdata), .words(words));

  assign dm_rdata = dmem[dm_addr];
  always_ff @(posedge clk) if (dm_en && dm_we) dmem[dm_addr] <= dm_wdata;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic burst(int base_w, int amt, bit d, output int cyc);
    @(negedge clk); latch = 1; base_in = base_w; amount_in = amt;
    @(negedge clk); latch = 0; req = 1; dir = d; cyc = 0;
    while (!ack) begin @(negedge clk); cyc++; end
    req = 0;
    @(negedge clk);
  endtask

  initial begin
    int cyc;
    for (int i = 0; i < 8192; i++) dmem[i] = $urandom;
    repeat (2) @(negedge clk); rst_n = 1;
    // fill the whole buffer from DMEM word 1024
    burst(1024, 256, 0, cyc);
    checks++; if (cyc != 257) begin failures++; $display("cycles %0d", cyc); end
    checks++; if (base_word != 13'd1024) failures++;
    for (int i = 0; i < 256; i++) begin checks++; if (words[i] !== dmem[1024 + i]) failures++; end
    // copy 5 words back to DMEM word 2000
    dmem[2005] = 32'hcafef00d;
    burst(2000, 5, 1, cyc);
    checks++; if (cyc != 6) failures++;
    for (int i = 0; i < 5; i++) begin checks++; if (dmem[2000 + i] !== words[i]) failures++; end
    checks++; if (dmem[2005] !== 32'hcafef00d) failures++;
    // a count above 256 is clipped
    burst(0, 1000, 0, cyc);
    checks++; if (cyc != 257) begin failures++; $display("clip cycles %0d", cyc); end
    checks++; if (words[255] !== dmem[255]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
