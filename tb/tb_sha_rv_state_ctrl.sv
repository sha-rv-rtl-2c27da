// Testbench of the state controller: start -> run, halted -> done, restart,
// start ignored while running, then 500 random cycles of start and halted
// compared with a reference model of the three-state sequence.
module tb_sha_rv_state_ctrl;
  logic clk = 0, rst_n = 0, start = 0, halted = 0, run, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha_rv_state_ctrl dut (.*);

  task automatic expect_rd(logic r, logic d);
    checks++;
    if (run !== r || done !== d) begin failures++; $display("t=%0t run %b done %b", $time, run, done); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    expect_rd(0, 0);
    @(negedge clk); halted = 1; @(negedge clk); halted = 0; expect_rd(0, 0);   // ignored when idle
    @(negedge clk); start = 1; @(negedge clk); start = 0; expect_rd(1, 0);
    repeat (5) @(negedge clk); expect_rd(1, 0);
    halted = 1; @(negedge clk); halted = 0; expect_rd(0, 1);
    repeat (3) @(negedge clk); expect_rd(0, 1);
    start = 1; @(negedge clk); start = 0; expect_rd(1, 0);
    halted = 1; @(negedge clk); halted = 0; expect_rd(0, 1);
    // start while running is ignored
    start = 1; @(negedge clk); start = 0; expect_rd(1, 0);
    start = 1; @(negedge clk); start = 0; expect_rd(1, 0);
    halted = 1; @(negedge clk); halted = 0; expect_rd(0, 1);
    // random start/halted sequence against a reference model
    begin
      logic m_run, m_done;
      m_run = 0; m_done = 1;
      for (int n = 0; n < 500; n++) begin
        start = 1'($urandom_range(0, 3) == 0); halted = 1'($urandom_range(0, 3) == 0);
        @(negedge clk);
        if (m_run) begin if (halted) begin m_run = 0; m_done = 1; end end
        else if (start) begin m_run = 1; m_done = 0; end
        expect_rd(m_run, m_done);
      end
      start = 0; halted = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
