// Testbench of the register file: random writes against a model, x0 stays zero,
// and a read of the register being written returns the new value.
module tb_rv_regfile;
  import sha_rv_pkg::*;

  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] rs1, rs2, rd;
  word_t rs1_data, rs2_data, rd_data;
  word_t model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rv_regfile dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) model[i] = '0;
    rs1 = 0; rs2 = 0; rd = 0; rd_data = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = 1; rd = 5'($urandom); rd_data = $urandom;
      rs1 = 5'($urandom); rs2 = (n % 4 == 0) ? rd : 5'($urandom);
      #1;
      checks += 2;
      if (rs1_data !== ((rs1 == 0) ? 32'd0 : (rs1 == rd) ? rd_data : model[rs1])) failures++;
      if (rs2_data !== ((rs2 == 0) ? 32'd0 : (rs2 == rd) ? rd_data : model[rs2])) failures++;
      if (rd != 0) model[rd] = rd_data;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 32; i++) begin
      rs1 = 5'(i); #1; checks++;
      if (rs1_data !== model[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
