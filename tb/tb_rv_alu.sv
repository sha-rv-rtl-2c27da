// Testbench of the ALU: random operands for every operation, compared with an
// independent expression per operation, plus shift and compare corner cases.
module tb_rv_alu;
  import sha_rv_pkg::*;

  alu_op_e op;
  word_t a, b, y;
  int checks = 0, failures = 0;

  rv_alu dut (.*);

  function automatic word_t model(alu_op_e o, word_t x, word_t z);
    longint sx, sz;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    case (o)
      ALU_ADD:  return word_t'(longint'(x) + longint'(z));
      ALU_SUB:  return word_t'(longint'(x) - longint'(z));
      ALU_SLL:  return word_t'(64'(x) << z[4:0]);
      ALU_SLT:  return (sx < sz) ? 1 : 0;
      ALU_SLTU: return (longint'(x) < longint'(z)) ? 1 : 0;
      ALU_XOR:  return x ^ z;
      ALU_SRL:  return word_t'(64'(x) >> z[4:0]);
      ALU_SRA:  return word_t'(sx >>> z[4:0]);
      ALU_OR:   return x | z;
      ALU_AND:  return x & z;
      default:  return z;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static word_t corner [6] = '{32'h0, 32'h1, 32'h7fffffff, 32'h80000000, 32'hffffffff, 32'h0000001f};
    for (int o = 0; o <= int'(ALU_PASS_B); o++) begin
      for (int n = 0; n < 236; n++) begin
        op = alu_op_e'(o);
        if (n < 36) begin a = corner[n / 6]; b = corner[n % 6]; end
        else begin a = $urandom; b = $urandom; end
        #1;
        checks++;
        if (y !== model(op, a, b)) begin failures++; $display("op %0d a %h b %h y %h", o, a, b, y); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
