// tb_lc3_sr2mux: self-checking test of the ALU B-operand mux.
// With IR[5] = 0 the output must be SR2 OUT; with IR[5] = 1 it must be IR[4:0]
// sign-extended, computed here by arithmetic (imm5 - 32 when bit 4 is set).
module tb_lc3_sr2mux;
  logic [15:0] ir, sr2_out, b, exp_b;
  int checks = 0, failures = 0;

  lc3_sr2mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int imm;
      ir = 16'($urandom); sr2_out = 16'($urandom);
      imm = int'(ir[4:0]);
      if (imm >= 16) imm -= 32;
      exp_b = ir[5] ? 16'(imm) : sr2_out;
      #1;
      checks++;
      if (b !== exp_b) begin
        failures++;
        if (failures < 10) $display("FAIL ir=%h sr2=%h b=%h exp=%h", ir, sr2_out, b, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
