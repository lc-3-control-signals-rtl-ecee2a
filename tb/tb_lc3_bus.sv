// tb_lc3_bus: self-checking test of the four-source gated bus.
// For random source values, each single gate must put its source on the bus,
// and no gate must give 0. Only legal (one-hot or empty) gate patterns are
// driven, since two active gates violate the bus rule.
module tb_lc3_bus;
  logic gate_pc, gate_mdr, gate_alu, gate_marmux;
  logic [15:0] pc, mdr, alu, marmux, bus, exp_bus;
  int checks = 0, failures = 0;

  lc3_bus #(.W(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int sel;
      pc = 16'($urandom); mdr = 16'($urandom); alu = 16'($urandom); marmux = 16'($urandom);
      sel = int'($urandom_range(0, 4));
      {gate_pc, gate_mdr, gate_alu, gate_marmux} = 4'b0;
      case (sel)
        0: begin gate_pc = 1;     exp_bus = pc;     end
        1: begin gate_mdr = 1;    exp_bus = mdr;    end
        2: begin gate_alu = 1;    exp_bus = alu;    end
        3: begin gate_marmux = 1; exp_bus = marmux; end
        default: exp_bus = 16'h0000;
      endcase
      #1;
      checks++;
      if (bus !== exp_bus) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%0d bus=%h exp=%h", sel, bus, exp_bus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
