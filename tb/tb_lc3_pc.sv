// tb_lc3_pc: self-checking test of PC and PCMUX.
// After reset PC must be 0x3000. Random cycles then load PC + 1, the bus or
// the adder value, or hold, and PC is compared with a model after each edge.
module tb_lc3_pc;
  import lc3_pkg::*;
  logic clk = 0, rst_n = 0, ld_pc = 0;
  pcmux_e pcmux = PCMUX_INC;
  word_t bus = 0, addr = 0, pc, model;
  int checks = 0, failures = 0;

  lc3_pc #(.PC_RESET(16'h3000)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (pc !== model) begin
      failures++;
      if (failures < 10) $display("FAIL %s pc=%h exp=%h", what, pc, model);
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    model = 16'h3000; check("reset");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ld_pc = ($urandom_range(0, 4) != 0);
      pcmux = pcmux_e'($urandom_range(0, 2));
      bus = 16'($urandom); addr = 16'($urandom);
      @(posedge clk); #1;
      if (ld_pc)
        case (pcmux)
          PCMUX_INC: model = 16'(model + 1);
          PCMUX_BUS: model = bus;
          default:   model = addr;
        endcase
      check("step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
