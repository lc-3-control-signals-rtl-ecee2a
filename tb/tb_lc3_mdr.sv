// tb_lc3_mdr: self-checking test of MDR and its input mux.
// With LD.MDR = 1 the register must take the memory data when MIO.EN = 1 and
// the bus when MIO.EN = 0; with LD.MDR = 0 it must hold.
module tb_lc3_mdr;
  logic clk = 0, rst_n = 0, ld_mdr = 0, mio_en = 0;
  logic [15:0] bus = 0, mem_rdata = 0, mdr, model;
  int checks = 0, failures = 0;

  lc3_mdr #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    model = 16'h0000;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ld_mdr = $urandom_range(0, 3) != 0;
      mio_en = $urandom_range(0, 1) == 1;
      bus = 16'($urandom); mem_rdata = 16'($urandom);
      @(posedge clk); #1;
      if (ld_mdr) model = mio_en ? mem_rdata : bus;
      checks++;
      if (mdr !== model) begin
        failures++;
        if (failures < 10) $display("FAIL ld=%0b mio=%0b mdr=%h exp=%h", ld_mdr, mio_en, mdr, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
