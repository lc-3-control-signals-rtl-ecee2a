// tb_lc3_ldreg: self-checking test of the load-enabled register (IR, MAR).
// The register must clear on reset, take d at an edge with ld = 1 and hold
// its value at an edge with ld = 0.
module tb_lc3_ldreg;
  logic clk = 0, rst_n = 0, ld = 0;
  logic [15:0] d = 0, q, model;
  int checks = 0, failures = 0;

  lc3_ldreg #(.W(16)) dut (.*);

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
      ld = $urandom_range(0, 1) == 1;
      d = 16'($urandom);
      @(posedge clk); #1;
      if (ld) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL ld=%0b q=%h exp=%h", ld, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
