// tb_lc3_cc: self-checking test of the condition codes.
// The bus is driven with random, zero, most-negative and most-positive values;
// after a load N/Z/P must match the sign of the value (computed here as a
// signed integer), and without a load they must hold.
module tb_lc3_cc;
  logic clk = 0, rst_n = 0, ld_cc = 0;
  logic [15:0] bus = 0;
  logic n, z, p;
  logic [2:0] model;
  int checks = 0, failures = 0;

  lc3_cc #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if ({n, z, p} !== model) begin
      failures++;
      if (failures < 10) $display("FAIL %s bus=%h nzp=%b exp=%b", what, bus, {n, z, p}, model);
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    model = 3'b010; check("reset");
    for (int i = 0; i < 3000; i++) begin
      int v;
      @(negedge clk);
      ld_cc = $urandom_range(0, 3) != 0;
      case ($urandom_range(0, 5))
        0: bus = 16'h0000;
        1: bus = 16'h8000;
        2: bus = 16'h7FFF;
        default: bus = 16'($urandom);
      endcase
      v = int'(bus);
      if (v >= 32768) v -= 65536;
      @(posedge clk); #1;
      if (ld_cc) model = (v < 0) ? 3'b100 : (v == 0) ? 3'b010 : 3'b001;
      check("step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
