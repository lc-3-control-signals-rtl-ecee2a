// tb_lc3_regfile: self-checking test of the 8 x 16 register file.
// Random writes and reads are compared with a shadow array; reads are
// combinational and a same-cycle read returns the old value. Reset must
// clear every register.
module tb_lc3_regfile;
  logic clk = 0, rst_n = 0, ld_reg = 0;
  logic [2:0] dr = 0, sr1 = 0, sr2 = 0;
  logic [15:0] din = 0, sr1_out, sr2_out;
  logic [15:0] shadow [8];
  int checks = 0, failures = 0;

  lc3_regfile #(.W(16), .NREGS(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      shadow[i] = 16'h0000;
      sr1 = 3'(i); #1; check(sr1_out, 16'h0000, "reset");
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ld_reg = ($urandom_range(0, 3) != 0);
      dr = 3'($urandom); din = 16'($urandom);
      sr1 = 3'($urandom); sr2 = 3'($urandom);
      #1;
      check(sr1_out, shadow[sr1], "sr1 before edge");
      check(sr2_out, shadow[sr2], "sr2 before edge");
      @(posedge clk);
      if (ld_reg) shadow[dr] = din;
      #1;
      check(sr1_out, shadow[sr1], "sr1 after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
