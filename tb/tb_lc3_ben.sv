// tb_lc3_ben: self-checking test of the branch-enable flip-flop.
// Every combination of the IR n/z/p bits and a one-hot condition code is
// loaded; BEN must be 1 exactly when a requested condition holds, and hold its
// value when LD.BEN = 0.
module tb_lc3_ben;
  logic clk = 0, rst_n = 0, ld_ben = 0, n = 0, z = 0, p = 0, ben, model;
  logic [15:0] ir = 0;
  int checks = 0, failures = 0;

  lc3_ben dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    model = 1'b0;
    for (int rep = 0; rep < 20; rep++)
      for (int req = 0; req < 8; req++)
        for (int cc = 0; cc < 3; cc++) begin
          @(negedge clk);
          ld_ben = (rep % 4) != 3;
          ir = 16'($urandom);
          ir[11:9] = 3'(req);
          {n, z, p} = 3'b100 >> cc;
          @(posedge clk); #1;
          if (ld_ben) model = (req & (4 >> cc)) != 0;
          checks++;
          if (ben !== model) begin
            failures++;
            if (failures < 10) $display("FAIL req=%b nzp=%b ben=%b exp=%b", 3'(req), {n, z, p}, ben, model);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
