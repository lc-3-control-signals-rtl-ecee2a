// tb_lc3_memory: self-checking test of the main memory at full size
// (64K x 16). Random writes (MIO.EN = 1, R.W = 1), reads (MIO.EN = 1,
// R.W = 0) and idle cycles are compared with an associative-array model. A
// cycle with R.W = 1 but MIO.EN = 0 must not write. R must equal MIO.EN, so
// every access completes in one cycle.
module tb_lc3_memory;
  logic clk = 0, mio_en = 0, r_w = 0, r;
  logic [15:0] addr = 0, wdata = 0, rdata;
  logic [15:0] model [logic [15:0]];
  logic [15:0] used [64];
  int checks = 0, failures = 0;

  lc3_memory #(.W(16), .AW(16)) dut (.*);

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
      if (failures < 10) $display("FAIL %s addr=%h got=%h exp=%h", what, addr, got, exp);
    end
  endtask

  initial begin
    // a small random address pool so that reads hit written words
    foreach (used[i]) used[i] = 16'($urandom);
    used[0] = 16'h0000; used[1] = 16'hFFFF;
    // write every pool address once
    foreach (used[i]) begin
      @(negedge clk);
      mio_en = 1; r_w = 1; addr = used[i]; wdata = 16'($urandom);
      model[addr] = wdata;
      #1; check({15'd0, r}, 16'd1, "ready on write");
    end
    for (int i = 0; i < 4000; i++) begin
      int op;
      @(negedge clk);
      op = int'($urandom_range(0, 3));
      addr = used[$urandom_range(0, 63)];
      wdata = 16'($urandom);
      mio_en = (op != 3);
      r_w = (op == 0) || (op == 3);
      #1;
      check({15'd0, r}, {15'd0, mio_en}, "ready");
      if (op == 1 || op == 2) check(rdata, model[addr], "read");
      @(posedge clk);
      if (op == 0) model[addr] = wdata;
    end
    @(negedge clk); mio_en = 0;
    foreach (used[i]) begin
      addr = used[i]; #1; check(rdata, model[addr], "final");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
