// tb_lc3_regsel: self-checking test of DRMUX and SR1MUX.
// Every select code is applied with random instructions; the expected
// register numbers come from the LC-3 encodings written out here.
module tb_lc3_regsel;
  import lc3_pkg::*;
  word_t ir;
  drmux_e drmux;
  sr1mux_e sr1mux;
  logic [2:0] dr, sr1, sr2, exp_dr, exp_sr1;
  int checks = 0, failures = 0;

  lc3_regsel dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [2:0] got, input logic [2:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s ir=%h got=%0d exp=%0d", what, ir, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 1000; i++) begin
      ir = 16'($urandom);
      for (int s = 0; s < 3; s++) begin
        drmux = drmux_e'(s); sr1mux = sr1mux_e'(s);
        case (s)
          0: begin exp_dr = ir[11:9]; exp_sr1 = ir[11:9]; end
          1: begin exp_dr = 3'b111;   exp_sr1 = ir[8:6];  end
          default: begin exp_dr = 3'b110; exp_sr1 = 3'b110; end
        endcase
        #1;
        check(dr, exp_dr, "dr");
        check(sr1, exp_sr1, "sr1");
        check(sr2, ir[2:0], "sr2");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
