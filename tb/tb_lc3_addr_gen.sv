// tb_lc3_addr_gen: self-checking test of address generation.
// All ADDR1MUX, ADDR2MUX and MARMUX codes are applied to random IR, PC and SR1
// values; offsets are sign-extended here by arithmetic, independently of the
// design's function.
module tb_lc3_addr_gen;
  import lc3_pkg::*;
  word_t ir, pc, sr1_out, addr, marmux_out;
  addr1mux_e addr1mux;
  addr2mux_e addr2mux;
  marmux_e marmux;
  int checks = 0, failures = 0;

  lc3_addr_gen dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int signed_field(input logic [15:0] v, input int nbits);
    int x = int'(v) % (1 << nbits);
    if (x >= (1 << (nbits - 1))) x -= (1 << nbits);
    return x;
  endfunction

  initial begin
    for (int i = 0; i < 1000; i++) begin
      ir = 16'($urandom); pc = 16'($urandom); sr1_out = 16'($urandom);
      for (int a1 = 0; a1 < 2; a1++)
        for (int a2 = 0; a2 < 4; a2++)
          for (int mm = 0; mm < 2; mm++) begin
            int base, off;
            logic [15:0] exp_addr, exp_mm;
            addr1mux = addr1mux_e'(a1); addr2mux = addr2mux_e'(a2); marmux = marmux_e'(mm);
            base = (a1 == 1) ? int'(sr1_out) : int'(pc);
            case (a2)
              0: off = 0;
              1: off = signed_field(ir, 6);
              2: off = signed_field(ir, 9);
              default: off = signed_field(ir, 11);
            endcase
            exp_addr = 16'(base + off);
            exp_mm   = (mm == 1) ? exp_addr : (ir % 256);
            #1;
            checks += 2;
            if (addr !== exp_addr || marmux_out !== exp_mm) begin
              failures++;
              if (failures < 10)
                $display("FAIL a1=%0d a2=%0d mm=%0d ir=%h addr=%h/%h mm=%h/%h",
                         a1, a2, mm, ir, addr, exp_addr, marmux_out, exp_mm);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
