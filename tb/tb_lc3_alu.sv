// tb_lc3_alu: self-checking test of the four ALU functions on random operands
// and on the corner values 0, 1, 0x7FFF, 0x8000 and 0xFFFF.
module tb_lc3_alu;
  import lc3_pkg::*;
  aluk_e aluk;
  logic [15:0] a, b, y, exp_y;
  logic [15:0] corner [5] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF};
  int checks = 0, failures = 0;

  lc3_alu #(.W(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [15:0] va, input logic [15:0] vb);
    for (int k = 0; k < 4; k++) begin
      aluk = aluk_e'(k); a = va; b = vb;
      case (k)
        0: exp_y = 16'((32'(va) + 32'(vb)) % 32'h10000);
        1: exp_y = va & vb;
        2: exp_y = va ^ 16'hFFFF;
        default: exp_y = va;
      endcase
      #1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL aluk=%0d a=%h b=%h y=%h exp=%h", k, va, vb, y, exp_y);
      end
    end
  endtask

  initial begin
    foreach (corner[i]) foreach (corner[j]) run(corner[i], corner[j]);
    for (int i = 0; i < 2000; i++) run(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
