// lc3_addr_gen: address generation (ADDR1MUX, ADDR2MUX, adder, MARMUX).
//
// The adder sums two operands. ADDR1MUX gives the first: PC (0) or source
// register 1 (1). ADDR2MUX gives the second: 0 (00), SEXT(IR[5:0]) (01),
// SEXT(IR[8:0]) (10) or SEXT(IR[10:0]) (11). The sum goes both to PCMUX (for
// BR, JMP, JSR) and to MARMUX, which puts either ZEXT(IR[7:0]) (0, the TRAP
// vector) or the sum (1) in front of the GateMARMUX buffer. The encodings are
// the LC-3's; the sum wraps modulo 2^16.
//
// Purely combinational.
module lc3_addr_gen
  import lc3_pkg::*;
(
  input  word_t     ir,
  input  word_t     pc,
  input  word_t     sr1_out,
  input  addr1mux_e addr1mux,
  input  addr2mux_e addr2mux,
  input  marmux_e   marmux,
  output word_t     addr,
  output word_t     marmux_out
);

  word_t op1, op2;

  always_comb begin
    op1 = (addr1mux == ADDR1_SR1) ? sr1_out : pc;
    unique case (addr2mux)
      ADDR2_OFF6:  op2 = sext(ir, 6);
      ADDR2_OFF9:  op2 = sext(ir, 9);
      ADDR2_OFF11: op2 = sext(ir, 11);
      default:     op2 = '0;           // ADDR2_ZERO
    endcase
    addr = op1 + op2;
    marmux_out = (marmux == MARMUX_ADDR) ? addr : {8'h00, ir[7:0]};
  end

endmodule
