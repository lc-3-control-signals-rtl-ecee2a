// lc3_sr2mux: chooses the ALU B operand.
//
// B is either SR2 OUT from the register file or the 5-bit immediate IR[4:0]
// sign-extended to 16 bits. The choice is not a control-unit signal: it comes
// from the instruction itself, IR[5] = 1 selecting the immediate, as in the
// LC-3 ADD/AND formats (the select wiring is this design's reading of the
// datapath drawing, which shows no select label).
//
// Purely combinational.
module lc3_sr2mux
  import lc3_pkg::*;
(
  input  word_t ir,
  input  word_t sr2_out,
  output word_t b
);

  always_comb begin
    if (ir[5]) b = sext(ir, 5);
    else       b = sr2_out;
  end

endmodule
