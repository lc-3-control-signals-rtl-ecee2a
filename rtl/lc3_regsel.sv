// lc3_regsel: DRMUX and SR1MUX, the register-number multiplexers.
//
// DRMUX picks the register written when LD.REG = 1: IR[11:9] (00), R7 (01)
// or R6 (10). SR1MUX picks source register 1, which feeds the ALU A input and
// ADDR1MUX: IR[11:9] (00, stores), IR[8:6] (01, ALU operations, JMP, LDR/STR)
// or R6 (10). These encodings are the LC-3's. Code 11 is unused and, as a
// choice of this design, behaves like 00. Source register 2 is always the
// LC-3 operand field IR[2:0].
//
// Purely combinational.
module lc3_regsel
  import lc3_pkg::*;
(
  input  word_t       ir,
  input  drmux_e      drmux,
  input  sr1mux_e     sr1mux,
  output logic [2:0]  dr,
  output logic [2:0]  sr1,
  output logic [2:0]  sr2
);

  always_comb begin
    unique case (drmux)
      DRMUX_R7: dr = 3'd7;
      DRMUX_R6: dr = 3'd6;
      default:  dr = ir[11:9];
    endcase
  end

  always_comb begin
    unique case (sr1mux)
      SR1MUX_IR8: sr1 = ir[8:6];
      SR1MUX_R6:  sr1 = 3'd6;
      default:    sr1 = ir[11:9];
    endcase
  end

  assign sr2 = ir[2:0];

endmodule
