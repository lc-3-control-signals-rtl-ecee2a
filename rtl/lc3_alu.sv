// lc3_alu: the LC-3 ALU.
//
// ALUK selects one of four functions of the A input (source register 1) and
// the B input (SR2MUX): 00 A + B, 01 A AND B, 10 NOT A, 11 PASS A. The
// encoding is the LC-3's; the sum wraps modulo 2^W. The result reaches the
// bus through GateALU, so ALUK matters only while GateALU = 1.
//
// Purely combinational.
module lc3_alu
  import lc3_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  aluk_e        aluk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  always_comb begin
    unique case (aluk)
      ALUK_ADD: y = a + b;
      ALUK_AND: y = a & b;
      ALUK_NOT: y = ~a;
      default:  y = a;    // ALUK_PASS
    endcase
  end

endmodule
