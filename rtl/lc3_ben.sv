// lc3_ben: the branch-enable flip-flop.
//
// BEN loads at the rising clock edge when LD.BEN is 1, from the condition
// codes and the n/z/p bits of a BR instruction:
//   BEN = IR[11] & N | IR[10] & Z | IR[9] & P.
// The control unit tests BEN after decode to choose between taking a branch
// and returning to fetch. Synchronous active-low reset clears it (this design's
// choice).
module lc3_ben
  import lc3_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ld_ben,
  input  word_t ir,
  input  logic  n,
  input  logic  z,
  input  logic  p,
  output logic  ben
);

  always_ff @(posedge clk) begin
    if (!rst_n)      ben <= 1'b0;
    else if (ld_ben) ben <= (ir[11] & n) | (ir[10] & z) | (ir[9] & p);
  end

endmodule
