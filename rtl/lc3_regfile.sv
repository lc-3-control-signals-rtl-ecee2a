// lc3_regfile: the eight 16-bit general-purpose registers R0-R7.
//
// One write port and two read ports. When LD.REG is 1 the value on din (the
// bus) is written into register dr at the rising clock edge. sr1_out and
// sr2_out read registers sr1 and sr2 combinationally, so a read in the cycle of
// a write returns the old value. Synchronous active-low reset clears all
// registers; the reset and the read/write timing are this design's choices.
module lc3_regfile #(
  parameter int unsigned W     = 16,
  parameter int unsigned NREGS = 8,
  localparam int unsigned RW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld_reg,
  input  logic [RW-1:0] dr,
  input  logic [W-1:0]  din,
  input  logic [RW-1:0] sr1,
  input  logic [RW-1:0] sr2,
  output logic [W-1:0]  sr1_out,
  output logic [W-1:0]  sr2_out
);

  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (ld_reg) begin
      regs[dr] <= din;
    end
  end

  assign sr1_out = regs[sr1];
  assign sr2_out = regs[sr2];

endmodule
