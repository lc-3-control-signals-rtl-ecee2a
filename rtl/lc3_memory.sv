// lc3_memory: the LC-3 main memory, 2^AW words of W bits, addressed by MAR.
//
// Two control signals run it. MIO.EN = 1 asks for an access; R.W then picks a
// write (1: M[addr] <- wdata at the rising clock edge) or a read (0: rdata
// shows M[addr] in the same cycle, for MDR to load). R, the ready signal back
// to the control unit, is 1 in every cycle with MIO.EN = 1: each access
// finishes in one cycle. That timing is this design's choice; the depth
// follows from the 16-bit MAR. The contents are not reset.
module lc3_memory #(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          mio_en,
  input  logic          r_w,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata,
  output logic          r
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (mio_en && r_w) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
  assign r     = mio_en;

endmodule
