// lc3_mdr: the memory data register and its input multiplexer.
//
// MDR loads at the rising clock edge when LD.MDR is 1. Its new value is the
// memory's read data when MIO.EN is 1 (a memory read, MDR <- M[MAR]) and the
// bus otherwise (MDR <- register value before a store); MIO.EN is the mux
// select, as in the LC-3 datapath. Synchronous active-low reset clears it
// (this design's choice).
module lc3_mdr #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld_mdr,
  input  logic         mio_en,
  input  logic [W-1:0] bus,
  input  logic [W-1:0] mem_rdata,
  output logic [W-1:0] mdr
);

  always_ff @(posedge clk) begin
    if (!rst_n)      mdr <= '0;
    else if (ld_mdr) mdr <= mio_en ? mem_rdata : bus;
  end

endmodule
