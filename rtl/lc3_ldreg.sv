// lc3_ldreg: a W-bit register with a load enable, used for IR and MAR.
//
// Both registers take their new value from the bus, at the rising clock edge
// of a cycle in which their load signal (LD.IR or LD.MAR) is 1, and hold it
// otherwise. Synchronous active-low reset clears the register (this design's
// choice).
module lc3_ldreg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end

endmodule
