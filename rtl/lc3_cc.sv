// lc3_cc: the condition codes N, Z, P and the logic that computes them.
//
// The logic reads the bus as a two's-complement number: N = 1 if it is
// negative (bit W-1 set), Z = 1 if it is zero, P = 1 otherwise. All three
// flip-flops load together at the rising clock edge when LD.CC is 1, so
// exactly one of them is set. Synchronous active-low reset sets Z (this
// design's choice, keeping one code set).
module lc3_cc #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld_cc,
  input  logic [W-1:0] bus,
  output logic         n,
  output logic         z,
  output logic         p
);

  logic n_d, z_d, p_d;

  always_comb begin
    n_d = bus[W-1];
    z_d = (bus == '0);
    p_d = !n_d && !z_d;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n <= 1'b0; z <= 1'b1; p <= 1'b0;
    end else if (ld_cc) begin
      n <= n_d; z <= z_d; p <= p_d;
    end
  end

endmodule
