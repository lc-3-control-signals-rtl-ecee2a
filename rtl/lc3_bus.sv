// lc3_bus: the shared 16-bit datapath bus and its four gate signals.
//
// Four sources can drive the bus: PC (GatePC), MDR (GateMDR), the ALU
// (GateALU) and MARMUX (GateMARMUX). In the classic drawing each gate signal
// enables 16 tri-state buffers; here the same enables drive an AND-OR
// multiplexer, which gives the same value whenever at most one gate is 1 and
// needs no on-chip tri-states. That rule (at most one gate active, otherwise
// the drivers would short) is checked by an assertion. With no gate active
// the bus reads 0, a choice of this design.
//
// Purely combinational: bus follows the inputs in the same cycle.
module lc3_bus #(
  parameter int unsigned W = 16
) (
  input  logic         gate_pc,
  input  logic         gate_mdr,
  input  logic         gate_alu,
  input  logic         gate_marmux,
  input  logic [W-1:0] pc,
  input  logic [W-1:0] mdr,
  input  logic [W-1:0] alu,
  input  logic [W-1:0] marmux,
  output logic [W-1:0] bus
);

  always_comb begin
    bus = ({W{gate_pc}}     & pc)
        | ({W{gate_mdr}}    & mdr)
        | ({W{gate_alu}}    & alu)
        | ({W{gate_marmux}} & marmux);
  end

  // At most one bus driver may be enabled.
  always_comb begin
    assert ($onehot0({gate_pc, gate_mdr, gate_alu, gate_marmux}))
      else $error("lc3_bus: more than one gate signal active");
  end

endmodule
