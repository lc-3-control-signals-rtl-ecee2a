// lc3_pc: the program counter and PCMUX.
//
// When LD.PC is 1, PC takes at the rising clock edge the PCMUX output:
// PC + 1 (00), the bus (01) or the address-generation adder (10), using the
// LC-3 encoding. Code 11 is unused and, as a choice of this design, loads
// PC + 1. Synchronous active-low reset sets PC to PC_RESET (0x3000 by default,
// the usual start of an LC-3 user program; the reset value is this design's
// choice).
module lc3_pc
  import lc3_pkg::*;
#(
  parameter word_t PC_RESET = 16'h3000
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ld_pc,
  input  pcmux_e pcmux,
  input  word_t  bus,
  input  word_t  addr,
  output word_t  pc
);

  word_t pc_next;

  always_comb begin
    unique case (pcmux)
      PCMUX_BUS:  pc_next = bus;
      PCMUX_ADDR: pc_next = addr;
      default:    pc_next = pc + 16'd1;   // PCMUX_INC
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     pc <= PC_RESET;
    else if (ld_pc) pc <= pc_next;
  end

endmodule
