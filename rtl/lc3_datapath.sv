// lc3_datapath: the LC-3 datapath, controlled by a 25-bit control word.
//
// All registers load from a single 16-bit bus, or from a mux in front of
// them. Each cycle the control unit (outside this module) supplies ctrl, which
// says which of four sources drives the bus (GatePC, GateMDR, GateALU,
// GateMARMUX), which registers load at the next rising clock edge (LD.MAR,
// LD.MDR, LD.IR, LD.BEN, LD.REG, LD.CC, LD.PC), how the muxes are set
// (PCMUX, DRMUX, SR1MUX, ADDR1MUX, ADDR2MUX, MARMUX), the ALU function (ALUK)
// and the memory operation (MIO.EN, R.W). In return the datapath gives the
// control unit IR, BEN, the condition codes and the memory ready signal R.
//
// Wiring: source register 1 feeds the ALU A input and ADDR1MUX; SR2MUX feeds
// the ALU B input; the address adder feeds PCMUX and MARMUX; MAR addresses the
// memory, MDR is its write data, and MDR loads either the bus or the memory
// output. Interrupt and privilege support (saved PSR, supervisor stack pointer
// registers) is left out; the R6 selections of DRMUX and SR1MUX exist.
// Memory-mapped device registers are not included; MAR and MDR are brought out
// so device logic can be attached.
//
// Timing: every control word takes one clock cycle. Register values change at
// the rising edge that ends the cycle; bus and mux outputs are combinational.
// A memory read or write completes in the cycle it is issued (R = MIO.EN).
// Reset is synchronous and active low.
module lc3_datapath
  import lc3_pkg::*;
#(
  parameter word_t PC_RESET = 16'h3000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  ctrl_t ctrl,
  // to the control unit
  output word_t ir,
  output logic  ben,
  output logic  n,
  output logic  z,
  output logic  p,
  output logic  r,
  // observation / device attachment
  output word_t bus,
  output word_t pc,
  output word_t mar,
  output word_t mdr
);

  // The control word must carry exactly the 25 control signals.
  if ($bits(ctrl_t) != NUM_CTRL) begin : g_ctrl_width_check
    $error("ctrl_t does not hold %0d control signals", NUM_CTRL);
  end

  word_t      sr1_out, sr2_out, alu_b, alu_y, addr, marmux_out, mem_rdata;
  logic [2:0] dr, sr1, sr2;

  lc3_bus #(.W(WORD_W)) u_bus (
    .gate_pc    (ctrl.gate_pc),
    .gate_mdr   (ctrl.gate_mdr),
    .gate_alu   (ctrl.gate_alu),
    .gate_marmux(ctrl.gate_marmux),
    .pc         (pc),
    .mdr        (mdr),
    .alu        (alu_y),
    .marmux     (marmux_out),
    .bus        (bus)
  );

  lc3_pc #(.PC_RESET(PC_RESET)) u_pc (
    .clk  (clk),
    .rst_n(rst_n),
    .ld_pc(ctrl.ld_pc),
    .pcmux(ctrl.pcmux),
    .bus  (bus),
    .addr (addr),
    .pc   (pc)
  );

  lc3_ldreg #(.W(WORD_W)) u_ir (
    .clk(clk), .rst_n(rst_n), .ld(ctrl.ld_ir), .d(bus), .q(ir)
  );

  lc3_ldreg #(.W(WORD_W)) u_mar (
    .clk(clk), .rst_n(rst_n), .ld(ctrl.ld_mar), .d(bus), .q(mar)
  );

  lc3_mdr #(.W(WORD_W)) u_mdr (
    .clk      (clk),
    .rst_n    (rst_n),
    .ld_mdr   (ctrl.ld_mdr),
    .mio_en   (ctrl.mio_en),
    .bus      (bus),
    .mem_rdata(mem_rdata),
    .mdr      (mdr)
  );

  lc3_memory #(.W(WORD_W), .AW(WORD_W)) u_mem (
    .clk   (clk),
    .mio_en(ctrl.mio_en),
    .r_w   (ctrl.r_w),
    .addr  (mar),
    .wdata (mdr),
    .rdata (mem_rdata),
    .r     (r)
  );

  lc3_regsel u_regsel (
    .ir    (ir),
    .drmux (ctrl.drmux),
    .sr1mux(ctrl.sr1mux),
    .dr    (dr),
    .sr1   (sr1),
    .sr2   (sr2)
  );

  lc3_regfile #(.W(WORD_W), .NREGS(8)) u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .ld_reg (ctrl.ld_reg),
    .dr     (dr),
    .din    (bus),
    .sr1    (sr1),
    .sr2    (sr2),
    .sr1_out(sr1_out),
    .sr2_out(sr2_out)
  );

  lc3_sr2mux u_sr2mux (
    .ir     (ir),
    .sr2_out(sr2_out),
    .b      (alu_b)
  );

  lc3_alu #(.W(WORD_W)) u_alu (
    .aluk(ctrl.aluk),
    .a   (sr1_out),
    .b   (alu_b),
    .y   (alu_y)
  );

  lc3_addr_gen u_addr_gen (
    .ir        (ir),
    .pc        (pc),
    .sr1_out   (sr1_out),
    .addr1mux  (ctrl.addr1mux),
    .addr2mux  (ctrl.addr2mux),
    .marmux    (ctrl.marmux),
    .addr      (addr),
    .marmux_out(marmux_out)
  );

  lc3_cc #(.W(WORD_W)) u_cc (
    .clk  (clk),
    .rst_n(rst_n),
    .ld_cc(ctrl.ld_cc),
    .bus  (bus),
    .n    (n),
    .z    (z),
    .p    (p)
  );

  lc3_ben u_ben (
    .clk   (clk),
    .rst_n (rst_n),
    .ld_ben(ctrl.ld_ben),
    .ir    (ir),
    .n     (n),
    .z     (z),
    .p     (p),
    .ben   (ben)
  );

endmodule
