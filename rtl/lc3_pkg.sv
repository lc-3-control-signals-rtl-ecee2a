// lc3_pkg: types and constants shared by the LC-3 datapath blocks.
//
// The control unit drives the datapath with 25 control signals in five
// groups: seven register loads, four bus gates, ten mux-select bits (PCMUX 2,
// DRMUX 2, SR1MUX 2, ADDR1MUX 1, ADDR2MUX 2, MARMUX 1), two ALU-function bits
// and two memory bits. ctrl_t packs them into one 25-bit word. The select
// encodings below are the standard LC-3 ones. Signals for interrupts and
// privilege are not part of this datapath.
package lc3_pkg;

  localparam int unsigned WORD_W   = 16;  // every bus and register is 16 bits
  localparam int unsigned NUM_CTRL = 25;  // size of the control word

  typedef logic [WORD_W-1:0] word_t;

  // PCMUX: value written into PC when LD.PC = 1.
  typedef enum logic [1:0] {
    PCMUX_INC  = 2'b00,  // PC + 1
    PCMUX_BUS  = 2'b01,  // bus
    PCMUX_ADDR = 2'b10   // address-generation adder (BR, JMP, JSR)
  } pcmux_e;

  // DRMUX: destination register when LD.REG = 1.
  typedef enum logic [1:0] {
    DRMUX_IR11 = 2'b00,  // IR[11:9]
    DRMUX_R7   = 2'b01,  // R7
    DRMUX_R6   = 2'b10   // R6
  } drmux_e;

  // SR1MUX: source register 1 (ALU A input and ADDR1MUX).
  typedef enum logic [1:0] {
    SR1MUX_IR11 = 2'b00,  // IR[11:9] (stores)
    SR1MUX_IR8  = 2'b01,  // IR[8:6]  (ALU ops, JMP, LDR/STR)
    SR1MUX_R6   = 2'b10   // R6
  } sr1mux_e;

  // ADDR1MUX: first adder operand.
  typedef enum logic {
    ADDR1_PC  = 1'b0,
    ADDR1_SR1 = 1'b1
  } addr1mux_e;

  // ADDR2MUX: second adder operand.
  typedef enum logic [1:0] {
    ADDR2_ZERO  = 2'b00,  // 0
    ADDR2_OFF6  = 2'b01,  // SEXT(IR[5:0])
    ADDR2_OFF9  = 2'b10,  // SEXT(IR[8:0])
    ADDR2_OFF11 = 2'b11   // SEXT(IR[10:0])
  } addr2mux_e;

  // MARMUX: value gated onto the bus by GateMARMUX.
  typedef enum logic {
    MARMUX_ZEXT = 1'b0,  // ZEXT(IR[7:0]) (TRAP vector)
    MARMUX_ADDR = 1'b1   // address-generation adder
  } marmux_e;

  // ALUK: ALU function.
  typedef enum logic [1:0] {
    ALUK_ADD  = 2'b00,
    ALUK_AND  = 2'b01,
    ALUK_NOT  = 2'b10,  // NOT A
    ALUK_PASS = 2'b11   // PASS A
  } aluk_e;

  // The 25 control signals, grouped as in the control unit's output list.
  typedef struct packed {
    // register loads (7)
    logic      ld_mar;
    logic      ld_mdr;
    logic      ld_ir;
    logic      ld_ben;
    logic      ld_reg;
    logic      ld_cc;
    logic      ld_pc;
    // bus gating (4): at most one may be 1
    logic      gate_pc;
    logic      gate_mdr;
    logic      gate_alu;
    logic      gate_marmux;
    // mux selection (10 bits)
    pcmux_e    pcmux;
    drmux_e    drmux;
    sr1mux_e   sr1mux;
    addr1mux_e addr1mux;
    addr2mux_e addr2mux;
    marmux_e   marmux;
    // ALU function selection (2)
    aluk_e     aluk;
    // memory operation (2)
    logic      mio_en;   // 1: the memory performs a read or write
    logic      r_w;      // with MIO.EN = 1: 1 write, 0 read
  } ctrl_t;

  // Control word with every signal inactive and every select at code 0.
  localparam ctrl_t CTRL_IDLE = '{
    ld_mar: 1'b0, ld_mdr: 1'b0, ld_ir: 1'b0, ld_ben: 1'b0,
    ld_reg: 1'b0, ld_cc: 1'b0, ld_pc: 1'b0,
    gate_pc: 1'b0, gate_mdr: 1'b0, gate_alu: 1'b0, gate_marmux: 1'b0,
    pcmux: PCMUX_INC, drmux: DRMUX_IR11, sr1mux: SR1MUX_IR11,
    addr1mux: ADDR1_PC, addr2mux: ADDR2_ZERO, marmux: MARMUX_ZEXT,
    aluk: ALUK_ADD, mio_en: 1'b0, r_w: 1'b0
  };

  // Sign extension of the low N bits of an instruction to a word.
  function automatic word_t sext(input word_t v, input int unsigned nbits);
    word_t r;
    for (int unsigned i = 0; i < WORD_W; i++)
      r[i] = (i < nbits) ? v[i] : v[nbits-1];
    return r;
  endfunction

endpackage
