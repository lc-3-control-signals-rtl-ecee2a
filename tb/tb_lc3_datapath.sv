// tb_lc3_datapath: end-to-end test of the LC-3 datapath at its default size.
//
// The testbench plays the part of the control unit. For every instruction it
// applies the LC-3 control sequence one control word per clock: fetch
// (MAR <- PC, PC <- PC + 1; MDR <- M[MAR]; IR <- MDR), decode (BEN load),
// then the execute states of the opcode in IR. The sequences follow the usual
// LC-3 state machine; RTI and the reserved opcode are treated as no-ops by
// this sequencer, and LEA leaves the condition codes alone.
//
// Phase 1 runs a small program at 0x3000 that sums a 5-word array with a
// counted loop and stores the total, then checks the stored total. It also
// drives the R6 choices of DRMUX and SR1MUX, which no instruction uses.
// Phase 2 fills the whole 64K-word memory with random words and executes
// 20000 instructions from it, the word at PC being replaced by a fresh random
// word before each fetch. After every instruction PC, R0-R7, N/Z/P and
// any stored word are compared with an instruction-level model kept here.
// At the end every control signal and every mux code must have been used at
// least once.
module tb_lc3_datapath;
  import lc3_pkg::*;

  localparam int N_RANDOM = 20000;

  logic  clk = 1'b0, rst_n = 1'b0;
  ctrl_t ctrl = CTRL_IDLE;
  word_t ir, bus, pc, mar, mdr;
  logic  ben, n, z, p, r;

  lc3_datapath dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- watchdog ----------------
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- instruction-level model ----------------
  word_t      m_mem [65536];
  word_t      m_reg [8];
  word_t      m_pc;
  logic [2:0] m_nzp;

  function automatic word_t sx(input word_t v, input int nbits);
    int x = int'(v) % (1 << nbits);
    if (x >= (1 << (nbits - 1))) x -= (1 << nbits);
    return word_t'(x);
  endfunction

  function automatic logic [2:0] cc_of(input word_t v);
    if (v[15])        return 3'b100;
    else if (v == 0)  return 3'b010;
    else              return 3'b001;
  endfunction

  // Executes one instruction in the model; returns the address stored to, or -1.
  function automatic int model_step();
    word_t i = m_mem[m_pc];
    word_t t;
    logic [2:0] drn = i[11:9], s1 = i[8:6];
    int st = -1;
    m_pc = m_pc + 1;
    case (i[15:12])
      4'h1, 4'h5: begin
        word_t b = i[5] ? sx(i, 5) : m_reg[i[2:0]];
        t = (i[15:12] == 4'h1) ? word_t'(m_reg[s1] + b) : (m_reg[s1] & b);
        m_reg[drn] = t; m_nzp = cc_of(t);
      end
      4'h9: begin t = ~m_reg[s1]; m_reg[drn] = t; m_nzp = cc_of(t); end
      4'h0: if ((i[11:9] & m_nzp) != 0) m_pc = m_pc + sx(i, 9);
      4'hC: m_pc = m_reg[s1];
      4'h4: begin
        t = m_pc;
        m_pc = i[11] ? word_t'(m_pc + sx(i, 11)) : m_reg[s1];
        m_reg[7] = t;
      end
      4'h2: begin t = m_mem[word_t'(m_pc + sx(i, 9))]; m_reg[drn] = t; m_nzp = cc_of(t); end
      4'h6: begin t = m_mem[word_t'(m_reg[s1] + sx(i, 6))]; m_reg[drn] = t; m_nzp = cc_of(t); end
      4'hA: begin t = m_mem[m_mem[word_t'(m_pc + sx(i, 9))]]; m_reg[drn] = t; m_nzp = cc_of(t); end
      4'hE: m_reg[drn] = m_pc + sx(i, 9);
      4'h3: begin st = int'(word_t'(m_pc + sx(i, 9))); m_mem[st] = m_reg[drn]; end
      4'h7: begin st = int'(word_t'(m_reg[s1] + sx(i, 6))); m_mem[st] = m_reg[drn]; end
      4'hB: begin st = int'(m_mem[word_t'(m_pc + sx(i, 9))]); m_mem[st] = m_reg[drn]; end
      4'hF: begin m_reg[7] = m_pc; m_pc = m_mem[{8'h00, i[7:0]}]; end
      default: ;  // RTI (8) and reserved (D): no operation here
    endcase
    return st;
  endfunction

  // ---------------- mechanism coverage ----------------
  int n_ld [7], n_gate [4], n_pcmux [3], n_drmux [3], n_sr1mux [3];
  int n_addr1 [2], n_addr2 [4], n_marmux [2], n_aluk [4];
  int n_mem_read, n_mem_write, n_mdr_from_bus, n_br_taken, n_br_not_taken;

  task automatic cover_word(input ctrl_t c);
    logic [6:0] lds = {c.ld_mar, c.ld_mdr, c.ld_ir, c.ld_ben, c.ld_reg, c.ld_cc, c.ld_pc};
    logic [3:0] gts = {c.gate_pc, c.gate_mdr, c.gate_alu, c.gate_marmux};
    for (int k = 0; k < 7; k++) if (lds[k]) n_ld[k]++;
    for (int k = 0; k < 4; k++) if (gts[k]) n_gate[k]++;
    if (c.ld_pc) n_pcmux[int'(c.pcmux)]++;
    if (c.ld_reg) n_drmux[int'(c.drmux)]++;
    if (c.gate_alu || c.addr1mux == ADDR1_SR1) n_sr1mux[int'(c.sr1mux)]++;
    if (c.gate_marmux || (c.ld_pc && c.pcmux == PCMUX_ADDR)) begin
      n_addr1[int'(c.addr1mux)]++;
      n_addr2[int'(c.addr2mux)]++;
    end
    if (c.gate_marmux) n_marmux[int'(c.marmux)]++;
    if (c.gate_alu) n_aluk[int'(c.aluk)]++;
    if (c.mio_en && !c.r_w) n_mem_read++;
    if (c.mio_en && c.r_w) n_mem_write++;
    if (c.ld_mdr && !c.mio_en) n_mdr_from_bus++;
  endtask

  // ---------------- control sequencer ----------------
  // Applies one control word for one clock cycle. A memory access is repeated
  // until the memory reports ready.
  task automatic step(input ctrl_t c);
    @(negedge clk);
    ctrl = c;
    #1;
    while (c.mio_en && !r) begin
      @(negedge clk); #1;
    end
    cover_word(c);
    @(posedge clk);
    #1;
    ctrl = CTRL_IDLE;
  endtask

  function automatic ctrl_t cw_addr_to_mar(input addr1mux_e a1, input addr2mux_e a2);
    ctrl_t c = CTRL_IDLE;
    c.sr1mux = SR1MUX_IR8; c.addr1mux = a1; c.addr2mux = a2;
    c.marmux = MARMUX_ADDR; c.gate_marmux = 1'b1; c.ld_mar = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t cw_mem_read();
    ctrl_t c = CTRL_IDLE;
    c.mio_en = 1'b1; c.r_w = 1'b0; c.ld_mdr = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t cw_mdr_to_dr();
    ctrl_t c = CTRL_IDLE;
    c.gate_mdr = 1'b1; c.ld_reg = 1'b1; c.drmux = DRMUX_IR11; c.ld_cc = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t cw_mdr_to_mar();
    ctrl_t c = CTRL_IDLE;
    c.gate_mdr = 1'b1; c.ld_mar = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t cw_sr_to_mdr();
    ctrl_t c = CTRL_IDLE;
    c.sr1mux = SR1MUX_IR11; c.aluk = ALUK_PASS; c.gate_alu = 1'b1; c.ld_mdr = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t cw_mem_write();
    ctrl_t c = CTRL_IDLE;
    c.mio_en = 1'b1; c.r_w = 1'b1;
    return c;
  endfunction

  task automatic run_instruction();
    ctrl_t c;
    // fetch
    c = CTRL_IDLE; c.gate_pc = 1; c.ld_mar = 1; c.ld_pc = 1; c.pcmux = PCMUX_INC; step(c);
    step(cw_mem_read());
    c = CTRL_IDLE; c.gate_mdr = 1; c.ld_ir = 1; step(c);
    // decode
    c = CTRL_IDLE; c.ld_ben = 1; step(c);
    // execute
    case (ir[15:12])
      4'h1, 4'h5, 4'h9: begin
        c = CTRL_IDLE; c.sr1mux = SR1MUX_IR8; c.gate_alu = 1; c.ld_reg = 1;
        c.drmux = DRMUX_IR11; c.ld_cc = 1;
        c.aluk = (ir[15:12] == 4'h1) ? ALUK_ADD : (ir[15:12] == 4'h5) ? ALUK_AND : ALUK_NOT;
        step(c);
      end
      4'h0: begin
        if (ben) begin
          n_br_taken++;
          c = CTRL_IDLE; c.addr1mux = ADDR1_PC; c.addr2mux = ADDR2_OFF9;
          c.pcmux = PCMUX_ADDR; c.ld_pc = 1; step(c);
        end else n_br_not_taken++;
      end
      4'hC: begin
        c = CTRL_IDLE; c.sr1mux = SR1MUX_IR8; c.addr1mux = ADDR1_SR1; c.addr2mux = ADDR2_ZERO;
        c.pcmux = PCMUX_ADDR; c.ld_pc = 1; step(c);
      end
      4'h4: begin
        if (ir[11]) begin
          c = CTRL_IDLE; c.gate_pc = 1; c.drmux = DRMUX_R7; c.ld_reg = 1; step(c);
          c = CTRL_IDLE; c.addr1mux = ADDR1_PC; c.addr2mux = ADDR2_OFF11;
          c.pcmux = PCMUX_ADDR; c.ld_pc = 1; step(c);
        end else begin
          // R7 <- PC and PC <- BaseR in one cycle; BaseR is read before the write
          c = CTRL_IDLE; c.gate_pc = 1; c.drmux = DRMUX_R7; c.ld_reg = 1;
          c.sr1mux = SR1MUX_IR8; c.addr1mux = ADDR1_SR1; c.addr2mux = ADDR2_ZERO;
          c.pcmux = PCMUX_ADDR; c.ld_pc = 1; step(c);
        end
      end
      4'h2: begin step(cw_addr_to_mar(ADDR1_PC, ADDR2_OFF9)); step(cw_mem_read()); step(cw_mdr_to_dr()); end
      4'h6: begin step(cw_addr_to_mar(ADDR1_SR1, ADDR2_OFF6)); step(cw_mem_read()); step(cw_mdr_to_dr()); end
      4'hA: begin
        step(cw_addr_to_mar(ADDR1_PC, ADDR2_OFF9)); step(cw_mem_read());
        step(cw_mdr_to_mar()); step(cw_mem_read()); step(cw_mdr_to_dr());
      end
      4'hE: begin
        c = cw_addr_to_mar(ADDR1_PC, ADDR2_OFF9); c.ld_mar = 0; c.ld_reg = 1; c.drmux = DRMUX_IR11;
        step(c);
      end
      4'h3: begin step(cw_addr_to_mar(ADDR1_PC, ADDR2_OFF9)); step(cw_sr_to_mdr()); step(cw_mem_write()); end
      4'h7: begin step(cw_addr_to_mar(ADDR1_SR1, ADDR2_OFF6)); step(cw_sr_to_mdr()); step(cw_mem_write()); end
      4'hB: begin
        step(cw_addr_to_mar(ADDR1_PC, ADDR2_OFF9)); step(cw_mem_read());
        step(cw_mdr_to_mar()); step(cw_sr_to_mdr()); step(cw_mem_write());
      end
      4'hF: begin
        c = CTRL_IDLE; c.marmux = MARMUX_ZEXT; c.gate_marmux = 1; c.ld_mar = 1; step(c);
        c = cw_mem_read(); c.gate_pc = 1; c.drmux = DRMUX_R7; c.ld_reg = 1; step(c);
        c = CTRL_IDLE; c.gate_mdr = 1; c.pcmux = PCMUX_BUS; c.ld_pc = 1; step(c);
      end
      default: ;
    endcase
  endtask

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h (instr %h)", what, got, exp, ir);
    end
  endtask

  // Runs one instruction in the datapath and in the model and compares them.
  task automatic run_and_compare();
    int st;
    run_instruction();
    st = model_step();
    check(pc, m_pc, "PC");
    for (int k = 0; k < 8; k++) check(dut.u_rf.regs[k], m_reg[k], $sformatf("R%0d", k));
    check({13'd0, n, z, p}, {13'd0, m_nzp}, "NZP");
    if (st >= 0) check(dut.u_mem.mem[st], m_mem[st], "stored word");
  endtask

  // ---------------- instruction encoders for the directed program ----------------
  function automatic word_t op_add_imm(int d, int s, int imm);
    return {4'h1, 3'(d), 3'(s), 1'b1, 5'(imm)};
  endfunction
  function automatic word_t op_add_reg(int d, int s1, int s2);
    return {4'h1, 3'(d), 3'(s1), 3'b000, 3'(s2)};
  endfunction
  function automatic word_t op_and_imm(int d, int s, int imm);
    return {4'h5, 3'(d), 3'(s), 1'b1, 5'(imm)};
  endfunction

  task automatic load_word(input word_t a, input word_t v);
    dut.u_mem.mem[a] = v;
    m_mem[a] = v;
  endtask

  // ---------------- stimulus ----------------
  initial begin
    int sum;
    ctrl_t c;

    for (int a = 0; a < 65536; a++) load_word(word_t'(a), 16'h0000);

    // directed program: sum five words at DATA into R2, store at RESULT
    //   3000 LEA  R1, DATA      3005 ADD  R2, R2, R4
    //   3001 AND  R2, R2, #0    3006 ADD  R1, R1, #1
    //   3002 AND  R3, R3, #0    3007 ADD  R3, R3, #-1
    //   3003 ADD  R3, R3, #5    3008 BRp  LOOP (3004)
    //   3004 LDR  R4, R1, #0    3009 ST   R2, RESULT
    //   300A TRAP x25 (vector table entry points back to 0x3000 region)
    //   DATA = 3010..3014, RESULT = 3020
    load_word(16'h3000, {4'hE, 3'd1, 9'h00F});       // LEA R1, PC+15 = 0x3010
    load_word(16'h3001, op_and_imm(2, 2, 0));
    load_word(16'h3002, op_and_imm(3, 3, 0));
    load_word(16'h3003, op_add_imm(3, 3, 5));
    load_word(16'h3004, {4'h6, 3'd4, 3'd1, 6'd0});   // LDR R4, R1, #0
    load_word(16'h3005, op_add_reg(2, 2, 4));
    load_word(16'h3006, op_add_imm(1, 1, 1));
    load_word(16'h3007, op_add_imm(3, 3, -1));
    load_word(16'h3008, {4'h0, 3'b001, 9'h1FB});     // BRp -5
    load_word(16'h3009, {4'h3, 3'd2, 9'h016});       // ST R2, PC+22 = 0x3020
    load_word(16'h300A, {4'hF, 4'h0, 8'h25});        // TRAP x25
    load_word(16'h0025, 16'h4000);                   // trap vector -> 0x4000
    sum = 0;
    for (int k = 0; k < 5; k++) begin
      word_t v;
      v = word_t'($urandom_range(0, 4095));
      load_word(16'h3010 + word_t'(k), v);
      sum += int'(v);
    end

    for (int k = 0; k < 8; k++) m_reg[k] = 16'h0000;
    m_pc = 16'h3000; m_nzp = 3'b010;

    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    check(pc, 16'h3000, "PC after reset");
    while (pc != 16'h4000 && checks < 2000) run_and_compare();
    check(dut.u_mem.mem[16'h3020], word_t'(sum), "array sum stored at RESULT");
    check(dut.u_rf.regs[7], 16'h300B, "TRAP return address in R7");

    // R6 choices of DRMUX and SR1MUX: R6 <- PC, then PASS A of R6 onto the bus
    c = CTRL_IDLE; c.gate_pc = 1; c.drmux = DRMUX_R6; c.ld_reg = 1; step(c);
    m_reg[6] = pc;
    check(dut.u_rf.regs[6], pc, "R6 written through DRMUX=10");
    @(negedge clk);
    ctrl = CTRL_IDLE; ctrl.sr1mux = SR1MUX_R6; ctrl.aluk = ALUK_PASS; ctrl.gate_alu = 1'b1;
    #1 check(bus, pc, "R6 read through SR1MUX=10");
    cover_word(ctrl);
    @(posedge clk); #1 ctrl = CTRL_IDLE;

    // phase 2: random memory image, random execution
    for (int a = 0; a < 65536; a++) load_word(word_t'(a), word_t'($urandom));
    // the word at PC is renewed before each fetch so that execution cannot
    // settle into a short loop
    for (int k = 0; k < N_RANDOM; k++) begin
      load_word(pc, word_t'($urandom));
      run_and_compare();
    end

    // every mechanism must have been exercised
    begin
      int unused;
      unused = 0;
      foreach (n_ld[k])     if (n_ld[k] == 0)     begin unused++; $display("never used: load %0d", k); end
      foreach (n_gate[k])   if (n_gate[k] == 0)   begin unused++; $display("never used: gate %0d", k); end
      foreach (n_pcmux[k])  if (n_pcmux[k] == 0)  begin unused++; $display("never used: PCMUX %0d", k); end
      foreach (n_drmux[k])  if (n_drmux[k] == 0)  begin unused++; $display("never used: DRMUX %0d", k); end
      foreach (n_sr1mux[k]) if (n_sr1mux[k] == 0) begin unused++; $display("never used: SR1MUX %0d", k); end
      foreach (n_addr1[k])  if (n_addr1[k] == 0)  begin unused++; $display("never used: ADDR1MUX %0d", k); end
      foreach (n_addr2[k])  if (n_addr2[k] == 0)  begin unused++; $display("never used: ADDR2MUX %0d", k); end
      foreach (n_marmux[k]) if (n_marmux[k] == 0) begin unused++; $display("never used: MARMUX %0d", k); end
      foreach (n_aluk[k])   if (n_aluk[k] == 0)   begin unused++; $display("never used: ALUK %0d", k); end
      if (n_mem_read == 0)     begin unused++; $display("never used: memory read"); end
      if (n_mem_write == 0)    begin unused++; $display("never used: memory write"); end
      if (n_mdr_from_bus == 0) begin unused++; $display("never used: MDR from bus"); end
      if (n_br_taken == 0)     begin unused++; $display("never used: branch taken"); end
      if (n_br_not_taken == 0) begin unused++; $display("never used: branch not taken"); end
      checks++;
      failures += unused;
      $display("coverage: loads %p gates %p PCMUX %p DRMUX %p SR1MUX %p", n_ld, n_gate, n_pcmux, n_drmux, n_sr1mux);
      $display("coverage: ADDR1MUX %p ADDR2MUX %p MARMUX %p ALUK %p", n_addr1, n_addr2, n_marmux, n_aluk);
      $display("coverage: mem reads %0d writes %0d, MDR from bus %0d, BR taken %0d not taken %0d",
               n_mem_read, n_mem_write, n_mdr_from_bus, n_br_taken, n_br_not_taken);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
