# LC-3 datapath driven by its 25 control signals

The LC-3 is a small 16-bit teaching processor. A processor like this splits into
two parts. The **datapath** holds the registers, the ALU, the memory and the bus
that connects them. The **control unit** is a finite-state machine. Each cycle
it tells the datapath what to do by setting a handful of control signals. This
RTL is the LC-3 datapath, with every control signal that matters for ordinary
instructions brought out as one 25-bit control word. Interrupt and privilege
support is left out.

The idea to hold on to is that an instruction is not a single operation here. It
is a short sequence of register-transfer steps, such as `MAR <- PC` or
`MDR <- M[MAR]`. Each step is one clock cycle, and each cycle's control word
says:

* which single source drives the shared bus,
* which registers capture a new value at the end of the cycle,
* how every multiplexer is set,
* what the ALU computes,
* whether the memory reads or writes.

`lc3_datapath` is the top. It has no control unit inside: `ctrl` is an input. A
control unit, or a testbench acting as one, supplies the word. The datapath
returns `ir`, `ben`, `n`/`z`/`p` and the memory-ready flag `r` for it to decide
the next state.

## The control word

`lc3_pkg::ctrl_t` packs the 25 signals in five groups. An elaboration-time check
in the top makes sure the struct stays exactly 25 bits wide.

| group | signals | bits |
|---|---|---|
| register loads | `ld_mar`, `ld_mdr`, `ld_ir`, `ld_ben`, `ld_reg`, `ld_cc`, `ld_pc` | 7 |
| bus gating | `gate_pc`, `gate_mdr`, `gate_alu`, `gate_marmux` | 4 |
| mux selection | `pcmux`(2), `drmux`(2), `sr1mux`(2), `addr1mux`(1), `addr2mux`(2), `marmux`(1) | 10 |
| ALU function | `aluk` | 2 |
| memory | `mio_en`, `r_w` | 2 |

A load signal is 1 exactly when the current step changes that register, that is
when the register is on the left of the step's `<-`. Select codes, each an enum
in the package:

| mux | 00 / 0 | 01 / 1 | 10 | 11 |
|---|---|---|---|---|
| PCMUX (new PC) | PC + 1 | bus | address adder | unused (acts as 00) |
| DRMUX (register written) | IR[11:9] | R7 | R6 | unused (acts as 00) |
| SR1MUX (source register 1) | IR[11:9] | IR[8:6] | R6 | unused (acts as 00) |
| ADDR1MUX (adder operand 1) | PC | SR1 | – | – |
| ADDR2MUX (adder operand 2) | 0 | SEXT(IR[5:0]) | SEXT(IR[8:0]) | SEXT(IR[10:0]) |
| MARMUX (to GateMARMUX) | ZEXT(IR[7:0]) | address adder | – | – |
| ALUK | A + B | A AND B | NOT A | PASS A |

A select only matters when its output is used. PCMUX matters when `ld_pc` is 1,
DRMUX when `ld_reg` is 1, ALUK when `gate_alu` is 1, and MARMUX when
`gate_marmux` is 1. `CTRL_IDLE` is the word with every signal at 0.

Memory: `mio_en = 1` starts an access. With it, `r_w = 1` writes MDR to
`M[MAR]` and `r_w = 0` reads `M[MAR]`. During a read, MDR's input mux takes the
memory output, so a read step also sets `ld_mdr`.

## The bus and where each register's value comes from

Four sources can reach the bus: PC, MDR, the ALU result and the MARMUX output.
The classic design uses 16 tri-state buffers per source, one enable per source.
Here the same four enables drive an AND-OR multiplexer, which is synthesizable
on any fabric. The rule stays the same: **at most one gate may be 1**. An
immediate assertion in `lc3_bus` flags a violation. With no gate active the bus
reads 0.

| register | new value from | load |
|---|---|---|
| MAR, IR | bus | `ld_mar`, `ld_ir` |
| R0–R7 | bus, into register DRMUX picks | `ld_reg` |
| N, Z, P | sign of the bus value (negative / zero / positive) | `ld_cc`, all three together |
| MDR | memory output if `mio_en`, otherwise bus | `ld_mdr` |
| PC | PCMUX: PC + 1, bus or address adder | `ld_pc` |
| BEN | `IR[11]&N \| IR[10]&Z \| IR[9]&P` | `ld_ben` |

The register file reads SR1 (chosen by SR1MUX) and SR2 = IR[2:0]. The SR1 value
feeds two places: the ALU's A input and ADDR1MUX. The ALU's B input comes from
SR2MUX. It is the SR2 register, or the sign-extended immediate IR[4:0] when
IR[5] = 1. That select comes from the instruction word, not from the control
unit.

## Address generation: one adder, two users

The hardest part to follow is the one adder that serves both the PC and the
memory address. ADDR1MUX picks PC or SR1, and ADDR2MUX picks 0 or one of three
sign-extended IR offsets. The sum goes to two places:

* PCMUX, for a PC-relative branch or jump (`BR`, `JSR`), or for `JMP`/`JSRR`
  with SR1 + 0;
* MARMUX, which gates it onto the bus for a load/store address (`LD`, `LDR`,
  `ST`, ...) or an `LEA` result.

MARMUX's other input, ZEXT(IR[7:0]), is the TRAP vector-table address. Both
users share ADDR1MUX and ADDR2MUX, so in one cycle the adder computes only one
address.

## Timing

* One control word is one clock cycle. Bus, mux, ALU and adder values are
  combinational within the cycle. Every register, and a memory write, updates
  on the rising edge that ends the cycle.
* Register-file reads are combinational, so a step that both writes and reads a
  register sees the old value. `JSRR` relies on this to do `R7 <- PC` and
  `PC <- BaseR` in one cycle.
* Memory accesses finish in the cycle they are issued: the read is
  combinational, and `r` (ready) equals `mio_en`. A control unit should still
  wait for `r`, so a slower memory can be dropped in.
* Reset is synchronous and active low. It sets PC to `PC_RESET` (default
  `16'h3000`) and Z = 1, and clears every other register and R0–R7. The memory
  is not reset.

## An instruction as control words

The testbench `tb_lc3_datapath` acts as the control unit, with these sequences.
Each line is one cycle; only the non-zero signals are listed.

| step | transfer | control word |
|---|---|---|
| fetch 1 | MAR <- PC, PC <- PC+1 | gate_pc, ld_mar, ld_pc, pcmux=PC+1 |
| fetch 2 | MDR <- M[MAR] | mio_en, r_w=0, ld_mdr |
| fetch 3 | IR <- MDR | gate_mdr, ld_ir |
| decode | BEN <- IR & NZP | ld_ben |
| ADD | DR <- SR1 + OP2, set CC | sr1mux=IR[8:6], aluk=ADD, gate_alu, ld_reg, drmux=IR[11:9], ld_cc |
| LDR 1 | MAR <- BaseR + SEXT(off6) | sr1mux=IR[8:6], addr1mux=SR1, addr2mux=off6, marmux=adder, gate_marmux, ld_mar |
| LDR 2 | MDR <- M[MAR] | mio_en, ld_mdr |
| LDR 3 | DR <- MDR, set CC | gate_mdr, ld_reg, ld_cc |
| ST 2 | MDR <- SR | sr1mux=IR[11:9], aluk=PASS, gate_alu, ld_mdr |
| ST 3 | M[MAR] <- MDR | mio_en, r_w=1 |
| BR (if BEN) | PC <- PC + SEXT(off9) | addr1mux=PC, addr2mux=off9, pcmux=adder, ld_pc |
| TRAP 1 | MAR <- ZEXT(trapvect8) | marmux=ZEXT, gate_marmux, ld_mar |
| TRAP 2 | MDR <- M[MAR], R7 <- PC | mio_en, ld_mdr, gate_pc, drmux=R7, ld_reg |
| TRAP 3 | PC <- MDR | gate_mdr, pcmux=bus, ld_pc |

The testbench also sequences AND, NOT, JMP, JSR, JSRR, LD, LDI, LEA, STR and
STI. It treats RTI and the reserved opcode as no-ops. Its LEA does not set the
condition codes, which matches the current LC-3 definition.

## What is not here

* **The control unit FSM.** Its states and transitions are not part of this
  design. Drive `ctrl` from your own FSM, or from a microcode ROM indexed by
  state. The testbench's sequencer is a behavioural stand-in and is not
  synthesizable.
* **Memory-mapped I/O.** The keyboard and display registers (KBSR, KBDR, DSR,
  DDR), their address decoding and the input mux in front of MDR are left out.
  The memory drives MDR's mux directly and is enabled by `mio_en` alone. `mar`
  and `mdr` are top-level outputs, so device logic can be attached.
* **Interrupts and privilege.** There is no PSR, saved stack pointers or
  interrupt vector logic. The R6 choices of DRMUX and SR1MUX, which that support
  uses, are present and tested.

## Choices made in this RTL

These choices are this RTL's own. The LC-3 does not fix them, or fixes them
outside the datapath's signal list.

* AND-OR bus instead of tri-states; the bus reads 0 when nothing drives it.
* SR2MUX select = IR[5]; SR2 = IR[2:0]; BEN formula as in the table above. These
  follow the LC-3 instruction formats.
* Unused select code 11 of PCMUX, DRMUX and SR1MUX behaves like 00.
* Single-cycle memory, `r = mio_en`, 2^16 words (the reach of a 16-bit MAR).
* Reset values as above; `PC_RESET` is a parameter.
* ADD and the address adder wrap modulo 2^16.

## Files

| file | contents |
|---|---|
| `rtl/lc3_pkg.sv` | control-word struct, select enums, `sext` helper |
| `rtl/lc3_datapath.sv` | top: all blocks wired together |
| `rtl/lc3_bus.sv` | four-source gated bus with the one-driver assertion |
| `rtl/lc3_pc.sv` | PC and PCMUX |
| `rtl/lc3_ldreg.sv` | load-enabled register (IR, MAR) |
| `rtl/lc3_mdr.sv` | MDR and its bus/memory input mux |
| `rtl/lc3_regsel.sv` | DRMUX, SR1MUX, SR2 field |
| `rtl/lc3_regfile.sv` | R0–R7 |
| `rtl/lc3_sr2mux.sv` | ALU B operand |
| `rtl/lc3_alu.sv` | ADD / AND / NOT / PASS |
| `rtl/lc3_addr_gen.sv` | ADDR1MUX, ADDR2MUX, adder, MARMUX |
| `rtl/lc3_cc.sv` | N/Z/P logic and flip-flops |
| `rtl/lc3_ben.sv` | branch enable |
| `rtl/lc3_memory.sv` | 64K x 16 memory |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
From the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/lc3_pkg.sv \
    tb/tb_lc3_datapath.sv --top-module tb_lc3_datapath
./obj_dir/Vtb_lc3_datapath
```

Substitute any other `tb/tb_*.sv` to run a unit test. Each unit test compares
its module with values the testbench computes itself, using random and corner
inputs.

`tb_lc3_datapath` runs the top at its default parameters, with the full 64K-word
memory. It has two phases:

1. It runs a small program at 0x3000 that sums a five-word array in a counted
   loop, stores the total and then traps. It checks the stored total and the
   TRAP return address. It also writes and reads R6 through the R6 mux choices.
2. It fills memory with random words and executes 20,000 random instructions.
   The word at PC is renewed before each fetch, so execution never settles into
   a loop.

After every instruction the test compares PC, R0–R7, N/Z/P and any stored word
with an instruction-level model built into the testbench. At the end it
requires every load, gate, mux code, ALU function, memory read and write, and
both branch outcomes to have occurred at least once. The test takes a few
seconds.

## How far to trust it

All modules lint cleanly under Verilator `-Wall` apart from unused-bit warnings
on IR inputs that use only some fields. They also elaborate in a second,
independent SystemVerilog front end. Every testbench passes. Each one was also
run against a deliberately broken copy of its module, and each caught the fault.
The datapath's behaviour at instruction level is checked against an independent
model. The control sequences, however, are the testbench's. The datapath has
not been run under a real control unit, since none is included.
