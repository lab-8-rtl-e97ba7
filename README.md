# An 8-bit accumulator computer and its control unit

This is a complete, small stored-program computer, built around a
hard-wired control unit. The machine has one 8-bit accumulator (ACCA), a
carry flag (C), a zero flag (Z) and a 256-byte memory that holds both
program and data. The control unit is a four-state Mealy machine. It steps
every instruction through a fetch cycle and one or two execute cycles. In
each cycle it raises the strobes that move one byte between memory and the
registers.

The interesting part is the control unit: which strobes it raises, in which
cycle, for which instruction. Most of this document is about that. The
datapath is plain registers, an ALU and a multiplexer.

## The machine at a glance

```
            +------------------- data bus (memory Data Out) ------------------+
            |                |               |                |               |
         [ PC ]           [ MAR ]          [ IRX ]            |               |
            |                |         0xFF  |                |               |
            +------> [ ADDR_MUX ] <----+-----+                v               |
                          |  (PC, MAR, 0xFF, IRX)          [ ALU ] <-- ACCA --+--> Data In
                          v                                  |  \              \
                      [ MEMORY ] --> output port            ACCA  Z, C           \
                                                                                  (write data)
   control unit: inputs IRX, C, Z, clk, reset_n; outputs the strobes below
```

- The memory's read data goes to the load inputs of PC, MAR and IRX, and
  to operand B of the ALU.
- ACCA is operand A of the ALU. It is also the memory's write data.
- The ALU result is loaded into ACCA. The ALU's zero and carry outputs are
  loaded into Z and C.
- The memory address comes from a 4-input mux: PC, MAR, the constant 0xFF
  or IRX.
- The memory is read asynchronously and written on the clock edge. So a
  byte read in one cycle is latched by its destination register at the
  end of that same cycle.

All register changes happen on the rising edge of `clk`. The one memory
access per cycle is what limits speed: an instruction takes 2 or 3 clocks.

## Control signals

| Signal | Polarity | Effect at the next rising edge |
|---|---|---|
| `pc_inc_n` | active low | PC ← PC + 1 |
| `pc_load_n` | active low | PC ← data bus (jumps) |
| `mar_load_n` | active low | MAR ← data bus |
| `ir_load_n` | active low | IRX ← data bus |
| `acca_load_n` | active low | ACCA ← ALU result |
| `z_load_n` | active low | Z ← (ALU result == 0) |
| `c_load_n` | active low | C ← ALU carry |
| `mem_w_n` | active low | memory[address] ← ACCA |
| `alu_ctrl` | 4-bit code | ALU function |
| `addr_mux_sel` | 2-bit code | 0 = PC, 1 = MAR, 2 = 0xFF, 3 = IRX |

The bundle is the packed struct `ccu_pkg::ctrl_t`. Its idle value,
`CTRL_IDLE`, has every strobe high (inactive), the address taken from PC
and the ALU passing ACCA through.

## The instruction cycle

The control unit (`control_unit.sv`) has four states:

- **RESET.** The unit enters RESET asynchronously whenever `reset_n` is
  low, and stays there while it is low. All strobes are idle. The first
  rising edge with `reset_n` high moves to FETCH.
- **FETCH.** This cycle is the same for every instruction. The address
  comes from PC, and `ir_load_n` and `pc_inc_n` are active. At the edge the
  opcode lands in IRX and PC points at the byte after it.
- **EX1.** The control word is decoded from IRX and, for branches, from C
  and Z. That makes this a Mealy machine: the outputs depend on the inputs
  as well as the state.
- **EX2.** Only instructions with a memory operand use EX2. The address
  comes from MAR.

After the last execute cycle the unit goes back to FETCH. Two
assertions in the control unit check that PC load and PC increment are
never active together, and that memory is written only in EX2. The control
outputs are combinational, so they are valid for the whole cycle and are
sampled by the datapath at the closing edge.

### What each instruction does in each cycle

Instructions with an address operand use two bytes: the opcode and `addr`.
In EX1 they read `addr` (at PC) into MAR and step PC past it. In EX2 they
access `memory[addr]` through MAR:

| Instruction | Opcode | EX1 (address from PC) | EX2 (address from MAR) | Flags |
|---|---|---|---|---|
| LDAA addr | 0x01 | MAR load, PC inc | ALU LOAD, ACCA load, Z load | Z |
| STAA addr | 0x03 | MAR load, PC inc | memory write, ALU PASSA, Z load | Z from ACCA |
| ADDA addr | 0x04 | MAR load, PC inc | ALU ADD, ACCA, Z, C load | C = carry out |
| SUBA addr | 0x05 | MAR load, PC inc | ALU SUB, ACCA, Z, C load | C = borrow |
| ANDA addr | 0x06 | MAR load, PC inc | ALU AND, ACCA, Z load | Z |
| ORAA addr | 0x07 | MAR load, PC inc | ALU OR, ACCA, Z load | Z |
| CMPA addr | 0x08 | MAR load, PC inc | ALU SUB, Z, C load (ACCA kept) | C = borrow |

The other instructions finish in EX1:

| Instruction | Opcode | EX1 | Flags |
|---|---|---|---|
| NOP | 0x00 | nothing | — |
| LDAA #num | 0x02 | address from PC, ALU LOAD, ACCA load, Z load, PC inc | Z |
| COMA | 0x09 | ALU COM, ACCA, Z, C load | C = 1 |
| INCA | 0x0A | ALU INC, ACCA, Z load | C kept |
| LSLA | 0x0B | ALU LSL, ACCA, Z, C load | C = old bit 7 |
| LSRA | 0x0C | ALU LSR, ACCA, Z, C load | C = old bit 0 |
| ASRA | 0x0D | ALU ASR, ACCA, Z, C load | C = old bit 0, sign kept |
| JMP addr | 0x0E | PC load from `addr` (address from PC) | kept |
| JCS addr | 0x0F | C = 1: PC load; else PC inc | kept |
| JCC addr | 0x10 | C = 0: PC load; else PC inc | kept |
| JEQ addr | 0x11 | Z = 1: PC load; else PC inc | kept |

A branch finishes in a single execute cycle. In EX1 PC points at the
address byte, and the memory puts that byte on the data bus. A taken branch
loads it straight into PC. A branch that is not taken increments PC past
it. Opcodes 0x12 to 0xFF are not assigned and run as NOP.

Timing: an instruction with a memory operand takes 3 clocks. Every other
instruction takes 2.

### A worked trace

`LDAA 0xF5` at 0x80, followed by `LDAA #0xF5` at 0x82:

| Edge after | PC | IRX | MAR | ACCA |
|---|---|---|---|---|
| FETCH | 0x81 | 0x01 | – | – |
| EX1 | 0x82 | 0x01 | 0xF5 | – |
| EX2 | 0x82 | 0x01 | 0xF5 | memory[0xF5] |
| FETCH | 0x83 | 0x02 | 0xF5 | memory[0xF5] |
| EX1 | 0x84 | 0x02 | 0xF5 | 0xF5 |

## Which parts follow the original lab and which are this design's choices

These parts follow the original lab description:

- the four states and what they do;
- the FETCH sequence;
- the LDAA addr and LDAA #num sequences;
- the active-low strobes, and the signal names;
- the datapath connections: PC, MAR, IRX, a 4-input address mux with the
  inputs PC, MAR, 0xFF and IRX, ACCA, the ALU, Z and C;
- opcodes 0x01 and 0x02;
- the instruction set and which flags each instruction changes.

These parts are this design's own choices:

- **Opcodes.** The other opcodes are numbered in instruction-table order
  (NOP = 0x00 up to JEQ = 0x11), so that LDAA = 0x01 and LDAA # = 0x02 fall
  into place. Unassigned opcodes run as NOP. To change the encoding, edit
  `opcode_t` in `ccu_pkg.sv`.
- **Sequences for the other instructions.** They follow the LDAA pattern:
  memory-operand instructions use MAR and EX2, accumulator instructions
  finish in EX1, and branches finish in EX1.
- **Carry rules.** The lab says only that these instructions change C:
  - subtraction and compare set C to the borrow (1 when ACCA < operand,
    unsigned);
  - shifts set C to the bit shifted out.
- **Z on STAA.** Z is set from the stored value, because the instruction
  table says STAA changes Z.
- **Z_Load on LDAA addr.** LDAA addr also loads Z in EX2. The cycle
  description names only ACCA_Load, but the table says Z changes.
- **Reset.**
  - The reset is asynchronous and active low.
  - It clears PC (to the `RESET_PC` parameter, default 0x00), MAR, IRX,
    ACCA, Z, C and the output port.
  - Memory contents are not cleared.
- **Output port.** The output port is a register inside the memory block,
  loaded by any store to address 0xFF.
- **The 0xFF and IRX mux inputs.** These exist as drawn, but no
  instruction selects them.
- **Program loading.** Programs are written through a load port
  (`ld_we`, `ld_addr`, `ld_data`) while `reset_n` is low. The load port
  takes priority over `mem_w_n`.
- **No output enable.** The memory has no output-enable input; it is
  always read.
- **No separate data mux.** The original mentions a data mux from an
  earlier stage of the project but does not show it. There is no such
  block here: ACCA is always loaded from the ALU, and the ALU's LOAD
  function passes the memory byte through.

## Files

| File | Module | Role |
|---|---|---|
| `rtl/ccu_pkg.sv` | package | widths, `state_t`, `opcode_t`, `alu_op_t`, `addr_sel_t`, `ctrl_t`, `CTRL_IDLE` |
| `rtl/control_unit.sv` | `control_unit` | the FSM and instruction decoder |
| `rtl/alu.sv` | `alu` | 11-function combinational ALU |
| `rtl/program_counter.sv` | `program_counter` | PC with load and increment |
| `rtl/load_reg.sv` | `load_reg` | register with active-low load (MAR, IRX, ACCA, Z, C) |
| `rtl/addr_mux.sv` | `addr_mux` | memory address mux |
| `rtl/memory.sv` | `memory` | 256 × 8 RAM, output port, load port |
| `rtl/processor.sv` | `processor` | the datapath |
| `rtl/ccu_system.sv` | `ccu_system` | top: control unit, datapath and memory |

Besides the output port, the top brings out `state`, `pc`, `mar`, `irx`,
`acca`, `z_flag`, `c_flag` and `ctrl_bus` (the current control word, in
`ctrl_t` field order) for observation.

## Verification

Every testbench checks itself. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
hangs.

- **`tb/ccu_system_tb.sv`** is the end-to-end test, run at the top's
  default parameters.
  - An instruction-level reference model runs alongside the design. At
    every FETCH it compares PC, ACCA, C, Z, the output port, the FETCH
    control word and the instruction's cycle count (2 or 3).
  - It first runs a directed program. That program contains both worked
    examples and every instruction. It takes each conditional branch both
    ways and stores to the output port. The end values were worked out by
    hand.
  - It then runs six random programs of 400 instructions each, and
    asserts reset asynchronously between them.
  - It compares the whole memory after each program.
  - It counts every opcode, every branch taken and not taken, EX2 cycles,
    reset holds, output-port writes, carries and borrows. Any of these
    that never happens counts as a failure.
- **`tb/ccu_examples_tb.sv`** runs the two worked examples cycle by cycle
  from 0x80 (it sets `RESET_PC = 0x80`). It then runs JCS with carry clear
  and with carry set.
- **`tb/control_unit_tb.sv`** runs 20 opcodes (including two unassigned
  ones) with every C/Z combination. It checks each state's control word
  against a table written from the instruction descriptions, the state
  sequence, the hold in RESET, and asynchronous reset from EX1.
- **`tb/alu_tb.sv`, `program_counter_tb.sv`, `load_reg_tb.sv`,
  `addr_mux_tb.sv`, `memory_tb.sv`, `processor_tb.sv`** test the smaller
  blocks. Each uses corner-case and random stimulus and compares against a
  model in the testbench.

To simulate with Verilator, give the package first and let `-y` find the
modules:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ccu_pkg.sv \
          tb/ccu_system_tb.sv --top-module ccu_system_tb
./obj_dir/Vccu_system_tb
```

Use the same command with any other testbench. Each testbench runs in well
under a second.

For lint, run
`verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl rtl/ccu_pkg.sv rtl/ccu_system.sv`.
It reports one warning, which is expected: `processor` does not use
`mem_w_n` from the control bundle, because the memory takes that strobe
directly. In synthesis one control output is also constant, because
`control_unit` never drives `addr_mux_sel` to 2 or 3.

## Changing the design

- **Opcodes.** Edit `opcode_t`. The RTL uses only the names. The
  testbench programs and the expected-value table in `control_unit_tb`
  are written as byte values, so update them as well.
- **Start address.** Set `RESET_PC` on `ccu_system`.
- **A new accumulator instruction.** Add an `alu_op_t` code and its case
  in `alu.sv`, then add an EX1 branch in `control_unit.sv`.
- **A new memory-operand instruction.** Add the opcode to `needs_ex2` and
  give it an EX2 case.
- **Width.** The data width is fixed at 8 bits, set by `DATA_W` and
  `ADDR_W` in the package. The 0xFF constant and the output-port address
  assume 8 bits.
