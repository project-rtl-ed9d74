# A 16-bit single-bus teaching processor with a shared SRAM

This is a small 16-bit processor. Every transfer inside it goes over one
shared bus, and a state machine spends several clock cycles on each
instruction. It runs a program from an external 512-word SRAM. A 68000 board
computer shares that SRAM: the 68000 loads a program and reads back results,
and the processor runs the program when the 68000 hands over the memory. The
processor has four general registers, twelve instructions, an 8-bit input
port (switches), an 8-bit output port (LEDs) and a 16-bit counter on its own
clock. These are enough for small programs such as a reaction timer.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It is split into
the blocks of the original design: datapath registers, ALU, bus multiplexer
with encoder, counter, SRAM interface, control state machine and SRAM
controller.

## Structure

```
sp_top
├── sp_processor
│   ├── sp_control        state machine, drives every control line
│   └── sp_datapath
│       ├── sp_bus_reg    PC, R0..R3, IR, Temp, PortOUT, Config, PortIN
│       ├── sp_alu        inc / add / sub, Temp and bus as operands
│       ├── sp_zs_regs    Z (ALU result) and S (zero flag of a subtraction)
│       ├── sp_counter    16-bit counter on cnt_clk, read over the bus
│       ├── sp_bus_mux    encoder + multiplexer that drives the bus
│       └── sp_sram_if    registered SRAM address, data, Read, Write
└── sp_sram_ctrl          gives the SRAM to the 68000 or the processor
```

`sp_pkg` holds the widths, the opcode enum, the instruction-word struct, the
numbering of the bus sources and `ctrl_t`, the bundle of control lines that
goes from the control circuit to the datapath.

The SRAM chip and the 68000 are not part of the RTL. Their signals are ports
of `sp_top`. The testbenches use `tb/sram_model.sv` as the memory and drive
the 68000 side themselves.

## Programmer's view

Instruction word: `OP[15:12] | X[11:10] | Y[9:8] | DATA[7:0]`. X names the
destination register and Y the source register. DATA is an 8-bit constant or
branch target.

| op   | mnemonic | effect                                   | cycles |
|------|----------|------------------------------------------|--------|
| 0000 | movi     | Rx ← DATA (zero-extended)                | 5 |
| 0001 | move     | Rx ← Ry                                  | 5 |
| 0010 | load     | Rx ← mem[256 + R0]                       | 6 |
| 0011 | store    | mem[256 + R0] ← Ry                       | 6 |
| 0100 | add      | Rx ← Rx + Ry                             | 7 |
| 0101 | sub      | Rx ← Rx − Ry; S ← (result = 0)           | 7 |
| 0110 | halt     | stop fetching                            | 5, then stays halted |
| 0111 | bne      | PC ← DATA if S = 0 (last sub ≠ 0)        | 5 |
| 1000 | mvin     | Rx ← PortIN (zero-extended)              | 5 |
| 1001 | mvout    | PortOUT ← Ry[7:0]                        | 5 |
| 1010 | mvcnt    | Rx ← Count                               | 5 |
| 1011 | mvcfg    | Config ← Ry[7:0]; bit 0 runs the counter | 5 |
| 11xx | —        | no operation                             | 5 |

Memory map: the program lives in SRAM words 0–255, and PC supplies the low
8 bits of the fetch address. load and store take a data address A from
R0[7:0] and go to word 256 + A. A program therefore cannot overwrite
itself. Only `bne` changes the flow of the program, and its targets lie in
0–255. To loop N times, count a register down with `sub` and branch back
with `bne`. To wait for an input value, read it with `mvin`, subtract the
value wanted and `bne` back.

## How an instruction executes

Every cycle, exactly one source drives the bus. The control circuit raises
one "out" line (PCout, IRout, Zout, R0out..R3out, PortINout, Countout,
FromSRAMout). `sp_bus_mux` encodes that line into a select and passes the
chosen source to the bus. Any number of registers may load the bus at the
clock edge through their `_in` enables. The ALU always sees Temp on one
input and the bus on the other. Its result goes to Z whenever Inc, Add or
Sub is raised, so a two-operand operation needs the first operand parked in
Temp.

Each instruction begins with four fetch steps:

| step | control lines | effect |
|------|---------------|--------|
| T1 | address from PC, Read | SramAddr ← PC, Sram_Read ← 1 at the edge |
| T2 | FromSRAMout, IR_in | IR ← word the SRAM returns |
| T3 | PCout, Inc | Z ← PC + 1 |
| T4 | Zout, PC_in | PC ← PC + 1 |

Execute steps:

| instr | E1 | E2 | E3 |
|-------|----|----|----|
| movi  | IRout, Rx_in | | |
| move  | Ryout, Rx_in | | |
| load  | address from R0, Read | FromSRAMout, Rx_in | |
| store | Ryout, address from R0, Write | Ryout, address from R0 | |
| add/sub | Rxout, Temp_in | Ryout, Add/Sub (Z, S) | Zout, Rx_in |
| bne   | IRout, PC_in if S = 0 | | |
| mvin / mvcnt | PortINout / Countout, Rx_in | | |
| mvout / mvcfg | Ryout, PortOUT_in / Config_in | | |

After the last step the machine goes back to T1. After halt it goes to HALT
instead.

### SRAM timing

Every signal that goes towards the SRAM leaves a flip-flop in `sp_sram_if`,
so no combinational glitch can reach the memory. The price is one cycle of
delay: an address and Read set up in T1 reach the SRAM only during T2, and IR
captures the data at the end of T2. **The memory must therefore deliver read
data within one processor clock of Sram_Read rising.** The processor inserts
no wait states, so with a slow memory the clock must be slowed down.

SramData copies the bus on every clock. A write happens only while
Sram_Write is high. `store` keeps Ry on the bus and R0 as the address for a
second cycle, so address and data are still steady when Sram_Write falls at
the end of that cycle. An asynchronous SRAM stores the word on that rising
edge of WE.

## Sharing the SRAM: `m68k_master`

- **`m68k_master` = 1 (68000 mode).** `sp_sram_ctrl` connects the 68000's
  address, data and strobes to the memory, and the processor's strobes are
  ignored. The control circuit waits in IDLE with PC held at 0.
- **`m68k_master` = 0 (processor mode).** The 68000 is locked out: its writes
  have no effect and it reads zero. The processor starts fetching from
  address 0.

Raising `m68k_master` at any time, even in the middle of an instruction,
returns the processor to IDLE. This is also the only way out of HALT, so a
program is rerun by toggling the mode switch. The general registers keep
their values between runs.

The SRAM pins are modelled as an asynchronous SRAM:

- active-low `sram_ce_n`, `sram_oe_n` and `sram_we_n`;
- the bidirectional data bus split into `sram_dq_o`, `sram_dq_oe` and
  `sram_dq_i`, so that a pad ring or a tristate buffer at the board level
  can join them.

## The counter and its clock crossing

`sp_counter` counts rising edges of the external `cnt_clk` while Config bit 0
is set. It wraps at 16 bits and is cleared only by reset, so programs
measure time as the difference of two `mvcnt` readings. The two clocks are
unrelated, so:

- the enable goes into the `cnt_clk` domain through two flip-flops;
- the count is also kept in Gray code and passed back through two
  flip-flops, then converted to binary. A read can be stale but never torn.

The processor sees the count 2–3 processor clocks late. The counter starts
and stops 2–3 `cnt_clk` edges after Config changes.

## Choices made here, and where the design departs from the original

The original design fixes the datapath, the instruction set, the four
fetch steps, the widths, the memory map and the two modes. These points are
this implementation's own:

- **Field placement** in the instruction word (opcode high, DATA low).
- **bne sense.** The original's table says "branch if S ≠ 0", where S is set
  when a subtraction gives zero. Taken literally, that branches on *equal*.
  This design follows the mnemonic instead: it branches when the last
  subtraction was **not** zero.
- **m68k_master polarity.** The original's introduction gives "0 = 68000,
  1 = processor". Its SRAM milestone says instead that the processor waits
  for the signal to go low. This design uses high = 68000.
- **IRout** drives only the DATA field, zero-extended. PortIN is also
  zero-extended. PortOUT and Config take the low byte of the bus.
- **Z and S** have no enables of their own. Z loads on every ALU operation;
  S loads only on a subtraction.
- **Execute sequences**, the HALT exit, treating opcodes 1100–1111 as
  no-ops, the second store cycle, the counter's clock-domain crossing, and
  the `halted` status output.
- **Reset** is asynchronous and active high, and clears every register.
- **Read and Write.** In the original block diagram the box driven by Read
  is labelled "SRAM Write" and the reverse. This design follows the written
  description: Read drives Sram_Read.
- **Not built:** the early-bring-up variant that runs from the FPGA's
  on-chip RAM instead of the SRAM.

## Simulating

Each block has a self-checking testbench, `tb/tb_<module>.sv`. Each ends by
printing `TB_RESULT checks=N failures=M`. For example, the end-to-end test
at default parameters:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sp_pkg.sv tb/sp_asm_pkg.sv tb/tb_sp_top.sv --top-module tb_sp_top
./obj_dir/Vtb_sp_top
```

- **`tb_sp_top`** loads a 31-word program through the 68000 port and runs it
  twice. The program uses every instruction, both bne outcomes, an unused
  opcode, the ports and the counter. The test checks the results, the exact
  cycle count to halt (1 + the sum of the per-instruction cycles above), and
  that each mechanism happened at least once. That covers the branch
  outcomes, halt, both mode switches, 68000 access and lock-out, and the
  counter advancing.
- **`tb_reaction_timer`** runs a reaction-timer program. The program waits
  for the start switch, lights the LEDs, times the button press with the
  counter, and shows and stores the result. The test presses the button
  after 37, 120 and 700 counter ticks and checks each measurement to within
  ±4 ticks.
- **`tb_sp_processor`** sums 1..N in a loop for N = 1, 5, 20 and 255, with
  exact cycle counts.
- **Block tests:** `tb_sp_control` compares every control line in every step
  for all sixteen opcodes. `tb_sp_datapath` compares against a reference
  model of the registers over random control words. The remaining blocks
  have random or exhaustive tests.

`tb/sp_asm_pkg.sv` has `asm(op, x, y, data)`, which encodes one instruction
word, and `cycles(op)`, which gives its length in clock cycles. Use them to
write further test programs.
