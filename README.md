# A 16-bit teaching RISC processor in SystemVerilog

This is a small, complete 16-bit computer. It is built around a load/store instruction set
in the style of 16-bit ARM (Thumb): eight general registers, a stack pointer, a link
register, N/Z/C/V flags and conditional branches. All instructions are one 16-bit word.
Addresses are 9 bits, so the machine has 512 words of memory that hold both program and
data. The RTL runs real programs: a subroutine call that uses the usual convention (push
registers and LR on entry, pop registers and PC on exit), loops, signed and unsigned
division, and I/O through numbered devices.

The design is a plain multi-cycle machine. Each instruction is fetched, latched and
executed in three clock cycles. A few instructions take extra cycles (see *Timing*). There
is no pipeline, so there are no hazards to reason about. The sections below give the most
room to the instruction encoding, because that is where most of the detail lies.

## Programmer's model

| State | Width | Notes |
|---|---|---|
| R0–R7 | 16 | general registers, reset to 0 |
| PC | 9 | address of the next instruction; resets to 0 and wraps at 512 |
| SP | 10 | 0..512; resets to 512, so the stack is empty |
| LR | 16 | return address written by JMS |
| flags | 4 | N, Z, C, V; seen as bits [3:0] by `MOV Rd,flags` and `MOV flags,Rs` |

The stack is full-descending. PSH decrements SP and then stores. POP loads and then
increments SP.

## Instruction encoding

The opcode is a prefix of 3 to 16 bits at the top of the word. The operands follow in the
order they are written in assembly. The immediate, shift count, offset, address or
register mask always sits in the low bits. The prefixes are fixed by the instruction set.
The order of the operand fields below them is this design's choice, and all of it is in
`risc_decoder`. Register fields are 3 bits. `i8` is an unsigned 8-bit immediate, `n4` is a
4-bit count or device number, `o6` is an unsigned 6-bit offset and `a9` is a 9-bit address.

| Prefix (binary) | Instructions | Operand fields |
|---|---|---|
| `00000` | HLT | – |
| `00001`…`01010` | MOD, ADD, SUB, CMP, MOV, AND, ORR, XOR, UDV, MUL `Rd,#i8` | `ddd i8` |
| `010110` / `010111` | LSR / LSL `Rd,Rs,#n4` | `ddd sss n4` |
| `0110 000`…`0110 110` | ADD, SUB, AND, ORR, XOR, LSR, LSL `Rd,Rs,Rb` | `ddd sss bbb` |
| `0110 1110` / `0110 1111` | ADD / SUB `SP,#i8` | `i8` |
| `0111 0000 0` / `…1` | ASR / ROR `Rd,#n4` (shifts Rd in place) | `ddd n4` |
| `0111 0001 0` / `…1` | INP `Rd,n4` / OUT `Rs,n4` | `rrr n4` |
| `0111 0010 000` / `…001` | MOV `Rd,special` / MOV `special,Rs` | `rrr pp` (pp: 0 flags, 1 SP, 2 LR, 3 PC) |
| `0111 0010 0100 0`, `…0100 1`, `…0101 0`, `…0101 1` | POP Rd, PSH Rs, BRA Rs, JMS Rs | `rrr` |
| `0111 0010 0110 0000` | RET | – |
| `0111 0010 10` | MVN `Rd,Rs` | `ddd sss` |
| `0111 01 gggg` | two-register group `Rd,Rs` | `ddd sss` |
| `0111 100` / `0111 101` | STR / LDR `R,o6(SP)` | `rrr o6` |
| `0111 110` | PSH `{R0-R7,LR}` | 9-bit mask: bit 8 = LR, bits 7..0 = R7..R0 |
| `0111 111` | POP `{PC,R7-R0}` | 9-bit mask: bit 8 = PC |
| `100 cccc` | B*cond* / JMS `a9` | `a9` |
| `1010` / `1011` | STR / LDR `R,o6(Rn)` | `rrr nnn o6` |
| `1100` / `1101` / `1110` / `1111` | ADD, SUB, STR, LDR `R,a9` (direct) | `rrr a9` |

The two-register group (`gggg`, bits 9..6) holds, in order: UDV, MOD, MLX, ASR, ROR, DIV,
BIC, NEG, INP `Rsd,Ra`, OUT `Rsd,Ra`, CMP `Rb,Rs`, TST `Rb,Rs`, MOV, ADC, SBC and MUL. All
of them compute `Rd ← Rd op Rs`, with these exceptions:

- NEG gives `−Rs` and MVN gives `NOT Rs`.
- CMP and TST write only the flags.
- MLX writes the low word of the unsigned product to Rd and the high word to Rs.
- For the register forms of INP and OUT, the device number is the low 4 bits of Ra.

NOP is `MOV R0,R0` (`0x7700`).

The condition codes `cccc` are, from 0 to 15: BRA, BEQ, BNE, BCS/BHS, BCC/BLO, BMI, BPL,
BVS, BVC, BHI, BLS, BGE, BLT, BGT, BLE and JMS. The conditions are the ARM ones. After a
compare, C means "no borrow", so BHS is the same as BCS.

Encodings the instruction set leaves spare stop the processor with `error`. These are
`7261`–`727F`, `72C0`–`72FF` and `7300`–`73FF` (hex).

## Flags

Only ALU operations change the flags. MOV (all forms), LDR, STR, PSH/POP and `ADD/SUB SP`
do not. MVN, NEG, CMP, TST, the shifts and direct ADD/SUB do. The rules:

- **Add and subtract** forms (ADD, SUB, CMP, ADC, SBC, NEG) set C and V as on ARM.
- **Shifts and rotates** set C to the last bit shifted out, leave C unchanged for a count
  of 0, and clear V. Register counts above 16 give 0, or all sign bits for ASR. ROR uses
  the count modulo 16.
- **Logic operations, MUL and the divides** set N and Z and clear C and V.
- **MLX** clears N, C and V. It sets Z if the whole 32-bit product is zero.

The C/V rules for shifts, logic and multiply are this design's choice.

## Stack, calls and errors

- `JMS` (address or register form) loads LR with the address of the next instruction.
  `RET` copies LR to PC.
- A nested call overwrites LR. The usual convention therefore brackets a subroutine with
  `PSH {…,LR}` … `POP {…,PC}`.
- Multi-register PSH stores R0 first and LR last. R0 therefore ends up at the highest
  address, as if each register had been pushed on its own in ascending order.
- Multi-register POP takes PC first, then R7 down to R0, and so exactly undoes the push.
- `MOV SP,Rs` and every `o6(SP)` and `o6(Rn)` address wrap modulo 512.
- `ADD/SUB SP,#i8`, PSH and POP do not wrap. If SP would leave 0..512, the processor stops
  with `error`.
- A divide by zero and a spare encoding also stop with `error`.
- `HLT` raises `halted`.
- Both `halted` and `error` are cleared only by reset.

## Timing

The control unit (`risc_core`) steps through these states:

| Instruction class | Cycles | States |
|---|---|---|
| register, immediate, MOV, branch, store, PSH, I/O | 3 | FETCH, DECODE, EXEC |
| LDR (all modes), POP, ADD/SUB direct | 4 | + LOAD |
| MLX | 4 | + MLX2 (writes the high word) |
| UDV, DIV, MOD | 20 | + 17 in DIV (sequential divider) |
| PSH multi, n registers | 3 + n | + MPUSH per register |
| POP multi, n registers | 3 + 2n | + MPOP_RD, MPOP_WB per register |

The memory is synchronous, so read data comes one cycle after the address. FETCH presents
PC and increments it. DECODE latches the instruction. EXEC does the work. The divider is a
restoring shift-subtract unit that produces one quotient bit per cycle. `div_busy` is high
while the core waits for it.

## Interfaces of the top (`risc_top`)

- **Clock and reset:** `clk`, and `rst_n` (active low, asynchronous).
- **Host port:** `host_en`, `host_we`, `host_addr[8:0]`, `host_wdata`, `host_rdata`. This
  is a second synchronous port into the memory. Load a program through it while `rst_n` is
  low. The core starts at address 0 when reset is released. Results can also be read back
  through it.
- **I/O bus:**
  - `io_addr[3:0]` is the device number.
  - `io_wr` strobes for one cycle with `io_wdata` for OUT.
  - `io_rd` strobes for one cycle for INP, and `io_rdata` is sampled in that same cycle.
  - The conventional devices are 2 (input a number) and 4, 5, 6 and 7 (display as signed,
    unsigned, hexadecimal or character). These devices are outside this RTL. The top
    testbench models them.
- **Status:** `halted`, `error`, `div_busy`, `pc`, `sp`, `flags`.

Default parameters: `MEM_WORDS = 512`, with `AW = 9` derived from it. A smaller memory
works, but the 9-bit address fields then wrap.

## Files

| File | Contents |
|---|---|
| `rtl/risc_pkg.sv` | shared types: `dec_t`, `op_e`, `alu_op_e`, `flags_t`, control states, condition codes |
| `rtl/risc_decoder.sv` | instruction decoder (combinational) |
| `rtl/risc_alu.sv` | ALU with flags (combinational) |
| `rtl/risc_divider.sv` | sequential divider for UDV, DIV and MOD |
| `rtl/risc_cond.sv` | branch condition evaluation |
| `rtl/risc_regfile.sv` | R0–R7 |
| `rtl/risc_mem.sv` | 512 × 16 dual-port memory |
| `rtl/risc_core.sv` | control unit and datapath |
| `rtl/risc_top.sv` | core plus memory |
| `tb/tb_asm_pkg.sv` | instruction encoders used to write test programs |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_risc_random` (random programs against a reference model) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For example, the
whole-system test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_risc_top \
  rtl/risc_pkg.sv tb/tb_asm_pkg.sv rtl/risc_alu.sv rtl/risc_cond.sv rtl/risc_decoder.sv \
  rtl/risc_divider.sv rtl/risc_regfile.sv rtl/risc_mem.sv rtl/risc_core.sv rtl/risc_top.sv \
  tb/tb_risc_top.sv
./obj_dir/Vtb_risc_top
```

The RTL itself is clean under plain `verilator --lint-only`. `-Wno-fatal` is there for the
testbenches' width warnings. For a unit test, list the package, `tb/tb_asm_pkg.sv` where the
testbench imports it, the module and its testbench.

## What has been verified

- **`tb_risc_top`** runs at the default size. It loads a 342-word program that exercises
  every instruction group: all addressing modes including wrap-around, the branch
  conditions driven by real ALU flags, a loop, nested calls with multi-register push and
  pop, single push and pop, SP arithmetic, I/O on devices 2, 4, 5, 6 and 7, and every
  special-register move. It compares all 96 output values with values computed in the
  testbench, and checks memory contents and the final SP. It then runs nine short programs,
  each of which must stop with `error` (stack overflow and underflow, SP arithmetic out of
  range, divide by zero, spare encodings).
- **`tb_risc_random`** runs 40 random 300-instruction programs on the full-size top. Each
  program uses almost the whole instruction set. An instruction-set model in the testbench
  runs the same program, and the two final states are compared: registers, PC, SP, LR,
  flags, all of memory, the device outputs and halted/error. Backward jumps are left out
  so that every program ends.
- **`tb_risc_core`** checks the cycle count of each instruction class against the table
  above.
- **`tb_risc_alu`** compares the ALU with a reference model on corner cases and random
  operands.
- **`tb_risc_divider`** compares the divider with a reference model on corner cases and
  random operands.
- **`tb_risc_cond`** is exhaustive.

The test programs are assembled by hand with `tb_asm_pkg`. There is no assembler in this
repository.

## Departures and open points

- **Assumptions.** The instruction set fixes the opcodes, the operations and the rules
  above. Everything else is an assumption of this design: the operand field order, the
  selector order, the flag register layout, the MLX destinations, reset values, the
  treatment of divide by zero and spare encodings, and the whole microarchitecture. A
  program assembled elsewhere for this instruction set is binary-compatible only if it
  uses the same field order.
- **MOD is unsigned**, like UDV. There is no signed remainder instruction.
- **MOV Rd,PC** reads the address of the following instruction.
- **The I/O bus carries raw 16-bit words.** Turning them into signed, unsigned, hex or
  character text for devices 4 to 7 is left to the device.
