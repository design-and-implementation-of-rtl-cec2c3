# AHD-2494: a 24-bit RISC processor with hardware support for an operating system

The AHD-2494 is a small pipelined RISC processor built around one idea:
keep every instruction simple enough to finish in a three-stage pipeline
without interlocks, and hand everything awkward, including subroutine call
and return, to the operating system. It has 24-bit words, registers,
addresses and instructions. There are 16 registers and 16 instructions, and
loads and stores are the only memory accesses. It runs one instruction per
cycle, and a single multiplexed 24-bit bus carries both instructions and data
(a von Neumann machine squeezed into a 32-pin package). A user/system mode bit,
privileged instructions and write-protected system registers let an
operating system keep control of the machine.

This repository holds synthesizable SystemVerilog for the processor core
and its pin interface, plus self-checking testbenches. The RTL follows the
published architecture of the AHD-2494: its instruction formats, instruction
set, register roles, pipeline depth, memory-instruction stall and
call/return mechanism. Several encodings and timing details were not
published. Where that is the case this RTL makes its own choice, and each one
is listed in [Choices made in this RTL](#choices-made-in-this-rtl).

## Instruction word

Every instruction is one 24-bit word. The top two bits select the type:

| bits  | ALU type (`00`)         | control flow (`10`) and privileged (`11`) |
|-------|-------------------------|-------------------------------------------|
| 23:22 | `00`                    | `10` or `11`                              |
| 21:19 | opcode                  | opcode                                    |
| 18:15 | Rdest                   | Rs/d (LOAD, STORE, IN, OUT) or condition  |
| 14:11 | Rop1                    | Rbase                                     |
| 10:7  | Rop2                    | signed offset, bits 10:0                  |
| 6     | c: update the flags     |                                           |
| 5:0   | shift                   |                                           |

Type `01` was reserved for floating point in a larger variant of the
architecture; here such a word executes as a NOP.

Opcodes (`ahd_pkg.sv`):

| type | opcode | mnemonic | effect |
|------|--------|----------|--------|
| 00 | 0 | ADD   | Rdest = shift(A + B) |
| 00 | 1 | ADDP  | Rdest = shift(A + B + 1) |
| 00 | 2 | SUBM  | Rdest = shift(A - B - 1) |
| 00 | 3 | SUB   | Rdest = shift(A - B) |
| 00 | 4 | AND   | Rdest = shift(A & B) |
| 00 | 5 | OR    | Rdest = shift(A \| B) |
| 00 | 6 | XOR   | Rdest = shift(A ^ B) |
| 10 | 0 | LOAD  | Rd = mem[Rbase + offset] |
| 10 | 1 | STORE | mem[Rbase + offset] = Rs |
| 10 | 2 | JUMP  | if cond: PC = Rbase + offset |
| 10 | 3 | CALL  | if cond: trap to system code (see below) |
| 10 | 4 | RET   | if cond: trap to system code |
| 10 | 5 | SYS   | if cond: trap to system code |
| 11 | 0 | IN    | Rd = io[Rbase + offset] (system mode only) |
| 11 | 1 | OUT   | io[Rbase + offset] = Rs (system mode only) |
| 11 | 2 | SRET  | if cond: PC = Rbase + offset, enter user mode (system mode only) |

ALU opcode 7 and unused control-flow or privileged opcodes are NOPs.
A is the register named by Rop1 and B the one named by Rop2. R0 always reads
as zero and writes to it are dropped, so many common operations need no
opcode of their own:

| operation  | written as |
|------------|------------|
| move       | `ADD Rd, R0, Rb` |
| negate     | `SUB Rd, R0, Rb` |
| complement | `SUBM Rd, R0, Rb` |
| increment  | `ADDP Rd, R0, Rb` |
| decrement  | `SUBM Rd, Ra, R0` |
| clear      | `ADD Rd, R0, R0` |
| compare    | `SUB R0, Ra, Rb` with c = 1 |
| NOP        | the all-zero word, `ADD R0, R0, R0` |

**Shift field.** Every ALU result passes through a barrel shifter.
Bit 5 gives the direction (0 = left, 1 = right) and bit 4 the kind
(0 = logical shift, 1 = rotate). Bits 3:0 give the amount, 0 to 15 places.

**Flags.** C, Z, N and V change only when an ALU instruction has c = 1.
Z and N describe the shifted result, while C and V come from the adder.
After a subtraction C = 1 means "no borrow". Logic operations clear C and V.

**Conditions** (bits 18:15 of JUMP, CALL, RET, SYS, SRET):
0 AL, 1 EQ (Z), 2 NE, 3 CS (C), 4 CC, 5 MI (N), 6 PL, 7 VS (V), 8 VC,
9 HI (C and not Z), 10 LS, 11 GE (N = V), 12 LT, 13 GT, 14 LE, 15 NV (never).

**Addressing.** Every memory, I/O and control-flow instruction uses the
same mode: Rbase + the sign-extended 11-bit offset. With R0 as the base this
gives absolute addresses from -1024 to 1023. R15 as the base gives
PC-relative addresses (next section), and any other register gives indexed
ones. Memory is addressed by 24-bit words, 16 Mwords in all. There are no
immediate operands, so constants are loaded from memory.

## The pipeline and its timing rules

The three stages, with one instruction in each:

```
cycle      n        n+1       n+2
         fetch    decode    execute
                  + read    + write back / address / condition
```

1. **Fetch.** The bus reads the word at PC, and PC advances by one.
2. **Decode.** `ahd_decoder` splits the word, and the two read ports of the
   register file deliver A (or Rbase) and B (or Rs).
3. **Execute.** The ALU and shifter result is written to Rdest. The adder in
   `ahd_agu` forms Rbase + offset, and the condition is checked against the
   flags.

The hardware never waits for or forwards a result, so a program has to
respect the timing below. These rules are the most important thing to know
about this processor:

* **Register results are visible two instructions later.** An instruction
  reads its registers while the one ahead of it is still executing. The next
  instruction therefore sees the *old* value, and the one after that sees the
  new one. Put an independent instruction or a NOP between a producer and its
  consumer.
* **Flags are visible at once.** Conditions are evaluated in stage 3,
  after the previous instruction has updated the flags. `SUB R0,Ra,Rb (c)`
  followed directly by `JUMP EQ,...` works.
* **LOAD, STORE, IN and OUT take one extra cycle.** The single bus is busy
  fetching. While such an instruction is in stage 3, the control unit
  (`ahd_control`) computes its address in state T0. It then spends one cycle
  in state TM, where the bus carries the data and the rest of the pipeline
  holds. A loaded value is written at the end of TM. The instruction right
  after a LOAD has already read its registers, so it still sees the old
  value.
* **A taken transfer costs two cycles.** JUMP, CALL, RET, SYS and SRET
  resolve in stage 3. When the condition holds, the two instructions already
  fetched behind them are discarded. A transfer whose condition fails costs
  nothing. There are no delay slots.

So straight-line ALU code runs at one instruction per cycle, a memory
instruction at two cycles, and a taken transfer at three. The
end-to-end testbench checks these counts.

## System mode, traps and the R13/R15 convention

The condition code register (`ahd_psw`) holds two bits besides the flags:
**system mode** and **PC copy**. Reset selects system mode with PC copy
on, and starts at address 0.

**System registers and privileged instructions.** R8 to R15 belong to the
operating system. A user-mode instruction may read them but cannot write
them: the write is dropped. IN, OUT and SRET are privileged, and in user mode
they execute as NOPs.

**R15 is the program counter, most of the time.** While PC copy is on, R15
is loaded every cycle with the address of the word fetched in that cycle.
An instruction that reads R15 therefore gets its own address:
`LOAD R6,[R15+k]` reads the word k places after the LOAD, and
`JUMP AL,[R15+0]` loops on itself.

**CALL, RET and SYS do not transfer control themselves.** When their
condition holds, the hardware does four things:

1. It stops the PC copy. R15 keeps its last value, which is the address of
   the instruction after the CALL/RET/SYS: the return address.
2. It writes the computed Rbase + offset to R13. For CALL this is the address
   of the routine. For SYS it is whatever the program put there, such as a
   service number.
3. It enters system mode.
4. It jumps to a fixed vector: CALL to 0x10, RET to 0x20, SYS to 0x30.

The operating system then does the real work. It can save R15 on a stack
it keeps, check the request, switch tasks, and so on. It leaves with
`SRET cond,[Rbase+offset]`, which jumps to that address, returns to user
mode and turns the PC copy back on. Typical handlers, as used in
`tb/tb_ahd2494.sv`:

```
0x10  STORE R15,[R0+save]      ; CALL: remember the return address
0x11  SRET  AL,[R13+0]         ;       enter the routine in user mode
0x20  LOAD  R14,[R0+save]      ; RET:  fetch the return address
0x21  NOP
0x22  SRET  AL,[R14+0]         ;       and go back
0x30  OUT   R13,[R0+7]         ; SYS:  act on the service number
0x31  SRET  AL,[R15+0]         ;       return after the SYS
```

This keeps every instruction within the three-stage timing. It also gives
the operating system full control of every call and return.

## The bus

The chip has 32 pins. Addresses and data therefore share 24 pins, and
`ahd_bus_if` splits each processor cycle into two phases of the input
clock:

| phase | ale | pins | strobes |
|-------|-----|------|---------|
| 1 (address) | 1 | `ad_out` = address, `ad_oe` = 1 | `rd_n` = `wr_n` = 1 |
| 2 (data, write) | 0 | `ad_out` = data, `ad_oe` = 1 | `wr_n` = 0 |
| 2 (data, read)  | 0 | released, `ad_oe` = 0; device drives `ad_in` | `rd_n` = 0 |

`io_n` is 0 for IN/OUT (I/O space) and 1 for memory, and is valid in both
phases. A device latches the address on the clock edge that ends phase 1.
Read data is sampled on the edge that ends phase 2, and there are no wait
states. Every processor cycle is one bus transfer: an instruction fetch in
state T0, or the data of a LOAD/STORE/IN/OUT in state TM. The bidirectional
pad is outside the RTL: `ad_in`, `ad_out` and `ad_oe` connect to it.

`clk` runs at twice the processor rate. A 10 MHz processor clock, the
rate of the original chip, means a 20 MHz `clk`. All state in the design changes on
the rising edge that ends phase 2.

## Files

| file | contents |
|------|----------|
| `rtl/ahd_pkg.sv` | widths, register roles, vectors, opcode/condition encodings, the decoded-instruction struct, instruction encoders |
| `rtl/ahd2494.sv` | top level: PC, pipeline registers, execute stage, wiring |
| `rtl/ahd_decoder.sv` | field extraction, classification, privilege and write-protection rules |
| `rtl/ahd_regfile.sv` | 16 x 24 registers, 2 read ports, 1 write port, R0 = 0, R15 PC copy |
| `rtl/ahd_alu.sv` | the seven ALU operations with carry and overflow |
| `rtl/ahd_shifter.sv` | 4-stage barrel shifter/rotator |
| `rtl/ahd_agu.sv` | Rbase + signed offset |
| `rtl/ahd_psw.sv` | flags, mode and PC-copy bits, condition evaluation |
| `rtl/ahd_control.sv` | T0/TM state machine, freeze and flush |
| `rtl/ahd_bus_if.sv` | two-phase multiplexed pin interface |
| `tb/ahd_mem_model.sv` | behavioural memory and I/O ports on the bus (simulation only) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the two below |

The decoder passes most instruction fields straight through to its output
struct, and the bus interface passes the read data straight from the pins.
Synthesis reports those outputs as wired to inputs. That is intended.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ahd_pkg.sv tb/tb_ahd2494.sv --top-module tb_ahd2494 -Mdir obj
obj/Vtb_ahd2494
```

Replace `tb_ahd2494` with any other testbench name. The main ones:

* `tb_ahd2494` runs a small operating system and user program from reset
  on the full-size processor. The program uses every instruction class: mode
  switches, CALL/RET/SYS traps, I/O, a privileged instruction and a
  protected write in user mode, PC-relative addressing and every shift kind.
  The testbench checks registers, memory and I/O against values worked out by
  hand, and checks the cycle counts of the three timing rules. It also counts
  how often each mechanism happened and fails if one never did. Add `+trace`
  for a cycle-by-cycle log.
* `tb_ahd2494_mult` runs a 13-word shift-and-add multiply program,
  24 x 24 bits to the low 24 bits, for several operand pairs. It checks the
  products and the exact cycle counts. A full-width multiply takes about
  190 to 220 processor cycles, or 19 to 22 us at 10 MHz.
* `tb_ahd_alu`, `tb_ahd_shifter`, `tb_ahd_agu`, `tb_ahd_regfile`,
  `tb_ahd_psw`, `tb_ahd_decoder`, `tb_ahd_control` and `tb_ahd_bus_if`
  compare each unit with an independent reference model on random and
  corner-case inputs.

To write programs, the functions `enc_alu` and `enc_cf` in `ahd_pkg` build
instruction words. The testbenches load programs into the memory model by
hierarchical reference.

## Choices made in this RTL

The published architecture fixes what is described above under the
instruction formats, the instruction list, the register roles, the pipeline
depth, the memory stall, the R13/R15 mechanism and the multiplexed bus. The
following were not published, and this RTL makes its own choice for each:

* The opcode numbers (table order), the 16 condition codes, and which bit of
  the shift field means what.
* The carry convention for subtraction, and C = V = 0 after logic
  operations.
* Which eight registers are the system registers (R8 to R15, which include
  R13 and R15 as used by the trap mechanism). User mode can read them but
  not write them.
* What happens behind a taken transfer (the two younger instructions are
  discarded, with no delay slots), and the length of the memory stall (one
  cycle).
* The trap vectors 0x10, 0x20 and 0x30; reset at address 0 in system mode;
  all registers and flags reset to zero.
* The behaviour of CALL, RET and SYS in system mode: they trap the same way
  as in user mode.
* The exact R15 timing: R15 holds the address of the instruction reading it,
  and after a trap the address after the trapping instruction.
* SRET's target is Rbase + offset, like the other transfers.
* The pin protocol: strobe names and polarities, the phase order and no wait
  states. The two clock phases are made from a single clock at twice the
  rate instead of two external phase clocks.
* The mode and PC-copy bits are described as accessible only in system
  mode, but no instruction to read or write the condition code register was
  published. Here they change only through traps, SRET and reset, and no
  such instruction exists.

Not in the RTL: the floating-point instruction type, which belongs to a
larger variant; the pads; and the electrical figures of the original chip
(10 MHz into 50 pF, 1.6 um CMOS on a sea-of-gates array, about 120 000
transistors), which describe its layout rather than its logic. Memory and
I/O devices are outside the chip. A behavioural model for simulation is in
`tb/ahd_mem_model.sv`.

## How far it is verified

Every module has a self-checking testbench against an independent reference.
For every module, a deliberately broken copy (for example, a wrong carry-in
for one subtraction, a rotate that fills with zeros, or a flush that forgets
stage 3) makes its testbench fail. The two program-level testbenches check
results and cycle counts. No formal verification was done, and the design
has not been run on an FPGA or taken through timing analysis.
