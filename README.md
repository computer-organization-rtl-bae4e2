# A multi-cycle MIPS-R2000-subset processor, and the building blocks around it

This is a small, complete stored-program computer. It is meant to show how a processor splits into a
**datapath** (registers, an ALU, buses) and a **control FSM** that steps each instruction through
fetch, decode and execute by asserting register-transfer signals. The processor runs a subset of
the MIPS R2000 instruction set on a 32-bit datapath with 32 registers. It uses one shared memory for
instructions and data (a Princeton organisation). Each instruction takes 3 to 5 clock cycles.

Several smaller textbook building blocks sit next to it in the same top level:

- an 8-bit register with load and output enables;
- a 4 × 4 register file;
- a 1024 × 4 static RAM;
- a full adder built from half adders, and a 32-bit ripple-carry adder built from full adders.

## Instruction set

All instructions are 32 bits wide, in the three MIPS formats:

| format | fields (bits) |
|---|---|
| R | op(6) rs(5) rt(5) rd(5) shamt(5) funct(6) |
| I | op(6) rs(5) rt(5) immediate(16) |
| J | op(6) target(26) |

| instruction | op | funct | effect | cycles |
|---|---|---|---|---|
| add | 0 | 32 | rd = rs + rt | 3 |
| sub | 0 | 34 | rd = rs − rt | 3 |
| and | 0 | 36 | rd = rs & rt | 3 |
| or | 0 | 37 | rd = rs \| rt | 3 |
| slt | 0 | 42 | rd = (rs − rt) < 0 ? 1 : 0 | 4 |
| lw | 35 | – | rt = mem[rs + sext(imm)] | 5 |
| sw | 43 | – | mem[rs + sext(imm)] = rt | 4 |
| beq | 4 | – | if rs == rt: PC = PC + 1 + sext(imm) | 3 (not taken) / 4 (taken) |
| addi | 8 | – | rt = rs + sext(imm) | 3 |
| j | 2 | – | PC = {6'b0, target} | 3 |
| halt | 63 | – | stop until reset | – |

Things that differ from a real R2000:

- **Addresses count words, not bytes.** The PC steps by 1. Memory is indexed by the low 8 bits of
  the address. Branch offsets count words.
- **Register 31, not register 0, is the zero register.** It always reads 0, and writes to it are
  ignored.
- **`slt` compares by sign.** It takes the sign bit of rs − rt, with no overflow correction. Two
  operands whose difference overflows therefore compare wrongly.
- **`halt` is an extra opcode.**
- **Unknown instructions act as no-ops.** An opcode or funct outside the table returns to fetch and
  does nothing.

## The datapath (`r2000_system`)

```
            memory_data_bus ─────────┬────────────┬──────────────┐
                 ▲        ▲          ▼            ▼              │
          (mr) Memory   RegB (RegBmdEN)   IR (IRld)   MBR (MBRld)│
                 ▲                         │            │        │
 memory_address_bus                        ▼            ▼        │
   ▲ (PCmaEN)   ▲ (ALUmaEN)          controller    RegFile write data
   PC        ALUoutReg ◄── ALU ◄── A: RegA | PC
                           ▲  └──► PC, RegFile write data
                           B: RegB | 0 | sext(imm) | 1
```

- **PC** (`r2000_pc`). A synchronous reset sets it to 0. It loads either the ALU result (the PC + 1
  increment, or the branch target) or the jump target `{6'b0, IR[25:0]}`.
- **IR and MBR** (`ld_register`). Both load from the memory data bus when their load signals are
  high.
- **ALUoutReg** (`ld_register`). It samples the ALU result on every clock edge. A load or store
  computes its address in one cycle and uses it in the next.
- **Register file** (`r2000_regfile`). It has 32 × 32 bits. It reads rs and rt from the IR into the
  output registers **RegA/RegB** on every edge, so the operands are ready one cycle after the IR
  changes. It writes ALUout or MBR into rt or rd.
- **ALU** (`r2000_alu`). The one ALU does all the arithmetic, including the PC increment. A is
  RegA or PC. B is RegB, 0, the sign-extended immediate, or 1. The operation code is one-hot:
  add, sub, and, or, pass A, pass B. Its `zero` and `neg` flags go to the controller.
- **Two shared buses** (`shared_bus`):
  - The memory address bus is driven by PC (instruction fetch) or by ALUoutReg (load/store).
  - The memory data bus is driven by the memory (read) or by RegB (store).

  Classically these are 3-state buses. Here each is an AND-OR multiplexer of the enabled drivers,
  and it flags a conflict when more than one driver is enabled. Assertions in `r2000_system` check
  four things: no bus ever has two drivers; a memory access always has an address; anything that
  loads from the data bus, or writes memory, finds the bus driven.
- **Memory** (`r2000_memory`). It has 256 × 32 bits. Reads are asynchronous. A write takes effect
  at the clock edge that ends the cycle in which `mw` is high. A second **host port** loads programs
  and reads results. It is meant to be used while the processor is held in reset or is halted.

## The controller (`r2000_controller`)

This is the part that takes the most care to follow. The controller is a Moore machine. Its outputs
depend only on its state register and on the IR, which is also a register. So every control signal
is stable for the whole cycle.

The state codes are fetch = 000, decode = 100, and execute1/2/3 = 001/010/011.

| state | register transfers |
|---|---|
| fetch | mabus ← PC; memory read; IR ← mem; PC ← PC + 1 (through the ALU) |
| decode | nothing is driven. The new IR reaches the controller, and RegA/RegB are read from rs/rt |
| execute1 | depends on the instruction (see below) |

Why decode is a separate cycle: the IR is loaded at the end of fetch. The controller can decode it,
and the register file can read the registers it names, only in the following cycle.

Execute sequences:

- **add/sub/and/or**: rd ← RegA op RegB.
- **slt**:
  - execute1: rd ← RegA − RegB. The next state follows `neg`.
  - execute2 (neg): rd ← 1.
  - execute3 (not neg): rd ← 0.
  - rd briefly holds the difference; the second step overwrites it.
- **lw**:
  - execute1: ALUoutReg ← rs + imm.
  - execute2: MBR ← mem[ALUoutReg].
  - execute3: rt ← MBR.
- **sw**:
  - execute1: ALUoutReg ← rs + imm.
  - execute2: mem[ALUoutReg] ← RegB, with RegB driving the data bus.
- **beq**:
  - execute1: RegA − RegB. The next state follows `zero`.
  - execute2: PC ← PC + imm. The PC already holds the address of the next instruction.
- **addi**: rt ← rs + imm. **j**: PC ← target.
- **halt**: stays in execute1. The `halted` output is high until reset.

Signals that do not matter in a state are driven 0.

The longest combinational path runs through the execute cycles. RegA/RegB feed the B multiplexer,
then the ALU, then the `zero`/`neg` flags, then the controller's next-state logic. So the ALU delay
and the controller delay add up in one clock period. Fetch, by contrast, is limited by the memory
read. The path from memory through the data bus to the IR, and the path from the PC through the ALU
back to the PC, both stay inside one cycle.

## The stand-alone blocks

| module | what it is | timing |
|---|---|---|
| `reg_ld_oe` | 8-bit register. `ld` stores `d`; `oe` drives `q` (`q_en` high), otherwise the outputs are released | load at the clock edge; output combinational |
| `regfile_4x4` | 4 words × 4 bits. Independent write port (`we`, `wa`, `d`) and read port (`re`, `ra`), usable in the same cycle | write at the clock edge; read combinational, giving the old value on a same-cycle write |
| `sram_1024x4` | 1024 × 4 RAM. `rd` is the read and chip enable, `wr` the write enable. The bidirectional data pins are split into `io_in`, `io_out` and `io_oe` | write at the clock edge; pins driven only with `rd` high and `wr` low |
| `half_adder`, `full_adder` | sum = XOR and carry = AND in the half adder. The full adder is two half adders and an OR for the carry | combinational |
| `ripple_adder` | `WIDTH` (default 32) full-adder slices in a carry chain. 4, 8 and 16 bits work the same way | combinational; delay grows with the width |

The design has two states per wire and no high impedance. So every "released" output in these
blocks is modelled as an enable flag plus a data value of 0.

## Top level

`computer_org_top` places everything side by side, sharing only `clk`:

| port prefix | design |
|---|---|
| `cpu_` | processor: reset, host memory port, `halted`, `pc`, `ir`, `state` |
| `reg8_` | 8-bit load/output-enable register |
| `rf4_` | 4 × 4 register file |
| `sram_` | 1024 × 4 SRAM |
| `add_` | 32-bit ripple adder |

## Example program

`tb/r2000_ref_pkg.sv` builds the standard example program with `fib_program`. It reads N from word
254 and leaves the N-th Fibonacci number (F(1) = F(2) = 1) in word 255. It returns 1 for N ≤ 0.
The loop adds r1 and r2 alternately, counts r0 down, and uses `beq` on the zero register for both
conditional and unconditional branches.

The program uses words 0–15 and 254–255 of the 256-word memory, and registers r0–r3 and r31. With
N = 4 it stores 3 and halts after 24 instructions and 77 clock cycles. That averages 3.2 cycles
per instruction. N = 0 to 7 take 25, 41, 56, 62, 77, 83, 98 and 104 cycles.

## Files

| path | contents |
|---|---|
| `rtl/r2000_pkg.sv` | opcodes, funct codes, one-hot ALU codes, state codes, the `ctrl_t` control-word struct, instruction encoders |
| `rtl/*.sv` | one module per file, as named above |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/r2000_ref_pkg.sv` | instruction-level reference model. It runs a memory image to `halt` and returns the final memory, the exact cycle count the multi-cycle machine needs, and per-path counts |
| `tb/r2000_run_if.svh` | shared task used by the processor testbenches: load, run, compare |
| `tb/tb_common.svh` | shared check counters |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. For example, the whole design at its default
sizes:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/r2000_pkg.sv tb/r2000_ref_pkg.sv rtl/*.sv tb/tb_computer_org_top.sv \
  --top-module tb_computer_org_top
./obj_dir/Vtb_computer_org_top
```

How the processor tests work:

- `tb_r2000_system` and `tb_computer_org_top` load each program, run it to `halt`, and compare
  three things with the reference model: every memory word, the exact number of cycles, and how
  often each multi-cycle path was taken.
- The programs are the Fibonacci program for several N, plus an exercise program. The exercise
  program uses every instruction, both `slt` outcomes, negative offsets and writes to r31.
- Both testbenches fail if any mechanism never occurs. For the processor these are each
  instruction path, `slt` both ways, `beq` taken and not taken, and halt. The top-level testbench
  also covers the register's hold and release, a simultaneous read and write in the register file,
  SRAM reads and writes, and the adder's carry out.

To change the memory size, set `MEM_ADDR_BITS` on `r2000_system` or `computer_org_top`. The
testbenches assume 8 bits. To widen the adder, set `WIDTH` on `ripple_adder`.

## Where this design makes its own choices

- **3-state buses are multiplexers.** An idle bus reads 0, and an assertion forbids two drivers
  at once.
- **Memory writes happen at the clock edge.** The address and data are held by registers for the
  whole cycle. A write strobe delayed inside the cycle would work the same.
- **The host port on the processor memory is an addition.** It is there for loading programs and
  reading results.
- **Don't-care control outputs are driven 0.** An unknown opcode or funct is a no-op and does not
  hang the machine.
- **No reset for most storage.** The data registers, the register file (other than r31) and
  memory contents are not reset. Programs must write a register before reading it.
- **The small blocks use a clocked write.** This applies to the SRAM and the 4 × 4 register file,
  which would classically be latch-based or level-sensitive. The SRAM gives a write priority over a
  read when both enables are high.
- **Not built.** The accumulator-style processors, the bit-slice datapath and the three
  register-interconnect styles are described only as block diagrams, with no instruction set or
  control, so no RTL is given for them.
