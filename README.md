# TOY: a two-cycle 16-bit teaching processor

TOY is a deliberately small stored-program computer: 256 words of 16-bit
memory, sixteen 16-bit registers, an 8-bit program counter and sixteen
instruction types. Its point is to show the whole fetch-execute cycle
in hardware with as few parts as possible. Each instruction takes exactly two
clock cycles. The **fetch** cycle reads the instruction at `pc` into the
instruction register and steps the PC. The **execute** cycle does what the
instruction says. Two cycles are needed because both phases use the one
memory and both can change the PC.

This repository holds synthesizable SystemVerilog for the complete machine:
ALU, main memory, register file, program counter, instruction register,
branch-condition evaluator, phase counter and control unit. Each block has a
self-checking testbench, and a system testbench runs programs on the whole
processor against an instruction-level reference model.

## Instruction set

Every instruction is one 16-bit word. Its hex digits are `op d s t`. The low
byte, `s t`, doubles as an 8-bit memory address `addr`.

| op | name            | effect                          |
|----|-----------------|---------------------------------|
| 0  | halt            | stop the machine                |
| 1  | add             | R[d] ← R[s] + R[t]              |
| 2  | subtract        | R[d] ← R[s] − R[t]              |
| 3  | and             | R[d] ← R[s] & R[t]              |
| 4  | xor             | R[d] ← R[s] ^ R[t]              |
| 5  | shift left      | R[d] ← R[s] << R[t]             |
| 6  | shift right     | R[d] ← R[s] >> R[t] (arithmetic)|
| 7  | load address    | R[d] ← addr                     |
| 8  | load            | R[d] ← mem[addr]                |
| 9  | store           | mem[addr] ← R[d]                |
| A  | load indirect   | R[d] ← mem[R[t]]                |
| B  | store indirect  | mem[R[t]] ← R[d]                |
| C  | branch zero     | if R[d] = 0 then pc ← addr      |
| D  | branch positive | if R[d] > 0 then pc ← addr      |
| E  | jump register   | pc ← R[t]  (see below)          |
| F  | jump and link   | R[d] ← pc; pc ← addr            |

Words are 16-bit two's complement. R0 always reads as zero, and writes to it
are dropped. Example: `1234` at address 20 computes R2 ← R3 + R4. With
R3 = 0028 and R4 = 0064 it leaves R2 = 008C. `FF30` at address 20 leaves
R[F] = 21 (the already-incremented PC) and pc = 30.

## Timing: fetch, execute and the four events

A single flip-flop (`toy_phase_counter`) toggles on every rising clock edge.
Its output is `execute` and its inverse is `fetch`. This gives four moments
in each instruction:

| moment                 | what happens                                          |
|------------------------|-------------------------------------------------------|
| during fetch           | memory address = pc; memory drives the instruction    |
| end of fetch (edge)    | IR ← mem[pc]; pc ← pc + 1                             |
| during execute         | registers are read; ALU, muxes and condition settle   |
| end of execute (edge)  | register, memory and (for jumps/branches) PC written  |

All state changes happen only at clock edges. This is why `R1 ← R1 + R1`
works: R1 is read throughout the execute cycle and written only at its end.

## The datapath and its result bus

The least obvious part of the machine is how few wires it needs. One 16-bit
**result bus** serves four purposes:

```
 A Data ─┬──────────────► ALU in1           ┌────────► register W Data mux (input 0)
         ├─► Cond Eval (=0, >0)              │
         └─► memory W Data (store data)      │
 B Data ────────────────► ALU in2            │
                          ALU out ─► [mux] ──┴─ result bus ─┬─► PC mux input 1 (low 8 bits)
 IR addr (s,t), 0-extended ──────►  ▲                        └─► memory Addr mux input 1 (low 8 bits)
                               alu_mux
```

* **ALU operations** (add … shift right) put the ALU output on the bus, and it
  is written to R[d].
* **Load address**, **load**, **store**, **branches** and **jump and link**
  set `alu_mux`. This puts the instruction's `addr` field on the bus, and it
  becomes the value written (load address), the memory address (load, store)
  or the new PC (branch, jump and link).
* **Load indirect**, **store indirect** and **jump register** make the ALU
  "copy input 2". R[t] then reaches the bus and serves as the memory address
  or the new PC.

The register file's A port reads R[s]. For store, store indirect and the two
branches it reads R[d] instead (`reg_a_mux`), because those instructions need
R[d] as store data or as the value to test. The B port always reads R[t], and
the write port always writes R[d]. A 3-input mux picks the register write
data: the result bus, the memory read data (load, load indirect) or the PC
zero-extended (jump and link). The memory address is `pc` in fetch and the
low byte of the result bus in execute.

## The ALU

There are five function units, and a 3-bit select chooses between them:

| select | function        |
|--------|-----------------|
| 000    | add / subtract  |
| 001    | and             |
| 010    | xor             |
| 011    | shift left/right|
| 100    | copy input 2    |

Subtraction reuses the adder. With `subtract` set, input 2 is inverted and
the carry-in is 1, so the adder computes in1 + ~in2 + 1. A separate
`shift_dir` wire (0 left, 1 right) chooses the shift. The shift count is all
of input 2, read as an unsigned number. A count of 16 or more therefore gives
0 for a left shift and a word of sign bits for a right shift.

## Control

`toy_control` decodes the opcode into sixteen one-hot instruction lines. Each
control wire is an OR of the lines that need it, gated with the phase and
the branch conditions:

```
write_ir  = fetch
write_mem = execute & (store | store_indirect)
write_reg = execute & (add | sub | and | xor | shl | shr | lda | load | load_indirect | jal)
load_pc   = fetch | jal | jump_reg | (gt0 & branch_pos) | (eq0 & branch_zero)
pc_mux    = execute                      (0: pc+1, 1: result bus)
mem_addr  = execute                      (0: pc,   1: result bus)
reg_a_mux = store | store_indirect | branch_zero | branch_pos
alu_mux   = lda | load | store | branch_zero | branch_pos | jal
alu_sel   = {ldi | sti | jump_reg,  xor | shl | shr,  and | shl | shr}
subtract  = sub;  shift_dir = shr
wd_sel    = load | ldi → memory;  jal → pc;  otherwise result bus
```

During fetch, the IR still holds the previous instruction. `load_pc` is
still 1 then, and `pc_mux` = 0, so that previous instruction cannot disturb
the PC.

**Halt.** When a halt instruction reaches the end of its execute cycle, a
`halted` flag is set. From then on every write enable is held low and the
phase counter stops. The machine stays frozen, in the fetch phase, with
`pc` pointing past the halt, until reset.

Three concurrent assertions in `toy_control` guard the phase rules. Fetch
and execute are never both set or both clear. Memory and register writes
happen only in execute. The IR loads only in fetch. They are checked
whenever a simulation runs with `--assert`.

## Where this implementation makes its own choices

The structure above (the blocks, their ports, the mux inputs, the control
terms listed first, and the two-cycle timing) is the classic TOY hardware
design. Several points are not fixed by that design and are decided here:

* **Jump register** is `pc ← R[t]`. In this control scheme jump register
  does not set `reg_a_mux` or `alu_mux`. The only value that can reach the
  PC is then the ALU's copy of input 2, which is R[t]. The better-known TOY
  instruction set defines jump register as `pc ← R[d]`. Matching that would
  need an extra path, such as a B-address mux or a "copy input 1" ALU code.
* **Halt** freezes the machine until reset, as described above.
* **R0 reads as zero.**
* **Memory word FF is ordinary memory.** No standard-input/output device is
  attached to it.
* **Shifts:** right shifts are arithmetic, and the shift count is all of R[t].
* **Signedness:** `> 0` treats words as two's complement.
* **Reset** is synchronous and active-low. It sets pc = 0x10 (the
  `START` parameter of `toy_pc`), clears the registers and IR, clears
  `halted`, and enters the fetch phase. Memory is not cleared.
* **Program loading:** memory has a second port (`ext_we`, `ext_addr`,
  `ext_wdata`, `ext_rdata`) for loading programs and reading results. Use it
  while the processor is in reset or halted. A processor store wins over a
  loader write to the same word in the same cycle.
* **Reads are combinational** in memory and the register file. Writes happen
  at the rising clock edge.
* **Encodings** of the mux selects and of `shift_dir` are chosen here.

**Not included:** a pipelined variant, which fetches the next instruction
while executing the current one. It would need branch handling and separate
instruction and data memories. It is not part of this design.

## Files

| file | contents |
|------|----------|
| `rtl/toy_pkg.sv` | widths, opcode enum, ALU select enum, control struct `ctrl_t` |
| `rtl/toy_cpu.sv` | top level: datapath muxes and the block instances |
| `rtl/toy_alu.sv` | ALU |
| `rtl/toy_memory.sv` | 256 × 16 main memory plus the loader port |
| `rtl/toy_regfile.sv` | 16 × 16 register file, 2 read and 1 write port |
| `rtl/toy_pc.sv` | program counter, +1 adder, next-PC mux |
| `rtl/toy_ir.sv` | instruction register and field split |
| `rtl/toy_cond_eval.sv` | `= 0` / `> 0` tests for branches |
| `rtl/toy_phase_counter.sv` | 1-bit fetch/execute counter |
| `rtl/toy_control.sv` | decoder, control terms, halt flag |
| `tb/<block>_tb.sv` | self-checking testbench of each block |

Top-level ports of `toy_cpu`: `clk` and `rst_n`; the loader port; and the
observation outputs `pc`, `ir`, `execute` and `halted`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. A watchdog ends a stuck run with a failure. For example, with
Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/toy_pkg.sv \
          tb/toy_cpu_tb.sv --top-module toy_cpu_tb -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module in `rtl/<module>.sv`. The package
must be named explicitly, ahead of the testbench. Block testbenches are built
the same way, for example `tb/toy_alu_tb.sv --top-module toy_alu_tb`. The
system testbench's size knobs are `NUM_RANDOM` (random programs) and
`MAX_STEPS` (instructions per program), both localparams at its top.

## How far it has been checked

* **Block testbenches** compare each block with values computed
  independently in the testbench:
  * the ALU: the worked add, edge cases and 14,000 random operations;
  * memory: all 256 words on both ports;
  * the register file: R0, reset, and read-before-write in one cycle;
  * the PC: its mux inputs, hold and wrap-around;
  * IR field extraction;
  * condition signedness;
  * phase alternation and freezing;
  * every control wire for all 16 opcodes × 2 phases × 4 condition
    combinations, and the halt behaviour.
* **The system testbench** (`toy_cpu_tb`) runs the processor at its default
  size in lockstep with a reference model. After every instruction it checks
  PC, IR and all registers, and checks exactly two cycles per instruction.
  At the end of each program it compares all of memory. It runs:
  * `R1 ← R1 + R1`;
  * the two worked examples (add at 20, jump and link at 20);
  * an array-sum subroutine using load indirect, branches, jump and link and
    jump register;
  * 300 random programs, each up to 400 instructions.

  It counts every opcode, taken and untaken branches of both kinds, writes
  to R0, halts, and right shifts of negative words. It fails if any of these
  never happened. A full run takes well under a second.
* Every module passes `verilator --lint-only -Wall` and elaborates with
  Yosys/slang. It synthesizes to about 90 word-level cells, 26 flip-flops
  outside the arrays, and 4,352 bits of memory and register arrays.
