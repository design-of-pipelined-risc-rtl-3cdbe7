# RISC16: a 16-bit load/store RISC processor, multi-cycle and pipelined

RISC16 is a small MIPS-style processor with 16-bit words and 16-bit instructions. It keeps to the
RISC approach. Only loads and stores touch memory. Everything else works on a bank of 16
registers. The ALU has eight operations. The processor comes in two forms that run the same
instruction set:

* **Multi-cycle form** (`control_unit` + `datapath`). A state machine steps each instruction
  through fetch, decode, execute and memory/write-back. It reuses one ALU and one memory for
  everything. An instruction takes 4 clock cycles, and a load takes 5.
* **Five-stage pipelined form** (`pipe16_cpu`). It has IF, ID, EX, MEM and WB stages with
  latches between them, and separate instruction and data memories. When nothing blocks the
  pipeline, one instruction finishes every clock.

`risc16_top` holds both forms side by side. They share no hardware, and each has its own
clock, reset and observation ports.

The arithmetic units are separate modules that can also be used on their own:

* a ripple-carry adder with a parity output (`adder_16`);
* a four-function logic unit (`logic_unit`);
* the ALU that combines them (`alu16b`).

## Instruction set

Every instruction is 16 bits wide. The opcode sits in bits 15:12. After it come either three
4-bit register fields (`rd` 11:8, `rs` 7:4, `rt` 3:0) or `rd` and an 8-bit immediate (7:0).
Immediates and offsets are sign-extended. `pc` below means the address of the instruction
itself, so a branch lands at `pc + 1 + offset`.

| opcode | mnemonic | effect | carry flag |
|---|---|---|---|
| 0000 | ADD rd, rs, rt | rd = rs + rt | carry out |
| 0001 | SUB rd, rs, rt | rd = rs - rt | borrow (rt > rs, unsigned) |
| 0010 | AND rd, rs, rt | rd = rs & rt | 0 |
| 0011 | OR  rd, rs, rt | rd = rs \| rt | 0 |
| 0100 | XOR rd, rs, rt | rd = rs ^ rt | 0 |
| 0101 | NOT rd, rs | rd = ~rs | 0 |
| 0110 | SHL rd, rs | rd = rs << 1 | old bit 15 |
| 0111 | SHR rd, rs | rd = rs >> 1 (logical) | old bit 0 |
| 1000 | ADDI rd, imm8 | rd = rd + imm8 | carry out |
| 1001 | LD rd, off4(rs) | rd = M[rs + off4] | – |
| 1010 | ST rd, off4(rs) | M[rs + off4] = rd | – |
| 1011 | BZ rd, off8 | if rd == 0: pc = pc + 1 + off8 | – |
| 1100 | BC off8 | if carry flag: pc = pc + 1 + off8 | – |
| 1101 | JMP off8 | pc = pc + 1 + off8 | – |
| 1110 | LI rd, imm8 | rd = imm8 | – |
| 1111 | CLR rd | rd = 0 | – |

For opcodes 0000 to 0111, the low three bits are the ALU operation code. The ALU code table is
part of the original design. The rest of the encoding was chosen for this implementation.
`JMP -1` (`0xD0FF`) jumps to itself and serves as a halt. The testbenches use it that way.

Both forms address memory by word. Only the low 8 bits of an address are decoded at the default
depth of 256 words, so addresses wrap around.

## Multi-cycle form

### Datapath

`datapath` has the following registers:

* PC;
* the instruction register (IR);
* the memory data register (MDR);
* two operand registers, A and B;
* an ALU-out register.

It also has the 16-entry register bank and one memory that holds both program and data.
Multiplexers chosen by the controller route data between them:

| select | 0 / 00 | 1 / 01 | 10 | 11 |
|---|---|---|---|---|
| `addr_sel` (memory address) | PC | ALU-out | | |
| `pc_sel` (next PC) | ALU result | ALU-out | | |
| `opa_sel` (ALU operand A) | PC | A | | |
| `opb_sel` (ALU operand B) | constant 1 | B | sext(IR[3:0]) | sext(IR[7:0]) |
| `rega_sel` (register port A address) | IR[7:4] | IR[11:8] | | |
| `data_sel` (register write data) | ALU-out | MDR | sext(IR[7:0]) | 0 |

A, B and ALU-out load on every clock. PC, IR, the register bank and the memory load only when
`pc_wrt`, `ir_wrt`, `reg_wrt` and `we` are high. The MDR loads whenever `re` is high. Register
port B always reads `IR[3:0]`, and writes always go to `IR[11:8]`. The memory writes the A
register. The datapath returns three signals to the controller: the opcode (`irout`), the A
register (`outA`) and the ALU carry.

### Controller

`control_unit` is a Moore machine. Its state codes are START = 100 and S0 to S3 = 000 to 011.
S4 = 101 is an extra state used only by loads.

| state | all instructions | by opcode |
|---|---|---|
| START | nothing; entered on reset | |
| S0 fetch | IR ← M[PC]; PC ← PC + 1 (ALU: PC + 1) | |
| S1 decode | A ← R[rs] (R[rd] for ADDI, BZ); B ← R[rt]; ALU-out ← PC + sext(imm8) | |
| S2 execute | | ALU ops: ALU-out ← A op B, carry flag ← carry. ADDI: A + imm8. LD/ST: ALU-out ← A + off4, and ST loads A ← R[rd]. BZ/BC/JMP: if taken, PC ← ALU-out |
| S3 memory / write-back | | ALU ops, ADDI: R[rd] ← ALU-out. LI: R[rd] ← imm8. CLR: R[rd] ← 0. ST: M[ALU-out] ← A. LD: MDR ← M[ALU-out] |
| S4 | | LD only: R[rd] ← MDR |

The branch target is computed in S1, while the ALU is otherwise idle. The target waits in the
ALU-out register until S2 decides the branch. BZ tests `outA == 0`. BC reads a one-bit carry
flag, which holds the carry of the last ALU instruction or ADDI.

Timing: 1 START cycle after reset, then 4 cycles per instruction, plus 1 for each load. The
memory reads asynchronously and writes on the clock edge.

## Five-stage pipelined form

`pipe16_cpu` spreads the same work over five stages:

* **IF:** the PC addresses the instruction memory, and an `adder_16` forms PC + 1.
* **ID:** `pipe_decoder` turns the opcode into a control word that travels down the pipeline.
  The register bank is read, and the immediates are sign-extended. A separate `jump_unit`
  (with its own `adder_16`) spots a JMP here, computes its target and redirects the fetch
  at once.
* **EX:** the ALU computes the result, the load/store address, or the target of a BZ or BC
  (next PC + offset). A zero test on register A and the carry flag decide whether the branch
  is taken.
* **MEM:** the data memory is read or written. A taken branch loads the PC here.
* **WB:** the register bank is written.

The stage latches are the structs `if_id_t`, `id_ex_t`, `ex_mem_t` and `mem_wb_t` in
`risc16_pkg`. Each carries a `valid` bit. A bubble is simply an entry whose `valid` is 0.

The pipeline handles hazards as follows:

* **Register dependences:** there is no forwarding. An instruction in ID waits if it reads a
  register that an instruction in EX, MEM or WB will still write. While it waits, the PC and
  IF/ID hold and a bubble enters EX. The register bank does not pass a value through in the
  cycle it is written, so the check includes WB. A value used by the very next instruction
  therefore costs 3 stall cycles.
* **Conditional branches (BZ, BC):** the outcome is known when the branch reaches MEM. If it
  is taken, the three younger instructions in IF, ID and EX are squashed, so a taken branch
  costs 3 cycles. An instruction squashed in EX does not update the carry flag.
* **Jumps (JMP):** `jump_unit` resolves a jump in ID. Only the instruction in IF is squashed,
  so a jump costs 1 cycle. If an older taken branch in MEM redirects in the same cycle, the
  branch wins, because the jump was on the wrong path. The JMP then flows on as a no-op.
* **Memory:** a store writes only the data memory. A program cannot modify itself here, unlike
  in the multi-cycle form.

Without hazards, N instructions finish in N + 4 cycles, one per clock once the pipeline is full.

## Arithmetic units

* **`adder_16`:** a ripple of 16 `fulladder`s. Each full adder is two `halfadder`s and an OR
  gate. Outputs are `sum`, `cout` (carry out of bit 15) and `cp`, the XOR parity of the sum.
  Example: 1010101010101010 + 1111000011110000 gives sum 1001101110011010, cout 1, cp 1.
* **`logic_unit`:** `logic_low_unit` forms AND, OR, XOR and XNOR in parallel. `mux_4by1` then
  picks one with `sel` = 00, 01, 10, 11.
* **`alu16b`:** `ALUCON` selects the operation. 000 add and 001 subtract both go through
  `adder_16`; subtraction is computed as PORT1 + ~PORT2 + 1. 010 AND, 011 OR and 100 XOR go
  through `logic_unit`. 101 is NOT PORT1, 110 shifts PORT1 left one bit, and 111 shifts it
  right one bit. `carry` is:
  * the carry out for an add;
  * the borrow for a subtract;
  * the bit shifted out for a shift;
  * 0 otherwise.

## What follows the original design, and what is this implementation's

These parts follow the original design:

* the split into controller and datapath, and all the signal names between them;
* the controller's state codes;
* the 4-bit opcode field;
* the single shared memory of the multi-cycle form;
* the five-stage organisation, with separate memories, of the pipelined form;
* the ALU operation table;
* the adder's half-adder/full-adder structure and its parity output;
* the logic unit's structure and select coding.

These are this implementation's own choices:

* The instruction set, the field layout and every multiplexer coding.
* The extra controller state S4 for loads, and the carry flag behind BC.
* Shifts move one bit. Subtraction reports a borrow. The ALU computes exact arithmetic for
  every operation.
* The hazard interlock and branch squash of the pipeline. The original organisation shows no
  hazard logic, so without them programs would need NOPs placed by hand.
* Sizes: 256-word memories and 16 registers.
* Resets: synchronous throughout. The processor's reset is active low, and the multi-cycle
  datapath's own `rst` is active high.

The original controller was synthesized with two latches. This one uses flip-flops only.

Not covered: the FPGA board, with its switches, LEDs and display, used to demonstrate the
design. Timing and power figures are not reproduced.

## Verification

Each module in `tb/` has a self-checking testbench. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

* **`tb_adder_16`, `tb_logic_unit`, `tb_alu16b`:** the worked examples above, plus thousands
  of random operands checked against behavioural expressions.
* **`tb_memory`, `tb_regfile`:** random traffic checked against a shadow array, plus the read
  gating, the write timing, reset and address wrap.
* **`tb_control_unit`:** plays the datapath. For every opcode, with register A zero and
  non-zero and the carry at 0 and 1, it checks the fetch controls, the cycle count, the
  branch decisions, the number and source of register writes, and the memory reads and
  writes.
* **`tb_datapath`:** drives control words by hand through LI, ADD, ST, LD, SUB, ADDI, a
  second LD and JMP. It checks PC, IR, registers, memory and carry, including a jump to
  0xFFFF and the wrap of the PC back to 0.
* **`tb_pipe16_cpu`:** checks four timings:
  * 20 independent instructions flow one per clock;
  * a dependent instruction waits 3 cycles;
  * a jump costs 1 cycle;
  * a taken conditional branch costs 3 cycles.

  It then runs a hand-written program and 40 random programs of 120 instructions against an
  instruction-level reference model, comparing all registers and the whole data memory.
* **`tb_jump_unit`:** hand-picked and random instructions, checking the jump decision and
  the sign-extended target.
* **`tb_risc16_top`:** the end-to-end test at the default sizes. A hand-written program covers
  a counting loop, a store and a load, BC taken and not taken, BZ taken and not taken, and
  every opcode. 40 random programs of 100 instructions follow. Each program runs on both
  forms. For both forms the test compares every register and the memory with the reference
  model. For the multi-cycle form it also checks the exact cycle count (1 + 4 × instructions
  + loads). For the pipeline it checks the one-per-clock throughput. It counts branches taken
  and not taken, loads, stores, carry-outs, stalls, squashes and jumps, and fails if any of
  them never happened.

## Simulating

The package must be compiled first. Each testbench is a top of its own:

```
verilator --binary --timing --assert -Irtl rtl/risc16_pkg.sv tb/tb_risc16_top.sv \
          --top-module tb_risc16_top -o sim
./obj_dir/sim
```

Replace `tb_risc16_top` with any other testbench name. Verilator finds the modules in `rtl/` by
file name, because each module, package and struct lives in `rtl/<name>.sv`. The testbenches
load programs by writing straight into the memory arrays through hierarchical references:

* multi-cycle form: `dut.u_datapath.u_mem.mem`;
* pipelined form: `dut.u_pipe.imem.mem` and `dut.u_pipe.dmem.mem`.

## Files

| file | contents |
|---|---|
| `rtl/risc16_pkg.sv` | opcodes, ALU codes, state codes, select codes, sign-extension functions, pipeline control word and latch structs |
| `rtl/risc16_top.sv` | both processor forms side by side |
| `rtl/control_unit.sv`, `rtl/datapath.sv` | multi-cycle processor |
| `rtl/pipe16_cpu.sv`, `rtl/pipe_decoder.sv`, `rtl/jump_unit.sv` | five-stage pipelined processor |
| `rtl/alu16b.sv`, `rtl/adder_16.sv`, `rtl/fulladder.sv`, `rtl/halfadder.sv`, `rtl/logic_unit.sv`, `rtl/logic_low_unit.sv` | arithmetic and logic |
| `rtl/memory.sv`, `rtl/regfile.sv`, `rtl/registers.sv`, `rtl/mux2_to_1.sv`, `rtl/mux_4by1.sv` | storage and glue |
| `tb/tb_*.sv` | one self-checking testbench per block |
