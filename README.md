# 32-bit accumulator RISC processor with reversible-gate arithmetic

This is a small 32-bit accumulator machine. Its arithmetic is built from reversible
logic gates. Every instruction names one memory word. The processor combines that word
with the accumulator, or stores the accumulator into it, or jumps to it. The main idea
is in the flexible computational unit (FCU), which is the ALU:

- Addition and subtraction use a ripple carry adder. Each full adder in it is two
  **Peres gates**, and each Peres gate is in turn two Toffoli gates.
- Multiplication gets its partial products from **BVPPG gates**. These 5-in/5-out gates
  each produce two product bits, and they also pass the operand bits on, so no separate
  fan-out logic is needed.
- The logic operations use **Toffoli** and **Feynman (CNOT)** gates.

The reversible formulation is meant to replace a carry-save-adder datapath with a
smaller, lower-power one. In RTL the gates are ordinary combinational logic. Their
unused "garbage" outputs are left open and are removed by synthesis.

Main figures:

| item | value |
|---|---|
| data word, accumulator, instruction register | 32 bits, unsigned |
| address (PC, operand field) | 28 bits |
| memory | 256 words x 32 bits, holding both instructions and data |
| instruction | 4-bit opcode in bits [31:28], 28-bit address in bits [27:0] |
| instructions | 15, no interrupts, no conditional branches |
| timing | 2 clocks per instruction; write-back overlaps the next fetch |

## Instruction set

The 4-bit opcode and the count of fifteen instructions are part of the architecture.
The choice of operations and their codes is this implementation's. The codes are in
`rtl/risc_pkg.sv` as `opcode_e`.

| code | mnemonic | effect |
|---|---|---|
| 0 | NOP | nothing |
| 1 | LDA a | ACC <- M[a] |
| 2 | STA a | M[a] <- ACC |
| 3 | ADD a | ACC <- ACC + M[a] |
| 4 | SUB a | ACC <- ACC - M[a] (modulo 2^32) |
| 5 | MUL a | ACC <- low 32 bits of ACC * M[a] |
| 6 | AND a | ACC <- ACC & M[a] |
| 7 | OR a | ACC <- ACC \| M[a] |
| 8 | NAND a | ACC <- ~(ACC & M[a]) |
| 9 | XOR a | ACC <- ACC ^ M[a] |
| A | NOT | ACC <- ~ACC |
| B | SHL | ACC <- ACC << 1 |
| C | SHR | ACC <- ACC >> 1 (logical) |
| D | JMP a | PC <- a |
| E | HLT | stop until reset |
| F | (reserved) | executes as NOP |

There are no flags. A carry out of ADD and the upper half of a product are dropped.
Only the low 8 address bits select a memory word, so address 0x100 is the same word
as address 0x000.

## Datapath

```
            +----------+   fetch=1: PC     +-----------+
  PC ------>| addr_mux |------------------>|  memory   |
  IR[27:0]->|          |   fetch=0: IrOut  | 256 x 32  |
            +----------+                   +-----------+
                                             rdata | ^ wdata, we
                                                   v |
                                           +--------------+
                              ACC -------->|  bus_buffer  |
                                           +--------------+
                                                   | data bus
                           +-----------------------+------------+
                           v                                    v
                  instruction_register                    fcu (data input)
                  opcode[31:28] -> control_unit, fcu      fcu (acc input) <- ACC
                  IrOut [27:0]  -> addr_mux, PC (jump)    Acc1 register --> accumulator
```

One memory port serves both instruction fetch and operand access. `addr_mux` chooses
its address with the `fetch` signal. `bus_buffer` stands for the bidirectional data
bus:

- In a read, the memory word goes onto the bus.
- In a write, the accumulator goes to the memory.

The FCU's result is captured in its own register, Acc1. The accumulator is loaded from
Acc1.

## Instruction timing: fetch, execute, and the overlap

The hardest part of the design is the timing. The control unit (`control_unit.sv`)
alternates two one-clock cycles:

| cycle | `fetch` | memory address | bus carries | registers updated at the end of the cycle |
|---|---|---|---|---|
| fetch | 1 | PC | instruction (read) | IR <- bus, PC <- PC+1, **ACC <- Acc1 if the previous instruction produced a result** |
| execute | 0 | IrOut | operand (read), or ACC (STA, write), or nothing | Acc1 <- FCU result; PC <- IrOut on JMP; halt on HLT |

An instruction's result is computed in its execute cycle and held in Acc1. It reaches
the accumulator during the fetch cycle of the following instruction. The control unit
decides that load (`ld_acc`) from the opcode still in the IR, which is the previous
instruction. So the write-back of one instruction and the fetch of the next share a
clock. This is the design's two-stage overlap of fetch and execute.

The next instruction reads the accumulator only in its own execute cycle. By then the
write-back is done, so no stall or bypass is needed.

A program of N instructions, HLT included, runs in exactly 2N clocks from the release
of reset until `halted` rises. `rd` and `wr` are never high together, and an assertion
in the control unit checks this.

Example: `LDA x; ADD y; STA r; HLT` takes 8 clocks.

- The sum x+y goes into Acc1 at the end of ADD's execute cycle.
- It reaches ACC during STA's fetch cycle.
- STA writes it in its execute cycle.

## How the FCU is built

`fcu.sv` computes every operation in parallel and chooses one with the opcode:

- **ADD / SUB**: `peres_rca` takes the accumulator and the operand. For SUB, a row of
  Feynman gates with the control input at 1 inverts the operand, and the carry-in is 1.
  This gives two's-complement subtraction, A + ~B + 1.
- **Peres full adder** (`peres_full_adder.sv`): gate 1 takes (A, B, 0) and gives A^B
  and AB. Gate 2 takes (A^B, Cin, AB) and gives the sum A^B^Cin and the carry
  (A^B)Cin ^ AB.
- **MUL** (`reversible_multiplier.sv`):
  - Row j of the partial products comes from W/2 BVPPG gates. Each gate takes
    (a[2k], b[j], 0, a[2k+1], 0) and outputs a[2k]b[j] on R and a[2k+1]b[j] on T.
  - The rows, each shifted by j, are added one after another by 31 Peres ripple carry
    adders. Only the low 32 bits are kept.
  - This is a large, deep combinational block, about 1000 full adders in series and in
    parallel. It sets the clock period of any real implementation.
- **AND / NAND**: a Toffoli gate with C = 0 or C = 1.
- **XOR**: a Feynman gate.
- **NOT**: a Feynman gate with its control input at 1.
- **OR and the one-bit shifts**: plain logic.

Gate definitions used:

| gate | inputs | outputs |
|---|---|---|
| Feynman / CNOT | A, B | P=A, Q=A^B |
| Toffoli | A, B, C | P=A, Q=B, R=AB^C |
| Peres | A, B, C | P=A, Q=A^B, R=AB^C |
| BVPPG | A, B, C, D, E | P=A, Q=B, R=AB^C, S=D, T=BD^E |

The NFT gate, a 3x3 gate of quantum cost 5, belongs to the same family of reversible
gates. It is not used and is not provided: no role for it in the processor is defined.

## Where this RTL departs from the original description, or fills gaps

- **Clocking.** The original uses a separate execute clock. Acc1 is written on its
  rising edge and the accumulator on its falling edge. Here one rising-edge clock drives
  all registers. `exec_en` and `ld_acc` mark the two loads, one cycle apart.
- **Acc1 to accumulator.** The original sends Acc1 to the accumulator over the data bus.
  Here Acc1 is wired straight to the accumulator, so that the write-back can share a
  cycle with the next instruction fetch, which needs the bus.
- **Data bus.** The bidirectional buffer is a multiplexer with separate read and write
  wires instead of tri-state drivers.
- **Rate.** The original claims one instruction per clock. With one memory port, each
  instruction needs one fetch access and one operand access. The rate here is therefore
  one instruction per two clocks, with write-back overlapped.
- **ALU operations.** One passage describes a two-bit operation select and mentions
  division. The 4-bit opcode is used instead, and no divider is built. The later, more
  specific operation lists include no division.
- **Instruction set, reset address (0), memory timing, multiplier array structure.**
  These are not given in the source, and the choices here are this implementation's.
  Memory timing is asynchronous read with synchronous write.
- **Reset.** One active-low asynchronous reset, `rst_n`, clears PC, IR, Acc1, the
  accumulator and the control state. The memory is not reset.
- **Program loading.** There is no load port. A testbench or an FPGA memory
  initialisation must fill `u_mem.mem`.
- **Area and power.** The original reports about 270 LUTs and 20.5 W, against 332 LUTs
  and 25.2 W for a carry-save version. These numbers cannot be reproduced from this RTL.
  A full 32x32 array multiplier alone is well above 270 LUTs.

## Files

`rtl/`:

| file | role |
|---|---|
| `risc_pkg.sv` | widths, `opcode_e`, instruction decode helpers, `instr()` builder |
| `risc_top.sv` | the processor (top) |
| `control_unit.sv` | fetch/execute/halt state machine, all control signals |
| `fcu.sv` | ALU and Acc1 register |
| `reversible_multiplier.sv` | BVPPG + Peres-adder multiplier |
| `peres_rca.sv`, `peres_full_adder.sv` | reversible ripple carry adder |
| `feynman_gate.sv`, `toffoli_gate.sv`, `peres_gate.sv`, `bvppg_gate.sv` | reversible gates |
| `accumulator.sv`, `program_counter.sv`, `instruction_register.sv` | registers |
| `addr_mux.sv`, `bus_buffer.sv`, `memory.sv` | memory addressing, bus, 256x32 memory |

Parameters default to the architecture's numbers: 32-bit data, 28-bit addresses and
256 words. `risc_top` has one parameter, `DEPTH`.

`tb/` has one self-checking testbench per module, `tb_<module>.sv` (the full adder is covered by `tb_peres_rca`). Each prints
`TB_RESULT checks=N failures=M` and ends with a watchdog.

## Verification

- **Reversible gates.** Exhaustive truth tables, plus checks that each mapping is one to
  one. The Feynman and Toffoli gates are also checked to be their own inverses.
- **Adder and multiplier.** Random and corner-case operands, compared with the built-in
  `+` and `*`.
- **FCU.** Every opcode with random operands, compared with a reference function. Acc1
  is checked to update only with `exec_en`.
- **Control unit.** Checked cycle by cycle against an independent schedule, including
  the halt and the two-clocks-per-instruction rate.
- **Registers, mux, bus buffer and memory.** Each against a reference model. The memory
  test covers all 256 words and the address aliasing.
- **Whole processor (`tb_risc_top`).** Runs at the default size with no parameter
  overrides:
  - A directed program computes ((x+y)*z - w) and then goes through a jump, the logic
    operations, the shifts and the stores.
  - Then 20 random 100-instruction programs use all opcodes, forward jumps and stores.
  - An instruction-level interpreter inside the testbench runs each program. The final
    accumulator, all 256 memory words and the exact clock count (2 per instruction)
    must match.
  - The testbench counts the write-back overlap, operand reads, memory writes, jumps,
    multiplies and halts, and fails if any of them never happens.

Each testbench was also run against a deliberately broken copy of its module and
reported failures.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal rtl/risc_pkg.sv -y rtl \
    tb/tb_risc_top.sv --top-module tb_risc_top -Mdir obj_top
./obj_top/Vtb_risc_top
```

Any other testbench runs the same way: replace `tb_risc_top` with its name. The
package must come first on the command line. `-y rtl` finds the other modules by file
name. Lint a module with `verilator --lint-only -Wall rtl/risc_pkg.sv -y rtl
rtl/<module>.sv`.

To run your own program:

- Write words into `dut.u_mem.mem[...]` from the testbench before releasing `rst_n`.
- Build the words with `risc_pkg::instr(OP_ADD, 28'd200)` and similar calls.
- Wait for `halted`.

The remaining lint warnings are unused outputs of the reversible gates and the unused
carry out of the adder. They are expected.
