# A small 32-bit RISC: sequential, pipelined and dual-core

This is one tiny load/store instruction set, implemented three ways:

- **A sequential machine.** It executes one whole instruction per clock. It serves as the reference for what every instruction means.
- **A three-stage pipelined core.** Its stages are fetch, execute and writeback. It detects read-after-write hazards with a "previous instruction" register.
- **A dual-core machine.** It has two of those pipelined cores, each with its own PC and registers. The two cores share one program memory and one data memory.

The top level, `amp_top`, places the sequential machine and the dual-core machine side by side. They share only the clock.

The architecture was first written as an algebraic state-transition model: each machine is a next-state function applied once per step. The RTL keeps that structure, with one clock edge per step. Where the model leaves a hardware question open, the choice made here is marked below.

## Instruction set

Every instruction is one 32-bit word, laid out as `{opcode[31:24], A[23:16], B[15:8], C[7:0]}`. A, B and C are register numbers. There are 256 registers of 32 bits, and register 0 always reads 0.

| op   | seq. opcode | pipelined opcode | effect |
|------|-------------|------------------|--------|
| NOP  | —           | 0x00             | nothing |
| ADD  | 0x00        | 0x01             | R[C] = R[A] + R[B] |
| MULT | 0x02        | 0x02             | R[C] = R[A] * R[B] (low 32 bits) |
| AND  | 0x03        | 0x03             | R[C] = R[A] & R[B] |
| OR   | 0x04        | 0x04             | R[C] = R[A] \| R[B] |
| NOT  | 0x05        | 0x05             | R[C] = ~R[A] |
| SLL  | 0x06        | 0x06             | R[C] = R[A] << R[B] (0 when R[B] ≥ 32) |
| LD   | 0x07        | 0x07             | R[C] = DM[R[A] + R[B]] |
| ST   | 0x08        | 0x08             | DM[R[A] + R[B]] = R[C] |
| EQ   | 0x09        | 0x09             | R[C] = 0 if R[A] == R[B], else 0xFFFFFFFF |
| GT   | 0x0A        | 0x0A             | R[C] = 0 if R[A] > R[B] (unsigned), else 0xFFFFFFFF |
| JMP  | 0x0B        | 0x0B             | if R[A] == 0: PC = R[C] and R[B] = address of JMP + 4 |

Two things in this table are easy to miss:

- **The two machines use different opcode maps.** The sequential machine uses 0x00 for ADD. The pipelined cores use 0x00 for NOP, so that a cleared pipeline register is harmless, and move ADD to 0x01. All other opcodes are the same. Opcodes that are not in the table are executed as no operation.
- **True is encoded as 0.** EQ and GT write 0 for true. JMP branches when its A register is 0. So a compare followed by a `JMP` that tests the compare's result branches when the compare was true. The `JMP` puts the return address in register B. A jump with A = 0 (register 0) is unconditional, and `JMP R0, R0, Rx` with Rx holding the JMP's own address is a halt loop.

Arithmetic wraps modulo 2^32. There are no flags, no exceptions and no signed operations.

### Addresses

- **PC is a byte address.** Program memory holds words, and the word fetched is `PC[PAW+1:2]`. The low two PC bits are ignored.
- **Data addresses are word numbers.** `R[A] + R[B]` selects a whole 32-bit word.
- **Memories are smaller than the address space.** The architecture allows 2^32 locations per memory. The RTL defaults to 2^28 words per memory, set by the parameters `PAW` and `DAW`, because that is the largest array the open-source simulator accepts. Higher address bits are ignored, so addresses alias.

## Sequential machine (`spm`)

`spm` holds program memory, data memory, PC and the register bank. On each clock with `run` high it does the following, all combinationally:

1. Read the instruction at PC.
2. Read its operands and do the load, if any.
3. At the edge, write the one result (register, data word, or PC and link register).

Every instruction therefore takes exactly one clock, and a program of *n* executed instructions takes *n* clocks. `retired` and `taken` pulse for each instruction and each taken JMP.

## Pipelined core (`pmp_core`)

The core is three units that all advance on the same edge:

```
 clock t    fetch_unit      CIR <= PM[PC]; PIR <= CIR; PC <= PC + 4
 clock t+1  execute_unit    operands of CIR read, result computed,
                            state register <= {result, taken, wbflag,
                                               memwbloc, regwbloc}
 clock t+2  writeback_unit  result written into register regwbloc or
                            data word memwbloc (wbflag says which)
```

Each unit holds specific state:

- **Fetch unit:** PC, the current instruction register (CIR) and the previous instruction register (PIR).
- **Execute unit:** the record it passes to writeback.
- **Writeback unit:** the register bank.

Program memory and data memory sit outside the core so that two cores can share them.

### Read-after-write interlock

A register result is written at the end of writeback. That is one clock too late for the instruction that immediately follows it.

The fetch unit therefore compares the destination register of PIR with the registers that CIR reads:

- For results and loads, the destination is field C.
- For a JMP, the destination is field B (the link register), whether or not the JMP was taken.
- Register 0 never causes a stall.

On a match, `stall` is raised for one clock:

- PC and CIR hold.
- The execute unit issues a bubble.
- PIR becomes a NOP, so the same check passes on the next clock.

An instruction two or more places after its producer always reads the written value. The register bank returns the old value when a register is read and written in the same clock.

**The interlock is the parameter `INTERLOCK`, default 1.** The source material is not consistent here:

- One part describes this previous-instruction check as the way to protect the pipeline.
- Another part says the pipeline has no interlocks, like early MIPS, and leaves dependent instructions to the compiler.

The default follows the interlocked reading, because the reference program only gives its intended results with it. `INTERLOCK = 0` builds the interlock-free pipeline. `pmp_core_tb` runs both versions and shows the stale read that the interlock-free version gives.

Loads and stores are **not** interlocked against each other. A load placed directly after a store to the same word reads the old value. Put one other instruction between them.

### Branches

A JMP is decided in execute. When it is taken, `redirect` reaches the fetch unit in the same clock:

- The fetch unit loads `CIR <= PM[target]` and `PC <= target + 4`.
- The instruction behind the JMP is never fetched, so there is no delay slot and no wrong-path squash.
- A taken branch costs no extra clock.

The link value written to register B is the address of the JMP plus 4. This is the same as on the sequential machine.

### Timing

After reset, CIR holds a NOP, and the first clock with `run` high executes that NOP. From then on, every clock executes one instruction or one bubble. With the interlock on, a program ends in the same register and memory state as on the sequential machine. It needs one extra clock per adjacent register dependency.

Example: the 16-instruction reference program in the testbenches needs 16 clocks on `spm`. On the pipelined core it has 4 bubbles, and its halt instruction first executes on clock 22.

## Dual-core machine (`pmp2`)

`pmp2` contains two `pmp_core` instances. Each core has its own PC, pipeline registers and 256 registers. Each starts at its own `boot_pc`, so the two cores run different programs from different regions of the one program memory.

Each memory has one port per core:

- **Program memory:** one read port per core, and one host write port.
- **Data memory:** one read port and one write port per core, plus a host read port and a host write port.

Both cores can load and store in the same clock:

- Stores to different words both take effect.
- If both cores store to the **same** word in one clock, core 1's value is kept and `ev_dm_collision` pulses.
- A load sees stores from earlier clocks only.

There is no lock, cache or ordering beyond this. Programs that share data must arrange their own handshakes: `pmp2_tb` passes a flag through shared memory this way. The core-1-wins rule and the collision output are choices of this implementation.

## Loading and reset

Each machine has its own synchronous, active-low `rst_n` and its own `run`.

- **Reset:** sets PC to 0 on `spm`, and to `boot_pc` on each pipelined core. It clears CIR, PIR and the execute record. It does not clear memories or registers.
- **While `run` is low,** the host port writes program memory, data memory and registers, one word per clock.
- **At any time,** the host can read data memory and registers. Reads are combinational.
- **While `run` is high,** host writes are ignored.
- **To run a program:** load it, pulse `rst_n`, then raise `run`. Lower `run` to stop, then read the results.

## Where this RTL departs from, or adds to, the architecture as first specified

- **Memory size:** 2^28 words per memory instead of 2^32. Change `PAW` and `DAW` to resize.
- **Store operands:** in ST, R[C] is the value and R[A] + R[B] is the address. This follows the sequential definition and the worked examples. The pipelined definition has the two swapped, which was taken as a slip.
- **Destination register:** pipelined results go to register number C. The pipelined definition names the contents of register C as the destination, which was also taken as a slip.
- **Branch redirect:** after a taken branch, fetch continues at `target + 4`. The original fetch rule sets PC to the target itself, which would fetch the target instruction twice. The link value is the JMP's address plus 4 on both machines.
- **Stall mechanism:** the stall is combinational within one clock, rather than a flag that the fetch unit clears on its next step. The effect is the same: one idle cycle per hazard.
- **Undefined opcodes:** executed as no operation. The architecture does not define them.
- **Additions of this implementation:** host ports, reset, the write-port priority on shared data memory, and the collision flag.
- **Not provided:** multi-threaded and superscalar variants. The architecture discusses them but never defines them.

## Files

| file | contents |
|------|----------|
| `rtl/amp_pkg.sv` | word and field types, both opcode maps, decoders, execute record |
| `rtl/alu.sv` | the eight operations |
| `rtl/regfile.sv` | 256 × 32 registers, R0 = 0, `NR` read ports |
| `rtl/word_mem.sv` | word memory with `NR` read and `NW` write ports |
| `rtl/spm.sv` | sequential machine |
| `rtl/fetch_unit.sv`, `rtl/execute_unit.sv`, `rtl/writeback_unit.sv` | pipeline stages |
| `rtl/pmp_core.sv` | pipelined core |
| `rtl/pmp2.sv` | dual-core machine |
| `rtl/amp_top.sv` | top level |
| `tb/amp_tb_pkg.sv` | instruction-level reference model and program generators |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Testing

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog ends a run that hangs.

The testbenches compare the RTL with `amp_tb_pkg::isa_model`, an instruction-by-instruction model written independently of the RTL. They use:

- the reference program, which exercises every instruction, a subroutine call and a return;
- a two-instruction add-and-store example;
- random straight-line programs;
- a counting loop.

The pipelined testbenches also check the clock count and the number of bubbles.

`amp_top_tb` runs the whole top at its default 2^28-word memories, with no parameter overridden. It counts retired instructions, taken and not-taken branches, interlock bubbles, redirects on each core, and shared-memory collisions. It fails if any of them never happened. The run takes about half a minute and about 4 GB of memory. The block testbenches shrink the memories to between 2^10 and 2^12 words.

To simulate with Verilator 5, for example the pipelined core:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/amp_pkg.sv tb/amp_tb_pkg.sv tb/pmp_core_tb.sv --top-module pmp_core_tb
./obj_dir/Vpmp_core_tb
```

Replace `pmp_core_tb` with any other testbench name. The simulator has only two signal states, so every testbench drives or resets everything it reads.
