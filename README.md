# picoRISC-V: a five-stage pipelined RISC-V core

This is a small RV32I-subset processor that overlaps the execution of up to
five instructions. Each instruction passes through five stages — instruction
fetch (IF), decode and operand fetch (ID/OF), execute (EX), memory access (MEM)
and write-back (WB) — separated by interstage registers, so that in the ideal
case one instruction completes every clock cycle and *n* instructions take
*k + n − 1 = n + 4* cycles. The interesting part of the design is not the
datapath, which is a textbook single-cycle RISC-V datapath cut into slices,
but the logic that keeps the overlapped execution equivalent to sequential
execution: forwarding, stalling and flushing, collected in one hazard
management unit (HMU).

The design follows the picoRISC-V teaching pipeline, including its signal
names (`RegWriteM`, `ForwardAE`, `FlushE`, `BranchOutcomeM`, ...). Where that
description leaves a detail open (encodings, sizes, reset, program loading),
the choice made here is listed in [Departures and own choices](#departures-and-own-choices).

## Stages and interstage registers

| Stage | Work done | Registered into the next stage (`picorv_pkg`) |
|-------|-----------|-----------------------------------------------|
| IF    | PC addresses the instruction memory; PC+4 | `if_id_t`: instruction, PC, PC+4 |
| ID/OF | control unit, immediate decoder, read rs1/rs2 from the GPR set | `id_ex_t`: control word, RD1, RD2, immediate, PC, PC+4, rs1, rs2, rd |
| EX    | forwarding muxes, ALU and Zero, branch target, branch outcome | `ex_mem_t`: RegWrite, MemToReg, MemWrite, jal/jalr flag, branch outcome and target, ALU result, store data, PC+4, rd |
| MEM   | data memory read or write; jal/jalr replace the ALU result by PC+4 | `mem_wb_t`: RegWrite, MemToReg, ALU result / PC+4, loaded word, rd |
| WB    | `resW` = loaded word or ALU result, written to `rdW` | — |

Control signals travel with their instruction: the control word is decoded once
in ID/OF and each stage keeps only the bits later stages still need. The
destination register number `rd` also travels down to WB, so that the write
happens into the register of the instruction that is in WB, not of the one
being decoded.

Every interstage register is one `pipe_reg` instance with two control inputs:
`en` (low = hold, used to stall) and `clr` (load the cleared value at the next
edge, i.e. turn the stage into a bubble, used to flush). A cleared register
holds an all-zero control word, which writes nothing, stores nothing and does
not branch. The PC register is a `pipe_reg` as well, with `clr` unused.

## Where beq, jal and jalr change the PC: `BRANCH_IN_MEM`

A taken branch is known only once the ALU has compared the two registers in
EX, and by then the pipeline has already fetched the instructions behind it.
Two placements of the PC update are built, selected by the top-level parameter
`BRANCH_IN_MEM`:

| `BRANCH_IN_MEM` | PC loaded from | Flushed on a taken transfer | Bubbles |
|---|---|---|---|
| `1` (default) | `BranchTargetM` when `BranchOutcomeM` | IF/ID, ID/EX and EX/MEM (`FlushD`, `FlushE`, `FlushM`) | 3 |
| `0` | `BranchTargetE` when `BranchOutcomeE` | IF/ID and ID/EX (`FlushD`, `FlushE`) | 2 |

The branch outcome is `BranchBeq & Zero | BranchJal | BranchJalr`, and the
target is PC + immediate for beq and jal, and the ALU result rs1 + immediate
for jalr. The default registers both in EX/MEM and acts one stage later. That
costs one extra bubble per taken transfer. In exchange, the EX stage no longer
contains ALU → Zero → branch gates → HMU → PC mux and interstage clears in
series. This is the longest path of the core: with the delay budget the
design was sized for (0.3 ns clock-to-q, 0.1 ns per mux and gate, 2 ns ALU,
0.2 ns HMU, 0.1 ns setup), the EX stage drops from 3.0 ns to 2.7 ns, which sets
the clock period once the memories are fast caches. Only branch prediction
would remove the bubbles, and there is none here.

## The hazard management unit (`hmu`)

The HMU is purely combinational. It looks at register numbers in ID/OF, EX, MEM
and WB and drives the forwarding selects and the `en`/`clr` inputs of the
interstage registers.

### Forwarding (read-after-write without delay)

An ALU-type result exists on a pipeline wire one cycle after it is computed.
When it is needed by the next or the next-but-one instruction, the data are
taken from that wire, and the stale register value is not used. For each
source operand in EX:

```
if (RegWriteM && rdM != x0 && rdM == rsE)  select ALUOutM   (10)
elif (RegWriteW && rdW != x0 && rdW == rsE) select resW     (01)
else                                        select register (00)
```

MEM is checked first because it holds the younger of two writes to the same
register. The MEM value is taken after the mux that substitutes PC+4 for
jal/jalr. The forwarded value for operand B is also the store data of `sw`,
because the mux sits before the `ALUSrc` immediate mux. A result three
instructions back needs no forwarding: the GPR set writes in WB and reads in
ID/OF in the same cycle (see below).

### Load-use stall

A `lw` result is available only at the end of MEM, too late to forward into
an instruction that is in EX at the same time. The HMU therefore detects the
case one stage earlier: `lw` in EX (`MemToRegE`) and the instruction in ID/OF
reading `rdE`. For one cycle it then

* holds the PC and the IF/ID register (`StallF`, `StallD`), and
* clears ID/EX (`FlushE`), so that a bubble enters EX behind the `lw`.

One cycle later the load is in WB and its value is forwarded from `resW`. Each
such pair costs exactly one cycle:

```
cycle        1    2    3    4    5    6    7
lw x4,8(x0)  IF   ID   EX   MEM  WB
and x5,x8,x4      IF   ID   ID   EX   MEM  WB      (x4 forwarded from WB)
or  x2,x6,x7           IF   IF   ID   EX   MEM ...
```

Only registers the ID/OF instruction actually reads count, so `jal`, whose
bits 19:15 are immediate bits, never stalls by accident.

### Flushes after a taken transfer

When the branch outcome is true, the HMU clears the registers that hold younger,
wrongly fetched instructions, as in the table above. A flush overrides a
simultaneous load-use stall. The instruction that would stall is itself on the
wrong path, and the PC must be free to take the branch target.

Three concurrent assertions in `picorv_pipe` state these rules: a stage is
never stalled and flushed at once, the PC holds while IF is stalled, and an
inserted bubble writes neither a register nor memory. Simulators with assertion
support (`verilator --assert`) check them in every test.

## GPR set: write in WB, read in ID/OF in the same cycle

The register set has two asynchronous read ports and one write port. The
pipeline depends on a register written by WB being readable by ID/OF in the
same cycle (the usual "write in the first half, read in the second half").
The RTL uses a single clock edge and gets the same effect with a bypass. A read
of the register being written returns the write data. x0 always reads zero.

## Instruction set

`add sub and or slt addi lw sw beq jal jalr`, in standard RV32I encodings. Any
other encoding decodes to a bubble. Memory accesses are whole words. The
`ALUControl` encoding (`add 000, sub 001, and 010, or 011, slt 101`) and the
`immControl` encoding (I, S, B, J) are defined in `rtl/picorv_pkg.sv`.

## Top-level interface (`picorv_pipe`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; all state changes at the rising edge |
| `rst_n` | in | 1 | asynchronous, active low; clears PC, GPRs and all interstage registers |
| `imem_we`, `imem_addr`, `imem_wdata` | in | 1, 32, 32 | writes one instruction word (byte address) per cycle |
| `pc_f` | out | 32 | PC in IF |
| `reg_write_w`, `rd_w`, `res_w` | out | 1, 5, 32 | the GPR write port, i.e. each retiring result |

Parameters: `IMEM_WORDS` and `DMEM_WORDS` (1024 each) and `BRANCH_IN_MEM` (1).
To run a program, hold `rst_n` low, write the program through the load port
from address 0, then release `rst_n`. The core starts fetching at address 0.
There is no halt instruction. A program can end in `jal x0, 0`.

The memories read asynchronously (an instruction or a loaded word is available
in the cycle its address is presented) and write at the clock edge. They stand
in for the instruction and data caches of a real implementation and behave like
caches that always hit.

## Timing

With no hazards, instruction *i* is fetched in cycle *i* and retires in cycle
*i + 4*. Hazards add delays:

* each load-use pair delays everything after the `lw` by 1 cycle;
* each taken beq/jal/jalr delays everything after it by 3 cycles (2 with
  `BRANCH_IN_MEM = 0`);
* forwarding and untaken branches cost nothing.

The end-to-end testbenches predict the retire cycle of the last instruction
from these rules and the executed instruction stream, and check it to the
cycle.

## Departures and own choices

* **Forwarding qualifier.** The HMU forwards whenever a register number
  matches. It does not also check that the EX instruction is an ALU operation.
  Forwarding into an operand the instruction does not use is harmless.
* **Stall qualifier.** "The ID/OF instruction is an ALU operation" is
  implemented as two register-use flags from the control unit (`use_rs1`,
  `use_rs2`).
* **Forwarding mux inputs.** The numbering `00`/`01`/`10` is kept. Which of
  `resW` and `ALUOutM` is `01` and which is `10` is this design's choice.
* **x0.** It is never forwarded and never causes a stall.
* **Half-cycle register file.** It is replaced by a same-edge bypass, with the
  same behaviour (see above).
* **jalr.** The target is taken directly from the ALU, so bit 0 is not cleared.
* **Reset and loading.** The reset behaviour and the instruction-memory load
  port are additions.
* **Memory sizes.** They are free parameters.
* **Caches and branch prediction.** Neither is implemented. The caches are
  represented by the single-cycle memories.
* **Unified memory.** A single memory shared by IF and MEM would need an IF
  stall on every data access, a structural hazard. The design avoids it with
  separate instruction and data memories, and no unified-memory variant is
  provided.

## Files

| File | Contents |
|------|----------|
| `rtl/picorv_pkg.sv` | shared types: control word, interstage register structs, ALU/immediate/forward encodings |
| `rtl/picorv_pipe.sv` | the core, top level |
| `rtl/hmu.sv` | hazard management unit |
| `rtl/pipe_reg.sv` | interstage register with `en` and `clr` |
| `rtl/control_unit.sv`, `rtl/imm_decode.sv`, `rtl/alu.sv`, `rtl/gpr_set.sv` | ID/OF and EX units |
| `rtl/instr_memory.sv`, `rtl/data_memory.sv` | memories |
| `tb/tb_rv_pkg.sv` | assembler, random program generator, instruction-level reference model |
| `tb/tb_picorv_pipe.sv` | end-to-end test, default parameters |
| `tb/tb_picorv_pipe_ex.sv` | end-to-end test with `BRANCH_IN_MEM = 0` |
| `tb/tb_<unit>.sv` | one self-checking test per unit |

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/picorv_pkg.sv tb/tb_rv_pkg.sv tb/tb_picorv_pipe.sv \
  --top-module tb_picorv_pipe -Mdir obj_top -o sim
./obj_top/sim
```

Replace the testbench name for the others (for example `tb/tb_hmu.sv` with
`--top-module tb_hmu`). Files that do not use `tb_rv_pkg` do not need it on the
command line.

The end-to-end tests run each program both on the core and on an
instruction-level reference model. They run:

* a hazard-free straight line of 20 instructions, which must take 24 cycles;
* a short program exercising forwarding from MEM and WB, a load-use stall and
  a taken `beq`;
* a five-instruction walk-through;
* a `jal`/`jalr` program;
* 40 random programs of 300 instructions, drawn from seven registers so that
  dependencies are dense, with forward-only branches and jumps.

For each program the tests compare:

* every register write, in order, with its value;
* the final registers and data memory;
* the number of PC redirections;
* the exact retire cycle of the final instruction.

They also count each pipeline mechanism: forwarding from MEM and from WB,
load-use stall, FlushM, same-cycle GPR write/read, taken and untaken `beq`,
`jal`, `jalr`, `lw` and `sw`. A test fails if any of them never occurs.

The unit testbenches compare each block against an independent model over
random and corner-case stimulus.
