# Three ways to organise a datapath: microcode, pipelining and a k·x⁴ example

This RTL puts side by side the classic teaching machines for the
microarchitecture of a simple RISC instruction set (DLX):

1. **A single-bus, microcoded DLX.** One bus, one ALU and one memory. Each
   instruction runs as a short sequence of register transfers, and a
   fifteen-word control store sequences them. A second copy of the same
   machine uses hardwired control instead of the control store.
2. **A single-cycle DLX.** IP, instruction memory, register file, ALU and
   data memory form one combinational path. Every instruction finishes in
   one (long) clock, with no shared units and no hidden state.
3. **A five-stage pipelined DLX.** The single-cycle datapath is cut into
   stages by registers, so a new instruction can start every clock. Hazards
   are left exposed to software.
4. **Three datapaths that compute y = k·x⁴.** They show the trade-off
   between one multiplier used four times, four multipliers chained in one
   long clock, and four multipliers in a pipeline.

The machines share only clock and reset. `ee282_top` instantiates all of them
and brings out each one's ports under a prefix: `uc_` for the microcoded
machine, `hw_` for its hardwired twin, `sc_` for the single-cycle one, `pp_`
for the pipelined one, and `kxs_`, `kxc_`, `kxp_` for the k·x⁴ units. The
hardwired twin has its own memory but is loaded through the `uc_ld_*` port
together with the microcoded machine, so the two always run the same program.

## Instruction formats

All instructions are 32 bits. The field layouts follow the standard DLX
formats:

| format | fields (MSB first) |
|---|---|
| J | Op[31:26] · Const26[25:0] |
| I | Op[31:26] · RS1[25:21] · RD[20:16] · Const16[15:0] |
| R | Op[31:26] · RS1[25:21] · RS2[20:16] · RD[15:11] · func[10:0] |

In the I format, RD sits where RS2 sits in the R format. Constants are
sign-extended. The numeric opcodes and function codes are those of the
published DLX encoding (`dlx_pkg.sv`). For example, register-register
operations use opcode 0 and select their operation in `func`. The all-zero
word is `ADD R0,R0,R0`, which is a no-op. R0 always reads 0.

## The microcoded single-bus machine (`dlx_ucode`)

### Datapath (`dlx_bus_datapath`)

The datapath has four registers: IP, IR, A and B. They sit around a
register file (two read ports, one write port) and an ALU whose operands are
always A and B. All transfers between units go over one bus, and one of four
drivers owns it in each cycle:

- **EIP** drives IP.
- **EM** drives the memory's data out.
- **EI** drives a sign-extended IR constant, 16 or 26 bits.
- **EA** drives the ALU output.

In hardware the bus is a one-hot multiplexer, and an assertion checks that at
most one driver is enabled.

The memory address is IP or A, selected by MAS. The memory write data is
always B.

A loads either from the register file (RS1) or from the bus. B loads either
from the register file (bits 20:16) or from the bus.

The register file writes the bus into R[RD]. The RD field is bits 15:11 for
the R format and bits 20:16 otherwise.

### Microcode (`dlx_ucode_ctrl`)

The controller has five parts: branch logic, the microinstruction pointer
uIP, a control store, the microinstruction register uIR, and an ALU decoder.
Each control-store word has the following fields:

- a bus source
- the MAS, MW, LIP, LIR and RW bits
- the A and B load sources
- an ALU function
- a next-address rule: go to a fixed address, DECODE (dispatch on the
  opcode), or a two-way branch on Z

| word | transfer | next |
|---|---|---|
| F1 | IR ← M[IP], A ← IP | D1 |
| D1 | IP ← A+4, A ← R[RS1], B ← R[RS2] | DECODE |
| A1 | R[RD] ← A op B (op taken from `func`) | F1 |
| J1, J2, J3 | A ← IP; B ← Const26; IP ← A+B | F1 |
| B1 | A ← IP; branch on Z (A = R[RS1] = 0) | Z=0: F1, Z=1: B2 |
| B2, B3 | B ← Const16; IP ← A+B | F1 |
| L1, L2, L3 | B ← Const16; A ← A+B; R[RD] ← M[A] | F1 |
| S1, S2, S3 | B ← Const16; A ← A+B, B ← R[RD]; M[A] ← B | F1 |

All instruction routines (ALU operations, J, BEQZ, LW, SW) share F1 and D1. The
one A1 routine serves every register-register operation, because the ALU
decoder takes the operation from the instruction's `func` field. This is the
"factored" form of the microcode.

DECODE sends any opcode that has no routine straight back to F1, so it
executes as a no-op. That covers JR, JAL, ADDI, and byte and half-word
accesses. The microcoded machine therefore always writes whole words.

**Timing.** Each microinstruction takes one clock. The control store is read
with the next address that the branch logic chooses. uIP and uIR load
together, so uIR always holds the word at uIP. The number of clocks per
instruction follows from that:

- ALU operation: 3
- BEQZ not taken: 3
- BEQZ taken: 5
- J: 5
- LW: 5
- SW: 5

Jump and branch targets are relative: IP + 4 + constant.

**Interface.**

- Load the memory through `ld_we/ld_addr/ld_data` while `rst` is high.
- Execution starts at address 0 when `rst` falls.
- `fetch` pulses once per instruction, in the F1 clock.
- `uip` and `bus` show the current microinstruction and the bus value.

### Hardwired control (`dlx_hw_ctrl`)

Microcode and hardwired control are two ends of one range. `dlx_hw_ctrl`
implements the same sequences without a control store:

- a state register holds the current step (F1 … S3);
- each control point is an OR of the states in which the microcode table
  sets it;
- the next state is decoded from the state, the opcode and Z.

It has the same ports and the same timing as `dlx_ucode_ctrl`, so clock
counts per instruction are identical. Set the `dlx_ucode` parameter
`HARDWIRED` to 1 to use it; the default is the microcoded controller.

## The single-cycle machine (`dlx_single`)

In one clock, the instruction at IP is read from I-Mem and its fields
address the register file. The ALU then adds or combines R[RS1] with R[RS2]
(R format) or with the sign-extended 16-bit constant. D-Mem is read or
written at the ALU result. At the clock edge, the result (load data, ALU
result, or IP+4 for JAL) is written into R[RD], and IP loads its next value:

- IP+4 by default;
- IP+4+constant for J, JAL and a taken BEQZ or BNEZ;
- R[RS1] for JR.

Because every instruction completes before the next one starts, there are
no hazards and no delay slots. The clock period must, however, cover the
whole path. The instruction set, encodings and byte lanes are those of the
pipelined machine below. `retire` is high in every clock after reset.

## The pipelined machine (`dlx_pipe`)

| stage | work | registers at its end |
|---|---|---|
| IP | choose the next IP: IP+4, or a jump target from X | IP |
| F | read I-Mem | IR, NPC (= IP+4) |
| R | read the register file | A, B, IR, NPC |
| X | ALU on A and B (R type) or A and Const16 | C, D (store data), IR |
| M | D-Mem access; choose load data or C | D, IR |
| W | write D into R[RD] (R31 for JAL) | – |

Every value that moves forward is latched at every boundary, including a
copy of the instruction register for each stage. Each stage decodes only its
own IR copy.

In steady state the pipeline completes one instruction per clock. The n-th
instruction writes its register in clock n+4, where clock 0 is the fetch of
address 0.

Supported instructions:

- ADD, SUB, AND, OR and XOR
- ADDI
- LW, LH, LHU, LB and LBU
- SW, SH and SB
- J and JAL (relative to IP+4)
- JR (to register A)
- BEQZ and BNEZ

Other opcodes execute as no-ops.

Memory is big-endian: the byte at offset 0 of a word is bits 31:24. Loads
pick the byte or half-word lane in M and sign-extend it (LB, LH) or
zero-extend it (LBU, LHU). Stores drive the memory's byte enables.
Misaligned addresses are not trapped: the low address bits below the access
size are ignored.

### Hazards are the programmer's problem

The pipeline has no interlock, no squash and no bypass. Software must
respect two rules.

**Data (RAW).** The register file writes at the end of W and reads,
combinationally, in R. A write does not show through to a read in the same
clock.

- A consumer sees its producer's result only if at least three instructions
  lie between them.
- A closer consumer reads the old value. For example, in
  `ADD R1,R2,R3 ; ADD R4,R1,R5` the second ADD gets the R1 from before the
  first one.
- SW followed directly by LW to the same address works, because both
  access memory in M, in program order.

**Control.** Jumps and branches resolve in X, and IP loads the target at the
end of that clock.

- The two instructions after a jump or taken branch are already fetched and
  always execute: there are two delay slots.
- Fill the slots with useful instructions or with the zero word.

### Interface

- Load `imem_ld_*` and `dmem_ld_*` while `rst` is high.
- `ip` is the fetch address.
- `wb_en/wb_rd/wb_data` show each register write.
- `redirect` marks a clock in which X resolves a jump or a taken branch.

## The k·x⁴ datapaths

All three datapaths compute y = k·x⁴ mod 2^W, with `W` = 32 by default. The
value `k` is an input port.

| module | structure | latency | throughput |
|---|---|---|---|
| `kx4_seq` | 1 multiplier; operand is k, then the product register; a small FSM | y at the 5th edge after x is accepted | 1 per 4 clocks (`in_ready` holds off input) |
| `kx4_comb` | 4 multipliers chained between input and output registers | 1 clock, but the clock must cover 4 multiplies | 1 per clock |
| `kx4_pipe` | 4 multipliers, each followed by a product register plus the x copies still needed (3, 2, 1) | 4 clocks after the input register | 1 per clock |

`kx4_seq` uses a valid/ready handshake. The other two use a valid bit that
travels with the data.

## Shared building blocks

- **`dlx_regfile`**: 32×32 register file. R0 is hard-wired to 0.
  Reads are combinational, the write happens at the clock edge, and there
  is no write-through. Reset clears all registers.
- **`dlx_alu`**: supports ADD, SUB, AND, OR, XOR and A+4. It also outputs
  Z = (A == 0).
- **`dlx_mem`**: word memory with byte addresses. Reads return the whole
  word and are combinational. Writes happen at the clock edge and update
  only the bytes selected by `be[3:0]` (`be[3]` is bits 31:24). It has a
  host load port, which wins over the core's write. It serves as the
  single memory of the microcoded machine and as I-Mem and D-Mem of the
  single-cycle and pipelined machines. The size is set by `WORDS` (default 1024).
- **`dlx_pkg`**: types, opcodes, field extractors, the microinstruction
  format, the load/store lane and destination-register functions shared by
  the single-cycle and pipelined machines, and instruction encoders
  (`enc_r`, `enc_i`, `enc_j`). The encoders are handy for writing programs
  in a testbench.

## What is this design's own choice

The structures above (the bus and its drivers, the microcode table, the
stage cuts, the k·x⁴ organisations) are the textbook ones. The following
points are choices made in this RTL where that description leaves room:

- **Control store read.** The controller reads the control store with the
  next address, so that uIR holds the current word. A literal
  uIP → store → uIR register chain would decode one clock before IR is
  loaded.
- **Z(F1,B2).** This next-address rule is read as "Z = 0 → F1, Z = 1 → B2".
- **S2 reloads B.** In S2, B is reloaded from R[RD], which supplies the
  store data; the store sequence requires this.
- **Bus default.** The bus reads 0 when no driver is enabled.
- **Where jumps resolve.** Pipeline jumps resolve in X, which gives the two
  delay slots. The target is built from the jump's own IP+4.
- **Instruction set beyond the microcode.** ADDI, JAL (link in R31), JR,
  BNEZ, the unsigned loads and the numeric encodings come from the
  published DLX definition. The single-cycle and pipelined machines
  implement them.
- **Byte order.** Memory is big-endian. Misaligned accesses are not trapped.
- **Sizes.** Memory sizes, operand widths, the handshakes and the reset
  values are all choices.
- **Not implemented.**
  - Byte and half-word loads and stores in the microcoded machine.
  - Microcode for JR, JAL and ADDI.
  - Any hazard handling (stall, squash, bypass).

## How far it is tested

Every block has a testbench that compares its outputs with values computed
independently, and every testbench has been seen to fail on a deliberately
broken copy of its block. All files pass Verilator lint and a Yosys (slang)
elaboration with no latch, loop or multiple-driver warnings.

Each DLX testbench also runs random programs against an
instruction-by-instruction model kept in the testbench:

- **Single-bus machines:** 30 programs of ALU operations, LW, SW, forward J
  and BEQZ, and opcodes without microcode. The microcoded and hardwired
  versions run side by side. The model predicts every fetch address and the
  clocks of every instruction; registers and memory are compared at the end.
- **Single-cycle machine:** 24 programs that also use ADDI, every load and
  store width, BNEZ and JAL. The model predicts every fetch address, every
  register write and the final data memory.
- **Pipelined machine:** the same kinds of programs. The model also
  includes the two delay slots, and the rule that a result is seen only
  from the fourth instruction after its producer.

The single-bus datapath is also driven directly with random control words,
with at most one bus driver each. A register-level model checks the bus,
the memory port, Z and IP in every clock.

In the pipelined programs, jumps are kept out of other jumps' delay slots.
JR is not part of the random mix; the directed programs cover it.

The controller testbenches also rebuild the reservation tables of ADD and J
(which of bus, memory and ALU each step uses) from the control points:

| ADD | F1 | D1 | A1 |
|-----|----|----|----|
| bus | X  | X  | X  |
| mem | X  |    |    |
| ALU |    | X  | X  |

| J   | F1 | D1 | J1 | J2 | J3 |
|-----|----|----|----|----|----|
| bus | X  | X  | X  | X  | X  |
| mem | X  |    |    |    |    |
| ALU |    | X  |    |    | X  |

The bus is busy in every step, which is why the single-bus machine cannot
overlap instructions.

Not covered by any test:

- timing closure or clock frequency;
- misaligned addresses;
- opcodes outside the lists above, which are expected to act as no-ops;
- programs longer than a few dozen instructions.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. `tb_ee282_top` runs all machines at their
default sizes. It checks:

- the results and clock counts of the three DLX programs; the single-cycle
  and pipelined machines run the same program, so the hazards show as
  differences between them;
- every k·x⁴ result;
- that the hardwired machine fetches the same addresses, takes the same
  clocks and leaves the same results as the microcoded one;
- that each mechanism actually happened: every microcode routine (in both
  single-bus machines), RAW stale
  reads, delay slots, redirects, the sequential unit holding off input, and
  back-to-back pipelined results.

To simulate the top:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dlx_pkg.sv \
  rtl/dlx_regfile.sv rtl/dlx_alu.sv rtl/dlx_mem.sv rtl/dlx_bus_datapath.sv \
  rtl/dlx_ucode_ctrl.sv rtl/dlx_hw_ctrl.sv rtl/dlx_ucode.sv rtl/dlx_single.sv rtl/dlx_pipe.sv rtl/kx4_seq.sv \
  rtl/kx4_comb.sv rtl/kx4_pipe.sv rtl/ee282_top.sv tb/tb_ee282_top.sv \
  --top-module tb_ee282_top -o sim && ./obj_dir/sim
```

For a single block, list `dlx_pkg.sv`, the block and what it instantiates,
and its testbench. Some testbenches read internal registers by hierarchical
name, for example `dut.u_rf.regs[3]`.

To write a program, use the encoders in `dlx_pkg`, for example
`enc_i(OP_LW, rd, rs1, offset)`. Load the program through the `ld` ports
while `rst` is high, then release reset.
