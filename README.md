# MIPS fetch/decode front end with a delay-ordered next-address unit

This is the instruction-fetch (IFC) and decode (DEC) part of a classic five-stage
MIPS pipeline. Its central piece is the logic that computes the address of the next
instruction. In a pipeline that resolves branches in DEC, that logic sits on the
critical path. It has to read the operands, compare them, add the branch offset and
pick one of nine candidate addresses, all within one clock cycle. Two ideas shorten
that path:

* **Add and compare in parallel.** `PC + 4` and `PC + offset*4` come from two
  separate adders. Neither adder has a multiplexer in front of it. The additions
  overlap the register read and the compare, so the only logic after the slow
  compare is the final address multiplexer.
* **Order the multiplexer tree by arrival time, not by priority.** Candidates that
  are ready early (constants, system registers, the jump address, `PC + 4`) are
  merged far from the output. The late ones sit next to the output: the branch
  target, the register value used by `jr`, and above all the comparator result.
  The six branch conditions are reduced to two comparator outputs, `Rs = Rt` and
  `Rs < 0`. The complemented conditions are handled by swapping multiplexer
  inputs, so no inverted comparator output is needed.

## Pipeline timing

```
          IFC                         DEC                       EXE
   PC ──► M (instruction memory) ──► I ──► decode, read Rs/Rt ──► Soper, Toper
   ▲                                        compare, +4, +I*4
   └──────────────── NextPc ◄────────────── next-address mux tree
```

* One PC register holds the address being fetched. It addresses the memory, and
  the adders use it too.
* While instruction *i* is in DEC, instruction *i+1* (its delay slot) is being
  fetched. So the adders compute from the delay-slot address:
  `SeqA = PC + 4` and `BraA = PC + sext(imm16)*4`.
* `NextPc` is loaded into the PC register at the end of DEC. A branch or jump
  therefore redirects the fetch straight after its delay slot. There are no stall
  cycles and no bubbles.
* `I` captures the fetched word at the same edge. `Soper` and `Toper` capture the
  Rs and Rt operands for the execute stage.

## The next-address tree

Nine candidate addresses:

| Name | Value |
|------|-------|
| SeqA | `PC + 4` |
| BraA | `PC + sext(imm16) * 4` |
| JmpA | `{PC[31:28], target26, 2'b00}` |
| Rs   | value of register Rs (`jr`) |
| RstA | `0xBFC0_0000`, the reset address |
| BexA | `0xBFC0_0380`, the bootstrap exception vector |
| ExcA | exception address, an input |
| Epc, Eepc | return addresses for `eret`, inputs |

Ten 2:1 multiplexers with selects C0..C9 reduce them to one. A select of 1 picks
the first-named input:

```
m7 = C7 ? Eepc : Epc      m6 = C6 ? m7   : JmpA     m5 = C5 ? m6 : SeqA
m9 = C9 ? BexA : ExcA     m8 = C8 ? RstA : m9       m4 = C4 ? m5 : m8
m3 = C3 ? BraA : Rs
m1 = C1 ? m3 : m4         m2 = C2 ? m4 : m3         NextPc = C0 ? m1 : m2
```

`m4` is the "slow" result: the sequential, jump, return, exception or reset
address. `m3` is the "fast-arriving, late" result: the branch target or `Rs`.
C1 and C2 each choose between `m3` and `m4`, but with their inputs in opposite
order. C0 is the comparator output `Rs = Rt`, the last signal to settle. It only
decides which of the two ready answers to pass on.

### Select equations

| Select | Meaning |
|--------|---------|
| C0 | `Rs = Rt` |
| C3 | instruction is a conditional branch |
| C4 | not XR, where XR = reset or exception request |
| C5 | `J` or `Eret` |
| C6 | `Eret` |
| C7 | Status bit 2 (`Eret` returns through Eepc) |
| C8 | reset |
| C9 | Status bit 22 (exceptions go to BexA) |

C1 and C2 depend on the instruction (`lt` is `Rs < 0`):

| Instruction | C1 | C2 | Taken when |
|---|---|---|---|
| Beq  | 1 | 1 | `Rs = Rt` |
| Bne  | 0 | 0 | `Rs ≠ Rt` |
| Bltz | lt | ~lt | `Rs < 0` |
| Bgez | ~lt | lt | `Rs ≥ 0` |
| Blez | 1 | ~lt | `Rs = 0` or `Rs < 0` |
| Bgtz | 0 | lt | neither |
| Jr   | 1 | 0 | (Rs) |
| J, Eret, other | 0 | 1 | (m4) |
| XR (overrides) | 0 | 1 | (m4) |

`Blez` and `Bgtz` have Rt = 0, and register 0 always reads as zero. So
`Rs = Rt` means `Rs = 0` for them. That is how `Rs ≤ 0` is built from the same
two comparator outputs. For the one-operand branches, C1 and C2 route the same
address whatever C0 is.

Written as logic:

```
C1 = ~XR & (Beq | Jr | Blez | Bltz&lt | Bgez&~lt)
C2 =  XR | Beq | J | Eret | Seq | (Bltz|Blez)&~lt | (Bgez|Bgtz)&lt
```

Priority follows from the tree: reset > exception > instruction.

## Reset, exceptions and Eret

* `reset` is synchronous. While it is high, NextPc is RstA and `I` is loaded with
  a NOP. Release it after at least one clock edge. The first instruction is then
  fetched from `0xBFC0_0000`.
* `exc_req` (from later stages) sends the next fetch to BexA when Status bit 22 is
  set, and to `exc_addr` otherwise. It also replaces the instruction being fetched
  with a NOP.
* `eret` in DEC sends the fetch to `eepc` when Status bit 2 is set, and to `epc`
  otherwise.
* This block does not hold the system-coprocessor registers (Epc, Eepc, exception
  base, Status). It only reads them through ports.

## Modules

| File | Role |
|------|------|
| `rtl/mips_pkg.sv` | constants (RstA, BexA, opcodes), `cflow_e` class enum, `nextpc_sel_t` select struct |
| `rtl/mips_ifc_dec.sv` | **top**: PC, I, Soper, Toper registers; wires everything |
| `rtl/imem.sv` | instruction memory, 1024 words, combinational read, write port for loading |
| `rtl/inst_decode.sv` | MIPS32 decode into Beq/Bne/Bltz/Bgez/Blez/Bgtz/J/Jr/Eret/sequential |
| `rtl/regfile.sv` | 32 x 32 registers, two read ports, one write port, R0 = 0 |
| `rtl/branch_cmp.sv` | `Rs = Rt` and `Rs < 0` |
| `rtl/addr_calc.sv` | SeqA, BraA, JmpA with parallel adders |
| `rtl/nextpc_ctrl.sv` | C0..C9 |
| `rtl/nextpc_mux.sv` | the ten-multiplexer tree, built from `rtl/mux2.sv` |

The top's ports:

* **Inputs:** `clk`, `reset`, `exc_req`, `status`, `epc`, `eepc`, `exc_addr`.
* **Program load port:** `imem_we`, `imem_waddr`, `imem_wdata`.
* **Register write-back port:** `rf_we`, `rf_wa`, `rf_wd`.
* **Observation outputs:** `pc`, `ir`, `nextpc`, `sel`, `soper`, `toper`.

The instruction memory uses only the low address bits, so the program loaded at
`0xBFC0_0000` is the same as word 0.

## What is design choice rather than given

The following parts of the design were chosen to complete it:

* The tree topology, the select equations and the two fixed addresses are given.
* The two-adder arrangement and the reduction to two comparator outputs are given.
* The table of C1/C2 values above was worked out so that every branch follows its
  architectural condition. The tests check this. It differs from a plain reading of
  "C1, C2 = (any one-operand branch) AND (Rs < 0)": a single polarity of `Rs < 0`
  cannot serve both Bltz and Bgez.
* The C8 multiplexer picks RstA when C8 = 1. That follows "C8 = reset", even where
  the input order of a drawing might suggest otherwise.
* These come from the MIPS32 architecture, not from the sources used:
  * the instruction encodings;
  * the JmpA format;
  * the delay-slot timing;
  * the reading of Status bits 2 and 22 as ERL and BEV.
* `jal` and `jalr` are decoded as `J` and `Jr`. Only their next address is handled
  here; the link write belongs to later stages.
* The following were chosen freely:
  * the memory size and the way programs are loaded;
  * the register-file ports;
  * flushing `I` to a NOP on reset and on exceptions;
  * using a single PC register.
* Not covered:
  * forwarding or stalls for operands still in flight (no bypass into the
    comparator);
  * the execute, memory and write-back stages;
  * the system coprocessor.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_nextpc_mux` applies all 1024 select patterns with random addresses.
* `tb_nextpc_ctrl` tries every class, comparator outcome, reset/exception and
  Status combination. It pushes the selects through a model of the tree and checks
  the chosen source against the architectural next address.
* `tb_mips_ifc_dec` runs the top at its default size. The program is a random mix
  of all six branches, `j`, `jal`, `jr`, `jalr`, `eret` and ALU instructions.
  During 40,000 cycles it injects random exceptions, resets, Status values and
  register writes. Every cycle it compares `pc`, `ir`, `nextpc`, `soper` and
  `toper` with an instruction-level reference model that has a one-instruction
  delay slot. The run fails if any mechanism never happens. The mechanisms are:
  each branch taken and not taken, J, Jr, both Eret targets, both exception
  vectors, reset, and sequential fetch.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
          rtl/mips_pkg.sv tb/tb_mips_ifc_dec.sv --top-module tb_mips_ifc_dec
./obj_dir/Vtb_mips_ifc_dec
```

Substitute any other `tb/tb_<module>.sv` to run that module's test. The
testbenches initialise everything they read, so two-state simulation with random
start values works.
