# Dual-issue pipelined MIPS processor

This is a 32-bit MIPS processor that issues two instructions per clock.
It is the classic five-stage pipeline (fetch, decode, execute, memory,
write-back) built twice, side by side. The two copies, called *lanes*,
share one program counter, one register file and one data memory. Each
cycle, fetch reads an aligned pair of instructions. The word at the PC
goes down lane 1 and the next word goes down lane 2. A hazard unit
forwards results within each lane and between the two lanes, and stalls
the pipeline when forwarding cannot help. At best the machine retires two
instructions per cycle.

The supported instructions are `add`, `sub`, `and`, `or`, `slt`, `addi`,
`lw`, `sw`, `beq` and `j`. The ALU can also shift left, multiply and
divide, but the decoder never selects those operations.

## The instruction pair

Everything here follows from the fact that both lanes are fed from a
single PC.

* **Pairs start at even word addresses.** The PC advances by 8. Lane 1
  always runs the even word of a pair and lane 2 the odd word.
* **Only lane 1 changes the flow of control.** A `beq` or `j` in lane 1 is
  resolved in decode. The target is the branch's own PC+4 plus the offset
  shifted left by 2, or the jump field. A `beq` or `j` in lane 2 is decoded
  but ignored: the PC never uses lane 2's branch decision.
* **The partner of a branch always executes.** When lane 1 decodes a
  branch, its lane-2 partner is already in decode beside it and carries on.
  Architecturally it is a one-instruction branch delay slot. The pair
  fetched behind a taken branch or jump is squashed: both F/D registers are
  loaded with zero, which is a NOP.
* **The two instructions of a pair must be independent.** Lane 2 cannot use
  a result that lane 1 of the same pair produces; nothing checks for this.
  If both instructions of a pair write the same register, lane 2's value
  wins, both in the register file and in forwarding.

As a result, a taken branch or jump costs one cycle: the squashed pair.

## Pipeline organisation

```
        +-------- next_pc (PC, PC+8, branch/jump target) --------+
        |                                                        |
 instr_mem ──{w[a], w[a+1]}──► F/D₁ ─► decode₁ ─► D/E₁ ─► ALU₁ ─► E/M₁ ─► M/W₁ ─┐
                          └──► F/D₂ ─► decode₂ ─► D/E₂ ─► ALU₂ ─► E/M₂ ─► M/W₂ ─┤
                                 ▲          regfile (4 read, 2 write) ◄──────────┘
                              hazard_unit: stall / flush / forward selects
```

| Stage | Per lane | Shared |
|---|---|---|
| F | — | `next_pc`, `instr_mem` (two words per read) |
| D | `pipe_reg_fd`, `controller`, `branch_compare`, sign extension | `regfile` reads (rs₁, rs₂, rt₁, rt₂), `hazard_unit` |
| E | `pipe_reg_de`, two `fwd_mux5`, ALUSrc mux, RegDst mux, `alu` | — |
| M | `pipe_reg_em` | `data_mem`: two combinational reads, two writes at the rising edge |
| W | `pipe_reg_mw`, result mux | `regfile` writes |

The register file writes on the **falling** edge, and its reads are
combinational. So an instruction in decode sees a value written back in the
same cycle, with no extra bypass path.

## Hazard handling

### Execute-stage forwarding

Each ALU operand passes through a five-way multiplexer (`fwd_mux5`). Its
select codes are:

| Code | Source |
|---|---|
| 000 | value read from the register file in decode |
| 001 | own lane, write-back result |
| 010 | own lane, M-stage ALU result |
| 011 | other lane, write-back result |
| 100 | other lane, M-stage ALU result |

Several producers can hold the same register. The hazard unit then picks
the youngest one, in this order:

1. lane 2 in M
2. lane 1 in M
3. lane 2 in W
4. lane 1 in W

Register `$0` is never forwarded. M-stage forwarding passes the *ALU
result*, so a load's data can only be forwarded from W.

### Decode-stage branch forwarding

`beq` compares its operands in decode. Either operand can be replaced by
the same lane's M-stage ALU result (`forwardad`/`forwardbd`).

### Stalls

The hazard unit stalls in two cases, checking each lane against its own
older instructions:

* **Load-use:** a decode-stage source register equals the `rt` of a load
  in the same lane's E stage.
* **Branch:** a decode-stage `beq` needs a register that is about to be
  written. Either the same lane's E stage will write it, or a load in the
  same lane's M stage will.

A stall in either lane holds the PC and both F/D registers. It also turns
both D/E registers into bubbles. The pair therefore stays together.

### What software must avoid

Hazard detection is per lane. The hardware does not detect the following,
so code must be scheduled to avoid them:

1. A dependency inside a pair: lane 2 reading lane 1's destination
   register, or lane 2 loading a word that lane 1 stores. Both lanes
   reach M together, and the load sees the memory before the store.
2. A load in one lane whose result is read by the *other* lane in the very
   next pair. Leave one pair in between; the value is then forwarded from
   W.
3. A lane-1 `beq` operand produced by lane 2 one or two pairs earlier. At
   that point the producer is in E or M, and neither the stall nor the
   decode forward looks at the other lane. Three pairs or more is safe,
   because the value is then in the register file. Lane-1 producers are
   always handled.
4. `beq` or `j` in lane 2.

The default program in `rtl/program.hex` breaks rule 3 once. Its first
`beq $s0,$t2` reads `$t2` while the `sub` that produced it is still in
lane 2's M stage. The branch compares against the old `$t2`. It falls
through correctly as long as that old value is not 2.

## Where this implementation makes its own choices

The source design gives the structure, the control table, the ALU and
the hazard equations. This RTL departs from it in these places:

* **Stalls hold the whole pair.** The source equations stall and flush the
  lanes separately. With one shared PC, a stall in one lane would then
  execute an instruction of the other lane twice. Here any stall holds
  both lanes. With the lane-separate equations, the random-program test
  finds wrong results.
* **Forwarding priority follows program age.** In the source, a lane
  prefers its own M, then its own W, then the other lane's M, then the
  other lane's W. That can pick an older own-lane value over a newer one
  from the other lane. The random-program test also fails with that
  order. The select codes are unchanged.
* **The branch stall is gated by `Branch` in both terms.** The printed
  equation lets operator precedence drop `Branch` from the load term.
* **Unknown instructions are harmless.** An unknown opcode decodes to all
  zeros: no register write and no memory write. An unknown R-type funct
  decodes to add, so the all-zero NOP writes `$0+$0` to `$0`.
* **Reset of the F/D register always acts.** In the source it is gated by
  the stall enable. The PC resets asynchronously and the pipeline
  registers reset synchronously, as in the source. Lint reports this mix.
* **Register file and data memory are not reset.** Programs write before
  they read.
* **Memory addressing:** the data memory uses address bits [7:2] (64
  words). The instruction memory reads words `a` and `a+1`, wrapping within
  64 words.
* **ALU details:** ALU code 111 and division by zero return 0.
* **Not built:** a three-input multiplexer meant for a future `lui`, a
  plain reset flip-flop and a less-than-or-equal-to-zero ALU flag, since
  nothing in the datapath uses them.
* **Unused paths:** the ALU's zero flag and lane 2's branch outcome are
  left unconnected.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `mips_dual_top` | `IMEM_FILE` | `"rtl/program.hex"` | hex image loaded into the instruction memory (path relative to the simulator's working directory) |
| `instr_mem` | `DEPTH`, `INIT_FILE` | 64, `"rtl/program.hex"` | instruction words; image file |
| `data_mem` | `DEPTH` | 64 | data words |
| `regfile` | `NREGS` | 32 | registers |
| `fwd_mux5` | `WIDTH` | 32 | operand width |
| `next_pc` | `RESET_PC` | 0 | PC after reset |

Types and encodings (opcodes, funct codes, ALU control, forwarding
selects, the per-stage pipeline-register structs) live in
`rtl/mips_pkg.sv`.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. Run the
testbenches from the directory that holds `rtl/` and `tb/`, because the
memory images are opened by relative path. For example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mips_pkg.sv tb/mips_iss_pkg.sv tb/tb_mips_dual_top.sv \
  --top-module tb_mips_dual_top --Mdir obj_top -o sim
./obj_top/sim
```

* `tb_mips_dual_top_full` runs the processor with all defaults on the
  default program. It checks:
  * the final `$t0..$t3` and `$s0`;
  * one taken branch and two jumps;
  * the final write-back in cycle 16 after reset.
* `tb_mips_dual_top` runs `tb/prog_hazards.hex`. This program is
  scheduled to trigger every mechanism:
  * all four forwarding sources;
  * both decode forwards;
  * load-use stalls in both lanes at once;
  * branch stalls after an ALU producer and after a load;
  * taken and not-taken branches;
  * a jump;
  * dual loads and dual stores, including two stores to one word.

  It counts each mechanism and fails if one never occurs.
* `tb_mips_dual_core` and `tb_datapath` run the same program with the
  memories, and for the datapath the decoder too, modelled in the
  testbench.
* `tb_mips_dual_random` generates 40 random programs that obey the
  scheduling rules. They use a small set of registers and data words, so
  hazards are frequent. Each program runs from reset on the core.
* Each of these compares the final state with `mips_iss_pkg`, an
  instruction-by-instruction reference model that follows the pair rules
  above.
* The other testbenches test one module each, against a model or a table
  written in the testbench.

To run your own program, assemble it into one 32-bit hex word per line.
Put branches and jumps in even word slots, and respect the scheduling
rules above. Then pass the file as `IMEM_FILE`.
