# In-order dual-issue TinyRV1 processor

A scalar pipeline finishes at most one instruction per cycle, so its CPI
can never drop below 1. This design is a small superscalar processor. It
fetches two instructions per cycle, decodes both, and sends both down two
separate execution pipes when they are independent. The best case is
two instructions per cycle (CPI 0.5). Everything stays in program order.
The extra cost is duplicated hardware: a two-wide fetch, two decoders,
a register file with four read and two write ports, a second execution
pipe, and issue logic that decides whether a pair can leave decode
together.

The instruction set is TinyRV1, an eight-instruction subset of RV32IM:
`add`, `addi`, `mul`, `lw`, `sw`, `jal`, `jr` and `bne`. It uses the
standard RISC-V encodings. `jr rs1` is `jalr x0, rs1, 0`.

## Pipeline

```
          +--> A0 --> A1 --+
F --> D --+                +--> W
          +--> B0 --> B1 --+
```

| stage | work |
|-------|------|
| F  | The PC reads one aligned *fetch block* (two instructions) from the instruction memory. |
| D  | Two decoders, four register reads with full bypassing, issue logic. `jal`/`jr` redirect fetch here. |
| A0 | A pipe ALU: `add`, `addi`, `mul`, link value of `jal`/`jr`, `bne` compare. Taken branches redirect fetch here. |
| A1 | Carries the A result to W. |
| B0 | B pipe ALU: `add`, `addi`, link value of `jal`/`jr`, address of `lw`/`sw`. |
| B1 | Data memory access. |
| W  | Two register write ports: one for A, one for B. |

Both memories answer in the same cycle (they are modelled as ideal,
combinational memories, with no cache tags or misses). An instruction
that leaves D in cycle *d* reaches W in cycle *d*+3. After reset, the
first instruction reaches W in cycle 4; cycle 0 is the first fetch.

### Which pipe can run what

| | add | addi | mul | lw | sw | jal | jr | bne |
|---|---|---|---|---|---|---|---|---|
| A pipe | yes | yes | yes | | | yes | yes | yes |
| B pipe | yes | yes | | yes | yes | yes | yes | |

Only the A pipe has the multiplier and the branch comparator. Only the B
pipe reaches the data memory.

## Issue: getting two instructions out of D

D holds one fetch block. Slot 0 is the older instruction and slot 1 the
younger. Issue is in order:

1. The oldest valid instruction, *first*, issues if its operands are
   available.
2. The younger one, *second*, issues in the same cycle only if all of
   these hold:
   - *first* is not a jump. A `jal`/`jr` in slot 0 redirects fetch, and
     slot 1 is then dropped.
   - The two instructions can run in different pipes. Two `mul`s, or a
     `lw` and a `sw`, cannot: this is the **structural hazard**.
   - *second* does not read the register that *first* writes (**RAW
     inside the block**).
   - The two do not write the same register (**WAW inside the block**).
     Splitting the pair keeps the younger write last.
   - *second*'s own operands are available.
3. If *second* cannot issue, it stays in D and issues alone in a later
   cycle. Fetch waits until D is empty.

**WAR cannot happen.** Every operand is read in D, and every write
happens later, in W.

**Steering ("swizzle").** A pair normally goes slot 0 to A and slot 1 to
B. It swaps when that placement is impossible, for example `addi` + `mul`
or `lw` + `addi`. A `jal`/`jr` in slot 1 also moves to A whenever its
partner can use B. An instruction issued alone goes to A if it can run
there, and otherwise to B. These rules reproduce the pipe assignment of
the classic aligned-fetch example (see `tb/tinyrv1_dual_issue_tb.sv`,
program 6).

## Data hazards and bypassing

Each of the four read ports compares its register with the destination
of every in-flight instruction. The sources are A0 and B0 (ALU outputs),
A1 and B1 (where B1 carries a load's memory data), then W-A and W-B. The
youngest match wins. No stage pair ever holds two writes to the same
register, because the WAW rule splits such pairs.

There is one exception to bypassing. A `lw` in B0 has not read memory
yet. An instruction in D that needs its value stalls for one cycle, then
takes the value from B1. There is no other data stall.

## Control flow

- **Jumps** (`jal`, `jr`) resolve in D.
  - `jal` jumps to pc + imm.
  - `jr` jumps to the bypassed value of `rs1`, so it waits in D, like any
    other reader, until that value can be forwarded.
  - The block fetched in the same cycle is discarded, so a jump costs one
    fetch cycle.
- **Branches** (`bne`) are predicted not taken and resolve in A0. A taken
  branch:
  - redirects fetch;
  - discards both F and D;
  - kills the instruction in B0 if that instruction issued together with
    the branch and is younger. The older partner of a branch in slot 1
    is kept.

  A taken branch costs two cycles.
- **Aligned fetch blocks.** Fetch always reads an 8-byte-aligned pair.
  When a jump or branch lands on the second word of a pair, the first
  word is fetched but marked invalid. Such a block delivers only one
  instruction. Aligned pairs never cross a four-instruction (16-byte)
  cache line, which keeps fetch simple. This design does not build the
  alternative: fetching an unaligned pair that starts exactly at the
  target.

## Files

| file | content |
|------|---------|
| `rtl/tinyrv1_pkg.sv` | types: opcodes, decoded instruction, issue and result records, event vector, pipe capability table |
| `rtl/tinyrv1_dual_issue.sv` | top: the pipeline registers, with the blocks below wired into F/D/A/B/W |
| `rtl/tinyrv1_fetch_unit.sv` | PC, aligned fetch address, slot mask, redirect priority |
| `rtl/tinyrv1_imem.sv` | instruction memory, returns a fetch block, load port |
| `rtl/tinyrv1_decoder.sv` | one decoder (instantiated twice) |
| `rtl/tinyrv1_regfile_4r2w.sv` | 32 x 32 register file, 4 read / 2 write |
| `rtl/tinyrv1_bypass_net.sv` | operand forwarding and load-use detection |
| `rtl/tinyrv1_issue_logic.sv` | in-order dual issue, hazard splits, steering |
| `rtl/tinyrv1_apipe_alu.sv` | A0 execute logic |
| `rtl/tinyrv1_bpipe_alu.sv` | B0 execute logic |
| `rtl/tinyrv1_dmem.sv` | data memory, B1 port plus debug port |

### Top-level interface

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst` | in | clock; synchronous active-high reset (PC := `RESET_PC`, registers := 0, pipeline empty) |
| `imem_wen/waddr/wdata` | in | write one instruction word (byte address) |
| `dmem_dbg_wen/addr/wdata`, `dmem_dbg_rdata` | in/out | debug access to the data memory. Use it to preload data (with the core in reset) and to read results. A store from B1 wins if both write in one cycle. |
| `commit[1:0]` | out | an instruction is in W: bit 0 for the A pipe, bit 1 for the B pipe |
| `rf_wen/rf_waddr/rf_wdata` | out | the two register write ports in W |
| `fetch_pc` | out | the PC in F |
| `events` | out | one flag per cycle for each mechanism: dual/single issue, swizzle, structural/RAW/WAW split, load-use stall, bypass used, jump redirect, branch redirect, B0 squash, aligned-fetch discard, slot dropped behind a jump |

Parameters: `IMEM_WORDS` = 4096 (16 KiB), `DMEM_WORDS` = 1024 (4 KiB) and
`RESET_PC` = 0. All three are this design's choices. Addresses wrap modulo
the memory size.

There is no halt instruction. The tests end each program with the
self-loop `jal x0, 0`.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Example commands:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/tinyrv1_pkg.sv tb/tinyrv1_asm_pkg.sv tb/tinyrv1_dual_issue_tb.sv \
  --top-module tinyrv1_dual_issue_tb -o sim && ./obj_dir/sim
```

The unit testbenches work the same way, with `tinyrv1_<block>_tb` as the
top (`tb/tinyrv1_asm_pkg.sv` holds the instruction encoders).

### End-to-end testbench

`tb/tinyrv1_dual_issue_tb.sv` runs the processor at its default sizes.

- **Reference model.** An instruction-level model of TinyRV1 inside the
  testbench runs each program first. After the processor has committed
  the same number of instructions, the testbench compares all 32
  registers (rebuilt from the W-stage write ports) and the first 256
  data words.
- **Directed programs.** These are the standard superscalar examples:
  - six independent instructions (three dual-issue groups, one of them
    swizzled);
  - a bypass chain;
  - two load-use stalls;
  - a `jal` resolved in D;
  - a taken `bne` that kills its younger B0 partner;
  - a chain of jumps to odd-word targets;
  - two `mul`s followed by `lw` + `sw`;
  - a WAW pair and a WAR pair;
  - `jr` through a bypassed register, and `jal` with a link.

  - 200 independent ALU instructions, which must reach W two per cycle
    (CPI 0.5).

  For each of these, the testbench also checks the cycle in which each
  instruction reaches W. For the odd-target program it also checks the
  pipe each instruction used.
- **Random programs.** 40 random 150-instruction programs with
  forward-only branches and jumps.
- **Coverage.** The testbench counts every mechanism on the `events`
  vector and fails if any of them never occurred.

Expected W cycles for the directed programs:

| program | W cycle of each instruction |
|---------|-----------------------------|
| six independent ops | 4 4 5 5 6 6 |
| bypass chain (`add x5,x1,x3` then `addi x6,x5,1` split) | 4 4 5 6 7 7 |
| load-use (two one-cycle stalls, one RAW split) | 4 4 6 6 8 9 |
| `jal` at 0x000 to 0x1000, `jal` in D to 0x2000 | 4 6 6 8 8 |
| taken `bne` in A0 | 4 4 5 8 8 |
| odd-word jump targets | 4 4 5 5 7 7 9 10 12 13 13 |
| `mul mul lw sw` (two structural splits) | 4 5 6 7 |
| 200 independent ALU ops | 4 4 5 5 ... 103 103 |

## Known limits and departures

- The memories are ideal and answer in the same cycle. There is no cache
  behaviour.
- `mul` is a single-cycle combinational 32 x 32 multiplier. It is the
  longest path in A0.
- The bypass paths from A0 and B0 into D are combinational. Together with
  the D-stage issue decision, they form the critical path.
- Branches are always predicted not taken. There is no branch predictor.
- Some choices are this design's own, because the ISA and pipeline
  description do not fix them:
  - a WAW pair is split instead of letting both write with the younger
    one winning;
  - a taken branch kills its younger B0 partner;
  - reset values and memory sizes;
  - the debug and event ports.
- Illegal encodings are treated as no-ops that use the B pipe. There are
  no exceptions.
