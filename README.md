# Fill-unit multiple issue for a MIPS-subset processor

A superscalar processor checks dependencies among several freshly fetched
instructions every cycle. A VLIW processor leaves that to the compiler and
loses binary compatibility. This design takes a third way. The processor
runs ordinary scalar MIPS code. While it runs, a **fill unit** watches the
instructions go by, one per cycle. It packs the ones that can safely run
together into a wide, VLIW-like **line** and stores that line in a
**shadow cache**. The line is keyed by the address of its first
instruction. The next time the program reaches that address, the shadow
cache supplies the whole line and up to six instructions issue in one
cycle. The scalar fetch for that address is preempted.

The dependency checks are cheap because they are done while filling, one
instruction at a time: the newcomer is compared with at most five
instructions already in the line. No checking is done at issue time. Loops
gain the most: the first iteration runs at scalar speed and fills lines,
and later iterations issue from the shadow cache.

The RTL is SystemVerilog and is written for Verilator and the slang front
end of Yosys.

## Machine organisation

```
            +---------+  instr  +---------+  decoded   +-----------+  lines  +--------------+
 fetch ---->| i-cache |-------->| decoder |-----+----->| fill unit |-------->| shadow cache |
 address    +---------+         +---------+     |      +-----------+         +--------------+
   ^                                            |                               | hit: stored line
   |                                     one-instruction group                  v
   |                                            +-------------> group mux <-----+
   |                                                               |
   |               +-----------------------------------------------+
   |               v
   |   register file (8 read ports)  -->  int_1 --(cascade)--> int_2, ld/st_1, ld/st_2, branch
   |                                                             fpu (external)
   +------------------------- next address from the branch unit
```

There are six functional units, each with a fixed slot in a line:

| slot | unit | may take int_1's result in the same cycle |
|---|---|---|
| 0 | `int_1`  | - (it is the first stage of the cascade) |
| 1 | `int_2`  | yes, either operand |
| 2 | `ld/st_1` | yes, address base and store value |
| 3 | `ld/st_2` | yes, address base and store value |
| 4 | `branch` | yes, both compared operands |
| 5 | `fpu`    | no (it uses its own registers) |

`int_1` is a cascaded ALU. Its result feeds the other integer-side units of
the same group, so pairs of dependent integer instructions, and address
calculations that depend on them, can issue together.

**One group per cycle.** Each cycle the core issues one *group*. A group is
either a stored line (on a shadow-cache hit) or a single instruction from
the i-cache (on a miss). A single instruction is turned into a
one-instruction line by the same placement logic, so both kinds of group
use the same datapath. A group goes from fetch to write-back in one clock
cycle:

1. operands are read from the eight read ports listed in the line;
2. `int_1` computes, and its result is forwarded to the other units;
3. the loads read the data cache;
4. register and memory writes happen at the clock edge;
5. the branch unit delivers the next fetch address.

**This is a deliberate simplification.** The original machine has a
five-stage pipeline with interlocks, two-cycle loads and a two-level
branch predictor. None of these are modelled here. Cycle counts therefore
measure *issue groups* (plus one cycle per mispredicted tree-like line,
see below), not the timing of a real pipeline.

## The line format (`fu_pkg::line_t`)

| field | width | meaning |
|---|---|---|
| `slot[6]` | 6 x 57 | one per unit: `valid`, function code, operand sources `a` and `b`, `use_imm`, `link`, a 32-bit immediate, destination register and write flag |
| `port_used`, `port_reg[8]` | 8 + 8 x 5 | which register each of the eight read ports reads |
| `next_addr` | 30 | where to continue: the address after the last instruction in the line, the untaken successor of a conditional branch, or the target of a `J`/`JAL` |
| `br_addr` | 30 | taken successor of a conditional branch |
| `ninstr` | 3 | scalar instructions the line covers (statistics only) |

Addresses are 30-bit word addresses. An operand source (`src_t`) is a
3-bit selector plus a 3-bit port number. The selector picks one of:

- `ZERO`: the constant 0;
- `PORT`: one of the eight read ports;
- `INT1`: the result of `int_1`;
- `INT2`: the result of `int_2` (store value only);
- `LS1`: the load result of `ld/st_1` (store value of `ld/st_2` only).

Function codes are short per-unit encodings produced by the decoder
(`alu_op_e`, `ls_op_e`, `br_op_e`), not MIPS opcodes. A line is 456 bits
wide. A tighter encoding is possible: a narrower immediate per slot, and a
single forwarding bit where only `int_1` can forward. That would bring the
line near 260 bits.

What the shadow cache stores is an `sline_t`: a `tree` bit, a `dir` bit
and two `line_t`s, `part[0]` (branch untaken) and `part[1]` (branch
taken), 914 bits in all. A simple line uses `part[0]` only. Each entry
also has a separate one-bit direction predictor.

## Filling rules (`fill_unit`, `fu_pkg::try_place`)

The fill unit receives every instruction the scalar path executes,
together with its address. For each newcomer it decides whether the
instruction can join the line being built:

1. **Unit.** An integer instruction takes `int_1`, or `int_2` if `int_1`
   is taken. Loads and stores take `ld/st_1`, then `ld/st_2`, so the
   earlier memory access is always in `ld/st_1`. A branch takes the
   branch slot and a COP1 operation takes the fpu slot. A line covers at
   most six instructions; a NOP counts toward the six but uses no unit.
2. **Each source register that an earlier instruction in the line
   writes:**
   - allowed if the producer is `int_1` (cascade), or if the consumer is
     a store value produced by `int_2`, or by a load in `ld/st_1`;
   - any other read-after-write fails.
3. **Each source register not written in the line** needs a read port.
   A register that already has a port shares it. If all eight ports are
   used, placement fails.
4. **A second writer of a register (WAW) fails.** A write-after-read is
   allowed: every operand of the group is read before any unit writes,
   so a later instruction in the line may overwrite a register an
   earlier one reads.

If the newcomer does not fit, the line is **finalized**: it gets
`next_addr` = the newcomer's address, and the newcomer starts a new line.
A line is also finalized:

- when a stored line issues and preempts the scalar path; its
  `next_addr` is then the address after its last instruction;
- at a `BREAK`;
- at an unsupported instruction.

**Only lines covering two or more instructions are written.** Single
instructions are cheaper to fetch from the i-cache.

### Branches and the MIPS delay slot

Every MIPS branch or jump is followed by a delay slot instruction that
always executes. A line never ends between a branch and its delay slot.
The fill unit holds the branch back until the delay slot arrives, then
takes one of two routes:

- **Both fit into the current line.** They are added. With simple lines
  (`TREE = 0`), and for jumps in either mode, that completes the line. For a conditional branch, `next_addr` is the address after the
  delay slot and `br_addr` is the target. For `J`/`JAL`, the target goes
  into `next_addr`. For `JR`/`JALR` the register supplies it at issue.
- **The delay slot cannot join.** Usually this is because no unit of its
  kind is left or a read port is missing. The current line is finalized
  just before the branch. The branch and the delay slot then form a line
  of their own, starting at the branch. The fill unit's one write port is
  busy that cycle with the first line, so with simple lines (and for
  jumps) this second line is written one cycle later from a holding
  register. With tree-like lines a conditional branch's own line forks
  instead, as described below (the lower case of the example then
  continues past `DS` along the path taken).

Example, for `E F BC DS` at addresses i..i+3, where `BC` is a conditional
branch to j:

```
fits:            i   : [E  F  DS  -  BC  -]  next i+4, branch j
does not fit:    i   : [E  F  -   -  -   -]  next i+2
                 i+2 : [DS -  -   -  BC  -]  next i+4, branch j
```

A branch issued on the scalar path executes its delay slot next from the
i-cache, never from the shadow cache. Because of this, no line ever starts
at a delay slot.

## Tree-like lines (`TREE = 1`, the default)

Scalar MIPS code has short basic blocks, so lines that stop at every
branch stay short. With `TREE = 1`, a line may hold one conditional
branch and run on past it along *both* paths.

**Filling.** When a conditional branch and its delay slot have been
placed (in the current line or, as above, in a line of their own), the
line forks into two copies that share everything up to and including
the delay slot:

- the copy for the path the program did *not* take is frozen. Its
  `next_addr` is the branch target if the branch fell through, or the
  address after the delay slot if it was taken;
- the copy for the path the program took goes on filling with the
  instructions that follow, under the usual rules. It ends at the next
  finalization, or at a second branch (one branch per line).

The entry's `dir` bit records which path was filled.

**Issue.** On a hit, `fill_core` issues `part[pred]`, where `pred` is the
entry's direction bit. That path already includes instructions past the
branch, so the next fetch address is its own `next_addr`. The branch is
still evaluated. If it goes the other way, the group is squashed: no
register, memory or fpu write takes effect. The next cycle the same line
is issued again with the other path, and the direction bit is set to the
outcome. A misprediction thus costs exactly one cycle, and the machine
stays in wide issue.

```
code:  i: E   i+1: F   i+2: BC->j   i+3: DS   i+4: G ...   j: H ...

filled while BC fell through:
  part[0] (untaken): [E F DS G ...]  next = after G...
  part[1] (taken)  : [E F DS]        next = j   (frozen)
```

**Back-up.** A path that was never followed is short: it only holds what
precedes the branch, plus the delay slot. When such a path is reissued,
the core hands the line back to the fill unit (`resume`). The reissued
path becomes the line under construction again, and the instructions
fetched next from the i-cache extend it under the usual rules. The line
is then rewritten at the same address with both paths filled and its
direction bit flipped. If the next fetch hits the shadow cache instead,
nothing is rewritten.

## Memory ordering between the two load/store units (`lsu_pair`)

`ld/st_1` always holds the earlier of two memory accesses in a group:

| case | what happens |
|---|---|
| store in `ld/st_1`, load of the same word in `ld/st_2` (RAW) | the load takes the store data directly |
| two stores to the same word (WAW) | only `ld/st_2`'s write reaches the cache |
| load in `ld/st_1`, store to the same word in `ld/st_2` (WAR) | the load reads the cache before the store's clock edge, so it sees the old value |

A store's value may also come from `int_2`, or from the load in `ld/st_1`.
This stands in for a store buffer in which a store waits for its data.

## Core interface (`fill_core`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `scalar_only` | in | 1 | issue only from the i-cache and do not fill (plain single-issue machine) |
| `shadow_inval` | in | 1 | invalidate the whole shadow cache in one cycle (before running modified code: one word can sit in several lines) |
| `imem_addr` / `imem_rdata` | out / in | 30 / 32 | instruction fetch, combinational |
| `d1_*`, `d2_*` | | 30, 1, 32, 32 | one data-cache port per load/store unit: word address, write enable, write data (written at the clock edge), read data (combinational) |
| `fpu_valid`, `fpu_op` | out | 1, 26 | COP1 single/double arithmetic for an external floating-point unit (instruction bits 25:0) |
| `pc` | out | 30 | current fetch address |
| `halted`, `error` | out | 1 | the core stopped at `BREAK`; `error` is also set if it stopped at an unsupported instruction |
| `retired` | out | 3 | instructions completed this cycle |
| `ev` | out | `events_t` | one pulse per event: group issued from the shadow cache or the scalar path, line written, reason for finalization, branch line split off, one-instruction line dropped, `int_1` forward, store-value forward, RAW/WAW between the load/store units, branch taken, fpu issue, tree-like line issued, tree-like line mispredicted, reissued path extended by back-up |

Parameters:

- `SC_ENTRIES` (default 65536): shadow-cache entries. It must be a power
  of two.
- `TREE` (default 1): build tree-like lines; 0 gives simple lines that
  end at every branch.
- `RESET_PC` (default 0).

The shadow cache is direct-mapped and indexed by the low address bits.

## Supported instructions

The decoder (`mips_decoder`) accepts:

- integer arithmetic: `ADD ADDU SUB SUBU AND OR XOR NOR SLT SLTU`;
- shifts: `SLL SRL SRA SLLV SRLV SRAV`;
- immediates: `ADDI ADDIU SLTI SLTIU ANDI ORI XORI LUI`;
- memory: `LW SW`;
- branches and jumps: `BEQ BNE BLEZ BGTZ BLTZ BGEZ J JAL JR JALR`;
- COP1 single/double arithmetic (passed to the external fpu);
- the all-zero `NOP`, and `BREAK`, which halts the core.

`ADD`, `ADDI` and `SUB` do not trap on overflow, so the core raises no
exceptions. Any other instruction stops the core with `error`. Not
supported:

- multiply and divide;
- byte and halfword memory accesses;
- unaligned accesses;
- system calls.

## Files

| file | content |
|---|---|
| `rtl/fu_pkg.sv` | types (decoded instruction, slot, line, events) and the placement function `try_place` |
| `rtl/mips_decoder.sv` | instruction decoder |
| `rtl/fill_unit.sv` | line construction, finalization, branch/delay-slot handling, tree-like forking |
| `rtl/shadow_cache.sv` | direct-mapped line store with direction bits and whole-cache invalidate |
| `rtl/regfile.sv` | 32 x 32 register file, 8 read / 5 write ports |
| `rtl/int_alu.sv` | integer ALU (used for `int_1` and `int_2`) |
| `rtl/lsu_pair.sv` | the two load/store units and their collision handling |
| `rtl/branch_unit.sv` | branch condition and next-address selection |
| `rtl/fill_core.sv` | the processor (top level) |
| `tb/asm_pkg.sv` | instruction encoders used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. An
example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fu_pkg.sv tb/asm_pkg.sv rtl/*.sv tb/tb_fill_core.sv --top tb_fill_core
./obj_dir/Vtb_fill_core
```

For a unit testbench, list `rtl/fu_pkg.sv`, `tb/asm_pkg.sv`, the module
and the testbench; `tb_fill_unit` also needs `rtl/mips_decoder.sv`.

`tb_fill_core` runs at the default size (65536-entry shadow cache). It
runs a nested loop on two copies of the core, one filling and one in
`scalar_only` mode, and on an instruction-set model written in the
testbench. It then checks:

- all 4096 data words of both cores against the model;
- the number of retired instructions and fpu operations;
- one cycle per instruction for the scalar copy, and fewer cycles for the
  filling copy;
- that every event in `events_t` occurred at least once.

The shadow cache is invalidated once midway through the run. On this loop
the filling core needs 161 cycles for 403 instructions (IPC 2.50), with
29 tree-like lines issued, 5 mispredictions and 1 back-up. The scalar copy needs
404 cycles. With `TREE = 0` the same loop took 171 cycles (IPC 2.36).

`tb_fill_unit` checks the line contents directly, with one instance in
each mode.

## Where this design departs from the fill-unit machine it implements

- **Pipeline timing.** The core is single-stage, as described above.
  A group resolves its own branch before the next fetch. Prediction is
  used only to choose the path of a tree-like line.
- **Direction prediction.** A one-bit predictor per shadow-cache entry
  stands in for a separate two-level branch prediction cache.
- **Tree-line encoding.** Both paths are stored as complete lines (914
  bits per entry). A packed form with one shared branch field and five
  unit fields per path would take about 440 bits.
- **Other configurations not built.** Only the two-integer-unit
  configuration is implemented. The variant with a third cascaded integer
  unit is not. Neither is the baseline without cascading.
- **Simplified store buffer.** The store-value dependency is handled by
  a same-cycle forward rather than by a store buffer.
- **Wider line encoding.** The operand selector has three bits rather
  than one forwarding bit.
- **No write-back arbitration.** Each producing unit has its own
  register-file write port.
- **No exceptions.** Exception recovery (flush the group, re-execute in
  scalar mode) is not modelled. The `scalar_only` input provides the
  scalar-only mode.
- **External units and caches.** The caches and the floating-point unit
  are outside the core.
