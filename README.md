# ACP: a four-stage pipeline for the SPM instruction set

SPM is a deliberately tiny processor architecture: five instructions, a
register file, a program counter and separate program and data memories. ACP
is a pipelined implementation of it with four stages (fetch, decode, execute,
commit). It has no forwarding network and no branch prediction. Instead it
keeps a small amount of explicit pipeline state: an *execution triple*
describing the result waiting to be committed, and a two-bit refill counter.
Correctness comes from stalling and flushing. An instruction that reads what
its predecessor writes waits one cycle. A taken branch throws away the two
younger instructions and refills the pipeline.

The design is small enough that its whole state can be written as a few
tuples, and every cycle can be related to a step of the one-instruction-at-a-time
architecture. The testbench relies on that: it runs the pipeline next to an
instruction-level model of SPM and checks, at every retired instruction, that
the two agree and that the step took the number of cycles the pipeline's
state predicts.

All RTL is SystemVerilog-2017 in `rtl/`, and the testbenches are in `tb/`.

## The SPM architecture

Three sizes define it: `R` (there are 2^R registers), `M` (both memories have
2^M words, and pc and addresses are M bits) and `W` (the word size). The RTL
defaults are R = 3, M = 8 and W = 16. The architecture does not fix values,
so these are this design's own choice. They satisfy the architecture's
constraint W ≥ max(3 + 3R, 3 + R + M), which lets an instruction hold its
fields.

| op code | instruction       | effect                                            |
|---------|-------------------|---------------------------------------------------|
| 000     | `add ra rb rc`    | reg[rc] := reg[ra] + reg[rb]; pc := pc + 1         |
| 001     | `branch addr`     | if reg[0] = 0 then pc := pc + addr else pc := pc + 1 |
| 010     | `load ra addr`    | reg[ra] := md[addr]; pc := pc + 1                  |
| 011     | `store ra addr`   | md[addr] := reg[ra]; pc := pc + 1                  |
| 100     | `set ra val`      | reg[ra] := val (zero-extended); pc := pc + 1       |

The only conditional is "branch if register 0 is zero". The branch offset is
added modulo 2^M, so it reaches backwards as well. Codes 101 to 111 are not
instructions. This design treats them as no-ops that advance pc.

**Instruction format.** The fields are packed from the most significant bit
down, and `addr`/`val` overlaps `rb` and `rc`:

```
 W-1   W-3 W-4        W-3-R  W-4-R                           0
 +-------+--------------+-------------------------------------+
 |  op   |      ra      |  rb (R) | rc (R) | ...               |   add
 |       |              |  addr / val (M bits)       | unused |   others
 +-------+--------------+-------------------------------------+
```

At the default size this gives op = [15:13], ra = [12:10], rb = [9:7],
rc = [6:4] and addr = [9:2], with bits [1:0] unused. The bit positions are
this design's own choice. The field set and the width constraint come from the
architecture.

## Pipeline structure

```
 icache --> Fetch ------> Decode ------> Execute ------> Commit
            ir, fpc       op ra rb rc    result, dest,    pc, reg[], md[]
              ^           addr           unit, rst_ctr      |
              |                            |  reads reg[ra], reg[rb], reg[0],
              +---- branch target ---------+  pc, md[addr] (committed state)
```

| module         | role |
|----------------|------|
| `acp_icache`   | program memory, asynchronous read, plus a load port |
| `acp_fetch`    | instruction register `ir` and fetch counter `fpc` |
| `acp_decode`   | registered instruction fields |
| `acp_execute`  | execution triple, refill counter, stall signal; contains `acp_conflict` |
| `acp_conflict` | read-after-write check between the decoded instruction and the waiting triple |
| `acp_regfile`  | 2^R × W registers: three read ports, one write port, one inspection port |
| `acp_pc`       | architectural program counter |
| `acp_dcache`   | data memory: asynchronous read for loads, committal write, external port |
| `acp_top`      | the wired pipeline |
| `acp_pkg`      | op-code and unit enumerations |

The execute stage works only on **committed** state. It reads the registers,
pc and data memory as they stand at the start of the cycle. The result it
produces is written one cycle later. In that commit cycle the next instruction
is already executing, and it still sees the old values. That is the whole
reason for the stall rule below.

## The execution triple and the refill counter

The execute stage's register holds `(result, dest, unit)` and a counter
`rst_ctr` that takes the values 0, 1 and 2. `unit` says what the commit stage
does in the next cycle:

| unit     | commit action                          | produced by |
|----------|----------------------------------------|-------------|
| `reg`    | reg[dest[R-1:0]] := result; pc := pc + 1 | add, load, set |
| `dcache` | md[dest] := result; pc := pc + 1         | store |
| `incpc`  | pc := pc + 1                             | branch not taken |
| `pc`     | pc := dest; fetch restarts at dest       | branch taken |
| `wait`   | nothing                                  | refill, stall |

For each instruction the triple is:

| instruction | result | dest | unit | rst_ctr |
|---|---|---|---|---|
| add    | reg[ra] + reg[rb] | rc | reg | 0 |
| branch, reg[0] = 0 | unchanged | branch address + addr | pc | 2 |
| branch, reg[0] ≠ 0 | unchanged | unchanged | incpc | 0 |
| load   | md[addr] | ra | reg | 0 |
| store  | reg[ra] | addr | dcache | 0 |
| set    | val | ra | reg | 0 |

The execute stage follows a three-way rule each cycle:

* If `rst_ctr > 0`, the pipeline is still refilling. The stage emits `wait`
  and decrements the counter.
* If `rst_ctr = 0` and there is a conflict, the stage emits `wait` and
  raises `stall`. Fetch and decode hold their contents for that cycle.
* Otherwise the decoded instruction executes.

Reset puts the pipeline in its **boot** state: `unit = wait`, `rst_ctr = 2`,
`fpc = pc = 0` and all registers cleared. The reset values of pc and of the
registers are this design's choice.

### The four pipeline states

The counter and `unit` together identify four states. With pc the
architectural program counter, each state is defined as follows:

| state | rst_ctr | unit | fpc | ir holds | decode holds | cycles to the next retired instruction |
|---|---|---|---|---|---|---|
| boot         | 2 | wait     | pc     | junk      | junk      | 4 |
| after branch | 1 | wait     | pc + 1 | mp[pc]    | junk      | 3 |
| stall        | 0 | wait     | pc + 2 | mp[pc+1]  | mp[pc]    | 2 |
| full         | 0 | not wait | pc + 3 | mp[pc+2]  | mp[pc+1]  | 1 |

Boot is followed by after-branch, then stall, then full. After a taken
branch, the commit cycle loads the target into pc and fetches mp[target] in
the same cycle. The pipeline therefore lands directly in the after-branch
state and skips boot. A conflict in the full state commits the older
instruction, holds fetch and decode, and leaves the pipeline in the stall
state. So an instruction retires every cycle when nothing goes wrong, and
takes 2 cycles after a stall, 3 after a taken branch and 4 from reset.
`tb_acp_top` checks both the state table and these durations at every
retired instruction.

Example, a taken branch at address p to target T:

| cycle | pc  | fpc | ir       | decode   | triple (committed at end of cycle) | rst_ctr |
|-------|-----|-----|----------|----------|------------------------------------|---------|
| t     | p-1 | p+2 | mp[p+1]  | branch p | instr p-1                          | 0 |
| t+1   | p   | p+3 | mp[p+2]  | mp[p+1] (discarded) | branch: pc := T, fetch mp[T] | 2 |
| t+2   | T   | T+1 | mp[T]    | junk     | wait                               | 1 |
| t+3   | T   | T+2 | mp[T+1]  | mp[T]    | wait                               | 0 |
| t+4   | T   | T+3 | mp[T+2]  | mp[T+1]  | instr T                            | 0 |

### Branch target address

The target is the address of the branch itself plus `addr`. The execute stage
has no copy of that address, only the architectural pc. In the stall state pc
*is* the branch's address. In the full state pc still points at the
instruction being committed, one behind the branch. The RTL therefore
computes `pc + (unit != wait) + addr`. A plain `pc + addr` would be off by one
whenever the pipeline is full.

## Conflicts (read-after-write)

Only adjacent instructions can conflict, because a result is committed one
cycle after it is computed. `acp_conflict` raises a conflict when:

| older instruction (waiting triple) | younger (decoded) instruction reads it |
|---|---|
| add/load/set writing register d | add with ra = d or rb = d; branch with d = 0; store with ra = d |
| store writing md[a]             | load with addr = a |

A branch never conflicts with the instruction after it, because a branch
writes nothing. `set` and `load` read no register, and `add` reads no memory,
so those pairs do not conflict either. Write-after-write needs no check,
because commits happen in program order. Removing the stall would need
forwarding paths, and the design leaves them out on purpose.

## Interface of `acp_top`

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset to the boot state |
| `imem_we`, `imem_waddr`, `imem_wdata` | in | 1, M, W | write the program (while `rst` is held) |
| `dmem_ext_we`, `dmem_ext_addr`, `dmem_ext_wdata` | in | 1, M, W | write data memory (while `rst` is held) |
| `dmem_ext_rdata` | out | W | md[dmem_ext_addr], asynchronous |
| `dbg_reg_addr` / `dbg_reg_data` | in / out | R / W | read any register, asynchronous |
| `pc`, `fpc` | out | M | architectural and fetch program counters |
| `unit`, `rst_ctr`, `stall` | out | 3, 2, 1 | pipeline state |

The core has no halt. A program ends in a self-loop, for example
`set r0 0; branch 0`.

Both memories read asynchronously, so they map to LUT RAM or register arrays
rather than synchronous block RAM. Every access hits: there are no cache
misses. At the default size the memories hold 2 × 4096 bits and the register
file 128 bits.

## Where this RTL goes beyond, or departs from, the architecture's description

* The sizes R = 3, M = 8 and W = 16 are chosen here. The parameters can be
  changed (see below).
* The instruction bit layout is this design's own (see the format above).
* The target of a taken branch is the branch's own address plus the offset,
  as the architecture defines it. See "Branch target address" for how the
  pipeline recovers that address.
* Op codes 101, 110 and 111 act as no-ops. What they should do is not defined.
* Added ports: the program load port, the data memory external port, the
  register inspection port and the state outputs. The architecture does not
  cover input or output.
* Reset also sets pc to 0 and clears the registers.
* The data memory has a single write port. If the external port writes in the
  same cycle as a committed store, the external write is dropped.
* Not built: a superscalar variant of the same architecture. Its structure is
  not given here.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_acp_icache`, `tb_acp_dcache`, `tb_acp_regfile` | random writes and reads against a shadow copy; reset values; write-port priority |
| `tb_acp_pc` | the commit rule for every unit |
| `tb_acp_fetch` | normal fetch, hold and redirect against a memory model |
| `tb_acp_decode` | field extraction by shift-and-mask, and hold |
| `tb_acp_conflict` | 20 000 random cases against a reads/writes formulation of the conflict rule; every dependency occurs |
| `tb_acp_execute` | triple, refill counter, stall and branch target against a model |
| `tb_acp_top` | the whole core at its default size against `spm_ref_pkg` (below) |

`spm_ref_pkg` is an instruction-level model of SPM. `tb_acp_top` loads a
program and steps the model once for each triple the core commits. After
each step it compares pc, all registers and any stored word. It also checks
the pipeline state table and the step duration (1, 2, 3 or 4 cycles), and at
the end it compares the whole data memory. It runs two kinds of program:

* a directed counting loop (N = 5 and N = 0) whose result, 3·N, is known
  without the model;
* 150 random programs of 600 cycles each, biased towards few registers and
  data addresses.

The testbench counts stalls for every (older, younger) instruction pair. It
fails if any dependent pair never stalls or if an independent pair ever
does. It also requires taken and not-taken branches, every instruction and
all four pipeline states. Finally it checks case coverage. Each retired
instruction starts a case: the pipeline state (after branch, stall or full)
crossed with the ordered pair of the next two instructions, with or without a
dependency between them. All 97 cases that can occur must have run. A stall
state cannot begin with `set`, and most pairs cannot depend. A run covers
about 69 000 retired instructions and takes under a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/acp_pkg.sv tb/spm_ref_pkg.sv \
    tb/tb_acp_top.sv --top-module tb_acp_top -o sim
./obj_dir/sim
```

For a unit testbench, drop `tb/spm_ref_pkg.sv` and name that testbench
instead. `-I` lets Verilator find each module in the file of the same name.

## Changing the sizes

`R`, `M` and `W` are parameters of `acp_top` and are passed down to every
block. `acp_decode` asserts the width constraint at elaboration. The directed
program in `tb_acp_top` assumes M = 8 (its backward offset is 251 = −5 mod
256). The random programs and the reference model follow the parameters.
