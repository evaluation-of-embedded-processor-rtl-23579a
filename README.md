# NISC processor tailored for recursive BDD building

This is a *No-Instruction-Set Computer* (NISC): a processor without an
instruction set. A program is a sequence of wide **control words**, one per
clock cycle, and every field of a control word drives one multiplexer
select, one unit opcode or one register enable of the data path directly.
Nothing is decoded at run time; a compiler (or, here, a hand scheduler)
decides in advance what every unit does in every cycle.

The data path is the one tuned for Binary Decision Diagram (BDD) packages,
whose run time is dominated by two things: deep recursion (stack frames
built and torn down on every call) and hash functions built on modulo
operations (node table and computed-result cache). Compared with a generic
NISC data path it carries

* a **second ALU** (ALU2), so stack- and frame-pointer arithmetic runs beside
  the main computation when a routine is entered or left;
* **forwarding paths into the comparator** from every unit's output register,
  so a branch can test a result the cycle after it is produced;
* a **16-bit divider** instead of a 32-bit one: the divisor of the hash is at
  most the node count, and a shift-subtract divider's latency is linear in
  its width, so halving the width halves the wait;
* divisions by two in the hash functions done as **right shifts** in the ALU
  (a program-side change the ALU supports).

## Block diagram

```
            +-------------------- controller -------------------+
            |  PC --> control-word memory (1024 x cw_t) --> cw  |
            |   ^                                               |
            |   +-- next-address mux: PC+1 | PC+offset |         |
            |       branch on status | address (bus 1) | halt   |
            +---------^-----------^-----------^-----------------+
                      | status    | address   | div_busy       | cw, exec
            +---------+-----------+-----------+----------------v-----------+
            |  register file (32 x 32, 2 read / 2 write)                  |
            |        |bus 1          |bus 2          constant (cw.imm)     |
            |  +-----+------+-------+------+-------+------+-------+       |
            |  v            v              v              v       v       |
            | Comp        ALU   ALU2      Mul        Div 16-bit   Data    |
            | (+fwd)       |     |         |          |    |     memory   |
            | [status]   [q]   [q]       [q]        [quo][rem]  [rdata]   |
            |              \_____\_________\__________\____\______/        |
            |                  write-back (two ports) to the registers    |
            +-------------------------------------------------------------+
```

Every unit has an output register (`[q]`). A unit enabled in a control word
captures its result at the end of that cycle; a later word writes that
register back, feeds it to the comparator, or (for ALU and ALU2) uses it as
a memory address.

## Files

| file | contents |
|------|----------|
| `rtl/nisc_pkg.sv` | control word `cw_t` and all field encodings |
| `rtl/nisc_top.sv` | processor: controller + data path, load/host ports, counters |
| `rtl/nisc_controller.sv` | PC, next-address logic, divider wait, start/halt, cycle counters |
| `rtl/nisc_pmem.sv` | control-word memory (synchronous read, load port) |
| `rtl/nisc_datapath.sv` | buses, operand multiplexers, output registers, write-back |
| `rtl/nisc_regfile.sv` | 32 x 32 register file, two read and two write ports |
| `rtl/nisc_alu.sv` | ALU, instantiated twice |
| `rtl/nisc_comparator.sv` | comparator with forwarding operand multiplexers |
| `rtl/nisc_multiplier.sv` | 32 x 32 multiplier, low word |
| `rtl/nisc_divider.sv` | 16-bit shift-subtract divider, quotient and remainder |
| `rtl/nisc_dmem.sv` | 4096 x 32 data memory with a host port |
| `tb/nisc_asm_pkg.sv` | helper functions that compose control words |
| `tb/tb_nisc_bdd.sv` | a BDD package in control words, run on multiplier circuits (below) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The control word

`cw_t` in `rtl/nisc_pkg.sv` is a packed struct of about 120 bits. Its fields,
grouped by the unit they steer:

| group | fields | meaning |
|-------|--------|---------|
| controller | `nxt`, `offset`, `wait_div` | next address: `NX_INC` (PC+1), `NX_JMP` (PC+offset), `NX_BRT`/`NX_BRF` (PC+offset if status is 1/0), `NX_ADDR` (bus 1, for returns), `NX_HALT`; hold the word while the divider is busy |
| constant | `imm` | 32-bit constant usable by every operand mux, the memory address and write-back |
| registers | `ra1`, `ra2` | registers read onto bus 1 and bus 2 |
| write-back | `we0 wa0 wb0`, `we1 wa1 wb1` | two write ports; source is an output register (ALU, ALU2, MUL, DIVQ, DIVR, MEM) or the constant |
| ALU, ALU2 | `*_en`, `*_op`, `*_a`, `*_b` | operation and operands (bus 1, bus 2 or constant) |
| multiplier | `mul_en`, `mul_a`, `mul_b` | as above |
| divider | `div_start`, `div_a`, `div_b` | start a division |
| comparator | `cmp_en`, `cmp_op`, `cmp_a`, `cmp_b` | EQ, NE, LT, GE, LTU, GEU; operands from buses, constant or any output register (forwarding) |
| memory | `mem_re`, `mem_we`, `mem_addr` | read into the memory output register / write bus 2; address from bus 1, bus 2, constant, ALU or ALU2 output |

The all-zero word is a no-operation that advances to the next word.

## Scheduling rules

A program is correct only if it respects the timing of the data path; there
are no interlocks other than the divider wait.

* **One cycle per unit.** Operands are read from the registers in cycle *t*;
  the unit's output register holds the result from cycle *t+1*; a
  write-back in cycle *t+1* makes it readable from the registers in *t+2*.
  A write-back reads the output register's value at the start of its cycle,
  so the same word may both write back an old result and compute a new one.
* **Forwarding.** The comparator can read any output register in cycle
  *t+1*, saving the write-back and the register read.
* **Branches** test the status register, which holds the result of the last
  word with `cmp_en` set; compare in one word, branch in a later one. A taken
  branch costs no extra cycle.
* **Calls and returns** are ordinary jumps: a call writes the return address
  (a constant known when the program is built) into a register with `WB_IMM`
  and jumps; a return puts that register on bus 1 with `NX_ADDR`.
* **Divider.** `div_start` in cycle *t* keeps the divider busy in cycles
  *t+1 .. t+16*; quotient and remainder are readable from *t+17*. Words
  scheduled in between run normally; the word that needs the result sets
  `wait_div` and is held, without effect, until the divider is idle. The
  division latency is DIV_W cycles, so a 32-bit divider (`DIV_W = 32`) would
  double it.
* **Memory** reads have the same one-cycle timing as the units; a write
  stores bus 2. A read and a write of one address in the same word returns
  the old word.

## A BDD package on the processor

`tb/tb_nisc_bdd.sv` holds a small BDD package written directly in control
words by a macro assembler in the testbench. It has three routines:

* `mk(v, l, h)` finds or creates a node in the unique table. The table is
  an array of node records (variable, low, high, chain link) with 211
  hash buckets. The bucket is `TRIPLE(v, l, h) mod 211`.
* `apply(op, a, b)` combines two BDDs with AND, OR or XOR. It first checks
  the terminal cases, then a 97-entry direct-mapped cache indexed by
  `(PAIR(a, b) + op) mod 97`, then recurses on the low and high cofactors.
* a main loop that walks a gate list in data memory and stores each gate's
  BDD root.

`PAIR(a, b) = (a+b)(a+b+1)/2 + a` and `TRIPLE(a, b, c) = PAIR(c, PAIR(a, b))`
use the multiplier and an ALU right shift for the halving. Every modulo runs
on the 16-bit divider, on the low 16 bits of the hash.

The testbench loads the gate list of an n x n array multiplier (partial
products `y_k & x_i`, then rows of half and full adders) and runs it for
n = 3 and n = 4. The variables are ordered x0, y0, x1, y1, and so on. A
model in the testbench runs the same algorithm. The hardware must match it
on every node, every count and every root. Every product bit's BDD is also
evaluated for all operand pairs against `x*y`.

The package is assembled in two schedules, and both must give the same
node table:

* **plain**: every macro runs alone, as a sequential schedule would. A load
  takes three words (address in the ALU, read, write-back) and a store takes
  two. A division is started and waited for at once.
* **tuned**: this shows what the second ALU, the two write ports and the
  wait bit are for.
  * *Frame push.* One word forms the first slot address in the ALU and the
    new stack pointer in ALU2. Then comes one store per word, and each of
    those words' ALU forms the next address.
  * *Reloads.* Consecutive frame accesses are pipelined: one word does
    address, access and write-back of three different accesses. ALU2 moves
    the return value or pops the frame in the same words.
  * *Cache update.* The store of the cached result shares its word with the
    return.
  * *Cache index.* The division starts before the cache key is computed,
    so 8 of its 16 cycles are spent on useful words.

Measured cycles. The profile counts each cycle by the word at the PC:

* *routines*: words in `apply` and `mk`;
* *entry/exit*: frame save and restore, stack-pointer updates, call and
  return words;
* *division*: start words and wait words, including the held cycles.

| circuit | schedule | control words | cycles | divider wait | routines | entry/exit | division |
|---------|----------|---------------|--------|--------------|----------|------------|----------|
| 3x3 | plain | 304 | 36,442 | 4,752 | 96.8% | 20.2% | 14.6% |
| 3x3 | tuned | 276 | 31,090 | 3,488 | 96.3% | 13.8% | 13.1% |
| 4x4 | plain | 304 | 208,296 | 28,416 | 98.8% | 19.2% | 15.3% |
| 4x4 | tuned | 276 | 177,664 | 20,184 | 98.7% | 13.1% | 13.3% |

The 3x3 circuit gives 102 nodes (terminals included), 322 apply calls,
12 cache hits and 297 divisions. The 4x4 circuit gives 521 nodes,
1,664 apply calls, 229 cache hits and 1,776 divisions. The tuned schedule
cuts entry/exit cycles by 42% and total cycles by 15%.

These numbers come from this hand-written package. They are not the
results of compiling the BuDDy C library for this processor. The original
evaluation of this processor reports, for the same 3x3 case:

* 106 nodes, 550 recursive calls and 990 divisions, two thirds of which
  were halvings that later became shifts;
* about 108,000 cycles on a generic NISC and about 67,600 after the changes
  this data path embodies;
* 94-97% of cycles in recursive routines, division below 10% and routine
  entry/exit below 20%.

The share spent in routines and the effect of the second ALU on entry/exit
agree with that. Division stays above 10% here because `mk` has nothing
independent to overlap with its division. The BDD grows about fivefold per
operand bit with this package and variable order, where the original
reports a factor of about three.

## Interface of `nisc_top`

| port | direction | meaning |
|------|-----------|---------|
| `clk`, `rst_n` | in | clock, synchronous active-low reset |
| `start`, `running` | in / out | pulse `start` while stopped to run from address 0; `running` falls after a `NX_HALT` word |
| `pm_we`, `pm_waddr`, `pm_wdata` | in | load control words (while stopped) |
| `host_we`, `host_addr`, `host_wdata`, `host_rdata` | in / out | second data memory port, one-cycle read latency |
| `pc`, `cycles`, `div_stall_cycles` | out | program counter; cycles of the last run; of those, cycles spent waiting for the divider |

Parameters: `DIV_W` (divider width, 16) and `DMEM_DEPTH` (data words, 4096).
The register count (32) and control-word memory depth (1024) follow from
`RF_AW` and `PC_W` in `nisc_pkg`.

## Design choices beyond the source description

The architecture (unit set, output register per unit, second ALU, comparator
forwarding, 16-bit divider, split controller with PC, control memory and a
next-address multiplexer fed by offset, status and address) follows the
processor described for this application. The following are choices made
here, where that description gives no detail:

* the control-word layout and every encoding;
* 32 registers, two read ports and **two write ports** (so both ALUs can
  retire in one cycle);
* operand sources: bus 1, bus 2 or the constant for ALU/ALU2/multiplier/
  divider; memory addresses also from the ALU output registers;
* the divider is a radix-2 restoring divider of this design, unsigned,
  zero-extended results (the upper 16 result bits are constant zero), and
  division by zero yields quotient 0xFFFF and the dividend as remainder;
  the original used a vendor divider core;
* a single-cycle multiplier returning the low 32 bits;
* data and control memories are plain inferred arrays (4096 and 1024 words)
  instead of vendor memory cores; the host port, load port, start/halt and
  cycle counters are additions for use and measurement;
* the only run-time interlock is the divider wait bit.

Not included: the compiler that turns C code into control words, and the
BuDDy C library the original evaluation compiled with it. Programs are
composed by hand with `tb/nisc_asm_pkg.sv` and the macro assembler in
`tb/tb_nisc_bdd.sv`, so cycle counts reflect hand scheduling, not
compiler output.

Sizes to keep in mind:

* The package's memory map reserves room for 640 nodes of 4 words within
  the 4096 data words. A 7x7 multiplier, the largest size for which the 16-bit
  divider was argued to suffice, needs many thousands of nodes. It would
  need `DMEM_DEPTH` of 65,536 and a larger node table in the program.
* The divider works on 16 bits, so a hash is reduced to its low 16 bits
  before the modulo.

## Verification

Each module has a self-checking testbench that ends with a `TB_RESULT` line:

* ALU, multiplier, comparator: reference functions over corner and random
  operands, every operation and every comparator operand source.
* Register file, data memory, control memory: random traffic against a
  shadow array.
* Divider: random and corner operands, exact 16-cycle latency, restart while
  busy, division by zero.
* Controller: random control words, status, addresses and divider-busy,
  checked every cycle against a model of the next-address rules and the
  counters.
* Data path: random control words against a cycle-level model of the whole
  data path (registers, output registers, divider timing, memory, status).
* `tb_nisc_top`: a hand-scheduled program with the shape of a BDD package's
  core: a recursive routine with stack frames and a direct-mapped result
  cache whose index is `((n*40503) >> 1) mod P` computed with the
  multiplier, a shift and the divider (memoised Fibonacci). Seven runs with
  different `n` and `P` check the result, the call and cache-hit counts
  against a model, that every division stalls exactly 12 cycles (16-cycle
  latency minus 4 scheduled words), and that cycles = executed + stalled + 1.
  It counts every mechanism (divider wait, taken branch, return through
  bus 1, forwarded compare, both ALUs in one cycle, both write ports in one
  cycle, cache hit, halt) and fails if one never occurs. It uses the top at
  its default parameters.
* `tb_nisc_bdd`: the BDD package described above, at default parameters.
  It is the full-size end-to-end test. It also checks that every division
  waits exactly 16 cycles minus the words scheduled under it, and that the
  tuned schedule beats the plain one on total, entry/exit and division
  cycles.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/nisc_pkg.sv tb/nisc_asm_pkg.sv tb/tb_nisc_top.sv \
    --top-module tb_nisc_top -o sim
./obj_dir/sim
```

`tb_nisc_bdd` builds the same way with `tb/tb_nisc_bdd.sv` and
`--top-module tb_nisc_bdd`; it runs in under a second. The other
testbenches build the same way with their own top module
(`tb/nisc_asm_pkg.sv` is only needed by `tb_nisc_top` and `tb_nisc_bdd`). Verilator finds the
remaining modules through `-Irtl`.

To write a program, compose words with the helpers. For "ALU computes
r1 + r2 while ALU2 computes r2 - 4":

```
c = k(alu2(alu(rd(nop(), 1, 2), ALU_ADD, OP_B1, OP_B2), ALU_SUB, OP_B2, OP_IMM), 4);
```

then write both results back in the next word with
`wb1(wb0(nop(), 3, WB_ALU), 30, WB_ALU2)`. A word has one constant field,
shared by every unit that selects it.
