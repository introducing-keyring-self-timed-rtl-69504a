# KeyV: a self-timed RV32IM processor built on a KeyRing

KeyV runs RISC-V RV32IM code with no global clock. Six multicycle execution
units (EUs) take turns on one set of shared resources: the program counter,
decoder, register file, ALU and load/store unit. Each EU holds one instruction
at a time. A grid of small handshake cells, the **KeyRing**, gives every stage
of every EU its own local clock. It lets a stage fire only when its inputs are
final and only when no other EU is using the same resource. Instructions
overlap across EUs the way they overlap across stages in a pipeline. Each
clock is timed by a local delay element, not by a worst-case global period.

This repository holds synthesizable SystemVerilog for the ring, the core and
its resources. It also holds a behavioural model of the delay element and
self-checking testbenches for every part.

## The KeyRing

### Keys and Key units

Each grid position (EU `e`, stage `s`) has a **Key unit** (`keyring_ku`). A
Key unit holds one bit, its **Key**, in a toggle flip-flop. Every firing
flips the Key. The Key is a transition signal: a change means "this stage has
run once more".

A unit watches three Keys:

* **A**: the Key of the previous stage of the same EU, `(e, s-1)`.
* **B**: the Key of one stage of the previous EU, `(e-1, s+α-1)`. Indices
  wrap around in both directions, so the grid is a torus.
* Its own Key, fed back through a short delay.

Each input is compared with the own Key by XOR. When both comparisons show
the input has moved on, and the enable is high, the local clock `C` goes high.
Its rising edge toggles the Key. The toggled Key comes back through the
feedback delay and takes the clock low again. That feedback delay sets the
pulse width. Every Key also passes through a **delay element** (DE,
`keyring_delay`) before it reaches the units that wait for it. The DE delay
stands for the logic delay of the stage the Key closes.

### Which comparison means "ready"

All Keys reset to 0. Only unit (0,0) may fire first, so the "ready" value of
each XOR cannot be the same everywhere. A unit counts an input as ready when:

* input A: `A ^ own == (s != 0)`;
* input B: `B ^ own == parity((e != 0) + (s+α-1 >= S))`.

These values come from the order in which the ring fires from an all-zero
reset. The ring sets them per position through the `POL_A`/`POL_B`
parameters. `tb_keyring` checks the resulting firing order against a
pulse-count model of the dependencies.

### Concurrency and the α parameter

With the rule above, unit (e,s) fires in the same wave as every unit with
equal `F(e,s) = (s + α·e) mod S`.

* With α = 1, EU `e` runs stage `s` while EU `e+1` runs stage `s-1`. This is
  a pipeline made of whole EUs.
* A larger α spaces the EUs further apart.

Each stage row must be used by one EU at a time, so E, S and α must satisfy
`α·E = λ·S` for some λ in 1..α. E is then the number of instructions in
flight.

Two configurations are supported:

| name    | E | S | α | instructions in flight |
|---------|---|---|---|------------------------|
| KeyV661 | 6 | 6 | 1 | 6 (default)            |
| KeyV362 | 3 | 6 | 2 | 3                      |

### `sel` and enables

The ring also reports which EU owns each stage row next. This is `sel[s]`, a
one-hot vector taken from the Keys of that row. The crossbar uses it to steer
the resource of the row.

Every unit also has an enable input. A low enable keeps the unit from
starting its next pulse. It never cuts a pulse short. Holding one unit
eventually stalls the whole ring through the dependencies; no extra control is
needed.

## The KeyV core (`keyv_core`)

### Stages and resources

Each EU (`keyv_eu`) has six stage registers: Fetch, Decode, Register read,
Execute, Memory and Write. Each is clocked by its own KeyRing clock. The
clocks of one stage are ORed across all EUs and drive the resource of that
stage:

| stage | resource                | module                      |
|-------|-------------------------|-----------------------------|
| F     | PC, instruction memory  | `keyv_pc` (memory is external) |
| D     | decoder                 | `keyv_decode`               |
| R     | register file           | `keyv_regfile`              |
| E     | ALU, branch unit, mul/div | `keyv_alu`, `keyv_muldiv` |
| M     | LSU, data memory, SYS   | `keyv_lsu`, `keyv_sys`      |
| W     | retire only             | —                           |

### The crossbar

The crossbar (`keyv_xbs`) connects resources and EUs. For every row it takes
the stage register of the EU named by `sel` and feeds it to the resource of
that row. All EUs listen to the same result buses, and only the clocked EU
captures them.

### Register write-back

Writes to the register file happen at R, not at W. The result an EU retired
at W is written when the same EU next runs R. So the register file has one
clock, the ORed R clock, and never sees two stage clocks fight over it.

### Memories

The instruction and data memories are outside the core.

* The instruction address is stable between Fetch pulses, and the word is
  captured at the EU's F clock.
* The data memory reads combinationally and writes at the ORed M clock
  (`dmem_clk_o`).

The testbench uses `tb_keyv_mem`, a 256-word model of each memory.

## Hazards

This is the hardest part of the design to follow. Each instruction carries:

* a 16-bit **sequence number**, in fetch order;
* a 2-bit **epoch**.

### Data hazards: forwarding and the R hold

An instruction at R may need a result from one of the E-1 instructions
fetched just before it. Those instructions sit in other EUs.

1. For each source register, the crossbar looks at the R-stage records of the
   other EUs. It picks the youngest live one that is older than the reader and
   writes that register.
2. That EU has produced the result once its E Key (its M Key for loads and CSR
   reads) matches its R Key, meaning the later stage has also fired. The value
   is then taken from that EU's E (or M) register.
3. If no other EU has it, the value comes from the reader's own previous
   instruction, which is being written back in this same R stage.
4. Otherwise the value comes from the register file.

If a needed value does not exist yet, the crossbar lowers `ready`. The R unit
of that EU is held until it does. The testbench counts these holds
(`R holds`) and the forwards.

### Control hazards: branches, kills and refetch

Branches are predicted not taken. The branch outcome is computed at E and acted
on at M.

On a taken branch or jump:

* the epoch advances;
* the branch's sequence number is recorded as the end of the old epoch;
* the target is saved.

Instructions already fetched from the old epoch and younger than the branch
are **dead**. They flow through their EUs but write nothing: no register, no
memory, no counter. Until the branch's own EU fetches again, the other EUs
fetch bubbles. The branch's EU then fetches the target, and sequential
fetching resumes from there.

With α = 2 the branch's EU fetches the target in the same wave as the
redirect, so KeyV362 fetches no bubbles.

### Multiply and divide: the inner ring

MUL, MULH*, DIV* and REM* take 32 steps in `keyv_muldiv`. The steps are
clocked by an **inner KeyRing**: the same `keyring` module with
E = S = α = 1, one unit that re-arms itself.

1. The inner ring runs while a live mul/div waits at E.
2. It stops after 32 pulses.
3. It reports done once its last Key has settled through its delay element.

Meanwhile the E unit of that EU is held, and the main ring stalls behind it.
A new operation is recognised by a new sequence number, so the inner ring
needs no reset of its own.

## System unit, counters and halting

`keyv_sys` counts retired live instructions (`instret`) on the M clock. It
counts cycles of a free-running `perf_clk_i`. Both counters can be read with
`csrr` (`cycle`, `time`, `instret`, their upper halves and the machine-mode
aliases). CSR writes, traps and interrupts are not implemented.

An `ecall` or `ebreak` that retires sets `halted_o` and stops the Fetch row.
The instructions already in flight finish.

## Files

| file | role |
|------|------|
| `rtl/keyring_pkg.sv` | dependency and ready-polarity functions of the ring |
| `rtl/keyring_ku.sv` | Key unit |
| `rtl/keyring_delay.sv` | delay element, behavioural (`#` delay), not synthesizable |
| `rtl/keyring.sv` | E×S ring with delay elements and `sel` |
| `rtl/keyv_pkg.sv` | stage numbers, decoded-instruction and stage-record types, kill test |
| `rtl/keyv_eu.sv` | one execution unit |
| `rtl/keyv_xbs.sv` | crossbar, forwarding, write-back and hold requests |
| `rtl/keyv_pc.sv` | fetch addresses, redirect, epochs |
| `rtl/keyv_decode.sv`, `rtl/keyv_regfile.sv`, `rtl/keyv_alu.sv`, `rtl/keyv_muldiv.sv`, `rtl/keyv_lsu.sv`, `rtl/keyv_sys.sv` | shared resources |
| `rtl/keyv_core.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_keyv_core.sv`, `tb/tb_keyv362.sv` | whole-core tests in the two configurations |
| `tb/tb_keyv_prog_pkg.sv`, `tb/tb_keyv_mem.sv` | instruction encoder, test program, memory models |

The top has these parameters:

* `E` and `ALPHA`: the ring shape. S is fixed at the six stages.
* `DE_DELAY` and `FB_DELAY`: the main ring's delay element and feedback delay.
* `MD_DE_DELAY` and `MD_FB_DELAY`: the same delays for the inner ring.
* `RESET_PC`: the first fetch address.

Delays are in simulation time units.

## Simulating

Timing behaviour comes from `#` delays, so Verilator needs `--timing`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/keyring_pkg.sv rtl/keyv_pkg.sv tb/tb_keyv_prog_pkg.sv tb/tb_keyv_core.sv \
  --top-module tb_keyv_core -Mdir obj_core
obj_core/Vtb_keyv_core
```

Each testbench ends with a line like this:

```
TB_RESULT checks=<n> failures=<m>
```

### What the whole-core test does

`tb_keyv_core` runs the core at its default size (KeyV661). The program
includes:

* a summing loop;
* each mul/div kind, including division by zero;
* byte and halfword loads and stores;
* back-to-back load-use pairs;
* a call and return;
* a `csrr instret`.

It then checks:

* sixteen words of data memory against hand-computed values;
* the retired-instruction count;
* that Fetch pulses rotate through the EUs in order;
* that each mechanism happened: R holds, E holds (exactly one per mul/div),
  32 inner-ring pulses per mul/div, forwards, redirects, killed instructions
  and fetch bubbles.

`tb_keyv362` runs the same program with `E=3, ALPHA=2`.

## How far to trust it, and where it differs from the published KeyV

All testbenches pass. Each was also run against a deliberately broken copy of
its module and caught the fault. All of it is functional simulation with
idealised delays. There is no gate-level timing and no checking of the
relative-timing constraints a real KeyRing needs.

Departures from the published description, and choices it leaves open:

* **PC clocking.** The published description clocks the PC by the W clock.
  Here the fetch address advances at F and the redirect is taken at M. With
  α = 1 the next EU fetches before this EU reaches W, so a W-clocked PC could
  not supply the next address in time.
* **Data hazards.** The original only says that the crossbar resolves them.
  The forwarding rule, the use of Key comparisons to tell whether a result
  exists, and holding the R stage are this design's choices.
* **Flushing.** The epoch and sequence-number kill scheme is this design's.
  The published behaviour is kept: the other EUs are flushed, and the
  branch's own EU fetches the target.
* **Delays.** Delay elements are uniform per ring and given as parameters. In
  a real implementation each DE is sized from static timing analysis of the
  logic it covers. That flow is not part of the RTL.
* **Reset and readiness.** The reset state, the ready-polarity rule and the
  per-unit enable are this design's.
* **mul/div.** Shift-add multiplication and restoring division are this
  design's choice. Only the 32-step count is given.
* **Cycle counter.** It runs from a free-running input clock and is not
  synchronised with the M stages.
* **Halting.** Halting on `ecall`/`ebreak` is added so a program can end.

Not built:

* the synthesis and timing-constraint flow;
* the synchronous comparison pipeline;
* CSR writes, exceptions and interrupts;
* misaligned memory accesses.

No compiled benchmark such as CoreMark is included. The memories are external
models, so program size is limited only by the memory attached.
