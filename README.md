# Modulo-scheduled loop accelerator for a soft processor

A small embedded processor spends most of its time in a few inner loops. This design moves
those loops, transparently, onto a coprocessor built for them. The coprocessor is a row of
single-operation functional units (FUs). It runs the loop *modulo-scheduled*: a new iteration
starts every II cycles (the initiation interval) while earlier iterations are still in flight.
The application binary is never changed. A small "injector" watches the processor's
instruction fetches. When the processor reaches the start of an accelerated loop, the injector
substitutes a branch to a short communication routine. That routine sends the live registers
to the accelerator and waits for the results.

The SystemVerilog here is a complete, synthesizable system at the sizes of the reference
platform (128 KiB of local memory, 32-bit datapath). It contains one generated accelerator
*instance* that runs five different loops. The host processor itself (a MicroBlaze in the
reference system) is not included: its buses are ports of the top module, and the system
testbench plays its part.

## How a loop gets to the accelerator

```
            instruction bus                      data bus
  host ───────────────┐                  ┌──────────────── host
                 ┌────▼─────┐            │
                 │ injector │─cmd─┐      │
                 └────┬─────┘     │      │
              ┌───────▼──┐   ┌────▼──────┴─┐   ┌──────────┐
  BRAM port B─┤ bus mux  │   │ accelerator │   │ bus mux  ├─BRAM port A
              └───────▲──┘   └─▲──port1  port0──▶───▲─────┘
                      └────────┘            │       │
                 FSL put ──▶ accelerator ──▶ FSL get (host)
```

1. The host fetches the first instruction of an accelerated loop. In the next cycle the
   injector returns `brai CR` instead (0xB808_0000 | routine address). It also hands the
   loop's *command word* to the accelerator.
2. The communication routine pushes the loop's live-in registers into the FSL (fast simplex
   link) FIFO. It then blocks on an FSL read.
3. After the expected number of operands has arrived, the accelerator raises `mem_own`. The two
   bus multiplexers then connect both memory ports to the accelerator's two load/store units.
   The blocked host does not notice that it has lost the memory.
4. The loop runs until one of its exit conditions fires. The accelerator then drains the
   iterations already in flight and releases the memory. It sends its output registers, in
   order, over the return FSL.
5. The routine copies the results into the host registers and jumps back to the loop start.
   The injector lets exactly this one fetch through, so the host runs the final, exiting
   iteration itself.

When `inj_enable` is low, the injector is transparent and the binary runs unaccelerated.

## Execution model

### Schedule, passes and stages

An iteration of a loop is a data-flow graph of host instructions. Each operation is assigned
to a unit and a *time step* `lt` inside the iteration. With initiation interval II, step `lt`
belongs to stage `lt / II` and slot `lt % II`. A loop of T steps has `S = ceil(T/II)` stages.

The configuration memory holds one word per cycle, grouped into *passes* of II words:

| passes | phase | content |
|---|---|---|
| 0 … S−1 | prolog | pass p holds stages 0…p (iterations 0…p are in flight) |
| S | steady state | all stages. Its last word carries the **address update** II−1, which jumps back to the first word of the pass |
| S+1 … 2S−1 | epilog | only the older stages, so in-flight iterations can finish |

The words are produced as the design intends. The schedule of *one* iteration is written as a
table, and the full prolog/steady/epilog sequence is obtained by repeating it every II steps.
This is done at elaboration time by `cfg_word()` in `rtl/lpa_inst_pkg.sv`, so there is no
data file. The prolog has one pass per stage. This way every operation of the first iteration
finds its loop-carried operands in the input registers instead of the pool.

### Exits and discarded iterations

Exit units evaluate the loop's branch conditions in every iteration. The iteration that
triggers an exit must leave no trace. Younger iterations already started must not either.
Older iterations must complete. Each configuration word therefore tags every enable, output
FIFO push and "iteration complete" bit with the **stage** of the iteration it belongs to. The
controller keeps one valid bit per stage (`iv`):

* At the start of each pass the bits shift up by one. A new iteration enters stage 0 only if
  no exit has been seen.
* In the cycle an exit fires, stages 0 up to the exit's stage are killed at once. So a store
  in that same cycle from the exiting or a younger iteration is suppressed (`iv_live`).
* After an exit, the address update is ignored, and the words run on through the epilog
  until the word marked `done`.

Register-chain writes are not masked. A discarded value may enter a chain, but nothing live
reads it, and it never reaches an output register.

### Register pool and multiplexers

Each unit drives its own short **chain** of pool registers. A write shifts the chain, but each
register has its own write enable. A value therefore only moves as far as the last position
someone still needs. Because the schedule is static, every value's position at every cycle is
known when the instance is generated. Each unit input gets a multiplexer wired *only* to the
input registers, pool registers and constants it ever reads. The multiplexer is steered by
one-hot (hot-bit) select bits in the configuration word. An input with a single source has no
multiplexer. In this implementation the write-enable pattern of a chain is the same in every
pass, including prolog and epilog. Chain positions therefore do not depend on the phase.

### Output FIFOs

An output register must end up holding the value of the last *completed* iteration. But the
unit that produces it may already have computed the values of one or two later iterations.
Each output register therefore has a small FIFO in front of it:

* The unit's result is pushed when it is produced, if the iteration is live.
* On each "iteration complete" bit, the oldest entry moves into the register. If the value is
  produced in the completion step itself, it bypasses the FIFO.
* At command start each output register is loaded from an input register chosen by the
  command. So an exit in the very first iteration returns the unchanged live-ins.

### Configuration word (`cfg_word_t`)

| field | per | meaning |
|---|---|---|
| `en` | unit | unit issues an operation this cycle |
| `fn[2:0]` | unit | operation modifier: load/store kind, fadd/fsub, fint/flt |
| `stg` | unit | stage of the issuing iteration |
| `sel` | unit input | hot-bit multiplexer select |
| `we` | pool register | write enable |
| `push`, `push_stg` | output | push the feeding unit's result into the output FIFO |
| `commit`, `commit_stg` | word | an iteration completes |
| `newpass` | word | first word of a pass (advance the stage valid bits) |
| `addr_upd` | word | steady state: jump back by this many words unless an exit was seen |
| `done` | word | last word of the loop's sequence |

The command word (`cmd_t`) holds the loop's first word address, the number of operands and
results, the unit feeding each output FIFO, and the input register that initializes each
output register.

## The instance

`rtl/lpa_inst_pkg.sv` describes one generated instance. It lists 16 units (two load/store,
integer add, shift right, shift left, compare, or, two exit units, fmul, fadd, imul, divide by
10, conversion, integer divide, fp divide). It also gives the chains (17 pool registers), the wiring of every
multiplexer, the constants 1, 4 and −1, and the five loop schedules (322 of 512 configuration words):

| loop | body (host registers) | II | steps | stages | words |
|---|---|---|---|---|---|
| 0 | `r4=MEM[r3]; r3+=4; r10=r4>>r6; r9'=r4<<r12; t=r10\|r9; r8+=4; MEM[r8]=t; r5+=1; r18=cmp(r5,r19)`, exit unless `r18>=0` | 3 | 5 | 2 | 12 |
| 1 | `a=MEM[r5]; b=MEM[r6]; r7-=1`, exit if `r7==0`, `r5+=4; r6+=4; r3+=a*b` (single precision) | 4 | 9 | 3 | 24 |
| 2 | `x=MEM[r3]; r5-=1`, exit if `r5==0`, `r3+=4; r4+=4; MEM[r4]=flt((x*r6)/10)` | 3 | 8 | 3 | 18 |
| 3 | `x=MEM[r3]; r5-=1`, exit if `r5==0`, `r3+=4; r4+=4; MEM[r4]=x/r6` (signed) | 35 | 38 | 2 | 140 |
| 4 | as loop 3, with `MEM[r4]=x/r6` in single precision | 32 | 35 | 2 | 128 |

Loop 0 is the standard example graph for this kind of accelerator. Its II is set by the
shift/or recurrence through `r9`. Loop 1's II is set by the 4-cycle fadd recurrence. Loop 2
has three additions on one adder. Loop 3's II is set by the non-pipelined 35-cycle divider, loop 4's by the 32-cycle fp divider.

A loop that exits after E completed iterations runs for `II·(E+S)` cycles when `E ≥ S`, and
for `2·S·II` cycles otherwise. The testbenches check this exactly (`run_cycles`).

### Units and latencies

Latency L means: issued in cycle t, the result is in the unit's chain from cycle t+L on.

| unit | module | latency | pipelined |
|---|---|---|---|
| integer (add, rsub, and, or, xor, shifts, cmp, cmpu) | `lpa_fu_int` | 1 | combinational |
| integer multiply (low word) | `lpa_fu_imul` | 1 | combinational |
| exit condition (eq, ne, lt, le, gt, ge against zero) | `lpa_fu_exit` | — | combinational |
| load/store (word, halfword, byte; big-endian lanes) | `lpa_lsu` | 2 | yes |
| division by a constant (reciprocal multiply) | `lpa_fu_cdiv` | 3 | yes |
| fp multiply | `lpa_fu_fmul` | 3 | yes |
| fp add/subtract | `lpa_fu_fadd` | 4 | yes |
| int ↔ float conversion | `lpa_fu_fconv` | 1 | combinational |
| integer divide (signed/unsigned) | `lpa_fu_idiv` | 35 | no |
| fp divide | `lpa_fu_fdiv` | 32 | no |

The floating-point units round to nearest even and treat denormal operands as zero. They flush
denormal results to zero and return the quiet NaN 0x7FC00000 for invalid operations. Other units keep working while a non-pipelined divider is busy, because the schedule
knows when its result appears. Loop 3 uses the integer divider and loop 4 the fp divider. While
a divider is busy, the load, adder, exit unit and the store of the previous iteration keep
issuing; the system testbench counts those cycles for each divider.

## Files

| file | block |
|---|---|
| `lpa_system.sv` | top: memory, bus multiplexers, injector, FSL links, accelerator |
| `lpa_accel.sv` | the accelerator datapath, generated from the instance package |
| `lpa_ctrl.sv` | controller: command, operand intake, word sequencing, stage valid bits, result output |
| `lpa_cfg_mem.sv` | configuration memory (asynchronous-read table built from `cfg_word()`) |
| `lpa_in_regs.sv`, `lpa_in_mux.sv`, `lpa_reg_chain.sv`, `lpa_out_fifo.sv` | input registers, hot-bit multiplexer, pool chain, output FIFO and register |
| `lpa_lsu.sv`, `lpa_fu_*.sv` | units |
| `lpa_injector.sv`, `lpa_bus_mux.sv`, `lpa_dpram.sv`, `lpa_fsl_fifo.sv` | system parts |
| `lpa_pkg.sv`, `lpa_fp_pkg.sv`, `lpa_inst_pkg.sv` | types and latencies, fp arithmetic, the instance |

Every `tb/tb_<module>.sv` is a self-checking testbench that prints
`TB_RESULT checks=N failures=M`. `tb/tb_lpa_system.sv` runs the whole system at its default
sizes. It runs every loop with several trip counts, including exits in the prolog and in the
steady state, plus a fetch with the injector disabled. It counts how often each mechanism
happened: injection, return fetch, loop-back, suppressed store, FIFO bypass, memory hand-over,
issue while a divider is busy, and so on. It fails if any mechanism never occurred.

`tb/tb_lpa_workloads.sv` runs the single-precision inner product over 1024 and 4096 elements
and the example loop over 1024 words, also at the default sizes. The host model executes the
last iteration after the hand-back, so the whole kernel result is compared with a reference.
The accelerator keeps one iteration every II cycles throughout.

## Simulating

With Verilator 5 (packages first; `-y rtl` finds the modules):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/lpa_pkg.sv rtl/lpa_fp_pkg.sv rtl/lpa_inst_pkg.sv tb/tb_lpa_system.sv \
  -y rtl --top-module tb_lpa_system -Mdir obj -o sim && obj/sim
```

Replace `tb_lpa_system` with any other testbench name. Each runs in seconds.

## Changing the instance

Everything instance-specific is in `lpa_inst_pkg.sv`:

* the unit list (`FU_KIND`, `FU_INTOP`, `FU_BRCOND`, `FU_DIVISOR`);
* the chains (`CH_BASE`, `CH_LEN`);
* the multiplexer source lists (`SRC`);
* the per-loop tables `OPS`, `PUSHES`, `LOOP_*`, `OUT_FU` and `OUT_INIT`.

An `OPS` entry names a unit, an issue step and, for each operand, its multiplexer position in
the steady state (`a`, `b`) and in the first iteration (`a0`, `b0`). Working these positions
out is the generator's job. It means tracking where every value sits in the chains at each
slot of the pass. There is no tool for it here, so a new loop must be scheduled by hand the
same way as the five given. `lpa_ctrl` asserts that the select fields are one-hot. The
injector's loop-start and routine addresses are parameters of `lpa_injector`.

## Where this departs from the reference design

* **Latencies.** The integer divider has 35 cycles. The reference description also quotes 31
  in one place.
* **Schedule of the example loop.** Its textbook schedule assumes single-cycle memory. Here
  it is redone with the 2-cycle load latency that the real memory has. As a result, the
  adder's chain has 3 registers instead of 4.
* **Own additions.** The stage tags and per-stage valid bits, the extra prolog pass, the
  output-register initial values, the injector's one-time pass of the return fetch, and the
  operand/result ordering on the links are this design's own. The reference design states
  the behaviour but not the mechanism.
* **Conversion unit.** Float↔int conversion is one unit with a direction bit. Its latency (1)
  is chosen here.
* **Memory.** A fixed-latency memory is assumed. There is no stall for slow memory accesses.
* **Not built.** The offline tools that find loops in instruction traces and generate
  instances are not built. Neither are the host processor and its peripherals.
* **No hazard checks.** As in the reference design, memory hazards between iterations are
  not checked in hardware. The schedule must respect them.
