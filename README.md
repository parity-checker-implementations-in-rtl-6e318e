# Parity checker: two cooperating FSMDs and six One's Counter schedules

The circuit answers one question about a 32-bit word: does it hold an odd
number of ones? It outputs 1 if so and 0 otherwise. It does this in two
halves, and each half is a finite-state machine with a datapath (FSMD):

* the **Even Checker** talks to the outside world (`Inport`, `Start`,
  `Outport`, `Done`);
* the **One's Counter** counts the ones in the word by testing bit 0 and
  shifting right until the word is zero.

The two halves run concurrently, possibly on different clocks. They talk only
through two four-phase handshakes.

The One's Counter is the interesting half. Its loop body has three operations
and a test: AND with the mask, add to the count, shift right, compare with
zero. It is built here six times, once for each of six resource allocations.
The allocations range from one unit per operation down to a single ALU with a
register file. Some use two-stage pipelined ALUs and shifters. All six have
the same ports and compute the same function. They differ in how many clock
cycles a word takes and in how much hardware they use, and that trade-off is
what the design explores.

## Files

| file | contents |
|---|---|
| `rtl/parity_pkg.sv` | widths, ALU and shifter operation codes |
| `rtl/parity_top.sv` | the six parity checkers side by side (top level) |
| `rtl/parity_checker.sv` | Even Checker + one One's Counter + clock-domain synchronizers |
| `rtl/even_checker.sv` | the Even Checker FSMD |
| `rtl/ones_counter_ref.sv` | One's Counter, one unit per operation |
| `rtl/ones_counter_d1.sv` … `d5.sv` | One's Counter, Designs 1–5 |
| `rtl/alu.sv`, `rtl/alu_pipe.sv` | library ALU, combinational and 2-stage pipelined |
| `rtl/shifter.sv`, `rtl/shifter_pipe.sv` | library shifter, combinational and 2-stage pipelined |
| `rtl/reg_file.sv`, `rtl/reg32.sv`, `rtl/bus_mux.sv` | register file, register, shared bus |
| `rtl/sync_ff.sv` | flip-flop synchronizer for the handshake signals |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/ones_harness.sv` | shared test body for the six One's Counters |

## The handshake between the two halves

```
            idata[31:0] ─────────────▶
            iocount[4:0] ◀─────────────
 Even       istart ──────────────────▶        One's
 Checker    ack_istart ◀──────────────        Counter
 (clk1)     idone ◀───────────────────        (clk2)
            ack_idone ───────────────▶
```

| Even Checker state | action | leaves when |
|---|---|---|
| S0 | `Done=0 istart=0 ack_idone=0` | `Start` → S1 |
| S1 | `mask=1`, `data=Inport` | always → S2 |
| S2 | `idata=data`, `istart=1` | `ack_istart` → S3 |
| S3 | `istart=0`, `ocount=iocount` | `idone` → S4 |
| S4 | `Outport=ocount & mask`, `ack_idone=1`, `Done=1` | `!idone` → S0 |

| One's Counter state | action | leaves when |
|---|---|---|
| S0 | `idone=0 ack_istart=0` | `istart` → S1 |
| S1 | `ack_istart=1`, `data=idata`, `ocount=0`, `mask=1` | always → S2 |
| S2 | `temp=data&mask; ocount+=temp; data>>=mask` | shifted `data==0` → S3 |
| S3 | `iocount=ocount`, `idone=1` | `ack_idone` → S0 |

All handshake and status outputs are decoded from the state register (Moore
outputs):

* Even Checker: `istart = (S2)`, `Done = ack_idone = (S4)`.
* One's Counter: `ack_istart = (state != S0)`, `idone = (S3)`.

So `ack_istart` stays high from S1 until the counter has been released by
`ack_idone`. It falls in the same cycle as `idone`. A request therefore never
meets a stale acknowledge.

`Outport` is the AND unit's output. While the Even Checker is in S0 or S4 the
unit's left input is `ocount`; in S1–S3 it is `data`, which also drives
`idata`. That makes `Outport` equal to
`{31'b0, parity}` from the cycle `Done` rises until the next `Start` is taken.
While a word is being processed, `Outport` shows intermediate values.

**Using it:** set `Inport`, raise `Start`, wait for `Done`, read `Outport`,
then drop `Start`. `Start` must be low again by the time `Done` falls.
Otherwise the checker starts a second round with the same `Inport`.

**Count width.** `iocount` is 5 bits, so a word of 32 ones reads as count 0.
Only bit 0 of the count (the parity) is used, and it is always right.

### Two clocks

`parity_checker` has two clocks: `clk1` for the Even Checker and `clk2` for
the One's Counter. The handshake makes this safe without synchronizing the
data:

* `idata` is stable from S1 of the Even Checker until it has seen `idone`.
  The counter loads the word before it can raise `idone`, so this holds at
  any clock ratio.
* `iocount` is stable while the counter waits in S3.

Each of the four handshake signals goes through `SYNC_STAGES` flip-flops
(default 2) in the receiving domain. Set `SYNC_STAGES = 0` when `clk1` and
`clk2` are the same clock. With `SYNC_STAGES = 0` and one clock, a word takes
exactly 2 cycles more than the One's Counter's own count, measured from the
edge that samples `Start` to the edge after which `Done` is high.

Reset (`rst`) is synchronous and active high. Hold it for at least
`SYNC_STAGES + 1` cycles of the slower clock.

## The six One's Counters

| `ONES_IMPL` | module | allocation | states | loop states | cycles, 32 ones | cycles, general word |
|---|---|---|---|---|---|---|
| 0 | `ones_counter_ref` | AND, +, >>, NOR, 4 registers | 4 | 1 | 35 | 2 + 1·(k+1) + 1 |
| 1 | `ones_counter_d1` | 1 ALU, 1 shifter, register file, 3 buses | 9 | 4 | 133 | 4 + 4·(k+1) + 1 |
| 2 | `ones_counter_d2` | 1 ALU, 1 shifter, 4 registers, 3 buses | 7 | 4 | 131 | 2 + 4·(k+1) + 1 |
| 3 | `ones_counter_d3` | 2 ALUs, 1 shifter, 4 registers, 4 of 5 buses | 5 | 2 | 67 | 2 + 2·(k+1) + 1 |
| 4 | `ones_counter_d4` | pipelined ALU and shifter, register file, 3 buses | 10 | 5 | 165 | 4 + 5·(k+1) + 1 |
| 5 | `ones_counter_d5` | 2 pipelined ALUs, pipelined shifter, 4 registers, 5 buses | 7 | 4 | 131 | 2 + 4·(k+1) + 1 |

In the last column, k is the index of the highest one in the word (k = 0 for
the word 0, which still takes one pass). A cycle count runs from the clock
edge at which S0 samples `istart` to the edge at which `idone` is first seen
high. The testbenches check every one of these numbers.

Estimated clock periods come from summing component delays along the critical
path (state register → output logic → operand read → ALU → next-state logic
or write-back). They are about 8.6 ns for Design 1, 7.9 ns for Designs 2 and
3, 5.1 ns for Design 4 and 4.4 ns for Design 5. Cycles × period ranks the
designs, fastest first: 3, 5, 4, 2, 1. The pipelined designs run faster
clocks but need more states, so they are not the fastest. These periods are
estimates for a particular component library. The RTL does not model them.

### How each design schedules the loop

The extra states (named `X0`, `X1`, …) come from spreading one reference
state over several cycles. Each design has a `ctrl_t` struct holding the
control word for the current state, written out state by state in one
`always_comb`. Bus drivers (`bus_mux`) are selected by one-hot fields of that
struct.

* **Design 1**: the register file has a single write port, so S1 is split
  into S1/X0/X1, which load `data`, then `ocount=0`, then `mask=1`. The loop
  runs S2 `temp=data&mask` → X2 `ocount+=temp` → X3 `data>>=mask` →
  X4 `data==0?`. All ALU operations share the one ALU.
  Register file entries: 0 data, 1 ocount, 2 mask, 3 temp.
* **Design 2**: the same loop, but each variable has its own register, so S1
  initializes everything in one cycle.
* **Design 3**: S2 does the AND on ALU0 and the shift in parallel. X0 does
  the add on ALU0 and the zero test on ALU1. Five buses are allocated, but
  only four carry anything, so the fifth is not built.
* **Design 4**: the ALU and shifter are two-stage pipelines. An operation
  issued in one state writes back in the next, while the next operation
  issues:
  * S2: issue AND.
  * X2: write `temp`; issue shift.
  * X3: write `data`; issue add.
  * X4: write `ocount`; issue `==0`.
  * X5: branch on the ALU's second-stage output.
* **Design 5**: the pipelined version of Design 3:
  * S2: issue AND on ALU0 and the shift.
  * X0: write `temp` and `data` (the pipeline wait).
  * X1: issue `==0` on ALU0 and the add on ALU1.
  * X2: write `ocount` and branch.

### Component library

* `alu`: operation codes are `+ - < <= > >= != == &` as 0–8, then `| ~ neg`
  as 9–11. Compares are unsigned and return 0 or 1.
* `alu_pipe`: stage 1 computes the low half-word (sum and carry, logic
  result, or low-half less-than and equal flags). Stage 2 completes the high
  half. The result appears one clock after the operands.
* `shifter`: right shift (code 0) or left shift (code 1) by a full-word
  amount. Any amount of 32 or more gives 0.
* `shifter_pipe`: stage 1 shifts by the multiple-of-8 part of the amount.
  Stage 2 shifts by the remaining 0–7 bits.
* `reg_file`: 4 × 32 bits, one write port, two combinational read ports with
  read enables. A disabled read port reads 0.
* `reg32`: a register with a write enable.
* `bus_mux`: AND-OR selection of one of N drivers. It reads 0 when idle, and
  an assertion flags two drivers enabled at once.

## Where this RTL departs from or adds to the source design

* The Moore decoding of the handshake outputs, and `ack_istart` staying high
  until S0, are this design's reading of the state diagrams.
* The synchronizers in `parity_checker` are added. The source design states
  that the halves may run at different clock rates but shows no
  synchronizers.
* The Even Checker's storage lets S1 write `data` and `mask` in the same
  cycle, with `mask` loaded from the constant 1.
* In `ones_counter_ref`, the AND result feeds the adder directly in S2. The
  `temp` register is still written, but nothing reads it, so synthesis
  removes it.
* For the pipelined Designs 4 and 5, the state counts and loop lengths are
  the source's. Which state issues and which state writes back each
  operation is this design's placement.
* Design 1 waits for `ack_idone` in S3 like the others. In the synthesized
  source, that design's S3 returned to S0 at once.
* The split points inside `alu_pipe` and `shifter_pipe` are this design's
  choice. Only the "half the ALU delay per stage" property is given.
* `parity_top` has no selection logic. It places all six implementations
  side by side so they can be compared on the same words.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Build one with Verilator 5 from the project root, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/parity_pkg.sv \
          tb/tb_parity_top.sv --top-module tb_parity_top -o sim
./obj_dir/sim
```

* `tb_parity_top`: all six checkers at default parameters. The One's
  Counter clock cycles through three regimes: a 5:4 period ratio to the Even
  Checker clock, about three times slower, and about three times faster.
  It checks every result and the latency ranking of the six designs, and
  counts each handshake wait, the zero word, the count wrap and the words
  finished in each clock regime.
* `tb_parity_checker`: one clock, no synchronizers. Checks the exact
  Start-to-Done cycle count of all six.
* `tb_ones_counter_*`: each One's Counter alone, including the 133 / 131 /
  67 / 165 / 131 cycle totals for a word of 32 ones.
* `tb_even_checker`: the Even Checker against a scripted counter that
  responds with random delays.
* `tb_alu`, `tb_alu_pipe`, `tb_shifter`, `tb_shifter_pipe`, `tb_reg_file`,
  `tb_reg32`, `tb_bus_mux`: the library components against reference
  models.

To change the data width, set `W` on `parity_top` or `parity_checker`. `W`
must be even for `alu_pipe`, and a power of two of at least 16 for
`shifter_pipe`. `iocount` is `CNT_W` = 5 bits; `parity_checker` and the
One's Counters take `CNT_W` as a parameter.
