# Bit-serial adder processor

A minimal processor that computes `A = A + B` for two N-bit 2's complement
numbers with a single one-bit full adder, one bit per clock. It is a
textbook example of how a processor splits into a **datapath** (registers,
a combinational operator, a loop counter) and a **control unit** (an
algorithmic state machine that sends opcodes to the datapath). It trades
speed for area: an N-bit addition takes N clocks. In exchange, the whole
arithmetic unit is one full adder, one carry flip-flop and a small counter.

The algorithm it implements:

```
A = AA; B = BB; c = 0;
for k = 0 .. N-1:
    (d, s) = A[0] + B[0] + c;      // one full adder
    c = d;
    A = shr(s, A);                 // shift right, sum bit enters the MSB
    B = shr(B[0], B);              // rotate right
```

Instead of selecting bit `k` with an N-to-1 multiplexer, both registers
shift right every step, so the bit being added is always bit 0. The sum bits
enter A from the top. After N steps the sum is in A. B has made a full
rotation, so it holds its original value again.

## Structure

```
                 +---------------- control_unit ----------------+
  st  ---------->|  STT (1 flip-flop)   nxtSt = ~STT&st | STT&~zk |---> rdy = ~STT
  rst ---------->|  op = STT                                     |
                 +-------------------------+---------------------+
                                    op     |        ^ zk
        +--------------------------+-------+-------+-----------------+
        |                          |               |                 |
   aa ->| shift_reg A  --A[0]-->+--------------+   |  step_counter   |
        |   ^ sin = s           | full_adder   |   |  load N-1,      |
   bb ->| shift_reg B  --B[0]-->|  s, d        |   |  count down,    |
        |   ^ sin = B[0]        +--------------+   |  zk = (k == 0)  |
        |                    c ^      | d          |                 |
        |                 carry_reg <-+            +-----------------+
        +---------------- serial_adder_datapath --------------------+
```

| Module | File | Role |
|---|---|---|
| `serial_adder` | `rtl/serial_adder.sv` | Top: control unit plus datapath |
| `control_unit` | `rtl/control_unit.sv` | Two-state machine, next-state logic, opcode logic, `rdy` |
| `serial_adder_datapath` | `rtl/serial_adder_datapath.sv` | Registers A, B, C, the full adder and the step counter |
| `shift_reg` | `rtl/shift_reg.sv` | N-bit register: load or shift right with a serial input (used for A and B) |
| `full_adder` | `rtl/full_adder.sv` | One-bit full adder |
| `carry_reg` | `rtl/carry_reg.sv` | One-bit carry register: clear or load |
| `step_counter` | `rtl/step_counter.sv` | Down counter that marks the last step with `zk` |
| `serial_adder_pkg` | `rtl/serial_adder_pkg.sv` | State and opcode enums |

## One opcode for the whole datapath

This is the least obvious part of the design. Every datapath block does
exactly two things: one while the controller waits (state STA), the other
while it adds (state STB). So a single opcode bit is enough, and it is the
state bit STT itself. There is no opcode decoder.

| Block | `op = OP_INIT` (STA) | `op = OP_STEP` (STB) |
|---|---|---|
| A register | load `aa` | shift right, `s` enters MSB |
| B register | load `bb` | rotate right |
| carry register | clear | store adder carry `d` |
| step counter | load N-1 | decrement |

The consequence is that the datapath is reloaded on **every** clock spent in
STA, not only when a start arrives. The operands must be valid on the clock
edge at which `st` is seen.

## Control unit

| st | zk | STT | next |
|:-:|:-:|:-:|:-:|
| 0 | - | STA | STA |
| 1 | - | STA | STB |
| - | 0 | STB | STB |
| - | 1 | STB | STA |

`nxtSt = ~STT & st | STT & ~zk`. `rst` is synchronous and active high, and
it resets only the state register. The rest of the datapath needs no reset
because STA reloads it.

## Timing

```
clk edge:        0     1     2    ...    N     N+1
state (during): STA   STB   STB   ...   STB    STA
st:              1     x     x           x     (1 = start again at once)
rdy:             1     0     0           0     1
zk:              0     0     0           1     0
a:             (old) loading/shifting ...      aa+bb  <- valid this clock only
```

* `st` is sampled at a rising edge while `rdy = 1`. The same edge loads `aa`
  and `bb`.
* The processor is busy (`rdy = 0`) for exactly **N clocks**. It does one bit
  in each clock, including the clock in which `zk` is high.
* In the first clock with `rdy = 1` again, `a = aa + bb mod 2^N` and `b = bb`.
  A is reloaded from `aa` at the end of that clock, so the result has to be
  taken in that clock. If `st` is still high, the next addition starts at
  the same edge, so a held `st` gives one result every N+1 clocks.
* The carry out of the MSB and 2's complement overflow are not reported. The
  sum wraps modulo 2^N. The final carry stays in the carry register for the
  one ready clock, but it is not brought out.
* The top holds a concurrent assertion, `a_busy_n_clocks`, of the rule that a
  start leads to exactly N busy clocks.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N` (top, datapath, `shift_reg`, `step_counter`) | 8 | Operand width in bits; also the number of steps |
| `W` (`step_counter`) | `$clog2(N)+1` | Counter width |

The algorithm leaves the width open. 8 is a chosen default, and any N ≥ 2
works.

## Where this RTL makes its own choices

* **Number of steps.** One way to write the loop bound gives N+1 iterations,
  with a counter loaded with N and stopping at zero. B is restored only after
  N rotations, though, and the registers shift in every STB clock, including
  the one that ends the loop. This RTL therefore loads the counter with
  **N-1** and makes exactly N steps. With N+1 steps, A would end up rotated by
  one position and B would not be restored.
* **Status output `rdy`.** It is the inverse of the state bit. The general
  design calls for a "ready" status signal without defining one for this
  example.
* **Port `b`.** Register B is brought out only so that its restoration can be
  seen.
* **Reset.** It is synchronous and active high. No reset polarity or style is
  specified.
* **Holding the result.** The result is valid for one clock because every
  opcode follows the state. This RTL keeps that behaviour rather than adding
  a result register or gating the load with `st`. A user who needs the sum
  for longer should capture `a` when `rdy` rises.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_full_adder` | All 8 input combinations |
| `tb_shift_reg` | Random loads and shifts against a model at N = 8 and 13; N rotations restore the value |
| `tb_carry_reg` | Clear and load against a model |
| `tb_step_counter` | `zk` rises on exactly the N-th step, at N = 8 and 5, including after an interrupted count |
| `tb_control_unit` | Random `st`/`zk`/`rst` against the state table; every row exercised |
| `tb_serial_adder_datapath` | One OP_INIT clock then N OP_STEP clocks; checks sum, restored B and `zk` timing at N = 8 and 4 |
| `tb_serial_adder` | End to end at the default N = 8, exhaustively over all 65 536 operand pairs |

`tb_serial_adder` also checks the N-clock busy period and the result in the
first ready clock. It counts each behaviour of the design and fails if any
count is zero: waiting in STA, carries between bits, a dropped carry out of
the MSB, signed overflow, back-to-back starts with `st` held high, and a
reset during an addition. It runs in under a second.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/serial_adder_pkg.sv tb/tb_serial_adder.sv --top-module tb_serial_adder
./obj_dir/Vtb_serial_adder
```

Substitute any testbench name. Every testbench that uses the enums needs the
package listed first.

## Synthesis size (N = 8)

The top has 22 flip-flop bits: A (8), B (8), the carry (1), the counter (4)
and the state (1). It also has one 4-bit subtractor, the full adder's gates
and the load/shift multiplexers.
