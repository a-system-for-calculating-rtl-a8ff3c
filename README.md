# Asynchrobatic GCD engine

This is a greatest-common-divisor engine that uses Euclid's algorithm by repeated subtraction.
Two design styles are combined. The control is clockless: four-phase bundled-data
handshakes built from Muller C-elements. The data path is adiabatic. Every pipeline stage is a
Positive Feedback Adiabatic Logic (PFAL) stage, powered by its own local power-clock. That
power-clock is ramped up and down by the stage's controller whenever a data token passes.
This combination is called *asynchrobatic* logic. The engine shows that the style can carry
both halves of a program: a repetition (the `while` loop) and a decision (which operand is
larger).

The RTL follows the asynchrobatic GCD published by D. J. Willingham and I. Kale (University of
Westminster). That design uses a 16-bit data path and a 0.35 µm process. Here it is written as a
discrete-time logic model that you can simulate and synthesize. The analog parts are not modelled.
The section "Where this model departs from the circuit" lists every difference.

## The algorithm as the hardware runs it

```
while (A != B)
    (A, B) = (min(A, B), max(A, B) - min(A, B))
Z = A
```

This differs from the textbook form in two ways:

- Both comparisons (A != B and A > B) come from one comparator.
- The loop always returns the subtrahend as the new A and the difference as the new B. One
  selectable subtractor therefore serves both branches of the `if`: it computes A - B or B - A.

Operands are unsigned and must not be zero. A zero operand never terminates, as in the
algorithm itself.

## The token loop

```
 in_req/in_ack, in_a, in_b
        |
        v
   +---------+   compare row (4 stages)                      +----+   output stage
   |   MX    |-->[operand mux]-->[cmp L0]-->[cmp L1]-->[cmp L2]-->| DX |-->[Z buffer]--> out_req/out_ack, out_z
   +---------+    A,B regs      A,B buffers alongside         +----+
     ^     ^                                                   |  |
     |     |  (A,B) = (subtrahend, difference)                 |  |  A != B
     |     +--[L4]<--[L3]<--[L2]<--[L1]<--[L0]<----------------+  |
     |        subtract row (5 stages): subtractor and           |
     |        subtrahend bypass side by side                    |
     |                                                          |
     +-- select <-- [T0] <-- [flag] <----------------------------+
         loop-control path (1 bit)
```

Exactly one data token circulates at a time. It passes the compare row once per iteration. At the
end of that row the comparator has produced `A!=B` and `A>B`. The demultiplexer DX then acts on
`A!=B`:

- **A == B**: DX sends the token to the output stage, and Z = A is offered on the output channel.
- **A != B**: DX sends the token into the subtract row. The row computes `max - min` and carries
  `min` beside it. Both return to the multiplexer MX as the looped pair.

In both cases DX also forks the `A!=B` bit into the two-stage loop-control path. That bit arrives
at MX as its *select token*: 1 means "take the looped pair", 0 means "take a new pair from the
input channel". MX does nothing until it holds a select token. An input request that arrives
while the engine is busy therefore just waits.

The loop needs a token to exist before the first operation. The global reset (`rst_l`, active
low) provides it. It leaves the second stage of the loop-control path, T0, charged and holding 0
("the operands were equal"). After reset, MX therefore already has a select token, and that
token asks for new operands.

## Stages, power-clocks and the step clock

This part is what most needs understanding before reading the RTL.

**Stage controller (`swc_ctrl`).** A stage controller is a C-element:

```
pc <= C(req_in, !ack_in)
```

- `req_in` is the previous stage's `pc`.
- `ack_in` is the next stage's `pc`.
- `pc` is, all at once, the stage's power-clock level, its request to the next stage and its
  acknowledge to the previous one.

A chain of controllers is therefore a four-phase Muller pipeline. A stage charges only when its
predecessor holds data and its successor is empty. It discharges only when its predecessor has
returned to zero and its successor has taken the data.

**Data stage (`pfal_reg`).** A PFAL gate evaluates while its power-clock rises. It holds its
value by positive feedback while the power-clock is high. It returns its outputs to zero while
the power-clock falls. The model does the same with a register:

- it loads its input on `ev` (the controller is about to charge);
- it clears to zero on `clr` (the controller is about to discharge);
- otherwise it holds.

A stage's data is therefore valid exactly while its `pc` is high. That is also while its
request to the next stage is high, so the bundling constraint holds by construction. The
predecessor cannot discharge before this stage has charged, so the input is always still valid
when a stage evaluates. Whatever logic drives a stage's `d` is the function that stage computes.

**The step clock.** The real circuit has no clock. Here, every C-element and every stage register
updates on the rising edge of `clk`. One clock cycle therefore stands for one controller
transition. The control is speed-independent: it gives the same results for any delay of its
elements. The uniform one-step delay is one legal timing of the circuit, and the logic behaves
exactly as in the self-timed circuit. Cycle counts are in these steps. They give the ordering and
relative cost of events, not nanoseconds.

**Handshake elements.**

- `async_mux` (MX) reads the select channel as dual rail: `sel_req & !sel` picks channel 0 and
  `sel_req & sel` picks channel 1.
  - A C-element joins each choice with the request of its channel. Their OR is the output
    request.
  - A second C-element per channel forms that channel's acknowledge from the choice and
    `out_ack`.
  - The select channel is acknowledged together with the chosen input.
- `async_demux` (DX) steers the incoming request with the `A!=B` bit, which is bundled with it,
  and forks the same request to the loop-control path. A C-element joins the acknowledge of the
  steered output and the acknowledge of the fork. DX releases the compare row only when both
  have answered, and again only when both have returned to zero.
- `loop_flag_path` is the two one-bit stages of the select loop. Its bit is carried dual rail in
  two `pfal_buffer` gates, the full PFAL form with a true and a false rail. The `T0` stage resets
  charged with its false rail high, which means "equal".

## Arithmetic in radix four

**Comparator (`gcd_comparator`, 3 stages at 16 bits).**

- Stage 0 forms, for every bit, `eq = XNOR(a, b)` and `gt = a & ~b`. The first input is greater
  only where it has a 1 and the second a 0.
- Each further stage merges groups of four:
  - `eq = &eq[3:0]`
  - `gt = gt3 | eq3·gt2 | eq3·eq2·gt1 | eq3·eq2·eq1·gt0`

  The result of a group is that of its most significant unequal position.
- Two merge levels cover 16 bits. `neq` is the inverse of the final `eq`.

**Subtractor (`gcd_subtractor`, 5 stages at 16 bits).** It computes `z = s ? (b - a) : (a - b)`
in two's complement.

1. XOR pre-processing complements `a` (if `s`) or `b` (if not), which leaves `x + y + 1` to
   compute.
2. Generate `x&y` and propagate `x^y`. The carry-in of 1 is folded into bit 0 as
   `g0 = x0 | y0`.
3. and 4. Radix-four prefix levels. Span distances are 1 and 4, each using
   `G = G0 | P0·G1 | P0·P1·G2 | P0·P1·P2·G3`.
5. Sum: `p ^ {carries, 1}`.

The engine drives `s = NOT(A>B)`, so the result is always `max - min`.

**Subtrahend bypass (`subtrahend_bypass`).** In the first subtract stage a multiplexer keeps
`min(A, B)`, that is `b` when `A>B` and `a` otherwise. Four buffers carry it alongside the
subtractor.

The compare row is 1 + (1 + clog4(W)) stages and the subtract row is 3 + clog4(W) stages.
`gcd_pkg` computes both, so the width `W` can change and the pipelines resize with it.

## Timing

With the default `W = 16`:

- **One iteration takes 10 steps.** These are the steps from one charge of the last compare
  stage to the next.
- **Latency.** From the cycle in which `in_ack` rises to the cycle in which DX requests the
  output stage, the latency is `2 + 10·n` steps for `n` subtractions. It is one step more to
  `out_req`.
- **Reference vectors.**

  | Operands | Result | Subtractions | Compare passes | Steps to the DX output request |
  |---|---|---|---|---|
  | (43682, 65523) = (2P, 3P), P = 21841 | P | 2 | 3 | 22 |
  | (46368, 28657) = (F24, F23) | 1 | 22 | 23 | 222 |

  During the second vector, every Fibonacci number from 46368 down to 1 appears at the end of
  the compare row.
- **Request to request.** With an environment that answers at once, the delay from `in_req`
  rising to `out_req` rising is `6 + 10·n` steps: 26 for the short vector and 226 for the
  Fibonacci vector. A second run gives the same delay as the first.
- **Output back-pressure.** A result that is not acknowledged holds DX and the compare row. A
  new operation that has already been accepted then waits behind it.

## Interface of `gcd_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | step clock of the model |
| `rst_l` | in | 1 | global reset, active low, asynchronous; places the T0 token |
| `in_req`, `in_ack` | in, out | 1 | four-phase input channel |
| `in_a`, `in_b` | in | W | operands, stable while `in_req` is high and until `in_ack` rises |
| `out_req`, `out_ack` | out, in | 1 | four-phase output channel |
| `out_z` | out | W | GCD, valid while `out_req` is high, zero otherwise |

One parameter, `W` (default 16), sets the width.

Both channels use return-to-zero handshakes. A transaction goes:

1. The sender raises the request.
2. The receiver raises the acknowledge.
3. The sender drops the request.
4. The receiver drops the acknowledge.

## Files

| Module | Role |
|---|---|
| `gcd_pkg` | width default, `clog4`, stage-count functions |
| `gcd_top` | the engine, wiring of everything below |
| `c_element` | Muller C-element |
| `swc_ctrl` | stage controller: power-clock, `ev`, `clr` |
| `pfal_reg` | one PFAL data stage, single rail |
| `pfal_buffer` | dual-rail PFAL buffer (loop-control path) |
| `pfal_pipe` | chain of PFAL buffers (operands beside the comparator) |
| `operand_mux` | first compare stage: new or looped operands |
| `async_mux` | MX control |
| `async_demux` | DX control with fork |
| `loop_flag_path` | loop-control path with the T0 token |
| `gcd_comparator` | radix-four pipelined comparator |
| `gcd_subtractor` | radix-four pipelined selectable subtractor |
| `subtrahend_bypass` | subtrahend multiplexer and bypass buffers |

Every module has its own self-checking testbench `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_gcd_top` runs the engine at its default width and covers the following:

- the two reference vectors;
- equal operands and a 1;
- 43 random pairs, a third of them with a forced common factor.

It checks each result, the number of compare passes, the latency formula, the Fibonacci
sequence and return-to-zero of the output. It also counts each control mechanism and requires every one
to occur at least once:

- the T0 reset token;
- new and looped selections at MX;
- both DX routes;
- forward and reverse subtraction;
- an input waiting for a select token;
- output back-pressure.

`tb_gcd_reference_tests` runs each reference vector twice and checks the `6 + 10·n`
request-to-request delay.

## Simulating

```
verilator --binary --timing --assert -Irtl rtl/gcd_pkg.sv tb/tb_gcd_top.sv \
          --top-module tb_gcd_top -o sim
./obj_dir/sim
```

Any other testbench builds the same way: replace both occurrences of `tb_gcd_top`. Each module
compiles on its own with `verilator --lint-only -Wall -Irtl rtl/gcd_pkg.sv rtl/<module>.sv`.
Registers that are not reset start at arbitrary values, and the testbenches hold `rst_l` low for
the first cycles.

Two assertions guard the handshakes:

- In `async_mux`, both input choices are never active at once.
- In `async_demux`, both routes are never acknowledged at once.

They are active when simulating with `--assert`. Lint reports `SYNCASYNCNET` on `rst_l`. The
registers use `rst_l` as an asynchronous reset, and the assertions' `disable iff` uses it
synchronously. The warning is expected and harmless.

## Where this model departs from the circuit

- **No power-clock waveform.** The stepwise-charging circuits with tank capacitors that ramp each
  power-clock are analog and are not modelled. `pc` is a logic level, and no energy or delay
  figure can be taken from the model.
- **Single rail in the wide data path.** PFAL is dual rail. The one-bit loop-control path keeps
  both rails (`pfal_buffer`). In the operand, comparator and subtractor stages (`pfal_reg`) each
  bit is one wire, and a discharged stage reads as zero. While a stage is discharged, the comparator's outputs read as `neq = 1, gt = 0`. No
  control decision samples them at that time.
- **Clocked discrete time.** See the step clock above.
- **Own choices where the original gives no detail:**
  - the gate-level form of the MX and DX controls, including the fork of DX into the
    loop-control path and its C-element acknowledge join;
  - the exact prefix tree of the subtractor: Kogge-Stone style, radix four;
  - the use of `NOT(A>B)` as the subtractor select;
  - reset values other than T0;
  - the requirement for non-zero operands.
- **Stage counts.** Four compare stages, five subtract stages, two loop-control stages and one
  output stage, as in the original schematic. At widths other than 16 they follow `clog4(W)`.
