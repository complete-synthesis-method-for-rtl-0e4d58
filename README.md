# Asynchronous state machines with D flip-flops as the only memory

An asynchronous (clockless) sequential circuit keeps its state in feedback
loops. The classic Huffman method closes those loops through combinational
gates and then has to fight hazards and races in every loop. This design closes
them instead through flip-flops, whose internal feedback is hazard-free by
construction. The surrounding logic then only has to produce the flip-flop's
inputs.

The library cell assumed here is a D flip-flop with asynchronous Set and Reset
(called DRS below: Data-Reset-Set). The design gives:

* `rs_latch`: the set/reset storage element that every cell is built from;
* `d_ff`: the two-latch transition D flip-flop;
* `drs_ff`: the same flip-flop with Set and Reset merged into both of its latches;
* `handshake_sampler`: a worked example, a request sampler for a handshake
  between two clock domains, realised with one DRS flip-flop and one inverter;
* `dff_async_top`: the three circuits side by side, each with its own pins.

All of it is zero-delay RTL with no system clock. The only storage elements are
latches, and they are deliberate.

## The storage element

Every cell is built from one element with the characteristic equation

    Q = S + !R·q          (q: present state, Q: next state)

Set forces 1 and reset forces 0. With both low, the element holds. Set and reset
must never be high together once the inputs have settled (S·R = 0). Where the
pair does occur for an instant inside a cell, the equation resolves it as "set
wins". `rs_latch` describes this element as a level-sensitive latch with enable
`s|r` and data `s`. Synthesis therefore sees one latch bit, not a loop of
cross-coupled gates. A deferred assertion (`assert final`) checks S·R = 0 on
settled values only, so overlaps that last less than one time step pass.

## The transition D flip-flop (`d_ff`)

The flip-flop is a master latch Y1 and a slave latch Y2:

    master: S1 = !C·D,   R1 = !C·!D      ->  Y1 = !C·D  + C·y1
    slave:  S2 =  C·Y1,  R2 =  C·!Y1     ->  Y2 = !C·y2 + C·y1
    output: Q  = Y2

While C is low, the master follows D and the slave holds. While C is high, the
master holds and the slave copies it. Seen from outside, this is a
positive-edge D flip-flop. Only Y2 is an output; Y1 stays inside the cell.

Two facts about this cell limit what it can realise as a state variable of an
asynchronous machine:

* if y1 = y2 = 0, the next Y2 is 0;
* if y1 = y2 = 1, the next Y2 is 1.

A flow table whose state assignment needs anything else cannot be built from
plain D cells. The Set and Reset inputs remove that restriction.

In the drawings of these cells, the clock pin carries the complement of C. That
pin feeds the master's gates directly, and an inverter produces C for the
slave's gates. The modules here take C itself as the port `c` and build the
complement inside. So `c` rising is the edge that captures data.

## Adding Set and Reset (`drs_ff`)

This is the subtle part. Set and reset must act on the output Y2 at once. The
slave's inputs therefore get S and R ORed in:

    S2 = S + C·Y1
    R2 = R + C·!Y1
    Y2 = S + C·y1 + !R·(!C + y1)·y2

That alone is not enough. Suppose S is applied while C is high and is then
released while C is still high. The slave would then copy whatever the master
held and lose the set. So the master gets the same inputs, gated by C:

    S1 = !C·D + C·S
    R1 = !C·!D + C·R
    Y1 = !C·D + C·S + (C·!R + !C·D)·y1

While C is low, the master keeps following D. The forced value then stays on the
slave, which is closed, until the next rising edge. While C is high, the master
is forced together with the slave, so releasing S or R leaves both latches
agreeing. The cell behaves exactly like an ordinary positive-edge D flip-flop
with asynchronous set and reset. The testbenches check it against that model.

The only operating rule is S·R = 0 on the cell's pins. Inside the cell, there is
one overlap, and it lasts only an instant. With C high, the master at 1 and R
rising, the slave sees S2 = C·Y1 = 1 and R2 = R = 1 until the master has
cleared. The overlap ends within the same time step, and the result is 0, as it
should be.

## Worked example: the request sampler (`handshake_sampler`)

The problem: a request X comes from another clock domain. A rising edge of the
local acknowledge Y samples X. If X was high, the local operation Q starts. Q
must end the moment X drops, whatever Y is doing.

Flow table. An entry naming its own row is a stable state; any other entry is
the next state to move to. Q is the output of the row.

| state (q1 q2) | XY=00 | 01 | 11 | 10 | Q |
|---------------|-------|----|----|----|---|
| 1 (0 0)       | 1     | 1  | 1  | 4  | 0 |
| 2 (0 1)       | 1     | 1  | -  | -  | 1 |
| 3 (1 1)       | 1     | 2  | 3  | 3  | 1 |
| 4 (1 0)       | 1     | -  | 3  | 4  | 0 |

Reading it:

* X rises while Y is low: 1 → 4. The master q1 takes X.
* Y then rises: 4 → 3, and Q = 1. This is the sampled start.
* X drops: the circuit goes through 2 to 1, or from 3 straight to 1, and Q
  returns to 0. This is the asynchronous end.
* Y rising with X low leaves the circuit in state 1.
* X rising while Y is already high also leaves it in state 1. Such a request
  waits for the next rising edge of Y.

The state assignment makes q1 the DRS cell's master and q2 its slave, with
Q = q2. Each latch's next-state map is then matched against the cell's
equations. The maps have to be solved together by trial, keeping S and R at 0
unless they are needed. The solution is

    D = X,   C = Y,   R = !X,   S = 0

So the whole circuit is one inverter and one DRS cell. Substituting gives
Y1 = X·(!Y + y1) and Y2 = Y·y1 + X·(!Y + y1)·y2. These reproduce every
specified entry of the table.

The "-" entries are reached only when X and Y change together. The circuit
assumes fundamental mode: one input changes, and the circuit settles before the
next change.

## How far to trust it

* Simulation is zero-delay. The testbenches show that the logic equations and
  the latch structure are right in every settled state. They say nothing about
  gate delays, races between the two latches, or the hazard-cover terms. Those
  terms are deliberately left out, on the premise that the flip-flop cell itself
  is hazard-free.
* Storage is inferred as level-sensitive latches (1 per `rs_latch`, 2 per
  flip-flop). A real implementation should map each `rs_latch` onto a
  hazard-free library cell, or map each flip-flop onto a library DRS flip-flop.
* `d_ff` has no reset. Its state is defined once its clock has been low and
  then high. `drs_ff` is initialised by S or R, and the sampler by holding X
  low.
* One alternative is not included: realising the same flow table with two
  plain RS latches and free Set/Reset logic, without D cells. For this example,
  that gives S1 = X·!Y, R1 = !X, S2 = Y·q1 and R2 = !X·!Y + !X·!q1. It is
  simpler to derive, but it needs RS cells.

## Verification

Each testbench is self-checking and ends with a `TB_RESULT checks=N failures=M`
line. Each one changes one input per step, waits for the circuit to settle, and
compares the outputs with a reference written from the specification, not from
the gates. The references are in `tb/async_ref_pkg.sv`: the RS equation, a
behavioural edge-triggered flip-flop with set and reset, and the flow table
above, followed until a stable entry is reached.

| testbench | what it covers |
|-----------|----------------|
| `rs_latch_tb` | set, hold and reset, directed and random |
| `d_ff_tb` | captures on the rising edge; data moving with the clock low and high does not reach the output |
| `drs_ff_tb` | set and reset with the clock low and high; the forced value held after release; captures of 0 and 1 |
| `handshake_sampler_tb` | the timing example, then random single-input changes, checked against the flow table; counts starts, ends with Y high and with Y low, and both kinds of ignored edge |
| `dff_async_top_tb` | all three circuits interleaved at random, with every output checked at every step; each mechanism above is counted and must occur |

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl -y tb \
        tb/async_ref_pkg.sv tb/dff_async_top_tb.sv --top-module dff_async_top_tb
    obj_dir/Vdff_async_top_tb +verilator+rand+reset+2

Replace `dff_async_top_tb` with any other testbench name. Use
`+verilator+rand+reset+2` to start the latches at random values. The
testbenches bring every cell into a defined state before checking it.

## Files

    rtl/rs_latch.sv            set/reset element, Q = S + !R·q
    rtl/d_ff.sv                two-latch transition D flip-flop
    rtl/drs_ff.sv              D flip-flop with asynchronous Set and Reset
    rtl/handshake_sampler.sv   request sampler: D = X, C = Y, R = !X, S = 0
    rtl/dff_async_top.sv       the three circuits side by side
    tb/async_ref_pkg.sv        reference models for the testbenches
    tb/*_tb.sv                 one self-checking testbench per module

The designs have no parameters. Every signal is one bit wide.
