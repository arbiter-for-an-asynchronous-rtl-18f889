# Clockless arbiter for a counterflow pipeline

In a counterflow pipeline, instructions flow up through the stages and
results flow down through the same stages. An instruction picks up the
operands it needs from the results it passes. Once it has executed, it sends
its own result down to the instructions behind it. The scheme only works if
every instruction meets every result coming the other way. An instruction and
a result must never swap places across a stage boundary in the same moment,
because then they would never share a stage.

The pipeline has no clock, so this cannot be solved by a schedule. Instead,
every boundary between two neighbouring stages gets an **arbiter**. The
arbiter lets either an instruction move up or a result move down across that
boundary, never both at once. This repository holds synthesizable
SystemVerilog for that arbiter, its two building blocks (a Muller C-element
and a mutual-exclusion element), and an array that puts one arbiter at every
boundary of a 4-stage pipeline.

## The wires of one boundary

Each boundary has four request inputs and two grant outputs. All of them are
active high and level sensitive.

| wire | driven by | meaning |
|------|-----------|---------|
| `ri` | stage above | ready to receive an instruction |
| `si` | stage below | ready to send its instruction up |
| `rr` | stage below | ready to receive results |
| `sr` | stage above | ready to send its results down |
| `gi` | arbiter | instruction transfer granted |
| `gr` | arbiter | result transfer granted |

The data buses and the transfer-complete acknowledges run directly between
the stages; the arbiter never sees them. In the RTL the four requests form the
packed struct `cfp_pkg::arb_req_t` and the two grants form `cfp_pkg::arb_gnt_t`.

## Arbitration rules

* `gi` needs both `ri` and `si` high. `gr` needs both `rr` and `sr` high.
* If only one wire of a pair is high, that side's grant does not change. A
  pending request stays pending. A granted transfer stays granted.
* A grant falls only once **both** of its requests are low again. This is
  the four-phase "return to zero" that marks the transfer as complete.
* While one side holds the boundary, the other side waits, even with both of
  its requests high. It is granted as soon as the holder's transfer completes.
* `gi` and `gr` are never high together.
* If both pairs complete at the same moment, the arbiter picks one of them.

A simplified truth table is sometimes given as "`ri=si=1` gives `gi=1,
gr=0`". That holds only when the result side is idle. If `gr` is already high,
the instruction side waits, as the fourth rule says.

## How it is built

```
 si ─┐                       ┌─ sr
 ri ─┴─[C]── inst_req   r1 ┌───────┐ r2  result_req ──[C]─┴─ rr
                    └─────►│ mutex │◄──────┘
                      gi ◄─┤g1   g2├─► gr
                           └───────┘
```

**C-element (`c_element`).** The output goes to 1 when both inputs are 1 and
to 0 when both are 0. Otherwise it keeps its value. Feeding each request pair
through a C-element gives a single request per side with the protocol built
in. It rises only when both stages ask, and falls only when both stages are
done. In silicon this is a transistor stack with a weak feedback inverter.
Here it is a latch that is transparent while `a == b` and loads `a`.

**Mutual-exclusion element (`mutex`).** It takes the two side requests and
grants at most one of them. The cell it stands for is a cross-coupled NAND
latch followed by a metastability filter. A lone request wins at once. A
second request waits until the first is withdrawn. When both arrive together,
the NAND latch goes metastable. The filter keeps both grants low until noise
decides a winner, so the choice is random, with each side winning about half
the time.

## Deciding a tie without metastability

This is the part of the RTL that differs most from the circuit it models.
A zero-delay, two-valued simulation, and any synthesized netlist of ordinary
gates, can be neither metastable nor random. So `mutex` settles a
simultaneous arrival with a deterministic rule:

> the winner of a tie is the side that did **not** own the resource the last
> time both requests were high.

When the two sides contend again and again, the tie winner alternates. Each
side then wins half of the ties, which is the balance the random cell aims
for. The rule uses two level-sensitive latches:

* `owner2` says who owns the resource while both requests are high. While
  exactly one request is high it is transparent, and the lone requester owns.
  While both are high it holds. While both are low it is preset to the
  winner of the next tie, `!contend2`.
* `contend2` copies `owner2` while both requests are high and holds
  otherwise.

The two latches form a loop, which lint tools report as circular logic. The
loop cannot oscillate. `contend2` is transparent only while both requests are
high, and `owner2` reads `contend2` only while both are low, so one of the two
is always opaque. The grants are `g1 = r1 & !owner2` and `g2 = r2 & owner2`.
They are exclusive because both come from the one bit `owner2`.

What this model does not show:

* **The metastable interval.** In the cell both grants stay low for an
  unbounded (but usually short) time after a tie. Here the decision takes
  zero time.
* **Randomness.** A given sequence of requests always produces the same
  winners. Code that relies on an unbiased random choice, rather than
  long-run balance, must not rely on this model.
* **Behaviour in silicon.** Synthesizing `mutex` into standard cells does not
  give a safe arbiter. A real implementation needs a mutex cell with a
  metastability filter. This RTL defines that cell's function for simulation
  and for equivalence work.

## The pipeline-wide array

`cfp_arbiter_array #(STAGES)` puts one `cfp_arbiter` at each of the
`STAGES-1` boundaries. Stages are numbered from 0 at the bottom, and
boundary `k` lies between stage `k` and stage `k+1`. The default, `STAGES = 4`,
gives three arbiters. The arbiters are independent: different boundaries may
transfer at the same time, and only the two directions of one boundary exclude
each other. The pipeline stages themselves are not part of this RTL. Their
request and grant wires are the array's ports, `req[STAGES-1]` and
`gnt[STAGES-1]`.

## Timing and reset

There is no clock and no delay anywhere. Grants change in the same simulation
time step as the request change that causes them.

There is no reset pin. Driving all requests low is a reset: every C-element
clears and both grants go low, whatever the latches held before. A testbench
must do this before anything else. A `reset` input would be an easy addition,
but the circuit as proposed has none.

After synthesis every C-element is one latch bit and every mutex is two
latch bits. This is intended, because these latches are the circuit's only
state.

`cfp_arbiter` holds an immediate assertion (`assert final`) that `gi` and
`gr` are never high together. It is active when the simulator is built with
assertions enabled.

## Files

| file | contents |
|------|----------|
| `rtl/cfp_pkg.sv` | `arb_req_t`, `arb_gnt_t` |
| `rtl/c_element.sv` | Muller C-element |
| `rtl/mutex.sv` | mutual-exclusion element with the tie rule above |
| `rtl/cfp_arbiter.sv` | arbiter of one boundary: two C-elements and a mutex |
| `rtl/cfp_arbiter_array.sv` | top: one arbiter per boundary, `STAGES` = 4 |
| `tb/arb_ref_pkg.sv` | reference model of the mutex and arbiter, written as an event-driven state machine rather than latches |
| `tb/tb_c_element.sv` | every input transition from both stored values, then a random walk |
| `tb/tb_mutex.sv` | hand-over, waiting, alternating ties, a random walk, and a check that ties split between 40 % and 60 % |
| `tb/tb_cfp_arbiter.sv` | each arbitration rule as a directed case, then a random walk against the model |
| `tb/tb_cfp_arbiter_array.sv` | end-to-end test at the default size, described below |

## The end-to-end test

`tb_cfp_arbiter_array` plays all four stages. Each stage has one instruction
slot and one result slot. Instructions are injected at the bottom and retired
at the top. Results are injected at the top and removed at the bottom. On each
side of each boundary the stages follow the four-phase protocol:

1. A stage raises its send request when its slot is full and its receive
   request when its slot is empty. Each wire rises at a random moment, one or
   two at a time.
2. When the grant appears, the token moves across the boundary.
3. Both stages lower their requests.

Every settled step is checked four ways: against the reference model, for
mutual exclusion, for the order in which tokens arrive at each end, and for
an instruction and a result that change sides without having shared a stage.
A second phase drives the request wires at random with no protocol at all.
The test counts the following events and fails if any of them never happens:

* an instruction grant;
* a result grant;
* a side waiting for the other side to finish;
* a tie;
* a lone request getting no grant;
* a grant held after one of its requests is already low;
* grants on different boundaries at the same time;
* an instruction meeting a result in a stage.

It runs at the default parameters and finishes in well under a second.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/cfp_pkg.sv rtl/c_element.sv rtl/mutex.sv rtl/cfp_arbiter.sv \
  rtl/cfp_arbiter_array.sv tb/arb_ref_pkg.sv tb/tb_cfp_arbiter_array.sv \
  --top-module tb_cfp_arbiter_array -o sim
./obj_dir/sim
```

Verilator warns `UNOPTFLAT` (circular logic) about the tie-memory latches in
`mutex`. That is the intended loop described above, and `-Wno-fatal` keeps the
warning from stopping the build. Every testbench ends with a line
`TB_RESULT checks=N failures=M`. To run the
others, swap the last testbench file and `--top-module`. The testbenches use
`$urandom` only, so any two-valued simulator will do.

## Where this departs from the proposed circuit

* The tie is decided by the alternation rule above, not at random, and takes
  no time.
* The C-element and mutex are behavioural latch descriptions of transistor
  cells. The transistor structures and sizing are not represented.
* A pipeline size of four stages is the one drawn for the design. Other
  sizes are a parameter.
* Not included: the pipeline stages, the instruction and result buses, the
  transfer-complete acknowledges, and the suggested on-chip self-test
  circuitry. No function or interface is defined for the self-test circuitry.
