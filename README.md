# A grafcet as a synchronous circuit: the 'sema' producer-consumer controller

A grafcet (IEC 848 sequential function chart) describes a controller as steps
that are active or not and transitions between them that are cleared as soon
as their preceding steps are all active and their condition is true. Clearing
one transition may make another one clearable at once, and the standard says
the whole chain happens in zero time: only the *stable* situation at the end
of it is meaningful, and the actions must never show the transient ones.

Mapping steps one-to-one onto flip-flops and clearing one transition per
clock breaks that rule; writing the rules as asynchronous combinational
feedback equations relies on the logic settling into a stable state it may
not have. This design takes the third route: the stability search is done
once, ahead of time, and its result is written as a purely combinational
function G from (current situation, inputs) to the next *stable* situation.
A clocked register then applies G once per clock edge, so every edge is one
complete grafcet evolution, and registered actions are glitch-free and
deterministic.

## The grafcet implemented

```
  t1: {1}   -> {2,3}   when  a        step 1, step 4 : initial
  t2: {2}   -> {1}     when ~a        step 2 : action PROD (non-stored)
  t3: {4}   -> {5}     when  b        step 5 : action CONS (non-stored)
  t4: {3,5} -> {4}     when ~b
```

Steps 1-2 form the producer loop and steps 4-5 the consumer loop. Step 3 is
a semaphore: `a` produces an element (t1 marks step 3), and the consumer can
only leave step 5 (t4, on `~b`) when step 3 holds an element, which t4 then
takes away. If t1 fires again while step 3 is still marked, step 3 simply
stays active (a situation is a set of active steps, not a count).

## Block G: the next stable situation

`rtl/sema_next_state.sv` is the heart of the design. Its reference
semantics, which the testbenches implement literally, is:

1. clear, all at once, every transition whose preceding steps are active and
   whose condition is true;
2. deactivate their preceding steps and activate their following steps; a
   step that is both deactivated and activated stays active;
3. repeat with the same inputs until nothing is clearable.

For this grafcet the search always ends within two rounds, and the second
round only exists in one case: from a situation with step 1 and step 5 active
and step 3 inactive, with `a=1, b=0`, t1 marks step 3, which immediately
enables t4, so the consumer returns to step 4 in the same clock. The
intermediate situation {2,3,5} is never registered. Solving the rounds by
hand gives (bit `xn` is step n):

```
step 1 = ~a & (x1 | x2)
step 2 =  a & (x1 | x2)
step 3 =  x3 & (~x5 | b)  |  a & x1 & (x3 | ~x5 | b)
step 4 = ~b & (x4 | x3 & x5 | a & x1 & x5)
step 5 =  b & (x4 | x5)   |  ~b & x5 & ~x3 & ~(a & x1)
```

The equations are exact for all 32 situations, reachable or not. On the
reachable ones (exactly one of steps 1/2 and one of steps 4/5 active) they
shrink further, e.g. step 2 is simply `a`. The grafcet is stable: for every
situation and every input the result `G(x)` satisfies `G(G(x)) = G(x)`.

## Machine structure and timing

```
 a,b ─┬──────────────► G ──x_next──┬──► step_register ──► steps ─┐
      │                 ▲          └──► F + output reg ──► prod, cons
      │                 └──────────────────────────────────────────┘
      └─► G (from initial situation {1,4}) ──x_init──► step_register (reset value)
```

* `sema_machine` (top) wires two copies of G, the step register and the
  action stage.
* `step_register` is a generic `N_STEPS`-bit register: rising-edge load of
  `x_next`, asynchronous load of `x_init` while reset is high.
* `sema_action_register` is block F (PROD = step 2, CONS = step 5 of
  `x_next`) followed by an output register cleared by reset.

Timing: inputs are sampled at a rising edge; right after that edge `steps`
holds the fully evolved stable situation and `prod`/`cons` its actions. The
latency from an input change to the action is therefore one clock edge, and
outside reset `prod == steps[1]` and `cons == steps[4]` at all times. The
clock period must cover the delay of G (two levels of logic here).

Reset is asynchronous and active high. While it is high the actions are
held at 0, and the steps hold the stable situation reached from the initial
situation {1,4} with the inputs present at the reset edge (and at each clock
edge during reset): with `a=1` the machine leaves reset already in {2,3,...}.
The reset value is computed by the second copy of G fed with the constant
initial situation, so it changes with the inputs only at those edges.

Two safety properties of the grafcet are asserted in `sema_machine`: the
producer loop (steps 1-2) and the consumer loop (steps 4-5) each hold exactly
one active step. Linting notes that `reset` is sampled synchronously by these
assertions as well as used as an asynchronous reset; only the checker does so.

## Types

`rtl/sema_pkg.sv` holds the situation type (`situation_t`, 5 bits, step 1
in bit 0), the step index enum, the input struct `{a, b}`, the action struct
`{prod, cons}` and the initial situation constant.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The reference model (`tb/sema_ref_pkg.sv`) describes the grafcet only by
its preceding/following step sets and conditions, and runs the clearing
rounds literally; it shares nothing with the closed equations.

* `tb_sema_next_state`: all 32 situations x 4 inputs against the model, plus
  stability of every result and at most two rounds.
* `tb_step_register`: random loads, asynchronous reset between edges, reload
  on clock edges during reset.
* `tb_sema_action_register`: decoding, hold between edges, asynchronous clear.
* `tb_sema_machine`: resets under all four input combinations, a directed
  sequence and 3000 random clocks with occasional resets. It compares steps
  and actions after every edge, which checks the one-edge latency. It also
  requires each mechanism to occur at least once:
  - each of t1..t4 cleared;
  - simultaneous clearing;
  - the chained t1-then-t4 evolution;
  - a step activated and deactivated in the same round;
  - a reset into a non-initial stable situation;
  - actions held low during reset while step 2 or 5 is active.

  The design has no parameters to reduce, so this is also the full-size test.

Simulate, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/sema_pkg.sv tb/sema_ref_pkg.sv tb/tb_sema_machine.sv --top-module tb_sema_machine
./obj_dir/Vtb_sema_machine
```

## Departures and limits

* The equations of G for steps 3, 4 and 5 were derived here from the
  grafcet and the evolution rules, not taken from a published equation set.
  They are written for every situation rather than only the reachable ones.
* Producing the reset value with a second copy of G is this design's choice.
  It gives the same value as a hand-written reset assignment.
* The asynchronous reset loads a value that depends on the inputs, which
  synthesises to a flip-flop with asynchronous load. If the target has only
  constant asynchronous set/reset, use a synchronous reset to {1,4} and let
  the first clock edge perform the evolution.
* The only safety properties asserted are the two token invariants above.
* Only the 'sema' grafcet is built. For another grafcet, replace
  `sema_next_state` with that grafcet's stable-situation equations and F with
  its action decoding. `step_register` is reused as is with `N_STEPS` set.
  Only grafcets whose stability search always terminates can be built this
  way.
