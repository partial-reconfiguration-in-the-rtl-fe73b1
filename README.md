# A two-tank mixing controller built from hierarchical Petri nets, with a swappable emptying stage

This is the RTL of a small industrial logic controller. It meters two liquids into
tanks A and B, empties both into a reactor, mixes them, and drains the product. Two
kinds of operator exception interrupt the process:

- a **defect** (noncritical) freezes the filling and lets it resume where it stopped;
- a **failure** (critical) aborts the mixing and forces an emergency drain.

The controller is written as three cooperating Petri subnets, one module each. The
subnet that empties the tanks and mixes (Net3) exists in two interchangeable versions,
called *contexts*. In context A the tanks empty in parallel. In context B they empty
one after the other. Both versions have exactly the same ports. On an FPGA, Net3 sits
in a reconfigurable partition: a partial bitstream swaps one context for the other,
and the rest of the controller keeps running. Each subnet is a self-contained block,
so the subnet being swapped needs no special treatment.

## The process and the controller's pins

| bit | input        | meaning                      | bit | output | meaning                           |
|-----|--------------|------------------------------|-----|--------|-----------------------------------|
| 9   | `failure`    | critical exception           | 9   | `code0`| context A is loaded               |
| 8   | `defect`     | noncritical exception        | 8   | `code1`| context B is loaded               |
| 7   | `start`      | operator start               | 7   | `alarm`| flashing alarm lamp               |
| 6   | `resumption` | operator resumption          | 6   | `ev1`  | emergency drain valve             |
| 5   | `x1`         | tank A full (upper sensor)   | 5   | `y1`   | fill tank A                       |
| 4   | `x2`         | tank A not empty (lower)     | 4   | `y2`   | fill tank B                       |
| 3   | `x3`         | tank B full (upper)          | 3   | `y3`   | empty tank A into the reactor     |
| 2   | `x4`         | tank B not empty (lower)     | 2   | `y4`   | empty tank B into the reactor     |
| 1   | `x5`         | reactor upper level          | 1   | `y5`   | mixer                             |
| 0   | `x6`         | reactor not empty (lower)    | 0   | `y6`   | reactor drain valve               |

Both buses are packed structs, `lc_in_t` and `lc_out_t`, defined in `lc_pkg`. With this
bit order the hex value of a bus can be read straight off a logic analyser. For example,
`inputs = 10'h034` means x1, x2 and x4 are set.

## Behaviour, as a state machine

```
Waiting --start--> CS2 (filling)                      --both full--> CS3 (emptying + mixing)
                    | region A: fill A (y1) until x1                  | emptying (context A or B)
                    | region B: fill B (y2) until x3                  | mixing: wait x6 -> mix (y5)
                    |  both regions resume where they stopped          |   -x5-> delay -!x5-> mix ...
            defect  v   ^ resumption                       !(x2|x4)   v              failure v
               Defect alarm (alarm)                Reactor emptying (y6)   Emergency emptying (alarm, ev1)
                                                    --!x6--> Waiting          --!x6--> Failure alarm (alarm)
                                                                                --resumption--> Waiting
```

Emptying in context A: tank A (y3) until !x2, and tank B (y4) until !x4, at the same time.
Emptying in context B: tank A (y3) until !x2, then tank B (y4) until !x4.

CS3 has no completion of its own, because the mixing loop never ends. The controller
leaves CS3 on the condition `!(x2|x4)` (both tanks empty), or on a failure. A defect
during CS3 is ignored.

## How the Petri nets become hardware

This is the part to read closely. Everything else is wiring.

**Places and transitions.** Each place is one flip-flop, set when the place holds a
token. Each transition is a combinational AND of its input places, its guard, and an
enable signal. A place's next value is `(P & ~outgoing) | incoming`. The whole net
therefore advances by at most one step per clock. Outputs are the place flip-flops
ANDed with the subnet's "active" place (Moore outputs), so every output changes on
the clock edge that samples the input causing it, never combinationally.

**Control places.** Besides its own places, every subnet has three control places,
implemented once in `hcfgpn_ctrl`:

| place   | meaning                                   | marked at reset |
|---------|-------------------------------------------|-----------------|
| `Pinit` | subnet idle, ready to be started          | yes             |
| `Pa`    | subnet active                             | no              |
| `Pi`    | subnet frozen; its places keep their tokens | no            |

Five control transitions move the single control token:

```
Tinit = Pinit & init_cond                start: also marks the subnet's first places
Tw    = Pa & w_cond                      kill: clears every place of the subnet, token -> Pinit
Ti    = Pa & i_cond & ~Tw                freeze: token -> Pi, places untouched
Ta    = Pi & a_cond                      resume: token -> Pa
Tfin  = Pa & final_places & ~(Ti | Tw)   finished: clears the final places, token -> Pinit
local_en = Pa & ~(Ti | Tw)               enables the subnet's own transitions
```

Each subnet uses these control transitions as follows:

- **Noncritical exception with history (Net2).** `Ti` only moves the control token.
  The places of both filling branches stay marked. Because outputs are gated by `Pa`,
  every valve closes while the subnet is frozen. `Ta` brings the token back, and each
  branch carries on from the place it was in.
- **Critical exception (Net3).** `Tw` removes every token of the subnet in one clock
  and returns it to `Pinit`. On the next entry the subnet starts from its initial
  marking.
- **Priority.** An exception always wins over an ordinary transition in the same
  clock: `Tw` beats `Ti`, and both beat `Tfin` and all local transitions.

**Macroplaces and the signals between subnets.** Net1 is the top-level net. Its places
`mp2` and `mp3` stand for Net2 and Net3. When Net1 fires a transition into or out of a
macroplace, the firing signal itself is the subnet's control condition:

| Net1 transition         | fires on        | drives                             |
|-------------------------|-----------------|------------------------------------|
| T1  p1 → mp2            | start           | Net2 `Tinit`                       |
| T5  mp2 → p3            | defect          | Net2 `Ti` (freeze)                 |
| T6  p3 → mp2            | resumption      | Net2 `Ta` (resume)                 |
| T2  mp2 → mp3           | Net2 `tfin`     | Net3 `Tinit`                       |
| T3  mp3 → p2            | !(x2 \| x4)     | Net3 `Tw` (kill; CS3 left normally) |
| T7  mp3 → p4            | failure         | Net3 `Tw` (kill; critical exception) |
| T4  p2 → p1             | !x6             | –                                  |
| T8  p4 → p5             | !x6             | –                                  |
| T9  p5 → p1             | resumption      | –                                  |

The subnet's control transition fires in the same clock as the Net1 transition.
For example, `mp2` and Net2's first places are set on the same clock edge. Net2's
`tfin` is combinational from its registered places, and it is blocked by Net2's own
`Ti`. So when a defect arrives in the same clock as both tanks becoming full, the
defect wins. Net1 also gives T5 priority over T2, and T7 priority over T3.

The top-level net has no exceptions of its own. Its `Ti`, `Ta`, `Tw` and `Tfin` are
tied low. Its `Tinit` is tied high, so `p1` (Waiting) is marked one clock after reset.

**The unreachable final place p17.** Each Net3 context has a final place `p17` with no
input arc. It keeps `Tfin` of Net3 from ever firing. This mirrors the state machine,
in which CS3 is left only through an outgoing transition, never by completion. Net1
has a `tfin3` pin for symmetry with Net2, but no transition uses it. Adding it to T3
would create a combinational loop, since T3 also kills Net3, and Net3's `Tfin` is
blocked by that kill.

## Contexts and the reconfigurable partition

`rlc_top` instantiates Net1 (`u1`), Net2 (`u2`), and in the partition `g_u3.u3` either
`net3a` or `net3b`. The choice is set by `parameter net3_ctx_e CONTEXT`, which defaults
to `CTX_A`, the base context. Each elaboration corresponds to one device
configuration. The loaded module reports itself on `code0`/`code1`:

- `net3a` drives `code = 2'b01`, which sets `code0`;
- `net3b` drives `code = 2'b10`, which sets `code1`.

A run-time swap is a property of the FPGA's configuration logic, not something RTL can
describe. `tb/rp_u3_model.sv` is a simulation-only model of it. It holds both modules
and decouples the partition while a context loads: outputs are low and the module is
held in reset. It then releases the new module from its initial marking.
`tb_partial_reconfig` uses this model to switch from A to B during a filling phase.
A defect and its resumption arrive during the switch and are handled normally by the
static subnets. The next emptying phase is then sequential. The model changes contexts
only while `mp3` is empty. No supervisor that would decide when to reconfigure is part
of this design.

## In-circuit test top

`dut` pairs the controller with `test_driver`, a stimulus generator meant to sit in the
same FPGA. After `rst`, the generator:

1. holds the controller in reset for `RESET_CYCLES` clocks (`resetout`);
2. pulses `trigger` for one clock, to arm a logic analyser;
3. plays a 32-entry table of input vectors, each held for a few clocks (63 clocks in all);
4. raises `done` and drives all inputs low, or starts over when `LOOP = 1`.

The controller's reset is `rst | resetout`. `clkout` forwards the clock. The table runs
the process twice:

- **Run 1:** start and filling; a defect during filling, then resumption; emptying,
  where the two contexts differ; a defect during mixing, which is ignored; a failure,
  emergency emptying, the failure alarm and resumption.
- **Run 2:** a normal cycle. The mixer passes once through its delay state, and the
  cycle ends with reactor draining.

Run 1 produces these output-bus values in context A: 200, 230, 210, 280, 20C, 204,
206 and 2C0. In context B it produces 100, 130, 110, 180, 108, 104, 106 and 1C0.

## Where this RTL makes its own choices

- **Kill condition of Net3.** `Tw` fires on `t7 | t3`: on a failure, and when CS3 is left
  normally. Killing only on failure would leave the mixing branch running after CS3 is
  left, so Net3 could not be started again.
- **Exception priority.** Written as `~(Ti | Tw)`. This gives the same result as the
  alternative `~(Ti & Tw)` whenever `Ti` and `Tw` exclude each other, which they do
  here. The `|` form states the intent.
- **Conflicting transitions in Net1.** When T5/T2 or T7/T3 compete for the same token,
  the exception wins.
- **Net1 start.** `Tinit` is always enabled.
- **Reset.** Synchronous and active-high in every module. The controller is also reset
  by the generator's `rst`.
- **Stimulus generator.** Its structure, the hold times, the second run, `RESET_CYCLES`
  (4), `LOOP` (0) and `done` are all this design's own. No clock period is assumed.
- **Not modelled.** The plant, the logic analyser and the device's configuration port
  are outside the RTL.

## Verification

Every testbench is self-checking. Each ends with a `TB_RESULT checks=N failures=M`
line, and each has a watchdog.

| testbench             | what it shows |
|-----------------------|---------------|
| `tb_hcfgpn_ctrl`      | control token moves, and the priority Tw > Ti > Tfin |
| `tb_net1`             | every Net1 transition, both priority conflicts, the ignored defect in CS3 |
| `tb_net2`             | start, freeze with history, resume, blocked sensors while frozen, `tfin` vs defect |
| `tb_net3a`, `tb_net3b`| context code, emptying order, mixer loop, `tfin` never fires, kill on t7 and t3, restart |
| `tb_test_driver`      | reset and trigger phases, the whole vector table clock by clock, looping |
| `tb_rlc_top`          | 40,000 clocks of random inputs and resets on both contexts, compared every clock against a statechart model (`lc_ref_model`) written independently of the nets; every top state must be reached |
| `tb_dut`              | both contexts end to end; counts 15 mechanisms (preemption, history, critical exception, mixer delay, ...), checks the output-bus values listed above and the scenario length |
| `tb_dut_full`         | the default `dut`, unparameterised, through the whole scenario |
| `tb_partial_reconfig` | run-time switch from context A to context B with the static subnets running |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/lc_pkg.sv tb/tb_dut.sv --top-module tb_dut
./obj_dir/Vtb_dut
```

Lint a module with `verilator --lint-only -Wall -Irtl rtl/lc_pkg.sv rtl/dut.sv`. The
only remaining warnings are for control signals a subnet does not use, for example
`Pi` in a subnet that is never frozen, for Net1's unused `tfin3` pin, and for
package constants that the linted module does not use.

Each net also carries assertions that the marking stays safe:

- one control token per subnet;
- one token in Net1;
- one token per branch of Net2 and Net3.

## Files

- `rtl/lc_pkg.sv`: bus structs, context enum, context codes.
- `rtl/hcfgpn_ctrl.sv`: control places and control transitions of one subnet.
- `rtl/net1.sv`, `rtl/net2.sv`, `rtl/net3a.sv`, `rtl/net3b.sv`: the subnets.
- `rtl/rlc_top.sv`: the controller.
- `rtl/test_driver.sv`: the stimulus generator.
- `rtl/dut.sv`: the in-circuit test top.
- `tb/`: the testbenches above. Helpers: `lc_ref_model.sv` (statechart model),
  `lc_scenario_checker.sv` (end-to-end checker) and `rp_u3_model.sv` (partition model).
