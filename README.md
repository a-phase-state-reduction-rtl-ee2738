# Phase-register control unit driven by a flow chart

A control unit that sequences the rest of a digital system can be built in one
fixed structure, whatever its job: input flip-flops, a phase register that
holds the current *phase state*, J-K flip-flops for the outputs and for a few
internal variables, and a two-level AND-OR network in between. What makes one
control unit differ from another is only the content of that network, and the
content is derived mechanically from the control unit's flow chart once the
flow chart has been cut into phase states.

This RTL is that fixed structure, written once and parameterized by a table
of product terms. Change the table (and the phase-state code table) and the
same modules realize another flow chart. The default table is a small
handshake controller, so that the design simulates and synthesizes as it
stands.

## Files

| file | what it is |
|---|---|
| `rtl/cu_pkg.sv` | term format (`term_t`, `act_e`), size limits, the default example flow chart (`EX_TERMS`, `EX_CODES`) |
| `rtl/control_unit.sv` | top: wires the blocks below into the control unit |
| `rtl/input_register.sv` | input flip-flops, clocked by CL1 |
| `rtl/control_function_network.sv` | AND-OR network: J-K inputs and transition conditions from the term table |
| `rtl/jk_register.sv` | J-K flip-flop bank on CL2 (used once for outputs z, once for internal variables v) |
| `rtl/clock_inhibitor.sv` | f_c: enables the phase register only when the phase state must change |
| `rtl/phase_register.sv` | phase register (shift-register or loaded), with decoder to one-hot phase-state variables |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_rule2_separation.sv` and `tb_rule3_feedback.sv` |

## From flow chart to phase states

The flow chart of a control unit uses four kinds of instruction:

1. set or reset an output flip-flop `z_m` or an internal flip-flop `v_i`;
2. conditional jump on an input `x_j` or an internal variable `v_i`;
3. wait on an input `x_j` (stay until it has a given value);
4. delay.

A *phase state* is a stretch of the flow chart that the hardware executes in
one clock period of CL2. The design method decides where the stretches end
(phase-state transitions) so that the number of phase states is small but the
hardware still does what the flow chart says. The transitions that must exist
are fixed by separation rules; those that matter for using this RTL are:

* **Delay**: a delay is one or more phase-state transitions; each transition
  takes one CL2 period.
* **Internal variable tested after being changed**: a phase-state boundary must
  lie between a set/reset of `v_i` and a test of `v_i`, and between a test of
  `v_i` and a following wait on an input if the instructions between change
  `v_i`. Otherwise the phase state repeats while it waits, sees the *new*
  value of `v_i` and takes the wrong branch. `tb_rule2_separation.sv`
  shows exactly this failure on a deliberately unseparated table.
* **Input fed back from an output**: the same holds between a jump on an
  input `x_i` and a wait on another input when an output set in between makes
  `x_i` change asynchronously (`tb_rule3_feedback.sv`).
* **Set and reset of one flip-flop**: they must be in different phase states,
  unless they are conditioned on opposite values of an input. The hardware
  therefore never drives J and K of one flip-flop together (asserted in
  `jk_register`).
* **Waits on opposite values of one input** are separated, so a phase state
  can never have two active exits (asserted in `phase_register`).
* **Initial state**: there is a transition into the initial phase state at
  the start; here it is the reset.

Choosing the boundaries, minimizing the phase states (a covering problem over
the instruction sequences of all paths through the flow chart) and choosing the
state codes are design-time steps done before the RTL is parameterized; they
are not part of the hardware.

## The term table

Every control input of the unit is a sum of products. One product is one
`cu_pkg::term_t`:

| field | meaning |
|---|---|
| `phase` | phase state `F_i` the term belongs to |
| `x_care`, `x_val` | inputs tested by the term and their required values |
| `v_care`, `v_val` | internal variables tested and their required values |
| `act` | `ACT_SET_Z`, `ACT_RESET_Z`, `ACT_SET_V`, `ACT_RESET_V` or `ACT_GOTO` |
| `idx` | index of the z or v flip-flop, or the target phase state |

The conditions of a term are the conditional jumps and waits met between the
start of its phase state and the instruction it realizes. For example
`J_busy = F0 · start` is `mk(0, 1, 1, 0, 0, ACT_SET_Z, 1)`: phase state 0,
tests input 0 for 1, sets output 1. A term `ACT_GOTO` from phase state i to
j is the transition condition `f_{i-j}`; a phase state with no active
`ACT_GOTO` term stays where it is, which is how a wait is realized.
Terms that name the same control input are ORed. No logic minimization is
done; synthesis tools do that.

Limits of the format: 16 inputs, 8 internal variables and 32 phase states (set
by `MAX_X`, `MAX_V`, `IDX_W` in `cu_pkg`). Terms whose index is out of range
for the instance are ignored.

## Timing: two clocks

```
        inputs change   CL1 ↑              CL2 ↑
 ──────────┼──────────────┼──────────────────┼──────────
           │   x sampled  │  network settles │ z, v, phase register update
```

* CL1 samples the inputs `x` into the input flip-flops.
* Between CL1 and CL2 the network computes the J-K inputs and `f_{i-j}` from
  the one-hot phase-state variables `F`, the sampled inputs and `v`.
* On CL2 the output and internal J-K flip-flops change. The phase register
  also runs on CL2, but only when `fc = Σ f_{i-j}, i ≠ j` is 1.

CL1 and CL2 must be non-overlapping, CL1 first; the testbenches use a 10-unit
period with CL1 high at 2–4 and CL2 high at 6–8 (or similar). Outputs `z` are
registered and change only on CL2. One phase state takes at least one CL2
period; a wait takes one CL2 period per repetition.

Reset (`rst_n`, asynchronous, active low) puts the phase register into
phase state `INIT` and clears `z`, `v` and the input flip-flops.

## The phase register and the shift-register assignment

The phase state is stored in `P = ⌈log2 NF⌉` flip-flops `y`. `CODES[i]` is
the code of phase state `F_i`; a decoder turns `y` into the one-hot `F` used
by the network.

With `SHIFT = 1` (the default) the register is a shift register:
`y[P-1:1] ← y[P-2:0]` and only `y[0]` gets an input function, the OR of the
target codes' bit 0. All other state flip-flops need no control logic. This
only works for an assignment in which every transition `i → j` has
`CODES[j][P-1:1] == CODES[i][P-2:0]`; finding such an assignment with the
minimum number of state variables is a partition-based search done at design
time. The phase register asserts the property on every transition it takes,
so a wrong code table shows up in simulation. With `SHIFT = 0` the register
loads the whole target code and any one-to-one code table works.

The example's six phase states have the shift-register assignment
F0..F5 = `001, 011, 110, 101, 010, 100`.

## The example flow chart (default parameters)

Inputs `x0 = start`, `x1 = ack`, `x2 = mode`; outputs `z0 = req`,
`z1 = busy`, `z2 = done`; internal variable `v0` (repeat flag).

| phase | does | exits |
|---|---|---|
| F0 | wait `start = 1`; then set busy, reset done | → F1 |
| F1 | set req; if `mode`, set v0 | → F2 |
| F2 | wait `ack = 1`; then reset req | → F3 |
| F3 | wait `ack = 0`; if v0: reset v0 | v0 = 1 → F1, v0 = 0 → F4 |
| F4 | delay | → F5 |
| F5 | reset busy, set done | → F0 |

The boundaries follow the rules above: req is set (F1) and reset (F2) in
different phase states; v0 is set (F1) and tested (F3) in different phase
states; the waits on `ack = 1` and `ack = 0` are in different phase states.
Fifteen terms realize it (`cu_pkg::EX_TERMS`).

## Where this design departs from the method it follows

* **Clock inhibitor.** The method gates the phase register's clock,
  `CL_y = f_c · CL2`. Here `f_c` is a synchronous clock enable on CL2. The
  register contents behave identically, and no gated clock net is created.
  A library clock-gating cell could be substituted in `phase_register`.
* **Generic network.** The method derives a dedicated AND-OR network for each
  flow chart. Here the network is generated from a parameter table; after
  elaboration the result is the same two-level logic, but the table format and
  its size limits are this design's own.
* **Shift direction** of the shift-register realization (new bit into `y[0]`)
  and the binary `SHIFT = 0` alternative are this design's choices.
* **Example flow chart, reset style, widths**: all this design's own.

## Verification

Each testbench compares against values worked out independently of the RTL
and prints `TB_RESULT checks=N failures=M`.

* `tb_control_unit` — the whole unit at default parameters, 4000 CL2 periods
  with random inputs held for random stretches, against a behavioural model of
  the flow chart written as a case statement. Checks z, v, `F`, `y` and `fc`
  every period, that the delay phase lasts exactly one period, and that every
  mechanism occurs (waits in F0, F2, F3 with the clock inhibited, both exits of
  F3, set and reset of v0, completed runs, an asynchronous reset mid-run).
* `tb_rule2_separation` — two units built from the same flow-chart fragment,
  one separated correctly, one not; checks the correct one follows the flow
  chart and the other produces the predicted wrong output.
* `tb_rule3_feedback` — the same for a jump on an input that the unit's own
  output changes asynchronously (the environment drops `x_i` when `z_m` is
  set).
* `tb_control_function_network` — all phase states × inputs × v against
  hand-written Boolean equations of the example.
* `tb_phase_register` — shift-register instance along random legal
  transitions with random enables; a `SHIFT = 0` five-state instance along
  arbitrary transitions.
* `tb_jk_register`, `tb_input_register`, `tb_clock_inhibitor` — random
  stimulus against a reference.

Run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_control_unit \
    -y rtl -y tb +libext+.sv rtl/cu_pkg.sv tb/tb_control_unit.sv
./obj_dir/Vtb_control_unit
```

Each runs in well under a second.

## Building your own control unit

1. Cut the flow chart into phase states by the rules above; number them,
   with the initial one as `INIT`.
2. Write one `cu_pkg::mk(...)` term per set, reset and exit of each phase
   state, with the conditions met since the phase state's start.
3. Choose codes: any one-to-one table with `SHIFT = 0`, or a shift-register
   assignment with `SHIFT = 1`.
4. Instantiate `control_unit` with `NX`, `NZ`, `NV`, `NF`, `NT`, `TERMS`,
   `CODES`, `INIT`, `SHIFT`. `tb_rule2_separation.sv` is a small worked
   example.
