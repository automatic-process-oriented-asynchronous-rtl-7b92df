# Process-oriented handshake control unit: a differential equation solver

A hand-written control unit for a datapath usually has one controller per
piece of hardware. Each such controller knows every operation that ever runs on
its adder or register. It grows with the schedule and gets hard to design.
This design splits control along the *program* instead:

* **Execution controllers.** There is one **process controller (PC)** per
  operation of the program. It fetches the operands, starts the functional
  unit, writes the result and reports back. Every PC looks the same, whatever
  the operation.
* **Execution order controllers.** They decide *when* each PC runs and never
  touch the datapath:
  * A **process sequencing controller (PSC)** runs the PCs of one data flow
    unit in dependency order, as concurrently as the dependencies allow.
  * A **control node controller (CNC)** implements `while` or `if`.
  * A **unit sequencing controller (USC)** runs units one after another.

All controllers talk through 4-phase request/acknowledge pairs. The datapath
uses bundled data: a functional unit (FU) or register acknowledges through a
matched delay element, not through completion detection. Each controller is
small and the same size wherever it is used. Each one codes every state of its
signals uniquely, so none needs an extra internal state bit.

The repository applies the method to the classic differential equation
benchmark. It solves y'' + 3xy' + 3y = 0 with the forward Euler loop

```
while (x < a) {
  t1 = u*dx;  t2 = 3*x;  t3 = 3*y;  t4 = t1*t2;  t5 = t3*dx;
  y  = y + t1;  x = x + dx;  t6 = u - t4;  u = t6 - t5;
}
```

It runs on two ALUs and two multipliers. A stand-alone IF controller sits
beside the solver in the top level.

## How the handshake controllers are built

Each controller is a **clocked implementation of its signal transition graph
(STG)**. Every output is a register with a *set* and a *reset* function of the
current signal levels. This is the same structure as a C-element
implementation (`out' = set | out & ~reset`). A clock edge stands in for the
C-element's own switching.

Each controller's states are uniquely coded by its signal levels. So the
outputs are the only state: no controller has a state register beyond them.
The handshake order, the concurrency and the "who waits for whom" relations
are those of the asynchronous controllers. Time is counted in clock cycles:
every output transition takes one cycle after its cause becomes visible.

The result is ordinary synchronous RTL. You can simulate it with any
simulator and synthesize it with any tool. It is **not** a speed-independent
gate netlist, and it has no hazard-freedom properties of its own. To get real
asynchronous gates, feed the transition sequences in the module headers to an
STG synthesis tool.

All resets are synchronous and active low. Reset lowers every handshake
signal, which is the initial marking of every STG: the token sits on the
End→Start arc.

## The controllers

### Process controller: `pc`

```
req_start+ → req_op[*]+, opcode+ → req_fu+ → ack_fu+ → req_wdr+ → ack_wdr+ → ack_start+
ack_start+ → req_op-, opcode-, req_fu-, req_wdr-        (PC's own idling phase)
ack_fu-, ack_wdr-, req_start- → ack_start-
```

Operand fetch (`req_op`) drives the mux selects in front of the FU. There is
no acknowledge for it: the FU's matched delay covers operand fetch, FU and
destination mux together. All rising transitions come before `ack_start+` and
all falling ones after it, which makes every signal state unique.

The key point is the **early idling phase**. A PC drops its datapath requests
as soon as it reports done. It does not wait for its PSC to drop `req_start`.
Meanwhile the PSC can already start the next PCs, so a PC's return-to-zero
is hidden behind other work. `ack_start` itself falls only after `req_start`
falls, which keeps the PSC-side handshake a clean 4-phase one.

Parameters:

* `HAS_FU = 0` gives the assignment variant (register ← input, no FU).
* `N_OP` sets the number of operand requests.
* `HAS_OPCODE` adds the opcode strobe for multi-function units.

Latency: `ack_start` rises 4 + D_FU + D_WR cycles after `req_start`, or
3 + D_WR cycles for an assignment.

### Process sequencing controller: `psc`, `psc_decomposed`

The PSC is the 4-phase expansion of the unit's dependency graph Start → PCs →
End. Edges are drawn between operations that *directly* precede each other
through data (read-after-write, write-after-read) or through a shared FU.

```
req+ → req_pc[j]+  for every j without predecessors
ack_pc[i]+ for all direct predecessors i of j → req_pc[j]+
all ack_pc+ → ack+ → req- → all req_pc- → all ack_pc- → ack-
```

`PRED[j]` is the bit mask of j's direct predecessors. Because a finished PC
keeps `ack_pc` high until the unit's idling phase, "predecessor done" is a
level, not an event. `req_pc[j]` rises exactly one cycle after its last
predecessor acknowledges.

`psc_decomposed` splits a large unit between two sub-PSCs (PCs `0..KA-1` and
`KA..K-1`):

* Each sub-PSC sees every PC's acknowledge, so an edge that crosses the split
  is honoured by the successor's sub-PSC.
* The unit acknowledge is a C-element join of the two sub-acknowledges. This
  costs one extra cycle.

The `psc` parameter `KX` and input `ack_ext` exist for this use: they let a
sub-PSC depend on PCs it does not run.

### Control node controllers: `while_cnc`, `if_cnc`

A CNC has three channels: its own `req/ack`, the conditional node
(`req_cond/ack_cond`, a PSC with a compare process) and the child block
(`req_body/ack_body`). `flag` is the stored result of the compare. It is read
only while `ack_cond` is high, when it is stable.

WHILE (signal order chosen so that no state signal is needed):

```
req+ → req_cond+ → ack_cond+ ─ flag=1 → req_body+ → ack_body+ → req_cond- → ack_cond-
                                        → req_body- → ack_body- → req_cond+ (next test)
                             └ flag=0 → ack+ → req_cond- → ack_cond- ; req- → ack-
```

The condition handshake is returned to zero only after the body has
acknowledged. Loop exit raises `ack` while `req_cond` is still high. With
this order, the two moments where all three channels are idle both lead to
`req_cond+`: right after `req+` and after a body run. There is no ambiguity,
even if `flag` still holds the previous run's value. One consequence is that
the compare PC stays "done but not released" while the body runs.

IF: `req+ → req_cond+ → ack_cond+ → [flag] req_body+ → ack_body+ → ack+`, then
everything returns to zero after `req-`.

### Unit sequencing controller: `usc`

A chain: block i+1 starts one cycle after block i acknowledges. Every block
keeps its acknowledge until `req-`, then all of them return to zero together.

## Bundled-data datapath

* **`delay_element`**: `out` follows `in` after `RISE` cycles when rising and
  `FALL` cycles (normally 1) when falling. The rising delay stands for the
  work. The fast falling delay keeps return-to-zero short. An input pulse
  shorter than `RISE` is swallowed.
* **`bd_ack_gen`**: one delay element per FU or register, shared by every
  process bound to that resource. Its input is the OR of their requests. Each
  requester's acknowledge is `D & req_i`, so only the active one is answered,
  and the acknowledge drops at the same moment as its request.

  This sharing needs one timing rule: a new requester must not arrive while D
  is still high from the previous one, or it is acknowledged at once. The
  rule holds here by construction, because the next process on an FU is
  always started through a PSC. Its request arrives at least two cycles after
  the previous PC dropped its own, and D falls in one. Two assertions guard
  it: `a_no_overlap`, and `a_one_requester` for single ownership.
* **`diffeq_datapath`**:
  * 13 positive-edge registers. Each has an input mux (FU outputs, external
    inputs), a register enable on the first cycle of a write request, and an
    acknowledge generator with delay `D_REG`.
  * Operand muxes in front of each FU, selected by the `req_op` lines of the
    processes bound to that FU.
  * ALU1 and ALU2 (`alu`: ADD, SUB, signed LT) and MUL1 and MUL2
    (`multiplier`: signed Q`FRAC` fixed point), with delays `D_ALU` and
    `D_MUL`.

  Every select is an AND-OR of request lines. It is built from the binding
  table `PROC` in `diffeq_pkg`, which lists for each process its FU, its
  operand registers, its destination and its ALU operation. The constant 3.0
  is a read-only register.

Because the FUs and muxes here are combinational, any delay of at least one
cycle covers operand fetch + FU + destination mux. The defaults `D_ALU = 2`,
`D_MUL = 4`, `D_REG = 1` only model a slower multiplier.

## The solver program and its control unit

The program is a sequence of an input unit and a loop:

| unit | controller | processes (PC, FU) |
|---|---|---|
| input | `psc` K=5, no dependencies | x, y, u, dx, a ← inputs (assignments) |
| loop | `while_cnc` | |
| condition | `psc` K=1 | c = x < a (ALU1) |
| body | `psc_decomposed` K=9, split 7+2 | b0 t1=u·dx (MUL1), b1 t2=3x (MUL2), b2 t3=3y (MUL1), b3 t4=t1·t2 (MUL2), b4 t5=t3·dx (MUL1), b5 y+=t1 (ALU1), b6 x+=dx (ALU2) · b7 t6=u−t4 (ALU1), b8 u=t6−t5 (ALU2) |
| program | `usc` N=2 | input, then loop |

The body's direct predecessors are listed in `BODY_PRED`:

* b2←b0 (MUL1)
* b3←b0, b1
* b4←b2
* b5←b0, b2 (b2 reads y before b5 rewrites it)
* b6←b1 (b1 reads x)
* b7←b3, b5
* b8←b4, b6, b7

Edges b3→b7, b5→b7, b4→b8 and b6→b8 cross between the two sub-PSCs.

With the default parameters a run takes exactly **20 + 66·n cycles** for n
loop iterations. The critical path of one iteration is b0 → b3 → b7 → b8 plus
the condition test. Several PCs work at once.

## Top level: `poacu_top`

| port | dir | meaning |
|---|---|---|
| `start_req` / `start_ack` | in / out | 4-phase: raise `start_req` with the inputs stable; results valid when `start_ack` rises; then lower `start_req` and wait for `start_ack` to fall |
| `x0 y0 u0 dx a` | in | initial x, y, y′ (=u), step, end point; signed, `FRAC` fraction bits; hold until `start_ack` |
| `x y u` | out | state registers |
| `proc_req proc_ack proc_req_fu proc_req_wdr` | out | per process (15): start request, done, FU request, write request, for observation |
| `loop_cond_req loop_body_req` | out | WHILE controller channels, for observation |
| `if_*` | mixed | the stand-alone IF controller (`req/ack`, `req_cond/ack_cond`, `flag`, `req_body/ack_body`) |

| parameter | default | meaning |
|---|---|---|
| `W` | 16 | data width |
| `FRAC` | 8 | fraction bits (Q8.8) |
| `D_ALU`, `D_MUL`, `D_REG` | 2, 4, 1 | matched delays in cycles |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends itself. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_poacu_top \
    -y rtl -y tb +libext+.sv rtl/diffeq_pkg.sv tb/tb_poacu_top.sv
./obj_dir/Vtb_poacu_top
```

Use the same command with another testbench name for the others.

| testbench | what it shows |
|---|---|
| `tb_poacu_top` | End to end at default parameters. Five solver runs, from zero to 20 iterations, compared bit-exactly with a fixed-point model; exact cycle counts. Counts loop iterations, loop exits (including one with no iteration), concurrent PCs, FU reuse, early idling, cross-sub-PSC starts, assignments and both IF branches. Each must occur. |
| `tb_diffeq_control_unit` | Program order for 0, 1, 2, 4 iterations against a random-latency datapath model: every dependency, run counts, operand → FU → write order |
| `tb_diffeq_datapath` | Processes driven one at a time as a PC would; full register file compared after each; acknowledge latencies |
| `tb_pc`, `tb_psc`, `tb_psc_decomposed`, `tb_usc`, `tb_while_cnc`, `tb_if_cnc` | Each controller against random-latency 4-phase servers: order, run counts, exact latencies, return to zero |
| `tb_controller_sizes` | PSC with 2, 4, 8 PCs, decomposed PSC with 8, USC with 2, 4, 8 blocks (uses `tb/hs_server.sv`) |
| `tb_delay_element`, `tb_bd_ack_gen`, `tb_alu`, `tb_multiplier` | Leaf units against reference models |

## Departures from the published method and this design's own choices

The controller types follow the published process-oriented method for
generating asynchronous control units from control data flow graphs. So do
their handshakes, the PSC construction from direct precedences and the
bundled-data timing rules. The points below depart from it or fill gaps
where it leaves the choice open.


* **Clocked STG implementation.** Everything is clocked, as described above.
  Delays are whole cycles, and the timing rules of bundled data hold by
  construction instead of by sized delay lines.
* **Transition orders of the CNCs.** The WHILE and IF controllers follow the
  orders given above. The WHILE order was chosen so that no internal state
  signal is needed.
* **`ack_start-` of a PC waits for `req_start-`.** The PC still releases its
  datapath requests right away.
* **The solver is one possible mapping.** The loop split into processes, the
  schedule, the binding onto ALU1/ALU2/MUL1/MUL2, the input unit made of
  assignment processes and the 7+2 decomposition of the body PSC are one
  possible mapping, not a unique one. Other splits give other controller
  counts.
* **Data format.** 16-bit signed Q8.8 with truncating multiply and wrap-around
  add. No overflow detection.
* **Decomposed PSC.** It has two sub-PSCs that communicate through the PCs'
  acknowledges and are joined by a C-element. Deeper decompositions would
  nest the same structure. USC decomposition is not provided separately.
* **IF controller.** The solver has no `if`, so the IF controller stands alone
  on the top-level ports.
* **No extra delay between a PSC and a PC for the shared-delay rule.** In an
  asynchronous realisation, a delay may be needed between the PSC and the
  second of two PCs that share an FU. Here the rule holds without one: the
  controllers' cycle timing and the one-cycle falling delay already guarantee
  it, and the assertions in `bd_ack_gen` check it in every simulation.
* **USC decomposition.** A large USC can be split in the same way as a PSC.
  That split is not provided: the solver needs only a two-block USC.
