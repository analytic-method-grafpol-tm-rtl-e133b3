# Set/reset sequential controllers for pneumatic drives (Grafpol TM schematic equations)

A pneumatic machine that runs a fixed sequence — cylinder 1 out, cylinder 1
back, cylinder 2 out, … — is controlled by watching position switches and
energising valve coils. The difficulty is that the switches alone do not say
where in the sequence the machine is: "both cylinders retracted" is true at the
start of the cycle and again half-way through it. The Grafpol TM method solves
this by adding a small number of *elementary memory cells* (flags) that are set
and cleared at chosen points of the cycle. The whole controller then becomes a
**schematic equation**: a list of rungs, each an AND of position switches and
memory flags (plain or negated) that, while true, sets or resets valve coils and
memory flags. The same equation can be wired as relay logic or typed into a PLC
as a ladder program. This repository implements such equations as synchronous
logic.

Four controllers are provided. They are independent machines that share
nothing but a clock and a reset in the top level `grafpol_top`:

| module | drives | cycle | coils | memory cells | rungs |
|---|---|---|---|---|---|
| `drives3_controller` | S1, S2, S3 | S1+ S1− S2+ S2− S3+ S3− | 6 | 2 | 6 |
| `drives2_repeat_controller` | S1, S2 | S1+ S1− S2+ S2− S1+ S1− | 4 | 3 | 7 |
| `fig5_controller` | A, B, C | B+ B− A+ C+ C− A− B+ B− | 6 | 2 | 9 |
| `drives2_controller` | S1, S2 | S1+ S2+ S2− S1− | 4 | 1 | 4 |

All four run on one generic engine, `grafpol_controller`. Each controller
only supplies a constant rung table.

## The controlled process

Each drive is a double-acting cylinder. A double-sided solenoid valve moves it:
one coil drives the rod out and the other drives it back. The valve spool is
bistable, so a coil only needs to be energised long enough to shift it. Each
cylinder has two position indicators, one for "fully retracted" and one for
"fully extended". They are named WP1..WP6 (X1..X6 in `fig5_controller`); an
odd number means retracted, the next even number extended. A controller has one more input,
the start signal S. The machine repeats its cycle while S is held. If S is
released, the machine finishes the current cycle and stops with every cylinder
retracted.

Each stage of the cycle has its own output coil. The stage starts when its
*transition* becomes true. A transition is the condition "the previous stage has
finished", for example "S1 is extended". Entering a stage sets its own coil and
resets the coil of the previous stage. So in steady operation exactly one coil
is on at a time. At rest, the coil of the last stage stays on.

## Why memory is needed, and where it goes

Take the signals that show each cylinder in its initial (retracted) position.
For each state, write down their values at the moment the state is entered.
This gives a *status table*. Two states whose rows are equal are
*equivalent*: the switches cannot tell them apart, so a rung that should fire in
one of them would also fire in the other. The eight-state example
(`fig5_controller`, with X1, X3, X5 as the retracted indicators of A, B, C)
shows the rules:

| state | coil set | X1 X3 X5 on entry | memory written/deleted | transition with memory |
|---|---|---|---|---|
| 1 | Y3 (B out) | 1 1 1 | – | S·X3·/M1 |
| 2 | Y4 (B back) | 1 0 1 | M1 set | X4·/M2 |
| 3 | Y1 (A out) | 1 1 1 | – | X3·M1·/M2 |
| 4 | Y5 (C out) | 0 1 1 | – | X2·/M2 |
| 5 | Y6 (C back) | 0 1 0 | M2 set | X6 |
| 6 | Y2 (A back) | 0 1 1 | – | X5·M1·M2 |
| 7 | Y3 (B out) | 1 1 1 | – | X1·M1·M2 |
| 8 | Y4 (B back) | 1 0 1 | M1 reset | X4·M2 |
| stop | – | 1 1 1 | M2 reset | X3·/M1 |

* States 1 and 3 are equivalent and exactly one state lies between them. So a
  memory cell, M1, is written in that middle state. The transition of the
  first state of the pair gets /M1 and the transition of the second gets M1.
* The pairs 2/8, 3/7 and 4/6 are also equivalent. Their first members (2, 3, 4)
  follow one another, so a single cell covers all three pairs. M2 is written in
  the first state after them that is in no pair, which is state 5. States 2, 3
  and 4 get /M2, and states 6, 7 and 8 get M2.
* Memory cells are deleted at the end of the cycle. If the last transition
  holds no memory literal, all cells are deleted there (as in
  `drives3_controller`). If the last transition uses a cell, that cell is
  deleted by the transition of the first state, or by a separate stop rung. The
  next cycle then starts with every cell at 0.

Memory writes and deletes are simply more set/reset terms on the rungs. So the
finished controller is nothing more than the rung list.

## The engine: `grafpol_controller`

Each rung is a packed record `rung_t` (defined in `grafpol_pkg`):

* `need1` holds the literals that must be 1.
* `need0` holds the literals that must be 0.
* `y_set`, `y_rst`, `m_set` and `m_rst` hold the coils and memory cells the
  rung sets or resets.

A literal is one of up to 8 inputs or one of up to 4 memory cells. The helper
functions `lx(i)` (input i), `lm(j)` (memory cell j), `oy(i)`, `om(j)` and
`mk_rung(...)` let a controller write its table one rung per line. Each line
matches one line of its equation. The engine works once per clock, like one
PLC scan:

1. **Input image.** The inputs pass through `SYNC_STAGES` (default 2)
   flip-flops, because the position switches are asynchronous.
2. **Rung products.** Every rung is evaluated in parallel from the input image
   and the current memory cells.
3. **Update.** The set and reset terms of all true rungs are ORed together.
   They are applied on the next clock edge by `grafpol_sr_cell`, where
   `q <= (q | set) & ~rst`.

**Reset dominates set.** The equations depend on this. When the next stage's
transition becomes true, the previous stage's rung is usually still true for
one more clock. The memory cell that will block it is written only in that same
clock. For that one clock the same coil is both set and reset. Reset dominance
makes the coil turn off rather than leaving both coils of a valve energised. A
ladder program gets the same effect when the resetting rung comes after the
setting rung. The `sr_conflict` output flags such clocks. They occur in every
cycle of every controller.

**Timing.** An output changes `SYNC_STAGES + 1` clocks after the input change
that causes it. In `drives2_repeat_controller`, one change at the end of the
cycle takes one clock more: its delete-memory rung must clear M1 and M2 before
the start rung can fire. The clock can be any frequency far above the speed of
the cylinders. There is no other timing requirement. `rst_n` is an
asynchronous active-low clear of all coils, memory cells and the input image.

## The four controllers

Equations are written `product : actions`, with `/` for negation. The input
vector of every controller is `{signals, S}`: bit 0 is S and bit i is
indicator i.

**`drives3_controller`** (three drives S1–S3; Y1/Y2 S1 out/back, Y3/Y4 S2,
Y5/Y6 S3):

    S.WP5./M1  : Y1(S) Y6(R)
    WP2        : Y2(S) Y1(R) M1(S)
    WP1.M1./M2 : Y3(S) Y2(R)
    WP4        : Y4(S) Y3(R) M2(S)
    WP3.M2     : Y5(S) Y4(R)
    WP6        : Y6(S) Y5(R) M1(R) M2(R)

**`drives2_repeat_controller`** (S1 makes two strokes per cycle; Y1/Y2 S1
out/back, Y3/Y4 S2):

    S.WP1./M1  : Y1(S) Y2(R) M3(R)
    WP2./M2    : Y2(S) Y1(R) M1(S)
    WP1.M1./M2 : Y3(S) Y2(R)
    WP4        : Y4(S) Y3(R) M2(S)
    WP3.M2./M3 : Y1(S) Y4(R)
    WP2.M2     : Y2(S) Y1(R) M3(S)
    WP1.M3     : M1(R) M2(R)

At rest this controller holds M3 = 1. The next start clears it.

**`fig5_controller`**: the table in the previous section. Rung 9 is the stop
rung.

**`drives2_controller`** (Y1 = S1 out, Y2 = S2 out, Y3 = S2 back, Y4 = S1 back):

    S.WP1      : Y1(S) Y4(R) M1(R)
    WP2./M1    : Y2(S) Y1(R)
    WP4        : Y3(S) Y2(R) M1(S)
    WP3.M1     : Y4(S) Y3(R)

Every controller carries a concurrent assertion: both coils of the same valve
are never on together.

## Where this design departs from the method's published examples

* **States 6 and 7 of the eight-state example.** The published table gives
  their transitions as X5·M2 and X1·M2. Both stay true during state 8 (A and C
  are retracted and M2 is still set). As a result, Y3 (B out) is set again
  while Y4 (B back) is on, so both coils of B's valve are energised. The method itself requires that a transition be 0 while its
  stage's coil is being reset. `fig5_controller` therefore adds M1 to both
  transitions, because M1 is 1 exactly in states 2 to 7. With the published
  forms the testbench fails.
* **Deleting M2 in the eight-state example.** The published stop condition is
  X3 alone. But X3 is also 1 in states 3 to 7, where M2 must hold. The stop rung
  here is X3·/M1, which can act only after M1 has been deleted in state 8.
* **The four-stage two-drive controller.** For this sequence the method gives
  only the stages and the coil assignment, not the memory or the equation.
  `drives2_controller` derives them with the same rules: states 2 and 4 are
  equivalent, M1 is written in state 3, and the first transition deletes it.
* **Hardware form.** The method targets relay circuits and PLC ladder
  programs. These are this design's own choices:
  * The clocked, all-rungs-parallel evaluation.
  * The input image registers.
  * Reset dominance.
  * The asynchronous reset.
  * The capacity of 8 inputs, 8 coils and 4 memory cells per controller.
* **The PLC and the cylinders** are outside the RTL. Each controller module is
  the program together with its I/O. The cylinders and valves exist only as
  the testbench model `tb/pneumatic_drive_model.sv`.

## Files

| file | contents |
|---|---|
| `rtl/grafpol_pkg.sv` | `rung_t`, capacity constants, table helper functions |
| `rtl/grafpol_sr_cell.sv` | reset-dominant set/reset bit bank |
| `rtl/grafpol_controller.sv` | generic schematic-equation engine |
| `rtl/drives3_controller.sv`, `rtl/drives2_repeat_controller.sv`, `rtl/fig5_controller.sv`, `rtl/drives2_controller.sv` | the four controllers |
| `rtl/grafpol_top.sv` | all four side by side; ports prefixed `d2_`, `f5_`, `d3_`, `d2r_` |
| `tb/pneumatic_drive_model.sv` | cylinder + bistable valve + two indicators (behavioural) |
| `tb/seq_monitor.sv` | checks state order, one-hot coils, memory values, latency |
| `tb/tb_*.sv` | one self-checking testbench per module |

To add a controller, work out its status table and rungs as described above.
Then write a wrapper like `drives3_controller` that builds a `rung_t` table and
instantiates `grafpol_controller`. Check the engine's capacity
(`grafpol_pkg::MAX_X/MAX_Y/MAX_M`) and raise it there if needed.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With
Verilator 5, from the repository root:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
      --top-module tb_grafpol_top rtl/grafpol_pkg.sv tb/tb_grafpol_top.sv
    ./obj_dir/Vtb_grafpol_top

Replace `tb_grafpol_top` with any other `tb_*` name to run that test alone.

What the tests establish:

* The controller testbenches and the end-to-end `tb_grafpol_top` close each
  controller's loop through the drive models. Each state is checked against a
  hand-derived list of the coil that is on and the memory values in that
  state, plus the output latency.
* The machine runs several cycles with S held. S is released mid-cycle, and
  the test checks that the machine stops at the end of the cycle with all
  cylinders retracted. It is then restarted.
* The tests check stroke counts and that no valve ever had both coils on. They
  count every rung firing, every memory cell being written and deleted, and
  the set/reset conflicts, and each must happen at least once.
* `tb_grafpol_top` runs at the top level's default parameters.
* `tb_grafpol_controller` compares the engine with an independent model under
  random inputs and a made-up rung table. `tb_grafpol_sr_cell` does the same
  for the set/reset bit bank.

What they do not establish:

* Behaviour with faulty sensors, such as a switch that never closes or two
  switches of one cylinder closing together. The method does not describe
  these cases, and the controllers then simply wait or misbehave as the
  equation dictates.
* Behaviour when S is pulsed within the first few clocks of a stage.
