// fig5_controller -- eight-state sequential controller of the worked memory
// synthesis example (three double-acting drives A, B, C).
//
// Drive A is moved by coils Y1 (out) / Y2 (back) with indicators X1
// (retracted) / X2 (extended); B by Y3/Y4 with X3/X4; C by Y5/Y6 with X5/X6.
// Cycle: B out, B back, A out, C out, C back, A back, B out, B back.
// The status table over the "initial position" signals X1, X3, X5 has
// equivalent states 1 and 3 (one state apart: memory M1, written in state 2)
// and the pairs 2/8, 3/7, 4/6 whose first members follow one another (one
// memory M2 for all three, written in state 5, the first state outside the
// groups). Schematic equation, one rung per line:
//   S.X3./M1       : Y3(S) Y4(R)
//   X4./M2         : Y4(S) Y3(R) M1(S)
//   X3.M1./M2      : Y1(S) Y4(R)
//   X2./M2         : Y5(S) Y1(R)
//   X6             : Y6(S) Y5(R) M2(S)
//   X5.M1.M2       : Y2(S) Y6(R)
//   X1.M1.M2       : Y3(S) Y2(R)
//   X4.M2          : Y4(S) Y3(R) M1(R)
//   X3./M1         : M2(R)            (STOP)
// Departure from the printed table: it gives the transitions of states 6
// and 7 as X5.M2 and X1.M2. Both stay true through state 8 (A is retracted,
// C is retracted, M2 is still set), so coil Y3 would be set again while Y4
// retracts B. This design adds M1, which is 1 exactly in states 2..7, to
// both transitions. The STOP rung's /M1 keeps it from deleting M2 in states
// 5..7, where X3 is also 1.
// Timing and coil behaviour as in grafpol_controller: outputs change
// SYNC_STAGES+1 clocks after the causing input; reset dominates set.
module fig5_controller
  import grafpol_pkg::*;
#(
  parameter int SYNC_STAGES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,     // S
  input  logic [6:1] xin,       // X1..X6
  output logic [6:1] y,         // Y1..Y6
  output logic [2:1] m,         // M1, M2
  output logic [8:0] rung_fire, // rungs 1..8 = states 1..8, rung 9 = STOP
  output logic       sr_conflict
);
  localparam int NR = 9;
  typedef rung_t [NR-1:0] table_t;

  // Input vector: x[0] = S, x[i] = Xi.
  function automatic table_t build();
    table_t t;
    t[0] = mk_rung(lx(0) | lx(3),         lm(1),  oy(3), oy(4), '0,    '0);
    t[1] = mk_rung(lx(4),                 lm(2),  oy(4), oy(3), om(1), '0);
    t[2] = mk_rung(lx(3) | lm(1),         lm(2),  oy(1), oy(4), '0,    '0);
    t[3] = mk_rung(lx(2),                 lm(2),  oy(5), oy(1), '0,    '0);
    t[4] = mk_rung(lx(6),                 '0,     oy(6), oy(5), om(2), '0);
    t[5] = mk_rung(lx(5) | lm(1) | lm(2), '0,     oy(2), oy(6), '0,    '0);
    t[6] = mk_rung(lx(1) | lm(1) | lm(2), '0,     oy(3), oy(2), '0,    '0);
    t[7] = mk_rung(lx(4) | lm(2),         '0,     oy(4), oy(3), '0,    om(1));
    t[8] = mk_rung(lx(3),                 lm(1),  '0,    '0,    '0,    om(2));
    return t;
  endfunction

  localparam table_t RUNGS = build();

  grafpol_controller #(
    .N_X(7), .N_Y(6), .N_M(2), .N_RUNG(NR),
    .SYNC_STAGES(SYNC_STAGES), .RUNGS(RUNGS)
  ) u_eq (
    .clk, .rst_n,
    .x({xin, start}),
    .y, .m, .rung_fire, .sr_conflict
  );

  a_valves: assert property (@(posedge clk) disable iff (!rst_n)
    !(y[1] && y[2]) && !(y[3] && y[4]) && !(y[5] && y[6]));

endmodule
