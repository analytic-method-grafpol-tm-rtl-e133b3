// drives2_controller -- sequential controller for two pneumatic drives S1,
// S2 running the cycle S1 out, S2 out, S2 back, S1 back.
//
// Output coils, in the order of the control algorithm: Y1 = EZ1 (S1 out),
// Y2 = EZ3 (S2 out), Y3 = EZ4 (S2 back), Y4 = EZ2 (S1 back). Inputs: start S
// and indicators WP1..WP4 (WP1/WP2 S1 retracted/extended, WP3/WP4 S2
// retracted/extended).
//
// Only the stage sequence and the output assignment of this example are
// given; its memory and schematic equation are derived here with the same
// rules as the other controllers. The status table over WP1 and WP3 reads
// 11, 01, 00, 01 for states 1..4, so states 2 and 4 are equivalent with one
// state between them: memory M1 is written in state 3, the transition of
// state 2 carries /M1 and that of state 4 carries M1. As M1 appears in the
// last transition, it is deleted by the first state's transition:
//   S.WP1          : Y1(S) Y4(R) M1(R)
//   WP2./M1        : Y2(S) Y1(R)
//   WP4            : Y3(S) Y2(R) M1(S)
//   WP3.M1         : Y4(S) Y3(R)
// Timing and coil behaviour as in grafpol_controller: outputs change
// SYNC_STAGES+1 clocks after the causing input; reset dominates set.
module drives2_controller
  import grafpol_pkg::*;
#(
  parameter int SYNC_STAGES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,     // S
  input  logic [4:1] wp,        // WP1..WP4
  output logic [4:1] y,         // Y1..Y4
  output logic       m1,        // M1
  output logic [3:0] rung_fire, // rung k+1 of the equation true
  output logic       sr_conflict
);
  localparam int NR = 4;
  typedef rung_t [NR-1:0] table_t;

  // Input vector: x[0] = S, x[i] = WPi.
  function automatic table_t build();
    table_t t;
    t[0] = mk_rung(lx(0) | lx(1), '0,    oy(1), oy(4), '0,    om(1));
    t[1] = mk_rung(lx(2),         lm(1), oy(2), oy(1), '0,    '0);
    t[2] = mk_rung(lx(4),         '0,    oy(3), oy(2), om(1), '0);
    t[3] = mk_rung(lx(3) | lm(1), '0,    oy(4), oy(3), '0,    '0);
    return t;
  endfunction

  localparam table_t RUNGS = build();

  grafpol_controller #(
    .N_X(5), .N_Y(4), .N_M(1), .N_RUNG(NR),
    .SYNC_STAGES(SYNC_STAGES), .RUNGS(RUNGS)
  ) u_eq (
    .clk, .rst_n,
    .x({wp, start}),
    .y, .m(m1), .rung_fire, .sr_conflict
  );

  // S1 coils are Y1/Y4, S2 coils are Y2/Y3.
  a_valves: assert property (@(posedge clk) disable iff (!rst_n)
    !(y[1] && y[4]) && !(y[2] && y[3]));

endmodule
