// drives3_controller -- sequential controller for three pneumatic drives
// S1, S2, S3, each moved by a double-sided solenoid valve.
//
// Cycle (six elementary stages): S1 out, S1 back, S2 out, S2 back, S3 out,
// S3 back, repeated while the start signal is held. Output coils: Y1/Y2
// extend/retract S1 (valve coils EZ1/EZ2), Y3/Y4 the same for S2, Y5/Y6 for
// S3. Inputs: start S and position indicators WP1..WP6 (WP1/WP2 S1
// retracted/extended, WP3/WP4 for S2, WP5/WP6 for S3).
//
// The input signals WP1, WP3, WP5 take the same values in stages 1, 3 and
// 5, so two elementary memory cells tell those stages apart: M1 is written
// when S1 reaches its end (stage 2) and M2 when S2 does (stage 4); both are
// deleted in the last stage, whose transition WP6 carries no memory. The
// schematic equation implemented, one rung per line:
//   S.WP5./M1      : Y1(S) Y6(R)
//   WP2            : Y2(S) Y1(R) M1(S)
//   WP1.M1./M2     : Y3(S) Y2(R)
//   WP4            : Y4(S) Y3(R) M2(S)
//   WP3.M2         : Y5(S) Y4(R)
//   WP6            : Y6(S) Y5(R) M1(R) M2(R)
// The equation is the method's; running it as a clocked rung table with an
// input image of SYNC_STAGES registers and reset-dominant coils is this
// design's choice (see grafpol_controller). Outputs change SYNC_STAGES+1
// clocks after the input that causes the change. rst_n clears all coils and
// memories asynchronously.
module drives3_controller
  import grafpol_pkg::*;
#(
  parameter int SYNC_STAGES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,     // S
  input  logic [6:1] wp,        // WP1..WP6
  output logic [6:1] y,         // Y1..Y6
  output logic [2:1] m,         // M1, M2
  output logic [5:0] rung_fire, // rung k+1 of the equation true
  output logic       sr_conflict
);
  localparam int NR = 6;
  typedef rung_t [NR-1:0] table_t;

  // Input vector: x[0] = S, x[i] = WPi.
  function automatic table_t build();
    table_t t;
    t[0] = mk_rung(lx(0) | lx(5), lm(1),         oy(1),         oy(6),         '0,            '0);
    t[1] = mk_rung(lx(2),         '0,            oy(2),         oy(1),         om(1),         '0);
    t[2] = mk_rung(lx(1) | lm(1), lm(2),         oy(3),         oy(2),         '0,            '0);
    t[3] = mk_rung(lx(4),         '0,            oy(4),         oy(3),         om(2),         '0);
    t[4] = mk_rung(lx(3) | lm(2), '0,            oy(5),         oy(4),         '0,            '0);
    t[5] = mk_rung(lx(6),         '0,            oy(6),         oy(5),         '0,            om(1) | om(2));
    return t;
  endfunction

  localparam table_t RUNGS = build();

  grafpol_controller #(
    .N_X(7), .N_Y(6), .N_M(2), .N_RUNG(NR),
    .SYNC_STAGES(SYNC_STAGES), .RUNGS(RUNGS)
  ) u_eq (
    .clk, .rst_n,
    .x({wp, start}),
    .y, .m, .rung_fire, .sr_conflict
  );

  // Both coils of one valve are never energised together.
  a_valves: assert property (@(posedge clk) disable iff (!rst_n)
    !(y[1] && y[2]) && !(y[3] && y[4]) && !(y[5] && y[6]));

endmodule
