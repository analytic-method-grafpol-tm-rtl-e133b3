// drives2_repeat_controller -- sequential controller for two pneumatic drives
// S1, S2 in which S1 makes two strokes per cycle.
//
// Cycle (six elementary stages): S1 out, S1 back, S2 out, S2 back, S1 out,
// S1 back, repeated while the start signal is held. Output coils: Y1/Y2
// extend/retract S1 (valve coils EZ1/EZ2), Y3/Y4 extend/retract S2 (EZ3/EZ4).
// Inputs: start S and position indicators WP1..WP4 (WP1/WP2 S1
// retracted/extended, WP3/WP4 S2 retracted/extended).
//
// Because stages repeat the same input states, three elementary memory cells
// are needed: M1 is written at the first S1 extension, M2 at the S2
// extension and M3 at the second S1 extension. When S1 is back at the end
// of the cycle, M1 and M2 are deleted (a rung of its own), and M3, which
// appears in that last transition, is deleted by the first stage's
// transition when the next cycle starts. Schematic equation:
//   S.WP1./M1      : Y1(S) Y2(R) M3(R)
//   WP2./M2        : Y2(S) Y1(R) M1(S)
//   WP1.M1./M2     : Y3(S) Y2(R)
//   WP4            : Y4(S) Y3(R) M2(S)
//   WP3.M2./M3     : Y1(S) Y4(R)
//   WP2.M2         : Y2(S) Y1(R) M3(S)
//   WP1.M3         : M1(R) M2(R)
// The equation is the method's; the clocked rung-table form, input image and
// reset-dominant coils are this design's choice (see grafpol_controller).
// Outputs change SYNC_STAGES+1 clocks after the input that causes the change,
// one clock more where the end-of-cycle rung must first clear M1 and M2.
module drives2_repeat_controller
  import grafpol_pkg::*;
#(
  parameter int SYNC_STAGES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,     // S
  input  logic [4:1] wp,        // WP1..WP4
  output logic [4:1] y,         // Y1..Y4
  output logic [3:1] m,         // M1..M3
  output logic [6:0] rung_fire, // rung k+1 of the equation true
  output logic       sr_conflict
);
  localparam int NR = 7;
  typedef rung_t [NR-1:0] table_t;

  // Input vector: x[0] = S, x[i] = WPi.
  function automatic table_t build();
    table_t t;
    t[0] = mk_rung(lx(0) | lx(1), lm(1),         oy(1),         oy(2),         '0,            om(3));
    t[1] = mk_rung(lx(2),         lm(2),         oy(2),         oy(1),         om(1),         '0);
    t[2] = mk_rung(lx(1) | lm(1), lm(2),         oy(3),         oy(2),         '0,            '0);
    t[3] = mk_rung(lx(4),         '0,            oy(4),         oy(3),         om(2),         '0);
    t[4] = mk_rung(lx(3) | lm(2), lm(3),         oy(1),         oy(4),         '0,            '0);
    t[5] = mk_rung(lx(2) | lm(2), '0,            oy(2),         oy(1),         om(3),         '0);
    t[6] = mk_rung(lx(1) | lm(3), '0,            '0,            '0,            '0,            om(1) | om(2));
    return t;
  endfunction

  localparam table_t RUNGS = build();

  grafpol_controller #(
    .N_X(5), .N_Y(4), .N_M(3), .N_RUNG(NR),
    .SYNC_STAGES(SYNC_STAGES), .RUNGS(RUNGS)
  ) u_eq (
    .clk, .rst_n,
    .x({wp, start}),
    .y, .m, .rung_fire, .sr_conflict
  );

  a_valves: assert property (@(posedge clk) disable iff (!rst_n)
    !(y[1] && y[2]) && !(y[3] && y[4]));

endmodule
