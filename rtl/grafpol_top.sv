// grafpol_top -- the four sequential controllers of the Grafpol TM examples,
// side by side on one clock and reset.
//
//   u_d2   drives2_controller         two drives, S1+ S2+ S2- S1-
//   u_fig5 fig5_controller            eight-state memory synthesis example
//   u_d3   drives3_controller         three drives, S1+ S1- S2+ S2- S3+ S3-
//   u_d2r  drives2_repeat_controller  two drives, S1+ S1- S2+ S2- S1+ S1-
//
// Each controller is independent: it has its own start button, its own
// position-indicator inputs and its own valve-coil outputs, which stand for
// the input and output terminals of one PLC each. Memory cells, per-rung
// activity and the set/reset-conflict flag are brought out for observation.
// All outputs are registered; an output follows its causing input after
// SYNC_STAGES+1 clocks. rst_n is an asynchronous active-low clear.
module grafpol_top #(
  parameter int SYNC_STAGES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  // two drives, four stages
  input  logic       d2_start,
  input  logic [4:1] d2_wp,
  output logic [4:1] d2_y,
  output logic       d2_m1,
  output logic [3:0] d2_rung,
  output logic       d2_conflict,
  // eight-state example
  input  logic       f5_start,
  input  logic [6:1] f5_x,
  output logic [6:1] f5_y,
  output logic [2:1] f5_m,
  output logic [8:0] f5_rung,
  output logic       f5_conflict,
  // three drives
  input  logic       d3_start,
  input  logic [6:1] d3_wp,
  output logic [6:1] d3_y,
  output logic [2:1] d3_m,
  output logic [5:0] d3_rung,
  output logic       d3_conflict,
  // two drives, S1 twice per cycle
  input  logic       d2r_start,
  input  logic [4:1] d2r_wp,
  output logic [4:1] d2r_y,
  output logic [3:1] d2r_m,
  output logic [6:0] d2r_rung,
  output logic       d2r_conflict
);

  drives2_controller #(.SYNC_STAGES(SYNC_STAGES)) u_d2 (
    .clk, .rst_n, .start(d2_start), .wp(d2_wp), .y(d2_y), .m1(d2_m1),
    .rung_fire(d2_rung), .sr_conflict(d2_conflict)
  );

  fig5_controller #(.SYNC_STAGES(SYNC_STAGES)) u_fig5 (
    .clk, .rst_n, .start(f5_start), .xin(f5_x), .y(f5_y), .m(f5_m),
    .rung_fire(f5_rung), .sr_conflict(f5_conflict)
  );

  drives3_controller #(.SYNC_STAGES(SYNC_STAGES)) u_d3 (
    .clk, .rst_n, .start(d3_start), .wp(d3_wp), .y(d3_y), .m(d3_m),
    .rung_fire(d3_rung), .sr_conflict(d3_conflict)
  );

  drives2_repeat_controller #(.SYNC_STAGES(SYNC_STAGES)) u_d2r (
    .clk, .rst_n, .start(d2r_start), .wp(d2r_wp), .y(d2r_y), .m(d2r_m),
    .rung_fire(d2r_rung), .sr_conflict(d2r_conflict)
  );

endmodule
