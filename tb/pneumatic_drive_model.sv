// pneumatic_drive_model -- behavioural model of one pneumatic drive: a
// cylinder moved by a double-sided solenoid distribution valve, with two
// piston-rod position indicators. Testbench use only.
//
// The valve spool is bistable: energising coil_ext shifts it to "extend",
// energising coil_ret shifts it to "retract", and with neither coil (or, as a
// fault, both) energised it keeps its last position. The rod moves one step
// per clock towards the spool's side and takes TRAVEL clocks for a full
// stroke. wp_ret is 1 only when the rod is fully retracted, wp_ext only when
// fully extended (initial state: retracted). both_coils counts the clocks in
// which both coils were energised, which a correct controller never does.
module pneumatic_drive_model #(
  parameter int TRAVEL = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic coil_ext,
  input  logic coil_ret,
  output logic wp_ret,
  output logic wp_ext,
  output int   both_coils,
  output int   strokes
);
  logic spool_ext;
  int   pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spool_ext  <= 1'b0;
      pos        <= 0;
      both_coils <= 0;
      strokes    <= 0;
    end else begin
      if (coil_ext && coil_ret)      both_coils <= both_coils + 1;
      else if (coil_ext)             spool_ext  <= 1'b1;
      else if (coil_ret)             spool_ext  <= 1'b0;
      if (spool_ext && pos < TRAVEL) begin
        pos <= pos + 1;
        if (pos == TRAVEL - 1) strokes <= strokes + 1;
      end else if (!spool_ext && pos > 0) begin
        pos <= pos - 1;
      end
    end
  end

  assign wp_ret = (pos == 0);
  assign wp_ext = (pos == TRAVEL);
endmodule
