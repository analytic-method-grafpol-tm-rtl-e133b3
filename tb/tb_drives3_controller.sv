// tb_drives3_controller -- self-checking testbench for drives3_controller.
//
// The controller runs against behavioural models of its pneumatic drives
// (pneumatic_drive_model). seq_monitor holds the expected control algorithm,
// worked out by hand from the stage sequence: for each state the single coil
// that must be on and the memory cells' values, and it checks the output
// latency. The test holds start for three cycles (released during the third,
// which must still complete), checks that the controller then rests in its
// final state with every drive retracted, restarts it for one more cycle, and
// finally checks stroke counts, that no valve ever had both coils energised,
// that every rung fired and that reset-over-set dominance was exercised.
module tb_drives3_controller;
  localparam int SYNC   = 2;   // the controllers' default
  localparam int TRAVEL = 12;
  localparam int NST    = 6;
  localparam int NR     = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [6:1] wp;
  logic [6:1] y;
  logic [2:1] m;
  logic [NR-1:0] rung;
  logic conflict;

  always #5 clk = ~clk;

  drives3_controller dut (
    .clk, .rst_n, .start, .wp(wp), .y, .m(m),
    .rung_fire(rung), .sr_conflict(conflict)
  );

  int p1_both, p1_strokes;
  pneumatic_drive_model #(.TRAVEL(TRAVEL)) p1 (
    .clk, .rst_n, .coil_ext(y[1]), .coil_ret(y[2]),
    .wp_ret(wp[1]), .wp_ext(wp[2]), .both_coils(p1_both), .strokes(p1_strokes)
  );
  int p2_both, p2_strokes;
  pneumatic_drive_model #(.TRAVEL(TRAVEL)) p2 (
    .clk, .rst_n, .coil_ext(y[3]), .coil_ret(y[4]),
    .wp_ret(wp[3]), .wp_ext(wp[4]), .both_coils(p2_both), .strokes(p2_strokes)
  );
  int p3_both, p3_strokes;
  pneumatic_drive_model #(.TRAVEL(TRAVEL)) p3 (
    .clk, .rst_n, .coil_ext(y[5]), .coil_ret(y[6]),
    .wp_ret(wp[5]), .wp_ext(wp[6]), .both_coils(p3_both), .strokes(p3_strokes)
  );

  int mchecks, mfail, idx, cycles;
  seq_monitor #(
    .N_Y(6), .N_M(2), .N_X(7), .N_ST(NST), .SYNC(SYNC),
    .EXP_Y({8'd6, 8'd5, 8'd4, 8'd3, 8'd2, 8'd1}),
    .EXP_M({2'b00, 2'b11, 2'b11, 2'b01, 2'b01, 2'b00})
  ) mon (
    .clk, .rst_n, .x({wp, start}), .y, .m,
    .checks(mchecks), .failures(mfail), .idx, .cycles
  );

  int checks = 0, failures = 0;
  int fired [NR];
  int conflicts = 0;

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < NR; r++) if (rung[r]) fired[r]++;
    if (conflict) conflicts++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic finish();
    checks   += mchecks;
    failures += mfail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end

  initial begin
    for (int r = 0; r < NR; r++) fired[r] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (20) @(posedge clk);
    check(y == '0 && m == '0, "idle after reset");
    start <= 1'b1;
    wait (cycles == 2 && idx == 1);
    @(posedge clk) start <= 1'b0;
    wait (cycles == 3);
    repeat (300) @(posedge clk);
    check(idx == 0, "stopped at the end of the cycle");
    check(y == 6'(6'b100000), "last coil stays on at rest");
    check(m == 2'(2'b00), "memory cells at rest");
    check(wp[1] && wp[3] && wp[5], "all drives retracted at rest");
    start <= 1'b1;
    wait (idx == 1);
    @(posedge clk) start <= 1'b0;
    wait (cycles == 4);
    repeat (300) @(posedge clk);
    check(idx == 0 && cycles == 4, "second run stopped after one cycle");
    check(mchecks == 3 * 4 * NST, "every state entered in order");
    check(p1_both == 0, "p1: never both coils");
    check(p1_strokes == 4 * 1, "p1: stroke count");
    check(p2_both == 0, "p2: never both coils");
    check(p2_strokes == 4 * 1, "p2: stroke count");
    check(p3_both == 0, "p3: never both coils");
    check(p3_strokes == 4 * 1, "p3: stroke count");
    for (int r = 0; r < NR; r++) check(fired[r] > 0, $sformatf("rung %0d fired", r + 1));
    check(conflicts > 0, "reset-over-set dominance exercised");
    finish();
  end
endmodule
