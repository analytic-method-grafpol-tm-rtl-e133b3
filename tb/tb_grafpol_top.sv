// tb_grafpol_top -- end-to-end testbench for grafpol_top at its default
// parameters.
//
// All four controllers run at once, each closing its loop through models of
// its pneumatic drives (pneumatic_drive_model) and each watched by a
// seq_monitor that knows the expected control algorithm: the single coil on
// in every state, the memory cells' values and the output latency. Every
// controller is started and runs continuously for CYC_RUN cycles, its start
// button is released during the last of them, it must come to rest with all
// drives retracted, and is then restarted for one more cycle.
//
// Mechanisms counted (each must happen at least once per controller, or a
// failure is counted): every rung of its equation true; every memory cell
// written and deleted; a clock in which one coil or memory cell is both set
// and reset, resolved by reset dominance; a stop at the end of a cycle with
// start released; a restart from rest. Also checked: no valve ever has both
// coils energised, and each drive makes the expected number of strokes.
module tb_grafpol_top;
  localparam int SYNC    = 2;     // grafpol_top default
  localparam int TRAVEL  = 20;
  localparam int CYC_RUN = 3;
  localparam int CYC_ALL = CYC_RUN + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       d2_start = 1'b0, f5_start = 1'b0, d3_start = 1'b0, d2r_start = 1'b0;
  logic [4:1] d2_wp, d2r_wp, d2_y, d2r_y;
  logic [6:1] f5_x, d3_wp, f5_y, d3_y;
  logic       d2_m1;
  logic [2:1] f5_m, d3_m;
  logic [3:1] d2r_m;
  logic [3:0] d2_rung;
  logic [8:0] f5_rung;
  logic [5:0] d3_rung;
  logic [6:0] d2r_rung;
  logic       d2_conflict, f5_conflict, d3_conflict, d2r_conflict;

  grafpol_top dut (.*);

  // ------------------------------------------------------------ drive models
  int both [11];
  int strokes [11];

  // two drives, four stages: S1 = Y1 out / Y4 back, S2 = Y2 out / Y3 back
  pneumatic_drive_model #(.TRAVEL(TRAVEL)) d2_s1 (.clk, .rst_n,
    .coil_ext(d2_y[1]), .coil_ret(d2_y[4]), .wp_ret(d2_wp[1]), .wp_ext(d2_wp[2]),
    .both_coils(both[0]), .strokes(strokes[0]));
  pneumatic_drive_model #(.TRAVEL(TRAVEL)) d2_s2 (.clk, .rst_n,
    .coil_ext(d2_y[2]), .coil_ret(d2_y[3]), .wp_ret(d2_wp[3]), .wp_ext(d2_wp[4]),
    .both_coils(both[1]), .strokes(strokes[1]));
  // eight-state example: A = Y1/Y2, B = Y3/Y4, C = Y5/Y6
  pneumatic_drive_model #(.TRAVEL(TRAVEL)) f5_a (.clk, .rst_n,
    .coil_ext(f5_y[1]), .coil_ret(f5_y[2]), .wp_ret(f5_x[1]), .wp_ext(f5_x[2]),
    .both_coils(both[2]), .strokes(strokes[2]));
  pneumatic_drive_model #(.TRAVEL(TRAVEL + 7)) f5_b (.clk, .rst_n,
    .coil_ext(f5_y[3]), .coil_ret(f5_y[4]), .wp_ret(f5_x[3]), .wp_ext(f5_x[4]),
    .both_coils(both[3]), .strokes(strokes[3]));
  pneumatic_drive_model #(.TRAVEL(TRAVEL - 5)) f5_c (.clk, .rst_n,
    .coil_ext(f5_y[5]), .coil_ret(f5_y[6]), .wp_ret(f5_x[5]), .wp_ext(f5_x[6]),
    .both_coils(both[4]), .strokes(strokes[4]));
  // three drives: S1 = Y1/Y2, S2 = Y3/Y4, S3 = Y5/Y6
  pneumatic_drive_model #(.TRAVEL(TRAVEL)) d3_s1 (.clk, .rst_n,
    .coil_ext(d3_y[1]), .coil_ret(d3_y[2]), .wp_ret(d3_wp[1]), .wp_ext(d3_wp[2]),
    .both_coils(both[5]), .strokes(strokes[5]));
  pneumatic_drive_model #(.TRAVEL(TRAVEL + 3)) d3_s2 (.clk, .rst_n,
    .coil_ext(d3_y[3]), .coil_ret(d3_y[4]), .wp_ret(d3_wp[3]), .wp_ext(d3_wp[4]),
    .both_coils(both[6]), .strokes(strokes[6]));
  pneumatic_drive_model #(.TRAVEL(TRAVEL - 3)) d3_s3 (.clk, .rst_n,
    .coil_ext(d3_y[5]), .coil_ret(d3_y[6]), .wp_ret(d3_wp[5]), .wp_ext(d3_wp[6]),
    .both_coils(both[7]), .strokes(strokes[7]));
  // two drives, S1 twice: S1 = Y1/Y2, S2 = Y3/Y4
  pneumatic_drive_model #(.TRAVEL(TRAVEL)) d2r_s1 (.clk, .rst_n,
    .coil_ext(d2r_y[1]), .coil_ret(d2r_y[2]), .wp_ret(d2r_wp[1]), .wp_ext(d2r_wp[2]),
    .both_coils(both[8]), .strokes(strokes[8]));
  pneumatic_drive_model #(.TRAVEL(TRAVEL + 11)) d2r_s2 (.clk, .rst_n,
    .coil_ext(d2r_y[3]), .coil_ret(d2r_y[4]), .wp_ret(d2r_wp[3]), .wp_ext(d2r_wp[4]),
    .both_coils(both[9]), .strokes(strokes[9]));
  assign both[10] = 0;
  assign strokes[10] = 0;

  // expected strokes per cycle of each drive model above
  localparam int STROKES_PER_CYCLE [10] = '{1, 1, 1, 2, 1, 1, 1, 1, 2, 1};

  // ---------------------------------------------------------------- monitors
  int mc [4], mf [4], idx [4], cyc [4];

  seq_monitor #(.N_Y(4), .N_M(1), .N_X(5), .N_ST(4), .SYNC(SYNC),
    .EXP_Y({8'd4, 8'd3, 8'd2, 8'd1}),
    .EXP_M({1'b1, 1'b1, 1'b0, 1'b0})
  ) mon_d2 (.clk, .rst_n, .x({d2_wp, d2_start}), .y(d2_y), .m(d2_m1),
    .checks(mc[0]), .failures(mf[0]), .idx(idx[0]), .cycles(cyc[0]));

  seq_monitor #(.N_Y(6), .N_M(2), .N_X(7), .N_ST(8), .SYNC(SYNC),
    .EXP_Y({8'd4, 8'd3, 8'd2, 8'd6, 8'd5, 8'd1, 8'd4, 8'd3}),
    .EXP_M({2'b10, 2'b11, 2'b11, 2'b11, 2'b01, 2'b01, 2'b01, 2'b00})
  ) mon_f5 (.clk, .rst_n, .x({f5_x, f5_start}), .y(f5_y), .m(f5_m),
    .checks(mc[1]), .failures(mf[1]), .idx(idx[1]), .cycles(cyc[1]));

  seq_monitor #(.N_Y(6), .N_M(2), .N_X(7), .N_ST(6), .SYNC(SYNC),
    .EXP_Y({8'd6, 8'd5, 8'd4, 8'd3, 8'd2, 8'd1}),
    .EXP_M({2'b00, 2'b11, 2'b11, 2'b01, 2'b01, 2'b00})
  ) mon_d3 (.clk, .rst_n, .x({d3_wp, d3_start}), .y(d3_y), .m(d3_m),
    .checks(mc[2]), .failures(mf[2]), .idx(idx[2]), .cycles(cyc[2]));

  seq_monitor #(.N_Y(4), .N_M(3), .N_X(5), .N_ST(6), .SYNC(SYNC),
    .EXP_Y({8'd2, 8'd1, 8'd4, 8'd3, 8'd2, 8'd1}),
    .EXP_M({3'b111, 3'b011, 3'b011, 3'b001, 3'b001, 3'b000})
  ) mon_d2r (.clk, .rst_n, .x({d2r_wp, d2r_start}), .y(d2r_y), .m(d2r_m),
    .checks(mc[3]), .failures(mf[3]), .idx(idx[3]), .cycles(cyc[3]));

  // ------------------------------------------------------ mechanism counters
  localparam int NRUNG [4] = '{4, 9, 6, 7};
  localparam int NMEM  [4] = '{1, 2, 2, 3};
  int fired [4][9];
  int conflicts [4];
  int mem_wr [4][3], mem_del [4][3];
  int stops [4], restarts [4];
  logic [8:0] rung_v [4];
  logic [2:0] m_v [4], m_prev [4];
  logic       conf_v [4];

  always_comb begin
    rung_v[0] = 9'(d2_rung);  m_v[0] = 3'(d2_m1);  conf_v[0] = d2_conflict;
    rung_v[1] = f5_rung;      m_v[1] = 3'(f5_m);   conf_v[1] = f5_conflict;
    rung_v[2] = 9'(d3_rung);  m_v[2] = 3'(d3_m);   conf_v[2] = d3_conflict;
    rung_v[3] = 9'(d2r_rung); m_v[3] = d2r_m;      conf_v[3] = d2r_conflict;
  end

  always @(posedge clk) begin
    for (int c = 0; c < 4; c++) begin
      if (rst_n) begin
        for (int r = 0; r < 9; r++) if (rung_v[c][r]) fired[c][r]++;
        if (conf_v[c]) conflicts[c]++;
        for (int j = 0; j < 3; j++) begin
          if (m_v[c][j] && !m_prev[c][j]) mem_wr[c][j]++;
          if (!m_v[c][j] && m_prev[c][j]) mem_del[c][j]++;
        end
      end
      m_prev[c] <= m_v[c];
    end
  end

  // -------------------------------------------------------------- checking
  int checks = 0, failures = 0;
  string names [4] = '{"drives2", "fig5", "drives3", "drives2_repeat"};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit at_rest(int c);
    case (c)
      0: return d2_wp[1] && d2_wp[3];
      1: return f5_x[1] && f5_x[3] && f5_x[5];
      2: return d3_wp[1] && d3_wp[3] && d3_wp[5];
      default: return d2r_wp[1] && d2r_wp[3];
    endcase
  endfunction

  task automatic set_start(int c, logic v);
    case (c)
      0: d2_start  <= v;
      1: f5_start  <= v;
      2: d3_start  <= v;
      default: d2r_start <= v;
    endcase
  endtask

  task automatic finish();
    for (int c = 0; c < 4; c++) begin
      checks   += mc[c];
      failures += mf[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end

  // One process per controller: run, stop, rest, restart.
  bit done [4];
  for (genvar g = 0; g < 4; g++) begin : g_run
    initial begin
      done[g] = 1'b0;
      wait (rst_n);
      repeat (10 + 7 * g) @(posedge clk);
      set_start(g, 1'b1);
      wait (cyc[g] == CYC_RUN - 1 && idx[g] == 1);
      @(posedge clk) set_start(g, 1'b0);
      wait (cyc[g] == CYC_RUN);
      repeat (400) @(posedge clk);
      check(idx[g] == 0 && cyc[g] == CYC_RUN, {names[g], ": stopped at end of cycle"});
      check(at_rest(g), {names[g], ": drives retracted at rest"});
      if (idx[g] == 0 && at_rest(g)) stops[g]++;
      set_start(g, 1'b1);
      wait (idx[g] == 1);
      restarts[g]++;
      @(posedge clk) set_start(g, 1'b0);
      wait (cyc[g] == CYC_ALL);
      repeat (400) @(posedge clk);
      check(idx[g] == 0 && at_rest(g), {names[g], ": second stop"});
      done[g] = 1'b1;
    end
  end

  initial begin
    for (int c = 0; c < 4; c++) begin
      conflicts[c] = 0; stops[c] = 0; restarts[c] = 0; m_prev[c] = '0;
      for (int r = 0; r < 9; r++) fired[c][r] = 0;
      for (int j = 0; j < 3; j++) begin
        mem_wr[c][j] = 0;
        mem_del[c][j] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(d2_y == '0 && f5_y == '0 && d3_y == '0 && d2r_y == '0, "all coils off after reset");
    wait (done[0] && done[1] && done[2] && done[3]);

    for (int d = 0; d < 10; d++) begin
      check(both[d] == 0, $sformatf("drive model %0d: never both coils", d));
      check(strokes[d] == CYC_ALL * STROKES_PER_CYCLE[d],
            $sformatf("drive model %0d: %0d strokes", d, strokes[d]));
    end
    for (int c = 0; c < 4; c++) begin
      check(mc[c] > 0, {names[c], ": states monitored"});
      for (int r = 0; r < NRUNG[c]; r++)
        check(fired[c][r] > 0, $sformatf("%s: rung %0d fired", names[c], r + 1));
      for (int j = 0; j < NMEM[c]; j++) begin
        check(mem_wr[c][j] > 0, $sformatf("%s: M%0d written", names[c], j + 1));
        check(mem_del[c][j] > 0, $sformatf("%s: M%0d deleted", names[c], j + 1));
      end
      check(conflicts[c] > 0, {names[c], ": reset-over-set dominance"});
      check(stops[c] > 0, {names[c], ": stop at end of cycle"});
      check(restarts[c] > 0, {names[c], ": restart from rest"});
      $display("%s: %0d states, %0d set/reset conflicts, %0d stops, %0d restarts",
               names[c], mc[c] / 3, conflicts[c], stops[c], restarts[c]);
    end
    finish();
  end
endmodule
