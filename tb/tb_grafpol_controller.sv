// tb_grafpol_controller -- self-checking testbench for the generic
// schematic-equation engine grafpol_controller.
//
// The engine is given a small made-up rung table (4 inputs, 3 coils, 2
// memory cells, 5 rungs, 3 input-image stages) and random inputs. The
// testbench keeps its own model: a 3-deep delay line of the inputs, each
// rung's product written out literal by literal, and reset-dominant storage.
// Every clock it compares coils, memories, rung activity and the conflict
// flag, and it counts that every rung fired and that a set/reset conflict
// occurred.
module tb_grafpol_controller;
  import grafpol_pkg::*;

  localparam int SYNC = 3;
  localparam int NR   = 5;
  typedef rung_t [NR-1:0] table_t;

  // Rungs (x0..x3 inputs, M1/M2 memories):
  //   x0.x1./M1     : Y1(S) Y3(R) M1(S)
  //   x2.M1         : Y2(S) Y1(R)
  //   x3./x0        : Y3(S) M2(S)
  //   M2.x1         : Y2(R) M1(R)
  //   x3.x2.M2./M1  : M2(R) Y1(S)
  function automatic table_t build();
    table_t t;
    t[0] = mk_rung(lx(0) | lx(1),         lm(1), oy(1), oy(3), om(1), '0);
    t[1] = mk_rung(lx(2) | lm(1),         '0,    oy(2), oy(1), '0,    '0);
    t[2] = mk_rung(lx(3),                 lx(0), oy(3), '0,    om(2), '0);
    t[3] = mk_rung(lm(2) | lx(1),         '0,    '0,    oy(2), '0,    om(1));
    t[4] = mk_rung(lx(3) | lx(2) | lm(2), lm(1), oy(1), '0,    '0,    om(2));
    return t;
  endfunction
  localparam table_t RUNGS = build();

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] x;
  logic [2:0] y;
  logic [1:0] m;
  logic [NR-1:0] fire;
  logic conflict;

  always #5 clk = ~clk;

  grafpol_controller #(
    .N_X(4), .N_Y(3), .N_M(2), .N_RUNG(NR), .SYNC_STAGES(SYNC), .RUNGS(RUNGS)
  ) dut (.clk, .rst_n, .x, .y, .m, .rung_fire(fire), .sr_conflict(conflict));

  int checks = 0, failures = 0;
  int fired [NR];
  int conflicts = 0;
  logic [3:0] d1, d2, d3;   // reference input image
  logic [2:0] ry;
  logic [1:0] rm;
  logic [NR-1:0] rf;
  logic [2:0] ys, yr;
  logic [1:0] ms, mr;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NR; r++) fired[r] = 0;
    x = '0; d1 = '0; d2 = '0; d3 = '0; ry = '0; rm = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      if (n % 3 == 0) x = 4'($urandom);
      #2;
      // reference rungs, from the comment table above
      rf[0] = d3[0] &  d3[1] & !rm[0];
      rf[1] = d3[2] &  rm[0];
      rf[2] = d3[3] & !d3[0];
      rf[3] = rm[1] &  d3[1];
      rf[4] = d3[3] &  d3[2] & rm[1] & !rm[0];
      ys = {rf[2], rf[1], rf[0] | rf[4]};
      yr = {rf[0], rf[3], rf[1]};
      ms = {rf[2], rf[0]};
      mr = {rf[4], rf[3]};
      checks++;
      if (fire != rf || y != ry || m != rm || conflict != (|(ys & yr) || |(ms & mr))) begin
        failures++;
        $display("FAIL: step %0d fire=%b/%b y=%b/%b m=%b/%b", n, fire, rf, y, ry, m, rm);
      end
      for (int r = 0; r < NR; r++) if (rf[r]) fired[r]++;
      if (|(ys & yr) || |(ms & mr)) conflicts++;
      @(posedge clk);
      #1;
      ry = (ry | ys) & ~yr;
      rm = (rm | ms) & ~mr;
      d3 = d2; d2 = d1; d1 = x;
    end
    for (int r = 0; r < NR; r++) begin
      checks++;
      if (fired[r] == 0) begin
        failures++;
        $display("FAIL: rung %0d never fired", r + 1);
      end
    end
    checks++;
    if (conflicts == 0) begin
      failures++;
      $display("FAIL: no set/reset conflict exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
