// tb_grafpol_sr_cell -- self-checking testbench for grafpol_sr_cell.
//
// Drives random set/reset vectors into a 5-bit bank and compares every
// clock with a bit-by-bit reference: a bit is set by set alone, cleared by
// reset (alone or together with set, reset dominating) and otherwise holds.
// Also checks the conflict flag and the asynchronous clear in mid-run, and
// that each of the four set/reset combinations occurred.
module tb_grafpol_sr_cell;
  localparam int W = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] set, rst, q, conflict;
  logic [W-1:0] ref_q;
  int checks = 0, failures = 0;
  int seen [4];

  always #5 clk = ~clk;

  grafpol_sr_cell #(.W(W)) dut (.clk, .rst_n, .set, .rst, .q, .conflict);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) seen[k] = 0;
    set = '0; rst = '0; ref_q = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      set = W'($urandom) & W'($urandom);   // sparse, so bits hold for a while
      rst = W'($urandom) & W'($urandom);
      #1;
      checks++;
      for (int b = 0; b < W; b++) begin
        if (conflict[b] != (set[b] && rst[b])) begin
          failures++;
          $display("FAIL: conflict bit %0d", b);
        end
        seen[{set[b], rst[b]}]++;
      end
      @(posedge clk);
      for (int b = 0; b < W; b++) begin
        if (rst[b])      ref_q[b] = 1'b0;
        else if (set[b]) ref_q[b] = 1'b1;
      end
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL: step %0d q=%b expected %b", n, q, ref_q);
      end
      if (n == 300) begin
        rst_n = 1'b0;
        #1;
        checks++;
        if (q != '0) begin
          failures++;
          $display("FAIL: asynchronous clear");
        end
        ref_q = '0;
        rst_n = 1'b1;
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL: set/reset combination %0d never driven", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
