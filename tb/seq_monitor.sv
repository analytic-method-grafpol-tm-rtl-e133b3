// seq_monitor -- testbench checker for one sequential controller.
//
// The expected control algorithm is given as a list of N_ST states; in state
// k exactly one output coil, number EXP_Y[k] (1-based), is on, and the memory
// cells hold EXP_M[k]. Each time the output vector changes, the monitor
// checks that the new vector is that one-hot value, that the memories match,
// and that the change came SYNC+1 or SYNC+2 clocks after the last change of
// any input (SYNC input-image stages, one register stage, and at most one
// extra clock for a rung that waits on a memory cell written just before).
// idx is the next expected state; cycles counts entries into the last state.
module seq_monitor #(
  parameter int N_Y  = 6,
  parameter int N_M  = 2,
  parameter int N_X  = 7,
  parameter int N_ST = 6,
  parameter int SYNC = 2,
  parameter logic [N_ST-1:0][7:0]    EXP_Y = '0,
  parameter logic [N_ST-1:0][N_M-1:0] EXP_M = '0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N_X-1:0] x,
  input  logic [N_Y-1:0] y,
  input  logic [N_M-1:0] m,
  output int             checks,
  output int             failures,
  output int             idx,
  output int             cycles
);
  logic [N_Y-1:0] y_prev;
  logic [N_X-1:0] x_prev;
  int             since_x;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_prev   <= '0;
      x_prev   <= '0;
      since_x  <= 0;
      checks   <= 0;
      failures <= 0;
      idx      <= 0;
      cycles   <= 0;
    end else begin
      x_prev  <= x;
      since_x <= (x != x_prev) ? 1 : since_x + 1;
      y_prev  <= y;
      if (y != y_prev) begin
        automatic logic [N_Y-1:0] want = '0;
        automatic int             f    = 0;
        want[EXP_Y[idx]-1] = 1'b1;
        checks <= checks + 3;
        if (y != want) begin
          f++;
          $display("%m: state %0d: y=%b expected %b", idx + 1, y, want);
        end
        if (m != EXP_M[idx]) begin
          f++;
          $display("%m: state %0d: m=%b expected %b", idx + 1, m, EXP_M[idx]);
        end
        if (since_x < SYNC + 1 || since_x > SYNC + 2) begin
          f++;
          $display("%m: state %0d: latency %0d clocks", idx + 1, since_x);
        end
        failures <= failures + f;
        if (idx == N_ST - 1) begin
          idx    <= 0;
          cycles <= cycles + 1;
        end else begin
          idx <= idx + 1;
        end
      end
    end
  end
endmodule
