// grafpol_controller -- generic engine for a Grafpol TM schematic equation.
//
// The schematic equation of a sequential control algorithm is a sum of
// rungs T_i* . [Y(S) + Y(R) + M(S) + M(R)], where the transition with memory
// T_i* is a product of input signals and elementary memory cells, plain or
// negated. This module evaluates such an equation, given as a constant table
// of rung_t records (RUNGS), once per clock, like one scan of a PLC:
//
//   1. Input image: the input signals x pass through SYNC_STAGES flip-flops
//      (they come from asynchronous position indicators).
//   2. Every rung's product is formed from the input image and the current
//      memory cells, all rungs in parallel.
//   3. The Y(S)/Y(R)/M(S)/M(R) terms of all true rungs are ORed and applied
//      to the output coils Y and memory cells M on the next clock edge, with
//      reset dominating set (grafpol_sr_cell).
//
// Timing: a change on x reaches y and m SYNC_STAGES+1 clocks later. All rungs
// see the same memory state, so a rung enabled by a memory cell written in
// this clock fires one clock later; the control algorithms rely only on that.
//
// Interface: x[N_X-1:0] inputs (start button and position indicators, order
// set by the table), y[N_Y-1:0] output coils, m[N_M-1:0] memory cells,
// rung_fire[N_RUNG-1:0] which rungs are true this clock, sr_conflict set when
// any coil or memory cell gets set and reset in the same clock.
// The rung-table form and the input image are this design's choices; the
// equation structure is the method's Eq. (17).
module grafpol_controller
  import grafpol_pkg::*;
#(
  parameter int    N_X         = MAX_X,
  parameter int    N_Y         = MAX_Y,
  parameter int    N_M         = MAX_M,
  parameter int    N_RUNG      = 1,
  parameter int    SYNC_STAGES = 2,
  parameter rung_t [N_RUNG-1:0] RUNGS = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_X-1:0]    x,
  output logic [N_Y-1:0]    y,
  output logic [N_M-1:0]    m,
  output logic [N_RUNG-1:0] rung_fire,
  output logic              sr_conflict
);

  // Sizes must fit the record layout of grafpol_pkg.
  if (N_X < 1 || N_X > MAX_X || N_Y < 1 || N_Y > MAX_Y ||
      N_M < 1 || N_M > MAX_M || N_RUNG < 1 || SYNC_STAGES < 1) begin : g_bad_size
    $error("grafpol_controller: size parameter out of range");
  end

  // ---------------------------------------------------------------- input image
  logic [SYNC_STAGES-1:0][N_X-1:0] img;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) img <= '0;
    else begin
      img[0] <= x;
      for (int s = 1; s < SYNC_STAGES; s++) img[s] <= img[s-1];
    end
  end

  // ------------------------------------------------------------- rung products
  lit_t   lit;
  ymask_t y_set_all, y_rst_all;
  mmask_t m_set_all, m_rst_all;

  always_comb begin
    lit = '0;
    lit[N_X-1:0]             = img[SYNC_STAGES-1];
    lit[MAX_X +: N_M]        = m;
  end

  always_comb begin
    y_set_all = '0;
    y_rst_all = '0;
    m_set_all = '0;
    m_rst_all = '0;
    for (int r = 0; r < N_RUNG; r++) begin
      rung_fire[r] = ((lit & RUNGS[r].need1) == RUNGS[r].need1) &&
                     ((~lit & RUNGS[r].need0) == RUNGS[r].need0);
      if (rung_fire[r]) begin
        y_set_all |= RUNGS[r].y_set;
        y_rst_all |= RUNGS[r].y_rst;
        m_set_all |= RUNGS[r].m_set;
        m_rst_all |= RUNGS[r].m_rst;
      end
    end
  end

  // ------------------------------------------------ output coils and memories
  logic [N_Y-1:0] y_conf;
  logic [N_M-1:0] m_conf;

  grafpol_sr_cell #(.W(N_Y)) u_y (
    .clk, .rst_n,
    .set(y_set_all[N_Y-1:0]), .rst(y_rst_all[N_Y-1:0]),
    .q(y), .conflict(y_conf)
  );

  grafpol_sr_cell #(.W(N_M)) u_m (
    .clk, .rst_n,
    .set(m_set_all[N_M-1:0]), .rst(m_rst_all[N_M-1:0]),
    .q(m), .conflict(m_conf)
  );

  assign sr_conflict = |y_conf || |m_conf;

endmodule
