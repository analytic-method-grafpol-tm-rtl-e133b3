// grafpol_pkg -- shared types and helpers for schematic-equation controllers.
//
// A sequential control algorithm synthesised with the Grafpol TM method ends
// as a schematic equation: a sum of rungs. Each rung is a product of literals
// (an input signal, or an elementary memory cell, either plain or negated)
// that, while true, sets or resets output coils Y and memory cells M. This
// package gives one rung a fixed-size packed record (rung_t) so that any
// controller can be described as a constant table and run on the generic
// engine grafpol_controller.
//
// Literal vector layout (LIT_W = MAX_X + MAX_M bits):
//   bits [MAX_X-1:0]        input signals x[0..MAX_X-1] after the input image
//   bits [LIT_W-1:MAX_X]    memory cells m[0..MAX_M-1]
// The capacity (8 inputs, 8 outputs, 4 memory cells) is this design's choice;
// the largest example it serves uses 7 inputs, 6 outputs and 3 memory cells.
package grafpol_pkg;

  localparam int MAX_X = 8;
  localparam int MAX_Y = 8;
  localparam int MAX_M = 4;
  localparam int LIT_W = MAX_X + MAX_M;

  typedef logic [LIT_W-1:0] lit_t;
  typedef logic [MAX_Y-1:0] ymask_t;
  typedef logic [MAX_M-1:0] mmask_t;

  // One rung of a schematic equation.
  typedef struct packed {
    lit_t   need1;  // literals that must be 1 (plain literals of the product)
    lit_t   need0;  // literals that must be 0 (negated literals, e.g. /M2)
    ymask_t y_set;  // Y(S) terms of the rung
    ymask_t y_rst;  // Y(R) terms of the rung
    mmask_t m_set;  // M(S) terms of the rung
    mmask_t m_rst;  // M(R) terms of the rung
  } rung_t;

  // Literal of input signal number i (0-based bit of the input vector).
  function automatic lit_t lx(int i);
    return lit_t'(1) << i;
  endfunction

  // Literal of elementary memory cell M_j (1-based, as in the equations).
  function automatic lit_t lm(int j);
    return lit_t'(1) << (MAX_X + j - 1);
  endfunction

  // Output coil Y_i (1-based).
  function automatic ymask_t oy(int i);
    return ymask_t'(1) << (i - 1);
  endfunction

  // Memory cell M_j (1-based) as a set/reset target.
  function automatic mmask_t om(int j);
    return mmask_t'(1) << (j - 1);
  endfunction

  // Build a rung from its parts.
  function automatic rung_t mk_rung(lit_t need1, lit_t need0,
                                    ymask_t y_set, ymask_t y_rst,
                                    mmask_t m_set, mmask_t m_rst);
    rung_t r;
    r.need1 = need1;
    r.need0 = need0;
    r.y_set = y_set;
    r.y_rst = y_rst;
    r.m_set = m_set;
    r.m_rst = m_rst;
    return r;
  endfunction

endpackage
