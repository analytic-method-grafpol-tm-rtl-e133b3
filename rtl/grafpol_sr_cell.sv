// grafpol_sr_cell -- bank of W clocked set/reset storage bits.
//
// Each bit is one output coil Y with its Y(S)/Y(R) terms, or one elementary
// memory cell M_j with its M_j(S)/M_j(R) terms. On every rising clock edge a
// bit becomes (q | set) & ~rst: it keeps its value while neither term is
// active. Reset dominates when both terms are active in the same clock; this
// matches a ladder program in which the rung resetting a coil is evaluated
// after the rung setting it, and the controllers rely on it in the one clock
// where the next transition has fired but the memory that blocks the previous
// one has not yet been written. The dominance rule is this design's choice.
//
// Interface: set/rst are level inputs, sampled each clock; rst_n is an
// asynchronous active-low clear of all bits (all coils and memories idle at
// power-up). conflict flags bits whose set and reset were both active in
// this clock (combinational, for monitoring).
module grafpol_sr_cell #(
  parameter int W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] set,
  input  logic [W-1:0] rst,
  output logic [W-1:0] q,
  output logic [W-1:0] conflict
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= (q | set) & ~rst;
  end

  assign conflict = set & rst;

endmodule
