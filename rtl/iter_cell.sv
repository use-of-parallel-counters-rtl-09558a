// iter_cell -- one cell of the ones-shifting iterative array.
//
// Two gates: an OR gate passes a one to the right when either the left or the
// upper input is one; an AND gate passes a one downwards only when both are
// one.  A row of these cells therefore lets the first one it meets travel to
// the right end and pushes every further one down to the next row.  The gate
// pair (one AND, one OR) follows the cell drawn in the original; which gate
// feeds which output follows from the signal values printed in that drawing.
//
// Interface: h_in (from left), v_in (from above) in; h_out (right), v_out
// (down) out.  Combinational.
`timescale 1ns/1ps
module iter_cell (
  input  logic h_in,
  input  logic v_in,
  output logic h_out,
  output logic v_out
);
  always_comb begin
    h_out = h_in | v_in;
    v_out = h_in & v_in;
  end
endmodule
