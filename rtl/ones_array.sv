// ones_array -- iterative array that gathers the ones of a group.
//
// A staircase of iter_cell rows.  Row r (0-based) has cells in columns
// r..N-1 and a zero entering from the left.  Row 0 takes the N group inputs
// from above; row r>0 takes the downward outputs of row r-1.  Each row keeps
// one of the ones it receives (it leaves at the row's right end) and passes
// the others down, so the right-end output of row r is one exactly when at
// least r+1 inputs are one: the array turns the group into a thermometer
// code.  Only ROWS rows are built; the lower rows are not needed when at
// most ROWS hits are to be counted (4 in the original, for t <= 4).
//
// Interface: x [N-1:0] in, th [ROWS-1:0] out, th[r] = (count(x) > r).
// Combinational; the delay grows with N + ROWS gate delays.
`timescale 1ns/1ps
module ones_array #(
  parameter int N    = 7,
  parameter int ROWS = 4
) (
  input  logic [N-1:0]    x,
  output logic [ROWS-1:0] th
);
  // h[r][j]: horizontal signal leaving cell (r,j) to the right;
  // v[r][j]: vertical signal leaving cell (r,j) downwards.
  logic [ROWS-1:0][N-1:0] h;
  logic [ROWS-1:0][N-1:0] v;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      if (j < r) begin : g_none
        assign h[r][j] = 1'b0;
        assign v[r][j] = 1'b0;
      end else begin : g_cell
        logic hi, vi;
        assign hi = (j == r) ? 1'b0 : h[r][(j > 0) ? j-1 : 0];
        assign vi = (r == 0) ? x[j] : v[(r > 0) ? r-1 : 0][j];
        iter_cell u_cell (.h_in(hi), .v_in(vi), .h_out(h[r][j]), .v_out(v[r][j]));
      end
    end
    assign th[r] = h[r][N-1];
  end
endmodule
