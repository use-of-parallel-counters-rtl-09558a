// pixel_counter -- multiplicity counter for an R x C pixel detector using
// the OR-OR-PARITY-PARITY iteration code.
//
// The pixel matrix is treated as the information part of an iteration code
// whose information symbols are all zero, so the row and column checks carry
// the hits.  For every row and every column the circuit forms
//   - an OR (the line has at least one hit) and
//   - a parity (parity_checker, the line has an odd number of hits),
// and from them ODD = parity and EVEN = OR and not parity (a nonzero even
// number of hits; zero is even, which is why the OR is needed).  Four
// (R,K)-/(C,K)-counters count the ODD rows, EVEN rows, ODD columns and EVEN
// columns, and an encoder E turns each count into the lines =1 .. =T.
// These stages follow the original scheme for 31 x 31 = 961 pixels.
//
// The final combination of the four counts into a multiplicity is only
// outlined in the original (encoder outputs combined by AND gates).  This
// design uses the rule that reproduces the single- and few-hit pictures of
// that work: a line with an odd count holds at least one hit and a line with
// an even count at least two, so
//     t_est = max(x_odd + 2*x_even, y_odd + 2*y_even),
// which equals the true number of hits whenever no row or column holds more
// than two hits, and is a lower bound otherwise.
//
// Interface: hits[R][C] in (hits[r][c] = pixel in row r, column c);
// x_odd, x_even, y_odd, y_even [K-1:0], their unitary codes *_eq [T-1:0],
// and t_est [K+1:0] out.  Combinational.
`timescale 1ns/1ps
module pixel_counter #(
  parameter int R = 31,
  parameter int C = 31,
  parameter int T = 6,
  localparam int KR = $clog2(R + 1),
  localparam int KC = $clog2(C + 1),
  localparam int K  = (KR > KC) ? KR : KC
) (
  input  logic [R-1:0][C-1:0] hits,
  output logic [K-1:0]        x_odd,
  output logic [K-1:0]        x_even,
  output logic [K-1:0]        y_odd,
  output logic [K-1:0]        y_even,
  output logic [T-1:0]        x_odd_eq,
  output logic [T-1:0]        x_even_eq,
  output logic [T-1:0]        y_odd_eq,
  output logic [T-1:0]        y_even_eq,
  output logic [K+1:0]        t_est
);
  logic [R-1:0] row_odd, row_even;
  logic [C-1:0] col_odd, col_even;
  logic [C-1:0][R-1:0] cols;   // transposed matrix, cols[c][r] = hits[r][c]

  // Row checks (X coordinate).
  for (genvar r = 0; r < R; r++) begin : g_row
    logic par;
    parity_checker #(.N(C)) u_par (.x(hits[r]), .par(par));
    assign row_odd[r]  = par;
    assign row_even[r] = (|hits[r]) & ~par;
  end

  // Column checks (Y coordinate).
  for (genvar c = 0; c < C; c++) begin : g_col
    logic par;
    for (genvar r = 0; r < R; r++) begin : g_t
      assign cols[c][r] = hits[r][c];
    end
    parity_checker #(.N(R)) u_par (.x(cols[c]), .par(par));
    assign col_odd[c]  = par;
    assign col_even[c] = (|cols[c]) & ~par;
  end

  logic [KR-1:0] xo, xe;
  logic [KC-1:0] yo, ye;
  par_counter #(.N(R)) u_pc_xo (.p(row_odd),  .q(xo));
  par_counter #(.N(R)) u_pc_xe (.p(row_even), .q(xe));
  par_counter #(.N(C)) u_pc_yo (.p(col_odd),  .q(yo));
  par_counter #(.N(C)) u_pc_ye (.p(col_even), .q(ye));

  assign x_odd  = K'(xo);
  assign x_even = K'(xe);
  assign y_odd  = K'(yo);
  assign y_even = K'(ye);

  unitary_encoder #(.K(K), .T(T)) u_e_xo (.cnt(x_odd),  .eq(x_odd_eq));
  unitary_encoder #(.K(K), .T(T)) u_e_xe (.cnt(x_even), .eq(x_even_eq));
  unitary_encoder #(.K(K), .T(T)) u_e_yo (.cnt(y_odd),  .eq(y_odd_eq));
  unitary_encoder #(.K(K), .T(T)) u_e_ye (.cnt(y_even), .eq(y_even_eq));

  // Multiplicity from the four counts.
  logic [K+1:0] tx, ty;
  always_comb begin
    tx    = (K+2)'(x_odd) + ((K+2)'(x_even) << 1);
    ty    = (K+2)'(y_odd) + ((K+2)'(y_even) << 1);
    t_est = (tx > ty) ? tx : ty;
  end
endmodule
