// or_gray_syndrome -- syndrome of the OR-Gray superimposed iteration code.
//
// For a K x K matrix of pixels (or scintillation counters).  Each row is
// coded with the superimposed matrix H_{15,4}, whose column n (1-based) is
// the 4-bit Gray code of n, g(n) = n xor (n >> 1), least significant bit in
// matrix row 1.  Row syndrome bit b of a matrix row is the OR of the pixels
// whose Gray code has bit b set, so each row needs 4 OR gates of 8 inputs.
// The columns are coded by the Boolean sum alone: one K-input OR per column.
// The matrix H_{15,4} and the gate counts follow the original; decoding the
// resulting 4K + K bits into a multiplicity is not part of this block.
//
// Interface: x[K][K] in (x[r][c] = pixel in row r, column c+1 of the code);
// row_syn[K][NB] and col_or [K-1:0] out.  Combinational.
`timescale 1ns/1ps
module or_gray_syndrome #(
  parameter int K  = 15,
  parameter int NB = 4
) (
  input  logic [K-1:0][K-1:0]  x,
  output logic [K-1:0][NB-1:0] row_syn,
  output logic [K-1:0]         col_or
);
  function automatic logic [NB-1:0] gray(input int n);
    gray = NB'(n ^ (n >> 1));
  endfunction

  always_comb begin
    row_syn = '0;
    col_or  = '0;
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++) begin
        if (x[r][c]) row_syn[r] = row_syn[r] | gray(c + 1);
        col_or[c] = col_or[c] | x[r][c];
      end
  end
endmodule
