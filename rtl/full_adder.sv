// full_adder -- the (3,2)-counter.
//
// A one-bit full adder seen as a parallel counter: it counts how many of its
// three equally weighted inputs p[0..2] are one and gives the result as a sum
// bit s (weight 2^0) and a carry bit c (weight 2^1).  It is the elementary
// cell from which every larger (n,k)-counter, ripple-carry adder and column
// compressor in this design is built.  A (2,2)-counter (half adder) is this
// cell with one input tied to zero, as in the original scheme.
//
// Interface: p[2:0] in, s and c out.  Purely combinational, no clock; in the
// ECL original one cell is one adder delay (4.5 ns to S, 2.2 ns to C).
`timescale 1ns/1ps
module full_adder (
  input  logic [2:0] p,
  output logic       s,
  output logic       c
);
  always_comb begin
    s = p[0] ^ p[1] ^ p[2];
    c = (p[0] & p[1]) | (p[0] & p[2]) | (p[1] & p[2]);
  end
endmodule
