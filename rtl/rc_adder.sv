// rc_adder -- W-bit ripple-carry adder made of (3,2)-counters.
//
// Adds two W-bit words and a carry-in.  Bit i is one full_adder whose third
// input is the carry of bit i-1, so the result ripples from bit 0 upwards.
// It is used as the final stage of every column compressor (the "7-bit adder"
// of the (7,7)-compressor) and to merge the two halves of an (n,k)-counter.
// A carry-lookahead adder would be faster; the ripple form is this design's
// choice because it keeps every cell a (3,2)-counter.
//
// Interface: a, b [W-1:0], cin in; sum [W-1:0], cout out.  Combinational.
`timescale 1ns/1ps
module rc_adder #(
  parameter int W = 7
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] carry;
  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .p ({carry[i], b[i], a[i]}),
      .s (sum[i]),
      .c (carry[i+1])
    );
  end

  assign cout = carry[W];
endmodule
