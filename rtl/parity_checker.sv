// parity_checker -- two-level parity tree.
//
// Gives the modulo-2 sum of N inputs.  The inputs are split into groups of G
// (the last group may be shorter); a G-input parity circuit per group forms
// the group parity, and one more parity circuit combines the group results.
// For N=144 and G=12 this is the original arrangement of twelve 12-input
// parity chips M1..M12 feeding a thirteenth, M13.
//
// Interface: x [N-1:0] in, par out (1 when an odd number of inputs is one).
// Combinational; two parity-chip delays.
`timescale 1ns/1ps
module parity_checker #(
  parameter int N = 144,
  parameter int G = 12,
  localparam int NG = (N + G - 1) / G
) (
  input  logic [N-1:0] x,
  output logic         par
);
  logic [NG-1:0] gpar;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int LO = g * G;
    localparam int HI = (LO + G < N) ? LO + G - 1 : N - 1;
    assign gpar[g] = ^x[HI:LO];
  end

  assign par = ^gpar;
endmodule
