// unitary_encoder -- encoder E: binary count to unitary position code.
//
// Turns a K-bit binary count into T one-hot decision lines "=1" .. "=T":
// eq[i-1] is set exactly when cnt equals i.  A count of zero or above T sets
// no line.  It is the last stage of the sequential-parallel compressor and of
// the pixel-detector counter, where each line can drive a trigger decision.
// Only its function is given in the original; the comparator form here is
// the simplest circuit that does it.
//
// Interface: cnt [K-1:0] in, eq [T-1:0] out.  Combinational.
`timescale 1ns/1ps
module unitary_encoder #(
  parameter int K = 3,
  parameter int T = 4
) (
  input  logic [K-1:0] cnt,
  output logic [T-1:0] eq
);
  always_comb begin
    for (int i = 1; i <= T; i++)
      eq[i-1] = (32'(cnt) == i);
  end
endmodule
