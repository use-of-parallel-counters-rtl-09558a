// superimposed_coder -- coding matrix H_{n,N} with branching coefficient 2.
//
// Compresses n = N(N-1)/2 detector channels into an N-bit syndrome by the
// Boolean-sum (superimposed) rule: every channel is wired to exactly two of
// the N signal mixers and each mixer is an OR of its channels.  Every pair
// of mixers is used by exactly one channel, so all columns of the matrix are
// different and a single hit gives a syndrome of weight 2 that names it.
// Channel numbering follows the original H_{28,8} matrix: channels 1..7 go
// to mixer 8 and mixers 1..7, channels 8..13 to mixer 7 and mixers 1..6, and
// so on down to channel 28 on mixers 2 and 1; in general the channels are
// taken for the higher mixer a = N, N-1, ..., 2 and, within it, the lower
// mixer b = 1 .. a-1.  Adjacent channels then share one mixer, so a cluster
// of 2 or 3 neighbouring hits gives weight 3 or 4.  In the original the
// mixers are photomultipliers fed by optical fibres; here they are OR gates.
//
// Interface: x [n-1:0] in (x[i] is channel i+1), syn [N-1:0] out (syn[m] is
// mixer m+1).  Combinational.
`timescale 1ns/1ps
module superimposed_coder #(
  parameter int N = 8,
  localparam int NCH = N * (N - 1) / 2
) (
  input  logic [NCH-1:0] x,
  output logic [N-1:0]   syn
);
  // Column of the coding matrix for channel index ch (0-based).
  function automatic logic [N-1:0] h_col(input int ch);
    int idx;
    h_col = '0;
    idx   = 0;
    for (int a = N; a >= 2; a--)
      for (int b = 1; b < a; b++) begin
        if (idx == ch) h_col = (N'(1) << (a - 1)) | (N'(1) << (b - 1));
        idx++;
      end
  endfunction

  always_comb begin
    syn = '0;
    for (int ch = 0; ch < NCH; ch++)
      if (x[ch]) syn = syn | h_col(ch);
  end
endmodule
