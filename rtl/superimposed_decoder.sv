// superimposed_decoder -- analysis of an H_{n,N} superimposed syndrome.
//
// Plays the part of the PROM that follows the mixers.  It counts the weight
// w of the N-bit syndrome with an (N,k)-parallel counter and classifies the
// event by it: w = 2 is a single hit (no cluster), w = 3 a double cluster,
// w = 4 a triple cluster.  For a single hit it also returns the channel
// number (1-based), found by comparing the syndrome with every column of the
// coding matrix, which is possible because all columns differ.  The weight
// rules follow the original; the channel lookup and the output encoding are
// this design's choices.
//
// Interface: syn [N-1:0] in; w, single, double_cl, triple_cl and coord
// (channel number, 0 unless single) out.  Combinational.
`timescale 1ns/1ps
module superimposed_decoder #(
  parameter int N = 8,
  localparam int NCH = N * (N - 1) / 2,
  localparam int KW  = $clog2(N + 1),
  localparam int CW  = $clog2(NCH + 1)
) (
  input  logic [N-1:0]  syn,
  output logic [KW-1:0] w,
  output logic          single,
  output logic          double_cl,
  output logic          triple_cl,
  output logic [CW-1:0] coord
);
  par_counter #(.N(N)) u_weight (.p(syn), .q(w));

  always_comb begin
    single    = (32'(w) == 2);
    double_cl = (32'(w) == 3);
    triple_cl = (32'(w) == 4);
  end

  // Channel lookup: same column order as superimposed_coder.
  always_comb begin
    int idx;
    coord = '0;
    idx   = 0;
    for (int a = N; a >= 2; a--)
      for (int b = 1; b < a; b++) begin
        idx++;
        if (syn == ((N'(1) << (a - 1)) | (N'(1) << (b - 1))))
          coord = CW'(idx);
      end
  end
endmodule
