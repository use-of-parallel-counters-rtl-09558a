// par_compressor -- (M,m)-parallel compressor: fast sum of M words of W bits.
//
// Column compression.  In the first stage every bit column of the M addends
// (all bits of one weight 2^c) is counted by an (M,K)-counter, K=$clog2(M+1).
// Bit j of the count of column c has weight 2^(c+j), so the K count bits of
// all columns form K new words, word j shifted left by j.  These words are
// compressed again in the same way, with (K,K')-counters per column, until
// two words are left, which a ripple-carry adder sums.  For M=15 this gives
// the stages (15,4) -> (4,3) -> (3,2) -> adder; for M=7 it gives
// (7,3) -> (3,2) -> adder, as in the schemes of the original work.  The stage
// structure and the use of (n,k)-counters follow the original.  This design
// chooses to carry every intermediate word at the full output width OW (the
// columns above the reach of a stage are constant zero and vanish in
// synthesis) and to use a ripple-carry final adder.
//
// Interface: x[M][W] in (x[i] is addend i), s [OW-1:0] out, OW = W+$clog2(M),
// wide enough for the largest sum.  Combinational, no clock.
`timescale 1ns/1ps
module par_compressor #(
  parameter int M = 15,
  parameter int W = 15,
  localparam int OW = W + $clog2(M)
) (
  input  logic [M-1:0][W-1:0] x,
  output logic [OW-1:0]       s
);
  // Number of words entering stage st (stage 0 takes the M addends).
  function automatic int stage_m(input int st);
    int m = M;
    for (int i = 0; i < st; i++) if (m > 2) m = $clog2(m + 1);
    return m;
  endfunction

  // Counting stages needed before at most two words are left.
  function automatic int num_stages();
    int st = 0;
    while (stage_m(st) > 2) st++;
    return st;
  endfunction

  // Offset, in words, of stage st in the flat word vector.
  function automatic int word_off(input int st);
    int off = 0;
    for (int i = 0; i < st; i++) off += stage_m(i);
    return off;
  endfunction

  localparam int NS     = num_stages();
  localparam int NWORDS = word_off(NS + 1);
  localparam int MLAST  = stage_m(NS);

  logic [NWORDS-1:0][OW-1:0] wd;   // the words of every stage

  for (genvar i = 0; i < M; i++) begin : g_in
    assign wd[i] = OW'(x[i]);
  end

  for (genvar st = 0; st < NS; st++) begin : g_stage
    localparam int MS = stage_m(st);
    localparam int KS = $clog2(MS + 1);
    localparam int IO = word_off(st);
    localparam int NO = word_off(st + 1);

    logic [OW-1:0][KS-1:0] cnt;   // cnt[c] = ones in column c

    for (genvar c = 0; c < OW; c++) begin : g_col
      logic [MS-1:0] col;
      for (genvar i = 0; i < MS; i++) begin : g_bit
        assign col[i] = wd[IO + i][c];
      end
      par_counter #(.N(MS)) u_cnt (.p(col), .q(cnt[c]));
    end

    // Count bit j of column c goes to word j, column c+j.
    for (genvar j = 0; j < KS; j++) begin : g_word
      for (genvar c = 0; c < OW; c++) begin : g_col
        if (c >= j) begin : g_bit
          assign wd[NO + j][c] = cnt[c - j][j];
        end else begin : g_zero
          assign wd[NO + j][c] = 1'b0;
        end
      end
    end
  end

  if (MLAST == 2) begin : g_final_add
    logic cout;   // always zero: the sum fits in OW bits
    rc_adder #(.W(OW)) u_add (
      .a    (wd[word_off(NS)]),
      .b    (wd[word_off(NS) + 1]),
      .cin  (1'b0),
      .sum  (s),
      .cout (cout)
    );
  end else begin : g_final_one
    assign s = wd[word_off(NS)];
  end
endmodule
