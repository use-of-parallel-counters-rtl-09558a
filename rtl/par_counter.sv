// par_counter -- (n,k)-parallel counter built from full adders.
//
// Counts how many of the N inputs are one and returns the count in binary,
// K = $clog2(N+1) bits, q[i] having weight 2^i.  The network is built only of
// (3,2)-counters (full_adder) arranged as a tree for the canonical size
// n = 2^K - 1; a smaller N is padded with zero inputs, which synthesis then
// removes.  Tree level 1 is the first 2^(K-1) inputs taken singly.  A node of
// level j (j = 2..K) joins two level-(j-1) counts of j-1 bits and one fresh
// input, which enters as the carry-in of a (j-1)-bit ripple adder, giving a
// j-bit count.  The single level-K node is the result.  For n = 2^K - 1 this
// uses exactly n-K full adders, the count N_add = n-k of the original work,
// and the (7,3)-counter it gives is the original one: two (3,2)-counters on
// six inputs, then a (3,2)-counter for weight 2^0 that takes the seventh
// input and one for weights 2^1 and 2^2.  Larger counters follow the same
// grouping by threes, but the wiring of the original (31,5) network (a column
// by column carry shower) is not copied: only its adder count and its result
// are kept.
//
// Interface: p [N-1:0] in, q [K-1:0] out.  Combinational, no clock; delay
// grows with K adder delays plus the ripple of the last adders.
`timescale 1ns/1ps
module par_counter #(
  parameter int N = 31,
  localparam int K = $clog2(N + 1)
) (
  input  logic [N-1:0] p,
  output logic [K-1:0] q
);
  localparam int NP = 2**K - 1;      // canonical size 2^K - 1

  // Offset of level j in the flat node vector; level j holds 2^(K-j)
  // nodes of j bits each.
  function automatic int lvl_off(input int j);
    int off = 0;
    for (int l = 1; l < j; l++) off += (2**(K - l)) * l;
    return off;
  endfunction

  localparam int NBITS = lvl_off(K + 1);

  logic [NP-1:0]    pin;   // inputs padded to 2^K - 1
  logic [NBITS-1:0] nd;    // all node counts, level by level

  assign pin = NP'(p);

  // Level 1: single inputs.
  assign nd[2**(K-1)-1:0] = pin[2**(K-1)-1:0];

  for (genvar j = 2; j <= K; j++) begin : g_lvl
    localparam int NN    = 2**(K - j);           // nodes at this level
    localparam int SPARE = 2**K - 2**(K - j + 1); // first spare input
    localparam int PO    = lvl_off(j - 1);        // previous level
    localparam int O     = lvl_off(j);
    for (genvar i = 0; i < NN; i++) begin : g_node
      logic [j-2:0] sum;
      logic         cout;
      rc_adder #(.W(j - 1)) u_add (
        .a    (nd[PO + (2*i)   * (j-1) +: (j-1)]),
        .b    (nd[PO + (2*i+1) * (j-1) +: (j-1)]),
        .cin  (pin[SPARE + i]),
        .sum  (sum),
        .cout (cout)
      );
      assign nd[O + i*j +: j] = {cout, sum};
    end
  end

  assign q = nd[lvl_off(K) +: K];
endmodule
