// cluster_counter -- size of a single cluster from an H_{64,8} syndrome.
//
// The coding matrix is a row of BLOCKS unit matrices I_N, so channel i
// (1-based) goes to OR gate ((i-1) mod N) + 1: gate 1 collects channels
// 1, 9, 17, ..., 57 and gate 8 channels 8, 16, ..., 64.  A cluster of b <= N
// neighbouring hits lights exactly b different gates, so the syndrome weight
// is the cluster size.  Two PROMs, each addressed by the 8 syndrome bits and
// sharing an ENABLE line, turn the weight into decision lines: PROM 1 gives
// b=1..4, PROM 2 gives b=5..8.  The OR-gate wiring and the two-PROM split
// follow the original; the PROM contents are generated here from the rule
// "weight w means cluster size b = w".
//
// Interface: x [BLOCKS*N-1:0] in (x[i] is channel i+1), enable in,
// b [N-1:0] out (b[k-1] is the line "b = k").  Combinational.
`timescale 1ns/1ps
module cluster_counter #(
  parameter int N      = 8,
  parameter int BLOCKS = 8
) (
  input  logic [BLOCKS*N-1:0] x,
  input  logic                enable,
  output logic [N-1:0]        b
);
  localparam int HALF = N / 2;
  typedef logic [N-1:0] rom_word_t;

  // PROM image: entry s holds the one-hot line of the weight of s.
  function automatic rom_word_t prom_entry(input int s);
    int wgt;
    wgt = 0;
    for (int k = 0; k < N; k++) wgt += (s >> k) & 1;
    prom_entry = (wgt == 0) ? '0 : rom_word_t'(1) << (wgt - 1);
  endfunction

  logic [N-1:0] syn;
  rom_word_t    rom [2**N];

  always_comb begin
    syn = '0;
    for (int i = 0; i < BLOCKS * N; i++)
      syn[i % N] = syn[i % N] | x[i];
  end

  initial begin
    for (int s = 0; s < 2**N; s++) rom[s] = prom_entry(s);
  end

  logic [HALF-1:0]   prom1_q;
  logic [N-HALF-1:0] prom2_q;
  always_comb begin
    prom1_q = enable ? rom[syn][HALF-1:0] : '0;
    prom2_q = enable ? rom[syn][N-1:HALF] : '0;
    b       = {prom2_q, prom1_q};
  end
endmodule
