// seqpar_counter -- sequential-parallel compressor for low multiplicities.
//
// Counts the hits of a hodoscope plane of GROUPS*GSIZE channels when only a
// few (t <= ROWS) are expected.  The plane is cut into groups of GSIZE inputs.
// In each group an iterative array (ones_array) shifts the ones into a
// thermometer code of ROWS lines, which a (ROWS,3)-counter ((4,3) for ROWS=4)
// turns into a binary group count.  A parallel compressor adds the group
// counts, and the encoder E gives the unitary decision lines =1 .. =T.  A
// group holding more than ROWS hits contributes ROWS.  The three stages and
// the group size of 7 follow the original scheme; the number of groups is
// this design's choice (9 groups, 63 channels).
//
// Interface: x [GROUPS*GSIZE-1:0] in; sum (total of the group counts) and
// eq [T-1:0] (eq[i-1] when sum == i) out.  Combinational.
`timescale 1ns/1ps
module seqpar_counter #(
  parameter int GROUPS = 9,
  parameter int GSIZE  = 7,
  parameter int ROWS   = 4,
  parameter int T      = 4,
  localparam int GW    = $clog2(ROWS + 1),
  localparam int SW    = GW + $clog2(GROUPS)
) (
  input  logic [GROUPS*GSIZE-1:0] x,
  output logic [SW-1:0]           sum,
  output logic [T-1:0]            eq
);
  logic [GROUPS-1:0][GW-1:0] gcnt;

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    logic [ROWS-1:0] th;
    ones_array #(.N(GSIZE), .ROWS(ROWS)) u_arr (.x(x[g*GSIZE +: GSIZE]), .th(th));
    par_counter #(.N(ROWS)) u_cnt (.p(th), .q(gcnt[g]));
  end

  par_compressor #(.M(GROUPS), .W(GW)) u_comp (.x(gcnt), .s(sum));

  unitary_encoder #(.K(SW), .T(T)) u_enc (.cnt(sum), .eq(eq));
endmodule
