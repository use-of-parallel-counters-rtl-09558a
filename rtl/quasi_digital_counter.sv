// quasi_digital_counter -- behavioural model of the quasi-digital
// (7,3)-counter.  Not synthesizable: it models an analog circuit.
//
// The real part sums its N logic inputs as currents through equal resistors
// Ry into one node, which drives the inputs of a ladder of N comparators
// K1..KN whose reference voltages come from a resistor divider (Rx/2, Rx,
// ..., Rx, Rx/2).  Each comparator therefore says "at least m inputs are
// one"; ECL logic turns the comparator outputs into the binary count.  The
// model reproduces that chain: the summing node is a real voltage of one
// unit per active input, the thresholds sit half a unit below each integer
// (the Rx/2 end resistors), and the binary count is read from the
// thermometer code.  Its delay is TS_NS for the resistive network plus TL_NS
// for comparators and logic; the 5 ns of the latter is the original figure,
// the network delay is this model's own value.
//
// Interface: p [N-1:0] in, q [K-1:0] out.  Output changes TS_NS+TL_NS after
// an input changes.
`timescale 1ns/1ps
module quasi_digital_counter #(
  parameter int  N     = 7,
  parameter real TS_NS = 1.0,
  parameter real TL_NS = 5.0,
  localparam int K     = $clog2(N + 1)
) (
  input  logic [N-1:0] p,
  output logic [K-1:0] q
);
  real v_node;   // voltage of the summing node, in units

  // Each process evaluates once at time zero and then on every change of
  // its input, so the output is defined from the start.
  always begin : summing_node
    real v;
    v = 0.0;
    for (int i = 0; i < N; i++) if (p[i]) v = v + 1.0;
    v_node <= #(TS_NS) v;
    @(p);
  end

  always begin : comparators_and_logic
    logic [N-1:0] c;      // comparator m+1 output: v_node above m+0.5
    int           cnt;
    for (int m = 0; m < N; m++) c[m] = (v_node > (real'(m) + 0.5));
    cnt = 0;
    for (int m = 0; m < N; m++) if (c[m]) cnt++;
    q <= #(TL_NS) K'(cnt);
    @(v_node);
  end
endmodule
