// tb_seqpar_counter -- drives the 63-channel sequential-parallel counter
// (9 groups of 7) with sparse hit patterns of 0 to 6 hits at random places,
// with patterns that pile up to 7 hits in one group (the group saturates at
// 4), and with random dense patterns.  The reference is the sum over groups
// of min(hits in group, 4); the unitary lines =1..=4 must follow it.
`timescale 1ns/1ps
module tb_seqpar_counter;
  int checks = 0, failures = 0;
  int n_sat = 0;   // patterns in which some group saturated
  logic [62:0] x;
  logic [6:0]  sum;
  logic [3:0]  eq;

  seqpar_counter dut (.x(x), .sum(sum), .eq(eq));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [62:0] v);
    int ref_sum;
    logic [3:0] ref_eq;
    bit sat;
    x = v;
    #1;
    ref_sum = 0;
    sat = 0;
    for (int g = 0; g < 9; g++) begin
      int n = $countones(v[g*7 +: 7]);
      if (n > 4) begin n = 4; sat = 1; end
      ref_sum += n;
    end
    if (sat) n_sat++;
    ref_eq = (ref_sum >= 1 && ref_sum <= 4) ? 4'(1 << (ref_sum - 1)) : '0;
    checks += 2;
    if (int'(sum) != ref_sum) begin failures++; $display("FAIL x=%h sum=%0d want %0d", v, sum, ref_sum); end
    if (eq != ref_eq)         begin failures++; $display("FAIL x=%h eq=%b want %b", v, eq, ref_eq); end
  endtask

  initial begin
    apply('0);
    for (int i = 0; i < 63; i++) apply(63'(1) << i);
    for (int n = 0; n < 3000; n++) begin
      logic [62:0] v;
      int hits;
      v = '0;
      hits = int'($urandom_range(0, 6));
      for (int h = 0; h < hits; h++) v[$urandom_range(0, 62)] = 1'b1;
      apply(v);
    end
    for (int g = 0; g < 9; g++)
      for (int k = 0; k < 128; k++) apply(63'(k) << (g * 7));
    for (int n = 0; n < 500; n++) apply(63'({$urandom, $urandom}));
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL group saturation never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
