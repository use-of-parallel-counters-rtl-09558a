// tb_ones_array -- the iterative array must turn every 7-bit input pattern
// into the thermometer code of its ones count (th[r] set when more than r
// inputs are one), for the default 4 rows and for the full 7-row array.
// It also checks the row-1 values of the worked pattern 1,0,1,0,0,1,1.
`timescale 1ns/1ps
module tb_ones_array;
  int checks = 0, failures = 0;
  logic [6:0] x;
  logic [3:0] th4;
  logic [6:0] th7;

  ones_array                     d4 (.x(x), .th(th4));
  ones_array #(.N(7), .ROWS(7))  d7 (.x(x), .th(th7));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int n;
      logic [6:0] want;
      x = 7'(v);
      #1;
      n = $countones(x);
      for (int r = 0; r < 7; r++) want[r] = (n > r);
      checks += 2;
      if (th4 != want[3:0]) begin failures++; $display("FAIL rows=4 x=%b th=%b", x, th4); end
      if (th7 != want)      begin failures++; $display("FAIL rows=7 x=%b th=%b", x, th7); end
    end
    // Pattern 1,0,1,0,0,1,1 (first input leftmost): row 0 carries a one to
    // the right from the first input on, and pushes down the other three.
    x = 7'b1100101;
    #1;
    checks++;
    if (d4.h[0] != 7'b1111111 || d4.v[0] != 7'b1100100) begin
      failures++;
      $display("FAIL row 0 h=%b v=%b", d4.h[0], d4.v[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
