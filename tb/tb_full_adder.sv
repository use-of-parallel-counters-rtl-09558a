// tb_full_adder -- exhaustive check of the (3,2)-counter: for all eight
// input patterns, 2*c + s must equal the number of ones.
`timescale 1ns/1ps
module tb_full_adder;
  int checks = 0, failures = 0;
  logic [2:0] p;
  logic s, c;

  full_adder dut (.p(p), .s(s), .c(c));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      p = 3'(v);
      #1;
      ones = (v & 1) + ((v >> 1) & 1) + ((v >> 2) & 1);
      checks++;
      if ({c, s} != 2'(ones)) begin
        failures++;
        $display("FAIL p=%b got c=%b s=%b want %0d", p, c, s, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
