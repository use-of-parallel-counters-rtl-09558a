// tb_unitary_encoder -- for every 3-bit count (default encoder, lines =1..=4)
// and every 5-bit count (lines =1..=6), exactly the line equal to the count
// must be set, and none for 0 or for counts above the last line.
`timescale 1ns/1ps
module tb_unitary_encoder;
  int checks = 0, failures = 0;
  logic [2:0] c3; logic [3:0] e4;
  logic [4:0] c5; logic [5:0] e6;

  unitary_encoder                 d4 (.cnt(c3), .eq(e4));
  unitary_encoder #(.K(5), .T(6)) d6 (.cnt(c5), .eq(e6));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c3 = '0;
    for (int v = 0; v < 32; v++) begin
      logic [3:0] w4;
      logic [5:0] w6;
      c3 = 3'(v); c5 = 5'(v);
      #1;
      w4 = (v >= 1 && v <= 4) ? 4'(1 << (v - 1)) : '0;
      w6 = (v >= 1 && v <= 6) ? 6'(1 << (v - 1)) : '0;
      if (v < 8) begin
        checks++;
        if (e4 != w4) begin failures++; $display("FAIL T=4 cnt=%0d eq=%b", v, e4); end
      end
      checks++;
      if (e6 != w6) begin failures++; $display("FAIL T=6 cnt=%0d eq=%b", v, e6); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
