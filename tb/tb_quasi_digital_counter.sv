// tb_quasi_digital_counter -- the behavioural quasi-digital (7,3)-counter.
// Every input pattern must produce its ones count, and the output must not
// settle q_old the network plus logic delay (6 ns) and must have settled
// right after it.
`timescale 1ns/1ps
module tb_quasi_digital_counter;
  int checks = 0, failures = 0;
  logic [6:0] p;
  logic [2:0] q;

  quasi_digital_counter dut (.p(p), .q(q));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p = '0;
    #20;
    for (int v = 0; v < 128; v++) begin
      logic [2:0] q_old;
      q_old = q;
      p = 7'(v);
      #5.9;
      checks++;
      if (q != q_old) begin failures++; $display("FAIL p=%b output moved early", p); end
      #0.2;
      checks++;
      if (int'(q) != $countones(p)) begin failures++; $display("FAIL p=%b q=%0d", p, q); end
      #4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
