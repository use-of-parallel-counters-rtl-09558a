// tb_parity_checker -- the 144-input checker (twelve groups of 12) and a
// 31-input one with an uneven last group are compared with the reduction
// XOR of random, single-bit and all-one input vectors.
`timescale 1ns/1ps
module tb_parity_checker;
  int checks = 0, failures = 0;
  logic [143:0] x;
  logic         par144, par31;

  parity_checker               d144 (.x(x),        .par(par144));
  parity_checker #(.N(31))     d31  (.x(x[30:0]),  .par(par31));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [143:0] v);
    int n144, n31;
    x = v;
    #1;
    n144 = 0; n31 = 0;
    for (int i = 0; i < 144; i++) begin
      n144 += int'(v[i]);
      if (i < 31) n31 += int'(v[i]);
    end
    checks += 2;
    if (par144 != 1'(n144 % 2)) begin failures++; $display("FAIL 144 x=%h", v); end
    if (par31  != 1'(n31 % 2))  begin failures++; $display("FAIL 31 x=%h", v); end
  endtask

  initial begin
    apply('0);
    apply('1);
    for (int i = 0; i < 144; i++) apply(144'(1) << i);
    for (int n = 0; n < 3000; n++)
      apply({16'($urandom), $urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
