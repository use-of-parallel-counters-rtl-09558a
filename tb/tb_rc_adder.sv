// tb_rc_adder -- checks the ripple-carry adder at its default width (7 bits,
// exhaustively over a, b and cin) and at 15 bits (random operands plus the
// carry-propagation corner cases) against the integer sum.
`timescale 1ns/1ps
module tb_rc_adder;
  int checks = 0, failures = 0;

  logic [6:0]  a7, b7, s7;
  logic        ci7, co7;
  logic [14:0] a15, b15, s15;
  logic        ci15, co15;

  rc_adder               dut7  (.a(a7),  .b(b7),  .cin(ci7),  .sum(s7),  .cout(co7));
  rc_adder #(.W(15))     dut15 (.a(a15), .b(b15), .cin(ci15), .sum(s15), .cout(co15));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check15(input int a, input int b, input int ci);
    int want;
    a15 = 15'(a); b15 = 15'(b); ci15 = 1'(ci);
    #1;
    want = a + b + ci;
    checks++;
    if (int'({co15, s15}) != want) begin
      failures++;
      $display("FAIL W=15 %0d+%0d+%0d got %0d", a, b, ci, {co15, s15});
    end
  endtask

  initial begin
    a15 = '0; b15 = '0; ci15 = 0;
    for (int a = 0; a < 128; a++)
      for (int b = 0; b < 128; b++)
        for (int ci = 0; ci < 2; ci++) begin
          a7 = 7'(a); b7 = 7'(b); ci7 = 1'(ci);
          #1;
          checks++;
          if ({co7, s7} != 8'(a + b + ci)) begin
            failures++;
            if (failures < 10) $display("FAIL W=7 %0d+%0d+%0d got %0d", a, b, ci, {co7, s7});
          end
        end
    check15(32767, 1, 0);
    check15(32767, 0, 1);
    check15(32767, 32767, 1);
    check15(16384, 16384, 0);
    for (int i = 0; i < 2000; i++)
      check15(int'($urandom_range(0, 32767)), int'($urandom_range(0, 32767)), int'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
