// tb_cluster_counter -- single clusters of every size b = 1..8 at every
// start channel of the 64-channel plane must light exactly the line b, and
// nothing when ENABLE is low or no channel is hit.  The OR-gate wiring is
// checked by single hits: channel i must appear on gate ((i-1) mod 8) + 1.
`timescale 1ns/1ps
module tb_cluster_counter;
  int checks = 0, failures = 0;
  logic [63:0] x;
  logic        enable;
  logic [7:0]  b;

  cluster_counter dut (.x(x), .enable(enable), .b(b));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string tag, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %b want %b", tag, got, want);
    end
  endtask

  initial begin
    enable = 1'b1;
    x = '0;
    #1;
    chk("empty", int'(b), 0);
    for (int i = 1; i <= 64; i++) begin
      x = 64'(1) << (i - 1);
      #1;
      chk("gate", int'(dut.syn), 1 << ((i - 1) % 8));
    end
    for (int size = 1; size <= 8; size++)
      for (int start = 0; start + size <= 64; start++) begin
        x = ((64'(1) << size) - 1) << start;
        enable = 1'b1;
        #1;
        chk("cluster", int'(b), 1 << (size - 1));
        enable = 1'b0;
        #1;
        chk("disabled", int'(b), 0);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
