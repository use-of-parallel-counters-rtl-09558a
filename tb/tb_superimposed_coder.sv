// tb_superimposed_coder -- the H_{28,8} coding matrix.  Every single channel
// must light exactly two mixers; the mixer lists of the printed wiring
// (mixer 1: channels 1,8,14,19,23,26,28; mixer 3: 3,10,16,21,25,26,27;
// mixer 4: 4,11,17,22,23,24,25; mixer 8: 1..7) are checked, all 28 single-hit
// syndromes must differ, and random events must give the OR of the columns.
`timescale 1ns/1ps
module tb_superimposed_coder;
  int checks = 0, failures = 0;
  logic [27:0] x;
  logic [7:0]  syn;
  logic [7:0]  col [28];

  superimposed_coder dut (.x(x), .syn(syn));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mixer lists as printed (1-based channel numbers).
  int pm1 [7] = '{1, 8, 14, 19, 23, 26, 28};
  int pm3 [7] = '{3, 10, 16, 21, 25, 26, 27};
  int pm4 [7] = '{4, 11, 17, 22, 23, 24, 25};

  function automatic bit in_list(input int ch, input int lst [7]);
    foreach (lst[i]) if (lst[i] == ch) return 1;
    return 0;
  endfunction

  initial begin
    for (int ch = 1; ch <= 28; ch++) begin
      x = 28'(1) << (ch - 1);
      #1;
      col[ch-1] = syn;
      checks += 5;
      if ($countones(syn) != 2) begin failures++; $display("FAIL ch %0d weight %0d", ch, $countones(syn)); end
      if (syn[0] != in_list(ch, pm1)) begin failures++; $display("FAIL ch %0d mixer 1", ch); end
      if (syn[2] != in_list(ch, pm3)) begin failures++; $display("FAIL ch %0d mixer 3", ch); end
      if (syn[3] != in_list(ch, pm4)) begin failures++; $display("FAIL ch %0d mixer 4", ch); end
      if (syn[7] != (ch <= 7))       begin failures++; $display("FAIL ch %0d mixer 8", ch); end
    end
    for (int a = 0; a < 28; a++)
      for (int b = a + 1; b < 28; b++) begin
        checks++;
        if (col[a] == col[b]) begin failures++; $display("FAIL channels %0d and %0d alike", a + 1, b + 1); end
      end
    for (int n = 0; n < 500; n++) begin
      logic [7:0] want;
      want = '0;
      x = 28'($urandom) & 28'($urandom);
      for (int i = 0; i < 28; i++) if (x[i]) want |= col[i];
      #1;
      checks++;
      if (syn != want) begin failures++; $display("FAIL x=%h syn=%b want %b", x, syn, want); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
