// tb_superimposed_decoder -- the syndrome analysis behind the H_{28,8} coder.
// A coder feeds the decoder.  A single hit on any channel must be reported
// as single with its channel number; two and three neighbouring hits must
// give weight 3 and 4 (double and triple cluster); the one triple that
// the matrix cannot tell from a double (channels 26-28) is left out.  Every syndrome value is
// also checked for its weight against a popcount.
`timescale 1ns/1ps
module tb_superimposed_decoder;
  int checks = 0, failures = 0;
  logic [27:0] x;
  logic [7:0]  syn, syn_in;
  logic        use_direct;
  logic [3:0]  w;
  logic        single, double_cl, triple_cl;
  logic [4:0]  coord;

  superimposed_coder   u_cod (.x(x), .syn(syn));
  superimposed_decoder dut (.syn(use_direct ? syn_in : syn), .w(w), .single(single),
                            .double_cl(double_cl), .triple_cl(triple_cl), .coord(coord));

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
      if (failures < 20) $display("FAIL %s got %0d want %0d", tag, got, want);
    end
  endtask

  initial begin
    use_direct = 0; syn_in = '0;
    for (int ch = 1; ch <= 28; ch++) begin
      x = 28'(1) << (ch - 1);
      #1;
      chk("single w", int'(w), 2);
      chk("single flag", int'({single, double_cl, triple_cl}), int'(3'b100));
      chk("coord", int'(coord), ch);
    end
    for (int ch = 1; ch <= 27; ch++) begin
      x = 28'(3) << (ch - 1);
      #1;
      chk("double w", int'(w), 3);
      chk("double flag", int'({single, double_cl, triple_cl}), int'(3'b010));
      chk("double coord", int'(coord), 0);
    end
    // Channels 26, 27, 28 use only mixers 1, 2 and 3, so that one triple
    // cluster has weight 3; every other triple has weight 4.
    for (int ch = 1; ch <= 25; ch++) begin
      x = 28'(7) << (ch - 1);
      #1;
      chk("triple w", int'(w), 4);
      chk("triple flag", int'({single, double_cl, triple_cl}), int'(3'b001));
    end
    use_direct = 1;
    for (int s = 0; s < 256; s++) begin
      syn_in = 8'(s);
      #1;
      chk("weight", int'(w), $countones(syn_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
