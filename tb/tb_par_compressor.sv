// tb_par_compressor -- checks the (M,m)-compressor.
//  - Default (15,15): the worked example of fifteen 15-bit numbers, whose
//    first-stage column counts are 11, 8, 9, ... (column 2^0 first) and whose
//    sum is 244103; then all-ones and random operands.
//  - (7,7): the example 105+58+113+5+125+42+109 = 557, and random operands.
//  - (15,7), (31,7), (63,7), (127,7): random operands and all-ones.
// Every result is compared with a plain integer sum.
`timescale 1ns/1ps
module tb_par_compressor;
  int checks = 0, failures = 0;

  logic [14:0][14:0]  x15;   logic [18:0] s15;
  logic [6:0][6:0]    x7;    logic [9:0]  s7;
  logic [14:0][6:0]   y15;   logic [10:0] t15;
  logic [30:0][6:0]   y31;   logic [11:0] t31;
  logic [62:0][6:0]   y63;   logic [12:0] t63;
  logic [126:0][6:0]  y127;  logic [13:0] t127;

  par_compressor                 d15  (.x(x15),  .s(s15));
  par_compressor #(.M(7),   .W(7)) d7   (.x(x7),   .s(s7));
  par_compressor #(.M(15),  .W(7)) e15  (.x(y15),  .s(t15));
  par_compressor #(.M(31),  .W(7)) e31  (.x(y31),  .s(t31));
  par_compressor #(.M(63),  .W(7)) e63  (.x(y63),  .s(t63));
  par_compressor #(.M(127), .W(7)) e127 (.x(y127), .s(t127));

  int fig_words [15] = '{13069, 11613, 30364, 26019, 14013, 1359, 7363, 11095,
                         15783, 6504, 28079, 8515, 26008, 13674, 30645};
  int fig_cols  [15] = '{11, 8, 9, 9, 6, 7, 7, 8, 12, 5, 11, 6, 8, 12, 5};
  int small_words [7] = '{105, 58, 113, 5, 125, 42, 109};

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string tag, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d want %0d", tag, got, want);
    end
  endtask

  task automatic run_random(input int mode);
    longint r15, r7, q15, q31, q63, q127;
    r15 = 0; r7 = 0; q15 = 0; q31 = 0; q63 = 0; q127 = 0;
    for (int i = 0; i < 15; i++) begin
      x15[i] = (mode == 1) ? '1 : 15'($urandom);
      r15 += longint'(x15[i]);
    end
    for (int i = 0; i < 7; i++) begin
      x7[i] = (mode == 1) ? '1 : 7'($urandom);
      r7 += longint'(x7[i]);
    end
    for (int i = 0; i < 127; i++) begin
      logic [6:0] v;
      v = (mode == 1) ? '1 : 7'($urandom);
      if (i < 15)  begin y15[i] = v; q15 += longint'(v); end
      if (i < 31)  begin y31[i] = v; q31 += longint'(v); end
      if (i < 63)  begin y63[i] = v; q63 += longint'(v); end
      y127[i] = v; q127 += longint'(v);
    end
    #1;
    chk("15x15", longint'(s15), r15);
    chk("7x7",   longint'(s7),  r7);
    chk("15x7",  longint'(t15), q15);
    chk("31x7",  longint'(t31), q31);
    chk("63x7",  longint'(t63), q63);
    chk("127x7", longint'(t127), q127);
  endtask

  initial begin
    y15 = '0; y31 = '0; y63 = '0; y127 = '0;
    for (int i = 0; i < 15; i++) x15[i] = 15'(fig_words[i]);
    for (int i = 0; i < 7; i++)  x7[i]  = 7'(small_words[i]);
    #1;
    chk("fig 15x15 sum", longint'(s15), 244103);
    chk("fig 7x7 sum",   longint'(s7),  557);
    // first stage: column counts of the worked example
    for (int c = 0; c < 15; c++)
      chk("fig column count", longint'(d15.g_stage[0].cnt[c]), longint'(fig_cols[c]));
    run_random(1);
    for (int n = 0; n < 2000; n++) run_random(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
