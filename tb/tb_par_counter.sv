// tb_par_counter -- checks (n,k)-counters of the sizes listed in the
// original table: (3,2), (4,3), (5,3), (7,3) and (15,4) exhaustively, and
// the default (31,5) plus (63,6) and (127,7) with all-zero, all-one,
// single-bit and random inputs, against a reference popcount.
`timescale 1ns/1ps
module tb_par_counter;
  int checks = 0, failures = 0;

  logic [2:0]   p3;   logic [1:0] q3;
  logic [3:0]   p4;   logic [2:0] q4;
  logic [4:0]   p5;   logic [2:0] q5;
  logic [6:0]   p7;   logic [2:0] q7;
  logic [14:0]  p15;  logic [3:0] q15;
  logic [30:0]  p31;  logic [4:0] q31;
  logic [62:0]  p63;  logic [5:0] q63;
  logic [126:0] p127; logic [6:0] q127;

  par_counter #(.N(3))   d3   (.p(p3),   .q(q3));
  par_counter #(.N(4))   d4   (.p(p4),   .q(q4));
  par_counter #(.N(5))   d5   (.p(p5),   .q(q5));
  par_counter #(.N(7))   d7   (.p(p7),   .q(q7));
  par_counter #(.N(15))  d15  (.p(p15),  .q(q15));
  par_counter            d31  (.p(p31),  .q(q31));
  par_counter #(.N(63))  d63  (.p(p63),  .q(q63));
  par_counter #(.N(127)) d127 (.p(p127), .q(q127));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ones(input logic [126:0] v);
    int n = 0;
    for (int i = 0; i < 127; i++) n += int'(v[i]);
    return n;
  endfunction

  task automatic chk(input string tag, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d want %0d", tag, got, want);
    end
  endtask

  task automatic drive_big(input logic [126:0] v);
    p31 = v[30:0]; p63 = v[62:0]; p127 = v;
    #1;
    chk("31",  int'(q31),  ones(127'(v[30:0])));
    chk("63",  int'(q63),  ones(127'(v[62:0])));
    chk("127", int'(q127), ones(v));
  endtask

  initial begin
    p31 = '0; p63 = '0; p127 = '0;
    for (int v = 0; v < 32768; v++) begin
      p3 = 3'(v); p4 = 4'(v); p5 = 5'(v); p7 = 7'(v); p15 = 15'(v);
      #1;
      if (v < 8)  chk("3", int'(q3), ones(127'(v & 7)));
      if (v < 16) chk("4", int'(q4), ones(127'(v & 15)));
      if (v < 32) chk("5", int'(q5), ones(127'(v & 31)));
      if (v < 128) chk("7", int'(q7), ones(127'(v & 127)));
      chk("15", int'(q15), ones(127'(v)));
    end
    drive_big('0);
    drive_big('1);
    for (int i = 0; i < 127; i++) drive_big(127'(1) << i);
    for (int i = 0; i < 3000; i++) begin
      logic [126:0] v;
      for (int w = 0; w < 4; w++) v[w*32 +: 31] = 31'($urandom);
      v[31] = 1'($urandom); v[63] = 1'($urandom); v[95] = 1'($urandom);
      // vary the density so that all counts are reached
      if (i % 3 == 1) v = v & 127'({$urandom, $urandom, $urandom, $urandom});
      if (i % 3 == 2) v = v | 127'({$urandom, $urandom, $urandom, $urandom});
      drive_big(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
