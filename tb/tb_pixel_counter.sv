// tb_pixel_counter -- the 31 x 31 (961-pixel) multiplicity counter.
// Hand-made events from the single- and few-hit pictures (one hit; two hits
// in a row; three hits in a row; four hits on a square) are checked for
// their odd/even line counts and multiplicity, then random events of 0 to 8
// hits.  The reference counts rows and columns with an odd and with a
// nonzero even number of hits directly from the matrix, and checks that the
// multiplicity is exact whenever no line holds more than two hits.
`timescale 1ns/1ps
module tb_pixel_counter;
  int checks = 0, failures = 0;
  int n_even = 0, n_exact = 0;

  logic [30:0][30:0] hits;
  logic [4:0] xo, xe, yo, ye;
  logic [5:0] xo_eq, xe_eq, yo_eq, ye_eq;
  logic [6:0] t_est;

  pixel_counter dut (
    .hits(hits), .x_odd(xo), .x_even(xe), .y_odd(yo), .y_even(ye),
    .x_odd_eq(xo_eq), .x_even_eq(xe_eq), .y_odd_eq(yo_eq), .y_even_eq(ye_eq),
    .t_est(t_est)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [5:0] enc(input int v);
    return (v >= 1 && v <= 6) ? 6'(1 << (v - 1)) : '0;
  endfunction

  task automatic chk(input string tag, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d want %0d", tag, got, want);
    end
  endtask

  task automatic evaluate();
    int rxo, rxe, ryo, rye, total, maxline, tx, ty;
    rxo = 0; rxe = 0; ryo = 0; rye = 0; total = 0; maxline = 0;
    for (int r = 0; r < 31; r++) begin
      int n = $countones(hits[r]);
      total += n;
      if (n > maxline) maxline = n;
      if (n % 2 == 1) rxo++; else if (n > 0) rxe++;
    end
    for (int c = 0; c < 31; c++) begin
      int n = 0;
      for (int r = 0; r < 31; r++) n += int'(hits[r][c]);
      if (n > maxline) maxline = n;
      if (n % 2 == 1) ryo++; else if (n > 0) rye++;
    end
    #1;
    chk("x_odd", int'(xo), rxo);
    chk("x_even", int'(xe), rxe);
    chk("y_odd", int'(yo), ryo);
    chk("y_even", int'(ye), rye);
    chk("x_odd_eq", int'(xo_eq), int'(enc(rxo)));
    chk("x_even_eq", int'(xe_eq), int'(enc(rxe)));
    chk("y_odd_eq", int'(yo_eq), int'(enc(ryo)));
    chk("y_even_eq", int'(ye_eq), int'(enc(rye)));
    tx = rxo + 2 * rxe;
    ty = ryo + 2 * rye;
    chk("t_est", int'(t_est), (tx > ty) ? tx : ty);
    if (rxe + rye > 0) n_even++;
    if (maxline <= 2) begin
      n_exact++;
      chk("t_est exact", int'(t_est), total);
    end
  endtask

  initial begin
    // one hit: one odd row, one odd column
    hits = '0; hits[12][7] = 1'b1; evaluate();
    chk("t=1 picture", int'({xo, yo, xe, ye}), int'({5'd1, 5'd1, 5'd0, 5'd0}));
    // two hits in one row: one even row, two odd columns
    hits = '0; hits[3][4] = 1'b1; hits[3][20] = 1'b1; evaluate();
    chk("t=2 row picture", int'({xe, yo}), int'({5'd1, 5'd2}));
    chk("t=2 mult", int'(t_est), 2);
    // three hits in one row: one odd row, three odd columns
    hits = '0; hits[9][1] = 1'b1; hits[9][2] = 1'b1; hits[9][3] = 1'b1; evaluate();
    chk("t=3 row mult", int'(t_est), 3);
    // four hits on a square: two even rows, two even columns
    hits = '0; hits[5][5] = 1'b1; hits[5][9] = 1'b1; hits[8][5] = 1'b1; hits[8][9] = 1'b1;
    evaluate();
    chk("t=4 square", int'({xe, ye}), int'({5'd2, 5'd2}));
    chk("t=4 mult", int'(t_est), 4);
    // corners of the matrix
    hits = '0; hits[0][0] = 1'b1; hits[30][30] = 1'b1; evaluate();
    hits = '1; evaluate();
    for (int n = 0; n < 1500; n++) begin
      int k;
      k = int'($urandom_range(0, 8));
      hits = '0;
      for (int h = 0; h < k; h++)
        hits[$urandom_range(0, 30)][$urandom_range(0, 30)] = 1'b1;
      evaluate();
    end
    checks += 2;
    if (n_even == 0)  begin failures++; $display("FAIL no even line seen"); end
    if (n_exact == 0) begin failures++; $display("FAIL no exact case seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
