// tb_or_gray_syndrome -- the OR-Gray code of a 15 x 15 matrix.  The rows of
// the printed matrix H_{15,4} are
//   110011001100110 / 011110000111100 / 000111111110000 / 000000011111111
// (column 1 leftmost); a single pixel must give its column's code in its
// row and a one in its column OR.  Random events are checked against the OR
// of the printed columns.
`timescale 1ns/1ps
module tb_or_gray_syndrome;
  int checks = 0, failures = 0;
  logic [14:0][14:0] x;
  logic [14:0][3:0]  row_syn;
  logic [14:0]       col_or;

  or_gray_syndrome dut (.x(x), .row_syn(row_syn), .col_or(col_or));

  string hrow [4] = '{"110011001100110", "011110000111100",
                      "000111111110000", "000000011111111"};

  // code of column c (0-based) read from the printed matrix
  function automatic logic [3:0] hcol(input int c);
    logic [3:0] v;
    for (int b = 0; b < 4; b++) v[b] = (hrow[b][c] == "1");
    return v;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic evaluate();
    logic [14:0][3:0] wr;
    logic [14:0]      wc;
    wr = '0; wc = '0;
    for (int r = 0; r < 15; r++)
      for (int c = 0; c < 15; c++)
        if (x[r][c]) begin wr[r] |= hcol(c); wc[c] = 1'b1; end
    #1;
    checks += 2;
    if (row_syn != wr) begin failures++; if (failures < 20) $display("FAIL row_syn"); end
    if (col_or != wc)  begin failures++; if (failures < 20) $display("FAIL col_or"); end
  endtask

  initial begin
    x = '0;
    evaluate();
    for (int r = 0; r < 15; r++)
      for (int c = 0; c < 15; c++) begin
        x = '0; x[r][c] = 1'b1;
        evaluate();
      end
    for (int n = 0; n < 1000; n++) begin
      int k;
      k = int'($urandom_range(1, 6));
      x = '0;
      for (int h = 0; h < k; h++) x[$urandom_range(0, 14)][$urandom_range(0, 14)] = 1'b1;
      evaluate();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
