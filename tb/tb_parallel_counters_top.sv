// tb_parallel_counters_top -- end-to-end test of every circuit in the top at
// its default size.  Each circuit gets a run of events and is compared with
// a reference computed here.  The test also counts how often each mechanism
// of the design was exercised and fails if one never happened:
//   full count of the (31,5)-counter, quasi-digital settling, the worked
//   example of the (15,15)-compressor, saturation of a group and a sum over
//   several groups in the sequential-parallel compressor, odd lines, even
//   lines and a multiplicity that is only a lower bound in the pixel
//   counter, odd and even parity, single hit / double / triple cluster in
//   the superimposed coder, every cluster size and a disabled PROM in the
//   cluster counter, and the OR-Gray syndrome of several hits in one row.
`timescale 1ns/1ps
module tb_parallel_counters_top;
  int checks = 0, failures = 0;

  logic [30:0]        cnt_p;     logic [4:0]  cnt_q;
  logic [6:0]         qd_p;      logic [2:0]  qd_q;
  logic [14:0][14:0]  cmp_x;     logic [18:0] cmp_s;
  logic [62:0]        sp_x;      logic [6:0]  sp_sum;   logic [3:0] sp_eq;
  logic [30:0][30:0]  pix_hits;
  logic [4:0]         pxo, pxe, pyo, pye;
  logic [5:0]         pxo_eq, pxe_eq, pyo_eq, pye_eq;
  logic [6:0]         pix_t;
  logic [143:0]       par_x;     logic        par_q;
  logic [27:0]        sc_x;      logic [7:0]  sc_syn;   logic [3:0] sc_w;
  logic               sc_single, sc_double, sc_triple;  logic [4:0] sc_coord;
  logic [63:0]        cl_x;      logic        cl_enable; logic [7:0] cl_b;
  logic [14:0][14:0]  og_x;      logic [14:0][3:0] og_row_syn; logic [14:0] og_col_or;

  parallel_counters_top dut (
    .cnt_p, .cnt_q, .qd_p, .qd_q, .cmp_x, .cmp_s, .sp_x, .sp_sum, .sp_eq,
    .pix_hits, .pix_x_odd(pxo), .pix_x_even(pxe), .pix_y_odd(pyo), .pix_y_even(pye),
    .pix_x_odd_eq(pxo_eq), .pix_x_even_eq(pxe_eq), .pix_y_odd_eq(pyo_eq),
    .pix_y_even_eq(pye_eq), .pix_t_est(pix_t),
    .par_x, .par_q, .sc_x, .sc_syn, .sc_w, .sc_single, .sc_double, .sc_triple,
    .sc_coord, .cl_x, .cl_enable, .cl_b, .og_x, .og_row_syn, .og_col_or
  );

  // mechanism counters
  int m_full_count, m_qd_settle, m_fig_sum, m_group_sat, m_multi_group;
  int m_odd_line, m_even_line, m_lower_bound, m_par_odd, m_par_even;
  int m_single, m_double, m_triple, m_cl_disabled, m_og_multi;
  int m_cl_size [8];

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string tag, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 30) $display("FAIL %s got %0d want %0d", tag, got, want);
    end
  endtask

  task automatic run_counter();
    for (int n = 0; n < 400; n++) begin
      int k;
      k = n % 32;
      cnt_p = '0;
      if (k == 31) cnt_p = '1;
      else for (int h = 0; h < k; h++) cnt_p[$urandom_range(0, 30)] = 1'b1;
      #1;
      chk("cnt", cnt_q, $countones(cnt_p));
      if ($countones(cnt_p) == 31) m_full_count++;
    end
  endtask

  task automatic run_qd();
    for (int v = 0; v < 128; v += 9) begin
      qd_p = 7'(v);
      #7;
      chk("qd", qd_q, $countones(qd_p));
      m_qd_settle++;
    end
  endtask

  task automatic run_compressor();
    int fig [15] = '{13069, 11613, 30364, 26019, 14013, 1359, 7363, 11095,
                     15783, 6504, 28079, 8515, 26008, 13674, 30645};
    for (int i = 0; i < 15; i++) cmp_x[i] = 15'(fig[i]);
    #1;
    chk("cmp fig", cmp_s, 244103);
    if (cmp_s == 244103) m_fig_sum++;
    for (int n = 0; n < 300; n++) begin
      longint want = 0;
      for (int i = 0; i < 15; i++) begin
        cmp_x[i] = 15'($urandom);
        want += longint'(cmp_x[i]);
      end
      #1;
      chk("cmp", cmp_s, want);
    end
  endtask

  task automatic run_seqpar();
    for (int n = 0; n < 600; n++) begin
      int want, groups_hit, k;
      sp_x = '0;
      k = int'($urandom_range(0, 7));
      if (n % 5 == 0) sp_x[7*($urandom_range(0, 8)) +: 7] = 7'($urandom);
      else for (int h = 0; h < k; h++) sp_x[$urandom_range(0, 62)] = 1'b1;
      #1;
      want = 0; groups_hit = 0;
      for (int g = 0; g < 9; g++) begin
        int c;
        c = $countones(sp_x[g*7 +: 7]);
        if (c > 4) begin c = 4; m_group_sat++; end
        if (c > 0) groups_hit++;
        want += c;
      end
      if (groups_hit > 1) m_multi_group++;
      chk("sp sum", sp_sum, want);
      chk("sp eq", sp_eq, (want >= 1 && want <= 4) ? (1 << (want - 1)) : 0);
    end
  endtask

  task automatic run_pixel();
    for (int n = 0; n < 300; n++) begin
      int xo, xe, yo, ye, tx, ty, total, maxline, k;
      pix_hits = '0;
      k = int'($urandom_range(1, 9));
      for (int h = 0; h < k; h++) begin
        // cluster hits into a few rows and columns now and then
        int r, c;
        r = (n % 3 == 0) ? int'($urandom_range(0, 2)) : int'($urandom_range(0, 30));
        c = (n % 3 == 0) ? int'($urandom_range(0, 2)) : int'($urandom_range(0, 30));
        pix_hits[r][c] = 1'b1;
      end
      #1;
      xo = 0; xe = 0; yo = 0; ye = 0; total = 0; maxline = 0;
      for (int r = 0; r < 31; r++) begin
        int c;
        c = $countones(pix_hits[r]);
        total += c;
        if (c > maxline) maxline = c;
        if (c % 2 == 1) xo++; else if (c > 0) xe++;
      end
      for (int c = 0; c < 31; c++) begin
        int m = 0;
        for (int r = 0; r < 31; r++) m += int'(pix_hits[r][c]);
        if (m > maxline) maxline = m;
        if (m % 2 == 1) yo++; else if (m > 0) ye++;
      end
      tx = xo + 2 * xe;
      ty = yo + 2 * ye;
      if (xo + yo > 0) m_odd_line++;
      if (xe + ye > 0) m_even_line++;
      chk("pix xo", pxo, xo);
      chk("pix xe", pxe, xe);
      chk("pix yo", pyo, yo);
      chk("pix ye", pye, ye);
      chk("pix xo_eq", pxo_eq, (xo >= 1 && xo <= 6) ? (1 << (xo - 1)) : 0);
      chk("pix ye_eq", pye_eq, (ye >= 1 && ye <= 6) ? (1 << (ye - 1)) : 0);
      chk("pix t", pix_t, (tx > ty) ? tx : ty);
      if (maxline <= 2) chk("pix t exact", pix_t, total);
      else if (int'(pix_t) < total) m_lower_bound++;
    end
  endtask

  task automatic run_parity();
    for (int n = 0; n < 200; n++) begin
      par_x = {16'($urandom), $urandom, $urandom, $urandom, $urandom};
      #1;
      chk("parity", par_q, $countones(par_x) % 2);
      if (par_q) m_par_odd++; else m_par_even++;
    end
  endtask

  task automatic run_superimposed();
    for (int ch = 1; ch <= 28; ch++) begin
      sc_x = 28'(1) << (ch - 1);
      #1;
      chk("sc single", {sc_single, sc_coord}, {1'b1, 5'(ch)});
      chk("sc w1", sc_w, 2);
      if (sc_single) m_single++;
      if (ch <= 27) begin
        sc_x = 28'(3) << (ch - 1);
        #1;
        chk("sc double", {sc_double, sc_w}, {1'b1, 4'd3});
        if (sc_double) m_double++;
      end
      if (ch <= 25) begin
        sc_x = 28'(7) << (ch - 1);
        #1;
        chk("sc triple", {sc_triple, sc_w}, {1'b1, 4'd4});
        if (sc_triple) m_triple++;
      end
    end
  endtask

  task automatic run_cluster();
    for (int n = 0; n < 300; n++) begin
      int size, start;
      size  = int'($urandom_range(1, 8));
      start = int'($urandom_range(0, 64 - size));
      cl_x = ((64'(1) << size) - 1) << start;
      cl_enable = (n % 10 != 0);
      #1;
      if (cl_enable) begin
        chk("cluster", cl_b, 1 << (size - 1));
        m_cl_size[size-1]++;
      end else begin
        chk("cluster off", cl_b, 0);
        m_cl_disabled++;
      end
    end
  endtask

  task automatic run_or_gray();
    for (int n = 0; n < 300; n++) begin
      logic [14:0][3:0] wr;
      logic [14:0]      wc;
      int k, r0;
      og_x = '0;
      k  = int'($urandom_range(1, 6));
      r0 = int'($urandom_range(0, 14));
      for (int h = 0; h < k; h++)
        og_x[(n % 2 == 0) ? r0 : int'($urandom_range(0, 14))][$urandom_range(0, 14)] = 1'b1;
      wr = '0; wc = '0;
      for (int r = 0; r < 15; r++)
        for (int c = 0; c < 15; c++)
          if (og_x[r][c]) begin
            wr[r] |= 4'((c + 1) ^ ((c + 1) >> 1));
            wc[c] = 1'b1;
          end
      for (int r = 0; r < 15; r++) if ($countones(og_x[r]) > 1) m_og_multi++;
      #1;
      chk("og rows", og_row_syn, wr);
      chk("og cols", og_col_or, wc);
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else
      $display("  %-32s %0d", what, count);
  endtask

  initial begin
    cnt_p = '0; qd_p = '0; cmp_x = '0; sp_x = '0; pix_hits = '0; par_x = '0;
    sc_x = '0; cl_x = '0; cl_enable = 1'b0; og_x = '0;
    #10;
    run_counter();
    run_qd();
    run_compressor();
    run_seqpar();
    run_pixel();
    run_parity();
    run_superimposed();
    run_cluster();
    run_or_gray();
    $display("mechanisms exercised:");
    need("(31,5) full count",          m_full_count);
    need("quasi-digital settle",       m_qd_settle);
    need("compressor worked example",  m_fig_sum);
    need("group saturation",           m_group_sat);
    need("sum over several groups",    m_multi_group);
    need("odd line",                   m_odd_line);
    need("nonzero even line",          m_even_line);
    need("multiplicity lower bound",   m_lower_bound);
    need("odd parity",                 m_par_odd);
    need("even parity",                m_par_even);
    need("single hit",                 m_single);
    need("double cluster",             m_double);
    need("triple cluster",             m_triple);
    need("PROM disabled",              m_cl_disabled);
    for (int b = 0; b < 8; b++) need($sformatf("cluster size %0d", b + 1), m_cl_size[b]);
    need("several hits in one row",    m_og_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
