// parallel_counters_top -- all trigger counters and coders side by side.
//
// The design is a family of independent, purely combinational circuits that
// count or compress hits of particle-detector channels for a fast trigger.
// They do not feed each other, so this top places one of each next to the
// others, every one with its own inputs and outputs:
//   cnt_*   (31,5)-parallel counter of full adders
//   qd_*    quasi-digital (7,3)-counter (behavioural model of an analog part)
//   cmp_*   (15,15)-parallel compressor: sum of fifteen 15-bit words
//   sp_*    sequential-parallel compressor, 63 channels, multiplicity <= 4
//   pix_*   961-pixel (31 x 31) multiplicity counter, OR/parity iteration code
//   par_*   144-input two-level parity checker
//   sc_*    superimposed H_{28,8} coder and its syndrome analysis
//   cl_*    64-channel single-cluster size counter (H_{64,8})
//   og_*    OR-Gray syndrome of a 15 x 15 matrix
// All outputs follow the inputs after the combinational delay; there is no
// clock.  Sizes are the defaults of the blocks, which are those of the
// original work except where a block's own header says otherwise.
`timescale 1ns/1ps
module parallel_counters_top (
  // (31,5)-counter
  input  logic [30:0]        cnt_p,
  output logic [4:0]         cnt_q,
  // quasi-digital (7,3)-counter
  input  logic [6:0]         qd_p,
  output logic [2:0]         qd_q,
  // (15,15)-compressor
  input  logic [14:0][14:0]  cmp_x,
  output logic [18:0]        cmp_s,
  // sequential-parallel compressor
  input  logic [62:0]        sp_x,
  output logic [6:0]         sp_sum,
  output logic [3:0]         sp_eq,
  // pixel-detector counter
  input  logic [30:0][30:0]  pix_hits,
  output logic [4:0]         pix_x_odd,
  output logic [4:0]         pix_x_even,
  output logic [4:0]         pix_y_odd,
  output logic [4:0]         pix_y_even,
  output logic [5:0]         pix_x_odd_eq,
  output logic [5:0]         pix_x_even_eq,
  output logic [5:0]         pix_y_odd_eq,
  output logic [5:0]         pix_y_even_eq,
  output logic [6:0]         pix_t_est,
  // 144-input parity checker
  input  logic [143:0]       par_x,
  output logic               par_q,
  // superimposed coder H_{28,8} and syndrome analysis
  input  logic [27:0]        sc_x,
  output logic [7:0]         sc_syn,
  output logic [3:0]         sc_w,
  output logic               sc_single,
  output logic               sc_double,
  output logic               sc_triple,
  output logic [4:0]         sc_coord,
  // cluster counter H_{64,8}
  input  logic [63:0]        cl_x,
  input  logic               cl_enable,
  output logic [7:0]         cl_b,
  // OR-Gray iteration code
  input  logic [14:0][14:0]  og_x,
  output logic [14:0][3:0]   og_row_syn,
  output logic [14:0]        og_col_or
);
  par_counter u_cnt (.p(cnt_p), .q(cnt_q));

  quasi_digital_counter u_qd (.p(qd_p), .q(qd_q));

  par_compressor u_cmp (.x(cmp_x), .s(cmp_s));

  seqpar_counter u_sp (.x(sp_x), .sum(sp_sum), .eq(sp_eq));

  pixel_counter u_pix (
    .hits      (pix_hits),
    .x_odd     (pix_x_odd),
    .x_even    (pix_x_even),
    .y_odd     (pix_y_odd),
    .y_even    (pix_y_even),
    .x_odd_eq  (pix_x_odd_eq),
    .x_even_eq (pix_x_even_eq),
    .y_odd_eq  (pix_y_odd_eq),
    .y_even_eq (pix_y_even_eq),
    .t_est     (pix_t_est)
  );

  parity_checker u_par (.x(par_x), .par(par_q));

  superimposed_coder u_sc_cod (.x(sc_x), .syn(sc_syn));

  superimposed_decoder u_sc_dec (
    .syn       (sc_syn),
    .w         (sc_w),
    .single    (sc_single),
    .double_cl (sc_double),
    .triple_cl (sc_triple),
    .coord     (sc_coord)
  );

  cluster_counter u_cl (.x(cl_x), .enable(cl_enable), .b(cl_b));

  or_gray_syndrome u_og (.x(og_x), .row_syn(og_row_syn), .col_or(og_col_or));
endmodule
