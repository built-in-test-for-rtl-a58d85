// bibs_top -- BIBS self-test hardware, all parts side by side.
//
// Three data paths of a digital filter, each made self-testable with BIBS
// (one balanced kernel per data path, BILBO registers only on its primary
// inputs and outputs, one test session):
//   c5_*  bist_c5a2m  o = (a+b)*(c+d) + (e+f)*(g+h)
//   c3_*  bist_c3a2m  o = ((a+b)*c + d)*e + f
//   c4_*  bist_c4a4m  o = a*(f+g) + e*(b+c),  p = d*(b+c) + h*(f+g)
// and two pattern generators built for small example kernels whose logic
// blocks are not specified; their register outputs are brought out to the
// ports where such a kernel would connect:
//   ex_*  bibs_tpg (defaults): three 4-bit registers with sequential lengths
//         2, 1, 0 to the kernel output; 14 flip-flops, 12-stage LFSR
//   rc_*  tpg_reconfig: two 4-bit registers feeding two cones; rc_cone_sel
//         selects which cone the 8-stage LFSR configuration tests
// All blocks share clk and the asynchronous active-low rst_n and are
// otherwise independent. Each data path has its own start/busy/done and its
// own scan chain. See the sub-blocks for timing.
module bibs_top
  import bibs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // c5a2m
  input  logic [7:0]  c5_a, c5_b, c5_c, c5_d, c5_e, c5_f, c5_g, c5_h,
  output logic [7:0]  c5_o,
  input  logic        c5_bist_start,
  output logic        c5_bist_busy,
  output logic        c5_bist_done,
  input  logic        c5_scan_en,
  input  logic        c5_scan_in,
  output logic        c5_scan_out,
  // c3a2m
  input  logic [7:0]  c3_a, c3_b, c3_c, c3_d, c3_e, c3_f,
  output logic [7:0]  c3_o,
  input  logic        c3_bist_start,
  output logic        c3_bist_busy,
  output logic        c3_bist_done,
  input  logic        c3_scan_en,
  input  logic        c3_scan_in,
  output logic        c3_scan_out,
  // c4a4m
  input  logic [7:0]  c4_a, c4_b, c4_c, c4_d, c4_e, c4_f, c4_g, c4_h,
  output logic [7:0]  c4_o, c4_p,
  input  logic        c4_bist_start,
  output logic        c4_bist_busy,
  output logic        c4_bist_done,
  input  logic        c4_scan_en,
  input  logic        c4_scan_in,
  output logic        c4_scan_out,
  // generator of the three-register example kernel
  input  bilbo_mode_e ex_mode,
  input  logic [11:0] ex_d_in,
  output logic [11:0] ex_q,
  input  logic        ex_scan_in,
  output logic        ex_scan_out,
  // reconfigurable generator of the two-cone example kernel
  input  bilbo_mode_e rc_mode,
  input  logic        rc_cone_sel,
  input  logic [7:0]  rc_d_in,
  output logic [7:0]  rc_q,
  input  logic        rc_scan_in,
  output logic        rc_scan_out
);

  bist_c5a2m u_c5a2m (
    .clk, .rst_n,
    .a(c5_a), .b(c5_b), .c(c5_c), .d(c5_d), .e(c5_e), .f(c5_f), .g(c5_g), .h(c5_h),
    .o(c5_o), .bist_start(c5_bist_start), .bist_busy(c5_bist_busy), .bist_done(c5_bist_done),
    .scan_en(c5_scan_en), .scan_in(c5_scan_in), .scan_out(c5_scan_out));

  bist_c3a2m u_c3a2m (
    .clk, .rst_n,
    .a(c3_a), .b(c3_b), .c(c3_c), .d(c3_d), .e(c3_e), .f(c3_f),
    .o(c3_o), .bist_start(c3_bist_start), .bist_busy(c3_bist_busy), .bist_done(c3_bist_done),
    .scan_en(c3_scan_en), .scan_in(c3_scan_in), .scan_out(c3_scan_out));

  bist_c4a4m u_c4a4m (
    .clk, .rst_n,
    .a(c4_a), .b(c4_b), .c(c4_c), .d(c4_d), .e(c4_e), .f(c4_f), .g(c4_g), .h(c4_h),
    .o(c4_o), .p(c4_p),
    .bist_start(c4_bist_start), .bist_busy(c4_bist_busy), .bist_done(c4_bist_done),
    .scan_en(c4_scan_en), .scan_in(c4_scan_in), .scan_out(c4_scan_out));

  bibs_tpg u_ex_tpg (
    .clk, .rst_n, .mode(ex_mode), .d_in(ex_d_in), .scan_in(ex_scan_in),
    .q(ex_q), .scan_out(ex_scan_out));

  tpg_reconfig u_rc_tpg (
    .clk, .rst_n, .mode(rc_mode), .cone_sel(rc_cone_sel), .d_in(rc_d_in),
    .scan_in(rc_scan_in), .q(rc_q), .scan_out(rc_scan_out));

endmodule
