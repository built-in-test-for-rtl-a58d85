// bist_c5a2m -- the c5a2m data path made self-testable the BIBS way.
//
// c5a2m computes o = (a+b)*(c+d) + (e+f)*(g+h) on 8-bit words (dp_c5a2m).
// The whole pipelined data path is one balanced kernel, so only the eight
// primary-input registers and the output register become BILBO registers:
// the input registers together form the test pattern generator (bibs_tpg;
// every input reaches the final adder through 2 registers, so the
// generator is a plain 64-stage LFSR with no extra flip-flops) and the
// output register is the signature analyser (bilbo_reg). One test session
// covers the whole circuit; a signal crosses two BILBO registers from input
// to output. bist_ctrl sequences the session.
//
// Normal operation: o follows the inputs with a latency of 4 clocks (input
// register, two kernel registers, output register).
// Self test: raise bist_start; bist_done rises 1 + NPAT + 2 clocks later and
// o then holds the signature of NPAT patterns until bist_start drops. The
// default NPAT = 7300 is the pattern count the document reports for 100%
// fault coverage of this circuit (obtained there with random patterns).
// Scan: with scan_en high outside a session the input registers and the
// output register form one shift chain, scan_in -> TPG string -> SA -> scan_out.
module bist_c5a2m
  import bibs_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter int unsigned NPAT = 7300
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a, b, c, d, e, f, g, h,
  output logic [W-1:0] o,
  input  logic         bist_start,
  output logic         bist_busy,
  output logic         bist_done,
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out
);
  localparam int unsigned DEPTH = 2;
  localparam byte         SD    = byte'(DEPTH);   // sequential length of every input

  bilbo_mode_e    c_tpg_mode, c_sa_mode, tpg_mode, sa_mode;
  logic           sa_en, chain;
  logic [8*W-1:0] tpg_q;
  logic [W-1:0]   k_o;

  bist_ctrl #(.NPAT(NPAT), .FLUSH(DEPTH)) u_ctrl (
    .clk, .rst_n, .start(bist_start), .tpg_mode(c_tpg_mode), .sa_mode(c_sa_mode),
    .sa_en, .busy(bist_busy), .done(bist_done));

  assign tpg_mode = (scan_en && !bist_busy) ? BM_SCAN : c_tpg_mode;
  assign sa_mode  = (scan_en && !bist_busy) ? BM_SCAN : c_sa_mode;

  bibs_tpg #(
    .NREG(8), .REG_W('{W, W, W, W, W, W, W, W}), .NCONE(1),
    .SEQ(tab1(row8(SD, SD, SD, SD, SD, SD, SD, SD)))
  ) u_tpg (
    .clk, .rst_n, .mode(tpg_mode), .d_in({h, g, f, e, d, c, b, a}), .scan_in,
    .q(tpg_q), .scan_out(chain));

  dp_c5a2m #(.W(W)) u_kernel (
    .clk, .rst_n,
    .a(tpg_q[0*W +: W]), .b(tpg_q[1*W +: W]), .c(tpg_q[2*W +: W]), .d(tpg_q[3*W +: W]),
    .e(tpg_q[4*W +: W]), .f(tpg_q[5*W +: W]), .g(tpg_q[6*W +: W]), .h(tpg_q[7*W +: W]),
    .o(k_o));

  bilbo_reg #(.W(W)) u_sa (
    .clk, .rst_n, .en(sa_en), .mode(sa_mode), .d(k_o), .scan_in(chain), .q(o), .scan_out);
endmodule
