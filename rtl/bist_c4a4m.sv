// bist_c4a4m -- the c4a4m data path made self-testable the BIBS way.
//
// c4a4m computes o = a*(f+g) + e*(b+c) and p = d*(b+c) + h*(f+g) on 8-bit
// words (dp_c4a4m). The pipelined data path is one balanced kernel with two
// output cones; every input reaches an output adder through 2 registers.
// The eight primary-input registers form the test pattern generator and the
// two output registers are signature analysers: ten BILBO registers, one
// test session. The generator is laid out by the multiple-cone procedure:
// cone o uses a,b,c,e,f,g and cone p uses b,c,d,f,g,h, all at the same
// sequential length, so the registers sit side by side. d and e feed
// different cones, so the procedure lets them share labels 25..32; the
// result is labels 1..56 with a 48-stage LFSR (a,b,c,d/e,f,g) and register
// h as 8 plain shift stages. The document gives no generator for this
// circuit (it tested it with random patterns); this one is what the
// multiple-cone procedure yields. Each cone sees a 48-label window, i.e. a
// functionally exhaustive pattern source. bist_ctrl sequences the session.
//
// Normal operation: o and p follow the inputs with a latency of 4 clocks.
// Self test: raise bist_start; bist_done rises 1 + NPAT + 2 clocks later and
// o, p then hold the two signatures until bist_start is dropped, which returns
// to normal operation. Default NPAT = 19120, the document's
// pattern count for 100% fault coverage of this circuit.
// Scan: scan_en outside a session chains scan_in -> TPG -> SA(o) -> SA(p) -> scan_out.
module bist_c4a4m
  import bibs_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter int unsigned NPAT = 19120
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a, b, c, d, e, f, g, h,
  output logic [W-1:0] o,
  output logic [W-1:0] p,
  input  logic         bist_start,
  output logic         bist_busy,
  output logic         bist_done,
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out
);
  localparam int unsigned DEPTH = 2;
  localparam byte         SD    = byte'(DEPTH);   // sequential length of every input
  localparam byte         X     = byte'(NO_DEP);

  bilbo_mode_e    c_tpg_mode, c_sa_mode, tpg_mode, sa_mode;
  logic           sa_en, chain0, chain1;
  logic [8*W-1:0] tpg_q;
  logic [W-1:0]   k_o, k_p;

  bist_ctrl #(.NPAT(NPAT), .FLUSH(DEPTH)) u_ctrl (
    .clk, .rst_n, .start(bist_start), .tpg_mode(c_tpg_mode), .sa_mode(c_sa_mode),
    .sa_en, .busy(bist_busy), .done(bist_done));

  assign tpg_mode = (scan_en && !bist_busy) ? BM_SCAN : c_tpg_mode;
  assign sa_mode  = (scan_en && !bist_busy) ? BM_SCAN : c_sa_mode;

  bibs_tpg #(
    .NREG(8), .REG_W('{W, W, W, W, W, W, W, W}), .NCONE(2),
    .SEQ(tab2(row8(SD, SD, SD, X, SD, SD, SD, X),
              row8(X, SD, SD, SD, X, SD, SD, SD)))
  ) u_tpg (
    .clk, .rst_n, .mode(tpg_mode), .d_in({h, g, f, e, d, c, b, a}), .scan_in,
    .q(tpg_q), .scan_out(chain0));

  dp_c4a4m #(.W(W)) u_kernel (
    .clk, .rst_n,
    .a(tpg_q[0*W +: W]), .b(tpg_q[1*W +: W]), .c(tpg_q[2*W +: W]), .d(tpg_q[3*W +: W]),
    .e(tpg_q[4*W +: W]), .f(tpg_q[5*W +: W]), .g(tpg_q[6*W +: W]), .h(tpg_q[7*W +: W]),
    .o(k_o), .p(k_p));

  bilbo_reg #(.W(W)) u_sa_o (
    .clk, .rst_n, .en(sa_en), .mode(sa_mode), .d(k_o), .scan_in(chain0), .q(o), .scan_out(chain1));

  bilbo_reg #(.W(W)) u_sa_p (
    .clk, .rst_n, .en(sa_en), .mode(sa_mode), .d(k_p), .scan_in(chain1), .q(p), .scan_out);
endmodule
