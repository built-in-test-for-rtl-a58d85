// bist_c3a2m -- the c3a2m data path made self-testable the BIBS way.
//
// c3a2m computes o = ((a+b)*c + d)*e + f on 8-bit words (dp_c3a2m). The
// pipelined data path is one balanced kernel: every input reaches the final
// adder through 4 registers. Only the six primary-input registers (the test
// pattern generator, a plain 48-stage LFSR since all sequential lengths are
// equal) and the output register (signature analyser) are BILBO registers;
// the delay and pipeline registers inside stay ordinary registers. One test
// session, two BILBO registers from input to output. bist_ctrl sequences the
// session.
//
// Normal operation: o follows the inputs with a latency of 6 clocks.
// Self test: raise bist_start; bist_done rises 1 + NPAT + 4 clocks later and
// o then holds the signature until bist_start drops (back to normal
// operation). Default NPAT = 9240, the document's pattern
// count for 100% fault coverage of this circuit.
// Scan: scan_en outside a session chains scan_in -> TPG -> SA -> scan_out.
module bist_c3a2m
  import bibs_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter int unsigned NPAT = 9240
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a, b, c, d, e, f,
  output logic [W-1:0] o,
  input  logic         bist_start,
  output logic         bist_busy,
  output logic         bist_done,
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out
);
  localparam int unsigned DEPTH = 4;
  localparam byte         SD    = byte'(DEPTH);   // sequential length of every input
  localparam byte         X     = byte'(NO_DEP);

  bilbo_mode_e    c_tpg_mode, c_sa_mode, tpg_mode, sa_mode;
  logic           sa_en, chain;
  logic [6*W-1:0] tpg_q;
  logic [W-1:0]   k_o;

  bist_ctrl #(.NPAT(NPAT), .FLUSH(DEPTH)) u_ctrl (
    .clk, .rst_n, .start(bist_start), .tpg_mode(c_tpg_mode), .sa_mode(c_sa_mode),
    .sa_en, .busy(bist_busy), .done(bist_done));

  assign tpg_mode = (scan_en && !bist_busy) ? BM_SCAN : c_tpg_mode;
  assign sa_mode  = (scan_en && !bist_busy) ? BM_SCAN : c_sa_mode;

  bibs_tpg #(
    .NREG(6), .REG_W('{W, W, W, W, W, W, 0, 0}), .NCONE(1),
    .SEQ(tab1(row8(SD, SD, SD, SD, SD, SD, X, X)))
  ) u_tpg (
    .clk, .rst_n, .mode(tpg_mode), .d_in({f, e, d, c, b, a}), .scan_in,
    .q(tpg_q), .scan_out(chain));

  dp_c3a2m #(.W(W)) u_kernel (
    .clk, .rst_n,
    .a(tpg_q[0*W +: W]), .b(tpg_q[1*W +: W]), .c(tpg_q[2*W +: W]),
    .d(tpg_q[3*W +: W]), .e(tpg_q[4*W +: W]), .f(tpg_q[5*W +: W]),
    .o(k_o));

  bilbo_reg #(.W(W)) u_sa (
    .clk, .rst_n, .en(sa_en), .mode(sa_mode), .d(k_o), .scan_in(chain), .q(o), .scan_out);
endmodule
