// bibs_tpg -- test pattern generator (TPG) for a balanced BISTable kernel.
//
// The input registers R_1..R_n of a kernel are BILBO-style registers. In test
// mode their cells, together with a few extra D flip-flops, form one string of
// flip-flops. Each flip-flop carries a label L_k computed at elaboration time
// by procedure MC_TPG (bibs_pkg::tpg_plan): the flip-flops labelled
// L_1..L_M are a type-1 (external XOR, Fibonacci) maximal-length LFSR whose
// first stage is L_1, and every flip-flop labelled L_k (k > 1) is fed by the
// flip-flop labelled L_(k-1). So a register placed d flip-flops further down
// the string sees the same bits d clock cycles later, which cancels the
// different sequential lengths from the registers to the kernel's output
// cones: every cone then receives a functionally exhaustive pattern set in
// 2^M - 1 clock cycles. Two cells with the same label (a "shared signal") are
// both fed from the same source; labels above M are plain shift-register
// stages. This is the document's construction. The mode set, the seed and
// the hold behaviour of the extra flip-flops in normal mode are this design's
// choices.
//
// Parameters: NREG registers of widths REG_W[0..NREG-1]; NCONE cones with
// sequential lengths SEQ[x][i] (-1, bibs_pkg::NO_DEP, when cone x does not use
// register i+1); POLY = low-order terms of the LFSR polynomial, 0 selects
// bibs_pkg::prim_poly(M). Defaults: the 3 x 4-bit kernel of the document's
// Example 2 (sequential lengths 2, 1, 0; 14 flip-flops, 12-stage LFSR with
// x^12+x^7+x^4+x^3+1).
//
// Ports: d_in / q hold the register cells. Register R_i occupies bits
// [OFF_i + W_i - 1 : OFF_i] with OFF_i the sum of the widths of R_1..R_(i-1);
// cell R_(i,1), the first stage, is the MSB of that field.
//   mode = BM_NORMAL  register cells load d_in, extra flip-flops hold
//   mode = BM_TEST    LFSR / shift-register operation (one pattern per clock)
//   mode = BM_RESET   load the seed: L_1 = 1, every other flip-flop 0
//   mode = BM_SCAN    whole string is a serial shift register, scan_in -> scan_out
// rst_n (asynchronous, active low) also loads the seed. All outputs are
// register outputs; every mode takes effect at the next rising clock edge.
module bibs_tpg
  import bibs_pkg::*;
#(
  parameter int unsigned NREG  = 3,
  parameter width_list_t REG_W = '{4, 4, 4, 0, 0, 0, 0, 0},
  parameter int unsigned NCONE = 1,
  parameter seq_table_t  SEQ   = tab1(row3(2, 1, 0)),
  parameter logic [63:0] POLY  = 64'h0,
  localparam int unsigned TOTW = sum_w(NREG, REG_W),
  localparam tpg_plan_t   PLAN = tpg_plan_all(NREG, REG_W, NCONE, SEQ),
  localparam int          NFF  = int'(PLAN.nff),
  localparam int          M    = int'(PLAN.m)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bilbo_mode_e       mode,
  input  logic [TOTW-1:0]   d_in,
  input  logic              scan_in,
  output logic [TOTW-1:0]   q,
  output logic              scan_out
);

  localparam logic [63:0] POLY_USED = (POLY != 64'h0) ? POLY : prim_poly(M);

  // Feedback taps, as a mask over string positions: x^M -> L_M, x^e -> L_(M-e).
  function automatic logic [NFF-1:0] tap_mask();
    logic [NFF-1:0] msk = '0;
    msk[plan_src(PLAN, M)] = 1'b1;
    for (int e = 1; e < M; e++)
      if (POLY_USED[e]) msk[plan_src(PLAN, M - e)] = 1'b1;
    return msk;
  endfunction

  localparam logic [NFF-1:0] TAPS = tap_mask();

  initial begin
    assert (PLAN.err == 1'b0)
      else $error("bibs_tpg: kernel description outside the MC_TPG procedure");
    assert (POLY_USED != 64'h0) else $error("bibs_tpg: no polynomial for degree %0d", M);
  end

  logic [NFF-1:0] ff;           // the string; ff[0] is the first flip-flop
  logic [NFF-1:0] test_d;       // next state in test mode
  logic [NFF-1:0] norm_d;       // next state in normal mode
  logic [NFF-1:0] seed;
  logic           fb;

  assign fb = ^(ff & TAPS);

  for (genvar f = 0; f < NFF; f++) begin : g_ff
    localparam int LAB = int'($signed(PLAN.lab[f]));
    localparam int SRC = (LAB > 1) ? plan_src(PLAN, LAB - 1) : 0;
    assign seed[f] = (LAB == 1);
    if (LAB == 1) begin : g_first
      assign test_d[f] = fb;
    end else begin : g_next
      assign test_d[f] = ff[SRC];
    end
  end

  // register cells: map string positions to the flat d_in / q layout
  for (genvar i = 0; i < NREG; i++) begin : g_reg
    localparam int unsigned OFF = sum_w(i, REG_W);
    for (genvar j = 0; j < REG_W[i]; j++) begin : g_cell
      localparam int POS = int'(PLAN.first_ff[i]) + j;
      localparam int unsigned BIT = OFF + REG_W[i] - 1 - j;
      assign q[BIT]       = ff[POS];
      assign norm_d[POS]  = d_in[BIT];
    end
  end

  // extra flip-flops hold their value in normal mode
  for (genvar f = 0; f < NFF; f++) begin : g_extra
    if (!cell_at(f)) begin : g_hold
      assign norm_d[f]  = ff[f];
    end
  end

  function automatic bit cell_at(input int pos);
    bit r = 1'b0;
    for (int i = 0; i < int'(NREG); i++)
      if (pos >= int'(PLAN.first_ff[i]) && pos < int'(PLAN.first_ff[i]) + int'(REG_W[i])) r = 1'b1;
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff <= seed;
    end else begin
      unique case (mode)
        BM_NORMAL: ff <= norm_d;
        BM_TEST:   ff <= test_d;
        BM_RESET:  ff <= seed;
        BM_SCAN:   ff <= {ff[NFF-2:0], scan_in};
      endcase
    end
  end

  assign scan_out = ff[NFF-1];

endmodule
