// bilbo_reg -- BILBO (built-in logic block observer) register.
//
// A W-bit register that is an ordinary parallel-load register in normal mode
// and a multiple-input signature register (MISR) in test mode. In the BIBS
// data paths it sits on each primary output and works as the signature
// analyser (SA) of the kernel in front of it. The MISR is a type-1 LFSR of
// degree W (stage 1 is the MSB q[W-1], stage k is q[W-k]) with every stage's
// input XOR-ed with one data bit:
//     stage 1 <- feedback ^ d[W-1],  stage k <- stage (k-1) ^ d[W-k],
//     feedback = stage W ^ (stage W-e for every x^e term of the polynomial).
// The document uses BILBO registers only by name; the mode set and encoding
// (bibs_pkg::bilbo_mode_e), the polynomial (bibs_pkg::prim_poly(W) unless POLY
// is given), the clear-to-zero reset mode and the clock enable used to hold a
// finished signature are this design's choices.
//
// Ports: mode selects NORMAL (q <= d), TEST (MISR), RESET (q <= 0) or SCAN
// (serial shift, scan_in enters stage 1, scan_out is stage W). en = 0 holds q.
// rst_n is an asynchronous active-low clear. q changes only on a rising clock.
module bilbo_reg
  import bibs_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter logic [63:0] POLY = 64'h0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  bilbo_mode_e  mode,
  input  logic [W-1:0] d,
  input  logic         scan_in,
  output logic [W-1:0] q,
  output logic         scan_out
);

  localparam logic [63:0] POLY_USED = (POLY != 64'h0) ? POLY : prim_poly(W);

  // taps as a mask over q: stage W is q[0], stage W-e is q[e]
  function automatic logic [W-1:0] tap_mask();
    logic [W-1:0] m = '0;
    m[0] = 1'b1;
    for (int e = 1; e < int'(W); e++) if (POLY_USED[e]) m[e] = 1'b1;
    return m;
  endfunction

  localparam logic [W-1:0] TAPS = tap_mask();

  initial assert (POLY_USED != 64'h0) else $error("bilbo_reg: no polynomial for width %0d", W);

  logic         fb;
  logic [W-1:0] misr_d;

  assign fb     = ^(q & TAPS);
  assign misr_d = {fb, q[W-1:1]} ^ d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (en) begin
      unique case (mode)
        BM_NORMAL: q <= d;
        BM_TEST:   q <= misr_d;
        BM_RESET:  q <= '0;
        BM_SCAN:   q <= {scan_in, q[W-1:1]};
      endcase
    end
  end

  assign scan_out = q[0];

endmodule
