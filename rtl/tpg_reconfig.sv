// tpg_reconfig -- reconfigurable test pattern generator for a two-cone kernel.
//
// The kernel has two 4-bit input registers R1, R2 and two output cones:
// cone 1 sees R1 through two register stages and R2 directly; cone 2 sees R1
// directly and R2 through one register stage. One TPG covering both cones
// needs an 11-stage LFSR (about 2^11 clocks); testing the cones in two
// sessions with an 8-stage LFSR each takes about 2 x 2^8 clocks. This TPG
// does the latter. The string of flip-flops is
//     R1,1..R1,4  X1 X2  R2,1..R2,4  T
// and the control input cone_sel (the document's Omega1/Omega2 line) selects:
//   cone_sel = 0 (test cone 1): R2,1 is fed by X2, so R2 sits two stages
//     behind R1. LFSR stages L1..L8 = R1,1..R1,4 X1 X2 R2,1 R2,2; R2,3, R2,4
//     and T are shift-register stages.
//   cone_sel = 1 (test cone 2): R2,1 is fed by R1,3, so it shares the signal
//     L4 with R1,4 (R2 one stage ahead). LFSR stages L1..L8 =
//     R1,1..R1,4 R2,2 R2,3 R2,4 T; X1, X2 keep shifting but are not used.
// Both configurations use x^8+x^6+x^5+x+1 (taps L2, L3, L7, L8); the taps on
// R1 are common and a multiplexer picks the two configuration-specific ones,
// as in the document's drawing. The register placement and the two
// multiplexers follow the document; the polynomial, mode set and seed are
// this design's choices.
//
// Ports: as bibs_tpg. d_in / q: R1 in [3:0] and R2 in [7:4], cell R_(i,1) is
// the MSB of its field. mode NORMAL loads d_in into R1 and R2 (X1, X2, T
// hold), TEST steps the generator, RESET loads the seed (L1 = 1), SCAN
// shifts the 11-flip-flop string from scan_in to scan_out. rst_n is an
// asynchronous active-low seed load. Changes take effect on the rising edge.
module tpg_reconfig
  import bibs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bilbo_mode_e mode,
  input  logic        cone_sel,
  input  logic [7:0]  d_in,
  input  logic        scan_in,
  output logic [7:0]  q,
  output logic        scan_out
);
  logic [1:4] r1, r2;
  logic [1:2] x;
  logic       t;
  logic       fb, r2_in;

  // L2, L3 (on R1) are common; L7, L8 depend on the configuration
  assign fb    = r1[2] ^ r1[3] ^ (cone_sel ? (r2[4] ^ t) : (r2[1] ^ r2[2]));
  assign r2_in = cone_sel ? r1[3] : x[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= 4'b1000;
      {x, r2, t} <= '0;
    end else begin
      unique case (mode)
        BM_NORMAL: begin
          r1 <= d_in[3:0];
          r2 <= d_in[7:4];
        end
        BM_TEST: begin
          r1 <= {fb, r1[1:3]};
          x  <= {r1[4], x[1]};
          r2 <= {r2_in, r2[1:3]};
          t  <= r2[4];
        end
        BM_RESET: begin
          r1 <= 4'b1000;
          {x, r2, t} <= '0;
        end
        BM_SCAN: {r1, x, r2, t} <= {scan_in, r1, x, r2};
      endcase
    end
  end

  assign q        = {r2, r1};
  assign scan_out = t;
endmodule
