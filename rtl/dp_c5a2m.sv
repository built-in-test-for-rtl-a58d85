// dp_c5a2m -- kernel of the c5a2m data path: o = (a+b)*(c+d) + (e+f)*(g+h).
//
// Five adders and two multipliers on 8-bit words, pipelined as in the
// document's drawing: the four first-level sums are registered, the two
// products are registered, and the final sum is combinational and feeds the
// output register, which lives outside this module (in a BIBS design it is a
// BILBO signature register, as are the input registers feeding a..h).
// Every path from an input to the output crosses two internal registers, so
// the kernel is balanced with sequential depth 2. Only the 8 low bits of each
// product are used, as the document states; the adders keep 8 bits and drop
// their carry (the document: "These data paths are all 8 bits wide").
// Internal registers clear asynchronously on rst_n (this design's choice).
//
// Timing: o depends on the inputs of two clocks earlier.
module dp_c5a2m #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a, b, c, d, e, f, g, h,
  output logic [W-1:0] o
);
  logic [W-1:0] s_ab, s_cd, s_ef, s_gh;   // first-level sums, registered
  logic [W-1:0] p_l, p_r;                 // products, registered

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s_ab, s_cd, s_ef, s_gh} <= '0;
      {p_l, p_r}               <= '0;
    end else begin
      s_ab <= a + b;
      s_cd <= c + d;
      s_ef <= e + f;
      s_gh <= g + h;
      p_l  <= W'(s_ab * s_cd);
      p_r  <= W'(s_ef * s_gh);
    end
  end

  assign o = p_l + p_r;
endmodule
