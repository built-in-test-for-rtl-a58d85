// dp_c4a4m -- kernel of the c4a4m data path, two outputs:
//     o = a*(f+g) + e*(b+c),   p = d*(b+c) + h*(f+g).
//
// Two adders form b+c and f+g, which are registered and shared by the four
// multipliers; a, d, e and h pass through one delay register each so that
// they meet the sums. The four products are registered, and the two output
// adders are combinational and feed the two output registers outside this
// module. Every input reaches an output adder through two internal registers:
// a balanced kernel of sequential depth 2 with two output cones (o uses
// a,b,c,e,f,g; p uses b,c,d,f,g,h). 8-bit words; products keep their 8 low
// bits and sums drop their carry. Internal registers clear asynchronously on
// rst_n (this design's choice).
//
// Timing: o and p depend on the inputs of two clocks earlier.
module dp_c4a4m #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a, b, c, d, e, f, g, h,
  output logic [W-1:0] o,
  output logic [W-1:0] p
);
  logic [W-1:0] s_bc, s_fg;               // shared sums, registered
  logic [W-1:0] a1, d1, e1, h1;           // delayed operands
  logic [W-1:0] p_af, p_ebc, p_dbc, p_hf; // products, registered

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s_bc, s_fg} <= '0;
      {a1, d1, e1, h1} <= '0;
      {p_af, p_ebc, p_dbc, p_hf} <= '0;
    end else begin
      s_bc  <= b + c;
      s_fg  <= f + g;
      a1    <= a;
      d1    <= d;
      e1    <= e;
      h1    <= h;
      p_af  <= W'(a1 * s_fg);
      p_ebc <= W'(e1 * s_bc);
      p_dbc <= W'(d1 * s_bc);
      p_hf  <= W'(h1 * s_fg);
    end
  end

  assign o = p_af + p_ebc;
  assign p = p_dbc + p_hf;
endmodule
