// dp_c3a2m -- kernel of the c3a2m data path: o = ((a+b)*c + d)*e + f.
//
// Three adders and two multipliers in a chain, one register after each
// operator, with delay registers on c, d, e and f so that every operand meets
// the chain at the right time (1, 2, 3 and 4 delay registers, as drawn in the
// document). Every input reaches the final adder through four internal
// registers: a balanced kernel of sequential depth 4. The final adder is
// combinational and feeds the output register outside this module. 8-bit
// words; products keep their 8 low bits and sums drop their carry.
// Internal registers clear asynchronously on rst_n (this design's choice).
//
// Timing: o depends on the inputs of four clocks earlier.
module dp_c3a2m #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a, b, c, d, e, f,
  output logic [W-1:0] o
);
  logic [W-1:0] s1, p1, s2, p2;           // chain registers
  logic [W-1:0] c1;                       // c delayed once
  logic [W-1:0] d1, d2;                   // d delayed twice
  logic [W-1:0] e1, e2, e3;               // e delayed three times
  logic [W-1:0] f1, f2, f3, f4;           // f delayed four times

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s1, p1, s2, p2} <= '0;
      c1 <= '0;
      {d1, d2} <= '0;
      {e1, e2, e3} <= '0;
      {f1, f2, f3, f4} <= '0;
    end else begin
      s1 <= a + b;
      c1 <= c;
      p1 <= W'(s1 * c1);
      s2 <= p1 + d2;
      p2 <= W'(s2 * e3);
      {d2, d1}         <= {d1, d};
      {e3, e2, e1}     <= {e2, e1, e};
      {f4, f3, f2, f1} <= {f3, f2, f1, f};
    end
  end

  assign o = p2 + f4;
endmodule
