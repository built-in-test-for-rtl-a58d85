// tb_dp_c5a2m -- self-checking testbench of the c5a2m kernel.
// Random operands every clock; the output must equal
// (a+b)*(c+d) + (e+f)*(g+h) (8-bit arithmetic) of the operands applied
// exactly two clocks earlier (the output is combinational after two
// pipeline registers), checked every clock.
module tb_dp_c5a2m;
  import tb_model_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [7:0] a, b, c, d, e, f, g, h, o;
  int checks = 0, failures = 0;
  byte unsigned exp_q [$];

  dp_c5a2m dut (.*);

  initial begin
    rst_n = 0;
    {a, b, c, d, e, f, g, h} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      {a, b, c, d} = $urandom;
      {e, f, g, h} = $urandom;
      if (n % 50 == 0) {a, b, c, d, e, f, g, h} = {8{8'hFF}};
      exp_q.push_back(f_c5a2m(a, b, c, d, e, f, g, h));
      @(posedge clk); #1;
      if (n >= 1) begin
        checks++;
        if (o !== exp_q[0]) begin
          failures++;
          $display("FAIL cycle %0d: o=%02h expected %02h", n, o, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
