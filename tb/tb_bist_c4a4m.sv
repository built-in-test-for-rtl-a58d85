// tb_bist_c4a4m -- self-checking testbench of the self-testable c4a4m data
// path at its default size (NPAT = 19120).
//  1. normal mode: o = a*(f+g)+e*(b+c), p = d*(b+c)+h*(f+g) of the inputs 4 clocks
//     earlier
//  2. self test (start held until done): done exactly 1 + 19120 + 2 clocks after start, and both
//     signatures equal an independent model (labels 1..56: a 48-stage LFSR
//     with x^48+x^47+x^21+x^20+1 and 8 plain shift stages; registers d and e
//     share labels 25..32 since they feed different cones; two 8-bit MISRs);
//     a second session gives the same signature
//  3. normal operation resumes after the session
//  4. scan: a bit stream shifted in comes out 64 + 16 clocks later
module tb_bist_c4a4m;
  import bibs_pkg::*;
  import tb_model_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int NPAT = 19120, DEPTH = 2, LAT = 4, CHAIN = 64 + 16;
  logic rst_n, bist_start, bist_busy, bist_done, scan_en, scan_in, scan_out;
  logic [7:0] a, b, c, d, e, f, g, h, o, p;
  int checks = 0, failures = 0;
  int n_normal = 0, n_bist = 0, n_scan = 0;

  bist_c4a4m dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] model_signature();
    lfsr_t s = lfsr_seed();
    byte unsigned so = 0, sp = 0;
    for (int n = 0; n < NPAT; n++) begin
      // d and e share labels 25..32 (they feed different cones)
      so = misr8(so, f_c4a4m_o(field8(s,0), field8(s,1), field8(s,2), field8(s,3),
                               field8(s,4), field8(s,5)));
      sp = misr8(sp, f_c4a4m_p(field8(s,1), field8(s,2), field8(s,3), field8(s,4),
                               field8(s,5), field8(s,6)));
      s = lfsr_step(s, 56, 48, 47, 21, 20);
    end
    return {so, sp};
  endfunction

  task automatic normal_run(input int cycles);
    byte unsigned q [$];
    byte unsigned qp [$];
    for (int n = 0; n < cycles; n++) begin
      {a, b, c, d} = $urandom; {e, f, g, h} = $urandom;
      q.push_back(f_c4a4m_o(a, b, c, e, f, g));
      qp.push_back(f_c4a4m_p(b, c, d, f, g, h));
      @(posedge clk); #1;
      if (n >= LAT - 1) begin
        check(o == q[0], $sformatf("normal mode o=%02h expected %02h", o, q[0]));
        check(p == qp[0], $sformatf("normal mode p=%02h expected %02h", p, qp[0]));
        void'(q.pop_front());
        void'(qp.pop_front());
        n_normal++;
      end
    end
  endtask

  task automatic bist_run(input logic [15:0] expect_sig);
    int len = 0;
    bist_start = 1; @(posedge clk); #1 len = 1;
    while (!bist_done) begin @(posedge clk); #1 len++; end
    check(len == 1 + NPAT + DEPTH + 1, $sformatf("session length %0d clocks", len - 1));
    check({o, p} == expect_sig, $sformatf("signatures %02h %02h expected %04h", o, p, expect_sig));
    bist_start = 0; @(posedge clk); #1;
    check(!bist_done && !bist_busy, "back to normal operation");
    n_bist++;
  endtask

  initial begin
    logic [15:0] sig;
    bit sb [CHAIN];
    rst_n = 0; bist_start = 0; scan_en = 0; scan_in = 0;
    {a, b, c, d, e, f, g, h} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    normal_run(100);
    sig = model_signature();
    bist_run(sig);
    bist_run(sig);
    normal_run(50);
    scan_en = 1;
    for (int k = 0; k < CHAIN; k++) begin sb[k] = 1'($urandom); scan_in = sb[k]; @(posedge clk); #1; end
    for (int k = 0; k < CHAIN; k++) begin
      check(scan_out == sb[k], "scan chain");
      scan_in = 0; @(posedge clk); #1;
    end
    n_scan++;
    scan_en = 0;
    $display("normal-mode checks %0d, self-test sessions %0d, scan passes %0d", n_normal, n_bist, n_scan);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
