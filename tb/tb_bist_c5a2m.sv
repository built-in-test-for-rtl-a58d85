// tb_bist_c5a2m -- self-checking testbench of the self-testable c5a2m data
// path at its default size (NPAT = 7300).
//  1. normal mode: o = (a+b)*(c+d)+(e+f)*(g+h) of the inputs 4 clocks earlier
//  2. self test (start held until done): done exactly 1 + 7300 + 2 clocks after start, and the
//     signature equals an independent model (64-stage LFSR with
//     x^64+x^63+x^61+x^60+1 feeding the data-path function, 8-bit MISR);
//     a second session gives the same signature
//  3. normal operation resumes after the session
//  4. scan: a bit stream shifted in comes out 64 + 8 clocks later
module tb_bist_c5a2m;
  import bibs_pkg::*;
  import tb_model_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int NPAT = 7300, DEPTH = 2, LAT = 4, CHAIN = 64 + 8;
  logic rst_n, bist_start, bist_busy, bist_done, scan_en, scan_in, scan_out;
  logic [7:0] a, b, c, d, e, f, g, h, o;
  int checks = 0, failures = 0;
  int n_normal = 0, n_bist = 0, n_scan = 0;

  bist_c5a2m dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic byte unsigned model_signature();
    lfsr_t s = lfsr_seed();
    byte unsigned sig = 0;
    for (int n = 0; n < NPAT; n++) begin
      sig = misr8(sig, f_c5a2m(field8(s,0), field8(s,1), field8(s,2), field8(s,3),
                               field8(s,4), field8(s,5), field8(s,6), field8(s,7)));
      s = lfsr_step(s, 64, 64, 63, 61, 60);
    end
    return sig;
  endfunction

  task automatic normal_run(input int cycles);
    byte unsigned q [$];
    for (int n = 0; n < cycles; n++) begin
      {a, b, c, d} = $urandom; {e, f, g, h} = $urandom;
      q.push_back(f_c5a2m(a, b, c, d, e, f, g, h));
      @(posedge clk); #1;
      if (n >= LAT - 1) begin
        check(o == q[0], $sformatf("normal mode o=%02h expected %02h", o, q[0]));
        void'(q.pop_front());
        n_normal++;
      end
    end
  endtask

  task automatic bist_run(input byte unsigned expect_sig);
    int len = 0;
    bist_start = 1; @(posedge clk); #1 len = 1;
    while (!bist_done) begin @(posedge clk); #1 len++; end
    check(len == 1 + NPAT + DEPTH + 1, $sformatf("session length %0d clocks", len - 1));
    check(o == expect_sig, $sformatf("signature %02h expected %02h", o, expect_sig));
    bist_start = 0; @(posedge clk); #1;
    check(!bist_done && !bist_busy, "back to normal operation");
    n_bist++;
  endtask

  initial begin
    byte unsigned sig;
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
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
