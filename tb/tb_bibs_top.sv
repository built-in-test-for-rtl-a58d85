// tb_bibs_top -- end-to-end self-checking testbench of bibs_top at its
// default parameters (full pattern counts 7300 / 9240 / 19120).
// Sequence:
//  1. all three data paths in normal operation together, outputs compared
//     with the arithmetic models at their latencies (4 / 6 / 4 clocks)
//  2. all three self-test sessions started together; each must end exactly
//     1 + NPAT + depth + 1 clocks after its start and leave the signature of
//     an independent LFSR/MISR model on its outputs
//  3. the starts are dropped and normal operation must resume
//  4. the c5a2m, c3a2m and c4a4m scan chains are shifted end to end
//  5. the Example 2 generator (ex_) is seeded and stepped: its cone sees
//     {R1 two clocks earlier, R2 one clock earlier, R3 now}, which must take
//     all 4095 non-zero values
//  6. the reconfigurable generator (rc_) runs with cone_sel 0, then 1, then 0;
//     each cone view must take all 255 non-zero values
// Each mechanism (normal check, session, resume, scan pass, generator test,
// cone switch) is counted, and one that never happened counts as a failure.
// A watchdog ends the run if it hangs.
module tb_bibs_top;
  import bibs_pkg::*;
  import tb_model_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n;
  logic [7:0]  c5_a, c5_b, c5_c, c5_d, c5_e, c5_f, c5_g, c5_h, c5_o;
  logic        c5_bist_start, c5_bist_busy, c5_bist_done, c5_scan_en, c5_scan_in, c5_scan_out;
  logic [7:0]  c3_a, c3_b, c3_c, c3_d, c3_e, c3_f, c3_o;
  logic        c3_bist_start, c3_bist_busy, c3_bist_done, c3_scan_en, c3_scan_in, c3_scan_out;
  logic [7:0]  c4_a, c4_b, c4_c, c4_d, c4_e, c4_f, c4_g, c4_h, c4_o, c4_p;
  logic        c4_bist_start, c4_bist_busy, c4_bist_done, c4_scan_en, c4_scan_in, c4_scan_out;
  bilbo_mode_e ex_mode, rc_mode;
  logic [11:0] ex_d_in, ex_q;
  logic        ex_scan_in, ex_scan_out;
  logic        rc_cone_sel, rc_scan_in, rc_scan_out;
  logic [7:0]  rc_d_in, rc_q;

  int checks = 0, failures = 0;
  int n_normal = 0, n_bist = 0, n_resume = 0, n_scan = 0, n_ex = 0, n_cone = 0;

  bibs_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic byte unsigned sig_c5(input int npat);
    lfsr_t s = lfsr_seed();
    byte unsigned sig = 0;
    for (int n = 0; n < npat; n++) begin
      sig = misr8(sig, f_c5a2m(field8(s,0), field8(s,1), field8(s,2), field8(s,3),
                               field8(s,4), field8(s,5), field8(s,6), field8(s,7)));
      s = lfsr_step(s, 64, 64, 63, 61, 60);
    end
    return sig;
  endfunction

  function automatic byte unsigned sig_c3(input int npat);
    lfsr_t s = lfsr_seed();
    byte unsigned sig = 0;
    for (int n = 0; n < npat; n++) begin
      sig = misr8(sig, f_c3a2m(field8(s,0), field8(s,1), field8(s,2), field8(s,3),
                               field8(s,4), field8(s,5)));
      s = lfsr_step(s, 48, 48, 47, 21, 20);
    end
    return sig;
  endfunction

  function automatic logic [15:0] sig_c4(input int npat);
    lfsr_t s = lfsr_seed();
    byte unsigned so = 0, sp = 0;
    for (int n = 0; n < npat; n++) begin
      so = misr8(so, f_c4a4m_o(field8(s,0), field8(s,1), field8(s,2), field8(s,3),
                               field8(s,4), field8(s,5)));
      sp = misr8(sp, f_c4a4m_p(field8(s,1), field8(s,2), field8(s,3), field8(s,4),
                               field8(s,5), field8(s,6)));
      s = lfsr_step(s, 56, 48, 47, 21, 20);
    end
    return {so, sp};
  endfunction

  task automatic normal_run(input int cycles);
    byte unsigned q5 [$], q3 [$], q4o [$], q4p [$];
    for (int n = 0; n < cycles; n++) begin
      {c5_a, c5_b, c5_c, c5_d} = $urandom; {c5_e, c5_f, c5_g, c5_h} = $urandom;
      {c3_a, c3_b, c3_c, c3_d} = $urandom; {c3_e, c3_f} = 16'($urandom);
      {c4_a, c4_b, c4_c, c4_d} = $urandom; {c4_e, c4_f, c4_g, c4_h} = $urandom;
      q5.push_back(f_c5a2m(c5_a, c5_b, c5_c, c5_d, c5_e, c5_f, c5_g, c5_h));
      q3.push_back(f_c3a2m(c3_a, c3_b, c3_c, c3_d, c3_e, c3_f));
      q4o.push_back(f_c4a4m_o(c4_a, c4_b, c4_c, c4_e, c4_f, c4_g));
      q4p.push_back(f_c4a4m_p(c4_b, c4_c, c4_d, c4_f, c4_g, c4_h));
      @(posedge clk); #1;
      if (n >= 3) begin
        check(c5_o == q5.pop_front(), "c5a2m normal output");
        check(c4_o == q4o.pop_front(), "c4a4m normal output o");
        check(c4_p == q4p.pop_front(), "c4a4m normal output p");
        n_normal++;
      end
      if (n >= 5) check(c3_o == q3.pop_front(), "c3a2m normal output");
    end
  endtask

  task automatic sessions();
    byte unsigned e5, e3;
    logic [15:0] e4;
    int len5 = 0, len3 = 0, len4 = 0, clk_n = 0;
    e5 = sig_c5(7300); e3 = sig_c3(9240); e4 = sig_c4(19120);
    c5_bist_start = 1; c3_bist_start = 1; c4_bist_start = 1;
    while (!(c5_bist_done && c3_bist_done && c4_bist_done) && clk_n < 30000) begin
      @(posedge clk); #1 clk_n++;
      if (c5_bist_done && len5 == 0) len5 = clk_n;
      if (c3_bist_done && len3 == 0) len3 = clk_n;
      if (c4_bist_done && len4 == 0) len4 = clk_n;
    end
    check(len5 == 1 + 7300 + 2 + 1, $sformatf("c5a2m session length %0d", len5));
    check(len3 == 1 + 9240 + 4 + 1, $sformatf("c3a2m session length %0d", len3));
    check(len4 == 1 + 19120 + 2 + 1, $sformatf("c4a4m session length %0d", len4));
    check(c5_o == e5, $sformatf("c5a2m signature %02h expected %02h", c5_o, e5));
    check(c3_o == e3, $sformatf("c3a2m signature %02h expected %02h", c3_o, e3));
    check({c4_o, c4_p} == e4, $sformatf("c4a4m signatures %02h %02h expected %04h", c4_o, c4_p, e4));
    if (c5_bist_done && c3_bist_done && c4_bist_done) n_bist += 3;
    c5_bist_start = 0; c3_bist_start = 0; c4_bist_start = 0;
    @(posedge clk); #1;
    check(!c5_bist_done && !c3_bist_done && !c4_bist_done, "sessions released");
  endtask

  task automatic scan_pass();
    bit s5 [72], s3 [56], s4 [80];
    c5_scan_en = 1; c3_scan_en = 1; c4_scan_en = 1;
    for (int k = 0; k < 80; k++) begin
      s5[k % 72] = 1'($urandom); s3[k % 56] = 1'($urandom); s4[k] = 1'($urandom);
      c5_scan_in = s5[k % 72]; c3_scan_in = s3[k % 56]; c4_scan_in = s4[k];
      @(posedge clk); #1;
    end
    c5_scan_in = 0; c3_scan_in = 0; c4_scan_in = 0;
    // the last 72 / 56 / 80 bits shifted in leave in order
    for (int k = 0; k < 80; k++) begin
      if (k < 72) check(c5_scan_out == s5[(80 + k) % 72], "c5a2m scan chain");
      if (k < 56) check(c3_scan_out == s3[(80 + k) % 56], "c3a2m scan chain");
      check(c4_scan_out == s4[k], "c4a4m scan chain");
      @(posedge clk); #1;
    end
    c5_scan_en = 0; c3_scan_en = 0; c4_scan_en = 0;
    n_scan++;
  endtask

  task automatic ex_test();
    logic [11:0] hist [0:4100];
    bit seen [4096];
    int distinct = 0;
    logic [11:0] pat;
    ex_mode = BM_RESET; @(posedge clk); #1;
    ex_mode = BM_TEST;
    for (int n = 0; n <= 4100; n++) begin hist[n] = ex_q; @(posedge clk); #1; end
    ex_mode = BM_NORMAL;
    for (int n = 2; n < 2 + 4095; n++) begin
      pat = {hist[n][11:8], hist[n-1][7:4], hist[n-2][3:0]};
      if (!seen[pat]) distinct++;
      seen[pat] = 1;
    end
    check(distinct == 4095 && !seen[0], $sformatf("Example 2 generator: %0d cone patterns", distinct));
    n_ex++;
  endtask

  task automatic rc_test(input bit sel);
    logic [7:0] hist [0:260];
    bit seen [256];
    int distinct = 0;
    logic [7:0] pat;
    if (rc_cone_sel != sel) n_cone++;
    rc_cone_sel = sel;
    rc_mode = BM_RESET; @(posedge clk); #1;
    rc_mode = BM_TEST;
    for (int n = 0; n <= 260; n++) begin hist[n] = rc_q; @(posedge clk); #1; end
    rc_mode = BM_NORMAL;
    for (int n = 2; n < 2 + 255; n++) begin
      pat = sel ? {hist[n-1][7:4], hist[n][3:0]} : {hist[n][7:4], hist[n-2][3:0]};
      if (!seen[pat]) distinct++;
      seen[pat] = 1;
    end
    check(distinct == 255 && !seen[0],
          $sformatf("reconfigurable generator cone_sel=%0d: %0d patterns", sel, distinct));
  endtask

  initial begin
    rst_n = 0;
    c5_bist_start = 0; c3_bist_start = 0; c4_bist_start = 0;
    c5_scan_en = 0; c3_scan_en = 0; c4_scan_en = 0;
    c5_scan_in = 0; c3_scan_in = 0; c4_scan_in = 0;
    ex_mode = BM_NORMAL; ex_d_in = 0; ex_scan_in = 0;
    rc_mode = BM_NORMAL; rc_cone_sel = 0; rc_d_in = 0; rc_scan_in = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    normal_run(60);
    sessions();
    begin
      int n0 = n_normal;
      normal_run(30);
      if (n_normal > n0) n_resume++;
    end
    scan_pass();
    ex_test();
    rc_test(0);
    rc_test(1);
    rc_test(0);
    check(n_normal > 0, "mechanism: normal operation");
    check(n_bist == 3, "mechanism: three self-test sessions");
    check(n_resume > 0, "mechanism: normal operation after a session");
    check(n_scan > 0, "mechanism: scan");
    check(n_ex > 0, "mechanism: Example 2 generator");
    check(n_cone >= 2, "mechanism: cone switch");
    $display("normal checks %0d, sessions %0d, resumes %0d, scan passes %0d, generator runs %0d, cone switches %0d",
             n_normal, n_bist, n_resume, n_scan, n_ex, n_cone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
