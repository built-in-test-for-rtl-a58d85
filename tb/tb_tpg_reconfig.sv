// tb_tpg_reconfig -- self-checking testbench of the two-configuration test
// pattern generator.
// For each value of cone_sel it checks, after a seed load:
//   - the seed value and a period of exactly 255 clocks of the 8 outputs
//     once the seed has propagated through the string
//     (every q(t+255) equals q(t), and the pattern counts below rule out a
//     shorter cycle);
//   - cone_sel = 0: the pairs {R1 two clocks earlier, R2 now} take all 255
//     non-zero values (R2 two stages behind R1, as the first cone sees them);
//   - cone_sel = 1: the pairs {R1 now, R2 one clock earlier} take all 255
//     non-zero values (as the second cone sees them).
// It also checks the normal load and the 11-flip-flop scan path.
// A watchdog ends the run if it hangs.
module tb_tpg_reconfig;
  import bibs_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, cone_sel, scan_in, scan_out;
  bilbo_mode_e mode;
  logic [7:0]  d_in, q;
  int checks = 0, failures = 0;

  tpg_reconfig dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_cone(input bit sel);
    logic [7:0] hist [0:600];
    bit seen [256];
    int distinct = 0;
    logic [7:0] pat;
    cone_sel = sel;
    mode = BM_RESET; @(posedge clk); #1;
    check(q == 8'h08, $sformatf("seed %02h", q));
    mode = BM_TEST;
    for (int n = 0; n <= 600; n++) begin
      hist[n] = q;
      @(posedge clk); #1;
    end
    for (int n = 16; n + 255 <= 600; n++)  // after the seed has filled the string
      if (hist[n + 255] != hist[n]) begin
        check(0, $sformatf("cone_sel=%0d period at %0d", sel, n)); break;
      end
    checks++;
    foreach (seen[i]) seen[i] = 0;
    for (int n = 2; n < 2 + 255; n++) begin
      pat = sel ? {hist[n-1][7:4], hist[n][3:0]} : {hist[n][7:4], hist[n-2][3:0]};
      if (!seen[pat]) distinct++;
      seen[pat] = 1;
    end
    check(distinct == 255 && !seen[0],
          $sformatf("cone_sel=%0d distinct cone patterns %0d", sel, distinct));
  endtask

  initial begin
    logic [10:0] sv;
    bit out [11];
    rst_n = 0; mode = BM_NORMAL; cone_sel = 0; d_in = 0; scan_in = 0;
    @(posedge clk); #1 check(q == 8'h08, "asynchronous seed");
    rst_n = 1;
    for (int n = 0; n < 10; n++) begin
      d_in = 8'($urandom); mode = BM_NORMAL;
      @(posedge clk); #1 check(q == d_in, "normal load");
    end
    run_cone(0);
    run_cone(1);
    run_cone(0);
    // scan: 11 bits in, the first one appears at scan_out after 11 clocks
    sv = 11'($urandom);
    mode = BM_SCAN;
    for (int n = 0; n < 22; n++) begin
      scan_in = (n < 11) ? sv[n] : 1'b0;
      @(posedge clk); #1;
      if (n >= 10) check(scan_out == sv[n-10], $sformatf("scan bit %0d", n - 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
