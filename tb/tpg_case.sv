// tpg_case -- checks one bibs_tpg configuration (testbench helper).
//
// 1. The label map produced at elaboration is compared with the labels
//    written under the flip-flops of the matching TPG drawing (EXP_LAB,
//    string order), together with the string length and LFSR degree.
// 2. Normal mode: a random word loaded through d_in must appear on q.
// 3. Scan mode: a random bit stream must come out of scan_out NFF clocks later.
// 4. Test mode: from the seed, the generator runs 2^M - 1 clocks. For every
//    cone x the pattern seen by the cone's output block at time T is
//    { R_i(T - seq_at(SEQ, x, i)) } over the registers the cone uses. The number of
//    distinct such patterns must be 2^w (w < M) or 2^w - 1 (w = M), w being
//    the cone's input width: the functionally exhaustive property.
//    The whole string must return to its start state after exactly 2^M - 1
//    clocks (the period of a maximal-length LFSR of degree M).
module tpg_case
  import bibs_pkg::*;
#(
  parameter int unsigned NREG  = 3,
  parameter width_list_t REG_W = '{4, 4, 4, 0, 0, 0, 0, 0},
  parameter int unsigned NCONE = 1,
  parameter seq_table_t  SEQ   = tab1(row3(2, 1, 0)),
  parameter int          EXP_M   = 12,
  parameter int          EXP_NFF = 14,
  parameter int          EXP_LAB [32] = '{32{0}},
  parameter string       NAME  = "case"
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned TOTW = sum_w(NREG, REG_W);
  localparam int NFF = tpg_plan(NREG, REG_W, NCONE, SEQ, PLAN_NFF, 0, 0);
  localparam int M   = tpg_plan(NREG, REG_W, NCONE, SEQ, PLAN_M, 0, 0);

  logic              rst_n;
  bilbo_mode_e       mode;
  logic [TOTW-1:0]   d_in, q;
  logic              scan_in, scan_out;

  bibs_tpg #(.NREG(NREG), .REG_W(REG_W), .NCONE(NCONE), .SEQ(SEQ)) dut (.*);

  logic [TOTW-1:0] hist [0:7];          // hist[k] = q, k clocks ago
  bit              seen [MAX_CONES][1 << 16];

  function automatic int field(input logic [TOTW-1:0] v, input int i);
    int off = int'(sum_w(i, REG_W));
    int r = 0;
    for (int b = int'(REG_W[i]) - 1; b >= 0; b--) r = (r << 1) | int'(v[off + b]);
    return r;
  endfunction

  function automatic int cone_width(input int x);
    int w = 0;
    for (int i = 0; i < int'(NREG); i++) if (seq_at(SEQ, x, i) != NO_DEP) w += int'(REG_W[i]);
    return w;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: %s", NAME, what);
    end
  endtask

  initial begin
    logic [TOTW-1:0] word;
    logic [NFF-1:0]  start_s;
    logic [NFF-1:0]  bits;
    int period, pat, cnt, w;
    done = 0; checks = 0; failures = 0;
    rst_n = 0; mode = BM_NORMAL; d_in = '0; scan_in = 0;
    for (int k = 0; k < 8; k++) hist[k] = '0;
    // 1. label map against the drawing
    check(NFF == EXP_NFF, $sformatf("string length %0d, drawing has %0d", NFF, EXP_NFF));
    check(M == EXP_M, $sformatf("LFSR degree %0d, drawing has %0d", M, EXP_M));
    for (int f = 0; f < NFF && f < 32; f++)
      check(tpg_plan(NREG, REG_W, NCONE, SEQ, PLAN_LABEL, f, 0) == EXP_LAB[f],
            $sformatf("flip-flop %0d label %0d, drawing has %0d", f,
                      tpg_plan(NREG, REG_W, NCONE, SEQ, PLAN_LABEL, f, 0), EXP_LAB[f]));
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // 2. normal mode
    for (int n = 0; n < 4; n++) begin
      word = TOTW'({$urandom, $urandom});
      d_in = word; mode = BM_NORMAL;
      @(posedge clk); #1;
      check(q == word, "normal-mode load");
    end
    // 3. scan mode
    mode = BM_SCAN;
    for (int f = 0; f < NFF; f++) begin
      bits[f] = 1'($urandom);
      scan_in = bits[f];
      @(posedge clk); #1;
    end
    for (int f = 0; f < NFF; f++) begin
      check(scan_out == bits[f], "scan chain order");
      scan_in = 0;
      @(posedge clk); #1;
    end
    // 4. test mode from the seed
    mode = BM_RESET;
    @(posedge clk); #1;
    mode = BM_TEST;
    repeat (16) begin
      @(posedge clk); #1;
      for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = q;
    end
    start_s = dut.ff;
    period = 0;
    for (int t = 0; t < (1 << M) - 1; t++) begin
      for (int x = 0; x < int'(NCONE); x++) begin
        pat = 0;
        for (int i = 0; i < int'(NREG); i++)
          if (seq_at(SEQ, x, i) != NO_DEP) pat = (pat << REG_W[i]) | field(hist[seq_at(SEQ, x, i)], i);
        seen[x][pat] = 1'b1;
      end
      @(posedge clk); #1;
      for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = q;
      if (period == 0 && dut.ff == start_s) period = t + 1;
    end
    check(period == (1 << M) - 1, $sformatf("period %0d, expected %0d", period, (1 << M) - 1));
    for (int x = 0; x < int'(NCONE); x++) begin
      cnt = 0;
      w = cone_width(x);
      for (int p = 0; p < (1 << w); p++) if (seen[x][p]) cnt++;
      check(cnt == ((w == M) ? (1 << w) - 1 : (1 << w)),
            $sformatf("cone %0d: %0d distinct patterns of %0d bits", x, cnt, w));
    end
    $display("%s: M=%0d NFF=%0d checks=%0d failures=%0d", NAME, M, NFF, checks, failures);
    done = 1;
  end
endmodule
