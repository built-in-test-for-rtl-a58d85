// tb_bist_ctrl -- self-checking testbench of the test-session controller.
// With NPAT = 10 and FLUSH = 3 it follows a session clock by clock: one seed
// clock, 3 flush clocks (TPG stepping, signature register cleared), 10
// compression clocks, then DONE with the signature held while start stays
// high; busy/done and the session length of 1 + NPAT + FLUSH clocks are
// checked. Dropping start must return to idle, and a second session must
// behave like the first.
module tb_bist_ctrl;
  import bibs_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int NPAT = 10, FLUSH = 3;
  logic rst_n, start, sa_en, busy, done;
  bilbo_mode_e tpg_mode, sa_mode;
  int checks = 0, failures = 0;

  bist_ctrl #(.NPAT(NPAT), .FLUSH(FLUSH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic session();
    int len;
    start = 1; @(posedge clk); #1;
    check(busy && tpg_mode == BM_RESET && sa_mode == BM_RESET && sa_en, "seed clock");
    len = 1;
    for (int c = 0; c < NPAT + FLUSH; c++) begin
      @(posedge clk); #1;
      check(busy && !done && tpg_mode == BM_TEST && sa_en, $sformatf("run clock %0d", c));
      check(sa_mode == ((c < FLUSH) ? BM_RESET : BM_TEST), $sformatf("SA mode at run clock %0d", c));
      len++;
    end
    @(posedge clk); #1;
    check(done && !busy && !sa_en && tpg_mode == BM_NORMAL, "done state");
    check(len == 1 + NPAT + FLUSH, $sformatf("session length %0d", len));
    repeat (3) @(posedge clk);
    #1 check(done && !sa_en, "done holds");
    start = 0; @(posedge clk); #1;
    check(!done && !busy && sa_en && sa_mode == BM_NORMAL, "back to idle");
  endtask

  initial begin
    rst_n = 0; start = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(!busy && !done && tpg_mode == BM_NORMAL && sa_mode == BM_NORMAL && sa_en, "idle");
    session();
    session();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
