// tb_bilbo_reg -- self-checking testbench of the BILBO register (8 bits).
// Checks normal load, the clear and hold behaviour, the scan shift order and
// 200 clocks of signature compression against an independent MISR model.
module tb_bilbo_reg;
  import bibs_pkg::*;
  import tb_model_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, en, scan_in, scan_out;
  bilbo_mode_e mode;
  logic [7:0]  d, q;
  int checks = 0, failures = 0;

  bilbo_reg #(.W(8)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    byte unsigned model, held;
    bit sb [8];
    rst_n = 0; en = 1; mode = BM_NORMAL; d = 0; scan_in = 0;
    repeat (2) @(posedge clk);
    #1 check(q == 0, "asynchronous clear");
    rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      d = 8'($urandom); mode = BM_NORMAL;
      @(posedge clk); #1 check(q == d, "normal load");
    end
    mode = BM_RESET; @(posedge clk); #1 check(q == 0, "reset mode");
    // signature compression
    model = 0; mode = BM_TEST;
    for (int n = 0; n < 200; n++) begin
      d = 8'($urandom);
      model = misr8(model, d);
      @(posedge clk); #1;
      check(q == model, $sformatf("MISR step %0d: %02h vs %02h", n, q, model));
    end
    // hold
    held = q; en = 0; d = 8'hA5;
    repeat (3) @(posedge clk);
    #1 check(q == held, "hold with en low");
    en = 1;
    // scan: first bit in comes out after 8 shifts
    mode = BM_SCAN;
    for (int k = 0; k < 8; k++) begin
      sb[k] = 1'($urandom); scan_in = sb[k];
      @(posedge clk); #1;
    end
    for (int k = 0; k < 8; k++) begin
      check(scan_out == sb[k], "scan order");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
