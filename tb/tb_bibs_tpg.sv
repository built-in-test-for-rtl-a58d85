// tb_bibs_tpg -- self-checking testbench of the BIBS test pattern generator.
// Runs seven kernel configurations, each checked by tpg_case:
//   ex2  3 x 4-bit, one cone, sequential lengths 2,1,0   (14 flip-flops, M = 12)
//   ex3  3 x 4-bit, one cone, lengths 1,2,0 (shared cell) (14 flip-flops, M = 12)
//   ex4  2 x 4-bit, one cone, lengths 0,5: R2 displaced by -5, starting
//        before R1 (labels renumbered from 1)           (11 flip-flops, M = 8)
//   ex5  2 x 4-bit, two cones (2,0) and (1,0)            (10 flip-flops, M = 9)
//   ex6  2 x 4-bit, two cones (2,0) and (0,1)            (11 flip-flops, M = 11)
//   ex7b 3 x 4-bit, three cones, order R1 R2 R3          (16 flip-flops, M = 16)
//   ex7c the same kernel, register order R1 R3 R2        (12 flip-flops, M = 8)
// The expected labels are those printed under the flip-flops of the TPG
// drawings for these kernels. A watchdog ends the run after 400k clocks.
module tb_bibs_tpg;
  import bibs_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 7;
  logic done [N];
  int   chk  [N];
  int   fail [N];

  tpg_case #(.NREG(3), .REG_W('{4,4,4,0,0,0,0,0}), .NCONE(1),
    .SEQ(tab1(row3(2, 1, 0))),
    .EXP_M(12), .EXP_NFF(14),
    .EXP_LAB('{1,2,3,4,5,6,7,8,9,10,11,12,13,14,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0}), .NAME("ex2"))
    u_ex2 (.clk, .done(done[0]), .checks(chk[0]), .failures(fail[0]));

  tpg_case #(.NREG(3), .REG_W('{4,4,4,0,0,0,0,0}), .NCONE(1),
    .SEQ(tab1(row3(1, 2, 0))),
    .EXP_M(12), .EXP_NFF(14),
    .EXP_LAB('{1,2,3,4,4,5,6,7,8,9,10,11,12,13,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0}), .NAME("ex3"))
    u_ex3 (.clk, .done(done[1]), .checks(chk[1]), .failures(fail[1]));

  tpg_case #(.NREG(2), .REG_W('{4,4,0,0,0,0,0,0}), .NCONE(2),
    .SEQ(tab2(row2(2, 0), row2(1, 0))),
    .EXP_M(9), .EXP_NFF(10),
    .EXP_LAB('{1,2,3,4,5,6,7,8,9,10,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0}), .NAME("ex5"))
    u_ex5 (.clk, .done(done[2]), .checks(chk[2]), .failures(fail[2]));

  tpg_case #(.NREG(2), .REG_W('{4,4,0,0,0,0,0,0}), .NCONE(2),
    .SEQ(tab2(row2(2, 0), row2(0, 1))),
    .EXP_M(11), .EXP_NFF(11),
    .EXP_LAB('{1,2,3,4,5,6,7,8,9,10,11,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0}), .NAME("ex6"))
    u_ex6 (.clk, .done(done[3]), .checks(chk[3]), .failures(fail[3]));

  tpg_case #(.NREG(3), .REG_W('{4,4,4,0,0,0,0,0}), .NCONE(3),
    .SEQ(tab3(row2(2, 0), row3(0, -1, 1), row3(-1, 1, 0))),
    .EXP_M(16), .EXP_NFF(16),
    .EXP_LAB('{1,2,3,4,5,6,7,8,9,10,11,12,13,14,15,16,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0}), .NAME("ex7b"))
    u_ex7b (.clk, .done(done[4]), .checks(chk[4]), .failures(fail[4]));

  // register order R1, R3, R2: column i of SEQ is the i-th register of the string
  tpg_case #(.NREG(3), .REG_W('{4,4,4,0,0,0,0,0}), .NCONE(3),
    .SEQ(tab3(row3(2, -1, 0), row2(0, 1), row3(-1, 0, 1))),
    .EXP_M(8), .EXP_NFF(12),
    .EXP_LAB('{1,2,3,4,4,5,6,7,7,8,9,10,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0}), .NAME("ex7c"))
    u_ex7c (.clk, .done(done[5]), .checks(chk[5]), .failures(fail[5]));

  // R2 five stages further from the output than R1: its cells must sit 5
  // labels ahead of R1's, more than R1 is wide, so R2 starts below R1's first
  // label; after renumbering R2 = L1..L4 and R1 = L2..L5 (3 shared), M = 8
  tpg_case #(.NREG(2), .REG_W('{4,4,0,0,0,0,0,0}), .NCONE(1),
    .SEQ(tab1(row2(0, 5))),
    .EXP_M(8), .EXP_NFF(11),
    .EXP_LAB('{2,3,4,5,1,2,3,4,6,7,8,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0}), .NAME("ex4"))
    u_ex4 (.clk, .done(done[6]), .checks(chk[6]), .failures(fail[6]));

  int checks, failures;

  initial begin
    checks = 0; failures = 0;
    @(posedge clk);   // let every case clear its done flag first
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6]);
    for (int i = 0; i < N; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    for (int i = 0; i < N; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
