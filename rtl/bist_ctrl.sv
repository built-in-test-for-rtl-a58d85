// bist_ctrl -- test-session controller for one BIBS kernel.
//
// Raising start runs one self-test session:
//   SEED  (1 clock)          TPG loads its seed, the signature register clears
//   RUN   (NPAT + FLUSH)     TPG steps once per clock; the signature register
//                            stays cleared for the first FLUSH clocks, while
//                            the kernel pipeline fills with test patterns, and
//                            then compresses NPAT kernel responses
//   DONE                     TPG back to normal mode, signature held (sa_en=0)
//                            for as long as start stays high; dropping start
//                            returns to IDLE and normal operation
// So a session takes 1 + NPAT + FLUSH clocks; with NPAT = 2^M - 1 and FLUSH
// equal to the kernel's sequential depth d this is the 2^M - 1 + d test time
// the document gives for a functionally exhaustive test (plus the seed clock).
// The document only says that a test controller is synthesized; its states,
// the seed clock and the hold of the signature are this design's choices.
//
// Ports: start is a request level: it is sampled in IDLE and DONE only, so it
// may be held high through the session and is dropped after done has been
// seen. busy is high in SEED and RUN; done is high in DONE. tpg_mode / sa_mode / sa_en drive the BILBO
// registers. Outside a session both registers are in normal mode.
module bist_ctrl
  import bibs_pkg::*;
#(
  parameter int unsigned NPAT  = 7300,
  parameter int unsigned FLUSH = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output bilbo_mode_e tpg_mode,
  output bilbo_mode_e sa_mode,
  output logic        sa_en,
  output logic        busy,
  output logic        done
);
  typedef enum logic [1:0] {S_IDLE, S_SEED, S_RUN, S_DONE} state_e;

  localparam int unsigned RUN_LEN = NPAT + FLUSH;
  localparam int unsigned CW      = $clog2(RUN_LEN + 1);

  state_e        state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) state <= S_SEED;
        S_DONE: if (!start) state <= S_IDLE;
        S_SEED: begin
          state <= S_RUN;
          cnt   <= '0;
        end
        S_RUN: begin
          // the run counter never passes the session length
          assert (cnt < CW'(RUN_LEN));
          if (cnt == CW'(RUN_LEN - 1)) state <= S_DONE;
          cnt <= cnt + 1'b1;
        end
      endcase
    end
  end

  always_comb begin
    tpg_mode = BM_NORMAL;
    sa_mode  = BM_NORMAL;
    sa_en    = 1'b1;
    unique case (state)
      S_IDLE: ;
      S_SEED: begin
        tpg_mode = BM_RESET;
        sa_mode  = BM_RESET;
      end
      S_RUN: begin
        tpg_mode = BM_TEST;
        sa_mode  = (cnt < CW'(FLUSH)) ? BM_RESET : BM_TEST;
      end
      S_DONE: sa_en = 1'b0;
    endcase
  end

  assign busy = (state == S_SEED) || (state == S_RUN);
  assign done = (state == S_DONE);

endmodule
