// bist_controller: sequencing and input selection of the logic BIST.
//
// In functional mode (test_mode low) the circuit under test receives the
// externally applied data `ext_data`. When test_mode goes high the circuit
// receives the pattern generator's output instead, and the controller runs
// one test session:
//   IDLE    - pattern generator held at state 0 (tpg_rst_n low), signature
//             register cleared;
//   RUN     - NUM_PATTERNS clocks: the generator is released and steps once
//             per clock while the analyzer absorbs one response per clock.
//             With NUM_PATTERNS = 2^8 the patterns are exactly the 256 states
//             0, 1, ..., of the all-states LFSR;
//   COMPARE - generator stopped; the analyzer's match flag is latched;
//   DONE    - bist_done high, bist_pass holds the verdict, until test_mode
//             falls, which returns to IDLE (also an abort from any state).
//
// Timing: test_mode sampled high at edge k puts the controller in RUN after
// edge k; patterns are applied in the following NUM_PATTERNS clock periods;
// bist_done rises NUM_PATTERNS + 1 clocks after entering RUN.
// cut_in is a combinational select, so a combinational circuit under test is
// assumed: its response to the pattern of a clock period is absorbed at the
// end of that period.
//
// From the design: the test-mode / external-data selection and a controller
// that applies generated patterns and lets the analyzer judge the result.
// Own choices: the state machine, one session per rise of test_mode, a
// session length of one full LFSR cycle, and holding the generator in its
// synchronous reset while idle.
module bist_controller
  import lbist_pkg::*;
#(
  parameter int unsigned W        = LFSR_W,
  parameter int unsigned PATTERNS = NUM_PATTERNS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test_mode,
  input  logic [W-1:0] ext_data,
  input  logic [W-1:0] tpg_data,
  input  logic         ora_match,
  output logic         tpg_rst_n,
  output logic [W-1:0] cut_in,
  output logic         ora_clear,
  output logic         ora_enable,
  output logic         bist_busy,
  output logic         bist_done,
  output logic         bist_pass
);

  localparam int unsigned CW = $clog2(PATTERNS + 1);

  bist_state_t   state, state_next;
  logic [CW-1:0] count;
  logic          pass_q;

  always_comb begin
    state_next = state;
    if (!test_mode) begin
      state_next = BIST_IDLE;
    end else begin
      unique case (state)
        BIST_IDLE:    state_next = BIST_RUN;
        BIST_RUN:     if (count == CW'(PATTERNS - 1)) state_next = BIST_COMPARE;
        BIST_COMPARE: state_next = BIST_DONE;
        BIST_DONE:    state_next = BIST_DONE;
        default:      state_next = BIST_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= BIST_IDLE;
      count  <= '0;
      pass_q <= 1'b0;
    end else begin
      state <= state_next;
      count <= (state == BIST_RUN) ? count + 1'b1 : '0;
      if (state == BIST_COMPARE) pass_q <= ora_match;
      else if (state == BIST_IDLE) pass_q <= 1'b0;
    end
  end

  assign tpg_rst_n  = rst_n && (state == BIST_RUN);
  assign ora_clear  = (state == BIST_IDLE);
  assign ora_enable = (state == BIST_RUN);
  assign bist_busy  = (state == BIST_RUN) || (state == BIST_COMPARE);
  assign bist_done  = (state == BIST_DONE);
  assign bist_pass  = bist_done && pass_q;
  assign cut_in     = test_mode ? tpg_data : ext_data;

  // A session never runs longer than its pattern count.
  a_run_length: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state == BIST_RUN) |-> (count < CW'(PATTERNS)));
  // Leaving test mode always ends the session.
  a_leave_test: assert property (@(posedge clk) disable iff (!rst_n)
                                 !test_mode |=> (state == BIST_IDLE));

endmodule
