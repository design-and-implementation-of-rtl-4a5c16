// tb_bist_controller: self-checking testbench of the BIST controller.
//
// The pattern generator and the analyzer are replaced by testbench signals:
// tpg_data is a free-running counter and ora_match is driven directly. Checks:
//   * functional mode passes ext_data to the circuit, test mode passes tpg_data;
//   * the generator is held in reset and the analyzer cleared while idle;
//   * a session releases the generator and enables the analyzer for exactly
//     256 consecutive clocks, then raises bist_done one compare clock later;
//   * bist_pass equals the match flag sampled in the compare clock;
//   * dropping test_mode aborts a session and clears the verdict.
module tb_bist_controller;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst_n, test_mode, ora_match;
  logic [7:0] ext_data, tpg_data, cut_in;
  logic       tpg_rst_n, ora_clear, ora_enable, bist_busy, bist_done, bist_pass;

  int checks   = 0;
  int failures = 0;

  always #5 clk = ~clk;

  bist_controller dut (.*);

  always_ff @(posedge clk) tpg_data <= tpg_data + 8'd3;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one session; return the number of clocks the generator was released
  // and the clocks from entering test mode to bist_done.
  task automatic session(input bit match_value, output int run_clocks, output int done_clocks);
    run_clocks  = 0;
    done_clocks = 0;
    test_mode   = 1'b1;
    ora_match   = ~match_value;
    #1;
    check(cut_in == tpg_data, "test mode selects the pattern generator");
    while (!bist_done && done_clocks < 400) begin
      @(posedge clk); #1;
      done_clocks++;
      if (tpg_rst_n) begin
        run_clocks++;
        check(ora_enable && !ora_clear, "analyzer enabled while generator runs");
        check(cut_in == tpg_data, "pattern routed to the circuit");
        // Present the final match value in the compare clock only.
        if (run_clocks == 256) ora_match = match_value;
      end else if (!bist_done) begin
        check(!ora_enable, "analyzer disabled outside the run");
      end
      if (bist_done) ora_match = ~match_value;
    end
  endtask

  initial begin : stimulus
    int run_clocks, done_clocks;
    tpg_data = '0;
    rst_n = 1'b0; test_mode = 1'b0; ora_match = 1'b0; ext_data = 8'h5A;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    // Functional mode.
    for (int i = 0; i < 20; i++) begin
      ext_data = 8'($urandom);
      @(posedge clk); #1;
      check(cut_in == ext_data, "functional mode passes external data");
      check(!tpg_rst_n && ora_clear && !bist_done && !bist_busy, "idle outputs");
    end
    // Passing session.
    session(1'b1, run_clocks, done_clocks);
    check(run_clocks == 256, $sformatf("generator released for %0d clocks, expected 256", run_clocks));
    check(done_clocks == 258, $sformatf("bist_done after %0d clocks, expected 258", done_clocks));
    check(bist_done && bist_pass, "passing session reports pass");
    repeat (10) @(posedge clk);
    #1;
    check(bist_done && bist_pass && !tpg_rst_n, "verdict held in DONE");
    test_mode = 1'b0;
    @(posedge clk); #1;
    check(!bist_done && !bist_pass && ora_clear, "leaving test mode returns to idle");
    // Failing session.
    session(1'b0, run_clocks, done_clocks);
    check(run_clocks == 256, "second session length");
    check(bist_done && !bist_pass, "failing session reports fail");
    test_mode = 1'b0;
    @(posedge clk); #1;
    // Aborted session.
    test_mode = 1'b1;
    repeat (100) @(posedge clk);
    #1;
    check(tpg_rst_n && bist_busy, "session running");
    test_mode = 1'b0;
    @(posedge clk); #1;
    check(!tpg_rst_n && !bist_busy && !bist_done && ora_clear, "abort returns to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
