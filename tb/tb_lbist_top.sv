// tb_lbist_top: end-to-end test of the logic BIST at its default sizes.
//
// A behavioural circuit under test (cut_model) closes the loop between cut_in
// and cut_out. The testbench computes, on its own, the 256-pattern sequence of
// the all-states LFSR (x^8+x^6+x^5+x^4+1, zero inserted after 8'h80), the
// circuit's responses and the MISR signature, and uses that as the golden
// signature. It then:
//   1. checks functional mode (external data reaches the circuit);
//   2. runs a session on the fault-free circuit: every applied pattern is
//      compared with the reference, all 256 states must appear, bist_done
//      must rise 258 clocks after test mode starts, and the verdict must be pass;
//   3. runs sessions with stuck-at faults on response bits: each must fail;
//   4. aborts a session half way by leaving test mode, then runs a clean one.
// Each mechanism (functional/test mode switch, forced exit from state 0,
// all-states sequence, pass verdict, fail verdict, abort) is counted, and a
// mechanism that never happened counts as a failure.
module tb_lbist_top;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst_n, test_mode;
  logic [7:0] ext_data, golden_sig, cut_in, cut_out, tpg_pattern, signature;
  logic       bist_busy, bist_done, bist_pass;
  logic       fault_en, fault_val;
  logic [2:0] fault_bit;

  int checks   = 0;
  int failures = 0;
  int n_mode_switch = 0, n_zero_exit = 0, n_full_cycle = 0;
  int n_pass = 0, n_fail = 0, n_abort = 0;

  always #50 clk = ~clk;   // 100 ns clock

  lbist_top dut (.*);
  cut_model u_cut (.a(cut_in), .fault_en(fault_en), .fault_bit(fault_bit),
                   .fault_val(fault_val), .y(cut_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [7:0] ref_lfsr(input logic [7:0] d);
    if (d == 8'h80) return 8'h00;
    if (d == 8'h00) return 8'h01;
    return {d[6:0], d[7] ^ d[5] ^ d[4] ^ d[3]};
  endfunction

  function automatic logic [7:0] ref_cut(input logic [7:0] a);
    logic [4:0] sum;
    logic [7:0] y;
    sum    = {1'b0, a[7:4]} + {1'b0, a[3:0]};
    y[7:4] = sum[4:1] ^ {3'b000, a[7] & a[0]};
    y[3:0] = (a[7:4] ^ a[3:0]) | {a[6] & a[5], a[2] & a[1], 2'b00};
    return y;
  endfunction

  function automatic logic [7:0] ref_misr(input logic [7:0] s, input logic [7:0] r);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]} ^ r;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one full session; returns the verdict.
  task automatic session(input string name, input bit check_patterns, output bit pass);
    bit [255:0] seen;
    logic [7:0] expect_pat, prev;
    int         clocks, applied;
    seen = '0;
    expect_pat = 8'h00;
    clocks = 0;
    applied = 0;
    prev = 8'h00;
    test_mode = 1'b1;
    n_mode_switch++;
    @(posedge clk); #1;   // controller enters RUN
    clocks++;
    while (!bist_done && clocks < 400) begin
      if (bist_busy && dut.u_ctrl.ora_enable) begin
        if (check_patterns)
          check(cut_in == expect_pat, $sformatf("%s: pattern %0d is %02h, expected %02h",
                                                name, applied, cut_in, expect_pat));
        if (applied > 0 && prev == 8'h00 && cut_in == 8'h01) n_zero_exit++;
        seen[cut_in] = 1'b1;
        prev = cut_in;
        expect_pat = ref_lfsr(expect_pat);
        applied++;
      end
      @(posedge clk); #1;
      clocks++;
    end
    check(applied == 256, $sformatf("%s: %0d patterns applied, expected 256", name, applied));
    check(clocks == 258, $sformatf("%s: bist_done after %0d clocks, expected 258", name, clocks));
    if (&seen) n_full_cycle++;
    if (check_patterns) check(&seen, $sformatf("%s: all 256 states applied", name));
    pass = bist_pass;
    if (pass) n_pass++; else n_fail++;
    $display("%s: signature %02h golden %02h -> %s", name, signature, golden_sig,
             pass ? "PASS" : "FAIL");
    test_mode = 1'b0;
    n_mode_switch++;
    @(posedge clk); #1;
    check(!bist_done && !bist_pass, $sformatf("%s: verdict cleared in functional mode", name));
  endtask

  initial begin : stimulus
    logic [7:0] pat, sig;
    bit         pass;

    rst_n = 1'b0; test_mode = 1'b0; ext_data = '0; golden_sig = '0;
    fault_en = 1'b0; fault_bit = '0; fault_val = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;

    // Golden signature from the reference models.
    pat = 8'h00;
    sig = 8'h00;
    for (int i = 0; i < 256; i++) begin
      sig = ref_misr(sig, ref_cut(pat));
      pat = ref_lfsr(pat);
    end
    golden_sig = sig;
    $display("golden signature %02h", golden_sig);

    // 1. Functional mode.
    for (int i = 0; i < 16; i++) begin
      ext_data = 8'($urandom);
      @(posedge clk); #1;
      check(cut_in == ext_data, "functional mode: external data reaches the circuit");
      check(cut_out == ref_cut(ext_data), "functional mode: circuit model response");
      check(!bist_busy && !bist_done && tpg_pattern == 8'h00, "functional mode: BIST idle");
    end

    // 2. Fault-free session.
    session("fault-free", 1'b1, pass);
    check(pass, "fault-free circuit passes");

    // 3. Stuck-at faults on several response bits.
    for (int b = 0; b < 8; b += 3) begin
      for (int v = 0; v < 2; v++) begin
        fault_en = 1'b1; fault_bit = 3'(b); fault_val = 1'(v);
        session($sformatf("stuck-at-%0d on bit %0d", v, b), 1'b0, pass);
        check(!pass, $sformatf("stuck-at-%0d on response bit %0d detected", v, b));
      end
    end
    fault_en = 1'b0;

    // 4. Abort half way, then a clean session.
    test_mode = 1'b1;
    n_mode_switch++;
    repeat (120) @(posedge clk);
    #1;
    check(bist_busy && tpg_pattern != 8'h00, "session running before abort");
    test_mode = 1'b0;
    n_mode_switch++;
    repeat (2) @(posedge clk);
    #1;
    check(!bist_busy && tpg_pattern == 8'h00 && signature == 8'h00, "abort resets generator and analyzer");
    n_abort++;
    session("after abort", 1'b1, pass);
    check(pass, "clean session after an abort passes");

    // Every mechanism must have happened.
    $display("mode switches %0d, zero-state exits %0d, full 256-state cycles %0d, passes %0d, fails %0d, aborts %0d",
             n_mode_switch, n_zero_exit, n_full_cycle, n_pass, n_fail, n_abort);
    check(n_mode_switch > 0, "mode switch happened");
    check(n_zero_exit > 0, "forced exit from state 0 happened");
    check(n_full_cycle > 0, "a full 256-state cycle was applied");
    check(n_pass > 0, "a pass verdict happened");
    check(n_fail > 0, "a fail verdict happened");
    check(n_abort > 0, "an abort happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
