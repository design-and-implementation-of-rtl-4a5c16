// tb_fib_mod: self-checking testbench of the state-based Fibonacci LFSR.
//
// The reference model is written out here bit by bit for x^8+x^6+x^5+x^4+1
// (feedback = d[7]^d[5]^d[4]^d[3], shifted in at bit 0). The state before zero
// is 8'h80, since the only state that shifts into 8'h01 has d[6:0] = 0 and a
// feedback of 1. The test checks:
//   * state 0 is held while rst_n is low, and the first edge after release
//     gives state 1 (one clock of synchronisation);
//   * every transition against the reference;
//   * that 256 distinct states appear and state 0 returns after exactly 256
//     clocks (at a 100 ns clock: pattern start at t0 and repeat at t0+25.6 us);
//   * that a reset in the middle of the sequence returns to 0 and holds it;
//   * a 4-bit instance (x^4+x^3+1) also walks all 16 states.
module tb_fib_mod;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [7:0] data;
  logic [3:0] data4;

  int checks   = 0;
  int failures = 0;

  always #50 clk = ~clk;   // 100 ns period

  fib_mod dut (.clk(clk), .rst_n(rst_n), .data(data));
  fib_mod #(.WIDTH(4), .TAPS(4'b1100)) dut4 (.clk(clk), .rst_n(rst_n), .data(data4));

  function automatic logic [7:0] ref_next(input logic [7:0] d);
    if (d == 8'h80) return 8'h00;
    if (d == 8'h00) return 8'h01;
    return {d[6:0], d[7] ^ d[5] ^ d[4] ^ d[3]};
  endfunction

  function automatic logic [3:0] ref_next4(input logic [3:0] d);
    if (d == 4'h8) return 4'h0;
    if (d == 4'h0) return 4'h1;
    return {d[2:0], d[3] ^ d[2]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (data=%02h data4=%01h)", what, data, data4);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    bit [255:0] seen;
    bit [15:0]  seen4;
    logic [7:0] prev;
    logic [3:0] prev4;
    int         period;
    realtime    t_start, t_repeat;

    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    #1;
    check(data == 8'h00, "state 0 while reset is low");
    check(data4 == 4'h0, "4-bit: state 0 while reset is low");

    // Release reset between edges; the first edge gives state 1.
    rst_n = 1'b1;
    t_start = $realtime;
    @(posedge clk); #1;
    check(data == 8'h01, "state 1 one clock after reset release");

    // Walk the sequence from state 1 until state 0 comes back.
    seen = '0;
    seen[0] = 1'b1;
    seen[1] = 1'b1;
    period = 1;
    prev = data;
    while (period < 300) begin
      @(posedge clk); #1;
      period++;
      check(data == ref_next(prev), $sformatf("transition %02h -> %02h", prev, data));
      if (data == 8'h00) break;
      check(!seen[data], $sformatf("state %02h repeated early", data));
      seen[data] = 1'b1;
      prev = data;
    end
    t_repeat = $realtime;
    check(period == 256, $sformatf("period is %0d, expected 256", period));
    check(&seen, "all 256 states visited");
    check(prev == 8'h80, "state before 0 is 8'h80");
    $display("pattern cycle of %0d states, repeat after %0t ns", period,
             (t_repeat - t_start));
    check(t_repeat - t_start > 25500 && t_repeat - t_start < 25700,
          "repeat time 25.6 us at a 100 ns clock");

    // Second lap: next state must be 1 again.
    @(posedge clk); #1;
    check(data == 8'h01, "state 1 follows state 0 on the second lap");

    // Reset in the middle of the sequence.
    repeat (37) @(posedge clk);
    #1;
    rst_n = 1'b0;
    @(posedge clk); #1;
    check(data == 8'h00, "mid-sequence reset gives state 0");
    repeat (3) @(posedge clk);
    #1;
    check(data == 8'h00, "state 0 held while reset stays low");
    rst_n = 1'b1;

    // 4-bit instance: restart both and walk 16 states.
    rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    seen4 = '0;
    prev4 = data4;
    for (int i = 0; i < 16; i++) begin
      @(posedge clk); #1;
      check(data4 == ref_next4(prev4), $sformatf("4-bit transition %01h -> %01h", prev4, data4));
      check(!seen4[data4], "4-bit state repeated early");
      seen4[data4] = 1'b1;
      prev4 = data4;
    end
    check(&seen4, "4-bit: all 16 states visited");
    check(data4 == 4'h0, "4-bit: back at 0 after 16 clocks");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
