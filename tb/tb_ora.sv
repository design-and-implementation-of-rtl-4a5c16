// tb_ora: self-checking testbench of the MISR response analyzer.
//
// Random response streams are fed in with random enable gaps. The expected
// signature is computed here with the feedback written out bit by bit
// (d[7]^d[5]^d[4]^d[3] into bit 0, then XOR with the response). Checks: the
// signature after every clock, clear priority over enable, hold while disabled,
// and the match output against equal and different golden values.
module tb_ora;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst_n, clear, enable;
  logic [7:0] resp, golden, signature;
  logic       match;

  int checks   = 0;
  int failures = 0;

  always #5 clk = ~clk;

  ora dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (signature=%02h)", what, signature);
    end
  endtask

  function automatic logic [7:0] ref_step(input logic [7:0] s, input logic [7:0] r);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]} ^ r;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [7:0] model;
    rst_n = 1'b0; clear = 1'b0; enable = 1'b0; resp = '0; golden = '0;
    repeat (2) @(posedge clk);
    #1;
    check(signature == 8'h00, "reset value");
    rst_n = 1'b1;
    model = '0;
    for (int lap = 0; lap < 4; lap++) begin
      for (int i = 0; i < 300; i++) begin
        enable = ($urandom_range(0, 3) != 0);
        resp   = 8'($urandom);
        clear  = (i == 0);
        @(posedge clk); #1;
        if (clear)       model = '0;
        else if (enable) model = ref_step(model, resp);
        check(signature == model, $sformatf("signature lap %0d step %0d", lap, i));
      end
      enable = 1'b0;
      golden = model;
      #1;
      check(match == 1'b1, "match with the correct golden signature");
      golden = model ^ (8'h01 << $urandom_range(0, 7));
      #1;
      check(match == 1'b0, "no match with a one-bit-different golden signature");
    end
    // A single-bit error in one response changes the signature.
    clear = 1'b1; @(posedge clk); #1; clear = 1'b0;
    enable = 1'b1;
    for (int i = 0; i < 20; i++) begin resp = 8'(i * 7); @(posedge clk); #1; end
    golden = signature;
    clear = 1'b1; @(posedge clk); #1; clear = 1'b0;
    for (int i = 0; i < 20; i++) begin resp = 8'(i * 7) ^ ((i == 9) ? 8'h10 : 8'h00); @(posedge clk); #1; end
    enable = 1'b0;
    #1;
    check(match == 1'b0, "single response bit error detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
