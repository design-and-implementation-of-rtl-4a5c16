// lbist_top: logic built-in self-test around an all-states 8-bit LFSR.
//
// The test pattern generator is fib_mod, a Fibonacci LFSR extended to walk all
// 256 states. The bist_controller routes either the generator's patterns (test
// mode) or the externally applied data (functional mode) to the circuit under
// test, and in test mode runs one session of 256 patterns. The ora absorbs the
// circuit's responses into a MISR signature and compares it with the golden
// signature; the controller latches the verdict.
//
// The circuit under test is outside this module: cut_in drives it and its
// response returns on cut_out within the same clock period (a combinational
// circuit is assumed). The golden signature is an input, to be computed from
// a fault-free model of the circuit.
//
// Timing: raise test_mode and keep it high. One clock later the session
// starts; patterns 0, 1, ... appear on cut_in, one per clock, for 256 clocks;
// bist_done rises 258 clocks after test_mode was first sampled high, with
// bist_pass valid. Lower test_mode to return to functional mode (this also
// aborts a running session). rst_n is a synchronous active-low reset.
//
// From the design: the LFSR and its use as the on-chip pattern source, the
// selection between generated and external data, and a response analyzer that
// compares a signature with a golden one. Own choices: the session sequencing,
// the MISR compactor and the golden value as a port.
module lbist_top
  import lbist_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              test_mode,
  input  logic [LFSR_W-1:0] ext_data,
  input  logic [SIG_W-1:0]  golden_sig,
  output logic [LFSR_W-1:0] cut_in,
  input  logic [SIG_W-1:0]  cut_out,
  output logic [LFSR_W-1:0] tpg_pattern,
  output logic [SIG_W-1:0]  signature,
  output logic              bist_busy,
  output logic              bist_done,
  output logic              bist_pass
);

  logic tpg_rst_n;
  logic ora_clear, ora_enable, ora_match;

  fib_mod u_tpg (
    .clk   (clk),
    .rst_n (tpg_rst_n),
    .data  (tpg_pattern)
  );

  bist_controller u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .test_mode  (test_mode),
    .ext_data   (ext_data),
    .tpg_data   (tpg_pattern),
    .ora_match  (ora_match),
    .tpg_rst_n  (tpg_rst_n),
    .cut_in     (cut_in),
    .ora_clear  (ora_clear),
    .ora_enable (ora_enable),
    .bist_busy  (bist_busy),
    .bist_done  (bist_done),
    .bist_pass  (bist_pass)
  );

  ora u_ora (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (ora_clear),
    .enable    (ora_enable),
    .resp      (cut_out),
    .golden    (golden_sig),
    .signature (signature),
    .match     (ora_match)
  );

endmodule
