// fib_mod: state-based Fibonacci LFSR that visits all 2^WIDTH states.
//
// A classical Fibonacci LFSR never enters the all-zero state (it would lock
// there), so it gives only 2^WIDTH - 1 patterns. This register adds the zero
// state back with two comparisons placed in front of the ordinary XOR feedback:
//   * in the state that precedes zero (PRE_ZERO, the state whose classical
//     successor is 1), the next state is forced to 0;
//   * in state 0 the next state is forced to 1, so the register never locks up;
//   * in every other state the register shifts one place towards the MSB and
//     the XOR of the tapped bits enters bit 0.
// The resulting sequence 0, 1, ..., PRE_ZERO, 0, ... has period 2^WIDTH.
// PRE_ZERO is found at elaboration time by running the classical LFSR.
//
// Interface: clk, rst_n (synchronous, active low), data (the current state,
// i.e. the test pattern). While rst_n is low the register is held at state 0;
// the first rising edge with rst_n high moves it to state 1, after which it
// advances once per clock. There is no separate enable: a controller holds the
// generator idle by keeping rst_n low.
//
// From the design: 8-bit width, Fibonacci structure, synchronous active-low
// reset to state 0, the two forced transitions and their priority (the
// pre-zero check first, then the zero check, then the polynomial).
// Own choices: the polynomial x^8+x^6+x^5+x^4+1 (TAPS = 8'hB8) and the shift
// direction (towards the MSB, feedback into bit 0).
module fib_mod #(
  parameter int unsigned         WIDTH = lbist_pkg::LFSR_W,
  parameter logic [WIDTH-1:0]    TAPS  = lbist_pkg::DEFAULT_TAPS
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] data
);

  // Classical Fibonacci step.
  function automatic logic [WIDTH-1:0] classic_step(input logic [WIDTH-1:0] s);
    return {s[WIDTH-2:0], ^(s & TAPS)};
  endfunction

  // State whose classical successor is 1.
  function automatic logic [WIDTH-1:0] find_pre_zero();
    logic [WIDTH-1:0] found;
    found = '0;
    for (longint unsigned s = 1; s < (longint'(1) << WIDTH); s++) begin
      if (classic_step(WIDTH'(s)) == WIDTH'(1)) found = WIDTH'(s);
    end
    return found;
  endfunction

  localparam logic [WIDTH-1:0] PRE_ZERO = find_pre_zero();
  localparam logic [WIDTH-1:0] ONE      = WIDTH'(1);

  logic [WIDTH-1:0] data_next;

  always_comb begin
    if (data == PRE_ZERO)  data_next = '0;
    else if (data == '0)   data_next = ONE;
    else                   data_next = classic_step(data);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) data <= '0;
    else        data <= data_next;
  end

endmodule
