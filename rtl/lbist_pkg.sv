// lbist_pkg: shared constants, types and LFSR helper functions of the logic BIST.
//
// The pattern generator is an 8-bit Fibonacci LFSR that is extended to walk all
// 2^8 = 256 states (the width comes from the design; the feedback polynomial is
// this implementation's choice, x^8 + x^6 + x^5 + x^4 + 1, a primitive polynomial,
// because no particular one is prescribed). The register shifts towards the MSB
// and the feedback bit enters at bit 0; bit i of a tap mask is the register bit
// that feeds the XOR network, so x^8+x^6+x^5+x^4+1 is mask 8'b1011_1000.
package lbist_pkg;

  // Width of the test pattern generator and of the circuit-under-test input.
  localparam int unsigned LFSR_W = 8;

  // Default feedback taps: x^8 + x^6 + x^5 + x^4 + 1.
  localparam logic [LFSR_W-1:0] DEFAULT_TAPS = 8'hB8;

  // Width of the circuit-under-test response and of the signature register.
  localparam int unsigned SIG_W = 8;

  // Default MISR taps: the same primitive polynomial.
  localparam logic [SIG_W-1:0] DEFAULT_MISR_TAPS = 8'hB8;

  // One BIST session applies every state of the pattern generator once.
  localparam int unsigned NUM_PATTERNS = 2 ** LFSR_W;

  // States of the BIST controller.
  typedef enum logic [1:0] {
    BIST_IDLE    = 2'd0,  // functional mode or waiting for test mode
    BIST_RUN     = 2'd1,  // patterns applied, responses compacted
    BIST_COMPARE = 2'd2,  // signature compared with the golden one
    BIST_DONE    = 2'd3   // verdict held until test mode is left
  } bist_state_t;

endpackage
