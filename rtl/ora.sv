// ora: output response analyzer of the logic BIST.
//
// The responses of the circuit under test are compacted into a signature by a
// multiple-input signature register (MISR): each enabled clock the signature
// shifts one place towards the MSB with the XOR of its tapped bits entering
// bit 0, and the whole response word is XORed in. The signature is compared
// combinationally with the golden signature (the signature of a fault-free
// circuit, supplied from outside), giving `match`.
//
// Interface and timing: `clear` (synchronous, has priority over `enable`)
// loads the all-zero start value; while `enable` is high the response present
// on `resp` is absorbed at the rising clock edge. `signature` and `match`
// reflect the register after the edge.
//
// From the design: the analyzer condenses the responses into a signature and
// compares it with a golden signature. Own choices: a MISR as the compactor,
// its width (equal to the response width, 8 bits), its polynomial
// x^8+x^6+x^5+x^4+1, the zero start value and the golden value as an input.
module ora #(
  parameter int unsigned      W    = lbist_pkg::SIG_W,
  parameter logic [W-1:0]     TAPS = lbist_pkg::DEFAULT_MISR_TAPS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         enable,
  input  logic [W-1:0] resp,
  input  logic [W-1:0] golden,
  output logic [W-1:0] signature,
  output logic         match
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) signature <= '0;
    else if (enable)     signature <= {signature[W-2:0], ^(signature & TAPS)} ^ resp;
  end

  assign match = (signature == golden);

endmodule
