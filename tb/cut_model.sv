// cut_model: behavioural stand-in for a circuit under test (testbench only).
//
// A small combinational circuit: the high byte of the response is the upper four
// bits of the sum of the two input nibbles (XOR a[7]&a[0]), the low nibble their XOR masked by an
// AND term. `fault_en` injects a stuck-at fault on response bit `fault_bit`
// with value `fault_val`, so a test can show that the BIST catches it.
module cut_model (
  input  logic [7:0] a,
  input  logic       fault_en,
  input  logic [2:0] fault_bit,
  input  logic       fault_val,
  output logic [7:0] y
);
  logic [7:0] good;
  logic [4:0] sum;
  always_comb begin
    sum       = 5'(a[7:4]) + 5'(a[3:0]);
    good[7:4] = sum[4:1] ^ {3'b000, a[7] & a[0]};
    good[3:0] = (a[7:4] ^ a[3:0]) | {a[6] & a[5], a[2] & a[1], 2'b00};
    y = good;
    if (fault_en) y[fault_bit] = fault_val;
  end
endmodule
