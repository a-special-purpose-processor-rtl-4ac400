// iut_padder8: 8-bit two-stage pipelined adder, the second circuit under
// test on the prototype chip.
//
// Stage 1 adds the low nibbles with the carry input and registers the low
// sum, its carry and the high nibbles of both operands; stage 2 adds the
// high nibbles with the registered carry and registers the 8-bit sum and
// carry output. Both stages are clocked by the circuit's gated test clock,
// so a result leaves the adder two clock pulses after its operands were
// applied: with the apply register and capture register around it, one
// operand set needs two apply-and-capture operations (four pulses).
// Inputs come from a 17-bit application port (a = 7:0, b = 15:8,
// cin = 16); outputs go to a 9-bit result port (sum = 7:0, cout = 8).
// The two-stage split follows the published test circuit; the nibble
// boundary and bit order are this implementation's choices. No reset: the
// stages hold whatever the last pulses loaded.
module iut_padder8 (
  input  logic       clk,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] sum,
  output logic       cout
);

  logic [3:0] s1_sum, s1_a, s1_b;
  logic       s1_c;

  always_ff @(posedge clk) begin
    {s1_c, s1_sum} <= a[3:0] + b[3:0] + 5'(cin);
    s1_a           <= a[7:4];
    s1_b           <= b[7:4];
    {cout, sum}    <= {s1_a + s1_b + 5'(s1_c), s1_sum};
  end

endmodule
