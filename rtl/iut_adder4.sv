// iut_adder4: 4-bit ripple-carry adder, the first circuit under test on the
// prototype chip.
//
// Purely combinational: {cout, sum} = a + b + cin, built from four full
// adders so that the carry ripples through all four bit positions, which
// is the path an at-speed test exercises. Its inputs come from a 9-bit
// test-application port (a = bits 3:0, b = bits 7:4, cin = bit 8) and its
// five outputs go to a 5-bit test-result port (sum = bits 3:0, cout =
// bit 4). The function follows the published test circuit; the port bit
// order is this implementation's choice.
module iut_adder4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout
);

  logic [4:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < 4; i++) begin : g_fa
    assign sum[i] = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout = c[4];

endmodule
