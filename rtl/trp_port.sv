// trp_port: test-result port of one circuit under test.
//
// The capture register (CAP) takes the outputs of the circuit under test on
// each rising edge of the port's gated test clock (iut_clk). A WIDTH-bit
// shift register, clocked by TCLK while the port is selected, copies CAP
// whenever Strobe_out_TR is low and shifts one place towards bit 0 (zeros
// entering at the top) while it is high; bit 0 is the serial result output
// sout. The processor therefore reads CAP bit 0 first, in the cycle its
// first Strobe_out_TR is high.
//
// The capture/shift split follows the published port; loading the shift
// register whenever the strobe is low (instead of with a separate load
// signal) is this implementation's choice. The shift register is cleared
// by reset; CAP changes only on iut_clk.
module trp_port #(
  parameter int unsigned WIDTH = 5
) (
  input  logic             TCLK,
  input  logic             reset,
  input  logic             iut_clk,
  input  logic             sel,
  input  logic             Strobe_out_TR,
  input  logic [WIDTH-1:0] result,
  output logic             sout
);

  logic [WIDTH-1:0] cap, sreg;

  always_ff @(posedge iut_clk) cap <= result;

  always_ff @(posedge TCLK) begin
    if (reset)              sreg <= '0;
    else if (sel) begin
      if (Strobe_out_TR)    sreg <= {1'b0, sreg[WIDTH-1:1]};
      else                  sreg <= cap;
    end
  end

  assign sout = sreg[0];

endmodule
