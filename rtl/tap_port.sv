// tap_port: test-application port of one circuit under test.
//
// A WIDTH-bit shift register takes the serial test data: while the port is
// selected and Strobe_in_TData is high, each TCLK edge shifts it one place
// towards bit 0, with Test_Data_in entering at the most significant bit,
// so after WIDTH strobes the first bit sent is in bit 0. The bit leaving
// bit 0 is the serial output (sout), looped back to the processor. The
// application register (APP) copies the shift register on each rising edge
// of the port's gated test clock (iut_clk, a pulse of the apply-and-capture
// clock) and drives the inputs of the circuit under test, so the vector
// being shifted in never disturbs the one being applied.
//
// Shift direction and the shift/apply split follow the published port; the
// loop-back output at bit 0 is this implementation's choice. The shift
// register is cleared by reset; APP changes only on iut_clk.
module tap_port #(
  parameter int unsigned WIDTH = 9
) (
  input  logic             TCLK,
  input  logic             reset,
  input  logic             iut_clk,
  input  logic             sel,
  input  logic             Strobe_in_TData,
  input  logic             Test_Data_in,
  output logic             sout,
  output logic [WIDTH-1:0] app
);

  logic [WIDTH-1:0] sreg;

  always_ff @(posedge TCLK) begin
    if (reset)                       sreg <= '0;
    else if (sel && Strobe_in_TData) sreg <= {Test_Data_in, sreg[WIDTH-1:1]};
  end

  always_ff @(posedge iut_clk) app <= sreg;

  assign sout = sreg[0];

endmodule
