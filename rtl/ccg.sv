// ccg: controlled clock generator.
//
// A 16-bit control register receives the clock control word serially from
// the processor: while Strobe_in_CLK_CR is high, each TCLK edge shifts it
// one place left with CLK_CW_in entering at bit 0, so the word arrives most
// significant bit first. The register drives the digitally controlled
// oscillator (dco_model, a behavioural model of the analog oscillator),
// whose output is the high-frequency clock HFCLK used for at-speed tests
// and measured by the frequency-measurement circuit. Reset clears the
// register. Register width and serial loading follow the published
// generator; the bit order is this implementation's choice (it matches the
// processor's rotating CW register).
module ccg (
  input  logic        TCLK,
  input  logic        reset,
  input  logic        Strobe_in_CLK_CR,
  input  logic        CLK_CW_in,
  output logic [15:0] cw,
  output logic        HFCLK
);

  always_ff @(posedge TCLK) begin
    if (reset)                 cw <= '0;
    else if (Strobe_in_CLK_CR) cw <= {cw[14:0], CLK_CW_in};
  end

  dco_model u_dco (.cw, .HFCLK);

endmodule
