// csaac: clock select and apply-and-capture pulse generator.
//
// Selects the test clock Sel_CLK: the slow tester clock TCLK, or the
// on-chip high-frequency clock HFCLK when CLK_Sel is high. The processor's
// apply-and-capture request AaC (a level on the TCLK side) passes through a
// three-flip-flop synchroniser clocked by Sel_CLK, and two more
// flip-flops delay it further; their combination gives an enable exactly
// two Sel_CLK cycles long starting at the synchronised rising edge. A
// flip-flop on the falling edge of Sel_CLK retimes the enable (En_S) so that
// the gated clock CLK_Out = Sel_CLK & En_S has no partial pulses. Each AaC
// request thus produces exactly two full-speed clock pulses on CLK_Out,
// three Sel_CLK cycles after AaC rises: the first applies a vector, the
// second captures the response of the circuit under test at the speed of
// the selected clock.
//
// The synchroniser, the two-pulse rule and the falling-edge enable follow
// the published circuit. The clock multiplexer is a plain two-input
// multiplexer: CLK_Sel must only change while no AaC is in progress.
module csaac (
  input  logic TCLK,
  input  logic HFCLK,
  input  logic reset,
  input  logic CLK_Sel,
  input  logic AaC,
  output logic Sel_CLK,
  output logic CLK_Out
);

  logic s1, s2, s3, d4, d5, pulse, En_S;

  assign Sel_CLK = CLK_Sel ? HFCLK : TCLK;

  always_ff @(posedge Sel_CLK) begin
    if (reset) begin
      {s1, s2, s3, d4, d5} <= '0;
    end else begin
      s1 <= AaC;
      s2 <= s1;
      s3 <= s2;
      d4 <= s3;
      d5 <= d4;
    end
  end

  assign pulse = s3 & ~d5;

  always_ff @(negedge Sel_CLK) begin
    if (reset) En_S <= 1'b0;
    else       En_S <= pulse;
  end

  assign CLK_Out = Sel_CLK & En_S;

endmodule
