// port_select: the chip's port-select chain.
//
// One flip-flop per test port, connected as a shift register. While
// Strobe_in_PMask is high, each TCLK edge shifts the chain by one position:
// the new bit PS_Mask_Data_in enters port 0 and every bit moves to the
// next higher port; the bit leaving the last port is PS_Mask_Data_out,
// which the processor collects in its selection-mask register. A port whose
// bit is 1 is selected: its shift register takes part in test-data or
// test-result shifting and its circuit under test receives clock pulses.
//
// The processor fills the chain by shifting a window of CR+1 bits in which
// only the bit with CR equal to the wanted port number is 1, so after a
// full window exactly that port is selected; a second, shorter window keeps
// the previous selection and adds another port. The chain and its
// strobe follow the published design; NUM_PORTS = 10 is the port count of
// the prototype chip. Reset clears the selection.
module port_select #(
  parameter int unsigned NUM_PORTS = 10
) (
  input  logic                 TCLK,
  input  logic                 reset,
  input  logic                 Strobe_in_PMask,
  input  logic                 PS_Mask_Data_in,
  output logic                 PS_Mask_Data_out,
  output logic [NUM_PORTS-1:0] sel
);

  always_ff @(posedge TCLK) begin
    if (reset)                sel <= '0;
    else if (Strobe_in_PMask) sel <= {sel[NUM_PORTS-2:0], PS_Mask_Data_in};
  end

  assign PS_Mask_Data_out = sel[NUM_PORTS-1];

endmodule
