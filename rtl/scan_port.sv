// scan_port: scan-chain access port for a circuit under test with an
// internal scan chain.
//
// Two flip-flops clocked by the tester clock sit at the two ends of the
// circuit's scan chain: an application flip-flop whose output feeds the
// chain's first scan input (scan_in), and a result flip-flop that takes the
// chain's last output (scan_out) and drives the serial result line (sout).
// Both are enabled by scan_en, which is high while the port is selected and
// either the test-data strobe or the result strobe is active. scan_en is
// also given to the circuit, whose scan flip-flops shift on the same TCLK
// edges. So with the port selected, each strobed TCLK edge moves the whole
// path Test_Data_in -> application FF -> scan chain -> result FF -> sout one
// place: test data is shifted in, results are shifted out, or both at once.
// Between scans the chain is clocked by the apply-and-capture pulses like
// the circuit's other registers.
//
// Interface: sel, Strobe_in_TData, Strobe_out_TR and Test_Data_in are
// sampled on the rising TCLK edge; scan_en is combinational from them.
// The enabled flip-flop pair and the OR of the two strobes into the scan
// enable follow the published scan port; reset clearing both flip-flops is
// this implementation's choice.
module scan_port (
  input  logic TCLK,
  input  logic reset,
  input  logic sel,
  input  logic Strobe_in_TData,
  input  logic Strobe_out_TR,
  input  logic Test_Data_in,
  input  logic scan_out,
  output logic scan_in,
  output logic scan_en,
  output logic sout
);

  assign scan_en = sel && (Strobe_in_TData || Strobe_out_TR);

  always_ff @(posedge TCLK) begin
    if (reset) begin
      scan_in <= 1'b0;
      sout    <= 1'b0;
    end else if (scan_en) begin
      scan_in <= Test_Data_in;
      sout    <= scan_out;
    end
  end

endmodule
