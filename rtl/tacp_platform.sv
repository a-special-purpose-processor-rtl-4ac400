// tacp_platform: the complete test system: the TACP processor (FPGA side)
// connected to the prototype test chip.
//
// The processor's clock is also the chip's tester clock TCLK. The host
// talks to the processor over the UART pins rx/tx; everything else is the
// serial test interface between the two, wired one to one. The two
// sequential circuits under test are not part of this design, so their
// signals are brought out as ports. CLOCK_DIVIDE sets the UART bit rate:
// clk / (4 * baud), default 217 (57600 baud at 50 MHz).
module tacp_platform #(
  parameter int unsigned CLOCK_DIVIDE = 217
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        rx,
  output logic        tx,
  output logic [3:0]  status,
  output logic        iut2_clk,
  output logic [17:0] iut2_in,
  input  logic [18:0] iut2_out,
  output logic        iut2_scan_in,
  output logic        iut2_scan_en,
  input  logic        iut2_scan_out,
  output logic        iut3_clk,
  output logic [17:0] iut3_in,
  input  logic [18:0] iut3_out,
  output logic        iut3_scan_in,
  output logic        iut3_scan_en,
  input  logic        iut3_scan_out
);

  logic PS_Mask_Data_in, Strobe_in_PMask, PS_Mask_Data_out;
  logic Test_Data_in, Strobe_in_TData, Test_Data_out;
  logic Strobe_out_TR, TResult_out, AaC, CLK_Sel;
  logic CLK_CW_in, Strobe_in_CLK_CR, HFCLK_Meas_Req, HFCLK_Meas_ACK;
  logic Strobe_out_CLK_FR, CLK_FR_out;

  tacp #(.CLOCK_DIVIDE(CLOCK_DIVIDE)) u_tacp (
    .clk, .reset, .rx, .tx, .status,
    .PS_Mask_Data_out, .Test_Data_out, .TResult_out, .CLK_FR_out, .HFCLK_Meas_ACK,
    .PS_Mask_Data_in, .Strobe_in_PMask, .Test_Data_in, .Strobe_in_TData, .Strobe_out_TR,
    .AaC, .CLK_CW_in, .Strobe_in_CLK_CR, .Strobe_out_CLK_FR, .HFCLK_Meas_Req, .CLK_Sel
  );

  prototype_chip u_chip (
    .TCLK(clk), .reset,
    .PS_Mask_Data_in, .Strobe_in_PMask, .PS_Mask_Data_out,
    .Test_Data_in, .Strobe_in_TData, .Test_Data_out,
    .Strobe_out_TR, .TResult_out, .AaC, .CLK_Sel,
    .CLK_CW_in, .Strobe_in_CLK_CR, .HFCLK_Meas_Req, .HFCLK_Meas_ACK,
    .Strobe_out_CLK_FR, .CLK_FR_out,
    .iut2_clk, .iut2_in, .iut2_out, .iut2_scan_in, .iut2_scan_en, .iut2_scan_out,
    .iut3_clk, .iut3_in, .iut3_out, .iut3_scan_in, .iut3_scan_en, .iut3_scan_out
  );

endmodule
