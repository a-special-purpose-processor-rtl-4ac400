// tsc: the test support circuitry of the prototype chip.
//
// Everything on the chip except the circuits under test (IUTs):
//   * port_select: one select bit per test port, loaded serially;
//   * one test-application port (tap_port) and one test-result port
//     (trp_port) per IUT, plus a one-bit scan port for the two sequential
//     IUTs; all share the serial lines Test_Data_in, Test_Data_out
//     (loop-back of the selected application ports) and TResult_out
//     (result of the selected result ports); the scan ports also give
//     their circuit a scan enable (scan_en2/3) under which its scan
//     flip-flops shift on TCLK;
//   * csaac: selects TCLK or HFCLK and turns each AaC request into two
//     clock pulses (CLK_Out); IUT k receives CLK_Out only while one of its
//     ports is selected (iut_clk[k]);
//   * ccg: serially loaded control word and the oscillator it tunes;
//   * fmc: counts HFCLK cycles for the frequency measurement.
// Port numbers: 0/1 = IUT0 (9-bit apply, 5-bit result), 2/3 = IUT1 (17/9),
// 4/5/6 = IUT2 (18/19/scan), 7/8/9 = IUT3 (18/19/scan). Serial outputs of
// unselected ports are masked off and the selected ones ORed together.
//
// TCLK is the tester clock (the processor's clock); all serial strobes are
// sampled on its rising edge. Port widths and the block set follow the
// published chip; the port numbering is this implementation's choice.
module tsc #(
  parameter int unsigned NUM_PORTS = 10
) (
  input  logic        TCLK,
  input  logic        reset,
  // serial interface to the processor
  input  logic        PS_Mask_Data_in,
  input  logic        Strobe_in_PMask,
  output logic        PS_Mask_Data_out,
  input  logic        Test_Data_in,
  input  logic        Strobe_in_TData,
  output logic        Test_Data_out,
  input  logic        Strobe_out_TR,
  output logic        TResult_out,
  input  logic        AaC,
  input  logic        CLK_Sel,
  input  logic        CLK_CW_in,
  input  logic        Strobe_in_CLK_CR,
  input  logic        HFCLK_Meas_Req,
  output logic        HFCLK_Meas_ACK,
  input  logic        Strobe_out_CLK_FR,
  output logic        CLK_FR_out,
  // circuits under test
  output logic [3:0]  iut_clk,
  output logic [8:0]  app0,
  input  logic [4:0]  res0,
  output logic [16:0] app1,
  input  logic [8:0]  res1,
  output logic [17:0] app2,
  input  logic [18:0] res2,
  output logic        scan_in2,
  output logic        scan_en2,
  input  logic        scan_out2,
  output logic [17:0] app3,
  input  logic [18:0] res3,
  output logic        scan_in3,
  output logic        scan_en3,
  input  logic        scan_out3
);

  logic [NUM_PORTS-1:0] sel;
  logic [NUM_PORTS-1:0] tap_out, trp_out;
  logic                 HFCLK, Sel_CLK, CLK_Out;
  logic [15:0]          cw;

  port_select #(.NUM_PORTS(NUM_PORTS)) u_ps (
    .TCLK, .reset, .Strobe_in_PMask, .PS_Mask_Data_in, .PS_Mask_Data_out, .sel
  );

  csaac u_csaac (.TCLK, .HFCLK, .reset, .CLK_Sel, .AaC, .Sel_CLK, .CLK_Out);

  ccg u_ccg (.TCLK, .reset, .Strobe_in_CLK_CR, .CLK_CW_in, .cw, .HFCLK);

  fmc u_fmc (
    .TCLK, .HFCLK, .reset, .HFCLK_Meas_Req, .HFCLK_Meas_ACK, .Strobe_out_CLK_FR, .CLK_FR_out
  );

  assign iut_clk[0] = CLK_Out & (sel[0] | sel[1]);
  assign iut_clk[1] = CLK_Out & (sel[2] | sel[3]);
  assign iut_clk[2] = CLK_Out & (sel[4] | sel[5] | sel[6]);
  assign iut_clk[3] = CLK_Out & (sel[7] | sel[8] | sel[9]);

  // IUT0: 4-bit adder
  tap_port #(.WIDTH(9)) u_tap0 (
    .TCLK, .reset, .iut_clk(iut_clk[0]), .sel(sel[0]), .Strobe_in_TData, .Test_Data_in,
    .sout(tap_out[0]), .app(app0)
  );
  trp_port #(.WIDTH(5)) u_trp0 (
    .TCLK, .reset, .iut_clk(iut_clk[0]), .sel(sel[1]), .Strobe_out_TR, .result(res0),
    .sout(trp_out[1])
  );
  // IUT1: pipelined 8-bit adder
  tap_port #(.WIDTH(17)) u_tap1 (
    .TCLK, .reset, .iut_clk(iut_clk[1]), .sel(sel[2]), .Strobe_in_TData, .Test_Data_in,
    .sout(tap_out[2]), .app(app1)
  );
  trp_port #(.WIDTH(9)) u_trp1 (
    .TCLK, .reset, .iut_clk(iut_clk[1]), .sel(sel[3]), .Strobe_out_TR, .result(res1),
    .sout(trp_out[3])
  );
  // IUT2 and IUT3: sequential benchmark circuits with a scan chain
  tap_port #(.WIDTH(18)) u_tap2 (
    .TCLK, .reset, .iut_clk(iut_clk[2]), .sel(sel[4]), .Strobe_in_TData, .Test_Data_in,
    .sout(tap_out[4]), .app(app2)
  );
  trp_port #(.WIDTH(19)) u_trp2 (
    .TCLK, .reset, .iut_clk(iut_clk[2]), .sel(sel[5]), .Strobe_out_TR, .result(res2),
    .sout(trp_out[5])
  );
  scan_port u_scan2 (
    .TCLK, .reset, .sel(sel[6]), .Strobe_in_TData, .Strobe_out_TR,
    .Test_Data_in, .scan_out(scan_out2), .scan_in(scan_in2), .scan_en(scan_en2), .sout(trp_out[6])
  );
  tap_port #(.WIDTH(18)) u_tap3 (
    .TCLK, .reset, .iut_clk(iut_clk[3]), .sel(sel[7]), .Strobe_in_TData, .Test_Data_in,
    .sout(tap_out[7]), .app(app3)
  );
  trp_port #(.WIDTH(19)) u_trp3 (
    .TCLK, .reset, .iut_clk(iut_clk[3]), .sel(sel[8]), .Strobe_out_TR, .result(res3),
    .sout(trp_out[8])
  );
  scan_port u_scan3 (
    .TCLK, .reset, .sel(sel[9]), .Strobe_in_TData, .Strobe_out_TR,
    .Test_Data_in, .scan_out(scan_out3), .scan_in(scan_in3), .scan_en(scan_en3), .sout(trp_out[9])
  );

  // ports without an application or result side drive nothing
  assign tap_out[1] = 1'b0;
  assign tap_out[3] = 1'b0;
  assign tap_out[5] = 1'b0;
  assign tap_out[6] = 1'b0;
  assign tap_out[8] = 1'b0;
  assign tap_out[9] = 1'b0;
  assign trp_out[0] = 1'b0;
  assign trp_out[2] = 1'b0;
  assign trp_out[4] = 1'b0;
  assign trp_out[7] = 1'b0;

  assign Test_Data_out = |(tap_out & sel);
  assign TResult_out   = |(trp_out & sel);

endmodule
