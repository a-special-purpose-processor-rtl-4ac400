// prototype_chip: the test chip: test support circuitry plus the circuits
// under test that can be described here.
//
// IUT0 is the 4-bit ripple-carry adder and IUT1 the two-stage pipelined
// 8-bit adder, both wired to their application and result ports inside
// the test support circuitry. IUT2 and IUT3 are two copies of a sequential
// benchmark circuit (18 inputs, 19 outputs, one scan chain) whose netlist
// is not part of this design: their application outputs, result inputs,
// scan signals and gated clocks are brought out as ports so that a model
// or a real netlist can be attached. TCLK is the tester clock; the other
// inputs and outputs are the chip's serial test interface (see tsc).
module prototype_chip (
  input  logic        TCLK,
  input  logic        reset,
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
  // sequential IUTs (netlists attached outside)
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

  logic [3:0]  iut_clk;
  logic [8:0]  app0;
  logic [4:0]  res0;
  logic [16:0] app1;
  logic [8:0]  res1;

  tsc u_tsc (
    .TCLK, .reset,
    .PS_Mask_Data_in, .Strobe_in_PMask, .PS_Mask_Data_out,
    .Test_Data_in, .Strobe_in_TData, .Test_Data_out,
    .Strobe_out_TR, .TResult_out, .AaC, .CLK_Sel,
    .CLK_CW_in, .Strobe_in_CLK_CR, .HFCLK_Meas_Req, .HFCLK_Meas_ACK,
    .Strobe_out_CLK_FR, .CLK_FR_out,
    .iut_clk, .app0, .res0, .app1, .res1,
    .app2(iut2_in), .res2(iut2_out), .scan_in2(iut2_scan_in), .scan_en2(iut2_scan_en), .scan_out2(iut2_scan_out),
    .app3(iut3_in), .res3(iut3_out), .scan_in3(iut3_scan_in), .scan_en3(iut3_scan_en), .scan_out3(iut3_scan_out)
  );

  iut_adder4 u_iut0 (
    .a(app0[3:0]), .b(app0[7:4]), .cin(app0[8]), .sum(res0[3:0]), .cout(res0[4])
  );

  iut_padder8 u_iut1 (
    .clk(iut_clk[1]), .a(app1[7:0]), .b(app1[15:8]), .cin(app1[16]),
    .sum(res1[7:0]), .cout(res1[8])
  );

  assign iut2_clk = iut_clk[2];
  assign iut3_clk = iut_clk[3];

endmodule
