// tb_tsc: the test support circuitry driven directly through its serial
// interface, the way the processor drives it, with the circuits under test
// replaced by testbench logic (IUT0 result = application bits XOR a
// constant). Checks: port selection by a mask window, test-data shifting
// into port 0 and its loop-back, two CLK_Out pulses reaching only the
// selected IUT, the serial read of port 1, serial loading of the clock
// control word, and a frequency measurement handshake.
module tb_tsc;
  logic TCLK = 0, reset = 1;
  logic PS_Mask_Data_in = 0, Strobe_in_PMask = 0, PS_Mask_Data_out;
  logic Test_Data_in = 0, Strobe_in_TData = 0, Test_Data_out;
  logic Strobe_out_TR = 0, TResult_out, AaC = 0, CLK_Sel = 0;
  logic CLK_CW_in = 0, Strobe_in_CLK_CR = 0, HFCLK_Meas_Req = 0, HFCLK_Meas_ACK;
  logic Strobe_out_CLK_FR = 0, CLK_FR_out;
  logic [3:0] iut_clk;
  logic [8:0] app0; logic [4:0] res0;
  logic [16:0] app1; logic [17:0] app2, app3;
  logic scan_in2, scan_in3;
  int checks = 0, failures = 0;
  int iut_pulses [4] = '{0, 0, 0, 0};

  tsc dut (.TCLK, .reset, .PS_Mask_Data_in, .Strobe_in_PMask, .PS_Mask_Data_out,
           .Test_Data_in, .Strobe_in_TData, .Test_Data_out, .Strobe_out_TR, .TResult_out,
           .AaC, .CLK_Sel, .CLK_CW_in, .Strobe_in_CLK_CR, .HFCLK_Meas_Req, .HFCLK_Meas_ACK,
           .Strobe_out_CLK_FR, .CLK_FR_out, .iut_clk, .app0, .res0, .app1, .res1(9'h0),
           .app2, .res2(19'h0), .scan_in2, .scan_en2(), .scan_out2(1'b0),
           .app3, .res3(19'h0), .scan_in3, .scan_en3(), .scan_out3(1'b0));
  always #10ns TCLK = ~TCLK;
  assign res0 = app0[4:0] ^ 5'h15;
  for (genvar k = 0; k < 4; k++) begin : g_cnt
    always @(posedge iut_clk[k]) iut_pulses[k]++;
  end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5ms;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [8:0] vec, back;
    logic [4:0] got;
    logic [15:0] fr;
    @(negedge TCLK); @(negedge TCLK); reset = 0;
    // select ports 0 and 1: window of ten with port 0, then one more bit
    for (int cr = 9; cr >= 0; cr--) begin @(negedge TCLK); Strobe_in_PMask = 1; PS_Mask_Data_in = (cr == 0); end
    @(negedge TCLK); PS_Mask_Data_in = 1;
    @(negedge TCLK); Strobe_in_PMask = 0; PS_Mask_Data_in = 0;
    check(dut.sel == 10'b11, "ports 0 and 1 selected");
    // shift a vector into port 0 twice; the second pass returns the first
    vec = 9'($urandom);
    for (int pass = 0; pass < 2; pass++)
      for (int i = 0; i < 9; i++) begin
        @(negedge TCLK); Strobe_in_TData = 1; Test_Data_in = vec[i];
        #1 back[i] = Test_Data_out;
      end
    @(negedge TCLK); Strobe_in_TData = 0;
    check(back == vec, "loop-back returns the previous vector");
    // apply and capture
    AaC = 1; repeat (4) @(negedge TCLK); AaC = 0; repeat (8) @(negedge TCLK);
    check(app0 == vec, "vector applied");
    check(iut_pulses[0] == 2 && iut_pulses[1] == 0 && iut_pulses[2] == 0, "two pulses to IUT0 only");
    // read result port 1
    @(negedge TCLK); Strobe_out_TR = 1;
    for (int i = 0; i < 5; i++) begin #1 got[i] = TResult_out; @(negedge TCLK); end
    Strobe_out_TR = 0;
    check(got == (vec[4:0] ^ 5'h15), $sformatf("result %b", got));
    // control word 0x0038 (325 MHz), MSB first
    for (int i = 15; i >= 0; i--) begin @(negedge TCLK); Strobe_in_CLK_CR = 1; CLK_CW_in = 1'((16'h0038 >> i) & 1); end
    @(negedge TCLK); Strobe_in_CLK_CR = 0;
    check(dut.cw == 16'h0038, "control word loaded");
    // frequency measurement over 256 TCLK cycles: about 256 * 325 / 50 = 1664
    check(HFCLK_Meas_ACK, "ACK idle");
    HFCLK_Meas_Req = 1; repeat (256) @(negedge TCLK); HFCLK_Meas_Req = 0;
    repeat (20) @(negedge TCLK);
    check(HFCLK_Meas_ACK, "ACK back");
    Strobe_out_CLK_FR = 1;
    for (int i = 0; i < 16; i++) begin #1 fr[i] = CLK_FR_out; @(negedge TCLK); end
    Strobe_out_CLK_FR = 0;
    check(fr > 1650 && fr < 1680, $sformatf("frequency count %0d", fr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
