// tb_csaac: apply-and-capture pulse generator. With the tester clock
// selected, each AaC request (held four clocks, as the processor does)
// must give exactly two CLK_Out pulses, the first on the fourth TCLK edge
// after AaC rises (three synchroniser stages plus the falling-edge enable).
// With the high-frequency clock selected the two pulses must come from
// HFCLK (CLK_Out high only while HFCLK is high).
module tb_csaac;
  logic TCLK = 0, HFCLK = 0, reset = 1, CLK_Sel = 0, AaC = 0, Sel_CLK, CLK_Out;
  int checks = 0, failures = 0, pulses = 0, edge_no = 0, first_edge = -1;
  time t_aac, t_first;
  bit bad_hf = 0;

  csaac dut (.TCLK, .HFCLK, .reset, .CLK_Sel, .AaC, .Sel_CLK, .CLK_Out);
  always #10 TCLK = ~TCLK;
  always #3 HFCLK = ~HFCLK;

  always @(posedge CLK_Out) begin
    pulses++;
    if (first_edge < 0) begin first_edge = edge_no; t_first = $time; end
  end
  always @(posedge TCLK) edge_no++;
  always @(CLK_Out) if (CLK_Out && CLK_Sel && !HFCLK) bad_hf = 1;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge TCLK);
    @(negedge TCLK); reset = 0;
    for (int n = 0; n < 20; n++) begin
      CLK_Sel = (n >= 10);
      repeat (3) @(negedge TCLK);
      pulses = 0; first_edge = -1; edge_no = 0;
      AaC = 1;
      t_aac = $time;
      repeat (4) @(negedge TCLK);
      AaC = 0;
      repeat (10) @(negedge TCLK);
      check(pulses == 2, $sformatf("pulses per request: %0d (CLK_Sel=%0d)", pulses, CLK_Sel));
      if (!CLK_Sel) check(t_first - t_aac == 70, $sformatf("first pulse %0t after AaC (fourth TCLK edge expected)", t_first - t_aac));
    end
    check(!bad_hf, "CLK_Out only while HFCLK high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
