// tb_trp_port: captures random results into a 5-bit result port on a port
// clock pulse, then reads them serially with Strobe_out_TR and checks the
// bit order (bit 0 first), the zero fill and that nothing moves while the
// port is not selected.
module tb_trp_port;
  localparam int unsigned W = 5;
  logic TCLK = 0, reset = 1, iut_clk = 0, sel = 0, Strobe_out_TR = 0, sout;
  logic [W-1:0] result = 0;
  int checks = 0, failures = 0;

  trp_port #(.WIDTH(W)) dut (.TCLK, .reset, .iut_clk, .sel, .Strobe_out_TR, .result, .sout);
  always #5 TCLK = ~TCLK;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge TCLK);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge TCLK); @(negedge TCLK); reset = 0;
    for (int v = 0; v < 60; v++) begin
      logic [W-1:0] r;
      logic [W+1:0] got;
      r = W'($urandom);
      @(negedge TCLK); result = r;
      #1 iut_clk = 1; #1 iut_clk = 0;
      result = ~r;                       // must not reach the port without a pulse
      sel = 1;
      @(negedge TCLK);                   // shift register loads the capture
      Strobe_out_TR = 1;
      for (int i = 0; i < W + 2; i++) begin
        #1 got[i] = sout;
        @(negedge TCLK);
        if (i == 2) begin sel = 0; @(negedge TCLK); @(negedge TCLK); sel = 1; end
      end
      Strobe_out_TR = 0; sel = 0;
      check(got == {2'b00, r}, $sformatf("read %b expected %b", got, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
