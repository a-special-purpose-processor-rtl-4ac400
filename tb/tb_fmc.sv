// tb_fmc: frequency measurement with a testbench HFCLK of known period.
// Follows the processor's handshake: wait for ACK, hold the request for N
// TCLK cycles, check that ACK drops during the window and returns, then
// shift the 16-bit frequency register out LSB first and compare it with
// N * T_TCLK / T_HFCLK (within two counts).
module tb_fmc;
  logic TCLK = 0, HFCLK = 0, reset = 1, HFCLK_Meas_Req = 0, Strobe_out_CLK_FR = 0;
  logic HFCLK_Meas_ACK, CLK_FR_out;
  int checks = 0, failures = 0;
  int hf_half = 7;

  fmc dut (.TCLK, .HFCLK, .reset, .HFCLK_Meas_Req, .HFCLK_Meas_ACK, .Strobe_out_CLK_FR, .CLK_FR_out);
  always #10 TCLK = ~TCLK;
  always #(hf_half) HFCLK = ~HFCLK;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge TCLK); @(negedge TCLK); reset = 0;
    for (int n = 0; n < 6; n++) begin
      int ncyc, t;
      logic [15:0] fr;
      real expc;
      bit dropped = 0;
      hf_half = 2 + int'($urandom % 20);
      ncyc = 200 + int'($urandom % 800);
      @(negedge TCLK);
      check(HFCLK_Meas_ACK, "ACK high when idle");
      HFCLK_Meas_Req = 1;
      repeat (ncyc) begin
        @(negedge TCLK);
        if (!HFCLK_Meas_ACK) dropped = 1;
      end
      HFCLK_Meas_Req = 0;
      check(dropped, "ACK low during measurement");
      t = 0;
      while (!HFCLK_Meas_ACK && t < 1000) begin @(negedge TCLK); t++; end
      check(HFCLK_Meas_ACK, "ACK returns");
      for (int i = 0; i < 16; i++) begin
        Strobe_out_CLK_FR = 1;
        #1 fr[i] = CLK_FR_out;
        @(negedge TCLK);
      end
      Strobe_out_CLK_FR = 0;
      expc = real'(ncyc) * 20.0 / real'(2 * hf_half);
      check(real'(fr) > expc - 2.5 && real'(fr) < expc + 2.5,
            $sformatf("count %0d expected %f", fr, expc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
