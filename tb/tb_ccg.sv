// tb_ccg: loads random control words serially (MSB first, one bit per
// strobed TCLK edge) and checks the control register, that it holds without
// strobe, and that the oscillator runs at the frequency of the loaded code.
module tb_ccg;
  logic TCLK = 0, reset = 1, Strobe_in_CLK_CR = 0, CLK_CW_in = 0, HFCLK;
  logic [15:0] cw;
  int checks = 0, failures = 0;
  real base [8] = '{325.0, 300.0, 280.0, 260.0, 240.0, 220.0, 200.0, 180.0};

  ccg dut (.TCLK, .reset, .Strobe_in_CLK_CR, .CLK_CW_in, .cw, .HFCLK);
  always #10ns TCLK = ~TCLK;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20ms;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge TCLK); @(negedge TCLK); reset = 0;
    for (int n = 0; n < 12; n++) begin
      logic [15:0] w;
      int idx;
      realtime t0;
      real f;
      idx = int'($urandom % 40);
      w = {10'($urandom), 6'(idx + 'h38)};
      for (int i = 15; i >= 0; i--) begin
        @(negedge TCLK); Strobe_in_CLK_CR = 1; CLK_CW_in = w[i];
      end
      @(negedge TCLK); Strobe_in_CLK_CR = 0; CLK_CW_in = $urandom;
      repeat (3) @(negedge TCLK);
      check(cw == w, $sformatf("control word %h vs %h", cw, w));
      repeat (2) @(posedge HFCLK);
      t0 = $realtime;
      repeat (4) @(posedge HFCLK);
      f = 4.0 / (($realtime - t0) / 1us);
      check(f > 0.99 * base[idx % 8] / real'(1 << (idx / 8)) && f < 1.01 * base[idx % 8] / real'(1 << (idx / 8)),
            $sformatf("oscillator %f MHz for index %0d", f, idx));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
