// tb_tap_port: shifts random vectors into a 9-bit application port and
// checks that the shift register follows a reference model (shifting only
// when selected and strobed, first bit ending in bit 0), that the serial
// output is bit 0, and that the application register changes only on a
// pulse of the port clock.
module tb_tap_port;
  localparam int unsigned W = 9;
  logic TCLK = 0, reset = 1, iut_clk = 0, sel = 0, Strobe_in_TData = 0, Test_Data_in = 0, sout;
  logic [W-1:0] app, ref_sreg;
  int checks = 0, failures = 0;

  tap_port #(.WIDTH(W)) dut (.TCLK, .reset, .iut_clk, .sel, .Strobe_in_TData, .Test_Data_in,
                             .sout, .app);
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
    ref_sreg = '0;
    @(negedge TCLK); @(negedge TCLK); reset = 0;
    for (int v = 0; v < 50; v++) begin
      logic [W-1:0] vec, prev_app;
      vec = W'($urandom);
      for (int i = 0; i < W + 3; i++) begin
        logic s, st, d;
        s = (i < W) ? 1'b1 : 1'($urandom); st = (i < W) ? 1'b1 : 1'($urandom);
        d = (i < W) ? vec[i] : 1'($urandom);
        @(negedge TCLK); sel = s; Strobe_in_TData = st; Test_Data_in = d;
        #1 check(sout == ref_sreg[0], "serial output is bit 0");
        @(posedge TCLK); #1;
        if (s && st) ref_sreg = {d, ref_sreg[W-1:1]};
        check(dut.sreg == ref_sreg, "shift register");
      end
      @(negedge TCLK); sel = 0; Strobe_in_TData = 0;
      prev_app = app;
      #2 iut_clk = 1; #2 iut_clk = 0;
      check(app == ref_sreg, $sformatf("apply register %h vs %h", app, ref_sreg));
      check(v == 0 || app != prev_app || ref_sreg == prev_app, "apply register loads only on pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
