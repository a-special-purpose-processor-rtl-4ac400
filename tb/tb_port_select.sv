// tb_port_select: shifts random bits and selection windows through the
// chain and compares the select bits and the serial output with a
// reference shift register; checks that a window of CR+1 bits with a single
// 1 at position p selects port p, and that the chain holds without strobe.
module tb_port_select;
  localparam int unsigned N = 10;
  logic TCLK = 0, reset = 1, Strobe_in_PMask = 0, PS_Mask_Data_in = 0, PS_Mask_Data_out;
  logic [N-1:0] sel, ref_sel;
  int checks = 0, failures = 0;

  port_select #(.NUM_PORTS(N)) dut (.TCLK, .reset, .Strobe_in_PMask, .PS_Mask_Data_in,
                                    .PS_Mask_Data_out, .sel);
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
    ref_sel = '0;
    repeat (2) @(posedge TCLK);
    @(negedge TCLK); reset = 0;
    for (int n = 0; n < 500; n++) begin
      logic s, d;
      s = 1'($urandom); d = 1'($urandom);
      @(negedge TCLK); Strobe_in_PMask = s; PS_Mask_Data_in = d;
      #1 check(PS_Mask_Data_out == ref_sel[N-1], "serial out");
      @(posedge TCLK); #1;
      if (s) ref_sel = {ref_sel[N-2:0], d};
      check(sel == ref_sel, $sformatf("select bits %b vs %b", sel, ref_sel));
    end
    for (int p = 0; p < N; p++) begin
      for (int cr = N - 1; cr >= 0; cr--) begin
        @(negedge TCLK); Strobe_in_PMask = 1; PS_Mask_Data_in = (cr == p);
      end
      @(negedge TCLK); Strobe_in_PMask = 0;
      check(sel == (N'(1) << p), $sformatf("window selects port %0d: %b", p, sel));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
