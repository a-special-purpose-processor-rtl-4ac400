// tb_scan_port: the scan port connected to a 5-flip-flop scan chain model
// that shifts on TCLK while scan_en is high. Random select, strobe and data
// values are applied for many cycles; a reference model of the path
// (application FF, chain, result FF) predicts scan_in, scan_en and sout
// every cycle. It also checks that with the port selected, a bit shifted
// in appears on sout after exactly 7 strobed edges (1 + 5 + 1 stages).
module tb_scan_port;
  logic TCLK = 0, reset = 1, sel = 0, Strobe_in_TData = 0, Strobe_out_TR = 0;
  logic Test_Data_in = 0, scan_out, scan_in, scan_en, sout;
  logic [4:0] chain = '0;
  int checks = 0, failures = 0;

  scan_port dut (.TCLK, .reset, .sel, .Strobe_in_TData, .Strobe_out_TR, .Test_Data_in,
                 .scan_out, .scan_in, .scan_en, .sout);
  always #5 TCLK = ~TCLK;
  // circuit-side scan chain: shifts towards bit 4 while scan_en is high
  always_ff @(posedge TCLK) if (scan_en) chain <= {chain[3:0], scan_in};
  assign scan_out = chain[4];

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge TCLK);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [6:0] path;   // model: {result FF, chain[4:0], application FF}
    int lat;
    path = '0;
    @(negedge TCLK); @(negedge TCLK); reset = 0;
    for (int n = 0; n < 300; n++) begin
      logic s, st, sr, d, en;
      s = 1'($urandom); st = 1'($urandom); sr = 1'($urandom); d = 1'($urandom);
      @(negedge TCLK); sel = s; Strobe_in_TData = st; Strobe_out_TR = sr; Test_Data_in = d;
      en = s && (st || sr);
      #1 check(scan_en == en, "scan_en");
      @(posedge TCLK); if (en) path = {path[5:0], d};
      #1 check(scan_in == path[0] && sout == path[6], $sformatf("path n=%0d", n));
    end
    // latency of a single 1 through the whole path
    @(negedge TCLK); sel = 1; Strobe_out_TR = 0; Strobe_in_TData = 1; Test_Data_in = 0;
    repeat (10) @(negedge TCLK);
    Test_Data_in = 1; @(negedge TCLK); Test_Data_in = 0;
    lat = 1;
    while (!sout && lat < 20) begin @(negedge TCLK); lat++; end
    check(lat == 7, $sformatf("latency %0d strobed edges", lat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
