// tb_tacp_dpram: random reads and writes on both ports of a small (64-byte)
// instance compared with a reference array: port a write-first, port b
// reading one cycle after the address is presented.
module tb_tacp_dpram;
  localparam int unsigned AW = 6;
  logic clk = 0, we_a = 0;
  logic [AW-1:0] addr_a = 0, addr_b = 0;
  logic [7:0] din_a = 0, dout_a, dout_b;
  logic [7:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  tacp_dpram #(.ADDR_W(AW)) dut (.clk, .addr_a, .we_a, .din_a, .dout_a, .addr_b, .dout_b);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); addr_a = AW'(i); din_a = 8'($urandom); we_a = 1; ref_mem[i] = din_a;
    end
    @(negedge clk); we_a = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [AW-1:0] aa, ab;
      logic [7:0] ea, eb, d;
      logic w;
      aa = AW'($urandom); ab = AW'($urandom); w = 1'($urandom); d = 8'($urandom);
      @(negedge clk); addr_a = aa; addr_b = ab; we_a = w; din_a = d;
      eb = ref_mem[ab];
      if (w) ref_mem[aa] = d;
      ea = ref_mem[aa];
      @(posedge clk); #1;
      check(dout_a == ea, $sformatf("port a %h: %h vs %h", aa, dout_a, ea));
      check(dout_b == eb, $sformatf("port b %h: %h vs %h", ab, dout_b, eb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
