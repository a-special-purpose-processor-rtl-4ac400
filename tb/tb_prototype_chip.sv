// tb_prototype_chip: the chip with its two adder circuits under test,
// driven through the serial test interface. For random operands it shifts
// a 9-bit vector into port 0, applies it with one AaC and reads the 5-bit
// sum from port 1; then a 17-bit vector into port 2, two AaC operations
// for the pipelined adder, and the 9-bit sum from port 3. The sequential
// IUT ports are left unconnected (inputs tied to zero).
module tb_prototype_chip;
  logic TCLK = 0, reset = 1;
  logic PS_Mask_Data_in = 0, Strobe_in_PMask = 0, PS_Mask_Data_out;
  logic Test_Data_in = 0, Strobe_in_TData = 0, Test_Data_out;
  logic Strobe_out_TR = 0, TResult_out, AaC = 0, CLK_Sel = 0;
  logic CLK_CW_in = 0, Strobe_in_CLK_CR = 0, HFCLK_Meas_Req = 0, HFCLK_Meas_ACK;
  logic Strobe_out_CLK_FR = 0, CLK_FR_out;
  logic iut2_clk, iut2_scan_in, iut3_clk, iut3_scan_in;
  logic [17:0] iut2_in, iut3_in;
  int checks = 0, failures = 0;

  prototype_chip dut (.TCLK, .reset, .PS_Mask_Data_in, .Strobe_in_PMask, .PS_Mask_Data_out,
    .Test_Data_in, .Strobe_in_TData, .Test_Data_out, .Strobe_out_TR, .TResult_out, .AaC, .CLK_Sel,
    .CLK_CW_in, .Strobe_in_CLK_CR, .HFCLK_Meas_Req, .HFCLK_Meas_ACK, .Strobe_out_CLK_FR, .CLK_FR_out,
    .iut2_clk, .iut2_in, .iut2_out(19'h0), .iut2_scan_in, .iut2_scan_en(), .iut2_scan_out(1'b0),
    .iut3_clk, .iut3_in, .iut3_out(19'h0), .iut3_scan_in, .iut3_scan_en(), .iut3_scan_out(1'b0));
  always #10ns TCLK = ~TCLK;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic select_pair(input int p);   // ports p and p+1
    for (int cr = 9; cr >= 0; cr--) begin
      @(negedge TCLK); Strobe_in_PMask = 1; PS_Mask_Data_in = (cr == p) || (cr == p + 1);
    end
    @(negedge TCLK); Strobe_in_PMask = 0; PS_Mask_Data_in = 0;
  endtask
  task automatic shift_in(input logic [16:0] v, input int n);
    for (int i = 0; i < n; i++) begin @(negedge TCLK); Strobe_in_TData = 1; Test_Data_in = v[i]; end
    @(negedge TCLK); Strobe_in_TData = 0;
  endtask
  task automatic aac();
    AaC = 1; repeat (4) @(negedge TCLK); AaC = 0; repeat (8) @(negedge TCLK);
  endtask
  task automatic shift_out(input int n, output logic [8:0] r);
    r = '0;
    @(negedge TCLK); Strobe_out_TR = 1;
    for (int i = 0; i < n; i++) begin #1 r[i] = TResult_out; @(negedge TCLK); end
    Strobe_out_TR = 0;
  endtask

  initial begin
    #20ms;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [8:0] r;
    @(negedge TCLK); @(negedge TCLK); reset = 0;
    for (int n = 0; n < 8; n++) begin
      logic [3:0] a4, b4; logic [7:0] a8, b8; logic c;
      a4 = 4'($urandom); b4 = 4'($urandom); c = 1'($urandom);
      select_pair(0);
      shift_in({8'h0, c, b4, a4}, 9);
      aac();
      shift_out(5, r);
      check(r[4:0] == 5'(a4) + 5'(b4) + 5'(c), $sformatf("adder %h+%h+%0d got %h", a4, b4, c, r[4:0]));
      a8 = 8'($urandom); b8 = 8'($urandom); c = 1'($urandom);
      select_pair(2);
      shift_in({c, b8, a8}, 17);
      aac(); aac();
      shift_out(9, r);
      check(r == 9'(a8) + 9'(b8) + 9'(c), $sformatf("pipelined %h+%h+%0d got %h", a8, b8, c, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
