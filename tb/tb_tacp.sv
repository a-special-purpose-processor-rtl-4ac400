// tb_tacp: the processor with its memories, UART and protocol unit, driven
// over the serial line at a short bit time (CLOCK_DIVIDE = 2). A small
// program is downloaded, run and checked through uploads:
//   Load_UC_value 5, INC_UC, Load_RCWrite FFFF, ReadResult (1 byte of 8
//   bits) with the chip's result line held high, SetFCW 0x1234, Stop.
// Afterwards the result memory must hold FF and the register dump must show
// UC = 6, CW = 0x1234 and the Stop instruction in IR. The chip side is a
// constant model (result line 1, acknowledge 1).
module tb_tacp;
  localparam int unsigned CD = 2;
  localparam int unsigned BIT_CY = 4 * CD;
  logic clk = 0, reset = 1, rx = 1, tx;
  logic PS_Mask_Data_in, Strobe_in_PMask, Test_Data_in, Strobe_in_TData, Strobe_out_TR, AaC;
  logic CLK_CW_in, Strobe_in_CLK_CR, Strobe_out_CLK_FR, HFCLK_Meas_Req, CLK_Sel;
  logic [3:0] status;
  int checks = 0, failures = 0;
  logic [7:0] rxq [$];
  bit mon_on = 0;

  tacp #(.CLOCK_DIVIDE(CD)) dut (
    .clk, .reset, .rx, .tx,
    .PS_Mask_Data_out(1'b0), .Test_Data_out(1'b0), .TResult_out(1'b1), .CLK_FR_out(1'b0),
    .HFCLK_Meas_ACK(1'b1),
    .PS_Mask_Data_in, .Strobe_in_PMask, .Test_Data_in, .Strobe_in_TData, .Strobe_out_TR, .AaC,
    .CLK_CW_in, .Strobe_in_CLK_CR, .Strobe_out_CLK_FR, .HFCLK_Meas_Req, .CLK_Sel, .status
  );
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic send_byte(input logic [7:0] b);
    rx = 0; repeat (BIT_CY) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (BIT_CY) @(posedge clk); end
    rx = 1; repeat (2 * BIT_CY) @(posedge clk);
  endtask
  task automatic load16(input logic [7:0] c, input logic [15:0] v);
    send_byte(c); send_byte(v[7:0]); send_byte(v[15:8]);
  endtask
  initial begin : tx_monitor
    logic [7:0] b;
    wait (mon_on);
    forever begin
      @(negedge tx);
      repeat (BIT_CY + BIT_CY / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin b[i] = tx; repeat (BIT_CY) @(posedge clk); end
      rxq.push_back(b);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] prog [$];
    prog = '{8'h12, 8'h05, 8'h00, 8'h00, 8'h00,
             8'h07,
             8'h10, 8'hFF, 8'hFF,
             8'h17, 8'h00, 8'h00, 8'h00, 8'h00, 8'h06,
             8'h1E, 8'h34, 8'h12,
             8'h20};
    repeat (5) @(posedge clk); reset = 0; repeat (5) @(posedge clk);
    mon_on = 1;
    load16(8'h18, 16'(prog.size()));
    load16(8'h1B, 16'hFFFF);
    send_byte(8'h20);
    foreach (prog[i]) send_byte(prog[i]);
    load16(8'h1A, 16'h0000);
    send_byte(8'h91);
    repeat (500) @(posedge clk);
    check(dut.u_proc.IsStopInstruction, "program reached Stop");
    send_byte(8'h93);
    load16(8'h19, 16'd1);
    load16(8'h1E, 16'h0000);
    rxq.delete();
    send_byte(8'h42);
    repeat (20 * BIT_CY) @(posedge clk);
    check(rxq.size() == 1 && rxq[0] == 8'hFF, "result byte read back");
    load16(8'h19, 16'd29);
    rxq.delete();
    send_byte(8'h53);
    repeat (29 * 14 * BIT_CY) @(posedge clk);
    check(rxq.size() == 29, $sformatf("register dump size %0d", rxq.size()));
    if (rxq.size() == 29) begin
      check(rxq[29 - 17] == 8'h06 && rxq[29 - 18] == 8'h00, "UC = 6");
      check(rxq[29 - 21] == 8'h34 && rxq[29 - 22] == 8'h12, "CW = 1234");
      check(rxq[29 - 2] == 8'h20, "IR holds Stop");
      check(rxq[29 - 1][1] == 1'b1, "busy flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
