// tb_comm_flags_decoder: checks the type-byte decoding for all 256 byte
// values against an independent table of the command codes, the holding of
// the request/load flags after the byte, and the single-cycle control
// pulses and flag clearing.
module tb_comm_flags_decoder;
  import tacp_pkg::*;
  logic clk = 0, reset = 1, rx_IDLE_received = 0, rx_IDLE_no_rcv = 0, state_tx_IDLE = 1;
  logic [7:0] rx_byte = 0;
  rx_flags_t flags;
  int checks = 0, failures = 0;

  comm_flags_decoder dut (.clk, .reset, .rx_byte, .rx_IDLE_received, .rx_IDLE_no_rcv,
                          .state_tx_IDLE, .flags);
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
    repeat (3) @(posedge clk);
    reset = 0;
    for (int v = 0; v < 256; v++) begin
      logic [7:0] b;
      b = 8'(v);
      @(negedge clk); rx_byte = b; rx_IDLE_received = 1;
      #1;
      check(flags.Run == (b == CMD_RUN || b == 8'h81 || (b[7] && !b[3] && b[2:0] == 1)), $sformatf("Run %h", b));
      check(flags.Reset == (b[7] && !b[3] && b[2:0] == 2), $sformatf("Reset %h", b));
      @(negedge clk); rx_IDLE_received = 0; rx_byte = 8'h00;
      #1;
      check(flags.Run == 0 && flags.Stop == 0 && flags.SingleStep == 0, "control pulses one cycle");
      check(flags.load_rx_counter == (b == CMD_LOAD_RX_COUNTER || (b[3] && b[2:0] == 0)), $sformatf("load rx %h", b));
      check(flags.load_PCWrite == (b[3] && b[2:0] == 3), $sformatf("load PCWrite %h", b));
      check(flags.load_RCWrite == (b[3] && b[2:0] == 7 && !b[7]), $sformatf("load RCWrite %h", b));
      check(flags.load_BP == (b[3] && b[2:0] == 7 && b[7]), $sformatf("load BP %h", b));
      check(flags.request_tr == (b[6] && b[2:0] == 2), $sformatf("request tr %h", b));
      check(flags.request_regs == (b[6] && b[2:0] == 3), $sformatf("request regs %h", b));
      check(flags.mem_write_inst_td == (b[5] && b[0]), $sformatf("mem write td %h", b));
      rx_IDLE_no_rcv = 1;
      @(negedge clk); rx_IDLE_no_rcv = 0;
      #1;
      check(flags == '0, "flags cleared when idle");
    end
    // the named command codes
    @(negedge clk); rx_byte = CMD_LOAD_BP; rx_IDLE_received = 1;
    @(negedge clk); rx_IDLE_received = 0; #1;
    check(flags.load_BP && !flags.load_RCWrite, "9F loads the break point");
    @(negedge clk); rx_byte = CMD_REQUEST_REGS; rx_IDLE_received = 1;
    @(negedge clk); rx_IDLE_received = 0; state_tx_IDLE = 0; rx_IDLE_no_rcv = 1;
    @(negedge clk); #1;
    check(flags.request_regs, "request held while transmitting");
    state_tx_IDLE = 1;
    @(negedge clk); #1;
    check(!flags.request_regs, "request cleared after transmission");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
