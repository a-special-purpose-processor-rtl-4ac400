// tb_uart: self-checking test of the UART.
//
// The transmitter output is looped back into the receiver of the same
// instance (CLOCK_DIVIDE = 3 to keep the run short). Random bytes are sent
// one after another; each must arrive unchanged with no receive error,
// and is_transmitting must stay high for exactly ten bit times of
// 4 * CLOCK_DIVIDE clocks. A frame with a bad stop bit, driven by the
// testbench on its own line, must raise rcv_error.
module tb_uart;
  localparam int unsigned CD = 3;
  logic clk = 0, reset = 1, transmit = 0, line, rx;
  logic [7:0] tx_byte = 0, rx_byte;
  logic received, rcv_error, is_transmitting, tx;
  bit   use_tb_line = 0;
  logic tb_line = 1;
  int checks = 0, failures = 0;
  bit err_seen = 0;
  always @(posedge clk) if (use_tb_line && received && rcv_error) err_seen <= 1;

  uart #(.CLOCK_DIVIDE(CD)) dut (.clk, .reset, .rx, .tx, .transmit, .tx_byte, .received,
                                 .rx_byte, .rcv_error, .is_transmitting);
  assign rx = use_tb_line ? tb_line : tx;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    reset = 0;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      logic [7:0] b;
      int busy;
      b = 8'($urandom);
      @(negedge clk); tx_byte = b; transmit = 1;
      @(negedge clk); transmit = 0;
      busy = 0;
      while (!received) begin
        @(posedge clk); #1;
        if (is_transmitting) busy++;
      end
      check(rx_byte == b && !rcv_error, $sformatf("byte %h received as %h", b, rx_byte));
      while (is_transmitting) begin @(posedge clk); #1; busy++; end
      check(busy == 10 * 4 * CD, $sformatf("frame length %0d clocks", busy));
      repeat (3) @(posedge clk);
    end
    // bad stop bit
    use_tb_line = 1;
    tb_line = 0; repeat (4 * CD * 9) @(posedge clk);   // start + 8 zero bits
    tb_line = 0; repeat (4 * CD) @(posedge clk);       // stop bit low
    tb_line = 1;
    repeat (8 * CD) @(posedge clk);
    check(err_seen, "missing stop bit flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
