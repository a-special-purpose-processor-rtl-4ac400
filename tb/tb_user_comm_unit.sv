// tb_user_comm_unit: protocol engine with the UART replaced by byte-level
// stimulus (one-cycle "received" pulses) and a transmitter model that is
// busy for a few clocks after each transmit pulse. Address registers and
// an instruction memory are modelled in the testbench. Checks: loading
// PCRead, receiving three instruction bytes into consecutive addresses
// starting after the loaded PCWrite value, uploading them back, the
// 29-byte register dump (count and the PCRead bytes in it), run / break
// point / single step control of next_instruction, and the reset pulse.
module tb_user_comm_unit;
  import tacp_pkg::*;
  logic clk = 0, reset = 1, received = 0, rcv_error = 0, is_transmitting = 0, transmit;
  logic [7:0] rx_byte = 0, tx_byte;
  logic [15:0] PCRead_reg, PCWrite_reg, DCRead_reg, DCWrite_reg, RCRead_reg, RCWrite_reg;
  logic [15:0] PCRead_p, PCWrite_p, DCRead_p, DCWrite_p, RCRead_p, RCWrite_p;
  logic WE_Instruction, WE_TestData, step_taken = 0;
  logic [7:0] Instruction_a, TestData_a = 0, TestResult_b = 0;
  dp_view_t dp_view;
  logic next_instruction, proc_reset, BreakF, ErrF, RunF;
  int checks = 0, failures = 0, reset_pulses = 0;
  always @(posedge clk) if (proc_reset) reset_pulses++;
  logic [7:0] imem [65536];
  logic [7:0] txq [$];

  user_comm_unit dut (.*);
  always #5 clk = ~clk;

  assign dp_view = '0;
  always_ff @(posedge clk) begin
    if (reset) begin
      {PCRead_reg, PCWrite_reg, DCRead_reg, DCWrite_reg, RCRead_reg, RCWrite_reg} <= '0;
    end else begin
      PCRead_reg <= PCRead_p; PCWrite_reg <= PCWrite_p; DCRead_reg <= DCRead_p;
      DCWrite_reg <= DCWrite_p; RCRead_reg <= RCRead_p; RCWrite_reg <= RCWrite_p;
      if (WE_Instruction) imem[PCWrite_p] <= rx_byte;
    end
    Instruction_a <= (WE_Instruction) ? rx_byte : imem[PCWrite_p];
  end
  // transmitter model
  always @(posedge clk) if (transmit) begin
    txq.push_back(tx_byte);
    is_transmitting <= 1;
    repeat (6) @(posedge clk);
    is_transmitting <= 0;
  end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic send(input logic [7:0] b);
    @(negedge clk); rx_byte = b; received = 1;
    @(negedge clk); received = 0;
    repeat (4) @(negedge clk);
  endtask
  task automatic load16(input logic [7:0] c, input logic [15:0] v);
    send(c); send(v[7:0]); send(v[15:8]);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (imem[i]) imem[i] = 8'h00;
    repeat (3) @(negedge clk); reset = 0;
    load16(CMD_LOAD_PCREAD, 16'h1234);
    check(PCRead_reg == 16'h1234, "PCRead loaded, low byte first");
    load16(CMD_LOAD_RX_COUNTER, 16'd3);
    load16(CMD_LOAD_PCWRITE, 16'h01FF);
    send(CMD_RECEIVE_INST);
    send(8'hA1); send(8'hB2); send(8'hC3);
    check(imem[16'h0200] == 8'hA1 && imem[16'h0202] == 8'hC3,
          "bytes written from the address after PCWrite");
    check(PCWrite_reg == 16'h0202, "PCWrite advanced");
    // upload them
    load16(CMD_LOAD_TX_COUNTER, 16'd3);
    load16(CMD_LOAD_PCWRITE, 16'h0200);
    txq.delete();
    send(CMD_REQUEST_INST);
    repeat (100) @(negedge clk);
    check(txq.size() == 3 && txq[0] == 8'hA1 && txq[1] == 8'hB2 && txq[2] == 8'hC3,
          $sformatf("upload of %0d bytes", txq.size()));
    // register dump
    load16(CMD_LOAD_TX_COUNTER, 16'(REG_DUMP_BYTES));
    txq.delete();
    send(CMD_REQUEST_REGS);
    repeat (400) @(negedge clk);
    check(txq.size() == REG_DUMP_BYTES, $sformatf("register dump %0d bytes", txq.size()));
    check(txq[REG_DUMP_BYTES - 3] == 8'h34 && txq[REG_DUMP_BYTES - 4] == 8'h12, "PCRead in the dump");
    // run, break point, step
    check(!next_instruction, "idle after reset");
    send(CMD_RUN);
    check(RunF && next_instruction, "run");
    load16(CMD_LOAD_BP, 16'h1234);
    check(BreakF && !next_instruction, "break point stops fetching");
    send(CMD_SINGLE_STEP);
    check(next_instruction, "single step overrides the break point");
    @(negedge clk); step_taken = 1; @(negedge clk); step_taken = 0;
    check(!next_instruction, "step consumed");
    send(CMD_STOP);
    check(!RunF, "stop");
    send(CMD_RESET);
    check(reset_pulses == 1, $sformatf("reset pulse (%0d)", reset_pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
