// tacp: the Test And Characterization Processor as a whole (the FPGA side).
//
// Contains the UART, the user communication unit (host protocol), the
// memory multiplexer with the six memory address registers, the
// instruction, test-data and test-result memories (dual-port, 64 KiB each)
// and the microprogrammed processor. The host downloads a test program and
// its test data over the serial line, starts it (run or single step), and
// reads back the test results and registers. The processor drives the
// chip-side serial interface: port-select mask, test data, test results,
// apply-and-capture, clock control word, frequency register and the
// frequency-measurement request/acknowledge pair.
//
// Interface: clk, active-high synchronous reset, the UART rx/tx pins and
// the chip-side signals. All logic runs on clk; the chip-side strobes are
// one clk cycle wide per bit. The host's reset command resets the
// processor (sequencer and data-path registers) but not the memories, the
// address registers or the protocol unit.
//
// The block structure follows the published TACP; widths of the memories
// (16-bit addresses, bytes) too. CLOCK_DIVIDE = clk / (4 * baud rate),
// default 217 for 57600 baud from a 50 MHz clock.
module tacp
  import tacp_pkg::*;
#(
  parameter int unsigned CLOCK_DIVIDE = 217
) (
  input  logic     clk,
  input  logic     reset,
  input  logic     rx,
  output logic     tx,
  // chip interface
  input  logic     PS_Mask_Data_out,
  input  logic     Test_Data_out,
  input  logic     TResult_out,
  input  logic     CLK_FR_out,
  input  logic     HFCLK_Meas_ACK,
  output logic     PS_Mask_Data_in,
  output logic     Strobe_in_PMask,
  output logic     Test_Data_in,
  output logic     Strobe_in_TData,
  output logic     Strobe_out_TR,
  output logic     AaC,
  output logic     CLK_CW_in,
  output logic     Strobe_in_CLK_CR,
  output logic     Strobe_out_CLK_FR,
  output logic     HFCLK_Meas_Req,
  output logic     CLK_Sel,
  // status lamps: {ErrF, RunF, BreakF, IsProcessing}
  output logic [3:0] status
);

  logic [7:0] rx_byte, tx_byte;
  logic       received, rcv_error, is_transmitting, transmit;

  logic [ADDR_W-1:0] PCRead_reg, PCWrite_reg, DCRead_reg, DCWrite_reg, RCRead_reg, RCWrite_reg;
  logic [ADDR_W-1:0] PCRead_p, PCWrite_p, DCRead_p, DCWrite_p, RCRead_p, RCWrite_p;
  logic [ADDR_W-1:0] PCRead_d, DCRead_d, RCRead_d, RCWrite_d, SPWrite;
  logic              WE_Instruction, WE_TestData, Push, WE_TestResult;
  logic [7:0]        Stack_in, TestResult_in;
  logic              ProcessorBusy, IsStopInstruction, IsProcessing, step_taken;
  logic              next_instruction, proc_reset, BreakF, ErrF, RunF;
  dp_view_t          view;

  logic [ADDR_W-1:0] inst_addr_a, inst_addr_b, td_addr_a, td_addr_b, tr_addr_a, tr_addr_b;
  logic              inst_we_a, td_we_a, tr_we_a;
  logic [7:0]        inst_din_a, td_din_a, tr_din_a;
  logic [7:0]        Instruction_a, Instruction_b, TestData_a, TestData_b, TestResult_a, TestResult_b;

  uart #(.CLOCK_DIVIDE(CLOCK_DIVIDE)) u_uart (
    .clk, .reset, .rx, .tx, .transmit, .tx_byte, .received, .rx_byte,
    .rcv_error, .is_transmitting
  );

  user_comm_unit u_comm (
    .clk, .reset, .rx_byte, .received, .rcv_error, .is_transmitting, .tx_byte, .transmit,
    .PCRead_reg, .PCWrite_reg, .DCRead_reg, .DCWrite_reg, .RCRead_reg, .RCWrite_reg,
    .PCRead_p, .PCWrite_p, .DCRead_p, .DCWrite_p, .RCRead_p, .RCWrite_p,
    .WE_Instruction, .WE_TestData,
    .Instruction_a, .TestData_a, .TestResult_b,
    .dp_view(view), .step_taken, .next_instruction, .proc_reset, .BreakF, .ErrF, .RunF
  );

  tacp_mem_mux u_mux (
    .clk, .reset, .ProcessorBusy, .IsStopInstruction, .IsProcessing,
    .PCRead_d, .DCRead_d, .RCRead_d, .RCWrite_d, .SPWrite, .Push, .Stack_in,
    .WE_TestResult, .TestResult_in,
    .PCRead_p, .PCWrite_p, .DCRead_p, .DCWrite_p, .RCRead_p, .RCWrite_p,
    .WE_Instruction, .WE_TestData, .rx_byte,
    .PCRead_reg, .PCWrite_reg, .DCRead_reg, .DCWrite_reg, .RCRead_reg, .RCWrite_reg,
    .inst_addr_a, .inst_we_a, .inst_din_a, .inst_addr_b,
    .td_addr_a, .td_we_a, .td_din_a, .td_addr_b,
    .tr_addr_a, .tr_we_a, .tr_din_a, .tr_addr_b
  );

  tacp_dpram #(.ADDR_W(ADDR_W)) u_inst_mem (
    .clk, .addr_a(inst_addr_a), .we_a(inst_we_a), .din_a(inst_din_a), .dout_a(Instruction_a),
    .addr_b(inst_addr_b), .dout_b(Instruction_b)
  );
  tacp_dpram #(.ADDR_W(ADDR_W)) u_td_mem (
    .clk, .addr_a(td_addr_a), .we_a(td_we_a), .din_a(td_din_a), .dout_a(TestData_a),
    .addr_b(td_addr_b), .dout_b(TestData_b)
  );
  tacp_dpram #(.ADDR_W(ADDR_W)) u_tr_mem (
    .clk, .addr_a(tr_addr_a), .we_a(tr_we_a), .din_a(tr_din_a), .dout_a(TestResult_a),
    .addr_b(tr_addr_b), .dout_b(TestResult_b)
  );

  tacp_processor u_proc (
    .clk, .reset(reset | proc_reset), .next_instruction, .HFCLK_Meas_ACK,
    .Instruction_a, .Instruction_b, .TestData_b, .TestResult_a, .TestResult_b,
    .PCRead_reg, .DCRead_reg, .RCRead_reg, .RCWrite_reg,
    .PCRead_d, .DCRead_d, .RCRead_d, .RCWrite_d,
    .SPWrite, .Push, .Stack_in, .WE_TestResult, .TestResult_in,
    .ProcessorBusy, .IsStopInstruction, .step_taken,
    .PS_Mask_Data_out, .Test_Data_out, .TResult_out, .CLK_FR_out,
    .PS_Mask_Data_in, .Strobe_in_PMask, .Test_Data_in, .Strobe_in_TData, .Strobe_out_TR,
    .AaC, .CLK_CW_in, .Strobe_in_CLK_CR, .Strobe_out_CLK_FR, .HFCLK_Meas_Req, .CLK_Sel,
    .view
  );

  assign status = {ErrF, RunF, BreakF, IsProcessing};

endmodule
