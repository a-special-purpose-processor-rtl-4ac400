// tacp_mem_mux: the six memory address registers and the multiplexers that
// share the three memories between the processor and the user
// communication unit.
//
// IsProcessing = ProcessorBusy && !IsStopInstruction. While it is high the
// processor owns the memories: the address registers take the processor's
// next values, the instruction memory's port a is addressed by the stack
// pointer and written with Stack_in on Push, and the test-result memory's
// port a is written with TestResult_in. While it is low the protocol owns
// them: the registers take the protocol's next values and the instruction
// and test-data memories' port a are written with the received byte.
// Only the processor writes the test-result memory; only the protocol
// writes the test-data memory.
//
// Each register's next value is also the address presented to its memory
// port, so memory outputs always show the byte at the register's current
// address (see tacp_dpram). The stack pointer is presented as it is (its
// current value), so a push writes at the current SP.
//
// The sharing rule follows the published description; the exact form of
// IsProcessing (excluding the stop loop, so that the host can read results
// after a program has stopped) is this implementation's choice.
module tacp_mem_mux
  import tacp_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              ProcessorBusy,
  input  logic              IsStopInstruction,
  output logic              IsProcessing,
  // processor requests
  input  logic [ADDR_W-1:0] PCRead_d,
  input  logic [ADDR_W-1:0] DCRead_d,
  input  logic [ADDR_W-1:0] RCRead_d,
  input  logic [ADDR_W-1:0] RCWrite_d,
  input  logic [ADDR_W-1:0] SPWrite,
  input  logic              Push,
  input  logic [7:0]        Stack_in,
  input  logic              WE_TestResult,
  input  logic [7:0]        TestResult_in,
  // protocol requests
  input  logic [ADDR_W-1:0] PCRead_p,
  input  logic [ADDR_W-1:0] PCWrite_p,
  input  logic [ADDR_W-1:0] DCRead_p,
  input  logic [ADDR_W-1:0] DCWrite_p,
  input  logic [ADDR_W-1:0] RCRead_p,
  input  logic [ADDR_W-1:0] RCWrite_p,
  input  logic              WE_Instruction,
  input  logic              WE_TestData,
  input  logic [7:0]        rx_byte,
  // address registers
  output logic [ADDR_W-1:0] PCRead_reg,
  output logic [ADDR_W-1:0] PCWrite_reg,
  output logic [ADDR_W-1:0] DCRead_reg,
  output logic [ADDR_W-1:0] DCWrite_reg,
  output logic [ADDR_W-1:0] RCRead_reg,
  output logic [ADDR_W-1:0] RCWrite_reg,
  // memory ports
  output logic [ADDR_W-1:0] inst_addr_a,
  output logic              inst_we_a,
  output logic [7:0]        inst_din_a,
  output logic [ADDR_W-1:0] inst_addr_b,
  output logic [ADDR_W-1:0] td_addr_a,
  output logic              td_we_a,
  output logic [7:0]        td_din_a,
  output logic [ADDR_W-1:0] td_addr_b,
  output logic [ADDR_W-1:0] tr_addr_a,
  output logic              tr_we_a,
  output logic [7:0]        tr_din_a,
  output logic [ADDR_W-1:0] tr_addr_b
);

  logic [ADDR_W-1:0] PCRead_n, PCWrite_n, DCRead_n, DCWrite_n, RCRead_n, RCWrite_n;

  assign IsProcessing = ProcessorBusy && !IsStopInstruction;

  always_comb begin
    if (IsProcessing) begin
      PCRead_n  = PCRead_d;
      PCWrite_n = PCWrite_reg;
      DCRead_n  = DCRead_d;
      DCWrite_n = DCWrite_reg;
      RCRead_n  = RCRead_d;
      RCWrite_n = RCWrite_d;
    end else begin
      PCRead_n  = PCRead_p;
      PCWrite_n = PCWrite_p;
      DCRead_n  = DCRead_p;
      DCWrite_n = DCWrite_p;
      RCRead_n  = RCRead_p;
      RCWrite_n = RCWrite_p;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      PCRead_reg  <= '0;
      PCWrite_reg <= '0;
      DCRead_reg  <= '0;
      DCWrite_reg <= '0;
      RCRead_reg  <= '0;
      RCWrite_reg <= '0;
    end else begin
      PCRead_reg  <= PCRead_n;
      PCWrite_reg <= PCWrite_n;
      DCRead_reg  <= DCRead_n;
      DCWrite_reg <= DCWrite_n;
      RCRead_reg  <= RCRead_n;
      RCWrite_reg <= RCWrite_n;
    end
  end

  assign inst_addr_a = IsProcessing ? SPWrite  : PCWrite_n;
  assign inst_we_a   = IsProcessing ? Push     : WE_Instruction;
  assign inst_din_a  = IsProcessing ? Stack_in : rx_byte;
  assign inst_addr_b = PCRead_n;

  assign td_addr_a   = DCWrite_n;
  assign td_we_a     = !IsProcessing && WE_TestData;
  assign td_din_a    = rx_byte;
  assign td_addr_b   = DCRead_n;

  assign tr_addr_a   = RCWrite_n;
  assign tr_we_a     = IsProcessing && WE_TestResult;
  assign tr_din_a    = TestResult_in;
  assign tr_addr_b   = RCRead_n;

endmodule
