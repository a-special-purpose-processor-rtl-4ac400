// tacp_processor: the microprogrammed TACP processor core.
//
// Joins the sequencer, the control store and the data path. The control
// store entry at mAddress drives the data path's micro-operations and the
// strobes to the chip under test (Strobe_in_PMask, Strobe_in_TData,
// Strobe_out_TR, Strobe_in_CLK_CR, Strobe_out_CLK_FR, AaC, HFCLK_Meas_Req);
// the sequencer picks the next micro-address from the entry's condition,
// the data-path flags and the two external inputs next_instruction (from
// the user communication unit) and HFCLK_Meas_ACK (from the frequency
// measurement circuit). One micro-instruction executes per clock; a
// strobe is high for exactly the cycles of the entries that name it.
// step_taken marks the fetch cycle that accepts an instruction.
//
// The split into sequencer, control store and data path follows the
// published processor; reset here also covers the host's "reset" command.
module tacp_processor
  import tacp_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              next_instruction,
  input  logic              HFCLK_Meas_ACK,
  // memory data
  input  logic [7:0]        Instruction_a,
  input  logic [7:0]        Instruction_b,
  input  logic [7:0]        TestData_b,
  input  logic [7:0]        TestResult_a,
  input  logic [7:0]        TestResult_b,
  input  logic [ADDR_W-1:0] PCRead_reg,
  input  logic [ADDR_W-1:0] DCRead_reg,
  input  logic [ADDR_W-1:0] RCRead_reg,
  input  logic [ADDR_W-1:0] RCWrite_reg,
  output logic [ADDR_W-1:0] PCRead_d,
  output logic [ADDR_W-1:0] DCRead_d,
  output logic [ADDR_W-1:0] RCRead_d,
  output logic [ADDR_W-1:0] RCWrite_d,
  output logic [ADDR_W-1:0] SPWrite,
  output logic              Push,
  output logic [7:0]        Stack_in,
  output logic              WE_TestResult,
  output logic [7:0]        TestResult_in,
  output logic              ProcessorBusy,
  output logic              IsStopInstruction,
  output logic              step_taken,
  // chip interface
  input  logic              PS_Mask_Data_out,
  input  logic              Test_Data_out,
  input  logic              TResult_out,
  input  logic              CLK_FR_out,
  output logic              PS_Mask_Data_in,
  output logic              Strobe_in_PMask,
  output logic              Test_Data_in,
  output logic              Strobe_in_TData,
  output logic              Strobe_out_TR,
  output logic              AaC,
  output logic              CLK_CW_in,
  output logic              Strobe_in_CLK_CR,
  output logic              Strobe_out_CLK_FR,
  output logic              HFCLK_Meas_Req,
  output logic              CLK_Sel,
  output dp_view_t          view
);

  logic [UADDR_W-1:0] mAddress;
  cs_entry_t          entry;
  logic [OPC_W-1:0]   OpCode;
  logic               CR_IsZero, WC_IsZero, UC_IsZero, CF_IsNotEqual;

  tacp_sequencer u_seq (
    .clk, .reset, .sel(entry.sel), .branch(entry.branch), .OpCode,
    .next_instruction, .CR_IsZero, .WC_IsZero, .UC_IsZero, .CF_IsNotEqual,
    .HFCLK_Meas_ACK, .mAddress
  );

  tacp_control_store u_cs (.mAddress, .entry);

  tacp_datapath u_dp (
    .clk, .reset, .ops(entry.ops),
    .Instruction_a, .Instruction_b, .TestData_b, .TestResult_a, .TestResult_b,
    .PCRead_reg, .DCRead_reg, .RCRead_reg, .RCWrite_reg,
    .PCRead_d, .DCRead_d, .RCRead_d, .RCWrite_d,
    .SPWrite, .Push, .Stack_in, .WE_TestResult, .TestResult_in,
    .OpCode, .CR_IsZero, .WC_IsZero, .UC_IsZero, .CF_IsNotEqual, .ProcessorBusy,
    .PS_Mask_Data_out, .Test_Data_out, .TResult_out, .CLK_FR_out,
    .PS_Mask_Data_in, .Test_Data_in, .CLK_CW_in, .CLK_Sel, .view
  );

  assign IsStopInstruction = entry.ops.IsStopInstruction;
  assign step_taken        = entry.ops.Load_IR_Instruction;
  assign Strobe_in_PMask   = entry.ops.Strobe_in_PMask;
  assign Strobe_in_TData   = entry.ops.Strobe_in_TData;
  assign Strobe_out_TR     = entry.ops.Strobe_out_TR;
  assign AaC               = entry.ops.AaC;
  assign Strobe_in_CLK_CR  = entry.ops.Strobe_in_CLK_CR;
  assign Strobe_out_CLK_FR = entry.ops.Strobe_out_CLK_FR;
  assign HFCLK_Meas_Req    = entry.ops.HFCLK_Meas_Req;

endmodule
