// tacp_datapath: registers and arithmetic of the TACP processor.
//
// Holds the instruction register (IR), the 32-bit count register (CR), the
// 4-bit word counter (WC), the test-data (TD), test-result (TR) and
// selection-mask (SM) shift registers, the 16-bit frequency (FR) and clock
// control word (CW) registers, the 32-bit user counter (UC), the stack
// pointer (SP) and the compare (CF), high-frequency-clock (SF) and busy
// flags. Every register changes only when the micro-operation that names it
// is high in the current control-store entry.
//
// Two "previous parameter" byte registers turn the byte-wide memories into
// 16-bit parameters: PrevParam_b takes the program-memory byte on each
// Increment_PC, so {Instruction_b, PrevParam_b} is the 16-bit little-endian
// parameter whose high byte is being read now; PrevParam_a does the same for
// the stack port on Pop1. The data path computes the next values of the
// program, test-data and test-result address registers (PCRead_d etc.),
// which live in the memory multiplexer. Stack pushes write (PC+1) high
// byte first (Push_PC2) then low byte (Push_PC1) at the current SP, which
// counts down from 0 (so the stack occupies the top of instruction memory).
//
// Chip-side serial signals: Test_Data_in is TD bit 0 (TD shifts right with
// the loop-back Test_Data_out entering at bit 7), TR shifts right taking
// TResult_out at bit 7, SM shifts left taking PS_Mask_Data_out at bit 0 and
// is cleared by Load_CR_Low, CW rotates left with CLK_CW_in = CW[15], FR
// shifts right taking CLK_FR_out at bit 15. PS_Mask_Data_in is the port
// comparator output (CR low half equal to the port-number parameter).
//
// The register set, widths (except FR) and micro-operations follow the
// published data path; FR is 16 bits here because the frequency register
// is read with sixteen shifts. Shift-before-load priority on TD and the
// little-endian 16-bit parameters are this implementation's reading. All
// registers are cleared by reset.
module tacp_datapath
  import tacp_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  uops_t             ops,
  // memory data
  input  logic [7:0]        Instruction_a,
  input  logic [7:0]        Instruction_b,
  input  logic [7:0]        TestData_b,
  input  logic [7:0]        TestResult_a,
  input  logic [7:0]        TestResult_b,
  // address registers (current) and their next values
  input  logic [ADDR_W-1:0] PCRead_reg,
  input  logic [ADDR_W-1:0] DCRead_reg,
  input  logic [ADDR_W-1:0] RCRead_reg,
  input  logic [ADDR_W-1:0] RCWrite_reg,
  output logic [ADDR_W-1:0] PCRead_d,
  output logic [ADDR_W-1:0] DCRead_d,
  output logic [ADDR_W-1:0] RCRead_d,
  output logic [ADDR_W-1:0] RCWrite_d,
  // stack and result writes
  output logic [ADDR_W-1:0] SPWrite,
  output logic              Push,
  output logic [7:0]        Stack_in,
  output logic              WE_TestResult,
  output logic [7:0]        TestResult_in,
  // sequencer
  output logic [OPC_W-1:0]  OpCode,
  output logic              CR_IsZero,
  output logic              WC_IsZero,
  output logic              UC_IsZero,
  output logic              CF_IsNotEqual,
  output logic              ProcessorBusy,
  // chip serial interface
  input  logic              PS_Mask_Data_out,
  input  logic              Test_Data_out,
  input  logic              TResult_out,
  input  logic              CLK_FR_out,
  output logic              PS_Mask_Data_in,
  output logic              Test_Data_in,
  output logic              CLK_CW_in,
  output logic              CLK_Sel,
  output dp_view_t          view
);

  logic [7:0]  PrevParam_a, PrevParam_b;
  logic [15:0] Instruction_a_16, Instruction_b_16;
  logic [5:0]  IR;
  logic [31:0] CR, UC;
  logic [3:0]  WC;
  logic [7:0]  TD, TR, SM;
  logic [15:0] FR, CW, SP, PC_plus1;
  logic        CF, SF, Busy;
  logic [7:0]  cmp;

  assign Instruction_a_16 = {Instruction_a, PrevParam_a};
  assign Instruction_b_16 = {Instruction_b, PrevParam_b};
  assign PC_plus1         = PCRead_reg + 1'b1;
  assign cmp              = TestData_b ^ TestResult_b;

  // address next values
  always_comb begin
    if (ops.Load_PC_Instruction2) PCRead_d = Instruction_b_16;
    else if (ops.Pop_PC2)         PCRead_d = Instruction_a_16;
    else if (ops.Increment_PC)    PCRead_d = PC_plus1;
    else                          PCRead_d = PCRead_reg;

    if (ops.Load_DC_Instruction2) DCRead_d = Instruction_b_16;
    else if (ops.Increment_DC)    DCRead_d = DCRead_reg + 1'b1;
    else                          DCRead_d = DCRead_reg;

    if (ops.Load_RCRead_Instruction2) RCRead_d = Instruction_b_16;
    else if (ops.Increment_RCRead)    RCRead_d = RCRead_reg + 1'b1;
    else                              RCRead_d = RCRead_reg;

    if (ops.Load_RCWrite_Instruction2) RCWrite_d = Instruction_b_16;
    else if (ops.Increment_RCWrite)    RCWrite_d = RCWrite_reg + 1'b1;
    else                               RCWrite_d = RCWrite_reg;
  end

  // result-memory write data
  always_comb begin
    TestResult_in = TR;
    if (ops.Store_TestResults_Compare) TestResult_in = cmp;
    else if (ops.Store_UC[0])          TestResult_in = UC[7:0];
    else if (ops.Store_UC[1])          TestResult_in = UC[15:8];
    else if (ops.Store_UC[2])          TestResult_in = UC[23:16];
    else if (ops.Store_UC[3])          TestResult_in = UC[31:24];
  end
  assign WE_TestResult = ops.Store_TestResults_TR | ops.Store_TestResults_Compare | (|ops.Store_UC);

  assign SPWrite  = SP;
  assign Push     = ops.Push_PC1 | ops.Push_PC2;
  assign Stack_in = ops.Push_PC1 ? PC_plus1[7:0] : PC_plus1[15:8];

  always_ff @(posedge clk) begin
    if (reset) begin
      PrevParam_a <= '0;
      PrevParam_b <= '0;
      IR   <= '0;
      CR   <= '0;
      WC   <= '0;
      TD   <= '0;
      TR   <= '0;
      SM   <= '0;
      FR   <= '0;
      CW   <= '0;
      UC   <= '0;
      SP   <= '0;
      CF   <= 1'b0;
      SF   <= 1'b0;
      Busy <= 1'b0;
    end else begin
      if (ops.Increment_PC) PrevParam_b <= Instruction_b;
      if (ops.Pop1)         PrevParam_a <= Instruction_a;
      if (ops.Load_IR_Instruction) IR <= Instruction_b[5:0];

      if (ops.Load_CR_Low_Instruction2)       CR[15:0]  <= Instruction_b_16;
      else if (ops.Load_CR_High_Instruction2) CR[31:16] <= Instruction_b_16;
      else if (ops.Decrement_CR)              CR        <= CR - 1'b1;

      if (ops.Load_WC_Instruction) WC <= Instruction_b[3:0];
      else if (ops.Decrement_WC)   WC <= WC - 1'b1;

      if (ops.ClearTD)               TD <= '0;
      else if (ops.Shift_TestData)   TD <= {Test_Data_out, TD[7:1]};
      else if (ops.Load_TD_TestData) TD <= TestData_b;

      if (ops.ClearTR)            TR <= '0;
      else if (ops.Strobe_out_TR) TR <= {TResult_out, TR[7:1]};

      if (ops.Load_CR_Low_Instruction2) SM <= '0;
      else if (ops.Strobe_in_PMask)     SM <= {SM[6:0], PS_Mask_Data_out};

      if (ops.Strobe_out_CLK_FR) FR <= {CLK_FR_out, FR[15:1]};

      if (ops.Load_CW_Instruction2) CW <= Instruction_b_16;
      else if (ops.INC_CW)          CW <= CW + 1'b1;
      else if (ops.DEC_CW)          CW <= CW - 1'b1;
      else if (ops.Strobe_in_CLK_CR) CW <= {CW[14:0], CW[15]};

      if (ops.Load_UC_Low)       UC[15:0]  <= Instruction_b_16;
      else if (ops.Load_UC_High) UC[31:16] <= Instruction_b_16;
      else if (ops.Load_UC_TR[0]) UC[7:0]   <= TestResult_a;
      else if (ops.Load_UC_TR[1]) UC[15:8]  <= TestResult_a;
      else if (ops.Load_UC_TR[2]) UC[23:16] <= TestResult_a;
      else if (ops.Load_UC_TR[3]) UC[31:24] <= TestResult_a;
      else if (ops.INC_UC)       UC <= UC + 1'b1;
      else if (ops.DEC_UC)       UC <= UC - 1'b1;

      if (ops.DEC_SP)                     SP <= SP - 1'b1;
      else if (ops.Pop1 || ops.Pop_PC2)   SP <= SP + 1'b1;

      if (ops.ResetCF)                                       CF <= 1'b0;
      else if (ops.Store_TestResults_Compare && cmp != '0)   CF <= 1'b1;

      if (ops.SetHFClock)        SF <= 1'b1;
      else if (ops.ResetHFClock) SF <= 1'b0;

      if (ops.SetBusy)        Busy <= 1'b1;
      else if (ops.ResetBusy) Busy <= 1'b0;
    end
  end

  assign OpCode          = IR;
  assign CR_IsZero       = (CR == '0);
  assign WC_IsZero       = (WC == '0);
  assign UC_IsZero       = (UC == '0);
  assign CF_IsNotEqual   = CF;
  assign ProcessorBusy   = Busy;
  assign PS_Mask_Data_in = (CR[15:0] == Instruction_b_16);
  assign Test_Data_in    = TD[0];
  assign CLK_CW_in       = CW[15];
  assign CLK_Sel         = SF;

  always_comb begin
    view      = '0;
    view.IR   = IR;
    view.SP   = SP;
    view.UC   = UC;
    view.CW   = CW;
    view.FR   = FR;
    view.SM   = SM;
    view.TD   = TD;
    view.TR   = TR;
    view.CF   = CF;
    view.SF   = SF;
    view.ZF   = UC_IsZero;
    view.Busy = Busy;
  end

endmodule
