// tb_tacp_datapath: drives micro-operations one clock at a time and checks
// the registers against values worked out by hand: 16-bit parameters built
// from the previous byte, CR/WC loading and counting with their zero flags,
// the port comparator, TD load/shift/clear and its serial output, TR and
// SM shifting, CW load/increment/rotation, FR shifting, the user counter
// loads and counting, compare and CF, stack pointer and push data, and the
// next program-counter value.
module tb_tacp_datapath;
  import tacp_pkg::*;
  logic clk = 0, reset = 1;
  uops_t ops;
  logic [7:0] Instruction_a = 0, Instruction_b = 0, TestData_b = 0, TestResult_a = 0, TestResult_b = 0;
  logic [15:0] PCRead_reg = 16'h0100, DCRead_reg = 0, RCRead_reg = 0, RCWrite_reg = 0;
  logic [15:0] PCRead_d, DCRead_d, RCRead_d, RCWrite_d, SPWrite;
  logic Push, WE_TestResult, CR_IsZero, WC_IsZero, UC_IsZero, CF_IsNotEqual, ProcessorBusy;
  logic [7:0] Stack_in, TestResult_in;
  logic [5:0] OpCode;
  logic PS_Mask_Data_out = 0, Test_Data_out = 0, TResult_out = 0, CLK_FR_out = 0;
  logic PS_Mask_Data_in, Test_Data_in, CLK_CW_in, CLK_Sel;
  dp_view_t view;
  int checks = 0, failures = 0;

  tacp_datapath dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // apply one micro-instruction for one clock
  task automatic step(input uops_t o, input logic [7:0] ib);
    @(negedge clk);
    ops = o; Instruction_b = ib;
    @(posedge clk); #1;
    ops = '0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    uops_t o;
    ops = '0;
    @(negedge clk); @(negedge clk); reset = 0;
    // 16-bit CR load: low byte arrives with Increment_PC, high byte with the load
    o = '0; o.Increment_PC = 1; step(o, 8'h03);
    o = '0; o.Load_CR_Low_Instruction2 = 1; step(o, 8'h00);
    check(view.SM == 0, "SM cleared by CR load");
    o = '0; o.Increment_PC = 1; step(o, 8'h00);
    o = '0; o.Load_CR_High_Instruction2 = 1; step(o, 8'h00);
    check(!CR_IsZero, "CR loaded with 3");
    for (int i = 0; i < 3; i++) begin o = '0; o.Decrement_CR = 1; step(o, 8'h00); end
    check(CR_IsZero, "CR counted to zero");
    // port comparator: CR low half equals {Instruction_b, previous byte}
    o = '0; o.Increment_PC = 1; step(o, 8'h00);
    @(negedge clk); Instruction_b = 8'h00; #1;
    check(PS_Mask_Data_in, "port comparator equal");
    Instruction_b = 8'h01; #1;
    check(!PS_Mask_Data_in, "port comparator different");
    // WC
    o = '0; o.Load_WC_Instruction = 1; step(o, 8'hF2);
    check(!WC_IsZero, "WC loaded");
    o = '0; o.Decrement_WC = 1; step(o, 0); step(o, 0);
    check(WC_IsZero, "WC to zero");
    // TD
    @(negedge clk); TestData_b = 8'hA5;
    o = '0; o.Load_TD_TestData = 1; step(o, 0);
    check(view.TD == 8'hA5 && Test_Data_in == 1'b1, "TD load and serial out");
    @(negedge clk); Test_Data_out = 1;
    o = '0; o.Shift_TestData = 1; step(o, 0);
    check(view.TD == 8'hD2 && Test_Data_in == 1'b0, "TD shift right with loop-back in");
    o = '0; o.ClearTD = 1; step(o, 0);
    check(view.TD == 8'h00, "TD clear");
    // TR
    @(negedge clk); TResult_out = 1;
    o = '0; o.Strobe_out_TR = 1; step(o, 0); step(o, 0);
    check(view.TR == 8'hC0, "TR shifts result bits in at the top");
    o = '0; o.ClearTR = 1; step(o, 0);
    check(view.TR == 0, "TR clear");
    // SM
    @(negedge clk); PS_Mask_Data_out = 1;
    o = '0; o.Strobe_in_PMask = 1; step(o, 0);
    @(negedge clk); PS_Mask_Data_out = 0;
    step(o, 0);
    check(view.SM == 8'h02, "SM shifts left");
    // CW
    o = '0; o.Increment_PC = 1; step(o, 8'h34);
    o = '0; o.Load_CW_Instruction2 = 1; step(o, 8'h92);
    check(view.CW == 16'h9234 && CLK_CW_in == 1'b1, "CW load, MSB on serial line");
    o = '0; o.Strobe_in_CLK_CR = 1;
    for (int i = 0; i < 16; i++) step(o, 0);
    check(view.CW == 16'h9234, "CW rotated back after 16 strobes");
    o = '0; o.INC_CW = 1; step(o, 0);
    check(view.CW == 16'h9235, "INC_CW");
    // FR
    @(negedge clk); CLK_FR_out = 1;
    o = '0; o.Strobe_out_CLK_FR = 1; step(o, 0);
    check(view.FR == 16'h8000, "FR shifts in at the top");
    // UC
    o = '0; o.Increment_PC = 1; step(o, 8'h01);
    o = '0; o.Load_UC_Low = 1; step(o, 8'h00);
    o = '0; o.DEC_UC = 1; step(o, 0);
    check(UC_IsZero && view.ZF, "UC to zero");
    @(negedge clk); TestResult_a = 8'h5A;
    o = '0; o.Load_UC_TR = 4'b0100; step(o, 0);
    check(view.UC == 32'h005A_0000, "Load_UC_TR3 fills byte 2");
    o = '0; o.Store_UC = 4'b0100;
    @(negedge clk); ops = o; #1;
    check(WE_TestResult && TestResult_in == 8'h5A, "Store_UC3 writes byte 2");
    @(posedge clk); #1 ops = '0;
    // compare
    @(negedge clk); TestData_b = 8'h33; TestResult_b = 8'h31;
    o = '0; o.Store_TestResults_Compare = 1;
    ops = o; #1;
    check(WE_TestResult && TestResult_in == 8'h02, "compare writes the difference");
    @(posedge clk); #1 ops = '0;
    check(CF_IsNotEqual, "CF set on difference");
    o = '0; o.ResetCF = 1; step(o, 0);
    check(!CF_IsNotEqual, "ResetCF");
    // stack
    o = '0; o.DEC_SP = 1; step(o, 0); step(o, 0);
    check(SPWrite == 16'hFFFE, "SP counts down from 0");
    @(negedge clk); o = '0; o.Push_PC1 = 1; ops = o; #1;
    check(Push && Stack_in == 8'h01, "push low byte of PC+1");
    o = '0; o.Push_PC2 = 1; ops = o; #1;
    check(Push && Stack_in == 8'h01, "push high byte of PC+1");
    @(posedge clk); #1 ops = '0;
    // program counter next value
    @(negedge clk); o = '0; o.Increment_PC = 1; ops = o; #1;
    check(PCRead_d == 16'h0101, "PC increment");
    o = '0; o.Load_PC_Instruction2 = 1; Instruction_b = 8'h47; ops = o; #1;
    check(PCRead_d[15:8] == 8'h47, "PC load from parameter");
    @(posedge clk); #1 ops = '0;
    // flags
    o = '0; o.SetHFClock = 1; step(o, 0);
    check(CLK_Sel, "SetHFClock");
    o = '0; o.SetBusy = 1; step(o, 0);
    check(ProcessorBusy, "SetBusy");
    o = '0; o.Load_IR_Instruction = 1; step(o, 8'h1D);
    check(OpCode == 6'h1D, "IR load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
