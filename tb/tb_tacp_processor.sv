// tb_tacp_processor: runs a short test program on the processor core with
// testbench memories that behave like the real ones (synchronous, address
// = the register's next value) and a testbench model of the chip side.
// Program: SendSelectionMask (window 3, port 1), SendTestData (2 words of
// 5 bits), ApplyAndCapture, ReadResult (1 word of 5 bits), Stop.
// Checks: the mask bits and strobe count, the serial test-data bits and
// their count, AaC high for exactly four consecutive clocks, the result
// byte stored in the result memory, Busy and the Stop loop.
module tb_tacp_processor;
  import tacp_pkg::*;
  logic clk = 0, reset = 1, next_instruction = 1, HFCLK_Meas_ACK = 1;
  logic [7:0] Instruction_a, Instruction_b, TestData_b, TestResult_a, TestResult_b;
  logic [15:0] PCRead_reg, DCRead_reg, RCRead_reg, RCWrite_reg;
  logic [15:0] PCRead_d, DCRead_d, RCRead_d, RCWrite_d, SPWrite;
  logic Push, WE_TestResult, ProcessorBusy, IsStopInstruction, step_taken;
  logic [7:0] Stack_in, TestResult_in;
  logic PS_Mask_Data_out = 0, Test_Data_out = 0, TResult_out = 0, CLK_FR_out = 0;
  logic PS_Mask_Data_in, Strobe_in_PMask, Test_Data_in, Strobe_in_TData, Strobe_out_TR, AaC;
  logic CLK_CW_in, Strobe_in_CLK_CR, Strobe_out_CLK_FR, HFCLK_Meas_Req, CLK_Sel;
  dp_view_t view;
  int checks = 0, failures = 0;

  tacp_processor dut (.*);
  always #5 clk = ~clk;

  logic [7:0] imem [256], tdmem [256], trmem [256];
  always_ff @(posedge clk) begin
    if (reset) begin
      PCRead_reg <= 0; DCRead_reg <= 0; RCRead_reg <= 0; RCWrite_reg <= 16'h00FF;
      Instruction_b <= imem[0]; TestData_b <= tdmem[0];
    end else begin
      PCRead_reg <= PCRead_d; DCRead_reg <= DCRead_d; RCRead_reg <= RCRead_d; RCWrite_reg <= RCWrite_d;
      Instruction_b <= imem[PCRead_d[7:0]];
      TestData_b    <= tdmem[DCRead_d[7:0]];
      TestResult_b  <= trmem[RCRead_d[7:0]];
      if (WE_TestResult) trmem[RCWrite_d[7:0]] <= TestResult_in;
      TestResult_a  <= WE_TestResult ? TestResult_in : trmem[RCWrite_d[7:0]];
      if (Push) imem[SPWrite[7:0]] <= Stack_in;
      Instruction_a <= imem[SPWrite[7:0]];
    end
  end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // strobe monitors
  int n_mask = 0, n_td = 0, n_tr = 0, aac_run = 0, aac_max = 0, aac_runs = 0;
  logic [9:0] td_bits, mask_bits;
  logic [4:0] res_bits;
  always @(posedge clk) if (!reset) begin
    if (Strobe_in_PMask) begin mask_bits[n_mask] = PS_Mask_Data_in; n_mask++; end
    if (Strobe_in_TData) begin td_bits[n_td] = Test_Data_in; n_td++; end
    if (Strobe_out_TR) n_tr++;
    if (AaC) aac_run++;
    else begin
      if (aac_run > 0) aac_runs++;
      if (aac_run > aac_max) aac_max = aac_run;
      aac_run = 0;
    end
  end
  // chip model: result bits presented one per strobe, bit 0 first
  always @(negedge clk) TResult_out = (n_tr < 5) ? res_bits[n_tr] : 1'b0;

  initial begin
    logic [7:0] prog [$];
    prog = '{8'h1C, 8'h02, 8'h00, 8'h00, 8'h00, 8'h01, 8'h00,
             8'h1D, 8'h01, 8'h00, 8'h00, 8'h00, 8'h02,
             8'h01,
             8'h17, 8'h00, 8'h00, 8'h00, 8'h00, 8'h03,
             8'h20};
    foreach (imem[i]) begin imem[i] = 0; tdmem[i] = 0; trmem[i] = 0; end
    foreach (prog[i]) imem[i] = prog[i];
    tdmem[0] = 8'($urandom); tdmem[1] = 8'($urandom);
    res_bits = 5'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk); reset = 0;
    while (!IsStopInstruction) @(posedge clk);
    repeat (3) @(posedge clk);
    check(n_mask == 3 && mask_bits[2:0] == 3'b010, $sformatf("mask strobes %0d bits %b", n_mask, mask_bits[2:0]));
    check(n_td == 10, $sformatf("test data strobes %0d", n_td));
    check(td_bits == {tdmem[1][4:0], tdmem[0][4:0]}, $sformatf("test data bits %b", td_bits));
    check(aac_runs == 1 && aac_max == 4, $sformatf("AaC high %0d cycles", aac_max));
    // P+3 strobes: the byte is stored after P+2, in the cycle of the last one
    check(n_tr == 6, $sformatf("result strobes %0d", n_tr));
    check(trmem[0] == {res_bits, 3'b000}, $sformatf("stored result %h expected %h", trmem[0], {res_bits, 3'b000}));
    check(ProcessorBusy && IsStopInstruction, "busy in the Stop loop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
