// tb_tacp_mem_mux: checks the memory sharing rule. With the processor idle
// (or in its Stop loop) the address registers follow the protocol's next
// values and the protocol writes the instruction and test-data memories;
// while the processor runs they follow the processor's next values, the
// instruction memory's port a is addressed by the stack pointer and written
// on Push, the test-result memory is written on WE_TestResult, and the
// protocol cannot write.
module tb_tacp_mem_mux;
  logic clk = 0, reset = 1, ProcessorBusy = 0, IsStopInstruction = 0, IsProcessing;
  logic [15:0] PCRead_d, DCRead_d, RCRead_d, RCWrite_d, SPWrite;
  logic [15:0] PCRead_p, PCWrite_p, DCRead_p, DCWrite_p, RCRead_p, RCWrite_p;
  logic Push, WE_TestResult, WE_Instruction, WE_TestData;
  logic [7:0] Stack_in, TestResult_in, rx_byte;
  logic [15:0] PCRead_reg, PCWrite_reg, DCRead_reg, DCWrite_reg, RCRead_reg, RCWrite_reg;
  logic [15:0] inst_addr_a, inst_addr_b, td_addr_a, td_addr_b, tr_addr_a, tr_addr_b;
  logic inst_we_a, td_we_a, tr_we_a;
  logic [7:0] inst_din_a, td_din_a, tr_din_a;
  int checks = 0, failures = 0;

  tacp_mem_mux dut (.*);
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
    @(negedge clk); @(negedge clk); reset = 0;
    for (int n = 0; n < 1000; n++) begin
      logic busy, stop, proc;
      @(negedge clk);
      busy = 1'($urandom); stop = 1'($urandom);
      ProcessorBusy = busy; IsStopInstruction = stop;
      {PCRead_d, DCRead_d, RCRead_d, RCWrite_d, SPWrite} = {$urandom, $urandom, $urandom};
      {PCRead_p, PCWrite_p, DCRead_p, DCWrite_p, RCRead_p, RCWrite_p} = {$urandom, $urandom, $urandom};
      {Push, WE_TestResult, WE_Instruction, WE_TestData} = 4'($urandom);
      {Stack_in, TestResult_in, rx_byte} = 24'($urandom);
      proc = busy && !stop;
      #1;
      check(IsProcessing == proc, "IsProcessing");
      check(inst_addr_a == (proc ? SPWrite : PCWrite_p), "instruction port a address");
      check(inst_we_a == (proc ? Push : WE_Instruction), "instruction write enable");
      check(inst_din_a == (proc ? Stack_in : rx_byte), "instruction write data");
      check(td_we_a == (!proc && WE_TestData), "test data written only by protocol");
      check(tr_we_a == (proc && WE_TestResult) && tr_din_a == TestResult_in, "results written only by processor");
      check(inst_addr_b == (proc ? PCRead_d : PCRead_p), "program port address");
      check(td_addr_b == (proc ? DCRead_d : DCRead_p) && tr_addr_b == (proc ? RCRead_d : RCRead_p), "read ports");
      check(tr_addr_a == (proc ? RCWrite_d : RCWrite_p), "result write address");
      @(posedge clk); #1;
      check(PCRead_reg == (proc ? PCRead_d : PCRead_p), "PCRead register");
      check(RCWrite_reg == (proc ? RCWrite_d : RCWrite_p), "RCWrite register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
