// tb_tacp_control_store: walks every instruction's micro-program through
// the ROM, taking the loop exits, and checks the number of steps to the
// return to fetch, how many steps assert key micro-operations (AaC four
// times, the parameter increments of PC), the fetch dispatch and the
// Stop self-loop.
module tb_tacp_control_store;
  import tacp_pkg::*;
  logic [UADDR_W-1:0] mAddress;
  cs_entry_t entry;
  int checks = 0, failures = 0;

  tacp_control_store dut (.mAddress, .entry);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // walk from {op,0} until the return to 0; conditional branches not taken
  // except unconditional ones; returns number of steps, PC increments, AaC
  int steps, incs, aacs;
  bit done;
  task automatic walk(input logic [5:0] op);
    steps = 0; incs = 0; aacs = 0;
    mAddress = {op, 4'h0};
    done = 0;
    while (steps < 40 && !done) begin
      #1;
      steps++;
      incs += int'(entry.ops.Increment_PC);
      aacs += int'(entry.ops.AaC);
      if (entry.sel == COND_ALWAYS) mAddress = entry.branch;
      else mAddress = mAddress + 1'b1;
      done = (mAddress == '0);
    end
  endtask

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // opcode, expected PC increments (instruction length - 1 for
    // non-jumping ones, counting the fetch increment separately)
    walk(6'h15); check(steps == 1 && incs == 0, "NOP one step");
    walk(6'h01); check(steps == 9 && aacs == 4, $sformatf("ApplyAndCapture %0d steps %0d AaC", steps, aacs));
    walk(6'h1C); check(incs == 6, $sformatf("SendSelectionMask parameter bytes %0d", incs));
    walk(6'h1D); check(incs == 5, $sformatf("SendTestData parameter bytes %0d", incs));
    walk(6'h17); check(incs == 5, $sformatf("ReadResult parameter bytes %0d", incs));
    walk(6'h03); check(incs == 4, "Compare parameter bytes");
    walk(6'h0D); check(incs == 2 && steps == 2, "Load_DCRead");
    walk(6'h0F); check(incs == 2 && steps == 2, "Load_RCRead");
    walk(6'h10); check(incs == 2 && steps == 2, "Load_RCWrite");
    walk(6'h12); check(incs == 4 && steps == 4, "Load_UC_value");
    walk(6'h1E); check(incs == 2, "SetFCW");
    walk(6'h1B); check(incs == 1, "SendFCW");
    walk(6'h16); check(incs == 1, "ReadFrequencyRegister");
    walk(6'h14); check(incs == 4, "MeasureFrequency");
    walk(6'h11); check(steps == 4, "Load_UC_Mem four steps");
    walk(6'h21); check(steps == 4, "Store_UC four steps");
    walk(6'h1A); check(steps == 4, "Return four steps");
    walk(6'h02); check(steps == 3 && incs == 1, "Call");
    walk(6'h0A); check(incs == 2, "JNZ not taken skips its target");
    mAddress = {6'h20, 4'h0}; #1;
    check(entry.sel == COND_ALWAYS && entry.branch == {6'h20, 4'h0} && entry.ops.IsStopInstruction, "Stop loops");
    mAddress = {6'h00, 4'h3}; #1;
    check(entry.sel == COND_DISPATCH && entry.ops.Increment_PC, "fetch dispatches");
    mAddress = {6'h00, 4'h1}; #1;
    check(entry.sel == COND_NOT_NEXT && entry.branch == 0, "fetch waits for next_instruction");
    mAddress = {6'h08, 4'h0}; #1;
    check(entry.sel == COND_NOT_CF && entry.branch == {6'h08, 4'h2}, "JCompareCorrect branch");
    mAddress = {6'h09, 4'h0}; #1;
    check(entry.sel == COND_CF && entry.branch == {6'h09, 4'h2}, "JCompareError branch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
