// tacp_control_store: micro-program ROM of the TACP processor.
//
// The ROM is addressed by the micro-address {opcode[5:0], step[3:0]} and
// returns one entry: the sequencer's condition select, the micro-operations
// for the data path and the chip interface, and a branch address. Each
// instruction's micro-program sits at {opcode, 0...}; the fetch program at
// opcode 0 waits for next_instruction, loads IR, increments PC and
// dispatches. Every instruction ends by branching to fetch; an instruction
// whose last step loops on a condition falls through to an unused entry,
// and unused entries branch to fetch (one extra cycle).
//
// Contents follow the published micro-programs step by step (same
// micro-operations in the same cycles); the entry layout is this
// implementation's encoding. The ROM is combinational, read in the same
// cycle as its address.
module tacp_control_store
  import tacp_pkg::*;
(
  input  logic [UADDR_W-1:0] mAddress,
  output cs_entry_t          entry
);

  localparam logic [UADDR_W-1:0] FETCH0 = '0;

  function automatic logic [UADDR_W-1:0] ua(opcode_e op, logic [STEP_W-1:0] step);
    return {op, step};
  endfunction

  always_comb begin
    entry        = '0;
    entry.sel    = COND_ALWAYS;     // unused entries return to fetch
    entry.branch = FETCH0;
    unique case (mAddress)
      // ---- fetch ----
      ua(OP_FETCH, 0): begin entry.sel = COND_NEVER; entry.ops.ResetBusy = 1'b1; end
      ua(OP_FETCH, 1): begin entry.sel = COND_NOT_NEXT; entry.branch = ua(OP_FETCH, 0); end
      ua(OP_FETCH, 2): begin entry.sel = COND_NEVER; entry.ops.Load_IR_Instruction = 1'b1; entry.ops.SetBusy = 1'b1; end
      ua(OP_FETCH, 3): begin entry.sel = COND_DISPATCH; entry.ops.Increment_PC = 1'b1; end

      // ---- SendSelectionMask: window length-1 (4 bytes), port number (2 bytes) ----
      ua(OP_SEND_SEL_MASK, 0): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; end
      ua(OP_SEND_SEL_MASK, 1): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; entry.ops.Load_CR_Low_Instruction2 = 1'b1; end
      ua(OP_SEND_SEL_MASK, 2): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; end
      ua(OP_SEND_SEL_MASK, 3): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; entry.ops.Load_CR_High_Instruction2 = 1'b1; end
      ua(OP_SEND_SEL_MASK, 4): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; end
      ua(OP_SEND_SEL_MASK, 5): begin
        entry.sel = COND_NOT_CRZ; entry.branch = ua(OP_SEND_SEL_MASK, 5);
        entry.ops.Decrement_CR = 1'b1; entry.ops.Strobe_in_PMask = 1'b1;
      end
      ua(OP_SEND_SEL_MASK, 6): entry.ops.Increment_PC = 1'b1;

      // ---- SendTestData: words-1 (4 bytes), bits per word-3 (1 byte) ----
      ua(OP_SEND_TEST_DATA, 0): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; end
      ua(OP_SEND_TEST_DATA, 1): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; entry.ops.Load_CR_Low_Instruction2 = 1'b1; end
      ua(OP_SEND_TEST_DATA, 2): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; end
      ua(OP_SEND_TEST_DATA, 3): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; entry.ops.Load_CR_High_Instruction2 = 1'b1; end
      ua(OP_SEND_TEST_DATA, 4): begin
        entry.sel = COND_ALWAYS; entry.branch = ua(OP_SEND_TEST_DATA, 6);
        entry.ops.Increment_DC = 1'b1; entry.ops.Load_TD_TestData = 1'b1; entry.ops.Load_WC_Instruction = 1'b1;
      end
      ua(OP_SEND_TEST_DATA, 5): begin
        entry.sel = COND_NEVER;
        entry.ops.Increment_DC = 1'b1; entry.ops.Load_TD_TestData = 1'b1; entry.ops.Load_WC_Instruction = 1'b1;
        entry.ops.Strobe_in_TData = 1'b1;
      end
      ua(OP_SEND_TEST_DATA, 6): begin
        entry.sel = COND_NOT_WCZ; entry.branch = ua(OP_SEND_TEST_DATA, 6);
        entry.ops.Decrement_WC = 1'b1; entry.ops.Shift_TestData = 1'b1; entry.ops.Strobe_in_TData = 1'b1;
      end
      ua(OP_SEND_TEST_DATA, 7): begin
        entry.sel = COND_NOT_CRZ; entry.branch = ua(OP_SEND_TEST_DATA, 5);
        entry.ops.Decrement_CR = 1'b1; entry.ops.Shift_TestData = 1'b1; entry.ops.Strobe_in_TData = 1'b1;
      end
      ua(OP_SEND_TEST_DATA, 8): begin
        entry.ops.Increment_PC = 1'b1; entry.ops.Shift_TestData = 1'b1; entry.ops.Strobe_in_TData = 1'b1;
      end

      // ---- ReadResult: words-1 (4 bytes), bits per word-2 (1 byte) ----
      ua(OP_READ_RESULT, 0): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; end
      ua(OP_READ_RESULT, 1): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; entry.ops.Load_CR_Low_Instruction2 = 1'b1; end
      ua(OP_READ_RESULT, 2): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; end
      ua(OP_READ_RESULT, 3): begin
        entry.sel = COND_NEVER; entry.ops.ClearTR = 1'b1; entry.ops.Increment_PC = 1'b1;
        entry.ops.Load_CR_High_Instruction2 = 1'b1;
      end
      ua(OP_READ_RESULT, 4): begin entry.sel = COND_NEVER; entry.ops.Load_WC_Instruction = 1'b1; entry.ops.Strobe_out_TR = 1'b1; end
      ua(OP_READ_RESULT, 5): begin
        entry.sel = COND_NOT_WCZ; entry.branch = ua(OP_READ_RESULT, 5);
        entry.ops.Decrement_WC = 1'b1; entry.ops.Strobe_out_TR = 1'b1;
      end
      ua(OP_READ_RESULT, 6): begin
        entry.sel = COND_NOT_CRZ; entry.branch = ua(OP_READ_RESULT, 5);
        entry.ops.Decrement_CR = 1'b1; entry.ops.Increment_RCWrite = 1'b1; entry.ops.Load_WC_Instruction = 1'b1;
        entry.ops.Store_TestResults_TR = 1'b1; entry.ops.Strobe_out_TR = 1'b1;
      end
      ua(OP_READ_RESULT, 7): entry.ops.Increment_PC = 1'b1;

      // ---- ApplyAndCapture: AaC for four cycles, three idle cycles around ----
      ua(OP_APPLY_CAPTURE, 0), ua(OP_APPLY_CAPTURE, 1), ua(OP_APPLY_CAPTURE, 2),
      ua(OP_APPLY_CAPTURE, 7):
        entry.sel = COND_NEVER;
      ua(OP_APPLY_CAPTURE, 3), ua(OP_APPLY_CAPTURE, 4), ua(OP_APPLY_CAPTURE, 5),
      ua(OP_APPLY_CAPTURE, 6): begin entry.sel = COND_NEVER; entry.ops.AaC = 1'b1; end
      ua(OP_APPLY_CAPTURE, 8): ;

      // ---- Compare: words-1 (4 bytes) ----
      ua(OP_COMPARE, 0): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; end
      ua(OP_COMPARE, 1): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; entry.ops.Load_CR_Low_Instruction2 = 1'b1; end
      ua(OP_COMPARE, 2): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; end
      ua(OP_COMPARE, 3): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; entry.ops.Load_CR_High_Instruction2 = 1'b1; end
      ua(OP_COMPARE, 4): begin
        entry.sel = COND_NOT_CRZ; entry.branch = ua(OP_COMPARE, 4);
        entry.ops.Decrement_CR = 1'b1; entry.ops.Increment_DC = 1'b1; entry.ops.Increment_RCRead = 1'b1;
        entry.ops.Increment_RCWrite = 1'b1; entry.ops.Store_TestResults_Compare = 1'b1;
      end

      // ---- address loads (2-byte parameter) ----
      ua(OP_LOAD_DCREAD, 0), ua(OP_LOAD_RCREAD, 0), ua(OP_LOAD_RCWRITE, 0), ua(OP_SET_CW, 0),
      ua(OP_JUMP, 0):
        begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; end
      ua(OP_LOAD_DCREAD, 1):  begin entry.ops.Increment_PC = 1'b1; entry.ops.Load_DC_Instruction2 = 1'b1; end
      ua(OP_LOAD_RCREAD, 1):  begin entry.ops.Increment_PC = 1'b1; entry.ops.Load_RCRead_Instruction2 = 1'b1; end
      ua(OP_LOAD_RCWRITE, 1): begin entry.ops.Increment_PC = 1'b1; entry.ops.Load_RCWrite_Instruction2 = 1'b1; end
      ua(OP_SET_CW, 1):       begin entry.ops.Increment_PC = 1'b1; entry.ops.Load_CW_Instruction2 = 1'b1; end
      ua(OP_JUMP, 1):         entry.ops.Load_PC_Instruction2 = 1'b1;

      // ---- single-cycle instructions ----
      ua(OP_RESET_CF, 0):     entry.ops.ResetCF = 1'b1;
      ua(OP_INC_CW, 0):       entry.ops.INC_CW = 1'b1;
      ua(OP_DEC_CW, 0):       entry.ops.DEC_CW = 1'b1;
      ua(OP_SET_HFCLOCK, 0):  entry.ops.SetHFClock = 1'b1;
      ua(OP_RESET_HFCLOCK, 0): entry.ops.ResetHFClock = 1'b1;
      ua(OP_INC_UC, 0):       entry.ops.INC_UC = 1'b1;
      ua(OP_DEC_UC, 0):       entry.ops.DEC_UC = 1'b1;
      ua(OP_NOP, 0):          ;
      ua(OP_CLEAR_TD, 0):     entry.ops.ClearTD = 1'b1;
      ua(OP_STOP, 0): begin
        entry.sel = COND_ALWAYS; entry.branch = ua(OP_STOP, 0); entry.ops.IsStopInstruction = 1'b1;
      end

      // ---- conditional jumps (2-byte target) ----
      ua(OP_JCOMPARE_CORRECT, 0): begin entry.sel = COND_NOT_CF;  entry.branch = ua(OP_JCOMPARE_CORRECT, 2); entry.ops.Increment_PC = 1'b1; end
      ua(OP_JCOMPARE_ERROR, 0):   begin entry.sel = COND_CF;      entry.branch = ua(OP_JCOMPARE_ERROR, 2);   entry.ops.Increment_PC = 1'b1; end
      ua(OP_JNZ, 0):              begin entry.sel = COND_NOT_UCZ; entry.branch = ua(OP_JNZ, 2);              entry.ops.Increment_PC = 1'b1; end
      ua(OP_JZ, 0):               begin entry.sel = COND_UCZ;     entry.branch = ua(OP_JZ, 2);               entry.ops.Increment_PC = 1'b1; end
      ua(OP_JCOMPARE_CORRECT, 1), ua(OP_JCOMPARE_ERROR, 1), ua(OP_JNZ, 1), ua(OP_JZ, 1):
        entry.ops.Increment_PC = 1'b1;
      ua(OP_JCOMPARE_CORRECT, 2), ua(OP_JCOMPARE_ERROR, 2), ua(OP_JNZ, 2), ua(OP_JZ, 2):
        entry.ops.Load_PC_Instruction2 = 1'b1;

      // ---- frequency control ----
      ua(OP_SEND_CW, 0): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; entry.ops.Load_WC_Instruction = 1'b1; end
      ua(OP_SEND_CW, 1): begin
        entry.sel = COND_NOT_WCZ; entry.branch = ua(OP_SEND_CW, 1);
        entry.ops.Decrement_WC = 1'b1; entry.ops.Strobe_in_CLK_CR = 1'b1;
      end
      ua(OP_READ_FREQ_REG, 0): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; entry.ops.Load_WC_Instruction = 1'b1; end
      ua(OP_READ_FREQ_REG, 1): begin
        entry.sel = COND_NOT_WCZ; entry.branch = ua(OP_READ_FREQ_REG, 1);
        entry.ops.Decrement_WC = 1'b1; entry.ops.Strobe_out_CLK_FR = 1'b1;
      end
      ua(OP_MEASURE_FREQ, 0): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; end
      ua(OP_MEASURE_FREQ, 1): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; entry.ops.Load_CR_Low_Instruction2 = 1'b1; end
      ua(OP_MEASURE_FREQ, 2): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; end
      ua(OP_MEASURE_FREQ, 3): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; entry.ops.Load_CR_High_Instruction2 = 1'b1; end
      ua(OP_MEASURE_FREQ, 4): begin entry.sel = COND_NOT_ACK; entry.branch = ua(OP_MEASURE_FREQ, 4); end
      ua(OP_MEASURE_FREQ, 5): begin
        entry.sel = COND_NOT_CRZ; entry.branch = ua(OP_MEASURE_FREQ, 5);
        entry.ops.Decrement_CR = 1'b1; entry.ops.HFCLK_Meas_Req = 1'b1;
      end
      ua(OP_MEASURE_FREQ, 6): begin entry.sel = COND_NOT_ACK; entry.branch = ua(OP_MEASURE_FREQ, 6); end

      // ---- user counter ----
      ua(OP_LOAD_UC_VALUE, 0): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; end
      ua(OP_LOAD_UC_VALUE, 1): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; entry.ops.Load_UC_Low = 1'b1; end
      ua(OP_LOAD_UC_VALUE, 2): begin entry.sel = COND_NEVER; entry.ops.Increment_PC = 1'b1; end
      ua(OP_LOAD_UC_VALUE, 3): begin entry.ops.Increment_PC = 1'b1; entry.ops.Load_UC_High = 1'b1; end
      ua(OP_LOAD_UC_MEM, 0): begin entry.sel = COND_NEVER; entry.ops.Increment_RCWrite = 1'b1; entry.ops.Load_UC_TR = 4'b0001; end
      ua(OP_LOAD_UC_MEM, 1): begin entry.sel = COND_NEVER; entry.ops.Increment_RCWrite = 1'b1; entry.ops.Load_UC_TR = 4'b0010; end
      ua(OP_LOAD_UC_MEM, 2): begin entry.sel = COND_NEVER; entry.ops.Increment_RCWrite = 1'b1; entry.ops.Load_UC_TR = 4'b0100; end
      ua(OP_LOAD_UC_MEM, 3): begin entry.ops.Increment_RCWrite = 1'b1; entry.ops.Load_UC_TR = 4'b1000; end
      ua(OP_STORE_UC, 0): begin entry.sel = COND_NEVER; entry.ops.Increment_RCWrite = 1'b1; entry.ops.Store_UC = 4'b0001; end
      ua(OP_STORE_UC, 1): begin entry.sel = COND_NEVER; entry.ops.Increment_RCWrite = 1'b1; entry.ops.Store_UC = 4'b0010; end
      ua(OP_STORE_UC, 2): begin entry.sel = COND_NEVER; entry.ops.Increment_RCWrite = 1'b1; entry.ops.Store_UC = 4'b0100; end
      ua(OP_STORE_UC, 3): begin entry.ops.Increment_RCWrite = 1'b1; entry.ops.Store_UC = 4'b1000; end

      // ---- subroutines (stack at the top of instruction memory) ----
      ua(OP_CALL, 0): begin entry.sel = COND_NEVER; entry.ops.DEC_SP = 1'b1; entry.ops.Increment_PC = 1'b1; end
      ua(OP_CALL, 1): begin entry.sel = COND_NEVER; entry.ops.DEC_SP = 1'b1; entry.ops.Push_PC2 = 1'b1; end
      ua(OP_CALL, 2): begin entry.ops.Load_PC_Instruction2 = 1'b1; entry.ops.Push_PC1 = 1'b1; end
      ua(OP_RETURN, 0): begin entry.sel = COND_NEVER; entry.ops.Pop1 = 1'b1; end
      ua(OP_RETURN, 1): entry.sel = COND_NEVER;
      ua(OP_RETURN, 2): begin entry.sel = COND_NEVER; entry.ops.Pop_PC2 = 1'b1; end
      ua(OP_RETURN, 3): ;

      default: ;
    endcase
  end

endmodule
