// tb_tacp_sequencer: drives random condition selects, branch addresses,
// opcodes and flags and compares the micro-address with a reference
// model: dispatch to {OpCode, 0} on select zero, branch when the selected
// condition holds, otherwise increment; reset returns to 0.
module tb_tacp_sequencer;
  import tacp_pkg::*;
  logic clk = 0, reset = 1;
  cond_e sel = COND_NEVER;
  logic [UADDR_W-1:0] branch = 0, mAddress, ref_addr;
  logic [OPC_W-1:0] OpCode = 0;
  logic next_instruction = 0, CR_IsZero = 0, WC_IsZero = 0, UC_IsZero = 0, CF_IsNotEqual = 0, HFCLK_Meas_ACK = 0;
  int checks = 0, failures = 0;

  tacp_sequencer dut (.clk, .reset, .sel, .branch, .OpCode, .next_instruction, .CR_IsZero,
                      .WC_IsZero, .UC_IsZero, .CF_IsNotEqual, .HFCLK_Meas_ACK, .mAddress);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ref_addr = 0;
    @(negedge clk); @(negedge clk); reset = 0;
    for (int n = 0; n < 5000; n++) begin
      logic c;
      @(negedge clk);
      sel = cond_e'(4'($urandom % 11));
      branch = UADDR_W'($urandom); OpCode = OPC_W'($urandom);
      {next_instruction, CR_IsZero, WC_IsZero, UC_IsZero, CF_IsNotEqual, HFCLK_Meas_ACK} = 6'($urandom);
      case (sel)
        COND_ALWAYS:   c = 1;
        COND_NOT_NEXT: c = !next_instruction;
        COND_NOT_CRZ:  c = !CR_IsZero;
        COND_NOT_WCZ:  c = !WC_IsZero;
        COND_NOT_UCZ:  c = !UC_IsZero;
        COND_UCZ:      c = UC_IsZero;
        COND_NOT_CF:   c = !CF_IsNotEqual;
        COND_CF:       c = CF_IsNotEqual;
        COND_NOT_ACK:  c = !HFCLK_Meas_ACK;
        default:       c = 0;
      endcase
      if (sel == COND_DISPATCH) ref_addr = {OpCode, 4'h0};
      else if (c)               ref_addr = branch;
      else                      ref_addr = ref_addr + 1'b1;
      @(posedge clk); #1;
      checks++;
      if (mAddress != ref_addr) begin
        failures++; $display("FAIL: sel %s: %h vs %h", sel.name(), mAddress, ref_addr);
        ref_addr = mAddress;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
