// tacp_sequencer: micro-address sequencer of the TACP processor.
//
// Five parts: the micro-address register, an incrementer, a two-input
// micro-address multiplexer, a selection-zero comparator and the control
// multiplexer. Each cycle the control store entry addressed by mAddress
// supplies a condition select and a branch address. The control
// multiplexer picks the selected condition from the data-path and external
// flags; when it is true the next micro-address is the branch address,
// otherwise mAddress + 1. When the select field is zero (the comparator
// output) the next micro-address is {OpCode, 0}: this is how the fetch
// micro-program dispatches to the instruction just loaded into IR.
//
// Micro-addresses are {opcode[5:0], step[3:0]}; reset (hardware or the
// protocol's reset command) returns to 0, the first step of fetch.
// The component list follows the published sequencer; the condition codes
// and the dispatch-on-zero rule are this implementation's encoding.
module tacp_sequencer
  import tacp_pkg::*;
(
  input  logic               clk,
  input  logic               reset,
  input  cond_e              sel,
  input  logic [UADDR_W-1:0] branch,
  input  logic [OPC_W-1:0]   OpCode,
  input  logic               next_instruction,
  input  logic               CR_IsZero,
  input  logic               WC_IsZero,
  input  logic               UC_IsZero,
  input  logic               CF_IsNotEqual,
  input  logic               HFCLK_Meas_ACK,
  output logic [UADDR_W-1:0] mAddress
);

  logic               cond;
  logic               sel_is_zero;
  logic [UADDR_W-1:0] next_addr;

  // control multiplexer
  always_comb begin
    unique case (sel)
      COND_NEVER:    cond = 1'b0;
      COND_ALWAYS:   cond = 1'b1;
      COND_NOT_NEXT: cond = !next_instruction;
      COND_NOT_CRZ:  cond = !CR_IsZero;
      COND_NOT_WCZ:  cond = !WC_IsZero;
      COND_NOT_UCZ:  cond = !UC_IsZero;
      COND_UCZ:      cond = UC_IsZero;
      COND_NOT_CF:   cond = !CF_IsNotEqual;
      COND_CF:       cond = CF_IsNotEqual;
      COND_NOT_ACK:  cond = !HFCLK_Meas_ACK;
      default:       cond = 1'b0;
    endcase
  end

  assign sel_is_zero = (sel == COND_DISPATCH);

  always_comb begin
    if (sel_is_zero) next_addr = {OpCode, {STEP_W{1'b0}}};
    else if (cond)   next_addr = branch;
    else             next_addr = mAddress + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (reset) mAddress <= '0;
    else       mAddress <= next_addr;
  end

endmodule
