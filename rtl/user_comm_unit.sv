// user_comm_unit: hardware side of the host protocol.
//
// The host sends commands as packets that start with a type byte (see
// comm_flags_decoder). A receive state machine (IDLE, BYTE1ST, BYTE2ND,
// LOOP) and a transmit state machine (IDLE, BUSY, TRANSMIT) carry them out:
//   * load commands take two more bytes, low byte first, which are joined
//     with the previous-byte register into a 16-bit word and loaded into the
//     rx counter, tx counter, break-point register or one of the six memory
//     address registers;
//   * "receive instructions / test data" stores the next rx_count bytes in
//     the instruction or test-data memory through PCWrite / DCWrite,
//     counting the 16-bit receive counter down to zero;
//   * requests upload tx_count bytes from the instruction memory (PCWrite),
//     test-data memory (DCWrite), test-result memory (RCRead) or the
//     register dump, selected by the low five bits of the transmit counter;
//   * control commands pulse single-step, run, reset or stop.
// A break-point comparator (BreakF = BP == PCRead), an accumulated receive
// error flag (ErrF, cleared by each new type byte) and the run flag (RunF)
// complete the unit.
//
// Address registers live in the memory multiplexer; this unit gets their
// current values and returns the values it wants them to take next
// (*_p outputs), which the multiplexer uses while the processor is idle.
// Memory writes go to the address the register moves to in that cycle.
//
// next_instruction, the fetch condition of the processor, is high while a
// single-step request is pending (StepF, cleared by step_taken) or while
// RunF is set and the program counter is not at the break point.
//
// The state machines, counters, flags and register set follow the
// published description; the register-dump order, the BP reset value
// (all ones, so that no break point is armed after reset) and the StepF
// latch are this implementation's choices.
module user_comm_unit
  import tacp_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  // UART side
  input  logic [7:0]        rx_byte,
  input  logic              received,
  input  logic              rcv_error,
  input  logic              is_transmitting,
  output logic [7:0]        tx_byte,
  output logic              transmit,
  // memory address registers (current values)
  input  logic [ADDR_W-1:0] PCRead_reg,
  input  logic [ADDR_W-1:0] PCWrite_reg,
  input  logic [ADDR_W-1:0] DCRead_reg,
  input  logic [ADDR_W-1:0] DCWrite_reg,
  input  logic [ADDR_W-1:0] RCRead_reg,
  input  logic [ADDR_W-1:0] RCWrite_reg,
  // next values requested by the protocol
  output logic [ADDR_W-1:0] PCRead_p,
  output logic [ADDR_W-1:0] PCWrite_p,
  output logic [ADDR_W-1:0] DCRead_p,
  output logic [ADDR_W-1:0] DCWrite_p,
  output logic [ADDR_W-1:0] RCRead_p,
  output logic [ADDR_W-1:0] RCWrite_p,
  output logic              WE_Instruction,
  output logic              WE_TestData,
  // memory read data
  input  logic [7:0]        Instruction_a,
  input  logic [7:0]        TestData_a,
  input  logic [7:0]        TestResult_b,
  // processor view and control
  input  dp_view_t          dp_view,
  input  logic              step_taken,
  output logic              next_instruction,
  output logic              proc_reset,
  output logic              BreakF,
  output logic              ErrF,
  output logic              RunF
);

  typedef enum logic [1:0] {S_IDLE, S_BYTE1ST, S_BYTE2ND, S_LOOP} rx_state_e;
  typedef enum logic [1:0] {T_IDLE, T_BUSY, T_TRANSMIT} tx_state_e;

  rx_state_e   rx_state;
  tx_state_e   tx_state;
  rx_flags_t   flags;
  logic [7:0]  prev_rx_byte;
  logic [15:0] rx_2bytes;
  logic [15:0] rx_count, tx_count;
  logic [15:0] BP_reg;
  logic        StepF;

  logic rx_IDLE_received, rx_IDLE_no_rcv, state_tx_IDLE;
  logic state_BYTE2nd_received, state_LOOP_received, new_tx_request;
  logic rx_count_nz, tx_count_nz;

  assign rx_IDLE_received       = (rx_state == S_IDLE) && received;
  assign rx_IDLE_no_rcv         = (rx_state == S_IDLE) && !received;
  assign state_tx_IDLE          = (tx_state == T_IDLE);
  assign rx_count_nz            = (rx_count != '0);
  assign tx_count_nz            = (tx_count != '0);
  assign state_BYTE2nd_received = (rx_state == S_BYTE2ND) && received;
  assign state_LOOP_received    = (rx_state == S_LOOP) && received && rx_count_nz;
  assign new_tx_request         = rx_IDLE_received && rx_byte[RX_BIT_REQUEST] && state_tx_IDLE;
  assign rx_2bytes              = {rx_byte, prev_rx_byte};

  comm_flags_decoder u_flags (
    .clk, .reset, .rx_byte, .rx_IDLE_received, .rx_IDLE_no_rcv, .state_tx_IDLE,
    .flags
  );

  // previous received byte
  always_ff @(posedge clk) begin
    if (reset)         prev_rx_byte <= '0;
    else if (received) prev_rx_byte <= rx_byte;
  end

  // receive state machine
  always_ff @(posedge clk) begin
    if (reset) begin
      rx_state <= S_IDLE;
    end else begin
      unique case (rx_state)
        S_IDLE:
          if (received) begin
            if (rx_byte[RX_BIT_MEM_WRITE])      rx_state <= S_LOOP;
            else if (rx_byte[RX_BIT_REQUEST])   rx_state <= S_IDLE;
            else if (rx_byte[RX_BIT_BYTE1ST])   rx_state <= S_BYTE1ST;
          end
        S_BYTE1ST:
          if (!flags.load)   rx_state <= S_IDLE;
          else if (received) rx_state <= S_BYTE2ND;
        S_BYTE2ND:
          if (received) rx_state <= S_IDLE;
        S_LOOP:
          if (!rx_count_nz) rx_state <= S_IDLE;
        default: rx_state <= S_IDLE;
      endcase
    end
  end

  // transmit state machine
  always_ff @(posedge clk) begin
    if (reset) begin
      tx_state <= T_IDLE;
    end else begin
      unique case (tx_state)
        T_IDLE:     if (new_tx_request) tx_state <= T_BUSY;
        T_BUSY:     if (!tx_count_nz) tx_state <= T_IDLE;
                    else if (!is_transmitting) tx_state <= T_TRANSMIT;
        T_TRANSMIT: tx_state <= tx_count_nz ? T_BUSY : T_IDLE;
        default:    tx_state <= T_IDLE;
      endcase
    end
  end

  assign transmit = (tx_state == T_TRANSMIT) && !is_transmitting;

  // counters
  always_ff @(posedge clk) begin
    if (reset) begin
      rx_count <= '0;
      tx_count <= '0;
    end else begin
      if (state_BYTE2nd_received && flags.load_rx_counter) rx_count <= rx_2bytes;
      else if (state_LOOP_received)                        rx_count <= rx_count - 1'b1;
      if (state_BYTE2nd_received && flags.load_tx_counter) tx_count <= rx_2bytes;
      else if (transmit)                                   tx_count <= tx_count - 1'b1;
    end
  end

  // break point, error, run and step flags
  always_ff @(posedge clk) begin
    if (reset) begin
      BP_reg <= '1;
      ErrF   <= 1'b0;
      RunF   <= 1'b0;
      StepF  <= 1'b0;
    end else begin
      if (state_BYTE2nd_received && flags.load_BP) BP_reg <= rx_2bytes;
      ErrF <= rx_IDLE_received ? rcv_error : (ErrF | rcv_error);
      if (flags.Run)                     RunF <= 1'b1;
      else if (flags.Stop || flags.Reset) RunF <= 1'b0;
      if (flags.SingleStep)              StepF <= 1'b1;
      else if (step_taken || flags.Reset) StepF <= 1'b0;
    end
  end

  assign BreakF           = (BP_reg == PCRead_reg);
  assign next_instruction = StepF || (RunF && !BreakF);
  assign proc_reset       = flags.Reset;

  // address register next values
  logic inst_write, td_write;
  assign inst_write     = state_LOOP_received && !flags.mem_write_inst_td;
  assign td_write       = state_LOOP_received &&  flags.mem_write_inst_td;
  assign WE_Instruction = inst_write;
  assign WE_TestData    = td_write;

  always_comb begin
    PCRead_p  = (state_BYTE2nd_received && flags.load_PCRead) ? rx_2bytes : PCRead_reg;
    DCRead_p  = (state_BYTE2nd_received && flags.load_DCRead) ? rx_2bytes : DCRead_reg;
    RCWrite_p = (state_BYTE2nd_received && flags.load_RCWrite) ? rx_2bytes : RCWrite_reg;

    if (state_BYTE2nd_received && flags.load_PCWrite)      PCWrite_p = rx_2bytes;
    else if ((transmit && flags.request_inst) || inst_write) PCWrite_p = PCWrite_reg + 1'b1;
    else                                                   PCWrite_p = PCWrite_reg;

    if (state_BYTE2nd_received && flags.load_DCWrite)      DCWrite_p = rx_2bytes;
    else if ((transmit && flags.request_td) || td_write)   DCWrite_p = DCWrite_reg + 1'b1;
    else                                                   DCWrite_p = DCWrite_reg;

    if (state_BYTE2nd_received && flags.load_RCRead)       RCRead_p = rx_2bytes;
    else if (transmit && flags.request_tr)                 RCRead_p = RCRead_reg + 1'b1;
    else                                                   RCRead_p = RCRead_reg;
  end

  // enumerate multiplexer: register dump byte for index tx_count[4:0]
  logic [7:0] reg_byte;
  always_comb begin
    unique case (tx_count[4:0])
      5'd1:  reg_byte = {ErrF, RunF, BreakF, dp_view.CF, dp_view.SF, dp_view.ZF, dp_view.Busy, 1'b0};
      5'd2:  reg_byte = {2'b00, dp_view.IR};
      5'd3:  reg_byte = PCRead_reg[7:0];
      5'd4:  reg_byte = PCRead_reg[15:8];
      5'd5:  reg_byte = PCWrite_reg[7:0];
      5'd6:  reg_byte = PCWrite_reg[15:8];
      5'd7:  reg_byte = DCRead_reg[7:0];
      5'd8:  reg_byte = DCRead_reg[15:8];
      5'd9:  reg_byte = DCWrite_reg[7:0];
      5'd10: reg_byte = DCWrite_reg[15:8];
      5'd11: reg_byte = RCRead_reg[7:0];
      5'd12: reg_byte = RCRead_reg[15:8];
      5'd13: reg_byte = RCWrite_reg[7:0];
      5'd14: reg_byte = RCWrite_reg[15:8];
      5'd15: reg_byte = dp_view.SP[7:0];
      5'd16: reg_byte = dp_view.SP[15:8];
      5'd17: reg_byte = dp_view.UC[7:0];
      5'd18: reg_byte = dp_view.UC[15:8];
      5'd19: reg_byte = dp_view.UC[23:16];
      5'd20: reg_byte = dp_view.UC[31:24];
      5'd21: reg_byte = dp_view.CW[7:0];
      5'd22: reg_byte = dp_view.CW[15:8];
      5'd23: reg_byte = dp_view.FR[7:0];
      5'd24: reg_byte = dp_view.FR[15:8];
      5'd25: reg_byte = dp_view.SM;
      5'd26: reg_byte = dp_view.TD;
      5'd27: reg_byte = dp_view.TR;
      5'd28: reg_byte = BP_reg[7:0];
      5'd29: reg_byte = BP_reg[15:8];
      default: reg_byte = 8'h00;
    endcase
  end

  always_comb begin
    if (flags.request_inst)    tx_byte = Instruction_a;
    else if (flags.request_td) tx_byte = TestData_a;
    else if (flags.request_tr) tx_byte = TestResult_b;
    else                       tx_byte = reg_byte;
  end

endmodule
