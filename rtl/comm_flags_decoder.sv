// comm_flags_decoder: turns a user-protocol type byte into command flags.
//
// Type-byte layout (bit 7..0): control, request, mem_write, byte1st, load,
// index[2:0]. Load commands use index 0..7 for rx counter, tx counter,
// PCRead, PCWrite, DCRead, DCWrite, RCRead, RCWrite; index 7 together with
// the control bit selects the break-point register instead of RCWrite.
// Requests use index 0..3 for instruction, test-data and test-result memory
// and the register dump. Memory writes use index bit 0 to pick test-data
// (1) or instruction (0) memory. Control commands use index 0..3 for
// single-step, run, reset and stop.
//
// Timing: the flags are captured in the cycle the receive state machine is
// idle and a byte arrives (rx_IDLE_received) and held until the receiver is
// idle with no byte arriving while the transmitter is idle too
// (rx_IDLE_no_rcv && state_tx_IDLE), so a request stays decoded for the
// whole upload. The four control flags are not held: they are single-cycle
// pulses in the cycle the type byte arrives. The bit layout follows the
// published command table; the hold/clear rule for requests and the pulse
// timing of the control flags are this implementation's reading.
module comm_flags_decoder
  import tacp_pkg::*;
(
  input  logic      clk,
  input  logic      reset,
  input  logic [7:0] rx_byte,
  input  logic      rx_IDLE_received,
  input  logic      rx_IDLE_no_rcv,
  input  logic      state_tx_IDLE,
  output rx_flags_t flags
);

  rx_flags_t decoded, held;

  always_comb begin
    logic       ctl, req, mw, load;
    logic [2:0] idx;
    ctl  = rx_byte[RX_BIT_CONTROL];
    req  = rx_byte[RX_BIT_REQUEST];
    mw   = rx_byte[RX_BIT_MEM_WRITE];
    load = rx_byte[RX_BIT_LOAD];
    idx  = rx_byte[2:0];
    decoded = '0;
    decoded.load              = load;
    decoded.load_rx_counter   = load && idx == 3'd0;
    decoded.load_tx_counter   = load && idx == 3'd1;
    decoded.load_PCRead       = load && idx == 3'd2;
    decoded.load_PCWrite      = load && idx == 3'd3;
    decoded.load_DCRead       = load && idx == 3'd4;
    decoded.load_DCWrite      = load && idx == 3'd5;
    decoded.load_RCRead       = load && idx == 3'd6;
    decoded.load_RCWrite      = load && idx == 3'd7 && !ctl;
    decoded.load_BP           = load && idx == 3'd7 && ctl;
    decoded.request_inst      = req && idx == 3'd0;
    decoded.request_td        = req && idx == 3'd1;
    decoded.request_tr        = req && idx == 3'd2;
    decoded.request_regs      = req && idx == 3'd3;
    decoded.mem_write_inst_td = mw && idx[0];
    decoded.SingleStep        = ctl && !load && idx == 3'd0;
    decoded.Run               = ctl && !load && idx == 3'd1;
    decoded.Reset             = ctl && !load && idx == 3'd2;
    decoded.Stop              = ctl && !load && idx == 3'd3;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      held <= '0;
    end else if (rx_IDLE_received) begin
      held <= decoded;
      held.SingleStep <= 1'b0;
      held.Run        <= 1'b0;
      held.Reset      <= 1'b0;
      held.Stop       <= 1'b0;
    end else if (rx_IDLE_no_rcv && state_tx_IDLE) begin
      held <= '0;
    end
  end

  always_comb begin
    flags = held;
    flags.SingleStep = rx_IDLE_received && decoded.SingleStep;
    flags.Run        = rx_IDLE_received && decoded.Run;
    flags.Reset      = rx_IDLE_received && decoded.Reset;
    flags.Stop       = rx_IDLE_received && decoded.Stop;
  end

endmodule
