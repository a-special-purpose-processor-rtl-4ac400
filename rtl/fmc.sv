// fmc: frequency-measurement circuit.
//
// Counts HFCLK cycles during a window timed by the tester clock. The
// processor holds HFCLK_Meas_Req high for CR+1 TCLK cycles after it has
// seen HFCLK_Meas_ACK high (idle), then waits for ACK to return high.
// On the TCLK side a small state machine drops ACK as soon as the request
// is seen and raises it again when the count is ready. On the HFCLK side
// the request is synchronised by two flip-flops; the counter restarts at
// the synchronised rising edge and counts every HFCLK cycle while the
// synchronised request is high; at its falling edge a done flag is set
// (cleared again by the next request). The done flag is synchronised back
// into TCLK, the count (stable by then) is copied into a 16-bit frequency
// register, and ACK rises. The processor reads the register serially:
// while Strobe_out_CLK_FR is high it shifts one place towards bit 0 each
// TCLK edge, bit 0 being CLK_FR_out, so the count arrives LSB first.
//
// With a window of N TCLK cycles the count is about N * f_HF / f_TCLK
// (1024 cycles of a 50 MHz TCLK: count = f_HF * 1024 / 50 MHz). The
// request/acknowledge pair and the serial read-out follow the published
// circuit; the synchroniser details and the 16-bit count are this
// implementation's choices. The request must be at least two HFCLK
// periods long to be seen. Reset clears both domains' state.
module fmc (
  input  logic TCLK,
  input  logic HFCLK,
  input  logic reset,
  input  logic HFCLK_Meas_Req,
  output logic HFCLK_Meas_ACK,
  input  logic Strobe_out_CLK_FR,
  output logic CLK_FR_out
);

  typedef enum logic [1:0] {F_IDLE, F_WAIT_CLEAR, F_WAIT_DONE} fmc_state_e;

  fmc_state_e  state;
  logic        req_s1, req_s2, req_d, done_hf;
  logic        done_s1, done_s2;
  logic [15:0] count, fr;

  // HFCLK domain: synchronise the request and count
  always_ff @(posedge HFCLK) begin
    if (reset) begin
      {req_s1, req_s2, req_d} <= '0;
      done_hf <= 1'b0;
      count   <= '0;
    end else begin
      req_s1 <= HFCLK_Meas_Req;
      req_s2 <= req_s1;
      req_d  <= req_s2;
      if (req_s2 && !req_d)      count <= 16'd1;
      else if (req_s2)           count <= count + 1'b1;
      if (req_s2 && !req_d)      done_hf <= 1'b0;
      else if (!req_s2 && req_d) done_hf <= 1'b1;
    end
  end

  // TCLK domain: handshake and frequency register
  always_ff @(posedge TCLK) begin
    if (reset) begin
      done_s1 <= 1'b0;
      done_s2 <= 1'b0;
      state   <= F_IDLE;
      fr      <= '0;
    end else begin
      done_s1 <= done_hf;
      done_s2 <= done_s1;
      unique case (state)
        F_IDLE:       if (HFCLK_Meas_Req) state <= F_WAIT_CLEAR;
        F_WAIT_CLEAR: if (!done_s2) state <= F_WAIT_DONE;
        F_WAIT_DONE:  if (done_s2 && !HFCLK_Meas_Req) begin
                        fr    <= count;
                        state <= F_IDLE;
                      end
        default:      state <= F_IDLE;
      endcase
      if (state == F_IDLE && Strobe_out_CLK_FR) fr <= {1'b0, fr[15:1]};
    end
  end

  assign HFCLK_Meas_ACK = (state == F_IDLE);
  assign CLK_FR_out     = fr[0];

endmodule
