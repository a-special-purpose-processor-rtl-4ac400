// uart: byte-level serial link between the host PC and the TACP.
//
// A tick is generated every CLOCK_DIVIDE clock cycles; one bit lasts four
// ticks, so CLOCK_DIVIDE = f_clk / (4 * baud). The default 217 gives 57600
// baud from a 50 MHz clock, the rate the design was built for. The frame is
// 1 start bit, 8 data bits (LSB first) and 1 stop bit, no parity (the frame
// format and the oversampling points are this implementation's choice).
//
// Receive: a falling edge on rx starts a frame; the start bit is checked two
// ticks later (mid-bit) and every further bit is sampled four ticks after
// the previous sample. After the stop bit, `received` pulses for one cycle
// with the byte on rx_byte; `rcv_error` pulses with it when the start bit
// was not low at mid-bit or the stop bit was not high.
//
// Transmit: when `transmit` is high and `is_transmitting` is low, tx_byte is
// latched and sent; `is_transmitting` is high from the next cycle until
// the stop bit has been sent (10 bit times).
module uart #(
  parameter int unsigned CLOCK_DIVIDE = 217
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       rx,
  output logic       tx,
  input  logic       transmit,
  input  logic [7:0] tx_byte,
  output logic       received,
  output logic [7:0] rx_byte,
  output logic       rcv_error,
  output logic       is_transmitting
);

  localparam int unsigned DIV_W = $clog2(CLOCK_DIVIDE + 1);

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;
  rx_state_e         rx_state;
  logic [DIV_W-1:0]  rx_div;
  logic [2:0]        rx_ticks;   // ticks left until the next sample
  logic [2:0]        rx_bitn;
  logic [7:0]        rx_shift;
  logic              rx_s1, rx_s2;  // input synchroniser
  logic              rx_tick;

  assign rx_tick = (rx_div == DIV_W'(CLOCK_DIVIDE - 1));

  always_ff @(posedge clk) begin
    if (reset) begin
      rx_s1 <= 1'b1;
      rx_s2 <= 1'b1;
    end else begin
      rx_s1 <= rx;
      rx_s2 <= rx_s1;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      rx_state  <= RX_IDLE;
      rx_div    <= '0;
      rx_ticks  <= '0;
      rx_bitn   <= '0;
      rx_shift  <= '0;
      rx_byte   <= '0;
      received  <= 1'b0;
      rcv_error <= 1'b0;
    end else begin
      received  <= 1'b0;
      rcv_error <= 1'b0;
      if (rx_state == RX_IDLE) begin
        rx_div <= '0;
        if (!rx_s2) begin
          rx_state <= RX_START;
          rx_ticks <= 3'd2;
        end
      end else begin
        rx_div <= rx_tick ? '0 : rx_div + 1'b1;
        if (rx_tick) begin
          if (rx_ticks != 3'd1) begin
            rx_ticks <= rx_ticks - 1'b1;
          end else begin
            rx_ticks <= 3'd4;
            unique case (rx_state)
              RX_START: begin
                if (rx_s2) begin
                  // start bit gone at mid-bit: report and resynchronise
                  rcv_error <= 1'b1;
                  rx_state  <= RX_IDLE;
                end else begin
                  rx_state <= RX_DATA;
                  rx_bitn  <= '0;
                end
              end
              RX_DATA: begin
                rx_shift <= {rx_s2, rx_shift[7:1]};
                rx_bitn  <= rx_bitn + 1'b1;
                if (rx_bitn == 3'd7) rx_state <= RX_STOP;
              end
              RX_STOP: begin
                rx_byte   <= rx_shift;
                received  <= 1'b1;
                rcv_error <= !rx_s2;
                rx_state  <= RX_IDLE;
              end
              default: rx_state <= RX_IDLE;
            endcase
          end
        end
      end
    end
  end

  // ---------------- transmitter ----------------
  logic [DIV_W-1:0] tx_div;
  logic [1:0]       tx_sub;      // tick within the bit
  logic [3:0]       tx_bitn;     // 0 = start, 1..8 = data, 9 = stop
  logic [9:0]       tx_frame;

  always_ff @(posedge clk) begin
    if (reset) begin
      is_transmitting <= 1'b0;
      tx_div   <= '0;
      tx_sub   <= '0;
      tx_bitn  <= '0;
      tx_frame <= '1;
    end else if (!is_transmitting) begin
      if (transmit) begin
        is_transmitting <= 1'b1;
        tx_frame <= {1'b1, tx_byte, 1'b0};
        tx_div   <= '0;
        tx_sub   <= '0;
        tx_bitn  <= '0;
      end
    end else begin
      if (tx_div == DIV_W'(CLOCK_DIVIDE - 1)) begin
        tx_div <= '0;
        tx_sub <= tx_sub + 1'b1;
        if (tx_sub == 2'd3) begin
          if (tx_bitn == 4'd9) begin
            is_transmitting <= 1'b0;
          end
          tx_bitn  <= tx_bitn + 1'b1;
          tx_frame <= {1'b1, tx_frame[9:1]};
        end
      end else begin
        tx_div <= tx_div + 1'b1;
      end
    end
  end

  assign tx = is_transmitting ? tx_frame[0] : 1'b1;

endmodule
