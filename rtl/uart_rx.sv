// uart_rx: 16x oversampling serial receiver, 8 data bits, one stop bit.
//
// Idle until the line goes low; then counts sample ticks and looks again at
// the 8th tick (counter value 7), the middle of the start bit: if the line is
// high again it was a glitch and the receiver returns to idle. From there each
// data bit is sampled after a further 16 ticks (counter value 15), that is in
// the middle of the bit, and shifted in LSB first; a modulo-8 counter counts
// the data bits. After the stop bit's 16 ticks `rx_done` pulses for one clock
// with the byte on `dout`. The stop bit's value is not checked. Oversampling,
// the 7/15 sample points and the modulo-8 bit counter follow the design
// description; the rest is this design's choice. Inputs must be synchronous
// to `clk` (the top adds a two-flop synchroniser).
module uart_rx (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  input  logic       s_tick,
  output logic       rx_done,
  output logic [7:0] dout,
  output logic       false_start   // one-cycle pulse when a start bit is rejected
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} rx_state_t;

  rx_state_t  state;
  logic [3:0] s;      // sample-tick counter
  logic [2:0] n;      // modulo-8 data-bit counter

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= IDLE;
      s           <= '0;
      n           <= '0;
      dout        <= '0;
      rx_done     <= 1'b0;
      false_start <= 1'b0;
    end else begin
      rx_done     <= 1'b0;
      false_start <= 1'b0;
      unique case (state)
        IDLE: if (!rx) begin
          state <= START;
          s     <= '0;
        end
        START: if (s_tick) begin
          if (s == 4'd7) begin
            s <= '0;
            n <= '0;
            if (!rx) state <= DATA;
            else begin
              state       <= IDLE;
              false_start <= 1'b1;
            end
          end else s <= s + 4'd1;
        end
        DATA: if (s_tick) begin
          if (s == 4'd15) begin
            s    <= '0;
            dout <= {rx, dout[7:1]};
            if (n == 3'd7) state <= STOP;
            n <= n + 3'd1;
          end else s <= s + 4'd1;
        end
        STOP: if (s_tick) begin
          if (s == 4'd15) begin
            state   <= IDLE;
            rx_done <= 1'b1;
          end else s <= s + 4'd1;
        end
      endcase
    end
  end

endmodule
