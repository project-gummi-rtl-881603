// uart_tx_ascii: sends a 16-bit result as sixteen ASCII '0'/'1' characters
// followed by a carriage return.
//
// On `start` (while idle) the 16-bit output shift register is loaded once.
// Every character is sent as a start bit, eight data bits LSB first and a
// stop bit, then the line idles for GAP_CLKS clocks. ASCII '0' and '1'
// (0x30, 0x31) differ only in bit 0, so each character is one bit taken from
// the top of the output shift register followed by the common 7-bit pattern
// 0011000 held in a 7-bit shift register that is reloaded before every
// character; sending LSB first means the result bit goes out first. The
// most significant result bit is sent first so the text reads left to right.
// The 17th character is carriage return (0x0D). Counters: clocks per bit,
// data bits within a character, characters sent, and idle clocks between
// characters. `busy` is high from start until the last gap has elapsed.
// Character format, bit order, the shift-register structure and the closing
// carriage return follow the design description; MSB-first character order
// and the one-bit idle gap are this design's choices. A transfer lasts
// 17 * (10 * BIT_CLKS + GAP_CLKS) clocks.
module uart_tx_ascii #(
  parameter int unsigned BIT_CLKS = 10416,   // 100 MHz / 9600 bit/s
  parameter int unsigned GAP_CLKS = 10416    // idle clocks between characters, >= 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [15:0] data,
  output logic        tx,
  output logic        busy,
  output logic        char_sent    // one-cycle pulse after each stop bit
);

  typedef enum logic [2:0] {IDLE, START_B, DATA_B, STOP_B, GAP} tx_state_t;

  localparam int unsigned BW = $clog2(BIT_CLKS + 1);
  localparam int unsigned GW = $clog2(GAP_CLKS + 2);
  localparam logic [6:0] ASCII_DIGIT_HI = 7'b0011000;  // bits 7..1 of '0'/'1'
  localparam logic [6:0] ASCII_CR_HI    = 7'b0000110;  // bits 7..1 of 0x0D

  tx_state_t  state;
  logic [15:0] out_sr;     // result, shifted left one bit per character
  logic [6:0]  common_sr;  // upper seven bits of the current character
  logic        first_bit;  // bit 0 of the current character
  logic [BW-1:0] bit_cnt;  // clocks within a bit
  logic [2:0]  data_cnt;   // data bits within a character
  logic [4:0]  char_cnt;   // characters sent, 0..16
  logic [GW-1:0] gap_cnt;  // idle clocks between characters

  logic bit_end;
  assign bit_end = (bit_cnt == BW'(BIT_CLKS - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      out_sr    <= '0;
      common_sr <= '0;
      first_bit <= 1'b0;
      bit_cnt   <= '0;
      data_cnt  <= '0;
      char_cnt  <= '0;
      gap_cnt   <= '0;
      tx        <= 1'b1;
      char_sent <= 1'b0;
    end else begin
      char_sent <= 1'b0;
      unique case (state)
        IDLE: begin
          tx <= 1'b1;
          if (start) begin
            out_sr    <= data;
            first_bit <= data[15];
            common_sr <= ASCII_DIGIT_HI;
            char_cnt  <= '0;
            bit_cnt   <= '0;
            tx        <= 1'b0;
            state     <= START_B;
          end
        end
        START_B: begin
          if (bit_end) begin
            bit_cnt  <= '0;
            data_cnt <= '0;
            tx       <= first_bit;
            state    <= DATA_B;
          end else bit_cnt <= bit_cnt + 1'b1;
        end
        DATA_B: begin
          if (bit_end) begin
            bit_cnt <= '0;
            if (data_cnt == 3'd7) begin
              tx    <= 1'b1;
              state <= STOP_B;
            end else begin
              tx        <= common_sr[0];
              common_sr <= {1'b0, common_sr[6:1]};
              data_cnt  <= data_cnt + 3'd1;
            end
          end else bit_cnt <= bit_cnt + 1'b1;
        end
        STOP_B: begin
          if (bit_end) begin
            bit_cnt   <= '0;
            gap_cnt   <= '0;
            char_sent <= 1'b1;
            state     <= GAP;
          end else bit_cnt <= bit_cnt + 1'b1;
        end
        GAP: begin
          if (gap_cnt >= GW'(GAP_CLKS - 1)) begin
            if (char_cnt == 5'd16) begin
              state <= IDLE;
            end else begin
              // next character: a result bit, or carriage return after 16
              char_cnt <= char_cnt + 5'd1;
              out_sr   <= {out_sr[14:0], 1'b0};
              if (char_cnt == 5'd15) begin
                first_bit <= 1'b1;
                common_sr <= ASCII_CR_HI;
              end else begin
                first_bit <= out_sr[14];
                common_sr <= ASCII_DIGIT_HI;
              end
              tx    <= 1'b0;
              state <= START_B;
            end
          end else gap_cnt <= gap_cnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // the line is high whenever the transmitter is idle
  a_idle_high: assert property (@(posedge clk) disable iff (rst)
    (state == IDLE) |-> tx);

endmodule
