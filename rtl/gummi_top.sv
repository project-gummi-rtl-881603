// gummi_top: the Gummi 16-bit processor with its serial link to a host PC.
//
// The host sends each instruction over a 9600 bit/s, 8-bit serial line as
// three characters (operation, register selection, 7-bit number). The line
// is synchronised, sampled 16 times per bit by uart_rx using the modulo-651
// tick of baud_gen, and rx_instr strips the three fields and signals finish.
// The processor (gummi_cpu) runs the instruction and, when it is done, starts
// uart_tx_ascii, which sends the output register back as sixteen ASCII
// '0'/'1' characters and a carriage return. `led` shows the last received
// instruction: {number[6:0], op[4:0], Ry, Rx}, the way the design checks
// reception on the board's LEDs. Reset is synchronous and active high.
// Defaults assume a 100 MHz clock; BAUD_DIV sets the rate (a bit lasts
// 16 * BAUD_DIV clocks for both directions). The structure follows the
// design description; the LED field order and the synchroniser are this
// design's choices. An instruction that completes while the transmitter is
// still sending is executed but its result is not sent.
module gummi_top
  import gummi_pkg::*;
#(
  parameter int unsigned BAUD_DIV = 651
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        uart_rxd,
  output logic        uart_txd,
  output logic [15:0] led
);

  localparam int unsigned BIT_CLKS = 16 * BAUD_DIV;

  logic       rx_meta, rx_sync;
  logic       s_tick, rx_done, false_start, finish, done, tx_start, tx_busy;
  logic       char_sent;
  logic [7:0] rx_byte;
  logic [4:0] op;
  logic [3:0] rsel;
  logic [6:0] num;
  logic [8:0] ir;
  logic [WIDTH-1:0] out_q, g_q;
  logic [WIDTH-1:0] regs [NREGS];
  state_t     state;

  // two-flop synchroniser for the asynchronous serial input (idles high)
  always_ff @(posedge clk) begin
    if (rst) begin
      rx_meta <= 1'b1;
      rx_sync <= 1'b1;
    end else begin
      rx_meta <= uart_rxd;
      rx_sync <= rx_meta;
    end
  end

  baud_gen #(.DIV(BAUD_DIV)) u_baud (
    .clk, .rst, .tick(s_tick)
  );

  uart_rx u_rx (
    .clk, .rst, .rx(rx_sync), .s_tick, .rx_done, .dout(rx_byte), .false_start
  );

  rx_instr u_frame (
    .clk, .rst, .rx_done, .din(rx_byte), .op, .rsel, .num, .finish
  );

  gummi_cpu u_cpu (
    .clk, .rst, .w(finish), .instr({op, rsel}), .din(num),
    .done, .tx_start, .out_q, .ir, .state, .regs, .g_q
  );

  uart_tx_ascii #(.BIT_CLKS(BIT_CLKS), .GAP_CLKS(BIT_CLKS)) u_tx (
    .clk, .rst, .start(tx_start), .data(out_q), .tx(uart_txd), .busy(tx_busy),
    .char_sent
  );

  assign led = {num, op, rsel};

endmodule
