// baud_gen: sample-tick generator for the serial receiver.
//
// A modulo-DIV counter that pulses `tick` for one clock every DIV clocks.
// With the default DIV = 651 and a 100 MHz clock this is 16 ticks per bit at
// 9600 bit/s (100e6 / (16 * 9600) = 651), the receiver's oversampling rate.
// The modulus is the design's; the 100 MHz clock is the board's.
module baud_gen #(
  parameter int unsigned DIV = 651
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned CW = $clog2(DIV);
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else if (count == CW'(DIV - 1)) count <= '0;
    else count <= count + 1'b1;
  end

  assign tick = (count == CW'(DIV - 1));

endmodule
