// div_unit: unsigned 16-bit division and modulus, outside the ALU.
//
// A restoring divider that retires one quotient bit per clock, so a result
// takes 16 cycles, the figure the design gives for its division and modulus
// unit. A one-cycle `start` captures the dividend (A register) and divisor
// (bus); `busy` is high for the next 16 cycles and `done` pulses with the
// last of them, after which `quotient` and `remainder` hold until the next
// start. The restoring algorithm is this design's choice; dividing by zero
// gives quotient 16'hFFFF and remainder equal to the dividend, which is what
// the algorithm produces without a special case.
module div_unit
  import gummi_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [WIDTH-1:0]  dividend,
  input  logic [WIDTH-1:0]  divisor,
  output logic              busy,
  output logic              done,
  output logic [WIDTH-1:0]  quotient,
  output logic [WIDTH-1:0]  remainder
);

  logic [WIDTH-1:0] dvsr;
  logic [4:0]       count;       // iterations left
  logic [WIDTH:0]   trial;       // partial remainder shifted, one bit wider

  assign trial = {remainder, quotient[WIDTH-1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      dvsr      <= '0;
      count     <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        dvsr      <= divisor;
        quotient  <= dividend;   // shifted out at the top, quotient bits in
        remainder <= '0;
        count     <= 5'(WIDTH);
        busy      <= 1'b1;
      end else if (busy) begin
        if (trial >= {1'b0, dvsr}) begin
          remainder <= WIDTH'(trial - {1'b0, dvsr});
          quotient  <= {quotient[WIDTH-2:0], 1'b1};
        end else begin
          remainder <= trial[WIDTH-1:0];
          quotient  <= {quotient[WIDTH-2:0], 1'b0};
        end
        count <= count - 5'd1;
        if (count == 5'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // done closes a computation: the divider was busy in the cycle before.
  a_done_after_busy: assert property (@(posedge clk) disable iff (rst)
    done |-> !busy && $past(busy));

endmodule
