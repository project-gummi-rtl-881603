// rx_instr: assembles one instruction from three received characters.
//
// The host sends every instruction as three bytes: the first carries the
// 5-bit operation code in its low bits, the second the 4-bit register
// selection {Ry, Rx} in its low bits, the third the 7-bit input number in its
// low bits. This state machine takes `rx_done`/`din` from the receiver, keeps
// the stripped fields in registers, and after the third byte pulses `finish`
// for one clock. The fields hold until the next instruction has been fully
// received. The byte order and field positions follow the design
// description; the one-clock finish pulse is this design's choice.
module rx_instr (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx_done,
  input  logic [7:0] din,
  output logic [4:0] op,
  output logic [3:0] rsel,
  output logic [6:0] num,
  output logic       finish
);

  typedef enum logic [1:0] {GET_OP, GET_REG, GET_NUM} frame_state_t;

  frame_state_t state;
  logic [4:0]   op_buf;
  logic [3:0]   rsel_buf;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= GET_OP;
      op_buf   <= '0;
      rsel_buf <= '0;
      op       <= '0;
      rsel     <= '0;
      num      <= '0;
      finish   <= 1'b0;
    end else begin
      finish <= 1'b0;
      if (rx_done) begin
        unique case (state)
          GET_OP: begin
            op_buf <= din[4:0];
            state  <= GET_REG;
          end
          GET_REG: begin
            rsel_buf <= din[3:0];
            state    <= GET_NUM;
          end
          GET_NUM: begin
            op     <= op_buf;
            rsel   <= rsel_buf;
            num    <= din[6:0];
            finish <= 1'b1;
            state  <= GET_OP;
          end
          default: state <= GET_OP;
        endcase
      end
    end
  end

endmodule
