// datapath: registers, shared 16-bit bus, ALU and divider of the Gummi processor.
//
// Four general registers R0..R3, the ALU operand register A, the result
// register G and the output register OUT all hang on one 16-bit bus. The bus
// multiplexer, steered by the control unit, drives the bus from the 7-bit
// user input (zero-extended), from G, or from one register selected by
// {1, Rx/Ry}. A and OUT load from the bus; R0..R3 load from the bus under
// the one-hot enables of the control unit's 2-to-4 decoder; G loads the ALU
// result, the divider's quotient or remainder, or the bus. The ALU's A input
// is the A register and its B input the bus; the divider takes the same two.
// All registers are cleared by a synchronous active-high reset. The bus
// structure with A, G and the register multiplexer follows the design
// description; the OUT register, which holds the value sent back to the
// user, and the bus path into G for "load in" are this design's choices.
module datapath
  import gummi_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [DIN_W-1:0]  din,        // user input field of the instruction
  input  bus_sel_t          bus_sel,
  input  logic [NREGS-1:0]  r_en,       // one-hot write enables for R0..R3
  input  logic              a_en,
  input  logic              g_en,
  input  g_src_t            g_src,
  input  logic              out_en,
  input  opcode_t           alu_op,
  input  logic              div_start,
  output logic              div_done,
  output logic [WIDTH-1:0]  bus,
  output logic [WIDTH-1:0]  out_q,      // value for the transmitter
  output logic [WIDTH-1:0]  regs [NREGS],
  output logic [WIDTH-1:0]  a_q,
  output logic [WIDTH-1:0]  g_q
);

  logic [WIDTH-1:0] alu_y, quo, rem;
  logic             div_busy;

  always_comb begin
    unique case (bus_sel)
      BUS_DIN: bus = {{(WIDTH-DIN_W){1'b0}}, din};
      BUS_G:   bus = g_q;
      BUS_R0:  bus = regs[0];
      BUS_R1:  bus = regs[1];
      BUS_R2:  bus = regs[2];
      BUS_R3:  bus = regs[3];
      default: bus = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
      a_q   <= '0;
      g_q   <= '0;
      out_q <= '0;
    end else begin
      for (int i = 0; i < NREGS; i++)
        if (r_en[i]) regs[i] <= bus;
      if (a_en)   a_q   <= bus;
      if (out_en) out_q <= bus;
      if (g_en) begin
        unique case (g_src)
          G_ALU: g_q <= alu_y;
          G_QUO: g_q <= quo;
          G_REM: g_q <= rem;
          G_BUS: g_q <= bus;
        endcase
      end
    end
  end

  alu u_alu (
    .op (alu_op),
    .a  (a_q),
    .b  (bus),
    .y  (alu_y)
  );

  div_unit u_div (
    .clk       (clk),
    .rst       (rst),
    .start     (div_start),
    .dividend  (a_q),
    .divisor   (bus),
    .busy      (div_busy),
    .done      (div_done),
    .quotient  (quo),
    .remainder (rem)
  );

endmodule
