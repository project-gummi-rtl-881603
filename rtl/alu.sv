// alu: the 21 single-cycle operations of the Gummi processor.
//
// Purely combinational; the result is captured in the G register by the
// datapath on the clock edge that ends the operate step, so each operation
// takes one clock cycle. A is the operand latched from Rx, B is the value on
// the bus (Ry). Arithmetic: increment, decrement, add, subtract (A-B),
// absolute difference, multiply (low 8 bits of each operand, so the product
// fits in 16 bits), shift left and right by one. Logic: complement, AND, OR,
// NAND, NOR, XOR, XNOR, larger and smaller of the two (unsigned), equality,
// binary to Gray, Gray to binary, and reset (zero). The operation list and the
// 8-bit multiplier inputs follow the design description; unsigned
// comparison, a shift distance of one, a one-bit equality flag and modulo-2^16
// wrap-around are this design's choices. Codes that are not ALU operations
// give zero.
module alu
  import gummi_pkg::*;
(
  input  opcode_t           op,
  input  logic [WIDTH-1:0]  a,
  input  logic [WIDTH-1:0]  b,
  output logic [WIDTH-1:0]  y
);

  logic [WIDTH-1:0] g2b;

  // Gray to binary: each bit is the XOR of all Gray bits at and above it.
  always_comb begin
    g2b[WIDTH-1] = a[WIDTH-1];
    for (int i = WIDTH - 2; i >= 0; i--) g2b[i] = g2b[i+1] ^ a[i];
  end

  always_comb begin
    unique case (op)
      OP_INC:    y = a + 16'd1;
      OP_DEC:    y = a - 16'd1;
      OP_ADD:    y = a + b;
      OP_SUB:    y = a - b;
      OP_ABSSUB: y = (a >= b) ? a - b : b - a;
      OP_MUL:    y = a[7:0] * b[7:0];
      OP_SHL:    y = {a[WIDTH-2:0], 1'b0};
      OP_SHR:    y = {1'b0, a[WIDTH-1:1]};
      OP_NOT:    y = ~a;
      OP_AND:    y = a & b;
      OP_OR:     y = a | b;
      OP_NAND:   y = ~(a & b);
      OP_NOR:    y = ~(a | b);
      OP_XOR:    y = a ^ b;
      OP_XNOR:   y = ~(a ^ b);
      OP_GT:     y = (a >= b) ? a : b;
      OP_LT:     y = (a <= b) ? a : b;
      OP_EQ:     y = {{(WIDTH-1){1'b0}}, a == b};
      OP_B2G:    y = a ^ (a >> 1);
      OP_G2B:    y = g2b;
      default:   y = '0;   // OP_RESET and all non-ALU codes
    endcase
  end

endmodule
