// gummi_pkg: types and constants shared by the Gummi 16-bit processor.
//
// The instruction is 9 bits: a 5-bit operation code followed by a 4-bit
// register selection {Ry, Rx}. Rx (bits 1:0) is the register that is read
// into A and written with the result; Ry (bits 3:2) is the second operand,
// driven onto the bus during the operate step and the source of copy and
// load-out. The operation codes for load in, add, absolute subtract,
// multiply, shift left/right, save, load out and copy are the ones the
// design's own test sequence and serial example use; the remaining codes fill
// the gaps in the order the operations are listed (arithmetic first, then
// logic), which is this design's choice.
package gummi_pkg;

  localparam int unsigned WIDTH = 16;   // data path width
  localparam int unsigned NREGS = 4;    // R0..R3
  localparam int unsigned DIN_W = 7;    // user input field

  typedef enum logic [4:0] {
    OP_LOADIN  = 5'd0,   // G <- input (zero-extended)
    OP_DIV     = 5'd1,   // Rx <- Rx / Ry   (divider, 16 cycles)
    OP_MOD     = 5'd2,   // Rx <- Rx mod Ry (divider, 16 cycles)
    OP_INC     = 5'd4,   // Rx <- Rx + 1
    OP_DEC     = 5'd5,   // Rx <- Rx - 1
    OP_ADD     = 5'd6,   // Rx <- Rx + Ry
    OP_SUB     = 5'd7,   // Rx <- Rx - Ry
    OP_ABSSUB  = 5'd8,   // Rx <- |Rx - Ry|
    OP_MUL     = 5'd9,   // Rx <- Rx[7:0] * Ry[7:0]
    OP_SHL     = 5'd10,  // Rx <- Rx << 1
    OP_SHR     = 5'd11,  // Rx <- Rx >> 1
    OP_SAVE    = 5'd12,  // Rx <- G   (load in to a register)
    OP_LOADOUT = 5'd13,  // OUT <- Ry
    OP_COPY    = 5'd14,  // Rx <- Ry
    OP_NOT     = 5'd15,  // Rx <- ~Rx
    OP_AND     = 5'd16,
    OP_OR      = 5'd17,
    OP_NAND    = 5'd18,
    OP_NOR     = 5'd19,
    OP_XOR     = 5'd20,
    OP_XNOR    = 5'd21,
    OP_GT      = 5'd22,  // Rx <- larger of Rx, Ry
    OP_LT      = 5'd23,  // Rx <- smaller of Rx, Ry
    OP_EQ      = 5'd24,  // Rx <- 1 if Rx == Ry else 0
    OP_B2G     = 5'd25,  // Rx <- binary to Gray code of Rx
    OP_G2B     = 5'd26,  // Rx <- Gray code to binary of Rx
    OP_RESET   = 5'd27   // Rx <- 0
  } opcode_t;

  // Bus multiplexer select: {1, r} drives register Rr, the rest other sources.
  typedef enum logic [2:0] {
    BUS_DIN  = 3'b000,
    BUS_G    = 3'b001,
    BUS_ZERO = 3'b010,
    BUS_R0   = 3'b100,
    BUS_R1   = 3'b101,
    BUS_R2   = 3'b110,
    BUS_R3   = 3'b111
  } bus_sel_t;

  // What the G register loads.
  typedef enum logic [1:0] {
    G_ALU = 2'd0,
    G_QUO = 2'd1,
    G_REM = 2'd2,
    G_BUS = 2'd3
  } g_src_t;

  // Control unit states. S_DIVW is the wait inside the operate step while the
  // divider runs.
  typedef enum logic [2:0] {
    S1   = 3'd0,
    S2   = 3'd1,
    SQA  = 3'd2,
    SDIV = 3'd3,
    SQB  = 3'd4,
    S27  = 3'd5
  } state_t;

  // True for the operations that go through the ALU.
  function automatic logic is_alu_op(opcode_t op);
    case (op)
      OP_INC, OP_DEC, OP_ADD, OP_SUB, OP_ABSSUB, OP_MUL, OP_SHL, OP_SHR,
      OP_NOT, OP_AND, OP_OR, OP_NAND, OP_NOR, OP_XOR, OP_XNOR,
      OP_GT, OP_LT, OP_EQ, OP_B2G, OP_G2B, OP_RESET: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

endpackage
