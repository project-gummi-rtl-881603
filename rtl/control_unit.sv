// control_unit: finite state machine, instruction register and 2-to-4 decoder.
//
// S1 waits for the receiver's finish signal `w` and loads the 9-bit
// instruction register IR = {op[4:0], Ry[1:0], Rx[1:0]}. S2 decodes it:
// load in (input to G), save (G to Rx), copy (Ry to Rx) and load out
// (Ry to OUT) finish here and go straight to S27. Every other operation
// puts Rx on the bus and loads A in S2, then in SQa puts Ry on the bus and
// writes the ALU result into G (one cycle), and in SQb moves G into Rx. For
// division and modulus SQa starts the 16-cycle divider and the machine waits
// in SDIV until it finishes before SQb. In S27 `done` is high; when `w` is
// low the machine returns to S1 and `tx_start` pulses for one cycle to start
// the transmitter. Register writes go through a 2-to-4 decoder of Rx.
// The states S1, S2, SQa, SQb and S27, the register selection by {1, Rx}
// on the bus multiplexer and the done/w handshake follow the design
// description; the separate divider wait state and the treatment of unused
// operation codes (no operation, straight to S27) are this design's choices.
// Timing, counting the S1 cycle that sees w as cycle 1 and with w low again:
// tx_start comes in cycle 3 for one-step operations, cycle 5 for ALU
// operations and cycle 22 for division and modulus (17 cycles in SDIV).
module control_unit
  import gummi_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              w,          // instruction ready (receiver finish)
  input  logic [8:0]        instr,      // {op, Ry, Rx} from the receiver
  input  logic              div_done,
  output bus_sel_t          bus_sel,
  output logic [NREGS-1:0]  r_en,
  output logic              a_en,
  output logic              g_en,
  output g_src_t            g_src,
  output logic              out_en,
  output opcode_t           alu_op,
  output logic              div_start,
  output logic              done,
  output logic              tx_start,
  output logic [8:0]        ir,
  output state_t            state
);

  state_t   next;
  opcode_t  op;
  logic [1:0] rx, ry;
  logic     r_wr;               // write Rx through the decoder

  assign op = opcode_t'(ir[8:4]);
  assign ry = ir[3:2];
  assign rx = ir[1:0];

  // 2-to-4 decoder for the register write enables.
  always_comb begin
    r_en = '0;
    if (r_wr) r_en[rx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S1;
      ir    <= '0;
    end else begin
      state <= next;
      if (state == S1 && w) ir <= instr;
    end
  end

  always_comb begin
    next      = state;
    bus_sel   = BUS_ZERO;
    r_wr      = 1'b0;
    a_en      = 1'b0;
    g_en      = 1'b0;
    g_src     = G_ALU;
    out_en    = 1'b0;
    alu_op    = op;
    div_start = 1'b0;
    done      = 1'b0;
    tx_start  = 1'b0;
    unique case (state)
      S1: if (w) next = S2;
      S2: begin
        unique case (op)
          OP_LOADIN: begin
            bus_sel = BUS_DIN; g_en = 1'b1; g_src = G_BUS; next = S27;
          end
          OP_SAVE: begin
            bus_sel = BUS_G; r_wr = 1'b1; next = S27;
          end
          OP_COPY: begin
            bus_sel = bus_sel_t'({1'b1, ry}); r_wr = 1'b1; next = S27;
          end
          OP_LOADOUT: begin
            bus_sel = bus_sel_t'({1'b1, ry}); out_en = 1'b1; next = S27;
          end
          default: begin
            if (is_alu_op(op) || op == OP_DIV || op == OP_MOD) begin
              bus_sel = bus_sel_t'({1'b1, rx}); a_en = 1'b1; next = SQA;
            end else begin
              next = S27;     // unused code: no operation
            end
          end
        endcase
      end
      SQA: begin
        bus_sel = bus_sel_t'({1'b1, ry});
        if (op == OP_DIV || op == OP_MOD) begin
          div_start = 1'b1;
          next      = SDIV;
        end else begin
          g_en = 1'b1; g_src = G_ALU; next = SQB;
        end
      end
      SDIV: begin
        if (div_done) begin
          g_en  = 1'b1;
          g_src = (op == OP_DIV) ? G_QUO : G_REM;
          next  = SQB;
        end
      end
      SQB: begin
        bus_sel = BUS_G; r_wr = 1'b1; next = S27;
      end
      S27: begin
        done = 1'b1;
        if (!w) begin
          tx_start = 1'b1;
          next     = S1;
        end
      end
      default: next = S1;
    endcase
  end

  // At most one register is written per cycle, and the transmitter is only
  // started from S27.
  a_one_write: assert property (@(posedge clk) disable iff (rst)
    (r_en & (r_en - 4'd1)) == 4'd0);
  a_tx_in_s27: assert property (@(posedge clk) disable iff (rst)
    tx_start |-> (state == S27 && !w));

endmodule
