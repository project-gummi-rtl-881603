// gummi_cpu: the Gummi processor without its serial link.
//
// Joins the control unit and the datapath. An instruction {op, Ry, Rx} and
// the 7-bit user input are presented with `w` high; the control unit loads
// the instruction, runs it over the shared bus and raises `done` in its last
// state, then pulses `tx_start` once `w` is low. `out_q` is the output
// register that load out writes and the transmitter sends. This is the
// processor the design tests on its own before adding the serial link.
module gummi_cpu
  import gummi_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              w,
  input  logic [8:0]        instr,
  input  logic [DIN_W-1:0]  din,
  output logic              done,
  output logic              tx_start,
  output logic [WIDTH-1:0]  out_q,
  output logic [8:0]        ir,
  output state_t            state,
  output logic [WIDTH-1:0]  regs [NREGS],
  output logic [WIDTH-1:0]  g_q
);

  bus_sel_t         bus_sel;
  logic [NREGS-1:0] r_en;
  logic             a_en, g_en, out_en, div_start, div_done;
  g_src_t           g_src;
  opcode_t          alu_op;
  logic [WIDTH-1:0] bus, a_q;

  control_unit u_ctrl (
    .clk, .rst, .w, .instr, .div_done,
    .bus_sel, .r_en, .a_en, .g_en, .g_src, .out_en, .alu_op, .div_start,
    .done, .tx_start, .ir, .state
  );

  datapath u_dp (
    .clk, .rst, .din, .bus_sel, .r_en, .a_en, .g_en, .g_src, .out_en,
    .alu_op, .div_start, .div_done, .bus, .out_q, .regs, .a_q, .g_q
  );

endmodule
