// tb_gummi_top: end-to-end test of the whole system over its serial link,
// with a short bit time (BAUD_DIV = 2, 32 clocks per bit). A host model
// sends three-character instructions and reads back the sixteen-digit
// replies. It runs the design's demonstration sequence (loads into R0..R3,
// shifts, add, absolute difference, multiply, load out of every register),
// then a random stream over all operations, checking every reply and the
// LED display against a model. It also sends a line glitch (must be
// rejected), and an instruction while a reply is still being sent (executed,
// but no second reply). Each mechanism is counted and must occur.
module tb_gummi_top;
  import gummi_pkg::*;
  import gummi_ref_pkg::*;

  localparam int BAUD_DIV = 2;
  localparam int BITC = 16 * BAUD_DIV;

  logic clk = 0, rst = 1, uart_rxd, uart_txd;
  logic [15:0] led;
  int checks = 0, failures = 0;

  logic [15:0] m_r [4];
  logic [15:0] m_g, m_out;

  // mechanism counters
  int n_false_start = 0, n_div_wait = 0, n_alu = 0, n_one_step = 0;
  int n_load_out = 0, n_cr = 0, n_dropped = 0, n_replies = 0;

  gummi_top #(.BAUD_DIV(BAUD_DIV)) dut (.clk, .rst, .uart_rxd, .uart_txd, .led);
  serial_host #(.BIT_CLKS(BITC)) host (.clk, .to_dut(uart_rxd), .from_dut(uart_txd));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (dut.u_rx.false_start) n_false_start++;
    if (dut.u_cpu.state == SDIV && dut.u_cpu.u_ctrl.next == SDIV) n_div_wait++;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model(int code, int ry, int rx, logic [6:0] num);
    case (code)
      0:  m_g = {9'd0, num};
      12: m_r[rx] = m_g;
      13: m_out = m_r[ry];
      14: m_r[rx] = m_r[ry];
      default:
        if (valid_op(code)) begin
          m_g = ref_alu(code, m_r[rx], m_r[ry]);
          m_r[rx] = m_g;
        end
    endcase
    if (code == 13) n_load_out++;
    else if (code == 1 || code == 2) ;
    else if (code == 0 || code == 12 || code == 14 || !valid_op(code)) n_one_step++;
    else n_alu++;
  endtask

  task automatic exec(int code, int ry, int rx, logic [6:0] num);
    logic [15:0] v;
    bit ok;
    host.send_instr(5'(code), {2'(ry), 2'(rx)}, num);
    model(code, ry, rx, num);
    host.get_result(v, ok);
    n_replies += ok;
    if (ok) n_cr++;
    checks++;
    if (!ok || v !== m_out) begin
      failures++;
      if (failures < 10) $display("FAIL op %0d: reply %b ok %0d expected %b", code, v, ok, m_out);
    end
    checks++;
    if (led !== {num, 5'(code), 2'(ry), 2'(rx)}) begin
      failures++;
      $display("FAIL led %h", led);
    end
  endtask

  task automatic expect_out(logic [15:0] v);
    checks++;
    if (m_out !== v) begin
      failures++;
      $display("FAIL load out gave %0d expected %0d", m_out, v);
    end
  endtask

  initial begin
    logic [15:0] v;
    bit ok;
    m_r = '{default: 16'd0};
    m_g = 0;
    m_out = 0;
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    // demonstration sequence
    exec(0, 0, 0, 7'd4);  exec(12, 0, 0, 7'd0);
    exec(0, 0, 0, 7'd6);  exec(12, 0, 1, 7'd0);
    exec(0, 0, 0, 7'd2);  exec(12, 0, 2, 7'd0);
    exec(0, 0, 0, 7'd3);  exec(12, 0, 3, 7'd0);
    exec(10, 0, 0, 7'd0);
    exec(11, 0, 1, 7'd0);
    exec(6, 2, 3, 7'd0);
    exec(8, 3, 1, 7'd0);
    exec(9, 3, 2, 7'd0);
    exec(13, 0, 0, 7'd0); expect_out(16'd8);
    exec(13, 1, 0, 7'd0); expect_out(16'd2);
    exec(13, 2, 0, 7'd0); expect_out(16'd10);
    exec(13, 3, 0, 7'd0); expect_out(16'd5);
    // a glitch on the line must not disturb the next instruction
    host.glitch();
    exec(13, 2, 0, 7'd0);
    // divide and modulus: R0 = 8, R2 = 10 -> 10 / 3 and 10 mod 3 via R3 = 3
    exec(0, 0, 0, 7'd3);  exec(12, 0, 3, 7'd0);
    exec(14, 2, 1, 7'd0);                // R1 <- R2 (10)
    exec(1, 3, 2, 7'd0);                 // R2 <- 10 / 3
    exec(2, 3, 1, 7'd0);                 // R1 <- 10 mod 3
    exec(13, 2, 0, 7'd0); expect_out(16'd3);
    exec(13, 1, 0, 7'd0); expect_out(16'd1);
    // every operation code, random registers and numbers
    for (int k = 0; k < 96; k++) begin
      int code;
      code = (k < 32) ? k : int'($urandom % 28);
      exec(code, int'($urandom % 4), int'($urandom % 4), 7'($urandom));
      if (k % 8 == 7) exec(13, int'($urandom % 4), 0, 7'd0);
    end
    // an instruction that completes while a reply is being sent
    host.send_instr(5'd4, 4'b0000, 7'd0);      // R0 <- R0 + 1
    model(4, 0, 0, 7'd0);
    repeat (BITC * 5) @(negedge clk);
    host.send_instr(5'd13, 4'b0000, 7'd0);     // load out R0, reply dropped
    model(13, 0, 0, 7'd0);
    host.get_result(v, ok);                    // the reply of the first one
    repeat (BITC * 200) @(negedge clk);
    checks++;
    if (!ok || host.pending() != 0) begin
      failures++;
      $display("FAIL overlapping instruction: ok %0d pending %0d", ok, host.pending());
    end else n_dropped++;
    exec(13, 0, 0, 7'd0);                      // the load out did take effect
    // every mechanism must have happened
    checks++;
    if (n_false_start == 0 || n_div_wait == 0 || n_alu == 0 || n_one_step == 0 ||
        n_load_out == 0 || n_cr == 0 || n_dropped == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("mechanisms: false_start=%0d div_wait_cycles=%0d alu=%0d one_step=%0d load_out=%0d replies_with_cr=%0d dropped_reply=%0d",
             n_false_start, n_div_wait, n_alu, n_one_step, n_load_out, n_cr, n_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
