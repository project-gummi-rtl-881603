// tb_gummi_cpu: runs the processor without its serial link. First the
// design's own demonstration sequence: load 4, 6, 2, 3 into R0..R3, shift
// R0 left (8), shift R1 right (3), add R2 to R3 (5), absolute difference of
// R1 and R3 into R1 (2), multiply R2 by R3 into R2 (10), then load out each
// register. Then a long random instruction stream over all 27 operations
// (and the unused codes), compared after every instruction with a model of
// R0..R3, G and OUT, and with the number of clock edges from the one that
// samples w to the cycle with tx_start checked (2 for one-step operations,
// 4 for ALU operations, 21 for division and modulus).
module tb_gummi_cpu;
  import gummi_pkg::*;
  import gummi_ref_pkg::*;

  logic clk = 0, rst = 1, w = 0;
  logic [8:0] instr = 0, ir;
  logic [6:0] din = 0;
  logic done, tx_start;
  logic [15:0] out_q, g_q;
  logic [15:0] regs [4];
  state_t state;
  int checks = 0, failures = 0;
  int n_div = 0, n_alu = 0, n_one = 0;

  logic [15:0] m_r [4];
  logic [15:0] m_g, m_out;

  gummi_cpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model(int code, int ry, int rx);
    case (code)
      0:  m_g = {9'd0, din};
      12: m_r[rx] = m_g;
      13: m_out = m_r[ry];
      14: m_r[rx] = m_r[ry];
      default:
        if (valid_op(code)) begin
          m_g = ref_alu(code, m_r[rx], m_r[ry]);
          m_r[rx] = m_g;
        end
    endcase
  endtask

  task automatic exec(int code, int ry, int rx, logic [6:0] num);
    int cyc, exp;
    @(negedge clk);
    instr = {5'(code), 2'(ry), 2'(rx)};
    din = num;
    w = 1;
    @(negedge clk);
    w = 0;       // finish is a pulse
    cyc = 1;
    while (!tx_start && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    model(code, ry, rx);
    exp = (code == 1 || code == 2) ? 21 :
          (code == 0 || code == 12 || code == 13 || code == 14 || !valid_op(code)) ? 2 : 4;
    if (code == 1 || code == 2) n_div++;
    else if (exp == 4) n_alu++;
    else n_one++;
    checks++;
    if (cyc != exp) begin
      failures++;
      $display("FAIL op %0d took %0d cycles, expected %0d", code, cyc, exp);
    end
    @(negedge clk);
    checks++;
    if (regs[0] !== m_r[0] || regs[1] !== m_r[1] || regs[2] !== m_r[2] || regs[3] !== m_r[3] ||
        g_q !== m_g || out_q !== m_out || state != S1) begin
      failures++;
      if (failures < 10)
        $display("FAIL after op %0d Ry=%0d Rx=%0d: R=%h %h %h %h G=%h OUT=%h model R=%h %h %h %h G=%h OUT=%h",
                 code, ry, rx, regs[0], regs[1], regs[2], regs[3], g_q, out_q,
                 m_r[0], m_r[1], m_r[2], m_r[3], m_g, m_out);
    end
  endtask

  task automatic expect_out(logic [15:0] v);
    checks++;
    if (out_q !== v) begin
      failures++;
      $display("FAIL output %0d expected %0d", out_q, v);
    end
  endtask

  initial begin
    m_r = '{default: 16'd0};
    m_g = 0;
    m_out = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // demonstration sequence: instruction words as the design lists them
    exec(0, 0, 0, 7'd4);  exec(12, 0, 0, 7'd4);
    exec(0, 0, 0, 7'd6);  exec(12, 0, 1, 7'd6);
    exec(0, 0, 0, 7'd2);  exec(12, 0, 2, 7'd2);
    exec(0, 0, 0, 7'd3);  exec(12, 0, 3, 7'd3);
    exec(10, 0, 0, 7'd3);     // 010100000: R0 << 1
    exec(11, 0, 1, 7'd3);     // 010110001: R1 >> 1
    exec(6, 2, 3, 7'd3);      // 001101011: R3 <- R3 + R2
    exec(8, 3, 1, 7'd3);      // 010001101: R1 <- |R1 - R3|
    exec(9, 3, 2, 7'd3);      // 010011110: R2 <- R2 * R3
    exec(13, 0, 0, 7'd3); expect_out(16'd8);
    exec(13, 1, 0, 7'd3); expect_out(16'd2);
    exec(13, 2, 0, 7'd3); expect_out(16'd10);
    exec(13, 3, 0, 7'd3); expect_out(16'd5);
    // random stream
    for (int k = 0; k < 3000; k++) begin
      int code;
      code = (k % 5 == 0) ? int'($urandom % 32) : int'($urandom % 28);
      if (k % 7 == 0) code = 0;
      if (k % 7 == 1) code = 12;
      exec(code, int'($urandom % 4), int'($urandom % 4), 7'($urandom));
    end
    checks++;
    if (n_div == 0 || n_alu == 0 || n_one == 0) failures++;
    $display("operations: %0d one-step, %0d ALU, %0d divider", n_one, n_alu, n_div);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
