// tb_control_unit: runs every operation code through the control unit with
// random register selections and checks, state by state, the bus select,
// the decoded register enables, the A/G/OUT enables, the ALU code and the
// divider start; that the machine waits in S27 while w stays high; and the
// number of clock cycles from S1 seeing w to reaching S27 (2 for one-step
// operations, 4 for ALU operations, 21 for division and modulus). A small model in the testbench
// stands in for the divider (done 17 cycles after start).
module tb_control_unit;
  import gummi_pkg::*;

  logic clk = 0, rst = 1, w = 0, div_done;
  logic [8:0] instr = 0, ir;
  bus_sel_t bus_sel;
  logic [3:0] r_en;
  logic a_en, g_en, out_en, div_start, done, tx_start;
  g_src_t g_src;
  opcode_t alu_op;
  state_t state;
  int checks = 0, failures = 0;
  int div_cnt = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  // divider stand-in
  always_ff @(posedge clk)
    if (div_start) div_cnt <= 17;
    else if (div_cnt > 0) div_cnt <= div_cnt - 1;
  assign div_done = (div_cnt == 1);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sig(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (instr %b)", what, ir);
    end
  endtask

  function automatic bit is_alu(int c);
    return (c >= 4 && c <= 11) || (c >= 15 && c <= 27);
  endfunction

  task automatic run(int code, logic [1:0] ry, logic [1:0] rx, int hold);
    int cyc;
    logic [3:0] onehot;
    bit seen_start, seen_tx;
    onehot = 4'b0001 << rx;
    @(negedge clk);
    instr = {5'(code), ry, rx};
    w = 1;
    cyc = 0;
    seen_start = 0;
    seen_tx = 0;
    // cycle where S1 sees w
    expect_sig("idle in S1", state == S1 && !done && r_en == 0);
    @(negedge clk);
    cyc++;
    instr = 9'($urandom);   // instruction must have been latched
    expect_sig("IR loaded", ir == {5'(code), ry, rx} && state == S2);
    // S2
    case (code)
      0:  expect_sig("load in", bus_sel == BUS_DIN && g_en && g_src == G_BUS && r_en == 0 && !out_en);
      12: expect_sig("save", bus_sel == BUS_G && r_en == onehot && !g_en);
      13: expect_sig("load out", bus_sel == bus_sel_t'({1'b1, ry}) && out_en && r_en == 0);
      14: expect_sig("copy", bus_sel == bus_sel_t'({1'b1, ry}) && r_en == onehot);
      default:
        if (is_alu(code) || code == 1 || code == 2)
          expect_sig("S2 loads A from Rx", bus_sel == bus_sel_t'({1'b1, rx}) && a_en && r_en == 0 && !g_en);
        else
          expect_sig("unused code idle", r_en == 0 && !a_en && !g_en && !out_en);
    endcase
    @(negedge clk);
    cyc++;
    if (is_alu(code) || code == 1 || code == 2) begin
      // SQa
      expect_sig("SQa puts Ry on bus", state == SQA && bus_sel == bus_sel_t'({1'b1, ry}) && r_en == 0);
      if (is_alu(code)) expect_sig("SQa ALU to G", g_en && g_src == G_ALU && alu_op == opcode_t'(code) && !div_start);
      else expect_sig("SQa starts divider", div_start && !g_en);
      @(negedge clk);
      cyc++;
      if (code == 1 || code == 2) begin
        while (state == SDIV && !div_done) begin
          expect_sig("divider wait", !g_en && r_en == 0);
          @(negedge clk);
          cyc++;
        end
        expect_sig("divider result to G", state == SDIV && g_en && g_src == (code == 1 ? G_QUO : G_REM));
        @(negedge clk);
        cyc++;
      end
      expect_sig("SQb G to Rx", state == SQB && bus_sel == BUS_G && r_en == onehot);
      @(negedge clk);
      cyc++;
    end
    // S27: hold w for a while
    for (int h = 0; h < hold; h++) begin
      expect_sig("S27 done, waiting", state == S27 && done && !tx_start);
      @(negedge clk);
      cyc++;
    end
    w = 0;
    #1;
    expect_sig("S27 tx_start", state == S27 && done && tx_start);
    @(negedge clk);
    expect_sig("back to S1", state == S1 && !done);
    if (hold == 0) begin
      int exp;
      exp = (code == 1 || code == 2) ? 21 : (is_alu(code) ? 4 : 2);
      expect_sig($sformatf("cycles %0d for op %0d", cyc, code), cyc == exp);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int rep = 0; rep < 20; rep++)
      for (int code = 0; code < 32; code++)
        run(code, 2'($urandom), 2'($urandom), (rep % 4 == 3) ? 3 : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
