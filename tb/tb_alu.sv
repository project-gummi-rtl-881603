// tb_alu: checks all 21 ALU operations against the reference model, on
// corner values and random operands, and that non-ALU codes give zero.
module tb_alu;
  import gummi_pkg::*;
  import gummi_ref_pkg::*;

  opcode_t     op;
  logic [15:0] a, b, y;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int code, logic [15:0] ta, logic [15:0] tb_);
    logic [15:0] exp;
    op = opcode_t'(code);
    a = ta;
    b = tb_;
    #1;
    exp = (code == 1 || code == 2) ? 16'd0 : ref_alu(code, ta, tb_);
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", code, ta, tb_, y, exp);
    end
  endtask

  logic [15:0] corners [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h00FF};

  initial begin
    for (int code = 0; code < 32; code++) begin
      foreach (corners[i]) foreach (corners[j]) check(code, corners[i], corners[j]);
      for (int k = 0; k < 300; k++) check(code, 16'($urandom), 16'($urandom));
      check(code, 16'h1234, 16'h1234);
    end
    // the worked examples of the design's own test sequence
    check(10, 16'd4, 16'd0);   if (y !== 16'd8)  failures++;
    check(11, 16'd6, 16'd0);   if (y !== 16'd3)  failures++;
    check(6,  16'd3, 16'd2);   if (y !== 16'd5)  failures++;
    check(8,  16'd3, 16'd5);   if (y !== 16'd2)  failures++;
    check(9,  16'd5, 16'd2);   if (y !== 16'd10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
