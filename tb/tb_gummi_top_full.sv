// tb_gummi_top_full: the whole system at its real serial rate (100 MHz
// clock, 9600 bit/s, 10416 clocks per bit, every parameter at its default).
// The host model loads 77 (sent as the character 'M') into R1 and 7 into R2,
// divides R1 by R2 and loads R1 out; every instruction's 17-character reply
// is checked, the last one must read 0000000000001011 (11).
module tb_gummi_top_full;
  localparam int BITC = 10416;

  logic clk = 0, rst = 1, uart_rxd, uart_txd;
  logic [15:0] led;
  int checks = 0, failures = 0;

  gummi_top dut (.clk, .rst, .uart_rxd, .uart_txd, .led);
  serial_host #(.BIT_CLKS(BITC)) host (.clk, .to_dut(uart_rxd), .from_dut(uart_txd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exec(logic [4:0] op, logic [3:0] rsel, logic [6:0] num, logic [15:0] exp);
    logic [15:0] v;
    bit ok;
    host.send_instr(op, rsel, num);
    host.get_result(v, ok);
    checks++;
    if (!ok || v !== exp) begin
      failures++;
      $display("FAIL op %b: reply %b ok %0d expected %b", op, v, ok, exp);
    end
    checks++;
    if (led !== {num, op, rsel}) failures++;
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    exec(5'd0,  4'b0000, 7'd77, 16'd0);   // load in 77 ('M')
    exec(5'd12, 4'b0001, 7'd0,  16'd0);   // save into R1
    exec(5'd0,  4'b0000, 7'd7,  16'd0);   // load in 7
    exec(5'd12, 4'b0010, 7'd0,  16'd0);   // save into R2
    exec(5'd1,  4'b1001, 7'd0,  16'd0);   // R1 <- R1 / R2
    exec(5'd13, 4'b0100, 7'd0,  16'd11);  // load out R1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
