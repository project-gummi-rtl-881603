// tb_baud_gen: checks that the default divider ticks once every 651 clocks,
// one clock wide, which gives 16 ticks per bit at 9600 bit/s from 100 MHz.
module tb_baud_gen;
  logic clk = 0, rst = 1, tick;
  int checks = 0, failures = 0;
  int last = -1, cyc = 0, nticks = 0;

  baud_gen dut (.clk, .rst, .tick);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    while (nticks < 40) begin
      @(negedge clk);
      cyc++;
      if (tick) begin
        nticks++;
        if (last >= 0) begin
          checks++;
          if (cyc - last != 651) begin
            failures++;
            $display("FAIL tick period %0d", cyc - last);
          end
        end else begin
          checks++;
          if (cyc != 650) begin  // counter starts at 0 in the first cycle after reset
            failures++;
            $display("FAIL first tick after %0d clocks", cyc);
          end
        end
        last = cyc;
      end
    end
    // 16 ticks span one 9600 bit/s bit at 100 MHz: 10416 clocks = 10.416 us
    checks++;
    if (16 * 651 != 10416) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
