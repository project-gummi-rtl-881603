// tb_div_unit: checks quotient and remainder against integer division for
// corner and random operands (divide by zero included), and that `done`
// comes after the load cycle plus exactly 16 iteration cycles.
module tb_div_unit;
  import gummi_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic [15:0] dividend, divisor, quotient, remainder;
  logic busy, done;
  int checks = 0, failures = 0;

  div_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [15:0] n, logic [15:0] d);
    int cycles;
    logic [15:0] eq, er;
    eq = (d == 0) ? 16'hFFFF : n / d;
    er = (d == 0) ? n : n % d;
    @(negedge clk);
    dividend = n;
    divisor  = d;
    start    = 1;
    @(negedge clk);
    start    = 0;
    dividend = 16'($urandom);   // inputs may change after start
    divisor  = 16'($urandom);
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
      if (cycles > 40) break;
    end
    checks++;
    if (cycles != 17) begin  // load cycle + 16 iterations
      failures++;
      $display("FAIL latency %0d for %0d/%0d", cycles, n, d);
    end
    checks++;
    if (quotient !== eq || remainder !== er) begin
      failures++;
      if (failures < 20)
        $display("FAIL %0d/%0d gave q=%0d r=%0d exp q=%0d r=%0d", n, d, quotient, remainder, eq, er);
    end
    // results hold after done
    @(negedge clk);
    checks++;
    if (quotient !== eq || remainder !== er || busy) failures++;
  endtask

  initial begin
    dividend = 0;
    divisor  = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(16'd10, 16'd3);
    run(16'd0, 16'd7);
    run(16'hFFFF, 16'd1);
    run(16'hFFFF, 16'hFFFF);
    run(16'd5, 16'd0);
    run(16'd100, 16'd200);
    run(16'hFFFF, 16'h8000);
    for (int k = 0; k < 500; k++) run(16'($urandom), 16'($urandom) >> ($urandom % 16));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
