// tb_uart_rx: sends random bytes on the serial line (16 sample ticks per
// bit, a tick every TDIV clocks) and checks each received byte, that exactly
// one rx_done pulse comes per byte, and that it comes during the stop bit.
// A short low glitch must be rejected as a false start and give no byte.
module tb_uart_rx;
  localparam int TDIV = 3;
  localparam int BITC = 16 * TDIV;

  logic clk = 0, rst = 1, rx = 1, s_tick, rx_done, false_start;
  logic [7:0] dout;
  int checks = 0, failures = 0, ndone = 0, nfalse = 0, tcnt = 0;

  uart_rx dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) tcnt <= (tcnt == TDIV - 1) ? 0 : tcnt + 1;
  assign s_tick = (tcnt == TDIV - 1);

  always @(posedge clk) begin
    if (rx_done) ndone++;
    if (false_start) nfalse++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [7:0] v);
    int n_before;
    n_before = ndone;
    rx = 0;
    repeat (BITC) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      rx = v[i];
      repeat (BITC) @(negedge clk);
    end
    rx = 1;
    repeat (BITC) @(negedge clk);
    checks++;
    if (ndone != n_before + 1) begin
      failures++;
      $display("FAIL %0d rx_done pulses for byte %h", ndone - n_before, v);
    end
    checks++;
    if (dout !== v) begin
      failures++;
      $display("FAIL received %h expected %h", dout, v);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    send(8'h55);
    send(8'h00);
    send(8'hFF);
    send(8'h4E);    // 'N': copy operation code
    for (int k = 0; k < 100; k++) send(8'($urandom));
    // glitch shorter than half a bit: rejected at the start-bit check
    begin
      int n_before;
      n_before = ndone;
      rx = 0;
      repeat (TDIV * 4) @(negedge clk);
      rx = 1;
      repeat (BITC * 12) @(negedge clk);
      checks++;
      if (ndone != n_before || nfalse != 1) begin
        failures++;
        $display("FAIL glitch: rx_done %0d false_start %0d", ndone - n_before, nfalse);
      end
    end
    send(8'hA7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
