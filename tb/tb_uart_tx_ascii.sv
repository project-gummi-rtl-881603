// tb_uart_tx_ascii: decodes the serial line (sampling each bit in its
// middle) and checks that a start sends sixteen ASCII '0'/'1' characters,
// most significant result bit first, then a carriage return, each framed
// by a start and stop bit; that the transfer takes
// 17 * (10 * BIT_CLKS + GAP_CLKS) clocks; and that a start while busy is
// ignored.
module tb_uart_tx_ascii;
  localparam int BITC = 8;
  localparam int GAPC = 5;

  logic clk = 0, rst = 1, start = 0, tx, busy, char_sent;
  logic [15:0] data = 0;
  int checks = 0, failures = 0;

  uart_tx_ascii #(.BIT_CLKS(BITC), .GAP_CLKS(GAPC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receive one character: wait for the start bit edge, sample mid-bit
  task automatic get_char(output logic [7:0] c, output logic frame_ok);
    int guard = 0;
    while (tx !== 1'b0 && guard < 10000) begin
      @(negedge clk);
      guard++;
    end
    repeat (BITC / 2) @(negedge clk);
    frame_ok = (tx == 1'b0);
    for (int i = 0; i < 8; i++) begin
      repeat (BITC) @(negedge clk);
      c[i] = tx;
    end
    repeat (BITC) @(negedge clk);
    frame_ok &= (tx == 1'b1);
  endtask

  task automatic send_and_check(logic [15:0] v);
    logic [7:0] c;
    logic ok;
    longint t0, t1;
    @(negedge clk);
    data = v;
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = $time;
    data = 16'($urandom);
    for (int k = 0; k < 17; k++) begin
      logic [7:0] exp;
      if (k == 4) begin   // a start while busy must be ignored
        start = 1;
        @(negedge clk);
        start = 0;
      end
      get_char(c, ok);
      exp = (k == 16) ? 8'h0D : (v[15-k] ? 8'h31 : 8'h30);
      checks++;
      if (c !== exp || !ok) begin
        failures++;
        $display("FAIL char %0d = %h expected %h frame %0d", k, c, exp, ok);
      end
    end
    while (busy) @(negedge clk);
    t1 = $time;
    checks++;
    // t0 is one clock after the start edge; busy drops one clock after the end
    if ((t1 - t0) / 10 != 17 * (10 * BITC + GAPC)) begin
      failures++;
      $display("FAIL transfer took %0d clocks", (t1 - t0) / 10);
    end
    checks++;
    if (tx !== 1'b1) failures++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    checks++;
    if (tx !== 1'b1 || busy) failures++;
    send_and_check(16'b0000000000001000);   // 8, as in the design's example
    send_and_check(16'hFFFF);
    send_and_check(16'h0000);
    send_and_check(16'h8001);
    for (int k = 0; k < 10; k++) send_and_check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
