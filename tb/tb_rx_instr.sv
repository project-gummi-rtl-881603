// tb_rx_instr: feeds three-byte instructions (ASCII characters whose low
// bits carry operation, register selection and number) and checks the
// stripped fields, that finish pulses once per instruction only after the
// third byte, and that the fields hold until the next instruction completes.
module tb_rx_instr;
  logic clk = 0, rst = 1, rx_done = 0, finish;
  logic [7:0] din = 0;
  logic [4:0] op;
  logic [3:0] rsel;
  logic [6:0] num;
  int checks = 0, failures = 0, nfinish = 0;

  rx_instr dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (finish) nfinish++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic byte_in(logic [7:0] v);
    @(negedge clk);
    din = v;
    rx_done = 1;
    @(negedge clk);
    rx_done = 0;
    din = 8'($urandom);
    repeat (1 + $urandom % 5) @(negedge clk);
  endtask

  task automatic instr(logic [4:0] o, logic [3:0] r, logic [6:0] n);
    int n_before;
    logic [4:0] o0; logic [3:0] r0; logic [6:0] n0;
    n_before = nfinish;
    o0 = op; r0 = rsel; n0 = num;
    // host side: a printable character carrying the field in its low bits
    byte_in({3'b010, o});
    byte_in({4'b0011, r});
    checks++;
    if (nfinish != n_before || op !== o0 || rsel !== r0 || num !== n0) begin
      failures++;
      $display("FAIL fields changed or finish before the third byte");
    end
    byte_in({1'b0, n});
    checks++;
    if (nfinish != n_before + 1) begin
      failures++;
      $display("FAIL finish count %0d", nfinish - n_before);
    end
    checks++;
    if (op !== o || rsel !== r || num !== n) begin
      failures++;
      $display("FAIL got %b %b %b expected %b %b %b", op, rsel, num, o, r, n);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    instr(5'b01110, 4'b0110, 7'd77);   // copy, 'N', then Chr(77) = 'M'
    checks++;
    if (num !== 7'b1001101) failures++;
    for (int k = 0; k < 200; k++) instr(5'($urandom), 4'($urandom), 7'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
