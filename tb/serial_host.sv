// serial_host: behavioural model of the PC side of the serial link, for
// testbenches only. It sends an instruction as three characters: the
// operation code in the low five bits of a character 010xxxxx (for example
// 'N' = 0x4E for code 01110), the register selection in the low four bits
// of 0011xxxx, and the 7-bit number as the character with that code. It
// decodes the processor's replies (8N1, sampled mid-bit) into a queue and,
// like the PC program, accepts only '0', '1' and carriage return: a reply
// is sixteen digits, most significant first, then a carriage return.
// BIT_CLKS is the bit length in clock cycles.
module serial_host #(
  parameter int BIT_CLKS = 32
) (
  input  logic clk,
  output logic to_dut,
  input  logic from_dut
);

  logic [7:0] rxq [$];
  int n_chars = 0;

  initial to_dut = 1'b1;

  // receiver: start bit edge, then sample in the middle of each bit
  initial begin
    logic [7:0] c;
    forever begin
      @(negedge clk);
      if (from_dut === 1'b0) begin
        repeat (BIT_CLKS / 2) @(negedge clk);
        if (from_dut === 1'b0) begin
          for (int i = 0; i < 8; i++) begin
            repeat (BIT_CLKS) @(negedge clk);
            c[i] = from_dut;
          end
          repeat (BIT_CLKS) @(negedge clk);   // stop bit
          if (from_dut === 1'b1) begin
            rxq.push_back(c);
            n_chars++;
          end
        end
      end
    end
  end

  task automatic send_byte(logic [7:0] v);
    @(negedge clk);
    to_dut = 1'b0;
    repeat (BIT_CLKS) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      to_dut = v[i];
      repeat (BIT_CLKS) @(negedge clk);
    end
    to_dut = 1'b1;
    repeat (BIT_CLKS) @(negedge clk);
  endtask

  task automatic send_instr(logic [4:0] op, logic [3:0] rsel, logic [6:0] num);
    send_byte({3'b010, op});
    send_byte({4'b0011, rsel});
    send_byte({1'b0, num});
  endtask

  // a low pulse on the line shorter than half a bit
  task automatic glitch();
    @(negedge clk);
    to_dut = 1'b0;
    repeat (BIT_CLKS / 4) @(negedge clk);
    to_dut = 1'b1;
    repeat (BIT_CLKS * 2) @(negedge clk);
  endtask

  // wait for one reply of 17 characters; ok is 0 on a bad character or timeout
  task automatic get_result(output logic [15:0] v, output bit ok);
    int guard;
    logic [7:0] c;
    ok = 1;
    v = '0;
    for (int k = 0; k < 17; k++) begin
      guard = 0;
      while (rxq.size() == 0 && guard < 40 * BIT_CLKS) begin
        @(negedge clk);
        guard++;
      end
      if (rxq.size() == 0) begin
        ok = 0;
        return;
      end
      c = rxq.pop_front();
      if (k < 16) begin
        if (c == 8'h30 || c == 8'h31) v = {v[14:0], c[0]};
        else ok = 0;
      end else if (c != 8'h0D) ok = 0;
    end
  endtask

  function automatic int pending();
    return rxq.size();
  endfunction

endmodule
