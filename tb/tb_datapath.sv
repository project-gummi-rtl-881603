// tb_datapath: drives the datapath's control inputs with random values
// cycle by cycle and compares the bus, R0..R3, A, G and OUT with a model
// kept in the testbench; then runs directed division and modulus through
// the divider path into G.
module tb_datapath;
  import gummi_pkg::*;
  import gummi_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic [6:0] din;
  bus_sel_t bus_sel;
  logic [3:0] r_en;
  logic a_en, g_en, out_en, div_start, div_done;
  g_src_t g_src;
  opcode_t alu_op;
  logic [15:0] bus, out_q, a_q, g_q;
  logic [15:0] regs [4];
  int checks = 0, failures = 0;

  logic [15:0] m_r [4];
  logic [15:0] m_a, m_g, m_out, m_bus;

  datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    bus_sel = BUS_ZERO; r_en = 0; a_en = 0; g_en = 0; out_en = 0;
    div_start = 0; g_src = G_ALU; alu_op = OP_ADD;
  endtask

  function automatic logic [15:0] model_bus(bus_sel_t s);
    case (s)
      BUS_DIN: return {9'd0, din};
      BUS_G:   return m_g;
      BUS_R0:  return m_r[0];
      BUS_R1:  return m_r[1];
      BUS_R2:  return m_r[2];
      BUS_R3:  return m_r[3];
      default: return 16'd0;
    endcase
  endfunction

  task automatic compare(string where);
    checks++;
    if (a_q !== m_a || g_q !== m_g || out_q !== m_out ||
        regs[0] !== m_r[0] || regs[1] !== m_r[1] || regs[2] !== m_r[2] || regs[3] !== m_r[3]) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: R=%h %h %h %h A=%h G=%h OUT=%h model R=%h %h %h %h A=%h G=%h OUT=%h",
                 where, regs[0], regs[1], regs[2], regs[3], a_q, g_q, out_q,
                 m_r[0], m_r[1], m_r[2], m_r[3], m_a, m_g, m_out);
    end
  endtask

  int alu_codes[21] = '{4,5,6,7,8,9,10,11,15,16,17,18,19,20,21,22,23,24,25,26,27};

  initial begin
    idle();
    din = 0;
    m_r = '{default: 16'd0};
    m_a = 0; m_g = 0; m_out = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    compare("reset");
    for (int k = 0; k < 4000; k++) begin
      logic [2:0] s;
      int code;
      din = 7'($urandom);
      do s = 3'($urandom); while (s == 3'b011);
      bus_sel = bus_sel_t'(s);
      r_en = 4'($urandom);
      a_en = 1'($urandom);
      out_en = 1'($urandom);
      g_en = 1'($urandom);
      g_src = ($urandom % 2) ? G_ALU : G_BUS;
      code = alu_codes[$urandom % 21];
      alu_op = opcode_t'(code);
      #1;
      m_bus = model_bus(bus_sel);
      checks++;
      if (bus !== m_bus) begin
        failures++;
        if (failures < 10) $display("FAIL bus sel %0d = %h expected %h", s, bus, m_bus);
      end
      @(negedge clk);
      for (int i = 0; i < 4; i++) if (r_en[i]) m_r[i] = m_bus;
      if (g_en) m_g = (g_src == G_ALU) ? ref_alu(code, m_a, m_bus) : m_bus;
      if (a_en) m_a = m_bus;
      if (out_en) m_out = m_bus;
      compare("random step");
    end
    // division and modulus: A <- R1, start with R2 on the bus, G <- result
    for (int k = 0; k < 40; k++) begin
      int mod;
      mod = k % 2;
      idle();
      bus_sel = BUS_R1; a_en = 1;
      @(negedge clk);
      m_a = m_r[1];
      bus_sel = BUS_R2; a_en = 0; div_start = 1;
      @(negedge clk);
      div_start = 0;
      while (!div_done) @(negedge clk);
      g_en = 1; g_src = mod ? G_REM : G_QUO;
      @(negedge clk);
      idle();
      m_g = ref_alu(mod ? 2 : 1, m_a, m_r[2]);
      compare(mod ? "modulus" : "division");
      // new operands from the input for the next round
      din = 7'($urandom); bus_sel = BUS_DIN; r_en = 4'b0010;
      @(negedge clk);
      m_r[1] = {9'd0, din};
      din = 7'($urandom % 20); r_en = 4'b0100;
      @(negedge clk);
      m_r[2] = {9'd0, din};
      idle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
