// tb_smp8_datapath: drives the datapath with random control words and
// operands, one per clock, and compares PC, AC and the zero flag every cycle
// with a register-level model of the datapath equations. Also checks the
// reset state and that a STAC write lands in the data memory (read back by a
// later load). Counts the MVAC-bypass case (R loaded while the ALU uses it).
module tb_smp8_datapath;
  import smp8_pkg::*;

  logic  clk = 0, reset = 1;
  ctrl_t ctrl;
  addr_t operand;
  logic  zero;
  addr_t pc;
  word_t ac;
  int checks = 0, failures = 0, n_mva = 0, n_load = 0, n_store = 0;

  // model state
  logic [3:0] m_pc;
  logic [7:0] m_ac, m_r, m_mem [16];
  logic       m_z;

  smp8_datapath dut (.clk, .reset, .ctrl, .zero, .pc, .operand, .ac);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] f(logic [2:0] s, logic [7:0] a, logic [7:0] b);
    case (s)
      3'd0: return a + b;
      3'd1: return a - b;
      3'd2: return a + 1;
      3'd3: return 0;
      3'd4: return a & b;
      3'd5: return a | b;
      3'd6: return a ^ b;
      default: return ~a;
    endcase
  endfunction

  initial begin
    logic [7:0] res, b;
    ctrl = '0; operand = '0;
    m_pc = 0; m_ac = 0; m_r = 0; m_z = 0;
    foreach (m_mem[i]) m_mem[i] = (i == 0) ? 8'h37 : 8'h00;
    #12;
    checks++;
    if (pc !== 0 || ac !== 0 || zero !== 0) begin
      failures++; $display("FAIL reset state pc=%0d ac=%02h z=%0b", pc, ac, zero);
    end
    @(negedge clk); reset = 0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      ctrl = ctrl_t'(9'($urandom));
      // keep the fields the controller never combines apart, and favour loads
      if (ctrl.mvr) ctrl.load = 0;
      if ($urandom % 4 == 0) begin ctrl = '0; ctrl.load = 1; ctrl.alu = ALU_AND; end
      operand = addr_t'($urandom);
      #1;
      checks++;
      if (pc !== m_pc || ac !== m_ac || zero !== m_z) begin
        failures++;
        $display("FAIL cyc %0d pc=%0d/%0d ac=%02h/%02h z=%0b/%0b", cyc, pc, m_pc, ac, m_ac, zero, m_z);
      end
      // model the clock edge
      b   = ctrl.mva ? m_ac : m_r;
      res = f(ctrl.alu, m_ac, b);
      if (ctrl.mva) n_mva++;
      if (ctrl.load && !ctrl.mvr && !ctrl.nop) n_load++;
      if (ctrl.store) n_store++;
      m_pc = ctrl.jump ? operand : m_pc + 1;
      m_z  = (res == 0);
      begin
        logic [7:0] old_ac;
        old_ac = m_ac;
        if (!ctrl.nop) m_ac = ctrl.mvr ? m_r : (ctrl.load ? m_mem[operand] : res);
        if (ctrl.mva) m_r = old_ac;
        if (ctrl.store) m_mem[operand] = old_ac;
      end
      @(negedge clk);
    end
    if (n_mva == 0 || n_load == 0 || n_store == 0) begin
      failures++; $display("FAIL coverage mva=%0d load=%0d store=%0d", n_mva, n_load, n_store);
    end
    $display("mva=%0d load=%0d store=%0d", n_mva, n_load, n_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
