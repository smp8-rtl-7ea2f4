// tb_smp8: runs the processor core on an instruction memory held in the
// testbench. First the first demonstration program, checked cycle by cycle
// (PC sequence and accumulator, one instruction per clock, AC = 0x72 after
// 8 executed instructions). Then random 16-instruction programs, each run for
// 40 cycles and compared every cycle with the instruction-level reference
// model (PC, AC, zero flag). Finally the data memory is read back with
// LDAC 0..15 and compared with the model's memory.
module tb_smp8;
  import smp8_pkg::*;
  import smp8_ref_pkg::*;

  logic  clk = 0, reset = 1;
  addr_t pc;
  word_t instr, ac;
  logic  zero;
  logic [7:0] prog [16];
  int checks = 0, failures = 0;

  assign instr = prog[pc];

  smp8 dut (.clk, .reset, .pc, .instr, .ac, .zero);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    @(negedge clk); reset = 1;
    @(negedge clk); reset = 0;
  endtask

  initial begin
    state_t s;
    // program 1, cycle by cycle
    static logic [3:0] exp_pc [9] = '{4'd0, 4'd1, 4'd2, 4'd4, 4'd5, 4'd6, 4'd7, 4'd8, 4'd9};
    static logic [7:0] exp_ac [9] = '{8'h00, 8'h37, 8'h38, 8'h38, 8'h39, 8'h39, 8'h72, 8'h72, 8'h72};
    prog = '{8'h10, 8'hA0, 8'h74, 8'h50, 8'hA0, 8'h30, 8'h80, 8'h22,
             8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    do_reset();
    for (int c = 0; c < 9; c++) begin
      #1;
      checks++;
      if (pc !== exp_pc[c] || ac !== exp_ac[c]) begin
        failures++;
        $display("FAIL program 1 cycle %0d pc=%0d ac=%02h expected %0d %02h", c, pc, ac, exp_pc[c], exp_ac[c]);
      end
      @(negedge clk);
    end
    // the data memory is never reset: the model carries it from here on
    s.mem = TEST1_DMEM;
    s.mem[2] = 8'h72;  // program 1 stored AC to M[2]

    // random programs against the reference model
    for (int p = 0; p < 60; p++) begin
      foreach (prog[i]) prog[i] = 8'($urandom);
      do_reset();
      s.pc = 0; s.ac = 0; s.r = 0; s.z = 0;
      for (int c = 0; c < 40; c++) begin
        #1;
        checks++;
        if (pc !== s.pc || ac !== s.ac || zero !== s.z) begin
          failures++;
          $display("FAIL prog %0d cycle %0d instr=%02h pc=%0d/%0d ac=%02h/%02h z=%0b/%0b",
                   p, c, instr, pc, s.pc, ac, s.ac, zero, s.z);
        end
        step(s, prog[s.pc]);
        @(negedge clk);
      end
    end
    // read the whole data memory back with LDAC 0 .. LDAC 15
    foreach (prog[i]) prog[i] = {4'h1, 4'(i)};
    do_reset();
    for (int c = 0; c < 16; c++) begin
      @(negedge clk);
      checks++;
      if (ac !== s.mem[c]) begin
        failures++; $display("FAIL M[%0d]=%02h expected %02h", c, ac, s.mem[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
